// router_arbiter: routing table, destination check and FSM-based output allocation of a
// five-port router.
//
// Every input port presents the head flit of the packet its switch identifier selected.
// When that flit is a HEADER, the arbiter looks up the destination node in the routing
// table of this router. The table holds, for every destination, the output port of the
// shortest path: XY routing on a mesh or torus, digit-wise routing on a WK-recursive
// network. The "destination check" is the table entry for this router's own number, which
// is the local port towards the network adapter.
//
// Each output port has a two-state FSM. In IDLE it grants itself to one requesting input,
// in round-robin order among inputs, and moves to BUSY. In BUSY it forwards the flits of
// that input, one per cycle, into its output register as long as the register is empty or
// is being taken by the downstream READY, and returns to IDLE after the TAIL. The path is
// therefore held from HEADER to TAIL, as wormhole switching requires; with store-and-forward
// switching the input port only offers a packet once all of it is buffered, so the same
// arbiter serves both modes.
//
// With source routing (SRC_ROUTE = 1) the table is not used: the HEADER carries the list
// of output ports chosen by the sending network adapter. The arbiter takes the first entry
// as the output and, as the HEADER leaves, shifts the list by one entry so that the next
// router finds its own port first. An entry above 4 is treated as the local port.
//
// Timing: a grant is registered, so the HEADER leaves one cycle after it was offered; the
// output register adds one cycle; body flits then stream at one flit per cycle.
// The routing table and the round-robin order follow the document's description of the
// arbiter; the two-state FSM, the registered output and the grant latency are this
// design's own.
module router_arbiter
  import noc_pkg::*;
#(
  parameter int MY_ID     = 0,
  parameter int TOPOLOGY  = TOPO_TORUS,
  parameter int COLS      = 3,
  parameter int ROWS      = 3,
  parameter bit SRC_ROUTE = 1'b0,
  localparam int NUM_NODES = COLS * ROWS,
  localparam int PW = $clog2(NPORTS),
  localparam int DW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] head_valid,
  input  flit_t             head_flit [NPORTS],
  output logic [NPORTS-1:0] pop,
  output link_t             out_link  [NPORTS],
  input  logic [NPORTS-1:0] out_ready
);

  typedef enum logic {OUT_IDLE, OUT_BUSY} out_state_e;

  // ---------------- routing table ----------------
  port_e rtable [NUM_NODES];
  for (genvar d = 0; d < NUM_NODES; d++) begin : g_rt
    assign rtable[d] = route_port(TOPOLOGY, COLS, ROWS, MY_ID, d);
  end

  port_e req_port [NPORTS];
  always_comb begin
    logic [NODE_W-1:0]  d;
    logic [ROUTE_W-1:0] r;
    for (int i = 0; i < NPORTS; i++) begin
      d = head_dst(head_flit[i]);
      // A destination outside the network is delivered locally rather than lost.
      r = head_route(head_flit[i]);
      if (SRC_ROUTE)
        req_port[i] = (r[2:0] <= 3'd4) ? port_e'(r[2:0]) : PORT_L;
      else
        req_port[i] = (int'(d) < NUM_NODES) ? rtable[DW'(d)] : PORT_L;
    end
  end

  // ---------------- allocation FSMs ----------------
  out_state_e        state_q [NPORTS];
  logic [PW-1:0]     owner_q [NPORTS];
  logic [PW-1:0]     rr_q    [NPORTS];
  logic [NPORTS-1:0] in_busy;
  logic [NPORTS-1:0] grant_ok;
  logic [PW-1:0]     grant_in [NPORTS];
  logic [NPORTS-1:0] out_valid_q;
  flit_t             out_flit_q [NPORTS];
  logic [NPORTS-1:0] load;

  always_comb begin
    in_busy = '0;
    for (int o = 0; o < NPORTS; o++)
      if (state_q[o] == OUT_BUSY) in_busy[owner_q[o]] = 1'b1;
  end

  always_comb begin
    logic [PW-1:0] i;
    i = '0;
    for (int o = 0; o < NPORTS; o++) begin
      grant_ok[o] = 1'b0;
      grant_in[o] = '0;
      if (state_q[o] == OUT_IDLE) begin
        for (int k = 1; k <= NPORTS; k++) begin
          i = PW'((int'(rr_q[o]) + k) % NPORTS);
          if (!grant_ok[o] && head_valid[i] && !in_busy[i] &&
              head_flit[i].id == FLIT_HEAD && int'(req_port[i]) == o) begin
            grant_ok[o] = 1'b1;
            grant_in[o] = i;
          end
        end
      end
    end
  end

  always_comb begin
    pop  = '0;
    load = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (state_q[o] == OUT_BUSY && head_valid[owner_q[o]] &&
          (!out_valid_q[o] || out_ready[o])) begin
        load[o]          = 1'b1;
        pop[owner_q[o]]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        state_q[o]    <= OUT_IDLE;
        owner_q[o]    <= '0;
        rr_q[o]       <= PW'(NPORTS - 1);
        out_flit_q[o] <= '0;
      end
      out_valid_q <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        case (state_q[o])
          OUT_IDLE: if (grant_ok[o]) begin
            state_q[o] <= OUT_BUSY;
            owner_q[o] <= grant_in[o];
            rr_q[o]    <= grant_in[o];
          end
          OUT_BUSY: if (load[o] && head_flit[owner_q[o]].id == FLIT_TAIL)
            state_q[o] <= OUT_IDLE;
          default: state_q[o] <= OUT_IDLE;
        endcase
        if (load[o]) begin
          out_valid_q[o] <= 1'b1;
          out_flit_q[o]  <= head_flit[owner_q[o]];
          if (SRC_ROUTE && head_flit[owner_q[o]].id == FLIT_HEAD)
            out_flit_q[o].payload[19:8] <= {3'b000, head_flit[owner_q[o]].payload[19:11]};
        end else if (out_ready[o]) begin
          out_valid_q[o] <= 1'b0;
        end
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    assign out_link[o].send = out_valid_q[o];
    assign out_link[o].flit = out_flit_q[o];
  end

endmodule
