// input_port: one router input with its link control, virtual-channel (VC) buffers, VC
// identifier and switch identifier.
//
// Link side: the upstream router drives send/flit and this port answers ready. A flit is
// taken on a clock edge where send and ready are both high. ready is a function of the
// buffer state only, so it never depends combinationally on send.
//
// VC identifier: when a HEADER arrives, the port polls the counts of all VCs and steers the
// packet into the least occupied VC that is not full (lowest index on a tie). The choice is
// held for the rest of the packet and released after its TAIL, so the flits of one packet
// stay together in one VC.
//
// Switch identifier: picks the next VC to serve in round-robin order. A VC is eligible when
// the flit at its head is a HEADER and, for store-and-forward switching, when the whole
// packet (up to its TAIL) is already buffered; for wormhole switching a buffered HEADER is
// enough. The selected VC is presented to the arbiter as head_valid/head_flit until the
// arbiter pops its TAIL; then the next VC is chosen. A selected VC that runs empty in the
// middle of a wormhole packet simply shows head_valid low.
//
// count (flits held in all VCs together) and vc_full (one bit per VC) go to the node
// monitor, which derives FULL, ALMOST FULL and FAIL from them. Following the
// framework, VC selection by occupancy, round-robin service and store-and-forward versus
// wormhole behaviour are the document's; the tie rule, the per-VC tail counter used to
// detect a complete packet and the one-cycle gap between packets are this design's own.
module input_port
  import noc_pkg::*;
#(
  parameter int NUM_VC   = 2,
  parameter int VC_DEPTH = 16,
  parameter int SWITCHING = SW_SF,
  localparam int CW  = $clog2(VC_DEPTH + 1),
  localparam int TCW = $clog2(NUM_VC * VC_DEPTH + 1),
  localparam int VW  = (NUM_VC > 1) ? $clog2(NUM_VC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // link from upstream
  input  logic           in_send,
  input  flit_t          in_flit,
  output logic           in_ready,
  // towards the arbiter
  output logic           head_valid,
  output flit_t          head_flit,
  input  logic           pop,
  // status
  output logic [TCW-1:0] count,
  output logic [NUM_VC-1:0] vc_full
);

  logic [CW-1:0]  vc_count [NUM_VC];
  logic [NUM_VC-1:0] vc_empty;
  flit_t          vc_head  [NUM_VC];
  logic [NUM_VC-1:0] vc_wr, vc_rd;
  logic [CW-1:0]  tails    [NUM_VC];   // complete packets held in each VC

  // ---------------- VC identifier ----------------
  logic          in_pkt_q;             // a packet is being received
  logic [VW-1:0] in_vc_q;              // the VC it goes to
  logic [VW-1:0] best_vc;
  logic          best_ok;
  logic [VW-1:0] wr_vc;
  logic          accept;

  always_comb begin
    best_vc = '0;
    best_ok = 1'b0;
    for (int v = 0; v < NUM_VC; v++) begin
      if (!vc_full[v] && (!best_ok || vc_count[v] < vc_count[best_vc])) begin
        best_vc = VW'(v);
        best_ok = 1'b1;
      end
    end
  end

  assign in_ready = in_pkt_q ? !vc_full[in_vc_q] : best_ok;
  assign wr_vc    = in_pkt_q ? in_vc_q : best_vc;
  assign accept   = in_send && in_ready && in_flit.stb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt_q <= 1'b0;
      in_vc_q  <= '0;
    end else if (accept) begin
      if (in_flit.id == FLIT_TAIL) begin
        in_pkt_q <= 1'b0;
      end else if (!in_pkt_q) begin
        in_pkt_q <= 1'b1;
        in_vc_q  <= best_vc;
      end
    end
  end

  // ---------------- VC buffers ----------------
  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic [FLIT_W-1:0] rd_bits;
    assign vc_wr[v] = accept && (wr_vc == VW'(v));
    vc_fifo #(.W(FLIT_W), .DEPTH(VC_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en   (vc_wr[v]),
      .wr_data (in_flit),
      .rd_en   (vc_rd[v]),
      .rd_data (rd_bits),
      .count   (vc_count[v]),
      .full    (vc_full[v]),
      .empty   (vc_empty[v])
    );
    assign vc_head[v] = flit_t'(rd_bits);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tails[v] <= '0;
      else tails[v] <= tails[v]
                       + CW'(vc_wr[v] && in_flit.id == FLIT_TAIL)
                       - CW'(vc_rd[v] && vc_head[v].id == FLIT_TAIL);
    end
  end

  always_comb begin
    count = '0;
    for (int v = 0; v < NUM_VC; v++) count += TCW'(vc_count[v]);
  end

  // ---------------- switch identifier ----------------
  logic          sel_q;                // a VC is selected
  logic [VW-1:0] sel_vc_q;
  logic [VW-1:0] rr_q;                 // VC served last
  logic [NUM_VC-1:0] eligible;
  logic          pick_ok;
  logic [VW-1:0] pick_vc;

  always_comb begin
    logic [VW-1:0] v;
    v = '0;
    for (int e = 0; e < NUM_VC; e++) begin
      eligible[e] = !vc_empty[e] && vc_head[e].id == FLIT_HEAD &&
                    (SWITCHING == SW_WH || tails[e] != '0);
    end
    pick_ok = 1'b0;
    pick_vc = '0;
    for (int k = 1; k <= NUM_VC; k++) begin
      v = VW'((int'(rr_q) + k) % NUM_VC);
      if (!pick_ok && eligible[v]) begin
        pick_ok = 1'b1;
        pick_vc = v;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q    <= 1'b0;
      sel_vc_q <= '0;
      rr_q     <= VW'(NUM_VC - 1);
    end else if (!sel_q) begin
      if (pick_ok) begin
        sel_q    <= 1'b1;
        sel_vc_q <= pick_vc;
        rr_q     <= pick_vc;
      end
    end else if (pop && head_flit.id == FLIT_TAIL) begin
      sel_q <= 1'b0;
    end
  end

  assign head_valid = sel_q && !vc_empty[sel_vc_q];
  assign head_flit  = vc_head[sel_vc_q];

  always_comb begin
    vc_rd = '0;
    if (pop) vc_rd[sel_vc_q] = 1'b1;
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
