// noc_top: the NoC emulation framework: a network of routing nodes with master PEs (or
// traffic generators), data-memory slave PEs and a network-wide monitor.
//
// Topology (TOPOLOGY):
//   TOPO_TORUS / TOPO_MESH  COLS x ROWS nodes, node n at x = n % COLS, y = n / COLS; North is
//                           y-1, East x+1. The torus wraps both dimensions. XY routing.
//                           A mesh with ROWS = 1 is the linear topology.
//   TOPO_WK                 WK-recursive network WK(COLS, 2) with COLS <= 4: ROWS = COLS
//                           clusters of COLS fully connected nodes; node n = COLS*g + i;
//                           router port 1+k of (g,i) goes to (g,k) for k != i and to (i,g)
//                           for k == i; the ports of the corner nodes (g,g) stay open.
// The main configuration, and the parameter defaults, is the 3x3 torus with
// store-and-forward switching, 2 virtual channels per input and even parity.
//
// Nodes whose bit in MASTER_MASK is set are master nodes: their core interface is driven
// either by the external PE bus pe_req[n] / pe_rsp[n] (tg_sel[n] = 0) or by the node's own
// traffic generator (tg_sel[n] = 1). All other nodes are slave nodes with a D-MEM of
// DMEM_WORDS words. Master and slave PEs are reached as byte address
// {8'h00, node[7:0], local[15:0]}.
// Clocks: clk_noc for all routers and the monitor; clk_pe[n] for the adapter, PE, D-MEM and
// traffic generator of node n (the framework runs routers at 4x the master PE clock, and
// slave memories at 1x or 2x the master PE clock). rst_n is an asynchronous active-low
// reset for all domains.
// Routing is distributed by default: each router looks up the destination in its own
// table. SRC_ROUTE = 1 switches to source routing: the sending adapter puts the whole route
// into the HEADER. A source route holds at most three network hops, enough for the 3x3
// torus and for WK(4,2); larger networks must keep SRC_ROUTE = 0 (checked below).
// The generators are configured per node (tg_start, tg_mode, tg_dst, tg_interval,
// tg_burst_len, tg_num_pkts) and report tg_sent / tg_errors / tg_done. The monitor outputs
// count clocks spent FULL / ALMOST FULL per node and packets injected and delivered;
// nb_congestion shows, per node and port, the ALMOST FULL warning sent by the neighbour.
module noc_top
  import noc_pkg::*;
#(
  parameter int TOPOLOGY    = TOPO_TORUS,
  parameter int SWITCHING   = SW_SF,
  parameter int COLS        = 3,
  parameter int ROWS        = 3,
  parameter int NUM_VC      = 2,
  parameter int VC_DEPTH    = 16,
  parameter int LC_DEPTH    = 16,
  parameter int MAX_BURST   = 4,
  parameter bit PARITY_ODD  = 1'b0,
  parameter logic [255:0] MASTER_MASK = 256'h16D,
  parameter int DMEM_WORDS  = 16384,
  parameter int FAIL_CYCLES = 256,
  parameter int CNT_W       = 32,
  parameter bit SRC_ROUTE   = 1'b0,
  localparam int N = COLS * ROWS
) (
  input  logic          clk_noc,
  input  logic [N-1:0]  clk_pe,
  input  logic          rst_n,
  // master PE buses
  input  logic [N-1:0]  tg_sel,
  input  wb_req_t       pe_req       [N],
  output wb_rsp_t       pe_rsp       [N],
  // traffic generators
  input  logic [N-1:0]  tg_start,
  input  logic [1:0]    tg_mode      [N],
  input  logic [7:0]    tg_dst       [N],
  input  logic [15:0]   tg_interval  [N],
  input  logic [7:0]    tg_burst_len [N],
  input  logic [15:0]   tg_num_pkts  [N],
  output logic [15:0]   tg_sent      [N],
  output logic [15:0]   tg_errors    [N],
  output logic [N-1:0]  tg_done,
  // monitor
  input  logic          mon_clear,
  output logic [CNT_W-1:0] full_cycles [N],
  output logic [CNT_W-1:0] af_cycles   [N],
  output logic [CNT_W-1:0] injected,
  output logic [CNT_W-1:0] delivered,
  output logic [CNT_W-1:0] in_flight,
  output logic          any_full,
  output logic          any_fail,
  output logic [N-1:0]  parity_err,
  // congestion warnings received by each node: bit k set when the router at the other end
  // of network port k (N, E, S, W) has the input buffer facing this node almost full
  output logic [3:0]    nb_congestion [N]
);

  localparam logic [255:0] SLAVE_MASK = ~MASTER_MASK & ((256'h1 << N) - 1);

  function automatic int max_hops();
    int m;
    m = 0;
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        if (hop_count(TOPOLOGY, COLS, ROWS, s, d) > m) m = hop_count(TOPOLOGY, COLS, ROWS, s, d);
    return m;
  endfunction

  if (SRC_ROUTE && max_hops() > 3) begin : g_route_check
    $error("source routing holds at most three network hops");
  end

  // Neighbour of node n through network port k (0..3 = N, E, S, W), or -1.
  function automatic int nb_node(input int n, input int k);
    int x, y, g, i;
    if (TOPOLOGY == TOPO_WK) begin
      g = n / COLS; i = n % COLS;
      if (k >= COLS)   return -1;
      if (k != i)      return COLS * g + k;
      if (i != g)      return COLS * i + g;
      return -1;
    end
    x = n % COLS; y = n / COLS;
    case (k)
      0: if (y > 0) return n - COLS;
         else if (TOPOLOGY == TOPO_TORUS && ROWS > 1) return n + COLS * (ROWS - 1);
      1: if (x < COLS - 1) return n + 1;
         else if (TOPOLOGY == TOPO_TORUS && COLS > 1) return n - (COLS - 1);
      2: if (y < ROWS - 1) return n + COLS;
         else if (TOPOLOGY == TOPO_TORUS && ROWS > 1) return n - COLS * (ROWS - 1);
      default: if (x > 0) return n - 1;
         else if (TOPOLOGY == TOPO_TORUS && COLS > 1) return n + (COLS - 1);
    endcase
    return -1;
  endfunction

  // Port of that neighbour that faces node n.
  function automatic int nb_port(input int n, input int k);
    if (TOPOLOGY == TOPO_WK) begin
      if (k != n % COLS) return n % COLS;
      return n / COLS;
    end
    return (k + 2) % 4;
  endfunction

  logic [3:0] cong          [N];
  link_t      net_in        [N][4];
  link_t      net_out       [N][4];
  logic [3:0] net_in_ready  [N];
  logic [3:0] net_out_ready [N];
  logic [N-1:0] node_full, node_af, node_fail, pkt_in, pkt_out;

  for (genvar n = 0; n < N; n++) begin : g_node
    for (genvar k = 0; k < 4; k++) begin : g_link
      localparam int NB = nb_node(n, k);
      localparam int NP = nb_port(n, k);
      if (NB >= 0) begin : g_con
        assign net_in[n][k]        = net_out[NB][NP];
        assign net_out_ready[n][k] = net_in_ready[NB][NP];
        assign nb_congestion[n][k] = cong[NB][NP];
      end else begin : g_open
        assign net_in[n][k]        = '0;
        assign net_out_ready[n][k] = 1'b0;
        assign nb_congestion[n][k] = 1'b0;
      end
    end

    wb_req_t ci_req, bus_req;
    wb_rsp_t ci_rsp, bus_rsp;

    routing_node #(
      .MY_ID(n), .IS_MASTER(MASTER_MASK[n]), .TOPOLOGY(TOPOLOGY), .SWITCHING(SWITCHING),
      .COLS(COLS), .ROWS(ROWS), .NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .LC_DEPTH(LC_DEPTH),
      .MAX_BURST(MAX_BURST), .PARITY_ODD(PARITY_ODD), .SLAVE_MASK(SLAVE_MASK),
      .FAIL_CYCLES(FAIL_CYCLES), .SRC_ROUTE(SRC_ROUTE)
    ) u_node (
      .clk_noc, .clk_pe (clk_pe[n]), .rst_n,
      .net_in (net_in[n]), .net_in_ready (net_in_ready[n]),
      .net_out (net_out[n]), .net_out_ready (net_out_ready[n]),
      .pe_req (ci_req), .pe_rsp (ci_rsp),
      .bus_req, .bus_rsp,
      .full (node_full[n]), .almost_full (node_af[n]), .fail (node_fail[n]),
      .cong_out (cong[n]),
      .pkt_in (pkt_in[n]), .pkt_out (pkt_out[n]),
      .parity_err (parity_err[n])
    );

    if (MASTER_MASK[n]) begin : g_master
      wb_req_t tg_req;
      traffic_gen #(.MY_ID(n)) u_tg (
        .clk (clk_pe[n]), .rst_n,
        .start (tg_start[n]), .mode (tg_mode[n]), .dst (tg_dst[n]),
        .interval (tg_interval[n]), .burst_len (tg_burst_len[n]),
        .num_pkts (tg_num_pkts[n]),
        .wb_req (tg_req), .wb_rsp (tg_sel[n] ? ci_rsp : '0),
        .sent (tg_sent[n]), .errors (tg_errors[n]), .done (tg_done[n])
      );
      assign ci_req    = tg_sel[n] ? tg_req : pe_req[n];
      assign pe_rsp[n] = tg_sel[n] ? '0 : ci_rsp;
      assign bus_rsp   = '0;
    end else begin : g_slave
      dmem #(.WORDS(DMEM_WORDS)) u_dmem (
        .clk (clk_pe[n]), .rst_n, .req (bus_req), .rsp (bus_rsp)
      );
      assign ci_req       = '0;
      assign pe_rsp[n]    = '0;
      assign tg_sent[n]   = '0;
      assign tg_errors[n] = '0;
      assign tg_done[n]   = 1'b0;
    end
  end

  noc_monitor #(.NUM_NODES(N), .CNT_W(CNT_W)) u_mon (
    .clk (clk_noc), .rst_n, .clear (mon_clear),
    .node_full, .node_almost_full (node_af), .node_fail,
    .pkt_in, .pkt_out,
    .full_cycles, .af_cycles, .injected, .delivered, .in_flight,
    .any_full, .any_fail
  );

endmodule
