// routing_node: one node of the network: router, link controller, network adapter and node
// monitor.
//
// The router runs on the network clock clk_noc; the network adapter and the PE side run on
// clk_pe, four times slower in the main configuration. The link controller crosses between
// the two. A master node (IS_MASTER = 1) carries a core interface, whose bus port pe_req /
// pe_rsp is driven by a master PE or a traffic generator; a slave node carries a slave
// network interface, whose bus port bus_req / bus_rsp drives a slave PE such as a data
// memory. The unused bus port of a node is idle (all zero).
//
// Network ports: index 0..3 of net_in/net_out are North, East, South, West (router ports
// 1..4). A link is flit + SEND forward and READY backward. An unconnected port must have
// net_in[k].send and net_out_ready[k] tied low.
// Monitor outputs (network clock): the node monitor's FULL / ALMOST FULL / FAIL, the
// per-port ALMOST FULL warnings for the neighbours, and pkt_in / pkt_out pulses for every
// packet HEADER entering or leaving the network at this node. parity_err (PE clock) pulses
// when the adapter rejects a packet.
// SRC_ROUTE selects source routing (route chosen by the adapters) instead of the routers'
// own tables.
// The composition follows the document's routing node; bringing the monitor signals out
// as pulses and flags is this design's own.
module routing_node
  import noc_pkg::*;
#(
  parameter int MY_ID       = 0,
  parameter bit IS_MASTER   = 1'b1,
  parameter int TOPOLOGY    = TOPO_TORUS,
  parameter int SWITCHING   = SW_SF,
  parameter int COLS        = 3,
  parameter int ROWS        = 3,
  parameter int NUM_VC      = 2,
  parameter int VC_DEPTH    = 16,
  parameter int LC_DEPTH    = 16,
  parameter int MAX_BURST   = 4,
  parameter bit PARITY_ODD  = 1'b0,
  parameter logic [255:0] SLAVE_MASK = 256'h92,
  parameter int FAIL_CYCLES = 256,
  parameter bit SRC_ROUTE   = 1'b0
) (
  input  logic       clk_noc,
  input  logic       clk_pe,
  input  logic       rst_n,
  // network links N, E, S, W
  input  link_t      net_in        [4],
  output logic [3:0] net_in_ready,
  output link_t      net_out       [4],
  input  logic [3:0] net_out_ready,
  // master side bus (from PE or traffic generator)
  input  wb_req_t    pe_req,
  output wb_rsp_t    pe_rsp,
  // slave side bus (to slave PE)
  output wb_req_t    bus_req,
  input  wb_rsp_t    bus_rsp,
  // monitor
  output logic       full,
  output logic       almost_full,
  output logic       fail,
  output logic [3:0] cong_out,
  output logic       pkt_in,
  output logic       pkt_out,
  output logic       parity_err
);

  localparam int TCW = $clog2(NUM_VC * VC_DEPTH + 1);

  link_t             rt_in  [NPORTS];
  link_t             rt_out [NPORTS];
  logic [NPORTS-1:0] rt_in_ready, rt_out_ready;
  logic [TCW-1:0]    port_count   [NPORTS];
  logic [NUM_VC-1:0] port_vc_full [NPORTS];
  logic [NPORTS-1:0] port_full, port_af;

  for (genvar k = 0; k < 4; k++) begin : g_net
    assign rt_in[k+1]        = net_in[k];
    assign net_in_ready[k]   = rt_in_ready[k+1];
    assign net_out[k]        = rt_out[k+1];
    assign rt_out_ready[k+1] = net_out_ready[k];
    assign cong_out[k]       = port_af[k+1];
  end

  router #(
    .MY_ID(MY_ID), .TOPOLOGY(TOPOLOGY), .SWITCHING(SWITCHING), .COLS(COLS), .ROWS(ROWS),
    .NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .SRC_ROUTE(SRC_ROUTE)
  ) u_router (
    .clk (clk_noc), .rst_n,
    .in_link  (rt_in),  .in_ready  (rt_in_ready),
    .out_link (rt_out), .out_ready (rt_out_ready),
    .port_count, .port_vc_full
  );

  logic  na_tx_valid, na_tx_ready, na_rx_valid, na_rx_ready;
  flit_t na_tx_flit, na_rx_flit;

  link_controller #(.DEPTH(LC_DEPTH)) u_lc (
    .rst_n,
    .clk_pe,
    .na_tx_valid, .na_tx_flit, .na_tx_ready,
    .na_rx_valid, .na_rx_flit, .na_rx_ready,
    .clk_noc,
    .rt_tx       (rt_in[0]),
    .rt_tx_ready (rt_in_ready[0]),
    .rt_rx       (rt_out[0]),
    .rt_rx_ready (rt_out_ready[0])
  );

  if (IS_MASTER) begin : g_master
    core_interface #(
      .MY_ID(MY_ID), .NUM_NODES(COLS * ROWS), .SLAVE_MASK(SLAVE_MASK),
      .TOPOLOGY(TOPOLOGY), .COLS(COLS), .ROWS(ROWS), .SRC_ROUTE(SRC_ROUTE),
      .MAX_BURST(MAX_BURST), .PARITY_ODD(PARITY_ODD)
    ) u_ci (
      .clk (clk_pe), .rst_n,
      .wb_req (pe_req), .wb_rsp (pe_rsp),
      .tx_valid (na_tx_valid), .tx_flit (na_tx_flit), .tx_ready (na_tx_ready),
      .rx_valid (na_rx_valid), .rx_flit (na_rx_flit), .rx_ready (na_rx_ready),
      .parity_err
    );
    assign bus_req = '0;
  end else begin : g_slave
    logic pkt_done;
    slave_ni #(
      .MY_ID(MY_ID), .MAX_BURST(MAX_BURST), .PARITY_ODD(PARITY_ODD),
      .TOPOLOGY(TOPOLOGY), .COLS(COLS), .ROWS(ROWS), .SRC_ROUTE(SRC_ROUTE)
    ) u_ni (
      .clk (clk_pe), .rst_n,
      .rx_valid (na_rx_valid), .rx_flit (na_rx_flit), .rx_ready (na_rx_ready),
      .tx_valid (na_tx_valid), .tx_flit (na_tx_flit), .tx_ready (na_tx_ready),
      .bus_req, .bus_rsp,
      .parity_err, .pkt_done
    );
    assign pe_rsp = '0;
  end

  node_monitor #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .FAIL_CYCLES(FAIL_CYCLES)) u_mon (
    .clk (clk_noc), .rst_n,
    .port_count, .port_vc_full,
    .port_full, .port_almost_full (port_af),
    .full, .almost_full, .fail
  );

  assign pkt_in  = rt_in[0].send && rt_in_ready[0] && rt_in[0].flit.id == FLIT_HEAD;
  assign pkt_out = rt_out[0].send && rt_out_ready[0] && rt_out[0].flit.id == FLIT_HEAD;

endmodule
