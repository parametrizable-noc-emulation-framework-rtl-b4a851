// router: five-port network router (local PE, North, East, South, West).
//
// Each input has its own input_port (READY/SEND link control, virtual-channel FIFOs, VC
// identifier, switch identifier); one router_arbiter holds the routing table and connects
// inputs to outputs. Links are full duplex: in_link/in_ready and out_link/out_ready are the
// two directions of each port. A flit moves on a link at a clock edge where SEND and READY
// are both high. An output whose neighbour does not exist must have its out_ready tied low;
// the routing table never selects it.
//
// SRC_ROUTE = 1 makes the arbiter follow the route carried in each HEADER instead of its
// own table (source routing).
// Status for the node monitor: the flit count of each input port and the full flag of
// every VC. The document gives the five ports, the input buffers with VCs and the arbiter;
// the way they are split into modules is this design's own.
module router
  import noc_pkg::*;
#(
  parameter int MY_ID     = 0,
  parameter int TOPOLOGY  = TOPO_TORUS,
  parameter int SWITCHING = SW_SF,
  parameter int COLS      = 3,
  parameter int ROWS      = 3,
  parameter int NUM_VC    = 2,
  parameter int VC_DEPTH  = 16,
  parameter bit SRC_ROUTE = 1'b0,
  localparam int TCW = $clog2(NUM_VC * VC_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             in_link   [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  output link_t             out_link  [NPORTS],
  input  logic [NPORTS-1:0] out_ready,
  output logic [TCW-1:0]    port_count [NPORTS],
  output logic [NUM_VC-1:0] port_vc_full [NPORTS]
);

  logic [NPORTS-1:0] head_valid;
  flit_t             head_flit [NPORTS];
  logic [NPORTS-1:0] pop;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .SWITCHING(SWITCHING)) u_in (
      .clk, .rst_n,
      .in_send    (in_link[p].send),
      .in_flit    (in_link[p].flit),
      .in_ready   (in_ready[p]),
      .head_valid (head_valid[p]),
      .head_flit  (head_flit[p]),
      .pop        (pop[p]),
      .count      (port_count[p]),
      .vc_full    (port_vc_full[p])
    );
  end

  router_arbiter #(.MY_ID(MY_ID), .SRC_ROUTE(SRC_ROUTE), .TOPOLOGY(TOPOLOGY), .COLS(COLS), .ROWS(ROWS)) u_arb (
    .clk, .rst_n,
    .head_valid, .head_flit, .pop,
    .out_link, .out_ready
  );

endmodule
