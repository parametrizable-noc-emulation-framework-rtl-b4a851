// node_monitor: watches the input buffers of one router and raises ON/OFF status signals
// for the NoC monitor and the neighbouring routers.
//
// Per input port: FULL when every virtual channel of the port is full (the port's READY is
// then low for a new packet), ALMOST FULL when the flits buffered in the port reach
// AF_LEVEL, the "partially full" congestion warning. FAIL is raised while some port has
// stayed FULL for FAIL_CYCLES consecutive clocks, a sign of a stalled or deadlocked link.
// The per-port ALMOST FULL flags are also brought out so they can be sent to the router on
// the other end of each link. All outputs are registered (one clock after the counts).
// FULL, ALMOST FULL and FAIL and the parameterizable partial-full level are the
// document's; the AF_LEVEL default (three quarters of the port's buffering) and the
// meaning given to FAIL are this design's own.
module node_monitor
  import noc_pkg::*;
#(
  parameter int NUM_VC      = 2,
  parameter int VC_DEPTH    = 16,
  parameter int AF_LEVEL    = (3 * NUM_VC * VC_DEPTH) / 4,
  parameter int FAIL_CYCLES = 256,
  localparam int TCW = $clog2(NUM_VC * VC_DEPTH + 1),
  localparam int FW  = $clog2(FAIL_CYCLES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TCW-1:0]    port_count   [NPORTS],
  input  logic [NUM_VC-1:0] port_vc_full [NPORTS],
  output logic [NPORTS-1:0] port_full,
  output logic [NPORTS-1:0] port_almost_full,
  output logic              full,
  output logic              almost_full,
  output logic              fail
);

  logic [FW-1:0] full_run [NPORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_full        <= '0;
      port_almost_full <= '0;
      fail             <= 1'b0;
      for (int p = 0; p < NPORTS; p++) full_run[p] <= '0;
    end else begin
      fail <= 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        port_full[p]        <= &port_vc_full[p];
        port_almost_full[p] <= int'(port_count[p]) >= AF_LEVEL;
        if (!(&port_vc_full[p]))                  full_run[p] <= '0;
        else if (full_run[p] != FW'(FAIL_CYCLES)) full_run[p] <= full_run[p] + 1'b1;
        if (full_run[p] == FW'(FAIL_CYCLES))      fail <= 1'b1;
      end
    end
  end

  assign full        = |port_full;
  assign almost_full = |port_almost_full;

endmodule
