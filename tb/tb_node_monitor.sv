// tb_node_monitor: self-checking test of the node monitor. Drives buffer counts and VC
// full flags of the five router inputs and checks FULL, ALMOST FULL (at the AF_LEVEL
// threshold), the per-port flags and FAIL after exactly FAIL_CYCLES clocks of a port
// staying full, against values computed here.
module tb_node_monitor;
  import noc_pkg::*;

  localparam int NUM_VC = 2, VC_DEPTH = 4, AF = 6, FAILC = 10;
  localparam int TCW = $clog2(NUM_VC * VC_DEPTH + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [TCW-1:0]    port_count   [NPORTS];
  logic [NUM_VC-1:0] port_vc_full [NPORTS];
  logic [NPORTS-1:0] port_full, port_af;
  logic full, almost_full, fail;
  int checks = 0, failures = 0;

  node_monitor #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .AF_LEVEL(AF), .FAIL_CYCLES(FAILC)) dut (
    .clk, .rst_n, .port_count, .port_vc_full,
    .port_full, .port_almost_full (port_af), .full, .almost_full, .fail
  );

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    int fail_at;
    for (int p = 0; p < NPORTS; p++) begin
      port_count[p]   = '0;
      port_vc_full[p] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // random counts: check the registered flags one clock later
    for (int n = 0; n < 100; n++) begin
      logic [NPORTS-1:0] ef, ea;
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        port_count[p]   = TCW'($urandom_range(NUM_VC * VC_DEPTH));
        port_vc_full[p] = NUM_VC'($urandom);
        ef[p] = &port_vc_full[p];
        ea[p] = int'(port_count[p]) >= AF;
      end
      @(negedge clk);
      expect_eq("port_full", 32'(port_full), 32'(ef));
      expect_eq("port_af", 32'(port_af), 32'(ea));
      expect_eq("full", 32'(full), 32'(|ef));
      expect_eq("almost_full", 32'(almost_full), 32'(|ea));
      expect_eq("no fail", 32'(fail), 0);
      for (int p = 0; p < NPORTS; p++) port_vc_full[p] = '0;
      @(negedge clk);
    end
    // hold port 3 full and measure when FAIL rises
    port_vc_full[3] = '1;
    fail_at = -1;
    for (int c = 1; c <= 3 * FAILC; c++) begin
      @(negedge clk);
      if (fail && fail_at < 0) fail_at = c;
    end
    expect_eq("fail delay", 32'(fail_at), FAILC + 1);
    port_vc_full[3] = '0;
    repeat (2) @(negedge clk);
    expect_eq("fail clears", 32'(fail), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
