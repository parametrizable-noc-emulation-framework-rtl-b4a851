// tb_noc_monitor: self-checking test of the NoC monitor. Drives random node flags and
// packet pulses for many clocks, keeps reference counts here and compares every counter
// and sticky flag with them, then checks that clear resets everything.
module tb_noc_monitor;
  localparam int NN = 4, CW = 16;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [NN-1:0] nfull, naf, nfail, pin, pout;
  logic [CW-1:0] full_cycles [NN], af_cycles [NN];
  logic [CW-1:0] injected, delivered, in_flight;
  logic any_full, any_fail;
  int checks = 0, failures = 0;
  int ref_full [NN], ref_af [NN];
  int ref_in, ref_out;
  bit ref_anyfull, ref_anyfail;

  noc_monitor #(.NUM_NODES(NN), .CNT_W(CW)) dut (
    .clk, .rst_n, .clear, .node_full (nfull), .node_almost_full (naf), .node_fail (nfail),
    .pkt_in (pin), .pkt_out (pout), .full_cycles, .af_cycles, .injected, .delivered,
    .in_flight, .any_full, .any_fail
  );

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic compare();
    for (int n = 0; n < NN; n++) begin
      expect_eq("full_cycles", int'(full_cycles[n]), ref_full[n]);
      expect_eq("af_cycles", int'(af_cycles[n]), ref_af[n]);
    end
    expect_eq("injected", int'(injected), ref_in);
    expect_eq("delivered", int'(delivered), ref_out);
    expect_eq("in_flight", int'(in_flight), (ref_in - ref_out) & 32'hffff);
    expect_eq("any_full", int'(any_full), int'(ref_anyfull));
    expect_eq("any_fail", int'(any_fail), int'(ref_anyfail));
  endtask

  initial begin
    {nfull, naf, nfail, pin, pout} = '0;
    ref_in = 0; ref_out = 0; ref_anyfull = 0; ref_anyfail = 0;
    for (int n = 0; n < NN; n++) begin ref_full[n] = 0; ref_af[n] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      nfull = NN'($urandom) & NN'($urandom);
      naf   = NN'($urandom);
      nfail = (c == 200) ? NN'(4) : '0;
      pin   = NN'($urandom);
      pout  = NN'($urandom) & NN'($urandom);
      for (int n = 0; n < NN; n++) begin
        ref_full[n] += int'(nfull[n]);
        ref_af[n]   += int'(naf[n]);
        ref_in      += int'(pin[n]);
        ref_out     += int'(pout[n]);
      end
      if (|nfull) ref_anyfull = 1;
      if (|nfail) ref_anyfail = 1;
      @(posedge clk);
      #1;
      if (c % 50 == 49 || c == 201) compare();
    end
    @(negedge clk);
    {nfull, naf, nfail, pin, pout} = '0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    ref_in = 0; ref_out = 0; ref_anyfull = 0; ref_anyfail = 0;
    for (int n = 0; n < NN; n++) begin ref_full[n] = 0; ref_af[n] = 0; end
    compare();
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
