// tb_noc_latency: latency against injection rate on the default 3x3 torus with
// store-and-forward switching, for uniform traffic over one and two hops and for hotspot
// traffic: five masters writing to one slow (250 MHz) D-MEM at the same interval.
// Network latency of a packet is the time from its HEADER entering the router at the
// source node to its HEADER leaving the router at the destination. The average over a run
// is (sum of leave times - sum of enter times) / packets, which needs no matching of
// individual packets because every packet that enters also leaves before the run ends.
// For each traffic case the injection interval is swept from sparse to back to back and
// the table of average latency is printed. Checks: every packet is delivered, the 2-hop
// latency exceeds the 1-hop latency at low load, latency does not fall as the injection
// rate rises, and hotspot traffic at full rate is slower than a single uniform stream.
module tb_noc_latency;
  import noc_pkg::*;

  localparam int N = 9;
  localparam logic [8:0] MASTERS = 9'h16D;
  localparam int NPTS = 4;
  localparam int IVALS [NPTS] = '{48, 16, 4, 0};
  localparam int NPK = 24;
  logic clk_noc = 1'b0, rst_n = 1'b0;
  logic [N-1:0] clk_pe = '0;
  logic [N-1:0] tg_sel, tg_start, tg_done, parity_err;
  wb_req_t pe_req [N];
  wb_rsp_t pe_rsp [N];
  logic [1:0]  tg_mode [N];
  logic [7:0]  tg_dst [N], tg_burst_len [N];
  logic [15:0] tg_interval [N], tg_num_pkts [N], tg_sent [N], tg_errors [N];
  logic [31:0] full_cycles [N], af_cycles [N], injected, delivered, in_flight;
  logic any_full, any_fail;
  logic [3:0] nb_congestion [N];
  int checks = 0, failures = 0;

  noc_top dut (
    .clk_noc, .clk_pe, .rst_n, .tg_sel, .pe_req, .pe_rsp, .tg_start, .tg_mode, .tg_dst,
    .tg_interval, .tg_burst_len, .tg_num_pkts, .tg_sent, .tg_errors, .tg_done,
    .mon_clear (1'b0), .full_cycles, .af_cycles, .injected, .delivered, .in_flight,
    .any_full, .any_fail, .parity_err, .nb_congestion
  );

  always #2 clk_noc = ~clk_noc;
  for (genvar n = 0; n < N; n++) begin : g_clk
    localparam int HALF = (n == 1) ? 4 : 8;
    always #HALF clk_pe[n] = ~clk_pe[n];
  end

  longint sum_in = 0, sum_out = 0;
  int n_in = 0, n_out = 0;
  always @(posedge clk_noc) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (dut.pkt_in[n])  begin sum_in  += $time; n_in++;  end
      if (dut.pkt_out[n]) begin sum_out += $time; n_out++; end
    end
  end

  task automatic expect_true(input string what, input bit c);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one run: srcs[n] = destination of master n, or -1 when idle; returns average latency (ns)
  task automatic run(input int srcs [N], input tg_mode_e mode, input int ival, output real lat);
    int t;
    bit all_done;
    longint si0, so0;
    int ni0, no0;
    si0 = sum_in; so0 = sum_out; ni0 = n_in; no0 = n_out;
    @(negedge clk_pe[0]);
    for (int n = 0; n < N; n++) begin
      tg_mode[n] = 2'(mode); tg_dst[n] = 8'(srcs[n] < 0 ? 0 : srcs[n]);
      tg_interval[n] = 16'(ival); tg_burst_len[n] = 8'd1; tg_num_pkts[n] = 16'(NPK);
      tg_start[n] = MASTERS[n] && srcs[n] >= 0;
    end
    repeat (4) @(negedge clk_pe[0]);
    t = 0;
    while (t < 100000) begin
      all_done = 1;
      for (int n = 0; n < N; n++) if (tg_start[n] && !tg_done[n]) all_done = 0;
      if (all_done) break;
      @(negedge clk_pe[0]);
      t++;
    end
    t = 0;
    while (in_flight != 0 && t < 20000) begin @(posedge clk_noc); t++; end
    repeat (100) @(posedge clk_noc);
    tg_start = '0;
    repeat (4) @(negedge clk_pe[0]);
    expect_true($sformatf("all packets delivered (%0d in, %0d out)", n_in - ni0, n_out - no0),
                n_in - ni0 == n_out - no0 && n_in > ni0);
    lat = real'(sum_out - so0 - (sum_in - si0)) / real'(n_in - ni0);
  endtask

  initial begin
    int one_hop [N], two_hop [N], hot [N];
    real l1 [NPTS], l2 [NPTS], lh [NPTS];
    tg_sel = MASTERS; tg_start = '0;
    for (int n = 0; n < N; n++) begin
      pe_req[n] = '0; tg_mode[n] = '0; tg_dst[n] = '0; tg_interval[n] = '0;
      tg_burst_len[n] = '0; tg_num_pkts[n] = '0;
      one_hop[n] = -1; two_hop[n] = -1; hot[n] = MASTERS[n] ? 4 : -1;
    end
    one_hop[2] = 1;      // node 2 -> node 1 (fast D-MEM), one hop West
    two_hop[8] = 1;      // node 8 -> node 1, East over the wrap, then South over the wrap
    repeat (4) @(posedge clk_pe[0]);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_pe[0]);
    for (int i = 0; i < NPTS; i++) begin
      run(one_hop, TG_UNIFORM, IVALS[i], l1[i]);
      run(two_hop, TG_UNIFORM, IVALS[i], l2[i]);
      run(hot, TG_UNIFORM, IVALS[i], lh[i]);
    end
    $display("interval(PE clk)  1-hop(ns)  2-hop(ns)  5 masters to node 4 (ns)");
    for (int i = 0; i < NPTS; i++)
      $display("%8d %14.1f %10.1f %12.1f", IVALS[i], l1[i], l2[i], lh[i]);
    expect_true("2-hop latency above 1-hop latency at low load", l2[0] > l1[0]);
    expect_true("hotspot latency at full rate above single-stream latency", lh[NPTS-1] > l1[NPTS-1]);
    expect_true("hotspot latency rises with the injection rate", lh[NPTS-1] > lh[0]);
    for (int i = 1; i < NPTS; i++)
      expect_true($sformatf("hotspot latency does not fall at interval %0d", IVALS[i]),
                  lh[i] >= lh[i-1] - 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk_noc);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
