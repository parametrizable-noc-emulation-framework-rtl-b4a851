// tb_traffic_gen: self-checking test of the traffic generator. A small bus responder
// acknowledges each write after a random delay and records the clock of every request.
// For each mode the test checks the number of writes, their addresses and data, and the
// spacing between requests: `interval` idle clocks in uniform mode, none in hotspot mode,
// bursts of `burst_len` followed by `interval` idle clocks in sporadic mode.
module tb_traffic_gen;
  import noc_pkg::*;

  localparam int ID = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [1:0] mode;
  logic [7:0] dst, burst_len;
  logic [15:0] interval, num_pkts, sent, errors;
  logic done;
  wb_req_t req;
  wb_rsp_t rsp;
  int checks = 0, failures = 0;
  int cyc = 0;
  int req_start [$];   // clock at which each request first appeared
  int ack_time  [$];
  bit prev_stb = 0;

  traffic_gen #(.MY_ID(ID)) dut (
    .clk, .rst_n, .start, .mode, .dst, .interval, .burst_len, .num_pkts,
    .wb_req (req), .wb_rsp (rsp), .sent, .errors, .done
  );

  always #5 clk = ~clk;

  // responder: ack 0..2 clocks after a request is seen
  int wait_left = -1;
  int nseen = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    rsp <= '0;
    if (req.cyc && req.stb && !rsp.ack) begin
      if (wait_left < 0) begin
        req_start.push_back(cyc);
        checks++;
        if (req.adr !== {8'h0, dst, 14'(nseen), 2'b00} || req.dat !== {8'(ID), 8'h0, 16'(nseen)} || !req.we) begin
          failures++;
          $display("FAIL request %0d adr %h dat %h", nseen, req.adr, req.dat);
        end
        nseen <= nseen + 1;
        wait_left <= $urandom_range(2);
      end else if (wait_left == 0) begin
        rsp.ack <= 1'b1;
        ack_time.push_back(cyc);
        wait_left <= -1;
      end else begin
        wait_left <= wait_left - 1;
      end
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input tg_mode_e m, input int ival, input int blen, input int n);
    @(negedge clk);
    mode = 2'(m); interval = 16'(ival); burst_len = 8'(blen); num_pkts = 16'(n);
    dst = 8'($urandom_range(1, 8));
    req_start.delete(); ack_time.delete(); nseen = 0;
    start = 1'b1;
    @(negedge clk);
    @(negedge clk);
    wait (done);
    @(negedge clk);
    start = 1'b0;
    expect_eq("sent", int'(sent), n);
    expect_eq("requests", req_start.size(), n);
    for (int k = 1; k < n; k++) begin
      int gap, exp_gap;
      gap = req_start[k] - ack_time[k-1];   // clocks from ack to the next request
      // the responder sees a request one clock after the generator drives it, and the
      // generator sees the ack one clock after the responder drives it
      if (m == TG_HOTSPOT) exp_gap = 2;
      else if (m == TG_SPORADIC) exp_gap = (k % blen == 0) ? ival + 2 : 2;
      else exp_gap = ival + 2;
      expect_eq("request spacing", gap, exp_gap);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    mode = '0; dst = '0; interval = '0; burst_len = '0; num_pkts = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(TG_UNIFORM, 5, 1, 8);
    run(TG_HOTSPOT, 0, 1, 10);
    run(TG_SPORADIC, 7, 3, 12);
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
