// tb_noc_top: end-to-end test of the whole framework at its default configuration: 3x3
// torus, store-and-forward switching, XY routing, two virtual channels, master nodes
// 0, 2, 3, 5, 6, 8 and D-MEM slave nodes 1, 4, 7. Routers run at 1 GHz (4 ns clock),
// master PEs at 250 MHz, the D-MEM of node 1 at 500 MHz (fast mode) and those of nodes 4
// and 7 at 250 MHz (slow mode). No parameter of the top is changed.
//
// Phase A  the PE bus of node 0 writes and reads words at one and two hops, over a
//          wrap-around link, and writes a four-word burst that travels as one packet.
// Phase B  uniform traffic: five traffic generators write to the slaves at fixed intervals.
// Phase C  hotspot traffic: all five generators write back to back to node 4.
// Phase D  sporadic traffic: bursts of writes to node 7 separated by gaps.
// Checks: read data, the data pattern and the number of words each D-MEM receives, the
// generator counts, the monitor totals (every packet injected is delivered), and that
// each mechanism of the design occurred at least once: store-and-forward hold of a
// header until its tail is buffered, use of the second virtual channel, READY held low
// on a link (back-pressure), a wrap-around link, ALMOST FULL and FULL input buffers, the
// congestion warning to a neighbour, burst packing, a read response, and all three
// traffic modes.
// Phase E  the clock of node 4's D-MEM is held while all generators write to it, so that
//          buffers stay full until the node monitor raises FAIL; the traffic must still be
//          delivered once the clock runs again.
module tb_noc_top;
  import noc_pkg::*;

  localparam int N = 9;
  localparam logic [8:0] MASTERS = 9'h16D;
  logic clk_noc = 1'b0, rst_n = 1'b0;
  bit hold4 = 1'b0;              // stops the clock of slave node 4 (phase E)
  logic [N-1:0] clk_pe = '0;
  logic [N-1:0] tg_sel, tg_start, tg_done, parity_err;
  wb_req_t pe_req [N];
  wb_rsp_t pe_rsp [N];
  logic [1:0]  tg_mode [N];
  logic [7:0]  tg_dst [N], tg_burst_len [N];
  logic [15:0] tg_interval [N], tg_num_pkts [N], tg_sent [N], tg_errors [N];
  logic mon_clear;
  logic [31:0] full_cycles [N], af_cycles [N], injected, delivered, in_flight;
  logic any_full, any_fail;
  logic [3:0] nb_congestion [N];
  int checks = 0, failures = 0;

  noc_top dut (
    .clk_noc, .clk_pe, .rst_n, .tg_sel, .pe_req, .pe_rsp, .tg_start, .tg_mode, .tg_dst,
    .tg_interval, .tg_burst_len, .tg_num_pkts, .tg_sent, .tg_errors, .tg_done, .mon_clear,
    .full_cycles, .af_cycles, .injected, .delivered, .in_flight, .any_full, .any_fail,
    .parity_err, .nb_congestion
  );

  always #2 clk_noc = ~clk_noc;
  for (genvar n = 0; n < N; n++) begin : g_clk
    localparam int HALF = (n == 1) ? 4 : 8;
    always #HALF clk_pe[n] = (n == 4 && hold4) ? 1'b0 : ~clk_pe[n];
  end

  // ---------------- mechanism probes ----------------
  int m_sf_hold = 0, m_vc1 = 0, m_stall = 0, m_wrap = 0, m_cong = 0, m_burst = 0;
  int m_read = 0, m_fail = 0;
  int dmem_writes [N];
  logic [31:0] w_time [N];   // time of the last D-MEM write per node

  for (genvar n = 0; n < N; n++) begin : g_probe
    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      for (genvar v = 0; v < 2; v++) begin : g_vc
        always @(posedge clk_noc) if (rst_n) begin
          if (!dut.g_node[n].u_node.u_router.g_in[p].u_in.vc_empty[v] &&
              dut.g_node[n].u_node.u_router.g_in[p].u_in.vc_head[v].id == FLIT_HEAD &&
              dut.g_node[n].u_node.u_router.g_in[p].u_in.tails[v] == '0)
            m_sf_hold++;
        end
      end
      always @(posedge clk_noc) if (rst_n) begin
        if (dut.g_node[n].u_node.u_router.g_in[p].u_in.vc_wr[1]) m_vc1++;
      end
    end
    for (genvar k = 0; k < 4; k++) begin : g_link
      always @(posedge clk_noc) if (rst_n) begin
        if (dut.net_out[n][k].send && !dut.net_out_ready[n][k]) m_stall++;
        if (dut.net_out[n][k].send && dut.net_out_ready[n][k]) begin
          // wrap-around links: North of row 0, South of row 2, West of column 0, East of column 2
          if ((k == 0 && n / 3 == 0) || (k == 2 && n / 3 == 2) ||
              (k == 3 && n % 3 == 0) || (k == 1 && n % 3 == 2)) m_wrap++;
        end
        if (nb_congestion[n][k]) m_cong++;
      end
    end
    if (!MASTERS[n]) begin : g_slave
      initial dmem_writes[n] = 0;
      always @(posedge clk_pe[n]) if (rst_n) begin
        if (dut.g_node[n].g_slave.u_dmem.hit && dut.g_node[n].g_slave.u_dmem.req.we) begin
          dmem_writes[n]++;
          w_time[n] = 32'($time);
        end
        if (dut.g_node[n].u_node.g_slave.u_ni.state_q == 3'd1 &&
            dut.g_node[n].u_node.g_slave.u_ni.rx_valid &&
            dut.g_node[n].u_node.g_slave.u_ni.rx_flit.id == FLIT_TAIL &&
            dut.g_node[n].u_node.g_slave.u_ni.ndata_q == 4'd8) m_burst++;
      end
    end
  end
  always @(posedge clk_noc) if (rst_n && any_fail) m_fail++;

  task automatic expect_eq(input string what, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, g, e);
    end
  endtask

  task automatic expect_true(input string what, input bit c);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] peek(input int node, input int word);
    case (node)
      1: return dut.g_node[1].g_slave.u_dmem.mem[word];
      4: return dut.g_node[4].g_slave.u_dmem.mem[word];
      default: return dut.g_node[7].g_slave.u_dmem.mem[word];
    endcase
  endfunction

  // bus access from the PE of node 0
  task automatic bus(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                     input logic [2:0] cti, output logic [31:0] rdat);
    int t;
    @(negedge clk_pe[0]);
    pe_req[0].cyc = 1'b1; pe_req[0].stb = 1'b1; pe_req[0].we = we;
    pe_req[0].adr = adr; pe_req[0].dat = dat; pe_req[0].cti = cti;
    t = 0;
    @(posedge clk_pe[0]);
    #1;
    while (!pe_rsp[0].ack && !pe_rsp[0].err && t < 2000) begin @(posedge clk_pe[0]); #1; t++; end
    expect_eq("bus reply without error", 64'(pe_rsp[0].err || !pe_rsp[0].ack), 0);
    rdat = pe_rsp[0].dat;
    if (!we && pe_rsp[0].ack) m_read++;
    @(negedge clk_pe[0]);
    pe_req[0].stb = 1'b0;
    if (cti != 3'b010) pe_req[0] = '0;
  endtask

  // time from a single write on node 0's bus to the D-MEM write at the destination
  task automatic timed_write(input int node, input logic [15:0] a, input logic [31:0] d,
                             output int ns);
    int n_before, t0;
    logic [31:0] rd;
    n_before = dmem_writes[node];
    t0 = int'($time);
    bus(1'b1, {16'(node), a}, d, 3'b000, rd);
    while (dmem_writes[node] == n_before) @(posedge clk_noc);
    ns = int'(w_time[node]) - t0;
  endtask

  task automatic run_tg(input int dsts [N], input tg_mode_e mode, input int ival,
                        input int blen, input int npk);
    int t;
    bit all_done;
    @(negedge clk_pe[0]);
    for (int n = 0; n < N; n++) begin
      tg_mode[n] = 2'(mode); tg_dst[n] = 8'(dsts[n]); tg_interval[n] = 16'(ival);
      tg_burst_len[n] = 8'(blen); tg_num_pkts[n] = 16'(npk);
      tg_start[n] = MASTERS[n] && n != 0;
    end
    repeat (4) @(negedge clk_pe[0]);
    t = 0;
    while (t < 100000) begin
      all_done = 1;
      for (int n = 2; n < N; n++) if (MASTERS[n] && !tg_done[n]) all_done = 0;
      if (all_done) break;
      @(negedge clk_pe[0]);
      t++;
    end
    tg_start = '0;
    for (int n = 2; n < N; n++) if (MASTERS[n]) begin
      expect_eq($sformatf("node %0d writes sent", n), 64'(tg_sent[n]), 64'(npk));
      expect_eq($sformatf("node %0d errors", n), 64'(tg_errors[n]), 0);
    end
    // drain: every injected packet delivered and written
    t = 0;
    while ((in_flight != 0) && t < 20000) begin @(posedge clk_noc); t++; end
    repeat (200) @(posedge clk_noc);
  endtask

  // data written by generator `src` as its k-th write
  function automatic logic [31:0] tg_word(input int src, input int k);
    return {8'(src), 8'h00, 16'(k)};
  endfunction

  initial begin
    logic [31:0] rd;
    int lat1, lat2, w0 [N];
    int dsts [N];
    logic [31:0] bw [4];
    logic [31:0] a, b;
    int af_sum, full_sum;
    tg_sel = '0; tg_start = '0; mon_clear = 1'b0;
    for (int n = 0; n < N; n++) begin
      pe_req[n] = '0; tg_mode[n] = '0; tg_dst[n] = '0; tg_interval[n] = '0;
      tg_burst_len[n] = '0; tg_num_pkts[n] = '0;
    end
    repeat (4) @(posedge clk_pe[0]);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_pe[0]);

    // ---------------- phase A: PE bus of node 0 ----------------
    timed_write(1, 16'h1000, 32'h1111_0001, lat1);     // 1 hop (East)
    timed_write(4, 16'h1000, 32'h4444_0001, lat2);     // 2 hops (East, South)
    $display("single write latency: 1 hop %0d ns, 2 hops %0d ns", lat1, lat2);
    expect_true("two-hop write takes longer than one-hop write", lat2 > lat1);
    bus(1'b1, 32'h0007_3000, 32'h7777_0001, 3'b000, rd);   // East, then North over the wrap
    for (int k = 0; k < 4; k++) begin
      bw[k] = $urandom;
      bus(1'b1, 32'h0004_2000 + 32'(4 * k), bw[k], (k == 3) ? 3'b111 : 3'b010, rd);
    end
    bus(1'b0, 32'h0001_1000, '0, 3'b000, rd);
    expect_eq("read node 1", 64'(rd), 64'h1111_0001);
    bus(1'b0, 32'h0004_1000, '0, 3'b000, rd);
    expect_eq("read node 4", 64'(rd), 64'h4444_0001);
    bus(1'b0, 32'h0007_3000, '0, 3'b000, rd);
    expect_eq("read node 7", 64'(rd), 64'h7777_0001);
    for (int k = 0; k < 4; k++) begin
      bus(1'b0, 32'h0004_2000 + 32'(4 * k), '0, 3'b000, rd);
      expect_eq($sformatf("read burst word %0d", k), 64'(rd), 64'(bw[k]));
    end
    expect_true("burst travelled as one packet", m_burst >= 1);

    // ---------------- phase B: uniform traffic ----------------
    tg_sel = MASTERS & ~9'h1;
    for (int n = 0; n < N; n++) w0[n] = dmem_writes[n];
    dsts = '{0, 0, 1, 4, 0, 4, 7, 0, 1};
    run_tg(dsts, TG_UNIFORM, 6, 1, 16);
    expect_eq("uniform: writes at node 1", 64'(dmem_writes[1] - w0[1]), 32);
    expect_eq("uniform: writes at node 4", 64'(dmem_writes[4] - w0[4]), 32);
    expect_eq("uniform: writes at node 7", 64'(dmem_writes[7] - w0[7]), 16);
    for (int k = 0; k < 16; k++) begin
      a = peek(1, k); b = peek(4, k);
      expect_true($sformatf("uniform: node 1 word %0d (%h)", k, a),
                  a == tg_word(2, k) || a == tg_word(8, k));
      expect_true($sformatf("uniform: node 4 word %0d (%h)", k, b),
                  b == tg_word(3, k) || b == tg_word(5, k));
      expect_eq($sformatf("uniform: node 7 word %0d", k), 64'(peek(7, k)), 64'(tg_word(6, k)));
    end
    expect_eq("uniform: injected = delivered", 64'(injected), 64'(delivered));

    // ---------------- phase C: hotspot traffic ----------------
    for (int n = 0; n < N; n++) w0[n] = dmem_writes[n];
    dsts = '{0, 0, 4, 4, 0, 4, 4, 0, 4};
    run_tg(dsts, TG_HOTSPOT, 0, 1, 40);
    expect_eq("hotspot: writes at node 4", 64'(dmem_writes[4] - w0[4]), 200);
    for (int k = 0; k < 40; k++) begin
      b = peek(4, k);
      expect_true($sformatf("hotspot: node 4 word %0d (%h)", k, b),
                  b[15:0] == 16'(k) && b[23:16] == 8'h00 && MASTERS[b[31:24]]);
    end
    expect_eq("hotspot: injected = delivered", 64'(injected), 64'(delivered));

    // ---------------- phase D: sporadic traffic ----------------
    for (int n = 0; n < N; n++) w0[n] = dmem_writes[n];
    dsts = '{0, 0, 7, 7, 0, 7, 7, 0, 7};
    run_tg(dsts, TG_SPORADIC, 40, 4, 12);
    expect_eq("sporadic: writes at node 7", 64'(dmem_writes[7] - w0[7]), 60);
    expect_eq("sporadic: injected = delivered", 64'(injected), 64'(delivered));
    expect_eq("no parity error", 64'(parity_err), 0);

    // ---------------- phase E: stalled slave ----------------
    // The D-MEM of node 4 stops (its clock is held) while the generators keep writing to it.
    // The buffers on the way fill up and stay full until the node monitor raises FAIL;
    // then the clock runs again and all traffic must still be delivered.
    for (int n = 0; n < N; n++) w0[n] = dmem_writes[n];
    dsts = '{0, 0, 4, 4, 0, 4, 4, 0, 4};
    hold4 = 1'b1;
    fork
      run_tg(dsts, TG_HOTSPOT, 0, 1, 24);
      begin
        int t;
        t = 0;
        while (!any_fail && t < 50000) begin @(posedge clk_noc); t++; end
        repeat (100) @(posedge clk_noc);
        hold4 = 1'b0;
      end
    join
    expect_true("FAIL raised while the slave was stalled", any_fail);
    expect_eq("stall: writes at node 4", 64'(dmem_writes[4] - w0[4]), 120);
    expect_eq("stall: injected = delivered", 64'(injected), 64'(delivered));

    // ---------------- mechanisms ----------------
    $display("mechanisms: sf_hold=%0d vc1=%0d stall=%0d wrap=%0d congestion=%0d burst=%0d read=%0d fail=%0d",
             m_sf_hold, m_vc1, m_stall, m_wrap, m_cong, m_burst, m_read, m_fail);
    begin
      af_sum = 0; full_sum = 0;
      for (int n = 0; n < N; n++) begin af_sum += int'(af_cycles[n]); full_sum += int'(full_cycles[n]); end
      $display("monitor: injected=%0d delivered=%0d full_cycles=%0d af_cycles=%0d any_full=%0d any_fail=%0d",
               injected, delivered, full_sum, af_sum, any_full, any_fail);
      expect_true("ALMOST FULL occurred", af_sum > 0);
      expect_true("FULL occurred", full_sum > 0 && any_full);
    end
    expect_true("store-and-forward hold occurred", m_sf_hold > 0);
    expect_true("second virtual channel used", m_vc1 > 0);
    expect_true("link back-pressure occurred", m_stall > 0);
    expect_true("wrap-around link used", m_wrap > 0);
    expect_true("congestion warning sent to a neighbour", m_cong > 0);
    expect_true("read response received", m_read >= 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk_noc);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
