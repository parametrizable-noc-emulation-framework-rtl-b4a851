// tb_noc_wk: end-to-end test of the framework in its second configuration: a 16-node
// WK-recursive network WK(4,2) (four fully connected clusters of four nodes) with wormhole
// switching and digit-wise minimal routing. Slave D-MEM nodes are 0, 5, 10 and 15 (the
// cluster corners); all other nodes are masters.
// Phase A  the PE bus of node 1 writes single words at one and three hops and compares the
//          latencies, writes a four-word burst to node 15 as one packet and reads all back.
// Phase B  the eleven other generators write uniform traffic to a D-MEM in another cluster.
// Phase C  hotspot traffic of all generators to node 10.
// Phase D  latency against injection interval for one stream from node 2 to a D-MEM one,
//          two and three hops away (nodes 0, 10, 15), as the average of HEADER leave time
//          minus HEADER enter time over all packets of a run.
// Checks: read data, data and number of words at each D-MEM, generator counts, monitor
// totals, and that wormhole cut-through (a HEADER forwarded before its TAIL arrived) and
// link back-pressure occurred.
module tb_noc_wk;
  import noc_pkg::*;

  localparam int N = 16;
  localparam logic [15:0] MASTERS = 16'h7BDE;
  localparam int SLV [4] = '{0, 5, 10, 15};
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

  noc_top #(
    .TOPOLOGY(TOPO_WK), .SWITCHING(SW_WH), .COLS(4), .ROWS(4), .MASTER_MASK(256'h7BDE)
  ) dut (
    .clk_noc, .clk_pe, .rst_n, .tg_sel, .pe_req, .pe_rsp, .tg_start, .tg_mode, .tg_dst,
    .tg_interval, .tg_burst_len, .tg_num_pkts, .tg_sent, .tg_errors, .tg_done,
    .mon_clear (1'b0), .full_cycles, .af_cycles, .injected, .delivered, .in_flight,
    .any_full, .any_fail, .parity_err, .nb_congestion
  );

  always #2 clk_noc = ~clk_noc;
  for (genvar n = 0; n < N; n++) begin : g_clk
    always #8 clk_pe[n] = ~clk_pe[n];
  end

  int m_cut = 0, m_stall = 0, m_burst = 0;
  longint sum_in = 0, sum_out = 0;
  int n_in = 0, n_out = 0;
  always @(posedge clk_noc) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (dut.pkt_in[n])  begin sum_in  += $time; n_in++;  end
      if (dut.pkt_out[n]) begin sum_out += $time; n_out++; end
    end
  end
  int dmem_writes [N];
  logic [31:0] w_time [N];

  for (genvar n = 0; n < N; n++) begin : g_probe
    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      always @(posedge clk_noc) if (rst_n) begin
        if (dut.g_node[n].u_node.u_router.g_in[p].u_in.pop &&
            dut.g_node[n].u_node.u_router.g_in[p].u_in.head_flit.id == FLIT_HEAD &&
            dut.g_node[n].u_node.u_router.g_in[p].u_in.tails[
              dut.g_node[n].u_node.u_router.g_in[p].u_in.sel_vc_q] == '0)
          m_cut++;
      end
    end
    for (genvar k = 0; k < 4; k++) begin : g_link
      always @(posedge clk_noc) if (rst_n) begin
        if (dut.net_out[n][k].send && !dut.net_out_ready[n][k]) m_stall++;
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
      0: return dut.g_node[0].g_slave.u_dmem.mem[word];
      5: return dut.g_node[5].g_slave.u_dmem.mem[word];
      10: return dut.g_node[10].g_slave.u_dmem.mem[word];
      default: return dut.g_node[15].g_slave.u_dmem.mem[word];
    endcase
  endfunction

  // bus access from the PE of node 1
  task automatic bus(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                     input logic [2:0] cti, output logic [31:0] rdat);
    int t;
    @(negedge clk_pe[1]);
    pe_req[1].cyc = 1'b1; pe_req[1].stb = 1'b1; pe_req[1].we = we;
    pe_req[1].adr = adr; pe_req[1].dat = dat; pe_req[1].cti = cti;
    t = 0;
    @(posedge clk_pe[1]);
    #1;
    while (!pe_rsp[1].ack && !pe_rsp[1].err && t < 2000) begin @(posedge clk_pe[1]); #1; t++; end
    expect_eq("bus reply without error", 64'(pe_rsp[1].err || !pe_rsp[1].ack), 0);
    rdat = pe_rsp[1].dat;
    @(negedge clk_pe[1]);
    pe_req[1].stb = 1'b0;
    if (cti != 3'b010) pe_req[1] = '0;
  endtask

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

  task automatic run_tg(input int dsts [N], input tg_mode_e mode, input int ival, input int npk);
    int t;
    bit all_done;
    @(negedge clk_pe[1]);
    for (int n = 0; n < N; n++) begin
      tg_mode[n] = 2'(mode); tg_dst[n] = 8'(dsts[n]); tg_interval[n] = 16'(ival);
      tg_burst_len[n] = 8'd1; tg_num_pkts[n] = 16'(npk);
      tg_start[n] = MASTERS[n] && n != 1;
    end
    repeat (4) @(negedge clk_pe[1]);
    t = 0;
    while (t < 100000) begin
      all_done = 1;
      for (int n = 2; n < N; n++) if (MASTERS[n] && !tg_done[n]) all_done = 0;
      if (all_done) break;
      @(negedge clk_pe[1]);
      t++;
    end
    tg_start = '0;
    for (int n = 2; n < N; n++) if (MASTERS[n]) begin
      expect_eq($sformatf("node %0d writes sent", n), 64'(tg_sent[n]), 64'(npk));
      expect_eq($sformatf("node %0d errors", n), 64'(tg_errors[n]), 0);
    end
    t = 0;
    while ((in_flight != 0) && t < 20000) begin @(posedge clk_noc); t++; end
    repeat (200) @(posedge clk_noc);
  endtask

  initial begin
    logic [31:0] rd, v;
    logic [31:0] bw [4];
    int lat1, lat3, w0 [N], dsts [N], total;
    tg_sel = '0; tg_start = '0;
    for (int n = 0; n < N; n++) begin
      pe_req[n] = '0; tg_mode[n] = '0; tg_dst[n] = '0; tg_interval[n] = '0;
      tg_burst_len[n] = '0; tg_num_pkts[n] = '0;
    end
    repeat (4) @(posedge clk_pe[1]);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_pe[1]);

    // ---------------- phase A ----------------
    expect_eq("hops 1 -> 0", 64'(hop_count(TOPO_WK, 4, 4, 1, 0)), 1);
    expect_eq("hops 1 -> 15", 64'(hop_count(TOPO_WK, 4, 4, 1, 15)), 3);
    timed_write(0, 16'h1000, 32'h0000_0001, lat1);
    timed_write(15, 16'h1000, 32'h0015_0001, lat3);
    $display("single write latency: 1 hop %0d ns, 3 hops %0d ns", lat1, lat3);
    expect_true("three-hop write takes longer than one-hop write", lat3 > lat1);
    for (int k = 0; k < 4; k++) begin
      bw[k] = $urandom;
      bus(1'b1, 32'h000F_2000 + 32'(4 * k), bw[k], (k == 3) ? 3'b111 : 3'b010, rd);
    end
    bus(1'b0, 32'h0000_1000, '0, 3'b000, rd);
    expect_eq("read node 0", 64'(rd), 64'h0000_0001);
    bus(1'b0, 32'h000F_1000, '0, 3'b000, rd);
    expect_eq("read node 15", 64'(rd), 64'h0015_0001);
    for (int k = 0; k < 4; k++) begin
      bus(1'b0, 32'h000F_2000 + 32'(4 * k), '0, 3'b000, rd);
      expect_eq($sformatf("read burst word %0d", k), 64'(rd), 64'(bw[k]));
    end
    expect_true("burst travelled as one packet", m_burst >= 1);

    // ---------------- phase B: uniform, each master to the corner of the next cluster ----
    tg_sel = MASTERS & ~16'h2;
    for (int n = 0; n < N; n++) begin
      w0[n] = dmem_writes[n];
      dsts[n] = SLV[(n / 4 + 1) % 4];
    end
    run_tg(dsts, TG_UNIFORM, 4, 20);
    for (int s = 0; s < 4; s++) begin
      total = 0;
      for (int n = 2; n < N; n++) if (MASTERS[n] && dsts[n] == SLV[s]) total += 20;
      expect_eq($sformatf("uniform: writes at node %0d", SLV[s]),
                64'(dmem_writes[SLV[s]] - w0[SLV[s]]), 64'(total));
      for (int k = 0; k < 20; k++) begin
        v = peek(SLV[s], k);
        expect_true($sformatf("uniform: node %0d word %0d (%h)", SLV[s], k, v),
                    v[15:0] == 16'(k) && MASTERS[v[31:24]] && dsts[v[31:24]] == SLV[s]);
      end
    end
    expect_eq("uniform: injected = delivered", 64'(injected), 64'(delivered));

    // ---------------- phase C: hotspot to node 10 ----------------
    for (int n = 0; n < N; n++) begin w0[n] = dmem_writes[n]; dsts[n] = 10; end
    run_tg(dsts, TG_HOTSPOT, 0, 16);
    expect_eq("hotspot: writes at node 10", 64'(dmem_writes[10] - w0[10]), 11 * 16);
    expect_eq("hotspot: injected = delivered", 64'(injected), 64'(delivered));
    expect_eq("no parity error", 64'(parity_err), 0);

    // ---------------- phase D: latency against injection interval, 1/2/3 hops ----------------
    begin
      localparam int HD [3] = '{0, 10, 15};
      localparam int IV [3] = '{32, 8, 0};
      real lat [3][3];
      longint si0, so0;
      int ni0;
      for (int h = 0; h < 3; h++) begin
        expect_eq($sformatf("hops 2 -> %0d", HD[h]), 64'(hop_count(TOPO_WK, 4, 4, 2, HD[h])), 64'(h + 1));
        for (int i = 0; i < 3; i++) begin
          si0 = sum_in; so0 = sum_out; ni0 = n_in;
          @(negedge clk_pe[1]);
          tg_mode[2] = 2'(TG_UNIFORM); tg_dst[2] = 8'(HD[h]); tg_interval[2] = 16'(IV[i]);
          tg_num_pkts[2] = 16'd24; tg_start[2] = 1'b1;
          repeat (4) @(negedge clk_pe[1]);
          while (!tg_done[2]) @(negedge clk_pe[1]);
          while (in_flight != 0) @(posedge clk_noc);
          repeat (50) @(posedge clk_noc);
          tg_start[2] = 1'b0;
          repeat (4) @(negedge clk_pe[1]);
          expect_eq($sformatf("latency run %0d/%0d packets", h, i), 64'(n_in - ni0), 24);
          lat[h][i] = real'(sum_out - so0 - (sum_in - si0)) / real'(n_in - ni0);
        end
      end
      $display("interval(PE clk)  1-hop(ns)  2-hop(ns)  3-hop(ns)");
      for (int i = 0; i < 3; i++)
        $display("%8d %14.1f %10.1f %10.1f", IV[i], lat[0][i], lat[1][i], lat[2][i]);
      for (int i = 0; i < 3; i++) begin
        expect_true($sformatf("2 hops slower than 1 at interval %0d", IV[i]), lat[1][i] > lat[0][i]);
        expect_true($sformatf("3 hops slower than 2 at interval %0d", IV[i]), lat[2][i] > lat[1][i]);
      end
    end

    $display("mechanisms: cut_through=%0d stall=%0d burst=%0d injected=%0d delivered=%0d",
             m_cut, m_stall, m_burst, injected, delivered);
    expect_true("wormhole cut-through occurred", m_cut > 0);
    expect_true("link back-pressure occurred", m_stall > 0);
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
