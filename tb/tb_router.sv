// tb_router: self-checking test of the five-port router at the centre node (4) of a 3x3
// torus, with store-and-forward switching and two virtual channels. Every input link
// carries packets with random destinations and lengths, sent with the SEND/READY
// handshake and random gaps; every output sees random READY. The expected output of each
// destination follows XY routing from the centre and is written out by hand. Checks: each
// packet leaves whole and in order on its expected port without interleaving, no flit is
// lost, and a lone packet crosses the idle router in a fixed number of clocks.
module tb_router;
  import noc_pkg::*;

  localparam int NPKT = 40;
  localparam int EXP [9] = '{4, 1, 2, 4, 0, 2, 4, 3, 2};
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  link_t in_link [NPORTS], out_link [NPORTS];
  logic [NPORTS-1:0] in_ready, out_ready;
  logic [5:0] port_count [NPORTS];
  logic [1:0] port_vc_full [NPORTS];

  router #(.MY_ID(4), .TOPOLOGY(TOPO_TORUS), .SWITCHING(SW_SF), .COLS(3), .ROWS(3),
           .NUM_VC(2), .VC_DEPTH(16)) dut (
    .clk, .rst_n, .in_link, .in_ready, .out_link, .out_ready, .port_count, .port_vc_full
  );

  always #5 clk = ~clk;

  int dst [NPORTS][NPKT], len [NPORTS][NPKT];
  int pk [NPORTS], fk [NPORTS], cur_id [NPORTS], cur_k [NPORTS];
  int received = 0, total = 0;
  bit traffic_on = 0;

  function automatic flit_t flit_of(input int i, input int p, input int k);
    int id;
    id = i * NPKT + p;
    if (k == 0)             return make_head(1'b0, 8'(id), 8'(dst[i][p]), 1'b1);
    if (k == len[i][p] - 1) return make_tail(8'(id), 8'(k), 1'b1);
    return make_body(FLIT_DATA, 3'(k), 16'(id * 8 + k), 1'b1);
  endfunction

  always @(negedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      if (traffic_on) begin
        in_link[i].send = pk[i] < NPKT && ($urandom_range(2) != 0);
        in_link[i].flit = (pk[i] < NPKT) ? flit_of(i, pk[i], fk[i]) : '0;
      end
      out_ready[i] = !traffic_on || ($urandom_range(3) != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_link[o].send && out_ready[o]) begin
        flit_t f;
        int id, i, p;
        f = out_link[o].flit;
        if (cur_id[o] < 0) begin
          cur_id[o] = int'(head_src(f));
          cur_k[o]  = 0;
        end
        id = cur_id[o]; i = id / NPKT; p = id % NPKT;
        checks++;
        if (f !== flit_of(i, p, cur_k[o]) || EXP[dst[i][p]] != o) begin
          failures++;
          $display("FAIL out %0d pkt %0d flit %0d: %h (dst %0d)", o, id, cur_k[o], f, dst[i][p]);
        end
        cur_k[o]++;
        if (f.id == FLIT_TAIL) begin
          cur_id[o] = -1;
          received++;
        end
      end
    end
    for (int i = 0; i < NPORTS; i++) begin
      if (in_link[i].send && in_ready[i]) begin
        fk[i]++;
        if (fk[i] == len[i][pk[i]]) begin
          fk[i] = 0;
          pk[i]++;
        end
      end
    end
  end

  initial begin
    int t_in, t_out;
    for (int i = 0; i < NPORTS; i++) begin
      pk[i] = 0; fk[i] = 0; cur_id[i] = -1; cur_k[i] = 0;
      for (int p = 0; p < NPKT; p++) begin
        dst[i][p] = $urandom_range(8);
        len[i][p] = $urandom_range(2, 8);
      end
    end
    // lone packet first: input West (4), 4 flits, to node 5 (East)
    dst[4][0] = 5; len[4][0] = 4;
    for (int i = 0; i < NPORTS; i++) in_link[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      in_link[4].send = 1'b1;
      in_link[4].flit = flit_of(4, 0, k);
      if (k == 0) t_in = $time / 10;
      @(negedge clk);
    end
    in_link[4].send = 1'b0;
    received = 0;   // the lone packet is counted by the checker; do not count it twice
    // pk/fk of input 4 were advanced by the checker; wait for the header on East
    while (!out_link[2].send) @(negedge clk);
    t_out = $time / 10;
    // store and forward: the header is taken at edge 0 and the tail at edge 3; the switch
    // identifier selects the VC at edge 4, the arbiter grants at edge 5 and the output
    // register is loaded at edge 6. Measured from the half clock before edge 0 to the half
    // clock after edge 6, that is 7 clocks.
    checks++;
    if (t_out - t_in != 7) begin
      failures++;
      $display("FAIL lone packet latency %0d clocks, expected 7", t_out - t_in);
    end
    repeat (10) @(negedge clk);
    traffic_on = 1;
    wait (received == NPORTS * NPKT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired (received %0d)", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
