// tb_slave_ni: self-checking test of the slave-side network adapter (node 4, even parity).
// Request packets assembled here are fed in with random gaps: single-word and four-word
// writes, reads, and a write whose TAIL parity is wrong. A memory model in this bench
// answers the bus after a random delay. Checks: the memory holds exactly the words
// written (the corrupted packet writes nothing and pulses parity_err), and each read is
// answered with a response packet (HEADER to the requesting node with the response flag,
// two DATA flits, TAIL with their parity) carrying the stored word.
module tb_slave_ni;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid, rx_ready, tx_valid, tx_ready, parity_err, pkt_done;
  flit_t rx_flit, tx_flit;
  wb_req_t bus_req;
  wb_rsp_t bus_rsp;
  int checks = 0, failures = 0, n_perr = 0, n_done = 0;
  logic [31:0] mem [logic [15:0]];
  logic [31:0] model [logic [15:0]];
  flit_t out [$];

  slave_ni #(.MY_ID(4), .MAX_BURST(4), .PARITY_ODD(1'b0)) dut (
    .clk, .rst_n, .rx_valid, .rx_flit, .rx_ready, .tx_valid, .tx_flit, .tx_ready,
    .bus_req, .bus_rsp, .parity_err, .pkt_done
  );

  always #5 clk = ~clk;

  // memory model with 0..3 clocks of wait
  int wt = -1;
  always @(posedge clk) begin
    bus_rsp.ack <= 1'b0;
    bus_rsp.err <= 1'b0;
    if (bus_req.cyc && bus_req.stb && !bus_rsp.ack) begin
      if (wt < 0) wt = $urandom_range(3);
      if (wt == 0) begin
        if (bus_req.we) mem[bus_req.adr[15:0]] = bus_req.dat;
        bus_rsp.dat <= mem.exists(bus_req.adr[15:0]) ? mem[bus_req.adr[15:0]] : 32'h0;
        bus_rsp.ack <= 1'b1;
        wt = -1;
      end else wt--;
    end
    if (rst_n && parity_err) n_perr++;
    if (rst_n && pkt_done) n_done++;
    if (tx_valid && tx_ready) out.push_back(tx_flit);
  end
  always @(negedge clk) tx_ready = ($urandom_range(2) != 0);

  function automatic logic par(input logic [15:0] v);
    return ^v;
  endfunction

  task automatic expect_eq(input string what, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  task automatic send(input int src, input bit we, input logic [15:0] adr,
                      input logic [31:0] words [$], input bit corrupt);
    flit_t p [$];
    logic [7:0] dp;
    int k;
    p.push_back(flit_t'({2'b00, 1'b0, 4'b0, 8'(src), 8'd4, 1'b1, we}));
    p.push_back(flit_t'({2'b10, 3'd0, 2'b0, adr, 1'b1, we}));
    dp = '0; k = 0;
    foreach (words[w]) begin
      p.push_back(flit_t'({2'b01, 3'(k), 2'b0, words[w][15:0], 1'b1, we}));  dp[k] = par(words[w][15:0]);  k++;
      p.push_back(flit_t'({2'b01, 3'(k), 2'b0, words[w][31:16], 1'b1, we})); dp[k] = par(words[w][31:16]); k++;
    end
    p.push_back(flit_t'({2'b11, 5'b0, 7'b0, par(adr), dp ^ 8'(corrupt), 1'b1, we}));
    foreach (p[i]) begin
      @(negedge clk);
      rx_valid = 1'b1; rx_flit = p[i];
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
      @(negedge clk);
      rx_valid = 1'b0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] words [$];
    logic [15:0] adrs [$];
    rx_valid = 1'b0; rx_flit = '0; bus_rsp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      logic [15:0] a;
      int nw;
      nw = (n % 2 == 0) ? 1 : 4;
      a  = 16'($urandom_range(0, 1000) * 16);
      words.delete();
      for (int k = 0; k < nw; k++) begin
        words.push_back($urandom);
        model[a + 16'(4 * k)] = words[k];
      end
      adrs.push_back(a);
      send(0, 1'b1, a, words, 1'b0);
    end
    // corrupted write must not change memory
    words = '{32'hDEAD_BEEF};
    send(2, 1'b1, adrs[0], words, 1'b1);
    repeat (20) @(posedge clk);
    expect_eq("parity_err pulses", 64'(n_perr), 1);
    foreach (model[a]) expect_eq($sformatf("mem[%h]", a), 64'(mem.exists(a) ? mem[a] : 32'hx), 64'(model[a]));
    expect_eq("memory words", 64'(mem.num()), 64'(model.num()));
    // reads from different source nodes
    for (int n = 0; n < 8; n++) begin
      logic [15:0] a;
      logic [31:0] d;
      int src, t;
      a   = adrs[n];
      d   = model[a];
      src = (n % 2 == 0) ? 0 : 8;
      words.delete();
      out.delete();
      send(src, 1'b0, a, words, 1'b0);
      t = 0;
      while (out.size() < 4 && t < 200) begin @(posedge clk); t++; end
      expect_eq("response length", 64'(out.size()), 4);
      if (out.size() == 4) begin
        expect_eq("resp header", 64'(out[0]), 64'(flit_t'({2'b00, 1'b1, 4'b0, 8'd4, 8'(src), 1'b1, 1'b0})));
        expect_eq("resp data lo", 64'(out[1]), 64'(flit_t'({2'b01, 3'd0, 2'b0, d[15:0], 1'b1, 1'b0})));
        expect_eq("resp data hi", 64'(out[2]), 64'(flit_t'({2'b01, 3'd1, 2'b0, d[31:16], 1'b1, 1'b0})));
        expect_eq("resp tail", 64'(out[3]), 64'(flit_t'({2'b11, 5'b0, 8'b0, 6'b0, par(d[31:16]), par(d[15:0]), 1'b1, 1'b0})));
      end
    end
    repeat (5) @(posedge clk);
    expect_eq("packets served", 64'(n_done), 28);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
