// tb_core_interface: self-checking test of the master-side network adapter (node 0 of a
// 3x3 network whose slave nodes are 1, 4 and 7), with even parity. A bus master issues
// single writes, incrementing bursts, reads and requests to invalid addresses; a packet
// sink with random READY collects the flits sent. Every packet is compared flit by flit
// with one assembled here from the flit format (2-bit ID, order number, 16-bit value,
// stb, we; TAIL parity bits by order number), reads are answered with response packets
// built here (one with a wrong parity bit), and the bus replies (ack, data, err) are
// checked.
module tb_core_interface;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  wb_req_t req;
  wb_rsp_t rsp;
  logic tx_valid, tx_ready, rx_valid, rx_ready, parity_err;
  flit_t tx_flit, rx_flit;
  int checks = 0, failures = 0;
  flit_t got [$];
  int n_parity_err = 0;

  core_interface #(.MY_ID(0), .NUM_NODES(9), .SLAVE_MASK(256'h92), .MAX_BURST(4),
                   .PARITY_ODD(1'b0)) dut (
    .clk, .rst_n, .wb_req (req), .wb_rsp (rsp), .tx_valid, .tx_flit, .tx_ready,
    .rx_valid, .rx_flit, .rx_ready, .parity_err
  );

  always #5 clk = ~clk;

  always @(negedge clk) tx_ready = ($urandom_range(2) != 0);
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) got.push_back(tx_flit);
    if (rst_n && parity_err) n_parity_err++;
  end

  task automatic expect_eq(input string what, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  function automatic logic par(input logic [15:0] v);
    return ^v;   // even parity
  endfunction

  // reference packet for a request
  function automatic void expect_packet(input int dst, input bit we, input logic [15:0] adr,
                                        input logic [31:0] words [$], ref flit_t pkt [$]);
    logic [7:0] dp;
    int k;
    pkt.delete();
    pkt.push_back(flit_t'({2'b00, 1'b0, 4'b0, 8'd0, 8'(dst), 1'b1, we}));
    pkt.push_back(flit_t'({2'b10, 3'd0, 2'b0, adr, 1'b1, we}));
    dp = '0;
    k = 0;
    foreach (words[w]) begin
      pkt.push_back(flit_t'({2'b01, 3'(k), 2'b0, words[w][15:0], 1'b1, we}));
      dp[k] = par(words[w][15:0]); k++;
      pkt.push_back(flit_t'({2'b01, 3'(k), 2'b0, words[w][31:16], 1'b1, we}));
      dp[k] = par(words[w][31:16]); k++;
    end
    pkt.push_back(flit_t'({2'b11, 5'b0, 7'b0, par(adr), dp, 1'b1, we}));
  endfunction

  task automatic bus(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                     input logic [2:0] cti, output logic [31:0] rdat, output bit err);
    @(negedge clk);
    req.cyc = 1'b1; req.stb = 1'b1; req.we = we; req.adr = adr; req.dat = dat; req.cti = cti;
    @(posedge clk);
    #1;
    while (!rsp.ack && !rsp.err) begin @(posedge clk); #1; end
    rdat = rsp.dat;
    err  = rsp.err;
    @(negedge clk);
    req.stb = 1'b0;
    if (cti != 3'b010) req = '0;   // cyc stays high between the beats of a burst
  endtask

  task automatic compare_packet(input string what, input flit_t pkt [$]);
    int t;
    t = 0;
    while (got.size() < pkt.size() && t < 500) begin @(posedge clk); t++; end
    expect_eq({what, " length"}, 64'(got.size()), 64'(pkt.size()));
    foreach (pkt[k]) if (k < got.size()) expect_eq($sformatf("%s flit %0d", what, k), 64'(got[k]), 64'(pkt[k]));
    got.delete();
  endtask

  task automatic send_response(input logic [31:0] d, input bit corrupt);
    flit_t r [4];
    r[0] = flit_t'({2'b00, 1'b1, 4'b0, 8'd4, 8'd0, 1'b1, 1'b0});
    r[1] = flit_t'({2'b01, 3'd0, 2'b0, d[15:0], 1'b1, 1'b0});
    r[2] = flit_t'({2'b01, 3'd1, 2'b0, d[31:16], 1'b1, 1'b0});
    r[3] = flit_t'({2'b11, 5'b0, 8'b0, 6'b0, par(d[31:16]), par(d[15:0]) ^ corrupt, 1'b1, 1'b0});
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      rx_valid = 1'b1; rx_flit = r[k];
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
    end
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  initial begin
    flit_t pkt [$];
    logic [31:0] words [$];
    logic [31:0] rd;
    bit err;
    req = '0; rx_valid = 1'b0; rx_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // single writes
    for (int n = 0; n < 6; n++) begin
      int d;
      logic [15:0] a;
      logic [31:0] w;
      d = (n % 3 == 0) ? 1 : (n % 3 == 1) ? 4 : 7;
      a = 16'($urandom) & 16'hfffc;
      w = $urandom;
      bus(1'b1, {8'h0, 8'(d), a}, w, 3'b000, rd, err);
      expect_eq("write ack", 64'(err), 0);
      words = '{w};
      expect_packet(d, 1'b1, a, words, pkt);
      compare_packet("single write", pkt);
    end
    // incrementing bursts of 4 words (packed into one packet) and of 2 words
    for (int b = 2; b <= 4; b += 2) begin
      logic [15:0] a;
      a = 16'h0100;
      words.delete();
      for (int k = 0; k < b; k++) begin
        logic [31:0] w;
        w = $urandom;
        words.push_back(w);
        bus(1'b1, {16'h0004, a + 16'(4 * k)}, w, (k == b - 1) ? 3'b111 : 3'b010, rd, err);
        expect_eq("burst ack", 64'(err), 0);
      end
      expect_packet(4, 1'b1, a, words, pkt);
      compare_packet("burst write", pkt);
    end
    // read: request packet, then response
    fork
      bus(1'b0, 32'h0004_0020, '0, 3'b000, rd, err);
      begin
        words.delete();
        expect_packet(4, 1'b0, 16'h0020, words, pkt);
        compare_packet("read request", pkt);
        send_response(32'hCAFE_1234, 1'b0);
      end
    join
    expect_eq("read err", 64'(err), 0);
    expect_eq("read data", 64'(rd), 64'h0000_0000_CAFE_1234);
    // read whose response fails parity
    fork
      bus(1'b0, 32'h0007_0040, '0, 3'b000, rd, err);
      begin
        words.delete();
        expect_packet(7, 1'b0, 16'h0040, words, pkt);
        compare_packet("read request 2", pkt);
        send_response(32'h1357_9BDF, 1'b1);
      end
    join
    expect_eq("parity err reply", 64'(err), 1);
    repeat (2) @(posedge clk);
    expect_eq("parity err pulse", 64'(n_parity_err), 1);
    // invalid requests: master node, node out of range, unaligned
    bus(1'b1, 32'h0002_0000, 32'h1, 3'b000, rd, err);
    expect_eq("err to master node", 64'(err), 1);
    bus(1'b1, 32'h0009_0000, 32'h1, 3'b000, rd, err);
    expect_eq("err to missing node", 64'(err), 1);
    bus(1'b1, 32'h0001_0002, 32'h1, 3'b000, rd, err);
    expect_eq("err unaligned", 64'(err), 1);
    repeat (20) @(posedge clk);
    expect_eq("nothing sent for invalid requests", 64'(got.size()), 0);
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
