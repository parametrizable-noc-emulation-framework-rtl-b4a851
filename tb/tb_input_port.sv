// tb_input_port: self-checking test of a router input port, once with store-and-forward
// and once with wormhole switching. Packets of random length, tagged with a packet number,
// are sent with random gaps and long stalls; the reader pops with random back-pressure.
// Checks: every packet leaves whole, with its flits in order and contiguous; with
// store-and-forward a HEADER is only offered once the whole packet is buffered; with
// wormhole a HEADER is offered before its TAIL arrived at least once (cut-through); both
// virtual channels are used; the count output equals the flits held.
module tb_input_port;
  import noc_pkg::*;

  localparam int NPKT = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks [2], failures [2];
  bit finished [2];

  always #5 clk = ~clk;

  for (genvar s = 0; s < 2; s++) begin : g_dut
    localparam int SW = (s == 0) ? SW_SF : SW_WH;
    logic  in_send, in_ready, head_valid, pop;
    flit_t in_flit, head_flit;
    logic [5:0] count;
    logic [1:0] vc_full;
    int len [NPKT];
    int accepted [NPKT];
    int sent_total = 0, popped_total = 0;
    int cut_through = 0;
    logic [1:0] vc_used = '0;
    int cur_pkt = -1, cur_seq = 0, done_pkts = 0;
    int send_pkt = 0;

    input_port #(.NUM_VC(2), .VC_DEPTH(16), .SWITCHING(SW)) dut (
      .clk, .rst_n, .in_send, .in_flit, .in_ready, .head_valid, .head_flit, .pop,
      .count, .vc_full
    );

    function automatic flit_t pkt_flit(input int id, input int k, input int n);
      if (k == 0)     return make_head(1'b0, 8'(n), 8'(id), 1'b1);
      if (k == n - 1) return make_tail(8'(id), 8'(k), 1'b1);
      return make_body(FLIT_DATA, 3'(k), 16'(id * 64 + k), 1'b1);
    endfunction

    // sender
    initial begin
      checks[s] = 0; failures[s] = 0; finished[s] = 0;
      in_send = 1'b0; in_flit = '0;
      for (int p = 0; p < NPKT; p++) begin len[p] = $urandom_range(2, 8); accepted[p] = 0; end
      wait (rst_n);
      for (int p = 0; p < NPKT; p++) begin
        for (int k = 0; k < len[p]; k++) begin
          @(negedge clk);
          send_pkt = p;
          in_flit = pkt_flit(p, k, len[p]);
          in_send = 1'b1;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1;
          in_send = 1'b0;
          if (k == 1 && p % 5 == 0) repeat (30) @(negedge clk);   // long stall inside a packet
          else repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
    end

    // reader
    always @(negedge clk) pop = head_valid && ($urandom_range(2) != 0);

    always @(posedge clk) if (rst_n) begin
      checks[s]++;
      if (int'(count) != sent_total - popped_total) begin
        failures[s]++;
        $display("FAIL count %0d expected %0d", count, sent_total - popped_total);
      end
      if (head_valid && head_flit.id == FLIT_HEAD) begin
        int id;
        id = int'(head_dst(head_flit));
        if (accepted[id] < len[id]) cut_through++;
        if (SW == SW_SF) begin
          checks[s]++;
          if (accepted[id] != len[id]) begin
            failures[s]++;
            $display("FAIL SF: header of packet %0d offered before its tail arrived", id);
          end
        end
      end
      if (pop) begin
        flit_t exp;
        if (cur_pkt < 0) begin
          cur_pkt = int'(head_dst(head_flit));
          cur_seq = 0;
          vc_used[dut.sel_vc_q] = 1'b1;
        end
        exp = pkt_flit(cur_pkt, cur_seq, len[cur_pkt]);
        checks[s]++;
        if (head_flit !== exp) begin
          failures[s]++;
          $display("FAIL sw=%0d packet %0d flit %0d: %h expected %h", SW, cur_pkt, cur_seq, head_flit, exp);
        end
        popped_total++;
        cur_seq++;
        if (head_flit.id == FLIT_TAIL) begin
          cur_pkt = -1;
          done_pkts++;
        end
      end
      if (in_send && in_ready) begin
        accepted[send_pkt]++;
        sent_total++;
      end
      if (done_pkts == NPKT && !finished[s]) begin
        finished[s] = 1;
        checks[s] += 2;
        if (vc_used != 2'b11) begin
          failures[s]++;
          $display("FAIL sw=%0d VCs used %b", SW, vc_used);
        end
        if (SW == SW_WH && cut_through == 0) begin
          failures[s]++;
          $display("FAIL wormhole never offered a header before its tail");
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished[0] && finished[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
