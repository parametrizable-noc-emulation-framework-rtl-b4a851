// tb_router_arbiter: self-checking test of the arbiter, at a corner node of a 3x3 torus,
// at a node of a WK(4,2) network, and at a torus node with source routing (the HEADER
// carries a random route; the packet must leave on the port of the route's first entry,
// with the route shifted down by one entry). Five input models offer packets with random destinations
// and random bubbles; the outputs see random READY. The expected output port of every
// destination is written out by hand below (XY with wrap-around; WK digit routing). Checks:
// every packet leaves on its expected port, whole, in order and not interleaved with
// another packet; an input is popped only while it offers a flit; all packets arrive.
module tb_router_arbiter;
  import noc_pkg::*;

  localparam int NPKT = 40;   // per input
  logic clk = 1'b0, rst_n = 1'b0;
  int checks [3], failures [3];
  bit finished [3];

  // expected ports (0 L, 1 N, 2 E, 3 S, 4 W)
  localparam int EXP_TORUS0 [9]  = '{0, 2, 4, 3, 2, 4, 1, 2, 4};
  localparam int EXP_WK6    [16] = '{1, 1, 1, 1, 1, 2, 0, 4, 3, 3, 3, 3, 4, 4, 4, 4};

  always #5 clk = ~clk;

  for (genvar s = 0; s < 3; s++) begin : g_dut
    localparam int TOPO = (s == 1) ? TOPO_WK : TOPO_TORUS;
    localparam int C    = (s == 1) ? 4 : 3;
    localparam int ID   = (s == 1) ? 6 : 0;
    localparam bit SR   = (s == 2);
    localparam int NN   = C * C;

    logic [NPORTS-1:0] head_valid, pop, out_ready;
    flit_t head_flit [NPORTS];
    link_t out_link [NPORTS];

    router_arbiter #(.MY_ID(ID), .TOPOLOGY(TOPO), .COLS(C), .ROWS(C), .SRC_ROUTE(SR)) dut (
      .clk, .rst_n, .head_valid, .head_flit, .pop, .out_link, .out_ready
    );

    int dst [NPORTS][NPKT];                // destination node, or route with SR
    int len [NPORTS][NPKT];
    int pk [NPORTS], fk [NPORTS];          // input progress: packet, flit
    int cur_id [NPORTS], cur_k [NPORTS];   // output progress
    int received = 0;
    bit bubble [NPORTS];

    function automatic int exp_port(input int d);
      if (SR) return d % 8;
      return (s == 0) ? EXP_TORUS0[d] : EXP_WK6[d];
    endfunction

    // k-th flit of packet p of input i; out = 1 gives the flit as it must leave (a
    // source route shifted by one entry)
    function automatic flit_t flit_of(input int i, input int p, input int k, input bit out);
      int id;
      id = i * NPKT + p;
      if (k == 0 && SR)
        return make_head_sr(1'b0, 8'(id), out ? 12'(dst[i][p] >> 3) : 12'(dst[i][p]), 1'b1);
      if (k == 0)                return make_head(1'b0, 8'(id), 8'(dst[i][p]), 1'b1);
      if (k == len[i][p] - 1)    return make_tail(8'(id), 8'(k), 1'b1);
      return make_body(FLIT_DATA, 3'(k), 16'(id * 8 + k), 1'b1);
    endfunction

    initial begin
      checks[s] = 0; failures[s] = 0; finished[s] = 0;
      for (int i = 0; i < NPORTS; i++) begin
        pk[i] = 0; fk[i] = 0; cur_id[i] = -1; cur_k[i] = 0; bubble[i] = 0;
        for (int p = 0; p < NPKT; p++) begin
          if (SR) dst[i][p] = ($urandom_range(511) << 3) | $urandom_range(4);
          else    dst[i][p] = $urandom_range(NN - 1);
          len[i][p] = $urandom_range(2, 6);
        end
      end
    end

    // input models: drive at negedge
    always @(negedge clk) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (fk[i] != 0) bubble[i] = ($urandom_range(4) == 0);   // bubbles inside packets
        else            bubble[i] = ($urandom_range(1) == 0);
        head_valid[i] = rst_n && pk[i] < NPKT && !bubble[i];
        head_flit[i]  = (pk[i] < NPKT) ? flit_of(i, pk[i], fk[i], 1'b0) : '0;
      end
      for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom_range(3) != 0);
    end

    // checker at posedge (sees the values before the edge)
    always @(posedge clk) if (rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_link[o].send && out_ready[o]) begin
          flit_t f;
          int id, i, p;
          f = out_link[o].flit;
          if (cur_id[o] < 0) begin
            id = SR ? int'(head_src_sr(f)) : int'(head_src(f));
            cur_id[o] = id;
            cur_k[o]  = 0;
          end
          id = cur_id[o]; i = id / NPKT; p = id % NPKT;
          checks[s]++;
          if (f !== flit_of(i, p, cur_k[o], 1'b1) || exp_port(dst[i][p]) != o) begin
            failures[s]++;
            $display("FAIL topo %0d out %0d pkt %0d flit %0d: %h (dst %0d)", TOPO, o, id,
                     cur_k[o], f, dst[i][p]);
          end
          cur_k[o]++;
          if (f.id == FLIT_TAIL) begin
            cur_id[o] = -1;
            received++;
          end
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i]) begin
          checks[s]++;
          if (!head_valid[i]) begin
            failures[s]++;
            $display("FAIL pop without valid head on input %0d", i);
          end
          fk[i]++;
          if (fk[i] == len[i][pk[i]]) begin
            fk[i] = 0;
            pk[i]++;
          end
        end
      end
      if (received == NPORTS * NPKT && !finished[s]) finished[s] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished[0] && finished[1] && finished[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
