// tb_link_controller: self-checking test of the link controller with a PE clock four times
// slower than the network clock. Random flits are pushed in both directions with random
// stalls on both sides; the test checks that every flit arrives once, in order and intact,
// and that nothing is left over at the end.
module tb_link_controller;
  import noc_pkg::*;

  localparam int NFLITS = 300;
  logic clk_noc = 1'b0, clk_pe = 1'b0, rst_n = 1'b0;
  logic  na_tx_valid, na_tx_ready, na_rx_valid, na_rx_ready;
  flit_t na_tx_flit, na_rx_flit;
  link_t rt_tx, rt_rx;
  logic  rt_tx_ready, rt_rx_ready;
  int checks = 0, failures = 0;
  flit_t up_q [$], down_q [$];
  int up_rx = 0, down_rx = 0;

  link_controller #(.DEPTH(8)) dut (
    .rst_n, .clk_pe, .na_tx_valid, .na_tx_flit, .na_tx_ready,
    .na_rx_valid, .na_rx_flit, .na_rx_ready,
    .clk_noc, .rt_tx, .rt_tx_ready, .rt_rx, .rt_rx_ready
  );

  always #5  clk_noc = ~clk_noc;
  always #20 clk_pe  = ~clk_pe;

  function automatic flit_t rand_flit();
    flit_t f;
    f = flit_t'({$urandom, $urandom});
    f.stb = 1'b1;
    return f;
  endfunction

  // PE side: sends NFLITS flits into the network, takes flits coming out
  int up_tx = 0;
  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) begin
      na_tx_valid <= 1'b0;
      na_rx_ready <= 1'b0;
    end else begin
      if (na_tx_valid && na_tx_ready) na_tx_valid <= 1'b0;
      if ((!na_tx_valid || na_tx_ready) && up_tx < NFLITS && $urandom_range(3) != 0) begin
        flit_t f;
        f = rand_flit();
        na_tx_flit  <= f;
        na_tx_valid <= 1'b1;
        up_q.push_back(f);
        up_tx <= up_tx + 1;
      end
      if (na_rx_valid && na_rx_ready) begin
        flit_t e;
        e = down_q.pop_front();
        checks++;
        if (na_rx_flit !== e) begin
          failures++;
          $display("FAIL eject flit %0d: %h expected %h", down_rx, na_rx_flit, e);
        end
        down_rx <= down_rx + 1;
      end
      na_rx_ready <= ($urandom_range(3) != 0);
    end
  end

  // router side
  int down_tx = 0;
  always_ff @(posedge clk_noc or negedge rst_n) begin
    if (!rst_n) begin
      rt_rx.send  <= 1'b0;
      rt_rx.flit  <= '0;
      rt_tx_ready <= 1'b0;
    end else begin
      if (rt_rx.send && rt_rx_ready) rt_rx.send <= 1'b0;
      if ((!rt_rx.send || rt_rx_ready) && down_tx < NFLITS && $urandom_range(1) == 0) begin
        flit_t f;
        f = rand_flit();
        rt_rx.flit <= f;
        rt_rx.send <= 1'b1;
        down_q.push_back(f);
        down_tx <= down_tx + 1;
      end
      if (rt_tx.send && rt_tx_ready) begin
        flit_t e;
        e = up_q.pop_front();
        checks++;
        if (rt_tx.flit !== e) begin
          failures++;
          $display("FAIL inject flit %0d: %h expected %h", up_rx, rt_tx.flit, e);
        end
        up_rx <= up_rx + 1;
      end
      rt_tx_ready <= ($urandom_range(2) != 0);
    end
  end

  initial begin
    na_tx_flit = '0;
    repeat (3) @(posedge clk_pe);
    rst_n = 1'b1;
    wait (up_rx == NFLITS && down_rx == NFLITS);
    checks++;
    if (up_q.size() != 0 || down_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk_noc);
    failures++;
    $display("watchdog expired: up %0d down %0d", up_rx, down_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
