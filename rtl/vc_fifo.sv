// vc_fifo: synchronous first-in first-out buffer with an occupancy count.
//
// Used as the storage of one virtual channel in a router input port. The head entry is
// always visible on rd_data (show-ahead); rd_en pops it. A write and a read in the same
// cycle are both performed. Writing when full or reading when empty is a caller error and
// is flagged by assertions. count is exported because the VC identifier, the node monitor
// and the store-and-forward logic all read it. The depth is a parameter of the framework;
// 16 entries is this design's default.
module vc_fifo #(
  parameter int W     = 25,
  parameter int DEPTH = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic [CW-1:0] count,
  output logic          full,
  output logic          empty
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= incr(wp);
      if (rd_en) rp <= incr(rp);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
  end

  // The storage is initialised so that a show-ahead read of an empty FIFO is defined.
  initial for (int k = 0; k < DEPTH; k++) mem[k] = '0;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
