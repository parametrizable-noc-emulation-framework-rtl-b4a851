// dmem: data memory slave PE (D-MEM), a word-wide single-port memory on a Wishbone-style
// slave port.
//
// A request (cyc and stb) is answered with ack one clock later; a write stores dat at word
// adr[AW+1:2] in that clock, a read returns the word on rsp.dat together with ack. Byte
// selects are not used: every access is a full 32-bit word. The memory content is not
// reset. The framework names the D-MEM as a slave PE clocked at 250 MHz (slow mode) or
// 500 MHz (fast mode) but gives no size or bus timing; the 16-bit local address space
// (16384 words) and the one-cycle ack are this design's own.
module dmem
  import noc_pkg::*;
#(
  parameter int WORDS = 16384,
  localparam int AW = $clog2(WORDS)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t req,
  output wb_rsp_t rsp
);

  logic [31:0] mem [WORDS];
  logic        ack_q;
  logic [31:0] rdat_q;
  wire logic [AW-1:0] widx = req.adr[AW+1:2];
  wire logic          hit  = req.cyc && req.stb && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= hit;
  end

  always_ff @(posedge clk) begin
    if (hit && req.we) mem[widx] <= req.dat;
    if (hit)           rdat_q    <= mem[widx];
  end

  assign rsp.ack = ack_q;
  assign rsp.err = 1'b0;
  assign rsp.dat = rdat_q;

endmodule
