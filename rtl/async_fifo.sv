// async_fifo: dual-clock FIFO with Gray-coded pointers and two-register synchronizers.
//
// The write side (wr_clk) and the read side (rd_clk) may run at unrelated rates. Each side
// keeps a binary pointer one bit wider than the address, converts it to Gray code and
// passes it to the other side through two synchronization registers. Full and empty are
// computed from the local pointer and the synchronized remote one, so they are
// conservative: a slot freed or filled becomes visible on the other side two or three
// clocks later. Handshake on both sides is valid/ready; data moves on an edge where both
// are high. rd_data shows the head entry while rd_valid is high. DEPTH must be a power of
// two.
module async_fifo #(
  parameter int W     = 25,
  parameter int DEPTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         rst_n,
  input  logic         wr_clk,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         wr_ready,
  input  logic         rd_clk,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_ready
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wr_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  assign wbin_n   = wbin + (AW+1)'(wr_valid && wr_ready);
  assign rbin_n   = rbin + (AW+1)'(rd_valid && rd_ready);

  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
