// tb_dmem: self-checking test of the data memory. Writes random words to random word
// addresses through the bus port, reads them back and compares with a reference model;
// also checks that every access is acknowledged exactly one clock after the request.
module tb_dmem;
  import noc_pkg::*;

  localparam int WORDS = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  wb_req_t req;
  wb_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];
  bit          valid [WORDS];

  dmem #(.WORDS(WORDS)) dut (.clk, .rst_n, .req, .rsp);

  always #5 clk = ~clk;

  task automatic access(input bit we, input int idx, input logic [31:0] wdat,
                        output logic [31:0] rdat);
    int lat;
    req     = '0;
    req.cyc = 1'b1;
    req.stb = 1'b1;
    req.we  = we;
    req.adr = 32'(idx * 4);
    req.dat = wdat;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (!rsp.ack && lat < 10);
    rdat = rsp.dat;
    checks++;
    if (lat != 1) begin           // request sampled at the next edge, ack right after it
      failures++;
      $display("FAIL ack latency %0d", lat);
    end
    req = '0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [31:0] r;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 200; n++) begin
      int idx;
      logic [31:0] d;
      idx = $urandom_range(WORDS - 1);
      d   = $urandom;
      if ($urandom_range(1) == 0) begin
        access(1'b1, idx, d, r);
        model[idx] = d;
        valid[idx] = 1'b1;
      end else if (valid[idx]) begin
        access(1'b0, idx, '0, r);
        checks++;
        if (r !== model[idx]) begin
          failures++;
          $display("FAIL read word %0d got %h expected %h", idx, r, model[idx]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
