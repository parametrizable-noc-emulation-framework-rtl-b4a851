// tb_routing_node: self-checking test of the routing node. Two nodes form a 2x1 mesh: node
// 0 is a master node driven by this bench's bus master, node 1 a slave node with a data
// memory model in this bench. The routers run four times faster than the PE side. The
// bench writes single words and four-word bursts to node 1, reads them back over the
// network and checks the data, the monitor pulses (one HEADER in and one out per
// packet) and that no FULL or FAIL is raised at this light load. It also checks the
// round-trip time of a read stays within 64 PE clocks.
module tb_routing_node;
  import noc_pkg::*;

  logic clk_noc = 1'b0, clk_pe = 1'b0, rst_n = 1'b0;
  link_t net_in [2][4], net_out [2][4];
  logic [3:0] net_in_ready [2], net_out_ready [2];
  wb_req_t pe_req, bus_req [2], m_req;
  wb_rsp_t pe_rsp [2], bus_rsp [2], m_rsp;
  logic [1:0] full, af, fail, pin, pout, perr;
  logic [3:0] cong [2];
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_full = 0, n_fail = 0;
  logic [31:0] mem [logic [15:0]];

  always #2 clk_noc = ~clk_noc;
  always #8 clk_pe  = ~clk_pe;

  for (genvar n = 0; n < 2; n++) begin : g_n
    routing_node #(.MY_ID(n), .IS_MASTER(n == 0), .TOPOLOGY(TOPO_MESH), .SWITCHING(SW_SF),
                   .COLS(2), .ROWS(1), .SLAVE_MASK(256'h2)) u_node (
      .clk_noc, .clk_pe, .rst_n,
      .net_in (net_in[n]), .net_in_ready (net_in_ready[n]),
      .net_out (net_out[n]), .net_out_ready (net_out_ready[n]),
      .pe_req (n == 0 ? m_req : '0), .pe_rsp (pe_rsp[n]),
      .bus_req (bus_req[n]), .bus_rsp (bus_rsp[n]),
      .full (full[n]), .almost_full (af[n]), .fail (fail[n]), .cong_out (cong[n]),
      .pkt_in (pin[n]), .pkt_out (pout[n]), .parity_err (perr[n])
    );
  end
  assign m_rsp = pe_rsp[0];

  // links: node 0 East (index 1) <-> node 1 West (index 3); everything else open
  always_comb begin
    for (int n = 0; n < 2; n++)
      for (int k = 0; k < 4; k++) begin
        net_in[n][k] = '0;
        net_out_ready[n][k] = 1'b0;
      end
    net_in[1][3] = net_out[0][1];
    net_out_ready[0][1] = net_in_ready[1][3];
    net_in[0][1] = net_out[1][3];
    net_out_ready[1][3] = net_in_ready[0][1];
  end

  // slave memory model on node 1
  always @(posedge clk_pe) begin
    bus_rsp[1] <= '0;
    bus_rsp[0] <= '0;
    if (bus_req[1].cyc && bus_req[1].stb && !bus_rsp[1].ack) begin
      if (bus_req[1].we) mem[bus_req[1].adr[15:0]] = bus_req[1].dat;
      bus_rsp[1].dat <= mem.exists(bus_req[1].adr[15:0]) ? mem[bus_req[1].adr[15:0]] : '0;
      bus_rsp[1].ack <= 1'b1;
    end
  end

  always @(posedge clk_noc) if (rst_n) begin
    n_in   += int'(pin[0]) + int'(pin[1]);
    n_out  += int'(pout[0]) + int'(pout[1]);
    n_full += int'(|full);
    n_fail += int'(|fail);
  end

  task automatic expect_eq(input string what, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  task automatic bus(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                     input logic [2:0] cti, output logic [31:0] rdat, output int clocks);
    @(negedge clk_pe);
    m_req.cyc = 1'b1; m_req.stb = 1'b1; m_req.we = we; m_req.adr = adr; m_req.dat = dat;
    m_req.cti = cti;
    clocks = 0;
    @(posedge clk_pe);
    #1;
    while (!m_rsp.ack && !m_rsp.err && clocks < 1000) begin @(posedge clk_pe); #1; clocks++; end
    expect_eq("no bus error", 64'(m_rsp.err), 0);
    rdat = m_rsp.dat;
    @(negedge clk_pe);
    m_req.stb = 1'b0;
    if (cti != 3'b010) m_req = '0;
  endtask

  initial begin
    logic [31:0] ref_w [logic [15:0]];
    logic [31:0] rd;
    int clocks;
    m_req = '0;
    repeat (3) @(posedge clk_pe);
    rst_n = 1'b1;
    repeat (3) @(posedge clk_pe);
    for (int n = 0; n < 8; n++) begin
      logic [15:0] a;
      logic [31:0] w;
      a = 16'(n * 4);
      w = $urandom;
      ref_w[a] = w;
      bus(1'b1, {16'h0001, a}, w, 3'b000, rd, clocks);
    end
    for (int b = 0; b < 3; b++) begin
      for (int k = 0; k < 4; k++) begin
        logic [15:0] a;
        logic [31:0] w;
        a = 16'(16'h0100 + b * 16 + k * 4);
        w = $urandom;
        ref_w[a] = w;
        bus(1'b1, {16'h0001, a}, w, (k == 3) ? 3'b111 : 3'b010, rd, clocks);
      end
    end
    foreach (ref_w[a]) begin
      bus(1'b0, {16'h0001, a}, '0, 3'b000, rd, clocks);
      expect_eq($sformatf("read back %h", a), 64'(rd), 64'(ref_w[a]));
      checks++;
      if (clocks > 64) begin
        failures++;
        $display("FAIL read took %0d PE clocks", clocks);
      end
    end
    repeat (20) @(posedge clk_pe);
    // 8 single writes + 3 bursts + 20 reads (each a request and a response)
    expect_eq("headers injected", 64'(n_in), 64'(8 + 3 + 2 * 20));
    expect_eq("headers delivered", 64'(n_out), 64'(8 + 3 + 2 * 20));
    expect_eq("no FULL at light load", 64'(n_full), 0);
    expect_eq("no FAIL", 64'(n_fail), 0);
    expect_eq("no parity error", 64'(perr), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk_noc);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
