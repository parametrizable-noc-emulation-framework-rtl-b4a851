// noc_monitor: top-level monitor that gathers the status of every node monitor and counts
// the traffic of the whole network.
//
// Inputs per node: the FULL, ALMOST FULL and FAIL signals of its node monitor, and two
// one-clock pulses from its local router port, pkt_in when a packet HEADER enters the
// network there and pkt_out when a HEADER is delivered there. Outputs: for every node the
// number of clocks it spent FULL and ALMOST FULL, the network-wide totals of injected and
// delivered packets, the packets still in flight, and sticky any_full / any_fail flags.
// All counters run on the network clock, are cleared by rst_n or by clear, and saturate.
// Collecting node monitor status is the document's; which counters are kept is this
// design's own choice.
module noc_monitor #(
  parameter int NUM_NODES = 9,
  parameter int CNT_W     = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [NUM_NODES-1:0] node_full,
  input  logic [NUM_NODES-1:0] node_almost_full,
  input  logic [NUM_NODES-1:0] node_fail,
  input  logic [NUM_NODES-1:0] pkt_in,
  input  logic [NUM_NODES-1:0] pkt_out,
  output logic [CNT_W-1:0]     full_cycles [NUM_NODES],
  output logic [CNT_W-1:0]     af_cycles   [NUM_NODES],
  output logic [CNT_W-1:0]     injected,
  output logic [CNT_W-1:0]     delivered,
  output logic [CNT_W-1:0]     in_flight,
  output logic                 any_full,
  output logic                 any_fail
);

  function automatic logic [CNT_W-1:0] sat_add(input logic [CNT_W-1:0] a, input int b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + (CNT_W+1)'(b);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  int n_in, n_out;
  always_comb begin
    n_in  = 0;
    n_out = 0;
    for (int n = 0; n < NUM_NODES; n++) begin
      n_in  += int'(pkt_in[n]);
      n_out += int'(pkt_out[n]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      injected  <= '0;
      delivered <= '0;
      any_full  <= 1'b0;
      any_fail  <= 1'b0;
      for (int n = 0; n < NUM_NODES; n++) begin
        full_cycles[n] <= '0;
        af_cycles[n]   <= '0;
      end
    end else if (clear) begin
      injected  <= '0;
      delivered <= '0;
      any_full  <= 1'b0;
      any_fail  <= 1'b0;
      for (int n = 0; n < NUM_NODES; n++) begin
        full_cycles[n] <= '0;
        af_cycles[n]   <= '0;
      end
    end else begin
      injected  <= sat_add(injected, n_in);
      delivered <= sat_add(delivered, n_out);
      if (|node_full) any_full <= 1'b1;
      if (|node_fail) any_fail <= 1'b1;
      for (int n = 0; n < NUM_NODES; n++) begin
        full_cycles[n] <= sat_add(full_cycles[n], int'(node_full[n]));
        af_cycles[n]   <= sat_add(af_cycles[n], int'(node_almost_full[n]));
      end
    end
  end

  assign in_flight = injected - delivered;

endmodule
