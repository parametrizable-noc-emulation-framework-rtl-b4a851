// traffic_gen: traffic generator for one master node. It stands in for the master PE and
// issues write requests to the node's core interface.
//
// Modes (mode input, see noc_pkg::tg_mode_e):
//   UNIFORM  one write, then a gap of `interval` PE clocks, repeated: packets at equal
//            intervals of time.
//   HOTSPOT  writes back to back with no gap, so that the destination (typically shared by
//            several generators) receives more than it can serve.
//   SPORADIC bursts of `burst_len` back-to-back writes separated by gaps of `interval`.
// Every write goes to node `dst`; the n-th write of a run (n = 0, 1, ...) has local byte
// address 4*n (modulo 64 KiB) and data {MY_ID[7:0], 8'h00, n[15:0]}, so a receiver can
// check what arrived. A run starts on a rising `start` and ends after `num_pkts` writes
// (0 = until `start` is lowered); `done` then stays high until the next start. A request
// is held until the core interface answers with ack (counted in `sent`) or err (counted
// in `errors`).
// The three traffic types are the document's; the address and data pattern, the
// configuration inputs and the single-write (not burst) requests are this design's own.
module traffic_gen
  import noc_pkg::*;
#(
  parameter int MY_ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  mode,
  input  logic [7:0]  dst,
  input  logic [15:0] interval,
  input  logic [7:0]  burst_len,
  input  logic [15:0] num_pkts,
  output wb_req_t     wb_req,
  input  wb_rsp_t     wb_rsp,
  output logic [15:0] sent,
  output logic [15:0] errors,
  output logic        done
);

  typedef enum logic [1:0] {G_IDLE, G_ISSUE, G_GAP, G_DONE} tg_state_e;

  tg_state_e   state_q;
  logic        start_q;
  logic [15:0] n_q;          // writes issued in this run
  logic [15:0] gap_q;
  logic [7:0]  inburst_q;    // writes done in the current sporadic burst

  wire logic answered = wb_rsp.ack || wb_rsp.err;
  wire logic last     = (num_pkts != '0) && (n_q + 1'b1 == num_pkts);

  always_comb begin
    wb_req     = '0;
    wb_req.adr = {8'h00, dst, n_q[13:0], 2'b00};
    wb_req.dat = {8'(MY_ID), 8'h00, n_q};
    if (state_q == G_ISSUE) begin
      wb_req.cyc = 1'b1;
      wb_req.stb = 1'b1;
      wb_req.we  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= G_IDLE;
      start_q   <= 1'b0;
      n_q       <= '0;
      gap_q     <= '0;
      inburst_q <= '0;
      sent      <= '0;
      errors    <= '0;
    end else begin
      start_q <= start;
      case (state_q)
        G_IDLE, G_DONE: if (start && !start_q) begin
          n_q       <= '0;
          inburst_q <= '0;
          sent      <= '0;
          errors    <= '0;
          state_q   <= G_ISSUE;
        end
        G_ISSUE: if (answered) begin
          if (wb_rsp.ack) sent   <= sent + 1'b1;
          else            errors <= errors + 1'b1;
          n_q <= n_q + 1'b1;
          if (last || !start) begin
            state_q <= G_DONE;
          end else begin
            case (tg_mode_e'(int'(mode)))
              TG_HOTSPOT: state_q <= G_ISSUE;
              TG_SPORADIC: begin
                if (inburst_q + 1'b1 >= burst_len) begin
                  inburst_q <= '0;
                  gap_q     <= interval;
                  state_q   <= (interval == '0) ? G_ISSUE : G_GAP;
                end else begin
                  inburst_q <= inburst_q + 1'b1;
                end
              end
              default: begin
                gap_q   <= interval;
                state_q <= (interval == '0) ? G_ISSUE : G_GAP;
              end
            endcase
          end
        end
        G_GAP: begin
          if (gap_q <= 16'd1) state_q <= G_ISSUE;
          gap_q <= gap_q - 1'b1;
        end
        default: state_q <= G_IDLE;
      endcase
    end
  end

  assign done = (state_q == G_DONE);

endmodule
