// slave_ni: network adapter on the slave side (slave network interface). It decodes
// request packets into bus accesses of a slave PE and sends read data back as a response
// packet.
//
// Receive: a packet is collected flit by flit from the link controller: HEADER (source
// node, we), ADDRESS (16-bit local byte address), DATA flits stored by order number, TAIL.
// At the TAIL the parity bits it carries are compared with the parity of the ADDRESS and
// DATA flits actually received (PARITY_ODD selects odd or even parity). A packet that fails
// is dropped and parity_err pulses for one clock.
// Write: DATA flits 2k and 2k+1 form word k (low half first), written to address + 4k, one
// bus access per word. Read: one word is read at the address and returned to the source
// node as HEADER (response flag set), two DATA flits and TAIL.
// With SRC_ROUTE = 1 the request HEADER carries a route and the source node; the response
// HEADER then carries the route back to the source, from this adapter's own table.
// Bus side: Wishbone-style master (cyc, stb, we, adr, dat; ack, dat), one access at a time,
// held until ack. pkt_done pulses when a packet has been fully served.
// The decode and the write/read behaviour follow the document's communication flow; the
// one-word read response and the drop-on-parity-error policy are this design's own.
module slave_ni
  import noc_pkg::*;
#(
  parameter int MY_ID      = 1,
  parameter int MAX_BURST  = 4,
  parameter int TOPOLOGY   = TOPO_TORUS,
  parameter int COLS       = 3,
  parameter int ROWS       = 3,
  parameter bit SRC_ROUTE  = 1'b0,
  parameter bit PARITY_ODD = 1'b0,
  localparam int ND = 2 * MAX_BURST
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rx_valid,
  input  flit_t   rx_flit,
  output logic    rx_ready,
  output logic    tx_valid,
  output flit_t   tx_flit,
  input  logic    tx_ready,
  output wb_req_t bus_req,
  input  wb_rsp_t bus_rsp,
  output logic    parity_err,
  output logic    pkt_done
);

  typedef enum logic [2:0] {R_IDLE, R_BODY, B_WRITE, B_READ, T_HEAD, T_DATA, T_TAIL}
    ni_state_e;


  // Source-route table: route to every node, computed at elaboration (used when SRC_ROUTE).
  logic [ROUTE_W-1:0] rte [COLS * ROWS];
  for (genvar d = 0; d < COLS * ROWS; d++) begin : g_rte
    assign rte[d] = make_route(TOPOLOGY, COLS, ROWS, MY_ID, d);
  end

  ni_state_e         state_q;
  logic [NODE_W-1:0] src_q;
  logic              we_q;
  logic [15:0]       adr_q;
  logic [15:0]       dval_q [ND];
  logic [3:0]        ndata_q;        // DATA flits received
  logic [2:0]        word_q;         // bus word index
  logic              fidx_q;         // response DATA flit index
  logic [31:0]       rdat_q;

  logic [7:0] dpar_exp;
  always_comb begin
    dpar_exp = '0;
    for (int k = 0; k < ND && k < 8; k++)
      if (k < int'(ndata_q)) dpar_exp[k] = parity16(dval_q[k], PARITY_ODD);
  end
  wire logic [7:0] apar_exp = {7'b0, parity16(adr_q, PARITY_ODD)};

  assign rx_ready = (state_q == R_IDLE) || (state_q == R_BODY);

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    case (state_q)
      T_HEAD: begin
        tx_valid = 1'b1;
        tx_flit  = SRC_ROUTE ? make_head_sr(1'b1, NODE_W'(MY_ID), rte[int'(src_q) % (COLS * ROWS)], 1'b0)
                             : make_head(1'b1, NODE_W'(MY_ID), src_q, 1'b0);
      end
      T_DATA: begin
        tx_valid = 1'b1;
        tx_flit  = make_body(FLIT_DATA, {2'b0, fidx_q},
                             fidx_q ? rdat_q[31:16] : rdat_q[15:0], 1'b0);
      end
      T_TAIL: begin
        tx_valid = 1'b1;
        tx_flit  = make_tail(8'h0, {6'b0, parity16(rdat_q[31:16], PARITY_ODD),
                                    parity16(rdat_q[15:0], PARITY_ODD)}, 1'b0);
      end
      default: ;
    endcase
  end

  always_comb begin
    bus_req     = '0;
    bus_req.adr = {16'h0, adr_q + {11'b0, word_q, 2'b00}};
    bus_req.dat = {dval_q[(2 * int'(word_q) + 1) % ND], dval_q[(2 * int'(word_q)) % ND]};
    if (state_q == B_WRITE || state_q == B_READ) begin
      bus_req.cyc = 1'b1;
      bus_req.stb = 1'b1;
      bus_req.we  = (state_q == B_WRITE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= R_IDLE;
      src_q      <= '0;
      we_q       <= 1'b0;
      adr_q      <= '0;
      ndata_q    <= '0;
      word_q     <= '0;
      fidx_q     <= 1'b0;
      rdat_q     <= '0;
      parity_err <= 1'b0;
      pkt_done   <= 1'b0;
      for (int k = 0; k < ND; k++) dval_q[k] <= '0;
    end else begin
      parity_err <= 1'b0;
      pkt_done   <= 1'b0;
      case (state_q)
        R_IDLE: if (rx_valid && rx_flit.id == FLIT_HEAD) begin
          src_q   <= SRC_ROUTE ? head_src_sr(rx_flit) : head_src(rx_flit);
          we_q    <= rx_flit.we;
          ndata_q <= '0;
          adr_q   <= '0;
          word_q  <= '0;
          state_q <= R_BODY;
        end
        R_BODY: if (rx_valid) begin
          case (rx_flit.id)
            FLIT_ADDR: adr_q <= rx_flit.payload[15:0];
            FLIT_DATA: if (int'(rx_flit.payload[20:18]) < ND) begin
              dval_q[rx_flit.payload[20:18]] <= rx_flit.payload[15:0];
              if ({1'b0, rx_flit.payload[20:18]} >= ndata_q)
                ndata_q <= {1'b0, rx_flit.payload[20:18]} + 4'd1;
            end
            FLIT_TAIL: begin
              if (rx_flit.payload[15:8] != apar_exp || rx_flit.payload[7:0] != dpar_exp) begin
                parity_err <= 1'b1;
                state_q    <= R_IDLE;
              end else if (we_q) begin
                state_q <= (ndata_q >= 4'd2) ? B_WRITE : R_IDLE;
                pkt_done <= (ndata_q < 4'd2);
              end else begin
                state_q <= B_READ;
              end
            end
            default: state_q <= R_BODY;   // a second HEADER cannot occur inside a packet
          endcase
        end
        B_WRITE: if (bus_rsp.ack) begin
          word_q <= word_q + 1'b1;
          if (2 * (int'(word_q) + 1) >= int'(ndata_q)) begin
            state_q  <= R_IDLE;
            pkt_done <= 1'b1;
          end
        end
        B_READ: if (bus_rsp.ack) begin
          rdat_q  <= bus_rsp.dat;
          fidx_q  <= 1'b0;
          state_q <= T_HEAD;
        end
        T_HEAD: if (tx_ready) state_q <= T_DATA;
        T_DATA: if (tx_ready) begin
          fidx_q <= 1'b1;
          if (fidx_q) state_q <= T_TAIL;
        end
        T_TAIL: if (tx_ready) begin
          state_q  <= R_IDLE;
          pkt_done <= 1'b1;
        end
        default: state_q <= R_IDLE;
      endcase
    end
  end

endmodule
