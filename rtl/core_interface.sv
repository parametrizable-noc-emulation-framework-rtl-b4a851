// core_interface: network adapter on the master side (Core Interface). It turns the bus
// requests of a master PE into packets and turns response packets back into bus replies.
//
// PE side: a Wishbone-style slave port (cyc, stb, we, cti, adr, dat; ack, err, dat) on the
// PE clock. Address map: adr[23:16] is the number of the destination node, adr[15:0] the
// byte address inside that node's local memory space, and adr[31:24] must be zero.
// A request is validated first: the destination must exist, must be a slave node
// (SLAVE_MASK) and the address must be word aligned; otherwise the request ends with err.
//
// Write: the word is taken at once (ack) and sent as HEADER, ADDRESS (low 16 address bits),
// two DATA flits per word (low half first, order numbers 0,1,2,...) and TAIL. Words of an
// incrementing burst (cti = 010) to consecutive addresses are collected, up to MAX_BURST
// words, and packed into one packet; cti = 111 closes the burst. Posted writes need no
// response packet.
// Read: HEADER (we = 0), ADDRESS and TAIL are sent; ack comes with the data once the
// response packet (HEADER, two DATA flits, TAIL) has arrived and its parity has checked;
// a parity mismatch ends the read with err.
// TAIL: one parity bit per ADDRESS flit in [15:8] and per DATA flit in [7:0], indexed by
// order number; PARITY_ODD selects odd or even parity.
//
// Routing: normally the HEADER carries source and destination and each router looks up
// its own table. With SRC_ROUTE = 1 the adapter looks up the whole route in its own table
// (computed at elaboration from TOPOLOGY, COLS, ROWS) and sends it in the HEADER instead
// of the destination (source routing, at most three network hops).
//
// Network side: tx/rx valid/ready flit streams to the link controller. One flit leaves per
// PE cycle while tx_ready is high. Packet layout, parity and burst packing follow the
// document; the address map, the posted writes and the use of cti are this design's own.
module core_interface
  import noc_pkg::*;
#(
  parameter int MY_ID      = 0,
  parameter int NUM_NODES  = 9,
  parameter int TOPOLOGY   = TOPO_TORUS,
  parameter int COLS       = 3,
  parameter int ROWS       = 3,
  parameter bit SRC_ROUTE  = 1'b0,
  parameter logic [255:0] SLAVE_MASK = 256'h92,
  parameter int MAX_BURST  = 4,
  parameter bit PARITY_ODD = 1'b0,
  localparam int BW = $clog2(MAX_BURST + 1),
  localparam int WI = (MAX_BURST > 1) ? $clog2(MAX_BURST) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t wb_req,
  output wb_rsp_t wb_rsp,
  output logic    tx_valid,
  output flit_t   tx_flit,
  input  logic    tx_ready,
  input  logic    rx_valid,
  input  flit_t   rx_flit,
  output logic    rx_ready,
  output logic    parity_err     // one-cycle pulse: a response failed its parity check
);

  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_HEAD, S_ADDR, S_DATA, S_TAIL, S_WAIT}
    ci_state_e;

  ci_state_e         state_q;

  // Source-route table: route to every node, computed at elaboration (used when SRC_ROUTE).
  logic [ROUTE_W-1:0] rte [NUM_NODES];
  for (genvar d = 0; d < NUM_NODES; d++) begin : g_rte
    assign rte[d] = make_route(TOPOLOGY, COLS, ROWS, MY_ID, d);
  end

  logic [NODE_W-1:0] dst_q;
  logic              we_q;
  logic [15:0]       adr_q;
  logic [31:0]       words_q [MAX_BURST];
  logic [BW-1:0]     nwords_q;
  logic [3:0]        fidx_q;             // DATA flit index
  logic              ack_q, err_q;
  logic [31:0]       rdat_q;
  logic [15:0]       resp_q [2];

  wire logic        req       = wb_req.cyc && wb_req.stb && !ack_q && !err_q;
  wire logic [7:0]  req_dst   = wb_req.adr[23:16];
  wire logic        req_ok    = (int'(req_dst) < NUM_NODES) && SLAVE_MASK[req_dst] &&
                                (int'(req_dst) != MY_ID) && (wb_req.adr[31:24] == '0) &&
                                (wb_req.adr[1:0] == 2'b00);
  wire logic [15:0] next_adr  = adr_q + 16'({nwords_q, 2'b00});
  wire logic        burst_hit = req && wb_req.we && req_dst == dst_q &&
                                wb_req.adr[31:16] == {8'h0, dst_q} &&
                                wb_req.adr[15:0] == next_adr;

  // DATA flit value by index: word idx/2, low half first.
  function automatic logic [15:0] data_half(input logic [31:0] w, input logic hi);
    return hi ? w[31:16] : w[15:0];
  endfunction

  logic [7:0] dpar;
  always_comb begin
    dpar = '0;
    for (int k = 0; k < 2 * MAX_BURST && k < 8; k++)
      if (k < 2 * int'(nwords_q) && we_q)
        dpar[k] = parity16(data_half(words_q[k / 2], k[0]), PARITY_ODD);
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    case (state_q)
      S_HEAD: begin
        tx_valid = 1'b1;
        tx_flit  = SRC_ROUTE ? make_head_sr(1'b0, NODE_W'(MY_ID), rte[int'(dst_q) % NUM_NODES], we_q)
                             : make_head(1'b0, NODE_W'(MY_ID), dst_q, we_q);
      end
      S_ADDR: begin
        tx_valid = 1'b1;
        tx_flit  = make_body(FLIT_ADDR, 3'd0, adr_q, we_q);
      end
      S_DATA: begin
        tx_valid = 1'b1;
        tx_flit  = make_body(FLIT_DATA, fidx_q[2:0],
                             data_half(words_q[WI'(fidx_q[3:1])], fidx_q[0]), we_q);
      end
      S_TAIL: begin
        tx_valid = 1'b1;
        tx_flit  = make_tail({7'b0, parity16(adr_q, PARITY_ODD)}, dpar, we_q);
      end
      default: ;
    endcase
  end

  assign rx_ready = 1'b1;

  // Parity expected for the two DATA flits of a response.
  wire logic [7:0] resp_par_exp = {6'b0, parity16(resp_q[1], PARITY_ODD),
                                   parity16(resp_q[0], PARITY_ODD)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      dst_q      <= '0;
      we_q       <= 1'b0;
      adr_q      <= '0;
      nwords_q   <= '0;
      fidx_q     <= '0;
      ack_q      <= 1'b0;
      err_q      <= 1'b0;
      rdat_q     <= '0;
      resp_q[0]  <= '0;
      resp_q[1]  <= '0;
      parity_err <= 1'b0;
      for (int k = 0; k < MAX_BURST; k++) words_q[k] <= '0;
    end else begin
      ack_q      <= 1'b0;
      err_q      <= 1'b0;
      parity_err <= 1'b0;
      case (state_q)
        S_IDLE: if (req) begin
          if (!req_ok) begin
            err_q <= 1'b1;
          end else begin
            dst_q    <= req_dst;
            we_q     <= wb_req.we;
            adr_q    <= wb_req.adr[15:0];
            nwords_q <= BW'(1);
            fidx_q   <= '0;
            if (wb_req.we) begin
              words_q[0] <= wb_req.dat;
              ack_q      <= 1'b1;
              state_q    <= (wb_req.cti == 3'b010 && MAX_BURST > 1) ? S_COLLECT : S_HEAD;
            end else begin
              state_q <= S_HEAD;
            end
          end
        end
        S_COLLECT: begin
          if (burst_hit) begin
            words_q[WI'(nwords_q)] <= wb_req.dat;
            nwords_q <= nwords_q + 1'b1;
            ack_q    <= 1'b1;
            if (wb_req.cti != 3'b010 || int'(nwords_q) + 1 == MAX_BURST) state_q <= S_HEAD;
          end else if (req || !wb_req.cyc) begin
            // Burst ended or a request that does not extend it: send what we have.
            state_q <= S_HEAD;
          end
        end
        S_HEAD: if (tx_ready) state_q <= S_ADDR;
        S_ADDR: if (tx_ready) state_q <= we_q ? S_DATA : S_TAIL;
        S_DATA: if (tx_ready) begin
          fidx_q <= fidx_q + 1'b1;
          if (int'(fidx_q) + 1 == 2 * int'(nwords_q)) state_q <= S_TAIL;
        end
        S_TAIL: if (tx_ready) state_q <= we_q ? S_IDLE : S_WAIT;
        S_WAIT: if (rx_valid) begin
          case (rx_flit.id)
            FLIT_DATA: if (rx_flit.payload[20:18] < 3'd2)
                         resp_q[rx_flit.payload[18]] <= rx_flit.payload[15:0];
            FLIT_TAIL: begin
              if (rx_flit.payload[7:0] == resp_par_exp) begin
                ack_q  <= 1'b1;
                rdat_q <= {resp_q[1], resp_q[0]};
              end else begin
                err_q      <= 1'b1;
                parity_err <= 1'b1;
              end
              state_q <= S_IDLE;
            end
            default: ;
          endcase
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign wb_rsp.ack = ack_q;
  assign wb_rsp.err = err_q;
  assign wb_rsp.dat = rdat_q;

  a_ack_err_excl: assert property (@(posedge clk) disable iff (!rst_n) !(ack_q && err_q));

endmodule
