// noc_pkg: types, constants and routing functions shared by the NoC framework.
//
// Flit format (25 bits, as in the framework's packet description):
//   [24:23] flit ID   00 = HEADER, 01 = DATA, 10 = ADDRESS, 11 = TAIL
//   [22:2]  21-bit payload (route/destination, or sequence number + 16-bit value)
//   [1]     stb  flit valid
//   [0]     we   1 = write request, 0 = read request
// Payload layout (this design's choice; the framework only fixes the 2-bit ID, the
// 3-bit order field next to it and the 16-bit data/address value):
//   HEADER : [20] response flag, [19:16] zero, [15:8] source node, [7:0] destination node
//   HEADER with source routing: [20] response flag, [19:8] route, [7:0] source node; the
//            route is a list of up to four 3-bit output ports, the next hop in [10:8];
//            each router consumes its entry and shifts the list, a zero entry (the local
//            port) ends it. This limits source-routed paths to three network hops.
//   DATA / ADDRESS : [20:18] order (sequence) number, [17:16] zero, [15:0] value
//   TAIL   : [20:16] zero, [15:8] parity of ADDRESS flits by order number,
//            [7:0] parity of DATA flits by order number
// Router port numbering: 0 = local PE, 1 = North, 2 = East, 3 = South, 4 = West.
// Routing: XY (dimension-ordered, shortest wrap direction on a torus) for mesh and torus;
// digit-wise shortest routing for a two-level WK-recursive network WK(4,2), where port
// 1+k of node (g,i) leads to (g,k) for k != i and to (i,g) for k == i.
package noc_pkg;

  localparam int FLIT_W   = 25;
  localparam int PAYLOAD_W = 21;
  localparam int NPORTS   = 5;
  localparam int NODE_W   = 8;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'b00,
    FLIT_DATA = 2'b01,
    FLIT_ADDR = 2'b10,
    FLIT_TAIL = 2'b11
  } flit_id_e;

  typedef struct packed {
    flit_id_e               id;
    logic [PAYLOAD_W-1:0]   payload;
    logic                   stb;
    logic                   we;
  } flit_t;

  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  typedef enum int {
    TOPO_MESH  = 0,
    TOPO_TORUS = 1,
    TOPO_WK    = 2
  } topo_e;

  typedef enum int {
    SW_SF = 0,   // store and forward
    SW_WH = 1    // wormhole
  } switching_e;

  typedef enum int {
    TG_UNIFORM  = 0,
    TG_HOTSPOT  = 1,
    TG_SPORADIC = 2
  } tg_mode_e;

  // Wishbone-style bus between a PE and its network adapter.
  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [2:0]  cti;   // 000 classic, 010 incrementing burst, 111 end of burst
    logic [31:0] adr;
    logic [31:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic        ack;
    logic        err;
    logic [31:0] dat;
  } wb_rsp_t;

  // One direction of a router-to-router link: SEND qualifies the flit, READY goes back.
  typedef struct packed {
    logic  send;
    flit_t flit;
  } link_t;

  // Parity bit of a 16-bit value; odd=1 gives odd parity (value plus bit has odd ones).
  function automatic logic parity16(input logic [15:0] v, input bit odd);
    return (^v) ^ odd;
  endfunction

  function automatic flit_t make_head(input logic resp, input logic [NODE_W-1:0] src,
                                      input logic [NODE_W-1:0] dst, input logic we);
    flit_t f;
    f.id      = FLIT_HEAD;
    f.payload = {resp, 4'b0, src, dst};
    f.stb     = 1'b1;
    f.we      = we;
    return f;
  endfunction

  function automatic flit_t make_body(input flit_id_e id, input logic [2:0] seq,
                                      input logic [15:0] v, input logic we);
    flit_t f;
    f.id      = id;
    f.payload = {seq, 2'b0, v};
    f.stb     = 1'b1;
    f.we      = we;
    return f;
  endfunction

  function automatic flit_t make_tail(input logic [7:0] apar, input logic [7:0] dpar,
                                      input logic we);
    flit_t f;
    f.id      = FLIT_TAIL;
    f.payload = {5'b0, apar, dpar};
    f.stb     = 1'b1;
    f.we      = we;
    return f;
  endfunction

  function automatic logic [NODE_W-1:0] head_dst(input flit_t f);
    return f.payload[7:0];
  endfunction

  function automatic logic [NODE_W-1:0] head_src(input flit_t f);
    return f.payload[15:8];
  endfunction

  // ---- source routing ----
  localparam int ROUTE_W = 12;   // four 3-bit hops

  function automatic flit_t make_head_sr(input logic resp, input logic [NODE_W-1:0] src,
                                         input logic [ROUTE_W-1:0] route, input logic we);
    flit_t f;
    f.id      = FLIT_HEAD;
    f.payload = {resp, route, src};
    f.stb     = 1'b1;
    f.we      = we;
    return f;
  endfunction

  function automatic logic [ROUTE_W-1:0] head_route(input flit_t f);
    return f.payload[19:8];
  endfunction

  function automatic logic [NODE_W-1:0] head_src_sr(input flit_t f);
    return f.payload[7:0];
  endfunction

  // Output port for a packet at node cur going to node dst.
  function automatic port_e route_port(input int topo, input int cols, input int rows,
                                       input int cur, input int dst);
    int x, y, dx, dy, de, ds;
    int g, i, h, j;
    if (cur == dst) return PORT_L;
    if (topo == TOPO_WK) begin
      g = cur / cols; i = cur % cols;
      h = dst / cols; j = dst % cols;
      if (g == h)      return port_e'(1 + j);
      else if (i == h) return port_e'(1 + i);
      else             return port_e'(1 + h);
    end
    x  = cur % cols; y  = cur / cols;
    dx = dst % cols; dy = dst / cols;
    if (x != dx) begin
      if (topo == TOPO_TORUS) begin
        de = (dx - x + cols) % cols;
        return (2 * de <= cols) ? PORT_E : PORT_W;
      end
      return (dx > x) ? PORT_E : PORT_W;
    end
    if (topo == TOPO_TORUS) begin
      ds = (dy - y + rows) % rows;
      return (2 * ds <= rows) ? PORT_S : PORT_N;
    end
    return (dy > y) ? PORT_S : PORT_N;
  endfunction

  // Number of router hops from src to dst under route_port (for testbenches and sizing).
  function automatic int hop_count(input int topo, input int cols, input int rows,
                                   input int src, input int dst);
    int x, y, dx, dy, de, ds, n;
    if (topo == TOPO_WK) begin
      if (src == dst) return 0;
      if (src / cols == dst / cols) return 1;
      n = 1;                                          // inter-cluster link
      if (src % cols != dst / cols) n++;              // reach the gateway node
      if (dst % cols != src / cols) n++;              // leave the far gateway
      return n;
    end
    x = src % cols; y = src / cols; dx = dst % cols; dy = dst / cols;
    de = (dx - x + cols) % cols;
    ds = (dy - y + rows) % rows;
    if (topo == TOPO_TORUS) begin
      n = (2 * de <= cols) ? de : cols - de;
      n += (2 * ds <= rows) ? ds : rows - ds;
      return n;
    end
    return ((dx > x) ? dx - x : x - dx) + ((dy > y) ? dy - y : y - dy);
  endfunction

  // Node reached from node n through router port p (1..4), or -1 for an open port.
  function automatic int neighbor(input int topo, input int cols, input int rows,
                                  input int n, input int p);
    int x, y, g, i, k;
    k = p - 1;
    if (topo == TOPO_WK) begin
      g = n / cols; i = n % cols;
      if (k < 0 || k >= cols) return -1;
      if (k != i)             return cols * g + k;
      if (i != g)             return cols * i + g;
      return -1;
    end
    x = n % cols; y = n / cols;
    case (p)
      1: if (y > 0) return n - cols;
         else if (topo == TOPO_TORUS && rows > 1) return n + cols * (rows - 1);
      2: if (x < cols - 1) return n + 1;
              else if (topo == TOPO_TORUS && cols > 1) return n - (cols - 1);
      3: if (y < rows - 1) return n + cols;
              else if (topo == TOPO_TORUS && rows > 1) return n - cols * (rows - 1);
      4: if (x > 0) return n - 1;
              else if (topo == TOPO_TORUS && cols > 1) return n + (cols - 1);
      default: ;
    endcase
    return -1;
  endfunction

  // Source route from src to dst: the output port at each router along the path of
  // route_port, first hop in bits [2:0], ending with the local port (zero). Paths longer
  // than three network hops do not fit and are cut short.
  function automatic logic [ROUTE_W-1:0] make_route(input int topo, input int cols,
                                                    input int rows, input int src,
                                                    input int dst);
    logic [ROUTE_W-1:0] r;
    int cur;
    port_e p;
    r = '0;
    cur = src;
    for (int h = 0; h < ROUTE_W / 3; h++) begin
      p = route_port(topo, cols, rows, cur, dst);
      r[3*h +: 3] = 3'(p);
      if (p == PORT_L) break;
      cur = neighbor(topo, cols, rows, cur, int'(p));
      if (cur < 0) break;
    end
    return r;
  endfunction

endpackage
