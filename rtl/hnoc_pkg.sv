// hnoc_pkg: types and constants shared by the hybrid (packet-switched + TDM)
// network-on-chip.
//
// A flit is one 128-bit channel word plus its sideband: a valid bit, the
// TDM/packet-switched type bit, the virtual channel, head/tail markers, the
// destination coordinates and the lookahead output port for the router that
// receives it. The channel width (128 bits), the two VCs per port, the
// 8-entry context memory and the 5-port mesh router follow the document's
// router parameters. The sideband layout, the coordinate convention
// (x grows to the east, y grows to the north) and the port numbering are
// this design's own choices.
//
// A router context-memory entry holds, for each of the 5 output ports, an
// enable bit and a 3-bit source input port: 5 x 4 = 20 bits, which matches
// the 8x20 context memory the document reports.
package hnoc_pkg;

  localparam int unsigned FLIT_DATA_W = 128;  // channel width
  localparam int unsigned NUM_VCS     = 2;    // virtual channels per port
  localparam int unsigned VC_W        = 1;
  localparam int unsigned NUM_PORTS   = 5;    // N, E, S, W, local
  localparam int unsigned PW          = 3;    // port index width
  localparam int unsigned COORD_W     = 3;    // up to an 8x8 mesh

  typedef enum logic [PW-1:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef struct packed {
    logic                   valid;
    logic                   tdm;      // 1: time-multiplexed flit, 0: packet-switched
    logic [VC_W-1:0]        vc;
    logic                   head;
    logic                   tail;
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic [PW-1:0]      la_port;  // output port to take at the receiving router
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // One output's share of a router context-memory entry.
  typedef struct packed {
    logic              en;   // output reserved for TDM in this slot
    logic [PW-1:0] src;  // input port that feeds it
  } ctx_out_t;

  typedef ctx_out_t [NUM_PORTS-1:0] ctx_entry_t;   // 20 bits
  localparam int unsigned CTX_W = $bits(ctx_entry_t);

  // Which context memory of a node a configuration write goes to.
  typedef enum logic [1:0] {
    CFG_ROUTER = 2'd0,   // router context memory (20-bit entry)
    CFG_TX     = 2'd1,   // write core port slot table (bit 0)
    CFG_RX     = 2'd2    // read core port slot table (bit 0)
  } cfg_target_e;

  // Dimension-ordered (X first, then Y) route from router (cx, cy).
  function automatic port_e xy_route(input logic [COORD_W-1:0] cx, input logic [COORD_W-1:0] cy,
                                     input logic [COORD_W-1:0] dx, input logic [COORD_W-1:0] dy);
    if (dx > cx)      return PORT_E;
    else if (dx < cx) return PORT_W;
    else if (dy > cy) return PORT_N;
    else if (dy < cy) return PORT_S;
    else              return PORT_L;
  endfunction

  // Coordinates of the neighbour reached through output port p.
  function automatic logic [2*COORD_W-1:0] neighbour(input logic [COORD_W-1:0] cx,
                                                     input logic [COORD_W-1:0] cy,
                                                     input logic [PW-1:0] p);
    logic [COORD_W-1:0] nx, ny;
    nx = cx;
    ny = cy;
    case (p)
      PORT_N:  ny = cy + 1'b1;
      PORT_S:  ny = cy - 1'b1;
      PORT_E:  nx = cx + 1'b1;
      PORT_W:  nx = cx - 1'b1;
      default: ;
    endcase
    return {nx, ny};
  endfunction

endpackage
