// noc_pkg: types and constants shared by the router, the mesh and the
// register bank of the NoC emulation hardware.
//
// The 32-bit flit layout follows the emulator's head/body/tail format for a
// 5x5 network: [31:30] flit type, [29] VC identifier, [28:26] output port to
// take at the router that currently holds the flit (CNOP), [25:23]/[22:20]
// source X/Y, [19:17]/[16:14] destination X/Y, [13:12] unused, [11:0]
// packet id. Body and tail flits only carry type and VC id; bits [28:0] are
// free payload. Flit type codes are 00 head, 01 body, 10 tail, 11 single
// (head and tail in one flit).
//
// The numbering of the five ports (N, S, E, W, L = 0..4, in the order the
// ports are usually listed) and the direction convention (north = +Y,
// east = +X, node (0,0) in the south-west corner) are this design's choices.
package noc_pkg;

  localparam int FLIT_W  = 32;   // link / flit width, fixed by the flit format
  localparam int COORD_W = 3;    // X or Y coordinate field width
  localparam int PID_W   = 12;   // packet id field width
  localparam int NPORTS  = 5;    // N, S, E, W, L

  typedef enum logic [1:0] {
    FT_HEAD   = 2'b00,
    FT_BODY   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11
  } flit_type_e;

  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_S = 3'd1,
    P_E = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  // Head flit view of a 32-bit flit.
  typedef struct packed {
    flit_type_e         ftype;
    logic               vcid;
    port_e              cnop;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [1:0]         unused;
    logic [PID_W-1:0]   pkt_id;
  } flit_t;

  // One direction of a data link: a flit and its valid strobe.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // One credit on the reverse link: which VC freed a buffer slot.
  typedef struct packed {
    logic valid;
    logic vc;
  } credit_t;

  function automatic logic is_head(flit_t f);
    return f.ftype == FT_HEAD || f.ftype == FT_SINGLE;
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype == FT_TAIL || f.ftype == FT_SINGLE;
  endfunction

  // X-Y dimension-ordered routing: output port at node (cx,cy) for a packet
  // headed to (dx,dy). X is resolved first, then Y, then eject locally.
  function automatic port_e xy_route(logic [COORD_W-1:0] cx, logic [COORD_W-1:0] cy,
                                     logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > cx)      return P_E;
    else if (dx < cx) return P_W;
    else if (dy > cy) return P_N;
    else if (dy < cy) return P_S;
    else              return P_L;
  endfunction

endpackage
