// tlar_pkg: types and constants shared by the TLAR network interface and the
// DLDR dual-mode router of a thermal-aware 3D mesh network-on-chip.
//
// A flit is 34 bits: 2 control bits (flit type) and 32 data bits, as the
// design's implementation table gives. The head flit carries, in its 32 data
// bits, the destination and source coordinates, the 1-bit routing mode and the
// payload length. The field layout and the 4-bit coordinate fields (enough for
// meshes up to 16x16x16) are this design's own choice.
//
// Coordinates: x grows to the East, y grows to the North, z is the layer
// index with layer 0 at the top of the stack and layer Z-1 the bottom layer
// next to the heat sink, which is never throttled. "Up" lowers z, "down"
// raises it.
package tlar_pkg;

  localparam int unsigned FLIT_DATA_W = 32;
  localparam int unsigned FLIT_W      = FLIT_DATA_W + 2;
  localparam int unsigned COORD_W     = 4;
  localparam int unsigned LEN_W       = 4;   // payload words per packet, 1..15
  localparam int unsigned NPORTS      = 7;
  localparam int unsigned PORT_W      = 3;

  // Flit type (the two control bits).
  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_TAIL = 2'b01,
    FT_HEAD = 2'b10,
    FT_RSVD = 2'b11
  } flit_type_e;

  typedef struct packed {
    flit_type_e             ftype;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] z;
  } coord_t;

  // Routing mode bit: 0 = downward-first, 1 = lateral-first.
  typedef enum logic {
    MODE_DOWNWARD = 1'b0,
    MODE_LATERAL  = 1'b1
  } route_mode_e;

  // Head flit data field (32 bits).
  typedef struct packed {
    logic [2:0]       rsvd;
    logic [LEN_W-1:0] len;
    route_mode_e      mode;
    coord_t           src;
    coord_t           dst;
  } head_t;

  // Router ports, in the order of the router's input queues.
  typedef enum logic [PORT_W-1:0] {
    P_L = 3'd0,
    P_N = 3'd1,
    P_E = 3'd2,
    P_S = 3'd3,
    P_W = 3'd4,
    P_U = 3'd5,
    P_D = 3'd6
  } port_e;

  function automatic flit_t make_head(coord_t dst, coord_t src, route_mode_e mode,
                                      logic [LEN_W-1:0] len);
    head_t h;
    h.rsvd = '0;
    h.len  = len;
    h.mode = mode;
    h.src  = src;
    h.dst  = dst;
    return '{ftype: FT_HEAD, data: h};
  endfunction

endpackage
