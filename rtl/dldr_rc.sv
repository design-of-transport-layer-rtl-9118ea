// dldr_rc: dual-mode routing computation of the DLDR router, with the address
// decoder in front of it.
//
// Downward-Lateral Deterministic Routing (DLDR) gives every packet one of two
// paths, chosen at the source NI and carried as a 1-bit routing mode in the
// head flit:
//   lateral-first  : XY routing inside the source layer, then straight up or
//                    down the destination column;
//   downward-first : straight down to the bottom layer (never throttled), XY
//                    routing there, then straight up the destination column.
// The decision at each router, from the current, source and destination
// addresses and the mode, is:
//   current == destination           -> local port
//   same XY column as the destination -> up or down towards its layer
//   in the bottom layer, or in the source layer with lateral-first mode
//                                     -> XY routing (x first, then y)
//   otherwise                         -> down
// This follows the design's description (mode is consulted where the packet
// is still in its source layer; XY routing is the deterministic lateral
// algorithm). The port naming (E = +x, N = +y, U = towards layer 0) is this
// design's own choice.
//
// Interface: purely combinational; head_data is the 32-bit data field of a
// head flit, cur the router's own coordinates.
module dldr_rc
  import tlar_pkg::*;
#(
  parameter int unsigned Z = 4
) (
  input  coord_t                 cur,
  input  logic [FLIT_DATA_W-1:0] head_data,
  output port_e                  out_port
);

  localparam logic [COORD_W-1:0] ZBOT = COORD_W'(Z - 1);

  head_t h;
  logic  same_xy, lateral_here;

  // Address decoder: split the head flit into its fields.
  assign h = head_t'(head_data);

  assign same_xy      = (cur.x == h.dst.x) && (cur.y == h.dst.y);
  assign lateral_here = (cur.z == ZBOT) ||
                        ((h.mode == MODE_LATERAL) && (cur.z == h.src.z));

  always_comb begin
    if (same_xy && (cur.z == h.dst.z))  out_port = P_L;
    else if (same_xy)                   out_port = (h.dst.z < cur.z) ? P_U : P_D;
    else if (lateral_here) begin
      if      (h.dst.x > cur.x)         out_port = P_E;
      else if (h.dst.x < cur.x)         out_port = P_W;
      else if (h.dst.y > cur.y)         out_port = P_N;
      else                              out_port = P_S;
    end
    else                                out_port = P_D;
  end

endmodule
