// tb_dldr_rc: self-checking test of the dual-mode routing computation for a
// 4-layer stack. Directed cases from each rule plus random addresses and
// modes are compared with an independent reference of the two DLDR paths
// (lateral-first: XY in the source layer, then vertical; downward-first:
// down to the bottom layer, XY there, then up). It also walks complete
// routes hop by hop through the block and checks that every route ends at
// its destination within the Manhattan distance plus 2*Z hops and that a
// lateral-first route never leaves the source layer before the destination
// column.
module tb_dldr_rc;
  import tlar_pkg::*;
  localparam int Z = 4;
  coord_t cur, src, dst;
  route_mode_e mode;
  logic [FLIT_DATA_W-1:0] head_data;
  port_e out_port;
  int checks = 0, failures = 0;
  int n_lat_xy = 0, n_down = 0, n_vert = 0, n_local = 0;

  dldr_rc #(.Z(Z)) dut (.cur(cur), .head_data(head_data), .out_port(out_port));

  assign head_data = make_head(dst, src, mode, 4'd3).data;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic port_e ref_port(coord_t c, coord_t s, coord_t d, route_mode_e m);
    bit in_xy_layer;
    if (c == d) return P_L;
    if (c.x == d.x && c.y == d.y) return (d.z < c.z) ? P_U : P_D;
    // Lateral moves happen in the source layer (lateral-first) or in the
    // bottom layer, below which there is nothing to go down to.
    in_xy_layer = (c.z == Z - 1) || ((m == MODE_LATERAL) && (c.z == s.z));
    if (!in_xy_layer) return P_D;
    if (d.x != c.x) return (d.x > c.x) ? P_E : P_W;
    return (d.y > c.y) ? P_N : P_S;
  endfunction

  function automatic coord_t step(coord_t c, port_e p);
    coord_t n = c;
    case (p)
      P_N: n.y++;
      P_S: n.y--;
      P_E: n.x++;
      P_W: n.x--;
      P_U: n.z--;
      P_D: n.z++;
      default: ;
    endcase
    return n;
  endfunction

  initial begin
    // directed: lateral-first from source layer 1 to (3,0,2)
    src = '{x: 1, y: 2, z: 1}; dst = '{x: 3, y: 0, z: 2}; mode = MODE_LATERAL;
    cur = src;                    #1 check(out_port == P_E, "lateral starts east");
    cur = '{x: 3, y: 2, z: 1};    #1 check(out_port == P_S, "then south");
    cur = '{x: 3, y: 0, z: 1};    #1 check(out_port == P_D, "then down to dst layer");
    cur = dst;                    #1 check(out_port == P_L, "eject");
    mode = MODE_DOWNWARD;
    cur = src;                    #1 check(out_port == P_D, "downward starts down");
    cur = '{x: 1, y: 2, z: 3};    #1 check(out_port == P_E, "XY in bottom layer");
    cur = '{x: 3, y: 0, z: 3};    #1 check(out_port == P_U, "then up");
    for (int n = 0; n < 20000; n++) begin
      cur  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, Z-1)};
      src  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, Z-1)};
      dst  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, Z-1)};
      mode = route_mode_e'($urandom_range(0, 1));
      #1 check(out_port == ref_port(cur, src, dst, mode), "random decision");
    end
    // whole routes
    for (int n = 0; n < 3000; n++) begin
      int hops, lim;
      bit left_early;
      src  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, Z-1)};
      dst  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, Z-1)};
      mode = route_mode_e'($urandom_range(0, 1));
      cur = src; hops = 0; left_early = 0;
      lim = 2 * Z + ((src.x > dst.x) ? src.x - dst.x : dst.x - src.x) +
                    ((src.y > dst.y) ? src.y - dst.y : dst.y - src.y);
      #1;
      while (out_port != P_L && hops <= lim) begin
        case (out_port)
          P_E, P_W, P_N, P_S: n_lat_xy++;
          P_D: n_down++;
          default: n_vert++;
        endcase
        if (mode == MODE_LATERAL && cur.z != src.z && !(cur.x == dst.x && cur.y == dst.y))
          left_early = 1;
        cur = step(cur, out_port);
        hops++;
        #1;
      end
      n_local++;
      check(cur == dst && hops <= lim, "route reaches destination");
      check(!left_early, "lateral route stays in source layer");
    end
    check(n_lat_xy > 0 && n_down > 0 && n_vert > 0, "all directions used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
