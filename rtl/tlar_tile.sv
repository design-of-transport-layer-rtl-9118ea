// tlar_tile: one tile of the thermal-aware 3D mesh, a TLAR network interface
// connected to the local port of a 7-port dual-mode router.
//
// The NI's own topology table tells whether this tile's router is throttled;
// that flag throttles the router, so the NI and the router always agree on
// the topology. The six mesh channels are brought out as arrays indexed
// 0..5 = N, E, S, W, U, D (router ports 1..6). All application-layer and
// topology ports are those of tlar_ni. Connecting the NI to port L follows the
// design's architecture drawing; deriving the router's throttle input from the
// NI's table is this design's own choice.
module tlar_tile
  import tlar_pkg::*;
#(
  parameter int unsigned X = 8,
  parameter int unsigned Y = 8,
  parameter int unsigned Z = 4,
  localparam int unsigned LW = (Z > 2) ? $clog2(Z) : 1,
  localparam int unsigned NL = NPORTS - 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  coord_t                 my_addr,
  input  logic                   msg_valid,
  output logic                   msg_ready,
  input  coord_t                 msg_dst,
  input  logic [LEN_W-1:0]       msg_len,
  output logic                   msg_blocked,
  input  logic                   pl_valid,
  output logic                   pl_ready,
  input  logic [FLIT_DATA_W-1:0] pl_data,
  output logic                   rx_valid,
  input  logic                   rx_ready,
  output logic [FLIT_DATA_W-1:0] rx_data,
  output logic                   rx_last,
  output coord_t                 rx_src,
  input  logic                   topo_wr_en,
  input  logic [COORD_W-1:0]     topo_wr_x,
  input  logic [COORD_W-1:0]     topo_wr_y,
  input  logic [LW-1:0]          topo_wr_level,
  input  coord_t                 app_q_addr,
  output logic                   app_q_throttled,
  output logic                   throttled,
  output logic                   mode_check_busy,
  input  flit_t                  in_flit  [NL],
  input  logic                   in_req   [NL],
  output logic                   in_ack   [NL],
  output flit_t                  out_flit [NL],
  output logic                   out_req  [NL],
  input  logic                   out_ack  [NL]
);

  flit_t r_in_flit  [NPORTS];
  logic  r_in_req   [NPORTS];
  logic  r_in_ack   [NPORTS];
  flit_t r_out_flit [NPORTS];
  logic  r_out_req  [NPORTS];
  logic  r_out_ack  [NPORTS];

  for (genvar k = 0; k < NL; k++) begin : g_lnk
    assign r_in_flit[k+1] = in_flit[k];
    assign r_in_req[k+1]  = in_req[k];
    assign in_ack[k]      = r_in_ack[k+1];
    assign out_flit[k]    = r_out_flit[k+1];
    assign out_req[k]     = r_out_req[k+1];
    assign r_out_ack[k+1] = out_ack[k];
  end

  tlar_ni #(.X(X), .Y(Y), .Z(Z)) u_ni (
    .clk             (clk),
    .rst_n           (rst_n),
    .my_addr         (my_addr),
    .msg_valid       (msg_valid),
    .msg_ready       (msg_ready),
    .msg_dst         (msg_dst),
    .msg_len         (msg_len),
    .msg_blocked     (msg_blocked),
    .pl_valid        (pl_valid),
    .pl_ready        (pl_ready),
    .pl_data         (pl_data),
    .rx_valid        (rx_valid),
    .rx_ready        (rx_ready),
    .rx_data         (rx_data),
    .rx_last         (rx_last),
    .rx_src          (rx_src),
    .topo_wr_en      (topo_wr_en),
    .topo_wr_x       (topo_wr_x),
    .topo_wr_y       (topo_wr_y),
    .topo_wr_level   (topo_wr_level),
    .app_q_addr      (app_q_addr),
    .app_q_throttled (app_q_throttled),
    .self_throttled  (throttled),
    .mode_check_busy (mode_check_busy),
    .net_tx_flit     (r_in_flit[P_L]),
    .net_tx_req      (r_in_req[P_L]),
    .net_tx_ack      (r_in_ack[P_L]),
    .net_rx_flit     (r_out_flit[P_L]),
    .net_rx_req      (r_out_req[P_L]),
    .net_rx_ack      (r_out_ack[P_L])
  );

  dldr_router #(.Z(Z)) u_router (
    .clk      (clk),
    .rst_n    (rst_n),
    .my_addr  (my_addr),
    .throttle (throttled),
    .in_flit  (r_in_flit),
    .in_req   (r_in_req),
    .in_ack   (r_in_ack),
    .out_flit (r_out_flit),
    .out_req  (r_out_req),
    .out_ack  (r_out_ack)
  );

endmodule
