// tlar_ni: network interface (NI) for Transport Layer Assisted Routing.
//
// The NI sits between a tile's processor (application layer) and its router
// (network layer). On the transmit side the application writes a message's
// payload words into the 16-word Tx payload queue and presents a message
// request (destination, word count). The control logic admits the request
// only if neither this tile's router nor the destination router is throttled,
// looks up the destination column's routing mode (lateral-first or
// downward-first) in the routing mode memory, and the packetizer sends a head
// flit with mode, source and destination, followed by the payload flits. On
// the receive side flits from the router fill the 16-flit Rx packet queue and
// the de-packetizer delivers the payload words with their source address.
//
// The topology table holds, per XY column, how many top layers are throttled;
// it is written through the topo_wr_* port whenever the thermal manager
// changes the throttling. Each write makes the control logic recompute the
// routing modes of all X*Y columns (X*Y cycles), during which no message is
// admitted. The application can also query the table (app_q_addr ->
// app_q_throttled). self_throttled tells the router of this tile that it is
// fully throttled.
//
// Sizes follow the design: 32-bit x 16 Tx payload queue, 34-bit x 16 Rx
// packet queue, X*Y*log2(Z)-bit topology table, X*Y-bit routing mode memory.
// Router channels use the request/acknowledge handshake of dldr_router.
module tlar_ni
  import tlar_pkg::*;
#(
  parameter int unsigned X        = 8,
  parameter int unsigned Y        = 8,
  parameter int unsigned Z        = 4,
  parameter int unsigned TX_DEPTH = 16,
  parameter int unsigned RX_DEPTH = 16,
  localparam int unsigned LW = (Z > 2) ? $clog2(Z) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  coord_t                 my_addr,
  // application layer, transmit
  input  logic                   msg_valid,
  output logic                   msg_ready,
  input  coord_t                 msg_dst,
  input  logic [LEN_W-1:0]       msg_len,
  output logic                   msg_blocked,
  input  logic                   pl_valid,
  output logic                   pl_ready,
  input  logic [FLIT_DATA_W-1:0] pl_data,
  // application layer, receive
  output logic                   rx_valid,
  input  logic                   rx_ready,
  output logic [FLIT_DATA_W-1:0] rx_data,
  output logic                   rx_last,
  output coord_t                 rx_src,
  // topology updates and queries
  input  logic                   topo_wr_en,
  input  logic [COORD_W-1:0]     topo_wr_x,
  input  logic [COORD_W-1:0]     topo_wr_y,
  input  logic [LW-1:0]          topo_wr_level,
  input  coord_t                 app_q_addr,
  output logic                   app_q_throttled,
  output logic                   self_throttled,
  output logic                   mode_check_busy,
  // network layer (router local port)
  output flit_t                  net_tx_flit,
  output logic                   net_tx_req,
  input  logic                   net_tx_ack,
  input  flit_t                  net_rx_flit,
  input  logic                   net_rx_req,
  output logic                   net_rx_ack
);

  // Topology-table read ports.
  localparam int unsigned RD_CHK = 0, RD_SELF = 1, RD_DST = 2, RD_APP = 3;

  logic [COORD_W-1:0] tt_rx [4];
  logic [COORD_W-1:0] tt_ry [4];
  logic [COORD_W-1:0] tt_rz [4];
  logic [LW-1:0]      tt_lvl [4];
  logic               tt_thr [4];

  logic [COORD_W-1:0] chk_rmm_x, chk_rmm_y, rmm_rx, rmm_ry;
  logic               chk_rmm_we;
  route_mode_e        chk_rmm_mode, rmm_mode;

  logic               cmd_valid, cmd_ready;
  coord_t             cmd_dst, cmd_src;
  route_mode_e        cmd_mode;
  logic [LEN_W-1:0]   cmd_len;

  logic               txq_full, txq_empty, txq_pop;
  logic [FLIT_DATA_W-1:0] txq_data;
  logic [$clog2(TX_DEPTH+1)-1:0] txq_count;

  logic               rxq_full, rxq_empty, rxq_pop;
  flit_t              rxq_flit;
  logic [$clog2(RX_DEPTH+1)-1:0] rxq_count;

  // ---- topology table ----
  assign tt_rz[RD_CHK]  = my_addr.z;
  assign tt_rx[RD_SELF] = my_addr.x;
  assign tt_ry[RD_SELF] = my_addr.y;
  assign tt_rz[RD_SELF] = my_addr.z;
  assign tt_rx[RD_DST]  = msg_dst.x;
  assign tt_ry[RD_DST]  = msg_dst.y;
  assign tt_rz[RD_DST]  = msg_dst.z;
  assign tt_rx[RD_APP]  = app_q_addr.x;
  assign tt_ry[RD_APP]  = app_q_addr.y;
  assign tt_rz[RD_APP]  = app_q_addr.z;

  topology_table #(.X(X), .Y(Y), .Z(Z), .NRD(4)) u_tt (
    .clk          (clk),
    .rst_n        (rst_n),
    .wr_en        (topo_wr_en),
    .wr_x         (topo_wr_x),
    .wr_y         (topo_wr_y),
    .wr_level     (topo_wr_level),
    .rd_x         (tt_rx),
    .rd_y         (tt_ry),
    .rd_z         (tt_rz),
    .rd_level     (tt_lvl),
    .rd_throttled (tt_thr)
  );

  assign self_throttled  = tt_thr[RD_SELF];
  assign app_q_throttled = tt_thr[RD_APP];

  // ---- routing mode memory ----
  routing_mode_memory #(.X(X), .Y(Y)) u_rmm (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (chk_rmm_we),
    .wr_x    (chk_rmm_x),
    .wr_y    (chk_rmm_y),
    .wr_mode (chk_rmm_mode),
    .rd_x    (rmm_rx),
    .rd_y    (rmm_ry),
    .rd_mode (rmm_mode)
  );

  // ---- control logic ----
  ni_control #(.X(X), .Y(Y), .Z(Z)) u_cl (
    .clk          (clk),
    .rst_n        (rst_n),
    .my_addr      (my_addr),
    .msg_valid    (msg_valid),
    .msg_ready    (msg_ready),
    .msg_dst      (msg_dst),
    .msg_len      (msg_len),
    .msg_blocked  (msg_blocked),
    .self_thr     (tt_thr[RD_SELF]),
    .dst_thr      (tt_thr[RD_DST]),
    .rmm_x        (rmm_rx),
    .rmm_y        (rmm_ry),
    .rmm_mode     (rmm_mode),
    .topo_wr_en   (topo_wr_en),
    .chk_tt_x     (tt_rx[RD_CHK]),
    .chk_tt_y     (tt_ry[RD_CHK]),
    .chk_tt_level (tt_lvl[RD_CHK]),
    .chk_rmm_we   (chk_rmm_we),
    .chk_rmm_x    (chk_rmm_x),
    .chk_rmm_y    (chk_rmm_y),
    .chk_rmm_mode (chk_rmm_mode),
    .check_busy   (mode_check_busy),
    .cmd_valid    (cmd_valid),
    .cmd_ready    (cmd_ready),
    .cmd_dst      (cmd_dst),
    .cmd_src      (cmd_src),
    .cmd_mode     (cmd_mode),
    .cmd_len      (cmd_len)
  );

  // ---- transmit path ----
  assign pl_ready = !txq_full;

  sync_fifo #(.WIDTH(FLIT_DATA_W), .DEPTH(TX_DEPTH)) u_txq (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (pl_valid && pl_ready),
    .wr_data (pl_data),
    .rd_en   (txq_pop),
    .rd_data (txq_data),
    .full    (txq_full),
    .empty   (txq_empty),
    .count   (txq_count)
  );

  packetizer u_pkt (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_ready (cmd_ready),
    .cmd_dst   (cmd_dst),
    .cmd_src   (cmd_src),
    .cmd_mode  (cmd_mode),
    .cmd_len   (cmd_len),
    .pl_empty  (txq_empty),
    .pl_data   (txq_data),
    .pl_pop    (txq_pop),
    .out_flit  (net_tx_flit),
    .out_req   (net_tx_req),
    .out_ack   (net_tx_ack)
  );

  // ---- receive path ----
  assign net_rx_ack = !rxq_full;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH)) u_rxq (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (net_rx_req && net_rx_ack),
    .wr_data (net_rx_flit),
    .rd_en   (rxq_pop),
    .rd_data (rxq_flit),
    .full    (rxq_full),
    .empty   (rxq_empty),
    .count   (rxq_count)
  );

  depacketizer u_depkt (
    .clk      (clk),
    .rst_n    (rst_n),
    .q_empty  (rxq_empty),
    .q_flit   (rxq_flit),
    .q_pop    (rxq_pop),
    .rx_valid (rx_valid),
    .rx_ready (rx_ready),
    .rx_data  (rx_data),
    .rx_last  (rx_last),
    .rx_src   (rx_src)
  );

endmodule
