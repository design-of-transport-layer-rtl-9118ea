// ni_control: control logic (CL) of the TLAR network interface.
//
// Admission: a message from the application (destination, payload length) is
// handed to the packetizer only when neither this NI's own router nor the
// destination router is throttled, according to the topology table, and no
// routability check is running. Until then it waits (msg_blocked is high), so
// no packet is ever injected towards a router that cannot take it. When it is
// admitted, the routing mode for the destination is read from the routing
// mode memory at the destination's (x,y) and put into the packet's head.
// Reconfiguration: every topology-table write, and the release of reset,
// starts a new routability check of all destinations, one cycle later (when
// the table holds the new value). The check itself is the route_mode_checker
// inside this block; it reads the topology table and rewrites the RMM.
// What the control logic decides follows the design; holding a blocked
// message at the head of the queue (later messages wait behind it) is this
// design's own choice.
//
// Interface: msg_valid/msg_ready handshake with the application; combinational
// query results from the topology table (self_thr, dst_thr) and the RMM
// (rmm_mode, addressed by rmm_x/rmm_y); cmd_valid/cmd_ready to the packetizer;
// the checker's topology-table read port (chk_tt_*) and RMM write port
// (chk_rmm_*); check_busy is high while the routing modes are being rebuilt.
module ni_control
  import tlar_pkg::*;
#(
  parameter int unsigned X = 8,
  parameter int unsigned Y = 8,
  parameter int unsigned Z = 4,
  localparam int unsigned LW = (Z > 2) ? $clog2(Z) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           my_addr,
  input  logic             msg_valid,
  output logic             msg_ready,
  input  coord_t           msg_dst,
  input  logic [LEN_W-1:0] msg_len,
  output logic             msg_blocked,
  input  logic             self_thr,
  input  logic             dst_thr,
  output logic [COORD_W-1:0] rmm_x,
  output logic [COORD_W-1:0] rmm_y,
  input  route_mode_e      rmm_mode,
  input  logic             topo_wr_en,
  output logic [COORD_W-1:0] chk_tt_x,
  output logic [COORD_W-1:0] chk_tt_y,
  input  logic [LW-1:0]    chk_tt_level,
  output logic             chk_rmm_we,
  output logic [COORD_W-1:0] chk_rmm_x,
  output logic [COORD_W-1:0] chk_rmm_y,
  output route_mode_e      chk_rmm_mode,
  output logic             check_busy,
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output coord_t           cmd_dst,
  output coord_t           cmd_src,
  output route_mode_e      cmd_mode,
  output logic [LEN_W-1:0] cmd_len
);

  logic boot;        // high during the first cycle after reset
  logic start_q;     // a check must start (topology changed last cycle)
  logic modes_valid; // RMM is up to date with the topology table
  logic deliverable;
  logic check_start;
  logic check_done;

  route_mode_checker #(.X(X), .Y(Y), .Z(Z)) u_checker (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (check_start),
    .src      (my_addr),
    .tt_x     (chk_tt_x),
    .tt_y     (chk_tt_y),
    .tt_level (chk_tt_level),
    .rmm_we   (chk_rmm_we),
    .rmm_x    (chk_rmm_x),
    .rmm_y    (chk_rmm_y),
    .rmm_mode (chk_rmm_mode),
    .busy     (check_busy),
    .done     (check_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      boot    <= 1'b1;
      start_q <= 1'b0;
    end else begin
      boot    <= 1'b0;
      start_q <= topo_wr_en;
    end
  end

  assign check_start = boot || start_q;
  assign modes_valid = !check_start && !check_busy && !topo_wr_en;
  assign deliverable = !self_thr && !dst_thr;

  assign rmm_x       = msg_dst.x;
  assign rmm_y       = msg_dst.y;
  assign cmd_valid   = msg_valid && deliverable && modes_valid;
  assign msg_ready   = cmd_valid && cmd_ready;
  assign msg_blocked = msg_valid && !deliverable;
  assign cmd_dst     = msg_dst;
  assign cmd_src     = my_addr;
  assign cmd_mode    = rmm_mode;
  assign cmd_len     = msg_len;

endmodule
