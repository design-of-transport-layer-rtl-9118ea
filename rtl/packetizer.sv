// packetizer: turns an accepted message into a wormhole packet.
//
// For each command (destination, source, routing mode, payload length) it
// sends one head flit carrying those fields, then 'len' payload flits taken
// one by one from the Tx payload queue; the last one is marked as the tail.
// Packets are therefore len+1 flits long (the evaluated traffic uses 2 to 10).
// The flit currently offered to the router's local input sits in an output
// register and is held until the router acknowledges it.
//
// Interface: cmd_valid/cmd_ready handshake; payload queue read side
// (pl_empty, pl_data, pl_pop, first-word fall-through); request/acknowledge
// channel to the router. A new command is accepted in the cycle its
// predecessor's tail flit is acknowledged, so packets can follow back to back.
// Timing: the head flit is offered the cycle after cmd acceptance; a payload
// flit follows every cycle in which the previous flit is acknowledged and the
// payload queue is not empty. The head-then-payload format follows the design;
// the length field and the register structure are this design's own.
module packetizer
  import tlar_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  coord_t                 cmd_dst,
  input  coord_t                 cmd_src,
  input  route_mode_e            cmd_mode,
  input  logic [LEN_W-1:0]       cmd_len,
  input  logic                   pl_empty,
  input  logic [FLIT_DATA_W-1:0] pl_data,
  output logic                   pl_pop,
  output flit_t                  out_flit,
  output logic                   out_req,
  input  logic                   out_ack
);

  flit_t            oreg;
  logic             oreg_v;
  logic [LEN_W-1:0] rem;      // payload words still to be sent
  logic             free;     // output register free in the next cycle

  assign free      = !oreg_v || out_ack;
  assign cmd_ready = (rem == '0) && free;
  assign pl_pop    = (rem != '0) && free && !pl_empty;
  assign out_req   = oreg_v;
  assign out_flit  = oreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oreg   <= '0;
      oreg_v <= 1'b0;
      rem    <= '0;
    end else if (cmd_valid && cmd_ready) begin
      oreg   <= make_head(cmd_dst, cmd_src, cmd_mode, cmd_len);
      oreg_v <= 1'b1;
      rem    <= cmd_len;
    end else if (pl_pop) begin
      oreg   <= '{ftype: (rem == LEN_W'(1)) ? FT_TAIL : FT_BODY, data: pl_data};
      oreg_v <= 1'b1;
      rem    <= rem - 1'b1;
    end else if (out_ack) begin
      oreg_v <= 1'b0;
    end
  end

  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                  (cmd_valid && cmd_ready) |-> (cmd_len != '0));
  a_req_hold:    assert property (@(posedge clk) disable iff (!rst_n)
                                  (out_req && !out_ack) |=> (out_req && $stable(out_flit)));

endmodule
