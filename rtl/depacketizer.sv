// depacketizer: turns packets from the Rx packet queue back into messages.
//
// A head flit at the front of the queue is consumed at once and its source
// address kept; the payload flits that follow are handed to the application
// one word per rx_valid/rx_ready handshake, each with the source address, and
// the tail flit's word is flagged rx_last. Head flits carry no payload, so a
// message of n words arrives as n transfers.
//
// Interface: read side of the Rx queue (q_empty, q_flit, q_pop, first-word
// fall-through) and a valid/ready stream to the application.
// Timing: a head flit costs one cycle; after that one word per cycle as long
// as the application is ready. What the de-packetizer does follows the design;
// the stream interface is this design's own.
module depacketizer
  import tlar_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   q_empty,
  input  flit_t                  q_flit,
  output logic                   q_pop,
  output logic                   rx_valid,
  input  logic                   rx_ready,
  output logic [FLIT_DATA_W-1:0] rx_data,
  output logic                   rx_last,
  output coord_t                 rx_src
);

  logic  is_head;
  head_t h;

  assign h        = head_t'(q_flit.data);
  assign is_head  = (q_flit.ftype == FT_HEAD);
  assign rx_valid = !q_empty && !is_head;
  assign rx_data  = q_flit.data;
  assign rx_last  = (q_flit.ftype == FT_TAIL);
  assign q_pop    = (!q_empty && is_head) || (rx_valid && rx_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  rx_src <= '0;
    else if (!q_empty && is_head) rx_src <= h.src;
  end

endmodule
