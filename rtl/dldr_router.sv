// dldr_router: 7-port dual-mode wormhole router for the thermal-aware 3D mesh.
//
// Ports L (local NI), N, E, S, W, U and D, each with a 16-flit input queue
// (IQ) of 34-bit flits. The head flit at the front of a queue goes through the
// address decoder and the dual-mode routing computation (RC, lateral-first XY
// or downward-first routing, chosen by the mode bit in the head flit) and asks
// the switch allocator (SA) for that output. Once granted, the output stays
// with the input until the tail flit has passed (wormhole flow control), and
// the packet's flits cross the crossbar (CS, seven 6:1 multiplexers) one per
// cycle into the output channel register. The router has two pipeline stages:
// RC+SA on the head flit, then switch traversal into the output register.
// The structure (7 queues, dual-mode RC, SA, 7x7 crossbar of 6:1 multiplexers,
// two stages, wormhole, 16-flit queues) follows the design; the register
// placement inside the stages is this design's own.
//
// Channels use a request/acknowledge handshake: the sender holds req and the
// flit stable until it sees ack; a flit moves in every cycle in which both are
// high. A router's ack is "input queue not full", so it never depends on req
// in the same cycle. Timing: a head flit written into an empty queue in cycle
// t is allocated in t+1, crosses in t+2 and is offered to the next router from
// t+3; body flits then follow one per cycle.
//
// throttle: when high the router is fully throttled by the thermal manager:
// it acknowledges nothing and offers nothing, and its state is frozen.
module dldr_router
  import tlar_pkg::*;
#(
  parameter int unsigned Z     = 4,
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  coord_t my_addr,
  input  logic   throttle,
  input  flit_t  in_flit  [NPORTS],
  input  logic   in_req   [NPORTS],
  output logic   in_ack   [NPORTS],
  output flit_t  out_flit [NPORTS],
  output logic   out_req  [NPORTS],
  input  logic   out_ack  [NPORTS]
);

  flit_t head      [NPORTS];
  logic  q_empty   [NPORTS];
  logic  q_full    [NPORTS];
  logic  q_pop     [NPORTS];
  port_e rc_port   [NPORTS];
  logic  sa_req    [NPORTS];
  logic  out_busy  [NPORTS];
  port_e out_owner [NPORTS];
  logic  in_active [NPORTS];
  logic  release_o [NPORTS];
  logic  move      [NPORTS];
  flit_t xb_out    [NPORTS];
  logic  oreg_v    [NPORTS];
  flit_t oreg      [NPORTS];

  // ---- input queues and routing computation (stage 1) ----
  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [$clog2(DEPTH+1)-1:0] q_count;

    assign in_ack[i] = !q_full[i] && !throttle;

    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_iq (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (in_req[i] && in_ack[i]),
      .wr_data (in_flit[i]),
      .rd_en   (q_pop[i]),
      .rd_data (head[i]),
      .full    (q_full[i]),
      .empty   (q_empty[i]),
      .count   (q_count)
    );

    dldr_rc #(.Z(Z)) u_rc (
      .cur       (my_addr),
      .head_data (head[i].data),
      .out_port  (rc_port[i])
    );

    assign sa_req[i] = !q_empty[i] && (head[i].ftype == FT_HEAD) && !in_active[i] && !throttle;
  end

  switch_allocator u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (sa_req),
    .req_port  (rc_port),
    .release_o (release_o),
    .out_busy  (out_busy),
    .out_owner (out_owner),
    .in_active (in_active)
  );

  // ---- switch traversal (stage 2) ----
  crossbar u_cs (
    .in_flit  (head),
    .sel      (out_owner),
    .out_flit (xb_out)
  );

  always_comb begin
    for (int i = 0; i < NPORTS; i++) q_pop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      move[o]      = out_busy[o] && !throttle && !q_empty[int'(out_owner[o])] &&
                     (!oreg_v[o] || out_ack[o]);
      release_o[o] = move[o] && (xb_out[o].ftype == FT_TAIL);
      if (move[o]) q_pop[int'(out_owner[o])] = 1'b1;
    end
  end

  // ---- output channel registers ----
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    assign out_req[o]  = oreg_v[o] && !throttle;
    assign out_flit[o] = oreg[o];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        oreg_v[o] <= 1'b0;
        oreg[o]   <= '0;
      end else if (move[o]) begin
        oreg_v[o] <= 1'b1;
        oreg[o]   <= xb_out[o];
      end else if (out_req[o] && out_ack[o]) begin
        oreg_v[o] <= 1'b0;
      end
    end

    // Request/acknowledge rule: an offered flit stays until it is taken.
    a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                 (out_req[o] && !out_ack[o] && !throttle) |=>
                                 (oreg_v[o] && $stable(oreg[o])));
  end

endmodule
