// cm_heart -- the router's inter-router communication unit.
//
// The chips' routers form a 12-dimensional hypercube. After the injection
// phase the petit cycle runs 12 dimension cycles, d = 0..11, each MSG_W + 1
// clocks long. In dimension cycle d the heart may send one message to, and
// receive one message from, the neighbour whose chip number differs in bit d.
// On the cube link the first clock (start) carries a 1 if this router has a
// message for the neighbour ("want"); the MSG_W message bits follow if the
// transfer goes ahead. Both ends evaluate the same rule, so they agree:
//   a message moves if its sender wants and the receiver is ready or also
//   wants (then the two routers exchange messages).
//
// Decisions, all in the start clock:
//   send     the highest-priority buffered message whose relative address has
//            bit d set, under the rule above. Bit d is cleared on the way out,
//            since the message has now crossed dimension d.
//   refer    when this router is not ready itself (fewer than two free
//            buffers), it offloads its lowest-priority message that is not
//            being sent to the next router of the referral ring (chip number
//            + 1), if that router is ready. The relative address is rewritten
//            on the way out (XOR with ref_mask = own number ^ next number) so
//            that it still names the same destination. On the referral link
//            the start clock carries a 1 only if the message follows.
//   receive  in an exchange the incoming message is written into the buffer
//            of the outgoing one, bit k in after bit k has gone out, so a full
//            router can exchange. Otherwise an arrival on the cube link or the
//            referral link claims a free buffer (lowest number first, cube
//            before referral).
// "Ready" means at least two free buffers, so a ready router can always take
// one message from each link, and no message is ever dropped. The exchange
// keeps full routers moving: without it, routers that are all full of
// messages for each other would wait for ever.
// Through the following MSG_W clocks (bit_cycle) one bit per clock moves on
// each active link. In the last clock the router frees the sent and referred
// buffers (gone_mask) and validates the received ones (arrive_mask); the
// priority calculator, started with keep/new_*, supplies the new priorities.
//
// The one-message-per-dimension cube transfer, bit-serial links with a leading
// 1, the highest-priority-first choice and referral around a ring of routers
// in chip-number order follow the router description. The ready handshake,
// the exchange, referral of the lowest-priority message and buffer order are
// this design's choices (the description does not say how a full router
// avoids losing a message). The assertion's disable iff uses the asynchronous
// reset, which the lint reports as a mixed synchronous/asynchronous net.
module cm_heart
  import cm_pkg::*;
#(
  parameter int unsigned NBUF = BUFSIZE,
  parameter int unsigned SW   = $clog2(NBUF)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,        // first clock of a dimension cycle
  input  logic                        bit_cycle,    // message bit clocks
  input  logic                        last_cycle,   // final message bit clock
  input  logic [CNT_W-1:0]            pos,          // message bit index in bit_cycle
  input  logic [$clog2(DIMS)-1:0]     dim,
  input  logic [NBUF-1:0]             valid,
  input  logic [NBUF-1:0][PRIO_W-1:0] prio,
  input  logic [NBUF-1:0]             dbit,         // router-address bit `dim` of each buffer
  input  logic [NBUF-1:0]             col,          // bit `pos` of each buffer
  input  logic                        my_ready,
  input  logic                        cube_ready_in,// neighbour across `dim` is ready
  input  logic                        ref_ready_in, // next router of the ring is ready
  input  logic                        cube_in,
  input  logic                        ref_in,
  input  logic [DIMS-1:0]             ref_mask,
  output logic                        cube_out,
  output logic                        ref_out,
  output logic [NBUF-1:0]             wr_en,
  output logic [NBUF-1:0]             wr_bit,
  output logic [NBUF-1:0]             keep,         // survivors (valid in start)
  output logic [1:0]                  new_valid,    // arrivals: [0] cube, [1] referral
  output logic [1:0][SW-1:0]          new_slot,
  output logic [NBUF-1:0]             gone_mask,    // held through the transfer
  output logic [NBUF-1:0]             arrive_mask,
  output logic                        ev_send,      // one-clock event pulses, in start
  output logic                        ev_refer,
  output logic                        ev_recv_cube,
  output logic                        ev_recv_ref
);
  // ---- start-cycle decisions
  logic          want, snd_c, ref_c, xchg, rcv_c;
  logic [SW-1:0] snd_s, ref_s;
  logic [1:0]    nv_c;
  logic [1:0][SW-1:0] ns_c;

  always_comb begin
    automatic logic [PRIO_W-1:0] best = '0;
    automatic logic [PRIO_W-1:0] worst = '1;
    automatic logic [NBUF-1:0] free = ~valid;
    automatic logic have = 1'b0;
    snd_c = 1'b0; snd_s = '0;
    for (int i = 0; i < NBUF; i++)
      if (valid[i] && dbit[i] && (!have || prio[i] > best)) begin
        have = 1'b1; best = prio[i]; snd_s = SW'(i);
      end
    // cube_in in the start clock: the neighbour has a message for us
    want  = have;
    snd_c = have && (cube_ready_in || cube_in);
    xchg  = snd_c && cube_in;
    rcv_c = cube_in && (my_ready || have);

    have = 1'b0; ref_s = '0;
    for (int i = 0; i < NBUF; i++)
      if (valid[i] && !(snd_c && snd_s == SW'(i)) && (!have || prio[i] < worst)) begin
        have = 1'b1; worst = prio[i]; ref_s = SW'(i);
      end
    ref_c = have && !my_ready && ref_ready_in;

    nv_c = '0; ns_c = '0;
    if (xchg) begin
      // exchange: the incoming message replaces the outgoing one bit by bit
      nv_c[0] = 1'b1; ns_c[0] = snd_s;
    end
    for (int k = 0; k < 2; k++) begin
      automatic logic arr = (k == 0) ? (rcv_c && !xchg) : ref_in;
      automatic logic fr = 1'b0;
      automatic logic [SW-1:0] s = '0;
      for (int i = NBUF-1; i >= 0; i--) if (free[i]) begin fr = 1'b1; s = SW'(i); end
      if (arr && fr) begin
        nv_c[k] = 1'b1; ns_c[k] = s; free[s] = 1'b0;
      end
    end
  end

  // ---- held state for the transfer
  logic          snd_q, ref_q;
  logic [SW-1:0] snd_sq, ref_sq;
  logic [1:0]    nv_q;
  logic [1:0][SW-1:0] ns_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snd_q <= 1'b0; ref_q <= 1'b0; snd_sq <= '0; ref_sq <= '0;
      nv_q <= '0; ns_q <= '0;
    end else if (start) begin
      snd_q <= snd_c; ref_q <= ref_c; snd_sq <= snd_s; ref_sq <= ref_s;
      nv_q <= nv_c; ns_q <= ns_c;
    end else if (last_cycle) begin
      snd_q <= 1'b0; ref_q <= 1'b0; nv_q <= '0;
    end
  end

  // ---- bit-serial data movement
  always_comb begin
    automatic logic flip_cube = (pos == CNT_W'(rtr_bit_pos(32'(dim))));
    automatic logic flip_ref  = 1'b0;
    for (int p = 0; p < DIMS; p++)
      if (pos == CNT_W'(p)) flip_ref = ref_mask[DIMS-1-p];
    cube_out = start ? want  : (bit_cycle && snd_q && (col[snd_sq] ^ flip_cube));
    ref_out  = start ? ref_c : (bit_cycle && ref_q && (col[ref_sq] ^ flip_ref));

    wr_en  = '0;
    wr_bit = '0;
    if (bit_cycle && nv_q[0]) begin wr_en[ns_q[0]] = 1'b1; wr_bit[ns_q[0]] = cube_in; end
    if (bit_cycle && nv_q[1]) begin wr_en[ns_q[1]] = 1'b1; wr_bit[ns_q[1]] = ref_in;  end

    keep = valid;
    if (snd_c) keep[snd_s] = 1'b0;
    if (ref_c) keep[ref_s] = 1'b0;
    new_valid = start ? nv_c : nv_q;
    new_slot  = start ? ns_c : ns_q;

    gone_mask   = '0;
    arrive_mask = '0;
    if (snd_q) gone_mask[snd_sq] = 1'b1;
    if (ref_q) gone_mask[ref_sq] = 1'b1;
    if (nv_q[0]) arrive_mask[ns_q[0]] = 1'b1;
    if (nv_q[1]) arrive_mask[ns_q[1]] = 1'b1;

    ev_send      = start && snd_c;
    ev_refer     = start && ref_c;
    ev_recv_cube = start && nv_c[0];
    ev_recv_ref  = start && nv_c[1];
  end

  // Every message the neighbours send must find a buffer.
  a_no_loss: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ((rcv_c == nv_c[0]) && (ref_in == nv_c[1])));
endmodule
