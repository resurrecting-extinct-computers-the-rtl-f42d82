// cm_router -- the CM-1 chip's message router.
//
// The router moves bit-serial messages between the cells of its chip and the
// routers of the other chips, which are joined as a 12-dimensional hypercube.
// It holds BUFSIZE (7) message buffers, each MSG_W (50) bits with a valid bit
// and a 3-bit priority, and works in fixed petit cycles of PETIT_LEN (696)
// clocks that all chips run in lockstep from reset:
//   injection   51 clocks   cm_injector: up to 4 cells hand over a message
//   dimension d 12 x 51     cm_heart: one message each way on cube link d,
//                           plus referral to the next router of the ring
//   delivery    33 clocks   cm_identifier picks the messages that reached this
//                           chip, cm_distributor puts a start bit and their
//                           32 data bits on the cells' delivery lines
// At the first clock of each phase the active unit decides which buffers it
// frees and fills, and starts cm_prio_calc; at the phase's last clock the
// valid bits and the recomputed priorities are written back together.
//
// Relative addressing: a message carries the XOR of its destination chip
// number and the chip number it is currently at. Sending along dimension d
// clears bit d; a message whose router address is zero is delivered.
//
// Interface timing: all link outputs are combinational from this router's
// registers and the neighbours' ready inputs; every input is sampled at the
// clock edge. `ready_out` (at least two free buffers) is combinational from
// registers only. `inj_start` is high in the first clock of every petit cycle.
// `busy` is high while any buffer holds a message.
// The phase lengths, message layout and ready handshake are this design's
// choices; the unit structure (injector, heart, priority calculator, ejector
// = identifier + distributor), 7 buffers, 4 injections per petit cycle and
// ring referral follow the router description.
// The concurrent assertions are disabled during the asynchronous reset; the
// lint reports that use of rst_n as a mixed synchronous/asynchronous net.
module cm_router
  import cm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DIMS-1:0]    chip_id,
  input  logic               deliver_or,    // delivery mode, see cm_identifier
  // cells
  input  logic [NCELLS-1:0]  inj_lines,     // injection lines (flag 5 writes)
  output logic [NCELLS-1:0]  dlv_lines,     // delivery lines (flag 5 reads)
  output logic [NCELLS-1:0]  ack,           // acknowledge flags (flag 4)
  // hypercube links, one per dimension
  output logic [DIMS-1:0]    cube_out,
  input  logic [DIMS-1:0]    cube_in,
  input  logic [DIMS-1:0]    cube_ready_in,
  output logic               ready_out,
  // referral ring
  output logic               ref_out,
  input  logic               ref_in,
  input  logic               ref_ready_in,
  // status
  output logic               inj_start,
  output logic               busy,
  output logic [3:0]         events         // {recv_ref, recv_cube, refer, send} pulses
);
  localparam int unsigned SW = SLOT_W;
  localparam int unsigned DW = $clog2(DIMS);

  // ---------------------------------------------------------- sequencer
  phase_e            phase_q;
  logic [DW-1:0]     dim_q;
  logic [CNT_W-1:0]  cnt_q;
  logic              ph_start, ph_bits, ph_last;
  logic [CNT_W-1:0]  pos;

  always_comb begin
    ph_start = (cnt_q == '0);
    ph_bits  = (cnt_q != '0);
    ph_last  = (phase_q == PH_DELIVER) ? (cnt_q == CNT_W'(DATA_W)) : (cnt_q == CNT_W'(MSG_W));
    pos      = cnt_q - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_INJECT;
      dim_q   <= '0;
      cnt_q   <= '0;
    end else if (!ph_last) begin
      cnt_q <= cnt_q + 1'b1;
    end else begin
      cnt_q <= '0;
      unique case (phase_q)
        PH_INJECT:  begin phase_q <= PH_DIM; dim_q <= '0; end
        PH_DIM:     if (dim_q == DW'(DIMS-1)) phase_q <= PH_DELIVER;
                    else dim_q <= dim_q + 1'b1;
        default:    phase_q <= PH_INJECT;
      endcase
    end
  end

  // ---------------------------------------------------------- buffers
  logic [BUFSIZE-1:0][MSG_W-1:0]  msg_q;
  logic [BUFSIZE-1:0]             valid_q;
  logic [BUFSIZE-1:0][PRIO_W-1:0] prio_q;

  logic [BUFSIZE-1:0] col, dbit, at_dest;
  logic [BUFSIZE-1:0][CELL_W-1:0] dcell;
  logic [BUFSIZE-1:0] dcol;
  logic [$clog2(BUFSIZE+1)-1:0] occ;

  always_comb begin
    occ = '0;
    for (int s = 0; s < BUFSIZE; s++) begin
      col[s]     = (pos < CNT_W'(MSG_W)) ? msg_q[s][pos] : 1'b0;
      dbit[s]    = msg_q[s][rtr_bit_pos(32'(dim_q))];
      at_dest[s] = (msg_q[s][DIMS-1:0] == '0);
      for (int b = 0; b < CELL_W; b++) dcell[s][CELL_W-1-b] = msg_q[s][DIMS+b];
      dcol[s]    = (pos < CNT_W'(DATA_W)) ? msg_q[s][DATA_POS + 32'(pos)] : 1'b0;
      occ       += valid_q[s];
    end
    ready_out = (occ <= ($bits(occ))'(BUFSIZE - 2));
    busy      = |valid_q;
    inj_start = (phase_q == PH_INJECT) && ph_start;
  end

  // ---------------------------------------------------------- injector
  logic in_inj, in_dim, in_dlv;
  assign in_inj = (phase_q == PH_INJECT);
  assign in_dim = (phase_q == PH_DIM);
  assign in_dlv = (phase_q == PH_DELIVER);

  logic [BUFSIZE-1:0]              inj_wr_en, inj_wr_bit, inj_commit;
  logic [MAX_INJ-1:0]              inj_nv;
  logic [MAX_INJ-1:0][SW-1:0]      inj_ns;

  cm_injector u_injector (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_cycle  (in_inj && ph_start),
    .bit_cycle  (in_inj && ph_bits),
    .last_cycle (in_inj && ph_last),
    .lines      (inj_lines),
    .slot_valid (valid_q),
    .wr_en      (inj_wr_en),
    .wr_bit     (inj_wr_bit),
    .new_valid  (inj_nv),
    .new_slot   (inj_ns),
    .commit_mask(inj_commit),
    .ack        (ack)
  );

  // ---------------------------------------------------------- heart
  logic [BUFSIZE-1:0]  hrt_wr_en, hrt_wr_bit, hrt_keep, hrt_gone, hrt_arrive;
  logic [1:0]          hrt_nv;
  logic [1:0][SW-1:0]  hrt_ns;
  logic                hrt_cube_out, hrt_ref_out;
  logic                ev_send, ev_refer, ev_rc, ev_rr;

  cm_heart u_heart (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (in_dim && ph_start),
    .bit_cycle    (in_dim && ph_bits),
    .last_cycle   (in_dim && ph_last),
    .pos          (pos),
    .dim          (dim_q),
    .valid        (valid_q),
    .prio         (prio_q),
    .dbit         (dbit),
    .col          (col),
    .my_ready     (ready_out),
    .cube_ready_in(cube_ready_in[dim_q]),
    .ref_ready_in (ref_ready_in),
    .cube_in      (in_dim && cube_in[dim_q]),
    .ref_in       (in_dim && ref_in),
    .ref_mask     (chip_id ^ (chip_id + 1'b1)),
    .cube_out     (hrt_cube_out),
    .ref_out      (hrt_ref_out),
    .wr_en        (hrt_wr_en),
    .wr_bit       (hrt_wr_bit),
    .keep         (hrt_keep),
    .new_valid    (hrt_nv),
    .new_slot     (hrt_ns),
    .gone_mask    (hrt_gone),
    .arrive_mask  (hrt_arrive),
    .ev_send      (ev_send),
    .ev_refer     (ev_refer),
    .ev_recv_cube (ev_rc),
    .ev_recv_ref  (ev_rr)
  );

  always_comb begin
    cube_out = '0;
    if (in_dim) cube_out[dim_q] = hrt_cube_out;
    ref_out  = in_dim && hrt_ref_out;
    events   = {ev_rr, ev_rc, ev_refer, ev_send};
  end

  // ---------------------------------------------------------- ejector
  logic [BUFSIZE-1:0] id_sel, dlv_sel_q, dist_sel, dist_bits;

  cm_identifier u_identifier (
    .mode_or (deliver_or),
    .valid   (valid_q),
    .at_dest (at_dest),
    .dst_cell(dcell),
    .prio    (prio_q),
    .sel     (id_sel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  dlv_sel_q <= '0;
    else if (in_dlv && ph_start) dlv_sel_q <= id_sel;
  end

  always_comb begin
    dist_sel  = '0;
    dist_bits = '0;
    if (in_dlv) begin
      dist_sel  = ph_start ? id_sel : dlv_sel_q;
      dist_bits = ph_start ? '1 : dcol;
    end
  end

  cm_distributor u_distributor (
    .sel     (dist_sel),
    .bits    (dist_bits),
    .dst_cell(dcell),
    .lines   (dlv_lines)
  );

  // ---------------------------------------------------------- priorities
  logic [BUFSIZE-1:0]              pc_keep;
  logic [MAX_INJ-1:0]              pc_nv;
  logic [MAX_INJ-1:0][SW-1:0]      pc_ns;
  logic [BUFSIZE-1:0][PRIO_W-1:0]  pc_prio;
  logic                            pc_done;

  always_comb begin
    pc_keep = valid_q;
    pc_nv   = '0;
    pc_ns   = '0;
    unique case (phase_q)
      PH_INJECT: begin pc_nv = inj_nv; pc_ns = inj_ns; end
      PH_DIM:    begin
        pc_keep = hrt_keep;
        pc_nv[1:0] = hrt_nv;
        pc_ns[1:0] = hrt_ns;
      end
      default:   pc_keep = valid_q & ~id_sel;
    endcase
  end

  cm_prio_calc u_prio_calc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ph_start),
    .keep     (pc_keep),
    .prio_in  (prio_q),
    .new_valid(pc_nv),
    .new_slot (pc_ns),
    .prio_out (pc_prio),
    .done     (pc_done)
  );

  // ---------------------------------------------------------- buffer update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      prio_q  <= '0;
    end else if (ph_last) begin
      prio_q <= pc_prio;
      unique case (phase_q)
        PH_INJECT: valid_q <= valid_q | inj_commit;
        PH_DIM:    valid_q <= (valid_q & ~hrt_gone) | hrt_arrive;
        default:   valid_q <= valid_q & ~dlv_sel_q;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < BUFSIZE; s++)
      if (inj_wr_en[s] || hrt_wr_en[s])
        msg_q[s][pos] <= inj_wr_en[s] ? inj_wr_bit[s] : hrt_wr_bit[s];
  end

  a_prio_ready: assert property (@(posedge clk) disable iff (!rst_n) ph_last |-> pc_done);
endmodule
