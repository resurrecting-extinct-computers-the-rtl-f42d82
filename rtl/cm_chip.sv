// cm_chip -- one chip of the Connection Machine CM-1: 16 one-bit cells and a
// router. 4096 of these, joined as a 12-dimensional hypercube, form the
// 65,536-cell machine.
//
// All 16 cells execute the same 55-bit instruction (`instr`) every clock (see
// cm_cell). The cells talk to their grid neighbours on the chip through
// cm_news_grid and to any cell of the machine through cm_router, using flag 5
// to send and receive message bits and flag 4 to see whether the router took
// their message. Each cell's flag 1 is ORed onto `global_out`; the host ORs
// the pins of all chips into the machine's global pin.
//
// Ports beyond the instruction: the chip's number in the hypercube
// (`chip_id`), the router delivery mode, one outgoing and one incoming link
// per dimension with a ready line, the referral-ring link to the chip numbered
// chip_id + 1 (and from chip_id - 1), router status, and a host port that
// reads and writes one memory bit of one cell per clock (the host loads
// inputs and reads results through it).
// Timing: an instruction presented in one clock takes effect at the next
// rising edge; `global_out` and `host_rd` show register state of the same
// clock. The router's petit cycle starts at reset and repeats every 696
// clocks; `inj_start` marks its first clock, when cells make their send
// requests.
// The lint notes rst_n as both synchronous and asynchronous: the routers'
// assertions are disabled with it during the asynchronous reset.
module cm_chip
  import cm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cm_instr_t          instr,
  input  logic [DIMS-1:0]    chip_id,
  input  logic               deliver_or,
  // hypercube
  output logic [DIMS-1:0]    cube_out,
  input  logic [DIMS-1:0]    cube_in,
  input  logic [DIMS-1:0]    cube_ready_in,
  output logic               ready_out,
  // referral ring
  output logic               ref_out,
  input  logic               ref_in,
  input  logic               ref_ready_in,
  // host
  output logic               global_out,
  output logic               inj_start,
  output logic               rtr_busy,
  output logic [3:0]         rtr_events,
  input  logic [CELL_W-1:0]  host_cell,
  input  logic [MEM_AW-1:0]  host_addr,
  input  logic               host_we,
  input  logic               host_wd,
  output logic               host_rd
);
  logic [NCELLS-1:0] news_sv, news_sb, news_rv, news_rb;
  logic [NCELLS-1:0] inj_lines, dlv_lines, ack, gflag, hrd;

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    cm_cell u_cell (
      .clk          (clk),
      .rst_n        (rst_n),
      .instr        (instr),
      .news_send_val(news_sv[c]),
      .news_send_bit(news_sb[c]),
      .news_recv_val(news_rv[c]),
      .news_recv_bit(news_rb[c]),
      .rtr_data_in  (dlv_lines[c]),
      .rtr_ack_in   (ack[c]),
      .rtr_data_out (inj_lines[c]),
      .global_flag  (gflag[c]),
      .host_addr    (host_addr),
      .host_we      (host_we && host_cell == CELL_W'(c)),
      .host_wd      (host_wd),
      .host_rd      (hrd[c])
    );
  end

  cm_news_grid u_news (
    .dir     (instr.news_dir),
    .send_val(news_sv),
    .send_bit(news_sb),
    .recv_val(news_rv),
    .recv_bit(news_rb)
  );

  cm_router u_router (
    .clk          (clk),
    .rst_n        (rst_n),
    .chip_id      (chip_id),
    .deliver_or   (deliver_or),
    .inj_lines    (inj_lines),
    .dlv_lines    (dlv_lines),
    .ack          (ack),
    .cube_out     (cube_out),
    .cube_in      (cube_in),
    .cube_ready_in(cube_ready_in),
    .ready_out    (ready_out),
    .ref_out      (ref_out),
    .ref_in       (ref_in),
    .ref_ready_in (ref_ready_in),
    .inj_start    (inj_start),
    .busy         (rtr_busy),
    .events       (rtr_events)
  );

  assign global_out = |gflag;
  assign host_rd    = hrd[host_cell];
endmodule
