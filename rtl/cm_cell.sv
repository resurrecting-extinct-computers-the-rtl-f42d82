// cm_cell -- one CM-1 processing cell.
//
// A cell is 4096 bits of memory, 16 one-bit flags and two truth-table ALUs.
// Each clock it executes the broadcast instruction:
//   a = mem[A], b = mem[B], f = flag[R]
//   if (flag[C] == sense) { mem[A] = mem_tt(a,b,f); flag[W] = flag_tt(a,b,f); }
// Eight flags (8..15) are general purpose. The special flags, numbered as the
// published programs use them, are:
//   0 zero       reads 0, writes ignored (so C = 0, sense = 0 means "always")
//   1 global     a register; the chip ORs all of them onto the global pin
//   2 NEWS       written by the grid neighbour (see cm_news_grid); a cell that
//                writes W = 2 sends its flag result to that neighbour instead
//   4 ack        read-only copy of the router's acknowledge for this cell
//   5 data       reads the router's delivery line; a write drives the
//                router's injection line for this cell for that cycle
//   3, 6, 7      kept as plain registers; their special functions are not
//                described, so they behave like general-purpose flags
// The flag numbering for 0, 1, 4 and 5 follows the reference programs; the
// NEWS flag number and the behaviour of 3, 6 and 7 are this design's choice.
// Timing: operands are read combinationally, results are written at the clock
// edge; the injection line and NEWS send are combinational outputs of the
// same cycle. Flags reset to 0; memory is not reset.
module cm_cell
  import cm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  cm_instr_t       instr,
  // NEWS grid
  output logic            news_send_val,
  output logic            news_send_bit,
  input  logic            news_recv_val,
  input  logic            news_recv_bit,
  // router
  input  logic            rtr_data_in,   // delivery line (flag 5 read)
  input  logic            rtr_ack_in,    // acknowledge (flag 4 read)
  output logic            rtr_data_out,  // injection line (flag 5 write)
  // global pin contribution
  output logic            global_flag,
  // host access to memory
  input  logic [MEM_AW-1:0] host_addr,
  input  logic            host_we,
  input  logic            host_wd,
  output logic            host_rd
);
  logic [NFLAGS-1:0] flags_q;
  logic a, b, f, cond_flag, cond, mem_res, flag_res;

  cm_bitmem #(.WORDS(MEM_BITS)) u_mem (
    .clk      (clk),
    .addr_a   (instr.addr_a),
    .addr_b   (instr.addr_b),
    .rd_a     (a),
    .rd_b     (b),
    .we_a     (cond),
    .wd_a     (mem_res),
    .host_addr(host_addr),
    .host_we  (host_we),
    .host_wd  (host_wd),
    .host_rd  (host_rd)
  );

  // Flag read, with the special flags substituted.
  function automatic logic read_flag(logic [3:0] n, logic [NFLAGS-1:0] fl,
                                     logic data_in, logic ack_in);
    unique case (n)
      F_ZERO:  return 1'b0;
      F_ACK:   return ack_in;
      F_RDATA: return data_in;
      default: return fl[n];
    endcase
  endfunction

  always_comb begin
    f         = read_flag(instr.flag_r, flags_q, rtr_data_in, rtr_ack_in);
    cond_flag = read_flag(instr.flag_c, flags_q, rtr_data_in, rtr_ack_in);
    cond      = (cond_flag == instr.sense);
  end

  cm_alu u_mem_alu  (.tt(instr.mem_tt),  .a(a), .b(b), .f(f), .y(mem_res));
  cm_alu u_flag_alu (.tt(instr.flag_tt), .a(a), .b(b), .f(f), .y(flag_res));

  always_comb begin
    rtr_data_out  = cond && (instr.flag_w == F_RDATA) && flag_res;
    news_send_val = cond && (instr.flag_w == F_NEWS);
    news_send_bit = flag_res;
    global_flag   = flags_q[F_GLOBAL];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags_q <= '0;
    end else begin
      if (cond) begin
        unique case (instr.flag_w)
          F_ZERO, F_ACK, F_RDATA, F_NEWS: ;   // not stored locally
          default: flags_q[instr.flag_w] <= flag_res;
        endcase
      end
      if (news_recv_val) flags_q[F_NEWS] <= news_recv_bit;
    end
  end
endmodule
