// tb_cm_log -- Feynman's logarithm algorithm on one full-size CM-1 chip.
//
// Every cell computes log2 of its own 32-bit fixed-point number s in
// [1.0, 2.0) (bit 31 has weight 1.0) at the same time, with nothing but
// broadcast instructions. The method writes s as a product of factors
// (1 + 2^-k): starting from r = 1.0, for k = 1..31 it forms
// t = r + (r >> k), and where t <= s it sets r = t and adds log2(1 + 2^-k)
// to the running sum. The 32-entry table of log2(1 + 2^-k) * 2^31 is
// computed here with $ln and written into every cell's memory by
// instructions, one bit per clock, exactly as a host would broadcast it.
//
// Cell memory map (every number stored most significant bit first):
//   0..1023     table, entry k at 32k
//   1024..1055  r        1056..1087  t        1088..1119  log sum
//   4064..4095  s (loaded through the host port)
// Flags 8 and 9 hold the carry and the two compare flags.
//
// Checks: every cell's result equals a bit-exact model of the same integer
// algorithm (32-bit wrap-around included); for inputs below 1.5 it is also
// within 256 units (about 1.2e-7) of the true log2(s); and the program
// takes exactly 7196 instructions, one per clock: 1024 to load the table,
// 96 to clear the work area and 31 x 196 for the main loop. That is the
// instruction count the reference program for this machine is quoted at.
// The router is idle: the links are tied off.
module tb_cm_log;
  import cm_pkg::*;

  localparam int M_R = 1024, M_T = 1056, M_L = 1088, M_S = 4064;
  localparam int PROG_LEN = 7196;

  logic clk = 0, rst_n = 0;
  cm_instr_t instr;
  logic [11:0] cube_out;
  logic ready, rout, gout, istart, busy, hwe = 0, hwd = 0, hrd;
  logic [3:0] ev, hcell = '0;
  logic [11:0] haddr = '0;
  int checks = 0, failures = 0;

  cm_chip u_chip (
    .clk(clk), .rst_n(rst_n), .instr(instr), .chip_id(12'd0), .deliver_or(1'b0),
    .cube_out(cube_out), .cube_in(12'd0), .cube_ready_in(12'd0), .ready_out(ready),
    .ref_out(rout), .ref_in(1'b0), .ref_ready_in(1'b0),
    .global_out(gout), .inj_start(istart), .rtr_busy(busy), .rtr_events(ev),
    .host_cell(hcell), .host_addr(haddr), .host_we(hwe), .host_wd(hwd), .host_rd(hrd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask

  function automatic cm_instr_t mk(int a, int b, int r, int w, int c, int s,
                                   logic [7:0] mt, logic [7:0] ft);
    cm_instr_t i;
    i.addr_a = 12'(a); i.addr_b = 12'(b); i.flag_r = 4'(r); i.flag_w = 4'(w);
    i.flag_c = 4'(c); i.sense = 1'(s); i.mem_tt = mt; i.flag_tt = ft; i.news_dir = 2'd0;
    return i;
  endfunction

  // flag tables for the compare (flag result, index {a, b, f})
  localparam logic [7:0] TT_DOWN_IF_B_GT = 8'b0100_0101;  // f & !(!a & b)
  localparam logic [7:0] TT_DOWN_IF_A_GT = 8'b0101_0001;  // f & !(a & !b)

  cm_instr_t NOP;
  int n_instr;
  task automatic exec(input cm_instr_t i);
    instr = i; n_instr++; @(posedge clk); #1;
  endtask

  logic [31:0] table_k [32];
  logic [31:0] s_val [16];

  // the same integer algorithm, written directly
  function automatic logic [31:0] model_log(logic [31:0] s);
    logic [31:0] r, t, l;
    r = 32'h8000_0000; l = '0;
    for (int k = 1; k < 32; k++) begin
      t = r + (r >> k);
      if (t <= s) begin l = l + table_k[k]; r = t; end
    end
    return l;
  endfunction

  initial begin
    int t0;
    NOP = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);
    instr = NOP;
    for (int k = 0; k < 32; k++)
      table_k[k] = 32'($rtoi($ln(1.0 + 2.0 ** (-k)) / $ln(2.0) * 2147483648.0 + 0.5));
    chk(table_k[1], 32'd1256197405, "table entry 1");
    chk(table_k[31], 32'd1, "table entry 31");

    s_val[0] = 32'h8000_0000;       // 1.0: log 0
    s_val[1] = 32'hC000_0000;       // 1.5
    s_val[2] = 32'hB504_F334;       // sqrt(2): log 0.5
    s_val[3] = 32'hFFFF_FFFF;       // largest input
    for (int c = 4; c < 16; c++) s_val[c] = {1'b1, 31'($urandom)};

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // host loads s into every cell
    for (int c = 0; c < 16; c++)
      for (int j = 0; j < 32; j++) begin
        hcell = 4'(c); haddr = 12'(M_S + j); hwd = s_val[c][31 - j]; hwe = 1'b1;
        @(posedge clk); #1;
      end
    hwe = 1'b0;

    // ---------------------------------------------- the program
    n_instr = 0;
    t0 = $time;
    // table, one broadcast bit per clock
    for (int i = 0; i < 1024; i++)
      exec(mk(i, 0, 0, 0, 0, 0, table_k[i >> 5][31 - (i & 31)] ? TT_SETO : TT_SETZ, TT_IDF));
    // r = 1.0, t = 0, log sum = 0
    exec(mk(M_R, 0, 0, 0, 0, 0, TT_SETO, TT_IDF));
    for (int i = M_R + 1; i < M_L + 32; i++) exec(mk(i, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
    for (int k = 1; k < 32; k++) begin
      // t = r >> k
      for (int i = 0; i < 32; i++)
        if (i < k) exec(mk(M_T + i, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
        else       exec(mk(M_T + i, M_R + i - k, 0, 0, 0, 0, TT_CPM, TT_IDF));
      // t = t + r, carry in flag 8, least significant bit first
      exec(mk(0, 0, 0, 8, 0, 0, TT_IDM, TT_SETZ));
      for (int i = 0; i < 32; i++) exec(mk(M_T + 31 - i, M_R + 31 - i, 8, 8, 0, 0, TT_XOR, TT_MAJ));
      // compare, most significant bit first: flag 9 stays 1 iff t <= s
      exec(mk(0, 0, 0, 8, 0, 0, TT_IDM, TT_SETO));
      exec(mk(0, 0, 0, 9, 0, 0, TT_IDM, TT_SETO));
      for (int i = 0; i < 32; i++) begin
        exec(mk(M_T + i, M_S + i, 8, 8, 8, 1, TT_IDM, TT_DOWN_IF_B_GT));
        exec(mk(M_T + i, M_S + i, 9, 9, 8, 1, TT_IDM, TT_DOWN_IF_A_GT));
      end
      // where t <= s: log sum += table[k]; r = t
      exec(mk(0, 0, 0, 8, 0, 0, TT_IDM, TT_SETZ));
      for (int i = 0; i < 32; i++) exec(mk(M_L + 31 - i, 32 * k + 31 - i, 8, 8, 9, 1, TT_XOR, TT_MAJ));
      for (int i = 0; i < 32; i++) exec(mk(M_R + i, M_T + i, 0, 0, 9, 1, TT_CPM, TT_IDF));
    end
    instr = NOP;
    chk(n_instr, PROG_LEN, "instructions in the program");
    chk(($time - t0) / 10, PROG_LEN, "clocks taken by the program");

    // ---------------------------------------------- results
    for (int c = 0; c < 16; c++) begin
      logic [31:0] got;
      real exact;
      got = '0;
      for (int j = 0; j < 32; j++) begin
        hcell = 4'(c); haddr = 12'(M_L + j); #1;
        got[31 - j] = hrd;
      end
      chk(got, model_log(s_val[c]), $sformatf("cell %0d log of %h", c, s_val[c]));
      if (s_val[c] < 32'hC000_0000) begin
        exact = $ln(real'(s_val[c]) / 2147483648.0) / $ln(2.0) * 2147483648.0;
        checks++;
        if (real'(got) - exact > 256.0 || exact - real'(got) > 256.0) begin
          failures++;
          $display("FAIL cell %0d: log2 %h = %0d, exact %f", c, s_val[c], got, exact);
        end
      end
    end
    $display("log2(1.5) = %0d / 2^31, log2(sqrt 2) = %0d / 2^31",
             model_log(s_val[1]), model_log(s_val[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
