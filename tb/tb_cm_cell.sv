// tb_cm_cell -- one processing cell driven by instructions.
// Part 1: a bit-serial 16-bit addition with the carry kept in flag 8, the
//   way the published programs add (memory table XOR, flag table majority),
//   checked against integer addition through the host port.
// Part 2: a conditional compare (tempr <= s) with flags 8 and 9, as in the
//   logarithm program.
// Part 3: random instructions against a behavioural model of the cell,
//   including the zero, ack, router-data, global and NEWS flags.
module tb_cm_cell;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0;
  cm_instr_t instr;
  logic nsv, nsb, nrv, nrb, rdi, rai, rdo, gf;
  logic [11:0] ha; logic hwe, hwd, hrd;
  int checks = 0, failures = 0;

  cm_cell dut (.clk(clk), .rst_n(rst_n), .instr(instr),
    .news_send_val(nsv), .news_send_bit(nsb), .news_recv_val(nrv), .news_recv_bit(nrb),
    .rtr_data_in(rdi), .rtr_ack_in(rai), .rtr_data_out(rdo), .global_flag(gf),
    .host_addr(ha), .host_we(hwe), .host_wd(hwd), .host_rd(hrd));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
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

  task automatic exec(input cm_instr_t i);
    instr = i; @(posedge clk); #1;
  endtask

  task automatic host_write(input int addr, input logic v);
    ha = 12'(addr); hwd = v; hwe = 1; @(posedge clk); #1; hwe = 0;
  endtask

  task automatic host_read16(input int base, output logic [15:0] v);
    instr = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);   // no-op: flag 0 is never 1
    for (int k = 0; k < 16; k++) begin ha = 12'(base + k); #1; v[k] = hrd; end
  endtask

  // model for part 3
  logic        mm [4096];
  logic [15:0] mf;

  function automatic logic tt_look(logic [7:0] t, logic a, logic b, logic f);
    // rows written a,b,f = 000 first, as the leftmost table bit
    int row;
    row = a * 4 + b * 2 + f;
    return t[7 - row];
  endfunction

  function automatic logic rdflag(int n);
    if (n == 0) return 1'b0;
    if (n == 4) return rai;
    if (n == 5) return rdi;
    return mf[n];
  endfunction

  initial begin
    logic [15:0] x, y, s;
    instr = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);   // never executes (flag 0 == 1 false)
    nrv = 0; nrb = 0; rdi = 0; rai = 0; ha = 0; hwe = 0; hwd = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // ---- part 1: addition
    for (int t = 0; t < 20; t++) begin
      x = 16'($urandom); y = 16'($urandom);
      for (int k = 0; k < 16; k++) begin host_write(100 + k, x[k]); host_write(200 + k, y[k]); end
      exec(mk(0, 0, 0, 8, 0, 0, TT_IDM, TT_SETZ));           // carry = 0
      for (int k = 0; k < 16; k++)                           // x += y, LSB first
        exec(mk(100 + k, 200 + k, 8, 8, 0, 0, TT_XOR, TT_MAJ));
      host_read16(100, s);
      chk(s, 16'(x + y), "add");
    end

    // ---- part 2: compare, conditioned on flag 8 (as in the logarithm program)
    for (int t = 0; t < 20; t++) begin
      x = 16'($urandom); y = (t % 3 == 0) ? x : 16'($urandom);
      for (int k = 0; k < 16; k++) begin host_write(300 + k, x[k]); host_write(400 + k, y[k]); end
      exec(mk(0, 0, 0, 8, 0, 0, TT_IDM, TT_SETO));
      exec(mk(0, 0, 0, 9, 0, 0, TT_IDM, TT_SETO));
      for (int k = 15; k >= 0; k--) begin
        exec(mk(300 + k, 400 + k, 8, 8, 8, 1, TT_IDM, 8'b0100_0101));
        exec(mk(300 + k, 400 + k, 9, 9, 8, 1, TT_IDM, 8'b0101_0001));
      end
      // flag 9 high <=> x <= y ; copy flag 9 into the global flag
      exec(mk(0, 0, 9, 1, 0, 0, TT_IDM, TT_IDF));
      chk(gf, x <= y, "compare");
    end

    // ---- part 3: random instructions against the model
    for (int k = 0; k < 4096; k++) exec(mk(k, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
    for (int k = 0; k < 4096; k++) mm[k] = 1'b0;
    for (int fl = 1; fl < 16; fl++) exec(mk(0, 0, 0, fl, 0, 0, TT_IDM, TT_SETZ));
    mf = '0;
    for (int n = 0; n < 20000; n++) begin
      cm_instr_t i;
      logic a, b, f, c, mr, fr;
      i.addr_a = 12'($urandom % 64); i.addr_b = 12'($urandom % 64);
      i.flag_r = 4'($urandom); i.flag_w = 4'($urandom); i.flag_c = 4'($urandom);
      i.sense = 1'($urandom); i.mem_tt = 8'($urandom); i.flag_tt = 8'($urandom);
      i.news_dir = 2'($urandom);
      rdi = 1'($urandom); rai = 1'($urandom); nrv = ($urandom % 4) == 0; nrb = 1'($urandom);
      instr = i;
      #1;
      a = mm[i.addr_a]; b = mm[i.addr_b]; f = rdflag(i.flag_r);
      c = (rdflag(i.flag_c) == i.sense);
      mr = tt_look(i.mem_tt, a, b, f);
      fr = tt_look(i.flag_tt, a, b, f);
      chk(rdo, c && i.flag_w == 5 && fr, "rdata_out");
      chk(nsv, c && i.flag_w == 2, "news_val");
      if (c && i.flag_w == 2) chk(nsb, fr, "news_bit");
      chk(gf, mf[1], "global");
      @(posedge clk); #1;
      if (c) begin
        mm[i.addr_a] = mr;
        if (!(i.flag_w inside {0, 2, 4, 5})) mf[i.flag_w] = fr;
      end
      if (nrv) mf[2] = nrb;
      chk(dut.flags_q & ~16'h0031, mf & ~16'h0031, "flags");
    end
    instr = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);
    for (int k = 0; k < 64; k++) begin ha = 12'(k); #1; chk(hrd, mm[k], "memory"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
