// tb_cm_chip -- end-to-end test of the CM-1 chip, at its full size, in a
// four-chip machine. Chips 0..3 are joined along hypercube dimensions 0 and 1
// (the other ten links are left unconnected and report "not ready"), and the
// referral ring runs 0 -> 1 -> 2 -> 3. In a four-chip slice the ring cannot
// close (chip 3's successor would be chip 4), so chip 3 sees its successor as
// never ready. The testbench is the host: it broadcasts one instruction per
// clock to all chips, ORs their global pins, and loads and reads memory
// through the host ports.
//
// Programs, all written as instruction sequences in the style of the
// reference programs (request bit, 16 address bits, format bit, 32 data bits,
// parity; acknowledge check; wait on the global pin; copy 32 delivered bits):
//  1. NEWS: a random flag pattern is sent one step in each direction.
//  2. Hot spot (priority delivery): all 64 cells send a 32-bit word to cell k
//     of chip 0, retrying until acknowledged. Receivers XOR the words into an
//     inbox, so the result does not depend on arrival order.
//  2b. Transpose (priority delivery): every cell sends to the same cell of
//     the opposite chip, so messages cross each dimension both ways at once.
//  3. Pairs (OR delivery): cells 2i and 2i+1 of each chip send to cell 2i of
//     the same chip; both arrive in one delivery and are ORed.
//  4. Assertion search: the global pin says whether some cell holds a value.
// Mechanisms counted (each must occur): refused injection, cube send,
// referral, delivery deferred by a colliding message, OR-combined delivery,
// router not ready, NEWS transfer, global-pin assertion, message exchange.
module tb_cm_chip;
  import cm_pkg::*;
  localparam int NCH = 4;
  localparam int DLV0 = 51 + 12 * 51;

  logic clk = 0, rst_n = 0;
  cm_instr_t instr;
  logic mode_or = 0;
  logic [11:0] cube_out [NCH], cube_in [NCH], crdy [NCH];
  logic [NCH-1:0] rdy, rout, rin, rrdy, gout, istart, busy, hwe, hwd, hrd;
  logic [3:0] ev [NCH];
  logic [3:0] hcell [NCH];
  logic [11:0] haddr [NCH];
  logic gpin;
  int checks = 0, failures = 0;

  for (genvar h = 0; h < NCH; h++) begin : g_chip
    cm_chip u_chip (
      .clk(clk), .rst_n(rst_n), .instr(instr), .chip_id(12'(h)), .deliver_or(mode_or),
      .cube_out(cube_out[h]), .cube_in(cube_in[h]), .cube_ready_in(crdy[h]), .ready_out(rdy[h]),
      .ref_out(rout[h]), .ref_in(rin[h]), .ref_ready_in(rrdy[h]),
      .global_out(gout[h]), .inj_start(istart[h]), .rtr_busy(busy[h]), .rtr_events(ev[h]),
      .host_cell(hcell[h]), .host_addr(haddr[h]), .host_we(hwe[h]), .host_wd(hwd[h]),
      .host_rd(hrd[h]));
  end

  // hypercube wiring for dimensions 0 and 1, referral ring 0->1->2->3
  always_comb begin
    for (int h = 0; h < NCH; h++) begin
      cube_in[h] = '0;
      crdy[h]    = '0;
      for (int d = 0; d < 2; d++) begin
        cube_in[h][d] = cube_out[h ^ (1 << d)][d];
        crdy[h][d]    = rdy[h ^ (1 << d)];
      end
      rin[h]  = (h == 0) ? 1'b0 : rout[h - 1];
      rrdy[h] = (h == NCH - 1) ? 1'b0 : rdy[h + 1];
    end
    gpin = |gout;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask

  // ---------------------------------------------- mechanism counters
  int n_send, n_refer, n_refused, n_defer, n_or, n_notready, n_news, n_global, n_xchg, cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int h = 0; h < NCH; h++) begin
      if (ev[h][0]) n_send++;
      if (ev[h][1]) n_refer++;
      if (!rdy[h] && istart[h]) n_notready++;
    end
  end

  // ---------------------------------------------- host helpers
  function automatic cm_instr_t mk(int a, int b, int r, int w, int c, int s,
                                   logic [7:0] mt, logic [7:0] ft, int dir = 0);
    cm_instr_t i;
    i.addr_a = 12'(a); i.addr_b = 12'(b); i.flag_r = 4'(r); i.flag_w = 4'(w);
    i.flag_c = 4'(c); i.sense = 1'(s); i.mem_tt = mt; i.flag_tt = ft; i.news_dir = 2'(dir);
    return i;
  endfunction
  localparam logic [7:0] TT_ANDNOTF = 8'b0000_1010;   // a & !f

  cm_instr_t NOP;
  task automatic exec(input cm_instr_t i);
    instr = i; @(posedge clk); #1;
  endtask

  task automatic hwrite(input int h, input int c, input int addr, input logic v);
    hcell[h] = 4'(c); haddr[h] = 12'(addr); hwd[h] = v; hwe[h] = 1'b1;
  endtask
  task automatic hcommit();
    instr = NOP; @(posedge clk); #1; hwe = '0;
  endtask
  task automatic hread(input int h, input int c, input int addr, output logic v);
    hcell[h] = 4'(c); haddr[h] = 12'(addr); #1; v = hrd[h];
  endtask
  // load a value of n bits, first bit at `addr` = MSB, into every chip at once
  task automatic load_bits(input logic [31:0] vals [NCH], input int c, input int addr, input int n);
    for (int j = 0; j < n; j++) begin
      for (int h = 0; h < NCH; h++) hwrite(h, c, addr + j, vals[h][n - 1 - j]);
      hcommit();
    end
  endtask
  task automatic read_bits(input int h, input int c, input int addr, input int n,
                           output logic [31:0] v);
    v = '0;
    for (int j = 0; j < n; j++) begin
      logic b;
      hread(h, c, addr + j, b);
      v[n - 1 - j] = b;
    end
  endtask

  // memory map of every cell
  localparam int M_DEST = 0;     // 16 bits: relative router address, cell
  localparam int M_DATA = 16;    // 32 bits of data
  localparam int M_PEND = 100;   // 1 while the message is still unsent
  localparam int M_IN   = 200;   // 32-bit inbox (XOR of words received)
  localparam int M_PAR  = 240;   // parity scratch
  localparam int M_ZERO = 241;   // constant 0
  localparam int M_NEWS = 400;   // NEWS test value
  localparam int M_NGOT = 401;

  // wait until the current clock is the first of a petit cycle
  task automatic petit_sync();
    instr = NOP;
    #0;
    while (!istart[0]) begin @(posedge clk); #1; end
  endtask

  // One petit cycle of message passing. Starts in the injection clock and
  // returns in the first clock of the next petit cycle. pending = some cell
  // still had an unacknowledged message after this round's injection.
  task automatic round(output logic pending, output logic got_any);
    // injection: request, 16 address bits, format bit, 32 data bits, parity
    exec(mk(M_PAR, M_PEND, 0, 5, 0, 0, TT_SETZ, TT_CPM));
    for (int j = 0; j < 16; j++) exec(mk(M_DEST + j, 0, 0, 5, 0, 0, TT_IDM, TT_IDM));
    exec(mk(0, 0, 0, 5, 0, 0, TT_IDM, TT_SETO));
    for (int j = 0; j < 32; j++) exec(mk(M_PAR, M_DATA + j, 0, 5, 0, 0, TT_XOR, TT_CPM));
    exec(mk(M_PAR, 0, 0, 5, 0, 0, TT_IDM, TT_IDM));
    // acknowledge: clear the pending bit where the router took the message
    exec(mk(M_PEND, 0, 4, 0, 0, 0, TT_ANDNOTF, TT_IDF));
    // any message still pending? (global pin, seen one clock later)
    exec(mk(M_PEND, 0, 0, 1, 0, 0, TT_IDM, TT_IDM));
    pending = gpin;
    // wait for a delivery start bit, with the global pin as the signal
    got_any = 1'b0;
    for (int t = 53; t < PETIT_LEN; t++) begin
      exec(mk(0, 0, 5, 1, 0, 0, TT_IDM, TT_IDF));
      if (gpin) begin got_any = 1'b1; break; end
    end
    if (got_any) begin
      n_global++;
      // XOR the 32 delivered bits into the inbox of cells that got a start bit
      for (int j = 0; j < 32; j++)
        exec(mk(M_IN + j, M_ZERO, 5, 0, 1, 1, TT_XOR, TT_IDF));
    end
    instr = NOP;
  endtask

  // run rounds until nothing is pending and all routers are empty
  task automatic run_messages(input int max_rounds);
    logic pending, got;
    int r;
    petit_sync();
    for (r = 0; r < max_rounds; r++) begin
      round(pending, got);
      if (pending) n_refused++;
      if (!pending && busy == '0) break;
    end
    chk(r < max_rounds, 1, "message phase finished");
  endtask

  // identifier deferred a message this delivery (two for one cell), or
  // selected two messages for one cell in OR mode
  int n_defer_c [NCH], n_or_c [NCH];
  for (genvar h = 0; h < NCH; h++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      logic [6:0] cand;
      cand = g_chip[h].u_chip.u_router.valid_q & g_chip[h].u_chip.u_router.at_dest;
      if (g_chip[h].u_chip.u_router.in_dlv && g_chip[h].u_chip.u_router.ph_start) begin
        if (cand != g_chip[h].u_chip.u_router.id_sel) n_defer_c[h]++;
        if (mode_or)
          for (int i = 0; i < 7; i++) for (int j = i + 1; j < 7; j++)
            if (cand[i] && cand[j] &&
                g_chip[h].u_chip.u_router.dcell[i] == g_chip[h].u_chip.u_router.dcell[j]) n_or_c[h]++;
      end
    end
  end
  // two full or busy routers swapped messages across a dimension
  int n_xchg_c [NCH];
  for (genvar h = 0; h < NCH; h++) begin : g_xmon
    always @(posedge clk) if (rst_n)
      if (g_chip[h].u_chip.u_router.u_heart.start && g_chip[h].u_chip.u_router.u_heart.xchg)
        n_xchg_c[h]++;
  end
  always_comb begin
    n_defer = 0; n_or = 0; n_xchg = 0;
    for (int h = 0; h < NCH; h++) begin
      n_defer += n_defer_c[h]; n_or += n_or_c[h]; n_xchg += n_xchg_c[h];
    end
  end

  logic [31:0] D [NCH][16];
  logic [31:0] vals [NCH];

  initial begin
    logic [31:0] v;
    logic [15:0] fl [NCH];
    NOP = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);   // flag 0 is never 1: nothing happens
    instr = NOP; hwe = '0; hwd = '0;
    for (int h = 0; h < NCH; h++) begin hcell[h] = 0; haddr[h] = 0; end
    {n_send, n_refer, n_refused, n_notready, n_news, n_global, cyc} = '0;
    for (int h = 0; h < NCH; h++) begin n_defer_c[h] = 0; n_or_c[h] = 0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // clear the memory the programs use, with instructions
    for (int a = 0; a < 512; a++) exec(mk(a, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
    for (int f = 1; f < 16; f++) exec(mk(0, 0, 0, f, 0, 0, TT_IDM, TT_SETZ));

    // ------------------------------------------------ 1. NEWS
    for (int h = 0; h < NCH; h++) begin
      fl[h] = 16'($urandom);
      for (int c = 0; c < 16; c++) hwrite(h, c, M_NEWS, fl[h][c]);
    end
    for (int c = 0; c < 16; c++) begin
      for (int h = 0; h < NCH; h++) hwrite(h, c, M_NEWS, fl[h][c]);
      hcommit();
    end
    for (int dir = 0; dir < 4; dir++) begin
      exec(mk(M_NEWS, 0, 0, 8, 0, 0, TT_IDM, TT_IDM));              // flag 8 = value
      exec(mk(0, 0, 8, 2, 0, 0, TT_IDM, TT_IDF, dir));              // send flag 8 via NEWS
      exec(mk(M_NGOT, 0, 2, 0, 0, 0, TT_IDF, TT_IDF));              // keep what arrived
      instr = NOP;
      n_news++;
      for (int h = 0; h < NCH; h++)
        for (int c = 0; c < 16; c++) begin
          int r, col, src;
          logic b;
          r = c / 4; col = c % 4;
          case (dir)                     // the sender lies opposite the direction
            0: r = (r + 1) % 4;
            1: col = (col + 3) % 4;
            2: r = (r + 3) % 4;
            default: col = (col + 1) % 4;
          endcase
          src = r * 4 + col;
          hread(h, c, M_NGOT, b);
          chk(b, fl[h][src], "NEWS");
        end
    end

    // ------------------------------------------------ 2. hot spot, priority mode
    // cell k of chip h sends D[h][k] to cell k of chip 0: relative address = h
    for (int k = 0; k < 16; k++) begin
      for (int h = 0; h < NCH; h++) vals[h] = {16'd0, 12'(h), 4'(k)};
      load_bits(vals, k, M_DEST, 16);
      for (int h = 0; h < NCH; h++) begin D[h][k] = $urandom; vals[h] = D[h][k]; end
      load_bits(vals, k, M_DATA, 32);
      for (int h = 0; h < NCH; h++) vals[h] = 32'd1;
      load_bits(vals, k, M_PEND, 1);
    end
    run_messages(40);
    for (int k = 0; k < 16; k++) begin
      read_bits(0, k, M_IN, 32, v);
      chk(v, D[0][k] ^ D[1][k] ^ D[2][k] ^ D[3][k], "hot-spot inbox");
      for (int h = 1; h < NCH; h++) begin
        read_bits(h, k, M_IN, 32, v);
        chk(v, 32'd0, "no stray delivery");
      end
    end

    // ------------------------------------------------ 2b. transpose, priority mode
    // cell k of chip h sends to cell k of chip h ^ 3: messages cross both
    // dimensions in both directions at once, so routers exchange messages
    for (int a = M_IN; a < M_IN + 32; a++) exec(mk(a, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
    for (int k = 0; k < 16; k++) begin
      for (int h = 0; h < NCH; h++) vals[h] = {16'd0, 12'd3, 4'(k)};
      load_bits(vals, k, M_DEST, 16);
      for (int h = 0; h < NCH; h++) begin D[h][k] = $urandom; vals[h] = D[h][k]; end
      load_bits(vals, k, M_DATA, 32);
      for (int h = 0; h < NCH; h++) vals[h] = 32'd1;
      load_bits(vals, k, M_PEND, 1);
    end
    run_messages(40);
    for (int h = 0; h < NCH; h++)
      for (int k = 0; k < 16; k++) begin
        read_bits(h, k, M_IN, 32, v);
        chk(v, D[h ^ 3][k], "transposed word");
      end

    // ------------------------------------------------ 3. pairs, OR mode
    mode_or = 1;
    for (int a = M_IN; a < M_IN + 32; a++) exec(mk(a, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
    for (int k = 0; k < 16; k++) begin
      for (int h = 0; h < NCH; h++) vals[h] = {16'd0, 12'd0, 4'(k & ~1)};
      load_bits(vals, k, M_DEST, 16);
      for (int h = 0; h < NCH; h++) begin D[h][k] = $urandom; vals[h] = D[h][k]; end
      load_bits(vals, k, M_DATA, 32);
      for (int h = 0; h < NCH; h++) vals[h] = 32'd1;
      load_bits(vals, k, M_PEND, 1);
    end
    run_messages(10);
    for (int h = 0; h < NCH; h++)
      for (int k = 0; k < 16; k += 2) begin
        read_bits(h, k, M_IN, 32, v);
        chk(v, D[h][k] | D[h][k + 1], "OR-combined pair");
      end
    mode_or = 0;

    // ------------------------------------------------ 4. assertion search
    for (int q = 0; q < 2; q++) begin
      logic [31:0] key;
      key = (q == 0) ? D[2][7] : ~D[2][7];
      exec(mk(0, 0, 0, 9, 0, 0, TT_IDM, TT_SETO));
      for (int j = 0; j < 32; j++)
        exec(mk(M_DATA + j, 0, 9, 9, 0, 0, TT_IDM,
                key[31 - j] ? 8'b0000_0101 : 8'b0101_0000));   // f & a  /  f & !a
      exec(mk(0, 0, 9, 1, 0, 0, TT_IDM, TT_IDF));
      begin
        logic expect_hit;
        expect_hit = 0;
        for (int h = 0; h < NCH; h++) for (int k = 0; k < 16; k++) if (D[h][k] == key) expect_hit = 1;
        chk(gpin, expect_hit, "assertion search");
        if (gpin) n_global++;
      end
    end
    exec(mk(0, 0, 0, 1, 0, 0, TT_IDM, TT_SETZ));

    // ------------------------------------------------ mechanism coverage
    $display("events: send=%0d refer=%0d refused_rounds=%0d deferred=%0d or_pairs=%0d notready=%0d news=%0d global=%0d exchange=%0d cycles=%0d",
             n_send, n_refer, n_refused, n_defer, n_or, n_notready, n_news, n_global, n_xchg, cyc);
    chk(n_send   > 0, 1, "cube sends happened");
    chk(n_refer  > 0, 1, "referrals happened");
    chk(n_refused > 0, 1, "refused injections happened");
    chk(n_defer  > 0, 1, "deferred deliveries happened");
    chk(n_or     > 0, 1, "OR-combined deliveries happened");
    chk(n_notready > 0, 1, "router not-ready happened");
    chk(n_news   > 0, 1, "NEWS transfers happened");
    chk(n_global > 0, 1, "global pin assertions happened");
    chk(n_xchg   > 0, 1, "message exchanges happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
