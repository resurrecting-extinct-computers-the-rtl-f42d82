// tb_cm_bfs -- breadth-first search on a four-chip slice of the machine.
//
// Each of the 64 cells (4 full-size chips x 16 cells, joined along hypercube
// dimensions 0 and 1, referral ring 0 -> 1 -> 2 -> 3) is a vertex of a random
// directed graph of out-degree DEG = 8. A vertex stores its out-edges as
// 16-bit relative addresses (12-bit router address, 4-bit cell). The search
// runs level by level from vertex 0, as on the full machine:
//   - flag 8 marks the active frontier A, flag 9 the undiscovered set N;
//   - each frontier vertex keeps a bitmap of edges still to send along. One
//     petit cycle per edge i, every frontier vertex whose bit i is set sends a
//     message carrying its own relative address; where the acknowledge flag
//     shows that the router took it, bit i is cleared. Passes over the edges
//     repeat until the global pin shows every bitmap empty (routers refuse
//     messages when more than four cells of a chip send at once or buffers are
//     full, so several passes are normal);
//   - each petit cycle, a vertex in N that receives a message keeps it as its
//     back pointer, leaves N and joins the next frontier;
//   - once the network is empty the new frontier replaces the old; the
//     search ends when the global pin shows an empty frontier.
// Messages to vertices already discovered are delivered and ignored.
// Checks, against a breadth-first search of the same graph in the testbench:
// every vertex is discovered at its true distance from vertex 0 (read after
// each level through the host port), every back pointer names a vertex one
// level closer that has an edge to it, and the unreachable vertices stay
// undiscovered. The number of passes, refused sends and referrals is printed.
module tb_cm_bfs;
  import cm_pkg::*;

  localparam int NCH = 4;
  localparam int NV = NCH * NCELLS;
  localparam int DEG = 8;
  localparam int DLV0 = (MSG_W + 1) * (DIMS + 1);   // 663

  logic clk = 0, rst_n = 0;
  cm_instr_t instr;
  logic [11:0] cube_out [NCH], cube_in [NCH], crdy [NCH];
  logic [NCH-1:0] rdy, rout, rin, rrdy, gout, istart, busy, hwe, hwd, hrd;
  logic [3:0] ev [NCH];
  logic [3:0] hcell [NCH];
  logic [11:0] haddr [NCH];
  logic gpin;
  int checks = 0, failures = 0;

  for (genvar h = 0; h < NCH; h++) begin : g_chip
    cm_chip u_chip (
      .clk(clk), .rst_n(rst_n), .instr(instr), .chip_id(12'(h)), .deliver_or(1'b0),
      .cube_out(cube_out[h]), .cube_in(cube_in[h]), .cube_ready_in(crdy[h]), .ready_out(rdy[h]),
      .ref_out(rout[h]), .ref_in(rin[h]), .ref_ready_in(rrdy[h]),
      .global_out(gout[h]), .inj_start(istart[h]), .rtr_busy(busy[h]), .rtr_events(ev[h]),
      .host_cell(hcell[h]), .host_addr(haddr[h]), .host_we(hwe[h]), .host_wd(hwd[h]),
      .host_rd(hrd[h]));
  end

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
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask

  int pclk;
  always @(posedge clk) pclk <= istart[0] ? 1 : pclk + 1;

  int n_refer, n_send;
  always @(posedge clk) if (rst_n)
    for (int h = 0; h < NCH; h++) begin
      if (ev[h][0]) n_send++;
      if (ev[h][1]) n_refer++;
    end

  function automatic cm_instr_t mk(int a, int b, int r, int w, int c, int s,
                                   logic [7:0] mt, logic [7:0] ft);
    cm_instr_t i;
    i.addr_a = 12'(a); i.addr_b = 12'(b); i.flag_r = 4'(r); i.flag_w = 4'(w);
    i.flag_c = 4'(c); i.sense = 1'(s); i.mem_tt = mt; i.flag_tt = ft; i.news_dir = 2'd0;
    return i;
  endfunction
  localparam logic [7:0] TT_ANDNOTF = 8'b0000_1010;   // a & !f
  localparam logic [7:0] TT_AORF    = 8'b0101_1111;   // a | f
  localparam logic [7:0] TT_AANDF = 8'b0000_0101;   // a & f

  cm_instr_t NOP;
  task automatic exec(input cm_instr_t i);
    instr = i; @(posedge clk); #1;
  endtask
  task automatic wait_until(input int t);
    while (pclk != t) exec(NOP);
  endtask

  // memory map of every cell
  localparam int M_ADJ  = 0;      // DEG x 16-bit relative addresses
  localparam int M_BM   = 128;    // DEG-bit send bitmap
  localparam int M_NEW  = 140;    // discovered in the current level
  localparam int M_CELL = 144;    // own cell number, 4 bits
  localparam int M_IN   = 200;    // 32-bit inbox
  localparam int M_BACK = 240;    // 16-bit back pointer
  localparam int F_A = 8, F_N = 9, F_GOT = 12, F_SEND = 15;

  // One petit cycle. Starts and ends in an injection clock.
  //   inj      edge to send along (cells with flag 15), or -1
  //   next     edge whose send flag is prepared for the next cycle, or -1
  //   level    start a new level: A = newly discovered, bitmaps refilled
  //   check    any_out = some frontier bitmap still has a bit set
  int n_refused;
  task automatic petit(input int inj, input int next, input bit level, input bit check,
                       output bit any_out);
    any_out = 1'b0;
    chk(istart[0], 1, "petit cycle starts in the injection clock");
    if (inj >= 0) begin
      exec(mk(0, 0, 0, 5, F_SEND, 1, TT_IDM, TT_SETO));                          // request
      for (int j = 0; j < 16; j++) exec(mk(M_ADJ + 16 * inj + j, 0, 0, 5, F_SEND, 1, TT_IDM, TT_IDM));
      exec(mk(0, 0, 0, 5, F_SEND, 1, TT_IDM, TT_SETO));                          // format
      for (int j = 0; j < 32; j++)
        if (j < 12)      exec(mk(M_ADJ + 16 * inj + j, 0, 0, 5, F_SEND, 1, TT_IDM, TT_IDM));
        else if (j < 16) exec(mk(M_CELL + j - 12, 0, 0, 5, F_SEND, 1, TT_IDM, TT_IDM));
        else             exec(mk(0, 0, 0, 5, F_SEND, 1, TT_IDM, TT_SETZ));
      exec(mk(0, 0, 0, 5, F_SEND, 1, TT_IDM, TT_SETZ));                          // parity
      // acknowledge: clear the bitmap bit where the router took the message
      exec(mk(M_BM + inj, 0, 4, 1, F_SEND, 1, TT_ANDNOTF, TT_ANDNOTF));
      // flag 1 now holds "refused" (bitmap bit still set) in the senders
      if (gpin) n_refused++;
      exec(mk(0, 0, 0, 1, 0, 0, TT_IDM, TT_SETZ));
    end
    // take in last cycle's delivery: back pointer, leave N, mark as new
    for (int j = 0; j < 16; j++) exec(mk(M_BACK + j, M_IN + j, 0, 0, F_GOT, 1, TT_CPM, TT_IDF));
    exec(mk(M_NEW, 0, 0, F_N, F_GOT, 1, TT_SETO, TT_SETZ));
    exec(mk(0, 0, 0, F_GOT, 0, 0, TT_IDM, TT_SETZ));
    if (level) begin
      exec(mk(M_NEW, 0, 0, F_A, 0, 0, TT_SETZ, TT_IDM));
      for (int i = 0; i < DEG; i++) exec(mk(M_BM + i, 0, F_A, 0, 0, 0, TT_IDF, TT_IDF));
      exec(mk(0, 0, F_A, 1, 0, 0, TT_IDM, TT_IDF));
      any_out = gpin;
      exec(mk(0, 0, 0, 1, 0, 0, TT_IDM, TT_SETZ));
    end
    if (check) begin
      exec(mk(0, 0, 0, 1, 0, 0, TT_IDM, TT_SETZ));
      for (int i = 0; i < DEG; i++) exec(mk(M_BM + i, 0, 1, 1, F_A, 1, TT_IDM, TT_AORF));
      any_out = gpin;
      exec(mk(0, 0, 0, 1, 0, 0, TT_IDM, TT_SETZ));
    end
    if (next >= 0) exec(mk(M_BM + next, 0, F_A, F_SEND, 0, 0, TT_IDM, TT_AANDF));
    else           exec(mk(0, 0, 0, F_SEND, 0, 0, TT_IDM, TT_SETZ));
    // delivery: start bit, then 32 data bits into the inbox of cells in N
    wait_until(DLV0);
    exec(mk(0, 0, 5, F_GOT, F_N, 1, TT_IDM, TT_IDF));
    for (int j = 0; j < 32; j++) exec(mk(M_IN + j, 0, 5, 0, F_GOT, 1, TT_IDF, TT_IDF));
    instr = NOP;
  endtask

  logic [15:0] adj [NV][DEG];
  int lvl [NV], got_lvl [NV];

  task automatic hread(input int v, input int addr, output logic b);
    hcell[v / NCELLS] = 4'(v % NCELLS); haddr[v / NCELLS] = 12'(addr); #1;
    b = hrd[v / NCELLS];
  endtask

  initial begin
    int dst [NV][DEG];
    int q [$];
    int level, passes, cyc_start;
    bit more, was_busy;
    NOP = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);
    instr = NOP;
    hwe = '0; hwd = '0; n_refused = 0;
    for (int h = 0; h < NCH; h++) begin hcell[h] = '0; haddr[h] = '0; end

    // random graph, and its breadth-first levels
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < DEG; i++) begin
        dst[v][i] = (i < 2 || $urandom_range(3) != 0) ? int'($urandom_range(NV - 1)) : v;
        adj[v][i] = {12'((dst[v][i] / NCELLS) ^ (v / NCELLS)), 4'(dst[v][i] % NCELLS)};
      end
    for (int v = 0; v < NV; v++) begin lvl[v] = -1; got_lvl[v] = -1; end
    lvl[0] = 0; got_lvl[0] = 0;
    q.push_back(0);
    while (q.size() > 0) begin
      int u;
      u = q.pop_front();
      for (int i = 0; i < DEG; i++)
        if (lvl[dst[u][i]] < 0) begin lvl[dst[u][i]] = lvl[u] + 1; q.push_back(dst[u][i]); end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // host: edges, own cell number, clear bookkeeping bits, in all chips at once
    for (int c = 0; c < NCELLS; c++) begin
      for (int a = 0; a < 16 * DEG + 4 + 1; a++) begin
        for (int h = 0; h < NCH; h++) begin
          int v;
          v = h * NCELLS + c;
          hcell[h] = 4'(c); hwe[h] = 1'b1;
          if (a < 16 * DEG)          begin haddr[h] = 12'(M_ADJ + a); hwd[h] = adj[v][a / 16][15 - a % 16]; end
          else if (a < 16 * DEG + 4) begin haddr[h] = 12'(M_CELL + a - 16 * DEG); hwd[h] = 1'(c >> (3 - (a - 16 * DEG))); end
          else                       begin haddr[h] = 12'(M_NEW); hwd[h] = (v == 0); end
        end
        exec(NOP);
      end
    end
    hwe = '0;
    // flags: N = everything but vertex 0 (its M_NEW bit), no frontier yet
    exec(mk(M_NEW, 0, 0, F_N, 0, 0, TT_IDM, 8'b1111_0000));   // flag 9 = !a
    exec(mk(0, 0, 0, F_A, 0, 0, TT_IDM, TT_SETZ));
    exec(mk(0, 0, 0, F_GOT, 0, 0, TT_IDM, TT_SETZ));
    exec(mk(0, 0, 0, 1, 0, 0, TT_IDM, TT_SETZ));

    while (!istart[0]) exec(NOP);
    cyc_start = $time;
    level = 0;
    passes = 0;
    while (1) begin
      // new level; prepares the send flag for edge 0
      petit(-1, 0, 1'b1, 1'b0, more);
      if (!more) break;
      // passes over the edges until every bitmap is empty
      do begin
        passes++;
        for (int i = 0; i < DEG; i++)
          petit(i, (i + 1) % DEG, 1'b0, i == DEG - 1, more);
      end while (more && passes < 40 * (level + 1));
      // drain the network, then take in the last delivery
      do begin
        was_busy = (busy != '0);
        petit(-1, -1, 1'b0, 1'b0, more);
      end while (was_busy || busy != '0);
      petit(-1, -1, 1'b0, 1'b0, more);
      level++;
      // vertices discovered in this level
      for (int v = 0; v < NV; v++) begin
        logic b;
        hread(v, M_NEW, b);
        if (b) begin
          if (got_lvl[v] >= 0) begin failures++; $display("FAIL vertex %0d discovered twice", v); end
          else got_lvl[v] = level;
        end
      end
      // the host reads took some time: back to an injection clock
      @(posedge clk); #1;
      while (!istart[0]) exec(NOP);
      if (level > NV) break;
    end

    for (int v = 0; v < NV; v++) begin
      chk(32'(got_lvl[v]), 32'(lvl[v]), $sformatf("level of vertex %0d", v));
      if (v != 0 && lvl[v] > 0) begin
        logic [15:0] bp;
        int p;
        bit has_edge;
        for (int j = 0; j < 16; j++) begin logic b; hread(v, M_BACK + j, b); bp[15 - j] = b; end
        p = ((v / NCELLS) ^ int'(bp[15:4])) * NCELLS + int'(bp[3:0]);
        chk(32'(lvl[p]), 32'(lvl[v] - 1), $sformatf("back pointer of vertex %0d names a vertex one level up", v));
        has_edge = 0;
        for (int i = 0; i < DEG; i++) if (dst[p][i] == v) has_edge = 1;
        chk(has_edge, 1, $sformatf("back pointer of vertex %0d follows an edge", v));
      end
    end
    $display("levels %0d, edge passes %0d, refused send rounds %0d, cube sends %0d, referrals %0d, clocks %0d",
             level, passes, n_refused, n_send, n_refer, ($time - cyc_start) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
