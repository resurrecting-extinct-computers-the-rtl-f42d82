// tb_cm_dot -- vector dot product on an eight-chip slice of the machine.
//
// Eight full-size chips are joined as a 3-dimensional hypercube (links of
// dimensions 0..2; the other nine report "not ready") with the referral ring
// 0 -> 1 -> ... -> 7. Vector x lives in cell 0 of chips 0..3 and vector y in
// cell 0 of chips 4..7, so entry i of y sits exactly one dimension (2) away
// from entry i of x. The testbench is the host, broadcasting one instruction
// per clock; which cells act is decided by a role bit loaded into each cell
// and copied into flag 15.
//   1. every y cell sends its 32-bit value along dimension 2 (one petit
//      cycle); every x cell receives it,
//   2. every x cell forms x * y by shift-and-add, bit-serially, with the
//      carry in flag 14 and the current multiplier bit in flag 13,
//   3. tree reduction: for d = 0, 1 every x cell sends its running sum to
//      its partner across dimension d and adds what it receives, so after
//      log2(4) = 2 more petit cycles every x cell holds the whole sum.
// Values are 8-bit, products and sums 32-bit, as in the reference program
// for this machine (which runs the same scheme on two 2048-entry vectors).
// Checks: the product in every x cell, the final sum in every x cell, that
// every message is delivered in the petit cycle it was sent in (start bit at
// clock 663 of the cycle, so each message step costs one petit cycle of about
// 700 clocks) and that 1 + log2(N) message steps suffice.
module tb_cm_dot;
  import cm_pkg::*;

  localparam int NCH = 8;
  localparam int NDIM = 3;
  localparam int N = NCH / 2;                 // vector length
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
      for (int d = 0; d < NDIM; d++) begin
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask

  // petit-cycle clock of chip 0
  int pclk;
  always @(posedge clk) pclk <= istart[0] ? 1 : pclk + 1;

  function automatic cm_instr_t mk(int a, int b, int r, int w, int c, int s,
                                   logic [7:0] mt, logic [7:0] ft);
    cm_instr_t i;
    i.addr_a = 12'(a); i.addr_b = 12'(b); i.flag_r = 4'(r); i.flag_w = 4'(w);
    i.flag_c = 4'(c); i.sense = 1'(s); i.mem_tt = mt; i.flag_tt = ft; i.news_dir = 2'd0;
    return i;
  endfunction
  localparam logic [7:0] TT_AANDF = 8'b0000_0101;   // a & f

  cm_instr_t NOP;
  task automatic exec(input cm_instr_t i);
    instr = i; @(posedge clk); #1;
  endtask

  // memory map of every cell
  localparam int M_ROLE_X = 0;     // 1 in the x cells
  localparam int M_ROLE_Y = 1;     // 1 in the y cells
  localparam int M_PAR    = 2;     // parity scratch
  localparam int M_V      = 100;   // own value, 32 bits, MSB first
  localparam int M_IN     = 140;   // received value
  localparam int M_P      = 180;   // product, then running sum

  task automatic petit_sync();
    instr = NOP;
    #0;
    while (!istart[0]) begin @(posedge clk); #1; end
  endtask

  // In the injection clock: cells with flag 15 set send the 32 bits at `src`
  // to cell 0 of the chip across dimension `dim`. Waits for the delivery and
  // copies the delivered bits of every cell to M_IN. Returns the petit-cycle
  // clock at which the start bit was seen.
  task automatic exchange(input int dim, input int src, output int seen_at);
    exec(mk(M_PAR, 0, 0, 5, 15, 1, TT_SETZ, TT_SETO));                  // request
    for (int j = 0; j < 12; j++)
      exec(mk(0, 0, 0, 5, 15, 1, TT_IDM, (j == 11 - dim) ? TT_SETO : TT_SETZ));
    for (int j = 0; j < 4; j++) exec(mk(0, 0, 0, 5, 15, 1, TT_IDM, TT_SETZ));   // cell 0
    exec(mk(0, 0, 0, 5, 15, 1, TT_IDM, TT_SETO));                       // format
    for (int j = 0; j < 32; j++) exec(mk(M_PAR, src + j, 0, 5, 15, 1, TT_XOR, TT_CPM));
    exec(mk(M_PAR, 0, 0, 5, 15, 1, TT_IDM, TT_IDM));                    // parity
    seen_at = -1;
    while (1) begin
      exec(mk(0, 0, 5, 1, 0, 0, TT_IDM, TT_IDF));
      if (gpin) begin seen_at = pclk - 1; break; end
      if (pclk == PETIT_LEN - 1) break;
    end
    for (int j = 0; j < 32; j++) exec(mk(M_IN + j, 0, 5, 0, 0, 0, TT_IDF, TT_IDF));
    instr = NOP;
    n_steps++;
  endtask

  // dst += src (32 bits) where flag 15 is set; carry in flag 14
  task automatic add32(input int dst, input int src);
    exec(mk(0, 0, 0, 14, 0, 0, TT_IDM, TT_SETZ));
    for (int j = 0; j < 32; j++)
      exec(mk(dst + 31 - j, src + 31 - j, 14, 14, 15, 1, TT_XOR, TT_MAJ));
  endtask

  logic [31:0] val [NCH];
  int n_steps = 0;

  initial begin
    int seen;
    logic [31:0] sum, got;
    NOP = mk(0, 0, 0, 0, 0, 1, TT_IDM, TT_IDF);
    instr = NOP;
    hwe = '0; hwd = '0;
    for (int h = 0; h < NCH; h++) begin hcell[h] = '0; haddr[h] = '0; end
    for (int h = 0; h < NCH; h++) val[h] = 32'($urandom_range(255));
    sum = '0;
    for (int i = 0; i < N; i++) sum += val[i] * val[i + N];

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // host: roles and values into cell 0 of every chip
    for (int j = 0; j < 32 + 4; j++) begin
      for (int h = 0; h < NCH; h++) begin
        hcell[h] = 4'd0; hwe[h] = 1'b1;
        case (j)
          0: begin haddr[h] = 12'(M_ROLE_X); hwd[h] = (h < N); end
          1: begin haddr[h] = 12'(M_ROLE_Y); hwd[h] = (h >= N); end
          2: begin haddr[h] = 12'(M_PAR);    hwd[h] = 1'b0; end
          3: begin haddr[h] = 12'(M_PAR);    hwd[h] = 1'b0; end
          default: begin haddr[h] = 12'(M_V + j - 4); hwd[h] = val[h][31 - (j - 4)]; end
        endcase
      end
      exec(NOP);
    end
    hwe = '0;
    // the other cells of every chip: roles 0
    for (int c = 1; c < 16; c++) begin
      for (int h = 0; h < NCH; h++) begin hcell[h] = 4'(c); haddr[h] = 12'(M_ROLE_X); hwd[h] = 0; hwe[h] = 1; end
      exec(NOP);
      for (int h = 0; h < NCH; h++) haddr[h] = 12'(M_ROLE_Y);
      exec(NOP);
    end
    hwe = '0;

    // 1. y -> x across dimension 2
    exec(mk(0, M_ROLE_Y, 0, 15, 0, 0, TT_IDM, TT_CPM));
    petit_sync();
    exchange(NDIM - 1, M_V, seen);
    chk(seen, DLV0, "y values delivered at clock 663 of the same petit cycle");

    // 2. product P = V * IN in the x cells
    exec(mk(0, M_ROLE_X, 0, 15, 0, 0, TT_IDM, TT_CPM));
    for (int j = 0; j < 32; j++) exec(mk(M_P + j, 0, 0, 0, 0, 0, TT_SETZ, TT_IDF));
    for (int i = 0; i < 32; i++) begin
      exec(mk(M_IN + 31 - i, 0, 15, 13, 0, 0, TT_IDM, TT_AANDF));      // multiplier bit i
      exec(mk(0, 0, 0, 14, 0, 0, TT_IDM, TT_SETZ));
      for (int j = 0; j < 32 - i; j++)
        exec(mk(M_P + 31 - i - j, M_V + 31 - j, 14, 14, 13, 1, TT_XOR, TT_MAJ));
    end
    for (int h = 0; h < N; h++) begin
      got = '0;
      for (int j = 0; j < 32; j++) begin haddr[h] = 12'(M_P + j); hcell[h] = '0; #1; got[31 - j] = hrd[h]; end
      chk(got, val[h] * val[h + N], $sformatf("product in chip %0d", h));
    end

    // 3. tree reduction over dimensions 0 .. NDIM-2
    for (int d = 0; d < NDIM - 1; d++) begin
      petit_sync();
      exchange(d, M_P, seen);
      chk(seen, DLV0, $sformatf("partial sum delivered at clock 663, dimension %0d", d));
      add32(M_P, M_IN);
    end
    chk(n_steps, 1 + $clog2(N), "message steps: one transfer plus log2(N) reduction steps");

    for (int h = 0; h < N; h++) begin
      got = '0;
      for (int j = 0; j < 32; j++) begin haddr[h] = 12'(M_P + j); hcell[h] = '0; #1; got[31 - j] = hrd[h]; end
      chk(got, sum, $sformatf("dot product in chip %0d", h));
    end
    chk(busy, '0, "network empty at the end");
    $display("dot product = %0d", sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
