// tb_cm_router -- one router, with the testbench playing its 16 cells, its 12
// cube neighbours and its referral-ring neighbours. A monitor follows the
// petit cycle (injection 51 clocks, 12 dimension cycles of 51, delivery 33)
// and records every message leaving on a link and every delivery to a cell.
// Petit cycle 1: six cells request; four are acknowledged. Two of them go to
//   the same cell of this chip, one must leave on dimension 3 with address bit
//   3 cleared, one goes to another local cell, and a message arrives on
//   dimension 5. Priority delivery: three deliveries now, with the older of
//   the colliding pair first.
// Petit cycle 2: the remaining colliding message is delivered.
// Petit cycle 3: OR delivery mode, two messages to one cell arrive ORed.
// Petit cycles 4-5: no neighbour is ready, so the buffers fill (4 + 3
//   accepted, the rest refused); the full router refers messages to the next
//   router with rewritten addresses until it is ready again.
// The latency of a local message (request to first delivered bit) is checked
// against the petit-cycle length.
module tb_cm_router;
  import cm_pkg::*;
  localparam int INJ = 51, DIMC = 51, DLV0 = 51 + 12 * 51;   // 663

  logic clk = 0, rst_n = 0;
  logic [11:0] chip_id = 12'd5;
  logic mode_or = 0;
  logic [15:0] inj, dlv, ack;
  logic [11:0] cout, cin, crdy;
  logic rdy, rout, rin, rrdy, istart, busy;
  logic [3:0] ev;
  int checks = 0, failures = 0;

  cm_router dut (.clk(clk), .rst_n(rst_n), .chip_id(chip_id), .deliver_or(mode_or),
    .inj_lines(inj), .dlv_lines(dlv), .ack(ack), .cube_out(cout), .cube_in(cin),
    .cube_ready_in(crdy), .ready_out(rdy), .ref_out(rout), .ref_in(rin),
    .ref_ready_in(rrdy), .inj_start(istart), .busy(busy), .events(ev));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask

  // message builder: relative router address, destination cell, data, parity
  function automatic logic [49:0] mkmsg(logic [11:0] rel, logic [3:0] c, logic [31:0] d);
    logic [49:0] m;
    for (int i = 0; i < 12; i++) m[i] = rel[11 - i];
    for (int i = 0; i < 4; i++)  m[12 + i] = c[3 - i];
    m[16] = 1'b1;
    for (int i = 0; i < 32; i++) m[17 + i] = d[31 - i];
    m[49] = ^d;
    return m;
  endfunction
  function automatic logic [11:0] m_rel(logic [49:0] m);
    logic [11:0] r;
    for (int i = 0; i < 12; i++) r[11 - i] = m[i];
    return r;
  endfunction
  // delivered bits in arrival order back to a 32-bit word
  function automatic logic [31:0] word(logic [31:0] bits);
    logic [31:0] w;
    for (int i = 0; i < 32; i++) w[31 - i] = bits[i];
    return w;
  endfunction

  // ------------------------------------------------ plan for the next petit cycle
  logic [15:0]  p_want;
  logic [49:0]  p_msg [16];
  logic [11:0]  p_cin;
  logic [49:0]  p_cmsg [12];
  logic         p_rin;
  logic [49:0]  p_rmsg;

  // ------------------------------------------------ records of the last petit cycle
  logic [11:0]  r_sent;             // dims on which a message left
  logic [49:0]  r_smsg [12];
  int           r_nref;
  logic [49:0]  r_rmsg [12];
  logic [15:0]  r_dlv;              // cells that received a start bit
  logic [31:0]  r_dbits [16];
  logic [15:0]  r_ack;
  logic         r_rdy_low, r_rdy_high_after;
  int           t = -1;
  logic         ref_active = 0;
  event         petit_end;
  int           first_dlv_t;

  always @(negedge clk) if (rst_n) begin
    int d, k;
    if (istart) t = 0; else if (t >= 0) t++;
    // drive
    inj = '0; cin = '0; rin = 1'b0;
    if (t >= 0 && t < INJ) begin
      if (t == 0) inj = p_want;
      else for (int c = 0; c < 16; c++) inj[c] = p_want[c] && p_msg[c][t - 1];
    end
    if (t >= INJ && t < DLV0) begin
      d = (t - INJ) / DIMC; k = (t - INJ) % DIMC;
      cin[d] = p_cin[d] && (k == 0 ? 1'b1 : p_cmsg[d][k - 1]);
      rin    = p_rin && d == 0 && (k == 0 ? 1'b1 : p_rmsg[k - 1]);
    end
    #1;
    // record
    if (t == 0) begin r_sent = '0; r_nref = 0; r_dlv = '0; r_rdy_low = 0; end
    if (t == INJ) r_ack = ack;
    if (t >= INJ && t < DLV0) begin
      logic [11:0] others;
      d = (t - INJ) / DIMC; k = (t - INJ) % DIMC;
      others = cout; others[d] = 1'b0;
      if (others != 0) begin failures++; $display("FAIL output on a dimension out of turn"); end
      if (k == 0) begin
        // the start clock carries "want"; the message follows only if the
        // neighbour is ready or wants to send back
        if (cout[d] && (crdy[d] || cin[d])) r_sent[d] = 1'b1;
        if (!rdy) r_rdy_low = 1;
        ref_active = rout;
        if (rout) r_nref++;
      end else begin
        if (r_sent[d]) r_smsg[d][k - 1] = cout[d];
        if (ref_active) r_rmsg[r_nref - 1][k - 1] = rout;
      end
    end
    if (t >= DLV0 && t <= DLV0 + 32) begin
      k = t - DLV0;
      if (k == 0) begin r_dlv = dlv; if (dlv != 0 && first_dlv_t < 0) first_dlv_t = t; end
      else for (int c = 0; c < 16; c++) if (r_dlv[c]) r_dbits[c][k - 1] = dlv[c];
    end
    if (t == PETIT_LEN - 1) begin
      r_rdy_high_after = rdy;
      ->petit_end;
    end
  end

  task automatic clear_plan();
    p_want = '0; p_cin = '0; p_rin = 0;
  endtask

  initial begin
    logic [31:0] D [8];
    for (int i = 0; i < 8; i++) D[i] = $urandom;
    clear_plan();
    crdy = '1; rrdy = 1'b1; first_dlv_t = -1;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // ---------------- petit cycle 1
    p_want = 16'b0011_1111;                    // cells 0..5 request
    p_msg[0] = mkmsg(12'h000, 4'd9, D[0]);
    p_msg[1] = mkmsg(12'h000, 4'd9, D[1]);
    p_msg[2] = mkmsg(12'h008, 4'd1, D[2]);     // must cross dimension 3
    p_msg[3] = mkmsg(12'h000, 4'd2, D[3]);
    p_msg[4] = mkmsg(12'h000, 4'd3, D[5]);     // refused (only 4 per petit cycle)
    p_msg[5] = mkmsg(12'h000, 4'd4, D[6]);
    p_cin[5] = 1'b1;
    p_cmsg[5] = mkmsg(12'h000, 4'd7, D[4]);    // arrives over dimension 5
    @(petit_end);
    chk(r_ack, 16'h000f, "acks petit 1");
    chk(r_sent, 12'h008, "only dimension 3 used");
    chk(r_smsg[3], mkmsg(12'h000, 4'd1, D[2]), "dimension-3 message, bit 3 cleared");
    chk(r_dlv, (16'd1 << 9) | (16'd1 << 2) | (16'd1 << 7), "deliveries petit 1");
    chk(word(r_dbits[9]), D[0], "cell 9 gets the older message");
    chk(word(r_dbits[2]), D[3], "cell 2 data");
    chk(word(r_dbits[7]), D[4], "cell 7 data (came over the cube)");
    chk(first_dlv_t, DLV0, "local delivery latency");
    clear_plan();

    // ---------------- petit cycle 2
    @(petit_end);
    chk(r_dlv, 16'd1 << 9, "deliveries petit 2");
    chk(word(r_dbits[9]), D[1], "cell 9 second message");
    @(posedge clk); #1;
    chk(busy, 1'b0, "router empty");

    // ---------------- petit cycle 3: OR mode
    mode_or = 1;
    p_want = 16'b0000_0110;
    p_msg[1] = mkmsg(12'h000, 4'd12, D[5]);
    p_msg[2] = mkmsg(12'h000, 4'd12, D[6]);
    @(petit_end);
    chk(r_dlv, 16'd1 << 12, "OR delivery to cell 12");
    chk(word(r_dbits[12]), D[5] | D[6], "ORed data");
    mode_or = 0;
    clear_plan();

    // ---------------- petit cycles 4-5: congestion and referral
    crdy = '0;                  // no neighbour accepts
    rrdy = 1'b0;                // nor does the next router, yet
    p_want = 16'hf000;
    for (int c = 12; c < 16; c++) p_msg[c] = mkmsg(12'h001 << (c - 12), 4'(c), D[c - 12]);
    @(petit_end);
    chk(r_ack, 16'hf000, "acks petit 4");
    chk(r_sent, 12'h000, "nothing sent to busy neighbours");
    p_want = 16'h00ff;
    for (int c = 0; c < 8; c++) p_msg[c] = mkmsg(12'h010 << (c % 4), 4'(c), D[c]);
    rrdy = 1'b1;
    @(petit_end);
    chk(r_ack, 16'h0007, "only 3 buffers left");
    chk(r_rdy_low, 1'b1, "router reported not ready");
    chk(r_nref, 2, "two referrals until ready again");
    // referred: the two lowest-priority (newest) messages, cells 2 then 1,
    // with the address re-based from chip 5 to chip 6 (XOR 3)
    chk(r_rmsg[0], mkmsg((12'h010 << 2) ^ 12'h003, 4'd2, D[2]), "first referral");
    chk(r_rmsg[1], mkmsg((12'h010 << 1) ^ 12'h003, 4'd1, D[1]), "second referral");
    chk(r_rdy_high_after, 1'b1, "ready again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
