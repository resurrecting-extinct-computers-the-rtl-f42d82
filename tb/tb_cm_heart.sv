// tb_cm_heart -- random dimension cycles. The testbench keeps the buffers
// (valid bits, priorities, 50-bit messages) and plays both neighbours.
// Checks per dimension cycle: the "want" bit on the cube link and the start
// bit on the referral link; which message is sent (highest priority with
// address bit d set, only if the neighbour is ready or wants to send back)
// and which is referred (lowest priority of the rest, only when this router
// has fewer than two free buffers and the next router is ready); the
// transmitted bits, with bit d cleared on the cube link and the router
// address re-based on the referral link; the buffers chosen for and the bits
// written by incoming messages, including an exchange, where the incoming
// message lands in the outgoing one's buffer; and the freed/filled masks.
module tb_cm_heart;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, bitc, last;
  logic [5:0] pos;
  logic [3:0] dim;
  logic [6:0] valid, dbit, col, wen, wbit, keep, gone, arrive;
  logic [6:0][2:0] prio;
  logic my_ready, cready, rready, cin, rin, cout, rout;
  logic [11:0] rmask;
  logic [1:0] nv;
  logic [1:0][2:0] ns;
  logic evs, evr, evrc, evrr;
  int checks = 0, failures = 0;
  int n_send = 0, n_refer = 0, n_recv = 0, n_xchg = 0;

  cm_heart dut (.clk(clk), .rst_n(rst_n), .start(start), .bit_cycle(bitc), .last_cycle(last),
    .pos(pos), .dim(dim), .valid(valid), .prio(prio), .dbit(dbit), .col(col),
    .my_ready(my_ready), .cube_ready_in(cready), .ref_ready_in(rready), .cube_in(cin),
    .ref_in(rin), .ref_mask(rmask), .cube_out(cout), .ref_out(rout), .wr_en(wen),
    .wr_bit(wbit), .keep(keep), .new_valid(nv), .new_slot(ns), .gone_mask(gone),
    .arrive_mask(arrive), .ev_send(evs), .ev_refer(evr), .ev_recv_cube(evrc), .ev_recv_ref(evrr));
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

  logic [49:0] msg [7];

  initial begin
    start = 0; bitc = 0; last = 0; pos = 0; dim = 0; valid = 0; prio = 0; dbit = 0; col = 0;
    my_ready = 1; cready = 0; rready = 0; cin = 0; rin = 0; rmask = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int occ, es, er, free_n, slot_c, slot_r, nf;
      logic arr_c, arr_r, have, nw, xchg;
      logic [49:0] in_c, in_r;
      logic [6:0] free, exp_gone, exp_arr;
      // buffer state: distinct priorities, dense from 7 downwards
      valid = 7'($urandom);
      if (t % 4 == 0) valid = 7'h7f;
      if (t % 4 == 1) valid = 7'h3f;
      occ = $countones(valid);
      begin
        int r;
        r = 7;
        for (int i = 0; i < 7; i++) begin
          prio[i] = 3'($urandom);
          if (valid[i]) begin prio[i] = 3'(r); r--; end
        end
      end
      for (int i = 0; i < 7; i++) msg[i] = {$urandom, $urandom};
      dim = 4'($urandom % 12);
      for (int i = 0; i < 7; i++) dbit[i] = msg[i][11 - dim];
      my_ready = (occ <= 5);
      cready = ($urandom % 4) != 0;
      rready = ($urandom % 4) != 0;
      rmask = 12'($urandom);
      // expected decisions
      es = -1;
      for (int i = 0; i < 7; i++)
        if (valid[i] && dbit[i] && (es < 0 || prio[i] > prio[es])) es = i;
      have = (es >= 0);
      nw = ($urandom % 2) != 0;          // the neighbour has a message for us
      if (!(cready || nw)) es = -1;
      xchg = (es >= 0) && nw;
      er = -1;
      for (int i = 0; i < 7; i++)
        if (valid[i] && i != es && (er < 0 || prio[i] < prio[er])) er = i;
      if (my_ready || !rready) er = -1;
      // arrivals: cube when the neighbour wants and we are ready or want too,
      // referral only when this router is ready
      arr_c = nw && (my_ready || have);
      arr_r = my_ready && ($urandom % 2);
      in_c = {$urandom, $urandom}; in_r = {$urandom, $urandom};
      free = ~valid; slot_c = -1; slot_r = -1;
      if (xchg) slot_c = es;
      else if (arr_c) begin for (int i = 6; i >= 0; i--) if (free[i]) slot_c = i; free[slot_c] = 0; end
      if (arr_r) begin for (int i = 6; i >= 0; i--) if (free[i]) slot_r = i; free[slot_r] = 0; end
      exp_gone = '0; exp_arr = '0;
      if (es >= 0) exp_gone[es] = 1;
      if (er >= 0) exp_gone[er] = 1;
      if (slot_c >= 0) exp_arr[slot_c] = 1;
      if (slot_r >= 0) exp_arr[slot_r] = 1;
      if (es >= 0) n_send++;
      if (er >= 0) n_refer++;
      if (arr_c || arr_r) n_recv++;
      if (xchg) n_xchg++;

      // start clock
      start = 1; cin = nw; rin = arr_r; #1;
      chk(cout, have, "cube start bit (want)");
      chk(rout, er >= 0, "referral start bit");
      chk(keep, valid & ~exp_gone, "keep");
      chk(nv, {arr_r, arr_c}, "new_valid");
      if (arr_c) chk(64'(ns[0]), 64'(slot_c), "cube slot");
      if (arr_r) chk(64'(ns[1]), 64'(slot_r), "ref slot");
      chk(evs, es >= 0, "ev_send");
      chk(evr, er >= 0, "ev_refer");
      @(posedge clk); #1;
      start = 0;
      for (int p = 0; p < 50; p++) begin
        logic ec, er_bit;
        bitc = 1; last = (p == 49); pos = 6'(p);
        for (int i = 0; i < 7; i++) col[i] = msg[i][p];
        cin = arr_c && in_c[p]; rin = arr_r && in_r[p];
        #1;
        ec = (es >= 0) && (msg[es][p] ^ (p == 11 - dim));
        er_bit = (er >= 0) && (msg[er][p] ^ (p < 12 && rmask[11 - p]));
        chk(cout, ec, "cube bit");
        chk(rout, er_bit, "referral bit");
        chk($countones(wen), 32'(arr_c) + 32'(arr_r), "writes");
        if (arr_c) chk(wbit[slot_c], in_c[p], "cube write");
        if (arr_r) chk(wbit[slot_r], in_r[p], "ref write");
        if (last) begin
          chk(gone, exp_gone, "gone");
          chk(arrive, exp_arr, "arrive");
        end
        @(posedge clk); #1;
      end
      bitc = 0; last = 0; cin = 0; rin = 0;
      @(posedge clk); #1;
    end
    checks++;
    if (n_send == 0 || n_refer == 0 || n_recv == 0 || n_xchg == 0) begin
      failures++; $display("FAIL coverage send=%0d refer=%0d recv=%0d exchange=%0d", n_send, n_refer, n_recv, n_xchg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
