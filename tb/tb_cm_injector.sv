// tb_cm_injector -- random injection phases: random requesting cells and
// random busy buffers. Checks that at most four requests are taken, lowest
// cell first, never more than the free buffers; that the k-th accepted cell's
// 50 message bits land in the k-th free buffer; and that the acknowledge
// flags appear after the last bit and clear at the next request clock.
module tb_cm_injector;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req, bitc, last;
  logic [15:0] lines, ack;
  logic [6:0] sv, wen, wbit, commit;
  logic [3:0] nv;
  logic [3:0][2:0] ns;
  int checks = 0, failures = 0;

  cm_injector dut (.clk(clk), .rst_n(rst_n), .req_cycle(req), .bit_cycle(bitc),
    .last_cycle(last), .lines(lines), .slot_valid(sv), .wr_en(wen), .wr_bit(wbit),
    .new_valid(nv), .new_slot(ns), .commit_mask(commit), .ack(ack));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask

  initial begin
    req = 0; bitc = 0; last = 0; lines = 0; sv = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [15:0] want, acc;
      logic [6:0] busy, used;
      int cellk[4], slotk[4], n;
      logic [49:0] sent [16];
      logic [49:0] got [7];
      want = 16'($urandom) & 16'($urandom);
      busy = 7'($urandom) & 7'($urandom);
      // expected pairing
      n = 0; acc = '0; used = busy;
      for (int c = 0; c < 16; c++) begin
        if (want[c] && n < 4) begin
          int s;
          s = -1;
          for (int i = 6; i >= 0; i--) if (!used[i]) s = i;
          if (s >= 0) begin cellk[n] = c; slotk[n] = s; used[s] = 1'b1; acc[c] = 1'b1; n++; end
        end
      end
      // request clock
      req = 1; lines = want; sv = busy; #1;
      for (int k = 0; k < 4; k++) begin
        chk(nv[k], k < n, "new_valid");
        if (k < n) chk(64'(ns[k]), 64'(slotk[k]), "new_slot");
      end
      @(posedge clk); #1;
      req = 0;
      if (t > 0) chk(ack, 16'h0, "ack cleared");
      // 50 bit clocks
      for (int p = 0; p < 50; p++) begin
        bitc = 1; last = (p == 49);
        lines = 16'($urandom);
        for (int c = 0; c < 16; c++) sent[c][p] = lines[c];
        #1;
        for (int s = 0; s < 7; s++) if (wen[s]) got[s][p] = wbit[s];
        chk($countones(wen), n, "write count");
        if (last) chk(commit, used & ~busy, "commit");
        @(posedge clk); #1;
      end
      bitc = 0; last = 0; lines = 0;
      chk(ack, acc, "ack");
      for (int k = 0; k < n; k++) chk(got[slotk[k]], sent[cellk[k]], "message bits");
      repeat (2) @(posedge clk); #1;
      chk(ack, acc, "ack held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
