// tb_cm_prio_calc -- random buffer states with gaps in the priorities and
// up to four new arrivals. Expected: the surviving messages keep their order
// and take 7, 6, 5, ... ; the arrivals follow in arrival order. Also checks
// that the result is ready exactly 9 clocks after the start pulse.
module tb_cm_prio_calc;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [6:0] keep;
  logic [6:0][2:0] pin, pout;
  logic [3:0] nv;
  logic [3:0][2:0] ns;
  int checks = 0, failures = 0;

  cm_prio_calc dut (.clk(clk), .rst_n(rst_n), .start(start), .keep(keep), .prio_in(pin),
                    .new_valid(nv), .new_slot(ns), .prio_out(pout), .done(done));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    keep = '0; pin = '0; nv = '0; ns = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [6:0] used;
      logic [6:0][2:0] exp;
      int s, nnew, lat;
      // pick distinct priorities 1..7 for the survivors
      used = '0; keep = '0; pin = '0; exp = '0; nv = '0; ns = '0;
      for (int i = 0; i < 7; i++) begin
        if ($urandom % 2) begin
          int p;
          do p = 1 + $urandom % 7; while (used[p-1]);
          used[p-1] = 1'b1; keep[i] = 1'b1; pin[i] = 3'(p);
        end else pin[i] = 3'($urandom);
      end
      s = $countones(keep);
      // expected rank of each survivor: number of survivors with higher prio
      for (int i = 0; i < 7; i++) if (keep[i]) begin
        int above;
        above = 0;
        for (int j = 0; j < 7; j++) if (keep[j] && pin[j] > pin[i]) above++;
        exp[i] = 3'(7 - above);
      end
      // arrivals into non-surviving slots, in random order, some lanes unused
      nnew = 0;
      for (int k = 0; k < 4; k++) begin
        if (($urandom % 3) != 0) begin
          int sl;
          sl = -1;
          for (int tries = 0; tries < 20 && sl < 0; tries++) begin
            int c;
            c = $urandom % 7;
            if (!keep[c] && !(nv[0] && ns[0] == 3'(c)) && !(nv[1] && ns[1] == 3'(c)) &&
                !(nv[2] && ns[2] == 3'(c)) && !(nv[3] && ns[3] == 3'(c))) sl = c;
          end
          if (sl >= 0) begin
            nv[k] = 1'b1; ns[k] = 3'(sl);
            exp[sl] = 3'(7 - s - nnew);
            nnew++;
          end
        end
      end
      start = 1; @(posedge clk); #1; start = 0;
      keep = '0; pin = '0;    // inputs are captured at start
      lat = 0;
      while (!done && lat < 20) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 9) begin failures++; $display("FAIL latency %0d", lat); end
      for (int i = 0; i < 7; i++) begin
        logic in_use;
        in_use = exp[i] != 0;
        if (in_use) begin
          checks++;
          if (pout[i] !== exp[i]) begin
            failures++; $display("FAIL t=%0d slot %0d prio %0d exp %0d", t, i, pout[i], exp[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
