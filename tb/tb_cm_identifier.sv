// tb_cm_identifier -- random buffer contents in both delivery modes.
// OR mode: every message that reached its chip is selected. Priority mode:
// per destination cell exactly the highest-priority such message.
module tb_cm_identifier;
  import cm_pkg::*;
  logic mode;
  logic [6:0] valid, at_dest, sel;
  logic [6:0][3:0] cl;
  logic [6:0][2:0] pr;
  int checks = 0, failures = 0;

  cm_identifier dut (.mode_or(mode), .valid(valid), .at_dest(at_dest), .dst_cell(cl),
                     .prio(pr), .sel(sel));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [6:0] exp;
      mode = 1'($urandom); valid = 7'($urandom); at_dest = 7'($urandom);
      for (int i = 0; i < 7; i++) begin
        cl[i] = 4'($urandom % 4);     // few cells, so that collisions happen
        pr[i] = 3'(7 - i);            // distinct priorities ...
      end
      // ... shuffled
      for (int i = 0; i < 7; i++) begin
        int j;
        logic [2:0] tmp;
        j = $urandom % 7;
        tmp = pr[i]; pr[i] = pr[j]; pr[j] = tmp;
      end
      exp = '0;
      for (int c = 0; c < 16; c++) begin
        int best;
        best = -1;
        for (int i = 0; i < 7; i++)
          if (valid[i] && at_dest[i] && cl[i] == 4'(c)) begin
            if (mode) exp[i] = 1'b1;
            else if (best < 0 || pr[i] > pr[best]) best = i;
          end
        if (!mode && best >= 0) exp[best] = 1'b1;
      end
      #1;
      checks++;
      if (sel !== exp) begin failures++; $display("FAIL mode=%0d sel=%b exp=%b", mode, sel, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
