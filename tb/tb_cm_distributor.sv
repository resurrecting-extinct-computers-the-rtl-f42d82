// tb_cm_distributor -- random selections, bits and destinations; each line
// must be the OR of the bits of the selected messages addressed to it.
module tb_cm_distributor;
  import cm_pkg::*;
  logic [6:0] sel, bits;
  logic [6:0][3:0] cl;
  logic [15:0] lines;
  int checks = 0, failures = 0;

  cm_distributor dut (.sel(sel), .bits(bits), .dst_cell(cl), .lines(lines));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] exp;
      sel = 7'($urandom); bits = 7'($urandom);
      for (int i = 0; i < 7; i++) cl[i] = 4'($urandom);
      exp = '0;
      for (int c = 0; c < 16; c++)
        for (int i = 0; i < 7; i++)
          if (sel[i] && bits[i] && cl[i] == 4'(c)) exp[c] = 1'b1;
      #1;
      checks++;
      if (lines !== exp) begin failures++; $display("FAIL lines=%h exp=%h", lines, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
