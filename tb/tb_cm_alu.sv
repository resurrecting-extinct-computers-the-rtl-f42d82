// tb_cm_alu -- checks the truth-table ALU against the named truth tables
// (copy A, copy B, copy flag, three-input XOR, majority, set, clear) for all
// eight operand combinations, then against random tables, where the expected
// bit is found by walking a table written out row by row.
module tb_cm_alu;
  import cm_pkg::*;
  logic [7:0] tt;
  logic a, b, f, y;
  int checks = 0, failures = 0;

  cm_alu dut (.tt(tt), .a(a), .b(b), .f(f), .y(y));

  task automatic check(input logic exp, input string what);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s tt=%b a=%b b=%b f=%b y=%b exp=%b", what, tt, a, b, f, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, f} = 3'(i);
      tt = TT_IDM;  check(a, "IDM");
      tt = TT_CPM;  check(b, "CPM");
      tt = TT_IDF;  check(f, "IDF");
      tt = TT_XOR;  check(a ^ b ^ f, "XOR");
      tt = TT_MAJ;  check((a & b) | (a & f) | (b & f), "MAJ");
      tt = TT_SETO; check(1'b1, "SETO");
      tt = TT_SETZ; check(1'b0, "SETZ");
      // the comparison table of the logarithm program: f & !(~a & b)
      tt = 8'b0100_0101; check(f & ~(~a & b), "CMP");
    end
    for (int n = 0; n < 200; n++) begin
      logic [7:0] r;
      r  = 8'($urandom);
      tt = r;
      for (int i = 0; i < 8; i++) begin
        logic e;
        {a, b, f} = 3'(i);
        // row 0 of the table (a=b=f=0) is the leftmost written bit
        e = 1'b0;
        for (int row = 0; row < 8; row++)
          if (row == i) e = r[7 - row];
        check(e, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
