// tb_cm_news_grid -- random send patterns in all four directions; the
// expected receiver of each sender is found from its row and column.
module tb_cm_news_grid;
  logic [1:0] dir;
  logic [15:0] sv, sb, rv, rb;
  int checks = 0, failures = 0;

  cm_news_grid dut (.dir(dir), .send_val(sv), .send_bit(sb), .recv_val(rv), .recv_bit(rb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [15:0] ev, eb;
      dir = 2'(n % 4);
      sv = 16'($urandom); sb = 16'($urandom);
      ev = '0; eb = '0;
      for (int s = 0; s < 16; s++) begin
        int r, c, t;
        r = s / 4; c = s % 4;
        case (dir)
          0: r = (r == 0) ? 3 : r - 1;   // north
          1: c = (c == 3) ? 0 : c + 1;   // east
          2: r = (r == 3) ? 0 : r + 1;   // south
          3: c = (c == 0) ? 3 : c - 1;   // west
        endcase
        t = r * 4 + c;
        ev[t] = sv[s]; eb[t] = sb[s];
      end
      #1;
      checks++;
      if (rv !== ev || rb !== eb) begin
        failures++;
        $display("FAIL dir=%0d sv=%h sb=%h rv=%h/%h rb=%h/%h", dir, sv, sb, rv, ev, rb, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
