// tb_cm_bitmem -- random instruction and host writes and reads of the
// 4096 x 1 cell memory, compared with a model array. Also checks that a read
// in the writing clock returns the old bit and that the host write wins a
// same-address collision.
module tb_cm_bitmem;
  logic clk = 0;
  logic [11:0] aa, ab, ha;
  logic ra, rb, hr, wea, wda, hwe, hwd;
  logic model [4096];
  int checks = 0, failures = 0;

  cm_bitmem dut (.clk(clk), .addr_a(aa), .addr_b(ab), .rd_a(ra), .rd_b(rb),
                 .we_a(wea), .wd_a(wda), .host_addr(ha), .host_we(hwe),
                 .host_wd(hwd), .host_rd(hr));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", w, got, exp); end
  endtask

  initial begin
    wea = 0; hwe = 0; aa = 0; ab = 0; ha = 0; wda = 0; hwd = 0;
    // fill through the host port
    for (int i = 0; i < 4096; i++) begin
      ha = 12'(i); hwd = 1'($urandom); hwe = 1; model[i] = hwd;
      @(posedge clk); #1;
    end
    hwe = 0;
    for (int n = 0; n < 5000; n++) begin
      aa = 12'($urandom); ab = 12'($urandom); ha = 12'($urandom);
      wea = 1'($urandom); wda = 1'($urandom);
      hwe = ($urandom % 4) == 0; hwd = 1'($urandom);
      if (n % 50 == 0) ha = aa;       // collision
      #1;
      chk(ra, model[aa], "rd_a");
      chk(rb, model[ab], "rd_b");
      chk(hr, model[ha], "host_rd");
      @(posedge clk); #1;
      if (wea) model[aa] = wda;
      if (hwe) model[ha] = hwd;
    end
    wea = 0; hwe = 0;
    for (int i = 0; i < 4096; i++) begin
      ha = 12'(i); #1; chk(hr, model[i], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
