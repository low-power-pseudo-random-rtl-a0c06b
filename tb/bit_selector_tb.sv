// bit_selector_tb: random d0/d1/en/clr; checks that sel alternates on every
// bit taken, restarts at 0 on clr and that rn follows d0 when sel=0 and d1
// when sel=1.
module bit_selector_tb;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, d0 = 0, d1 = 0, sel, rn;
  bit   exp_sel = 0;
  int checks = 0, failures = 0, n0 = 0, n1 = 0;

  bit_selector dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d0(d0), .d1(d1), .sel(sel), .rn(rn));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d0 = 1'($urandom); d1 = 1'($urandom);
      en = ($urandom % 3) != 0;
      clr = ($urandom % 64) == 0;
      #1;
      checks += 2;
      if (sel != exp_sel) begin failures++; $display("FAIL sel=%0b exp=%0b", sel, exp_sel); end
      if (rn != (exp_sel ? d1 : d0)) begin failures++; $display("FAIL rn"); end
      if (exp_sel) n1++; else n0++;
      if (clr) exp_sel = 0;
      else if (en) exp_sel = ~exp_sel;
    end
    checks++;
    if (n0 == 0 || n1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
