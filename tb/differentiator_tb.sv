// differentiator_tb: drives random samples with random en and occasional clr
// and checks d = s - (last sample taken with en), with the delay empty after
// reset and after clr.
module differentiator_tb;
  logic               clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [31:0] s = 0;
  logic signed [32:0] d;
  longint             prev = 0;
  int checks = 0, failures = 0, n_clr = 0, n_hold = 0;

  differentiator #(.W(32)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .s(s), .d(d));

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
      s   = $signed($urandom);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 50) == 0;
      #1;
      checks++;
      if (longint'(d) != longint'(s) - prev) begin
        failures++; $display("FAIL s=%0d d=%0d prev=%0d", s, d, prev);
      end
      if (clr) begin prev = 0; n_clr++; end
      else if (en) prev = longint'(s);
      else n_hold++;
    end
    checks++;
    if (n_clr == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
