// threshold_unit_tb: checks d = (v > 0.5) at and around the threshold and
// for random signed values.
module threshold_unit_tb;
  logic signed [31:0] v;
  logic               d;
  int checks = 0, failures = 0;

  threshold_unit dut (.v(v), .d(d));

  task automatic check_one(input logic signed [31:0] vv);
    v = vv; #1;
    checks++;
    if (d != (real'(vv) / 268435456.0 > 0.5)) begin
      failures++; $display("FAIL v=%0d d=%0b", vv, d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'sd134217728);          // exactly 0.5 -> 0
    check_one(32'sd134217729);          // just above -> 1
    check_one(32'sd134217727);
    check_one(-32'sd134217729);         // -0.5 -> 0
    check_one(32'sh7fffffff);
    check_one(32'sh80000000);
    for (int i = 0; i < 2000; i++) check_one($signed($urandom) >>> ($urandom % 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
