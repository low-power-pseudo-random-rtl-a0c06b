// fx_div_tb: compares the saturating divider with a real-arithmetic quotient.
//
// Random dividends and divisors of several magnitudes (so that both normal
// and clipped quotients occur); the expected quotient is trunc(num/den*2^28)
// clipped to the 32-bit range, within 1 LSB, and sat must match whenever the
// real quotient is clearly inside or outside the range. Divide-by-zero cases
// are checked exactly.
module fx_div_tb;
  logic signed [31:0] num;
  logic signed [51:0] den;
  logic signed [31:0] quo;
  logic               sat;
  int checks = 0, failures = 0, n_sat = 0;

  fx_div #(.NW(32), .DW(52)) dut (.num(num), .den(den), .quo(quo), .sat(sat));

  task automatic check_one(input logic signed [31:0] n, input logic signed [51:0] d);
    real q, e;
    num = n; den = d;
    #1;
    checks++;
    if (d == 0) begin
      e = (n == 0) ? 0.0 : (n < 0 ? -2147483648.0 : 2147483647.0);
      if (real'(quo) != e || sat != (n != 0)) begin
        failures++; $display("FAIL div0 n=%0d quo=%0d sat=%0b", n, quo, sat);
      end
      return;
    end
    q = real'(n) / real'(d) * 268435456.0;
    e = (q < 0.0) ? -$floor(-q) : $floor(q);
    if (e > 2147483647.0) e = 2147483647.0;
    if (e < -2147483648.0) e = -2147483648.0;
    if ((real'(quo) - e) > 1.0 || (e - real'(quo)) > 1.0) begin
      failures++; $display("FAIL n=%0d d=%0d quo=%0d expected %f", n, d, quo, e);
    end
    if (q > 2147483650.0 || q < -2147483650.0) begin
      checks++; n_sat++;
      if (!sat) begin failures++; $display("FAIL sat missing n=%0d d=%0d", n, d); end
    end else if (q < 2147483000.0 && q > -2147483000.0) begin
      checks++;
      if (sat) begin failures++; $display("FAIL spurious sat n=%0d d=%0d", n, d); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'sd268435456, 52'sd0);
    check_one(-32'sd5, 52'sd0);
    check_one(32'sd0, 52'sd0);
    check_one(32'sd268435456, 52'sd536870912);     // 1/2
    if (quo != 32'sd134217728) begin failures++; $display("FAIL 1/2 = %0d", quo); end
    check_one(-32'sd268435456, 52'sd134217728);    // -1/0.5
    if (quo != -32'sd536870912) begin failures++; $display("FAIL -1/0.5 = %0d", quo); end
    for (int i = 0; i < 5000; i++) begin
      logic signed [51:0] d;
      d = 52'($signed({$urandom, $urandom}));
      d = d >>> (($urandom % 40) + 8);
      check_one($signed($urandom) >>> ($urandom % 8), d);
    end
    if (n_sat == 0) begin failures++; $display("FAIL no saturating case drawn"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
