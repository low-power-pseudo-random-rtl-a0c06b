// x_update_tb: random y and r; x_next must equal the reference model
// exactly and lie within 4 LSB of cos(a)/(2 - cos^2(a)) evaluated in real
// arithmetic at the ROM sample angle a.
module x_update_tb;
  import plcm_ref_pkg::*;
  logic signed [31:0] y, x_next;
  logic [3:0]         r;
  int checks = 0, failures = 0;

  x_update dut (.y(y), .r(r), .x_next(x_next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, c, e;
    for (int i = 0; i < 3000; i++) begin
      y = $signed($urandom) >>> ($urandom % 5);
      r = 4'($urandom);
      #1;
      checks += 2;
      if (longint'(x_next) != ref_x_next(longint'(y), int'(r))) begin
        failures++; $display("FAIL y=%0d r=%0d x_next=%0d ref=%0d", y, r, x_next, ref_x_next(longint'(y), int'(r)));
      end
      a = 2.0 * 3.14159265358979323846 * ref_addr(longint'(y), int'(r)) / 1024.0;
      c = $cos(a);
      e = c / (2.0 - c * c) * 268435456.0;
      if ((real'(x_next) - e) > 4.0 || (e - real'(x_next)) > 4.0) begin
        failures++; $display("FAIL real y=%0d x_next=%0d expected %f", y, x_next, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
