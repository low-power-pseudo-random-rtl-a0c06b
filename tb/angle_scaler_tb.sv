// angle_scaler_tb: checks the angle-to-address reduction against real math.
//
// For random Q4.28 inputs and shifts 0..16 the expected address is
// floor(frac(v * 2^shift / (2*pi)) * 1024) computed in double precision. A
// result one address away is accepted only when the real angle lies within
// 1e-4 turn of an address boundary (the 32-bit 1/(2*pi) constant may round
// across it). Also checks fixed cases: 0, pi/2 and -pi/2 radians.
module angle_scaler_tb;
  import lcm_pkg::*;
  logic signed [31:0] v;
  logic [4:0]         shift;
  logic [9:0]         addr;
  int checks = 0, failures = 0;

  angle_scaler dut (.v(v), .shift(shift), .addr(addr));

  task automatic check_one(input logic signed [31:0] vv, input int sh);
    real   turns, fr, pos;
    int    exp_a, diff;
    v = vv; shift = 5'(sh);
    #1;
    turns = (real'(vv) / (2.0 ** 28)) * (2.0 ** sh) / 6.283185307179586;
    fr    = turns - $floor(turns);
    pos   = fr * 1024.0;
    exp_a = int'($floor(pos)) % 1024;
    diff  = (int'(addr) - exp_a + 1024) % 1024;
    checks++;
    if (diff != 0) begin
      if (!((diff == 1 || diff == 1023) &&
            ((pos - $floor(pos)) < 0.1 || (pos - $floor(pos)) > 0.9))) begin
        failures++;
        $display("FAIL v=%0d shift=%0d addr=%0d expected=%0d", vv, sh, addr, exp_a);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // pi/2 rad -> quarter turn -> address 256; -pi/2 -> 768
    check_one(32'sd421657428, 0);
    if (addr != 10'd256 && addr != 10'd255) begin failures++; $display("FAIL pi/2 addr=%0d", addr); end
    check_one(-32'sd421657428, 0);
    if (addr != 10'd768 && addr != 10'd767) begin failures++; $display("FAIL -pi/2 addr=%0d", addr); end
    check_one(32'sd0, 7);
    if (addr != 10'd0) begin failures++; $display("FAIL zero addr=%0d", addr); end
    for (int i = 0; i < 4000; i++)
      check_one($signed($urandom) >>> ($urandom % 4), $urandom % 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
