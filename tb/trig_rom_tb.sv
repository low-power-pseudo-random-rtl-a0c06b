// trig_rom_tb: reads every entry of a sine ROM and a cosine ROM and compares
// it with sin/cos(2*pi*k/1024) * 2^28 from real arithmetic (tolerance 1 LSB),
// and checks a few landmarks exactly (sin 0, sin quarter, cos half turn).
module trig_rom_tb;
  import lcm_pkg::*;
  logic [9:0]         addr;
  logic signed [31:0] s, c;
  int checks = 0, failures = 0;

  trig_rom #(.FUNC(TRIG_SIN)) u_sin (.addr(addr), .data(s));
  trig_rom #(.FUNC(TRIG_COS)) u_cos (.addr(addr), .data(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, es, ec;
    for (int k = 0; k < 1024; k++) begin
      addr = 10'(k);
      #1;
      ang = 2.0 * 3.14159265358979323846 * k / 1024.0;
      es  = $sin(ang) * 268435456.0;
      ec  = $cos(ang) * 268435456.0;
      checks += 2;
      if ((real'(s) - es) > 1.0 || (es - real'(s)) > 1.0) begin
        failures++; $display("FAIL sin[%0d]=%0d expected %f", k, s, es);
      end
      if ((real'(c) - ec) > 1.0 || (ec - real'(c)) > 1.0) begin
        failures++; $display("FAIL cos[%0d]=%0d expected %f", k, c, ec);
      end
    end
    addr = 10'd0;   #1; checks++; if (s != 0 || c != 32'sd268435456) begin failures++; $display("FAIL addr0"); end
    addr = 10'd256; #1; checks++; if (s != 32'sd268435456) begin failures++; $display("FAIL sin quarter"); end
    addr = 10'd512; #1; checks++; if (c != -32'sd268435456) begin failures++; $display("FAIL cos half"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
