// plcm_ref_pkg: reference model of the P-LCM generator for the testbenches.
//
// Written from the equations with 64-bit integer and real arithmetic, apart
// from the RTL: the sine/cosine samples come from $sin/$cos at run time, the
// angle reduction uses one 64-bit multiply, and the divisions use longint.
package plcm_ref_pkg;
  localparam int       FRAC_R  = 28;
  localparam int       ADDR_R  = 10;
  localparam longint   INV2PI  = 64'd683565276;       // 2^32/(2*pi)
  localparam longint   MAXW    = 64'sd2147483647;
  localparam longint   MINW    = -64'sd2147483648;
  localparam longint   SQ2     = 64'sd379625062;      // sqrt(2)*2^28

  // ROM address of sin/cos(2^shift * v), v in Q4.28.
  function automatic int unsigned ref_addr(longint v, int shift);
    longint p;
    p = v * INV2PI;                 // turns * 2^60
    p = p << shift;
    return int'((p >> (60 - ADDR_R)) & ((64'd1 << ADDR_R) - 1));
  endfunction

  function automatic longint ref_trig(int unsigned a, bit is_cos);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * a / (2.0 ** ADDR_R);
    return longint'($floor((is_cos ? $cos(ang) : $sin(ang)) * (2.0 ** FRAC_R) + 0.5));
  endfunction

  // Saturating fixed-point division, truncation toward zero.
  function automatic longint ref_div(longint num, longint den, output bit sat);
    longint q;
    sat = 0;
    if (den == 0) begin
      sat = (num != 0);
      return (num == 0) ? 0 : (num < 0 ? MINW : MAXW);
    end
    q = (num * (64'sd1 << FRAC_R)) / den;
    if (q > MAXW) begin sat = 1; return MAXW; end
    if (q < MINW) begin sat = 1; return MINW; end
    return q;
  endfunction

  function automatic longint ref_x_next(longint y, int r);
    longint c, den;
    bit     s;
    c   = ref_trig(ref_addr(y, r), 1'b1);
    den = (64'sd2 << FRAC_R) - ((c * c) >>> FRAC_R);
    return ref_div(c, den, s);
  endfunction

  // s_out is this iteration's sine sample, to be the delay for the next one.
  function automatic longint ref_y_next(longint x, longint s_prev, int r,
                                        output longint s_out, output bit sat);
    longint s, num, den;
    s     = ref_trig(ref_addr(x, r + 1), 1'b0);
    num   = (SQ2 * s) >>> FRAC_R;
    den   = (64'sd3 << (FRAC_R - 1)) - ((s - s_prev) * (64'sd1 << r));
    s_out = s;
    return ref_div(num, den, sat);
  endfunction
endpackage
