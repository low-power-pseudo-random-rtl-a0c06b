// x_update: the x equation of the practical lemniscate map.
//
//   x(n+1) = cos(2^r y(n)) / (2 - cos^2(2^r y(n)))
//
// The denominator 1 + sin^2 of the original map is rewritten with
// sin^2 + cos^2 = 1, so a single cosine LUT serves numerator and denominator.
// The angle 2^r*y goes through angle_scaler to a cosine trig_rom; the square is
// a multiply truncated back to FRAC_W fraction bits; the divider result lies
// in [-1, 1].
//
// Interface: y is Q(WORD-FRAC).FRAC, r is the control parameter, x_next is the
// next x. Purely combinational; the state register is in plcm_map.
//
// The equation and the single cosine LUT are the reference design's; the
// truncation of the square is this design's choice.
module x_update
  import lcm_pkg::*;
#(
  parameter int WORD_W = WORD,
  parameter int FRAC_W = FRAC,
  parameter int ADDR_W = ADDR,
  parameter int RW_W   = RW
) (
  input  logic signed [WORD_W-1:0] y,
  input  logic        [RW_W-1:0]   r,
  output logic signed [WORD_W-1:0] x_next
);
  logic        [ADDR_W-1:0]   addr;
  logic signed [WORD_W-1:0]   c;
  logic signed [2*WORD_W-1:0] c_sq_full;
  logic signed [WORD_W-1:0]   den;
  logic                       unused_sat;

  angle_scaler #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .SW(RW_W + 1)) u_ang (
    .v(y), .shift((RW_W+1)'(r)), .addr(addr)
  );

  trig_rom #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .FUNC(TRIG_COS)) u_cos (
    .addr(addr), .data(c)
  );

  always_comb begin
    c_sq_full = (2*WORD_W)'(c) * (2*WORD_W)'(c);
    den       = WORD_W'(TWO) - WORD_W'(c_sq_full >>> FRAC_W);
  end

  // den is in [1, 2], so the quotient never saturates.
  fx_div #(.NW(WORD_W), .DW(WORD_W), .WORD_W(WORD_W), .FRAC_W(FRAC_W)) u_div (
    .num(c), .den(den), .quo(x_next), .sat(unused_sat)
  );
endmodule
