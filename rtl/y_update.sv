// y_update: the y equation of the practical lemniscate map.
//
//   s(n)     = sin(2*2^r x(n))
//   y(n+1)   = sqrt(2) s(n) / (1.5 - 2^r (s(n) - s(n-1)))
//
// The numerator 2*sqrt(2) sin(t) cos(t) of the original map is folded into
// sqrt(2) sin(2t), and the cos(2t) of the denominator is replaced by the
// time derivative of the same sine sequence, formed by a one-iteration delay
// and a subtractor. The whole equation therefore needs one sine LUT.
//
// Datapath: angle_scaler (shift r+1) -> sine trig_rom -> differentiator ->
// shift left by r -> subtract from 1.5 (held in DENW bits so it cannot
// overflow) -> fx_div with numerator sqrt(2)*s. The divisor can pass through
// zero, so the quotient saturates to the word range and sat reports it.
//
// Interface: x is Q(WORD-FRAC).FRAC; en advances the differentiator's delay
// once per map iteration; clr empties it on a new seed. y_next is
// combinational from x and the delay register.
//
// The equation (with the 2^r gain on the difference as the reference prints
// it) is the reference design's; widths, truncation and saturation are this
// design's choices.
module y_update
  import lcm_pkg::*;
#(
  parameter int WORD_W = WORD,
  parameter int FRAC_W = FRAC,
  parameter int ADDR_W = ADDR,
  parameter int RW_W   = RW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic signed [WORD_W-1:0] x,
  input  logic        [RW_W-1:0]   r,
  output logic signed [WORD_W-1:0] y_next,
  output logic                     sat
);
  localparam int DENW = WORD_W + (1 << RW_W) + 4;

  logic        [ADDR_W-1:0]   addr;
  logic signed [WORD_W-1:0]   s;
  logic signed [WORD_W:0]     ds;
  logic signed [DENW-1:0]     den;
  logic signed [2*WORD_W-1:0] num_full;
  logic signed [WORD_W-1:0]   num;

  angle_scaler #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .SW(RW_W + 1)) u_ang (
    .v(x), .shift((RW_W+1)'(r) + (RW_W+1)'(1)), .addr(addr)
  );

  trig_rom #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .FUNC(TRIG_SIN)) u_sin (
    .addr(addr), .data(s)
  );

  differentiator #(.W(WORD_W)) u_diff (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .s(s), .d(ds)
  );

  always_comb begin
    den      = DENW'(ONE_HALF3) - (DENW'(ds) <<< r);
    num_full = (2*WORD_W)'(SQRT2) * (2*WORD_W)'(s);
    num      = WORD_W'(num_full >>> FRAC_W);
  end

  fx_div #(.NW(WORD_W), .DW(DENW), .WORD_W(WORD_W), .FRAC_W(FRAC_W)) u_div (
    .num(num), .den(den), .quo(y_next), .sat(sat)
  );
endmodule
