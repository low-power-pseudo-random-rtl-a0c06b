// fx_div: signed fixed-point divider with saturation.
//
// quo = num / den for two signed values with FRAC_W fraction bits: the
// dividend is widened and shifted left by FRAC_W, divided (truncating toward
// zero) and clipped to the WORD_W-bit result range. A zero divisor gives the
// extreme of the dividend's sign, and 0/0 gives 0. sat flags a clipped result.
//
// Interface: num is NW bits, den is DW bits, quo is WORD_W bits; all share the
// binary point. Purely combinational.
//
// The two divisions are the reference equations'; the divider structure and the
// saturation rule are this design's choices.
module fx_div
  import lcm_pkg::*;
#(
  parameter int NW     = WORD,
  parameter int DW     = WORD + 20,
  parameter int WORD_W = WORD,
  parameter int FRAC_W = FRAC
) (
  input  logic signed [NW-1:0]     num,
  input  logic signed [DW-1:0]     den,
  output logic signed [WORD_W-1:0] quo,
  output logic                     sat
);
  localparam int QW = ((NW + FRAC_W) > DW ? (NW + FRAC_W) : DW) + 1;
  localparam logic signed [QW-1:0] QMAX = QW'({1'b0, {(WORD_W-1){1'b1}}});
  localparam logic signed [QW-1:0] QMIN = -QMAX - 1;

  logic signed [QW-1:0] n_ext, d_ext, q_full;

  always_comb begin
    n_ext  = QW'(num) <<< FRAC_W;
    d_ext  = QW'(den);
    q_full = '0;
    sat    = 1'b0;
    if (d_ext == '0) begin
      sat    = (num != '0);
      q_full = (num == '0) ? '0 : (num < 0 ? QMIN : QMAX);
    end else begin
      q_full = n_ext / d_ext;
      if (q_full > QMAX) begin
        q_full = QMAX;
        sat    = 1'b1;
      end else if (q_full < QMIN) begin
        q_full = QMIN;
        sat    = 1'b1;
      end
    end
    quo = WORD_W'(q_full);
  end
endmodule
