// threshold_unit: relational comparison of a map output with 0.5.
//
// d = 1 when the signed fixed-point input is strictly greater than THRESH
// (0.5 by default), else 0. Purely combinational.
//
// The comparison with 0.5 is the reference design's; reading it as a signed
// compare of the whole value, strictly greater, is this design's choice.
module threshold_unit
  import lcm_pkg::*;
#(
  parameter int                     WORD_W = WORD,
  parameter logic signed [WORD-1:0] THRESH = HALF
) (
  input  logic signed [WORD_W-1:0] v,
  output logic                     d
);
  always_comb d = (v > WORD_W'(THRESH));
endmodule
