// lcm_pkg: number format and constants shared by the P-LCM generator.
//
// All map values are 32-bit signed fixed point. The word length follows the
// 32-bit fixed-point format of the reference design; the split into 4 integer
// bits (sign included) and 28 fraction bits (Q4.28) is this design's choice:
// x stays in [-1, 1], y is clipped to [-8, 8).
package lcm_pkg;
  parameter int WORD = 32;   // word length
  parameter int FRAC = 28;   // fraction bits
  parameter int RW   = 4;    // width of the control parameter r
  parameter int ADDR = 10;   // address width of a sine/cosine ROM

  typedef logic signed [WORD-1:0] fx_t;

  // Which function a ROM holds.
  typedef enum logic {TRIG_SIN, TRIG_COS} trig_fn_e;

  // 1/(2*pi) as an unsigned Q0.32 constant: round(2^32 / (2*pi)).
  localparam logic [31:0] INV_2PI_Q32 = 32'd683565276;
  // sqrt(2) in Q4.28: round(sqrt(2) * 2^28).
  localparam fx_t SQRT2 = 32'sd379625062;
  // 0.5, 1.0, 1.5 and 2.0 in Q4.28.
  localparam fx_t ONE       = 32'sd268435456;
  localparam fx_t HALF      = 32'sd134217728;
  localparam fx_t ONE_HALF3 = 32'sd402653184;
  localparam fx_t TWO       = 32'sd536870912;
  // Default control parameter r after reset (smallest integer above 3).
  localparam logic [RW-1:0] R_RESET = 4'd4;
endpackage
