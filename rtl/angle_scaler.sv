// angle_scaler: turns a map variable into a sine/cosine ROM address.
//
// The map needs sin/cos of 2^r*v (and of 2*2^r*v). A LUT can only be indexed
// by the angle modulo 2*pi, so the unit multiplies v by the constant 1/(2*pi)
// and keeps the fractional turn. Multiplying by 2^shift is then a left shift
// of that product, and the wrap-around of two's complement arithmetic does the
// modulo for free, negative angles included. The top ADDR bits of the turn are
// the address (truncation, i.e. the ROM sample at or below the angle).
//
// Interface: v is signed Q(WORD-FRAC).FRAC; shift is r for 2^r*v and r+1 for
// 2*2^r*v. Purely combinational.
//
// The angle arguments are the reference equations'; reducing them through a
// 1/(2*pi) multiply and taking the address by truncation are this design's
// choices.
module angle_scaler
  import lcm_pkg::*;
#(
  parameter int WORD_W = WORD,
  parameter int FRAC_W = FRAC,
  parameter int ADDR_W = ADDR,
  parameter int SW     = RW + 1
) (
  input  logic signed [WORD_W-1:0] v,
  input  logic        [SW-1:0]     shift,
  output logic        [ADDR_W-1:0] addr
);
  localparam int PW = WORD_W + 33;          // product width
  localparam int TURN_MSB = FRAC_W + 32 - 1; // weight 2^-1 turn

  logic signed [PW-1:0] prod;

  always_comb begin
    prod = PW'(v) * PW'(signed'({1'b0, INV_2PI_Q32}));
    addr = ADDR_W'((prod << shift) >> (TURN_MSB + 1 - ADDR_W));
  end
endmodule
