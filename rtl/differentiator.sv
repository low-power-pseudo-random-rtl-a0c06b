// differentiator: discrete-time derivative over map iterations.
//
// d(n) = s(n) - s(n-1): a one-iteration delay register and a subtractor. The
// delay takes s when en is high (once per map iteration) and is cleared by
// reset and by clr (a new seed), so the first difference after a seed is s
// itself. The output is one bit wider than the input and never overflows.
//
// Timing: d is combinational from s and the delay register; the register
// updates on the rising clock edge when en is high.
//
// The delay-and-subtract structure is the reference design's; the zero
// initial content and the clear input are this design's choices.
module differentiator #(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic signed [W-1:0] s,
  output logic signed [W:0]   d
);
  logic signed [W-1:0] s_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s_prev <= '0;
    else if (clr)  s_prev <= '0;
    else if (en)   s_prev <= s;
  end

  always_comb d = (W+1)'(s) - (W+1)'(s_prev);
endmodule
