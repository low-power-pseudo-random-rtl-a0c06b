// bit_selector: output multiplexer of the random bit generator.
//
// rn = sel ? d1 : d0. sel is a toggle flip-flop that changes after every bit
// taken (en high), so the output alternates between the x threshold (d0) and
// the y threshold (d1). clr restarts the sequence with sel = 0.
//
// Timing: rn is combinational from d0, d1 and the sel register; sel updates on
// the rising edge.
//
// The multiplexer with a sel input is the reference design's; generating sel
// with a toggle flip-flop, as the alternating select of its waveform suggests,
// is this design's choice.
module bit_selector (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic d0,
  input  logic d1,
  output logic sel,
  output logic rn
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sel <= 1'b0;
    else if (clr) sel <= 1'b0;
    else if (en)  sel <= ~sel;
  end

  always_comb rn = sel ? d1 : d0;
endmodule
