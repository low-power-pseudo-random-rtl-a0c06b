// plcm_rng: pseudo-random bit generator built on the practical lemniscate map.
//
// The P-LCM map (plcm_map) produces x(n), y(n). Two threshold units turn them
// into bits d0 = (x > 0.5) and d1 = (y > 0.5), and a multiplexer whose select
// toggles every bit (bit_selector) picks one of them as the output rn.
//
// Interface: pulse load with x0, y0 (Q4.28, in [-1, 1]) and r_in to seed the
// generator. While en is high, every clock yields one bit: rn and rn_valid are
// valid in that cycle, and on the rising edge the map iterates and sel
// toggles. With en low the state is held. x, y, r, d0, d1, sel and sat (the y
// division clips this iteration) are brought out for observation. rn_valid = en, once a seed has been loaded, and not during
// load.
//
// The structure (map, two thresholds at 0.5, multiplexer) is the reference
// design's; the seeding interface and rn_valid are this design's choices.
module plcm_rng
  import lcm_pkg::*;
#(
  parameter int WORD_W = WORD,
  parameter int FRAC_W = FRAC,
  parameter int ADDR_W = ADDR,
  parameter int RW_W   = RW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     en,
  input  logic signed [WORD_W-1:0] x0,
  input  logic signed [WORD_W-1:0] y0,
  input  logic        [RW_W-1:0]   r_in,
  output logic                     rn,
  output logic                     rn_valid,
  output logic signed [WORD_W-1:0] x,
  output logic signed [WORD_W-1:0] y,
  output logic                     d0,
  output logic                     d1,
  output logic                     sel,
  output logic        [RW_W-1:0]   r,
  output logic                     sat
);
  logic seeded;
  logic step;

  assign step = en && !load;

  plcm_map #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .RW_W(RW_W)) u_map (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en),
    .x0(x0), .y0(y0), .r_in(r_in), .x(x), .y(y), .r(r), .sat(sat)
  );

  threshold_unit #(.WORD_W(WORD_W)) u_thr_x (.v(x), .d(d0));
  threshold_unit #(.WORD_W(WORD_W)) u_thr_y (.v(y), .d(d1));

  bit_selector u_sel (
    .clk(clk), .rst_n(rst_n), .clr(load), .en(step),
    .d0(d0), .d1(d1), .sel(sel), .rn(rn)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    seeded <= 1'b0;
    else if (load) seeded <= 1'b1;
  end

  assign rn_valid = seeded && step;
endmodule
