// plcm_map: practical lemniscate chaotic map (P-LCM) with its state.
//
// Holds x(n), y(n) and the control parameter r. A load strobe takes a seed
// (x0, y0 in [-1, 1], r); each cycle with en high performs one iteration,
// x <= x_update(y), y <= y_update(x), both from the old state. The
// differentiator inside y_update advances with the same en and is emptied by
// load. load has priority over en.
//
// Timing: one iteration per enabled clock; x, y are registered outputs. sat is
// combinational and tells that the y division of the current iteration clips.
// An assertion checks that every iterated x stays in [-1, 1].
//
// The equations and the two-LUT structure are the reference design's; the
// load/enable interface, reset values and one-cycle iteration are this
// design's choices.
module plcm_map
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
  output logic signed [WORD_W-1:0] x,
  output logic signed [WORD_W-1:0] y,
  output logic        [RW_W-1:0]   r,
  output logic                     sat
);
  logic signed [WORD_W-1:0] x_next, y_next;
  logic                     step;

  assign step = en && !load;

  x_update #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .RW_W(RW_W)) u_x (
    .y(y), .r(r), .x_next(x_next)
  );

  y_update #(.WORD_W(WORD_W), .FRAC_W(FRAC_W), .ADDR_W(ADDR_W), .RW_W(RW_W)) u_y (
    .clk(clk), .rst_n(rst_n), .clr(load), .en(step),
    .x(x), .r(r), .y_next(y_next), .sat(sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
      r <= RW_W'(R_RESET);
    end else if (load) begin
      x <= x0;
      y <= y0;
      r <= r_in;
    end else if (en) begin
      x <= x_next;
      y <= y_next;
    end
  end

  // x(n+1) = c / (2 - c^2) with |c| <= 1 can never leave [-1, 1].
  a_x_range: assert property (@(posedge clk) disable iff (!rst_n)
                              (en && !load) |=> (x <= ONE && x >= -ONE))
    else $error("plcm_map: x left [-1, 1]");
endmodule
