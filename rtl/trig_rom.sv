// trig_rom: look-up-table ROM holding one period of sine or cosine.
//
// Entry k holds round(f(2*pi*k/2^ADDR_W) * 2^FRAC_W) with f = sin or cos
// (FUNC), sign-extended to the word. The table is computed at elaboration, so
// no data file is needed. The read is asynchronous, like a distributed LUT
// ROM, so a map iteration fits in one clock.
//
// Interface: addr is the phase in 1/2^ADDR_W of a turn; data is Q(WORD-FRAC).FRAC.
//
// Sine and cosine LUT ROMs are the reference design's; the depth (1024), the
// rounding and the asynchronous read are this design's choices.
module trig_rom
  import lcm_pkg::*;
#(
  parameter int       WORD_W = WORD,
  parameter int       FRAC_W = FRAC,
  parameter int       ADDR_W = ADDR,
  parameter trig_fn_e FUNC   = TRIG_SIN
) (
  input  logic        [ADDR_W-1:0] addr,
  output logic signed [WORD_W-1:0] data
);
  localparam int DEPTH = 1 << ADDR_W;
  typedef logic signed [WORD_W-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t tab;
    real    ang;
    real    val;
    for (int k = 0; k < DEPTH; k++) begin
      ang = 6.283185307179586 * real'(k) / real'(DEPTH);
      val = (FUNC == TRIG_SIN) ? $sin(ang) : $cos(ang);
      tab[k] = WORD_W'($rtoi($floor(val * (2.0 ** FRAC_W) + 0.5)));
    end
    return tab;
  endfunction

  localparam table_t TABLE = make_table();

  always_comb data = TABLE[addr];
endmodule
