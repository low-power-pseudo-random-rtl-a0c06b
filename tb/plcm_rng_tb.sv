// plcm_rng_tb: end-to-end test of the random bit generator at its default
// parameters.
//
// Seeds the generator with several (x0, y0, r) triples and draws bits with a
// mostly-high, sometimes-low enable. A reference model (map, thresholds at
// 0.5, toggling select) predicts every bit and the map state; all must match
// exactly. It also checks the rate of one bit per enabled clock, and counts
// each mechanism of the design: seeding, stalls (en low), both select values,
// ones from each threshold, and saturating y divisions. Each must occur at
// least once. The fraction of ones per seed is reported.
module plcm_rng_tb;
  import plcm_ref_pkg::*;
  localparam int SEEDS = 6;
  localparam int BITS  = 20000;   // enabled cycles per seed

  logic               clk = 0, rst_n = 0, load = 0, en = 0;
  logic signed [31:0] x0 = 0, y0 = 0, x, y;
  logic [3:0]         r_in = 0, r;
  logic               rn, rn_valid, d0, d1, sel, sat;

  longint mx, my, ms, nx, ny, s_now;
  int     mr;
  bit     msel, sat_ref, e_d0, e_d1, e_rn;
  int checks = 0, failures = 0;
  int n_seed = 0, n_stall = 0, n_sel0 = 0, n_sel1 = 0, n_d0 = 0, n_d1 = 0, n_sat = 0;
  int n_bits = 0, n_en = 0, n_ones;

  plcm_rng dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .x0(x0), .y0(y0), .r_in(r_in),
                .rn(rn), .rn_valid(rn_valid), .x(x), .y(y), .d0(d0), .d1(d1), .sel(sel),
                .r(r), .sat(sat));

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (SEEDS * (BITS * 2 + 10) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1; #1;
    checks++;
    if (rn_valid) fail("rn_valid before any seed");
    for (int sd = 0; sd < SEEDS; sd++) begin
      @(negedge clk);
      load = 1; en = 1;
      x0   = $signed($urandom) >>> 3;
      y0   = $signed($urandom) >>> 3;
      r_in = 4'(4 + 2 * sd);
      #1;
      checks++;
      if (rn_valid) fail("rn_valid during load");
      @(negedge clk);
      load = 0; n_seed++;
      mx = longint'(x0); my = longint'(y0); ms = 0; mr = int'(r_in); msel = 0;
      n_ones = 0;
      for (int i = 0; i < BITS; ) begin
        en = ($urandom % 8) != 0;
        #1;
        e_d0 = (mx > 64'sd134217728);
        e_d1 = (my > 64'sd134217728);
        e_rn = msel ? e_d1 : e_d0;
        nx   = ref_x_next(my, mr);
        ny   = ref_y_next(mx, ms, mr, s_now, sat_ref);
        checks++;
        if (longint'(x) != mx || longint'(y) != my || int'(r) != mr)
          fail($sformatf("state seed %0d bit %0d", sd, i));
        checks++;
        if (rn_valid != en) fail("rn_valid != en");
        if (en) begin
          n_en++;
          checks++;
          if (rn != e_rn || d0 != e_d0 || d1 != e_d1 || sel != msel || sat != sat_ref)
            fail($sformatf("bit seed %0d bit %0d rn=%0b exp=%0b", sd, i, rn, e_rn));
          if (rn_valid) n_bits++;
          if (rn) n_ones++;
          if (msel) n_sel1++; else n_sel0++;
          if (e_d0) n_d0++;
          if (e_d1) n_d1++;
          if (sat_ref) n_sat++;
        end else n_stall++;
        @(negedge clk);
        if (en) begin
          mx = nx; my = ny; ms = s_now; msel = ~msel; i++;
        end
      end
      $display("seed %0d r=%0d: %0d bits, fraction of ones %f", sd, mr, BITS, real'(n_ones) / BITS);
    end
    // one bit per enabled clock
    checks++;
    if (n_bits != n_en || n_bits != SEEDS * BITS) fail($sformatf("rate: %0d bits in %0d enabled cycles", n_bits, n_en));
    $display("mechanisms: seeds=%0d stalls=%0d sel0=%0d sel1=%0d d0_ones=%0d d1_ones=%0d sat=%0d",
             n_seed, n_stall, n_sel0, n_sel1, n_d0, n_d1, n_sat);
    checks++;
    if (n_seed < 2 || n_stall == 0 || n_sel0 == 0 || n_sel1 == 0 || n_d0 == 0 || n_d1 == 0 || n_sat == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
