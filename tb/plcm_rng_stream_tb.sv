// plcm_rng_stream_tb: draws one 1,000,000-bit sequence from the generator at
// its default parameters, the length a statistical randomness-test suite
// usually takes per sequence.
//
// Every bit is compared with the reference model (checks). Alongside, the
// testbench computes the simple statistics such a suite starts with: the
// fraction of ones with the frequency-test statistic |S_n|/sqrt(n), the
// number of runs and the longest run of ones. They are printed for
// information and decide nothing, since they measure the map and the
// threshold reading, not the correctness of the RTL. One bit per clock is
// checked: the sequence must take exactly 1,000,000 enabled cycles.
module plcm_rng_stream_tb;
  import plcm_ref_pkg::*;
  localparam int N = 1000000;

  logic               clk = 0, rst_n = 0, load = 0, en = 0;
  logic signed [31:0] x0, y0, x, y;
  logic [3:0]         r_in, r;
  logic               rn, rn_valid, d0, d1, sel, sat;

  longint mx, my, ms, nx, ny, s_now;
  bit     msel, sat_ref, e_rn, prev_bit;
  int     checks = 0, failures = 0, ones = 0, runs = 0, run_len = 0, longest = 0, cycles = 0;

  plcm_rng dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .x0(x0), .y0(y0), .r_in(r_in),
                .rn(rn), .rn_valid(rn_valid), .x(x), .y(y), .d0(d0), .d1(d1), .sel(sel),
                .r(r), .sat(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1; en = 1;
    x0 = 32'sd85899346;      // 0.32
    y0 = -32'sd187904819;    // -0.70
    r_in = 4'd4;
    @(negedge clk);
    load = 0;
    mx = longint'(x0); my = longint'(y0); ms = 0; msel = 0;
    for (int i = 0; i < N; i++) begin
      #1;
      e_rn = msel ? (my > 64'sd134217728) : (mx > 64'sd134217728);
      nx   = ref_x_next(my, 4);
      ny   = ref_y_next(mx, ms, 4, s_now, sat_ref);
      checks++;
      if (!rn_valid || rn != e_rn) begin
        failures++;
        if (failures < 10) $display("FAIL bit %0d rn=%0b expected %0b", i, rn, e_rn);
      end
      if (rn) ones++;
      if (i == 0 || rn != prev_bit) begin runs++; run_len = 0; end
      if (rn) begin run_len++; if (run_len > longest) longest = run_len; end
      prev_bit = rn;
      cycles++;
      @(negedge clk);
      mx = nx; my = ny; ms = s_now; msel = ~msel;
    end
    checks++;
    if (cycles != N) failures++;
    $display("stream: %0d bits in %0d cycles, ones %f, |S_n|/sqrt(n) = %f, runs %0d, longest run of ones %0d",
             N, cycles, real'(ones) / N, ((2.0 * ones - N) < 0 ? (N - 2.0 * ones) : (2.0 * ones - N)) / $sqrt(N),
             runs, longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
