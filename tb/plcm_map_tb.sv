// plcm_map_tb: seeds the map several times (different x0, y0, r) and runs it
// with a random enable; after every clock x and y must equal the reference
// model exactly (one iteration per enabled cycle, state held otherwise).
module plcm_map_tb;
  import plcm_ref_pkg::*;
  logic               clk = 0, rst_n = 0, load = 0, en = 0;
  logic signed [31:0] x0 = 0, y0 = 0, x, y;
  logic [3:0]         r_in = 0, r;
  logic               sat;
  longint             mx = 0, my = 0, ms = 0, nx, ny, s_now;
  int                 mr = 4;
  bit                 sat_ref;
  int checks = 0, failures = 0, n_iter = 0, n_hold = 0;

  plcm_map dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .x0(x0), .y0(y0),
                .r_in(r_in), .x(x), .y(y), .r(r), .sat(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (x != 0 || y != 0 || r != 4) begin failures++; $display("FAIL reset state"); end
    for (int seed = 0; seed < 8; seed++) begin
      @(negedge clk);
      load = 1; en = 1;
      x0 = $signed($urandom) >>> 3;     // within [-1, 1)
      y0 = $signed($urandom) >>> 3;
      r_in = 4'(4 + seed);
      @(negedge clk);
      load = 0;
      mx = longint'(x0); my = longint'(y0); ms = 0; mr = int'(r_in);
      checks++;
      if (longint'(x) != mx || longint'(y) != my || int'(r) != mr) begin
        failures++; $display("FAIL load");
      end
      for (int i = 0; i < 500; i++) begin
        en = ($urandom % 5) != 0;
        nx = ref_x_next(my, mr);
        ny = ref_y_next(mx, ms, mr, s_now, sat_ref);
        #1;
        checks++;
        if (sat != sat_ref) begin failures++; $display("FAIL sat"); end
        @(negedge clk);
        if (en) begin mx = nx; my = ny; ms = s_now; n_iter++; end
        else n_hold++;
        checks++;
        if (longint'(x) != mx || longint'(y) != my) begin
          failures++;
          if (failures < 10) $display("FAIL seed %0d step %0d x=%0d/%0d y=%0d/%0d", seed, i, x, mx, y, my);
        end
      end
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("plcm_map_tb: %0d iterations, %0d held cycles", n_iter, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
