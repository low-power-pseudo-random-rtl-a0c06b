// y_update_tb: random x, r, en and clr over many cycles. Each cycle y_next
// and sat must equal the reference model, which keeps its own copy of the
// previous sine sample. Saturating and non-saturating iterations must both
// occur.
module y_update_tb;
  import plcm_ref_pkg::*;
  logic               clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [31:0] x = 0, y_next;
  logic [3:0]         r = 4;
  logic               sat;
  longint             s_prev = 0, s_now, y_ref;
  bit                 sat_ref;
  int checks = 0, failures = 0, n_sat = 0, n_clr = 0;

  y_update dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .r(r), .y_next(y_next), .sat(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      x   = $signed($urandom) >>> (3 + $urandom % 3);
      r   = 4'($urandom % 12);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 100) == 0;
      #1;
      y_ref = ref_y_next(longint'(x), s_prev, int'(r), s_now, sat_ref);
      checks += 2;
      if (longint'(y_next) != y_ref) begin
        failures++; $display("FAIL x=%0d r=%0d y_next=%0d ref=%0d", x, r, y_next, y_ref);
      end
      if (sat != sat_ref) begin failures++; $display("FAIL sat"); end
      if (sat) n_sat++;
      if (clr) begin s_prev = 0; n_clr++; end
      else if (en) s_prev = s_now;
    end
    checks++;
    if (n_sat == 0 || n_clr == 0) begin failures++; $display("FAIL sat=%0d clr=%0d never seen", n_sat, n_clr); end
    $display("y_update_tb: %0d saturating iterations", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
