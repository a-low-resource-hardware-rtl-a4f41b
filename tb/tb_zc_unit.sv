// tb_zc_unit: checks the zero-crossing count (strict sign inversion within a
// word and |x1 - x2| >= EPS) with the default EPS of 1 and with EPS = 4, on
// random small-amplitude data around zero.
module tb_zc_unit;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic signed [7:0] x1 = 0, x2 = 0;
  feat_t zc, zc4;
  int checks = 0, failures = 0;

  zc_unit dut (.*);
  zc_unit #(.EPS(4)) dut4 (.clk, .rst_n, .clear, .valid, .x1, .x2, .zc(zc4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit crosses(int a, int b, int eps);
    int d;
    d = a - b;
    if (d < 0) d = -d;
    return ((a > 0 && b < 0) || (a < 0 && b > 0)) && d >= eps;
  endfunction

  task automatic run_window(int n, int amp);
    int e1, e4;
    e1 = 0;
    e4 = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      clear = (i == 0);
      valid = ($urandom_range(3) != 0);
      x1 = 8'($signed($urandom_range(2 * amp, 0)) - amp);
      x2 = 8'($signed($urandom_range(2 * amp, 0)) - amp);
      if (i == 0) valid = 1;
      if (valid) begin
        e1 += crosses(int'(x1), int'(x2), 1);
        e4 += crosses(int'(x1), int'(x2), 4);
      end
    end
    @(negedge clk);
    valid = 0;
    clear = 0;
    @(negedge clk);
    checks += 2;
    if (int'(zc) != e1) begin failures++; $display("zc mismatch: %0d vs %0d", zc, e1); end
    if (int'(zc4) != e4) begin failures++; $display("zc eps4 mismatch: %0d vs %0d", zc4, e4); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_window(512, 2);
    run_window(512, 127);
    for (int t = 0; t < 10; t++) run_window(1 + $urandom_range(300), $urandom_range(6, 1));
    // explicit corner: 0 and a negative is no crossing, +1/-1 is
    @(negedge clk); clear = 1; valid = 1; x1 = 8'sd0; x2 = -8'sd5;
    @(negedge clk); clear = 0; x1 = 8'sd1; x2 = -8'sd1;
    @(negedge clk); x1 = -8'sd2; x2 = 8'sd2;
    @(negedge clk); valid = 0;
    @(negedge clk);
    checks += 2;
    if (zc != 2)  begin failures++; $display("corner zc %0d", zc); end
    if (zc4 != 1) begin failures++; $display("corner zc4 %0d", zc4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
