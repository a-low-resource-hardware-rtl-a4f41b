// tb_peak_unit: checks the peak-value feature against a software maximum of
// sample magnitudes, over random windows, the -128 corner and a word given
// together with clear.
module tb_peak_unit;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic signed [7:0] x1 = 0, x2 = 0;
  feat_t peak;
  int checks = 0, failures = 0;

  peak_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run_window(int n, int amp, bit force_min);
    int exp_peak;
    exp_peak = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      clear = (i == 0);
      valid = 1;
      x1 = 8'($signed($urandom_range(2 * amp, 0)) - amp);
      x2 = 8'($signed($urandom_range(2 * amp, 0)) - amp);
      if (force_min && i == n / 2) x2 = -8'sd128;
      if (mag(int'(x1)) > exp_peak) exp_peak = mag(int'(x1));
      if (mag(int'(x2)) > exp_peak) exp_peak = mag(int'(x2));
    end
    @(negedge clk);
    valid = 0;
    clear = 0;
    @(negedge clk);
    checks++;
    if (int'(peak) != exp_peak) begin
      failures++;
      $display("peak mismatch: got %0d expected %0d", peak, exp_peak);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_window(512, 127, 0);
    run_window(512, 20, 0);   // smaller peak: clear must drop the old one
    run_window(100, 50, 1);   // -128 gives 128
    for (int t = 0; t < 10; t++) run_window(1 + $urandom_range(60), $urandom_range(127, 1), 0);
    // valid low words are ignored
    @(negedge clk);
    clear = 1; valid = 1; x1 = 8'sd3; x2 = -8'sd4;
    @(negedge clk);
    clear = 0; valid = 0; x1 = 8'sd100; x2 = 8'sd100;
    @(negedge clk);
    checks++;
    if (peak != 4) begin failures++; $display("valid-low word counted: %0d", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
