// tb_mav_unit: checks the mean-absolute-value feature (sum of magnitudes over
// 1024 samples, shifted right by 10) on random windows and on the all -128
// worst case, whose sum 2^17 must not overflow.
module tb_mav_unit;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic signed [7:0] x1 = 0, x2 = 0;
  feat_t mav;
  int checks = 0, failures = 0;

  mav_unit dut (.*);

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

  task automatic run_window(int amp, bit all_min);
    int sum;
    sum = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      clear = (i == 0);
      valid = 1;
      x1 = all_min ? -8'sd128 : 8'($signed($urandom_range(2 * amp, 0)) - amp);
      x2 = all_min ? -8'sd128 : 8'($signed($urandom_range(2 * amp, 0)) - amp);
      sum += mag(int'(x1)) + mag(int'(x2));
    end
    @(negedge clk);
    valid = 0;
    clear = 0;
    @(negedge clk);
    checks++;
    if (int'(mav) != (sum >> 10)) begin
      failures++;
      $display("mav mismatch: got %0d expected %0d", mav, sum >> 10);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_window(127, 0);
    run_window(127, 1);
    run_window(10, 0);
    for (int t = 0; t < 8; t++) run_window($urandom_range(127, 1), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
