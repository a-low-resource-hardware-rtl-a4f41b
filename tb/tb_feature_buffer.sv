// tb_feature_buffer: writes features for channel 0 and 1 in random order and
// checks the whole 6-entry vector after each write and after idle cycles.
module tb_feature_buffer;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [0:0] wr_ch = 0;
  feat_t peak = 0, mav = 0, zc = 0;
  feat_vec_t features, expected;
  int checks = 0, failures = 0;

  feature_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (features !== '0) begin failures++; $display("not cleared by reset"); end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (features !== expected) begin
        failures++;
        $display("vector mismatch at %0d: %h vs %h", i, features, expected);
      end
      wr_en = $urandom_range(1);
      wr_ch = 1'($urandom);
      peak = 18'($urandom); mav = 18'($urandom); zc = 18'($urandom);
      if (wr_en) begin
        expected[wr_ch*3 + 0] = peak;
        expected[wr_ch*3 + 1] = mav;
        expected[wr_ch*3 + 2] = zc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
