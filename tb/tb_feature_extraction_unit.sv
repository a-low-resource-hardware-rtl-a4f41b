// tb_feature_extraction_unit: streams 512-word windows (1024 samples, low
// byte first) into the unit and compares peak, MAV and ZC with a software
// model, including back-to-back windows separated only by clear.
module tb_feature_extraction_unit;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [15:0] data = 0;
  feat_t peak, mav, zc;
  int checks = 0, failures = 0;

  feature_extraction_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag(int v);
    return v < 0 ? -v : v;
  endfunction

  int ep, es, ez;

  task automatic check_features();
    checks += 3;
    if (int'(peak) != ep)      begin failures++; $display("peak %0d vs %0d", peak, ep); end
    if (int'(mav) != es >> 10) begin failures++; $display("mav %0d vs %0d", mav, es >> 10); end
    if (int'(zc) != ez)        begin failures++; $display("zc %0d vs %0d", zc, ez); end
  endtask

  task automatic feed_window(int amp);
    int a, b;
    ep = 0; es = 0; ez = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      clear = (i == 0);
      valid = 1;
      a = $urandom_range(2 * amp, 0) - amp;
      b = $urandom_range(2 * amp, 0) - amp;
      data = {8'(b), 8'(a)};
      ep = mag(a) > ep ? mag(a) : ep;
      ep = mag(b) > ep ? mag(b) : ep;
      es += mag(a) + mag(b);
      if (((a > 0 && b < 0) || (a < 0 && b > 0)) && mag(a - b) >= 1) ez++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      feed_window(w == 0 ? 127 : $urandom_range(128, 1));
      @(negedge clk);
      valid = 0;
      clear = 0;
      check_features();
    end
    // back-to-back: next window starts in the cycle the last one is visible
    feed_window(60);
    feed_window(5);
    @(negedge clk);
    valid = 0;
    clear = 0;
    check_features();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
