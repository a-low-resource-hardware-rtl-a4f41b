// feature_extraction_unit: computes the three features of one channel window.
//
// Each 16-bit buffer word is split into two signed 8-bit samples, Input1 =
// data[7:0] (the earlier sample) and Input2 = data[15:8], and both go in the
// same cycle to the peak, mean-absolute-value and zero-crossing units. A
// window of 1024 samples therefore takes 512 cycles. The same unit serves the
// drive-end and the fan-end channel one after the other; the controller
// asserts clear with the first word of each window.
//
// Timing: the features are valid the cycle after the last word of a window
// was presented (valid high). The two-samples-per-cycle datapath follows the
// reference design; which byte holds the earlier sample is chosen here.
module feature_extraction_unit
  import svm_pkg::*;
#(
  parameter int SHIFT = 10,
  parameter int EPS   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [WORD_W-1:0] data,
  output feat_t             peak,
  output feat_t             mav,
  output feat_t             zc
);

  logic signed [SAMPLE_W-1:0] x1, x2;

  assign x1 = data[SAMPLE_W-1:0];
  assign x2 = data[WORD_W-1:SAMPLE_W];

  peak_unit u_peak (
    .clk, .rst_n, .clear, .valid, .x1, .x2, .peak
  );

  mav_unit #(.SHIFT(SHIFT)) u_mav (
    .clk, .rst_n, .clear, .valid, .x1, .x2, .mav
  );

  zc_unit #(.EPS(EPS)) u_zc (
    .clk, .rst_n, .clear, .valid, .x1, .x2, .zc
  );

endmodule
