// mav_unit: mean absolute value feature.
//
// The magnitudes of the two samples of each word are zero-extended to the
// 18-bit internal width and added to an 18-bit accumulator (a three-input
// addition per cycle). The mean is the accumulator shifted right by SHIFT
// bits, 10 for the 1024-sample window, so no divider is needed. The largest
// possible sum, 1024 x 128 = 2^17, fits the accumulator read as unsigned.
// clear restarts the accumulation, counting a word presented with it.
//
// Timing: one word per cycle when valid is high; mav reflects all words up to
// the previous cycle. Accumulate-and-shift follows the reference design;
// reading the accumulator as unsigned (so 2^17 fits) and the clear behaviour
// are choices made here.
module mav_unit
  import svm_pkg::*;
#(
  parameter int SHIFT = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       valid,
  input  logic signed [SAMPLE_W-1:0] x1,
  input  logic signed [SAMPLE_W-1:0] x2,
  output feat_t                      mav
);

  feat_t acc_q, base, acc_d;

  always_comb begin
    base  = clear ? '0 : acc_q;
    acc_d = valid ? base + FEAT_W'(abs_sample(x1)) + FEAT_W'(abs_sample(x2)) : base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_q <= '0;
    else        acc_q <= acc_d;
  end

  assign mav = acc_q >> SHIFT;

endmodule
