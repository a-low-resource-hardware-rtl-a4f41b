// peak_unit: peak value feature, the largest sample magnitude in a window.
//
// Per input word the unit takes the magnitudes of its two samples, keeps the
// larger (one comparator and a multiplexer) and compares it with the running
// peak register, as in the reference datapath. clear starts a new window: when
// it is high the register restarts from zero, so a word presented together
// with clear is already counted. The peak is at most 128 and is given out
// zero-extended to the 18-bit feature width.
//
// Timing: one word per cycle when valid is high; peak reflects all words up
// to the previous cycle. The comparator structure follows the reference
// design; the clear behaviour and the 9-bit magnitude are choices made here.
module peak_unit
  import svm_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       valid,
  input  logic signed [SAMPLE_W-1:0] x1,
  input  logic signed [SAMPLE_W-1:0] x2,
  output feat_t                      peak
);

  logic [SAMPLE_W:0] a1, a2, amax, pv_q, base;

  always_comb begin
    a1   = abs_sample(x1);
    a2   = abs_sample(x2);
    amax = (a1 > a2) ? a1 : a2;
    base = clear ? '0 : pv_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    pv_q <= '0;
    else if (valid && amax > base) pv_q <= amax;
    else                           pv_q <= base;
  end

  assign peak = FEAT_W'(pv_q);

endmodule
