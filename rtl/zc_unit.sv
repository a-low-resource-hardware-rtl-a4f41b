// zc_unit: zero-crossing count feature.
//
// For the two consecutive samples of a word the unit checks for a strict sign
// inversion (one positive and the other negative) and, in parallel, that the
// magnitude of their difference is at least EPS. The counter increments only
// when both hold, so that quantisation noise around zero is not counted. As in
// the reference datapath, the pair compared is the two samples of one word.
// clear restarts the count, counting a word presented with it.
//
// Timing: one word per cycle when valid is high; zc reflects all words up to
// the previous cycle. The threshold test is 'at least EPS'; with a strict
// sign inversion the difference is at least 2, so EPS = 1, the reference
// value, never rejects a crossing. The clear behaviour is chosen here.
module zc_unit
  import svm_pkg::*;
#(
  parameter int EPS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       valid,
  input  logic signed [SAMPLE_W-1:0] x1,
  input  logic signed [SAMPLE_W-1:0] x2,
  output feat_t                      zc
);

  logic signed [SAMPLE_W:0] diff;
  logic [SAMPLE_W:0]        diff_mag;
  logic                     sign_change, big_enough;
  feat_t                    cnt_q, base;

  always_comb begin
    diff        = {x1[SAMPLE_W-1], x1} - {x2[SAMPLE_W-1], x2};
    diff_mag    = diff[SAMPLE_W] ? (SAMPLE_W+1)'(-diff) : (SAMPLE_W+1)'(diff);
    sign_change = (x1 > 0 && x2 < 0) || (x1 < 0 && x2 > 0);
    big_enough  = int'(diff_mag) >= EPS;
    base        = clear ? '0 : cnt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  cnt_q <= '0;
    else if (valid && sign_change && big_enough) cnt_q <= base + 1'b1;
    else                                         cnt_q <= base;
  end

  assign zc = cnt_q;

endmodule
