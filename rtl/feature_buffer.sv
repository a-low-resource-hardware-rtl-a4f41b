// feature_buffer: holds the feature vector the classifier reads.
//
// When wr_en is high the three features of channel wr_ch (peak, MAV, ZC) are
// stored at vector positions wr_ch*3 + {0,1,2}. Positions of channels that are
// never written stay zero, so a single-channel build presents zeros in the
// fan-end slots. The vector is held while the classifier works through the
// class pairs, which lets the feature unit start on the next window.
//
// Timing: the vector shows a write from the next cycle on; reset clears it.
// The reference design only names a buffer memory beside the classifier; this
// register and the feature order (peak, MAV, ZC) are the reading chosen here.
module feature_buffer
  import svm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(MAX_CH)-1:0] wr_ch,
  input  feat_t                     peak,
  input  feat_t                     mav,
  input  feat_t                     zc,
  output feat_vec_t                 features
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      features <= '0;
    end else if (wr_en) begin
      features[int'(wr_ch)*FEATS_PER_CH + 0] <= peak;
      features[int'(wr_ch)*FEATS_PER_CH + 1] <= mav;
      features[int'(wr_ch)*FEATS_PER_CH + 2] <= zc;
    end
  end

endmodule
