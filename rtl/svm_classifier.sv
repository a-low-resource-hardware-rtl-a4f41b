// svm_classifier: one-vs-one linear SVM evaluated with a single multiplier.
//
// For each of the 45 class pairs the unit fetches the pair's coefficient word
// and computes the decision value
//   f = sum_j w[j] * x[j] + sum_ch b[ch]
// over the 3*NUM_CH features, one 18 x 18 -> 36-bit product per cycle into a
// 36-bit accumulator, then one bias per cycle. In the last bias cycle the sign
// of f picks the vote: class_a when f >= 0, class_b otherwise. Because the
// normalisation is folded into the coefficients, the raw features are used.
//
// Per pair: 1 fetch + 3*NUM_CH multiply + NUM_CH bias cycles (9 for two
// channels, 405 for all pairs). start is accepted when idle; vote_valid and
// vote_class are registered and pulse once per pair; done pulses together
// with the last vote. The feature vector must stay stable while busy.
// One shared 18-bit multiplier and 36-bit decision values follow the
// reference design; the cycle schedule, the 36-bit accumulator (the reference
// lists an 18-bit adder) and the per-channel bias split are choices made here.
module svm_classifier
  import svm_pkg::*;
#(
  parameter int NUM_CH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  feat_vec_t         features,
  output logic              rom_rd,
  output logic [PAIR_W-1:0] rom_addr,
  input  coeff_word_t       rom_data,
  output logic              vote_valid,
  output class_t            vote_class,
  output logic              done,
  output logic              busy
);

  localparam int NF = FEATS_PER_CH * NUM_CH;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_MAC, S_BIAS} state_t;

  state_t            state_q;
  logic [PAIR_W-1:0] pair_q;
  logic [2:0]        j_q;
  logic              c_q;
  acc_t              acc_q, prod, sum;

  // The one shared multiplier and the accumulator adder.
  always_comb begin
    prod = acc_t'($signed(rom_data.w[j_q])) * acc_t'($signed({1'b0, features[j_q]}));
    sum  = acc_q + rom_data.b[c_q];
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                      start |-> state_q == S_IDLE);

  assign rom_rd   = (state_q == S_FETCH);
  assign rom_addr = pair_q;
  assign busy     = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      pair_q     <= '0;
      j_q        <= '0;
      c_q        <= 1'b0;
      acc_q      <= '0;
      vote_valid <= 1'b0;
      vote_class <= '0;
      done       <= 1'b0;
    end else begin
      vote_valid <= 1'b0;
      done       <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          pair_q  <= '0;
          state_q <= S_FETCH;
        end
        S_FETCH: begin
          j_q     <= '0;
          state_q <= S_MAC;
        end
        S_MAC: begin
          acc_q <= (j_q == 0) ? prod : acc_q + prod;
          if (int'(j_q) == NF - 1) begin
            c_q     <= 1'b0;
            state_q <= S_BIAS;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        S_BIAS: begin
          acc_q <= sum;
          if (int'(c_q) == NUM_CH - 1) begin
            vote_valid <= 1'b1;
            vote_class <= sum[ACC_W-1] ? rom_data.class_b : rom_data.class_a;
            if (int'(pair_q) == N_PAIRS - 1) begin
              done    <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              pair_q  <= pair_q + 1'b1;
              state_q <= S_FETCH;
            end
          end else begin
            c_q <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
