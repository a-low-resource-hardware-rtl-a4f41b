// ovo_voter: one-vs-one voting, the class with the most pair wins.
//
// Ten 4-bit vote counters (a class takes part in nine pairs) are cleared with
// clear and incremented by vote_valid for vote_class. decide starts a scan of
// the counters with one comparator, one class per cycle from class 0 up; a
// later class replaces the best so far only with strictly more votes, so a
// tie goes to the lowest class number. The label is one of the ten fault
// classes of the data set (0..9).
//
// Timing: label_valid pulses 11 cycles after decide (10 scan cycles); label
// holds until the next scan ends. busy is high while scanning. Max-wins
// one-vs-one voting is the reference scheme; the sequential scan and the tie
// rule are choices made here.
module ovo_voter
  import svm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   vote_valid,
  input  class_t vote_class,
  input  logic   decide,
  output logic   label_valid,
  output class_t label,
  output logic   busy
);

  logic [CLS_W-1:0] votes_q [N_CLASSES];
  logic             scan_q;
  class_t           idx_q, best_q;
  logic [CLS_W-1:0] best_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CLASSES; i++) votes_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N_CLASSES; i++) votes_q[i] <= '0;
    end else if (vote_valid && int'(vote_class) < N_CLASSES) begin
      votes_q[vote_class] <= votes_q[vote_class] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_q      <= 1'b0;
      idx_q       <= '0;
      best_q      <= '0;
      best_cnt_q  <= '0;
      label_valid <= 1'b0;
      label       <= '0;
    end else begin
      label_valid <= 1'b0;
      if (!scan_q) begin
        if (decide) begin
          scan_q <= 1'b1;
          idx_q  <= '0;
        end
      end else begin
        if (idx_q == 0 || votes_q[idx_q] > best_cnt_q) begin
          best_q     <= idx_q;
          best_cnt_q <= votes_q[idx_q];
        end
        if (int'(idx_q) == N_CLASSES - 1) begin
          scan_q      <= 1'b0;
          label_valid <= 1'b1;
          label       <= (votes_q[idx_q] > best_cnt_q) ? idx_q : best_q;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

  a_no_vote_while_scanning: assert property (@(posedge clk) disable iff (!rst_n)
                                             (vote_valid || decide) |-> !scan_q);

  assign busy = scan_q;

endmodule
