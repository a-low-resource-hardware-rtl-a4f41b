// accel_controller: sequences the accelerator over sliding windows.
//
// Buffer side: every host write goes to the circular head address, which then
// advances. The controller counts writes until the buffer holds a full window
// (WINDOW samples per channel, WINDOW/2 words) and then counts the words
// written since the last window started. A new window starts when the
// sequencer is idle, the buffer is full and at least STRIDE new samples
// (STRIDE/2 words) arrived; a stride that completes while a window is being
// processed starts the next one as soon as the sequencer is idle again. The
// window starts at the oldest word; a write in the start cycle is included.
//
// The window size, the stride and starting once a full window is held come
// from the reference design; the sequencing, the deferred start and all
// handshakes are this design's own.
//
// Sequence per window: clear the votes; for each channel stream the WINDOW/2
// words through the feature unit (clear with the first word), wait one cycle
// and store the three features; start the classifier and wait for done; start
// the vote scan and wait for the label. With two channels, the default, a
// window takes 1447 cycles from the start cycle to label_valid:
// 2*(512+2) feature cycles, 1 classifier start, 405 classifier cycles,
// 1 decide, 10 scan cycles.
//
// Reads are synchronous: rd_en in cycle t gives data in t+1, when feu_valid
// and feu_clear (registered) are presented with the word.
//
// Host writes are never stalled. A write during a window replaces the
// window's oldest remaining word, which is safe only once the last channel's
// pass has read it; an assertion flags a write that comes too early. At the
// sensor rates this design targets (a word every few thousand cycles) it
// cannot happen.
module accel_controller
  import svm_pkg::*;
#(
  parameter int NUM_CH = 2,
  parameter int WINDOW = 1024,
  parameter int STRIDE = 16,
  localparam int WORDS = WINDOW / 2,
  localparam int AW    = $clog2(WORDS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host write side
  input  logic                      wr_en,
  output logic [AW-1:0]             wr_addr,
  // buffer read and feature unit
  output logic                      rd_en,
  output logic [AW-1:0]             rd_addr,
  output logic [$clog2(MAX_CH)-1:0] rd_ch,
  output logic                      feu_valid,
  output logic                      feu_clear,
  output logic                      fb_wr_en,
  output logic [$clog2(MAX_CH)-1:0] fb_wr_ch,
  // classifier and voter
  output logic                      svm_start,
  input  logic                      svm_done,
  output logic                      vote_clear,
  output logic                      vote_decide,
  input  logic                      label_valid,
  // status
  output logic                      busy,
  output logic                      window_start
);

  localparam int STRIDE_WORDS = STRIDE / 2;

  typedef enum logic [2:0] {
    C_IDLE, C_READ, C_WAIT, C_LATCH, C_SVM, C_SVM_WAIT, C_VOTE_WAIT
  } cstate_t;

  cstate_t                   state_q;
  logic [AW-1:0]             head_q, base_q, k_q;
  logic [AW:0]               fill_q;
  logic [AW:0]               since_q;
  logic                      full, start;
  logic [$clog2(MAX_CH)-1:0] ch_q;

  assign full    = (int'(fill_q) >= WORDS);
  assign start   = (state_q == C_IDLE) && full && (int'(since_q) >= STRIDE_WORDS);
  assign wr_addr = head_q;

  // Host side: head pointer, fill level and words since the last start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      fill_q  <= '0;
      since_q <= '0;
    end else begin
      if (wr_en) begin
        head_q <= head_q + 1'b1;
        if (!full) fill_q <= fill_q + 1'b1;
      end
      if (start)                                   since_q <= '0;
      else if (wr_en && int'(since_q) < STRIDE_WORDS) since_q <= since_q + 1'b1;
    end
  end

  // Sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= C_IDLE;
      base_q       <= '0;
      k_q          <= '0;
      ch_q         <= '0;
      feu_valid    <= 1'b0;
      feu_clear    <= 1'b0;
      rd_ch        <= '0;
    end else begin
      feu_valid <= rd_en;
      feu_clear <= rd_en && (k_q == 0);
      rd_ch     <= ch_q;
      case (state_q)
        C_IDLE: if (start) begin
          base_q  <= wr_en ? head_q + 1'b1 : head_q;
          k_q     <= '0;
          ch_q    <= '0;
          state_q <= C_READ;
        end
        C_READ: begin
          k_q <= k_q + 1'b1;
          if (int'(k_q) == WORDS - 1) state_q <= C_WAIT;
        end
        C_WAIT:  state_q <= C_LATCH;
        C_LATCH: begin
          if (int'(ch_q) == NUM_CH - 1) begin
            state_q <= C_SVM;
          end else begin
            ch_q    <= ch_q + 1'b1;
            state_q <= C_READ;
          end
        end
        C_SVM:       state_q <= C_SVM_WAIT;
        C_SVM_WAIT:  if (svm_done) state_q <= C_VOTE_WAIT;
        C_VOTE_WAIT: if (label_valid) state_q <= C_IDLE;
        default:     state_q <= C_IDLE;
      endcase
    end
  end

  // Decide is issued in the first C_VOTE_WAIT cycle (right after svm_done).
  logic decide_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) decide_q <= 1'b0;
    else        decide_q <= (state_q == C_SVM_WAIT) && svm_done;
  end

  // Handshake rules and the write-rate rule.
  logic          reads_done, write_safe;
  logic [AW-1:0] wr_offset;

  assign wr_offset  = head_q - base_q;
  assign reads_done = (state_q inside {C_SVM, C_SVM_WAIT, C_VOTE_WAIT}) ||
                      ((state_q inside {C_WAIT, C_LATCH}) && int'(ch_q) == NUM_CH - 1);
  assign write_safe = (state_q == C_IDLE) || reads_done ||
                      (state_q == C_READ && int'(ch_q) == NUM_CH - 1 && k_q >= wr_offset);

  a_write_safe: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> write_safe)
    else $error("write replaces a word the running window has not read yet");
  a_done_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                        svm_done |-> state_q == C_SVM_WAIT);
  a_label_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                         label_valid |-> state_q == C_VOTE_WAIT);

  assign rd_en        = (state_q == C_READ);
  assign rd_addr      = base_q + k_q;
  assign fb_wr_en     = (state_q == C_LATCH);
  assign fb_wr_ch     = ch_q;
  assign svm_start    = (state_q == C_SVM);
  assign vote_clear   = start;
  assign vote_decide  = decide_q;
  assign busy         = (state_q != C_IDLE);
  assign window_start = start;

endmodule
