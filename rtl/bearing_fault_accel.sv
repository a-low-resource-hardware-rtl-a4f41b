// bearing_fault_accel: bearing fault classifier for vibration windows.
//
// The host (or an ADC front end) writes packed 8-bit vibration samples into a
// circular 2 KB buffer: one 32-bit write carries two consecutive samples of
// the drive-end channel in [15:0] and two of the fan-end channel in [31:16]
// (earlier sample in the low byte of each half). Once a full window of 1024
// samples per channel is held, and then after every further 16 samples, the
// controller streams the window through the feature unit, once per channel,
// giving peak, mean absolute value and zero-crossing count per channel. A
// linear one-vs-one SVM with one multiplier evaluates the 45 class-pair
// decisions on these six features, and the voter reports the fault class
// (0..9) with the most votes.
//
// NUM_CH = 2 is the multi-variate build (drive end and fan end); NUM_CH = 1
// uses the drive end only and wr_data is then 16 bits wide. COEFFS
// holds the trained, normalisation-folded coefficients (see svm_pkg).
//
// Timing: result_valid pulses with result_label 1447 cycles (two channels) or
// 753 cycles (one channel) after the window started; busy is high meanwhile.
// features shows the last stored feature vector.
//
// The block structure, widths, window, stride and threshold follow the
// reference design. The plain write and result ports stand in for its host
// processor and bus, and the default coefficients are illustrative only.
module bearing_fault_accel
  import svm_pkg::*;
#(
  parameter int         NUM_CH = 2,
  parameter int         WINDOW = 1024,
  parameter int         STRIDE = 16,
  parameter int         EPS    = 1,
  parameter coeff_rom_t COEFFS = default_coeffs(),
  localparam int        DW     = NUM_CH * WORD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          result_valid,
  output class_t        result_label,
  output logic          busy,
  output feat_vec_t     features
);

  localparam int WORDS = WINDOW / 2;
  localparam int AW    = $clog2(WORDS);
  localparam int CHW   = $clog2(MAX_CH);

  logic [AW-1:0]     wr_addr, rd_addr;
  logic              rd_en, feu_valid, feu_clear, fb_wr_en;
  logic [CHW-1:0]    rd_ch, fb_wr_ch;
  logic [DW-1:0]     rd_data;
  logic [WORD_W-1:0] feu_data;
  feat_t             peak, mav, zc;
  logic              svm_start, svm_done;
  logic              rom_rd;
  logic [PAIR_W-1:0] rom_addr;
  coeff_word_t       rom_data;
  logic              vote_valid, vote_clear, vote_decide;
  class_t            vote_class;

  accel_controller #(.NUM_CH(NUM_CH), .WINDOW(WINDOW), .STRIDE(STRIDE)) u_ctrl (
    .clk, .rst_n,
    .wr_en, .wr_addr,
    .rd_en, .rd_addr, .rd_ch, .feu_valid, .feu_clear,
    .fb_wr_en, .fb_wr_ch,
    .svm_start, .svm_done,
    .vote_clear, .vote_decide, .label_valid(result_valid),
    .busy, .window_start()
  );

  sample_buffer #(.NUM_CH(NUM_CH), .DEPTH(WORDS)) u_buf (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data
  );

  assign feu_data = rd_data[int'(rd_ch)*WORD_W +: WORD_W];

  feature_extraction_unit #(.SHIFT($clog2(WINDOW)), .EPS(EPS)) u_feu (
    .clk, .rst_n, .clear(feu_clear), .valid(feu_valid), .data(feu_data),
    .peak, .mav, .zc
  );

  feature_buffer u_fbuf (
    .clk, .rst_n, .wr_en(fb_wr_en), .wr_ch(fb_wr_ch), .peak, .mav, .zc,
    .features
  );

  coeff_rom #(.COEFFS(COEFFS)) u_rom (
    .clk, .rd_en(rom_rd), .addr(rom_addr), .data(rom_data)
  );

  svm_classifier #(.NUM_CH(NUM_CH)) u_svm (
    .clk, .rst_n, .start(svm_start), .features,
    .rom_rd, .rom_addr, .rom_data,
    .vote_valid, .vote_class, .done(svm_done), .busy()
  );

  ovo_voter u_vote (
    .clk, .rst_n, .clear(vote_clear), .vote_valid, .vote_class,
    .decide(vote_decide), .label_valid(result_valid), .label(result_label),
    .busy()
  );

endmodule
