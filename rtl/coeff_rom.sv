// coeff_rom: coefficient read-only memory of the one-vs-one classifier.
//
// One 188-bit word per class pair (45 words, 8460 bits): the two class labels
// of the pair, six 18-bit normalisation-folded weights and two 36-bit biases
// (see svm_pkg). The contents are the COEFFS parameter, so on an FPGA the
// array maps to block RAM and in an ASIC it reduces to constants. The default
// image is the illustrative one of svm_pkg::default_coeffs(), not trained
// weights.
//
// Timing: synchronous read; data is valid the cycle after rd_en and holds
// until the next read. Addresses from 45 up return zero. The 8460-bit total
// and the widths follow the reference design; the field order inside a word
// and the pair order are choices made here.
module coeff_rom
  import svm_pkg::*;
#(
  parameter coeff_rom_t COEFFS = default_coeffs()
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [PAIR_W-1:0] addr,
  output coeff_word_t       data
);

  always_ff @(posedge clk) begin
    if (rd_en) data <= (int'(addr) < N_PAIRS) ? COEFFS[addr] : '0;
  end

endmodule
