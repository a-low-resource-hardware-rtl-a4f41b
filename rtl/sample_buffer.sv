// sample_buffer: circular window buffer for the raw samples.
//
// Each address holds one 16-bit word per channel, each word two consecutive
// signed 8-bit samples ([7:0] the earlier one). With the default window of
// 1024 samples the buffer has 512 addresses; with two channels (drive end in
// bits [15:0], fan end in [31:16]) it is 2 KB, the size of the on-chip buffer
// of the reference design. The write address comes from the controller, which
// keeps the buffer circular, so the oldest word is the one overwritten.
//
// Timing: one write and one read per cycle; the read is synchronous, rd_data
// is valid the cycle after rd_en (block-RAM behaviour). Memory contents are
// not reset; the controller reads nothing before a full window was written.
module sample_buffer #(
  parameter int NUM_CH = 2,
  parameter int DEPTH  = 512,
  localparam int AW    = $clog2(DEPTH),
  localparam int DW    = NUM_CH * svm_pkg::WORD_W
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
