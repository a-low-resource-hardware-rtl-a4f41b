// tb_sample_buffer: writes random words to random addresses, keeps a shadow
// copy and checks every read one cycle after rd_en, including a read and a
// write of the same address in one cycle (the old word is returned) and that
// rd_data holds while rd_en is low.
module tb_sample_buffer;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [31:0] shadow [512];
  bit   [511:0] written = '0;
  int checks = 0, failures = 0;

  sample_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expect_q;
  bit          expect_v = 0;

  initial begin
    // fill every address
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 9'(a); wr_data = $urandom;
      shadow[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    // random mix of reads and writes
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("read mismatch at step %0d: %h vs %h", i, rd_data, expect_q);
        end
      end
      rd_en   = ($urandom_range(3) != 0);
      rd_addr = 9'($urandom);
      wr_en   = $urandom_range(1);
      wr_addr = ($urandom_range(7) == 0) ? rd_addr : 9'($urandom);
      wr_data = $urandom;
      if (rd_en) begin
        expect_q = shadow[rd_addr];
        expect_v = 1;
      end
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
