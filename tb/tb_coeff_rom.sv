// tb_coeff_rom: reads all 45 words of a ROM built from a pseudo-random image
// and of the default ROM. The random image is checked word for word; the
// default image is checked for the class-pair order (0,1), (0,2) .. (8,9) and
// for the nearest-centroid form of its weights and biases, recomputed here
// from the centroid definition.
module tb_coeff_rom;
  import svm_pkg::*;

  function automatic coeff_rom_t random_image(int seed);
    coeff_rom_t r;
    logic [31:0] s;
    s = 32'(seed);
    for (int i = 0; i < $bits(coeff_rom_t) / 32 + 1; i++) begin
      s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5);
      for (int b = 0; b < 32; b++)
        if (i * 32 + b < $bits(coeff_rom_t)) r[(i * 32 + b) / $bits(coeff_word_t)][(i * 32 + b) % $bits(coeff_word_t)] = s[b];
    end
    return r;
  endfunction

  localparam coeff_rom_t IMG = random_image(12345);

  logic clk = 0, rd_en = 0;
  logic [PAIR_W-1:0] addr = 0;
  coeff_word_t data_r, data_d;
  int checks = 0, failures = 0;

  coeff_rom #(.COEFFS(IMG)) dut_r (.clk, .rd_en, .addr, .data(data_r));
  coeff_rom                 dut_d (.clk, .rd_en, .addr, .data(data_d));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cen(int c, int ch, int k);
    if (k == 0) return 20 + (c * 37) % 100 + 6 * ch;
    if (k == 1) return 4 + (c * 13) % 40 + 3 * ch;
    return 10 + (c * 71) % 300 + 20 * ch;
  endfunction

  initial begin
    int a, b, p;
    longint bias;
    a = 0; b = 1;
    for (p = 0; p < N_PAIRS; p++) begin
      @(negedge clk);
      rd_en = 1; addr = PAIR_W'(p);
      @(negedge clk);
      rd_en = 0; addr = PAIR_W'($urandom_range(44));   // must not disturb data
      @(negedge clk);
      checks++;
      if (data_r !== IMG[p]) begin failures++; $display("random image word %0d differs", p); end
      checks++;
      if (int'(data_d.class_a) != a || int'(data_d.class_b) != b) begin
        failures++;
        $display("pair %0d: classes %0d,%0d expected %0d,%0d", p, data_d.class_a, data_d.class_b, a, b);
      end
      for (int ch = 0; ch < 2; ch++) begin
        bias = 0;
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (int'(data_d.w[ch*3+k]) != 2 * (cen(a, ch, k) - cen(b, ch, k))) begin
            failures++; $display("pair %0d weight %0d wrong", p, ch*3+k);
          end
          bias += cen(b, ch, k) * cen(b, ch, k) - cen(a, ch, k) * cen(a, ch, k);
        end
        checks++;
        if (longint'(data_d.b[ch]) != bias) begin failures++; $display("pair %0d bias %0d wrong", p, ch); end
      end
      b++;
      if (b == N_CLASSES) begin a++; b = a + 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
