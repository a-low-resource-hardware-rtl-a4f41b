// tb_svm_classifier: runs the classifier with a coefficient ROM of
// pseudo-random weights and biases and random feature vectors, and compares
// every vote with a software evaluation of the 45 decision values
// (f >= 0 votes class_a). Checks the latency of 9 cycles per pair for two
// channels (405 from start to done) and a one-channel build (5 per pair).
module tb_svm_classifier;
  import svm_pkg::*;

  // Weights of 18 bits, biases kept within +-2^33 so that the software sum
  // never leaves the 36-bit range for features below 2^10.
  function automatic coeff_rom_t random_image(int seed);
    coeff_rom_t r;
    logic [31:0] s;
    s = 32'(seed);
    for (int p = 0; p < N_PAIRS; p++) begin
      s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5);
      r[p].class_a = class_t'(s[3:0] % 10);
      r[p].class_b = class_t'(s[7:4] % 10);
      for (int j = 0; j < N_FEAT; j++) begin
        s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5);
        r[p].w[j] = weight_t'(s);
      end
      for (int c = 0; c < MAX_CH; c++) begin
        s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5);
        r[p].b[c] = acc_t'($signed(s)) <<< 1;
      end
    end
    return r;
  endfunction

  localparam coeff_rom_t IMG = random_image(777);

  logic clk = 0, rst_n = 0, start = 0, start1 = 0;
  feat_vec_t features = '0;
  logic rom_rd, rom_rd1, vote_valid, vote_valid1, done, done1, busy, busy1;
  logic [PAIR_W-1:0] rom_addr, rom_addr1;
  coeff_word_t rom_data, rom_data1;
  class_t vote_class, vote_class1;
  int checks = 0, failures = 0;

  coeff_rom #(.COEFFS(IMG)) rom (.clk, .rd_en(rom_rd), .addr(rom_addr), .data(rom_data));
  svm_classifier dut (.*);

  coeff_rom #(.COEFFS(IMG)) rom1 (.clk, .rd_en(rom_rd1), .addr(rom_addr1), .data(rom_data1));
  svm_classifier #(.NUM_CH(1)) dut1 (
    .clk, .rst_n, .start(start1), .features, .rom_rd(rom_rd1), .rom_addr(rom_addr1),
    .rom_data(rom_data1), .vote_valid(vote_valid1), .vote_class(vote_class1),
    .done(done1), .busy(busy1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  class_t exp2 [N_PAIRS], exp1 [N_PAIRS];
  int neg_votes = 0;

  task automatic model();
    longint f2, f1;
    for (int p = 0; p < N_PAIRS; p++) begin
      f1 = longint'(IMG[p].b[0]);
      for (int j = 0; j < 3; j++) f1 += longint'(IMG[p].w[j]) * longint'(features[j]);
      f2 = f1 + longint'(IMG[p].b[1]);
      for (int j = 3; j < 6; j++) f2 += longint'(IMG[p].w[j]) * longint'(features[j]);
      exp2[p] = (f2 >= 0) ? IMG[p].class_a : IMG[p].class_b;
      exp1[p] = (f1 >= 0) ? IMG[p].class_a : IMG[p].class_b;
      if (f2 < 0) neg_votes++;
    end
  endtask

  // Collects the vote stream of one instance and checks it and its timing.
  task automatic run(bit one_ch);
    int n, cyc, per_pair;
    per_pair = one_ch ? 5 : 9;
    n = 0;
    cyc = 0;
    @(negedge clk);
    if (one_ch) start1 = 1; else start = 1;
    @(negedge clk);
    start = 0; start1 = 0;
    cyc = 1;
    while (1) begin
      if (one_ch ? vote_valid1 : vote_valid) begin
        checks++;
        if ((one_ch ? vote_class1 : vote_class) != (one_ch ? exp1[n] : exp2[n])) begin
          failures++;
          $display("%0d-channel pair %0d: vote %0d expected %0d", one_ch ? 1 : 2, n,
                   one_ch ? vote_class1 : vote_class, one_ch ? exp1[n] : exp2[n]);
        end
        n++;
      end
      if (one_ch ? done1 : done) break;
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (n != N_PAIRS) begin failures++; $display("%0d votes", n); end
    if (cyc != per_pair * N_PAIRS + 1) begin
      failures++;
      $display("latency %0d expected %0d", cyc, per_pair * N_PAIRS + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      for (int j = 0; j < N_FEAT; j++) features[j] = feat_t'($urandom_range(t < 4 ? 1023 : 128));
      model();
      run(0);
      run(1);
    end
    checks++;
    if (neg_votes == 0) begin failures++; $display("no negative decision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
