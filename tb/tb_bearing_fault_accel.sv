// tb_bearing_fault_accel: end-to-end test of the accelerator at its default
// size (two channels, 1024-sample window, stride 16, default coefficients).
//
// The testbench writes synthetic vibration data in segments of different
// amplitude and zero-crossing rate, keeps its own history of every word, and
// at each window start works out the expected features (peak, MAV, ZC per
// channel) and the one-vs-one vote from the coefficient image. Every result is
// compared in label, feature vector and latency (1447 cycles from the start
// cycle). A write never lands on a word of a window that the feature pass has
// not read yet (the host rate is far below the clock in real use), so the
// model stays exact. The run must show: the first window after the initial
// fill, stride-started windows, windows deferred because the stride completed
// while busy, zero crossings counted, and more than one class reported.
module tb_bearing_fault_accel;
  import svm_pkg::*;

  localparam int WORDS = 512;
  localparam int LAT   = 1447;
  localparam coeff_rom_t ROM = default_coeffs();

  logic        clk = 0, rst_n = 0, wr_en = 0;
  logic [31:0] wr_data = 0;
  logic        result_valid, busy;
  class_t      result_label;
  feat_vec_t   features;
  int checks = 0, failures = 0;

  bearing_fault_accel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  function automatic int mag(int v);
    return v < 0 ? -v : v;
  endfunction

  logic [31:0] hist [$];
  class_t      exp_label [$];
  feat_vec_t   exp_feat [$];
  int          exp_start [$];

  function automatic feat_vec_t window_features();
    feat_vec_t f;
    int pk, sm, zc, a, b, n;
    n = hist.size();
    for (int ch = 0; ch < 2; ch++) begin
      pk = 0; sm = 0; zc = 0;
      for (int i = n - WORDS; i < n; i++) begin
        a = int'($signed(hist[i][ch*16 +: 8]));
        b = int'($signed(hist[i][ch*16 + 8 +: 8]));
        if (mag(a) > pk) pk = mag(a);
        if (mag(b) > pk) pk = mag(b);
        sm += mag(a) + mag(b);
        if (((a > 0 && b < 0) || (a < 0 && b > 0)) && mag(a - b) >= 1) zc++;
      end
      f[ch*3 + 0] = feat_t'(pk);
      f[ch*3 + 1] = feat_t'(sm >> 10);
      f[ch*3 + 2] = feat_t'(zc);
    end
    return f;
  endfunction

  function automatic class_t classify(feat_vec_t f);
    int votes [10];
    int best;
    longint d;
    foreach (votes[i]) votes[i] = 0;
    for (int p = 0; p < N_PAIRS; p++) begin
      d = longint'(ROM[p].b[0]) + longint'(ROM[p].b[1]);
      for (int j = 0; j < 6; j++) d += longint'(ROM[p].w[j]) * longint'(f[j]);
      if (d >= 0) votes[ROM[p].class_a]++;
      else        votes[ROM[p].class_b]++;
    end
    best = 0;
    for (int i = 1; i < 10; i++) if (votes[i] > votes[best]) best = i;
    return class_t'(best);
  endfunction

  // -------------------------------------------------------------- monitor
  int  cyc = 0, t_start = -100000, since = 0, n_results = 0;
  int  n_first = 0, n_stride = 0, n_deferred = 0, n_zc = 0;
  bit  busy_q = 0, stride_in_busy = 0;
  bit  seen [10];

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (busy && !busy_q) begin
      feat_vec_t f;
      t_start = cyc - 1;
      f = window_features();
      exp_feat.push_back(f);
      exp_label.push_back(classify(f));
      exp_start.push_back(t_start);
      if (f[2] != 0 || f[5] != 0) n_zc++;
      if (hist.size() == WORDS && n_first == 0) n_first++;
      else if (stride_in_busy) n_deferred++;
      else n_stride++;
      stride_in_busy = 0;
      since = 0;
    end
    busy_q = busy;
    if (result_valid) begin
      checks += 3;
      n_results++;
      if (exp_label.size() == 0) begin
        failures++;
        $display("result without a window");
      end else begin
        if (result_label != exp_label[0]) begin
          failures++;
          $display("window %0d: label %0d expected %0d", n_results, result_label, exp_label[0]);
        end
        if (features != exp_feat[0]) begin
          failures++;
          $display("window %0d: features %h expected %h", n_results, features, exp_feat[0]);
        end
        if (cyc - exp_start[0] != LAT) begin
          failures++;
          $display("window %0d: latency %0d expected %0d", n_results, cyc - exp_start[0], LAT);
        end
        seen[result_label] = 1;
        void'(exp_label.pop_front());
        void'(exp_feat.pop_front());
        void'(exp_start.pop_front());
      end
    end
    if (wr_en) begin
      hist.push_back(wr_data);
      since++;
      if (busy && since >= 8) stride_in_busy = 1;
    end
  end

  // --------------------------------------------------------------- driver
  int amp = 100, flip = 50;

  function automatic logic [7:0] gen_sample(ref int sgn);
    int m;
    if ($urandom_range(99) < flip) sgn = -sgn;
    m = $urandom_range(amp, 1);
    return 8'(sgn * m);
  endfunction

  int sgn0 = 1, sgn1 = 1;

  // Writes one word; waits first while a window's feature pass could still
  // read the word the write replaces.
  task automatic write_word(int gap);
    logic [7:0] s0, s1, s2, s3;
    while (busy && cyc - t_start < 2 * (WORDS + 2) + 4) @(posedge clk);
    s0 = gen_sample(sgn0); s1 = gen_sample(sgn0);
    s2 = gen_sample(sgn1); s3 = gen_sample(sgn1);
    @(posedge clk);
    #1 wr_en = 1;
    wr_data = {s3, s2, s1, s0};
    @(posedge clk);
    #1 wr_en = 0;
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    int amps [6] = '{100, 20, 127, 50, 8, 70};
    int flips[6] = '{50, 2, 90, 20, 70, 5};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < WORDS; i++) write_word(0);
    repeat (10) @(posedge clk);
    for (int s = 0; s < 6; s++) begin
      amp = amps[s];
      flip = flips[s];
      for (int i = 0; i < 160; i++) write_word(s % 2 == 0 ? 40 : 250);
    end
    repeat (3) @(posedge clk);
    wait (!busy);
    repeat (20) @(posedge clk);
    checks += 7;
    if (exp_label.size() != 0) begin failures++; $display("%0d windows without result", exp_label.size()); end
    if (n_first != 1)    begin failures++; $display("initial-fill window missing"); end
    if (n_stride == 0)   begin failures++; $display("no stride-started window"); end
    if (n_deferred == 0) begin failures++; $display("no deferred window"); end
    if (n_zc == 0)       begin failures++; $display("no zero crossing counted"); end
    begin
      int distinct = 0;
      foreach (seen[i]) distinct += seen[i];
      if (distinct < 2) begin failures++; $display("only one class reported"); end
      $display("windows %0d: first %0d stride %0d deferred %0d, with zero crossings %0d, classes seen %0d",
               n_results, n_first, n_stride, n_deferred, n_zc, distinct);
    end
    if (n_results != n_first + n_stride + n_deferred) begin failures++; $display("result count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
