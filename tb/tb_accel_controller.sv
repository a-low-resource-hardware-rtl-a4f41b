// tb_accel_controller: drives host writes into the controller, with small
// stand-ins for the classifier (done 406 cycles after start, as the real one)
// and the voter (label 11 cycles after decide), and checks per window:
// the start rule (full buffer and 8 new words since the last start, deferred
// while busy), the window base (oldest word, counting a write in the start
// cycle), the read address sequence per channel, clear with the first word,
// the feature latch per channel, one classifier start, decide right after
// done, and the 1447-cycle start-to-label latency.
module tb_accel_controller;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [8:0] wr_addr, rd_addr;
  logic rd_en, feu_valid, feu_clear, fb_wr_en, svm_start, svm_done = 0;
  logic vote_clear, vote_decide, label_valid = 0, busy, window_start;
  logic [0:0] rd_ch, fb_wr_ch;
  int checks = 0, failures = 0;

  accel_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("%s", msg);
  endtask

  // Stand-in classifier and voter.
  initial forever begin
    @(posedge clk);
    if (svm_start) begin
      repeat (405) @(posedge clk);
      #1 svm_done = 1;
      @(posedge clk);
      #1 svm_done = 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (vote_decide) begin
      repeat (10) @(posedge clk);
      #1 label_valid = 1;
      @(posedge clk);
      #1 label_valid = 0;
    end
  end

  task automatic finish_window();
    repeat (3) @(posedge clk);
    wait (!busy);
    repeat (5) @(posedge clk);
  endtask

  // Monitor, sampling in the middle of each cycle.
  int cyc = 0, nwr = 0, since = 0, base = 0, k = 0, ch = 0, t_start = 0;
  int n_rd [2], n_clear [2], n_latch [2], n_svm = 0, n_decide = 0, t_done = -10;
  int n_windows = 0, n_deferred = 0, n_wr_in_start = 0;
  bit in_window = 0, stride_while_busy = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (window_start) begin
      checks += 2;
      if (busy) fail("start while busy");
      if (nwr < 512 || since < 8) fail($sformatf("start with %0d words, %0d new", nwr, since));
      if (stride_while_busy) n_deferred++;
      if (wr_en) n_wr_in_start++;
      stride_while_busy = 0;
      base = (nwr + (wr_en ? 1 : 0)) % 512;
      since = wr_en ? 0 : -0;
      k = 0; ch = 0;
      n_rd = '{0, 0}; n_clear = '{0, 0}; n_latch = '{0, 0};
      n_svm = 0; n_decide = 0;
      t_start = cyc;
      in_window = 1;
      if (wr_en) since = -1;   // the start-cycle word belongs to this window
    end else if (!in_window) begin
      checks++;
      if (nwr >= 512 && since >= 8) fail($sformatf("no start at cycle %0d", cyc));
    end
    if (rd_en) begin
      checks++;
      if (int'(rd_addr) != (base + k) % 512)
        fail($sformatf("rd_addr %0d expected %0d", rd_addr, (base + k) % 512));
      n_rd[ch]++;
      k++;
      if (k == 512) begin k = 0; ch++; end
    end
    if (feu_clear) n_clear[rd_ch]++;
    if (feu_clear && !feu_valid) fail("clear without data");
    if (fb_wr_en) n_latch[fb_wr_ch]++;
    if (svm_start) n_svm++;
    if (svm_done) t_done = cyc;
    if (vote_decide) begin
      n_decide++;
      checks++;
      if (cyc != t_done + 1) fail("decide not right after done");
    end
    if (label_valid) begin
      checks += 9;
      if (n_rd[0] != 512 || n_rd[1] != 512) fail("read count");
      if (n_clear[0] != 1 || n_clear[1] != 1) fail("clear count");
      if (n_latch[0] != 1 || n_latch[1] != 1) fail("latch count");
      if (n_svm != 1) fail("classifier starts");
      if (n_decide != 1) fail("decides");
      if (cyc - t_start != 1447) fail($sformatf("latency %0d", cyc - t_start));
      if (!busy) fail("busy low before the label");
      if (!in_window) fail("label outside a window");
      checks++;
      n_windows++;
      in_window = 0;
    end
    if (wr_en) begin
      checks++;
      if (int'(wr_addr) != nwr % 512) fail("write address");
      nwr++;
      if (since < 8) since++;
      if (busy && since >= 8) stride_while_busy = 1;
    end
  end

  task automatic write_words(int n, int gap);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #1 wr_en = 1;
      @(posedge clk);
      #1 wr_en = 0;
      repeat (gap) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_words(511, 0);
    repeat (50) @(negedge clk);
    checks++;
    if (busy) fail("started before the window was full");
    write_words(1, 0);                       // window 1
    finish_window();
    write_words(7, 3);
    repeat (50) @(negedge clk);
    checks++;
    if (busy) fail("started after 7 new words");
    write_words(1, 0);                       // window 2
    repeat (1200) @(negedge clk);
    write_words(8, 2);                       // stride completes while busy
    finish_window();
    finish_window();                         // window 3 was deferred
    // a write in the start cycle: nine writes in a row, the ninth lands in it
    for (int i = 0; i < 9; i++) begin
      @(posedge clk); #1 wr_en = 1;
    end
    @(posedge clk); #1 wr_en = 0;
    finish_window();
    checks += 3;
    if (n_windows != 4) fail($sformatf("%0d windows", n_windows));
    if (n_deferred == 0) fail("no deferred start");
    if (n_wr_in_start == 0) fail("no write in a start cycle");
    $display("windows %0d deferred %0d start-cycle writes %0d", n_windows, n_deferred, n_wr_in_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
