// tb_ovo_voter: feeds random one-vs-one vote sets (one vote per class pair,
// for either class of the pair, with random gaps), asks for a decision and
// compares the label with a software argmax that gives ties to the lower
// class. Checks the 11-cycle decide-to-label latency and that clear empties
// the counters.
module tb_ovo_voter;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, vote_valid = 0, decide = 0;
  class_t vote_class = 0, label;
  logic label_valid, busy;
  int checks = 0, failures = 0;

  ovo_voter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [10];
  int ties = 0;

  task automatic round(int npairs, bit skewed);
    int best, lat, a, b, v;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    foreach (cnt[i]) cnt[i] = 0;
    a = 0; b = 1; v = 0;
    while (v < npairs) begin
      @(negedge clk);
      vote_valid = ($urandom_range(3) != 0);
      if (vote_valid) begin
        // skewed rounds favour the lower class of each pair
        vote_class = class_t'((skewed ? $urandom_range(3) != 0 : $urandom_range(1) == 0) ? a : b);
        cnt[vote_class]++;
        v++;
        b++;
        if (b == 10) begin a++; b = a + 1; end
      end
    end
    @(negedge clk);
    vote_valid = 0;
    decide = 1;
    best = 0;
    for (int i = 1; i < 10; i++) if (cnt[i] > cnt[best]) best = i;
    for (int i = 0; i < 10; i++) if (i != best && cnt[i] == cnt[best]) begin ties++; break; end
    @(negedge clk);
    decide = 0;
    lat = 1;
    while (!label_valid && lat < 50) begin @(negedge clk); lat++; end
    checks += 2;
    if (int'(label) != best) begin failures++; $display("label %0d expected %0d", label, best); end
    if (lat != 11) begin failures++; $display("scan latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) round(r < 5 ? $urandom_range(9, 1) : 45, r[0]);
    round(0, 0);   // no votes at all: class 0
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
