// Testbench for prbs35_chk: a testbench-side bit-serial PRBS35 source feeds
// the checker 16 bits per valid word, with random gaps in valid.
//  1. clean stream: lock, zero errors, done exactly WINDOW clocks after lock;
//  2. restart with K single-bit errors injected after lock: count must be K;
//  3. a stream started at a different point of the sequence also locks
//     with zero errors (the checker seeds itself from the data).
module tb_prbs35_chk;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 16;
  localparam int WINDOW = 300;

  logic         start = 0, valid = 0;
  logic [W-1:0] din = '0;
  chk_stat_t    stat;

  prbs35_chk #(.W(W), .WINDOW(WINDOW)) dut (.clk, .rst_n, .start, .valid, .din, .stat);

  int checks = 0, failures = 0;
  bit hist [$];

  task automatic seed(input logic [34:0] s);
    hist.delete();
    for (int k = 34; k >= 0; k--) hist.push_back(s[k]);
  endtask

  function automatic logic [W-1:0] next_word();
    logic [W-1:0] w;
    for (int i = 0; i < W; i++) begin
      bit b = hist[hist.size()-33] ^ hist[hist.size()-35];
      hist.push_back(b);
      w[i] = b;
    end
    while (hist.size() > 100) void'(hist.pop_front());
    return w;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (locked=%0d done=%0d errors=%0d)", msg, stat.locked, stat.done, stat.errors);
    end
  endtask

  // Runs one measurement; injects nflip single-bit errors after lock.
  task automatic run(input int nflip, input logic [34:0] s, output int lock_cyc, output int done_cyc);
    int cyc = 0, flipped = 0;
    lock_cyc = -1; done_cyc = -1;
    seed(s);
    @(posedge clk);
    start <= 1; valid <= 0;
    @(posedge clk);
    start <= 0;
    #1;
    while (done_cyc < 0 && cyc < 5 * WINDOW) begin
      logic [W-1:0] w;
      bit v = ($urandom_range(0, 4) != 0);
      w = v ? next_word() : W'($urandom());
      if (v && stat.locked && flipped < nflip && cyc % 7 == 0) begin
        int pos = $urandom_range(0, W-1);
        w[pos] = !w[pos];
        flipped++;
      end
      valid <= v; din <= w;
      @(posedge clk);
      cyc++;
      #1;
      if (stat.locked && lock_cyc < 0) lock_cyc = cyc;
      if (stat.done && done_cyc < 0) done_cyc = cyc;
    end
    valid <= 0;
    check(flipped == nflip, "all errors were injected");
  endtask

  initial begin
    repeat (200 * WINDOW) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lc, dc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(!stat.locked && !stat.done, "idle after reset");

    run(0, 35'h1_0203_0405, lc, dc);
    check(stat.locked && stat.done, "clean run locked and done");
    check(stat.errors == 0, "clean run has no errors");
    check(dc - lc == WINDOW, $sformatf("window length %0d clocks", dc - lc));

    run(5, 35'h1_0203_0405, lc, dc);
    check(stat.done && stat.errors == 5, "five injected errors counted");
    check(dc - lc == WINDOW, "window length again");

    // errors hold after done
    repeat (20) @(posedge clk);
    #1 check(stat.errors == 5 && stat.done, "count frozen after window");

    run(0, 35'h7_FFFF_0001, lc, dc);
    check(stat.done && stat.errors == 0, "relock on another phase");

    // feeding garbage after lock gives many errors
    seed(35'h3);
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    for (int c = 0; c < 4; c++) begin valid <= 1; din <= next_word(); @(posedge clk); end
    for (int c = 0; c < WINDOW + 4; c++) begin valid <= 1; din <= W'($urandom()); @(posedge clk); end
    valid <= 0;
    #1 check(stat.done && stat.errors > 1000, "random data gives many errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
