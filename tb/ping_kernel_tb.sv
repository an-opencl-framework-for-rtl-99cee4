`timescale 1ns/1ps
// ping_kernel_tb: self-checking test of the ping source kernel.
//
// Run 1: 50 words, gap 0, random back-pressure: every word must equal the counter
// pattern (lane j of word k = seed + 4k + j), the count and done must be right and a
// stalled word must stay put. Run 2: gap 3 with no back-pressure: words must leave
// exactly every four cycles (the task-kernel rate). Run 3: zero words finishes at once.
module ping_kernel_tb;
  import novog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic              start;
  logic [31:0]       num_words;
  logic [63:0]       seed;
  logic [3:0]        gap;
  logic              out_valid, out_ready, busy, done;
  logic [DATA_W-1:0] out_data;
  logic [31:0]       sent;

  ping_kernel dut (.*);

  int checks = 0, failures = 0;
  int k = 0, cyc = 0, last_cyc = -1, min_dist = 1000, max_dist = 0;
  logic [DATA_W-1:0] exp_w, held;
  bit stalled = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stalled) check(out_valid && out_data === held, "stalled word changed");
    stalled <= out_valid && !out_ready;
    held    <= out_data;
    if (out_valid && out_ready) begin
      for (int j = 0; j < 4; j++) exp_w[64*j +: 64] = seed + 64'(4 * k + j);
      check(out_data === exp_w, $sformatf("word %0d wrong", k));
      if (last_cyc >= 0) begin
        if (cyc - last_cyc < min_dist) min_dist = cyc - last_cyc;
        if (cyc - last_cyc > max_dist) max_dist = cyc - last_cyc;
      end
      last_cyc = cyc;
      k++;
    end
  end

  task automatic run(int n, int g, bit random_ready);
    @(negedge clk);
    num_words = n; gap = 4'(g); start = 1; k = 0; last_cyc = -1; min_dist = 1000; max_dist = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      out_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(negedge clk);
    end
    check(k == n && sent == 32'(n), $sformatf("sent %0d words, expected %0d", k, n));
    check(!busy && !out_valid, "still busy after done");
  endtask

  initial begin
    start = 0; num_words = 0; seed = 64'h1234_5678_0000_0000; gap = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(50, 0, 1);
    seed = 64'hffff_ffff_ffff_fff0;   // lanes wrap around 2^64
    run(40, 3, 0);
    check(min_dist == 4 && max_dist == 4,
          $sformatf("gap 3 spacing %0d..%0d cycles, expected 4", min_dist, max_dist));
    run(40, 0, 0);
    check(min_dist == 1 && max_dist == 1, "gap 0 is not one word per cycle");
    run(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
