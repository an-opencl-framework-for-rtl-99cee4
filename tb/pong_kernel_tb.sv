`timescale 1ns/1ps
// pong_kernel_tb: self-checking test of the pong checking kernel.
//
// Run 1 feeds the exact words the ping kernel would send, plus the increment, with
// random gaps: no errors, all words counted, done raised. The first word arrives a
// known number of cycles after start, which the latency counter must report exactly.
// Run 2 corrupts two words: the error count must be two.
module pong_kernel_tb;
  import novog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic              start;
  logic [31:0]       num_words;
  logic [63:0]       seed, increment;
  logic              in_valid, in_ready, busy, done;
  logic [DATA_W-1:0] in_data;
  logic [31:0]       received, errors, latency_cycles, run_cycles;

  pong_kernel dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] word(int k);
    logic [DATA_W-1:0] w;
    for (int j = 0; j < 4; j++) w[64*j +: 64] = seed + 64'(4 * k + j) + increment;
    return w;
  endfunction

  // n words; first one after `first_delay` cycles; corrupt words listed in bad
  task automatic run(int n, int first_delay, int bad0, int bad1);
    int cycles;
    @(negedge clk);
    num_words = n; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    repeat (first_delay - 1) begin @(negedge clk); cycles++; end
    for (int k = 0; k < n; k++) begin
      while (k > 0 && $urandom_range(0, 2) == 0) begin
        in_valid = 0; @(negedge clk); cycles++;
      end
      in_valid = 1;
      in_data  = word(k);
      if (k == bad0 || k == bad1) in_data[100] = ~in_data[100];
      @(negedge clk); cycles++;
    end
    in_valid = 0;
    check(done && !busy, "not done after the last word");
    check(received == 32'(n), $sformatf("received %0d of %0d", received, n));
    check(run_cycles == 32'(cycles - 1), $sformatf("run_cycles %0d, expected %0d", run_cycles, cycles - 1));
  endtask

  initial begin
    start = 0; num_words = 0; in_valid = 0; in_data = '0;
    seed = 64'h0000_0001_0000_0000; increment = 64'd1000;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(64, 37, -1, -1);
    check(errors == 0, $sformatf("%0d errors on clean data", errors));
    check(latency_cycles == 37, $sformatf("latency %0d, expected 37", latency_cycles));
    run(64, 5, 3, 60);
    check(errors == 2, $sformatf("%0d errors, expected 2", errors));
    check(latency_cycles == 5, $sformatf("latency %0d, expected 5", latency_cycles));
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
