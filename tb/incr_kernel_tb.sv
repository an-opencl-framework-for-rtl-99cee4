`timescale 1ns/1ps
// incr_kernel_tb: self-checking test of the incr kernel.
//
// Random words go in with random valid and ready patterns; every word that comes out
// must be the matching input word with the increment added to each 64-bit lane
// (modulo 2^64), in order. With valid and ready held high the kernel must pass one
// word per cycle.
module incr_kernel_tb;
  import novog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic [63:0]       increment;
  logic              in_valid, in_ready, out_valid, out_ready;
  logic [DATA_W-1:0] in_data, out_data;
  logic [31:0]       processed;

  incr_kernel dut (.*);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] sent_q[$];
  logic [DATA_W-1:0] exp_w;
  int n_in = 0, n_out = 0;
  bit rand_mode = 1;

  function automatic logic [DATA_W-1:0] rnd_word();
    logic [DATA_W-1:0] w;
    for (int j = 0; j < DATA_W / 32; j++) w[32*j +: 32] = $urandom;
    return w;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent_q.push_back(in_data);
        n_in++;
      end
      if (out_valid && out_ready) begin
        checks++;
        for (int j = 0; j < 4; j++) exp_w[64*j +: 64] = sent_q[0][64*j +: 64] + increment;
        if (out_data !== exp_w) begin failures++; $display("FAIL: word %0d wrong", n_out); end
        void'(sent_q.pop_front());
        n_out++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        in_valid <= rand_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
        in_data  <= rnd_word();
      end
      out_ready <= rand_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  initial begin
    increment = 64'hffff_ffff_0000_0007;
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2000) @(posedge clk);
    rand_mode = 0;
    repeat (10) @(posedge clk);
    begin
      int n0;
      n0 = n_out;
      repeat (100) @(posedge clk);
      checks++;
      if (n_out - n0 != 100) begin
        failures++; $display("FAIL: %0d words in 100 cycles at full rate", n_out - n0);
      end
    end
    checks++;
    if (processed != 32'(n_out)) begin failures++; $display("FAIL: processed counter"); end
    $display("incr_kernel_tb: %0d words", n_out);
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
