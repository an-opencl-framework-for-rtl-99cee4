// pong_kernel: checking end of the ping-pong link benchmark.
//
// After a start pulse it accepts num_words words from an input I/O channel and checks
// each against the word the ping kernel generated plus the increment: word k must hold
// lane j = seed + 4*k + j + increment in each of its four 64-bit lanes. It counts
// received and wrong words and measures two times in kernel clock cycles: from start
// to the first word (the round-trip latency of one word) and from start to the last
// word (the run time, from which the channel bandwidth follows). The verification
// follows the Novo-G# ping-pong study; the counters stand in for the host-side timing.
//
// Interface (kernel_clk): start is a one-cycle pulse, ignored while busy; the kernel
// is ready on in_* while busy. done stays high from the last word to the next start.
module pong_kernel
  import novog_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       num_words,
  input  logic [63:0]       seed,
  input  logic [63:0]       increment,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              busy,
  output logic              done,
  output logic [31:0]       received,
  output logic [31:0]       errors,
  output logic [31:0]       latency_cycles,
  output logic [31:0]       run_cycles
);

  logic [63:0]       base;   // seed + 4*k + increment for the next expected word
  logic [DATA_W-1:0] expected;

  assign in_ready = busy;

  always_comb begin
    for (int j = 0; j < DATA_W / 64; j++) expected[64*j +: 64] = base + 64'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      done           <= 1'b0;
      received       <= '0;
      errors         <= '0;
      latency_cycles <= '0;
      run_cycles     <= '0;
      base           <= '0;
    end else if (!busy) begin
      if (start) begin
        busy           <= (num_words != 0);
        done           <= (num_words == 0);
        received       <= '0;
        errors         <= '0;
        latency_cycles <= '0;
        run_cycles     <= '0;
        base           <= seed + increment;
      end
    end else begin
      run_cycles <= run_cycles + 1'b1;
      if (received == 0) latency_cycles <= latency_cycles + 1'b1;
      if (in_valid) begin
        received <= received + 1'b1;
        base     <= base + 64'(DATA_W / 64);
        if (in_data != expected) errors <= errors + 1'b1;
        if (received + 1'b1 == num_words) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
