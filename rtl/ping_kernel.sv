// ping_kernel: source of the ping-pong link benchmark.
//
// After a start pulse it sends num_words 256-bit words into an output I/O channel.
// The words are generated internally from a counter: word k holds four 64-bit lanes,
// lane j = seed + 4*k + j, so the receiver can recompute every word. The benchmark and
// its internally generated data follow the Novo-G# ping-pong study; the exact counter
// pattern is this design's choice.
//
// gap sets the pacing: after every accepted word the kernel waits gap cycles before
// offering the next one. gap = 0 sends one word per cycle (the rate of the NDRange
// variant); gap = 3 sends one word every four cycles, the throughput reported for the
// single work-item (task) variant.
//
// Interface (kernel_clk): start is a one-cycle pulse, ignored while busy; out_* is a
// valid/ready stream; done rises after the last word was accepted and stays high until
// the next start. sent counts accepted words of the current run.
module ping_kernel
  import novog_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       num_words,
  input  logic [63:0]       seed,
  input  logic [3:0]        gap,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              busy,
  output logic              done,
  output logic [31:0]       sent
);

  logic [63:0] base;      // seed + 4*k for the word being offered
  logic [3:0]  wait_cnt;

  assign out_valid = busy && (wait_cnt == '0);

  always_comb begin
    for (int j = 0; j < DATA_W / 64; j++) out_data[64*j +: 64] = base + 64'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      sent     <= '0;
      base     <= '0;
      wait_cnt <= '0;
    end else if (!busy) begin
      if (start) begin
        busy     <= (num_words != 0);
        done     <= (num_words == 0);
        sent     <= '0;
        base     <= seed;
        wait_cnt <= '0;
      end
    end else if (out_valid && out_ready) begin
      sent     <= sent + 1'b1;
      base     <= base + 64'(DATA_W / 64);
      wait_cnt <= gap;
      if (sent + 1'b1 == num_words) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else if (wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
