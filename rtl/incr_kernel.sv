// incr_kernel: the reflecting side of the ping-pong link benchmark.
//
// It reads each word arriving on an input I/O channel, adds the host-given increment
// to every 64-bit lane of the 256-bit word and writes the result to an output I/O
// channel, back towards the sender. The function follows the Novo-G# ping-pong study;
// adding the increment lane by lane (ulong4 plus a scalar) is this design's reading.
//
// One register stage sits between input and output; the input is accepted whenever
// that register is empty or being emptied, so a stream passes at one word per cycle.
//
// Interface (kernel_clk): in_* and out_* are valid/ready streams; increment must be
// held steady while words flow; processed counts words written out.
module incr_kernel
  import novog_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [63:0]       increment,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic [31:0]       processed
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      processed <= '0;
    end else begin
      if (out_valid && out_ready) processed <= processed + 1'b1;
      if (in_ready) begin
        out_valid <= in_valid;
        if (in_valid)
          for (int j = 0; j < DATA_W / 64; j++)
            out_data[64*j +: 64] <= in_data[64*j +: 64] + increment;
      end
    end
  end

endmodule
