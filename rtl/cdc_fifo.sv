// cdc_fifo: dual-clock FIFO between the OpenCL kernel clock and the link clock.
//
// Every inter-FPGA I/O channel has one of these on each side of its link controller:
// the transmit FIFO is written by a kernel (kernel_clk) and read by the framer
// (TxRx_clk), the receive FIFO the other way round. Besides buffering, the FIFO is
// where data crosses between the two clocks, as in the Novo-G# framework.
//
// How it works: the memory is an array of DEPTH words. Read and write pointers are one
// bit wider than the address; each is kept in binary and in Gray code, and the Gray copy
// is passed to the other clock through a two-flop synchroniser. Full and empty are
// decided on the local pointer against the synchronised remote one, so both are
// conservative: the FIFO may report full or empty for a few cycles longer than it is.
//
// Interface: valid/ready on both sides. A word is written when wr_valid && wr_ready,
// and read when rd_valid && rd_ready; rd_data shows the oldest word whenever rd_valid
// is high (first-word fall-through). wr_used is the fill level as seen from the write
// clock, used by the receive path to decide XOn/XOff. Each side has its own
// active-low reset; both are expected to be asserted together.
//
// The data width is the framework's 256 bits. The depth is not given by the framework;
// 256 words per FIFO is this design's choice (see README).
module cdc_fifo #(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned DEPTH  = 256   // power of two
) (
  // write side
  input  logic                      wr_clk,
  input  logic                      wr_rst_n,
  input  logic                      wr_valid,
  output logic                      wr_ready,
  input  logic [DATA_W-1:0]         wr_data,
  output logic [$clog2(DEPTH):0]    wr_used,
  // read side
  input  logic                      rd_clk,
  input  logic                      rd_rst_n,
  output logic                      rd_valid,
  input  logic                      rd_ready,
  output logic [DATA_W-1:0]         rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_s1, rd_gray_s2;   // read pointer seen from the write clock
  logic [AW:0] wr_gray_s1, wr_gray_s2;   // write pointer seen from the read clock
  logic [AW:0] rd_bin_w, wr_bin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write clock ----------------
  logic wr_fire;
  assign rd_bin_w = gray2bin(rd_gray_s2);
  assign wr_used  = wr_bin - rd_bin_w;
  assign wr_ready = (wr_used != (AW+1)'(DEPTH));
  assign wr_fire  = wr_valid && wr_ready;

  always_ff @(posedge wr_clk) begin
    if (wr_fire) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_s1 <= '0;
      rd_gray_s2 <= '0;
    end else begin
      rd_gray_s1 <= rd_gray;
      rd_gray_s2 <= rd_gray_s1;
      if (wr_fire) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  // ---------------- read clock ----------------
  logic rd_fire;
  assign wr_bin_r = gray2bin(wr_gray_s2);
  assign rd_valid = (wr_bin_r != rd_bin);
  assign rd_data  = mem[rd_bin[AW-1:0]];
  assign rd_fire  = rd_valid && rd_ready;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_s1 <= '0;
      wr_gray_s2 <= '0;
    end else begin
      wr_gray_s1 <= wr_gray;
      wr_gray_s2 <= wr_gray_s1;
      if (rd_fire) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

  // The fill level never exceeds the depth.
  a_no_overflow: assert property (@(posedge wr_clk) disable iff (!wr_rst_n)
                                  wr_used <= (AW+1)'(DEPTH));

endmodule
