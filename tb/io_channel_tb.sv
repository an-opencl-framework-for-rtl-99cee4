`timescale 1ns/1ps
// io_channel_tb: self-checking test of one I/O channel pair in loopback.
//
// The channel's transmit side is cabled back to its own receive side through a link
// model with 20 cycles of latency that also takes one cycle in 32 for itself. The
// kernel clock runs at 250 MHz, the link clock at 200 MHz.
// Phase 1 (flow control): the kernel writes 3000 words at full speed while the reading
// kernel takes one word in four cycles, slower than the link. The receive FIFO must
// reach its XOff level, the transmit FIFO must push back on the writer, and no word may
// be lost, duplicated or reordered; the receive FIFO must never overflow.
// Phase 2 (rate): with both kernels at full speed the link must carry 16 data words
// in every 18 link words, less the transceiver's own cycles.
module io_channel_tb;
  import novog_pkg::*;
  localparam int unsigned N1 = 3000;

  logic kernel_clk = 0, txrx_clk = 0, kernel_rst_n = 0, txrx_rst_n = 0;
  always #2.0 kernel_clk = ~kernel_clk;
  always #2.5 txrx_clk   = ~txrx_clk;

  logic              tx_valid, tx_ready, rx_valid, rx_ready;
  logic [DATA_W-1:0] tx_data, rx_data;
  logic              phy_tx_valid, phy_tx_ready, phy_tx_ctrl;
  logic [DATA_W-1:0] phy_tx_data;
  logic              phy_rx_valid, phy_rx_ctrl;
  logic [DATA_W-1:0] phy_rx_data;
  logic              link_up, local_xon, remote_xon, rx_overflow, proto_err;
  logic [31:0]       tx_frames, tx_words, rx_frames, rx_words;

  io_channel dut (.*);

  xcvr_link_model #(.LATENCY(20), .ACCEPT(31), .PERIOD(32)) u_link (
    .clk      (txrx_clk),
    .rst_n    (txrx_rst_n),
    .tx_valid (phy_tx_valid),
    .tx_ready (phy_tx_ready),
    .tx_ctrl  (phy_tx_ctrl),
    .tx_data  (phy_tx_data),
    .rx_valid (phy_rx_valid),
    .rx_ctrl  (phy_rx_ctrl),
    .rx_data  (phy_rx_data)
  );

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_limit = N1;
  int xoff_cycles = 0, tx_push_back = 0;
  bit slow = 1;

  function automatic logic [DATA_W-1:0] pattern(int k);
    logic [DATA_W-1:0] w;
    for (int j = 0; j < DATA_W / 32; j++) w[32*j +: 32] = 32'(k) * 32'h0101_0101 + 32'(j);
    return w;
  endfunction

  assign tx_valid = kernel_rst_n && (n_wr < n_limit);
  assign tx_data  = pattern(n_wr);

  always @(posedge kernel_clk) begin
    if (kernel_rst_n) begin
      if (tx_valid && tx_ready) n_wr <= n_wr + 1;
      if (tx_valid && !tx_ready) tx_push_back++;
      if (rx_valid && rx_ready) begin
        checks++;
        if (rx_data !== pattern(n_rd)) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d wrong", n_rd);
        end
        n_rd <= n_rd + 1;
      end
    end
  end
  always @(negedge kernel_clk) rx_ready <= slow ? ($urandom_range(0, 3) == 0) : 1'b1;

  always @(posedge txrx_clk) if (txrx_rst_n && !local_xon) xoff_cycles++;

  initial begin
    rx_ready = 0;
    repeat (4) @(posedge txrx_clk);
    #1 kernel_rst_n = 1; txrx_rst_n = 1;
    wait (n_rd == N1);
    repeat (50) @(posedge kernel_clk);
    checks++;
    if (n_rd != N1 || rx_valid) begin failures++; $display("FAIL: %0d words read, expected %0d", n_rd, N1); end
    checks++;
    if (xoff_cycles == 0) begin failures++; $display("FAIL: receive FIFO never asked for XOff"); end
    checks++;
    if (tx_push_back == 0) begin failures++; $display("FAIL: writer never held back"); end
    checks++;
    if (rx_overflow || proto_err || !link_up) begin
      failures++; $display("FAIL: overflow=%b proto_err=%b link_up=%b", rx_overflow, proto_err, link_up);
    end
    // rate phase
    slow = 0;
    n_limit = 1000000;
    repeat (300) @(posedge txrx_clk);
    begin
      int w0, w1;
      w0 = rx_words;
      repeat (1152) @(posedge txrx_clk);
      w1 = rx_words;
      // 1152 link cycles, 36 taken by the transceiver: 1116 words, 16 of every 18 data
      checks++;
      if (w1 - w0 < 980 || w1 - w0 > 1000) begin
        failures++; $display("FAIL: %0d data words in 1152 link cycles, expected about 992", w1 - w0);
      end
      $display("io_channel_tb: xoff for %0d cycles, %0d data words per 1152 link cycles",
               xoff_cycles, w1 - w0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge txrx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
