`timescale 1ns/1ps
// bsp_io_tb: self-checking test of the six-link BSP I/O.
//
// The links are cabled back in pairs through link models (posx to negx, posy to negy,
// posz to negz), as between two neighbours of a torus that happen to be the same
// board. Every output channel sends 400 words carrying its own link number; each must
// arrive, complete and in order, on the input channel of the link it is cabled to, and
// on no other. The readers run at random speed so that flow control comes into play.
module bsp_io_tb;
  import novog_pkg::*;
  localparam int unsigned N = 400;

  logic kernel_clk = 0, txrx_clk = 0, kernel_rst_n = 0, txrx_rst_n = 0;
  always #2.0 kernel_clk = ~kernel_clk;
  always #2.5 txrx_clk   = ~txrx_clk;

  logic [NUM_LINKS-1:0]              tx_valid, tx_ready, rx_valid, rx_ready;
  logic [NUM_LINKS-1:0][DATA_W-1:0]  tx_data, rx_data;
  logic [NUM_LINKS-1:0]              phy_tx_valid, phy_tx_ready, phy_tx_ctrl;
  logic [NUM_LINKS-1:0][DATA_W-1:0]  phy_tx_data;
  logic [NUM_LINKS-1:0]              phy_rx_valid, phy_rx_ctrl;
  logic [NUM_LINKS-1:0][DATA_W-1:0]  phy_rx_data;
  logic [NUM_LINKS-1:0]              link_up, local_xon, remote_xon, rx_overflow, proto_err;
  logic [NUM_LINKS-1:0][31:0]        tx_frames, tx_words, rx_frames, rx_words;

  bsp_io #(.RX_FIFO_DEPTH(64), .TX_FIFO_DEPTH(64), .XOFF_MARGIN(48)) dut (.*);

  // link i is cabled to link i^1
  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_cable
    xcvr_link_model #(.LATENCY(12), .ACCEPT(5), .PERIOD(8)) u_link (
      .clk      (txrx_clk),
      .rst_n    (txrx_rst_n),
      .tx_valid (phy_tx_valid[i]),
      .tx_ready (phy_tx_ready[i]),
      .tx_ctrl  (phy_tx_ctrl[i]),
      .tx_data  (phy_tx_data[i]),
      .rx_valid (phy_rx_valid[i^1]),
      .rx_ctrl  (phy_rx_ctrl[i^1]),
      .rx_data  (phy_rx_data[i^1])
    );
  end

  int checks = 0, failures = 0;
  int n_wr[NUM_LINKS], n_rd[NUM_LINKS];

  function automatic logic [DATA_W-1:0] pattern(int link, int k);
    return {8{8'(link), 24'(k)}};
  endfunction

  always_comb
    for (int i = 0; i < NUM_LINKS; i++) begin
      tx_valid[i] = kernel_rst_n && (n_wr[i] < N);
      tx_data[i]  = pattern(i, n_wr[i]);
    end

  always @(posedge kernel_clk) begin
    if (kernel_rst_n)
      for (int i = 0; i < NUM_LINKS; i++) begin
        if (tx_valid[i] && tx_ready[i]) n_wr[i] <= n_wr[i] + 1;
        if (rx_valid[i] && rx_ready[i]) begin
          checks++;
          if (rx_data[i] !== pattern(i ^ 1, n_rd[i])) begin
            failures++;
            if (failures < 10) $display("FAIL: link %0d word %0d wrong", i, n_rd[i]);
          end
          n_rd[i] <= n_rd[i] + 1;
        end
      end
  end
  always @(negedge kernel_clk)
    for (int i = 0; i < NUM_LINKS; i++) rx_ready[i] <= ($urandom_range(0, 2 + i) == 0);

  initial begin
    for (int i = 0; i < NUM_LINKS; i++) begin n_wr[i] = 0; n_rd[i] = 0; end
    rx_ready = '0;
    repeat (4) @(posedge txrx_clk);
    #1 kernel_rst_n = 1; txrx_rst_n = 1;
    for (int i = 0; i < NUM_LINKS; i++) wait (n_rd[i] == N);
    repeat (100) @(posedge kernel_clk);
    for (int i = 0; i < NUM_LINKS; i++) begin
      checks++;
      if (n_rd[i] != N || rx_valid[i] || rx_overflow[i] || proto_err[i] || !link_up[i]) begin
        failures++;
        $display("FAIL: link %0d read %0d overflow=%b proto_err=%b", i, n_rd[i], rx_overflow[i], proto_err[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge txrx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
