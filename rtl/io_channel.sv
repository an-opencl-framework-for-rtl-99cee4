// io_channel: one inter-FPGA I/O channel pair of the board support package.
//
// A kernel sees two streaming channels per torus direction, for example posx_out and
// posx_in. This block is what sits behind them: the output channel feeds a transmit
// FIFO, the transmit framer packs its words into Interlaken frames for the transceiver;
// the receive deframer takes words from the transceiver into a receive FIFO that feeds
// the input channel. The two FIFOs also move the data between the kernel clock and the
// fixed 200 MHz link clock. The structure follows the Novo-G# framework.
//
// Flow control closes through the partner: the receive FIFO's fill level becomes this
// side's XOn/XOff bit, sent in the idle words of the transmit direction; the partner's
// bit, read from received idle words, gates this side's framer.
//
// Interface: tx_* (kernel_clk) is the output channel towards the partner, rx_*
// (kernel_clk) the input channel from it, both valid/ready with 256-bit words.
// phy_tx_* / phy_rx_* (txrx_clk) connect to the transceiver. Status outputs are in the
// txrx_clk domain.
module io_channel
  import novog_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 256,
  parameter int unsigned RX_FIFO_DEPTH = 256,
  parameter int unsigned FRAME_WORDS   = 16,
  parameter int unsigned XOFF_MARGIN   = 128
) (
  input  logic              kernel_clk,
  input  logic              kernel_rst_n,
  input  logic              txrx_clk,
  input  logic              txrx_rst_n,
  // output channel (kernel -> link)
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [DATA_W-1:0] tx_data,
  // input channel (link -> kernel)
  output logic              rx_valid,
  input  logic              rx_ready,
  output logic [DATA_W-1:0] rx_data,
  // transceiver
  output logic              phy_tx_valid,
  input  logic              phy_tx_ready,
  output logic              phy_tx_ctrl,
  output logic [DATA_W-1:0] phy_tx_data,
  input  logic              phy_rx_valid,
  input  logic              phy_rx_ctrl,
  input  logic [DATA_W-1:0] phy_rx_data,
  // status (txrx_clk)
  output logic              link_up,
  output logic              local_xon,
  output logic              remote_xon,
  output logic              rx_overflow,
  output logic              proto_err,
  output logic [31:0]       tx_frames,
  output logic [31:0]       tx_words,
  output logic [31:0]       rx_frames,
  output logic [31:0]       rx_words
);

  logic              txf_valid, txf_ready;
  logic [DATA_W-1:0] txf_data;
  logic [$clog2(TX_FIFO_DEPTH):0] txf_used_unused;

  logic              rxf_wr_valid, rxf_wr_ready;
  logic [DATA_W-1:0] rxf_wr_data;
  logic [$clog2(RX_FIFO_DEPTH):0] rxf_used;

  cdc_fifo #(.DATA_W(DATA_W), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .wr_clk   (kernel_clk),
    .wr_rst_n (kernel_rst_n),
    .wr_valid (tx_valid),
    .wr_ready (tx_ready),
    .wr_data  (tx_data),
    .wr_used  (txf_used_unused),
    .rd_clk   (txrx_clk),
    .rd_rst_n (txrx_rst_n),
    .rd_valid (txf_valid),
    .rd_ready (txf_ready),
    .rd_data  (txf_data)
  );

  ilk_tx_framer #(.FRAME_WORDS(FRAME_WORDS)) u_framer (
    .clk          (txrx_clk),
    .rst_n        (txrx_rst_n),
    .fifo_valid   (txf_valid),
    .fifo_ready   (txf_ready),
    .fifo_data    (txf_data),
    .local_xon    (local_xon),
    .remote_xon   (remote_xon),
    .phy_tx_valid (phy_tx_valid),
    .phy_tx_ready (phy_tx_ready),
    .phy_tx_ctrl  (phy_tx_ctrl),
    .phy_tx_data  (phy_tx_data),
    .tx_frames    (tx_frames),
    .tx_words     (tx_words)
  );

  ilk_rx_deframer #(.FIFO_DEPTH(RX_FIFO_DEPTH), .XOFF_MARGIN(XOFF_MARGIN)) u_deframer (
    .clk           (txrx_clk),
    .rst_n         (txrx_rst_n),
    .phy_rx_valid  (phy_rx_valid),
    .phy_rx_ctrl   (phy_rx_ctrl),
    .phy_rx_data   (phy_rx_data),
    .fifo_wr_valid (rxf_wr_valid),
    .fifo_wr_ready (rxf_wr_ready),
    .fifo_wr_data  (rxf_wr_data),
    .fifo_used     (rxf_used),
    .local_xon     (local_xon),
    .remote_xon    (remote_xon),
    .link_up       (link_up),
    .rx_overflow   (rx_overflow),
    .proto_err     (proto_err),
    .rx_frames     (rx_frames),
    .rx_words      (rx_words)
  );

  cdc_fifo #(.DATA_W(DATA_W), .DEPTH(RX_FIFO_DEPTH)) u_rx_fifo (
    .wr_clk   (txrx_clk),
    .wr_rst_n (txrx_rst_n),
    .wr_valid (rxf_wr_valid),
    .wr_ready (rxf_wr_ready),
    .wr_data  (rxf_wr_data),
    .wr_used  (rxf_used),
    .rd_clk   (kernel_clk),
    .rd_rst_n (kernel_rst_n),
    .rd_valid (rx_valid),
    .rd_ready (rx_ready),
    .rd_data  (rx_data)
  );

endmodule
