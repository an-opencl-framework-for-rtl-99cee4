// bsp_io: the inter-FPGA I/O of one board support package, six I/O channel pairs.
//
// Each FPGA of the 3D torus has six links, one per direction (posx, negx, posy, negy,
// posz, negz); each is exposed to OpenCL kernels as one output and one input streaming
// channel. This block holds one io_channel per direction, indexed as in
// novog_pkg::link_dir_e. All six share the kernel clock and the 200 MHz link clock.
// The six-link structure follows the Novo-G# framework.
//
// Interface: every port of io_channel, as an array over the links. Index i of
// tx_*/rx_* is channel <dir>_out / <dir>_in of link i; index i of phy_* is that link's
// transceiver. Status outputs are in the txrx_clk domain.
module bsp_io
  import novog_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 256,
  parameter int unsigned RX_FIFO_DEPTH = 256,
  parameter int unsigned FRAME_WORDS   = 16,
  parameter int unsigned XOFF_MARGIN   = 128
) (
  input  logic                                  kernel_clk,
  input  logic                                  kernel_rst_n,
  input  logic                                  txrx_clk,
  input  logic                                  txrx_rst_n,
  // output channels (kernel -> link)
  input  logic [NUM_LINKS-1:0]                  tx_valid,
  output logic [NUM_LINKS-1:0]                  tx_ready,
  input  logic [NUM_LINKS-1:0][DATA_W-1:0]      tx_data,
  // input channels (link -> kernel)
  output logic [NUM_LINKS-1:0]                  rx_valid,
  input  logic [NUM_LINKS-1:0]                  rx_ready,
  output logic [NUM_LINKS-1:0][DATA_W-1:0]      rx_data,
  // transceivers
  output logic [NUM_LINKS-1:0]                  phy_tx_valid,
  input  logic [NUM_LINKS-1:0]                  phy_tx_ready,
  output logic [NUM_LINKS-1:0]                  phy_tx_ctrl,
  output logic [NUM_LINKS-1:0][DATA_W-1:0]      phy_tx_data,
  input  logic [NUM_LINKS-1:0]                  phy_rx_valid,
  input  logic [NUM_LINKS-1:0]                  phy_rx_ctrl,
  input  logic [NUM_LINKS-1:0][DATA_W-1:0]      phy_rx_data,
  // status (txrx_clk)
  output logic [NUM_LINKS-1:0]                  link_up,
  output logic [NUM_LINKS-1:0]                  local_xon,
  output logic [NUM_LINKS-1:0]                  remote_xon,
  output logic [NUM_LINKS-1:0]                  rx_overflow,
  output logic [NUM_LINKS-1:0]                  proto_err,
  output logic [NUM_LINKS-1:0][31:0]            tx_frames,
  output logic [NUM_LINKS-1:0][31:0]            tx_words,
  output logic [NUM_LINKS-1:0][31:0]            rx_frames,
  output logic [NUM_LINKS-1:0][31:0]            rx_words
);

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_link
    io_channel #(
      .TX_FIFO_DEPTH (TX_FIFO_DEPTH),
      .RX_FIFO_DEPTH (RX_FIFO_DEPTH),
      .FRAME_WORDS   (FRAME_WORDS),
      .XOFF_MARGIN   (XOFF_MARGIN)
    ) u_ch (
      .kernel_clk   (kernel_clk),
      .kernel_rst_n (kernel_rst_n),
      .txrx_clk     (txrx_clk),
      .txrx_rst_n   (txrx_rst_n),
      .tx_valid     (tx_valid[i]),
      .tx_ready     (tx_ready[i]),
      .tx_data      (tx_data[i]),
      .rx_valid     (rx_valid[i]),
      .rx_ready     (rx_ready[i]),
      .rx_data      (rx_data[i]),
      .phy_tx_valid (phy_tx_valid[i]),
      .phy_tx_ready (phy_tx_ready[i]),
      .phy_tx_ctrl  (phy_tx_ctrl[i]),
      .phy_tx_data  (phy_tx_data[i]),
      .phy_rx_valid (phy_rx_valid[i]),
      .phy_rx_ctrl  (phy_rx_ctrl[i]),
      .phy_rx_data  (phy_rx_data[i]),
      .link_up      (link_up[i]),
      .local_xon    (local_xon[i]),
      .remote_xon   (remote_xon[i]),
      .rx_overflow  (rx_overflow[i]),
      .proto_err    (proto_err[i]),
      .tx_frames    (tx_frames[i]),
      .tx_words     (tx_words[i]),
      .rx_frames    (rx_frames[i]),
      .rx_words     (rx_words[i])
    );
  end

endmodule
