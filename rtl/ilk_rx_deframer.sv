// ilk_rx_deframer: receive half of the Interlaken PHY controller of one I/O channel.
//
// It takes the word stream delivered by the transceiver, writes every data word into
// the receive FIFO and reads the partner's XOn/XOff bit out of every idle control word.
// It also decides this node's own XOn/XOff bit from the fill level of the receive FIFO;
// the transmit half sends that bit back to the partner in its idle words. The use of
// idle words for flow control follows the Novo-G# framework; the threshold rule, the
// link-up rule and the error flags are this design's own choices.
//
// Flow control: local_xon is 0 (XOff) while the receive FIFO holds more than
// FIFO_DEPTH - XOFF_MARGIN words. XOFF_MARGIN must cover every word that can still
// arrive after the decision: the rest of a reverse-direction frame before the next idle
// word, the link latency both ways and one word of framing (see README).
// remote_xon is 0 after reset and becomes the partner's bit once the first idle word has
// arrived, so nothing is sent over a link whose far end is not yet receiving.
//
// Interface: phy_rx_* comes from the transceiver, one word per valid cycle, no
// back-pressure. fifo_wr_* is the write side of the receive FIFO, one register stage
// after the transceiver. rx_overflow is sticky and set if a data word met a full FIFO
// (it was dropped); proto_err is sticky and set by a data word outside a frame or an
// unknown control word.
module ilk_rx_deframer
  import novog_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 256,
  parameter int unsigned XOFF_MARGIN = 128
) (
  input  logic                        clk,          // TxRx_clk
  input  logic                        rst_n,
  // transceiver parallel interface
  input  logic                        phy_rx_valid,
  input  logic                        phy_rx_ctrl,
  input  logic [DATA_W-1:0]           phy_rx_data,
  // receive FIFO write side
  output logic                        fifo_wr_valid,
  input  logic                        fifo_wr_ready,
  output logic [DATA_W-1:0]           fifo_wr_data,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_used,
  // flow control
  output logic                        local_xon,
  output logic                        remote_xon,
  output logic                        link_up,
  // status
  output logic                        rx_overflow,
  output logic                        proto_err,
  output logic [31:0]                 rx_frames,
  output logic [31:0]                 rx_words
);

  ctrl_word_t cw;
  assign cw = ctrl_word_t'(phy_rx_data);

  logic in_frame;

  assign local_xon = (32'(fifo_used) <= FIFO_DEPTH - XOFF_MARGIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_wr_valid <= 1'b0;
      fifo_wr_data  <= '0;
      remote_xon    <= 1'b0;
      link_up       <= 1'b0;
      in_frame      <= 1'b0;
      rx_overflow   <= 1'b0;
      proto_err     <= 1'b0;
      rx_frames     <= '0;
      rx_words      <= '0;
    end else begin
      if (fifo_wr_valid && !fifo_wr_ready) rx_overflow <= 1'b1;
      fifo_wr_valid <= 1'b0;
      if (phy_rx_valid) begin
        if (phy_rx_ctrl) begin
          if (cw.cw_type == CW_IDLE) begin
            remote_xon <= cw.xon;
            link_up    <= 1'b1;
            if (cw.sof) begin
              in_frame  <= 1'b1;
              rx_frames <= rx_frames + 1'b1;
            end
            if (cw.eof) in_frame <= 1'b0;
          end else begin
            proto_err <= 1'b1;
          end
        end else begin
          if (!in_frame) proto_err <= 1'b1;
          fifo_wr_valid <= 1'b1;
          fifo_wr_data  <= phy_rx_data;
          rx_words      <= rx_words + 1'b1;
        end
      end
    end
  end

endmodule
