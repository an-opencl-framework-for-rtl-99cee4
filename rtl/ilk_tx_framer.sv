// ilk_tx_framer: transmit half of the Interlaken PHY controller of one I/O channel.
//
// It turns the stream of 256-bit words waiting in the transmit FIFO into the word
// stream the transceiver expects: data frames, each opened and closed by an idle
// control word, and idle control words whenever the transmit FIFO is empty. Every idle
// word carries this side's XOn/XOff bit, which tells the node at the other end of the
// link whether it may keep sending (flow control in the framework is carried only in
// idle words). These rules follow the Novo-G# framework; the frame length limit, the
// control-word layout and the way XOff is honoured are this design's own choices.
//
// Sequence (one word per TxRx_clk cycle the transceiver accepts):
//   idle:  idle(sof=0,eof=0)  repeated while the FIFO is empty or the partner says XOff
//   frame: idle(sof=1) , 1..FRAME_WORDS data words , idle(eof=1)
// A frame closes early when the FIFO runs empty or the partner switches to XOff (it may
// then hold no data at all). A continuous stream gets FRAME_WORDS data words out of
// every FRAME_WORDS+2 link cycles.
//
// Interface: fifo_* is the read side of the transmit FIFO (fifo_ready pops). phy_tx_*
// is a valid/ready port to the transceiver; after reset phy_tx_valid stays high, since
// the link never carries gaps. local_xon comes from the receive path (room in this
// node's receive FIFO); remote_xon is the partner's bit, taken from received idle words.
// tx_frames and tx_words count frames and data words sent.
module ilk_tx_framer
  import novog_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = 16
) (
  input  logic              clk,          // TxRx_clk
  input  logic              rst_n,
  // transmit FIFO read side
  input  logic              fifo_valid,
  output logic              fifo_ready,
  input  logic [DATA_W-1:0] fifo_data,
  // flow control
  input  logic              local_xon,
  input  logic              remote_xon,
  // transceiver parallel interface
  output logic              phy_tx_valid,
  input  logic              phy_tx_ready,
  output logic              phy_tx_ctrl,
  output logic [DATA_W-1:0] phy_tx_data,
  // statistics
  output logic [31:0]       tx_frames,
  output logic [31:0]       tx_words
);

  typedef enum logic { S_IDLE, S_DATA } state_e;

  state_e                          state;
  logic [$clog2(FRAME_WORDS+1)-1:0] cnt;   // data words sent in the current frame

  // A new word is produced whenever the output register is free or being taken.
  logic advance;
  assign advance = !phy_tx_valid || phy_tx_ready;

  logic send_data;
  assign send_data = advance && (state == S_DATA) && fifo_valid && remote_xon &&
                     (cnt < ($clog2(FRAME_WORDS+1))'(FRAME_WORDS));
  assign fifo_ready = send_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      phy_tx_valid <= 1'b0;
      phy_tx_ctrl  <= 1'b1;
      phy_tx_data  <= '0;
      tx_frames    <= '0;
      tx_words     <= '0;
    end else if (advance) begin
      phy_tx_valid <= 1'b1;
      unique case (state)
        S_IDLE: begin
          phy_tx_ctrl <= 1'b1;
          if (fifo_valid && remote_xon) begin
            phy_tx_data <= idle_word(1'b1, 1'b0, local_xon);
            state       <= S_DATA;
            cnt         <= '0;
            tx_frames   <= tx_frames + 1'b1;
          end else begin
            phy_tx_data <= idle_word(1'b0, 1'b0, local_xon);
          end
        end
        S_DATA: begin
          if (send_data) begin
            phy_tx_ctrl <= 1'b0;
            phy_tx_data <= fifo_data;
            cnt         <= cnt + 1'b1;
            tx_words    <= tx_words + 1'b1;
          end else begin
            phy_tx_ctrl <= 1'b1;
            phy_tx_data <= idle_word(1'b0, 1'b1, local_xon);
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A word offered to the transceiver is held until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           phy_tx_valid && !phy_tx_ready |=>
                           $stable(phy_tx_data) && $stable(phy_tx_ctrl));

endmodule
