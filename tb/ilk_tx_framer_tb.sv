`timescale 1ns/1ps
// ilk_tx_framer_tb: self-checking test of the transmit framer.
//
// A queue stands in for the transmit FIFO. The test decodes every word the framer
// hands to the transceiver and checks: data words come out in order and only inside a
// frame opened by an idle word with sof and closed by one with eof; no frame holds more
// than FRAME_WORDS data words; idle words carry the local XOn/XOff bit; nothing is sent
// while the partner says XOff; idle words fill the link while the FIFO is empty; a
// word held by a not-ready transceiver stays put. It also checks the rate: a preloaded
// burst of N words takes exactly N + 2*N/FRAME_WORDS link cycles from the first to the
// last framing word.
module ilk_tx_framer_tb;
  import novog_pkg::*;
  localparam int unsigned F = 16;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic              fifo_valid, fifo_ready;
  logic [DATA_W-1:0] fifo_data;
  logic              local_xon, remote_xon;
  logic              phy_tx_valid, phy_tx_ready, phy_tx_ctrl;
  logic [DATA_W-1:0] phy_tx_data;
  logic [31:0]       tx_frames, tx_words;

  ilk_tx_framer #(.FRAME_WORDS(F)) dut (.*);

  int checks = 0, failures = 0;
  int n_pushed = 0, n_popped = 0, n_rx = 0;
  bit fifo_en = 1;

  // word k of the stream
  function automatic logic [DATA_W-1:0] pattern(int k);
    return {8{32'(k) * 32'h9e3779b1}};
  endfunction

  assign fifo_valid = fifo_en && (n_popped < n_pushed);
  assign fifo_data  = pattern(n_popped);

  task automatic push_words(int n);
    n_pushed += n;
  endtask

  // decoder state
  bit          in_frame = 0;
  int          frame_len = 0;
  int          idle_fill = 0, frames = 0;
  logic        prev_remote_xon = 0, prev_local_xon = 0;  // bits seen when the word was built
  int          cyc = 0, first_sof = -1, last_eof = -1;
  logic [DATA_W-1:0] prev_data;
  logic        prev_ctrl, prev_stall = 0;
  ctrl_word_t  cw;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      // hold check
      if (prev_stall) begin
        checks++;
        if (phy_tx_data !== prev_data || phy_tx_ctrl !== prev_ctrl) begin
          failures++; $display("FAIL: word changed while transceiver not ready");
        end
      end
      prev_stall <= phy_tx_valid && !phy_tx_ready;
      prev_data  <= phy_tx_data;
      prev_ctrl  <= phy_tx_ctrl;
      if (phy_tx_valid && phy_tx_ready) begin
        if (phy_tx_ctrl) begin
          cw = ctrl_word_t'(phy_tx_data);
          checks++;
          if (cw.cw_type != CW_IDLE || cw.xon !== prev_local_xon) begin
            failures++; $display("FAIL: bad idle word type=%h xon=%b", cw.cw_type, cw.xon);
          end
          if (cw.sof) begin
            checks++;
            if (in_frame) begin failures++; $display("FAIL: sof inside frame"); end
            in_frame <= 1; frame_len <= 0; frames++;
            if (first_sof < 0) first_sof = cyc;
          end else if (cw.eof) begin
            checks++;
            if (!in_frame) begin
              failures++; $display("FAIL: eof without frame (len %0d)", frame_len);
            end
            in_frame <= 0;
            last_eof = cyc;
          end else begin
            idle_fill++;
            checks++;
            if (in_frame) begin failures++; $display("FAIL: plain idle inside frame"); end
          end
        end else begin
          checks++;
          if (!in_frame) begin failures++; $display("FAIL: data word outside frame"); end
          checks++;
          if (!prev_remote_xon) begin failures++; $display("FAIL: data word sent during XOff"); end
          checks++;
          if (frame_len + 1 > F) begin failures++; $display("FAIL: frame longer than %0d", F); end
          frame_len <= frame_len + 1;
          checks++;
          if (phy_tx_data !== pattern(n_rx)) begin
            failures++; $display("FAIL: data word %0d out of order", n_rx);
          end
          n_rx++;
        end
      end
    end
    if (!phy_tx_valid || phy_tx_ready) prev_remote_xon <= remote_xon;
    if (!phy_tx_valid || phy_tx_ready) prev_local_xon <= local_xon;
  end

  always @(posedge clk) if (rst_n && fifo_valid && fifo_ready) n_popped <= n_popped + 1;

  initial begin
    local_xon = 1; remote_xon = 0; phy_tx_ready = 1;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // partner not ready yet: nothing may be sent
    push_words(64);
    repeat (30) @(posedge clk);
    checks++;
    if (n_rx != 0) begin failures++; $display("FAIL: sent before XOn"); end
    // rate: 64 words preloaded, continuous transceiver
    #1 remote_xon = 1;
    wait (n_rx == 64);
    repeat (5) @(posedge clk);
    checks++;
    if (last_eof - first_sof + 1 != 64 + 2 * 64 / F) begin
      failures++;
      $display("FAIL: burst took %0d cycles, expected %0d", last_eof - first_sof + 1, 64 + 2 * 64 / F);
    end
    checks++;
    if (tx_frames != 64 / F || tx_words != 64) begin
      failures++; $display("FAIL: counters frames=%0d words=%0d", tx_frames, tx_words);
    end
    // idle fill while empty, with XOff as the local bit
    #1 local_xon = 0;
    idle_fill = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (idle_fill < 15) begin failures++; $display("FAIL: only %0d idle words while empty", idle_fill); end
    #1 local_xon = 1;
    // random traffic, random transceiver ready, random partner XOn/XOff, gaps in the FIFO
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) push_words($urandom_range(1, 20));
      phy_tx_ready = ($urandom_range(0, 4) != 0);
      if ($urandom_range(0, 40) == 0) remote_xon = ~remote_xon;
      fifo_en = ($urandom_range(0, 5) != 0);
      if ($urandom_range(0, 30) == 0) local_xon = ~local_xon;
    end
    @(negedge clk);
    remote_xon = 1; phy_tx_ready = 1; fifo_en = 1;
    wait (n_rx == n_pushed);
    repeat (10) @(posedge clk);
    checks++;
    if (in_frame) begin failures++; $display("FAIL: frame left open"); end
    $display("ilk_tx_framer_tb: %0d data words in %0d frames", n_rx, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
