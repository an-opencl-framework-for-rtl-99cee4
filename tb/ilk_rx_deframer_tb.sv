`timescale 1ns/1ps
// ilk_rx_deframer_tb: self-checking test of the receive deframer.
//
// The test plays word streams into the transceiver side and checks: no link-up and no
// XOn before the first idle word; the partner's XOn/XOff bit follows received idle
// words; every data word reaches the receive FIFO write port, in order, one cycle
// later; control words never do; the local XOn/XOff bit switches at the fill level
// FIFO_DEPTH - XOFF_MARGIN; a data word outside a frame and an unknown control word
// raise proto_err; a write into a full FIFO raises rx_overflow.
module ilk_rx_deframer_tb;
  import novog_pkg::*;
  localparam int unsigned DEPTH  = 256;
  localparam int unsigned MARGIN = 128;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic              phy_rx_valid, phy_rx_ctrl;
  logic [DATA_W-1:0] phy_rx_data;
  logic              fifo_wr_valid, fifo_wr_ready;
  logic [DATA_W-1:0] fifo_wr_data;
  logic [$clog2(DEPTH):0] fifo_used;
  logic              local_xon, remote_xon, link_up, rx_overflow, proto_err;
  logic [31:0]       rx_frames, rx_words;

  ilk_rx_deframer #(.FIFO_DEPTH(DEPTH), .XOFF_MARGIN(MARGIN)) dut (.*);

  int checks = 0, failures = 0;
  int n_sent = 0, n_got = 0;

  function automatic logic [DATA_W-1:0] pattern(int k);
    return {8{32'(k) ^ 32'hc3c30000}};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_idle(logic sof, logic eof, logic xon);
    @(negedge clk);
    phy_rx_valid = 1; phy_rx_ctrl = 1; phy_rx_data = idle_word(sof, eof, xon);
  endtask

  task automatic send_data();
    @(negedge clk);
    phy_rx_valid = 1; phy_rx_ctrl = 0; phy_rx_data = pattern(n_sent);
    n_sent++;
  endtask

  task automatic send_gap();
    @(negedge clk);
    phy_rx_valid = 0; phy_rx_ctrl = 0; phy_rx_data = pattern(9999);
  endtask

  // receive FIFO model: checks order of written words
  always @(posedge clk) begin
    if (rst_n && fifo_wr_valid && fifo_wr_ready) begin
      checks++;
      if (fifo_wr_data !== pattern(n_got)) begin
        failures++; $display("FAIL: FIFO word %0d wrong", n_got);
      end
      n_got++;
    end
  end

  initial begin
    phy_rx_valid = 0; phy_rx_ctrl = 0; phy_rx_data = '0;
    fifo_wr_ready = 1; fifo_used = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    check(!link_up && !remote_xon, "link up or XOn before any idle word");
    check(local_xon, "local XOff with empty FIFO");
    // partner announces XOff, then XOn
    send_idle(0, 0, 0);
    send_gap();
    check(link_up && !remote_xon, "link not up / XOff not seen");
    send_idle(0, 0, 1);
    send_gap();
    check(remote_xon, "XOn not seen");
    check(!proto_err, "proto_err after idle words");
    // three frames of random length, with gaps from the transceiver
    for (int f = 0; f < 3; f++) begin
      send_idle(1, 0, 1);
      for (int i = 0; i < 1 + f * 5; i++) begin
        if ($urandom_range(0, 2) == 0) send_gap();
        send_data();
      end
      send_idle(0, 1, (f != 1));
    end
    send_gap();
    @(posedge clk); #1;
    check(n_got == n_sent, $sformatf("%0d of %0d data words reached the FIFO", n_got, n_sent));
    check(rx_frames == 3 && rx_words == 32'(n_sent), "frame / word counters");
    check(remote_xon, "last idle word had XOn");
    check(!proto_err && !rx_overflow, "error flag in clean traffic");
    // threshold of the local bit
    fifo_used = (DEPTH - MARGIN);
    #1 check(local_xon, "XOff at the threshold itself");
    fifo_used = (DEPTH - MARGIN + 1);
    #1 check(!local_xon, "no XOff above the threshold");
    fifo_used = '0;
    // data word outside a frame
    send_data();
    send_gap();
    @(posedge clk); #1;
    check(proto_err, "data outside frame not flagged");
    // unknown control word
    rst_n = 0; #1 rst_n = 1;
    n_got = n_sent;
    send_idle(0, 0, 1);
    @(negedge clk);
    phy_rx_valid = 1; phy_rx_ctrl = 1; phy_rx_data = '1;
    send_gap();
    @(posedge clk); #1;
    check(proto_err, "unknown control word not flagged");
    // overflow: FIFO full while a data word arrives
    rst_n = 0; #1 rst_n = 1;
    send_idle(1, 0, 1);
    fifo_wr_ready = 0;
    send_data();
    send_gap();
    send_gap();
    @(posedge clk); #1;
    check(rx_overflow, "overflow not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
