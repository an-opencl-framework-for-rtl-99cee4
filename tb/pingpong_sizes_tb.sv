`timescale 1ns/1ps
// pingpong_sizes_tb: the ping-pong benchmark over a range of data sizes.
//
// Two nodes at default sizes are cabled on all six links through 32 Gbit/s link models
// (5 words in 8 link cycles, 20 cycles latency); kernel clocks are 250 MHz, the link
// clock 200 MHz. For each data size per channel (1 kB, 16 kB, 256 kB, 4 MB, 64 MB) the
// benchmark runs once at full rate (gap 0, like an NDRange kernel) and, up to 256 kB,
// once paced to one word in four cycles (gap 3, like a single work-item kernel). Every
// word on every link is checked by pong. Reported per run: the apparent bandwidth of the
// ping kernel (words sent / time until ping finished) and the bandwidth seen by pong.
// Checked: for 1 kB and 16 kB at full rate the channel buffering absorbs the stream, so
// ping appears faster than the 32 Gbit/s line; from 256 kB on, pong sees the link limit
// of 5/8 x 16/18 of 51.2 Gbit/s (28.4) within a few percent; paced runs are capped at a
// quarter of the kernel's 64 Gbit/s (16 Gbit/s).
// The memory variant (node A in ROLE_MEM: ping data read from memory, returned data
// written to memory) runs for 1 kB, 16 kB and 256 kB. The memory models answer reads
// after 20 cycles and stall one request or write in ten. Every stored word must be the
// word read plus the increment, and from 256 kB on the bandwidth must stay at the link
// limit, as it does without memory.
module pingpong_sizes_tb;
  import novog_pkg::*;

  logic ka_clk = 0, kb_clk = 0, txrx_clk = 0;
  logic rst_n = 0;
  always #2.0 ka_clk = ~ka_clk;
  always #2.0 kb_clk = ~kb_clk;
  always #2.5 txrx_clk = ~txrx_clk;

  logic        a_start;
  node_role_e  a_role;
  logic [31:0] num_words;
  logic [63:0] seed, increment;
  logic [3:0]  gap;

  logic [NUM_LINKS-1:0]       a_ping_busy, a_ping_done, a_pong_busy, a_pong_done;
  logic [NUM_LINKS-1:0][31:0] a_ping_sent, a_pong_received, a_pong_errors, a_pong_lat, a_pong_run, a_incr;
  // global memory ports of node A (node B, running incr, never uses them)
  logic [NUM_LINKS-1:0]                  a_mem_wait, a_rmem_wait, a_rmem_valid;
  logic [NUM_LINKS-1:0][DATA_W-1:0]      a_rmem_data;
  logic [NUM_LINKS-1:0]                  a_cap_busy, a_cap_done, b_cap_busy, b_cap_done;
  logic [NUM_LINKS-1:0][31:0]            a_cap_written, a_cap_bursts, b_cap_written, b_cap_bursts;
  logic [NUM_LINKS-1:0][31:0]            a_mem_addr, b_mem_addr;
  logic [NUM_LINKS-1:0]                  a_mem_wr, b_mem_wr;
  logic [NUM_LINKS-1:0][DATA_W-1:0]      a_mem_wdata, b_mem_wdata;
  logic [NUM_LINKS-1:0][MEM_BURST_W-1:0] a_mem_bc, b_mem_bc, a_rmem_bc, b_rmem_bc;
  logic [NUM_LINKS-1:0]                  a_mping_busy, a_mping_done, b_mping_busy, b_mping_done;
  logic [NUM_LINKS-1:0]                  a_rmem_rd, b_rmem_rd;
  logic [NUM_LINKS-1:0][31:0]            a_mping_sent, b_mping_sent, a_rmem_addr, b_rmem_addr;
  logic [NUM_LINKS-1:0]       b_ping_busy, b_ping_done, b_pong_busy, b_pong_done;
  logic [NUM_LINKS-1:0][31:0] b_ping_sent, b_pong_received, b_pong_errors, b_pong_lat, b_pong_run, b_incr;
  logic [NUM_LINKS-1:0]       a_link_up, a_lxon, a_rxon, a_ovf, a_perr;
  logic [NUM_LINKS-1:0]       b_link_up, b_lxon, b_rxon, b_ovf, b_perr;
  logic [NUM_LINKS-1:0][31:0] a_txf, a_txw, a_rxf, a_rxw, b_txf, b_txw, b_rxf, b_rxw;

  logic [NUM_LINKS-1:0]             a_tx_valid, a_tx_ready, a_tx_ctrl, a_rx_valid, a_rx_ctrl;
  logic [NUM_LINKS-1:0][DATA_W-1:0] a_tx_data, a_rx_data;
  logic [NUM_LINKS-1:0]             b_tx_valid, b_tx_ready, b_tx_ctrl, b_rx_valid, b_rx_ctrl;
  logic [NUM_LINKS-1:0][DATA_W-1:0] b_tx_data, b_rx_data;

  novog_fpga_node dut_a (
    .kernel_clk (ka_clk), .kernel_rst_n (rst_n), .txrx_clk (txrx_clk), .txrx_rst_n (rst_n),
    .host_role (a_role), .host_start (a_start), .host_num_words (num_words), .host_seed (seed),
    .host_increment (increment), .host_gap (gap),
    .ping_busy (a_ping_busy), .ping_done (a_ping_done), .ping_sent (a_ping_sent),
    .pong_busy (a_pong_busy), .pong_done (a_pong_done), .pong_received (a_pong_received),
    .pong_errors (a_pong_errors), .pong_latency_cycles (a_pong_lat), .pong_run_cycles (a_pong_run),
    .incr_processed (a_incr), .host_mem_base (32'd0),
    .cap_busy (a_cap_busy), .cap_done (a_cap_done), .cap_written (a_cap_written),
    .cap_bursts (a_cap_bursts),
    .mem_address (a_mem_addr), .mem_write (a_mem_wr), .mem_writedata (a_mem_wdata),
    .mem_burstcount (a_mem_bc), .mem_waitrequest (a_mem_wait),
    .host_rd_base (RD_BASE), .mping_busy (a_mping_busy), .mping_done (a_mping_done),
    .mping_sent (a_mping_sent), .rmem_address (a_rmem_addr), .rmem_read (a_rmem_rd),
    .rmem_burstcount (a_rmem_bc), .rmem_waitrequest (a_rmem_wait), .rmem_readdata (a_rmem_data),
    .rmem_readdatavalid (a_rmem_valid),
    .link_up (a_link_up), .local_xon (a_lxon), .remote_xon (a_rxon), .rx_overflow (a_ovf),
    .proto_err (a_perr), .tx_frames (a_txf), .tx_words (a_txw), .rx_frames (a_rxf), .rx_words (a_rxw),
    .phy_tx_valid (a_tx_valid), .phy_tx_ready (a_tx_ready), .phy_tx_ctrl (a_tx_ctrl),
    .phy_tx_data (a_tx_data), .phy_rx_valid (a_rx_valid), .phy_rx_ctrl (a_rx_ctrl),
    .phy_rx_data (a_rx_data)
  );

  novog_fpga_node dut_b (
    .kernel_clk (kb_clk), .kernel_rst_n (rst_n), .txrx_clk (txrx_clk), .txrx_rst_n (rst_n),
    .host_role (ROLE_INCR), .host_start (1'b0), .host_num_words (num_words), .host_seed (seed),
    .host_increment (increment), .host_gap (gap),
    .ping_busy (b_ping_busy), .ping_done (b_ping_done), .ping_sent (b_ping_sent),
    .pong_busy (b_pong_busy), .pong_done (b_pong_done), .pong_received (b_pong_received),
    .pong_errors (b_pong_errors), .pong_latency_cycles (b_pong_lat), .pong_run_cycles (b_pong_run),
    .incr_processed (b_incr), .host_mem_base (32'd0),
    .cap_busy (b_cap_busy), .cap_done (b_cap_done), .cap_written (b_cap_written),
    .cap_bursts (b_cap_bursts),
    .mem_address (b_mem_addr), .mem_write (b_mem_wr), .mem_writedata (b_mem_wdata),
    .mem_burstcount (b_mem_bc), .mem_waitrequest ('0),
    .host_rd_base (32'd0), .mping_busy (b_mping_busy), .mping_done (b_mping_done),
    .mping_sent (b_mping_sent), .rmem_address (b_rmem_addr), .rmem_read (b_rmem_rd),
    .rmem_burstcount (b_rmem_bc), .rmem_waitrequest ('0), .rmem_readdata ('0),
    .rmem_readdatavalid ('0),
    .link_up (b_link_up), .local_xon (b_lxon), .remote_xon (b_rxon), .rx_overflow (b_ovf),
    .proto_err (b_perr), .tx_frames (b_txf), .tx_words (b_txw), .rx_frames (b_rxf), .rx_words (b_rxw),
    .phy_tx_valid (b_tx_valid), .phy_tx_ready (b_tx_ready), .phy_tx_ctrl (b_tx_ctrl),
    .phy_tx_data (b_tx_data), .phy_rx_valid (b_rx_valid), .phy_rx_ctrl (b_rx_ctrl),
    .phy_rx_data (b_rx_data)
  );

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_cable
    xcvr_link_model #(.LATENCY(20), .ACCEPT(5), .PERIOD(8)) u_ab (
      .clk (txrx_clk), .rst_n (rst_n),
      .tx_valid (a_tx_valid[i]), .tx_ready (a_tx_ready[i]), .tx_ctrl (a_tx_ctrl[i]), .tx_data (a_tx_data[i]),
      .rx_valid (b_rx_valid[i^1]), .rx_ctrl (b_rx_ctrl[i^1]), .rx_data (b_rx_data[i^1])
    );
    xcvr_link_model #(.LATENCY(20), .ACCEPT(5), .PERIOD(8)) u_ba (
      .clk (txrx_clk), .rst_n (rst_n),
      .tx_valid (b_tx_valid[i^1]), .tx_ready (b_tx_ready[i^1]), .tx_ctrl (b_tx_ctrl[i^1]), .tx_data (b_tx_data[i^1]),
      .rx_valid (a_rx_valid[i]), .rx_ctrl (a_rx_ctrl[i]), .rx_data (a_rx_data[i])
    );
  end

  // memory of node A: link i writes words i*n .. i*n + n-1 (n up to 8192)
  localparam int unsigned MEM_WORDS = NUM_LINKS * 8192;
  localparam logic [31:0] RD_BASE   = 32'h0100_0000;
  int w_err[NUM_LINKS], w_bursts[NUM_LINKS], w_beats[NUM_LINKS], w_waits[NUM_LINKS];
  int r_err[NUM_LINKS], r_bursts[NUM_LINKS], r_words[NUM_LINKS], r_waits[NUM_LINKS];
  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_mem
    avalon_mem_model #(.DATA_W(DATA_W), .BURST_W(MEM_BURST_W), .WORDS(MEM_WORDS)) u_wmem (
      .clk (ka_clk), .rst_n (rst_n), .wait_pct (10),
      .address (a_mem_addr[i]), .write (a_mem_wr[i]), .writedata (a_mem_wdata[i]),
      .burstcount (a_mem_bc[i]), .waitrequest (a_mem_wait[i]),
      .errors (w_err[i]), .n_bursts (w_bursts[i]), .n_beats (w_beats[i]), .n_waits (w_waits[i])
    );
    avalon_rd_mem_model #(.DATA_W(DATA_W), .BURST_W(MEM_BURST_W), .LATENCY(20)) u_rmem (
      .clk (ka_clk), .rst_n (rst_n), .wait_pct (10),
      .address (a_rmem_addr[i]), .read (a_rmem_rd[i]), .burstcount (a_rmem_bc[i]),
      .waitrequest (a_rmem_wait[i]), .readdata (a_rmem_data[i]), .readdatavalid (a_rmem_valid[i]),
      .errors (r_err[i]), .n_bursts (r_bursts[i]), .n_words (r_words[i]), .n_waits (r_waits[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Gbit/s of n 256-bit words in c cycles of the 250 MHz kernel clock
  function automatic real gbps(int n, int c);
    return real'(n) * 256.0 * 0.25 / real'(c);
  endfunction

  task automatic run(input int bytes, input int g, output real ping_bw, output real pong_bw);
    int n, c, ping_c, max_run;
    n = bytes / 32;
    num_words = 32'(n);
    gap = 4'(g);
    seed = seed + 64'h1_0000_0000;
    @(negedge ka_clk) a_start = 1;
    @(negedge ka_clk) a_start = 0;
    c = 1; ping_c = 0;
    while (!(&a_pong_done)) begin
      @(negedge ka_clk);
      c++;
      if (ping_c == 0 && &a_ping_done) ping_c = c;
    end
    max_run = 0;
    for (int i = 0; i < NUM_LINKS; i++) begin
      check(a_ping_sent[i] == 32'(n) && a_pong_received[i] == 32'(n) && a_pong_errors[i] == 0,
            $sformatf("%0d B gap %0d link %0d: sent %0d received %0d errors %0d", bytes, g, i,
                      a_ping_sent[i], a_pong_received[i], a_pong_errors[i]));
      if (int'(a_pong_run[i]) > max_run) max_run = int'(a_pong_run[i]);
    end
    check(a_ovf == '0 && b_ovf == '0 && a_perr == '0 && b_perr == '0, "overflow or framing error");
    ping_bw = gbps(n, ping_c);
    pong_bw = gbps(n, max_run);
    $display("%8d B/channel  gap %0d  ping %6.2f Gbit/s  pong %6.2f Gbit/s  first word after %0d cycles",
             bytes, g, ping_bw, pong_bw, a_pong_lat[0]);
  endtask

  // memory variant: bandwidth from start until every link has stored its last word
  task automatic run_mem(input int bytes, output real ping_bw, output real store_bw);
    int n, c, ping_c, errs;
    logic [DATA_W-1:0] exp_w, got;
    logic [31:0]       ra;
    n = bytes / 32;
    num_words = 32'(n);
    gap = 4'd0;
    @(negedge ka_clk) a_start = 1;
    @(negedge ka_clk) a_start = 0;
    c = 1; ping_c = 0;
    while (!(&a_cap_done)) begin
      @(negedge ka_clk);
      c++;
      if (ping_c == 0 && &a_mping_done) ping_c = c;
    end
    for (int i = 0; i < NUM_LINKS; i++) begin
      check(a_mping_sent[i] == 32'(n) && a_cap_written[i] == 32'(n),
            $sformatf("mem %0d B link %0d: read %0d stored %0d", bytes, i, a_mping_sent[i], a_cap_written[i]));
      check(w_err[i] == 0 && r_err[i] == 0, $sformatf("mem %0d B link %0d: memory protocol error", bytes, i));
      errs = 0;
      for (int k = 0; k < n; k++) begin
        ra = RD_BASE + 32'(i * n + k);
        for (int j = 0; j < 4; j++) exp_w[64*j +: 64] = {ra, 32'hC0DE_0000 + 32'(j)} + increment;
        case (i)
          0: got = g_mem[0].u_wmem.mem[i * n + k];
          1: got = g_mem[1].u_wmem.mem[i * n + k];
          2: got = g_mem[2].u_wmem.mem[i * n + k];
          3: got = g_mem[3].u_wmem.mem[i * n + k];
          4: got = g_mem[4].u_wmem.mem[i * n + k];
          default: got = g_mem[5].u_wmem.mem[i * n + k];
        endcase
        if (got !== exp_w) errs++;
      end
      check(errs == 0, $sformatf("mem %0d B link %0d: %0d stored words wrong", bytes, i, errs));
    end
    check(a_ovf == '0 && b_ovf == '0 && a_perr == '0 && b_perr == '0, "overflow or framing error");
    ping_bw  = gbps(n, ping_c);
    store_bw = gbps(n, c);
    $display("%8d B/channel  memory  ping %6.2f Gbit/s  stored %6.2f Gbit/s",
             bytes, ping_bw, store_bw);
  endtask

  real pi, po;

  initial begin
    a_start = 0; num_words = 0; gap = 0; a_role = ROLE_PINGPONG;
    seed = 64'h0abc_0000_0000_0000; increment = 64'd77;
    repeat (5) @(posedge txrx_clk);
    #1 rst_n = 1;
    repeat (100) @(posedge txrx_clk);
    check(&a_link_up && &b_link_up, "links not up");
    // full rate (NDRange-like)
    run(1024, 0, pi, po);
    check(pi > 32.0, "1 kB: ping not absorbed by the channel buffering");
    run(16384, 0, pi, po);
    check(pi > 32.0, "16 kB: ping not absorbed by the channel buffering");
    run(262144, 0, pi, po);
    check(po > 26.5 && po < 28.5, "256 kB: pong bandwidth not at the link limit");
    run(4194304, 0, pi, po);
    check(po > 27.5 && po < 28.5, "4 MB: pong bandwidth not at the link limit");
    check(pi < 32.0, "4 MB: ping faster than the line");
    run(67108864, 0, pi, po);
    check(po > 28.0 && po < 28.5, "64 MB: pong bandwidth not at the link limit");
    // paced (task-like)
    run(1024, 3, pi, po);
    run(16384, 3, pi, po);
    run(262144, 3, pi, po);
    check(po > 15.0 && po <= 16.0, "256 kB paced: pong bandwidth not a quarter of the kernel rate");
    // memory variant
    a_role = ROLE_MEM;
    repeat (10) @(negedge ka_clk);
    run_mem(1024, pi, po);
    check(pi > 32.0, "memory 1 kB: ping not absorbed by the channel buffering");
    run_mem(16384, pi, po);
    run_mem(262144, pi, po);
    check(po > 26.5 && po < 28.5, "memory 256 kB: bandwidth not at the link limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge txrx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
