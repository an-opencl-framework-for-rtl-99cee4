`timescale 1ns/1ps
// novog_fpga_node_tb: end-to-end ping-pong benchmark between two FPGA nodes.
//
// Two nodes at their default sizes are cabled on all six links (node A's posx to node
// B's negx and so on) through link models of 32 Gbps (5 words accepted in 8 link
// cycles) and 20 link cycles of latency; the link clock is 200 MHz, node A's kernel
// clock 250 MHz. Node A runs ping and pong, node B incr, as in the ping-pong study.
// Runs:
//   1 flow control  B's kernel clock at 50 MHz, slower than the link: B's receive
//                   FIFOs must ask for XOff and A's ping kernels must be held back.
//   2 task rate     ping paced to one word in four cycles (gap 3): the run must take
//                   four kernel cycles per word plus the round trip.
//   3 full rate     both kernels at full speed: the link must be the limit, carrying
//                   16 data words in every 18 framed words at 5/8 of the link clock.
//   4 one word      single-word round trip; its latency is reported.
//   5 roles swapped B runs ping/pong and A incr (the role switch).
//   6 capture       A runs ping and stores the returning words in global memory
//                   (memory models that stall at random); the testbench then reads
//                   every stored word back and checks it.
//   7 memory        A reads its ping data from global memory (read models answering
//                   after 12 cycles, stalling at random) and stores the returning
//                   words; every stored word must be the read word plus the increment.
// Every run checks every word on every link (pong counts mismatches) and the word
// counts. The test counts how often each mechanism happened and fails for any that
// never did: frame start/end idle words, idle fill while the FIFO is empty, frames cut
// short, full-length frames, XOff, ping back-pressure, transceiver stalls, role
// switch, memory write bursts, memory wait cycles and memory read bursts.
module novog_fpga_node_tb;
  import novog_pkg::*;
  localparam int unsigned F = 16;           // default frame length of the node

  logic ka_clk = 0, kb_clk = 0, txrx_clk = 0;
  logic ka_rst_n = 0, kb_rst_n = 0, txrx_rst_n = 0;
  realtime kb_half = 10.0;
  always #2.0 ka_clk = ~ka_clk;
  always #(kb_half) kb_clk = ~kb_clk;
  always #2.5 txrx_clk = ~txrx_clk;

  // host registers
  node_role_e  a_role, b_role;
  logic        a_start, b_start;
  logic [31:0] num_words;
  logic [63:0] seed, increment;
  logic [3:0]  gap;
  logic [31:0] mem_base, rd_base;

  // node status
  logic [NUM_LINKS-1:0]       a_ping_busy, a_ping_done, a_pong_busy, a_pong_done;
  logic [NUM_LINKS-1:0]       b_ping_busy, b_ping_done, b_pong_busy, b_pong_done;
  logic [NUM_LINKS-1:0][31:0] a_ping_sent, a_pong_received, a_pong_errors, a_pong_lat, a_pong_run, a_incr;
  logic [NUM_LINKS-1:0][31:0] b_ping_sent, b_pong_received, b_pong_errors, b_pong_lat, b_pong_run, b_incr;
  logic [NUM_LINKS-1:0]       a_link_up, a_lxon, a_rxon, a_ovf, a_perr;
  logic [NUM_LINKS-1:0]       b_link_up, b_lxon, b_rxon, b_ovf, b_perr;
  logic [NUM_LINKS-1:0][31:0] a_txf, a_txw, a_rxf, a_rxw, b_txf, b_txw, b_rxf, b_rxw;
  logic [NUM_LINKS-1:0]       a_cap_busy, a_cap_done, b_cap_busy, b_cap_done;
  logic [NUM_LINKS-1:0][31:0] a_cap_written, a_cap_bursts, b_cap_written, b_cap_bursts;

  // global memory ports
  localparam int unsigned MEM_WORDS = 2048;
  logic [NUM_LINKS-1:0][31:0]             a_mem_addr, b_mem_addr;
  logic [NUM_LINKS-1:0]                   a_mem_wr, b_mem_wr, a_mem_wait, b_mem_wait;
  logic [NUM_LINKS-1:0][DATA_W-1:0]       a_mem_wdata, b_mem_wdata;
  logic [NUM_LINKS-1:0][MEM_BURST_W-1:0]  a_mem_bc, b_mem_bc;
  int                                     m_err[2][NUM_LINKS], m_bursts[2][NUM_LINKS];
  int                                     m_beats[2][NUM_LINKS], m_waits[2][NUM_LINKS];
  logic [NUM_LINKS-1:0]                   a_mping_busy, a_mping_done, b_mping_busy, b_mping_done;
  logic [NUM_LINKS-1:0][31:0]             a_mping_sent, b_mping_sent;
  logic [NUM_LINKS-1:0][31:0]             a_rmem_addr, b_rmem_addr;
  logic [NUM_LINKS-1:0]                   a_rmem_rd, b_rmem_rd, a_rmem_wait, a_rmem_valid;
  logic [NUM_LINKS-1:0][MEM_BURST_W-1:0]  a_rmem_bc, b_rmem_bc;
  logic [NUM_LINKS-1:0][DATA_W-1:0]       a_rmem_data;
  int                                     r_err[NUM_LINKS], r_bursts[NUM_LINKS];
  int                                     r_words[NUM_LINKS], r_waits[NUM_LINKS];

  // transceiver wires
  logic [NUM_LINKS-1:0]             a_tx_valid, a_tx_ready, a_tx_ctrl, a_rx_valid, a_rx_ctrl;
  logic [NUM_LINKS-1:0][DATA_W-1:0] a_tx_data, a_rx_data;
  logic [NUM_LINKS-1:0]             b_tx_valid, b_tx_ready, b_tx_ctrl, b_rx_valid, b_rx_ctrl;
  logic [NUM_LINKS-1:0][DATA_W-1:0] b_tx_data, b_rx_data;

  novog_fpga_node dut_a (
    .kernel_clk (ka_clk), .kernel_rst_n (ka_rst_n), .txrx_clk (txrx_clk), .txrx_rst_n (txrx_rst_n),
    .host_role (a_role), .host_start (a_start), .host_num_words (num_words), .host_seed (seed),
    .host_increment (increment), .host_gap (gap),
    .ping_busy (a_ping_busy), .ping_done (a_ping_done), .ping_sent (a_ping_sent),
    .pong_busy (a_pong_busy), .pong_done (a_pong_done), .pong_received (a_pong_received),
    .pong_errors (a_pong_errors), .pong_latency_cycles (a_pong_lat), .pong_run_cycles (a_pong_run),
    .incr_processed (a_incr), .host_mem_base (mem_base),
    .cap_busy (a_cap_busy), .cap_done (a_cap_done), .cap_written (a_cap_written),
    .cap_bursts (a_cap_bursts),
    .mem_address (a_mem_addr), .mem_write (a_mem_wr), .mem_writedata (a_mem_wdata),
    .mem_burstcount (a_mem_bc), .mem_waitrequest (a_mem_wait),
    .host_rd_base (rd_base), .mping_busy (a_mping_busy), .mping_done (a_mping_done),
    .mping_sent (a_mping_sent), .rmem_address (a_rmem_addr), .rmem_read (a_rmem_rd),
    .rmem_burstcount (a_rmem_bc), .rmem_waitrequest (a_rmem_wait), .rmem_readdata (a_rmem_data), .rmem_readdatavalid (a_rmem_valid),
    .link_up (a_link_up), .local_xon (a_lxon), .remote_xon (a_rxon), .rx_overflow (a_ovf),
    .proto_err (a_perr), .tx_frames (a_txf), .tx_words (a_txw), .rx_frames (a_rxf), .rx_words (a_rxw),
    .phy_tx_valid (a_tx_valid), .phy_tx_ready (a_tx_ready), .phy_tx_ctrl (a_tx_ctrl),
    .phy_tx_data (a_tx_data), .phy_rx_valid (a_rx_valid), .phy_rx_ctrl (a_rx_ctrl),
    .phy_rx_data (a_rx_data)
  );

  novog_fpga_node dut_b (
    .kernel_clk (kb_clk), .kernel_rst_n (kb_rst_n), .txrx_clk (txrx_clk), .txrx_rst_n (txrx_rst_n),
    .host_role (b_role), .host_start (b_start), .host_num_words (num_words), .host_seed (seed),
    .host_increment (increment), .host_gap (gap),
    .ping_busy (b_ping_busy), .ping_done (b_ping_done), .ping_sent (b_ping_sent),
    .pong_busy (b_pong_busy), .pong_done (b_pong_done), .pong_received (b_pong_received),
    .pong_errors (b_pong_errors), .pong_latency_cycles (b_pong_lat), .pong_run_cycles (b_pong_run),
    .incr_processed (b_incr), .host_mem_base (mem_base),
    .cap_busy (b_cap_busy), .cap_done (b_cap_done), .cap_written (b_cap_written),
    .cap_bursts (b_cap_bursts),
    .mem_address (b_mem_addr), .mem_write (b_mem_wr), .mem_writedata (b_mem_wdata),
    .mem_burstcount (b_mem_bc), .mem_waitrequest (b_mem_wait),
    .host_rd_base (rd_base), .mping_busy (b_mping_busy), .mping_done (b_mping_done),
    .mping_sent (b_mping_sent), .rmem_address (b_rmem_addr), .rmem_read (b_rmem_rd),
    .rmem_burstcount (b_rmem_bc), .rmem_waitrequest ('0), .rmem_readdata ('0), .rmem_readdatavalid ('0),
    .link_up (b_link_up), .local_xon (b_lxon), .remote_xon (b_rxon), .rx_overflow (b_ovf),
    .proto_err (b_perr), .tx_frames (b_txf), .tx_words (b_txw), .rx_frames (b_rxf), .rx_words (b_rxw),
    .phy_tx_valid (b_tx_valid), .phy_tx_ready (b_tx_ready), .phy_tx_ctrl (b_tx_ctrl),
    .phy_tx_data (b_tx_data), .phy_rx_valid (b_rx_valid), .phy_rx_ctrl (b_rx_ctrl),
    .phy_rx_data (b_rx_data)
  );

  // cabling: A link i <-> B link i^1 (posx to negx, ...)
  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_cable
    xcvr_link_model #(.LATENCY(20), .ACCEPT(5), .PERIOD(8)) u_ab (
      .clk (txrx_clk), .rst_n (txrx_rst_n),
      .tx_valid (a_tx_valid[i]), .tx_ready (a_tx_ready[i]), .tx_ctrl (a_tx_ctrl[i]), .tx_data (a_tx_data[i]),
      .rx_valid (b_rx_valid[i^1]), .rx_ctrl (b_rx_ctrl[i^1]), .rx_data (b_rx_data[i^1])
    );
    xcvr_link_model #(.LATENCY(20), .ACCEPT(5), .PERIOD(8)) u_ba (
      .clk (txrx_clk), .rst_n (txrx_rst_n),
      .tx_valid (b_tx_valid[i^1]), .tx_ready (b_tx_ready[i^1]), .tx_ctrl (b_tx_ctrl[i^1]), .tx_data (b_tx_data[i^1]),
      .rx_valid (a_rx_valid[i]), .rx_ctrl (a_rx_ctrl[i]), .rx_data (a_rx_data[i])
    );
  end

  // one global memory per link and node, stalling a fifth of the time
  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_mem
    avalon_mem_model #(.DATA_W(DATA_W), .BURST_W(MEM_BURST_W), .WORDS(MEM_WORDS)) u_mem_a (
      .clk (ka_clk), .rst_n (ka_rst_n), .wait_pct (20),
      .address (a_mem_addr[i]), .write (a_mem_wr[i]), .writedata (a_mem_wdata[i]),
      .burstcount (a_mem_bc[i]), .waitrequest (a_mem_wait[i]),
      .errors (m_err[0][i]), .n_bursts (m_bursts[0][i]), .n_beats (m_beats[0][i]),
      .n_waits (m_waits[0][i])
    );
    avalon_mem_model #(.DATA_W(DATA_W), .BURST_W(MEM_BURST_W), .WORDS(MEM_WORDS)) u_mem_b (
      .clk (kb_clk), .rst_n (kb_rst_n), .wait_pct (20),
      .address (b_mem_addr[i]), .write (b_mem_wr[i]), .writedata (b_mem_wdata[i]),
      .burstcount (b_mem_bc[i]), .waitrequest (b_mem_wait[i]),
      .errors (m_err[1][i]), .n_bursts (m_bursts[1][i]), .n_beats (m_beats[1][i]),
      .n_waits (m_waits[1][i])
    );
  end

  // node A's global memory read ports (node B never reads)
  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_rmem
    avalon_rd_mem_model #(.DATA_W(DATA_W), .BURST_W(MEM_BURST_W), .LATENCY(12)) u_rmem (
      .clk (ka_clk), .rst_n (ka_rst_n), .wait_pct (20),
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

  // ---------------- mechanism counters ----------------
  int ev_sof = 0, ev_eof = 0, ev_idle_fill = 0, ev_short_frame = 0, ev_full_frame = 0;
  int ev_xoff = 0, ev_ping_held = 0, ev_phy_stall = 0, ev_role_switch = 0;
  int flen[2][NUM_LINKS];

  // decode the word streams leaving both nodes
  always @(posedge txrx_clk) begin
    if (txrx_rst_n)
      for (int n = 0; n < 2; n++)
        for (int i = 0; i < NUM_LINKS; i++) begin
          logic v, r, c;
          ctrl_word_t cw;
          v  = n == 0 ? a_tx_valid[i] : b_tx_valid[i];
          r  = n == 0 ? a_tx_ready[i] : b_tx_ready[i];
          c  = n == 0 ? a_tx_ctrl[i]  : b_tx_ctrl[i];
          cw = ctrl_word_t'(n == 0 ? a_tx_data[i] : b_tx_data[i]);
          if (v && !r) ev_phy_stall++;
          if (v && r) begin
            if (!c) flen[n][i]++;
            else if (cw.sof) begin ev_sof++; flen[n][i] = 0; end
            else if (cw.eof) begin
              ev_eof++;
              if (flen[n][i] == F) ev_full_frame++;
              else ev_short_frame++;
              if (flen[n][i] > F) begin failures++; $display("FAIL: frame of %0d words", flen[n][i]); end
            end else if ((n == 0 ? a_ping_busy[i] : b_ping_busy[i]) ||
                         (n == 0 ? a_pong_busy[i] : b_pong_busy[i])) ev_idle_fill++;
          end
          if (!(n == 0 ? a_lxon[i] : b_lxon[i])) ev_xoff++;
        end
  end

  // ping held back: busy, not pacing itself (gap 0), yet no word accepted this cycle
  logic [NUM_LINKS-1:0][31:0] a_sent_q;
  always @(posedge ka_clk) begin
    if (ka_rst_n && a_role == ROLE_PINGPONG && gap == 0)
      for (int i = 0; i < NUM_LINKS; i++)
        if (a_ping_busy[i] && a_ping_sent[i] == a_sent_q[i]) ev_ping_held++;
    a_sent_q <= a_ping_sent;
  end

  // ---------------- one benchmark run ----------------
  // runs on the node in ROLE_PINGPONG; returns the longest run time in its kernel cycles
  task automatic run(input int n, input int g, output int max_run, output int max_lat);
    logic [NUM_LINKS-1:0][31:0] incr0;
    bit a_is_src;
    a_is_src  = (a_role == ROLE_PINGPONG);
    incr0     = a_is_src ? b_incr : a_incr;
    num_words = 32'(n);
    gap       = 4'(g);
    seed      = seed + 64'h1_0000_0000;
    if (a_is_src) begin
      @(negedge ka_clk) a_start = 1;
      @(negedge ka_clk) a_start = 0;
      wait (&a_pong_done);
    end else begin
      @(negedge kb_clk) b_start = 1;
      @(negedge kb_clk) b_start = 0;
      wait (&b_pong_done);
    end
    repeat (4) @(posedge txrx_clk);
    max_run = 0; max_lat = 0;
    for (int i = 0; i < NUM_LINKS; i++) begin
      logic [31:0] sent, recv, errs, run_c, lat, incr1;
      sent  = a_is_src ? a_ping_sent[i]     : b_ping_sent[i];
      recv  = a_is_src ? a_pong_received[i] : b_pong_received[i];
      errs  = a_is_src ? a_pong_errors[i]   : b_pong_errors[i];
      run_c = a_is_src ? a_pong_run[i]      : b_pong_run[i];
      lat   = a_is_src ? a_pong_lat[i]      : b_pong_lat[i];
      incr1 = a_is_src ? b_incr[i]          : a_incr[i];
      check(sent == 32'(n) && recv == 32'(n),
            $sformatf("link %0d: sent %0d received %0d of %0d", i, sent, recv, n));
      check(errs == 0, $sformatf("link %0d: %0d words came back wrong", i, errs));
      check(incr1 - incr0[i] == 32'(n), $sformatf("link %0d: incr passed %0d words", i, incr1 - incr0[i]));
      if (int'(run_c) > max_run) max_run = int'(run_c);
      if (int'(lat) > max_lat) max_lat = int'(lat);
    end
    check(a_ovf == '0 && b_ovf == '0, "receive FIFO overflow");
    check(a_perr == '0 && b_perr == '0, "framing error");
  endtask

  int run_c, lat_c;
  real eff;
  int ev_mem_burst, ev_mem_wait, ev_mem_read;
  int beats0[NUM_LINKS];
  logic [DATA_W-1:0] mem_word[NUM_LINKS];

  initial begin
    a_role = ROLE_PINGPONG; b_role = ROLE_INCR;
    a_start = 0; b_start = 0; num_words = 0; gap = 0; mem_base = 32'd40; rd_base = 32'h0010_0000;
    seed = 64'h0123_4567_0000_0000; increment = 64'h0000_0001_0000_0003;
    for (int n = 0; n < 2; n++) for (int i = 0; i < NUM_LINKS; i++) flen[n][i] = 0;
    repeat (5) @(posedge txrx_clk);
    #1 ka_rst_n = 1; kb_rst_n = 1; txrx_rst_n = 1;
    repeat (100) @(posedge txrx_clk);
    check(&a_link_up && &b_link_up, "links not up");

    // 1: flow control
    run(2000, 0, run_c, lat_c);
    $display("run 1 (B kernel 50 MHz): %0d words/link, %0d cycles of XOff so far", 2000, ev_xoff);

    // 2: task rate
    kb_half = 2.0;
    repeat (20) @(posedge kb_clk);
    run(1000, 3, run_c, lat_c);
    check(run_c >= 4 * 1000 && run_c <= 4 * 1000 + 400,
          $sformatf("task-rate run took %0d kernel cycles for 1000 words", run_c));
    $display("run 2 (gap 3): %0d kernel cycles for 1000 words", run_c);

    // 3: full rate, link bound
    run(4000, 0, run_c, lat_c);
    // link words per data word: 18/16 framed, at 5 of 8 link cycles; 1 link cycle = 1.25 kernel cycles
    eff = (4000.0 * 1.25) / real'(run_c);   // data words per link cycle
    check(eff > 0.52 && eff <= 5.0 / 8.0 * 16.0 / 18.0 + 0.001,
          $sformatf("full-rate efficiency %f data words per link cycle", eff));
    $display("run 3 (full rate): %0d kernel cycles for 4000 words, %f words/link cycle = %f Gbit/s per link",
             run_c, eff, eff * 256.0 * 0.2);

    // 4: one word round trip
    run(1, 0, run_c, lat_c);
    check(lat_c > 2 * 20, $sformatf("single-word latency %0d kernel cycles", lat_c));
    $display("run 4 (one word): round trip %0d kernel cycles = %0d ns", lat_c, lat_c * 4);

    // 5: roles swapped
    a_role = ROLE_INCR; b_role = ROLE_PINGPONG;
    ev_role_switch++;
    repeat (10) @(posedge ka_clk);
    run(500, 0, run_c, lat_c);

    // 6: capture into global memory; word k of link i at mem_base + i*n + k
    a_role = ROLE_CAPTURE; b_role = ROLE_INCR;
    ev_role_switch++;
    repeat (10) @(posedge ka_clk);
    num_words = 32'd300; gap = 0;
    seed      = seed + 64'h1_0000_0000;
    @(negedge ka_clk) a_start = 1;
    @(negedge ka_clk) a_start = 0;
    wait (&a_cap_done);
    repeat (4) @(posedge ka_clk);
    ev_mem_burst = 0; ev_mem_wait = 0;
    for (int i = 0; i < NUM_LINKS; i++) begin
      int errs;
      logic [DATA_W-1:0] exp_w;
      check(a_cap_written[i] == num_words && a_ping_sent[i] == num_words,
            $sformatf("link %0d: captured %0d of %0d", i, a_cap_written[i], num_words));
      check(a_cap_bursts[i] == (num_words + MEM_BURST - 1) / MEM_BURST,
            $sformatf("link %0d: %0d memory bursts", i, a_cap_bursts[i]));
      check(m_err[0][i] == 0 && m_beats[0][i] == int'(num_words),
            $sformatf("link %0d: memory saw %0d protocol errors, %0d beats", i, m_err[0][i], m_beats[0][i]));
      errs = 0;
      for (int k = 0; k < int'(num_words); k++) begin
        for (int j = 0; j < 4; j++) exp_w[64*j +: 64] = seed + 64'(4 * k + j) + increment;
        case (i)
          0: mem_word[i] = g_mem[0].u_mem_a.mem[mem_base + 0 * num_words + 32'(k)];
          1: mem_word[i] = g_mem[1].u_mem_a.mem[mem_base + 1 * num_words + 32'(k)];
          2: mem_word[i] = g_mem[2].u_mem_a.mem[mem_base + 2 * num_words + 32'(k)];
          3: mem_word[i] = g_mem[3].u_mem_a.mem[mem_base + 3 * num_words + 32'(k)];
          4: mem_word[i] = g_mem[4].u_mem_a.mem[mem_base + 4 * num_words + 32'(k)];
          default: mem_word[i] = g_mem[5].u_mem_a.mem[mem_base + 5 * num_words + 32'(k)];
        endcase
        if (mem_word[i] !== exp_w) errs++;
      end
      check(errs == 0, $sformatf("link %0d: %0d stored words wrong", i, errs));
      check(m_bursts[1][i] == 0, "node B wrote memory");
      ev_mem_burst += m_bursts[0][i];
      ev_mem_wait  += m_waits[0][i];
    end

    // 7: memory to memory; the data sent come from memory word rd_base + i*n + k
    a_role = ROLE_MEM; b_role = ROLE_INCR;
    ev_role_switch++;
    repeat (10) @(posedge ka_clk);
    num_words = 32'd250;
    for (int i = 0; i < NUM_LINKS; i++) beats0[i] = m_beats[0][i];
    @(negedge ka_clk) a_start = 1;
    @(negedge ka_clk) a_start = 0;
    wait (&a_cap_done);
    repeat (4) @(posedge ka_clk);
    ev_mem_read = 0;
    for (int i = 0; i < NUM_LINKS; i++) begin
      int errs;
      logic [DATA_W-1:0] exp_w;
      logic [31:0]       ra;
      check(a_mping_sent[i] == num_words && a_cap_written[i] == num_words,
            $sformatf("link %0d: read %0d, stored %0d of %0d", i, a_mping_sent[i], a_cap_written[i], num_words));
      check(r_err[i] == 0 && r_words[i] == int'(num_words),
            $sformatf("link %0d: read memory returned %0d words", i, r_words[i]));
      check(m_err[0][i] == 0 && m_beats[0][i] - beats0[i] == int'(num_words),
            $sformatf("link %0d: write memory took %0d beats", i, m_beats[0][i] - beats0[i]));
      errs = 0;
      for (int k = 0; k < int'(num_words); k++) begin
        ra = rd_base + 32'(i) * num_words + 32'(k);
        for (int j = 0; j < 4; j++) exp_w[64*j +: 64] = {ra, 32'hC0DE_0000 + 32'(j)} + increment;
        case (i)
          0: mem_word[i] = g_mem[0].u_mem_a.mem[mem_base + 0 * num_words + 32'(k)];
          1: mem_word[i] = g_mem[1].u_mem_a.mem[mem_base + 1 * num_words + 32'(k)];
          2: mem_word[i] = g_mem[2].u_mem_a.mem[mem_base + 2 * num_words + 32'(k)];
          3: mem_word[i] = g_mem[3].u_mem_a.mem[mem_base + 3 * num_words + 32'(k)];
          4: mem_word[i] = g_mem[4].u_mem_a.mem[mem_base + 4 * num_words + 32'(k)];
          default: mem_word[i] = g_mem[5].u_mem_a.mem[mem_base + 5 * num_words + 32'(k)];
        endcase
        if (mem_word[i] !== exp_w) errs++;
      end
      check(errs == 0, $sformatf("link %0d: %0d words stored from memory wrong", i, errs));
      ev_mem_read += r_bursts[i];
    end
    check(a_ovf == '0 && b_ovf == '0 && a_perr == '0 && b_perr == '0, "link error in memory runs");

    $display("mechanisms: sof=%0d eof=%0d idle_fill=%0d short_frames=%0d full_frames=%0d",
             ev_sof, ev_eof, ev_idle_fill, ev_short_frame, ev_full_frame);
    $display("            xoff_cycles=%0d ping_held=%0d phy_stalls=%0d role_switch=%0d",
             ev_xoff, ev_ping_held, ev_phy_stall, ev_role_switch);
    $display("            mem_bursts=%0d mem_waits=%0d mem_read_bursts=%0d", ev_mem_burst, ev_mem_wait, ev_mem_read);
    check(ev_sof > 0 && ev_eof > 0, "no framing idle words");
    check(ev_idle_fill > 0, "no idle fill while a FIFO was empty");
    check(ev_short_frame > 0, "no frame cut short");
    check(ev_full_frame > 0, "no full-length frame");
    check(ev_xoff > 0, "no XOff");
    check(ev_ping_held > 0, "ping never held back");
    check(ev_phy_stall > 0, "no transceiver stall");
    check(ev_role_switch > 0, "no role switch");
    check(ev_mem_burst > 0, "no memory burst");
    check(ev_mem_wait > 0, "memory never stalled a write");
    check(ev_mem_read > 0, "no memory read burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge txrx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
