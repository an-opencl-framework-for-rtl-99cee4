`timescale 1ns/1ps
// ping_mem_kernel_tb: self-checking test of the memory-reading ping kernel.
//
// A read memory model with formula contents (lane j of word a = {a, C0DE0000 + j})
// answers 12 cycles after each request and stalls requests at random. The channel
// sink takes words at random. Every word that leaves on the channel must be the
// memory word base + k, in order. The sent count, done, the burst count
// (ceil(n / 4)) and the memory's protocol check are checked after every run, and a
// word held by the sink must stay put. Sizes: one word, fewer than a burst, exact
// bursts and a remainder. A run without stalls must deliver one word per clock once
// the first word is out, up to a few cycles. A run of zero words must only set done.
module ping_mem_kernel_tb;
  import novog_pkg::*;

  localparam int unsigned MAX_BURST = 4;
  localparam int unsigned BURST_W   = 3;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic               start;
  logic [31:0]        base_addr, num_words;
  logic               out_valid, out_ready;
  logic [DATA_W-1:0]  out_data;
  logic [31:0]        mem_address;
  logic               mem_read, mem_waitrequest, mem_readdatavalid;
  logic [BURST_W-1:0] mem_burstcount;
  logic [DATA_W-1:0]  mem_readdata;
  logic               busy, done;
  logic [31:0]        sent;

  ping_mem_kernel #(.MAX_BURST(MAX_BURST)) dut (.*);

  int unsigned wait_pct;
  int          m_errors, m_bursts, m_words, m_waits, w0;

  avalon_rd_mem_model #(.DATA_W(DATA_W), .BURST_W(BURST_W), .LATENCY(12)) u_mem (
    .clk (clk), .rst_n (rst_n), .wait_pct (wait_pct),
    .address (mem_address), .read (mem_read), .burstcount (mem_burstcount),
    .waitrequest (mem_waitrequest), .readdata (mem_readdata), .readdatavalid (mem_readdatavalid),
    .errors (m_errors), .n_bursts (m_bursts), .n_words (m_words), .n_waits (m_waits)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] expect_word(input logic [31:0] a);
    logic [DATA_W-1:0] w;
    for (int j = 0; j < 4; j++) w[64*j +: 64] = {a, 32'hC0DE_0000 + 32'(j)};
    return w;
  endfunction

  // channel sink
  int          ready_pct = 100, k = 0, bad = 0, cyc = 0, first_pop = -1, last_pop = -1;
  bit          stalled = 0;
  logic [DATA_W-1:0] held;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (stalled && !(out_valid && out_data === held)) bad++;
      stalled <= out_valid && !out_ready;
      held    <= out_data;
      if (out_valid && out_ready) begin
        if (out_data !== expect_word(base_addr + 32'(k))) bad++;
        if (first_pop < 0) first_pop = cyc;
        last_pop = cyc;
        k++;
      end
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(99) < ready_pct);

  task automatic run(int n, int base, int rpct, int unsigned wpct);
    int b0, err0, t;
    @(negedge clk);
    b0 = m_bursts; err0 = m_errors; w0 = m_words; bad = 0; k = 0; first_pop = -1; last_pop = -1;
    ready_pct = rpct; wait_pct = wpct;
    num_words = n; base_addr = base; start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    while (!done && t < 5000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
    check(done && !busy, $sformatf("run of %0d words did not finish", n));
    check(k == n && sent == 32'(n), $sformatf("%0d words on the channel, sent %0d, expected %0d", k, sent, n));
    check(bad == 0, $sformatf("%0d wrong or unstable channel words", bad));
    check(m_bursts - b0 == (n + MAX_BURST - 1) / MAX_BURST,
          $sformatf("%0d bursts for %0d words", m_bursts - b0, n));
    check(m_errors == err0, "memory saw a zero-length burst");
    check(m_words - w0 == n, "memory returned a different number of words");
    check(!out_valid, "words left over after done");
  endtask

  initial begin
    start = 0; base_addr = 0; num_words = 0; wait_pct = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(17, 100, 60, 30);
    run(1, 7, 100, 50);
    run(3, 1000, 50, 20);
    run(4, 2000, 30, 10);
    run(5, 3000, 80, 40);
    run(200, 5000, 100, 0);
    check(last_pop - first_pop <= 199 + 8,
          $sformatf("200 words took %0d cycles after the first", last_pop - first_pop));
    run(300, 9000, 70, 25);
    check(m_waits > 0, "the memory never stalled a request");
    run(0, 0, 100, 0);
    check(k == 0, "zero-word run sent a word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
