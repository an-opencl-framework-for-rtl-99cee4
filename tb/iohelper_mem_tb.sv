`timescale 1ns/1ps
// iohelper_mem_tb: self-checking test of the channel-to-memory helper.
//
// A source sends a known stream on the input channel, pausing at random. The memory
// model stalls with waitrequest at random and checks the burst protocol. After each
// run the testbench compares every memory word of the target region with the
// stream, checks that the words just outside it stay untouched, and checks the word
// and burst counts against ceil(n / 4). The sizes cover a single word, bursts shorter
// than four, exact multiples of four and a remainder. A run without pauses or stalls
// must write one word per clock. A run of zero words must only set done.
module iohelper_mem_tb;
  import novog_pkg::*;

  localparam int unsigned MAX_BURST = 4;
  localparam int unsigned BURST_W   = 3;
  localparam int unsigned WORDS     = 1024;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic               start;
  logic [31:0]        base_addr, num_words;
  logic               in_valid, in_ready;
  logic [DATA_W-1:0]  in_data;
  logic [31:0]        mem_address;
  logic               mem_write, mem_waitrequest;
  logic [DATA_W-1:0]  mem_writedata;
  logic [BURST_W-1:0] mem_burstcount;
  logic               busy, done;
  logic [31:0]        written, bursts;

  iohelper_mem #(.MAX_BURST(MAX_BURST)) dut (.*);

  int unsigned wait_pct;
  int          m_errors, m_bursts, m_beats, m_waits;

  avalon_mem_model #(.DATA_W(DATA_W), .BURST_W(BURST_W), .WORDS(WORDS)) u_mem (
    .clk (clk), .rst_n (rst_n), .wait_pct (wait_pct),
    .address (mem_address), .write (mem_write), .writedata (mem_writedata),
    .burstcount (mem_burstcount), .waitrequest (mem_waitrequest),
    .errors (m_errors), .n_bursts (m_bursts), .n_beats (m_beats), .n_waits (m_waits)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // word k of a run: lane j = {salt, 4k + j}
  function automatic logic [DATA_W-1:0] pat(input logic [31:0] salt, input int k);
    logic [DATA_W-1:0] w;
    for (int j = 0; j < 4; j++) w[64*j +: 64] = {salt, 32'(4 * k + j)};
    return w;
  endfunction

  // channel source: holds a word until it is taken, pauses at random
  int          src_n = 0, src_sent = 0, src_pause_pct = 0;
  logic [31:0] salt;
  int          cyc = 0, first_acc = -1, last_acc = -1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      in_data  <= '0;
    end else begin
      cyc <= cyc + 1;
      if (in_valid && in_ready) begin
        if (first_acc < 0) first_acc <= cyc;
        last_acc <= cyc;
      end
      if (!in_valid || in_ready) begin
        if (src_sent < src_n && $urandom_range(99) >= src_pause_pct) begin
          in_valid <= 1'b1;
          in_data  <= pat(salt, src_sent);
          src_sent <= src_sent + 1;
        end else begin
          in_valid <= 1'b0;
        end
      end
    end
  end

  task automatic run(int n, int base, int pause_pct, int unsigned wpct);
    int b0, err0, beats0, t;
    @(negedge clk);
    b0 = m_bursts; err0 = m_errors; beats0 = m_beats;
    salt = $urandom; wait_pct = wpct; src_pause_pct = pause_pct;
    first_acc = -1; last_acc = -1;
    num_words = n; base_addr = base; start = 1;
    @(negedge clk);
    start = 0;
    src_sent = 0; src_n = n;
    t = 0;
    while (!done && t < 5000) begin @(negedge clk); t++; end
    check(done && !busy, $sformatf("run of %0d words did not finish", n));
    check(written == 32'(n), $sformatf("written %0d, expected %0d", written, n));
    check(bursts == 32'((n + MAX_BURST - 1) / MAX_BURST),
          $sformatf("%0d bursts for %0d words", bursts, n));
    check(m_bursts - b0 == (n + MAX_BURST - 1) / MAX_BURST, "memory saw a different burst count");
    check(m_errors == err0, "memory saw a burst protocol error");
    check(m_beats - beats0 == n, "memory took a different number of beats");
    for (int k = 0; k < n; k++)
      check(u_mem.mem[base + k] === pat(salt, k), $sformatf("memory word %0d wrong", base + k));
    check(u_mem.mem[base - 1] === '0 && u_mem.mem[base + n] === '0, "write outside the region");
  endtask

  initial begin
    start = 0; base_addr = 0; num_words = 0; wait_pct = 0; salt = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(17, 100, 30, 30);
    run(1, 200, 0, 50);
    run(3, 210, 20, 20);
    run(4, 220, 50, 10);
    run(5, 230, 10, 40);
    run(64, 300, 0, 0);
    check(last_acc - first_acc == 63,
          $sformatf("64 words took %0d cycles, expected 63", last_acc - first_acc));
    run(200, 500, 25, 25);
    check(m_waits > 0, "the memory never stalled a write");
    run(0, 900, 0, 0);
    check(u_mem.mem[900] === '0, "zero-word run wrote memory");
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
