`timescale 1ns/1ps
// cdc_fifo_tb: self-checking test of the dual-clock FIFO.
//
// The write side runs at 200 MHz and the read side at about 143 MHz, with random
// valid and ready patterns. Every word read is compared with a queue model; the test
// also checks that the FIFO fills up completely (wr_ready low at DEPTH words), that
// it never reports more than DEPTH words, and that everything written comes out.
module cdc_fifo_tb;
  localparam int unsigned DW    = 256;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned N     = 2000;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  always #2.5 wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;

  logic          wr_valid, wr_ready, rd_valid, rd_ready;
  logic [DW-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] wr_used;

  cdc_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  int n_wr = 0, n_rd = 0, full_seen = 0;
  bit slow_reader = 0;

  function automatic logic [DW-1:0] pattern(int k);
    return {8{32'(k) ^ 32'h5a5a0000}};
  endfunction

  // write side
  always @(posedge wr_clk) begin
    if (wr_rst_n) begin
      if (wr_valid && wr_ready) begin
        model.push_back(wr_data);
        n_wr++;
      end
      if (!wr_ready) full_seen++;
      if (32'(wr_used) > DEPTH) begin
        failures++;
        $display("FAIL: wr_used=%0d above depth", wr_used);
      end
    end
  end
  always @(negedge wr_clk) begin
    wr_valid <= (n_wr < N) && ($urandom_range(0, 3) != 0);
    wr_data  <= pattern(n_wr);
  end
  initial begin wr_valid = 0; wr_data = '0; end

  // read side
  always @(posedge rd_clk) begin
    if (rd_rst_n && rd_valid && rd_ready) begin
      checks++;
      if (model.size() == 0) begin
        failures++;
        $display("FAIL: read from empty model");
      end else begin
        if (rd_data !== model[0]) begin
          failures++;
          $display("FAIL: word %0d read %h expected %h", n_rd, rd_data[31:0], model[0][31:0]);
        end
        void'(model.pop_front());
      end
      n_rd++;
    end
  end
  always @(negedge rd_clk) rd_ready <= slow_reader ? ($urandom_range(0, 7) == 0)
                                                      : ($urandom_range(0, 3) != 0);
  initial rd_ready = 0;

  initial begin
    #20 wr_rst_n = 1; rd_rst_n = 1;
    // phase 1: slow reader so that the FIFO fills
    slow_reader = 1;
    wait (n_wr >= N / 2);
    slow_reader = 0;
    wait (n_rd == N);
    repeat (20) @(posedge rd_clk);
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: FIFO never reported full"); end
    checks++;
    if (rd_valid) begin failures++; $display("FAIL: FIFO not empty after draining"); end
    checks++;
    if (model.size() != 0) begin failures++; $display("FAIL: %0d words lost", model.size()); end
    $display("cdc_fifo_tb: %0d words, full for %0d write cycles", n_rd, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
