`timescale 1ns/1ps
// avalon_rd_mem_model: behavioural global memory with one burst read port.
//
// It stands in for the board's external memory when a kernel reads its input from
// there. The contents follow a formula, so no data file is needed: lane j (64 bits) of
// word a holds {a, 32'hC0DE_0000 + j}, and word_at() gives the same value to the
// testbenches. A burst read request (read, address, burstcount) is taken when
// waitrequest is low; waitrequest rises on a random wait_pct percent of cycles. The
// words of each burst come back in order, one per clock at most, the first one
// LATENCY clocks after the request. Bursts queue behind each other.
//
// It counts protocol errors in errors (a burst length of zero), plus bursts, words
// returned and wait cycles (a request held by waitrequest).
module avalon_rd_mem_model #(
  parameter int unsigned DATA_W  = 256,
  parameter int unsigned BURST_W = 3,
  parameter int unsigned LATENCY = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  int unsigned        wait_pct,
  input  logic [31:0]        address,
  input  logic               read,
  input  logic [BURST_W-1:0] burstcount,
  output logic               waitrequest,
  output logic [DATA_W-1:0]  readdata,
  output logic               readdatavalid,
  output int                 errors,
  output int                 n_bursts,
  output int                 n_words,
  output int                 n_waits
);

  function automatic logic [DATA_W-1:0] word_at(input logic [31:0] a);
    logic [DATA_W-1:0] w;
    for (int j = 0; j < DATA_W / 64; j++) w[64*j +: 64] = {a, 32'hC0DE_0000 + 32'(j)};
    return w;
  endfunction

  logic [31:0] q_addr[$];
  longint      q_due[$];
  longint      cyc;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waitrequest   <= 1'b0;
      readdata      <= '0;
      readdatavalid <= 1'b0;
      errors        <= 0;
      n_bursts      <= 0;
      n_words       <= 0;
      n_waits       <= 0;
      cyc           <= 0;
      q_addr.delete();
      q_due.delete();
    end else begin
      cyc         <= cyc + 1;
      waitrequest <= ($urandom_range(99) < wait_pct);
      if (read && waitrequest) n_waits <= n_waits + 1;
      if (read && !waitrequest) begin
        n_bursts <= n_bursts + 1;
        if (burstcount == '0) errors <= errors + 1;
        for (int b = 0; b < int'(burstcount); b++) begin
          q_addr.push_back(address + 32'(b));
          q_due.push_back(cyc + longint'(LATENCY));
        end
      end
      readdatavalid <= 1'b0;
      if (q_addr.size() > 0 && q_due[0] <= cyc) begin
        readdatavalid <= 1'b1;
        readdata      <= word_at(q_addr[0]);
        n_words       <= n_words + 1;
        void'(q_addr.pop_front());
        void'(q_due.pop_front());
      end
    end
  end

endmodule
