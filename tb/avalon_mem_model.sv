`timescale 1ns/1ps
// avalon_mem_model: behavioural global memory with one burst write port.
//
// It stands in for the board's external memory and its controller. It accepts
// Avalon-MM style burst writes: address and burst length are taken at a burst's first
// beat, and beat b of the burst goes to word address + b. Words are DATA_W bits wide
// and addressed in words, with WORDS words in all. It stalls the master by raising
// waitrequest on a random wait_pct percent of cycles, which models a memory shared by
// several masters. Testbenches read the contents through mem[].
//
// It checks the protocol and counts each violation in errors: a burst length of
// zero, an address outside the memory, and address or length changing between beats
// of one burst. It also counts bursts, beats and wait cycles (a write held by
// waitrequest) for the testbenches' mechanism counts.
module avalon_mem_model #(
  parameter int unsigned DATA_W   = 256,
  parameter int unsigned BURST_W  = 3,
  parameter int unsigned WORDS    = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  input  int unsigned        wait_pct,
  input  logic [31:0]        address,
  input  logic               write,
  input  logic [DATA_W-1:0]  writedata,
  input  logic [BURST_W-1:0] burstcount,
  output logic               waitrequest,
  output int                 errors,
  output int                 n_bursts,
  output int                 n_beats,
  output int                 n_waits
);

  logic [DATA_W-1:0]  mem [WORDS];
  logic [31:0]        b_addr;
  logic [BURST_W-1:0] b_len, b_pos;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waitrequest <= 1'b0;
      errors      <= 0;
      n_bursts    <= 0;
      n_beats     <= 0;
      n_waits     <= 0;
      b_addr      <= '0;
      b_len       <= '0;
      b_pos       <= '0;
    end else begin
      waitrequest <= ($urandom_range(99) < wait_pct);
      if (write && waitrequest) n_waits <= n_waits + 1;
      if (write && !waitrequest) begin
        n_beats <= n_beats + 1;
        if (b_pos == '0) begin
          n_bursts <= n_bursts + 1;
          if (burstcount == '0) errors <= errors + 1;
          if (address + 32'(burstcount) > WORDS) errors <= errors + 1;
          else mem[address] <= writedata;
          b_addr <= address;
          b_len  <= burstcount;
          b_pos  <= (burstcount == BURST_W'(1)) ? '0 : BURST_W'(1);
        end else begin
          if (address != b_addr || burstcount != b_len) errors <= errors + 1;
          if (b_addr + 32'(b_pos) < WORDS) mem[b_addr + 32'(b_pos)] <= writedata;
          b_pos <= (b_pos == b_len - BURST_W'(1)) ? '0 : b_pos + BURST_W'(1);
        end
      end
    end
  end

endmodule
