// iohelper_mem: stores the words arriving on an I/O channel into global memory.
//
// After a start pulse it takes num_words words from an input channel and writes word
// k to memory word base_addr + k, the way a kernel with one work-item per word would
// write mem[gid]. It writes in bursts of up to MAX_BURST beats, so it uses the
// memory the way a coalesced multi-work-item kernel does and not one word per
// transaction. Word k always goes to base_addr + k, so the data keep the order in
// which they arrived on the channel.
//
// How it works: each channel word is first taken into a one-word beat register that
// drives the write-data bus. The register refills in the cycle it empties, so words
// pass at one per clock while the memory keeps up. At the first beat of a burst, the
// module sets the burst length to the smaller of MAX_BURST and the words still due.
// Address and burst length then hold until the burst's last beat. A beat moves when
// the register holds a word and the memory does not assert waitrequest. The module
// takes no more than num_words words from the channel. It is busy until the memory
// has taken the last one, which is one clock after that word left the channel.
//
// Interface (one clock; in the system this is kernel_clk):
//   start, base_addr, num_words  start is a one-cycle pulse, ignored while busy;
//                                num_words = 0 only sets done
//   in_*                         input channel, valid/ready, one 256-bit word per beat
//   mem_*                        burst write master (Avalon-MM style): mem_address
//                                and mem_burstcount count DATA_W-bit words and are
//                                held for the whole burst; mem_write,
//                                mem_writedata and all of the above hold while
//                                mem_waitrequest is high
//   busy, done, written, bursts  status; done stays high until the next start
//
// What follows the system description: the function (channel in, memory word per
// received word in arrival order) and the burst of 16 64-bit words, here 4 beats of
// 256 bits. The burst master protocol, the word addressing and the start/done
// control are this design's choices.
module iohelper_mem
  import novog_pkg::*;
#(
  parameter int unsigned MAX_BURST = 4,
  parameter int unsigned BURST_W   = $clog2(MAX_BURST) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        base_addr,
  input  logic [31:0]        num_words,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [DATA_W-1:0]  in_data,
  output logic [31:0]        mem_address,
  output logic               mem_write,
  output logic [DATA_W-1:0]  mem_writedata,
  output logic [BURST_W-1:0] mem_burstcount,
  input  logic               mem_waitrequest,
  output logic               busy,
  output logic               done,
  output logic [31:0]        written,
  output logic [31:0]        bursts
);

  logic [31:0]        to_take;     // words still to take from the channel
  logic [31:0]        remaining;   // words still to write
  logic               beat_v;      // beat register holds a word
  logic [DATA_W-1:0]  beat_d;
  logic               take;
  logic [31:0]        addr;        // first word of the current burst
  logic [BURST_W-1:0] beat;        // beats of the current burst already written
  logic [BURST_W-1:0] cur_len;     // length of the current burst
  logic [BURST_W-1:0] next_len;    // length of a burst starting now
  logic               first_beat, last_beat, accept;

  assign first_beat = (beat == '0);
  assign next_len   = (remaining >= 32'(MAX_BURST)) ? BURST_W'(MAX_BURST)
                                                    : BURST_W'(remaining);
  assign last_beat  = first_beat ? (next_len == BURST_W'(1))
                                 : (beat == cur_len - BURST_W'(1));

  assign mem_address    = addr;
  assign mem_burstcount = first_beat ? next_len : cur_len;
  assign mem_write      = beat_v;
  assign mem_writedata  = beat_d;
  assign accept         = beat_v && !mem_waitrequest;
  assign in_ready       = (to_take != 0) && (!beat_v || !mem_waitrequest);
  assign take           = in_valid && in_ready;

  // beat register: refilled from the channel, emptied by the memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_v  <= 1'b0;
      beat_d  <= '0;
      to_take <= '0;
    end else begin
      if (take) begin
        beat_v  <= 1'b1;
        beat_d  <= in_data;
        to_take <= to_take - 1;
      end else if (accept) begin
        beat_v  <= 1'b0;
      end
      if (!busy && start) to_take <= num_words;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      remaining <= '0;
      addr      <= '0;
      beat      <= '0;
      cur_len   <= '0;
      written   <= '0;
      bursts    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy      <= (num_words != 0);
        done      <= (num_words == 0);
        remaining <= num_words;
        addr      <= base_addr;
        beat      <= '0;
        written   <= '0;
        bursts    <= '0;
      end
    end else if (accept) begin
      written   <= written + 1;
      remaining <= remaining - 1;
      if (first_beat) begin
        cur_len <= next_len;
        bursts  <= bursts + 1;
      end
      if (last_beat) begin
        beat <= '0;
        addr <= addr + 32'(first_beat ? next_len : cur_len);
      end else begin
        beat <= beat + 1'b1;
      end
      if (remaining == 32'd1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // A write that waits must hold its address, length and data.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    mem_write && mem_waitrequest |=> mem_write && $stable(mem_address)
                                     && $stable(mem_burstcount) && $stable(mem_writedata));

endmodule
