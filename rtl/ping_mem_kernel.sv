// ping_mem_kernel: source end of the ping-pong benchmark, reading its data from memory.
//
// After a start pulse it reads num_words words from global memory, starting at word
// base_addr, and sends them in address order on an output I/O channel. The system
// description uses this in the benchmark variants whose input comes from memory. Like
// a multi-work-item kernel, it reads in bursts of up to MAX_BURST words, and it keeps
// several bursts in flight to hide the memory latency.
//
// How it works: a local buffer of BUF_DEPTH words receives the read data. The module
// issues a burst only when the buffer has room for all words of every burst in flight,
// plus the new one. It counts these words in `inflight`: a burst adds its length when
// it is issued, and each word sent on the channel takes one off. Read data therefore
// never meet a full buffer, and the memory needs no back-pressure on its read data.
// A request (mem_read with address and burst length) holds while waitrequest is high.
// When the memory keeps up, the channel gets one word per clock.
//
// Interface (one clock; in the system this is kernel_clk):
//   start, base_addr, num_words  start is a one-cycle pulse, ignored while busy;
//                                num_words = 0 only sets done
//   out_*                        output channel, valid/ready; out_data comes from
//                                the buffer's storage, not from the memory bus
//   mem_*                        burst read master (Avalon-MM style): mem_address and
//                                mem_burstcount count DATA_W-bit words; the data
//                                return in order on mem_readdata with
//                                mem_readdatavalid
//   busy, done, sent             status; done stays high until the next start
//
// What follows the system description: reading ping's input from external memory, and
// bursts of 16 64-bit words (here 4 words of 256 bits). The buffer, the read protocol
// and the word addressing are this design's choices.
module ping_mem_kernel
  import novog_pkg::*;
#(
  parameter int unsigned MAX_BURST = 4,
  parameter int unsigned BUF_DEPTH = 32,
  parameter int unsigned BURST_W   = $clog2(MAX_BURST) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        base_addr,
  input  logic [31:0]        num_words,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [DATA_W-1:0]  out_data,
  output logic [31:0]        mem_address,
  output logic               mem_read,
  output logic [BURST_W-1:0] mem_burstcount,
  input  logic               mem_waitrequest,
  input  logic [DATA_W-1:0]  mem_readdata,
  input  logic               mem_readdatavalid,
  output logic               busy,
  output logic               done,
  output logic [31:0]        sent
);

  localparam int unsigned PTR_W = $clog2(BUF_DEPTH);
  localparam int unsigned CNT_W = PTR_W + 1;

  logic [31:0]        to_request;   // words not yet asked for
  logic [31:0]        next_addr;    // address of the next burst
  logic [CNT_W-1:0]   inflight;     // words asked for and not yet sent
  logic [BURST_W-1:0] len;          // length of the next burst
  logic               issue, pop;

  // read-data buffer
  logic [DATA_W-1:0]  buf_mem [BUF_DEPTH];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;
  logic [CNT_W-1:0]   count;

  assign len   = (to_request >= 32'(MAX_BURST)) ? BURST_W'(MAX_BURST) : BURST_W'(to_request);
  assign issue = busy && !mem_read && (to_request != 0)
                 && (32'(inflight) + 32'(len) <= 32'(BUF_DEPTH));
  assign pop   = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      done           <= 1'b0;
      sent           <= '0;
      to_request     <= '0;
      next_addr      <= '0;
      mem_read       <= 1'b0;
      mem_address    <= '0;
      mem_burstcount <= '0;
    end else begin
      if (!busy) begin
        if (start) begin
          busy       <= (num_words != 0);
          done       <= (num_words == 0);
          sent       <= '0;
          to_request <= num_words;
          next_addr  <= base_addr;
        end
      end else begin
        if (issue) begin
          mem_read       <= 1'b1;
          mem_address    <= next_addr;
          mem_burstcount <= len;
          next_addr      <= next_addr + 32'(len);
          to_request     <= to_request - 32'(len);
        end else if (mem_read && !mem_waitrequest) begin
          mem_read <= 1'b0;
        end
        if (pop) begin
          sent <= sent + 1;
          if (sent + 1 == num_words) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // words reserved in the buffer: added when a burst is issued, removed when sent
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + (issue ? CNT_W'(len) : '0) - (pop ? CNT_W'(1) : '0);
  end

  // the buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (mem_readdatavalid) wr_ptr <= wr_ptr + 1'b1;
      if (pop)               rd_ptr <= rd_ptr + 1'b1;
      count <= count + (mem_readdatavalid ? CNT_W'(1) : '0) - (pop ? CNT_W'(1) : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (mem_readdatavalid) buf_mem[wr_ptr] <= mem_readdata;
  end

  assign out_valid = (count != 0);
  assign out_data  = buf_mem[rd_ptr];

  // The reservation keeps the buffer from overflowing.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    mem_readdatavalid |-> (count < CNT_W'(BUF_DEPTH)) || pop);

endmodule
