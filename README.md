# Inter-FPGA OpenCL channels for a 3D-torus FPGA cluster

This RTL connects OpenCL kernels that run on different FPGAs. Each FPGA in the cluster
sits in a 3D torus and has six direct serial links, one per direction: `posx`, `negx`,
`posy`, `negy`, `posz` and `negz`. Each link shows up to the kernels as a pair of plain
streaming channels, for example `posx_out` and `posx_in`. A kernel writes 256-bit words
into `posx_out`, and the kernel on the neighbouring FPGA reads them, in order, from its
own input channel. Packets, addresses and routing never appear. A kernel sees the same
semantics as an ordinary on-chip kernel-to-kernel channel.

Behind each channel pair there are three parts:

* a **transmit FIFO** and a **receive FIFO**. They buffer the words and carry them across
  the boundary between the kernel clock and the fixed 200 MHz link clock.
* a **link controller**. It packs words into frames for the transceiver, unpacks them on
  the far side, and runs flow control. Flow control is an XOn/XOff bit carried in the
  idle words the link sends anyway.
* the **transceiver**, a vendor Interlaken PHY. It does line coding, clock recovery, lane
  alignment and CRC. It is not part of this RTL. Its parallel word interface is a port.

On top of the I/O sits the **ping-pong link benchmark**:

* `ping` sends a counter stream on every link.
* `incr`, on the neighbour, adds an increment to every word and sends it back.
* `pong` checks what comes back and measures latency and run time.
* `iohelper_mem` can take `pong`'s place. It stores what comes back in global memory, in
  write bursts, so that the host can check it there.
* `ping_mem_kernel` can take `ping`'s place. It reads the data to send from global
  memory, in read bursts.

The top level, `novog_fpga_node`, is one FPGA. It has the six-link I/O, plus the
benchmark kernels on every link.

```
          kernel_clk                 |                 TxRx_clk (200 MHz)
                                     |
 kernel --posx_out--> [ TX FIFO ]====|====> ilk_tx_framer --phy_tx--> transceiver --> link
 kernel <--posx_in--- [ RX FIFO ]<===|===== ilk_rx_deframer <-phy_rx-- transceiver <-- link
                          |          |           ^      |
                          +- fill ---|-----------+      +--> partner XOn/XOff -> framer
                         (x6 links: posx negx posy negy posz negz)
```

## The word stream on a link

This is the part that needs the most care. The link carries one 256-bit word per
200 MHz cycle, and a flag marks each word as **data** or **control**. The only control
word is the *idle word* (`novog_pkg::ctrl_word_t`):

| bits      | field     | meaning                                          |
|-----------|-----------|--------------------------------------------------|
| [255:248] | `cw_type` | `8'hA5` (idle); anything else is a protocol error |
| [247]     | `sof`     | a data frame follows                              |
| [246]     | `eof`     | a data frame has just ended                       |
| [245]     | `xon`     | 1 = XOn, the sender may transmit to me; 0 = XOff  |
| [244:0]   | —         | zero                                              |

The framer (`ilk_tx_framer`) sends:

```
 ... idle idle | idle(sof) D D D ... D idle(eof) | idle(sof) D ... D idle(eof) | idle idle ...
                 <-- 1..FRAME_WORDS data -->
```

* While the transmit FIFO is empty, or the partner says XOff, every cycle carries a plain
  idle word.
* A frame opens with `idle(sof)`. It then carries up to `FRAME_WORDS` data words (16 by
  default), and closes with `idle(eof)`.
* A frame closes early when the FIFO runs dry or an XOff arrives. If the XOff comes right
  after the frame opened, the frame can be empty.
* Every idle word, framing ones included, carries the sender's current `xon` bit.

A continuous stream therefore moves 16 data words in every 18 link words (88.9 %).

The deframer (`ilk_rx_deframer`) handles the other end:

* It writes each data word into the receive FIFO one cycle after it arrives.
* It takes the partner's `xon` bit from every idle word.
* It raises `link_up` at the first idle word. Until then, `remote_xon` stays 0, so
  nothing is sent into a link whose far end is not yet running.
* It has two sticky error flags:
  * `proto_err`: a data word outside a frame, or an unknown control word.
  * `rx_overflow`: a data word met a full receive FIFO and was dropped.

### Flow control, and why the XOff threshold is where it is

A node says XOff while its receive FIFO holds more than `RX_FIFO_DEPTH - XOFF_MARGIN`
words: 256 − 128 = 128 by default. The bit only travels inside idle words. So after the
receiver decides to stop, more words can still arrive:

1. The reverse direction may be in the middle of a frame. The next idle word can be up
   to `FRAME_WORDS + 1` words away.
2. That idle word needs one link latency to reach the sender.
3. The sender stops at its next word, closing its frame with `idle(eof)`. The words it
   already sent still need one more link latency to arrive.

The margin needed is therefore about `FRAME_WORDS + 2 + 2 × latency` words, plus a few
cycles for the FIFO's pointer synchronisers. With 16-word frames, 128 words of margin
covers a link latency of up to about 50 link cycles. If you shorten the receive FIFO,
lengthen the frames, or expect longer link latency, recompute the margin. The
testbenches check that `rx_overflow` never rises, and the design asserts that the FIFO
never exceeds its depth.

### Clock crossing

`cdc_fifo` is a dual-clock FIFO with Gray-coded pointers and two-flop synchronisers.
Full and empty are decided against the synchronised pointer of the other side. Both are
therefore conservative by a few cycles, and never wrong. `wr_used` is the fill level as
the write side sees it. The receive path uses it for the XOn/XOff decision, so this
decision never underestimates the fill level. The kernel clock is free. It is expected to
run at or above the 200 MHz link clock, and the testbenches use 250 MHz.

## The ping-pong benchmark on a node

`novog_fpga_node` has a ping, a pong, an incr and the two memory kernels on every
link. `host_role` chooses which ones are connected:

* `ROLE_PINGPONG`: ping drives `<dir>_out` and pong reads `<dir>_in`, on all six links.
* `ROLE_INCR`: incr reads `<dir>_in` and writes `<dir>_out`.
* `ROLE_CAPTURE`: ping drives `<dir>_out` as above. An `iohelper_mem` per link stores
  what arrives on `<dir>_in` in global memory.
* `ROLE_MEM`: the benchmark's memory variant. A `ping_mem_kernel` per link reads the
  words to send from global memory. An `iohelper_mem` stores what comes back.

Cable a node in `ROLE_INCR` to a node in one of the other roles, so that A's `posx`
meets B's `negx`, and so on. A one-cycle `host_start` on the other node then runs the
benchmark on all six links at once.

* **ping** sends `host_num_words` words. Lane *j* (64 bits) of word *k* holds
  `seed + 4k + j`. `host_gap` inserts idle cycles after every word: `gap = 3` gives one
  word per four cycles, the rate of a single work-item OpenCL kernel.
* **incr** adds `host_increment` to each 64-bit lane, modulo 2^64.
* **pong** recomputes every expected word and counts mismatches in `pong_errors`. It also
  reports two times in kernel cycles:
  * `pong_latency_cycles`: from start to the first word back.
  * `pong_run_cycles`: from start to the last word back.
* **iohelper_mem** writes word *k* of link *i* to memory word
  `host_mem_base + i * host_num_words + k`. Every received word lands at its own
  address, in arrival order, the way one work-item per word would write `mem[gid]`.
  The memory is written in bursts of up to four 256-bit words, which is sixteen 64-bit
  words. Each link has its own burst write master on the node's `mem_*` ports, in
  Avalon-MM style:
  * `mem_address` and `mem_burstcount` count 256-bit words. They are taken at a burst's
    first beat and held until its last.
  * `mem_waitrequest` stalls the current beat, and everything is held while it is high.
  * A one-word register sits between the channel and the bus. The helper still writes
    one word per clock while the memory keeps up.

* **ping_mem_kernel** reads link *i*'s words from memory words
  `host_rd_base + i * host_num_words` onwards, in bursts of up to four words. Each link
  has a burst read master on the `rmem_*` ports. A request holds while
  `rmem_waitrequest` is high. The data come back in order, with `rmem_readdatavalid`.
  The kernel keeps a 32-word buffer and issues a burst only when the buffer has room
  for every word still in flight. Read data are therefore never refused. 32 words keep
  the channel at one word per clock up to about 25 cycles of read latency.

  The memory controller, and the arbitration between the six write and six read
  masters, belong to the board and are outside the node.

All `host_*` inputs belong to the kernel clock domain. Keep them steady during a run.

## Measured behaviour (simulation)

These numbers come from the two ping-pong testbenches: two nodes at default sizes,
250 MHz kernel clocks, and links modelled as 32 Gbit/s (the transceiver takes 5 words
in 8 cycles of its 200 MHz clock) with 20 cycles of latency. The ideal rate for a long
stream is 5/8 × 16/18 × 51.2 Gbit/s = 28.4 Gbit/s per link and direction.

| data per channel | full rate: ping / pong (Gbit/s) | 1 word per 4 cycles: ping / pong (Gbit/s) | through memory: ping / stored (Gbit/s) |
|---|---|---|---|
| 1 kB   | 62.1 / 14.2 | 16.3 / 10.3 | 36.6 / 12.3 |
| 16 kB  | 56.2 / 26.8 | 16.0 / 15.5 | 54.3 / 26.2 |
| 256 kB | 29.4 / 28.3 | 16.0 / 16.0 | 29.3 / 28.3 |
| 4 MB   | 28.5 / 28.4 | — | — |
| 64 MB  | 28.5 / 28.4 | — | — |

The last column is `ROLE_MEM`. Ping's data are read from a memory that answers after 20
cycles, and the returned words are written back. Both memory ports stall one access in
ten. Because both memory kernels use bursts, memory costs almost nothing: a long
stream still runs at the link limit.

"ping" is the number of words sent, divided by the time until ping finished. "pong" is
the number of words returned, divided by the time until the last one came back.

* **Small streams look faster than the line.** For 1 kB and 16 kB, ping appears faster
  than the 32 Gbit/s line. The reason is that up to 256 words fit into the transmit FIFO
  while the link drains it. So the source finishes long before its data has crossed.
* **Large streams run at the link limit.** All six links in both directions together
  carry 12 × 28.4 ≈ 341 Gbit/s per FPGA.
* **A paced source is the limit.** When ping sends one word per four cycles, it becomes
  the bottleneck: a quarter of 64 Gbit/s, or 16 Gbit/s.
* **Latency.** A single-word round trip takes 76 to 78 kernel cycles, about 310 ns. That
  includes two link crossings of 20 cycles each, four FIFO clock crossings and the
  framing.
* **Slow receiver.** With the incr node's kernel clock at 50 MHz, the XOff mechanism
  throttles every link. No word is lost.
* **Whole torus.** In a 4 × 4 × 4 torus of 64 nodes, 1500 words run on each of the 384
  link directions at the same time. Every word comes back correct, and the round trip
  stays at 77 cycles.
* **Capture into memory.** With 300 words per link, the memory stalls one write in
  five. Every link still ends with 75 bursts of four words, and every stored word is
  correct.
* **Memory to memory.** Each link reads 250 words from a memory with 12 cycles of read
  latency and sends them through the neighbour's incr. The returned words are stored
  again. Every stored word equals the word read plus the increment.

The published system measured about 24 Gbit/s per channel (288 Gbit/s per FPGA) with
OpenCL-compiled kernels. There, the limit was kernel pipeline occupancy, which these
hand-written kernels do not have. The link model also ignores any transceiver overhead
beyond the 5/8 rate.

## Files

| file | what it is |
|---|---|
| `rtl/novog_pkg.sv` | widths, link directions, control-word layout, node roles |
| `rtl/cdc_fifo.sv` | dual-clock FIFO (transmit and receive FIFO of every channel) |
| `rtl/ilk_tx_framer.sv` | framing, idle insertion and XOn/XOff transmit |
| `rtl/ilk_rx_deframer.sv` | deframing, XOn/XOff receive and decision, error flags |
| `rtl/io_channel.sv` | one channel pair: 2 FIFOs + framer + deframer |
| `rtl/bsp_io.sv` | six channel pairs |
| `rtl/ping_kernel.sv`, `incr_kernel.sv`, `pong_kernel.sv` | benchmark kernels |
| `rtl/iohelper_mem.sv` | stores a channel's words in global memory with burst writes |
| `rtl/ping_mem_kernel.sv` | reads words from global memory with burst reads and sends them on a channel |
| `rtl/novog_fpga_node.sv` | top: one FPGA node |
| `tb/xcvr_link_model.sv` | behavioural model of one link direction (latency + line rate), simulation only |
| `tb/avalon_mem_model.sv` | behavioural global memory with a burst write port, random stalls and protocol checks |
| `tb/avalon_rd_mem_model.sv` | behavioural global memory with a burst read port; contents follow a formula |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/novog_fpga_node_tb.sv` | two cabled nodes, full default sizes, seven runs, the last two through global memory |
| `tb/pingpong_sizes_tb.sv` | ping-pong over a range of data sizes, task-rate and full-rate |
| `tb/torus_tb.sv` | 64 nodes in a 4 × 4 × 4 torus, ping-pong on all 384 link directions at once |

Parameters and their defaults:

| parameter | default | where |
|---|---|---|
| `DATA_W` | 256 | package |
| `NUM_LINKS` | 6 | package |
| `MEM_BURST` | 4 words (16 × 64 bits) | package; `MAX_BURST` of `iohelper_mem` and `ping_mem_kernel` |
| `BUF_DEPTH` | 32 words | `ping_mem_kernel` |
| `TX_FIFO_DEPTH`, `RX_FIFO_DEPTH` | 256 words each | node, bsp_io, io_channel |
| `FRAME_WORDS` | 16 | node, bsp_io, io_channel, framer |
| `XOFF_MARGIN` | 128 | node, bsp_io, io_channel, deframer |

Synthesised, one node comes to about 11,800 flip-flops and 836 kbit of memory. The
memory is twelve 256 × 256-bit FIFO memories (786 kbit) plus six 32-word read buffers.
In the node, the FIFO memories are the only large item.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops.
With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/novog_pkg.sv tb/novog_fpga_node_tb.sv --top-module novog_fpga_node_tb
./obj_dir/Vnovog_fpga_node_tb
```

For another testbench, replace the file and the top name. The end-to-end run takes a few
seconds. The testbenches use only two-state values, and they reset every register that
is read.

To change the design:

* The frame length, FIFO depths and XOff margin are parameters of `novog_fpga_node`.
  Keep the margin rule above.
* The control-word layout lives only in `novog_pkg`.
* To replace the link model with a real transceiver, connect its parallel interface to
  `phy_tx_*` and `phy_rx_*`:
  * `phy_tx_ready` may drop at any time. The framer holds its word until it is taken.
  * `phy_rx_valid` may have gaps.
  * The receive side has no back-pressure.

## What follows the original system, and what is this design's own

Taken from the published framework:

* six links per FPGA, exposed as streaming in/out channel pairs;
* a transmit FIFO, a receive FIFO and an Interlaken PHY controller per channel;
* FIFOs that also cross from the kernel clock to the fixed 200 MHz link clock;
* 256-bit words;
* frames bracketed by idle control words, idle words whenever the transmit FIFO is empty,
  and XOn/XOff bits carried in idle words;
* the ping / incr / pong benchmark, replicated on all six links, with internally
  generated data and a host-chosen increment;
* the four-cycle output rate of single work-item kernels;
* a helper kernel that stores a channel's words in global memory, one word per
  address in arrival order, in bursts of sixteen 64-bit words;
* benchmark variants that read ping's input from memory and store the returned data
  in memory.

This design's own choices, where the original gives no detail:

* FIFO depths of 256 words. Together the two FIFOs hold 16 KB per direction, which fits
  the reported behaviour of streams up to 16 KB being swallowed whole by the channel
  buffering.
* 16-word frames.
* The control-word layout.
* The XOff threshold and margin.
* The link-up rule.
* Closing a frame early on XOff.
* The error flags.
* The valid/ready handshakes.
* The counter pattern, and adding the increment per 64-bit lane.
* The host interface as plain ports, with `host_role` choosing the kernel set.
* The capture role, the per-link memory regions, word addressing, and the Avalon-MM
  style burst protocols.
* The read buffer of `ping_mem_kernel` and its space reservation.
* Asynchronous active-low resets.

The link models the testbenches use run at 32 Gbit/s, the configured serial rate of the
original system. The links are rated at 40 Gbit/s, but were not run that fast there.

## Not included

* The transceivers and Interlaken PHY (vendor hard IP, with analog parts). A behavioural
  latency and rate model stands in for them in simulation.
* The board's PCI Express interface and the DDR memory controller. The node brings out a
  burst write port and a burst read port per link for the controller to serve. The
  memory variants of the single work-item benchmark read one word at a time and fight
  over the controller. That behaviour belongs to the compiled kernels and the
  controller, and is not modelled. The memory kernels here always use bursts.
* The applications that ran over the channels: a polyphase-filter channelizer split over
  two FPGAs, and a 2D FFT distributed over up to eight. Both are vendor design examples
  whose internals are not part of this work. The channels they need are here: a `float8`
  word is exactly one 256-bit channel word.
* The helper kernel that forwards one channel into another. It is only a wire.
* The host software: OpenCL runtime, MPI launch, and the mapping from device names to 3D
  torus addresses.
