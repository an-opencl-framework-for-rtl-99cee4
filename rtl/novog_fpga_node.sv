// novog_fpga_node: one FPGA of the torus running the ping-pong link benchmark.
//
// The node is the OpenCL device of the Novo-G# framework reduced to what touches the
// inter-FPGA links: the board support package's six I/O channel pairs (bsp_io) and,
// on every link, the kernels of the ping-pong benchmark. A node runs in one of four
// roles, chosen by the host like launching a different kernel set:
//   ROLE_PINGPONG  ping sends a counter stream on <dir>_out of every link and pong
//                  checks what comes back on <dir>_in;
//   ROLE_INCR      incr reads <dir>_in, adds the increment and writes <dir>_out;
//   ROLE_CAPTURE   ping sends as above, and an iohelper_mem kernel per link stores
//                  what comes back in global memory for the host to check. Link i
//                  writes words host_mem_base + i*host_num_words onwards;
//   ROLE_MEM       as ROLE_CAPTURE, but the data sent come from global memory: a
//                  ping_mem_kernel per link reads words host_rd_base +
//                  i*host_num_words onwards (the benchmark's memory variants).
// Two nodes whose links are cabled together, one running incr, run the benchmark on
// all six links at once. The kernels and the storing of returned data in global memory
// follow the ping-pong study and its I/O helper kernels. The host interface (start
// pulse, registers as ports), the memory layout and the capture role as a separate
// role are this design's choices.
//
// Global memory and its controller belong to the board support package and are not
// here: each link's burst write master (mem_*) and burst read master (rmem_*), both
// in kernel_clk, are ports. The system shares one memory controller between them.
//
// The transceivers (Interlaken PHY hard IP) are outside this module: each link's
// parallel word interface (256 bits + control flag at TxRx_clk) is a port.
//
// Interface: host_* inputs are in the kernel_clk domain and must be steady during a
// run; host_start is a one-cycle pulse that starts ping and pong on all links. Status
// arrays are indexed by link; pong_* and ping_* are in kernel_clk, link status in
// txrx_clk.
module novog_fpga_node
  import novog_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 256,
  parameter int unsigned RX_FIFO_DEPTH = 256,
  parameter int unsigned FRAME_WORDS   = 16,
  parameter int unsigned XOFF_MARGIN   = 128
) (
  input  logic                                  kernel_clk,
  input  logic                                  kernel_rst_n,
  input  logic                                  txrx_clk,
  input  logic                                  txrx_rst_n,
  // host control (kernel_clk)
  input  node_role_e                            host_role,
  input  logic                                  host_start,
  input  logic [31:0]                           host_num_words,
  input  logic [63:0]                           host_seed,
  input  logic [63:0]                           host_increment,
  input  logic [3:0]                            host_gap,
  input  logic [31:0]                           host_mem_base,
  input  logic [31:0]                           host_rd_base,
  // benchmark status (kernel_clk)
  output logic [NUM_LINKS-1:0]                  ping_busy,
  output logic [NUM_LINKS-1:0]                  ping_done,
  output logic [NUM_LINKS-1:0][31:0]            ping_sent,
  output logic [NUM_LINKS-1:0]                  pong_busy,
  output logic [NUM_LINKS-1:0]                  pong_done,
  output logic [NUM_LINKS-1:0][31:0]            pong_received,
  output logic [NUM_LINKS-1:0][31:0]            pong_errors,
  output logic [NUM_LINKS-1:0][31:0]            pong_latency_cycles,
  output logic [NUM_LINKS-1:0][31:0]            pong_run_cycles,
  output logic [NUM_LINKS-1:0][31:0]            incr_processed,
  output logic [NUM_LINKS-1:0]                  cap_busy,
  output logic [NUM_LINKS-1:0]                  cap_done,
  output logic [NUM_LINKS-1:0][31:0]            cap_written,
  output logic [NUM_LINKS-1:0][31:0]            cap_bursts,
  output logic [NUM_LINKS-1:0]                  mping_busy,
  output logic [NUM_LINKS-1:0]                  mping_done,
  output logic [NUM_LINKS-1:0][31:0]            mping_sent,
  // global memory burst write masters (kernel_clk)
  output logic [NUM_LINKS-1:0][31:0]            mem_address,
  output logic [NUM_LINKS-1:0]                  mem_write,
  output logic [NUM_LINKS-1:0][DATA_W-1:0]      mem_writedata,
  output logic [NUM_LINKS-1:0][MEM_BURST_W-1:0] mem_burstcount,
  input  logic [NUM_LINKS-1:0]                  mem_waitrequest,
  // global memory burst read masters (kernel_clk)
  output logic [NUM_LINKS-1:0][31:0]            rmem_address,
  output logic [NUM_LINKS-1:0]                  rmem_read,
  output logic [NUM_LINKS-1:0][MEM_BURST_W-1:0] rmem_burstcount,
  input  logic [NUM_LINKS-1:0]                  rmem_waitrequest,
  input  logic [NUM_LINKS-1:0][DATA_W-1:0]      rmem_readdata,
  input  logic [NUM_LINKS-1:0]                  rmem_readdatavalid,
  // link status (txrx_clk)
  output logic [NUM_LINKS-1:0]                  link_up,
  output logic [NUM_LINKS-1:0]                  local_xon,
  output logic [NUM_LINKS-1:0]                  remote_xon,
  output logic [NUM_LINKS-1:0]                  rx_overflow,
  output logic [NUM_LINKS-1:0]                  proto_err,
  output logic [NUM_LINKS-1:0][31:0]            tx_frames,
  output logic [NUM_LINKS-1:0][31:0]            tx_words,
  output logic [NUM_LINKS-1:0][31:0]            rx_frames,
  output logic [NUM_LINKS-1:0][31:0]            rx_words,
  // transceivers (txrx_clk)
  output logic [NUM_LINKS-1:0]                  phy_tx_valid,
  input  logic [NUM_LINKS-1:0]                  phy_tx_ready,
  output logic [NUM_LINKS-1:0]                  phy_tx_ctrl,
  output logic [NUM_LINKS-1:0][DATA_W-1:0]      phy_tx_data,
  input  logic [NUM_LINKS-1:0]                  phy_rx_valid,
  input  logic [NUM_LINKS-1:0]                  phy_rx_ctrl,
  input  logic [NUM_LINKS-1:0][DATA_W-1:0]      phy_rx_data
);

  // I/O channels as seen by the kernels
  logic [NUM_LINKS-1:0]             ch_out_valid, ch_out_ready;
  logic [NUM_LINKS-1:0][DATA_W-1:0] ch_out_data;
  logic [NUM_LINKS-1:0]             ch_in_valid, ch_in_ready;
  logic [NUM_LINKS-1:0][DATA_W-1:0] ch_in_data;

  logic is_incr, is_pp, is_cap, is_mem;
  assign is_incr = (host_role == ROLE_INCR);
  assign is_pp   = (host_role == ROLE_PINGPONG);
  assign is_cap  = (host_role == ROLE_CAPTURE);
  assign is_mem  = (host_role == ROLE_MEM);

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_kern
    logic              ping_valid, ping_ready;
    logic [DATA_W-1:0] ping_data;
    logic              pong_valid, pong_ready;
    logic              incr_in_valid, incr_in_ready, incr_out_valid, incr_out_ready;
    logic [DATA_W-1:0] incr_out_data;
    logic              cap_valid, cap_ready;
    logic              mping_valid, mping_ready;
    logic [DATA_W-1:0] mping_data;

    ping_kernel u_ping (
      .clk       (kernel_clk),
      .rst_n     (kernel_rst_n),
      .start     (host_start && (is_pp || is_cap)),
      .num_words (host_num_words),
      .seed      (host_seed),
      .gap       (host_gap),
      .out_valid (ping_valid),
      .out_ready (ping_ready),
      .out_data  (ping_data),
      .busy      (ping_busy[i]),
      .done      (ping_done[i]),
      .sent      (ping_sent[i])
    );

    pong_kernel u_pong (
      .clk            (kernel_clk),
      .rst_n          (kernel_rst_n),
      .start          (host_start && is_pp),
      .num_words      (host_num_words),
      .seed           (host_seed),
      .increment      (host_increment),
      .in_valid       (pong_valid),
      .in_ready       (pong_ready),
      .in_data        (ch_in_data[i]),
      .busy           (pong_busy[i]),
      .done           (pong_done[i]),
      .received       (pong_received[i]),
      .errors         (pong_errors[i]),
      .latency_cycles (pong_latency_cycles[i]),
      .run_cycles     (pong_run_cycles[i])
    );

    incr_kernel u_incr (
      .clk       (kernel_clk),
      .rst_n     (kernel_rst_n),
      .increment (host_increment),
      .in_valid  (incr_in_valid),
      .in_ready  (incr_in_ready),
      .in_data   (ch_in_data[i]),
      .out_valid (incr_out_valid),
      .out_ready (incr_out_ready),
      .out_data  (incr_out_data),
      .processed (incr_processed[i])
    );

    iohelper_mem #(.MAX_BURST (MEM_BURST)) u_cap (
      .clk             (kernel_clk),
      .rst_n           (kernel_rst_n),
      .start           (host_start && (is_cap || is_mem)),
      .base_addr       (host_mem_base + 32'(i) * host_num_words),
      .num_words       (host_num_words),
      .in_valid        (cap_valid),
      .in_ready        (cap_ready),
      .in_data         (ch_in_data[i]),
      .mem_address     (mem_address[i]),
      .mem_write       (mem_write[i]),
      .mem_writedata   (mem_writedata[i]),
      .mem_burstcount  (mem_burstcount[i]),
      .mem_waitrequest (mem_waitrequest[i]),
      .busy            (cap_busy[i]),
      .done            (cap_done[i]),
      .written         (cap_written[i]),
      .bursts          (cap_bursts[i])
    );

    ping_mem_kernel #(.MAX_BURST (MEM_BURST)) u_mping (
      .clk               (kernel_clk),
      .rst_n             (kernel_rst_n),
      .start             (host_start && is_mem),
      .base_addr         (host_rd_base + 32'(i) * host_num_words),
      .num_words         (host_num_words),
      .out_valid         (mping_valid),
      .out_ready         (mping_ready),
      .out_data          (mping_data),
      .mem_address       (rmem_address[i]),
      .mem_read          (rmem_read[i]),
      .mem_burstcount    (rmem_burstcount[i]),
      .mem_waitrequest   (rmem_waitrequest[i]),
      .mem_readdata      (rmem_readdata[i]),
      .mem_readdatavalid (rmem_readdatavalid[i]),
      .busy              (mping_busy[i]),
      .done              (mping_done[i]),
      .sent              (mping_sent[i])
    );

    // Each I/O channel is connected to exactly one kernel, chosen by the role.
    assign ch_out_valid[i] = is_incr ? incr_out_valid : (is_mem ? mping_valid : ping_valid);
    assign ch_out_data[i]  = is_incr ? incr_out_data  : (is_mem ? mping_data  : ping_data);
    assign ping_ready      = (is_pp || is_cap) && ch_out_ready[i];
    assign incr_out_ready  = is_incr && ch_out_ready[i];
    assign mping_ready     = is_mem && ch_out_ready[i];

    assign incr_in_valid   = is_incr && ch_in_valid[i];
    assign pong_valid      = is_pp && ch_in_valid[i] && pong_ready;
    assign cap_valid       = (is_cap || is_mem) && ch_in_valid[i];
    assign ch_in_ready[i]  = is_incr ? incr_in_ready
                                     : ((is_cap || is_mem) ? cap_ready : pong_ready);
  end

  bsp_io #(
    .TX_FIFO_DEPTH (TX_FIFO_DEPTH),
    .RX_FIFO_DEPTH (RX_FIFO_DEPTH),
    .FRAME_WORDS   (FRAME_WORDS),
    .XOFF_MARGIN   (XOFF_MARGIN)
  ) u_bsp_io (
    .kernel_clk   (kernel_clk),
    .kernel_rst_n (kernel_rst_n),
    .txrx_clk     (txrx_clk),
    .txrx_rst_n   (txrx_rst_n),
    .tx_valid     (ch_out_valid),
    .tx_ready     (ch_out_ready),
    .tx_data      (ch_out_data),
    .rx_valid     (ch_in_valid),
    .rx_ready     (ch_in_ready),
    .rx_data      (ch_in_data),
    .phy_tx_valid (phy_tx_valid),
    .phy_tx_ready (phy_tx_ready),
    .phy_tx_ctrl  (phy_tx_ctrl),
    .phy_tx_data  (phy_tx_data),
    .phy_rx_valid (phy_rx_valid),
    .phy_rx_ctrl  (phy_rx_ctrl),
    .phy_rx_data  (phy_rx_data),
    .link_up      (link_up),
    .local_xon    (local_xon),
    .remote_xon   (remote_xon),
    .rx_overflow  (rx_overflow),
    .proto_err    (proto_err),
    .tx_frames    (tx_frames),
    .tx_words     (tx_words),
    .rx_frames    (rx_frames),
    .rx_words     (rx_words)
  );

endmodule
