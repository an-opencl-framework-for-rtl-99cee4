`timescale 1ns/1ps
// torus_tb: 64 FPGA nodes cabled as a 4 x 4 x 4 torus, all links busy at once.
//
// Node (x,y,z) has index x + NX*(y + NY*z). Its posx link is cabled to the negx link of
// node (x+1 mod NX, y, z), and likewise for y and z, through 32 Gbit/s link models with
// 20 cycles of latency. Each direction of a link is one xcvr_link_model. NX, NY and NZ
// may be set to any even sizes; with 2 x 2 x 2 (eight nodes) a node's posx and negx
// both reach the same neighbour, over two separate cables.
// A torus with even sides splits into two colours by the parity of x+y+z, and every
// link joins two different colours: even nodes run ping and pong, odd nodes run incr.
// One start pulse therefore exercises all 6*NN link directions of the torus (384 for
// 4x4x4). The test checks every word on every link, the counts, link-up and the
// absence of overflow and framing errors on every node.
module torus_tb;
  import novog_pkg::*;
  localparam int unsigned NX = 4, NY = 4, NZ = 4;   // even sizes
  localparam int unsigned NN = NX * NY * NZ;
  localparam int unsigned N_WORDS = 1500;

  logic k_clk = 0, txrx_clk = 0, rst_n = 0;
  always #2.0 k_clk = ~k_clk;
  always #2.5 txrx_clk = ~txrx_clk;

  logic        start;
  logic [31:0] num_words;
  logic [63:0] seed, increment;

  logic [NN-1:0][NUM_LINKS-1:0]             tx_valid, tx_ready, tx_ctrl, rx_valid, rx_ctrl;
  logic [NN-1:0][NUM_LINKS-1:0][DATA_W-1:0] tx_data, rx_data;
  logic [NN-1:0][NUM_LINKS-1:0]             ping_busy, ping_done, pong_busy, pong_done;
  logic [NN-1:0][NUM_LINKS-1:0][31:0]       ping_sent, pong_received, pong_errors, pong_lat, pong_run, incr_n;
  // global memory ports: unused here, the memory never stalls
  logic [NN-1:0][NUM_LINKS-1:0]                  cap_busy, cap_done, mem_wr;
  logic [NN-1:0][NUM_LINKS-1:0][31:0]            cap_written, cap_bursts, mem_addr;
  logic [NN-1:0][NUM_LINKS-1:0][DATA_W-1:0]      mem_wdata;
  logic [NN-1:0][NUM_LINKS-1:0][MEM_BURST_W-1:0] mem_bc, rmem_bc;
  logic [NN-1:0][NUM_LINKS-1:0]                  mping_busy, mping_done, rmem_rd;
  logic [NN-1:0][NUM_LINKS-1:0][31:0]            mping_sent, rmem_addr;
  logic [NN-1:0][NUM_LINKS-1:0]             link_up, lxon, rxon, ovf, perr;
  logic [NN-1:0][NUM_LINKS-1:0][31:0]       txf, txw, rxf, rxw;

  function automatic int node_of(int x, int y, int z);
    return ((x + NX) % NX) + NX * (((y + NY) % NY) + NY * ((z + NZ) % NZ));
  endfunction

  function automatic bit is_even(int n);
    return ((n % NX) + ((n / NX) % NY) + (n / (NX * NY))) % 2 == 0;
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam node_role_e ROLE = (((n % NX) + ((n / NX) % NY) + (n / (NX * NY))) % 2 == 0)
                                  ? ROLE_PINGPONG : ROLE_INCR;
    novog_fpga_node u_node (
      .kernel_clk (k_clk), .kernel_rst_n (rst_n), .txrx_clk (txrx_clk), .txrx_rst_n (rst_n),
      .host_role (ROLE), .host_start (start), .host_num_words (num_words), .host_seed (seed),
      .host_increment (increment), .host_gap (4'd0),
      .ping_busy (ping_busy[n]), .ping_done (ping_done[n]), .ping_sent (ping_sent[n]),
      .pong_busy (pong_busy[n]), .pong_done (pong_done[n]), .pong_received (pong_received[n]),
      .pong_errors (pong_errors[n]), .pong_latency_cycles (pong_lat[n]), .pong_run_cycles (pong_run[n]),
      .incr_processed (incr_n[n]), .host_mem_base (32'd0),
      .cap_busy (cap_busy[n]), .cap_done (cap_done[n]), .cap_written (cap_written[n]),
      .cap_bursts (cap_bursts[n]),
      .mem_address (mem_addr[n]), .mem_write (mem_wr[n]), .mem_writedata (mem_wdata[n]),
      .mem_burstcount (mem_bc[n]), .mem_waitrequest ('0),
      .host_rd_base (32'd0), .mping_busy (mping_busy[n]), .mping_done (mping_done[n]),
      .mping_sent (mping_sent[n]), .rmem_address (rmem_addr[n]), .rmem_read (rmem_rd[n]),
      .rmem_burstcount (rmem_bc[n]), .rmem_waitrequest ('0), .rmem_readdata ('0),
      .rmem_readdatavalid ('0),
      .link_up (link_up[n]), .local_xon (lxon[n]), .remote_xon (rxon[n]), .rx_overflow (ovf[n]),
      .proto_err (perr[n]), .tx_frames (txf[n]), .tx_words (txw[n]), .rx_frames (rxf[n]), .rx_words (rxw[n]),
      .phy_tx_valid (tx_valid[n]), .phy_tx_ready (tx_ready[n]), .phy_tx_ctrl (tx_ctrl[n]),
      .phy_tx_data (tx_data[n]), .phy_rx_valid (rx_valid[n]), .phy_rx_ctrl (rx_ctrl[n]),
      .phy_rx_data (rx_data[n])
    );

    // one cable per transmit direction: link d of node n -> opposite link of its neighbour
    for (genvar d = 0; d < NUM_LINKS; d++) begin : g_cable
      localparam int X  = n % NX, Y = (n / NX) % NY, Z = n / (NX * NY);
      localparam int S  = (d % 2 == 0) ? 1 : -1;             // pos: +1, neg: -1
      localparam int DX = (d / 2 == 0) ? S : 0;
      localparam int DY = (d / 2 == 1) ? S : 0;
      localparam int DZ = (d / 2 == 2) ? S : 0;
      localparam int M  = ((X + DX + NX) % NX) + NX * (((Y + DY + NY) % NY) + NY * ((Z + DZ + NZ) % NZ));
      xcvr_link_model #(.LATENCY(20), .ACCEPT(5), .PERIOD(8)) u_cable (
        .clk (txrx_clk), .rst_n (rst_n),
        .tx_valid (tx_valid[n][d]), .tx_ready (tx_ready[n][d]), .tx_ctrl (tx_ctrl[n][d]),
        .tx_data (tx_data[n][d]),
        .rx_valid (rx_valid[M][d^1]), .rx_ctrl (rx_ctrl[M][d^1]), .rx_data (rx_data[M][d^1])
      );
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    start = 0; num_words = N_WORDS; seed = 64'h7777_0000_0000_0000; increment = 64'd5;
    repeat (5) @(posedge txrx_clk);
    #1 rst_n = 1;
    repeat (100) @(posedge txrx_clk);
    for (int n = 0; n < NN; n++) check(&link_up[n], $sformatf("node %0d: links not up", n));
    @(negedge k_clk) start = 1;
    @(negedge k_clk) start = 0;
    for (int n = 0; n < NN; n++) if (is_even(n)) wait (&pong_done[n]);
    repeat (10) @(posedge txrx_clk);
    for (int n = 0; n < NN; n++)
      for (int d = 0; d < NUM_LINKS; d++) begin
        if (is_even(n))
          check(ping_sent[n][d] == N_WORDS && pong_received[n][d] == N_WORDS && pong_errors[n][d] == 0,
                $sformatf("node %0d link %0d: sent %0d received %0d errors %0d", n, d,
                          ping_sent[n][d], pong_received[n][d], pong_errors[n][d]));
        else
          check(incr_n[n][d] == N_WORDS, $sformatf("node %0d link %0d: incr passed %0d", n, d, incr_n[n][d]));
        check(!ovf[n][d] && !perr[n][d], $sformatf("node %0d link %0d: overflow or framing error", n, d));
      end
    $display("torus %0dx%0dx%0d: %0d words on each of %0d link directions, round trip %0d kernel cycles",
             NX, NY, NZ, N_WORDS, NN * NUM_LINKS, pong_lat[0][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge txrx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
