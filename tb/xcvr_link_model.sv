`timescale 1ns/1ps
// xcvr_link_model: behavioural model of one direction of an inter-FPGA link, for
// simulation only (not synthesizable logic of the design).
//
// It stands for the transmit transceiver of one FPGA, the cable and the receive
// transceiver of the other: a word accepted on the parallel transmit interface comes out
// of the parallel receive interface LATENCY link-clock cycles later, unchanged. Line
// coding, clock recovery, lane alignment and CRC are not modelled: the link is assumed
// error-free and both ends share one link clock.
// Line rate: the parallel side could move 256 bits x 200 MHz = 51.2 Gbps, more than the
// serial line carries. The model accepts ACCEPT words in every PERIOD cycles (tx_ready
// low in the others), so ACCEPT/PERIOD = 5/8 gives the 32 Gbps of the Novo-G# links;
// the receive side then shows gaps (rx_valid low). ACCEPT = PERIOD gives a link as fast
// as its parallel interface.
module xcvr_link_model
  import novog_pkg::*;
#(
  parameter int unsigned LATENCY = 20,
  parameter int unsigned ACCEPT  = 5,
  parameter int unsigned PERIOD  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic              tx_ctrl,
  input  logic [DATA_W-1:0] tx_data,
  output logic              rx_valid,
  output logic              rx_ctrl,
  output logic [DATA_W-1:0] rx_data
);

  logic [LATENCY-1:0]             v_pipe;
  logic [LATENCY-1:0]             c_pipe;
  logic [LATENCY-1:0][DATA_W-1:0] d_pipe;
  int unsigned                    phase;

  assign tx_ready = (phase < ACCEPT);
  assign rx_valid = v_pipe[LATENCY-1];
  assign rx_ctrl  = c_pipe[LATENCY-1];
  assign rx_data  = d_pipe[LATENCY-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe <= '0;
      c_pipe <= '0;
      d_pipe <= '0;
      phase  <= 0;
    end else begin
      phase  <= (phase == PERIOD - 1) ? 0 : phase + 1;
      v_pipe <= {v_pipe[LATENCY-2:0], tx_valid && tx_ready};
      c_pipe <= {c_pipe[LATENCY-2:0], tx_ctrl};
      d_pipe <= {d_pipe[LATENCY-2:0], tx_data};
    end
  end

endmodule
