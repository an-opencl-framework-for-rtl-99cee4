// novog_pkg: types and constants shared by the inter-FPGA I/O channel logic.
//
// An inter-FPGA link carries one 256-bit word per TxRx_clk cycle (200 MHz) between
// the link controller and the transceiver. Each word is flagged either as a data word
// (payload of an OpenCL I/O channel) or as a control word. The only control word this
// design generates is the idle control word: it marks the start and the end of every
// data frame, fills the link while there is nothing to send, and carries the sender's
// XOn/XOff flow-control bit. The package also holds the node roles and the memory
// burst length. The 256-bit width and the 200 MHz word clock follow the
// Novo-G# framework; the layout of the control word is this design's own choice.
package novog_pkg;

  // Width of one I/O channel word (an OpenCL ulong4).
  parameter int unsigned DATA_W    = 256;
  // Number of torus directions per FPGA: posx, negx, posy, negy, posz, negz.
  parameter int unsigned NUM_LINKS = 6;
  // Longest write burst to global memory, in DATA_W-bit words (16 64-bit words).
  parameter int unsigned MEM_BURST   = 4;
  parameter int unsigned MEM_BURST_W = $clog2(MEM_BURST) + 1;

  // Link index of each torus direction.
  typedef enum logic [2:0] {
    LINK_POSX = 3'd0,
    LINK_NEGX = 3'd1,
    LINK_POSY = 3'd2,
    LINK_NEGY = 3'd3,
    LINK_POSZ = 3'd4,
    LINK_NEGZ = 3'd5
  } link_dir_e;

  // Type code in the top byte of a control word.
  typedef enum logic [7:0] {
    CW_IDLE = 8'hA5
  } cw_type_e;

  // Layout of a 256-bit control word.
  typedef struct packed {
    cw_type_e     cw_type;   // [255:248]
    logic         sof;       // [247] word precedes a data frame
    logic         eof;       // [246] word follows a data frame
    logic         xon;       // [245] 1 = XOn (sender may transmit), 0 = XOff
    logic [244:0] reserved;  // sent as zero
  } ctrl_word_t;

  // One word on the parallel transceiver interface.
  typedef struct packed {
    logic              ctrl;  // 1 = control word, 0 = data word
    logic [DATA_W-1:0] data;
  } phy_word_t;

  // Build an idle control word.
  function automatic logic [DATA_W-1:0] idle_word(input logic sof, input logic eof,
                                                  input logic xon);
    ctrl_word_t cw;
    cw          = '0;
    cw.cw_type  = CW_IDLE;
    cw.sof      = sof;
    cw.eof      = eof;
    cw.xon      = xon;
    return cw;
  endfunction

  // Role of a node in the ping-pong benchmark.
  typedef enum logic [1:0] {
    ROLE_PINGPONG = 2'd0,  // runs ping and pong on every link
    ROLE_INCR     = 2'd1,  // runs incr on every link
    ROLE_CAPTURE  = 2'd2,  // runs ping and stores what returns in global memory
    ROLE_MEM      = 2'd3   // reads ping data from global memory, stores what returns
  } node_role_e;

endpackage
