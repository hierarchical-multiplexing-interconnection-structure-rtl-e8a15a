// hmi_pkg: types and constants shared by the hierarchical multiplexing
// interconnect of a stage-level reconfigurable chip multiprocessor.
//
// An instruction stream between two pipeline stages travels on a channel of
// CH_W data bits (64, the channel width of the crossbar it replaces) plus a
// valid bit. The valid bit is this design's own choice: a channel may carry
// an instruction in some cycles and nothing in others.
//
// Each core has five stage boundaries, one per stream its stages exchange:
//   B_FE  execute/mem -> fetch   (branch feedback)
//   B_FD  fetch       -> decode
//   B_DI  decode      -> issue
//   B_IE  issue       -> execute/mem
//   B_WB  execute/mem -> issue   (register writeback)
// A core can receive at most LANES streams from, and send at most LANES
// streams to, other cores (three in each direction: the worst case of one
// core's stage-fault patterns, reached with two interleaved faults).
package hmi_pkg;

  localparam int unsigned CH_W   = 64;  // crossbar channel width
  localparam int unsigned LANES  = 3;   // max incoming / outgoing streams per core
  localparam int unsigned N_BND  = 5;   // stage boundaries (L2 muxes) per core
  localparam int unsigned L2_IN  = 1 + LANES; // inputs of one L2 mux

  typedef struct packed {
    logic            valid;
    logic [CH_W-1:0] data;
  } stream_t;

  typedef enum logic [2:0] {
    B_FE = 3'd0,
    B_FD = 3'd1,
    B_DI = 3'd2,
    B_IE = 3'd3,
    B_WB = 3'd4
  } bnd_e;

  // L2 select: 0 takes the local producer, 1..LANES take incoming lane sel-1.
  typedef logic [$clog2(L2_IN)-1:0] l2_sel_t;

  // One outgoing lane: enable and which boundary stream it carries.
  typedef struct packed {
    logic en;
    bnd_e bnd;
  } out_sel_t;

  localparam stream_t STREAM_IDLE = '{valid: 1'b0, data: '0};

endpackage
