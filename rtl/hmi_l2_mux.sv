// hmi_l2_mux: Level#2 multiplexer, one in front of each stage input.
//
// It picks the stream a stage receives from four inputs: the stream of the
// previous stage of the same core (select 0) and the three incoming lanes
// delivered by the core's Level#1 incoming multiplexer (select 1..3). The four
// inputs and their meaning follow the interconnect structure this RTL
// implements; the select encoding is this design's own choice.
//
// Purely combinational: the output follows the inputs in the same cycle, so
// the structure adds no pipeline latency over a direct stage-to-stage path.
module hmi_l2_mux
  import hmi_pkg::*;
(
  input  stream_t        local_in,          // previous stage, same core
  input  stream_t        lane_in [LANES],   // incoming lanes from other cores
  input  l2_sel_t        sel,               // 0: local, k: lane k-1
  output stream_t        out                // to the stage input
);

  always_comb begin
    if (sel == '0) out = local_in;
    else           out = lane_in[sel - 1'b1];
  end

endmodule
