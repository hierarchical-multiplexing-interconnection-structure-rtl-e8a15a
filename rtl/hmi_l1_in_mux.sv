// hmi_l1_in_mux: Level#1 incoming multiplexer of one core.
//
// Every other core broadcasts LANES outgoing lanes to this core, so the mux
// sees (N_CORES-1)*LANES input channels. Each of its LANES output lanes
// independently selects one of them, or stays idle (valid low) when disabled.
// The outputs are wired to every L2 multiplexer of the core.
//
// Input index: src[i][l] is lane l of the i-th other core, other cores taken
// in ascending core number with this core skipped. That the three output
// lanes choose freely among all incoming channels, and the enable, are this
// design's own choices; the structure only fixes three lanes in and the
// connection to all other cores.
//
// Purely combinational.
module hmi_l1_in_mux
  import hmi_pkg::*;
#(
  parameter int unsigned N_CORES = 5,
  localparam int unsigned CW = (N_CORES > 2) ? $clog2(N_CORES - 1) : 1
)(
  input  stream_t          src      [N_CORES-1][LANES],
  input  logic [LANES-1:0] lane_en,
  input  logic [CW-1:0]    lane_core [LANES],  // which other core
  input  logic [1:0]       lane_lane [LANES],  // which of its lanes
  output stream_t          lane_out [LANES]
);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      lane_out[k] = STREAM_IDLE;
      if (lane_en[k] && (32'(lane_core[k]) < N_CORES - 1) && (32'(lane_lane[k]) < LANES))
        lane_out[k] = src[lane_core[k]][lane_lane[k]];
    end
  end

endmodule
