// hmi_core_node: the hierarchical multiplexing interconnect of one core.
//
// Five Level#2 multiplexers sit in front of the five stage inputs of the core
// (fetch for branch feedback, decode, issue, execute/mem, and the issue
// register file for writeback). Each chooses between the local producer of
// that stream and the three lanes of the Level#1 incoming multiplexer. The
// Level#1 outgoing multiplexer takes up to three of the local producers'
// streams and broadcasts them on the core's three outgoing lanes to all other
// cores.
//
// Route configuration: the routes are decided by a configuration manager
// (firmware, outside this RTL) and held here in a register, loaded when
// cfg_we is high at a clock edge. Reset puts every L2 mux on its local input
// and disables all lanes: the fault-free configuration, each core running as a
// conventional pipeline. The register and its reset value are this design's
// own choices; the structure only needs the selects to be held.
//
// Stream path: combinational from prod_in / lane_in to cons_out / lane_out,
// zero cycles. Only the configuration is clocked.
//
// The outgoing multiplexer reads the producers directly rather than the L2
// outputs. A stream goes out only when the consumer of its boundary in this
// core is faulty, and then that L2 mux is on its local input, so both taps
// carry the same stream; reading the producer keeps the core-to-core wiring
// free of combinational loops (lane out of A, into B, out of B, into A).
//
// Rule checked by an assertion: an L2 mux may select only an enabled incoming
// lane.
module hmi_core_node
  import hmi_pkg::*;
#(
  parameter int unsigned N_CORES = 5,
  localparam int unsigned CW = (N_CORES > 2) ? $clog2(N_CORES - 1) : 1
)(
  input  logic             clk,
  input  logic             rst_n,
  // configuration write
  input  logic             cfg_we,
  input  l2_sel_t          cfg_l2_sel   [N_BND],
  input  logic [LANES-1:0] cfg_in_en,
  input  logic [CW-1:0]    cfg_in_core  [LANES],
  input  logic [1:0]       cfg_in_lane  [LANES],
  input  out_sel_t         cfg_out_sel  [LANES],
  // stage side
  input  stream_t          prod_in  [N_BND],  // stream each local producer emits, by boundary
  output stream_t          cons_out [N_BND],  // stream each local consumer receives, by boundary
  // core-to-core side
  input  stream_t          lane_in  [N_CORES-1][LANES], // other cores' outgoing lanes
  output stream_t          lane_out [LANES]             // this core's outgoing lanes
);

  l2_sel_t          l2_sel_q  [N_BND];
  logic [LANES-1:0] in_en_q;
  logic [CW-1:0]    in_core_q [LANES];
  logic [1:0]       in_lane_q [LANES];
  out_sel_t         out_sel_q [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BND; b++) l2_sel_q[b] <= '0;
      in_en_q <= '0;
      for (int k = 0; k < LANES; k++) begin
        in_core_q[k] <= '0;
        in_lane_q[k] <= '0;
        out_sel_q[k] <= '{en: 1'b0, bnd: B_FE};
      end
    end else if (cfg_we) begin
      l2_sel_q  <= cfg_l2_sel;
      in_en_q   <= cfg_in_en;
      in_core_q <= cfg_in_core;
      in_lane_q <= cfg_in_lane;
      out_sel_q <= cfg_out_sel;
    end
  end

  stream_t in_lanes [LANES];

  hmi_l1_in_mux #(.N_CORES(N_CORES)) u_l1_in (
    .src       (lane_in),
    .lane_en   (in_en_q),
    .lane_core (in_core_q),
    .lane_lane (in_lane_q),
    .lane_out  (in_lanes)
  );

  for (genvar b = 0; b < N_BND; b++) begin : g_l2
    hmi_l2_mux u_l2 (
      .local_in (prod_in[b]),
      .lane_in  (in_lanes),
      .sel      (l2_sel_q[b]),
      .out      (cons_out[b])
    );
  end

  hmi_l1_out_mux u_l1_out (
    .bnd_in   (prod_in),
    .sel      (out_sel_q),
    .lane_out (lane_out)
  );

  for (genvar b = 0; b < N_BND; b++) begin : g_rule
    a_lane_enabled : assert property (@(posedge clk) disable iff (!rst_n)
      (l2_sel_q[b] != '0) |-> in_en_q[l2_sel_q[b] - 1'b1])
      else $error("L2 mux of boundary %0d selects a disabled incoming lane", b);
  end

endmodule
