// hmi_cmp: stage-level reconfigurable chip multiprocessor interconnect built
// from hierarchical multiplexing instead of crossbar switches.
//
// N_CORES cores each have five pipeline-stage boundaries. Every core owns one
// hmi_core_node; the three outgoing lanes of each core are wired to the
// Level#1 incoming multiplexer of every other core, so a stage of any core can
// take over for a faulty stage of any other core. The pipeline stages
// themselves (fetch, decode, issue, execute/mem) are not part of this RTL:
// their stream outputs enter on prod_in and their stream inputs leave on
// cons_out, indexed [core][boundary] as in hmi_pkg::bnd_e.
//
// Configuration: one node is written per cycle. With cfg_we high, the fields
// are loaded into the node numbered cfg_core at the rising clock edge.
// cfg_in_core names a source among the other cores of the target node, in
// ascending order with the target itself skipped.
//
// The all-to-all wiring of outgoing lanes into every other core's Level#1
// incoming multiplexer follows the reference structure; the shared
// configuration port and its one-node-per-cycle write are this design's own.
//
// Timing: streams pass combinationally, zero cycles from prod_in to cons_out,
// in the same core and across cores alike.
module hmi_cmp
  import hmi_pkg::*;
#(
  parameter int unsigned N_CORES = 5,
  localparam int unsigned CW  = (N_CORES > 2) ? $clog2(N_CORES - 1) : 1,
  localparam int unsigned IDW = (N_CORES > 1) ? $clog2(N_CORES) : 1
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [IDW-1:0]   cfg_core,
  input  l2_sel_t          cfg_l2_sel  [N_BND],
  input  logic [LANES-1:0] cfg_in_en,
  input  logic [CW-1:0]    cfg_in_core [LANES],
  input  logic [1:0]       cfg_in_lane [LANES],
  input  out_sel_t         cfg_out_sel [LANES],
  input  stream_t          prod_in  [N_CORES][N_BND],
  output stream_t          cons_out [N_CORES][N_BND]
);

  stream_t lanes [N_CORES][LANES];

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    stream_t others [N_CORES-1][LANES];

    for (genvar i = 0; i < N_CORES - 1; i++) begin : g_src
      // i-th other core: skip core c itself
      localparam int unsigned SRC = (i < c) ? i : i + 1;
      assign others[i] = lanes[SRC];
    end

    hmi_core_node #(.N_CORES(N_CORES)) u_node (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg_we      (cfg_we && (32'(cfg_core) == c)),
      .cfg_l2_sel  (cfg_l2_sel),
      .cfg_in_en   (cfg_in_en),
      .cfg_in_core (cfg_in_core),
      .cfg_in_lane (cfg_in_lane),
      .cfg_out_sel (cfg_out_sel),
      .prod_in     (prod_in[c]),
      .cons_out    (cons_out[c]),
      .lane_in     (others),
      .lane_out    (lanes[c])
    );
  end

endmodule
