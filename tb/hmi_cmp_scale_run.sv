// hmi_cmp_scale_run: one hmi_cmp of N_CORES cores driven through a run of
// random stage-fault maps, for the scaling testbench.
//
// For each map the route planner forms logical pipelines (no stage sharing),
// the settings are written into every node, and several cycles of random
// streams are checked at every consumer input against the producer the
// planner says feeds it, in the same cycle. Reports its counts on ports and
// raises done when finished.
module hmi_cmp_scale_run
  import hmi_pkg::*;
  import hmi_route_pkg::*;
#(
  parameter int unsigned N_CORES = 10,
  parameter int unsigned TRIALS  = 20
)(
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   routed,      // cross-core streams routed
  output int   pipelines    // logical pipelines formed over all trials
);
  localparam int unsigned N   = N_CORES;
  localparam int unsigned CW  = $clog2(N - 1);
  localparam int unsigned IDW = $clog2(N);

  logic             rst_n;
  logic             cfg_we;
  logic [IDW-1:0]   cfg_core;
  l2_sel_t          cfg_l2_sel  [N_BND];
  logic [LANES-1:0] cfg_in_en;
  logic [CW-1:0]    cfg_in_core [LANES];
  logic [1:0]       cfg_in_lane [LANES];
  out_sel_t         cfg_out_sel [LANES];
  stream_t          prod_in  [N][N_BND];
  stream_t          cons_out [N][N_BND];

  hmi_router #(N) r;

  hmi_cmp #(.N_CORES(N)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_core(cfg_core),
    .cfg_l2_sel(cfg_l2_sel), .cfg_in_en(cfg_in_en), .cfg_in_core(cfg_in_core),
    .cfg_in_lane(cfg_in_lane), .cfg_out_sel(cfg_out_sel),
    .prod_in(prod_in), .cons_out(cons_out));

  initial begin
    bit dead [N][4];
    int np;
    r = new();
    done = 1'b0; checks = 0; failures = 0; routed = 0; pipelines = 0;
    rst_n = 1'b0; cfg_we = 1'b0; cfg_core = '0;
    for (int b = 0; b < N_BND; b++) cfg_l2_sel[b] = '0;
    cfg_in_en = '0;
    for (int k = 0; k < LANES; k++) begin
      cfg_in_core[k] = '0; cfg_in_lane[k] = '0; cfg_out_sel[k] = '{en: 1'b0, bnd: B_FE};
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < TRIALS; trial++) begin
      for (int c = 0; c < N; c++) for (int s = 0; s < 4; s++)
        dead[c][s] = (trial == 0) ? 1'b0 : (($urandom % 4) == 0);
      np = r.build_from_faults(dead);
      if (np < 0) continue;
      pipelines += np;
      routed += r.n_incoming;
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        cfg_we = 1'b1;
        cfg_core = IDW'(c);
        for (int b = 0; b < N_BND; b++) cfg_l2_sel[b] = l2_sel_t'(r.l2_sel[c][b]);
        for (int k = 0; k < LANES; k++) begin
          cfg_in_en[k]   = r.in_en[c][k];
          cfg_in_core[k] = CW'(r.in_core[c][k]);
          cfg_in_lane[k] = 2'(r.in_lane[c][k]);
          cfg_out_sel[k] = '{en: r.out_en[c][k], bnd: bnd_e'(r.out_bnd[c][k])};
        end
      end
      @(negedge clk);
      cfg_we = 1'b0;
      for (int t = 0; t < 3; t++) begin
        @(negedge clk);
        for (int c = 0; c < N; c++)
          for (int b = 0; b < N_BND; b++)
            prod_in[c][b] = '{valid: 1'b1, data: {$urandom, 20'($urandom), 8'(c), 4'(b)}};
        #1;
        for (int c = 0; c < N; c++)
          for (int b = 0; b < N_BND; b++) begin
            checks++;
            if (cons_out[c][b] !== prod_in[r.feeder[c][b]][b]) begin
              failures++;
              $display("FAIL N=%0d core %0d boundary %0d", N, c, b);
            end
          end
      end
    end
    done = 1'b1;
  end
endmodule
