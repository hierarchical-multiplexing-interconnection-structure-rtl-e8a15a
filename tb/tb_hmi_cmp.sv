// tb_hmi_cmp: end-to-end test of the five-core interconnect at its default
// size (no parameter overrides).
//
// A route planner (hmi_route_pkg) turns stage-fault maps into logical
// pipelines and mux settings, which are written into the cores' nodes over
// the configuration port. Random 64-bit streams are then driven on every
// producer and each consumer input is compared, in the same cycle, with the
// producer the planner says feeds it; idle outgoing lanes must carry nothing.
//
// Scenarios:
//  1. no faults: every core is its own pipeline (all streams pass locally);
//  2. the five-fault example of the StageNet fabric (fetch of core 1, execute
//     of core 2, decode and issue of core 3, issue of core 5, cores numbered
//     from 1): three logical pipelines, no stage sharing;
//  3. all sixteen fault patterns of core 0's four stages, each missing stage
//     lent by a different other core; the incoming/outgoing stream counts of
//     core 0 are checked against the classification table (1 fault: 1/2,
//     fetch+issue: 2/3, decode+execute: 3/2, 3 faults: 2/1, 4 faults: 0/0);
//  4. random fault maps, reconfiguring while streams keep flowing; the number
//     of logical pipelines must equal the count of the scarcest healthy stage
//     type, since no stage serves two pipelines.
// Every mechanism (local pass, incoming route, outgoing route, a boundary
// with both stages dead, a core using all three lanes of one direction, idle
// lanes, reconfiguration) is counted and must occur at least once.
module tb_hmi_cmp;
  import hmi_pkg::*;
  import hmi_route_pkg::*;

  localparam int unsigned N   = 5;
  localparam int unsigned CW  = $clog2(N - 1);
  localparam int unsigned IDW = $clog2(N);

  logic             clk = 1'b0;
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

  int checks = 0, failures = 0;
  int cnt_pass = 0, cnt_in = 0, cnt_out = 0, cnt_both_dead = 0, cnt_full_dir = 0;
  int cnt_idle_lane = 0, cnt_reconfig = 0, cnt_rejected = 0;

  hmi_router #(N) r;

  hmi_cmp dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_core(cfg_core),
    .cfg_l2_sel(cfg_l2_sel), .cfg_in_en(cfg_in_en), .cfg_in_core(cfg_in_core),
    .cfg_in_lane(cfg_in_lane), .cfg_out_sel(cfg_out_sel),
    .prod_in(prod_in), .cons_out(cons_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_streams();
    for (int c = 0; c < N; c++)
      for (int b = 0; b < N_BND; b++)
        prod_in[c][b] = '{valid: 1'($urandom), data: {$urandom, 20'($urandom), 8'(c), 4'(b)}};
  endtask

  // write the planner's settings into every node, one node per cycle
  task automatic apply_config();
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      cfg_we   = 1'b1;
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
    cnt_reconfig++;
  endtask

  // streams arrive in the same cycle they are produced: checked #1 after driving
  task automatic traffic(int cycles);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      drive_streams();
      #1;
      for (int c = 0; c < N; c++)
        for (int b = 0; b < N_BND; b++) begin
          checks++;
          if (cons_out[c][b] !== prod_in[r.feeder[c][b]][b]) begin
            failures++;
            $display("FAIL core %0d boundary %0d: got %h from core? expected core %0d stream %h",
                     c, b, cons_out[c][b], r.feeder[c][b], prod_in[r.feeder[c][b]][b]);
          end
        end
      for (int c = 0; c < N; c++)
        for (int k = 0; k < LANES; k++)
          if (!r.out_en[c][k]) begin
            checks++;
            cnt_idle_lane++;
            if (dut.lanes[c][k] !== '0) begin
              failures++;
              $display("FAIL idle lane %0d of core %0d carries %h", k, c, dut.lanes[c][k]);
            end
          end
    end
  endtask

  task automatic tally(bit dead [N][4]);
    cnt_pass += r.n_pass;
    cnt_in   += r.n_incoming;
    cnt_out  += r.n_outgoing;
    for (int c = 0; c < N; c++) begin
      if (r.n_in[c] == LANES || r.n_out[c] == LANES) cnt_full_dir++;
      for (int b = 0; b < N_BND; b++)
        if (dead[c][PROD_STAGE[b]] && dead[c][CONS_STAGE[b]]) cnt_both_dead++;
    end
  endtask

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    bit dead [N][4];
    int np;
    r = new();
    rst_n = 1'b0;
    cfg_we = 1'b0;
    cfg_core = '0;
    for (int b = 0; b < N_BND; b++) cfg_l2_sel[b] = '0;
    cfg_in_en = '0;
    for (int k = 0; k < LANES; k++) begin
      cfg_in_core[k] = '0; cfg_in_lane[k] = '0; cfg_out_sel[k] = '{en: 1'b0, bnd: B_FE};
    end
    drive_streams();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. no faults: reset state already routes each core to itself
    for (int c = 0; c < N; c++) for (int s = 0; s < 4; s++) dead[c][s] = 0;
    np = r.build_from_faults(dead);
    expect_int("fault-free pipelines", np, N);
    traffic(5);
    tally(dead);

    // 2. five-fault example: cores 0..4, stages F D I E
    for (int c = 0; c < N; c++) for (int s = 0; s < 4; s++) dead[c][s] = 0;
    dead[0][0] = 1; dead[1][3] = 1; dead[2][1] = 1; dead[2][2] = 1; dead[4][2] = 1;
    r.clear();
    begin
      int p0 [4] = '{3, 3, 3, 3};
      int p1 [4] = '{4, 4, 1, 4};
      int p2 [4] = '{2, 0, 0, 0};
      expect_int("pipeline A routable", int'(r.add_pipeline(p0)), 1);
      expect_int("pipeline B routable", int'(r.add_pipeline(p1)), 1);
      expect_int("pipeline C routable", int'(r.add_pipeline(p2)), 1);
    end
    apply_config();
    traffic(10);
    tally(dead);

    // 3. every fault pattern of core 0, stage s lent by core s+1
    for (int pat = 0; pat < 16; pat++) begin
      int sc [4];
      int nf;
      for (int c = 0; c < N; c++) for (int s = 0; s < 4; s++) dead[c][s] = 0;
      nf = 0;
      for (int s = 0; s < 4; s++) begin
        dead[0][s] = pat[s];
        sc[s] = pat[s] ? s + 1 : 0;
        nf += pat[s];
      end
      r.clear();
      expect_int($sformatf("pattern %0h routable", pat), int'(r.add_pipeline(sc)), 1);
      case (pat)
        4'b0100: begin expect_int("issue fault in",  r.n_in[0], 1); expect_int("issue fault out",  r.n_out[0], 2); end
        4'b0101: begin expect_int("F+I faults in",   r.n_in[0], 2); expect_int("F+I faults out",   r.n_out[0], 3); end
        4'b1010: begin expect_int("D+E faults in",   r.n_in[0], 3); expect_int("D+E faults out",   r.n_out[0], 2); end
        4'b1011: begin expect_int("F+D+E faults in", r.n_in[0], 2); expect_int("F+D+E faults out", r.n_out[0], 1); end
        4'b1111: begin expect_int("4 faults in",     r.n_in[0], 0); expect_int("4 faults out",     r.n_out[0], 0); end
        default: ;
      endcase
      checks++;
      if (r.n_in[0] > LANES || r.n_out[0] > LANES) begin
        failures++;
        $display("FAIL pattern %0h needs %0d/%0d lanes", pat, r.n_in[0], r.n_out[0]);
      end
      apply_config();
      traffic(4);
      tally(dead);
    end

    // 4. random fault maps, reconfigured on the fly
    for (int trial = 0; trial < 60; trial++) begin
      for (int c = 0; c < N; c++) for (int s = 0; s < 4; s++) dead[c][s] = ($urandom % 4) == 0;
      np = r.build_from_faults(dead);
      if (np < 0) begin
        cnt_rejected++;
        continue;
      end
      // without stage sharing, the scarcest stage type bounds the pipelines
      begin
        int min_alive;
        min_alive = N;
        for (int s = 0; s < 4; s++) begin
          int alive;
          alive = 0;
          for (int c = 0; c < N; c++) alive += int'(!dead[c][s]);
          if (alive < min_alive) min_alive = alive;
        end
        expect_int("pipelines formed", np, min_alive);
      end
      apply_config();
      traffic(4);
      tally(dead);
    end

    $display("mechanisms: local pass=%0d incoming=%0d outgoing=%0d both-dead=%0d core using all 3 lanes of a direction=%0d idle lanes=%0d reconfigurations=%0d (fault maps needing over 3 lanes, skipped=%0d)",
             cnt_pass, cnt_in, cnt_out, cnt_both_dead, cnt_full_dir, cnt_idle_lane, cnt_reconfig, cnt_rejected);
    if (cnt_pass == 0)      begin failures++; $display("FAIL no local pass"); end
    if (cnt_in == 0)        begin failures++; $display("FAIL no incoming route"); end
    if (cnt_out == 0)       begin failures++; $display("FAIL no outgoing route"); end
    if (cnt_both_dead == 0) begin failures++; $display("FAIL no boundary with both stages dead"); end
    if (cnt_full_dir == 0)     begin failures++; $display("FAIL no core using all 3 lanes of a direction"); end
    if (cnt_idle_lane == 0) begin failures++; $display("FAIL no idle lane"); end
    if (cnt_reconfig == 0)  begin failures++; $display("FAIL no reconfiguration"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
