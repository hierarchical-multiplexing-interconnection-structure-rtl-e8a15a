// tb_hmi_core_node: self-checking test of one core's interconnect node.
//
// Five-core configuration (the node sees four other cores). Checks:
//  - after reset every consumer input carries its local producer and all
//    outgoing lanes are idle (the fault-free configuration);
//  - a configuration is taken only on a clock edge with cfg_we high;
//  - with random legal configurations and random streams, every consumer
//    input, and every outgoing lane, equals what a reference model of the
//    configuration register and the two mux levels predicts, in the same
//    cycle the streams change (zero added latency).
// A watchdog ends the run with a failure if it does not finish.
module tb_hmi_core_node;
  import hmi_pkg::*;

  localparam int unsigned N  = 5;
  localparam int unsigned CW = $clog2(N - 1);

  logic             clk = 1'b0;
  logic             rst_n;
  logic             cfg_we;
  l2_sel_t          cfg_l2_sel  [N_BND];
  logic [LANES-1:0] cfg_in_en;
  logic [CW-1:0]    cfg_in_core [LANES];
  logic [1:0]       cfg_in_lane [LANES];
  out_sel_t         cfg_out_sel [LANES];
  stream_t          prod_in  [N_BND];
  stream_t          cons_out [N_BND];
  stream_t          lane_in  [N-1][LANES];
  stream_t          lane_out [LANES];

  // reference copy of the configuration register
  int m_l2 [N_BND];
  bit m_in_en [LANES];
  int m_in_core [LANES], m_in_lane [LANES];
  bit m_out_en [LANES];
  int m_out_bnd [LANES];

  int checks = 0, failures = 0;

  hmi_core_node dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we),
    .cfg_l2_sel(cfg_l2_sel), .cfg_in_en(cfg_in_en), .cfg_in_core(cfg_in_core),
    .cfg_in_lane(cfg_in_lane), .cfg_out_sel(cfg_out_sel),
    .prod_in(prod_in), .cons_out(cons_out), .lane_in(lane_in), .lane_out(lane_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_streams();
    for (int b = 0; b < N_BND; b++) prod_in[b] = '{valid: 1'b1, data: {$urandom, 28'($urandom), 4'(b)}};
    for (int i = 0; i < N - 1; i++)
      for (int l = 0; l < LANES; l++)
        lane_in[i][l] = '{valid: 1'($urandom), data: {$urandom, 24'($urandom), 4'(i), 4'(l)}};
  endtask

  task automatic check_outputs(string tag);
    stream_t lanes_m [LANES];
    for (int k = 0; k < LANES; k++)
      lanes_m[k] = m_in_en[k] ? lane_in[m_in_core[k]][m_in_lane[k]] : '0;
    for (int b = 0; b < N_BND; b++) begin
      stream_t e;
      e = (m_l2[b] == 0) ? prod_in[b] : lanes_m[m_l2[b] - 1];
      checks++;
      if (cons_out[b] !== e) begin
        failures++;
        $display("FAIL %s cons_out[%0d]=%h exp=%h", tag, b, cons_out[b], e);
      end
    end
    for (int k = 0; k < LANES; k++) begin
      stream_t e;
      e = m_out_en[k] ? prod_in[m_out_bnd[k]] : '0;
      checks++;
      if (lane_out[k] !== e) begin
        failures++;
        $display("FAIL %s lane_out[%0d]=%h exp=%h", tag, k, lane_out[k], e);
      end
    end
  endtask

  // random legal configuration on the cfg inputs (L2 picks only enabled lanes)
  task automatic random_cfg();
    for (int k = 0; k < LANES; k++) begin
      cfg_in_en[k]   = 1'($urandom);
      cfg_in_core[k] = CW'($urandom % (N - 1));
      cfg_in_lane[k] = 2'($urandom % LANES);
      cfg_out_sel[k] = '{en: 1'($urandom), bnd: bnd_e'($urandom % N_BND)};
    end
    for (int b = 0; b < N_BND; b++) begin
      int s;
      s = $urandom % L2_IN;
      if (s != 0 && !cfg_in_en[s - 1]) s = 0;
      cfg_l2_sel[b] = l2_sel_t'(s);
    end
  endtask

  task automatic model_load();
    for (int b = 0; b < N_BND; b++) m_l2[b] = int'(cfg_l2_sel[b]);
    for (int k = 0; k < LANES; k++) begin
      m_in_en[k] = cfg_in_en[k]; m_in_core[k] = int'(cfg_in_core[k]); m_in_lane[k] = int'(cfg_in_lane[k]);
      m_out_en[k] = cfg_out_sel[k].en; m_out_bnd[k] = int'(cfg_out_sel[k].bnd);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    cfg_we = 1'b0;
    random_cfg();
    for (int b = 0; b < N_BND; b++) m_l2[b] = 0;
    for (int k = 0; k < LANES; k++) begin
      m_in_en[k] = 0; m_in_core[k] = 0; m_in_lane[k] = 0; m_out_en[k] = 0; m_out_bnd[k] = 0;
    end
    drive_streams();
    repeat (2) @(posedge clk);
    #1 check_outputs("reset");
    rst_n = 1'b1;

    for (int it = 0; it < 300; it++) begin
      // present a configuration, write it only when cfg_we is high
      @(negedge clk);
      random_cfg();
      cfg_we = 1'($urandom);
      @(posedge clk);
      if (cfg_we) model_load();
      #1;
      // several cycles of traffic on the current routes
      for (int t = 0; t < 3; t++) begin
        drive_streams();
        #1 check_outputs("traffic");
        @(posedge clk);
        #1;
        cfg_we = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
