// tb_hmi_l1_in_mux: self-checking test of the Level#1 incoming multiplexer.
//
// Five cores (four others seen by this mux, three lanes each). Random streams
// on all twelve inputs, random per-lane enable and source selects, including
// out-of-range source lane numbers. Each output lane must equal the chosen
// other core's chosen lane when enabled and in range, and be idle (valid and
// data zero) otherwise. Every source pair is also selected in turn on every
// output lane. A watchdog ends the run with a failure if it does not finish.
module tb_hmi_l1_in_mux;
  import hmi_pkg::*;

  localparam int unsigned N  = 5;
  localparam int unsigned CW = $clog2(N - 1);

  logic             clk = 1'b0;
  stream_t          src [N-1][LANES];
  logic [LANES-1:0] lane_en;
  logic [CW-1:0]    lane_core [LANES];
  logic [1:0]       lane_lane [LANES];
  stream_t          lane_out [LANES];
  int               checks = 0, failures = 0;

  hmi_l1_in_mux dut (
    .src(src), .lane_en(lane_en), .lane_core(lane_core),
    .lane_lane(lane_lane), .lane_out(lane_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_src();
    for (int i = 0; i < N - 1; i++)
      for (int l = 0; l < LANES; l++) begin
        src[i][l].valid = 1'b1;                      // valid set so idle is distinguishable
        src[i][l].data  = {$urandom, 8'(i), 8'(l), 16'($urandom)};
      end
  endtask

  task automatic check_all();
    for (int k = 0; k < LANES; k++) begin
      stream_t e;
      if (lane_en[k] && lane_lane[k] < 2'(LANES)) e = src[lane_core[k]][lane_lane[k]];
      else e = '0;
      checks++;
      if (lane_out[k] !== e) begin
        failures++;
        $display("FAIL lane %0d en=%b core=%0d lane=%0d out=%h exp=%h",
                 k, lane_en[k], lane_core[k], lane_lane[k], lane_out[k], e);
      end
    end
  endtask

  initial begin
    // exhaustive walk of sources on every output lane
    randomize_src();
    for (int i = 0; i < N - 1; i++)
      for (int l = 0; l < LANES; l++) begin
        lane_en = '1;
        for (int k = 0; k < LANES; k++) begin
          lane_core[k] = CW'((i + k) % (N - 1));
          lane_lane[k] = 2'((l + k) % LANES);
        end
        #1 check_all();
        @(posedge clk);
      end
    // random selects, enables and out-of-range lane numbers
    for (int it = 0; it < 300; it++) begin
      randomize_src();
      lane_en = 3'($urandom);
      for (int k = 0; k < LANES; k++) begin
        lane_core[k] = CW'($urandom);
        lane_lane[k] = 2'($urandom);
      end
      #1 check_all();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
