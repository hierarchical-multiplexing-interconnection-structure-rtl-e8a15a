// tb_hmi_cmp_scale: the interconnect at the other system sizes evaluated for
// this structure, 10, 20 and 30 cores, each driven through a run of random
// stage-fault maps by hmi_cmp_scale_run. Every size must route at least one
// cross-core stream and pass all stream checks. A watchdog ends the run with
// a failure if it does not finish.
module tb_hmi_cmp_scale;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done10, done20, done30;
  int   c10, c20, c30, f10, f20, f30, r10, r20, r30, p10, p20, p30;
  int   checks = 0, failures = 0;

  hmi_cmp_scale_run #(.N_CORES(10), .TRIALS(20)) u10 (.clk(clk), .done(done10), .checks(c10), .failures(f10), .routed(r10), .pipelines(p10));
  hmi_cmp_scale_run #(.N_CORES(20), .TRIALS(15)) u20 (.clk(clk), .done(done20), .checks(c20), .failures(f20), .routed(r20), .pipelines(p20));
  hmi_cmp_scale_run #(.N_CORES(30), .TRIALS(10)) u30 (.clk(clk), .done(done30), .checks(c30), .failures(f30), .routed(r30), .pipelines(p30));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done10 && done20 && done30);
    #1;
    $display("10 cores: %0d pipelines, %0d cross-core streams; 20 cores: %0d, %0d; 30 cores: %0d, %0d",
             p10, r10, p20, r20, p30, r30);
    checks   = c10 + c20 + c30 + 3;
    failures = f10 + f20 + f30;
    if (r10 == 0) failures++;
    if (r20 == 0) failures++;
    if (r30 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
