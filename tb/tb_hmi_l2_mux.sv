// tb_hmi_l2_mux: self-checking test of the Level#2 multiplexer.
//
// Drives random streams on the local input and the three incoming lanes,
// walks the select through all four values many times and compares the output
// with the input the select names (select 0: local, select k: lane k-1).
// The mux is combinational, so each output is checked in the cycle its inputs
// change. A watchdog ends the run with a failure if it does not finish.
module tb_hmi_l2_mux;
  import hmi_pkg::*;

  logic    clk = 1'b0;
  stream_t local_in;
  stream_t lane_in [LANES];
  l2_sel_t sel;
  stream_t out;
  int      checks = 0, failures = 0;

  hmi_l2_mux dut (.local_in(local_in), .lane_in(lane_in), .sel(sel), .out(out));

  always #5 clk = ~clk;

  function automatic stream_t rnd_stream();
    stream_t s;
    s.valid = 1'($urandom);
    s.data  = {$urandom, $urandom};
    return s;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t expect_s;
    for (int it = 0; it < 400; it++) begin
      local_in = rnd_stream();
      for (int k = 0; k < LANES; k++) lane_in[k] = rnd_stream();
      sel = l2_sel_t'(it % L2_IN);
      #1;
      expect_s = (sel == 0) ? local_in : lane_in[sel - 1];
      checks++;
      if (out !== expect_s) begin
        failures++;
        $display("FAIL sel=%0d out=%h expected=%h", sel, out, expect_s);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
