// tb_hmi_l1_out_mux: self-checking test of the Level#1 outgoing multiplexer.
//
// Random streams on the five boundary inputs; every output lane is walked
// through every boundary and through disabled and out-of-range selects. An
// enabled lane must carry the named boundary's stream; a disabled or
// out-of-range one must be idle (all zero). A watchdog ends the run with a
// failure if it does not finish.
module tb_hmi_l1_out_mux;
  import hmi_pkg::*;

  logic     clk = 1'b0;
  stream_t  bnd_in  [N_BND];
  out_sel_t sel     [LANES];
  stream_t  lane_out[LANES];
  int       checks = 0, failures = 0;

  hmi_l1_out_mux dut (.bnd_in(bnd_in), .sel(sel), .lane_out(lane_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int b = 0; b < N_BND; b++) begin
        bnd_in[b].valid = 1'b1;
        bnd_in[b].data  = {$urandom, 28'($urandom), 4'(b)};
      end
      for (int k = 0; k < LANES; k++) begin
        sel[k].en  = (it % 8) != 7;
        sel[k].bnd = bnd_e'((it + 2 * k) % 8);       // values 5..7 are out of range
      end
      #1;
      for (int k = 0; k < LANES; k++) begin
        stream_t e;
        e = (sel[k].en && int'(sel[k].bnd) < N_BND) ? bnd_in[sel[k].bnd] : '0;
        checks++;
        if (lane_out[k] !== e) begin
          failures++;
          $display("FAIL lane %0d en=%b bnd=%0d out=%h exp=%h", k, sel[k].en, sel[k].bnd, lane_out[k], e);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
