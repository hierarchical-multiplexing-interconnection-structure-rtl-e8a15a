// hmi_l1_out_mux: Level#1 outgoing multiplexer of one core.
//
// Its inputs are the five streams the core's own stages produce, one per
// stage boundary. Each of its LANES output lanes carries one of them to all
// other cores, or is idle (valid low) when disabled. A stream is sent out
// when the stage that should consume it in this core is faulty.
//
// The interconnect drawing taps the L2 mux outputs; with that boundary's L2
// mux on its local input, which is the only setting in which a stream is sent
// out, the producer carries the same stream, and taking it there avoids a
// combinational loop through other cores. The per-lane boundary select and
// the enable are this design's own choices.
//
// Purely combinational.
module hmi_l1_out_mux
  import hmi_pkg::*;
(
  input  stream_t  bnd_in  [N_BND],   // local producers' streams, indexed by bnd_e
  input  out_sel_t sel     [LANES],
  output stream_t  lane_out[LANES]    // broadcast to every other core
);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      lane_out[k] = STREAM_IDLE;
      if (sel[k].en && (32'(sel[k].bnd) < N_BND))
        lane_out[k] = bnd_in[sel[k].bnd];
    end
  end

endmodule
