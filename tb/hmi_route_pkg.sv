// hmi_route_pkg: testbench-side route planner for the hierarchical
// multiplexing interconnect, playing the part of the configuration manager.
//
// A logical pipeline is given as the core that lends each of its four stages
// (fetch, decode, issue, execute/mem). For each of the five stage boundaries
// the planner finds the producing and the consuming core. The same core means
// the L2 mux passes the local stream. Different cores means the producer
// sends the stream on a free outgoing lane and the consumer picks it up on a
// free incoming lane, with its L2 mux set to that lane. More than three lanes
// in either direction on one core cannot be routed.
//
// Besides the mux settings it keeps, for every (core, boundary) consumer
// input, the core whose producer must appear there: the reference the
// testbenches compare against.
package hmi_route_pkg;
  import hmi_pkg::*;

  // producing and consuming stage of each boundary, stages 0 F, 1 D, 2 I, 3 E
  localparam int PROD_STAGE [N_BND] = '{3, 0, 1, 2, 3};
  localparam int CONS_STAGE [N_BND] = '{0, 1, 2, 3, 2};

  class hmi_router #(int unsigned N = 5);
    int l2_sel  [N][N_BND];
    bit in_en   [N][LANES];
    int in_core [N][LANES];   // relative index among the other cores
    int in_lane [N][LANES];
    bit out_en  [N][LANES];
    int out_bnd [N][LANES];
    int n_in    [N];
    int n_out   [N];
    int feeder  [N][N_BND];
    bit used    [N][N_BND];
    int n_pass, n_incoming, n_outgoing;

    function new();
      clear();
    endfunction

    function void clear();
      for (int c = 0; c < N; c++) begin
        n_in[c] = 0;
        n_out[c] = 0;
        for (int b = 0; b < N_BND; b++) begin
          l2_sel[c][b] = 0;
          feeder[c][b] = c;
          used[c][b]   = 0;
        end
        for (int k = 0; k < LANES; k++) begin
          in_en[c][k] = 0; in_core[c][k] = 0; in_lane[c][k] = 0;
          out_en[c][k] = 0; out_bnd[c][k] = 0;
        end
      end
      n_pass = 0; n_incoming = 0; n_outgoing = 0;
    endfunction

    static function int rel_index(int self, int other);
      return (other < self) ? other : other - 1;
    endfunction

    // stage_core[s]: core lending stage s. Returns 0 if a core runs out of lanes.
    function bit add_pipeline(int stage_core [4]);
      for (int b = 0; b < N_BND; b++) begin
        int src, dst, ko, ki;
        src = stage_core[PROD_STAGE[b]];
        dst = stage_core[CONS_STAGE[b]];
        used[dst][b] = 1;
        feeder[dst][b] = src;
        if (src == dst) begin
          l2_sel[dst][b] = 0;
          n_pass++;
        end else begin
          if (n_out[src] >= LANES || n_in[dst] >= LANES) return 0;
          ko = n_out[src]++;
          ki = n_in[dst]++;
          out_en[src][ko]  = 1;
          out_bnd[src][ko] = b;
          in_en[dst][ki]   = 1;
          in_core[dst][ki] = rel_index(dst, src);
          in_lane[dst][ki] = ko;
          l2_sel[dst][b]   = ki + 1;
          n_incoming++;
          n_outgoing++;
        end
      end
      return 1;
    endfunction

    // Forms logical pipelines from a fault map (dead[c][s] set for a faulty
    // stage s of core c). Cores with all four stages alive run their own
    // pipeline; the remaining alive stages are pooled as long as one of each
    // type is left, each pipeline built around the core with the most free
    // stages and completed from the lowest-numbered cores. Returns the number of pipelines, or
    // -1 when a core would need more than three lanes in one direction.
    function int build_from_faults(bit dead [N][4]);
      bit taken [N][4];
      int n_pipes;
      clear();
      n_pipes = 0;
      for (int c = 0; c < N; c++)
        for (int s = 0; s < 4; s++) taken[c][s] = dead[c][s];
      for (int c = 0; c < N; c++)
        if (!dead[c][0] && !dead[c][1] && !dead[c][2] && !dead[c][3]) begin
          int sc [4];
          for (int s = 0; s < 4; s++) begin sc[s] = c; taken[c][s] = 1; end
          void'(add_pipeline(sc));
          n_pipes++;
        end
      forever begin
        int sc [4];
        int anchor, best, cnt;
        bit ok;
        // anchor: the core with the most free alive stages
        anchor = -1;
        best = 0;
        for (int c = 0; c < N; c++) begin
          cnt = 0;
          for (int s = 0; s < 4; s++) cnt += int'(!taken[c][s]);
          if (cnt > best) begin best = cnt; anchor = c; end
        end
        if (anchor < 0) break;
        ok = 1;
        for (int s = 0; s < 4; s++) begin
          sc[s] = taken[anchor][s] ? -1 : anchor;
          for (int c = 0; c < N; c++)
            if (sc[s] < 0 && !taken[c][s]) sc[s] = c;
          if (sc[s] < 0) ok = 0;
        end
        if (!ok) break;
        for (int s = 0; s < 4; s++) taken[sc[s]][s] = 1;
        if (!add_pipeline(sc)) return -1;
        n_pipes++;
      end
      return n_pipes;
    endfunction
  endclass

endpackage
