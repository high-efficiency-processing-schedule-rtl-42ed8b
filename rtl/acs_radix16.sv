// acs_radix16: radix-2^4 add-compare-select unit of the max-log-MAP SISO
// decoder. It advances the eight state metrics over four trellis stages in
// one clock, forward (alpha) or backward (beta).
//
// The four stages are evaluated as four chained radix-2 max-log steps; in
// max-log arithmetic this selects the same best path as one 16-way compare
// per state. After every step the largest metric is subtracted and the
// result saturated to [-128, 0], so all metrics stay in PM_W = 8 bits.
// The unit also returns the metric vector at every intermediate stage
// boundary, which the LLR unit needs.
//
// Forward  (BACKWARD = 0): pm_i = alpha before stage 0,
//   pm_o[k] = alpha after stage k.
// Backward (BACKWARD = 1): pm_i = beta after stage 3,
//   pm_o[k] = beta before stage k.
// Purely combinational. The chaining and the normalisation are this
// design's own choices; the published design names the unit only.
module acs_radix16
  import turbo_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  pmvec_t pm_i,
  input  bmset_t bm_i,
  output pmset_t pm_o
);
  function automatic pmvec_t normalise(input logic signed [15:0] v [NSTATES]);
    logic signed [15:0] mx;
    pmvec_t r;
    mx = v[0];
    for (int s = 1; s < NSTATES; s++) mx = (v[s] > mx) ? v[s] : mx;
    for (int s = 0; s < NSTATES; s++) r[s] = sat_pm(v[s] - mx);
    return r;
  endfunction

  function automatic pmvec_t fwd_step(input pmvec_t a, input bmvec_t g);
    logic signed [15:0] v [NSTATES];
    for (int t = 0; t < NSTATES; t++) begin
      v[t] = -16'sd30000;
      for (int s = 0; s < NSTATES; s++)
        for (int u = 0; u < 2; u++) begin
          logic signed [15:0] cand;
          cand = sx_pm(a[s]) + sx_bm(g[{u[0], parity_bit(3'(s), u[0])}]);
          v[t] = (next_state(3'(s), u[0]) == 3'(t) && cand > v[t]) ? cand : v[t];
        end
    end
    return normalise(v);
  endfunction

  function automatic pmvec_t bwd_step(input pmvec_t b, input bmvec_t g);
    logic signed [15:0] v [NSTATES];
    for (int s = 0; s < NSTATES; s++) begin
      logic signed [15:0] c0, c1;
      c0 = sx_pm(b[next_state(3'(s), 1'b0)]) + sx_bm(g[{1'b0, parity_bit(3'(s), 1'b0)}]);
      c1 = sx_pm(b[next_state(3'(s), 1'b1)]) + sx_bm(g[{1'b1, parity_bit(3'(s), 1'b1)}]);
      v[s] = (c0 > c1) ? c0 : c1;
    end
    return normalise(v);
  endfunction

  always_comb begin
    pmvec_t cur;
    pm_o = '0;
    cur  = pm_i;
    if (!BACKWARD) begin
      for (int k = 0; k < NU; k++) begin
        cur     = fwd_step(cur, bm_i[k]);
        pm_o[k] = cur;
      end
    end else begin
      for (int k = NU-1; k >= 0; k--) begin
        cur     = bwd_step(cur, bm_i[k]);
        pm_o[k] = cur;
      end
    end
  end
endmodule
