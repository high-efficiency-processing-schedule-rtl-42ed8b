// branch_metric_unit: branch metrics of the four trellis stages a radix-2^4
// SISO decoder handles in one clock.
//
// For every stage k and every branch label {u, c} (information bit u,
// parity bit c) it forms
//     gamma = (u == 0 ? sys + apr : 0) + (c == 0 ? par : 0),
// which is the max-log branch metric up to a constant that is the same for
// all branches of a stage and so drops out of every comparison. A positive
// LLR favours bit 0. Purely combinational; the SISO decoder holds one unit
// for the forward (alpha) and one for the backward (beta) recursion.
// The form of the metric is this design's own choice; the published design
// only names the unit.
module branch_metric_unit
  import turbo_pkg::*;
(
  input  symset_t sym_i,   // received values of the four stages
  output bmset_t  bm_o     // branch metrics, bm_o[k][{u,c}]
);
  always_comb begin
    for (int k = 0; k < NU; k++) begin
      logic signed [15:0] su, pc;
      su = sx_ch(sym_i[k].sys) + sx_ext(sym_i[k].apr);
      pc = sx_ch(sym_i[k].par);
      bm_o[k][0] = bm_t'(su + pc);   // u=0, c=0
      bm_o[k][1] = bm_t'(su);        // u=0, c=1
      bm_o[k][2] = bm_t'(pc);        // u=1, c=0
      bm_o[k][3] = '0;               // u=1, c=1
    end
  end
endmodule
