// llr_unit: a-posteriori LLR, extrinsic value and hard decision of the four
// trellis stages that the backward recursion finishes in one clock.
//
// For stage k it takes alpha before the stage, beta after it and the branch
// metrics, and forms the max-log LLR
//     LLR = max_{u=0}(alpha(s) + gamma(s,u) + beta(s')) - max_{u=1}(...).
// A positive LLR favours bit 0, so the decision is LLR < 0. The extrinsic
// value is LLR - sys - apr, saturated to EXT_W bits, without a scaling
// factor.
// Timing: two register stages. Inputs sampled with valid_i at clock n give
// res_o with valid_o at clock n+2 (the first register holds the LLRs, the
// second the extrinsic values). Register stages, widths and the sign
// convention are this design's own choices.
module llr_unit
  import turbo_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid_i,
  input  pmset_t  alpha_i,   // alpha before stage k
  input  pmset_t  beta_i,    // beta after stage k
  input  bmset_t  bm_i,
  input  symset_t sym_i,
  output logic    valid_o,
  output resset_t res_o
);
  llr_t    llr_d [NU];
  llr_t    llr_q [NU];
  symset_t sym_q;
  logic v_q;

  function automatic llr_t stage_llr(input pmvec_t a, input pmvec_t b, input bmvec_t g);
    logic signed [15:0] m0, m1;
    m0 = -16'sd30000;
    m1 = -16'sd30000;
    for (int s = 0; s < NSTATES; s++) begin
      logic signed [15:0] c0, c1;
      c0 = sx_pm(a[s]) + sx_bm(g[{1'b0, parity_bit(3'(s), 1'b0)}]) + sx_pm(b[next_state(3'(s), 1'b0)]);
      c1 = sx_pm(a[s]) + sx_bm(g[{1'b1, parity_bit(3'(s), 1'b1)}]) + sx_pm(b[next_state(3'(s), 1'b1)]);
      m0 = (c0 > m0) ? c0 : m0;
      m1 = (c1 > m1) ? c1 : m1;
    end
    return llr_t'(m0 - m1);
  endfunction

  always_comb
    for (int k = 0; k < NU; k++) llr_d[k] = stage_llr(alpha_i[k], beta_i[k], bm_i[k]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      valid_o <= 1'b0;
      sym_q   <= '0;
      res_o   <= '0;
      for (int k = 0; k < NU; k++) llr_q[k] <= '0;
    end else begin
      v_q     <= valid_i;
      valid_o <= v_q;
      for (int k = 0; k < NU; k++) begin
        if (valid_i) begin
          llr_q[k] <= llr_d[k];
          sym_q[k] <= sym_i[k];
        end
        if (v_q) begin
          res_o[k].ext <= sat_ext(sx_llr(llr_q[k]) - sx_ch(sym_q[k].sys) - sx_ext(sym_q[k].apr));
          res_o[k].dec <= llr_q[k][LLR_W-1];
        end
      end
    end
  end
endmodule
