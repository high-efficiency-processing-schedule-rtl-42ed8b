// turbo_pkg: constants, types and trellis functions shared by the parallel
// turbo decoder.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of 3GPP LTE: feedback polynomial 1+D^2+D^3, feed-forward polynomial
// 1+D+D^3, decoded on a circular (tail-biting) trellis. A state is the
// 3-bit shift register {a(k-1), a(k-2), a(k-3)} with a(k-1) in bit 2.
//
// Numeric defaults follow the published design: block size 4096, 32 SISO
// decoders, window length 32, four trellis stages per clock (radix-2^4),
// 5-bit channel values and 8-bit path metrics. The extrinsic width (6 bits)
// and all internal widths below are this design's own choice.
package turbo_pkg;

  localparam int NSTATES = 8;          // trellis states
  localparam int NU      = 4;          // trellis stages per clock (radix-2^NU)
  localparam int CH_W    = 5;          // channel value width (signed)
  localparam int EXT_W   = 6;          // extrinsic value width (signed)
  localparam int PM_W    = 8;          // path metric width (signed, <= 0)
  localparam int BM_W    = 8;          // branch metric width (signed)
  localparam int LLR_W   = 11;         // a-posteriori LLR width (signed)

  typedef logic signed [CH_W-1:0]  ch_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [PM_W-1:0]  pm_t;
  typedef logic signed [BM_W-1:0]  bm_t;
  typedef logic signed [LLR_W-1:0] llr_t;

  // One vector of state metrics, indexed by state.
  typedef pm_t [NSTATES-1:0] pmvec_t;

  // Branch metrics of one trellis stage, indexed by {u, c}: u is the
  // information bit, c the parity bit of the branch.
  typedef bm_t [3:0] bmvec_t;

  // Sign-extend the narrow signed types to 16 bits for arithmetic.
  function automatic logic signed [15:0] sx_pm(input pm_t v);   return 16'(v); endfunction
  function automatic logic signed [15:0] sx_bm(input bm_t v);   return 16'(v); endfunction
  function automatic logic signed [15:0] sx_ch(input ch_t v);   return 16'(v); endfunction
  function automatic logic signed [15:0] sx_ext(input ext_t v); return 16'(v); endfunction
  function automatic logic signed [15:0] sx_llr(input llr_t v); return 16'(v); endfunction

  // Received values of one trellis stage as seen by a SISO decoder.
  typedef struct packed {
    ch_t  sys;   // systematic channel LLR (positive favours bit 0)
    ch_t  par;   // parity channel LLR
    ext_t apr;   // a-priori LLR (extrinsic of the other half-iteration)
  } sym_t;

  // Result of one trellis stage.
  typedef struct packed {
    ext_t ext;   // extrinsic LLR
    logic dec;   // hard decision
  } res_t;

  // Everything one clock of a radix-2^NU decoder carries, four stages wide.
  typedef pmvec_t [NU-1:0] pmset_t;
  typedef bmvec_t [NU-1:0] bmset_t;
  typedef sym_t   [NU-1:0] symset_t;
  typedef res_t   [NU-1:0] resset_t;

  // Half-iteration type: natural (first constituent code) or interleaved.
  typedef enum logic {HALF_NAT = 1'b0, HALF_INT = 1'b1} half_t;

  // Feedback bit of the encoder for input u; only a(k-2), a(k-3) (state
  // bits 1 and 0) are tapped.
  function automatic logic fb_bit(input logic [1:0] s, input logic u);
    return u ^ s[1] ^ s[0];
  endfunction

  // Next state after input u.
  function automatic logic [2:0] next_state(input logic [2:0] s, input logic u);
    return {fb_bit(s[1:0], u), s[2], s[1]};
  endfunction

  // Parity output for state s and input u.
  function automatic logic parity_bit(input logic [2:0] s, input logic u);
    return fb_bit(s[1:0], u) ^ s[2] ^ s[0];
  endfunction

  // Saturate a wide signed value to a path metric in [-2^(PM_W-1), 0].
  function automatic pm_t sat_pm(input logic signed [15:0] v);
    localparam logic signed [15:0] PMIN = -16'sd1 <<< (PM_W-1);
    return (v < PMIN) ? pm_t'(PMIN) : (v > 16'sd0) ? pm_t'(0) : pm_t'(v);
  endfunction

  // Saturate a wide signed value to the extrinsic width.
  function automatic ext_t sat_ext(input logic signed [15:0] v);
    localparam logic signed [15:0] EMAX = 16'((1 << (EXT_W-1)) - 1);
    return (v > EMAX) ? ext_t'(EMAX) : (v < -EMAX - 16'sd1) ? ext_t'(-EMAX - 16'sd1) : ext_t'(v);
  endfunction

endpackage
