// qpp_param_check: decides from the interleaver parameters (f1, f2) which
// processing schedule the decoder may use.
//
// Overlapping half-iterations need every even window of the natural
// sequence to map onto an even window of the interleaved one. That holds
// (Proposition 1 of the underlying method) when
//     L | (f1 - 1),  L | f2,  (f1 - 1)/L = f2/L (mod 2),
// together with 2L | N, f1 odd and f2 even. The variant for a rotated,
// tail-biting sequence (L | (f1 + 1), L | f2, (f1 + 1)/L = f2/L mod 2) is
// reported as prop2_o; the decoder then rotates the interleaved sequence by
// one position and starts its half-iterations with the odd windows.
// supported_o tells whether the memory organisation and the barrel-shift
// network can serve the parameters at all: the QPP must be a permutation
// (f1 odd, f2 even for N a power of two), f2 must be a multiple of NU and of
// P/2, and f1 must be +1 or -1 mod P.
// overlap_ok_o = supported_o & (prop1_o | prop2_o).
// Combinational. L, N and P must be powers of two.
module qpp_param_check
  import turbo_pkg::*;
#(
  parameter int N = 4096,
  parameter int P = 32,
  parameter int L = 32
) (
  input  logic [$clog2(N)-1:0] f1_i,
  input  logic [$clog2(N)-1:0] f2_i,
  output logic                 supported_o,
  output logic                 prop1_o,
  output logic                 prop2_o,
  output logic                 overlap_ok_o
);
  localparam int NB = $clog2(N);
  localparam int LB = $clog2(L);
  localparam int PB = $clog2(P);
  localparam int F2ALIGN = (P / 2 > NU) ? P / 2 : NU;

  logic [NB-1:0] f1m, f1p;
  logic [PB-1:0] f1_modp;

  always_comb begin
    f1m = f1_i - NB'(1);
    f1p = f1_i + NB'(1);
    f1_modp = PB'(f1_i);
    prop1_o = (f1m[LB-1:0] == '0) && (f2_i[LB-1:0] == '0) && (f1m[LB] == f2_i[LB]);
    prop2_o = (f1p[LB-1:0] == '0) && (f2_i[LB-1:0] == '0) && (f1p[LB] == f2_i[LB]);
    supported_o = f1_i[0] && !f2_i[0]
               && ((f2_i % NB'(F2ALIGN)) == '0)
               && (f1_modp == PB'(1) || f1_modp == PB'(P-1))
               && ((N % (2 * L)) == 0);
    overlap_ok_o = supported_o && (prop1_o || prop2_o);
  end
endmodule
