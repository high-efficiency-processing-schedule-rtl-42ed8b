// qpp_addr_gen: memory addresses of the NU = 4 trellis stages that every
// SISO decoder reads (or writes) in one clock.
//
// The block of N symbols is split into P sub-blocks of M = N/P symbols;
// decoder p works on indices p*M + i. Memory is organised as P banks (bank
// b holds natural addresses b*M .. b*M+M-1), each split into NU columns by
// address mod NU, so one column word holds one symbol. For the clock that
// handles sub-block indices i0 .. i0+NU-1 (i0 a multiple of NU):
//  * natural half-iteration: stage k of lane p lives in bank p, column k,
//    word i0/NU;
//  * interleaved half-iteration: stage k of lane p needs natural address
//    F(p*M + i0 + k), F(x) = f1*x + f2*x^2 mod N (QPP). Because the QPP
//    interleaver is contention free, F(p*M+x) mod M is the same for every
//    lane and its bank is (F(x) div M + c*p) mod P with c = (f1 + 2*f2*x)
//    mod P. The unit computes, for lane 0 only, column F mod NU, word
//    (F mod M) div NU, bank offset F div M and the sign of c (c = P-1 is
//    reported as neg_o; c must be +1 or -1, ok_o tells whether it is).
//    With rot_i = 1 the interleaved sequence is taken rotated by one
//    position (index i0 + k + 1), as the tail-biting variant schedule needs.
// N, M and P must be powers of two, so "mod" is truncation.
// Timing: one register stage; inputs with valid_i at clock n appear at the
// outputs with valid_o at clock n+1. The QPP formula is the published
// design's; the bank/column organisation is this design's own.
module qpp_addr_gen
  import turbo_pkg::*;
#(
  parameter int N = 4096,
  parameter int P = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              valid_i,
  input  half_t                             type_i,
  input  logic [$clog2(N/P)-1:0]            idx_i,   // i0, a multiple of NU
  input  logic                              rot_i,   // rotate interleaved sequence by one
  input  logic [$clog2(N)-1:0]              f1_i,
  input  logic [$clog2(N)-1:0]              f2_i,
  output logic                              valid_o,
  output logic [NU-1:0][$clog2(NU)-1:0]     col_o,
  output logic [NU-1:0][$clog2(N/P/NU)-1:0] word_o,
  output logic [NU-1:0][$clog2(P)-1:0]      bank_o,
  output logic [NU-1:0]                     neg_o,
  output logic                              ok_o
);
  localparam int NB = $clog2(N);
  localparam int MB = $clog2(N/P);
  localparam int PB = $clog2(P);
  localparam int KB = $clog2(NU);

  logic [NU-1:0][KB-1:0] col_d;
  logic [NU-1:0][MB-KB-1:0] word_d;
  logic [NU-1:0][PB-1:0] bank_d;
  logic [NU-1:0]         neg_d;
  logic                  ok_d;

  always_comb begin
    ok_d = 1'b1;
    for (int k = 0; k < NU; k++) begin
      logic [NB-1:0] x, xx, f;
      logic [PB-1:0] c;
      x  = NB'(idx_i) + NB'(k) + NB'(rot_i);
      xx = x * x;
      f  = f1_i * x + f2_i * xx;
      c  = PB'(f1_i) + PB'({f2_i, 1'b0} * x);
      if (type_i == HALF_NAT) begin
        col_d[k]  = KB'(k);
        word_d[k] = idx_i[MB-1:KB];
        bank_d[k] = '0;
        neg_d[k]  = 1'b0;
      end else begin
        col_d[k]  = f[KB-1:0];
        word_d[k] = f[MB-1:KB];
        bank_d[k] = f[NB-1:MB];
        neg_d[k]  = (P > 2) && (c == PB'(P-1));
        ok_d      = ok_d && (c == PB'(1) || c == PB'(P-1));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      col_o   <= '0;
      word_o  <= '0;
      bank_o  <= '0;
      neg_o   <= '0;
      ok_o    <= 1'b1;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        col_o  <= col_d;
        word_o <= word_d;
        bank_o <= bank_d;
        neg_o  <= neg_d;
        ok_o   <= ok_d;
      end
    end
  end
endmodule
