// barrel_shift_net: interconnect between the P SISO decoders and the P
// memory banks.
//
// With the interleaver parameters this decoder accepts, the P parallel
// accesses of one clock always go to P different banks, and lane p's bank
// is (offset + s*p) mod P with s = +1 or -1. The network therefore needs
// only a rotation, plus a reflection when s = -1:
//     d_o[j] = d_i[(off_i + (neg_i ? -j : j)) mod P].
// The rotation is a log2(P)-stage barrel shifter; the reflection is a fixed
// re-wiring selected by neg_i. Combinational. The published design names a
// barrel-shift network; the reflection and the stage structure are this
// design's own.
module barrel_shift_net #(
  parameter int  P = 32,
  parameter type T = logic [7:0]
) (
  input  T                     d_i [P],
  input  logic [$clog2(P)-1:0] off_i,
  input  logic                 neg_i,
  output T                     d_o [P]
);
  localparam int S = $clog2(P);

  T stage [S+1][P];

  // stage[0] = d_i; stage n rotates by 2^(n-1) when that bit of off_i is set
  always_comb begin
    for (int j = 0; j < P; j++) stage[0][j] = d_i[j];
    for (int n = 0; n < S; n++)
      for (int j = 0; j < P; j++)
        stage[n+1][j] = off_i[n] ? stage[n][(j + (1 << n)) % P] : stage[n][j];
    for (int j = 0; j < P; j++)
      d_o[j] = neg_i ? stage[S][(P - j) % P] : stage[S][j];
  end
endmodule
