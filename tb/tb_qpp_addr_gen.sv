// tb_qpp_addr_gen: random sub-block positions and several interleaver
// parameter pairs. One clock after each request the bench rebuilds, for all
// 32 lanes and 4 stages, the natural address the unit's outputs point to
// (bank = offset +/- lane, column, word) and compares it with the address
// computed directly: p*M + i (natural) or F(p*M + i) = f1*x + f2*x^2 mod N,
// or F(p*M + i + 1) when the rotated interleaved sequence is requested.
module tb_qpp_addr_gen;
  import turbo_pkg::*;
  localparam int N = 4096, P = 32, M = N / P;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic valid_i, valid_o, ok, rot;
  half_t typ;
  logic [6:0] idx;
  logic [11:0] f1, f2;
  logic [NU-1:0][1:0] col;
  logic [NU-1:0][4:0] word, bank;
  logic [NU-1:0] neg;
  int checks = 0, failures = 0;

  qpp_addr_gen #(.N(N), .P(P)) dut (.clk, .rst_n, .valid_i, .type_i(typ), .idx_i(idx), .rot_i(rot),
    .f1_i(f1), .f2_i(f2), .valid_o, .col_o(col), .word_o(word), .bank_o(bank), .neg_o(neg), .ok_o(ok));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pf1 [4] = '{449, 2113, 31, 191};
  int pf2 [4] = '{384, 128, 64, 128};

  initial begin
    valid_i = 0; typ = HALF_NAT; idx = 0; f1 = 0; f2 = 0; rot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int sel, i0;
      logic t, r;
      sel = n % 4; t = $urandom_range(1); i0 = 4 * int'($urandom_range(M / 4 - 1));
      r = logic'($urandom_range(1));
      @(negedge clk);
      valid_i = 1; typ = half_t'(t); idx = 7'(i0); f1 = 12'(pf1[sel]); f2 = 12'(pf2[sel]); rot = r;
      @(negedge clk);
      valid_i = 0;
      checks++;
      if (!valid_o || !ok) begin failures++; $display("valid/ok missing"); end
      for (int p = 0; p < P; p++)
        for (int k = 0; k < NU; k++) begin
          int x, exp, b, got;
          x = p * M + i0 + k;
          if (t) begin
            x = (x + int'(r)) % N;
            exp = int'((longint'(pf1[sel]) * x + longint'(pf2[sel]) * x * x) % N);
          end else exp = x;
          b = neg[k] ? (int'(bank[k]) - p + P) % P : (int'(bank[k]) + p) % P;
          got = b * M + int'(word[k]) * NU + int'(col[k]);
          checks++;
          if (got != exp) begin
            failures++;
            if (failures < 5) $display("type %0d lane %0d x %0d: %0d expected %0d", t, p, x, got, exp);
          end
        end
    end
    // parameters the network cannot serve are flagged
    @(negedge clk);
    valid_i = 1; typ = HALF_INT; idx = 7'd4; f1 = 12'd3; f2 = 12'd64;
    @(negedge clk);
    valid_i = 0;
    checks++;
    if (ok) begin failures++; $display("unsupported f1 not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
