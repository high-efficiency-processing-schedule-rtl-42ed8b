// tb_qpp_param_check: sweeps odd f1 and even f2 over a grid and compares
// the flags with the constraints evaluated by integer arithmetic:
// Proposition 1 (L | f1-1, L | f2, (f1-1)/L = f2/L mod 2), its tail-biting
// variant (with f1+1), and the network/memory support condition. Also
// checks the published example pairs.
module tb_qpp_param_check;
  localparam int N = 4096, P = 32, L = 32;
  logic [11:0] f1, f2;
  logic sup, p1, p2, ovl;
  int checks = 0, failures = 0;

  qpp_param_check #(.N(N), .P(P), .L(L)) dut (.f1_i(f1), .f2_i(f2), .supported_o(sup),
    .prop1_o(p1), .prop2_o(p2), .overlap_ok_o(ovl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a1, input int a2);
    int e1, e2, es;
    f1 = 12'(a1); f2 = 12'(a2);
    #1;
    e1 = ((a1 - 1) % L == 0) && (a2 % L == 0) && ((((a1 - 1) / L) % 2) == ((a2 / L) % 2));
    e2 = ((a1 + 1) % L == 0) && (a2 % L == 0) && ((((a1 + 1) / L) % 2) == ((a2 / L) % 2));
    es = (a1 % 2 == 1) && (a2 % 2 == 0) && (a2 % 16 == 0) && ((a1 % P == 1) || (a1 % P == P - 1));
    checks++;
    if (p1 != e1[0] || p2 != e2[0] || sup != es[0] || ovl != (es[0] & (e1[0] | e2[0]))) begin
      failures++;
      if (failures < 5) $display("(%0d,%0d): p1 %0d p2 %0d sup %0d", a1, a2, p1, p2, sup);
    end
  endtask

  initial begin
    for (int a1 = 1; a1 < N; a1 += 2)
      for (int a2 = 0; a2 < 1024; a2 += 2) check(a1, a2);
    // published pairs: (449,384) and (2113,128) meet Proposition 1,
    // (191,128) the variant, (31,64) neither at L = 32
    check(449, 384); checks++; if (!(p1 && ovl)) failures++;
    check(2113, 128); checks++; if (!(p1 && ovl)) failures++;
    check(191, 128); checks++; if (!(p2 && !p1 && ovl)) failures++;
    check(31, 64); checks++; if (p1 || ovl || !sup) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
