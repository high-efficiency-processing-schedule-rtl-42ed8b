// tb_siso_decoder: one SISO decoder on a 128-symbol circular trellis (its
// boundary ports wired back to itself, so the sub-block is a whole
// tail-biting code word). The bench encodes random bits with its own
// tail-biting encoder, adds noise and weak sign errors to the systematic
// values, and feeds the windows in the order W0, W2, W1, W3, back to back,
// for four passes, with zero a-priori values. It checks:
//  * the first result appears TW + 3 = 11 clocks after the first input
//    (forward pass 8 clocks, then backward pass, input and LLR registers);
//  * results come back window by window, last clock of a window first;
//  * from the third pass on every decision equals the information bit
//    (the boundary metrics carried between passes make the circular
//    trellis converge);
//  * the extrinsic value never contradicts a clean parity-consistent bit
//    in the last pass with the wrong sign on more than a few positions.
module tb_siso_decoder;
  import turbo_pkg::*;
  localparam int M = 128, L = 32, TW = L / NU, NWIN = M / L;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clr, in_valid, a_we, b_we, out_valid;
  half_t in_type, a_ty, b_ty;
  logic [1:0] in_win;
  logic [2:0] in_step;
  symset_t in_sym;
  pmvec_t a_pm, b_pm;
  resset_t res;
  int checks = 0, failures = 0;

  siso_decoder #(.L(L), .M(M)) dut (
    .clk, .rst_n, .clr_i(clr), .in_valid_i(in_valid), .in_type_i(in_type), .in_win_i(in_win),
    .in_step_i(in_step), .in_sym_i(in_sym),
    .nb_alpha_we_i(a_we), .nb_alpha_type_i(a_ty), .nb_alpha_i(a_pm),
    .nb_beta_we_i(b_we), .nb_beta_type_i(b_ty), .nb_beta_i(b_pm),
    .alpha_out_we_o(a_we), .alpha_out_type_o(a_ty), .alpha_out_o(a_pm),
    .beta_out_we_o(b_we), .beta_out_type_o(b_ty), .beta_out_o(b_pm),
    .out_valid_o(out_valid), .out_res_o(res));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic u [M], z [M];
  ch_t ys [M], yp [M];
  int order [NWIN] = '{0, 2, 1, 3};
  int cyc = 0, first_in = -1, first_out = -1, nout = 0, bad_ext = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in = cyc;
    if (out_valid) begin
      int pass, slot, d, w, c;
      if (first_out < 0) first_out = cyc;
      pass = nout / (NWIN * TW);
      slot = (nout / TW) % NWIN;
      d = nout % TW;
      w = order[slot];
      c = TW - 1 - d;
      for (int k = 0; k < NU; k++) begin
        int i;
        i = w * L + c * NU + k;
        if (pass >= 2) begin
          checks++;
          if (res[k].dec !== u[i]) begin
            failures++;
            if (failures < 6) $display("pass %0d bit %0d: %0d expected %0d", pass, i, res[k].dec, u[i]);
          end
          if (pass == 3 && ((res[k].ext < 0) != u[i]) && res[k].ext != 0) bad_ext++;
        end
      end
      nout++;
    end
  end

  initial begin
    int s0;
    clr = 0; in_valid = 0; in_type = HALF_NAT; in_win = 0; in_step = 0; in_sym = '0;
    for (int i = 0; i < M; i++) u[i] = logic'($urandom_range(1));
    // circulation state: the start state that the block returns to
    s0 = -1;
    for (int s = 0; s < 8 && s0 < 0; s++) begin
      int r1, r2, r3;
      r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
      for (int i = 0; i < M; i++) begin
        int a;
        a = int'(u[i]) ^ r2 ^ r3; r3 = r2; r2 = r1; r1 = a;
      end
      if (r1 * 4 + r2 * 2 + r3 == s) s0 = s;
    end
    begin
      int r1, r2, r3;
      r1 = (s0 >> 2) & 1; r2 = (s0 >> 1) & 1; r3 = s0 & 1;
      for (int i = 0; i < M; i++) begin
        int a;
        a = int'(u[i]) ^ r2 ^ r3; z[i] = logic'(a ^ r1 ^ r3); r3 = r2; r2 = r1; r1 = a;
      end
    end
    for (int i = 0; i < M; i++) begin
      int v;
      v = (u[i] ? -8 : 8) + int'($urandom_range(6)) - 3;
      if (i % 23 == 5) v = u[i] ? 2 : -2;       // weak sign errors
      ys[i] = ch_t'(v);
      yp[i] = ch_t'((z[i] ? -8 : 8) + int'($urandom_range(6)) - 3);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    for (int pass = 0; pass < 4; pass++)
      for (int slot = 0; slot < NWIN; slot++)
        for (int c = 0; c < TW; c++) begin
          in_valid = 1; in_type = HALF_NAT; in_win = 2'(order[slot]); in_step = 3'(c);
          for (int k = 0; k < NU; k++) begin
            int i;
            i = order[slot] * L + c * NU + k;
            in_sym[k].sys = ys[i]; in_sym[k].par = yp[i]; in_sym[k].apr = '0;
          end
          @(negedge clk);
        end
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (first_out - first_in != TW + 3) begin
      failures++; $display("first output after %0d clocks, expected %0d", first_out - first_in, TW + 3);
    end
    checks++;
    if (nout != 4 * NWIN * TW) begin failures++; $display("%0d result clocks, expected %0d", nout, 4 * NWIN * TW); end
    checks++;
    if (bad_ext > 4) begin failures++; $display("%0d extrinsic values with the wrong sign", bad_ext); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
