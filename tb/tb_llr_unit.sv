// tb_llr_unit: random metrics into the LLR unit; every result is compared,
// two clocks later, with a max-log LLR computed from the encoder equations:
// extrinsic = LLR - sys - apr saturated to 6 bits, decision = LLR < 0.
module tb_llr_unit;
  import turbo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic    valid_i, valid_o;
  pmset_t  al, be;
  bmset_t  bm;
  symset_t sym;
  resset_t res;
  int checks = 0, failures = 0;

  llr_unit dut (.clk, .rst_n, .valid_i, .alpha_i(al), .beta_i(be), .bm_i(bm), .sym_i(sym),
                .valid_o, .res_o(res));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void enc(input int s, input int u, output int ns, output int z);
    int a1, a2, a3, a;
    a1 = (s >> 2) & 1; a2 = (s >> 1) & 1; a3 = s & 1;
    a  = u ^ a2 ^ a3;
    z  = a ^ a1 ^ a3;
    ns = a * 4 + a1 * 2 + a2;
  endfunction

  int exp_ext [4096][NU];
  int exp_dec [4096][NU];
  int wp = 0, rp = 0;
  logic vq [3];

  always @(posedge clk) begin
    if (rst_n) begin
      vq[0] <= valid_i; vq[1] <= vq[0];
      if (valid_i) begin
        int e [NU], d [NU];
        for (int k = 0; k < NU; k++) begin
          int m0, m1, l, x;
          m0 = -100000; m1 = -100000;
          for (int s = 0; s < 8; s++)
            for (int u = 0; u < 2; u++) begin
              int ns, z, c;
              enc(s, u, ns, z);
              c = int'(al[k][s]) + int'(bm[k][u*2+z]) + int'(be[k][ns]);
              if (u == 0 && c > m0) m0 = c;
              if (u == 1 && c > m1) m1 = c;
            end
          l = m0 - m1;
          x = l - int'(sym[k].sys) - int'(sym[k].apr);
          if (x > 31) x = 31;
          if (x < -32) x = -32;
          e[k] = x; d[k] = (l < 0);
        end
        for (int k = 0; k < NU; k++) begin exp_ext[wp][k] = e[k]; exp_dec[wp][k] = d[k]; end
        wp++;
      end
      checks++;
      if (valid_o != vq[1]) begin failures++; $display("valid latency wrong"); end
      if (valid_o) begin
        for (int k = 0; k < NU; k++) begin
          checks++;
          if (int'(res[k].ext) != exp_ext[rp][k] || int'(res[k].dec) != exp_dec[rp][k]) begin
            failures++;
            if (failures < 5) $display("stage %0d: ext %0d dec %0d, expected %0d %0d", k, res[k].ext, res[k].dec, exp_ext[rp][k], exp_dec[rp][k]);
          end
        end
        rp++;
      end
    end
  end

  initial begin
    vq[0] = 0; vq[1] = 0;
    valid_i = 0; al = '0; be = '0; bm = '0; sym = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      valid_i = ($urandom_range(3) != 0);
      for (int k = 0; k < NU; k++) begin
        for (int s = 0; s < 8; s++) begin
          al[k][s] = pm_t'(-int'($urandom_range(n % 3 == 0 ? 128 : 20)));
          be[k][s] = pm_t'(-int'($urandom_range(n % 3 == 0 ? 128 : 20)));
        end
        for (int j = 0; j < 4; j++) bm[k][j] = bm_t'(int'($urandom_range(60)) - 30);
        sym[k].sys = ch_t'($urandom_range(31));
        sym[k].par = ch_t'($urandom_range(31));
        sym[k].apr = ext_t'($urandom_range(63));
      end
    end
    @(negedge clk); valid_i = 0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
