// tb_acs_radix16: checks the forward and the backward radix-2^4 ACS against
// a reference written from the encoder equations (feedback 1+D^2+D^3,
// parity 1+D+D^3): per stage, each new metric is the best of its two
// branches, then the largest metric is subtracted and the result is
// saturated to [-128, 0]. It also checks, on lowv values where no
// saturation occurs, that the forward result equals a direct search over
// all 16 four-stage paths into each state (the radix-16 view).
module tb_acs_radix16;
  import turbo_pkg::*;
  pmvec_t pm_i;
  bmset_t bm;
  pmset_t fo, bo;
  int checks = 0, failures = 0;

  acs_radix16 #(.BACKWARD(1'b0)) dut_f (.pm_i(pm_i), .bm_i(bm), .pm_o(fo));
  acs_radix16 #(.BACKWARD(1'b1)) dut_b (.pm_i(pm_i), .bm_i(bm), .pm_o(bo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder: state s = {a1,a2,a3}; returns next state and parity
  function automatic void enc(input int s, input int u, output int ns, output int z);
    int a1, a2, a3, a;
    a1 = (s >> 2) & 1; a2 = (s >> 1) & 1; a3 = s & 1;
    a  = u ^ a2 ^ a3;
    z  = a ^ a1 ^ a3;
    ns = a * 4 + a1 * 2 + a2;
  endfunction

  function automatic int gam(input int k, input int u, input int z);
    return int'(bm[k][u*2+z]);
  endfunction

  function automatic void norm(inout int v [8]);
    int mx;
    mx = v[0];
    for (int s = 1; s < 8; s++) if (v[s] > mx) mx = v[s];
    for (int s = 0; s < 8; s++) begin
      v[s] -= mx;
      if (v[s] < -128) v[s] = -128;
    end
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a [8], b [8];
      logic lowv;
      lowv = (n % 2) == 0;
      for (int s = 0; s < 8; s++) pm_i[s] = pm_t'(-int'($urandom_range(lowv ? 10 : 128)));
      for (int k = 0; k < NU; k++)
        for (int j = 0; j < 4; j++) bm[k][j] = bm_t'(int'($urandom_range(lowv ? 20 : 120)) - (lowv ? 10 : 60));
      #1;
      // forward reference
      for (int s = 0; s < 8; s++) a[s] = int'(pm_i[s]);
      for (int k = 0; k < NU; k++) begin
        int na [8];
        for (int s = 0; s < 8; s++) na[s] = -100000;
        for (int s = 0; s < 8; s++)
          for (int u = 0; u < 2; u++) begin
            int ns, z;
            enc(s, u, ns, z);
            if (a[s] + gam(k, u, z) > na[ns]) na[ns] = a[s] + gam(k, u, z);
          end
        norm(na);
        a = na;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (int'(fo[k][s]) != a[s]) begin
            failures++;
            if (failures < 5) $display("fwd stage %0d state %0d: %0d expected %0d", k, s, fo[k][s], a[s]);
          end
        end
      end
      // radix-16 view: best of 16 paths into each state, relative to the best state
      if (lowv) begin
        int best [8], mx;
        for (int s = 0; s < 8; s++) best[s] = -100000;
        for (int s0 = 0; s0 < 8; s0++)
          for (int us = 0; us < 16; us++) begin
            int s, m;
            s = s0; m = int'(pm_i[s0]);
            for (int k = 0; k < NU; k++) begin
              int ns, z, u;
              u = (us >> k) & 1;
              enc(s, u, ns, z);
              m += gam(k, u, z);
              s = ns;
            end
            if (m > best[s]) best[s] = m;
          end
        mx = best[0];
        for (int s = 1; s < 8; s++) if (best[s] > mx) mx = best[s];
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (int'(fo[NU-1][s]) != best[s] - mx) failures++;
        end
      end
      // backward reference
      for (int s = 0; s < 8; s++) b[s] = int'(pm_i[s]);
      for (int k = NU - 1; k >= 0; k--) begin
        int nb [8];
        for (int s = 0; s < 8; s++) begin
          nb[s] = -100000;
          for (int u = 0; u < 2; u++) begin
            int ns, z;
            enc(s, u, ns, z);
            if (b[ns] + gam(k, u, z) > nb[s]) nb[s] = b[ns] + gam(k, u, z);
          end
        end
        norm(nb);
        b = nb;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (int'(bo[k][s]) != b[s]) begin
            failures++;
            if (failures < 5) $display("bwd stage %0d state %0d: %0d expected %0d", k, s, bo[k][s], b[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
