// tb_branch_metric_unit: drives random received values into the branch
// metric unit and compares the four branch metrics of every stage with the
// max-log formula gamma(u,c) = [u=0](sys+apr) + [c=0]par.
module tb_branch_metric_unit;
  import turbo_pkg::*;
  symset_t sym;
  bmset_t  bm;
  int checks = 0, failures = 0;

  branch_metric_unit dut (.sym_i(sym), .bm_o(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < NU; k++) begin
        sym[k].sys = ch_t'($urandom_range(31));
        sym[k].par = ch_t'($urandom_range(31));
        sym[k].apr = ext_t'($urandom_range(63));
      end
      #1;
      for (int k = 0; k < NU; k++)
        for (int u = 0; u < 2; u++)
          for (int c = 0; c < 2; c++) begin
            int exp;
            exp = (u == 0 ? int'(sym[k].sys) + int'(sym[k].apr) : 0) + (c == 0 ? int'(sym[k].par) : 0);
            checks++;
            if (int'(bm[k][u*2+c]) != exp) begin
              failures++;
              if (failures < 5) $display("stage %0d u=%0d c=%0d: %0d expected %0d", k, u, c, bm[k][u*2+c], exp);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
