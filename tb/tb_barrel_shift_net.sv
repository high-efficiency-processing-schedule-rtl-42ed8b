// tb_barrel_shift_net: for every offset and both directions, random lane
// data through a 32-lane network; lane j must receive input
// (off + j) mod 32, or (off - j) mod 32 when reflecting.
module tb_barrel_shift_net;
  localparam int P = 32;
  logic [7:0] din [P], dout [P];
  logic [4:0] off;
  logic neg;
  int checks = 0, failures = 0;

  barrel_shift_net #(.P(P), .T(logic [7:0])) dut (.d_i(din), .off_i(off), .neg_i(neg), .d_o(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++)
      for (int o = 0; o < P; o++)
        for (int g = 0; g < 2; g++) begin
          for (int j = 0; j < P; j++) din[j] = 8'($urandom);
          off = 5'(o); neg = g[0];
          #1;
          for (int j = 0; j < P; j++) begin
            int src;
            src = g ? ((o - j) % P + P) % P : (o + j) % P;
            checks++;
            if (dout[j] !== din[src]) begin
              failures++;
              if (failures < 5) $display("off %0d neg %0d lane %0d wrong", o, g, j);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
