// tb_ram_1r1w: random simultaneous writes and reads against a model; the
// read data appears one clock after the address and shows the old word when
// the same word is written on that edge.
module tb_ram_1r1w;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re;
  logic [4:0] waddr, raddr;
  logic [10:0] wdata, rdata, exp_q;
  logic [10:0] model [32];
  logic exp_v;
  int checks = 0, failures = 0;

  ram_1r1w #(.W(11), .DEPTH(32)) dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                                      .re_i(re), .raddr_i(raddr), .rdata_o(rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; re = 0; raddr = 0; exp_v = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); waddr = 5'(i); wdata = 11'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; if (failures < 5) $display("read %h expected %h", rdata, exp_q); end
      end
      we = $urandom_range(1); waddr = 5'($urandom_range(31)); wdata = 11'($urandom);
      re = $urandom_range(3) != 0; raddr = ($urandom_range(3) == 0) ? waddr : 5'($urandom_range(31));
      exp_v = re; exp_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
