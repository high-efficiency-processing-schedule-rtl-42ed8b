// tb_window_buffer: writes windows of random entries into alternating
// halves while reading the previous window back in reverse order from the
// other half, as the SISO decoder does, and checks every entry read.
module tb_window_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int DEPTH = 8;
  logic we, wsel, rsel;
  logic [2:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [2][DEPTH];
  int checks = 0, failures = 0;

  window_buffer #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (
    .clk, .we_i(we), .wsel_i(wsel), .waddr_i(waddr), .wdata_i(wdata),
    .rsel_i(rsel), .raddr_i(raddr), .rdata_o(rdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wsel = 0; rsel = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int w = 0; w < 40; w++) begin
      for (int c = 0; c < DEPTH; c++) begin
        @(negedge clk);
        we = 1; wsel = w[0]; waddr = 3'(c); wdata = 16'($urandom);
        rsel = ~w[0]; raddr = 3'(DEPTH - 1 - c);
        #1;
        if (w > 0) begin
          checks++;
          if (rdata !== model[rsel][raddr]) begin
            failures++;
            if (failures < 5) $display("window %0d entry %0d: %h expected %h", w, raddr, rdata, model[rsel][raddr]);
          end
        end
        @(posedge clk);
        model[wsel][waddr] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
