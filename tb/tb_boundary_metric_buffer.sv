// tb_boundary_metric_buffer: random writes from the own and the neighbour
// port, a clear now and then, and reads of every entry compared with a
// model of the two-type, four-window store.
module tb_boundary_metric_buffer;
  import turbo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, we, nb_we;
  half_t wtype, nb_type, rtype;
  logic [1:0] widx, ridx;
  pmvec_t wdata, nb_data, rdata;
  pmvec_t model [2][4];
  int checks = 0, failures = 0;

  boundary_metric_buffer #(.NWIN(4), .NB_IDX(3)) dut (
    .clk, .rst_n, .clr_i(clr), .we_i(we), .wtype_i(wtype), .widx_i(widx), .wdata_i(wdata),
    .nb_we_i(nb_we), .nb_type_i(nb_type), .nb_data_i(nb_data),
    .rtype_i(rtype), .ridx_i(ridx), .rdata_o(rdata));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; we = 0; nb_we = 0; wtype = HALF_NAT; nb_type = HALF_NAT; rtype = HALF_NAT;
    widx = 0; ridx = 0; wdata = '0; nb_data = '0;
    for (int t = 0; t < 2; t++) for (int w = 0; w < 4; w++) model[t][w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clr = ($urandom_range(99) == 0);
      we = $urandom_range(1); wtype = half_t'($urandom_range(1)); widx = 2'($urandom_range(2));
      wdata = {$urandom, $urandom};
      nb_we = $urandom_range(1); nb_type = half_t'($urandom_range(1)); nb_data = {$urandom, $urandom};
      @(posedge clk);
      if (clr) begin
        for (int t = 0; t < 2; t++) for (int w = 0; w < 4; w++) model[t][w] = '0;
      end else begin
        if (we) model[wtype][widx] = wdata;
        if (nb_we) model[nb_type][3] = nb_data;
      end
      @(negedge clk);
      clr = 0; we = 0; nb_we = 0;
      for (int t = 0; t < 2; t++)
        for (int w = 0; w < 4; w++) begin
          rtype = half_t'(t); ridx = 2'(w);
          #1;
          checks++;
          if (rdata !== model[t][w]) begin
            failures++;
            if (failures < 5) $display("entry [%0d][%0d] wrong", t, w);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
