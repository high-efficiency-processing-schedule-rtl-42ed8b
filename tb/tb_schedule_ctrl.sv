// tb_schedule_ctrl: runs the controller in both modes and checks the whole
// command stream against the schedule: window order W0, W2, W1, W3, eight
// clocks per window with steps 0..7, alternating half-iteration types, the
// first-half-iteration flag, back-to-back half-iterations when overlapping,
// a 16-clock gap otherwise, and done 16 clocks after the last command.
// A second controller with two windows per sub-block checks the two-window
// overlapping schedule: order W0, W1 and an 8-clock wait between
// half-iterations (24-clock period) even when overlapping.
// Rotated runs (rot_i) must take the interleaved half-iterations in the
// order W1, W3, W0, W2 (W1, W0 with two windows), and only when overlapping.
module tb_schedule_ctrl;
  import turbo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, start2, ovl, rot, clr4, cv4, cfirst4, busy4, done4;
  logic clr2, cv2, cfirst2, busy2, done2;
  logic clr, cv, cfirst, busy, done;
  logic [3:0] iters;
  half_t ctype, ctype4, ctype2;
  logic [1:0] cwin, cwin4;
  logic       cwin2;
  logic [2:0] cstep, cstep4, cstep2;
  int nwin;
  int checks = 0, failures = 0;

  schedule_ctrl dut (.clk, .rst_n, .start_i(start), .overlap_i(ovl), .rot_i(rot), .iters_i(iters),
    .clr_o(clr4), .cmd_valid_o(cv4), .cmd_type_o(ctype4), .cmd_win_o(cwin4), .cmd_step_o(cstep4),
    .cmd_first_o(cfirst4), .busy_o(busy4), .done_o(done4));

  schedule_ctrl #(.NWIN(2)) dut2 (.clk, .rst_n, .start_i(start2), .overlap_i(ovl), .rot_i(rot), .iters_i(iters),
    .clr_o(clr2), .cmd_valid_o(cv2), .cmd_type_o(ctype2), .cmd_win_o(cwin2), .cmd_step_o(cstep2),
    .cmd_first_o(cfirst2), .busy_o(busy2), .done_o(done2));

  // the controller under test in the current run
  always_comb begin
    if (nwin == 2) begin
      clr = clr2; cv = cv2; ctype = ctype2; cwin = {1'b0, cwin2}; cstep = cstep2;
      cfirst = cfirst2; busy = busy2; done = done2;
    end else begin
      clr = clr4; cv = cv4; ctype = ctype4; cwin = cwin4; cstep = cstep4;
      cfirst = cfirst4; busy = busy4; done = done4;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nw windows of 8 clocks per half-iteration; the drain after the last
  // command is always 16 clocks; an overlapping half-iteration lasts
  // max(8*nw, 4*nw + 16) clocks, a normal one 8*nw + 16.
  task automatic run(input int nw, input logic o, input int it, input logic r = 1'b0);
    int order4 [4] = '{0, 2, 1, 3};
    int period, cmds, ew;
    nwin = nw;
    cmds = 8 * nw;
    @(negedge clk);
    if (nw == 2) start2 = 1; else start = 1;
    ovl = o; rot = r; iters = 4'(it);
    @(negedge clk);
    start = 0; start2 = 0;
    checks++; if (!clr || !busy) begin failures++; $display("clear/busy missing"); end
    period = o ? ((cmds > 4 * nw + 16) ? cmds : 4 * nw + 16) : cmds + 16;
    // walk 2*it half-iterations; each slot of the period is a command or idle
    for (int h = 0; h < 2 * it; h++)
      for (int c = 0; c < ((h == 2 * it - 1) ? cmds + 16 : period); c++) begin
        @(negedge clk);
        if (h == 2 * it - 1 && c >= cmds) begin
          checks++;
          if (cv || (done != (c == cmds + 15))) begin failures++; $display("drain wrong at %0d", c); end
        end else if (c < cmds) begin
          checks++;
          ew = (nw == 2) ? c / 8 : order4[c / 8];
          if (r && o && h % 2 == 1) ew = ew ^ 1;
          if (!cv || int'(cwin) != ew || int'(cstep) != c % 8
              || ctype != half_t'(h % 2) || cfirst != (h == 0)) begin
            failures++;
            if (failures < 5) $display("nw %0d hi %0d clk %0d: v %0d win %0d step %0d", nw, h, c, cv, cwin, cstep);
          end
        end else begin
          checks++;
          if (cv) begin failures++; $display("command in gap"); end
        end
      end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    start = 0; start2 = 0; ovl = 0; rot = 0; iters = 0; nwin = 4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(4, 1'b1, 8);
    run(4, 1'b0, 8);
    run(4, 1'b1, 1);
    run(4, 1'b0, 3);
    run(2, 1'b1, 8);
    run(2, 1'b0, 4);
    run(2, 1'b1, 1);
    run(4, 1'b1, 4, 1'b1);
    run(4, 1'b0, 2, 1'b1);
    run(2, 1'b1, 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
