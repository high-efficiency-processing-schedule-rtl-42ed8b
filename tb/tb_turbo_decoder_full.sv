// tb_turbo_decoder_full: end-to-end test of the parallel turbo decoder at its
// default size (N = 4096, P = 32 decoders, window 32), top parameters left
// at their defaults. Same checks as the reduced-size bench.
//
// For each run the bench draws random information bits, encodes them with
// its own tail-biting model of the two constituent encoders and its own QPP
// interleaver, maps them to 5-bit channel LLRs with noise and a few weak
// sign errors, loads the block, decodes it and compares every decision
// with the information bits. It also
//  * checks the decoding time against the schedule: with four windows per
//    decoder 32 clocks per half-iteration when overlapping, 48 when not
//    (with two windows 24 and 32);
//  * keeps a scoreboard of the extrinsic memory: every read of a
//    half-iteration must see the value written by the previous one (no
//    read-before-write and no overwrite-before-read), which is what the
//    overlapping schedule must guarantee;
//  * counts the mechanisms: overlapped clocks (a read of one half-iteration
//    on the same clock as a write of the previous one), runs in each mode,
//    runs on the rotated sequence (variant parameters such as (191, 128),
//    whose odd windows map onto even ones), a refused overlap request, and
//    use of the reflecting network path.
module tb_turbo_decoder_full;
  import turbo_pkg::*;

  localparam int N  = 4096;
  localparam int P  = 32;
  localparam int L  = 32;
  localparam int M  = N / P;
  localparam int TW = L / NU;
  localparam int NW = M / L;
  localparam int NB = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NB-1:0] f1, f2;
  logic [3:0]    iters;
  logic          overlap_req, start, ld_we;
  logic [NB-1:0] ld_addr, rd_addr;
  ch_t           ld_sys, ld_par1, ld_par2;
  logic          supported, overlap_ok, overlap, rotated, busy, done, err, rd_dec;

  turbo_decoder_top dut (
    .clk, .rst_n, .f1_i(f1), .f2_i(f2), .iters_i(iters), .overlap_req_i(overlap_req),
    .supported_o(supported), .overlap_ok_o(overlap_ok), .overlap_o(overlap), .rotated_o(rotated),
    .busy_o(busy), .done_o(done), .err_o(err),
    .start_i(start), .ld_we_i(ld_we), .ld_addr_i(ld_addr), .ld_sys_i(ld_sys),
    .ld_par1_i(ld_par1), .ld_par2_i(ld_par2), .rd_addr_i(rd_addr), .rd_dec_o(rd_dec)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_overlap_runs = 0, n_normal_runs = 0, n_refused = 0, n_reflect = 0;
  int n_ovl_clocks = 0, n_sb_checks = 0, n_rot_runs = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int qpp(input int x, input int a1, input int a2);
    longint v;
    v = (longint'(a1) * x + longint'(a2) * x * x) % N;
    return int'(v);
  endfunction

  // ---------------- extrinsic memory scoreboard ----------------
  int ver [N];            // half-iteration that last wrote each address
  int rd_hi, wr_hi;       // half-iteration of the current read / write command
  int rd_typ, wr_typ;     // sequence type of the last read / write command
  int tb_rot;             // 1 when the run uses the rotated interleaved sequence
  int wq_hi   [4];
  logic wq_v  [4];
  int wq_addr [4][P*NU];

  function automatic void cmd_addrs(input logic typ, input int idx, input int a1, input int a2,
                                    output int a [P*NU]);
    for (int p = 0; p < P; p++)
      for (int k = 0; k < NU; k++) begin
        int x;
        x = p * M + idx + k;
        a[p*NU+k] = typ ? qpp((x + tb_rot) % N, a1, a2) : x;
      end
  endfunction

  always @(posedge clk) begin
    int ra [P*NU];
    int wa [P*NU];
    logic rd_now;
    // reads of the extrinsic memory at this edge: command of last clock
    rd_now = dut.cmd1.valid;
    // a half-iteration begins where the sequence type changes
    if (dut.cmd0.valid && int'(dut.cmd0.typ) != rd_typ) begin
      rd_hi  <= dut.cmd0.first ? 0 : rd_hi + 1;
      rd_typ <= int'(dut.cmd0.typ);
    end
    if (rd_now) begin
      cmd_addrs(dut.cmd1.typ, int'(dut.cmd1.win) * L + int'(dut.cmd1.step) * NU, int'(f1), int'(f2), ra);
      if (!dut.cmd1.first)
        for (int i = 0; i < P*NU; i++) begin
          n_sb_checks++;
          if (ver[ra[i]] != rd_hi - 1) begin
            failures++;
            if (failures < 10)
              $display("hazard: hi %0d reads addr %0d written by hi %0d", rd_hi, ra[i], ver[ra[i]]);
          end
        end
    end
    // writes at this edge: write command of three clocks ago
    if (wq_v[2]) begin
      for (int i = 0; i < P*NU; i++) ver[wq_addr[2][i]] = wq_hi[2];
      if (rd_now && rd_hi == wq_hi[2] + 1) n_ovl_clocks++;
    end
    // shift the write-command queue
    for (int j = 3; j > 0; j--) begin
      wq_v[j] <= wq_v[j-1]; wq_hi[j] <= wq_hi[j-1]; wq_addr[j] <= wq_addr[j-1];
    end
    wq_v[1] <= wq_v[0]; wq_hi[1] <= wq_hi[0]; wq_addr[1] <= wq_addr[0];
    wq_v[2] <= wq_v[1]; wq_hi[2] <= wq_hi[1]; wq_addr[2] <= wq_addr[1];
    wq_v[0] <= dut.wcmd.valid;
    if (dut.wcmd.valid) begin
      int h;
      h = wr_hi;
      if (int'(dut.wcmd.typ) != wr_typ) begin
        h = dut.wdly[12].first ? 0 : wr_hi + 1;
        wr_hi  <= h;
        wr_typ <= int'(dut.wcmd.typ);
      end
      cmd_addrs(dut.wcmd.typ, int'(dut.wcmd.win) * L + int'(dut.wcmd.step) * NU, int'(f1), int'(f2), wa);
      wq_addr[0] <= wa;
      wq_hi[0]   <= h;
    end
    if (dut.u_rd_addr.valid_o && (|dut.u_rd_addr.neg_o)) n_reflect++;
  end

  // ---------------- stimulus ----------------
  logic u  [N];
  logic ut [N];
  ch_t  ys [N], yp1 [N], yp2 [N];

  function automatic int circ_state(input logic b [N]);
    for (int s0 = 0; s0 < 8; s0++) begin
      int r1, r2, r3;
      r1 = (s0 >> 2) & 1; r2 = (s0 >> 1) & 1; r3 = s0 & 1;
      for (int i = 0; i < N; i++) begin
        int a;
        a = int'(b[i]) ^ r2 ^ r3;
        r3 = r2; r2 = r1; r1 = a;
      end
      if ((r1 * 4 + r2 * 2 + r3) == s0) return s0;
    end
    return -1;
  endfunction

  function automatic void encode(input logic b [N], output logic z [N]);
    int s0, r1, r2, r3;
    s0 = circ_state(b);
    r1 = (s0 >> 2) & 1; r2 = (s0 >> 1) & 1; r3 = s0 & 1;
    for (int i = 0; i < N; i++) begin
      int a;
      a = int'(b[i]) ^ r2 ^ r3;
      z[i] = logic'(a ^ r1 ^ r3);
      r3 = r2; r2 = r1; r1 = a;
    end
  endfunction

  function automatic ch_t chan(input logic bit_v, input int noisy);
    int v;
    v = (bit_v ? -8 : 8) + int'($urandom_range(8)) - 4;
    if (noisy != 0 && $urandom_range(99) < 3) v = bit_v ? 3 : -3;   // weak sign error
    if (v > 15) v = 15;
    if (v < -16) v = -16;
    return ch_t'(v);
  endfunction

  task automatic run(input int a1, input int a2, input logic ovl_req, input int it,
                     input logic expect_ovl, input int noisy);
    logic z1 [N], z2 [N];
    int t0, t_done, exp_cycles, errs;
    for (int i = 0; i < N; i++) u[i] = logic'($urandom_range(1));
    for (int i = 0; i < N; i++) ut[i] = u[qpp(i, a1, a2)];
    encode(u, z1);
    encode(ut, z2);
    for (int i = 0; i < N; i++) begin
      ys[i]  = chan(u[i], noisy);
      yp1[i] = chan(z1[i], noisy);
      yp2[i] = chan(z2[i], noisy);
    end
    f1 = NB'(a1); f2 = NB'(a2); iters = 4'(it); overlap_req = ovl_req;
    tb_rot = (expect_ovl && ((a1 + 1) % L == 0)) ? 1 : 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      ld_we = 1'b1; ld_addr = NB'(i); ld_sys = ys[i]; ld_par1 = yp1[i]; ld_par2 = yp2[i];
      @(negedge clk);
    end
    ld_we = 1'b0;
    checks++;
    if (!supported) begin failures++; $display("parameters (%0d,%0d) not supported", a1, a2); end
    start = 1'b1;
    @(negedge clk);
    t0 = cyc;
    start = 1'b0;
    while (!done) @(negedge clk);
    t_done = cyc;
    // schedule: a half-iteration issues NW*TW read clocks; the last result
    // is written 16 clocks after the last read; overlapping half-iterations
    // follow each other after max(NW*TW, NW*TW/2 + 16) clocks, normal ones
    // after NW*TW + 16
    exp_cycles = (expect_ovl ? ((NW * TW > NW * TW / 2 + 16) ? NW * TW : NW * TW / 2 + 16)
                             : NW * TW + 16) * (2 * it - 1) + NW * TW + 16;
    checks++;
    if (t_done - t0 != exp_cycles) begin
      failures++;
      $display("run (%0d,%0d) ovl=%0d: %0d clocks, expected %0d", a1, a2, ovl_req, t_done - t0, exp_cycles);
    end
    checks++;
    if (overlap !== expect_ovl) begin failures++; $display("schedule mode %0d, expected %0d", overlap, expect_ovl); end
    if (expect_ovl) n_overlap_runs++; else n_normal_runs++;
    if (ovl_req && !expect_ovl) n_refused++;
    // variant parameters (L divides f1 + 1) overlap on the rotated sequence
    checks++;
    if (rotated !== (expect_ovl && ((a1 + 1) % L == 0))) begin
      failures++; $display("rotation %0d unexpected", rotated);
    end
    if (rotated) n_rot_runs++;
    checks++;
    if (err) begin failures++; $display("bank conflict flagged"); end
    // read decisions
    errs = 0;
    for (int i = 0; i < N; i++) begin
      rd_addr = NB'(i);
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (rd_dec !== u[i]) errs++;
    end
    failures += errs;
    $display("run f=(%0d,%0d) overlap_req=%0d iters=%0d: %0d clocks, %0d bit errors",
             a1, a2, ovl_req, it, t_done - t0, errs);
  endtask

  initial begin
    f1 = '0; f2 = '0; iters = '0; overlap_req = 1'b0; start = 1'b0; ld_we = 1'b0;
    ld_addr = '0; rd_addr = '0; ld_sys = '0; ld_par1 = '0; ld_par2 = '0;
    for (int i = 0; i < N; i++) ver[i] = -1;
    rd_hi = 0; wr_hi = 0; rd_typ = -1; wr_typ = -1; tb_rot = 0;
    for (int j = 0; j < 4; j++) begin wq_v[j] = 1'b0; wq_hi[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Proposition-1 parameters: overlapping schedule
    run(449, 384, 1'b1, 8, 1'b1, 1);
    // same parameters, normal schedule
    run(2113 % N, 128, 1'b0, 8, 1'b0, 1);
    // standard-style parameters (31, 64): overlap requested but refused
    run(31, 64, 1'b1, 8, 1'b0, 1);
    // Proposition-1 parameters, overlapping, few iterations on clean data
    run(2113 % N, 128, 1'b1, 2, 1'b1, 0);
    // variant parameters: overlapping on the rotated sequence
    run(191, 128, 1'b1, 8, 1'b1, 1);
    // mechanisms
    checks += 7;
    if (n_rot_runs == 0)     begin failures++; $display("no rotated run"); end
    if (n_overlap_runs == 0) begin failures++; $display("no overlapping run"); end
    if (n_normal_runs == 0)  begin failures++; $display("no normal run"); end
    if (n_refused == 0)      begin failures++; $display("no refused overlap"); end
    if (n_reflect == 0)      begin failures++; $display("reflecting network path never used"); end
    if (n_ovl_clocks == 0)   begin failures++; $display("half-iterations never overlapped"); end
    if (n_sb_checks == 0)    begin failures++; $display("scoreboard never checked"); end
    $display("mechanisms: overlapping runs %0d (rotated %0d), normal runs %0d, refused overlap %0d, reflected accesses %0d, overlapped clocks %0d, scoreboard reads %0d",
             n_overlap_runs, n_rot_runs, n_normal_runs, n_refused, n_reflect, n_ovl_clocks, n_sb_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
