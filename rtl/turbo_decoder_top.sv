// turbo_decoder_top: parallel turbo decoder for a rate-1/3 turbo code with
// a QPP interleaver, P radix-2^4 SISO decoders working in lock step.
//
// A block of N systematic/parity triples is loaded through the ld_* port,
// then start_i decodes it for iters_i full iterations (two half-iterations
// each, alternately on the natural and on the QPP-interleaved sequence) and
// done_o pulses when every decision is stored; decisions are then read
// through rd_addr_i / rd_dec_o (two clocks of latency).
//
// Data path of one half-iteration: schedule_ctrl issues one read command
// per clock (window, clock within window); qpp_addr_gen turns it into bank,
// column and word addresses; the systematic values and the extrinsic values
// of the previous half-iteration are read from P x NU memory columns and
// routed to the decoders through NU barrel-shift networks, the parity values
// straight from each decoder's own bank; the extrinsic results come back
// later and go through a second address generator and NU more networks into
// the extrinsic memory (stored in natural order; the decision of the last
// half-iteration is stored with them). The write address is the read
// command delayed by 13 clocks with its clock-within-window mirrored
// (TW-1-step), because the backward pass returns a window in reverse.
//
// Latencies, in clocks after a read command: 4 until the forward recursion
// (memory and network registers), 10 more to the first LLR output, 2 more
// (two write registers) until it is in memory. With the window order
// W0, W2, W1, W3 and Proposition-1 interleaver parameters, the
// half-iterations may overlap (overlap_req_i = 1), giving one half-
// iteration per 32 clocks (all units busy); otherwise a half-iteration
// takes 48 clocks. With two windows per decoder (N/P = 2L) the figures are
// 24 and 32. overlap_o shows which schedule the last start used.
// Parameters of the tail-biting variant (L | f1+1, Proposition 2) map even
// windows onto odd ones once the interleaved sequence is rotated by one
// position: the decoder then reads interleaved index i+1 where it would
// read i, takes the interleaved windows in the order W1, W3, W0, W2, and
// stores the second parity one address lower while loading, so that it is
// still read from the decoder's own bank (rotated_o). (f1, f2) and
// overlap_req_i must therefore be set before the block is loaded.
// The in-step assertion is disabled during reset, so lint tools see rst_n
// used both as an asynchronous reset and in a clocked expression.
//
// Memory organisation, address generation and host ports are this design's
// own; the number of decoders, radix, window length, widths, window order,
// the two schedules and the rotation for the variant parameters follow the
// published design.
module turbo_decoder_top
  import turbo_pkg::*;
#(
  parameter int N = 4096,     // block size (power of two)
  parameter int P = 32,       // SISO decoders = memory banks
  parameter int L = 32        // window length
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic [$clog2(N)-1:0] f1_i,
  input  logic [$clog2(N)-1:0] f2_i,
  input  logic [3:0]           iters_i,
  input  logic                 overlap_req_i,
  // status
  output logic                 supported_o,   // (f1, f2) can be decoded
  output logic                 overlap_ok_o,  // (f1, f2) allow overlapping
  output logic                 overlap_o,     // schedule of the last start
  output logic                 rotated_o,     // last start used the rotated variant
  output logic                 busy_o,
  output logic                 done_o,
  output logic                 err_o,         // bank conflict seen (sticky)
  // block loading (while idle); par2 is indexed by interleaved position
  input  logic                 start_i,
  input  logic                 ld_we_i,
  input  logic [$clog2(N)-1:0] ld_addr_i,
  input  ch_t                  ld_sys_i,
  input  ch_t                  ld_par1_i,
  input  ch_t                  ld_par2_i,
  // decision read-out (while idle), data two clocks after the address
  input  logic [$clog2(N)-1:0] rd_addr_i,
  output logic                 rd_dec_o
);
  localparam int M    = N / P;
  localparam int NWIN = M / L;
  localparam int TW   = L / NU;
  localparam int MW   = M / NU;           // words per memory column
  localparam int NB   = $clog2(N);
  localparam int MB   = $clog2(M);
  localparam int PB   = $clog2(P);
  localparam int KB   = $clog2(NU);
  localparam int WB   = $clog2(NWIN);
  localparam int SB   = $clog2(TW);
  localparam int AW   = $clog2(MW);
  localparam int D_A  = 4;                // read command -> forward ACS
  localparam int WCMD_DLY = 13;           // read command -> write command

  typedef logic [CH_W+EXT_W-1:0] rdnet_t; // {sys, ext}
  typedef struct packed {
    ext_t ext;
    logic dec;
  } wrnet_t;

  // ---------------- parameter check and schedule ----------------
  logic start_ok;
  logic prop2, rot_cfg;

  qpp_param_check #(.N(N), .P(P), .L(L)) u_check (
    .f1_i, .f2_i, .supported_o, .prop1_o(), .prop2_o(prop2), .overlap_ok_o
  );

  assign start_ok = start_i && supported_o && !busy_o;
  // the variant (Proposition-2) parameters overlap on the rotated sequence;
  // the configuration also decides where par2 is stored while loading
  assign rot_cfg  = overlap_req_i && overlap_ok_o && prop2;

  logic          clr;
  logic          cmd_valid, cmd_first;
  half_t         cmd_type;
  logic [WB-1:0] cmd_win;
  logic [SB-1:0] cmd_step;

  schedule_ctrl #(.NWIN(NWIN), .TW(TW), .D_A(D_A), .LLR_LAT(2), .WR_LAT(2)) u_ctrl (
    .clk, .rst_n,
    .start_i     (start_ok),
    .overlap_i   (overlap_req_i && overlap_ok_o),
    .rot_i       (rot_cfg),
    .iters_i,
    .clr_o       (clr),
    .cmd_valid_o (cmd_valid),
    .cmd_type_o  (cmd_type),
    .cmd_win_o   (cmd_win),
    .cmd_step_o  (cmd_step),
    .cmd_first_o (cmd_first),
    .busy_o,
    .done_o
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overlap_o <= 1'b0;
      rotated_o <= 1'b0;
    end else if (start_ok) begin
      overlap_o <= overlap_req_i && overlap_ok_o;
      rotated_o <= rot_cfg;
    end
  end

  // ---------------- read address generation (clock t+1) ----------------
  typedef struct packed {
    logic          valid;
    half_t         typ;
    logic [WB-1:0] win;
    logic [SB-1:0] step;
    logic          first;
  } cmd_t;

  cmd_t cmd0, cmd1, cmd2;
  assign cmd0 = '{valid: cmd_valid, typ: cmd_type, win: cmd_win, step: cmd_step, first: cmd_first};

  function automatic logic [MB-1:0] idx_of(input logic [WB-1:0] win, input logic [SB-1:0] step);
    return MB'(int'(win) * L + int'(step) * NU);
  endfunction

  logic                   ra_valid, ra_ok;
  logic [NU-1:0][KB-1:0]  ra_col;
  logic [NU-1:0][AW-1:0]  ra_word;
  logic [NU-1:0][PB-1:0]  ra_bank;
  logic [NU-1:0]          ra_neg;

  // write-side addresses (generated further down, also checked for routing errors)
  logic                  wa_valid, wa_ok;
  logic [NU-1:0][KB-1:0] wa_col;
  logic [NU-1:0][AW-1:0] wa_word;
  logic [NU-1:0][PB-1:0] wa_bank;
  logic [NU-1:0]         wa_neg;

  qpp_addr_gen #(.N(N), .P(P)) u_rd_addr (
    .clk, .rst_n,
    .valid_i (cmd0.valid), .type_i(cmd0.typ), .idx_i(idx_of(cmd0.win, cmd0.step)), .rot_i(rotated_o),
    .f1_i, .f2_i,
    .valid_o (ra_valid), .col_o(ra_col), .word_o(ra_word), .bank_o(ra_bank),
    .neg_o   (ra_neg), .ok_o(ra_ok)
  );

  // ---------------- memories ----------------
  logic [AW-1:0]   col_raddr [NU];     // sys / extrinsic column read words
  logic [AW-1:0]   par_raddr;
  ch_t             sys_q   [P][NU];
  ch_t             par1_q  [P][NU];
  ch_t             par2_q  [P][NU];
  logic [NB-1:0]   ld2_addr;            // par2 store address (rotated variant: one lower)
  wrnet_t          ed_q    [P][NU];

  // write port of the extrinsic memory (second write register)
  logic            w2_valid;
  logic [AW-1:0]   w2_word [NU];
  wrnet_t          w2_data [P][NU];

  // host read-out address split
  logic [PB-1:0]   rd_bank, rd_bank_q;
  logic [KB-1:0]   rd_col, rd_col_q;
  assign rd_bank = rd_addr_i[NB-1:MB];
  assign rd_col  = rd_addr_i[KB-1:0];

  assign ld2_addr = ld_addr_i - NB'(rot_cfg);

  always_comb begin
    par_raddr = idx_of(cmd1.win, cmd1.step) [MB-1:KB];
    for (int m = 0; m < NU; m++) begin
      col_raddr[m] = rd_addr_i[MB-1:KB];
      if (busy_o)
        for (int k = 0; k < NU; k++)
          if (ra_col[k] == KB'(m)) col_raddr[m] = ra_word[k];
    end
  end

  for (genvar b = 0; b < P; b++) begin : g_bank
    for (genvar m = 0; m < NU; m++) begin : g_col
      logic ld_here, ld2_here;
      assign ld_here  = ld_we_i && !busy_o
                     && ld_addr_i[NB-1:MB] == PB'(b) && ld_addr_i[KB-1:0] == KB'(m);
      assign ld2_here = ld_we_i && !busy_o
                     && ld2_addr[NB-1:MB] == PB'(b) && ld2_addr[KB-1:0] == KB'(m);

      ram_1r1w #(.W(CH_W), .DEPTH(MW)) u_sys (
        .clk, .we_i(ld_here), .waddr_i(ld_addr_i[MB-1:KB]), .wdata_i(ld_sys_i),
        .re_i(1'b1), .raddr_i(col_raddr[m]), .rdata_o(sys_q[b][m])
      );
      ram_1r1w #(.W(CH_W), .DEPTH(MW)) u_par1 (
        .clk, .we_i(ld_here), .waddr_i(ld_addr_i[MB-1:KB]), .wdata_i(ld_par1_i),
        .re_i(ra_valid), .raddr_i(par_raddr), .rdata_o(par1_q[b][m])
      );
      ram_1r1w #(.W(CH_W), .DEPTH(MW)) u_par2 (
        .clk, .we_i(ld2_here), .waddr_i(ld2_addr[MB-1:KB]), .wdata_i(ld_par2_i),
        .re_i(ra_valid), .raddr_i(par_raddr), .rdata_o(par2_q[b][m])
      );
      ram_1r1w #(.W(EXT_W+1), .DEPTH(MW)) u_ext (
        .clk, .we_i(w2_valid), .waddr_i(w2_word[m]), .wdata_i(w2_data[b][m]),
        .re_i(1'b1), .raddr_i(col_raddr[m]), .rdata_o(ed_q[b][m])
      );
    end
  end

  // host read-out: select bank and column one clock after the RAM read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank_q <= '0;
      rd_col_q  <= '0;
      rd_dec_o  <= 1'b0;
    end else begin
      rd_bank_q <= rd_bank;
      rd_col_q  <= rd_col;
      rd_dec_o  <= ed_q[rd_bank_q][rd_col_q].dec;
    end
  end

  // ---------------- read network (clock t+2 -> register t+3) ----------------
  logic [NU-1:0][KB-1:0] r2_col;
  logic [NU-1:0][PB-1:0] r2_bank;
  logic [NU-1:0]         r2_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd1 <= '0; cmd2 <= '0;
      r2_col <= '0; r2_bank <= '0; r2_neg <= '0;
      err_o <= 1'b0;
    end else begin
      cmd1    <= cmd0;
      cmd2    <= cmd1;
      r2_col  <= ra_col;
      r2_bank <= ra_bank;
      r2_neg  <= ra_neg;
      if (clr) err_o <= 1'b0;
      else if ((ra_valid && !ra_ok) || (wa_valid && !wa_ok)) err_o <= 1'b1;
    end
  end

  rdnet_t rnet_in  [NU][P];
  rdnet_t rnet_out [NU][P];

  for (genvar k = 0; k < NU; k++) begin : g_rnet
    always_comb
      for (int b = 0; b < P; b++)
        rnet_in[k][b] = {sys_q[b][r2_col[k]], ed_q[b][r2_col[k]].ext};
    barrel_shift_net #(.P(P), .T(rdnet_t)) u_net (
      .d_i(rnet_in[k]), .off_i(r2_bank[k]), .neg_i(r2_neg[k]), .d_o(rnet_out[k])
    );
  end

  cmd_t    cmd3;
  symset_t s_sym [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd3 <= '0;
      for (int p = 0; p < P; p++) s_sym[p] <= '0;
    end else begin
      cmd3 <= cmd2;
      if (cmd2.valid)
        for (int p = 0; p < P; p++)
          for (int k = 0; k < NU; k++) begin
            s_sym[p][k].sys <= ch_t'(rnet_out[k][p][CH_W+EXT_W-1:EXT_W]);
            s_sym[p][k].apr <= cmd2.first ? '0 : ext_t'(rnet_out[k][p][EXT_W-1:0]);
            s_sym[p][k].par <= (cmd2.typ == HALF_NAT) ? par1_q[p][k] : par2_q[p][k];
          end
    end
  end

  // ---------------- SISO decoders ----------------
  logic    a_we [P];
  half_t   a_ty [P];
  pmvec_t  a_pm [P];
  logic    b_we [P];
  half_t   b_ty [P];
  pmvec_t  b_pm [P];
  logic    o_valid [P];
  resset_t o_res [P];

  for (genvar p = 0; p < P; p++) begin : g_siso
    siso_decoder #(.L(L), .M(M)) u_siso (
      .clk, .rst_n, .clr_i(clr),
      .in_valid_i      (cmd3.valid),
      .in_type_i       (cmd3.typ),
      .in_win_i        (cmd3.win),
      .in_step_i       (cmd3.step),
      .in_sym_i        (s_sym[p]),
      .nb_alpha_we_i   (a_we[(p + P - 1) % P]),
      .nb_alpha_type_i (a_ty[(p + P - 1) % P]),
      .nb_alpha_i      (a_pm[(p + P - 1) % P]),
      .nb_beta_we_i    (b_we[(p + 1) % P]),
      .nb_beta_type_i  (b_ty[(p + 1) % P]),
      .nb_beta_i       (b_pm[(p + 1) % P]),
      .alpha_out_we_o  (a_we[p]),
      .alpha_out_type_o(a_ty[p]),
      .alpha_out_o     (a_pm[p]),
      .beta_out_we_o   (b_we[p]),
      .beta_out_type_o (b_ty[p]),
      .beta_out_o      (b_pm[p]),
      .out_valid_o     (o_valid[p]),
      .out_res_o       (o_res[p])
    );
  end

  // ---------------- write address generation ----------------
  cmd_t wdly [WCMD_DLY];
  cmd_t wcmd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WCMD_DLY; i++) wdly[i] <= '0;
    end else begin
      wdly[0] <= cmd0;
      for (int i = 1; i < WCMD_DLY; i++) wdly[i] <= wdly[i-1];
    end
  end

  // the backward pass returns the clocks of a window in reverse order
  always_comb begin
    wcmd      = wdly[WCMD_DLY-1];
    wcmd.step = SB'(TW - 1) - wdly[WCMD_DLY-1].step;
  end


  qpp_addr_gen #(.N(N), .P(P)) u_wr_addr (
    .clk, .rst_n,
    .valid_i (wcmd.valid), .type_i(wcmd.typ), .idx_i(idx_of(wcmd.win, wcmd.step)), .rot_i(rotated_o),
    .f1_i, .f2_i,
    .valid_o (wa_valid), .col_o(wa_col), .word_o(wa_word), .bank_o(wa_bank),
    .neg_o   (wa_neg), .ok_o(wa_ok)
  );

  // results and write addresses must arrive together
  a_wr_in_step: assert property (@(posedge clk) disable iff (!rst_n) wa_valid == o_valid[0])
    else $error("write address and SISO results out of step");

  // ---------------- write network (-> register 1 -> register 2) ----------------
  wrnet_t wnet_in  [NU][P];
  wrnet_t wnet_out [NU][P];

  for (genvar k = 0; k < NU; k++) begin : g_wnet
    always_comb
      for (int p = 0; p < P; p++) wnet_in[k][p] = '{ext: o_res[p][k].ext, dec: o_res[p][k].dec};
    // bank b takes lane (b - B) for c = +1 and lane (B - b) for c = -1
    barrel_shift_net #(.P(P), .T(wrnet_t)) u_net (
      .d_i  (wnet_in[k]),
      .off_i(wa_neg[k] ? wa_bank[k] : PB'(0) - wa_bank[k]),
      .neg_i(wa_neg[k]),
      .d_o  (wnet_out[k])
    );
  end

  logic          w1_valid;
  logic [AW-1:0] w1_word [NU];
  wrnet_t        w1_data [P][NU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1_valid <= 1'b0;
      w2_valid <= 1'b0;
      for (int m = 0; m < NU; m++) begin
        w1_word[m] <= '0;
        w2_word[m] <= '0;
      end
      for (int b = 0; b < P; b++)
        for (int m = 0; m < NU; m++) begin
          w1_data[b][m] <= '0;
          w2_data[b][m] <= '0;
        end
    end else begin
      w1_valid <= wa_valid;
      for (int k = 0; k < NU; k++) begin
        w1_word[wa_col[k]] <= wa_word[k];
        for (int b = 0; b < P; b++) w1_data[b][wa_col[k]] <= wnet_out[k][b];
      end
      w2_valid <= w1_valid;
      w2_word  <= w1_word;
      w2_data  <= w1_data;
    end
  end
endmodule
