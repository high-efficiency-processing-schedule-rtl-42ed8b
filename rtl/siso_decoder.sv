// siso_decoder: radix-2^4 max-log-MAP soft-in/soft-out decoder for one
// sub-block, using the boundary metrics of the previous pass instead of
// dummy backward recursions, so windows may be processed in any order.
//
// Structure (as in the published block diagram): an input register, a
// branch metric unit and the alpha ACS on the forward path; an input buffer,
// a second branch metric unit and the beta ACS on the backward path; an
// alpha buffer feeding the LLR unit; and one boundary path metric buffer in
// front of each ACS, selected by a multiplexer at the first clock of a
// window and otherwise bypassed by the ACS's own feedback.
//
// Timing, for a window whose inputs arrive on TW = L/NU consecutive clocks
// (in_step_i = 0 .. TW-1) starting at clock n (port side):
//   n+1 .. n+TW     forward recursion, one input register stage behind;
//                   alpha of each clock goes to the alpha buffer, inputs to
//                   the input buffer; alpha at the window end is stored as
//                   the start metric of the next window (or sent to the
//                   next decoder for the last window);
//   n+TW+1 .. n+2TW backward recursion over the same window in reverse,
//                   started from the stored beta at the window end; beta
//                   at the window start is stored for the previous window
//                   (or sent to the previous decoder for window 0);
//   n+TW+3 ..       out_valid_o/out_res_o: extrinsic values and decisions of
//                   the NU stages, last clock of the window first.
// The backward pass of a window always runs exactly TW clocks after its
// forward pass, so windows may follow back to back (100 % busy) or with
// gaps. Boundary metric edges: alpha_out_* goes to decoder p+1's neighbour
// port, beta_out_* to decoder p-1's. clr_i (one clock) zeroes all boundary
// metrics before a new block.
// The architecture follows the published design; the exact register
// stages, the double-banked buffers and the port protocol are this
// design's own.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int L = 32,
  parameter int M = 128
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr_i,
  // inputs, NU trellis stages per clock
  input  logic                  in_valid_i,
  input  half_t                 in_type_i,
  input  logic [$clog2(M/L)-1:0] in_win_i,
  input  logic [$clog2(L/NU)-1:0] in_step_i,
  input  symset_t               in_sym_i,
  // boundary metrics from the neighbouring decoders
  input  logic                  nb_alpha_we_i,
  input  half_t                 nb_alpha_type_i,
  input  pmvec_t                nb_alpha_i,
  input  logic                  nb_beta_we_i,
  input  half_t                 nb_beta_type_i,
  input  pmvec_t                nb_beta_i,
  // boundary metrics to the neighbouring decoders
  output logic                  alpha_out_we_o,
  output half_t                 alpha_out_type_o,
  output pmvec_t                alpha_out_o,
  output logic                  beta_out_we_o,
  output half_t                 beta_out_type_o,
  output pmvec_t                beta_out_o,
  // results
  output logic                  out_valid_o,
  output resset_t               out_res_o
);
  localparam int NWIN = M / L;
  localparam int TW   = L / NU;
  localparam int WB   = $clog2(NWIN);
  localparam int SB   = $clog2(TW);

  // ---------------- forward (alpha) path ----------------
  logic          a_valid;
  half_t         a_type;
  logic [WB-1:0] a_win;
  logic [SB-1:0] a_step;
  symset_t       a_sym;
  logic          a_bank;     // window buffer half being written
  pmvec_t        alpha_q;    // alpha at the end of the last clock
  pmvec_t        alpha_init, alpha_in;
  bmset_t        a_bm;
  pmset_t        a_pm;       // alpha after stage k
  pmset_t        a_store;    // alpha before stage k

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_type  <= HALF_NAT;
      a_win   <= '0;
      a_step  <= '0;
      a_sym   <= '0;
    end else begin
      a_valid <= in_valid_i;
      if (in_valid_i) begin
        a_type <= in_type_i;
        a_win  <= in_win_i;
        a_step <= in_step_i;
        a_sym  <= in_sym_i;
      end
    end
  end

  branch_metric_unit u_bmu_a (.sym_i(a_sym), .bm_o(a_bm));

  boundary_metric_buffer #(.NWIN(NWIN), .NB_IDX(0)) u_alpha_bnd (
    .clk, .rst_n, .clr_i,
    .we_i      (a_valid && int'(a_step) == TW - 1 && int'(a_win) != NWIN - 1),
    .wtype_i   (a_type),
    .widx_i    (a_win + 1'b1),
    .wdata_i   (a_pm[NU-1]),
    .nb_we_i   (nb_alpha_we_i),
    .nb_type_i (nb_alpha_type_i),
    .nb_data_i (nb_alpha_i),
    .rtype_i   (a_type),
    .ridx_i    (a_win),
    .rdata_o   (alpha_init)
  );

  assign alpha_in = (a_step == '0) ? alpha_init : alpha_q;

  acs_radix16 #(.BACKWARD(1'b0)) u_acs_a (.pm_i(alpha_in), .bm_i(a_bm), .pm_o(a_pm));

  always_comb begin
    a_store[0] = alpha_in;
    for (int k = 1; k < NU; k++) a_store[k] = a_pm[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q          <= '0;
      a_bank           <= 1'b0;
      alpha_out_we_o   <= 1'b0;
      alpha_out_type_o <= HALF_NAT;
      alpha_out_o      <= '0;
    end else begin
      alpha_out_we_o <= 1'b0;
      if (a_valid) begin
        alpha_q <= a_pm[NU-1];
        if (int'(a_step) == TW - 1) begin
          a_bank <= ~a_bank;
          if (int'(a_win) == NWIN - 1) begin
            alpha_out_we_o   <= 1'b1;
            alpha_out_type_o <= a_type;
            alpha_out_o      <= a_pm[NU-1];
          end
        end
      end
    end
  end

  // ---------------- input buffer and alpha buffer ----------------
  logic          b_valid;
  half_t         b_type;
  logic [WB-1:0] b_win;
  logic [SB-1:0] b_cnt;      // clock within the backward pass
  logic [SB-1:0] b_pos;      // forward clock index being revisited
  logic          b_bank;
  symset_t       b_sym;
  pmset_t        b_alpha;

  window_buffer #(.T(symset_t), .DEPTH(TW)) u_in_buf (
    .clk, .we_i(a_valid), .wsel_i(a_bank), .waddr_i(a_step), .wdata_i(a_sym),
    .rsel_i(b_bank), .raddr_i(b_pos), .rdata_o(b_sym)
  );

  window_buffer #(.T(pmset_t), .DEPTH(TW)) u_alpha_buf (
    .clk, .we_i(a_valid), .wsel_i(a_bank), .waddr_i(a_step), .wdata_i(a_store),
    .rsel_i(b_bank), .raddr_i(b_pos), .rdata_o(b_alpha)
  );

  // The backward pass trails the forward pass by exactly TW clocks.
  typedef struct packed {
    logic          valid;
    half_t         typ;
    logic [WB-1:0] win;
    logic [SB-1:0] step;
    logic          bank;
  } ctl_t;

  ctl_t dly [TW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TW; i++) dly[i] <= '0;
    end else begin
      dly[0] <= '{valid: a_valid, typ: a_type, win: a_win, step: a_step, bank: a_bank};
      for (int i = 1; i < TW; i++) dly[i] <= dly[i-1];
    end
  end

  assign b_valid = dly[TW-1].valid;
  assign b_type  = dly[TW-1].typ;
  assign b_win   = dly[TW-1].win;
  assign b_cnt   = dly[TW-1].step;
  assign b_bank  = dly[TW-1].bank;
  assign b_pos   = SB'(TW - 1) - b_cnt;

  // ---------------- backward (beta) path ----------------
  pmvec_t beta_q, beta_init, beta_in;
  bmset_t b_bm;
  pmset_t b_pm;       // beta before stage k
  pmset_t b_after;    // beta after stage k

  branch_metric_unit u_bmu_b (.sym_i(b_sym), .bm_o(b_bm));

  boundary_metric_buffer #(.NWIN(NWIN), .NB_IDX(NWIN - 1)) u_beta_bnd (
    .clk, .rst_n, .clr_i,
    .we_i      (b_valid && int'(b_cnt) == TW - 1 && b_win != '0),
    .wtype_i   (b_type),
    .widx_i    (b_win - 1'b1),
    .wdata_i   (b_pm[0]),
    .nb_we_i   (nb_beta_we_i),
    .nb_type_i (nb_beta_type_i),
    .nb_data_i (nb_beta_i),
    .rtype_i   (b_type),
    .ridx_i    (b_win),
    .rdata_o   (beta_init)
  );

  assign beta_in = (b_cnt == '0) ? beta_init : beta_q;

  acs_radix16 #(.BACKWARD(1'b1)) u_acs_b (.pm_i(beta_in), .bm_i(b_bm), .pm_o(b_pm));

  always_comb begin
    b_after[NU-1] = beta_in;
    for (int k = 0; k < NU - 1; k++) b_after[k] = b_pm[k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beta_q          <= '0;
      beta_out_we_o   <= 1'b0;
      beta_out_type_o <= HALF_NAT;
      beta_out_o      <= '0;
    end else begin
      beta_out_we_o <= 1'b0;
      if (b_valid) begin
        beta_q <= b_pm[0];
        if (int'(b_cnt) == TW - 1 && b_win == '0) begin
          beta_out_we_o   <= 1'b1;
          beta_out_type_o <= b_type;
          beta_out_o      <= b_pm[0];
        end
      end
    end
  end

  // ---------------- LLR unit ----------------
  llr_unit u_llr (
    .clk, .rst_n,
    .valid_i (b_valid),
    .alpha_i (b_alpha),
    .beta_i  (b_after),
    .bm_i    (b_bm),
    .sym_i   (b_sym),
    .valid_o (out_valid_o),
    .res_o   (out_res_o)
  );
endmodule
