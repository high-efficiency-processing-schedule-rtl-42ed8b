// schedule_ctrl: issues the read commands that drive all P SISO decoders in
// lock step, one command per clock, and so sets the decoding schedule.
//
// A half-iteration reads the NWIN windows of every sub-block in the order
// "even windows first, then odd windows" (W0, W2, W1, W3 for four windows),
// TW = L/NU clocks per window. Half-iterations alternate between the
// natural and the interleaved sequence, 2*iters_i of them per block.
//  * Overlapping mode (overlap_i = 1): the next half-iteration is issued
//    right after the last window of the current one, so the decoder
//    computes the forward metrics of the new half-iteration while the
//    backward metrics and LLRs of the old one are still being produced.
//    The window order guarantees that the new half-iteration first reads
//    only data the old one has already written (requires Proposition-1
//    interleaver parameters, see qpp_param_check). This holds only if the
//    second window group lasts at least GAP clocks; with fewer windows
//    (two per sub-block) the controller still waits OGAP = GAP - TW*NWIN/2
//    clocks, which gives the 24-clock period (eta = 66.7%) of the
//    two-window overlapping schedule. With four windows OGAP is 0.
//  * Rotated overlapping mode (overlap_i = rot_i = 1), for interleavers that
//    map even windows onto odd ones (the tail-biting variant): interleaved
//    half-iterations take their windows in the order W1, W3, W0, W2 (window
//    index with its lowest bit inverted), so that again each half-iteration
//    starts with the windows the previous one has finished.
//  * Normal mode: after the last read of a half-iteration the controller
//    idles GAP clocks, until the last result of that half-iteration has been
//    written, and only then starts the next one.
// GAP = D_A + TW + LLR_LAT + WR_LAT: read-to-forward-ACS delay, one window
// of backward recursion, the LLR pipeline and the write pipeline.
// Interface: start_i (one clock, while idle) begins a block; clr_o pulses
// with it to clear the boundary metrics; cmd_* describe the window and clock
// to be read (cmd_step = clock within the window, cmd_first = first
// half-iteration, whose a-priori input is zero); done_o pulses when the last
// result of the block has been written; busy_o is high in between.
// Commands are registered outputs. The window order and the two modes are
// the published design's; the command interface is this design's own.
module schedule_ctrl
  import turbo_pkg::*;
#(
  parameter int NWIN    = 4,
  parameter int TW      = 8,
  parameter int D_A     = 4,
  parameter int LLR_LAT = 2,
  parameter int WR_LAT  = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_i,
  input  logic                    overlap_i,
  input  logic                    rot_i,
  input  logic [3:0]              iters_i,
  output logic                    clr_o,
  output logic                    cmd_valid_o,
  output half_t                   cmd_type_o,
  output logic [$clog2(NWIN)-1:0] cmd_win_o,
  output logic [$clog2(TW)-1:0]   cmd_step_o,
  output logic                    cmd_first_o,
  output logic                    busy_o,
  output logic                    done_o
);
  localparam int GAP  = D_A + TW + LLR_LAT + WR_LAT;
  localparam int OGAP = (GAP > TW * NWIN / 2) ? GAP - TW * NWIN / 2 : 0;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_GAP, S_DRAIN} state_t;

  state_t                  state;
  logic [4:0]              hi;       // half-iteration number
  logic [4:0]              hi_last;  // 2*iters - 1
  logic [$clog2(NWIN)-1:0] slot;     // position in the window order
  logic [$clog2(TW)-1:0]   step;
  logic [$clog2(GAP+1)-1:0] gcnt;
  logic                    ovl;
  logic                    rot;

  // window processed in a given slot: even windows first, then odd ones
  function automatic logic [$clog2(NWIN)-1:0] win_of(input logic [$clog2(NWIN)-1:0] s);
    return (int'(s) < NWIN / 2) ? $clog2(NWIN)'(2 * int'(s))
                                : $clog2(NWIN)'(2 * (int'(s) - NWIN / 2) + 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      hi          <= '0;
      hi_last     <= '0;
      slot        <= '0;
      step        <= '0;
      gcnt        <= '0;
      ovl         <= 1'b0;
      rot         <= 1'b0;
      clr_o       <= 1'b0;
      cmd_valid_o <= 1'b0;
      cmd_type_o  <= HALF_NAT;
      cmd_win_o   <= '0;
      cmd_step_o  <= '0;
      cmd_first_o <= 1'b0;
      busy_o      <= 1'b0;
      done_o      <= 1'b0;
    end else begin
      clr_o       <= 1'b0;
      done_o      <= 1'b0;
      cmd_valid_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i && iters_i != '0) begin
            state   <= S_RUN;
            hi      <= '0;
            hi_last <= 5'({iters_i, 1'b0} - 5'd1);
            slot    <= '0;
            step    <= '0;
            ovl     <= overlap_i;
            rot     <= overlap_i && rot_i;
            clr_o   <= 1'b1;
            busy_o  <= 1'b1;
          end
        end
        S_RUN: begin
          cmd_valid_o <= 1'b1;
          cmd_type_o  <= half_t'(hi[0]);
          cmd_win_o   <= win_of(slot) ^ $clog2(NWIN)'(rot && hi[0]);
          cmd_step_o  <= step;
          cmd_first_o <= (hi == '0);
          step        <= step + 1'b1;
          if (int'(step) == TW - 1) begin
            step <= '0;
            slot <= slot + 1'b1;
            if (int'(slot) == NWIN - 1) begin
              slot <= '0;
              gcnt <= '0;
              if (hi == hi_last) state <= S_DRAIN;
              else begin
                hi <= hi + 1'b1;
                if (!ovl) state <= S_GAP;
                else if (OGAP > 0) begin
                  state <= S_GAP;
                  gcnt  <= $bits(gcnt)'(GAP - OGAP);
                end
              end
            end
          end
        end
        S_GAP: begin
          gcnt <= gcnt + 1'b1;
          if (int'(gcnt) == GAP - 1) state <= S_RUN;
        end
        S_DRAIN: begin
          gcnt <= gcnt + 1'b1;
          if (int'(gcnt) == GAP - 1) begin
            state  <= S_IDLE;
            busy_o <= 1'b0;
            done_o <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
