// boundary_metric_buffer: stores the path metrics found at window
// boundaries so that a later pass can start its recursion from them instead
// of from a dummy (training) recursion.
//
// One entry per half-iteration type (natural / interleaved) and per window
// of the sub-block. Entry [t][w] of the alpha buffer holds alpha at the
// start of window w; entry [t][w] of the beta buffer holds beta at the end
// of window w. Two write ports: one from the decoder's own recursion and one
// from the neighbouring decoder, which owns the metric at the sub-block
// edge (entry NB_IDX). clr_i resets every entry to all-zero metrics
// (equally likely states), which is how a new code block starts.
// Writes are registered; the read is combinational. The two-port layout and
// the clear are this design's own choices.
module boundary_metric_buffer
  import turbo_pkg::*;
#(
  parameter int NWIN   = 4,
  parameter int NB_IDX = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr_i,
  // own recursion
  input  logic                    we_i,
  input  half_t                   wtype_i,
  input  logic [$clog2(NWIN)-1:0] widx_i,
  input  pmvec_t                  wdata_i,
  // neighbouring decoder
  input  logic                    nb_we_i,
  input  half_t                   nb_type_i,
  input  pmvec_t                  nb_data_i,
  // read
  input  half_t                   rtype_i,
  input  logic [$clog2(NWIN)-1:0] ridx_i,
  output pmvec_t                  rdata_o
);
  pmvec_t mem [2][NWIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < 2; t++)
        for (int w = 0; w < NWIN; w++) mem[t][w] <= '0;
    end else if (clr_i) begin
      for (int t = 0; t < 2; t++)
        for (int w = 0; w < NWIN; w++) mem[t][w] <= '0;
    end else begin
      if (we_i)    mem[wtype_i][widx_i] <= wdata_i;
      if (nb_we_i) mem[nb_type_i][NB_IDX] <= nb_data_i;
    end
  end

  assign rdata_o = mem[rtype_i][ridx_i];
endmodule
