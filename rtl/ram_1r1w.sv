// ram_1r1w: one memory bank of the decoder, with one write and one read
// port on the same clock (the decoder writes results of one window while it
// reads inputs of another).
//
// Synchronous write; synchronous read with a registered output that shows
// the old contents when a word is read and written on the same edge.
// Contents are not reset. The published design shows the memories only as
// blocks in its layout; the port arrangement is this design's own choice.
module ram_1r1w #(
  parameter int W     = 8,
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  logic [W-1:0]             wdata_i,
  input  logic                     re_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output logic [W-1:0]             rdata_o
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end
endmodule
