// window_buffer: double-buffered storage for one window of a SISO decoder,
// used twice in each decoder: as the input buffer (received values, read
// again by the backward recursion) and as the alpha buffer (forward path
// metrics, read by the LLR unit).
//
// The forward pass writes the DEPTH clock-entries of a window into one half
// (wsel) while the backward pass of the previous window reads the other
// half (rsel) in reverse order; the caller chooses the read address, so the
// buffer itself is a two-bank register file. Write: registered on the
// rising clock edge when we_i is high. Read: combinational (rdata_o shows
// entry raddr_i of bank rsel_i in the same clock). Contents are not reset;
// every entry is written before it is read. The double-bank organisation is
// this design's own choice; the published design only names the buffers.
module window_buffer #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     we_i,
  input  logic                     wsel_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  T                         wdata_i,
  input  logic                     rsel_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output T                         rdata_o
);
  T mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[wsel_i][waddr_i] <= wdata_i;
  end

  assign rdata_o = mem[rsel_i][raddr_i];
endmodule
