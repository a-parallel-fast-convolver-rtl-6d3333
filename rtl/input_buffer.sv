// input_buffer: the image memory of one convolver board, N x N pixels of PIX_W
// bits (256 x 256 x 8 by default, the board's 64 Kbyte buffer).
//
// The host writes it pixel by pixel; during a pass it is read one pixel per
// clock. Reads are asynchronous and writes happen on the rising clock edge, as
// with the static RAM chips the board is built from, so a whole read - look up -
// add - write sequence fits in one clock. The address is {row, col}.
// Contents are not reset.
module input_buffer #(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned PIX_W = 8
) (
  input  logic               clk,
  input  logic               we,
  input  logic [2*LOG2N-1:0] waddr,
  input  logic [PIX_W-1:0]   wdata,
  input  logic [2*LOG2N-1:0] raddr,
  output logic [PIX_W-1:0]   rdata
);
  logic [PIX_W-1:0] mem [2**(2*LOG2N)];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
