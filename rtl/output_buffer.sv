// output_buffer: the accumulation memory of one convolver board, N x N words of
// ACC_W bits (256 x 256 x 16 by default), holding two's complement partial sums.
//
// Port A is read at the offset address every clock of a pass, and by the host
// between passes; the write port stores the new sum on the rising clock edge.
// Port B is a second asynchronous read port used only to add the buffers of
// several boards in the final summation (this design's choice: a separate port
// keeps that read independent of the board controller). Contents are not reset.
module output_buffer #(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned ACC_W = 16
) (
  input  logic               clk,
  input  logic               we,
  input  logic [2*LOG2N-1:0] waddr,
  input  logic [ACC_W-1:0]   wdata,
  input  logic [2*LOG2N-1:0] raddr_a,
  output logic [ACC_W-1:0]   rdata_a,
  input  logic [2*LOG2N-1:0] raddr_b,
  output logic [ACC_W-1:0]   rdata_b
);
  logic [ACC_W-1:0] mem [2**(2*LOG2N)];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
