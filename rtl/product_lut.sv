// product_lut: the product look-up table that replaces multiplication.
//
// For one mask value m, entry v holds v * m (two's complement, ACC_W bits), for
// every possible pixel value v (256 entries of 16 bits by default). The host
// computes the 256 products and loads them before each pass; during the pass
// the pixel read from the input buffer indexes the table asynchronously and the
// product appears in the same clock. Writes happen on the rising clock edge.
module product_lut #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             we,
  input  logic [PIX_W-1:0] waddr,
  input  logic [ACC_W-1:0] wdata,
  input  logic [PIX_W-1:0] raddr,
  output logic [ACC_W-1:0] rdata
);
  logic [ACC_W-1:0] table_q [2**PIX_W];

  always_ff @(posedge clk) begin
    if (we) table_q[waddr] <= wdata;
  end

  assign rdata = table_q[raddr];
endmodule
