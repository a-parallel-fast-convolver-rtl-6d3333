// pp_adder: adds a product from the look-up table to the partial sum read from
// the output buffer.
//
// The adder is built, like the board's four 74LS283 chips, from 4-bit slices
// with the carry rippled between them; the result wraps modulo 2^ACC_W. With
// 'first' set the partial sum is taken as zero, so the first pass of a
// convolution overwrites the output buffer instead of needing a separate
// clearing sweep (this design's choice). Purely combinational.
module pp_adder #(
  parameter int unsigned ACC_W = 16   // a multiple of 4
) (
  input  logic [ACC_W-1:0] product,
  input  logic [ACC_W-1:0] partial,
  input  logic             first,
  output logic [ACC_W-1:0] sum
);
  localparam int unsigned SLICES = ACC_W / 4;

  logic [ACC_W-1:0] b;
  logic [SLICES-1:0] carry;  // carry into each slice; the top carry-out is dropped

  assign b = first ? '0 : partial;
  assign carry[0] = 1'b0;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    logic [4:0] slice_sum;
    assign slice_sum = {1'b0, product[4*s +: 4]} + {1'b0, b[4*s +: 4]} + {4'd0, carry[s]};
    assign sum[4*s +: 4] = slice_sum[3:0];
    if (s < SLICES - 1) begin : g_carry
      assign carry[s+1] = slice_sum[4];
    end
  end
endmodule
