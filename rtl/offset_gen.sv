// offset_gen: row- or column-offset of one mask element.
//
// A mask of odd size M is indexed I = 0..M-1 along each axis, centre at M/2.
// The product of a pixel with element I is added to the output location
// shifted by the element's distance to the centre, M/2 - I, taken modulo N:
// I <= M/2 gives M/2 - I, I > M/2 gives N - (I - M/2). For M = 5 and N = 128
// this is 2, 1, 0, 127, 126. (The form N - (M - I) for the upper half, found
// in the original description, agrees with this only for M = 3; the
// centre-relative form, which the rest of that description implies, is used.)
// Combinational. N = 2**LOG2N; index must be below mask_size.
module offset_gen #(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned IDX_W = 4
) (
  input  logic [IDX_W-1:0] mask_size,
  input  logic [IDX_W-1:0] index,
  output logic [LOG2N-1:0] offset
);
  logic [IDX_W-1:0] half;
  logic [LOG2N-1:0] half_n, index_n;

  assign half    = mask_size >> 1;
  assign half_n  = LOG2N'(half);
  assign index_n = LOG2N'(index);

  // Modulo-N subtraction: for I > M/2 the LOG2N-bit difference wraps to
  // N - (I - M/2) by itself.
  assign offset = half_n - index_n;
endmodule
