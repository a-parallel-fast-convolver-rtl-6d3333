// output_addr_gen: the output address generator of a pass.
//
// The output address is the input address shifted by the row and column
// offsets of the current mask value, both modulo N, so the image borders wrap
// around in X and Y: with N = 128 and offsets (2,2), input (127,10) goes to
// output (1,12). It is made of two LOG2N-bit counters, row and column, preset
// to the offsets by 'load' and advanced by 'en' in step with the input counter.
// The column counter wraps at N on its own; the row counter steps each time the
// column counter comes back to the column offset, i.e. after every N pixels.
// The modulo-N mapping follows the original design; splitting the address into
// two counters, rather than one 2*LOG2N-bit counter that would carry a column
// wrap into the row, is this design's choice.
// N must be a power of two (N = 2**LOG2N). Asynchronous active-low reset to 0.
module output_addr_gen #(
  parameter int unsigned LOG2N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               en,
  input  logic [LOG2N-1:0]   row_off,
  input  logic [LOG2N-1:0]   col_off,
  output logic [2*LOG2N-1:0] addr
);
  logic [LOG2N-1:0] row_q, col_q, col_start_q, col_next;

  assign col_next = col_q + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q       <= '0;
      col_q       <= '0;
      col_start_q <= '0;
    end else if (load) begin
      row_q       <= row_off;
      col_q       <= col_off;
      col_start_q <= col_off;
    end else if (en) begin
      col_q <= col_next;
      if (col_next == col_start_q) row_q <= row_q + 1'b1;
    end
  end

  assign addr = {row_q, col_q};
endmodule
