// input_addr_gen: the input address counter of a pass.
//
// A 2*LOG2N-bit binary counter (16 bits by default, four cascaded 4-bit
// counters on the board) that walks the input buffer in raster order, row by
// row. 'clear' presets it to 0 at the start of a pass and 'en' advances it by
// one each clock. 'tc' is its terminal count, high while the address is the last
// pixel N*N-1; the pass ends on it, as in the original design. The reset
// value is this design's choice. Asynchronous active-low reset to 0.
module input_addr_gen #(
  parameter int unsigned LOG2N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               en,
  output logic [2*LOG2N-1:0] addr,
  output logic               tc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (clear) addr <= '0;
    else if (en)    addr <= addr + 1'b1;
  end

  assign tc = &addr;
endmodule
