// final_summer: adds the partial results of K boards.
//
// In the K-parallel scheme each of K boards accumulates the passes of its own
// share of the mask elements in its own output buffer; the convolved pixel is
// the sum of the K buffers at the same address. This block takes the K
// two's complement words, sign-extends them by clog2(K) bits so the sum cannot
// overflow, adds them, and registers the result: sum/out_valid appear one clock
// after in_valid. Asynchronous active-low reset.
module final_summer #(
  parameter int unsigned K     = 9,
  parameter int unsigned ACC_W = 16,
  localparam int unsigned SUM_W = ACC_W + ((K > 1) ? $clog2(K) : 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [K-1:0][ACC_W-1:0] parts,
  output logic                    out_valid,
  output logic [SUM_W-1:0]        sum
);
  logic signed [SUM_W-1:0] total;

  always_comb begin
    total = '0;
    for (int k = 0; k < K; k++) total += SUM_W'(signed'(parts[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= total;
    end
  end
endmodule
