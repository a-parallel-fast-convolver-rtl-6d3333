// parallel_convolver: K-parallel fast convolver - K convolver boards on one
// host command bus, plus the final summation of their output buffers.
//
// Convolving an N x N image with an M x M mask takes M*M passes, one per mask
// element, and the passes are independent. Here K boards each hold a copy of
// the image and run M*M/K of the passes into their own output buffer, all at
// the same time; a read-sum command then adds the K buffers pixel by pixel.
// With K = M*M (default K = 9 for a 3 x 3 mask) the whole convolution takes the
// time of one pass, N*N clocks.
//
// Host bus: valid/ready. cmd.board selects one board, cmd.bcast selects all of
// them (e.g. to load the same image into every input buffer or start all passes
// at once). A command is taken only when every selected board is ready, and then
// by all of them in the same clock; a command for a board number >= K is taken
// and dropped. Each board answers on its own rsp_valid/rsp_code/rsp_data lane.
// OP_READ_SUM is taken when no board is running a pass; sum_valid/sum_data give
// the sum of all K output buffers at cmd.addr one clock later.
// Board selection, broadcast and the read-sum command are this design's choice.
module parallel_convolver
  import fc_pkg::*;
#(
  parameter int unsigned K     = 9,
  parameter int unsigned LOG2N = 8,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 16,
  localparam int unsigned SUM_W = ACC_W + ((K > 1) ? $clog2(K) : 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  host_cmd_t               cmd,
  output logic [K-1:0]            rsp_valid,
  output retcode_t [K-1:0]        rsp_code,
  output logic [K-1:0][ACC_W-1:0] rsp_data,
  output logic                    sum_valid,
  output logic [SUM_W-1:0]        sum_data
);
  logic [K-1:0]            sel, board_ready, board_valid;
  logic [K-1:0][ACC_W-1:0] parts;
  logic                    is_sum;

  assign is_sum = (cmd.opcode == OP_READ_SUM);

  always_comb begin
    for (int k = 0; k < K; k++) begin
      sel[k] = is_sum || cmd.bcast || (32'(cmd.board) == k);
    end
  end

  assign cmd_ready = &(board_ready | ~sel);

  for (genvar k = 0; k < K; k++) begin : g_board
    assign board_valid[k] = cmd_valid && cmd_ready && sel[k] && !is_sum;

    convolver_board #(.LOG2N(LOG2N), .PIX_W(PIX_W), .ACC_W(ACC_W)) u_board (
      .clk, .rst_n,
      .cmd_valid(board_valid[k]), .cmd_ready(board_ready[k]), .cmd,
      .rsp_valid(rsp_valid[k]), .rsp_code(rsp_code[k]), .rsp_data(rsp_data[k]),
      .sum_addr(cmd.addr[2*LOG2N-1:0]), .sum_data(parts[k])
    );
  end

  final_summer #(.K(K), .ACC_W(ACC_W)) u_sum (
    .clk, .rst_n,
    .in_valid(cmd_valid && cmd_ready && is_sum),
    .parts, .out_valid(sum_valid), .sum(sum_data)
  );
endmodule
