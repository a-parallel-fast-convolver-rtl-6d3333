// convolver_board: one complete fast convolver board - the board controller
// (with its offset generators) driving one convolver unit.
//
// The host sees the controller's command/response handshake; see
// board_controller for the opcodes and convolver_unit for the pass. The
// sum_addr/sum_data port reads the board's output buffer directly, for adding
// the buffers of several boards; it is meaningful while no pass runs.
module convolver_board
  import fc_pkg::*;
#(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  host_cmd_t          cmd,
  output logic               rsp_valid,
  output retcode_t           rsp_code,
  output logic [ACC_W-1:0]   rsp_data,
  input  logic [2*LOG2N-1:0] sum_addr,
  output logic [ACC_W-1:0]   sum_data
);
  logic               ib_we, lut_we, start, first, busy, done;
  logic [2*LOG2N-1:0] ib_waddr, rd_addr;
  logic [PIX_W-1:0]   ib_wdata, lut_waddr;
  logic [ACC_W-1:0]   lut_wdata, rd_data;
  logic [LOG2N-1:0]   row_off, col_off;

  board_controller #(.LOG2N(LOG2N), .PIX_W(PIX_W), .ACC_W(ACC_W)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_code, .rsp_data,
    .ib_we, .ib_waddr, .ib_wdata, .lut_we, .lut_waddr, .lut_wdata,
    .row_off, .col_off, .start, .first, .unit_done(done), .rd_addr, .rd_data
  );

  convolver_unit #(.LOG2N(LOG2N), .PIX_W(PIX_W), .ACC_W(ACC_W)) u_unit (
    .clk, .rst_n, .ib_we, .ib_waddr, .ib_wdata, .lut_we, .lut_waddr, .lut_wdata,
    .row_off, .col_off, .start, .first, .busy, .done, .rd_addr, .rd_data,
    .sum_addr, .sum_data
  );

  // The controller keeps its own pass flag; busy is checked against it.
  a_busy_means_not_ready: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !cmd_ready)
    else $error("board accepts commands while a pass runs");
endmodule
