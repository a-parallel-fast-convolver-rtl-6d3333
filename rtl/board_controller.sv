// board_controller: command decoder of one convolver board.
//
// It plays the part of the board's single-chip controller: it takes an opcode
// from the host, carries it out on the convolver unit and answers with a return
// code. The host side is a valid/ready handshake: a command is taken in a clock
// where cmd_valid and cmd_ready are both high, and the host holds it steady
// while cmd_ready is low. cmd_ready is low from the acceptance of a start-pass
// command until that pass has ended. Every accepted command is answered by one
// rsp_valid pulse (the board's interrupt to the host): one clock after
// acceptance, or, for start pass, one clock after the last pixel of the pass.
//
//   OP_LOAD_INPUT    input buffer[addr] <= data[PIX_W-1:0]
//   OP_LOAD_LUT      LUT[addr[PIX_W-1:0]] <= data
//   OP_LOAD_OFFSETS  addr[15] = 0: row offset = data[2*LOG2N-1:LOG2N],
//                                   column offset = data[LOG2N-1:0]
//                    addr[15] = 1: data[11:8] = mask size M, data[7:4] = row
//                                   index, data[3:0] = column index of the mask
//                                   element; offsets computed by offset_gen
//   OP_START_PASS    run one pass; data[0] = 1 makes it the first pass, which
//                    overwrites the output buffer instead of adding to it
//   OP_READ_OUTPUT   rsp_data = output buffer[addr]
//   OP_END_OP        offsets back to 0, answered with RC_END
//   others           answered with RC_BAD_OPCODE
//
// The opcode set follows the board's; the encodings, the handshake, the
// mask-index form of the offset load and the first-pass flag are this design's.
module board_controller
  import fc_pkg::*;
#(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  host_cmd_t          cmd,
  output logic               rsp_valid,
  output retcode_t           rsp_code,
  output logic [ACC_W-1:0]   rsp_data,
  // unit side
  output logic               ib_we,
  output logic [2*LOG2N-1:0] ib_waddr,
  output logic [PIX_W-1:0]   ib_wdata,
  output logic               lut_we,
  output logic [PIX_W-1:0]   lut_waddr,
  output logic [ACC_W-1:0]   lut_wdata,
  output logic [LOG2N-1:0]   row_off,
  output logic [LOG2N-1:0]   col_off,
  output logic               start,
  output logic               first,
  input  logic               unit_done,
  output logic [2*LOG2N-1:0] rd_addr,
  input  logic [ACC_W-1:0]   rd_data
);
  logic             accept, pass_active_q;
  logic [LOG2N-1:0] gen_row_off, gen_col_off;

  assign cmd_ready = !pass_active_q;
  assign accept    = cmd_valid && cmd_ready;

  offset_gen #(.LOG2N(LOG2N), .IDX_W(4)) u_row_off (
    .mask_size(cmd.data[11:8]), .index(cmd.data[7:4]), .offset(gen_row_off)
  );
  offset_gen #(.LOG2N(LOG2N), .IDX_W(4)) u_col_off (
    .mask_size(cmd.data[11:8]), .index(cmd.data[3:0]), .offset(gen_col_off)
  );

  // Strobes to the unit follow the accepted command combinationally.
  assign ib_we     = accept && (cmd.opcode == OP_LOAD_INPUT);
  assign ib_waddr  = cmd.addr[2*LOG2N-1:0];
  assign ib_wdata  = cmd.data[PIX_W-1:0];
  assign lut_we    = accept && (cmd.opcode == OP_LOAD_LUT);
  assign lut_waddr = cmd.addr[PIX_W-1:0];
  assign lut_wdata = cmd.data[ACC_W-1:0];
  assign start     = accept && (cmd.opcode == OP_START_PASS);
  assign first     = cmd.data[0];
  assign rd_addr   = cmd.addr[2*LOG2N-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass_active_q <= 1'b0;
      row_off       <= '0;
      col_off       <= '0;
      rsp_valid     <= 1'b0;
      rsp_code      <= RC_OK;
      rsp_data      <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (pass_active_q) begin
        if (unit_done) begin
          pass_active_q <= 1'b0;
          rsp_valid     <= 1'b1;
          rsp_code      <= RC_PASS_DONE;
          rsp_data      <= '0;
        end
      end else if (accept) begin
        rsp_code <= RC_OK;
        rsp_data <= '0;
        unique case (cmd.opcode)
          OP_LOAD_INPUT, OP_LOAD_LUT: rsp_valid <= 1'b1;
          OP_LOAD_OFFSETS: begin
            rsp_valid <= 1'b1;
            if (cmd.addr[15]) begin
              row_off <= gen_row_off;
              col_off <= gen_col_off;
            end else begin
              row_off <= cmd.data[2*LOG2N-1:LOG2N];
              col_off <= cmd.data[LOG2N-1:0];
            end
          end
          OP_START_PASS: pass_active_q <= 1'b1;  // answered at the end of the pass
          OP_READ_OUTPUT: begin
            rsp_valid <= 1'b1;
            rsp_data  <= rd_data;
          end
          OP_END_OP: begin
            rsp_valid <= 1'b1;
            rsp_code  <= RC_END;
            row_off   <= '0;
            col_off   <= '0;
          end
          default: begin
            rsp_valid <= 1'b1;
            rsp_code  <= RC_BAD_OPCODE;
          end
        endcase
      end
    end
  end

  // Host rule: a command that is not taken stays on the bus unchanged.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd))
    else $error("command changed while cmd_ready was low");
endmodule
