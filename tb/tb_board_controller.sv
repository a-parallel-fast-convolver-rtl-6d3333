// tb_board_controller: drives each opcode into the controller alone and checks
// the strobes it gives the unit (load enables, addresses, data, start and the
// first-pass flag), the offsets it holds (both the direct and the mask-index
// form), the one-clock return codes, the read data, that cmd_ready falls from a
// start-pass until the pass ends and that the pass is answered with
// RC_PASS_DONE, and that an unknown opcode gets RC_BAD_OPCODE.
module tb_board_controller;
  import fc_pkg::*;
  localparam int LOG2N = 8;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  host_cmd_t cmd;
  retcode_t rsp_code;
  logic [15:0] rsp_data;
  logic ib_we, lut_we, start, first, unit_done;
  logic [15:0] ib_waddr, rd_addr;
  logic [7:0] ib_wdata, lut_waddr, row_off, col_off;
  logic [15:0] lut_wdata, rd_data;
  int checks = 0, failures = 0;

  board_controller #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;
  // the unit's read port: data is a function of the address
  assign rd_data = rd_addr ^ 16'h5A5A;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Put a command on the bus for one clock, check the combinational strobes,
  // then check the response one clock later.
  task automatic send(opcode_t op, logic [15:0] a, logic [15:0] d,
                      retcode_t exp_rc, logic [15:0] exp_data);
    cmd = '{opcode: op, board: 4'd0, bcast: 1'b0, addr: a, data: d};
    cmd_valid = 1;
    #1;
    chk(cmd_ready, "ready");
    chk(ib_we  == (op == OP_LOAD_INPUT), "ib_we");
    chk(lut_we == (op == OP_LOAD_LUT), "lut_we");
    chk(start  == (op == OP_START_PASS), "start");
    if (op == OP_LOAD_INPUT) chk(ib_waddr == a && ib_wdata == d[7:0], "ib addr/data");
    if (op == OP_LOAD_LUT)   chk(lut_waddr == a[7:0] && lut_wdata == d, "lut addr/data");
    @(negedge clk);
    cmd_valid = 0;
    if (op != OP_START_PASS) begin
      chk(rsp_valid && rsp_code == exp_rc && rsp_data == exp_data, $sformatf("response to %s", op.name()));
      @(negedge clk);
      chk(!rsp_valid, "single response");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; cmd = '0; unit_done = 0;
    #12 rst_n = 1;
    @(negedge clk);
    chk(cmd_ready && row_off == 0 && col_off == 0 && !rsp_valid, "reset state");
    send(OP_LOAD_INPUT, 16'h1234, 16'h00AB, RC_OK, 16'h0);
    send(OP_LOAD_LUT,   16'h00FE, 16'hFC02, RC_OK, 16'h0);
    send(OP_LOAD_OFFSETS, 16'h0000, 16'h02FF, RC_OK, 16'h0);
    chk(row_off == 8'h02 && col_off == 8'hFF, "direct offsets");
    send(OP_LOAD_OFFSETS, 16'h8000, 16'h0504, RC_OK, 16'h0);   // M=5, I=0, J=4
    chk(row_off == 8'd2 && col_off == 8'd254, "index offsets");
    send(OP_READ_OUTPUT, 16'hBEEF, 16'h0, RC_OK, 16'hBEEF ^ 16'h5A5A);
    // start pass with the first-pass flag
    cmd = '{opcode: OP_START_PASS, board: 4'd0, bcast: 1'b0, addr: 16'h0, data: 16'h1};
    cmd_valid = 1;
    #1 chk(start && first, "start with first");
    @(negedge clk);
    // a command now waits
    cmd = '{opcode: OP_READ_OUTPUT, board: 4'd0, bcast: 1'b0, addr: 16'h0001, data: 16'h0};
    cmd_valid = 1;
    for (int i = 0; i < 20; i++) begin
      #1 chk(!cmd_ready && !rsp_valid && !start, "held off during pass");
      if (i == 19) unit_done = 1;
      @(negedge clk);
    end
    unit_done = 0;
    chk(rsp_valid && rsp_code == RC_PASS_DONE, "pass done response");
    #1 chk(cmd_ready, "ready after pass");
    @(negedge clk);
    cmd_valid = 0;
    chk(rsp_valid && rsp_code == RC_OK && rsp_data == (16'h0001 ^ 16'h5A5A), "held command served");
    @(negedge clk);
    send(OP_START_PASS, 16'h0, 16'h0, RC_OK, 16'h0);
    unit_done = 1;
    @(negedge clk);
    unit_done = 0;
    chk(rsp_valid && rsp_code == RC_PASS_DONE, "second pass done");
    @(negedge clk);
    send(OP_NOP, 16'h0, 16'h0, RC_BAD_OPCODE, 16'h0);
    send(OP_READ_SUM, 16'h0, 16'h0, RC_BAD_OPCODE, 16'h0);
    send(OP_END_OP, 16'h0, 16'h0, RC_END, 16'h0);
    chk(row_off == 0 && col_off == 0, "end clears offsets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
