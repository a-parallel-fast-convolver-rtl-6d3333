// tb_serial_convolution: the serial scheme at full size. One board at its
// default size (256 x 256 pixels) convolves a random 8-bit image with a random
// signed 3 x 3 mask in nine sequential passes, driven only through host
// commands, and every output pixel is read back and compared with a
// convolution computed here (borders wrap modulo 256). Each pass must take
// 65536 pixel clocks (N*N + 3 clocks from start-pass to its answer); at the
// board's 800 ns clock the nine passes come to 9 x 65536 x 800 ns = 471.9 ms,
// which the test prints.
module tb_serial_convolution;
  import fc_pkg::*;
  localparam int LOG2N = 8;
  localparam int N = 2**LOG2N;
  localparam int M = 3;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  host_cmd_t cmd;
  retcode_t rsp_code;
  logic [15:0] rsp_data, sum_data;
  logic [2*LOG2N-1:0] sum_addr;
  int checks = 0, failures = 0;
  int img [N][N];
  int mask [M][M];

  convolver_board dut (.*);

  always #5 clk = ~clk;

  // Issue one command (waiting for ready) and wait for its response.
  task automatic host(opcode_t op, logic [15:0] a, logic [15:0] d,
                      output retcode_t rc, output logic [15:0] rd, output int clocks);
    cmd = '{opcode: op, board: 4'd0, bcast: 1'b0, addr: a, data: d};
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    clocks = 1;
    while (!rsp_valid) begin @(negedge clk); clocks++; end
    rc = rsp_code; rd = rsp_data;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    retcode_t rc;
    logic [15:0] rd;
    int clocks;
    cmd_valid = 0; cmd = '0; sum_addr = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[r][c] = $urandom_range(0, 255);
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) mask[i][j] = $urandom_range(0, 20) - 10;
    #12 rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      host(OP_LOAD_INPUT, 16'({r[LOG2N-1:0], c[LOG2N-1:0]}), 16'(img[r][c]), rc, rd, clocks);
      if (rc != RC_OK) failures++;
    end
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin
      for (int v = 0; v < 256; v++) host(OP_LOAD_LUT, 16'(v), 16'(v * mask[i][j]), rc, rd, clocks);
      host(OP_LOAD_OFFSETS, 16'h8000, 16'({4'(M), 4'(i), 4'(j)}), rc, rd, clocks);
      host(OP_START_PASS, 16'h0, 16'((i == 0 && j == 0) ? 1 : 0), rc, rd, clocks);
      checks++;
      if (rc != RC_PASS_DONE || clocks != N * N + 3) begin
        failures++;
        $display("pass %0d,%0d: rc %s after %0d clocks", i, j, rc.name(), clocks);
      end
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int exp;
      exp = 0;
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++)
        exp += mask[i][j] * img[(r + i - M / 2 + N) % N][(c + j - M / 2 + N) % N];
      host(OP_READ_OUTPUT, 16'({r[LOG2N-1:0], c[LOG2N-1:0]}), 16'h0, rc, rd, clocks);
      checks++;
      if (rc != RC_OK || rd !== 16'(exp)) begin
        failures++;
        if (failures < 10) $display("g(%0d,%0d) = %0d, want %0d", r, c, $signed(rd), exp);
      end
      sum_addr = {r[LOG2N-1:0], c[LOG2N-1:0]};
      #1;
      checks++;
      if (sum_data !== 16'(exp)) failures++;
    end
    $display("nine passes: %0d pixel clocks = %0.1f ms at 1.25 MHz", 9 * N * N, 9.0 * N * N * 0.0008);
    host(OP_END_OP, 16'h0, 16'h0, rc, rd, clocks);
    checks++; if (rc != RC_END) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
