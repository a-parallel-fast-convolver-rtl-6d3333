// pc_scenario: one end-to-end run of the K-parallel convolver, used by
// tb_parallel_convolver for several mask and board counts. K boards of N x N
// (N = 2**LOG2N) convolve a random 8-bit image with a random signed M x M mask,
// each board running M*M/K passes (K must divide M*M, K >= 2).
//   1. The image is broadcast to every input buffer.
//   2. For each round p, every board gets the LUT and offsets of its mask
//      element k*(M*M/K) + p (direct offsets for even elements, mask-index form
//      for odd ones), then one broadcast start-pass runs the K passes at once;
//      the first round overwrites the output buffers, later rounds add to them.
//   3. Read-sum returns every pixel, compared with a convolution computed here,
//      g(r,c) = sum m[I][J] * f(r+I-M/2, c+J-M/2) modulo N; board 0's own
//      output buffer is read back on some rows and compared with its share.
// It also sends an unknown opcode, an end-of-operation, and a read to board 1
// while board 1 runs a pass (it must wait for ready). Each mechanism is counted
// and one that never happened counts as a failure. A parallel round must take
// N*N + 3 clocks, the same as a single pass. 'finished' rises at the end.
module pc_scenario #(
  parameter int K     = 3,
  parameter int LOG2N = 4,
  parameter int M     = 3
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import fc_pkg::*;
  localparam int N = 2**LOG2N;
  localparam int PER = M * M / K;
  localparam int SUM_W = 16 + $clog2(K);
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, sum_valid;
  host_cmd_t cmd;
  logic [K-1:0] rsp_valid;
  retcode_t [K-1:0] rsp_code;
  logic [K-1:0][15:0] rsp_data;
  logic [SUM_W-1:0] sum_data;
  int img [N][N];
  int mask [M][M];
  int n_bcast = 0, n_first = 0, n_accum = 0, n_wrap = 0, n_direct_off = 0, n_index_off = 0,
      n_stall = 0, n_parallel = 0, n_sum = 0, n_bad = 0, n_end = 0;

  parallel_convolver #(.K(K), .LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL (M=%0d K=%0d N=%0d): %s", M, K, N, what);
    end
  endtask

  // Issue one command and wait until every addressed board has answered (or
  // the sum is out). Returns the answer of the lowest addressed board.
  task automatic host(opcode_t op, int board, bit bcast, logic [15:0] a, logic [15:0] d,
                      output retcode_t rc, output logic [SUM_W-1:0] rd, output int clocks);
    logic [K-1:0] want, got;
    cmd = '{opcode: op, board: 4'(board), bcast: bcast, addr: a, data: d};
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin n_stall++; @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    clocks = 1;
    rc = RC_OK; rd = '0;
    if (op == OP_READ_SUM) begin
      chk(sum_valid, "sum one clock after read-sum");
      rd = sum_data;
      return;
    end
    for (int k = 0; k < K; k++) want[k] = bcast || (k == board);
    got = '0;
    while (1) begin
      for (int k = K - 1; k >= 0; k--) if (want[k] && rsp_valid[k]) begin
        got[k] = 1'b1; rc = rsp_code[k]; rd = SUM_W'(rsp_data[k]);
      end
      if (got == want) break;
      @(negedge clk);
      clocks++;
    end
  endtask

  initial begin
    retcode_t rc;
    logic [SUM_W-1:0] rd;
    int clocks;
    cmd_valid = 0; cmd = '0; finished = 0; checks = 0; failures = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[r][c] = $urandom_range(0, 255);
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) mask[i][j] = $urandom_range(0, 20) - 10;
    #12 rst_n = 1;
    @(negedge clk);
    host(OP_NOP, 0, 1'b1, 16'h0, 16'h0, rc, rd, clocks);
    chk(rc == RC_BAD_OPCODE, "bad opcode answered");
    if (rc == RC_BAD_OPCODE) n_bad++;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      host(OP_LOAD_INPUT, 0, 1'b1, 16'({r[LOG2N-1:0], c[LOG2N-1:0]}), 16'(img[r][c]), rc, rd, clocks);
      n_bcast++;
    end
    for (int p = 0; p < PER; p++) begin
      for (int k = 0; k < K; k++) begin
        int e, i, j, ro, co;
        e = k * PER + p; i = e / M; j = e % M;
        ro = (M / 2 - i + N) % N; co = (M / 2 - j + N) % N;
        if (ro != 0 || co != 0) n_wrap++;   // some pixels land across a border
        for (int v = 0; v < 256; v++) host(OP_LOAD_LUT, k, 1'b0, 16'(v), 16'(v * mask[i][j]), rc, rd, clocks);
        if (e % 2 == 0) begin
          host(OP_LOAD_OFFSETS, k, 1'b0, 16'h0000, 16'({LOG2N'(ro), LOG2N'(co)}), rc, rd, clocks);
          n_direct_off++;
        end else begin
          host(OP_LOAD_OFFSETS, k, 1'b0, 16'h8000, 16'({4'(M), 4'(i), 4'(j)}), rc, rd, clocks);
          n_index_off++;
        end
        chk(rc == RC_OK, "offsets loaded");
      end
      host(OP_START_PASS, 0, 1'b1, 16'h0, 16'((p == 0) ? 1 : 0), rc, rd, clocks);
      chk(rc == RC_PASS_DONE && clocks == N * N + 3, $sformatf("parallel round %0d: %0d clocks", p, clocks));
      n_parallel++;
      if (p == 0) n_first++; else n_accum++;
    end
    // A pass on board 1 alone, with a read of board 1 queued right behind it:
    // the read must wait for cmd_ready. The pass adds zero (all-zero LUT), so
    // board 1 keeps its share.
    begin
      for (int v = 0; v < 256; v++) host(OP_LOAD_LUT, 1, 1'b0, 16'(v), 16'h0, rc, rd, clocks);
      cmd = '{opcode: OP_START_PASS, board: 4'd1, bcast: 1'b0, addr: 16'h0, data: 16'h0};
      cmd_valid = 1;
      @(negedge clk);
      host(OP_READ_OUTPUT, 1, 1'b0, 16'h0, 16'h0, rc, rd, clocks);
      chk(n_stall >= N * N, "command waited for the pass");
      chk(rc == RC_OK, "queued read answered");
      n_accum++;
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int exp, exp0;
      exp = 0; exp0 = 0;
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin
        int t;
        t = mask[i][j] * img[(r + i - M / 2 + N) % N][(c + j - M / 2 + N) % N];
        exp += t;
        if ((i * M + j) / PER == 0) exp0 += t;
      end
      host(OP_READ_SUM, 0, 1'b0, 16'({r[LOG2N-1:0], c[LOG2N-1:0]}), 16'h0, rc, rd, clocks);
      n_sum++;
      chk($signed(rd) == exp, $sformatf("g(%0d,%0d) = %0d, want %0d", r, c, $signed(rd), exp));
      if (r % 5 == 0) begin
        host(OP_READ_OUTPUT, 0, 1'b0, 16'({r[LOG2N-1:0], c[LOG2N-1:0]}), 16'h0, rc, rd, clocks);
        chk(rc == RC_OK && rd[15:0] == 16'(exp0), "board 0 share");
      end
    end
    host(OP_END_OP, 0, 1'b1, 16'h0, 16'h0, rc, rd, clocks);
    chk(rc == RC_END, "end of operation");
    if (rc == RC_END) n_end++;
    $display("M=%0d K=%0d N=%0d mechanisms: broadcast=%0d first=%0d accumulate=%0d wrap=%0d direct_off=%0d index_off=%0d stall=%0d parallel=%0d sum=%0d bad=%0d end=%0d",
             M, K, N, n_bcast, n_first, n_accum, n_wrap, n_direct_off, n_index_off, n_stall, n_parallel, n_sum, n_bad, n_end);
    chk(n_bcast > 0, "broadcast happened");
    chk(n_first > 0, "first pass happened");
    chk(n_accum > 0, "accumulating pass happened");
    chk(n_wrap > 0, "wrap-around happened");
    chk(n_direct_off > 0, "direct offsets happened");
    chk(n_index_off > 0, "index offsets happened");
    chk(n_stall > 0, "ready stall happened");
    chk(n_parallel > 0, "parallel pass happened");
    chk(n_sum > 0, "read-sum happened");
    chk(n_bad > 0, "bad opcode happened");
    chk(n_end > 0, "end of operation happened");
    finished = 1;
  end
endmodule
