// tb_convolver_unit: a 16 x 16 unit convolves a random 8-bit image with a
// random signed 3 x 3 mask in nine sequential passes (serial scheme), loading
// the LUT and offsets before each pass, then compares every output word with a
// convolution computed here: g(r,c) = sum m[I][J] * f(r+I-1, c+J-1), indices
// modulo 16. Checks that each pass keeps the unit busy for exactly N*N + 1
// clocks (one preset clock, then one pixel per clock).
module tb_convolver_unit;
  localparam int LOG2N = 4;
  localparam int N = 2**LOG2N;
  localparam int M = 3;
  logic clk = 0, rst_n = 0;
  logic ib_we, lut_we, start, first, busy, done;
  logic [2*LOG2N-1:0] ib_waddr, rd_addr, sum_addr;
  logic [7:0] ib_wdata, lut_waddr;
  logic [15:0] lut_wdata, rd_data, sum_data;
  logic [LOG2N-1:0] row_off, col_off;
  int checks = 0, failures = 0;
  int img [N][N];
  int mask [M][M];

  convolver_unit #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_pass(int mv, int ro, int co, bit f);
    int busy_clocks;
    for (int v = 0; v < 256; v++) begin
      lut_we = 1; lut_waddr = v[7:0]; lut_wdata = 16'(v * mv);
      @(negedge clk);
    end
    lut_we = 0;
    row_off = LOG2N'(ro); col_off = LOG2N'(co);
    start = 1; first = f;
    @(negedge clk);
    start = 0; first = 0;
    busy_clocks = 0;
    while (!done) begin
      if (busy) busy_clocks++;
      @(negedge clk);
    end
    checks++;
    if (busy_clocks != N * N + 1) begin
      failures++;
      $display("pass took %0d busy clocks", busy_clocks);
    end
    @(negedge clk);
  endtask

  initial begin
    ib_we = 0; lut_we = 0; start = 0; first = 0; rd_addr = 0; sum_addr = 0;
    ib_waddr = 0; ib_wdata = 0; lut_waddr = 0; lut_wdata = 0; row_off = 0; col_off = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[r][c] = $urandom_range(0, 255);
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) mask[i][j] = $urandom_range(0, 14) - 7;
    #12 rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      ib_we = 1; ib_waddr = {LOG2N'(r), LOG2N'(c)}; ib_wdata = 8'(img[r][c]);
      @(negedge clk);
    end
    ib_we = 0;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++)
      do_pass(mask[i][j], (M / 2 - i + N) % N, (M / 2 - j + N) % N, (i == 0 && j == 0));
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int exp;
      exp = 0;
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++)
        exp += mask[i][j] * img[(r + i - M / 2 + N) % N][(c + j - M / 2 + N) % N];
      rd_addr = {LOG2N'(r), LOG2N'(c)};
      sum_addr = {LOG2N'(N - 1 - r), LOG2N'(c)};
      #1;
      checks++;
      if (rd_data !== 16'(exp)) begin
        failures++;
        if (failures < 10) $display("g(%0d,%0d) = %0d, want %0d", r, c, $signed(rd_data), exp);
      end
    end
    // second read port
    for (int r = 0; r < N; r++) begin
      int exp;
      exp = 0;
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++)
        exp += mask[i][j] * img[(r + i - M / 2 + N) % N][(3 + j - M / 2 + N) % N];
      sum_addr = {LOG2N'(r), LOG2N'(3)};
      #1;
      checks++;
      if (sum_data !== 16'(exp)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
