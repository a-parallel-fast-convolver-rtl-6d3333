// tb_partial_products: the two-pass partial-product example. A 6 x 6 image
// (held in the top-left corner of an 8 x 8 unit, the rest zero) is run through
// two passes: mask element m(-1,-1) = -1 with offsets (1,1), then m(-1,0) = -2
// with offsets (1,0). After the first pass the output buffer holds -f shifted
// by (1,1); after the second, output (1,1) must be p1(0,0) + p2(0,1) =
// -f(0,0) - 2 f(0,1), the two horizontally adjacent mask products of the
// pixel pair under the mask, and every other word the matching sum.
module tb_partial_products;
  localparam int LOG2N = 3;
  localparam int N = 2**LOG2N;
  logic clk = 0, rst_n = 0;
  logic ib_we, lut_we, start, first, busy, done;
  logic [2*LOG2N-1:0] ib_waddr, rd_addr, sum_addr;
  logic [7:0] ib_wdata, lut_waddr;
  logic [15:0] lut_wdata, rd_data, sum_data;
  logic [LOG2N-1:0] row_off, col_off;
  int checks = 0, failures = 0;
  int img [N][N];
  int f6 [6][6] = '{'{1, 1, 2, 2, 2, 2}, '{1, 0, 2, 2, 2, 2}, '{4, 4, 3, 3, 3, 2},
                    '{4, 5, 3, 3, 0, 0}, '{0, 0, 0, 0, 0, 0}, '{0, 0, 0, 0, 0, 0}};

  convolver_unit #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  task automatic do_pass(int mv, int ro, int co, bit f);
    for (int v = 0; v < 256; v++) begin
      lut_we = 1; lut_waddr = v[7:0]; lut_wdata = 16'(v * mv);
      @(negedge clk);
    end
    lut_we = 0;
    row_off = LOG2N'(ro); col_off = LOG2N'(co);
    start = 1; first = f;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic int pix(int r, int c);
    return img[(r + N) % N][(c + N) % N];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ib_we = 0; lut_we = 0; start = 0; first = 0; rd_addr = 0; sum_addr = 0;
    ib_waddr = 0; ib_wdata = 0; lut_waddr = 0; lut_wdata = 0; row_off = 0; col_off = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[r][c] = (r < 6 && c < 6) ? f6[r][c] : 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      ib_we = 1; ib_waddr = {LOG2N'(r), LOG2N'(c)}; ib_wdata = 8'(img[r][c]);
      @(negedge clk);
    end
    ib_we = 0;
    do_pass(-1, 1, 1, 1'b1);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      rd_addr = {LOG2N'(r), LOG2N'(c)};
      #1 checks++;
      if ($signed(rd_data) != -pix(r - 1, c - 1)) failures++;
    end
    do_pass(-2, 1, 0, 1'b0);
    rd_addr = {LOG2N'(1), LOG2N'(1)};
    #1 checks++;
    if ($signed(rd_data) != -1 * f6[0][0] + -2 * f6[0][1]) begin
      failures++;
      $display("output (1,1) = %0d", $signed(rd_data));
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      rd_addr = {LOG2N'(r), LOG2N'(c)};
      #1 checks++;
      if ($signed(rd_data) != -pix(r - 1, c - 1) - 2 * pix(r - 1, c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
