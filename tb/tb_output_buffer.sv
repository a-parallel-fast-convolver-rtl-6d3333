// tb_output_buffer: writes a pattern to all 256 x 256 words, reads them back on
// both read ports at different addresses in the same clock, and checks that a
// disabled write changes nothing.
module tb_output_buffer;
  localparam int LOG2N = 8;
  localparam int ACC_W = 16;
  logic clk = 0;
  logic we;
  logic [2*LOG2N-1:0] waddr, raddr_a, raddr_b;
  logic [ACC_W-1:0] wdata, rdata_a, rdata_b;
  int checks = 0, failures = 0;

  output_buffer #(.LOG2N(LOG2N), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [ACC_W-1:0] pat(int a);
    return ACC_W'(a * 40503 + 7);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    @(negedge clk);
    for (int a = 0; a < 2**(2*LOG2N); a++) begin
      we = 1; waddr = a[2*LOG2N-1:0]; wdata = pat(a);
      @(negedge clk);
    end
    we = 0; waddr = 16'd9; wdata = 16'h1234;
    @(negedge clk);
    for (int a = 0; a < 2**(2*LOG2N); a++) begin
      int b;
      b = (2**(2*LOG2N) - 1) - a;
      raddr_a = a[2*LOG2N-1:0];
      raddr_b = b[2*LOG2N-1:0];
      #1;
      checks += 2;
      if (rdata_a !== pat(a)) failures++;
      if (rdata_b !== pat(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
