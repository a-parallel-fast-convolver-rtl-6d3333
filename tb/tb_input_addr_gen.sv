// tb_input_addr_gen: counts through a full 256 x 256 pass and checks the
// address every clock, that the terminal count is high exactly at N*N-1, that
// the counter wraps to 0 after it and that clear and hold work.
module tb_input_addr_gen;
  localparam int LOG2N = 8;
  logic clk = 0, rst_n = 0, clear, en, tc;
  logic [2*LOG2N-1:0] addr;
  int checks = 0, failures = 0, tc_seen = 0;

  input_addr_gen #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++; if (addr !== 0) failures++;
    en = 1;
    for (int i = 0; i < 2**(2*LOG2N); i++) begin
      checks++;
      if (addr !== i[2*LOG2N-1:0] || tc !== (i == 2**(2*LOG2N) - 1)) failures++;
      if (tc) tc_seen++;
      @(negedge clk);
    end
    checks++; if (addr !== 0 || tc_seen != 1) failures++;
    repeat (10) @(negedge clk);
    en = 0;
    repeat (3) @(negedge clk);
    checks++; if (addr !== 10) failures++;
    clear = 1; en = 1;
    @(negedge clk);
    clear = 0;
    checks++; if (addr !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
