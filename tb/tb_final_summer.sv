// tb_final_summer: random signed words from K = 9 boards, including all
// extreme values, against an integer sum; checks the one-clock latency and
// that the output holds when in_valid is low.
module tb_final_summer;
  localparam int K = 9;
  localparam int ACC_W = 16;
  localparam int SUM_W = ACC_W + $clog2(K);
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  logic [K-1:0][ACC_W-1:0] parts;
  logic [SUM_W-1:0] sum;
  int checks = 0, failures = 0;

  final_summer #(.K(K), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; parts = '0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      int exp;
      exp = 0;
      for (int k = 0; k < K; k++) begin
        case (t)
          0: parts[k] = 16'h8000;
          1: parts[k] = 16'h7FFF;
          default: parts[k] = 16'($urandom);
        endcase
        exp += int'($signed(parts[k]));
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      parts = '1;
      checks++;
      if (!out_valid || $signed(sum) != exp) begin
        failures++;
        $display("t=%0d got %0d want %0d", t, $signed(sum), exp);
      end
      @(negedge clk);
      checks++;
      if (out_valid || $signed(sum) != exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
