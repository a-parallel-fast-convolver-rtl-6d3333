// tb_output_addr_gen: with N = 128 checks the worked example of the address
// mapping (offsets 2,2: (0,0)->(2,2), (127,10)->(1,12), (127,127)->(1,1)) and
// then, for several offset pairs, that every one of the N*N output addresses
// equals ((r + row_off) mod N, (c + col_off) mod N) for input (r, c).
module tb_output_addr_gen;
  localparam int LOG2N = 7;
  localparam int N = 2**LOG2N;
  logic clk = 0, rst_n = 0, load, en;
  logic [LOG2N-1:0] row_off, col_off;
  logic [2*LOG2N-1:0] addr;
  int checks = 0, failures = 0;

  output_addr_gen #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  task automatic run_pass(int ro, int co, bit example);
    row_off = LOG2N'(ro); col_off = LOG2N'(co);
    load = 1; en = 0;
    @(negedge clk);
    load = 0; en = 1;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        int er, ec;
        er = (r + ro) % N; ec = (c + co) % N;
        checks++;
        if (addr !== {LOG2N'(er), LOG2N'(ec)}) begin
          failures++;
          if (failures < 10) $display("in (%0d,%0d) off (%0d,%0d): got (%0d,%0d)",
                                      r, c, ro, co, addr[2*LOG2N-1:LOG2N], addr[LOG2N-1:0]);
        end
        if (example) begin
          if (r == 0 && c == 0)     begin checks++; if (addr !== {7'd2, 7'd2})  failures++; end
          if (r == 127 && c == 10)  begin checks++; if (addr !== {7'd1, 7'd12}) failures++; end
          if (r == 127 && c == 127) begin checks++; if (addr !== {7'd1, 7'd1})  failures++; end
        end
        @(negedge clk);
      end
    end
    en = 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; row_off = 0; col_off = 0;
    #12 rst_n = 1;
    @(negedge clk);
    run_pass(2, 2, 1);
    run_pass(0, 0, 0);
    run_pass(N - 1, 1, 0);
    run_pass(5, N - 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
