// tb_pp_adder: random and corner-case operands, accumulate and first-pass
// modes, against a plain modulo-2^16 sum.
module tb_pp_adder;
  localparam int ACC_W = 16;
  logic [ACC_W-1:0] product, partial, sum;
  logic first;
  int checks = 0, failures = 0;

  pp_adder #(.ACC_W(ACC_W)) dut (.*);

  task automatic check(logic [ACC_W-1:0] p, logic [ACC_W-1:0] q, logic f);
    logic [ACC_W-1:0] exp;
    product = p; partial = q; first = f;
    #1;
    exp = f ? p : ACC_W'(p + q);
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("p=%h q=%h first=%b: got %h want %h", p, q, f, sum, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'h0001, 0);
    check(16'h000F, 16'h0001, 0);
    check(16'h00FF, 16'h0001, 0);
    check(16'h0FFF, 16'h0001, 0);
    check(16'h7FFF, 16'h7FFF, 0);
    check(16'hFFFE, 16'hFFFF, 0);
    check(16'h1234, 16'hFFFF, 1);
    for (int i = 0; i < 5000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
