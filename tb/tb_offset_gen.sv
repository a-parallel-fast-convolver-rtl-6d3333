// tb_offset_gen: every index of masks 1..15 (odd) for N = 128 and N = 256
// against (M/2 - I) mod N, plus the worked example: M = 5, element (-2,-2)
// (index 0) gives offset 2; M = 3, index 2 gives N - 1.
module tb_offset_gen;
  logic [3:0] mask_size, index;
  logic [6:0] off7;
  logic [7:0] off8;
  int checks = 0, failures = 0;

  offset_gen #(.LOG2N(7), .IDX_W(4)) dut7 (.mask_size, .index, .offset(off7));
  offset_gen #(.LOG2N(8), .IDX_W(4)) dut8 (.mask_size, .index, .offset(off8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 1; m <= 15; m += 2) begin
      for (int i = 0; i < m; i++) begin
        mask_size = 4'(m); index = 4'(i);
        #1;
        checks += 2;
        if (off7 !== 7'((m / 2 - i + 128) % 128)) failures++;
        if (off8 !== 8'((m / 2 - i + 256) % 256)) begin
          failures++;
          $display("M=%0d I=%0d got %0d", m, i, off8);
        end
      end
    end
    mask_size = 5; index = 0; #1; checks++; if (off7 !== 2) failures++;
    mask_size = 3; index = 2; #1; checks++; if (off8 !== 255) failures++;
    mask_size = 5; index = 3; #1; checks++; if (off7 !== 127) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
