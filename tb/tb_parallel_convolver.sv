// tb_parallel_convolver: end-to-end tests of the K-parallel convolver, each a
// full convolution through the host port (see pc_scenario):
//   3 x 3 mask on K = 3 boards of 16 x 16 (3 passes per board),
//   5 x 5 mask on K = 5 boards of 32 x 32 (5 passes per board),
//  11 x 11 mask on K = 11 boards of 32 x 32 (11 passes per board).
// The 5 x 5 and 11 x 11 runs use offsets of N-2 and below, which only masks
// larger than 3 x 3 have.
module tb_parallel_convolver;
  logic [2:0] fin;
  int c [3];
  int f [3];

  pc_scenario #(.K(3),  .LOG2N(4), .M(3))  s3  (.finished(fin[0]), .checks(c[0]), .failures(f[0]));
  pc_scenario #(.K(5),  .LOG2N(5), .M(5))  s5  (.finished(fin[1]), .checks(c[1]), .failures(f[1]));
  pc_scenario #(.K(11), .LOG2N(5), .M(11)) s11 (.finished(fin[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    #50000000;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    wait (fin === 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
