// tb_pass_timing: runs the state machine against a model of the input counter
// (terminal count after N*N run clocks, N = 16) and checks that start gives one
// load clock, that run lasts exactly N*N clocks, that done pulses once right
// after, and that a start during a pass is ignored.
module tb_pass_timing;
  localparam int NN = 256;
  logic clk = 0, rst_n = 0, start, tc, load, run, done;
  int cnt, checks = 0, failures = 0;

  pass_timing dut (.*);

  always #5 clk = ~clk;

  // counter model
  always_ff @(posedge clk) begin
    if (load) cnt <= 0;
    else if (run) cnt <= cnt + 1;
  end
  assign tc = (cnt == NN - 1);

  task automatic one_pass(bit poke);
    int runs, loads, dones;
    runs = 0; loads = 0; dones = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    checks++; if (!load || run) failures++;
    for (int i = 0; i < NN + 5; i++) begin
      if (poke && i == 20) start = 1;
      if (poke && i == 21) start = 0;
      if (run) runs++;
      if (load) loads++;
      if (done) dones++;
      if (done && i != NN + 1) failures++;
      @(negedge clk);
    end
    checks += 3;
    if (runs != NN) begin failures++; $display("run clocks %0d", runs); end
    if (loads != 1) failures++;
    if (dones != 1) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cnt = 0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++; if (load || run || done) failures++;
    one_pass(0);
    one_pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
