// tb_input_buffer: fills the whole 256 x 256 image memory with a pattern made
// from the address, then reads every location back and compares; also checks
// that a read in the clock of a write still shows the old value and that a
// disabled write leaves the memory alone.
module tb_input_buffer;
  localparam int LOG2N = 8;
  localparam int PIX_W = 8;
  logic clk = 0;
  logic we;
  logic [2*LOG2N-1:0] waddr, raddr;
  logic [PIX_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  input_buffer #(.LOG2N(LOG2N), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [PIX_W-1:0] pat(int a);
    return PIX_W'((a * 37) ^ (a >> 8));
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk);
    for (int a = 0; a < 2**(2*LOG2N); a++) begin
      we = 1; waddr = a[2*LOG2N-1:0]; wdata = pat(a);
      @(negedge clk);
    end
    // disabled write
    we = 0; waddr = 16'd5; wdata = ~pat(5);
    @(negedge clk);
    for (int a = 0; a < 2**(2*LOG2N); a++) begin
      raddr = a[2*LOG2N-1:0];
      #1;
      checks++;
      if (rdata !== pat(a)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: %h vs %h", a, rdata, pat(a));
      end
    end
    // read during write shows the old value until the edge
    @(negedge clk);
    raddr = 16'd77; we = 1; waddr = 16'd77; wdata = 8'hA5;
    #1; checks++; if (rdata !== pat(77)) failures++;
    @(negedge clk); we = 0;
    #1; checks++; if (rdata !== 8'hA5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
