// tb_product_lut: loads the table for several signed mask values (v * m for
// v = 0..255) and checks every entry, reloading between mask values as a
// sequence of passes does.
module tb_product_lut;
  localparam int PIX_W = 8;
  localparam int ACC_W = 16;
  logic clk = 0;
  logic we;
  logic [PIX_W-1:0] waddr, raddr;
  logic [ACC_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  int masks [4] = '{-1, -2, 7, 100};

  product_lut #(.PIX_W(PIX_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    foreach (masks[i]) begin
      @(negedge clk);
      for (int v = 0; v < 256; v++) begin
        we = 1; waddr = v[7:0]; wdata = ACC_W'(v * masks[i]);
        @(negedge clk);
      end
      we = 0;
      for (int v = 255; v >= 0; v--) begin
        raddr = v[7:0];
        #1;
        checks++;
        if (rdata !== ACC_W'(v * masks[i])) begin
          failures++;
          $display("mask %0d v %0d: got %0d", masks[i], v, $signed(rdata));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
