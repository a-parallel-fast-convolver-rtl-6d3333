// convolver_unit: the datapath of one fast convolver board - input buffer,
// product look-up table, output buffer, adder, address counters and the timing
// logic of a pass.
//
// A pass convolves the whole image with one mask value. In each clock of it the
// pixel at the input address is read, used as the index of the look-up table,
// and the product is added to the output buffer word at the offset address
// (input address plus row and column offsets, modulo N); the sum is written back
// at the clock edge. One pass therefore takes N*N clocks (65536 for 256 x 256)
// after one clock of counter preset; 'done' pulses one clock after the last
// write. With 'first' high at 'start' the pass overwrites the output buffer
// instead of adding to it. Since every pixel goes to a different output word,
// the read-modify-write never sees its own earlier result within a pass.
//
// Loading (input buffer, LUT) and the host read port rd_addr/rd_data are meant
// for use between passes; while busy, port A of the output buffer belongs to the
// pass. sum_addr/sum_data is an independent read port for the final summation.
module convolver_unit #(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ib_we,
  input  logic [2*LOG2N-1:0] ib_waddr,
  input  logic [PIX_W-1:0]   ib_wdata,
  input  logic               lut_we,
  input  logic [PIX_W-1:0]   lut_waddr,
  input  logic [ACC_W-1:0]   lut_wdata,
  input  logic [LOG2N-1:0]   row_off,
  input  logic [LOG2N-1:0]   col_off,
  input  logic               start,
  input  logic               first,
  output logic               busy,
  output logic               done,
  input  logic [2*LOG2N-1:0] rd_addr,
  output logic [ACC_W-1:0]   rd_data,
  input  logic [2*LOG2N-1:0] sum_addr,
  output logic [ACC_W-1:0]   sum_data
);
  logic               load, run, tc;
  logic               first_q;
  logic [2*LOG2N-1:0] in_addr, out_addr, ob_raddr;
  logic [PIX_W-1:0]   pixel;
  logic [ACC_W-1:0]   product, partial, new_sum;

  pass_timing u_timing (
    .clk, .rst_n, .start, .tc, .load, .run, .done
  );

  // The first-pass flag is taken with 'start' and held through the pass.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 first_q <= 1'b0;
    else if (start && !busy)    first_q <= first;
  end

  input_addr_gen #(.LOG2N(LOG2N)) u_in_addr (
    .clk, .rst_n, .clear(load), .en(run), .addr(in_addr), .tc
  );

  output_addr_gen #(.LOG2N(LOG2N)) u_out_addr (
    .clk, .rst_n, .load, .en(run), .row_off, .col_off, .addr(out_addr)
  );

  input_buffer #(.LOG2N(LOG2N), .PIX_W(PIX_W)) u_ib (
    .clk, .we(ib_we && !busy), .waddr(ib_waddr), .wdata(ib_wdata),
    .raddr(in_addr), .rdata(pixel)
  );

  product_lut #(.PIX_W(PIX_W), .ACC_W(ACC_W)) u_lut (
    .clk, .we(lut_we && !busy), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(pixel), .rdata(product)
  );

  assign ob_raddr = run ? out_addr : rd_addr;

  output_buffer #(.LOG2N(LOG2N), .ACC_W(ACC_W)) u_ob (
    .clk, .we(run), .waddr(out_addr), .wdata(new_sum),
    .raddr_a(ob_raddr), .rdata_a(partial),
    .raddr_b(sum_addr), .rdata_b(sum_data)
  );

  pp_adder #(.ACC_W(ACC_W)) u_add (
    .product, .partial, .first(first_q), .sum(new_sum)
  );

  assign busy    = load | run;
  assign rd_data = partial;
endmodule
