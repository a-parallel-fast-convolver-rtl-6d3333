// pass_timing: the timing logic of one pass.
//
// A pass processes one pixel per clock. A 'start' pulse while idle gives one
// 'load' clock, in which the address counters are preset, and then 'run' stays
// high for exactly N*N clocks: in each of them a pixel is read, looked up,
// added and written. The pass ends on the clock in which the input counter
// shows its terminal count; 'done' pulses for one clock right after it.
// 'start' while a pass is loading or running is ignored. On the board the
// strobes inside each clock came from monostables; here the memories read
// asynchronously and write on the clock edge, so this synchronous state machine
// is all the timing needed (this design's choice).
module pass_timing (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic tc,
  output logic load,
  output logic run,
  output logic done
);
  typedef enum logic [1:0] {IDLE, LOAD, RUN} state_t;
  state_t state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: if (start) state_q <= LOAD;
        LOAD: state_q <= RUN;
        RUN:  if (tc) begin
                state_q <= IDLE;
                done    <= 1'b1;
              end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign load = (state_q == LOAD);
  assign run  = (state_q == RUN);
endmodule
