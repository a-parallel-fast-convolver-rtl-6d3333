// fc_pkg: types and constants shared by the fast convolver.
//
// The host talks to each board with a command word: an opcode, a board number
// with a broadcast flag (used only by the multi-board top), a 16-bit address and
// a 16-bit data word. The six board opcodes are those a board of this kind needs
// (load input buffer, start pass, load LUT, read output buffer, load row- and
// column-offsets, end of operation); READ_SUM is handled by the multi-board top.
// The numeric encodings and return codes are this design's own choice.
package fc_pkg;

  typedef enum logic [2:0] {
    OP_NOP          = 3'd0,  // not a valid command: answered with RC_BAD_OPCODE
    OP_LOAD_INPUT   = 3'd1,  // addr = pixel address {row,col}, data[7:0] = pixel
    OP_START_PASS   = 3'd2,  // data[0] = 1: first pass, overwrite the output buffer
    OP_LOAD_LUT     = 3'd3,  // addr[7:0] = pixel value, data = product
    OP_READ_OUTPUT  = 3'd4,  // addr = pixel address, answer carries the value
    OP_LOAD_OFFSETS = 3'd5,  // see board_controller for the two formats
    OP_END_OP       = 3'd6,  // end of operation
    OP_READ_SUM     = 3'd7   // top only: sum of all output buffers at addr
  } opcode_t;

  typedef enum logic [2:0] {
    RC_OK         = 3'd0,
    RC_BAD_OPCODE = 3'd2,
    RC_PASS_DONE  = 3'd3,  // the pass started earlier has ended
    RC_END        = 3'd4   // end of operation acknowledged
  } retcode_t;

  typedef struct packed {
    opcode_t     opcode;
    logic [3:0]  board;   // board number in the multi-board top
    logic        bcast;   // 1: every board takes the command
    logic [15:0] addr;
    logic [15:0] data;
  } host_cmd_t;

endpackage
