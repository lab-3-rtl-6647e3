// rle_pkg: types and constants shared by the run-length encoder and its
// testbenches.
//
// The encoder reads the bit stream in 8-bit segments and emits 24-bit words:
// bit 23 is the bit ID (the value of the run) and bits 22:0 the run length.
// The controller has nine states held in a 4-bit state register. The state
// names and the 4-bit width follow the encoder's specification; the numeric
// encoding (INIT = 0 ... RESET_COUNT = 8, in the order the states are
// described) is this design's own choice.
package rle_pkg;

  localparam int unsigned RLE_SEG_WIDTH   = 8;   // input segment width
  localparam int unsigned RLE_COUNT_WIDTH = 23;  // run-length field width

  typedef enum logic [3:0] {
    INIT          = 4'd0,
    REQUEST_INPUT = 4'd1,
    WAIT_INPUT    = 4'd2,
    READ_INPUT    = 4'd3,
    COUNT_BITS    = 4'd4,
    SHIFT_BITS    = 4'd5,
    COUNT_DONE    = 4'd6,
    WAIT_OUTPUT   = 4'd7,
    RESET_COUNT   = 4'd8
  } rle_state_e;

endpackage
