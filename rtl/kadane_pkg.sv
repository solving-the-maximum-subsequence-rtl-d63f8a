// kadane_pkg: types and constants shared by the maximum-subsequence engines.
//
// The 1D engine (kadane1d) works on 9-bit two's-complement words (8 bits of
// magnitude plus sign) and is sized for streams of up to 65,536 words, which
// gives a 16-bit position counter and a 25-bit accumulator. The 2D engine
// (kadane2d) reuses kadane1d with a wider input word. The Command Unit of the
// 2D engine is a small FSM whose states are defined here.
package kadane_pkg;

  // Word width of an input element: 8 bits plus a sign bit.
  localparam int unsigned WORD_W = 9;

  // 1D stream engine: longest supported stream is 2**IDX_W words.
  localparam int unsigned STREAM_IDX_W = 16;

  // Position counter start value: two below zero, so that the counter reads
  // 0 when the accumulator holds the sum ending at the first element.
  localparam int unsigned CNT_START_OFFSET = 2;

  // Command Unit states.
  //   CMD_IDLE   : waiting for start
  //   CMD_RUN    : one memory word per clock goes through the RowBuffer
  //   CMD_DRAIN  : memory, address generator and RowBuffer held while the
  //                Kadane1D pipeline finishes the row
  //   CMD_UPDATE : Kadane1D result handed to MAX, next row pair selected
  //   CMD_DONE   : all row pairs processed, result stable
  typedef enum logic [2:0] {
    CMD_IDLE   = 3'd0,
    CMD_RUN    = 3'd1,
    CMD_DRAIN  = 3'd2,
    CMD_UPDATE = 3'd3,
    CMD_DONE   = 3'd4
  } cmd_state_t;

  // Number of cycles the Command Unit stays in CMD_DRAIN: one for the memory
  // read latency and two for the Kadane1D pipeline (input buffer, accumulator).
  localparam int unsigned DRAIN_CYCLES = 3;

endpackage
