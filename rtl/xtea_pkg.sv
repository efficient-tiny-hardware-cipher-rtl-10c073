// xtea_pkg: constants and types shared by the sequential XTEA core.
//
// XTEA works on a 64-bit block split into two 32-bit words (Left, Right) and a
// 128-bit key split into four 32-bit subkeys. Every Feistel cycle adds the
// constant DELTA to a running sum; after 32 cycles the sum of encryption ends
// at 32*DELTA mod 2^32, which is where decryption starts.
//
// The controller has the four states of the design: IDLE, BUSY_KEY, BUSY_ENC
// and BUSY_DEC. Their codes 0, 1, 2 and 3 are the values the state register
// shows in the design's simulation traces. The priority among commands and
// everything else not fixed by those traces are this design's own choices
// (see the modules that use them).
package xtea_pkg;

  // Key-schedule constant of XTEA, floor(2^32 / golden ratio).
  localparam logic [31:0] DELTA = 32'h9E37_79B9;

  typedef logic [31:0] word_t;
  typedef logic [3:0][31:0] key_t;  // key_t[i] is subkey K[i]

  typedef enum logic [1:0] {
    IDLE     = 2'd0,
    BUSY_KEY = 2'd1,
    BUSY_ENC = 2'd2,
    BUSY_DEC = 2'd3
  } state_t;

  // Start value of the running sum for decryption after `cycles` Feistel cycles.
  function automatic word_t dec_sum_init(input int unsigned cycles);
    return word_t'(DELTA * cycles);
  endfunction

endpackage
