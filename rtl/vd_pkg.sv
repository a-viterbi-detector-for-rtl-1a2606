// vd_pkg: constants and types shared by the class IV partial response
// Viterbi detector and its measurement chain.
//
// Samples are offset binary codes of SAMPLE_W bits covering the signal range
// -2 .. +2 uniformly: code = floor((y + 2) * 2^SAMPLE_W / 4), clipped to the
// code range. A difference of two signal units is then 2^(SAMPLE_W-1) codes,
// so the comparator of the Viterbi logic only needs the carry and the msb of
// the subtraction. The path memory is built from shifters of SHIFTER_LEN bits;
// NUM_SHIFTERS of them give the 28-bit path memory of the detector. The test
// sequence is the maximum-length sequence of 1 + x^3 + x^31.
// The constants serve as parameter defaults of the modules; nothing inside
// the package refers to them.
package vd_pkg;

  // Quantisation: 7-bit A/D converter.
  localparam int unsigned SAMPLE_W     = 7;

  // Path memory: two shifters of 14 bits each (28 bits).
  localparam int unsigned SHIFTER_LEN  = 14;
  localparam int unsigned NUM_SHIFTERS = 2;

  // Pseudo-random sequence polynomial 1 + x^PRS_TAP + x^PRS_LEN.
  localparam int unsigned PRS_LEN      = 31;
  localparam int unsigned PRS_TAP      = 3;

  // Run of error-free multiplier outputs after which the multiple-error
  // canceller of the error detector is cleared.
  localparam int unsigned CANCEL_ZEROS = 64;

  // Capture memory: 2^24 entries of 2 bits (threshold and Viterbi error
  // flags) = 32 Mbit.
  localparam int unsigned CAPTURE_AW   = 24;

  // Two implementations of the path memory.
  //   RAM_POINTER : controller with a pointer and shifters with a settable bit
  //   RAM_EXCHANGE: two parallel registers that copy each other
  typedef enum logic {RAM_POINTER = 1'b0, RAM_EXCHANGE = 1'b1} ram_style_e;

endpackage
