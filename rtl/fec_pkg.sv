// fec_pkg: constants, types and helpers shared by the diffuse-code codec.
//
// The code is the rate-1/2 systematic diffuse threshold-decodable convolutional
// code: each information bit i_n is sent together with the parity bit
//   p_n = i_n ^ i_(n-beta) ^ i_(n-2beta) ^ i_(n-3beta-1)
// so the encoder and decoder each hold a shift register of 3*beta+1 bits.
// The spread beta is chosen at run time from four switch settings
// (4, 8, 12, 16), as on the original codec board; the registers are sized
// for the largest setting. The two-bit code of the selector is this design's
// own choice.
package fec_pkg;

  // Largest spread the hardware is sized for.
  localparam int unsigned BETA_MAX = 16;

  // Shift register length control (the four switch positions).
  typedef enum logic [1:0] {
    BETA_4  = 2'd0,
    BETA_8  = 2'd1,
    BETA_12 = 2'd2,
    BETA_16 = 2'd3
  } beta_sel_e;

  // Spread selected by a switch setting.
  function automatic int unsigned beta_of(input beta_sel_e sel);
    return 4 * (int'(sel) + 1);
  endfunction

  // Message overhead in information slots: 3*beta+1, plus one slot when the
  // two-bit parity delay is switched in (the last parity bit leaves one
  // information slot later).
  function automatic int unsigned flush_len(input beta_sel_e sel, input logic pdly);
    return 3 * beta_of(sel) + 1 + (pdly ? 1 : 0);
  endfunction

endpackage
