// rlc_pkg: types and constants shared by the reversible-logic text cipher.
//
// A message character is an 8-bit ASCII code and the key is applied one
// 8-bit key character per message character, as in the cipher's
// description; both widths are therefore 8. The key-stream LFSR is 8 bits
// wide and uses the primitive polynomial x^8 + x^6 + x^5 + x^4 + 1 (period
// 255). The cipher's description calls for an LFSR but names no
// polynomial, so the polynomial and the LFSR width are this design's
// choice.
package rlc_pkg;

  localparam int unsigned CHAR_W = 8;   // one ASCII character
  localparam int unsigned KEY_W  = 8;   // one key character

  typedef logic [CHAR_W-1:0] char_t;
  typedef logic [KEY_W-1:0]  key_t;

  // Fibonacci LFSR taps, as bit positions of the state (bit 7 is the
  // output end): x^8 + x^6 + x^5 + x^4 + 1 -> state bits 7, 5, 4, 3.
  localparam key_t LFSR_TAPS = 8'b1011_1000;

  // A zero seed would lock the LFSR at zero (key 0 leaves text unencrypted);
  // it is replaced by this value when loaded.
  localparam key_t LFSR_ZERO_SEED_SUBST = 8'h01;

endpackage
