// lfsr_pkg - constants shared by the LFSR and SRAM random number generator.
//
// max_taps(n) returns the feedback tap mask of a maximal-length Fibonacci
// LFSR of n stages in the right-shifting form used throughout this design:
// the state shifts right, bit 0 is the output bit and the new bit n-1 is the
// XOR of the state bits whose mask bit is set. Bit i of the mask is set for
// each term x^(n-t) of a primitive polynomial, i.e. tap t (counted 1..n from
// the output end of the classic tap tables) maps to state bit n-t. The
// polynomials are standard primitive ones; the document does not list taps.
//   n=6 : x^6+x^5+1              n=8 : x^8+x^6+x^5+x^4+1
//   n=10: x^10+x^7+1             n=16: x^16+x^15+x^13+x^4+1
//   n=32: x^32+x^22+x^2+x+1
// Any other n in 2..32 falls back to a table of primitive trinomials or
// small polynomials listed below.
package lfsr_pkg;

  localparam int unsigned MAX_WIDTH = 32;

  // Word width and depth of each SRAM bank (synthesis report: 8-bit words,
  // 64-to-1 read multiplexers).
  localparam int unsigned WORD_W  = 8;
  localparam int unsigned DEPTH   = 64;

  // Tap positions t (1..n) of a primitive polynomial of degree n, as a
  // list of up to four taps, the first always n.
  function automatic logic [MAX_WIDTH-1:0] taps_to_mask(int unsigned n,
      int unsigned t1, int unsigned t2, int unsigned t3, int unsigned t4);
    logic [MAX_WIDTH-1:0] m;
    m = '0;
    if (t1 != 0) m[n-t1] = 1'b1;
    if (t2 != 0) m[n-t2] = 1'b1;
    if (t3 != 0) m[n-t3] = 1'b1;
    if (t4 != 0) m[n-t4] = 1'b1;
    return m;
  endfunction

  function automatic logic [MAX_WIDTH-1:0] max_taps(int unsigned n);
    case (n)
      2:  return taps_to_mask(n, 2, 1, 0, 0);
      3:  return taps_to_mask(n, 3, 2, 0, 0);
      4:  return taps_to_mask(n, 4, 3, 0, 0);
      5:  return taps_to_mask(n, 5, 3, 0, 0);
      6:  return taps_to_mask(n, 6, 5, 0, 0);
      7:  return taps_to_mask(n, 7, 6, 0, 0);
      8:  return taps_to_mask(n, 8, 6, 5, 4);
      9:  return taps_to_mask(n, 9, 5, 0, 0);
      10: return taps_to_mask(n, 10, 7, 0, 0);
      11: return taps_to_mask(n, 11, 9, 0, 0);
      12: return taps_to_mask(n, 12, 6, 4, 1);
      13: return taps_to_mask(n, 13, 4, 3, 1);
      14: return taps_to_mask(n, 14, 5, 3, 1);
      15: return taps_to_mask(n, 15, 14, 0, 0);
      16: return taps_to_mask(n, 16, 15, 13, 4);
      17: return taps_to_mask(n, 17, 14, 0, 0);
      18: return taps_to_mask(n, 18, 11, 0, 0);
      19: return taps_to_mask(n, 19, 6, 2, 1);
      20: return taps_to_mask(n, 20, 17, 0, 0);
      21: return taps_to_mask(n, 21, 19, 0, 0);
      22: return taps_to_mask(n, 22, 21, 0, 0);
      23: return taps_to_mask(n, 23, 18, 0, 0);
      24: return taps_to_mask(n, 24, 23, 22, 17);
      25: return taps_to_mask(n, 25, 22, 0, 0);
      26: return taps_to_mask(n, 26, 6, 2, 1);
      27: return taps_to_mask(n, 27, 5, 2, 1);
      28: return taps_to_mask(n, 28, 25, 0, 0);
      29: return taps_to_mask(n, 29, 27, 0, 0);
      30: return taps_to_mask(n, 30, 6, 4, 1);
      31: return taps_to_mask(n, 31, 28, 0, 0);
      32: return taps_to_mask(n, 32, 22, 2, 1);
      default: return '0;
    endcase
  endfunction

endpackage
