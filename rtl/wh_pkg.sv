// wh_pkg: constants and elaboration-time helpers shared by the WH hash unit.
//
// The hash arithmetic is GF(2^w) = GF(2)[x]/p(x). The design calls for a fixed,
// low Hamming-weight irreducible p of degree w so that the reduction costs only
// a few XOR gates; which polynomial is used is not fixed by the algorithm, so the
// pentanomials below are this design's choice (each checked irreducible):
//   w = 64 : x^64 + x^4 + x^3 + x + 1
//   w = 32 : x^32 + x^7 + x^3 + x^2 + 1
//   w = 16 : x^16 + x^5 + x^3 + x + 1
//   w =  8 : x^8  + x^4 + x^3 + x + 1
//   w =  4 : x^4  + x + 1
// A polynomial is stored without its leading x^w term: bit i is the coefficient
// of x^i.
//
// The control counter is an LFSR of log2(w) flip-flops; lfsr_taps() gives the
// feedback taps of a maximal-length LFSR of that length, x^r + x^k + 1.
package wh_pkg;

  // Word size of the full-strength hash (WH-64); block size is WORD_BITS / t.
  localparam int unsigned WORD_BITS = 64;

  // Low-order coefficients of the reduction polynomial for block size w.
  function automatic logic [63:0] default_poly(input int unsigned w);
    case (w)
      64:      return 64'h0000_0000_0000_001B;
      32:      return 64'h0000_0000_0000_008D;
      16:      return 64'h0000_0000_0000_002B;
      8:       return 64'h0000_0000_0000_001B;
      4:       return 64'h0000_0000_0000_0003;
      default: return 64'h0000_0000_0000_001B;
    endcase
  endfunction

  // Middle tap k of a primitive trinomial x^r + x^k + 1, r = LFSR length.
  function automatic int unsigned lfsr_tap(input int unsigned r);
    case (r)
      2:       return 1;
      3:       return 2;
      4:       return 3;
      5:       return 3;
      6:       return 5;
      7:       return 6;
      default: return 1;
    endcase
  endfunction

endpackage
