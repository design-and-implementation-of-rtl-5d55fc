// lfsr_pkg: shared types and constants of the PN-sequence generators.
//
// feedback_e selects the feedback gate of the shift register. With XNOR
// feedback the all-ones state is the one that locks the register; with XOR
// feedback it is the all-zeros state.
//
// tap_mask(n) returns the feedback taps of the maximal-length polynomials
// used for the five register lengths of this design. Bit k-1 of the mask is
// set when stage Xk (exponent k of the polynomial) feeds the XNOR/XOR:
//   n = 4  : x^4  + x^3  + 1                  taps 4,3
//   n = 8  : x^8  + x^6  + x^5  + x^4  + 1    taps 8,6,5,4
//   n = 16 : x^16 + x^15 + x^13 + x^4  + 1    taps 16,15,13,4
//   n = 32 : x^32 + x^22 + x^2  + x    + 1    taps 32,22,2,1
//   n = 64 : x^64 + x^63 + x^61 + x^60 + 1    taps 64,63,61,60
// The polynomials are the ones the design was specified with. Any other
// length returns 0, which the LFSR rejects at elaboration; such a length
// needs its taps passed explicitly.
package lfsr_pkg;

  typedef enum logic {
    FB_XOR  = 1'b0,
    FB_XNOR = 1'b1
  } feedback_e;

  localparam int unsigned MAX_BITS = 64;

  function automatic logic [MAX_BITS-1:0] tap_mask(int unsigned n);
    case (n)
      4:       return 64'h0000_0000_0000_000C;
      8:       return 64'h0000_0000_0000_00B8;
      16:      return 64'h0000_0000_0000_D008;
      32:      return 64'h0000_0000_8020_0003;
      64:      return 64'hD800_0000_0000_0000;
      default: return '0;
    endcase
  endfunction

endpackage
