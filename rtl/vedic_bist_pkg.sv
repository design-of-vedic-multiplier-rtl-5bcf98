// vedic_bist_pkg -- constants shared by the Vedic multiplier's self-test logic.
//
// The self-test hardware reports how many of its comparisons were correct as
// a whole percentage, so it needs the scale (100) and the width that holds
// 0..100. The pattern generator is a Fibonacci LFSR; lfsr_taps() returns the
// feedback mask of a maximal-length polynomial for the widths the multiplier
// is built at. The polynomials are standard maximal-length choices of this
// design, not values from the source description:
//   64: x^64 + x^63 + x^61 + x^60 + 1     32: x^32 + x^22 + x^2 + x + 1
//   16: x^16 + x^15 + x^13 + x^4  + 1      8: x^8  + x^6  + x^5 + x^4 + 1
//    4: x^4  + x^3  + 1                    2: x^2  + x    + 1
// Bit i of the mask is set for the term x^(i+1).
package vedic_bist_pkg;

  localparam int unsigned PERF_SCALE = 100;  // performance is a percentage
  localparam int unsigned PERF_W     = 7;    // holds 0..100

  localparam int unsigned MAX_LFSR_W = 64;

  function automatic logic [MAX_LFSR_W-1:0] lfsr_taps(int unsigned width);
    case (width)
      2:       return 64'h3;
      4:       return 64'hC;
      8:       return 64'hB8;
      16:      return 64'hD008;
      32:      return 64'h8020_0003;
      default: return 64'hD800_0000_0000_0000;  // 64
    endcase
  endfunction

endpackage
