// gsg_pkg: constants and types shared by the parallel gold sequence generator
// and the descrambler built on it.
//
// The gold sequence is the modulo-2 sum of two maximal-length sequences of
// degree 25 with generating polynomials x^25+x^3+1 and x^25+x^3+x^2+x+1.
// A polynomial is held as a tap vector a[K-1:0] of the recurrence
//   c(n+K) = sum_k a_k * c(n+k)  (mod 2),
// so bit k of the vector is the coefficient of x^k (the x^K term is implied).
// The LLR width of 8 bits and the three modulation orders follow the
// detector this generator is used in; the encoding of the modulation order is
// this design's own choice.
package gsg_pkg;

  localparam int unsigned GSG_K = 25;

  // x^25 + x^3 + 1
  localparam logic [GSG_K-1:0] GSG_TAPS0 = 25'h000_0009;
  // x^25 + x^3 + x^2 + x + 1
  localparam logic [GSG_K-1:0] GSG_TAPS1 = 25'h000_000F;

  // Width of one bit LLR on the detector's output buses.
  localparam int unsigned LLR_W = 8;

  // Largest number of bits per symbol (64-QAM).
  localparam int unsigned MAX_BPS = 6;

  typedef logic signed [LLR_W-1:0] llr_t;

  // Modulation order of a data channel.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,   // 2 bits per symbol
    MOD_16QAM = 2'd1,   // 4 bits per symbol
    MOD_64QAM = 2'd2    // 6 bits per symbol
  } mod_order_e;

  function automatic int unsigned bits_per_symbol(input mod_order_e m);
    case (m)
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 6;
    endcase
  endfunction

endpackage
