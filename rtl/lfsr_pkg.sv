// lfsr_pkg: constants and elaboration-time helpers shared by the LFSR generators.
//
// A tap mask has bit k-1 set when stage Xk of the shift register feeds the XOR
// that drives stage X1. Stages are numbered from the input end (X1) to the
// output end (Xn), and stage Xk is held in bit k-1 of the state vector, so the
// output stage Xn is the MSB.
//
// The two polynomials are the ones the design is built around:
//   8 bits : x^8  + x^6  + x^5  + x^4 + 1  -> taps X8, X6, X5, X4
//   16 bits: x^16 + x^15 + x^13 + x^4 + 1  -> taps X16, X15, X13, X4
// The helper functions check, while elaborating, the two tap-selection rules
// the design follows: the number of taps must be even, and the tap positions
// must share no common divisor. Both rules are necessary for a maximum-length
// sequence, not sufficient; the testbenches confirm the full period.
package lfsr_pkg;

  localparam int unsigned WIDTH8  = 8;
  localparam int unsigned WIDTH16 = 16;

  // x^8 + x^6 + x^5 + x^4 + 1
  localparam logic [WIDTH8-1:0]  TAPS8  = 8'b1011_1000;
  // x^16 + x^15 + x^13 + x^4 + 1
  localparam logic [WIDTH16-1:0] TAPS16 = 16'b1101_0000_0000_1000;

  // Number of tapped stages in a mask.
  function automatic int unsigned tap_count(input logic [63:0] taps, input int unsigned width);
    int unsigned n = 0;
    for (int unsigned k = 0; k < width; k++) if (taps[k]) n++;
    return n;
  endfunction

  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x = a;
    int unsigned y = b;
    while (y != 0) begin
      int unsigned r = x % y;
      x = y;
      y = r;
    end
    return x;
  endfunction

  // Greatest common divisor of all tap positions (positions count from 1).
  function automatic int unsigned tap_gcd(input logic [63:0] taps, input int unsigned width);
    int unsigned g = 0;
    for (int unsigned k = 0; k < width; k++) if (taps[k]) g = gcd(g, k + 1);
    return g;
  endfunction

  // Number of states in a maximum-length sequence of an n-stage register.
  function automatic longint unsigned max_period(input int unsigned width);
    return (longint'(1) << width) - 1;
  endfunction

endpackage
