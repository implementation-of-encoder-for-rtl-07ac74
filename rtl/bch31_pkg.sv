// Shared constants of the (31,k) binary BCH encoders.
//
// The code length is n = 2^5 - 1 = 31. Each generator polynomial g(x) is
// stored as a bit vector, bit i being the coefficient of x^i, so bit n-k is
// the leading 1. g(x) is the least common multiple of the minimal polynomials
// of alpha, alpha^2, ..., alpha^2t over GF(2^5) built on x^5 + x^2 + 1.
// The polynomials for t = 1, 2, 5 and 7 are the ones the design is based on;
// the (31,16) polynomial is the product of the minimal polynomials of alpha,
// alpha^3 and alpha^5 (degree 15), worked out from that definition.
package bch31_pkg;

  localparam int unsigned N = 31;

  // message lengths of the five codes, in the order the top uses
  localparam int unsigned K26 = 26;  // t = 1
  localparam int unsigned K21 = 21;  // t = 2
  localparam int unsigned K16 = 16;  // t = 3
  localparam int unsigned K11 = 11;  // t = 5
  localparam int unsigned K6  = 6;   // t = 7

  localparam int unsigned NUM_CODES = 5;

  // g(x) = 1 + x^2 + x^5
  localparam logic [N-K26:0] G26 = 6'h25;
  // g(x) = 1 + x^3 + x^5 + x^6 + x^8 + x^9 + x^10
  localparam logic [N-K21:0] G21 = 11'h769;
  // g(x) = 1 + x + x^2 + x^3 + x^5 + x^7 + x^8 + x^9 + x^10 + x^11 + x^15
  localparam logic [N-K16:0] G16 = 16'h8FAF;
  // g(x) = 1 + x^2 + x^4 + x^6 + x^7 + x^9 + x^10 + x^13 + x^17 + x^18 + x^20
  localparam logic [N-K11:0] G11 = 21'h1626D5;
  // g(x) = 1 + x + x^2 + x^5 + x^9 + x^11 + x^13 + x^14 + x^15 + x^16
  //        + x^18 + x^19 + x^21 + x^24 + x^25
  localparam logic [N-K6:0]  G6  = 26'h32DEA27;

  typedef logic [N-1:0] codeword_t;  // bit i = coefficient c_i

endpackage
