// Reference model and reference vectors shared by the BCH encoder testbenches.
//
// ref_encode() computes a systematic (31,k) codeword by long division of
// x^(n-k) m(x) by g(x), bit by bit on a plain vector, with no shift register.
// The generator polynomials here are written out from their definitions
// (product of the minimal polynomials of alpha, alpha^3, ... over GF(2^5) with
// x^5 + x^2 + 1), independently of the RTL package, and gen_divides_x31()
// checks each one is a factor of x^31 + 1 as every cyclic code of length 31
// requires.
//
// The reference codewords are written as strings c_0 c_1 ... c_30 (parity
// first, then m_0 .. m_(k-1)), the way the published simulation results of
// these five encoders list them.
package bch_tb_pkg;

  localparam int unsigned N = 31;

  function automatic logic [31:0] tb_gen(int unsigned k);
    case (k)
      26: return 32'h25;        // 1 + x^2 + x^5
      21: return 32'h769;       // 1 + x^3 + x^5 + x^6 + x^8 + x^9 + x^10
      16: return 32'h8FAF;      // 1 + x + x^2 + x^3 + x^5 + x^7 + ... + x^11 + x^15
      11: return 32'h1626D5;    // 1 + x^2 + x^4 + x^6 + x^7 + x^9 + ... + x^18 + x^20
      6:  return 32'h32DEA27;   // 1 + x + x^2 + x^5 + x^9 + ... + x^24 + x^25
      default: return 32'h0;
    endcase
  endfunction

  // remainder of a(x) (degree < 63) divided by g(x) of degree r
  function automatic logic [62:0] poly_mod(logic [62:0] a, logic [31:0] g, int unsigned r);
    for (int i = 62; i >= int'(r); i--)
      if (a[i]) a ^= (63'(g) << (i - int'(r)));
    return a;
  endfunction

  function automatic bit gen_divides_x31(int unsigned k);
    logic [62:0] x31p1;
    x31p1 = (63'(1) << 31) | 63'(1);
    return poly_mod(x31p1, tb_gen(k), N - k) == '0;
  endfunction

  // systematic codeword, bit i = c_i; msg bit j = m_j
  function automatic logic [30:0] ref_encode(int unsigned k, logic [30:0] msg);
    logic [62:0] shifted;
    shifted = 63'(msg) << (N - k);
    return 31'(shifted | poly_mod(shifted, tb_gen(k), N - k));
  endfunction

  // string "b0 b1 b2 ..." -> vector with bit i = character i
  function automatic logic [30:0] str_to_vec(string s);
    logic [30:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  // published data words (m_0 first) and codewords (c_0 first)
  function automatic string ref_data(int unsigned k);
    case (k)
      26: return "10011101001011000110101001";
      21: return "100111010010110001101";
      16: return "1001110100101101";
      11: return "01011101001";
      6:  return "011001";
      default: return "";
    endcase
  endfunction

  function automatic string ref_codeword(int unsigned k);
    case (k)
      26: return {"00011", "10011101001011000110101001"};
      21: return {"1110011010", "100111010010110001101"};
      16: return {"010000101111010", "1001110100101101"};
      11: return {"01000010111100101001", "01011101001"};
      6:  return "1111000110111010100001001011001";
      default: return "";
    endcase
  endfunction

endpackage
