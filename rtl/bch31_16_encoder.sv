// (31,16) binary BCH encoder, triple-error-correcting (t = 3, d_min >= 7).
//
// Systematic serial encoder: 16 message bits in, 31 codeword bits out, of
// which the first 16 are the message itself and the last 15 the parity
// bits p(x) = x^15 m(x) mod g(x), with
//   g(x) = 1 + x + x^2 + x^3 + x^5 + x^7 + x^8 + x^9 + x^10 + x^11 + x^15.
// It is the 15-stage division register with its two switches
// (bch_encoder_core) driven by the cecode controller (bch_cecode_ctrl).
//
// The generator polynomial is the product of the minimal polynomials of
// alpha, alpha^3 and alpha^5 over GF(2^5), of degree n-k = 15 as a
// triple-error-correcting code of length 31 needs; it reproduces the parity
// bits of the reference codeword the testbench checks.
//
// Interface and timing: pulse or hold start; on the following ce edges the
// encoder makes 31 shifts. While cecode is high (the first 16 shifts) it takes
// din on each ce edge, m_15 first, and echoes it on dout; for the last 15
// shifts dout carries the parity, p_14 first. cw_valid pulses one clock after
// shift 31, when codeword (bit i = c_i) holds the result; it stays there until
// the next codeword starts. A held start runs codewords back to back, one every
// 31 ce edges. Reset is synchronous and active high.
module bch31_16_encoder
  import bch31_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      ce,
  input  logic      start,
  input  logic      din,
  output logic      cecode,
  output logic      busy,
  output logic      dout,
  output codeword_t codeword,
  output logic      cw_valid
);

  logic last;

  bch_cecode_ctrl #(.N(N), .K(K16)) u_ctrl (
    .clk, .rst, .ce, .start,
    .busy, .cecode, .last,
    .shift_cnt ()   // not needed by the datapath
  );

  bch_encoder_core #(.N(N), .K(K16), .G(G16)) u_core (
    .clk, .rst, .ce,
    .shift (busy),
    .cecode, .last, .din, .dout, .codeword, .cw_valid
  );

endmodule
