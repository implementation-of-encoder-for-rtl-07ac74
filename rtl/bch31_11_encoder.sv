// (31,11) binary BCH encoder, five-error-correcting (t = 5, d_min >= 11).
//
// Systematic serial encoder: 11 message bits in, 31 codeword bits out, of
// which the first 11 are the message itself and the last 20 the parity
// bits p(x) = x^20 m(x) mod g(x), with
//   g(x) = 1 + x^2 + x^4 + x^6 + x^7 + x^9 + x^10 + x^13 + x^17 + x^18 + x^20.
// It is the 20-stage division register with its two switches
// (bch_encoder_core) driven by the cecode controller (bch_cecode_ctrl).
//
// Interface and timing: pulse or hold start; on the following ce edges the
// encoder makes 31 shifts. While cecode is high (the first 11 shifts) it takes
// din on each ce edge, m_10 first, and echoes it on dout; for the last 20
// shifts dout carries the parity, p_19 first. cw_valid pulses one clock after
// shift 31, when codeword (bit i = c_i) holds the result; it stays there until
// the next codeword starts. A held start runs codewords back to back, one every
// 31 ce edges. Reset is synchronous and active high.
module bch31_11_encoder
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

  bch_cecode_ctrl #(.N(N), .K(K11)) u_ctrl (
    .clk, .rst, .ce, .start,
    .busy, .cecode, .last,
    .shift_cnt ()   // not needed by the datapath
  );

  bch_encoder_core #(.N(N), .K(K11), .G(G11)) u_core (
    .clk, .rst, .ce,
    .shift (busy),
    .cecode, .last, .din, .dout, .codeword, .cw_valid
  );

endmodule
