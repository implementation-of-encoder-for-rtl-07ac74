// (31,21) binary BCH encoder, double-error-correcting (t = 2, d_min >= 5).
//
// Systematic serial encoder: 21 message bits in, 31 codeword bits out, of
// which the first 21 are the message itself and the last 10 the parity
// bits p(x) = x^10 m(x) mod g(x), with
//   g(x) = 1 + x^3 + x^5 + x^6 + x^8 + x^9 + x^10.
// It is the 10-stage division register with its two switches
// (bch_encoder_core) driven by the cecode controller (bch_cecode_ctrl).
//
// Interface and timing: pulse or hold start; on the following ce edges the
// encoder makes 31 shifts. While cecode is high (the first 21 shifts) it takes
// din on each ce edge, m_20 first, and echoes it on dout; for the last 10
// shifts dout carries the parity, p_9 first. cw_valid pulses one clock after
// shift 31, when codeword (bit i = c_i) holds the result; it stays there until
// the next codeword starts. A held start runs codewords back to back, one every
// 31 ce edges. Reset is synchronous and active high.
module bch31_21_encoder
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

  bch_cecode_ctrl #(.N(N), .K(K21)) u_ctrl (
    .clk, .rst, .ce, .start,
    .busy, .cecode, .last,
    .shift_cnt ()   // not needed by the datapath
  );

  bch_encoder_core #(.N(N), .K(K21), .G(G21)) u_core (
    .clk, .rst, .ce,
    .shift (busy),
    .cecode, .last, .din, .dout, .codeword, .cw_valid
  );

endmodule
