// (31,6) binary BCH encoder, seven-error-correcting (t = 7, d_min >= 15).
//
// Systematic serial encoder: 6 message bits in, 31 codeword bits out, of
// which the first 6 are the message itself and the last 25 the parity
// bits p(x) = x^25 m(x) mod g(x), with
//   g(x) = 1 + x + x^2 + x^5 + x^9 + x^11 + x^13 + x^14 + x^15 + x^16
//   + x^18 + x^19 + x^21 + x^24 + x^25.
// It is the 25-stage division register with its two switches
// (bch_encoder_core) driven by the cecode controller (bch_cecode_ctrl).
//
// Interface and timing: pulse or hold start; on the following ce edges the
// encoder makes 31 shifts. While cecode is high (the first 6 shifts) it takes
// din on each ce edge, m_5 first, and echoes it on dout; for the last 25
// shifts dout carries the parity, p_24 first. cw_valid pulses one clock after
// shift 31, when codeword (bit i = c_i) holds the result; it stays there until
// the next codeword starts. A held start runs codewords back to back, one every
// 31 ce edges. Reset is synchronous and active high.
module bch31_6_encoder
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

  bch_cecode_ctrl #(.N(N), .K(K6)) u_ctrl (
    .clk, .rst, .ce, .start,
    .busy, .cecode, .last,
    .shift_cnt ()   // not needed by the datapath
  );

  bch_encoder_core #(.N(N), .K(K6), .G(G6)) u_core (
    .clk, .rst, .ce,
    .shift (busy),
    .cecode, .last, .din, .dout, .codeword, .cw_valid
  );

endmodule
