// Bank of the five (31,k) binary BCH encoders.
//
// The (31,26), (31,21), (31,16), (31,11) and (31,6) encoders, correcting
// 1, 2, 3, 5 and 7 errors, stand side by side, each with its own serial
// message input, start request, cecode, busy, serial codeword output, output
// register and completion pulse. They share the board clock and one clock
// enable that sets the shift rate to clk / DIV (1.5625 MHz from a 50 MHz
// clock at the default DIV = 32). Putting the five encoders in one top is
// this design's choice; each is also usable on its own.
//
// Index i of every vector port selects the code:
//   0 = (31,26)  1 = (31,21)  2 = (31,16)  3 = (31,11)  4 = (31,6).
//
// Timing: a data source for encoder i presents message bit m_(k-1-j) on din[i]
// and advances on each clock with ce & cecode[i] high. dout[i] is valid on
// every clock with ce & busy[i] high, c_30 first. cw_valid[i] pulses one clock
// after the 31st shift; codeword[i] (bit j = c_j) then holds the codeword.
// Reset is synchronous and active high.
module bch31_encoder_bank
  import bch31_pkg::*;
#(
  parameter int unsigned DIV = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_CODES-1:0] start,
  input  logic [NUM_CODES-1:0] din,
  output logic                 ce,
  output logic [NUM_CODES-1:0] cecode,
  output logic [NUM_CODES-1:0] busy,
  output logic [NUM_CODES-1:0] dout,
  output codeword_t            codeword [NUM_CODES],
  output logic [NUM_CODES-1:0] cw_valid
);

  bch_clk_en #(.DIV(DIV)) u_clk_en (.clk, .rst, .ce);

  bch31_26_encoder u_enc26 (
    .clk, .rst, .ce, .start(start[0]), .din(din[0]), .cecode(cecode[0]), .busy(busy[0]),
    .dout(dout[0]), .codeword(codeword[0]), .cw_valid(cw_valid[0])
  );

  bch31_21_encoder u_enc21 (
    .clk, .rst, .ce, .start(start[1]), .din(din[1]), .cecode(cecode[1]), .busy(busy[1]),
    .dout(dout[1]), .codeword(codeword[1]), .cw_valid(cw_valid[1])
  );

  bch31_16_encoder u_enc16 (
    .clk, .rst, .ce, .start(start[2]), .din(din[2]), .cecode(cecode[2]), .busy(busy[2]),
    .dout(dout[2]), .codeword(codeword[2]), .cw_valid(cw_valid[2])
  );

  bch31_11_encoder u_enc11 (
    .clk, .rst, .ce, .start(start[3]), .din(din[3]), .cecode(cecode[3]), .busy(busy[3]),
    .dout(dout[3]), .codeword(codeword[3]), .cw_valid(cw_valid[3])
  );

  bch31_6_encoder u_enc6 (
    .clk, .rst, .ce, .start(start[4]), .din(din[4]), .cecode(cecode[4]), .busy(busy[4]),
    .dout(dout[4]), .codeword(codeword[4]), .cw_valid(cw_valid[4])
  );

endmodule
