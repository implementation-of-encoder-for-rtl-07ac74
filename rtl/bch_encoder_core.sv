// Systematic serial encoder of an (n,k) cyclic code with an (n-k)-stage
// division register.
//
// The parity of a systematic cyclic codeword is p(x) = x^(n-k) m(x) mod g(x)
// and the codeword is c(x) = p(x) + x^(n-k) m(x). The division is done by a
// linear feedback shift register whose taps are the coefficients g_0 .. g_(n-k-1)
// of the generator polynomial (internal-XOR form). Two switches steer it:
//   * switch 1 (feedback gate) is closed while cecode is high, during the
//     first k shifts: the incoming message bit plus the register's top stage
//     is fed back into the taps;
//   * switch 2 (output select) passes the message bit to dout while cecode is
//     high, then the register's top stage for the remaining n-k shifts. With
//     the feedback gated off those shifts empty the register into the output,
//     so the register is zero again when the next codeword starts.
// Every output bit is also shifted into an n-bit output register, which after
// n shifts holds the whole codeword with codeword[i] = c_i.
//
// Bit order: message m_(k-1) first; codeword c_(n-1) first (the message, high
// order first, then the parity, p_(n-k-1) first). The taps and switches follow
// the standard circuit; the internal-XOR form, the bit order and the
// one-cycle cw_valid pulse are this design's choices.
//
// Interface: a shift happens on a clock edge with ce and shift high; cecode
// and last come from the controller (bch_cecode_ctrl). din is sampled on
// those edges while cecode is high; dout is combinational (the message bit
// reaches the output in the same cycle). cw_valid pulses for one clock after
// the edge that performs shift n. Reset is synchronous and active high.
module bch_encoder_core #(
  parameter int unsigned      N = 31,
  parameter int unsigned      K = 26,
  parameter logic [N-K:0]     G = 6'h25   // bit i = coefficient of x^i
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic         shift,
  input  logic         cecode,
  input  logic         last,
  input  logic         din,
  output logic         dout,
  output logic [N-1:0] codeword,
  output logic         cw_valid
);

  localparam int unsigned R = N - K;  // number of parity bits / LFSR stages

  logic [R-1:0] lfsr;      // lfsr[i] = coefficient of x^i of the running remainder
  logic         fb;        // feedback through switch 1
  logic [R-1:0] lfsr_nxt;

  always_comb begin
    fb       = cecode & (din ^ lfsr[R-1]);
    dout     = cecode ? din : lfsr[R-1];              // switch 2
    lfsr_nxt = (lfsr << 1) ^ ({R{fb}} & G[R-1:0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr     <= '0;
      codeword <= '0;
      cw_valid <= 1'b0;
    end else begin
      cw_valid <= 1'b0;
      if (ce && shift) begin
        lfsr     <= lfsr_nxt;
        codeword <= {codeword[N-2:0], dout};
        cw_valid <= last;
      end
    end
  end

  initial assert (G[R] == 1'b1 && G[0] == 1'b1)
    else $error("bch_encoder_core: g(x) must have degree n-k and a nonzero constant term");
  // the parity shifts must leave the division register empty for the next codeword
  always_ff @(posedge clk) begin
    if (!rst && cw_valid) assert (lfsr == '0) else $error("bch_encoder_core: register not empty after n shifts");
  end

endmodule
