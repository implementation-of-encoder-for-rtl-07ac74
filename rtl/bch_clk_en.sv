// Shift-rate clock enable.
//
// The encoders shift at 1.5625 MHz. Rather than deriving a second clock, this
// block divides the board clock by DIV and issues a one-cycle enable pulse
// every DIV cycles; all encoder flip-flops run on the board clock and advance
// only on that pulse. The default DIV = 32 turns a 50 MHz board oscillator
// into 1.5625 MHz; the oscillator frequency is this design's assumption, the
// 1.5625 MHz shift rate is the one the design was run at.
//
// Interface: clk, rst (synchronous, active high), ce (output pulse).
// Timing: ce is registered. Counting the first clock edge after reset is
// released as edge 1, ce is high at edge DIV+1 and then at every DIV-th edge
// after it, for one clock each time. DIV = 1 keeps ce high permanently.
module bch_clk_en #(
  parameter int unsigned DIV = 32
) (
  input  logic clk,
  input  logic rst,
  output logic ce
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  generate
    if (DIV <= 1) begin : g_always
      assign ce = 1'b1;
    end else begin : g_div
      logic [CW-1:0] cnt;
      always_ff @(posedge clk) begin
        if (rst) begin
          cnt <= '0;
          ce  <= 1'b0;
        end else begin
          ce <= (cnt == CW'(DIV - 1));
          if (cnt == CW'(DIV - 1)) cnt <= '0;
          else                     cnt <= cnt + 1'b1;
        end
      end
    end
  endgenerate

endmodule
