// cecode controller of a serial (n,k) cyclic encoder.
//
// One codeword takes n shifts. During the first k shifts the control signal
// cecode is high: the message bit enters the division register (switch 1
// closed) and goes straight to the output (switch 2 down). During the
// remaining n-k shifts cecode is low, which gives the encoder the time to
// shift its parity bits out. This controller is a shift counter running
// 0..n-1; the counter itself is this design's choice, the cecode timing is the
// encoder's.
//
// Interface: every action happens on a clock edge with ce high. A start
// request is remembered until the next ce edge; the next edge with ce high
// begins shift 0. busy is high for exactly n ce edges, cecode for the first k
// of them, last for the n-th. A request still pending at the last shift starts
// the next codeword on the following ce edge, so codewords run back to back.
// Reset is synchronous and active high.
module bch_cecode_ctrl #(
  parameter int unsigned N = 31,
  parameter int unsigned K = 26
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 start,
  output logic                 busy,
  output logic                 cecode,
  output logic                 last,
  output logic [$clog2(N)-1:0] shift_cnt
);

  localparam int unsigned CW = $clog2(N);

  typedef enum logic {IDLE, SHIFT} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic          pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      cnt     <= '0;
      pending <= 1'b0;
    end else begin
      if (start) pending <= 1'b1;
      if (ce) begin
        unique case (state)
          IDLE: begin
            if (start || pending) begin
              state   <= SHIFT;
              cnt     <= '0;
              pending <= 1'b0;
            end
          end
          SHIFT: begin
            if (cnt == CW'(N - 1)) begin
              cnt <= '0;
              if (start || pending) pending <= 1'b0;
              else                  state   <= IDLE;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  always_comb begin
    busy      = (state == SHIFT);
    cecode    = busy && (cnt < CW'(K));
    last      = busy && (cnt == CW'(N - 1));
    shift_cnt = cnt;
  end

  initial assert (K > 0 && K < N) else $error("bch_cecode_ctrl: need 0 < K < N");
  always_ff @(posedge clk) begin
    if (!rst) assert (cnt <= CW'(N - 1)) else $error("bch_cecode_ctrl: shift count out of range");
  end

endmodule
