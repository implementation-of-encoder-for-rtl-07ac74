// Self-checking testbench of the (31,11) BCH encoder (bch31_11_encoder).
//
// A message source feeds din, m_(k-1) first, advancing on each clock with
// ce & cecode. The published reference word is encoded first, then random
// messages, partly back to back (a new start request during the current
// codeword) and partly with idle gaps. ce is high on a random half of the
// clocks, so the encoder also sees clocks with no shift. For every codeword
// the testbench checks the output register against the long-division
// reference, the serial dout stream against the same codeword (c_30 first),
// that cecode is high for exactly 11 of the 31 shifts, that the codeword is
// divisible by g(x), and that back-to-back codewords follow each other every
// 31 ce edges.
module tb_bch31_11_encoder;
  import bch_tb_pkg::*;

  localparam int unsigned K      = 11;
  localparam int unsigned NWORDS = 60;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        ce = 1'b0;
  logic        start = 1'b0;
  logic        din;
  logic        cecode, busy, dout, cw_valid;
  logic [30:0] codeword;

  int checks = 0;
  int failures = 0;

  bch31_11_encoder dut (
    .clk, .rst, .ce, .start, .din, .cecode, .busy, .dout, .codeword, .cw_valid
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // message source and expected results
  logic [30:0] msg_q[$];
  logic [30:0] exp_q[$];
  bit          b2b_q[$];   // codeword was requested back to back
  int          bit_idx = 0;

  always_comb din = (msg_q.size() != 0) ? msg_q[0][K - 1 - bit_idx] : 1'b0;

  always @(posedge clk) begin
    if (!rst && ce && cecode) begin
      if (bit_idx == K - 1) begin
        bit_idx = 0;
        void'(msg_q.pop_front());
      end else begin
        bit_idx = bit_idx + 1;
      end
    end
  end

  // monitor
  logic [30:0] stream;
  int          n_shift = 0, n_msg = 0, ce_count = 0, ce_at_last = -1000;
  int          started = 0, words_done = 0, b2b_seen = 0, stall_seen = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (!ce && busy) stall_seen++;
      if (cw_valid) begin
        logic [30:0] e;
        bit b2b;
        e = exp_q.pop_front();
        b2b = b2b_q.pop_front();
        check(codeword == e, $sformatf("codeword %h expected %h", codeword, e));
        check(stream == e, $sformatf("serial stream %h expected %h", stream, e));
        check(n_shift == 31, $sformatf("%0d shifts per codeword", n_shift));
        check(n_msg == K, $sformatf("%0d message shifts", n_msg));
        check(poly_mod(63'(codeword), tb_gen(K), 31 - K) == '0, "codeword divisible by g(x)");
        if (b2b) begin
          check(ce_count - ce_at_last == 31, $sformatf("back-to-back spacing %0d ce edges", ce_count - ce_at_last));
          b2b_seen++;
        end
        ce_at_last = ce_count;
        n_shift = 0;
        n_msg = 0;
        words_done++;
      end
      if (ce) ce_count++;
      if (ce && busy) begin
        if (n_shift == 0) started++;
        stream = {stream[29:0], dout};
        n_shift++;
        if (cecode) n_msg++;
        check(cecode == (n_shift <= K), "cecode high exactly during the message shifts");
      end
    end
  end

  always @(posedge clk) ce <= ($urandom_range(1, 0) == 1);

  initial begin
    logic [30:0] m;
    stream = '0;
    check(gen_divides_x31(K), "g(x) divides x^31 + 1");
    // the reference word must agree with the long-division model
    check(ref_encode(K, str_to_vec(ref_data(K))) == str_to_vec(ref_codeword(K)), "reference word");
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      bit b2b;
      m = (w == 0) ? str_to_vec(ref_data(K)) : 31'($urandom()) & ((31'(1) << K) - 1);
      b2b = (w % 10) >= 5 && w % 10 != 5;
      msg_q.push_back(m);
      exp_q.push_back((w == 0) ? str_to_vec(ref_codeword(K)) : ref_encode(K, m));
      b2b_q.push_back(b2b);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      if ((w + 1) % 10 >= 5 && (w + 1) % 10 != 5 && w + 1 < NWORDS) begin
        // next request goes in while this codeword is still shifting
        wait (started == w + 1);
      end else begin
        @(posedge clk iff cw_valid);
        repeat ($urandom_range(40, 0)) @(posedge clk);
      end
    end
    @(posedge clk iff (words_done == NWORDS));
    repeat (5) @(posedge clk);
    check(b2b_seen > 0, "back-to-back codewords happened");
    check(stall_seen > 0, "clocks without ce during a codeword happened");
    check(exp_q.size() == 0, "all codewords delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
