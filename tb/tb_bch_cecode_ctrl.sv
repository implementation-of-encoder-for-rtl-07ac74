// Self-checking testbench of the cecode controller (bch_cecode_ctrl).
//
// Two instances, (n,k) = (31,26) and (31,6), share ce and start. ce is high on
// a random share of the clocks. A model written here predicts, for every
// clock, busy, cecode, last and the shift count from the start requests seen
// so far: a request waits for the next ce edge, a codeword is exactly n ce
// edges long with cecode on the first k and last on the n-th, and a request
// present at the last shift starts the next codeword with no gap. Requests
// arrive while idle, while busy (pending) and held through the end of a
// codeword (back to back); each case is counted and must occur.
module tb_bch_cecode_ctrl;

  localparam int NI = 2;
  localparam int KS [NI] = '{26, 6};

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          ce = 1'b0;
  logic          start = 1'b0;
  logic [NI-1:0] busy, cecode, last;
  logic [4:0]    shift_cnt [NI];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bch_cecode_ctrl #(.N(31), .K(26)) u0 (
    .clk, .rst, .ce, .start, .busy(busy[0]), .cecode(cecode[0]), .last(last[0]), .shift_cnt(shift_cnt[0]));
  bch_cecode_ctrl #(.N(31), .K(6)) u1 (
    .clk, .rst, .ce, .start, .busy(busy[1]), .cecode(cecode[1]), .last(last[1]), .shift_cnt(shift_cnt[1]));

  // reference model
  bit m_busy = 0, m_pend = 0;
  int m_cnt = 0;
  int n_idle_start = 0, n_pending = 0, n_b2b = 0, n_words = 0, n_ce_low_busy = 0;

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < NI; i++) begin
        check(busy[i] == m_busy, "busy");
        check(cecode[i] == (m_busy && m_cnt < KS[i]), $sformatf("cecode k=%0d", KS[i]));
        check(last[i] == (m_busy && m_cnt == 30), "last");
        if (m_busy) check(shift_cnt[i] == 5'(m_cnt), "shift count");
      end
      if (!ce && m_busy) n_ce_low_busy++;
      if (start && m_busy && !(ce && m_cnt == 30)) n_pending++;
      // next state
      begin
        bit req, np;
        req = start || m_pend;
        np  = start || m_pend;
        if (ce) begin
          if (!m_busy) begin
            if (req) begin
              m_busy = 1;
              m_cnt = 0;
              np = 0;
              n_idle_start++;
            end
          end else if (m_cnt == 30) begin
            n_words++;
            m_cnt = 0;
            if (req) begin
              np = 0;
              n_b2b++;
            end else begin
              m_busy = 0;
            end
          end else begin
            m_cnt++;
          end
        end
        m_pend = np;
      end
    end
  end

  always @(negedge clk) ce = ($urandom_range(2, 0) != 0);

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int j = 0; j < 300; j++) begin
      start = ($urandom_range(7, 0) == 0);
      @(negedge clk);
      start = 1'b0;
      repeat ($urandom_range(40, 0)) @(negedge clk);
    end
    // hold start across several codewords
    start = 1'b1;
    repeat (200) @(negedge clk);
    start = 1'b0;
    repeat (200) @(negedge clk);
    check(n_idle_start > 0, "start from idle happened");
    check(n_pending > 0, "request while busy happened");
    check(n_b2b > 0, "back-to-back codewords happened");
    check(n_ce_low_busy > 0, "clocks without ce while busy happened");
    check(n_words > 0, "codewords completed");
    $display("words=%0d idle_starts=%0d pending=%0d b2b=%0d", n_words, n_idle_start, n_pending, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
