// End-to-end testbench of the five-encoder bank (bch31_encoder_bank), at its
// default parameters (DIV = 32: one shift every 32 clocks, 1.5625 MHz from a
// 50 MHz clock).
//
// Each of the five encoders gets its own message source, which presents
// m_(k-1) first and advances on every clock with ce & cecode. Every encoder
// first encodes its published reference word, then random messages: some
// requested while the previous codeword is still shifting (so they run back
// to back), some after an idle gap. The five run concurrently and
// independently. For every codeword the output register and the serial dout
// stream are compared with the long-division reference; the testbench also
// checks that a codeword takes exactly 31 shifts (31 x 32 = 992 clocks), that
// cecode covers exactly the k message shifts, and that back-to-back codewords
// complete 992 clocks apart. Mechanisms counted, each of which must occur:
// message shifts, parity shifts, clocks without a shift during a codeword,
// start requests held while busy, back-to-back codewords and idle gaps.
module tb_bch31_encoder_bank;
  import bch_tb_pkg::*;

  localparam int NC = 5;
  localparam int KS [NC] = '{26, 21, 16, 11, 6};
  localparam int NWORDS = 12;
  localparam int DIV = 32;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic [NC-1:0] start = '0;
  logic [NC-1:0] din = '0;
  logic          ce;
  logic [NC-1:0] cecode, busy, dout, cw_valid;
  logic [30:0]   codeword [NC];

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bch31_encoder_bank dut (
    .clk, .rst, .start, .din, .ce, .cecode, .busy, .dout, .codeword, .cw_valid
  );

  // sources and expectations
  logic [30:0] msg_q [NC][$];
  logic [30:0] exp_q [NC][$];
  bit          b2b_q [NC][$];
  int          bit_idx [NC];

  // monitor state
  logic [30:0] stream [NC];
  int n_shift [NC], n_msg [NC], started [NC], done [NC], clk_at_valid [NC], busy_clks [NC];
  int cyc = 0;
  int n_msg_shift = 0, n_par_shift = 0, n_stall = 0, n_pending = 0, n_b2b = 0, n_gap = 0;

  initial begin
    for (int i = 0; i < NC; i++) begin
      bit_idx[i] = 0; n_shift[i] = 0; n_msg[i] = 0; started[i] = 0; done[i] = 0;
      clk_at_valid[i] = 0; busy_clks[i] = 0; stream[i] = '0;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      for (int i = 0; i < NC; i++) begin
        if (cw_valid[i]) begin
          logic [30:0] e;
          bit b2b;
          e = exp_q[i].pop_front();
          b2b = b2b_q[i].pop_front();
          check(codeword[i] == e, $sformatf("(31,%0d) codeword %h expected %h", KS[i], codeword[i], e));
          check(stream[i] == e, $sformatf("(31,%0d) dout stream %h expected %h", KS[i], stream[i], e));
          check(n_shift[i] == 31, $sformatf("(31,%0d) %0d shifts", KS[i], n_shift[i]));
          check(n_msg[i] == KS[i], $sformatf("(31,%0d) %0d message shifts", KS[i], n_msg[i]));
          if (b2b) begin
            check(cyc - clk_at_valid[i] == 31 * DIV, $sformatf("(31,%0d) back-to-back period %0d clocks", KS[i], cyc - clk_at_valid[i]));
            n_b2b++;
          end
          clk_at_valid[i] = cyc;
          n_shift[i] = 0;
          n_msg[i] = 0;
          done[i]++;
        end
        if (busy[i] && !ce) n_stall++;
        if (busy[i] && start[i]) n_pending++;
        if (ce && busy[i]) begin
          if (n_shift[i] == 0) started[i]++;
          stream[i] = {stream[i][29:0], dout[i]};
          n_shift[i]++;
          check(cecode[i] == (n_shift[i] <= KS[i]), $sformatf("(31,%0d) cecode", KS[i]));
          if (cecode[i]) begin
            n_msg[i]++;
            n_msg_shift++;
            if (bit_idx[i] == KS[i] - 1) begin
              bit_idx[i] = 0;
              void'(msg_q[i].pop_front());
            end else begin
              bit_idx[i]++;
            end
          end else begin
            n_par_shift++;
          end
        end
      end
    end
  end

  // message bits change on the falling edge
  always @(negedge clk) begin
    for (int i = 0; i < NC; i++)
      din[i] = (msg_q[i].size() != 0) ? msg_q[i][0][KS[i] - 1 - bit_idx[i]] : 1'b0;
  end

  task automatic run_source(int i);
    for (int w = 0; w < NWORDS; w++) begin
      logic [30:0] m;
      bit b2b, next_b2b;
      m = (w == 0) ? str_to_vec(ref_data(KS[i])) : 31'($urandom()) & ((31'(1) << KS[i]) - 1);
      b2b = (w % 4) == 2 || (w % 4) == 3;
      next_b2b = ((w + 1) % 4) == 2 || ((w + 1) % 4) == 3;
      msg_q[i].push_back(m);
      exp_q[i].push_back((w == 0) ? str_to_vec(ref_codeword(KS[i])) : ref_encode(KS[i], m));
      b2b_q[i].push_back(b2b);
      start[i] = 1'b1;
      @(negedge clk);
      start[i] = 1'b0;
      if (next_b2b && w + 1 < NWORDS) begin
        wait (started[i] == w + 1);
        repeat ($urandom_range(20 * DIV, 2)) @(negedge clk);
      end else begin
        wait (done[i] == w + 1);
        n_gap++;
        repeat ($urandom_range(3 * DIV, 1)) @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fork
      run_source(0);
      run_source(1);
      run_source(2);
      run_source(3);
      run_source(4);
    join
    for (int i = 0; i < NC; i++) begin
      check(done[i] == NWORDS, $sformatf("(31,%0d) %0d codewords completed", KS[i], done[i]));
      check(exp_q[i].size() == 0, "no codeword outstanding");
    end
    check(n_msg_shift > 0, "message shifts happened");
    check(n_par_shift > 0, "parity shifts happened");
    check(n_stall > 0, "clocks without a shift during a codeword happened");
    check(n_pending > 0, "start while busy happened");
    check(n_b2b > 0, "back-to-back codewords happened");
    check(n_gap > 0, "idle gaps happened");
    $display("message shifts=%0d parity shifts=%0d stall clocks=%0d pending=%0d back-to-back=%0d gaps=%0d",
             n_msg_shift, n_par_shift, n_stall, n_pending, n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * 40 * 31 * DIV) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
