// Self-checking testbench of the division-register datapath (bch_encoder_core).
//
// Three instances, for the (31,26), (31,16) and (31,6) codes, are driven by a
// sequencer written here (not the RTL controller): for each codeword it
// raises shift on 31 ce edges, cecode on the first k of them and last on the
// 31st, with din carrying m_(k-1) first. Codewords follow each other without
// a gap, so a division register left non-empty by the parity shifts would
// corrupt the next word. Clocks with ce low, and clocks with shift low, must
// change nothing. Checks: output register and dout stream against the
// long-division reference, cw_valid exactly one clock after shift 31 and at
// no other time, and the published reference words.
module tb_bch_encoder_core;
  import bch_tb_pkg::*;

  localparam int NI = 3;
  localparam int KS [NI] = '{26, 16, 6};
  localparam int NWORDS = 40;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b0;
  logic shift = 1'b0;
  logic last = 1'b0;
  logic [NI-1:0] cecode = '0;
  logic [NI-1:0] din = '0;
  logic [NI-1:0] dout, cw_valid;
  logic [30:0]   codeword [NI];

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

  bch_encoder_core #(.N(31), .K(26), .G(6'h25)) u26 (
    .clk, .rst, .ce, .shift, .cecode(cecode[0]), .last, .din(din[0]),
    .dout(dout[0]), .codeword(codeword[0]), .cw_valid(cw_valid[0]));
  bch_encoder_core #(.N(31), .K(16), .G(16'h8FAF)) u16 (
    .clk, .rst, .ce, .shift, .cecode(cecode[1]), .last, .din(din[1]),
    .dout(dout[1]), .codeword(codeword[1]), .cw_valid(cw_valid[1]));
  bch_encoder_core #(.N(31), .K(6), .G(26'h32DEA27)) u6 (
    .clk, .rst, .ce, .shift, .cecode(cecode[2]), .last, .din(din[2]),
    .dout(dout[2]), .codeword(codeword[2]), .cw_valid(cw_valid[2]));

  logic [30:0] msg [NI];
  logic [30:0] exp_cw [NI];
  logic [30:0] exp_q [NI][$];
  logic [30:0] stream [NI];
  bit          expect_valid = 1'b0;

  // cw_valid must follow the last shift by exactly one clock
  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < NI; i++) begin
        check(cw_valid[i] == expect_valid, $sformatf("cw_valid timing, code %0d", KS[i]));
        if (cw_valid[i]) begin
          logic [30:0] e;
          e = exp_q[i].pop_front();
          check(codeword[i] == e, $sformatf("codeword k=%0d %h expected %h", KS[i], codeword[i], e));
          check(stream[i] == e, $sformatf("dout stream k=%0d %h expected %h", KS[i], stream[i], e));
        end
        if (ce && shift) stream[i] = {stream[i][29:0], dout[i]};
      end
      expect_valid = ce && shift && last;
    end
  end

  // stimulus changes on the falling edge, away from the sampling edge
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      for (int i = 0; i < NI; i++) begin
        msg[i] = (w == 0) ? str_to_vec(ref_data(KS[i]))
                          : 31'($urandom()) & ((31'(1) << KS[i]) - 1);
        exp_cw[i] = ref_encode(KS[i], msg[i]);
        exp_q[i].push_back(exp_cw[i]);
        if (w == 0) check(exp_cw[i] == str_to_vec(ref_codeword(KS[i])), "reference word");
      end
      for (int s = 0; s < 31; s++) begin
        logic [NI-1:0] c, d;
        // some clocks with ce low or shift low: nothing may move
        while ($urandom_range(3, 0) == 0) begin
          ce = $urandom_range(1, 0) == 1;
          shift = 1'b0;
          cecode = '1;
          din = NI'($urandom());
          last = $urandom_range(1, 0) == 1;
          @(negedge clk);
          ce = 1'b0;
          shift = 1'b1;
          @(negedge clk);
        end
        ce = 1'b1;
        shift = 1'b1;
        last = (s == 30);
        for (int i = 0; i < NI; i++) begin
          c[i] = (s < KS[i]);
          d[i] = (s < KS[i]) ? msg[i][KS[i] - 1 - s] : 1'b0;
        end
        cecode = c;
        din = d;
        @(negedge clk);
      end
      ce = 1'b0;
      shift = 1'b0;
      last = 1'b0;
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < NI; i++) check(exp_q[i].size() == 0, "every codeword completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
