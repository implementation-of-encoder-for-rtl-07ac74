// Self-checking testbench of the shift-rate clock enable (bch_clk_en).
//
// Instances with the default DIV = 32 (50 MHz -> 1.5625 MHz), DIV = 5 and
// DIV = 1. For each, the first pulse must come DIV clocks after reset is
// released, every pulse must last one clock (DIV > 1), and pulses must be
// exactly DIV clocks apart. The default instance is also checked against the
// shift rate: with a 20 ns clock, one pulse every 640 ns.
module tb_bch_clk_en;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce32, ce5, ce1;

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bch_clk_en             u32 (.clk, .rst, .ce(ce32));
  bch_clk_en #(.DIV(5))  u5  (.clk, .rst, .ce(ce5));
  bch_clk_en #(.DIV(1))  u1  (.clk, .rst, .ce(ce1));

  int    cyc = 0;            // clocks since reset release
  int    last32 = 1, last5 = 1, pulses32 = 0, pulses5 = 0;
  realtime t_last32 = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      check(ce1 == 1'b1, "DIV=1 enable always high");
      if (ce32) begin
        check(cyc - last32 == 32, $sformatf("DIV=32 pulse spacing %0d", cyc - last32));
        if (pulses32 > 0) check($realtime - t_last32 == 640.0, "1.5625 MHz shift rate");
        t_last32 = $realtime;
        last32 = cyc;
        pulses32++;
      end else begin
        check(cyc - last32 < 32, "DIV=32 pulse missing");
      end
      if (ce5) begin
        check(cyc - last5 == 5, $sformatf("DIV=5 pulse spacing %0d", cyc - last5));
        last5 = cyc;
        pulses5++;
      end else begin
        check(cyc - last5 < 5, "DIV=5 pulse missing");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (32 * 20 + 1) @(negedge clk);
    check(pulses32 == 20, $sformatf("%0d pulses of DIV=32", pulses32));
    check(pulses5 == 128, $sformatf("%0d pulses of DIV=5", pulses5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
