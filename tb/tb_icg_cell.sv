// tb_icg_cell: self-checking test of the latch-based clock gate.
//
// A 10 ns clock drives the gate. Before each rising edge en and tog are set at
// random (the truth table D/Q -> XOR -> gated clock is covered by tog = 0/1).
// In the middle of the high phase en and tog are changed again, which must not
// affect the pulse. Checks: during the high phase gclk equals the en & tog
// value present at the rising edge; during the low phase gclk is low; the
// number of gclk rising edges equals the number of enabled cycles.
module tb_icg_cell;

  int checks = 0, failures = 0;

  logic clk = 1'b0, en, tog, gclk;
  int   pulses = 0, expected_pulses = 0, blocked = 0;

  icg_cell dut (.clk(clk), .en(en), .tog(tog), .gclk(gclk));

  always @(posedge gclk) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    en = 0; tog = 0;
    #5;
    for (int n = 0; n < 2000; n++) begin
      // low phase: set the look-ahead enable
      en  = ($urandom % 4) != 0;
      tog = ($urandom % 2) != 0;
      want = en & tog;
      #2;
      check(gclk == 1'b0, "gclk high during low phase");
      #3 clk = 1'b1;
      if (want) expected_pulses++; else blocked++;
      #1;
      check(gclk == want, $sformatf("gclk=%0b want=%0b after rising edge", gclk, want));
      // disturb the inputs while the clock is high
      en = ~en; tog = ~tog;
      #2;
      check(gclk == want, "gclk changed by inputs during high phase");
      #2 clk = 1'b0;
      #1;
      check(gclk == 1'b0, "gclk did not follow clock low");
      en = 0; tog = 0;
      #4;
    end
    check(pulses == expected_pulses, $sformatf("pulses %0d expected %0d", pulses, expected_pulses));
    check(blocked > 0 && expected_pulses > 0, "both gated and passed cycles occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
