// tb_lfsr_lacg: end-to-end test of the look-ahead clock-gated LFSR.
//
// Two copies of the top run side by side on one clock: dut with every
// parameter at its default (16 bits, one clock gate for all flip-flops) and
// dut_ff with one clock gate per flip-flop (GROUP_SIZE = 1). A reference LFSR
// built from the tap list 16, 15, 13, 4 predicts every state.
//
// Sequence: reset to all ones; one full period (65535 steps) with en high,
// which must end back at all ones; a stretch with random en (the register must
// hold while en is low and no gated clock may pulse); an asynchronous reset in
// the middle of the run; and a final stretch after it. Every cycle checks q,
// d, k = d ^ q, g, serial_out and that the register moves exactly one step per
// enabled edge. Clock pulses are counted: dut must pulse once per enabled
// cycle; each flip-flop of dut_ff must pulse exactly when its own bit changes.
// Mechanisms counted, each required at least once: period wrap-around, cycles
// gated by en, flip-flop clock pulses suppressed by the toggle detection,
// asynchronous reset during operation.
module tb_lfsr_lacg;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [15:0] q, d, k, qf, df, kf;
  logic        so, sof;
  logic [0:0]  g, gclk;
  logic [15:0] gf, gclkf;

  lfsr_lacg dut (.clk, .rst_n, .en, .q(q), .serial_out(so), .d(d), .k(k), .g(g), .gclk(gclk));
  lfsr_lacg #(.GROUP_SIZE(1)) dut_ff (.clk, .rst_n, .en, .q(qf), .serial_out(sof), .d(df), .k(kf),
                                      .g(gf), .gclk(gclkf));

  always #5 clk = ~clk;

  int pulses = 0, ff_pulses = 0;
  always @(posedge gclk[0]) pulses++;
  for (genvar i = 0; i < 16; i++) begin : g_cnt
    always @(posedge gclkf[i]) ff_pulses++;
  end

  function automatic logic [15:0] ref_next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model;
  int wraps = 0, en_gated = 0, toggle_gated = 0, resets = 0;
  int exp_pulses = 0, exp_ff_pulses = 0;

  // One cycle: set en after the falling edge, check the comb outputs, take the
  // rising edge, update the model, check the new state.
  task automatic step(input logic en_v);
    int p0, f0, toggles;
    @(negedge clk);
    en = en_v;
    #1;
    check(q == model && qf == model, $sformatf("state q=%h qf=%h model=%h", q, qf, model));
    check(d == ref_next(model) && df == d, $sformatf("next state d=%h", d));
    check(k == (d ^ q) && kf == k, "k = d xor q");
    check(g[0] == |k && gf == k, "g");
    check(so == q[15] && sof == so, "serial_out");
    toggles = $countones(d ^ q);
    if (en_v) begin
      exp_pulses++;
      exp_ff_pulses += $countones(d ^ q);
      toggle_gated  += 16 - $countones(d ^ q);
    end else begin
      en_gated++;
    end
    p0 = pulses; f0 = ff_pulses;
    @(posedge clk);
    #1;
    if (en_v) model = ref_next(model);
    check(q == model && qf == model, "one step per enabled edge");
    check(pulses - p0 == (en_v ? 1 : 0), "one gated clock pulse per enabled cycle, none when disabled");
    check(ff_pulses - f0 == (en_v ? toggles : 0), "per-FF pulses equal the number of changing bits");
  endtask

  initial begin
    int n;
    #1 rst_n = 1'b0;
    #11;
    check(q == 16'hFFFF && qf == 16'hFFFF, "reset to all ones");
    @(negedge clk) rst_n = 1'b1;
    model = 16'hFFFF;

    // one full period with en high
    n = 0;
    do begin
      step(1'b1);
      n++;
    end while (model != 16'hFFFF && n < 70000);
    check(n == 65535, $sformatf("period %0d, expected 65535", n));
    check(q == 16'hFFFF, "back at the seed after one period");
    if (n == 65535) wraps++;

    // random enable
    repeat (3000) step(($urandom % 3) != 0);

    // asynchronous reset in the middle of a cycle
    @(negedge clk); #2 rst_n = 1'b0; #1;
    check(q == 16'hFFFF && qf == 16'hFFFF, "asynchronous reset");
    resets++;
    @(negedge clk) rst_n = 1'b1;
    model = 16'hFFFF;
    repeat (500) step(($urandom % 4) != 0);

    check(pulses == exp_pulses, $sformatf("dut gated clock pulses %0d expected %0d", pulses, exp_pulses));
    check(ff_pulses == exp_ff_pulses, $sformatf("dut_ff flip-flop clock pulses %0d expected %0d",
                                                ff_pulses, exp_ff_pulses));
    $display("mechanisms: wraps=%0d en_gated_cycles=%0d toggle_gated_ff_pulses=%0d resets=%0d",
             wraps, en_gated, toggle_gated, resets);
    $display("clock pulses: shared gate %0d of %0d cycles; per-FF gates %0d of %0d FF-cycles",
             pulses, exp_pulses + en_gated, ff_pulses, 16 * (exp_pulses + en_gated));
    check(wraps > 0, "wrap-around happened");
    check(en_gated > 0, "enable gating happened");
    check(toggle_gated > 0, "toggle-based gating happened");
    check(resets > 0, "reset during operation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
