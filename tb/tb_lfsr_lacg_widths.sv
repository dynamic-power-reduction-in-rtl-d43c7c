// tb_lfsr_lacg_widths: the top at the other register sizes (4, 8 and 32 bits).
//
// Each size runs with its default tap mask from lfsr_lacg_pkg and one shared
// clock gate, plus a 32-bit copy with four clock gates of 8 flip-flops. The
// 4- and 8-bit registers must return to all ones after exactly 15 and 255
// steps; the 32-bit ones are compared for 20000 steps with a reference built
// from the tap list 32, 22, 2, 1. en is dropped for a few cycles in between
// (the registers must hold), and the gated clock pulse counts are checked: one
// per enabled cycle for a shared gate, and for the grouped copy one per group
// and cycle in which that group has a changing bit.
module tb_lfsr_lacg_widths;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;

  logic [3:0]  q4,  d4,  k4;
  logic [7:0]  q8,  d8,  k8;
  logic [31:0] q32, d32, k32, q32g, d32g, k32g;
  logic        s4, s8, s32, s32g;
  logic [0:0]  g4, c4, g8, c8, g32, c32;
  logic [3:0]  g32g, c32g;

  lfsr_lacg #(.WIDTH(4))  u4  (.clk, .rst_n, .en, .q(q4),  .serial_out(s4),  .d(d4),  .k(k4),  .g(g4),  .gclk(c4));
  lfsr_lacg #(.WIDTH(8))  u8  (.clk, .rst_n, .en, .q(q8),  .serial_out(s8),  .d(d8),  .k(k8),  .g(g8),  .gclk(c8));
  lfsr_lacg #(.WIDTH(32)) u32 (.clk, .rst_n, .en, .q(q32), .serial_out(s32), .d(d32), .k(k32), .g(g32), .gclk(c32));
  lfsr_lacg #(.WIDTH(32), .GROUP_SIZE(8))
                          u32g (.clk, .rst_n, .en, .q(q32g), .serial_out(s32g), .d(d32g), .k(k32g), .g(g32g), .gclk(c32g));

  always #5 clk = ~clk;

  int p4 = 0, p8 = 0, p32 = 0, p32g = 0;
  always @(posedge c4[0])  p4++;
  always @(posedge c8[0])  p8++;
  always @(posedge c32[0]) p32++;
  for (genvar j = 0; j < 4; j++) begin : g_cnt
    always @(posedge c32g[j]) p32g++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  m4;
    logic [7:0]  m8;
    logic [31:0] m32;
    static int per4 = 0, per8 = 0, enabled = 0, exp_g = 0, held = 0;
    #1 rst_n = 1'b0;
    #11;
    check(q4 == '1 && q8 == '1 && q32 == '1 && q32g == '1, "reset to all ones");
    @(negedge clk) rst_n = 1'b1;
    m4 = '1; m8 = '1; m32 = '1;
    for (int n = 1; n <= 20000; n++) begin
      @(negedge clk);
      en = (n % 50) >= 3;                      // three disabled cycles every 50
      #1;
      if (en) begin
        enabled++;
        for (int j = 0; j < 4; j++) if (d32g[8*j +: 8] != q32g[8*j +: 8]) exp_g++;
      end
      @(posedge clk);
      #1;
      if (en) begin
        m4  = {m4[2:0],  m4[3] ^ m4[2]};
        m8  = {m8[6:0],  m8[7] ^ m8[5] ^ m8[4] ^ m8[3]};
        m32 = {m32[30:0], m32[31] ^ m32[21] ^ m32[1] ^ m32[0]};
        if (per4 == 0 && m4 == '1) per4 = enabled;
        if (per8 == 0 && m8 == '1) per8 = enabled;
      end else begin
        held++;
      end
      check(q4 == m4 && s4 == m4[3], $sformatf("4-bit q=%h model=%h", q4, m4));
      check(q8 == m8 && s8 == m8[7], $sformatf("8-bit q=%h model=%h", q8, m8));
      check(q32 == m32 && q32g == m32 && s32 == m32[31], $sformatf("32-bit q=%h model=%h", q32, m32));
    end
    check(per4 == 15,  $sformatf("4-bit period %0d", per4));
    check(per8 == 255, $sformatf("8-bit period %0d", per8));
    check(p4 == enabled && p8 == enabled && p32 == enabled, "one gated pulse per enabled cycle");
    check(p32g == exp_g, $sformatf("grouped 32-bit pulses %0d expected %0d", p32g, exp_g));
    check(held > 0 && exp_g < 4 * enabled, "enable gating and group gating both occurred");
    $display("grouped 32-bit: %0d group pulses of %0d possible", p32g, 4 * enabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
