// tb_lacg_register: self-checking test of the clock-gated register.
//
// Three instances share clk, rst_n and en: the default (16 bits, one clock
// gate), 16 bits in four groups of 4, and a single flip-flop (WIDTH = 1). New
// data is applied after each falling edge, often equal to the present contents
// (whole register or single groups) so that gating is exercised. A reference
// model "if (en) q <= d" is updated at each rising clk edge. Checks: q equals
// the model after every edge; the reset value is loaded; each gated clock
// pulses exactly when en is high and its group's D differs from Q (for the
// single flip-flop: only when D != Q); and gated and passed pulses both occur
// for each instance.
module tb_lacg_register;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [15:0] d, qa, qb, ka, kb;
  logic [0:0]  ga, gclka;
  logic [3:0]  gb, gclkb;
  logic [0:0]  d1, q1, k1, g1, gclk1;

  lacg_register                                   u_a (.clk, .rst_n, .en, .d(d), .q(qa), .k(ka), .g(ga), .gclk(gclka));
  lacg_register #(.WIDTH(16), .GROUP_SIZE(4), .RESET_VALUE(16'hACE1))
                                                  u_b (.clk, .rst_n, .en, .d(d), .q(qb), .k(kb), .g(gb), .gclk(gclkb));
  lacg_register #(.WIDTH(1), .RESET_VALUE(1'b0))  u_1 (.clk, .rst_n, .en, .d(d1), .q(q1), .k(k1), .g(g1), .gclk(gclk1));

  int pulses_a = 0, pulses_1 = 0;
  int pulses_b[4] = '{default: 0};
  always @(posedge gclka[0]) pulses_a++;
  always @(posedge gclk1[0]) pulses_1++;
  for (genvar j = 0; j < 4; j++) begin : g_cnt
    always @(posedge gclkb[j]) pulses_b[j]++;
  end

  always #5 clk = ~clk;

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
    logic [15:0] ma, mb;
    logic [0:0]  m1;
    static int exp_a = 0, exp_1 = 0, gated_a = 0, gated_1 = 0, gated_b = 0;
    static int exp_b[4] = '{default: 0};
    d = '0; d1 = '0;
    #1 rst_n = 1'b0;
    #12;
    check(qa == 16'hFFFF && qb == 16'hACE1 && q1 == 1'b0, "reset values");
    @(negedge clk) rst_n = 1'b1;
    ma = qa; mb = qb; m1 = q1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      case ($urandom % 4)
        0: d = qa;                                        // nothing changes in u_a
        1: d = qb ^ (16'h000F << (4 * ($urandom % 4)) & 16'($urandom)); // one group of u_b
        2: d = qb;                                        // nothing changes in u_b
        default: d = 16'($urandom);
      endcase
      d1 = (($urandom % 2) != 0) ? q1 : ~q1;
      #1;
      // predicted clock activity for the coming edge
      if (en && d != qa) exp_a++; else gated_a++;
      if (en && d1 != q1) exp_1++; else gated_1++;
      for (int j = 0; j < 4; j++) begin
        if (en && d[4*j +: 4] != qb[4*j +: 4]) exp_b[j]++; else gated_b++;
      end
      check(ka == (d ^ qa) && kb == (d ^ qb) && k1 == (d1 ^ q1), "toggle flags");
      @(posedge clk);
      if (en) begin ma = d; mb = d; m1 = d1; end
      #1;
      check(qa == ma, $sformatf("u_a q=%h model=%h", qa, ma));
      check(qb == mb, $sformatf("u_b q=%h model=%h", qb, mb));
      check(q1 == m1, $sformatf("u_1 q=%b model=%b", q1, m1));
    end
    check(pulses_a == exp_a, $sformatf("u_a pulses %0d expected %0d", pulses_a, exp_a));
    check(pulses_1 == exp_1, $sformatf("u_1 pulses %0d expected %0d", pulses_1, exp_1));
    for (int j = 0; j < 4; j++)
      check(pulses_b[j] == exp_b[j], $sformatf("u_b group %0d pulses %0d expected %0d", j, pulses_b[j], exp_b[j]));
    check(gated_a > 0 && gated_b > 0 && gated_1 > 0 && exp_a > 0 && exp_1 > 0,
          "gated and passed pulses occurred");
    // asynchronous reset in the middle of a cycle
    @(negedge clk); #2 rst_n = 1'b0; #1;
    check(qa == 16'hFFFF && qb == 16'hACE1 && q1 == 1'b0, "asynchronous reset");
    $display("gated cycles: a=%0d b(group-cycles)=%0d single=%0d", gated_a, gated_b, gated_1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
