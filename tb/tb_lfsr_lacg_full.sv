// tb_lfsr_lacg_full: one complete operation of the default top.
//
// The top runs with every parameter at its default (16-bit LFSR, polynomial
// 1 + x^4 + x^13 + x^15 + x^16, one shared clock gate, seed all ones). After
// reset, en is held high and the whole maximal-length sequence is generated:
// every state is compared with a reference LFSR, no state may repeat before
// the end, and the register must be back at the seed after exactly 65535
// rising edges, each of which must have produced one gated clock pulse.
module tb_lfsr_lacg_full;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [15:0] q, d, k;
  logic        so;
  logic [0:0]  g, gclk;

  lfsr_lacg dut (.clk, .rst_n, .en, .q(q), .serial_out(so), .d(d), .k(k), .g(g), .gclk(gclk));

  always #5 clk = ~clk;

  int pulses = 0;
  always @(posedge gclk[0]) pulses++;

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

  bit seen [logic [15:0]];

  initial begin
    logic [15:0] model;
    static int n = 0;
    #1 rst_n = 1'b0;
    #11;
    check(q == 16'hFFFF, "reset to all ones");
    @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    model = 16'hFFFF;
    seen[model] = 1'b1;
    do begin
      @(posedge clk);
      #1;
      model = {model[14:0], model[15] ^ model[14] ^ model[12] ^ model[3]};
      n++;
      check(q == model, $sformatf("step %0d q=%h model=%h", n, q, model));
      if (model != 16'hFFFF) begin
        check(!seen.exists(model), $sformatf("state %h repeated early", model));
        seen[model] = 1'b1;
      end
    end while (q != 16'hFFFF && n < 70000);
    check(n == 65535, $sformatf("period %0d, expected 65535", n));
    check(seen.size() == 65535, $sformatf("%0d distinct states", seen.size()));
    check(pulses == n, $sformatf("%0d gated clock pulses for %0d steps", pulses, n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
