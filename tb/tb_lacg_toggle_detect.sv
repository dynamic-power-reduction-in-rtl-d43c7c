// tb_lacg_toggle_detect: self-checking test of the XOR/OR toggle detection.
//
// One instance with the default single group of 16 and one with two groups of
// 8 bits (the two-level OR of the 16-bit design) plus one with WIDTH=10,
// GROUP_SIZE=4 (uneven last group). Random and targeted D/Q pairs are applied;
// k must equal D xor Q bit by bit, and each g must be 1 exactly when some bit
// of its group differs, computed here by scanning the bits one at a time.
module tb_lacg_toggle_detect;

  int checks = 0, failures = 0;

  logic [15:0] d, q, k1, k2;
  logic [0:0]  g1;
  logic [1:0]  g2;
  logic [9:0]  d10, q10, k10;
  logic [2:0]  g10;

  lacg_toggle_detect                             u_one (.d(d), .q(q), .k(k1), .g(g1));
  lacg_toggle_detect #(.WIDTH(16), .GROUP_SIZE(8)) u_two (.d(d), .q(q), .k(k2), .g(g2));
  lacg_toggle_detect #(.WIDTH(10), .GROUP_SIZE(4)) u_odd (.d(d10), .q(q10), .k(k10), .g(g10));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic group_differs(input logic [63:0] a, b, input int lo, hi);
    for (int i = lo; i <= hi; i++) if (a[i] != b[i]) return 1'b1;
    return 1'b0;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      q = 16'($urandom);
      // Mix of: equal, one bit flipped, only one half changed, random.
      case (n % 4)
        0: d = q;
        1: d = q ^ (16'd1 << ($urandom % 16));
        2: d = q ^ ((n % 8 == 2) ? {8'h00, 8'($urandom | 1)} : {8'($urandom | 1), 8'h00});
        default: d = 16'($urandom);
      endcase
      q10 = 10'($urandom);
      d10 = (n % 3 == 0) ? q10 : q10 ^ (10'd1 << ($urandom % 10));
      #1;
      for (int i = 0; i < 16; i++) begin
        check(k1[i] == (d[i] != q[i]) && k2[i] == (d[i] != q[i]), $sformatf("k bit %0d", i));
      end
      check(g1[0] == group_differs(64'(d), 64'(q), 0, 15), $sformatf("g one group d=%h q=%h", d, q));
      check(g2[0] == group_differs(64'(d), 64'(q), 0, 7),  $sformatf("g2[0] d=%h q=%h", d, q));
      check(g2[1] == group_differs(64'(d), 64'(q), 8, 15), $sformatf("g2[1] d=%h q=%h", d, q));
      check(k10 == (d10 ^ q10), "k 10-bit");
      check(g10[0] == group_differs(64'(d10), 64'(q10), 0, 3), "g10[0]");
      check(g10[1] == group_differs(64'(d10), 64'(q10), 4, 7), "g10[1]");
      check(g10[2] == group_differs(64'(d10), 64'(q10), 8, 9), "g10[2]");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
