// tb_lfsr_feedback: self-checking test of the LFSR next-state logic.
//
// Four instances (4, 8, 16 and 32 bits, default tap masks) are checked
// against a reference that builds the feedback bit from a list of tap
// positions (register numbers 1..n) rather than from the mask, against one
// recorded transition per size (for example 16'h8DB1 -> 16'h1B63), and, for
// 4, 8 and 16 bits, by walking the whole sequence: from all ones it must come
// back to all ones after exactly 2^n - 1 steps without passing through zero.
module tb_lfsr_feedback;

  int checks = 0, failures = 0;

  logic [3:0]  q4,  d4;
  logic [7:0]  q8,  d8;
  logic [15:0] q16, d16;
  logic [31:0] q32, d32;

  lfsr_feedback #(.WIDTH(4))  u4  (.q(q4),  .d(d4));
  lfsr_feedback #(.WIDTH(8))  u8  (.q(q8),  .d(d8));
  lfsr_feedback               u16 (.q(q16), .d(d16));
  lfsr_feedback #(.WIDTH(32)) u32 (.q(q32), .d(d32));

  // Reference next state: taps given as register numbers (FFn = bit n-1).
  function automatic logic [63:0] ref_next(input logic [63:0] s, input int unsigned w,
                                            input int unsigned t0, t1, t2, t3);
    logic fb;
    fb = s[t0-1] ^ s[t1-1];
    if (t2 != 0) fb ^= s[t2-1];
    if (t3 != 0) fb ^= s[t3-1];
    return ((s << 1) | 64'(fb)) & ((64'd1 << w) - 1);
  endfunction

  function automatic logic [63:0] ref_w(input logic [63:0] s, input int unsigned w);
    case (w)
      4:  return ref_next(s, 4, 4, 3, 0, 0);
      8:  return ref_next(s, 8, 8, 6, 5, 4);
      16: return ref_next(s, 16, 16, 15, 13, 4);
      default: return ref_next(s, 32, 32, 22, 2, 1);
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Recorded transitions, one per size.
    q4 = 4'h6; q8 = 8'hC1; q16 = 16'h8DB1; q32 = 32'hFB81_FF92;
    #1;
    check(d4  == 4'hD,          "4-bit 6 -> D");
    check(d8  == 8'h83,         "8-bit C1 -> 83");
    check(d16 == 16'h1B63,      "16-bit 8DB1 -> 1B63");
    check(d32 == 32'hF703_FF24, "32-bit FB81FF92 -> F703FF24");
    check((d8 ^ q8) == 8'h42 && (d16 ^ q16) == 16'h96D2 && (d32 ^ q32) == 32'h0C82_00B6,
          "recorded D xor Q values");

    // Random states against the reference.
    repeat (2000) begin
      q4 = 4'($urandom); q8 = 8'($urandom); q16 = 16'($urandom); q32 = $urandom;
      #1;
      check(64'(d4)  == ref_w(64'(q4), 4),   $sformatf("4-bit q=%h d=%h", q4, d4));
      check(64'(d8)  == ref_w(64'(q8), 8),   $sformatf("8-bit q=%h d=%h", q8, d8));
      check(64'(d16) == ref_w(64'(q16), 16), $sformatf("16-bit q=%h d=%h", q16, d16));
      check(64'(d32) == ref_w(64'(q32), 32), $sformatf("32-bit q=%h d=%h", q32, d32));
    end

    // Full period of the 4-, 8- and 16-bit sequences.
    begin
      static int unsigned n4 = 0, n8 = 0, n16 = 0;
      static bit zero_seen = 0;
      q4 = '1; q8 = '1; q16 = '1;
      do begin #1; q4 = d4; n4++; zero_seen |= (q4 == 0); end while (q4 != '1 && n4 < 20);
      do begin #1; q8 = d8; n8++; zero_seen |= (q8 == 0); end while (q8 != '1 && n8 < 300);
      do begin #1; q16 = d16; n16++; zero_seen |= (q16 == 0); end while (q16 != '1 && n16 < 70000);
      check(n4 == 15,     $sformatf("4-bit period %0d", n4));
      check(n8 == 255,    $sformatf("8-bit period %0d", n8));
      check(n16 == 65535, $sformatf("16-bit period %0d", n16));
      check(!zero_seen, "all-zero state never reached");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
