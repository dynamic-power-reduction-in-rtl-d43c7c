// lfsr_feedback: next-state logic of a Fibonacci linear feedback shift register.
//
// The register is a chain FF1 .. FFn, stored as q[0] .. q[WIDTH-1]. On every
// step the XOR of the tapped bits (those set in TAPS) is shifted into FF1
// (q[0]) and every other FF takes the value of its left neighbour, so q[WIDTH-1]
// is the bit that leaves the register as the serial output. Starting from any
// non-zero value, a primitive polynomial walks through all 2^WIDTH - 1 non-zero
// states before it repeats.
//
// Interface: q is the present state Q[n], d the next state D[n]; purely
// combinational, no clock. The shift direction, the XOR feedback and the
// default 16-bit polynomial 1 + x^4 + x^13 + x^15 + x^16 follow the design
// description; the bit ordering (FF1 = q[0]) is chosen so that the hex values
// of the register match the reference transitions of the design. Every
// output bit except d[0] is a plain wire from an input bit: that is the shift.
module lfsr_feedback #(
  parameter int unsigned       WIDTH = 16,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(lfsr_lacg_pkg::default_taps(WIDTH))
) (
  input  logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] d
);

  if (WIDTH < 2) begin : g_bad_width
    $error("lfsr_feedback: WIDTH must be at least 2");
  end
  if (TAPS == '0 || TAPS[WIDTH-1] == 1'b0) begin : g_bad_taps
    $error("lfsr_feedback: TAPS must include the last register");
  end

  logic feedback;

  always_comb begin
    feedback = ^(q & TAPS);
    d        = {q[WIDTH-2:0], feedback};
  end

endmodule
