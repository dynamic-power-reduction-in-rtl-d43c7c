// icg_cell: integrated clock gate (latch + AND) for look-ahead clock gating.
//
// The enable input is ANDed with the look-ahead toggle request and the result
// is held in a D latch that is transparent while the clock is low. The latch
// output is ANDed with the clock to give the gated clock. Because the latch is
// closed during the high phase, a change of en or tog while the clock is high
// cannot cut or create a pulse: the gated clock is either a full copy of the
// clock pulse or stays low for the whole cycle.
//
// Interface: clk, en, tog in; gclk out. Timing: en and tog must be settled
// before the rising clock edge; the value they have at that edge decides
// whether the gated clock pulses during the following high phase.
// The AND-before-latch arrangement follows the design; the latch phase is the
// usual one for gating a rising-edge clock.
//
// This module intentionally contains a latch and a clock-path AND gate: that is
// the clock gate itself, not an inferred accident.
module icg_cell (
  input  logic clk,
  input  logic en,
  input  logic tog,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en & tog;
  end

  assign gclk = clk & en_latched;

endmodule
