// lfsr_lacg: maximal-length LFSR with look-ahead clock gating (top level).
//
// A WIDTH-bit Fibonacci LFSR (lfsr_feedback) whose flip-flops sit in a
// lacg_register. The next state D is a function of the present state Q only,
// so the XOR of D and Q, and from it the clock-enable of every clock gate, is
// available a full cycle before the edge it controls. The clock reaches the
// flip-flops only through the integrated clock gate(s): no pulse while en is
// low, and no pulse for a group of flip-flops none of which would change.
//
// Defaults are the 16-bit design: polynomial 1 + x^4 + x^13 + x^15 + x^16,
// one clock gate shared by all 16 flip-flops, reset to all ones. With en held
// high the register steps through all 65535 non-zero states and then repeats.
// Smaller GROUP_SIZE values give each group its own gate, so groups whose bits
// do not change are left unclocked.
//
// Interface: clk, rst_n (asynchronous, active low), en in; q (the state Q[n]),
// serial_out (q[WIDTH-1], the bit shifted out), and observation outputs d (the
// next state D[n]), k (D xor Q), g (per-group clock request) and gclk (gated
// clock per group). Timing: one state step per rising clk edge while en is
// high; en is sampled at the rising edge like any synchronous input.
// The reset polarity and asynchronous reset are this implementation's choices.
module lfsr_lacg #(
  parameter int unsigned      WIDTH      = 16,
  parameter logic [WIDTH-1:0] TAPS       = WIDTH'(lfsr_lacg_pkg::default_taps(WIDTH)),
  parameter int unsigned      GROUP_SIZE = WIDTH,
  parameter logic [WIDTH-1:0] SEED       = '1,
  localparam int unsigned     NGROUPS    = (WIDTH + GROUP_SIZE - 1) / GROUP_SIZE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic [WIDTH-1:0]   q,
  output logic               serial_out,
  output logic [WIDTH-1:0]   d,
  output logic [WIDTH-1:0]   k,
  output logic [NGROUPS-1:0] g,
  output logic [NGROUPS-1:0] gclk
);

  if (SEED == '0) begin : g_bad_seed
    $error("lfsr_lacg: SEED must be non-zero");
  end

  lfsr_feedback #(
    .WIDTH(WIDTH),
    .TAPS (TAPS)
  ) u_feedback (
    .q(q),
    .d(d)
  );

  lacg_register #(
    .WIDTH      (WIDTH),
    .GROUP_SIZE (GROUP_SIZE),
    .RESET_VALUE(SEED)
  ) u_register (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (d),
    .q    (q),
    .k    (k),
    .g    (g),
    .gclk (gclk)
  );

  assign serial_out = q[WIDTH-1];

endmodule
