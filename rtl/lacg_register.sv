// lacg_register: register clocked through look-ahead clock gating.
//
// WIDTH rising-edge flip-flops load d. They are split into groups of
// GROUP_SIZE consecutive bits; each group has its own clock gate (icg_cell).
// During each clock cycle lacg_toggle_detect compares the present d with q; a
// group whose bits would all keep their value gets no clock pulse at the next
// edge, and any clock pulse is also suppressed while en is low. A flip-flop
// whose clock was stopped already holds the value d offers it, so the register
// behaves exactly like "if (en) q <= d" while its unchanged groups see no
// clock edge.
//
// Interface: clk, rst_n (asynchronous, active low, loads RESET_VALUE), en, d
// in; q, the per-bit toggle flags k, the per-group requests g and the gated
// clocks gclk out (the last three are observation points). Timing: one cycle
// of latency from d to q, like a plain register.
// With WIDTH = 1 this is the single D flip-flop with look-ahead clock gating:
// its clock pulses only when D differs from Q. The XOR/OR/ICG structure is the
// design's; the asynchronous active-low reset and the per-group split of a
// wider register (GROUP_SIZE < WIDTH) are this implementation's choices.
module lacg_register #(
  parameter int unsigned      WIDTH       = 16,
  parameter int unsigned      GROUP_SIZE  = WIDTH,
  parameter logic [WIDTH-1:0] RESET_VALUE = '1,
  localparam int unsigned     NGROUPS     = (WIDTH + GROUP_SIZE - 1) / GROUP_SIZE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WIDTH-1:0]   d,
  output logic [WIDTH-1:0]   q,
  output logic [WIDTH-1:0]   k,
  output logic [NGROUPS-1:0] g,
  output logic [NGROUPS-1:0] gclk
);

  lacg_toggle_detect #(
    .WIDTH     (WIDTH),
    .GROUP_SIZE(GROUP_SIZE)
  ) u_detect (
    .d(d),
    .q(q),
    .k(k),
    .g(g)
  );

  for (genvar j = 0; j < NGROUPS; j++) begin : g_group
    localparam int unsigned LO = j * GROUP_SIZE;
    localparam int unsigned HI = (LO + GROUP_SIZE > WIDTH) ? WIDTH - 1 : LO + GROUP_SIZE - 1;

    logic [HI-LO:0] bits;

    icg_cell u_icg (
      .clk (clk),
      .en  (en),
      .tog (g[j]),
      .gclk(gclk[j])
    );

    always_ff @(posedge gclk[j] or negedge rst_n) begin
      if (!rst_n) bits <= RESET_VALUE[HI:LO];
      else        bits <= d[HI:LO];
    end

    assign q[HI:LO] = bits;
  end

endmodule
