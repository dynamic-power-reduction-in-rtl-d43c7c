// lacg_toggle_detect: look-ahead toggle detection for clock gating.
//
// For every flip-flop the XOR of its present data input D and its output Q
// tells whether the next clock edge would change it (k). The XORs of a group
// of GROUP_SIZE consecutive flip-flops are ORed into one request g per group:
// the group needs a clock pulse at the next edge only if at least one of its
// flip-flops would toggle. D is the value the flip-flops will load, so g is
// known a full clock cycle before the edge it controls.
//
// Interface: d, q (WIDTH bits) in; k (WIDTH bits) and g (one bit per group)
// out. Purely combinational. The XOR-per-FF and OR-per-group structure follows
// the design; with the default GROUP_SIZE = WIDTH all XORs share one OR and one
// clock gate, as in the 16-bit design (which draws that OR as two 8-input ORs
// followed by a 2-input OR; the reduction here is logically the same). A last
// group shorter than GROUP_SIZE is allowed when WIDTH is not a multiple of it.
module lacg_toggle_detect #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned GROUP_SIZE = WIDTH,
  localparam int unsigned NGROUPS   = (WIDTH + GROUP_SIZE - 1) / GROUP_SIZE
) (
  input  logic [WIDTH-1:0]   d,
  input  logic [WIDTH-1:0]   q,
  output logic [WIDTH-1:0]   k,
  output logic [NGROUPS-1:0] g
);

  if (GROUP_SIZE < 1 || GROUP_SIZE > WIDTH) begin : g_bad_group
    $error("lacg_toggle_detect: GROUP_SIZE must be between 1 and WIDTH");
  end

  always_comb begin
    k = d ^ q;
    g = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      g[i / GROUP_SIZE] = g[i / GROUP_SIZE] | k[i];
    end
  end

endmodule
