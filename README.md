# Look-ahead clock-gated LFSR

A linear feedback shift register (LFSR) is the usual hardware pseudo-random
bit generator. It is also a worst case for clock power: every flip-flop is
clocked on every cycle. This design puts the LFSR's flip-flops behind an
integrated clock gate (ICG). The gate's enable is computed **one cycle ahead**.
The next state of an LFSR depends only on its present state. So during a cycle,
the value each flip-flop will load (D) is already known and can be compared
with what it holds (Q). A flip-flop, or a group of flip-flops, gets a clock
edge only if at least one of its bits would change, and only while the
external `en` input is high.

The default configuration is a 16-bit maximal-length LFSR with the polynomial
1 + x^4 + x^13 + x^15 + x^16. It resets to all ones. One clock gate serves all
16 flip-flops. The register steps through all 65535 non-zero states and then
repeats.

## Structure

```
                 +-------------------- lfsr_lacg --------------------+
                 |                                                   |
                 |   lfsr_feedback        lacg_register              |
  clk ---------->|   q --> d = {q[14:0],   +---------------------+   |
  rst_n -------->|        ^(q & TAPS)} --->| d                 q |---+--> q, serial_out
  en ----------->|                         | lacg_toggle_detect  |   |
                 |                         |   k = d ^ q         |   |--> d, k, g, gclk
                 |                         |   g = OR over group |   |    (observation)
                 |                         | icg_cell per group  |   |
                 |                         |   latch(en & g)     |   |
                 |                         |   gclk = clk & latch|   |
                 |                         | FFs @(posedge gclk) |   |
                 |                         +---------------------+   |
                 +---------------------------------------------------+
```

| File | Role |
|------|------|
| `rtl/lfsr_lacg_pkg.sv` | Tap masks for 4-, 8-, 16- and 32-bit registers, and `default_taps(width)` |
| `rtl/lfsr_feedback.sv` | Combinational next-state logic: the XOR of the tapped bits enters bit 0, and every other bit takes its lower neighbour |
| `rtl/lacg_toggle_detect.sv` | `k = d ^ q` per bit; `g[j]` = OR of `k` over group `j` |
| `rtl/icg_cell.sv` | Clock gate: a latch that is transparent while `clk` is low holds `en & tog`; `gclk = clk & latch` |
| `rtl/lacg_register.sv` | Flip-flops split into groups, with one `icg_cell` per group. With `WIDTH = 1` it is a single self-gated D flip-flop |
| `rtl/lfsr_lacg.sv` | Top: `lfsr_feedback` plus `lacg_register` |

## How the look-ahead gating works

This is the part that needs care. Take one clock cycle, which runs from rising
edge *n* to rising edge *n+1*:

1. Just after edge *n*, `q` holds the new state. `lfsr_feedback` produces `d`,
   the state that edge *n+1* would load.
2. `lacg_toggle_detect` forms `k = d ^ q` and the per-group request `g`. The
   request has the whole cycle to settle. This is the "look-ahead": the
   decision about edge *n+1* uses data that is present during cycle *n*.
3. While `clk` is low, the latch in `icg_cell` follows `en & g`. At the rising
   edge it closes. The gated clock `gclk = clk & latch` is then either a full
   copy of the clock pulse or stays low. A change of `en` or `g` while `clk`
   is high cannot cut a pulse short or create one.
4. A group that gets no pulse keeps its value. This is correct, because that
   group's `d` equals its `q`. A group that does get a pulse loads `d`.

The register therefore behaves exactly like `if (en) q <= d;`. Its outputs
are the same as an ungated LFSR with an enable. The only difference is which
flip-flops see a clock edge.

### What the gating saves, depending on `GROUP_SIZE`

- **One gate for all bits (default, `GROUP_SIZE = WIDTH`).** In a
  maximal-length LFSR a non-zero state never maps to itself. So while `en` is
  high, `g` is always 1 and every cycle is clocked. The gate removes clock
  activity only while `en` is low. There the latch-based ICG stops the clock to
  every flip-flop, including the master latches.
- **One gate per flip-flop (`GROUP_SIZE = 1`).** Flip-flop *i* loads bit *i-1*,
  so it is clocked only when it differs from its lower neighbour. The
  end-to-end test measures this: over 67 931 enabled cycles the flip-flops
  received 543 215 of 1 086 896 possible clock edges, almost exactly 50 %.
  Each enabled cycle still advances the LFSR by exactly one state. The
  saving is in clock activity, not in cycles.
- **Groups in between** (for example 4 × 8 bits for 32 bits) trade the number
  of gates against the chance that a whole group is idle. With 8-bit groups on
  a 32-bit LFSR almost every group changes on every step: 74 876 of 75 200
  group pulses were passed.

## Register conventions

- Bit `q[0]` is the first stage. It receives the feedback. `q[WIDTH-1]` is the
  last stage, and `serial_out` is that bit, the one shifted out.
- A tap on "register *r*" is bit *r-1* of the mask `TAPS`. The feedback is a
  plain XOR, so the all-zero state is a lock-up state. `SEED` must not be zero,
  and an elaboration check rejects it.

| Width | Taps (registers) | Mask | Where the taps come from |
|-------|------------------|------|--------------------------|
| 4  | 4, 3 | `4'hC` | the design's stated 4-bit polynomial 1 + x^3 + x^4 |
| 8  | 8, 6, 5, 4 | `8'hB8` | standard maximal-length tap set (own choice) |
| 16 | 16, 15, 13, 4 | `16'hD008` | the design's polynomial 1 + x^4 + x^13 + x^15 + x^16 (default) |
| 32 | 32, 22, 2, 1 | `32'h80200003` | standard maximal-length tap set (own choice) |

The following transitions are reference values for the 4-, 8-, 16- and 32-bit
registers. The testbench reproduces all of them:

| Width | q → d | k = d ^ q |
|-------|-------|-----------|
| 4  | `6` → `D` | `B` |
| 8  | `C1` → `83` | `42` |
| 16 | `8DB1` → `1B63` | `96D2` |
| 32 | `FB81FF92` → `F703FF24` | `0C8200B6` |

For other widths, pass `TAPS` explicitly. `default_taps` returns 0 for widths
it does not know, and elaboration then stops with an error.

## Parameters and ports of `lfsr_lacg`

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `WIDTH` | 16 | number of stages |
| `TAPS` | `default_taps(WIDTH)` = `16'hD008` | feedback mask; must include bit `WIDTH-1` |
| `GROUP_SIZE` | `WIDTH` | flip-flops per clock gate |
| `SEED` | all ones | reset value, must be non-zero |

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | free-running clock; flip-flops are rising-edge |
| `rst_n` | in | 1 | asynchronous, active-low reset to `SEED` |
| `en` | in | 1 | step enable; its value at a rising edge decides that edge |
| `q` | out | WIDTH | present state |
| `serial_out` | out | 1 | `q[WIDTH-1]` |
| `d`, `k` | out | WIDTH | next state and `d ^ q` (observation) |
| `g`, `gclk` | out | ceil(WIDTH/GROUP_SIZE) | clock request and gated clock per group (observation) |

Latency: `q` moves one state on every rising `clk` edge at which `en` is high.
There is no pipeline delay.

## Choices made in this implementation

- **Reset** is asynchronous and active low. It works while the clock is gated
  off. Reset to all ones is the conventional non-zero seed.
- **Latch phase.** The ICG latch is transparent while the clock is low. This is
  the standard glitch-free gate for rising-edge flip-flops. The enable is ANDed
  with the toggle request *before* the latch.
- **Grouping.** The default uses one gate for the whole register. `GROUP_SIZE`
  splits the register into groups of consecutive bits, with a shorter last
  group if needed. This generalisation is this implementation's own.
- **Single flip-flop.** The single self-gated flip-flop (clock passes only when
  D ≠ Q) is `lacg_register #(.WIDTH(1))`. It uses the same latch-based gate
  rather than a bare `clk & (d ^ q)`, which could glitch.
- **Two-level OR.** The OR tree of the 16-bit register can be drawn as two
  8-input ORs followed by a 2-input OR. It is written as one reduction; the
  logic is the same.

## Not included

- Power figures. The point of the technique is dynamic power, but the savings
  can only be judged from a gate-level power analysis with a cell library.
  RTL simulation cannot give them. The testbenches count clock pulses instead.
- The ungated LFSR and the data-driven clock-gated LFSR, which serve only as
  comparison points.
- A variant of the look-ahead gater that registers the enable in a flip-flop
  instead of a latch. Only the latch-based ICG is built.
- A clock-activity monitor output. Only the gated clocks themselves are
  brought out (`gclk`), and the testbenches count their pulses.
- The full 2^32 − 1 period of the 32-bit register is not simulated. It is
  checked for 20 000 steps.

## Implementation notes

- `icg_cell` contains a latch, and it gates a clock with an AND gate. This is
  intentional. For an ASIC, replace the body of `icg_cell` with the library's
  integrated clock-gating cell and declare the gated clocks to clock-tree
  synthesis. On an FPGA, use the vendor's clock-enable buffer, or fall back to
  a clock enable (`if (en & g) q <= d`). That keeps the behaviour but gives up
  the clock-power saving.
- In `lfsr_feedback`, all output bits except bit 0 are wires from the input.
  That is what a shift register is.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with plain
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lfsr_lacg_pkg.sv tb/tb_lfsr_lacg.sv --top-module tb_lfsr_lacg
./obj_dir/Vtb_lfsr_lacg
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_lfsr_feedback` | next state at 4/8/16/32 bits against a tap-list reference and the reference transitions; full periods 15, 255 and 65535 |
| `tb_lacg_toggle_detect` | `k` and `g` for one group, two groups of 8, and an uneven 10-bit/4-bit split |
| `tb_icg_cell` | the gated clock copies the clock only when `en & tog` held at the rising edge; input changes during the high phase are ignored |
| `tb_lacg_register` | 16-bit/1 group, 16-bit/4 groups and 1-bit registers against `if (en) q <= d`; exact pulse count per gate; asynchronous reset |
| `tb_lfsr_lacg` | end to end: the default top and a per-flip-flop-gated copy through a full 65535-step period, random `en`, and a reset during operation. It counts wrap-around, enable-gated cycles, toggle-gated flip-flop edges and resets, and requires each at least once |
| `tb_lfsr_lacg_full` | the top with all defaults: one full period, every state distinct, back at the seed after exactly 65535 edges, one gated pulse per step |
| `tb_lfsr_lacg_widths` | 4-, 8- and 32-bit tops (32-bit also with 4 gates): periods 15 and 255, 20 000 steps of 32 bits, pulse counts |

Verilator simulates in two states. An asynchronous reset therefore needs an
actual falling edge on `rst_n`, so the testbenches start it high and pull it
low. The whole set runs in a few seconds.
