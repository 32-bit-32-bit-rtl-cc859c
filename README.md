# Multi-precision 32x32 multiplier with operand-driven voltage and frequency scaling

A 32x32 multiplier on a fixed 3.3 V supply and a fixed 100 MHz clock wastes
power whenever its operands are small. This design looks at every operand pair
before it multiplies it. The size of the larger operand picks one of three
precision classes, and each class has its own operating point:

| class (control) | operand range (each operand) | multiplier section used | supply | clock       |
|-----------------|------------------------------|-------------------------|--------|-------------|
| 1 — 8-bit       | 0 … 128                      | 1 of 16 8x8 blocks      | 1.2 V  | F/4 = 25 MHz |
| 2 — 16-bit      | 129 … 32 768                 | 4 of 16 8x8 blocks      | 2.5 V  | F/2 = 50 MHz |
| 3 — 32-bit      | 32 769 … 2^32−1              | all 16 8x8 blocks       | 3.3 V  | F = 100 MHz  |

A pair whose operands fall in different classes runs in the larger class. So
8x16 runs as 16-bit and 16x32 as 32-bit. The thresholds are inclusive (128 is
still 8-bit data), and operands are unsigned.

## Data and control flow

```
 m1,m2 ──► operand_scanner ──control──► vfmu ──target_mv──► voltage_scaling_unit ──supply_mv, v_ok
              │  k1/k11, k2/k22, k3/k33      │                (behavioural model)
              │                               └─target_prec─► freq_scaling_unit ──op_clk──┐
              ▼                                                 (2 JK flip-flops + select) │
         mp_multiplier  ◄────────────────────────────────────────────────────────────────┘
              │ (16 x mult8x8, clocked by op_clk)              led_counter ◄── op_clk
              ▼
          product
 razor_error_i ──► vfmu  (error feedback: forces the full operating point)
 op_sequencer + pulse_sync: order the steps and cross between clk and op_clk
```

`mp_dvfs_top` wires these units together. Its ports are plain signals. The
values a front panel would show (product, class, target voltage and
frequency, modelled supply) and the divided clocks come out as ports.

## Operand scheduling

`operand_scanner` classifies both operands at once on a `load` strobe. It
then writes them into exactly one of three register pairs: `k1/k11` (8 bits),
`k2/k22` (16 bits) or `k3/k33` (32 bits). The other two pairs are cleared.
The choice of class thus also decides where the data goes. Downstream, the
multiplier only ever sees non-zero data in the section that the class needs.
The scanner also drives the 2-bit `control` code (`dvfs_pkg::prec_e`), from
which everything else works. Code 0 exists only between reset and the first
operation, and every unit treats it as class 3.

## The multiplier array

`mp_multiplier` splits each 32-bit operand into bytes `a[i]`, `b[j]`. It
forms the sixteen partial products `a[i]*b[j]` in `mult8x8` blocks and adds
them with weight `2^(8(i+j))`. The precision gates the block inputs:

- class 1: only block (0,0);
- class 2: blocks with i, j < 2;
- class 3: all blocks.

A gated block gets constant zero inputs, so it does not toggle. This is
operand isolation, the RTL stand-in for switching off the unused part of the
multiplier. The result is registered on the operating clock. `start` →
`p`/`done` takes one operating-clock cycle.

### Parallel mode: independent smaller multipliers

The same array also works as several independent multipliers. The top's
`lanes_i` input, sampled with `start_i`, picks the operand layout:

| `lanes_i` | operands in `m1_i`, `m2_i` | active blocks | `product_o` |
|-----------|----------------------------|---------------|-------------|
| 0 `LANES_1` | one 32-bit pair | by class, as above | one 64-bit product |
| 1 `LANES_2X16` | two 16-bit lanes each | (i,j) with i/2 = j/2 (8 blocks) | lane k at `[32k+31:32k]` |
| 2 `LANES_4X8` | four 8-bit lanes each | diagonal (i,i) (4 blocks) | lane k at `[16k+15:16k]` |

No extra adder or mux is needed. With only those blocks active, the normal
weighted sum already places each lane's product in its own bit field, and
the fields do not overlap.

Packed words pass through the scanner unchanged, into `k3/k33`. Their
class, and so their operating point, is the larger of two values: the class
of the lane width, and the class of the largest lane value under the usual
thresholds. A 4x8 word whose bytes are all ≤ 128 runs at 1.2 V/25 MHz, and
one with a byte of 129…255 runs at 2.5 V/50 MHz. 2x16 words run in class 2,
or in class 3 if a half exceeds 32 768.

## Clocking: the JK divider and the clock switch

This part is the least obvious.

`freq_scaling_unit` is a ripple divider. It uses two `jk_ff` instances with
J = K = 1. The first one runs on the main clock F and gives `clk_div2`. The
second one runs on `clk_div2` and gives `clk_div4`. After reset both outputs
are 0, and on each rising edge of F the pair (clk_div2, clk_div4) steps
through (1,1), (0,1), (1,0), (0,0).

The operating clock is a multiplexer over F, F/2 and F/4. A naive select
would cut a clock phase short whenever the target changes. Here the select
register (`applied_prec`) loads only on a falling edge of F at which both
divided clocks are 0. After that edge all three clocks stay low until the next
rising edge of F, so the switch cannot make a runt pulse. A new target
therefore takes effect within four F periods. Every rising edge of `op_clk`
falls on a rising edge of F. The sequencer compares `applied_prec` with the
target to know when the new clock is in force.

Because the multiplier runs on `op_clk` and the control runs on F, the start
request and the completion pulse cross between the two domains. Each crossing
uses a toggle-and-two-flop synchroniser (`pulse_sync`). The operand registers
do not need one: they are loaded several cycles before the request arrives,
and they stay stable until the next operation.

## Sequence and timing of one operation

`op_sequencer` (main clock) enforces scan → scale → multiply:

1. **IDLE**: `ready_o` is high. `start_i` loads the scanner.
2. **SCALE**: waits until the supply model reports the target voltage
   (`v_ok`) and the clock select matches the target. Then it sends one
   request to the multiplier. `scale_cycles_o` records how long this took.
3. **MULT**: waits for the synchronised completion pulse, then pulses
   `done_o`. `product_o` stays valid until the next start.

Latency from `start_i` to `done_o` depends on the transition:

- up to 21 cycles of voltage slew (1.2 V ↔ 3.3 V at 100 mV/cycle);
- up to 4 cycles for the clock switch;
- about 2–3 operating-clock cycles each way for the synchronisers, plus one
  for the multiply.

At F/4 that is roughly 50 main-clock cycles in the worst case. Repeated
operations of the same class skip the slew and the switch.

## Voltage scaling and error feedback

`voltage_scaling_unit` is a **behavioural model** of an analog regulator, not
logic to be built. It represents the supply as integer millivolts and moves it
100 mV per clock toward the reference from `vfmu`. It starts at 3.3 V after
reset. On a real board this is an external regulator. It can be replaced by
one with the same ports, as long as `v_ok` means "the supply has settled".

`razor_error_i` is the timing-error feedback from the multiplier to the
management unit. While it is high, `vfmu` asks for the full operating point
(3.3 V, F), whatever the class. The error detectors themselves are not
included (see below).

## What follows the published design and what is this implementation's own

Taken from the design description:

- the three classes, their thresholds and the "larger class wins" rule;
- the control codes 1/2/3 and the register names `k1 … k33`;
- the 1.2/2.5/3.3 V and F/4, F/2, F operating points with F = 100 MHz;
- the two-JK-flip-flop ripple divider;
- the 8x8 building block and disabling the unused part of the multiplier;
- a 4-bit LED counter on the scaled clock.

Choices made here:

- unsigned operands;
- clearing the unselected operand registers;
- operand isolation as the way to disable blocks;
- the glitch-free clock-select point;
- the sequencer, its handshake and the clock-domain synchronisers;
- the millivolt/MHz encodings;
- the regulator model's slew rate and reset level;
- a one-cycle registered multiplier;
- the packed-lane operand format and how packed words are classified;
- what the error feedback does (forces the full point);
- rising-edge clocking of both JK flip-flops.

Where the description is inconsistent:

- A supply range of 1.25–3.3 V and a frequency range of 32–8 MHz are also
  quoted in passing. The per-class values in the table above are used.
- The scan is also described as byte-wise (bits 0–7, 8–15, 16–31), under
  which 129…255 would count as 8-bit data. The numeric thresholds (≤ 128,
  ≤ 32 768) are used instead.

Not included:

- the Razor timing-error detectors, which only appear as an error signal;
- the LCD that shows the results;
- a "performance request" input to the management unit, which is drawn but
  never defined;
- the T-flip-flop divider, which is only an alternative the description
  compares against.

## How far it has been checked

Each block has a self-checking testbench in `tb/`, and each compares against
values computed independently in the testbench:

- `operand_scanner_tb`: the three worked examples (23×10, 6374×99,
  2378346×1500058), every pair of threshold-edge values, random pairs, and
  packed words.
- `vfmu_tb`: the whole table, with and without error feedback.
- `freq_scaling_unit_tb`:
  - divider sequence and rates;
  - switch time ≤ 4 cycles;
  - no phase shorter than half an F period across 300 random switches;
  - op_clk edges aligned with F.
- `voltage_scaling_unit_tb`: every slew step and the 21/13/8-cycle
  transitions.
- `mp_multiplier_tb`: all classes and both packed layouts, all-ones operands,
  random operands, with garbage in the unused register pairs.
- `op_sequencer_tb`: request only at the operating point, one request per
  operation, start ignored while busy.
- `led_counter_tb`: counting, wrap-around and reset.
- `mp_dvfs_top_tb`: 93 operations end to end at the default configuration,
  about a quarter of the random ones in a packed layout.
  - Checks: product, class, target point, settled supply, measured op_clk rate
    (10/20/40 edges per 40 F cycles), LED advance and a latency bound.
  - Fails if any class, a mixed-class pair, a voltage rise or fall, a clock
    speed-up or slow-down, the error override or either packed layout never
    happened.

The clock switch is verified in zero-delay simulation only. On an FPGA, clock
multiplexing and ripple-clocked flip-flops also need the vendor's clock
resources and timing constraints. Timing closure of the 32x32 array at
100 MHz has not been checked.

## Simulating

Every testbench ends with a `TB_RESULT checks=N failures=M` line. Example with
plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/dvfs_pkg.sv tb/mp_dvfs_top_tb.sv --top-module mp_dvfs_top_tb -o sim
./obj_dir/sim
```

Replace `mp_dvfs_top_tb` with any other `*_tb` to test a single block.

## Changing it

- The thresholds, voltages and main frequency are constants in
  `rtl/dvfs_pkg.sv`.
- The supply model's slew and reset level are parameters of
  `voltage_scaling_unit`.
- `mult8x8` is the place to put a specific 8x8 multiplier structure.
- To add a class (for example 4-bit or 64-bit data), change the following
  together:
  - `prec_e`;
  - the scanner's classification;
  - the block-activation rule in `mp_multiplier` (and `lanes_e` for new lane
    widths);
  - the divider and select in `freq_scaling_unit`.

## Files

| file | contents |
|------|----------|
| `rtl/dvfs_pkg.sv` | class enum, thresholds, operating-point table |
| `rtl/mp_dvfs_top.sv` | system top |
| `rtl/operand_scanner.sv` | operand classification and scheduling |
| `rtl/vfmu.sv` | voltage and frequency management unit |
| `rtl/voltage_scaling_unit.sv` | behavioural supply-regulator model |
| `rtl/freq_scaling_unit.sv`, `rtl/jk_ff.sv` | JK divider and glitch-free clock select |
| `rtl/mp_multiplier.sv`, `rtl/mult8x8.sv` | multi-precision 32x32 array |
| `rtl/op_sequencer.sv`, `rtl/pulse_sync.sv` | operation sequencing and clock-domain crossing |
| `rtl/led_counter.sv` | 4-bit LED counter on the operating clock |
| `tb/*_tb.sv` | self-checking testbenches |
