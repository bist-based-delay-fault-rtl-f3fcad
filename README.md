# Delay-fault BIST for FPGAs: comparing identical paths with a gated ring oscillator

An FPGA maker cannot test delays against a user's clock, because the user's
circuits are not known when the device is made. This design measures delay
faults without any clock target. Several **paths under test (PUTs)** are
configured to be identical: the same sequence of logic blocks, wire segments and
switches, placed at different positions. In a good device their delays match
closely, so one transition launched into all of them at once arrives at the far
ends at nearly the same time. A path with a delay fault arrives late.

The far ends feed an **output response analyzer (ORA)** that measures the spread
between the first and the last arrival:

```
            +-----------+        PUT 0 ... PUT N-1
 TPG ------>| identical |------+------------------+
 (launch)   |  paths    |      |                  |
            +-----------+    OR(all)          NAND(all)
                               | FIRST            | LAST_N
                               +-----> NAND3 <----+
                                        ^   |
                                        +---+--> OSC ---> 6-bit counter
```

`FIRST` (OR of all paths) rises with the fastest path, `LAST_N` (NAND of all
paths) falls with the slowest. The three-input NAND with its own output fed back
is a ring oscillator that runs only while both are 1, which is exactly the
window between first and last arrival. The counter counts its pulses, so the
final count is the spread in oscillator periods. No system clock is involved in
the measurement. A count of 0 or 1 is a pass; 2 or more flags a fault.

The same circuit handles a 1/0 launch without change. All paths start at 1, so
`LAST_N` rises with the fastest path, `FIRST` falls with the slowest, and the
window is again `FIRST & LAST_N`.

## One measurement, step by step

With the default parameters (`df_bist_star`), all times in simulation:

1. `gsr` (global reset) is held high. It clears the TPG shift register and the
   counter. `falling` is set here and held: 0 for a 0/1 test, 1 for a 1/0 test.
   The paths rest at `falling`.
2. `gsr` is released. The TPG is a two-flip-flop shift register with its input
   tied to 1, clocked by the slow 8 MHz on-chip oscillator (`clk_tpg`). The
   transition leaves it on the **second rising `clk_tpg` edge** after release.
   The delay only lets the device settle after configuration.
3. Each path takes 100 ns: five routing stretches of 20 ns, with four logic
   blocks in between.
4. The oscillator runs from the first to the last arrival. Its half period is
   2058 ps, which is 243 MHz, a rate measured on a real part. It stops at 1 at
   most one half period after the last arrival.
5. `count` (6 bits) and `fault = (count >= THRESHOLD)` are then stable until the
   next `gsr`. In a device they would be read out by configuration readback or
   boundary scan. Here they are ports.

### Why a count of one is not a fault

The oscillator model uses a transport delay. If the window opens and closes
within one half period, one (partial) pulse is still produced. So for a spread
`D` and half period `H`, the count is `floor(D/2H)` or one more. The default
`THRESHOLD = 2` therefore only flags spreads of at least about one full
oscillator period. For useful resolution a path should last at least 20
oscillator periods (about 82 ns at 243 MHz), so that one period is about 5% of
the path delay. The default 100 ns path is 24 periods. Paths much longer than
the circuits a user would build are not wise either. Small, uniform
differences between positions add up along a long path and can look like a
fault.

### Optional divided counter clock

With `DIV_OSC = 1`, a toggle flip-flop (`osc_div2`) sits between the oscillator
and the counter. It gives the counter a clock with a 50% duty cycle, at half the
resolution. The count becomes `ceil(n/2)` for `n` oscillator pulses. It is off
by default, since a direct oscillator clock proved good enough in practice.

## What a path is made of

`put_bank` builds `N_PUTS` alike paths of one kind, chosen by `PUT_KIND`. Every
path begins with a routing stretch from the TPG.

### `PUT_PLB`: logic blocks as buffers (default)

Each logic block (`plb_put_stage`) is made an identity function. The transition
goes to **all** LUT inputs, and the LUT holds AND for a 0/1 test or OR for a 1/0
test. Its output therefore switches only after the slowest input. The storage
element is a level-sensitive latch with its gate held active, so it is
transparent and the signal passes through it as well. `plb_put_stage` also
lets the latch be fed straight from an input (`bypass_lut`), or the output be
taken before the latch (`use_latch = 0`). These cover the PLB's other internal
paths.

### `PUT_LUT`: every LUT address, not only all-0 and all-1

AND/OR LUTs exercise only the all-0 and all-1 addresses. To test the path to
the output from any address `t`, a LUT is loaded with a single 1 at `t` and 0
elsewhere (giving a 0/1 output transition), or with a single 0 at `t` (giving
1/0). When the inputs move from any other address to `t`, the output switches
exactly once, with no glitch, after the slowest input.

`lut_put_chain` builds this as a bundle of K paths through columns of K LUTs.
Every LUT in a column reads all K outputs of the previous column. Row 0 is the
most significant address bit. Columns come in groups of `2^K`, each column of a
group with its own target address. The subtle part is the polarity of each LUT.
Row `r` of column `j` must settle to bit `r` of the **next** column's target,
so that the next column's inputs land on its target. That fixes whether the
LUT holds a single 1 or a single 0. Every column's outputs start at the
complement of their final value, so every input bit of the next column
toggles. For K = 2 the target order is 11, 01, 10, 00. The four columns then
settle to (row 0, row 1) = (0,1), (1,0), (0,0), (1,1), and the last column
hands all-1 to the next group. `df_pkg::lut_test_target` generalises this order
to any K ≤ 4: it bit-reverses the complemented column index, and XORs the
result with all-1 for a 1/0 launch. `df_pkg::lut_test_content` computes the
LUT contents.

Because every LUT waits for its slowest input, a slow row delays its whole
bundle. With `PUT_LUT`, `N_PUTS` must therefore be a multiple of `LUT_K`, and
the ORA compares bundles against each other.

A complete LUT test needs `2^(K+1)` such configurations: every address, both
directions, for every LUT. The chain accepts any target list on its `target`
input. `put_bank` generates only the pattern above, for the chosen polarity.

### `PUT_CARRY` and `PUT_ADD_PAIR`: dedicated carry logic

Adder-mode blocks (`adder_plb`, a plain K-bit adder) have carry paths that only
exist in that mode. `carry_put_chain` uses three set-ups, all relying on
arithmetic facts rather than on how the adder is built:

| set-up | first block | second block | transition |
|---|---|---|---|
| `PUT_CARRY` | A = 0 (0/1) or all 1 (1/0); transition on carry-in and all B bits; carry-out = AND or OR | same, over the carry chain | passed unchanged |
| `PAIR_CIN_S_FIRST` | A = 0, B = all 1, transition on carry-in; every sum bit switches the other way | sum bus to A; B = all 1, carry-in 0 (carry-out = OR of A) for a rising input, B = 0, carry-in 1 (carry-out = AND of A) for a falling one | inverted per pair |
| `PAIR_A_COUT_FIRST` | transition on all A bits, B = 0, carry-in 1; carry-out = AND of A | A = 0, B = all 1, carry-in from that carry-out; sum bus to the next pair | inverted per pair |

Because each pair inverts, the two variants of `PAIR_CIN_S_FIRST` alternate
along the path. `rise_in` is computed from the launch polarity and the pair
index. At the end of a `PAIR_A_COUT_FIRST` path, sum bit 0 is the observed
output.

## What is logic and what is a model

* **Synthesizable:** `tpg`, `ora_gates`, `counter2`, `ora_counter`, `osc_div2`,
  `plb_put_stage`, `adder_plb` and the LUT-content functions in `df_pkg`. The
  latch in `plb_put_stage` is intended: it is the element under test.
* **Behavioural models, with delays:** `ora_osc` is the ring oscillator. In the
  FPGA it is one LUT with feedback, and its frequency comes from that LUT's
  delay, so the RTL gives it an explicit loop delay. A synthesis tool sees a
  combinational loop there. `route_seg` stands for wire segments and
  programmable switches, and only their delay matters. A larger delay on one
  path emulates a delay fault, like routing one path through extra
  segments.
* **Wrappers:** `ora`, `lut_put_chain`, `carry_put_chain`, `put_bank` and
  `df_bist_star` combine the above. Once the delays are stripped for synthesis,
  all paths are equal, so the window never opens and a synthesizer removes the
  counter. That is logically right. The delays exist only in simulation.

`timescale 1ps/1ps` is set in every file. All delays are in picoseconds.

## Parameters of `df_bist_star`

| parameter | default | meaning |
|---|---|---|
| `N_PUTS` | 4 | paths compared (4 to 8 is typical) |
| `CNT_W` | 6 | counter width, built from `CNT_W/2` two-bit slices |
| `PUT_KIND` | `PUT_PLB` | resources the paths run through |
| `PAIR_ORDER` | `PAIR_CIN_S_FIRST` | adder-pair set-up for `PUT_ADD_PAIR` |
| `N_PLB` | 4 | logic blocks per path (even for `PUT_ADD_PAIR`) |
| `LUT_K` | 4 | LUT inputs (≤ 4) |
| `N_GROUPS` | 1 | groups of `2^LUT_K` columns per LUT bundle |
| `ADD_K` | 4 | adder width |
| `SEG_DELAY_PS` | 20000 | delay of one routing stretch |
| `OSC_HALF_PS` | 2058 | oscillator half period (243 MHz) |
| `DIV_OSC` | 0 | insert the divide-by-two stage |
| `THRESHOLD` | 2 | count at which `fault` is set |
| `TPG_STAGES` | 2 | launch delay in `clk_tpg` cycles |
| `FAULT_PUT`, `FAULT_EXTRA_PS` | -1, 0 | emulate a fault: extra delay on one path |

Taken from the method as published: 4 paths, the 2-stage TPG, the 6-bit counter
of 2-bit slices, the 243 MHz oscillator, 4-input LUTs, and the "count of one is
not a fault" rule. Chosen in this design: path length, routing delays, adder
width, the threshold value and the on-chip comparator, the TPG output inversion
for 1/0 tests, clock edges and reset style.

## Files

`rtl/`: `df_pkg` (types, LUT-content functions), `tpg`, `ora_gates`, `ora_osc`,
`osc_div2`, `counter2`, `ora_counter`, `ora`, `route_seg`, `plb_put_stage`,
`lut_put_chain`, `adder_plb`, `carry_put_chain`, `put_bank`, `df_bist_star` (top).

`tb/`: one self-checking testbench `tb_<module>` per module. Also:

* `tb_df_bist_star` runs eight copies at once: fault-free and faulty, every path
  kind, divided clock, and a fault below threshold. Each copy runs 0/1, 1/0 and
  0/1 sequences, and the testbench counts each mechanism.
* `tb_df_bist_full` runs the top at its defaults.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

```
verilator --binary --timing --top-module tb_df_bist_star -y rtl -y tb +libext+.sv \
          -Irtl rtl/df_pkg.sv tb/tb_df_bist_star.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Every testbench finishes in well
under a second. To see a fault, set `FAULT_PUT` and `FAULT_EXTRA_PS` on
`df_bist_star`. The count is then about `FAULT_EXTRA_PS / (2*OSC_HALF_PS)`.

One simulator pitfall: a `#0` in testbench stimulus can postpone the settling of
zero-delay logic until the next time step. The testbenches avoid it.

## Limits and departures

* Not built, because these parts are the FPGA's own or belong to off-chip
  software:
  * boundary-scan start and readout of the BIST, and configuration readback
    (`gsr` and `count` are ports instead);
  * the 8 MHz on-chip oscillator (the testbench makes the clock);
  * moving the self-test areas across the device by partial reconfiguration;
  * the many parallel copies used in production test (instantiate
    `df_bist_star` several times);
  * producing the full set of test configurations (117 for one device family).
* The counter wraps at 64. Spreads above 63 oscillator periods read modulo 64.
* The oscillator and routing are ideal delays. Duty-cycle and jitter
  effects, and the false alarms that small systematic differences cause on long
  paths, are not modelled.
* If every path is equally slow, the method passes, and so does this model. A
  separate speed test must catch a uniformly slow device.
