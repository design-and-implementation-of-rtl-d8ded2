# 8:1 half-rate tree serializer for a SerDes transmitter

A serial link replaces a wide parallel bus with one fast wire. The hard part
on the transmit side is the last multiplexing step: at 1.25 Gbit/s a bit lasts
0.8 ns, and a flip-flop clocked at that rate, plus the clock network that
feeds it, costs a lot of power. This serializer never runs a clock at the bit
rate. Every stage is a 2:1 cell that sends one bit while its clock is low and
the next while it is high, so a 625 MHz clock produces 1.25 Gbit/s, and the
stages that feed it run at 312.5 MHz and 156.25 MHz.

Eight parallel bits D1..D8 go in; a serial stream D1, D2, ..., D8, D1, ... comes
out, one 8-bit word every four 625 MHz periods, with no gaps between words.

## The double-edge 2:1 cell (`detff`)

A plain multiplexer whose select is a clock would do the 2:1 step, but if its
data inputs change at the same moment as the clock, the output is undefined
for a while: it is not clear whether it shows the old or the new bit. The cell
prevents this by retiming both inputs so that each input of the multiplexer
changes only while the *other* one is selected:

```
 d0 --[DFF, rising]--------------------------> mux, selected while clk = 0
 d1 --[DFF, rising]--[latch, open clk = 0]---> mux, selected while clk = 1
                                                  select = clk
```

* At a rising edge both bits of a pair are captured.
* During the following low half-period the multiplexer shows the first flip-flop
  (d0). That flip-flop changes only at rising edges, when the multiplexer has
  just switched away from it.
* The latch opens at the falling edge and passes d1 on; the multiplexer switches
  to it at the next rising edge and shows it for the high half-period. The latch
  output changes only while clk is low, when it is not selected.

Timing, with T the cell clock period and a pair captured at rising edge t:
`q = d0` over `[t+T/2, t+T)`, `q = d1` over `[t+T, t+3T/2)`.

The cell is two `dff`, one `d_latch` and one `mux2`, the same composition the
transistor-level circuit uses (there built from CMOS pass gates).

## The tree (`serializer`)

For N = 8 there are three levels:

| level | cells | clock        | rate per cell output |
|-------|-------|--------------|----------------------|
| 0     | 4     | clk/4 156.25 MHz | 312.5 Mbit/s |
| 1     | 2     | clk/2 312.5 MHz  | 625 Mbit/s   |
| 2     | 1     | clk   625 MHz    | 1.25 Gbit/s  |

Cell j of a level takes its first input from cell 2j and its second from cell
2j+1 of the level below. Since each cell sends its first input before its
second, and each level interleaves the streams of two cells, the output order
is a bit-reversed interleaving. For the output to be D1..D8, first-level cell j
receives `din[bit_rev(j)]` and `din[bit_rev(j) + N/2]`, where `bit_rev` reverses
the log2(N)-1 low bits of j (`serdes_pkg::bit_rev`). For N = 8 the cells get the
pairs (D1,D5), (D3,D7), (D2,D6), (D4,D8).

**Clocks.** Each slower clock is made from the faster one by a toggle flip-flop
(`clk_div2`), so every divided clock rises on a rising edge of its source. A
cell therefore samples the cells below it exactly at one of their clock edges,
after their output has been stable for half of their period. In the zero-delay
RTL the sampling edge sees the value from before the lower clock toggles, which
is what the real circuit does when the divider's clock-to-output delay exceeds
the flip-flop hold time.

**Word interface.** `din` is sampled on the rising edge of `word_clk` (the
slowest clock, clk/(N/2), brought out for this) and must be stable around it;
change it on the falling edge. `stage_clk[l]` gives the clock of level l.

**Latency.** For N = 8, the word captured at a rising edge of `word_clk` at time
t0 appears with D1 over `[t0 + 6.5T, t0 + 7T)` and D8 over `[t0 + 10T, t0 + 10.5T)`,
T being the clk period.

**Reset.** `rst_n` (asynchronous, active low) clears every flip-flop, latch and
divider; `sout` and all clocks but `clk` are then 0, and the first rising edge of
clk after release starts every divided clock high.

## Ports of the top

| port        | dir | width   | meaning |
|-------------|-----|---------|---------|
| `clk`       | in  | 1       | serial clock, 625 MHz for 1.25 Gbit/s |
| `rst_n`     | in  | 1       | asynchronous reset, active low |
| `din`       | in  | N       | parallel word, `din[0]` = D1 is sent first |
| `word_clk`  | out | 1       | clk/(N/2); `din` is taken at its rising edge |
| `stage_clk` | out | log2(N) | clock of each tree level, `[0]` slowest |
| `sout`      | out | 1       | serial data |

Parameter `N` (default 8) must be a power of two of at least 2; the tree,
dividers and bit mapping are generated from it.

## Files

| file | contents |
|------|----------|
| `rtl/serdes_pkg.sv` | default width, bit-reversal function |
| `rtl/mux2.sv`, `rtl/d_latch.sv`, `rtl/dff.sv` | primitive cells |
| `rtl/detff.sv` | double-edge 2:1 cell |
| `rtl/clk_div2.sv` | divide-by-two clock |
| `rtl/serializer.sv` | top: the N:1 tree |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_serializer_rates.sv` | top run at three clock frequencies |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself.
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/serdes_pkg.sv \
          tb/tb_serializer.sv --top-module tb_serializer
./obj_dir/Vtb_serializer
```

Replace `tb_serializer` with `tb_detff`, `tb_dff`, `tb_d_latch`, `tb_mux2` or
`tb_clk_div2` for the others. `tb_serializer` runs the top at its default size:
it holds the word 1,1,0,1,0,1,1,0 for six words, sends 3000 random words, resets
in mid-stream and sends 3000 more, checking every output bit in the middle of
its bit time against a reference model built from the timing above, plus the
clk/2 and clk/4 clock periods and the reset state. It takes well under a
second. `tb_serializer_rates` repeats the fixed word with clk at 625, 312.5 and
156.25 MHz and checks that the stream and its latency scale with the clock.

## How far to trust it, and where it departs from the circuit

* The building blocks of the original circuit are transistor-level CMOS
  pass-gate circuits. Here they are register-level equivalents: the
  multiplexer is logic, the latch an `always_latch`, the flip-flop an
  `always_ff`. The pass gate itself has no model. Analog timing, such as setup,
  hold and glitches, is not represented; the RTL shows the logic function and
  the cycle timing only.
* The tree structure, the two-flip-flop/latch/multiplexer cell and the three
  clock rates come from the original design. The exact wiring inside the cell
  (which bit goes through the latch, which clock level shows which bit), the
  bit-reversed input mapping, the divider chain, the `word_clk` output, the
  reset and the parameterised width are choices made here.
* A variant that serializes with multiplexers alone, without retiming, is the
  design this one improves on and is not included.
* The rest of a SerDes transceiver (the clock source or PLL, the line driver,
  the deserializer) is outside this RTL; `clk` comes from outside.
* The cell relies on clocks that toggle in the order a real divider chain gives
  them. If the divided clocks are produced differently, for example by a
  separate PLL output with arbitrary skew, the sampling margins must be checked
  again.
