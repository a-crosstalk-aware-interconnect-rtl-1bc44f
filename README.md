# Crosstalk-aware bus transmitter with variable-cycle transmission

On a long on-chip bus, the delay of a wire depends strongly on what its two
neighbours do in the same transfer. The coupling capacitance Cc between
adjacent wires is charged not at all when neighbours switch together, but
twice over when they switch in opposite directions. A wire switching against
both neighbours sees Cg + 4·Cc, while one switching with both sees only Cg.
A conventional bus has to clock every transfer for that worst case.

This RTL implements the sender side of a bus that does not. The wires run on
a fast clock sized for a load of Cg + Cc. Before each word is sent, a
crosstalk analyzer compares it with the word already on the wires and finds
the worst wire's delay group. The word then stays on the wires for 1, 2, 3 or
4 fast cycles, depending on that group. A Ready wire tells the receiver when
the word has settled. Most transfers are not worst-case, so on average the
bus moves words in fewer fast cycles than a worst-case clocked bus would
need.

An optional extension, selected with a parameter, adds bus-invert. Each word
is judged both as it is and with all bits inverted, and whichever form causes
the smaller worst group is sent.

## Delay groups

Each line k switches by d(k) ∈ {−1, 0, +1}. Its load is
Cg + m·Cc, where m = |2·d(k) − d(k−1) − d(k+1)| for an inner line. That is
the sum over the neighbours of |d(k) − d(n)|.

| group | line k                          | load      | fast cycles |
|-------|---------------------------------|-----------|-------------|
| 1     | does not switch                 | 0         | 1           |
| 2     | switches with both neighbours   | Cg        | 1           |
| 3     | one neighbour quiet, one with it| Cg + Cc   | 1           |
| 4     | both quiet, or one with / one against | Cg + 2Cc | 2      |
| 5     | one quiet, one against          | Cg + 3Cc  | 3           |
| 6     | both against                    | Cg + 4Cc  | 4           |

The cycle counts are ceil((Cg + m·Cc) / (Cg + Cc)). For a bus with
Cg = 36.3 fF/mm and Cc = 115.1 fF/mm, the worst case (group 6) is
3.28 fast cycles. A conventional bus would have to use that as its period.
The whole word takes the cycle count of its worst line. Groups 1–3 need no
extra time, so the analyzer only reports groups 4, 5 and 6.

The two edge lines (bit 0 and bit 31) have one neighbour, so
m = |d(k) − d(neighbour)|, and m can only be 0, 1 or 2. The Ready wire is not
counted as a neighbour of a data line. Both edge rules are this design's own
choices.

## How a word moves through the transmitter

```
 sender ──► [sender latch] ──► Data_In ──┬──────────────────────► [output latch] ──► Data_Out ──► wires
                                         │                              ▲
                                         ▼                              │ launch
                 [previous data] ──► [X-analyzer] ── g4,g5,g6 ──► [generator] ──► Ready_Out ──► wires
                        ▲                                          │
                        └──────────── launch ──────────────────────┤
 sender ◄─────────────────────────── take_in (latch enable) ◄──────┘
```

1. **Sender latch.** It captures `data_in` and `ready_in` at an edge where
   `take_in` is high.
2. **Analysis, one cycle.** While the word sits in the sender latch, the
   X-analyzer compares it with the previous-data register, which holds the
   word now on the wires. This cycle is the analyzer's latency. It overlaps
   the tail of the previous transfer, so a stream of words loses no cycles to
   it.
3. **Launch.** The generator launches the word when the wires are free, or
   at the end of the last cycle of the word already on them. Launching loads
   the output latch and the previous-data register, and loads a down-counter
   with the hold time minus one.
4. **Ready.** `ready_out` is high in the last cycle of each word. For
   back-to-back one-cycle words it therefore stays high. The receiver samples
   `data_out` at the end of every cycle in which `ready_out` is high.
5. **Refill.** The sender latch takes the next word at the edge where
   `ready_out` rises. That is exactly one cycle before the output latch can
   accept it, which leaves the word one cycle for analysis.

Steady-state behaviour, cycle by cycle, when every word falls in the same group
(`1` = Ready_Out high):

```
cycle               0   1   2   3   4   5   6   7   8
group 1-3 Data_In   D0  D1  D2  D3  D4  D5  D6  D7  D8
          Data_Out  -   D0  D1  D2  D3  D4  D5  D6  D7
          Ready_Out 0   1   1   1   1   1   1   1   1
group 4   Data_In   D0  D0  D1  D1  D2  D2  D3  D3  D4
          Data_Out  -   D0  D0  D1  D1  D2  D2  D3  D3
          Ready_Out 0   0   1   0   1   0   1   0   1
group 6   Data_In   D0  D0  D0  D0  D1  D1  D1  D1  D2
          Data_Out  -   D0  D0  D0  D0  D1  D1  D1  D1
          Ready_Out 0   0   0   0   1   0   0   0   1
```

Latency: if the pipeline is empty, a word taken at edge e is on `data_out`
from edge e+1. The receiver samples it at edge e+1+N, where N is the word's
hold time. Throughput: one word per N cycles, with no bubbles between words
when the sender always has one ready.

## Crosstalk analyzer

`x_analyzer` has one `pattern_recognizer` per bus line. Each recognizer sees
the previous and the new value of lines k−1, k and k+1, and raises at most
one of g4, g5 and g6 for line k. Three `or_tree`s (balanced trees of two-input
ORs) combine the per-line flags into bus-wide flags. The generator acts on the
highest flag that is set. The analyzer is purely combinational: 32
recognizers plus 3 × 31 OR gates, with depth log2(32) = 5 after the
recognizer.

## Bus-invert combination (`BUS_INVERT = 1`)

`bus_invert_coder` forms the inverted word. A second analyzer judges it
against the previous-data register. `xa_selector` picks the inverted form only
if its worst group is strictly lower, so ties go to the plain word. A 2:1 mux
then sends the chosen form.

The choice is reported on `inv_out`. It travels on an extra wire and goes out
together with the word, and the receiver inverts the word back when `inv_out`
is high. The previous-data register holds the word as it was sent, possibly
inverted, because that is what is physically on the wires. Several parts of
this are this design's own choices:

- the extra wire;
- the selection rule;
- ignoring the crosstalk of the invert wire itself.

With `BUS_INVERT = 0` (the default), `inv_out` is constant 0.

## Interface of `xtalk_interconnect`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | fast bus clock |
| `rst_n`     | in  | 1     | synchronous, active-low reset; the wires start at all zeros |
| `data_in`   | in  | WIDTH | word offered by the sender |
| `ready_in`  | in  | 1     | the sender offers a word; hold it and `data_in` until `take_in` |
| `take_in`   | out | 1     | the sender latch loads at this edge; the offered word is taken |
| `data_out`  | out | WIDTH | word on the wires |
| `inv_out`   | out | 1     | `data_out` is inverted (only with `BUS_INVERT`) |
| `ready_out` | out | 1     | last cycle of the word; the receiver samples at the closing edge |

Parameters:

- `WIDTH` (32): bus width.
- `BUS_INVERT` (0): enables the bus-invert combination.

The hold times per group are the parameters `C_G123`, `C_G4`, `C_G5` and
`C_G6` of `cycle_generator`, with defaults 1, 2, 3 and 4 taken from
`xtalk_pkg`. Change them if a different Cg/Cc ratio gives different ceilings.

The top has these assertions:

- `data_out` does not change before a word's time is up.
- The down-counter never exceeds the largest hold time.
- `ready_out` is only high while a word is on the wires.

## Files

| file | contents |
|------|----------|
| `rtl/xtalk_pkg.sv` | bus width, hold times, `grp_flags_t`, `worst_rank()` |
| `rtl/pattern_recognizer.sv` | group of one line from three lines' old/new values |
| `rtl/or_tree.sv` | balanced OR tree |
| `rtl/x_analyzer.sv` | recognizers + three OR trees |
| `rtl/cycle_generator.sv` | hold counter, launch, Ready_Out, sender-latch pacing |
| `rtl/bus_latch.sv` | enabled register (sender latch, output latch, previous data) |
| `rtl/bus_invert_coder.sv` | inverted candidate word |
| `rtl/xa_selector.sv` | plain-or-inverted choice |
| `rtl/xtalk_interconnect.sv` | top |
| `tb/xtalk_tb_pkg.sv` | reference capacitance model and traffic generator |
| `tb/wire_bus_model.sv` | behavioural model of the crosstalk-delayed wires |
| `tb/xtalk_stream_checker.sv` | sender, wires and receiver with end-to-end checks |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The expected values come from
`xtalk_tb_pkg`, which works directly from the capacitances: for each line it
uses ceil((Cg + m·Cc) / (Cg + Cc)) with the real numbers, summing the Miller
factors per neighbour. It does not reuse the RTL's group encoding.

- `tb_pattern_recognizer`: all 64 old/new combinations, for an inner line and
  for both edge lines.
- `tb_or_tree`: widths 32 and 5, with zero, one-hot and random inputs.
- `tb_x_analyzer`: directed patterns for each group, plus 5000 random
  bus-like word pairs.
- `tb_cycle_generator`: hold times, the Ready_Out position, zero-bubble
  streaming, the sender-latch reload edge and the idle behaviour.
- `tb_bus_latch`, `tb_bus_invert_coder` and `tb_xa_selector`: the small
  blocks, exhaustively or randomly.
- `tb_xtalk_interconnect`: end to end. The plain design and the bus-invert
  variant each carry 3000 words through `wire_bus_model`. On each wire the
  model shows the new value only once that wire's settling time has passed.
  The receiver would therefore read stale bits if `ready_out` came too early.
  The checks cover:
  - word order and integrity;
  - the invert choice;
  - each word's spacing, which must equal its reference hold time while
    streaming;
  - the first-word latency.

  Each mechanism (hold of 1, 2, 3 and 4 cycles, sender stall, idle bus,
  inverted word) must occur at least once.
- `tb_xtalk_full`: the same checks with the top at its exact defaults, over
  5000 words.
- `tb_workload_group_mix`: traffic built so that the worst groups follow the
  average shares measured on processor bus traces. Those shares are 22.64,
  0.05, 4.06, 35.4, 24.2 and 13.7 % for groups 1 to 6. Each word changes only
  the lines needed to produce the group drawn for it. The plain transmitter
  runs at its defaults over 10000 words and must save within two points of
  31.5 % against a worst-case clocked bus. It measures 31.4 %. That figure
  follows from the shares: 1·(g1+g2+g3) + 2·g4 + 3·g5 + 4·g6 ≈ 2.25 fast
  cycles per word, against 3.28. Group 2 needs an all-0 or all-1 word on the
  wires, so it hardly ever occurs in this stream. The bus-invert variant runs
  beside it. This traffic is built for the plain bus, so it shows no benefit
  from inversion and is not a test of the published 10.5 % gain.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/xtalk_pkg.sv tb/xtalk_tb_pkg.sv tb/tb_xtalk_full.sv --top-module tb_xtalk_full
./obj_dir/Vtb_xtalk_full
```

The testbenches use `$urandom` only, with no constraint solver, and every
register that is read is reset.

The traffic is synthetic. Each new word is one of the following:

- the previous word plus a small increment;
- the previous word with one bit flipped;
- a fresh random word;
- the full inversion of the previous word;
- an alternating pattern;
- a repeat of the previous word.

On this traffic the streaming phase takes about 23 % fewer fast cycles than a
bus clocked at 3.28 fast cycles per word. With bus-invert it takes about 34 %
fewer. These figures come from this traffic mix only. For comparison, the
published evaluation of this scheme on processor bus traces from ten SPEC2000
programs reports a 31.5 % average improvement, and a further 10.5 % for the
bus-invert combination. Those traces are not reproduced here.

## What is this design's own, and what is left out

These parts follow the published scheme:

- the six delay groups and their loads;
- the one-recognizer-per-line analyzer with OR trees for groups 4–6;
- the rule that the worst line sets the bus delay;
- hold times of 1, 2, 3 and 4 cycles;
- the block structure (sender latch, analyzer, previous data, generator,
  output latch, Ready);
- the one-cycle analysis latency overlapped with the previous transfer;
- the waveform timing shown above;
- the bus-invert structure (coder, two analyzers, selector, mux).

These are choices of this implementation:

- the edge-line and Ready-wire rules;
- the `take_in` handshake and the counter-based generator;
- building the "latches" as edge-triggered registers with a synchronous
  reset to zero;
- the balanced OR tree;
- the bus-invert selection rule and its extra wire.

Left out:

- The receiver, beyond a testbench model.
- The physical wires, which appear only as a behavioural model.
- The fast clock itself. Its period, Cg + Cc worth of wire delay, is set by
  timing closure, not by the RTL.
- The comparison schemes (crosstalk-prevention coding, double spacing,
  shielding). They are alternatives to this design, not parts of it.
