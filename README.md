# EFP5: a 5-phase block-encoded frame partitioning cell

EFP5 turns a free-running clock into five "partitioned" clock lines. Time is
cut into frames of five clock periods, called phases 1 to 5. A 6-bit control
word picks one of the 52 ways to split the set {phase 1, ..., phase 5} into
groups (blocks). The cell then shows that split on its five outputs: all phases
of a block pulse together, in a time slot given by the block's number. This
gives a family of related clock patterns for the modules of a multiphase
system, selected by a single word. One use is to clock groups of modules
together or apart, for example for test or power control.

```
            +------------------------------+
  clk  ---->|                              |----> fpclk[4:0]
  reset --->|             efp5             |----> rstflag
  ctl[5:0]->|                              |
            +------------------------------+
```

## Block encoding

A partition of five phases is written as a *restricted growth string* (RGS) of
five digits. Digit n is the number of the block that holds phase n+1. The first
digit is 0, and each digit is at most one more than the largest digit before
it. This rule gives each partition exactly one string. There are 52 such
strings (the Bell number B5). Sorted in ascending order they are numbered
0..51, and that number is the control word:

| ctl | RGS (phase 1..5) | blocks |
|----:|------------------|--------|
| 0   | 0 0 0 0 0 | {1,2,3,4,5} |
| 1   | 0 0 0 0 1 | {1,2,3,4} {5} |
| 7   | 0 0 1 0 2 | {1,2,4} {3} {5} |
| 20  | 0 1 0 1 2 | {1,3} {2,4} {5} |
| 36  | 0 1 2 0 1 | {1,4} {2,5} {3} |
| 51  | 0 1 2 3 4 | {1} {2} {3} {4} {5} |

Output `fpclk[n]` belongs to phase n+1. It pulses once per frame, in phase
`b+1`, where `b` is the block of phase n+1. The pulse lasts for the high half of
that clock period. So the block number turns into a time slot, and outputs in
the same block pulse at the same time. For `ctl = 36` (T = clock period):

| phase of frame | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|
| `fpclk[0]` (phase 1, block 0) | pulse | | | | |
| `fpclk[1]` (phase 2, block 1) | | pulse | | | |
| `fpclk[2]` (phase 3, block 2) | | | pulse | | |
| `fpclk[3]` (phase 4, block 0) | pulse | | | | |
| `fpclk[4]` (phase 5, block 1) | | pulse | | | |

Each "pulse" is high for the first (clock-high) half of that phase. Nothing
pulses in phases 4 and 5 because this partition has only three blocks.

Control words 52..63 name no partition. They select partition 0, so all five
lines pulse in phase 1.

## How the pulses are made

### The phased signals pclk[10..1]

The core of the cell is a 10-bit codeword, `pclk[10..1]`, that changes at every
clock edge, rising and falling. It follows a twisted-ring (Johnson) sequence:
`pclk1` takes the inverse of `pclk10`, and each other bit takes the value of the
bit before it. Starting from all zeros there are 20 codewords in the cycle, one
per half period, so the cycle lasts 10 T. Each `pclk_i` is then a square wave
with period 10 T. It is high for 5 T and low for 5 T, and it lags `pclk_(i-1)`
by T/2.

Two neighbouring signals `pclk_(2b+1)` and `pclk_(2b+2)` differ only in the
half period after `pclk_(2b+1)` changes. That happens twice per 10 T, once per
5 T frame. Their XOR is therefore a half-period pulse in phase b+1 of every
frame: block slot b. The five XORs of the pairs (1,2), (3,4), ..., (9,10) are
the five block slots. Each output line then picks the slot named by its RGS
digit. The XOR of a pair is the same for a codeword and for its complement, and
the codeword ten steps on is always the complement. So the block slots repeat
every frame, although the codeword cycle covers two frames.

### Two registers, one per clock edge

A register clocked on a single edge cannot change every half period. The state
is therefore split:

- **reg1** (`state1_q`) is loaded on the rising edge and shown while `clk` is
  high;
- **reg2** (`state2_q`) is loaded on the falling edge and shown while `clk` is
  low.

Each register loads the successor of the other one's codeword. The visible
codeword is `clk ? reg1 : reg2`, so it steps once per half period. Each
register holds every second codeword of the cycle. A next-state block
(`efp5_next_state`) is placed in front of each register, and it computes the
successor from the other register's output. Nothing reads the clock-selected
`pclk` to build the next state, so the feedback has no combinational loop and
no race at the clock edges.

### Reset and start of the first frame

`reset` is asynchronous and active high. It clears reg1 to all zeros and sets
reg2 to all ones: ten flip-flops with reset and ten with preset. Neither word
marks a block (each pair is equal), so `fpclk` stays low during reset.
`rstflag` is high. When reset is released, the first rising edge loads the
successor of all ones. That codeword marks block 0, so **the first clock
period after reset is phase 1 of the first frame**. From there on, clock period
c is phase `(c mod 5) + 1`.

### Invalid codewords

Only 20 of the 1024 possible 10-bit words lie on the cycle. A plain twisted
ring that starts in one of the others (power-up without reset, an upset) stays
off the cycle for good. Each next-state block therefore compares its input with
the 20 valid words:

- `rstflag` rises at once while the visible codeword is invalid.
- An invalid word is not advanced. Instead, the register loaded next takes a
  restart word. reg1 restarts at the codeword of phase 1 of a frame. reg2
  restarts at the word just before it, so that reg1's next load is phase 1.

The cell is back on the cycle within one clock period. A new frame then starts
at the next rising edge. This recovery rule is this design's own choice. The
original description only says that a flag is raised until a valid codeword
appears.

## Module hierarchy

| module | role |
|--------|------|
| `efp5_pkg` | sizes, types, the twisted-ring step, elaboration-time functions that build the codeword cycle and the RGS table |
| `efp5_partition_rom` | ctl -> RGS, with fallback to partition 0 for 52..63 |
| `efp5_next_state` | successor of a codeword, validity check, restart on invalid words |
| `efp5_phase_gen` | reg1 / reg2, two next-state blocks, clock-level select of `pclk` and `invalid` |
| `efp5_output_logic` | pair XORs, routing by RGS digit, `rstflag` |
| `efp5` | top level |

Codeword bit 0 is `pclk1`. In `rgs_t`, element n is the block of phase n+1.

The partition table is not written out. `efp5_pkg::rgs_table()` builds it during
elaboration: it starts at `00000` and steps to the next RGS in lexicographic
order 51 times. The next RGS is found by raising the rightmost digit that does
not exceed the maximum of the digits to its left, and clearing the digits after
it. The 20 valid codewords are the twisted-ring sequence from all zeros.

## Ports and timing of `efp5`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | input clock, period T; 50 % duty cycle assumed |
| `reset` | in | 1 | asynchronous, active high |
| `ctl` | in | 6 | partition number 0..51 (52..63 act as 0) |
| `fpclk` | out | 5 | `fpclk[n]`: pulse in the high half of phase (block of phase n+1) + 1 |
| `rstflag` | out | 1 | high during reset and while the internal codeword is invalid |

`ctl` is decoded combinationally and is not registered. To switch partitions
cleanly, change it while `clk` is low. The new partition applies from the next
high half. All outputs are selected by the level of `clk`, so they are
clock-derived signals, not register outputs. They can glitch around the clock
edges, in the same way as a gated clock. A user who feeds them into clock
networks must treat them as such.

The cell has no size parameters. Its numbers are fixed by the five-phase frame:
5 phases, 52 partitions, a 6-bit control word, 10 phased signals and 20
codewords. They are constants in `efp5_pkg`.

## Where this RTL departs from the original description, and why

- **Next-state form.** The original steps an integer index through a stored
  20-entry table on both clock levels. Here each register computes its
  successor directly from the other register (one twisted-ring step). Both
  produce the same sequence. This version has no index register and no
  combinational feedback. The original's synthesis reported 32 feedback paths.
- **Codeword sequence and reset words.** The twisted ring from all zeros
  follows from the stated waveforms (period 10 T, lag T/2, pulse width 5 T). It
  also matches the reported ten reset and ten preset flip-flops. The table of
  codewords itself was inferred, not copied.
- **Invalid-word recovery.** The restart words are this design's choice (see
  above).
- **`ctl_unused`.** `efp5_partition_rom` also reports an out-of-range control
  word. This is a convenience output and is not a port of the cell.

## Verification

Each module has a self-checking testbench in `tb/`, and each ends by printing
`TB_RESULT checks=N failures=M`:

- `tb_efp5_partition_rom` rebuilds the 52 strings another way: it filters all
  5^5 base-5 numbers in increasing order. It then checks all 64 control words
  and six hand-worked entries.
- `tb_efp5_next_state` applies all 1024 codewords against a closed-form model.
  A word is valid exactly when it is 2^k-1 or the complement of 2^k-1.
- `tb_efp5_phase_gen` checks `pclk` in every half period. This covers reset,
  the 10 T period and T/2 lag of each `pclk_i`, a mid-cycle asynchronous reset,
  and invalid words forced into each register.
- `tb_efp5_output_logic` checks hand-worked cases and 2000 random vectors.
- `tb_efp5` runs the whole cell. It first applies the control words 0, 1, 7,
  20, 36 and 51 for two frames each. Then it runs all 64 words for one frame
  each, a reset in mid-frame, and recovery from an invalid word in each
  register. Every high and low half is compared with a model that knows only
  the external behaviour, phase by phase. The test also counts the resets,
  control-word switches, unused words and recoveries that occur, and counts a
  failure for any of them that never happened. It runs the cell at its only
  size.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/efp5_pkg.sv rtl/efp5_next_state.sv rtl/efp5_phase_gen.sv \
    rtl/efp5_partition_rom.sv rtl/efp5_output_logic.sv rtl/efp5.sv \
    tb/tb_efp5.sv --top-module tb_efp5
./obj_dir/Vtb_efp5
```

For a single block, list `efp5_pkg.sv`, the block's files and its testbench.
The fault-injection tests in `tb_efp5_phase_gen` and `tb_efp5` use `force` on
the state registers. Verilator therefore warns that those variables have more
than one driver. The warning comes from the test and is expected.
