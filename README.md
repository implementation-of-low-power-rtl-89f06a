# Pulsed-latch shift register with shared delayed clocks, and an R-TRC test decompressor

A shift register built from flip-flops spends about twice the transistors
and clock load it needs: each flip-flop is a master and a slave latch. A
single-latch storage cell (a *pulsed latch*) halves that. But a chain of
pulsed latches clocked by one pulse is not a shift register. While the pulse
is high every latch is transparent, so data races through several stages.

This design avoids the race by clocking the latches with several
non-overlapping pulses in a fixed order. The stage at the far end is written
first, and the stage next to the input last. Each latch therefore copies its
neighbour before that neighbour changes. Giving every latch its own pulse
would need N pulse lines for N bits. Instead, the latches are grouped into
sub shift registers of SUB bits. All groups reuse the same SUB+1 pulses. One
extra *temporary latch* per group saves the group's last bit before the group
shifts. The next group reads that saved copy. So the clock network has SUB+1
pulse lines whatever the length of the register.

Next to it is a second, separate design built on the same idea of reusing
stored register contents. It is an on-chip test data decompressor. A
reconfigurable twisted ring counter (R-TRC) holds test data loaded once by
the tester. It then recirculates that data, straight or inverted, into a
scan chain, so data that repeats is sent only once.

Both designs are in `rtl/`. Each one has a self-checking testbench in `tb/`.

## Shift register: how one shift works

`pulsed_latch_shift_register` (N = 16, SUB = 4) is made of:

- one `pulsed_clock_gen`, and
- N/SUB = 4 `sub_shift_register`s.

Each sub shift register holds SUB data latches Q1..Q4 and a temporary latch
T. All of them are `ssaspl_latch` cells.

Each rising edge of the shift clock `shift_clk` fires SUB+1 pulses, one per
cycle of the system clock `clk`. If the rising edge is first seen in cycle
c, the pulses fire as follows:

| cycle | pulse        | what every sub shift register does                    |
|-------|--------------|-------------------------------------------------------|
| c     | CLK_pulse<T> | T <- Q4 (saves the bit about to be overwritten)       |
| c+1   | CLK_pulse<4> | Q4 <- Q3                                              |
| c+2   | CLK_pulse<3> | Q3 <- Q2                                              |
| c+3   | CLK_pulse<2> | Q2 <- Q1                                              |
| c+4   | CLK_pulse<1> | Q1 <- input (IN for group 1, T of the group before)   |

Group k+1 reads group k's T in the last slot. By then group k's Q4 has
already been overwritten, but T still holds the bit Q4 had before the shift.
The result is exactly an N-bit shift register: `q[0]` is the newest bit and
`dout = q[N-1]` the oldest. `din` is sampled in cycle c+SUB. The shift is
complete after the `clk` edge that ends cycle c+SUB. The last group's T is
not used.

Requirements on `shift_clk`:

- It must be synchronous to `clk`.
- It must be high for at least one cycle and low for at least one cycle.
- Its period must be at least SUB+1 cycles. Otherwise the pulses of two
  shifts interleave and data is lost.

The data latches have no reset. After N shifts the register contents are
fully defined.

### Pulse generator

`pulsed_clock_gen` is a chain of SUB+1 identical clock-pulse circuits. Each
circuit:

- delays its clock input,
- inverts the delayed copy,
- ANDs the inverted copy with the undelayed input, which gives a pulse at
  each rising edge, and
- passes the delayed copy on as the clock input of the next circuit.

The first circuit gives CLK_pulse<T>. The following circuits give <SUB> down
to <1>. In silicon the delay element is a short analog delay. Here it is one
flip-flop of `clk`, so each pulse lasts exactly one `clk` cycle. An
assertion checks that at most one pulse is high at a time.

### Latch cell

`ssaspl_latch` models a 7-transistor sense-amplifier latch:

- a cross-coupled inverter pair Q/Qb,
- two input transistors driven by the complementary data D/Db, and
- one clock transistor shared by both sides and driven by the pulse.

During a pulse, the side whose data input is high is pulled low. In RTL this
is a bit that loads `d` at the end of a pulse slot and holds otherwise. If
`d == db` it also holds; the transistor cell leaves that case undefined.
`qb` is always `~q`. Because the model is written against the system clock,
it synthesizes to an enabled flip-flop, not a latch. The RTL captures the
ordering scheme, not the transistor savings.

### Pattern source

`random_pulse_gen` is a 16-bit Fibonacci LFSR:

- polynomial x^16 + x^14 + x^13 + x^11 + 1 (taps mask `16'hB400`), which has
  the maximal period of 65535,
- seed `16'h6966`.

In the top level it steps on each rising edge of `sr_clk`. When
`sr_use_rng = 1` its bit 15 becomes the shift register's input. The shift
register samples that bit in the last pulse slot, so the bit shifted in is
bit 15 of the state *after* the step.

## Test decompressor: R-TRC, decompressor, scan chain

`trc_test_arch` contains:

- a `decompressor`, which holds a `code_converter`, a `kbit_counter` and
  the control unit `cgu`,
- an L_TRC = 10-bit `r_trc`, and
- an L_SC-bit `scan_chain`, whose scan input SI is the R-TRC's last stage.

The tester sends one symbol per TCK on a single TDI pin. A symbol is a
driven 0, a driven 1, or high impedance. An analog tri-state detector, which
is not part of this RTL, turns the symbol into a 2-bit `code`:

| TDI  | code |
|------|------|
| 0    | 00   |
| 1    | 11   |
| Hi-Z | 01   |

The code converter turns the code into `data` and `valid`. Code 10 is
treated as Hi-Z.

The R-TRC is a shift register with a 2:1 input multiplexer:

- `sel = 1` feeds the last bit back, so the counter rotates;
- `sel = 0` shifts in `c_in`.

Twisting (Johnson-counter behaviour) is done by the CGU, which drives `c_in`
with the inverse of the R-TRC output.

### Symbol protocol (this design's own)

The CGU accepts a symbol at each TCK rising edge while `ate_sync` is high.
What happens depends on the CGU state and the symbol:

| state | symbol            | action                                                   |
|-------|-------------------|----------------------------------------------------------|
| any   | TMS = 1           | capture: one SCK with SE = 0; the scan chain loads `core_pi` |
| LOAD  | 0 or 1            | one RCK with Sel = 0, C_in = bit: shifts a new bit into the R-TRC |
| LOAD  | Hi-Z              | go to CMD                                                |
| CMD   | 0                 | expansion in feedback mode                               |
| CMD   | 1                 | expansion in twist mode                                  |
| CMD   | Hi-Z              | cancel, back to LOAD                                     |

An expansion lasts L_SC cycles of the internal clock. In every one of those
cycles RCK and SCK are both high and SE = 1. So the R-TRC output streams into
the scan chain while the R-TRC either rotates (feedback) or twists. The
k-bit counter (k = ceil(log2(L_SC+1)) = 5) counts the cycles and ends the
expansion. `ate_sync` is low for exactly L_SC cycles, telling the tester to
wait.

TRST returns the CGU to LOAD. The R-TRC and the scan chain keep their
contents.

### Clocking

Everything runs on `clk`, which plays the role of the internal clock i_clk.

- TCK may be asynchronous to `clk`. It goes through a two-flip-flop
  synchronizer and an edge detector, so a TCK edge is acted on 2-3 `clk`
  cycles later.
- TCK's high and low phases must each last at least 2 `clk` cycles.
- RCK and SCK are one-cycle clock enables, not separate clocks.
- `rst_n` is an active-low synchronous reset of the control logic.

## Top level

`shift_register_reuse_top` places the two designs side by side, each with
its own ports:

- shift register: `sr_clk`, `sr_in`, `sr_use_rng`, `sr_q`, `sr_dout`,
  `rng_q`;
- test part: `code`, `tms`, `trst`, `tck`, `ate_sync`, `core_pi`,
  `scan_q`, `scan_so`, `trc_q`.

Parameters and their defaults:

| parameter | default | where it comes from                                        |
|-----------|---------|------------------------------------------------------------|
| N         | 16      | register width of the reference waveforms                  |
| SUB       | 4       | 4-bit sub shift registers                                  |
| L_TRC     | 10      | 10-bit R-TRC                                               |
| L_SC      | 16      | chosen here; no scan chain length is given                 |

N must be a multiple of SUB; elaboration stops otherwise.

## Where this departs from the source description, and what is assumed

- **Latch reduction.** The source goes one step further: a "register
  reusing" sub shift register drawn with only two latches, which is said to
  need fewer latches. It gives no operation sequence, and two latches cannot
  hold four bits. That variant is not built. The shift register here is the
  grouped version with a temporary latch per group.
- **Pulsed latches.** They are modelled as clock-enabled storage on a fast
  system clock. The pulse width is therefore one `clk` cycle, not an analog
  delay.
- **Own choices.** The following are this design's choices: the LFSR
  polynomial and seed, the tri-state code assignment, the code converter's
  truth table, the CGU protocol (Hi-Z as a command prefix, the mode bit,
  TMS capture, cancel), the twist formed through C_in with the R-TRC output
  fed back to the CGU, the scan chain length, and the mux-D scan cell.
- **Outside this RTL.** The tri-state detector (an analog cell), the tester
  and the core under test are outside; their signals are ports.

## Verification

Every module has a testbench `tb/tb_<module>.sv`. Each one compares the
module against an independent reference model and ends by printing
`TB_RESULT checks=N failures=M`:

- The pulse generator is checked every cycle against a history of
  `shift_clk`, with random shift-clock periods.
- The shift registers are checked after each shift against a reference
  shift model. They are also checked for latency: the first latch is
  unchanged after SUB cycles, and the shift is complete after SUB+1.
- The LFSR is checked step by step, and for its full period of 65535.
- The CGU and the decompressor are checked by logging every RCK/SCK cycle
  and comparing the log with what each symbol must produce.
- The test architecture and the top level compare the R-TRC and scan-chain
  contents with a reference model after every symbol.

`tb_shift_register_reuse_top` runs the whole design at its default
parameters. It counts each mechanism and fails if one never occurs: shifts,
transfers through a temporary latch, generator-sourced shifts, R-TRC loads,
captures, feedback and twist expansions, cancelled commands and TRST.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/trc_pkg.sv tb/tb_shift_register_reuse_top.sv --top-module tb_shift_register_reuse_top
./obj_dir/Vtb_shift_register_reuse_top
```

Substitute any other `tb_<module>`. Always list `rtl/trc_pkg.sv` first. All
testbenches finish in well under a second.
