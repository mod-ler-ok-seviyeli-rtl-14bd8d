# Nearest-level modulation controller for a five-level modular multilevel converter

A modular multilevel converter (MMC) builds its AC output from two stacks
("arms") of identical half-bridge submodules (HBSMs). Each submodule holds a
capacitor charged to Vc. It either inserts that capacitor into its arm (switch
S1 on, S2 off) or bypasses it (S1 off, S2 on). The arm voltage is Vc times the
number of inserted submodules.

Nearest-level modulation (NLM) needs no carrier. At each sampling instant it
takes the ideal arm voltage, rounds it to the nearest whole number of
submodules, and inserts that many.

This RTL is the digital side of such a controller for a single-phase converter
with four submodules per arm. It takes a 100 MHz clock and a reset button and
produces the 16 gate pulses (S1 and S2 of 4 + 4 submodules). With the 10 V
capacitors of the reference setup (40 V DC link), the output steps between
-20, -10, 0, +10 and +20 V: five levels.

## What the controller computes

With the DC link at N·Vc and modulation index M, the normalised arm voltages
are

    upper arm:  N/2 · (1 − M·sin ωt)
    lower arm:  N/2 · (1 + M·sin ωt)

The two always add up to N. The controller therefore rounds only the upper
arm's voltage. The lower arm gets N minus the result:

    n_upper = round(2 · (1 − M·sin ωt))      (N = 4)
    n_lower = 4 − n_upper

The output voltage is (v_lower − v_upper)/2 = (2 − n_upper) · Vc.

### Fixed-point form (the part worth reading twice)

Everything is integer arithmetic on a 1024 = 1.0 scale, with no divider:

1. **Sine sample.** `s = round(1024 · sin(2πi/400))`, a 12-bit signed value
   from a 400-entry table. One table pass is one 50 Hz period.
2. **Modulation index.** M is given as an integer *k-term*. The product is
   `ms = (s · k · 10) >>> 10`, so M = 10k/1024. The k-terms of the reference
   design are 92, 82, 72 and 62. They give M = 0.898, 0.801, 0.703 and 0.605,
   chosen to approximate 0.9 to 0.6. k = 0 holds both arms at two inserted
   submodules. Levels are clamped to 0..4, so k above 102 (M > 1) saturates
   instead of wrapping.
3. **Round.** Subtract from 1024, double, add 512 (half a level), then shift
   right by 10:
   `n_upper = (2·(1024 − ms) + 512) >> 10`.
   The RTL writes this for any even N as
   `(N·(1024 − ms) + 1024) >> 11`, which is the same for N = 4.

The number of distinct levels follows from M. For M above 0.75 the upper arm
reaches 0 and 4 (five output levels). For M above 0.25 and up to 0.75 it
stays in 1..3 (three levels). This matches the five-level output at M = 0.9 and the
three-level output at M = 0.6 seen on the reference hardware.

## Timing chain

All logic runs on the 100 MHz master clock. There is one asynchronous,
active-high reset.

| stage | module | what happens | when |
|---|---|---|---|
| sample clock | `clk_div` | counts 2500 edges per half period; 20 kHz `clk_out` and a one-cycle `sample_tick` | every 5000 cycles (50 µs, 400 per 20 ms) |
| level | `sine_round` | reads the next table entry, computes `n_upper`/`n_lower` | 1 cycle after the tick |
| patterns | `sm_on`, `sm_off` | registered ON (10) and OFF (01) switch patterns, both 00 in reset | steady after the first clock |
| arm | `arm_gate` ×2 | submodules `0 .. n−1` get ON, the rest OFF | commands change 2 cycles after the tick |
| dead time | `dead_time` ×8 | turn-off after 1 cycle; turn-on only once both switches have been off 20 cycles (200 ns) | off at +3, complementary on at +23 cycles |

The divided clock is used as a strobe, not as a clock. That keeps the design
in one clock domain. `clk_out` is still produced but nothing inside uses it.

## Safety behaviour

- **Reset.** While reset is held, `sm_on` and `sm_off` output 00. Every gate
  is then open, whatever the arm modules select. The `dead_time` registers
  also reset to 00.
- **After reset.** Both arms start at two inserted submodules, the level of a
  zero sine. So the arms always insert four submodules in total, and the DC
  link never sees a short or an open arm pair.
- **No shoot-through.** `dead_time` never turns a switch on while its partner
  is on, or within 20 cycles of the partner turning off. A both-on command
  keeps both switches off. An assertion in `dead_time` states the rule.
- **Which submodules switch.** The lowest-numbered submodules are always the
  ones inserted. The capacitors are assumed to be held at their voltage
  externally, so there is no capacitor-voltage sorting or balancing.

## Files

| file | contents |
|---|---|
| `rtl/nlm_pkg.sv` | constants (N_SM = 4, 400 samples, 1024 scale, K_SCALE = 10) and the `gate_pair_t` struct `{s1, s2}` |
| `rtl/clk_div.sv` | sample clock divider |
| `rtl/sine_lut.sv` | sine table, computed at elaboration by a constant function (synthesises to a ROM) |
| `rtl/sine_round.sv` | table address counter, k-term scaling, rounding |
| `rtl/sm_on.sv`, `rtl/sm_off.sv` | ON / OFF switch-pattern registers |
| `rtl/arm_gate.sv` | count → per-submodule commands, one instance per arm |
| `rtl/dead_time.sv` | dead-time generator for one submodule |
| `rtl/nlm_mmc_top.sv` | top: ports `clk`, `rst`, `upper_s1[3:0]`, `upper_s2[3:0]`, `lower_s1[3:0]`, `lower_s2[3:0]` |

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `HALF_COUNT` | 2500 | master cycles per half sample period (100 MHz × 25 µs) |
| `K_TERM` | 92 | modulation index, M = K_TERM·10/1024; 0..127, checked at elaboration |
| `DEAD_CYCLES` | 20 | dead time in master cycles (200 ns); at least 1 |

For another master clock, set `HALF_COUNT = f_clk · 20 ms / (2 · 400)`. For
another number of submodules, change `N_SM` in the package (keep it even). The
level widths follow from it.

Generic synthesis of the top gives about 290 word-level cells, 93 flip-flop
bits and a 512 × 12 ROM (400 entries used). The 18 ports match the 18 I/O pins
of the reference FPGA build.

## Where this design makes its own choices

The reference design defines the module structure, the numbers (4 submodules,
400 samples, 2500 count, ±1024 sine, the k-terms, 200 ns) and the rounding
recipe. The following choices are this implementation's own:

- How a k-term maps to M. "k ≈ 100·M on a 1024 scale" is read as M = 10k/1024.
  Other readings of the reference's measured "actual M" values (0.89, 0.82,
  0.70, 0.58) are possible. None fits all four.
- A single clock with a sample strobe, instead of clocking modules from the
  divided clock.
- Which submodules are inserted for a given count (lowest index first), and
  the reset level of two per arm.
- The internals of the dead-time generator. The reference gives only its
  purpose and 200 ns.
- The sine phase (zero) and the clamp to 0..4.
- A fixed N = 2 display run is reproduced with `K_TERM = 0`.

The analog side (MOSFETs, gate drivers, capacitors, arm inductors, the
40 V supply and the RL load) is outside the RTL. The testbench monitor models
it ideally.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

- `tb_clk_div`: tick period, first tick, and `clk_out` half period, at 2500 and
  at 3.
- `tb_sine_lut`: all 400 entries against a real-valued sine, plus peaks,
  zeros and symmetry.
- `tb_sine_round`: every sample against `round(2(1 − M sin))` for k = 92, 82,
  72, 62, 0 and 127. It also checks one-cycle latency, address wrap and the
  number of levels (5, 5, 3, 3, 1, 5).
- `tb_sm_on`, `tb_sm_off`: patterns, and asynchronous reset to 00.
- `tb_arm_gate`: random counts with and without the strobe.
- `tb_dead_time`: random commands against a cycle-accurate reference model,
  for 20 and 3 cycles. It checks that there is no overlap and measures every
  gap.
- `tb_nlm_mmc_top`: five tops side by side (k = 92, 82, 72, 62, 0) at a short
  sample period (HALF_COUNT = 20, 3-cycle dead time), for two periods with a
  reset in the middle. `tb/mmc_monitor.sv` models each arm as 10 V per
  inserted submodule. Every sample, it checks levels, complementary arms,
  submodule order and exact dead times. At the end the test checks the level
  count, that levels changed, that dead times and a table wrap occurred, and
  the output RMS against an exactly rounded staircase. At M = 0.9 the
  staircase gives 13.95 V RMS; the ideal sine would give 12.7 V.
- `tb_nlm_mmc_top_full`: the top with every parameter at its default, for one
  full 20 ms period (2,000,000 cycles; about a second of simulation). It checks
  the 50 Hz period to the cycle, five levels, eight level changes per period
  and 200 ns dead times.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/nlm_pkg.sv \
        tb/tb_nlm_mmc_top.sv --top-module tb_nlm_mmc_top -Mdir obj
    ./obj/Vtb_nlm_mmc_top

Replace the testbench name for the others. The package must come first on the
command line.
