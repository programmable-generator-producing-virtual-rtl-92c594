# PRESTO: a low-power pseudorandom scan pattern generator with programmable toggling

Scan-based logic BIST loads every scan chain with pseudorandom data. Those chains toggle on
about half of all shift cycles, and the circuit under test can then draw far more power than
it does in normal operation. This generator is built to keep that activity down. It is a
pseudorandom pattern generator (PRPG) whose outputs reach the scan chains through **hold
latches**. A latch in *toggle mode* passes its PRPG bit. A latch in *hold mode* keeps feeding
the same value. A scan chain fed only by held latches receives a constant, so it does not
toggle at all. The user sets, with a few small registers, how many latches toggle in each
pattern and how much of each pattern is frozen outright. The result is pseudorandom patterns
with a chosen (preselected) toggling rate, which is where the name PRESTO (PREselected
TOggling) comes from.

The same hardware can also expand compressed deterministic patterns. The PRPG can be reseeded
and can take data from tester channels, so it works as a test data decompressor, and the
low-power controls still apply in that mode.

## Block diagram

```
                 cfg_in --> [shadow regs: switching | hold_len | toggle_len]
                                   |              |          |
                  +----------------+              +----+-----+
                  v                                    v
   +------+   [weight_gen] --bit--> [shift reg] ==> [toggle control reg]   [duty_ctrl: T flip-flop]
   | PRPG |       ^  (4 weighted gates,   ^  reload once per pattern         | toggle_phase
   |  N   |-------+   OR, code 0000 =     |  (pattern counter)               |
   |stages|           low power off)      |                                  v
   |      |====================================================> latch_en = (tcr | lp_off) & toggle_phase
   |      |==> [N hold latches] ==> [phase shifter: each output = XOR of 3 latches] ==> scan_in[M-1:0]
   +------+
   seed / inj_data (decompressor use)
```

| Module | Block |
|---|---|
| `presto_top` | the whole generator |
| `presto_prpg` | N-stage LFSR with reseeding and tester data injection |
| `presto_weight_gen` | weighted source of the bits that enter the shift register |
| `presto_toggle_ctrl` | shift register and toggle control register |
| `presto_pattern_counter` | counts the L shift cycles of a pattern |
| `presto_duty_ctrl` | T flip-flop and counter for the hold and toggle periods |
| `presto_shadow_regs` | staging and active copies of the configuration |
| `presto_hold_latches` | the N hold latches |
| `presto_phase_shifter` | XOR network to the M scan chains |
| `presto_pkg` | the configuration struct and the tap rules |

## Two levels of control

### Per latch: the toggle control register

Each hold latch `i` has a bit in the toggle control register (TCR). A 1 puts it in toggle
mode and a 0 in hold mode. The TCR is reloaded once per pattern, at the end of its last shift
cycle, from an N-bit shift register. During the pattern, the shift register takes one new bit
per shift cycle from `presto_weight_gen`. So a new random TCR is built while the current one
is in use, and with the default sizes (L = 64 shift cycles, N = 32) it is refilled completely
in every pattern.

`presto_weight_gen` sets the fraction of 1s. Each of its four AND gates combines one bit of
the 4-bit **switching code** with PRPG stages:

| gate k | PRPG stages | P(1) when enabled |
|---|---|---|
| 0 | 1 | 1/2 |
| 1 | 3, 5 | 1/4 |
| 2 | 7, 9, 11 | 1/8 |
| 3 | 13, 15, 17, 19 | 1/16 |

The gates are ORed, so a code that enables several gates gives `1 - prod(1 - 2^-(k+1))`.
For example, 0011 gives 0.625, 0110 gives 0.34 and 1111 gives 0.69. Code **0000** switches
the low-power function off: `lp_off` forces every latch enable high, and the generator is a
plain PRPG, except in hold periods. A scan chain's input is the XOR of three latches. When a
fraction p of the latches toggle, a chain changes value on about `0.5 * (1 - (1-p)^3)` of
shift cycles, against 0.5 for a plain PRPG.

### Whole generator: hold and toggle periods

`presto_duty_ctrl` splits the shift cycles of each pattern into alternating periods, using a
T flip-flop:

* **toggle period** (`toggle_phase = 1`): latches follow the TCR; it lasts `max(toggle_len, 1)`
  shift cycles;
* **hold period** (`toggle_phase = 0`): every latch enable is forced low and all scan chains
  repeat their last value; it lasts `hold_len` shift cycles.

The flip-flop flips when a 1 reaches its T input. That happens when an up-counter of the
shift cycles spent in the current period reaches the length of that period. `hold_len = 0`
means there are no hold periods. Every pattern starts with a toggle period. Example with
`toggle_len = 3`, `hold_len = 5`:

```
shift cycle   0 1 2 3 4 5 6 7 8 9 10 11 ...
toggle_phase  1 1 1 0 0 0 0 0 1 1 1  0  ...
```

The fraction of shift cycles in toggle periods, `T / (T + H)`, scales the switching activity
of every chain. This bounds the activity even of a chain whose latches all toggle. Such a
bound matters when a single chain crosses a small area of the chip.

### Shadow registers and pattern timing

The switching code and the two lengths (`presto_cfg_t`, 12 bits) are written through
`cfg_we`/`cfg_in` into a staging copy. The generator uses only the active copy. This copy
takes the staging value at the clock edge that ends the last shift cycle of a pattern, the
same edge that reloads the TCR and restarts the hold/toggle sequence. A write therefore never
changes the current pattern, nor the capture cycles after it.

## Timing and interface (`presto_top`)

One shift cycle per clock with `shift_en` high. `scan_in` is valid during that cycle. The
scan chains take it on the rising edge, and the PRPG steps on the same edge. Cycles with
`shift_en` low (capture, idle, reseeding) freeze everything except the configuration write
and the seed load. `pattern_end` is high in the last shift cycle of the pattern.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `shift_en` | in | 1 | this cycle is a shift cycle |
| `cfg_we`, `cfg_in` | in | 1, 12 | write the staging configuration `{switching, hold_len, toggle_len}` |
| `seed_load`, `seed` | in | 1, N | load the PRPG state (takes priority over stepping) |
| `inj_en`, `inj_data` | in | 1, C | XOR channel c into PRPG stage c*N/C of the next state |
| `scan_in` | out | M | one bit per scan chain |
| `shift_count` | out | log2 L | shift cycle within the pattern |
| `pattern_end` | out | 1 | last shift cycle of the pattern |
| `toggle_phase` | out | 1 | 1 in toggle periods, 0 in hold periods |
| `latch_en` | out | N | hold latch enables |
| `cfg_active` | out | 12 | configuration in use |

After reset, the PRPG holds `SEED`, the TCR is all ones and the configuration is all zeros,
so the first pattern is plain pseudorandom.

Parameters: `N` = 32 (PRPG stages and hold latches), `M` = 16 (scan chains), `L` = 64 (shift
cycles per pattern), `C` = 2 (tester channels), `TAPS`, `SEED`. The 4-bit width of the three
configuration fields (`presto_pkg::CFG_W`) belongs to the scheme itself. The other sizes are
free choices. If N is changed, `TAPS` must be given a primitive polynomial of the new size,
and N should stay at 20 or above so that the weighted gates use distinct stages.

## What comes from the scheme and what is chosen here

The structure comes from the published PRESTO scheme with hold/toggle periods:

* PRPG, then n hold latches, then a phase shifter, where each phase shifter output XORs
  three latches.
* A toggle control register, loaded once per pattern from a shift register, whose input is
  weighted by the PRPG under a switching code.
* A T flip-flop with 4-bit Hold and Toggle registers that alternates whole-generator hold
  and toggle periods, gating the TCR outputs.
* Shadow registers that keep the values steady during capture.
* Use of the generator as a decompressor.

This design chose the following, and a user may need to change them:

* **PRPG**: a 32-stage Fibonacci LFSR (`a[t] = a[t-10]^a[t-30]^a[t-31]^a[t-32]`). The scheme
  also allows a ring generator, which is not built here.
* **Weights and stages** of the four gates, as tabulated above. The meaning of code 0000
  (low power off) is also this design's choice.
* **Hold/Toggle encoding**: the values are lengths in shift cycles, and 0 has the meanings
  given above. Every pattern starts in a toggle period.
* **Phase shifter taps**: output j uses latches `3j`, `3j + N/3` and `3j + 2N/3 + 1` (mod N).
  A real phase shifter is normally designed to keep channel separations large. These taps
  only guarantee three distinct latches.
* **Hold latches are modelled synchronously**: a multiplexer plus a register that stores the
  last value shown. At the shift clock this behaves like a level-sensitive latch, and the
  design keeps a single clock.
* **Configuration access**: a parallel write port. In a real flow these registers are loaded
  through the test access mechanism.
* **Injection points**: stage c*N/C. Reset values are listed above.

Not included:

* The scan chains and the circuit under test.
* The response compactor.
* The software that picks the control values or computes the seeds and injections for
  deterministic patterns. A small GF(2) solver in `tb_presto_decompress` stands in for it
  in simulation.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/presto_pkg.sv tb/tb_presto_top.sv \
          --top tb_presto_top -Mdir obj_top && obj_top/Vtb_presto_top
```

* `tb_presto_top` runs the full-size generator (default parameters) for 46 patterns with
  random idle cycles, capture gaps, reseeds, injections and configurations. A cycle-accurate
  reference model built into the testbench is compared with every output in every cycle. The
  testbench also checks, directly on the outputs:
  * in a hold period, every chain repeats its value;
  * a chain whose three latches are off stays constant for the whole pattern;
  * the TCR fill rate follows the switching code.

  It counts how often each mechanism occurs and fails if any never does. The mechanisms are
  reload, hold period, toggle period, low-power-off pattern, deferred configuration,
  capture, reseed, injection and frozen chain.
* The block testbenches compare each module with an independent reference, some with a
  second, smaller instance. For example, the 8-stage PRPG must have a period of 255.
* `tb_presto_toggling` measures the switching activity at the scan chain inputs for several
  switching codes and hold/toggle settings. It checks the activity against the expected
  value `0.5 * (1 - (1-p)^3) * T/(T+H)`.
* `tb_presto_decompress` uses the generator as a decompressor. It runs a symbolic copy of
  the generator, in which every scan bit is an XOR function of the 32 seed bits, the 128
  injected bits and constants held in the latches. It solves for random care bits by
  Gaussian elimination over GF(2), then loads the seed and injects the data. It checks each
  care bit, and every other scan bit against its prediction.

  With the low-power function off, about 110 of 120 random care bits per pattern can be
  encoded. With switching code 0010 and hold periods (hold 3, toggle 5), about one in four
  of only 60 care bits cannot be encoded. Frozen chains and hold periods add no new
  variables, so lower toggling costs encoding capacity.
