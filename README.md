# Low-power programmable PRPG with test compression

Shifting pseudorandom patterns into scan chains makes roughly half of all
scan cells flip on every shift clock. That burns far more power during test
than the circuit ever uses in its mission mode. This design is a
pseudorandom pattern generator (PRPG) for scan-based logic BIST in which that
switching activity is programmable. The same hardware can also work as a
test-data decompressor, so one block serves both logic BIST and
ATE-driven scan compression. In both modes the amount of scan-shift
switching is chosen per pattern.

The main idea is a row of **hold latches** between the linear pattern source
(a ring generator) and the phase shifter that feeds the scan chains. A latch
that is enabled passes the generator bit through. A latch that is disabled
keeps its old value. If all the latches feeding a chain's phase-shifter XOR
are holding, that chain shifts a constant and its cells do not toggle. Two
independent mechanisms decide which latches are enabled:

* **which** latches may toggle during a pattern: a per-pattern map in the
  *toggle control register*;
* **when** they may toggle: a *T flip-flop* that alternates the whole pattern
  between *toggle periods* and *hold periods*.

This repository holds synthesizable SystemVerilog for the generator/
decompressor, a small test controller and a signature-based response
analyzer, with self-checking testbenches for every module.

## Datapath

```
 tester channels (decompressor mode)
        |
        v
 +----------------+  N   +--------------+  N   +---------------+  M
 | ring generator |----->| hold latches |----->| phase shifter |-----> scan_in[M]
 |   (N bits)     |  rg  |  en[N]       | lat  | 3-input XORs  |       to the chains
 +----------------+      +--------------+      +---------------+
     |   |   |                  ^ latch_en[N]
     |   |   |                  |
     |   |   |   +--------------------------+     +-------------------+
     |   |   |   | toggle control register  |<----| shift register    |<-- mux <- weighted logic V (PRPG)
     |   |   |   |  AND t_eff, OR force_all |load | (N bits, 1/shift) |       <- rg[N-1]      (decompressor)
     |   |   |   +--------------------------+     +-------------------+
     |   |   |                  ^ t_eff = T | NoHold
     |   |   |   +--------------------------+
     |   |   +-->| T flip-flop              |<-- weighted logic H (PRPG)
     |   |       | + 4-bit down counter     |<-- counter = 0  (decompressor)
     |   |       +--------------------------+
     |   +------> weighted logic V, H read ring generator stages
     +----------> rg[N-1] is the deterministic shift-register input
```

The enable of latch *i* in a given cycle is

```
latch_en[i] = first_cycle | lp_off | (ctrl[i] & (T | no_hold))
```

* `ctrl` is the toggle control register. It is reloaded from the shift
  register at the start of every pattern, so the shift register collects,
  during one pattern, the map that the next pattern uses.
* `T` is the T flip-flop. `T = 1` is a toggle period and `T = 0` a hold
  period. During a hold period every latch is frozen, whatever `ctrl` says.
* `no_hold` is 1 when the Hold register holds `0000`. An OR gate then forces
  toggle mode for the whole pattern.
* `lp_off` is 1 when the Switching register holds `0000`. Every latch is then
  transparent and the block behaves like a plain PRPG.
* `first_cycle` marks the end of ring generator initialisation. It makes
  every latch load the current generator state, so no stale value from the
  previous pattern is left in a latch.

The phase shifter drives chain *j* with the XOR of three latch outputs. With
`N = 32` these are latches `j, j+1, j+6` for chains 0..31 and
`j, j+3, j+11` (mod 32) for chains 32..63. A chain therefore shifts a
constant exactly when its three latches all hold.

## PRPG mode (logic BIST), `det_mode = 0`

**Which latches: weighted logic V and the Switching register.** In every
shift cycle weighted logic V produces one bit for the shift register. Four
AND gates combine 1, 2, 3 and 4 ring generator bits, so their outputs are 1
with probability 1/2, 1/4, 1/8 and 1/16. Switching register bit *k* enables
gate *k*, and an OR gate merges the enabled gates. Because the gates read
disjoint generator stages, the chance that a latch may toggle is

```
P(ctrl[i] = 1) = 1 - prod over enabled k of (1 - 2^-(k+1))
```

| Switching | enabled gates | fraction of latches allowed to toggle |
|-----------|---------------|----------------------------------------|
| 0000      | none          | low power off: all latches transparent |
| 0001      | 1/2           | 0.5                                    |
| 0010      | 1/4           | 0.25                                   |
| 0100      | 1/8           | 0.125                                  |
| 1000      | 1/16          | 0.0625                                 |
| 0011      | 1/2, 1/4      | 0.625                                  |
| 1111      | all           | 0.6924                                 |

That gives 15 programmable rates plus "off".

**When: weighted logic H, Toggle and Hold registers.** Weighted logic H has
the same AND/OR structure on another set of generator stages. It watches the
Toggle register while `T = 1` and the Hold register while `T = 0`. Every 1
on its output flips T. A period therefore has a geometric length with mean
`1/p`, where `p` is the probability set by the watched register. A larger
code gives shorter periods. The average scan-shift activity is the product
of the fraction of time spent in toggle periods and the fraction of latches
enabled by `ctrl`.

## Decompressor mode (test compression), `det_mode = 1`

In this mode the scan data no longer comes from a free-running generator.
The ATE injects compressed data (`ate_in`, `N_INJ` bits per cycle) into the
ring generator. An encoder works out that data offline so that the specified
bits (care bits) of each test cube appear in the chains. For that to work,
everything that shapes the scan data must be a linear function of the
injected bits, or fixed in advance. Both random sources are therefore
replaced:

* **Weighted logic V is bypassed.** A multiplexer in front of the shift
  register selects ring generator stage `N-1`. The toggle control map of
  the next pattern becomes a linear function of the injected data, and the
  encoder can choose it. The bit entering in shift cycle `L-1-i` ends up
  in `ctrl[i]`.
* **Weighted logic H is replaced by a 4-bit down counter.** At every
  pattern start the tester supplies the initial T value (`t_init`) and an
  initial count (`offset`). A count of *v* lasts *v+1* shift cycles. When
  the counter reaches zero, T flips and the counter reloads from the
  register of the period that begins: Hold when going to a hold period,
  Toggle when going to a toggle period. The hold/toggle schedule of a
  pattern is therefore fully determined by
  `(t_init, offset, Hold, Toggle)`.
* **No Hold.** Loading `Hold = 0000` removes hold periods from a pattern.
  The encoder uses this for patterns whose care bits need every shift cycle.

Each pattern begins with a ring generator initialisation: one clear cycle,
then `INIT_CYCLES` cycles of injection during which the chains do not shift.
In the last initialisation cycle the First-cycle strobe loads every latch
from the generator. Shifting with continued injection follows.

Encoding is done in software and is not part of the hardware. The testbench
`tb_lp_encode` contains a small complete encoder, which shows how it works.
It simulates the decompressor symbolically, with one GF(2) variable per
injected bit (`2 x (4 + 100)` variables per pattern at the default size).
It writes one equation per care bit and one per control bit of the next
pattern, and solves them by Gaussian elimination. The schedule of latch
enables is known in advance, so each scan bit is the XOR of three latch
expressions. A latch expression is either the generator stage in that
cycle or the value the latch froze at.

## Test sequence and timing

`bist_controller` runs a test after `start` while `normal_mode = 0`.
`normal_mode = 1` is functional mode: the controller stays idle, or aborts a
running test.

| mode         | sequence                                                                                   | cycles from start to `done` |
|--------------|--------------------------------------------------------------------------------------------|-----------------------------|
| PRPG         | SEED, then P x (PRE, SHIFT x L, CAPTURE), then UNLOAD x L                                   | `1 + P(L+2) + L`            |
| decompressor | P x (CLEAR, INIT x INIT_CYCLES, SHIFT x L, CAPTURE), then UNLOAD x L                        | `P(INIT_CYCLES+L+2) + L`    |

* SEED loads `seed` into the ring generator.
* PRE is the pattern start, and the First cycle for the first pattern.
* In decompressor mode the last INIT cycle is both the pattern start and the
  First cycle.
* `scan_in` is valid, and the chains shift, in every cycle with
  `scan_shift = 1`.
* `ate_in` is consumed in every `ate_req` cycle.
* `t_init` and `offset` are sampled in the `pat_start` cycle.
* The programming registers (`cfg`, written with `cfg_we`) should be
  changed only outside shift cycles, for example in the capture cycle. The
  change then applies from the next pattern on.

**Response analysis.** The chains' outputs (`scan_out`) are compacted in
every shift cycle by an M-bit MISR (an internal-XOR LFSR with a primitive
polynomial). The first pattern's unload compacts the chains' reset state,
and the final UNLOAD empties the last response. `pass` and `fail` compare
the signature with the `golden` input while `done` is 1.

## Module map

| module | role |
|--------|------|
| `lp_bist_top` | top: controller + decompressor + response analyzer; the circuit under test is reached through ports |
| `bist_controller` | test controller, state machine above |
| `lp_decompressor` | low-power PRPG / LP decompressor, the datapath above |
| `ring_generator` | N-bit internal-XOR LFSR with seed load, clear and tester-data injectors |
| `hold_latches` | N hold latches |
| `phase_shifter` | XOR network, 3 latches per chain |
| `shift_register` | N-bit shift register with the PRPG/decompressor input multiplexer |
| `toggle_control_register` | per-pattern map and latch-enable gating |
| `weighted_logic_v`, `weighted_logic_h` | programmable-probability AND/OR logic |
| `lp_config_regs` | Switching, Hold, Toggle registers; low-power-off and No Hold decoders |
| `lp_mode_control` | T flip-flop, its PRPG and decompressor drivers, No Hold OR |
| `down_counter` | 4-bit period counter |
| `response_analyzer` | MISR and signature comparator |
| `lp_prpg_pkg` | shared types (`code_t`, `lp_cfg_t`), polynomials and tap formulas |

Main top-level ports of `lp_bist_top`:

* **Control:** `normal_mode`, `start`, `det_mode`, `num_patterns`, with
  status outputs `busy`, `done`, `pattern` and `test_mode`.
* **Programming:** `cfg_we`, `cfg` (fields `switching`, `hold`, `toggle`)
  and `seed`.
* **Tester side:** `ate_in`, `ate_req`, `t_init`, `offset` and `pat_start`.
* **Chains:** `scan_in`, `scan_shift`, `capture` and `scan_out`.
* **Response:** `golden`, `signature`, `pass` and `fail`.
* **Observation:** `latch_en`, `t_eff`, `flip`, `lp_off`, `no_hold` and
  `first_cycle`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 32 | ring generator / hold latch / control register width (8, 16, 24, 32, 48, 64, 96 or 128; at least 20 for the weighted logic) |
| `M` | 64 | number of scan chains and MISR width (same width list) |
| `N_INJ` | 2 | tester channels injected into the ring generator |
| `L` | 100 | scan chain length (shift cycles per pattern) |
| `INIT_CYCLES` | 4 | ring generator initialisation cycles per pattern (decompressor mode) |
| `PAT_W` | 16 | width of the pattern counter |

The 4-bit width of the Switching, Hold and Toggle registers and of the down
counter is part of the scheme. The other defaults are this implementation's
own choice. The scheme leaves the generator size, the number and length of
the chains and the number of tester channels to the user. The polynomials
come from the usual maximal-length LFSR tables. For example, the `N = 32`
ring generator uses x^32 + x^22 + x^2 + x + 1 and the `M = 64` MISR uses
x^64 + x^63 + x^61 + x^60 + 1.

## What is fixed by the scheme and what is filled in here

Taken from the scheme:

* the ring generator, the N hold latches and the phase shifter;
* the per-pattern toggle control register fed by a shift register;
* weighted logic V with a 4-bit Switching register, 15 rates and an "off"
  code;
* the T flip-flop, which disables all latches through AND gates in hold
  periods;
* weighted logic H, which watches the Toggle or the Hold register according
  to T;
* in decompressor mode: the multiplexer before the shift register, and the
  4-bit down counter preset per pattern and reloaded from Toggle/Hold when it
  reaches zero;
* the No Hold code (`0000`), which overrides T through an OR gate;
* the First-cycle reload of all latches at the end of ring generator
  initialisation;
* a test controller with a normal/test mode signal and a response analyzer
  that compares against a good-machine signature.

Filled in by this implementation:

* **Ring generator.** It is an internal-XOR LFSR with a primitive polynomial.
  A true ring generator spreads its feedback taps differently, but its
  sequences have the same linear properties.
* **Hold latches.** Each is modelled at the cycle level as a flip-flop plus
  bypass multiplexer (`q = en ? d : stored`) rather than a level-sensitive
  latch. This keeps the design single-clock.
* **Phase shifter.** The taps follow the fixed formula given above. They
  were not synthesised for channel separation.
* **Weighted logic.** The gate structure is an assumption: AND gates of 1 to
  4 bits on disjoint generator stages. This holds for both V and H.
* **Codes.** `0000` is both the low-power-off code (Switching) and the No
  Hold code (Hold). Both decoders are active in both modes.
* **Decompressor.** The tester data enters by continuous injection into
  stages `3 + c*N/N_INJ`. The deterministic shift-register input is stage
  `N-1`.
* **Per-pattern values.** `t_init` and `offset` come from ports and also
  initialise T in PRPG mode. A count *v* lasts *v+1* cycles.
* **Reset values.** T = 1, the control register is all ones, and the
  registers are `0000` (low power off).
* **Controller and analyzer.** The controller's state sequence, single
  capture cycle, final unload and per-pattern initialisation are this
  implementation's own. So is MISR compaction in the response analyzer.
* **Not included.** The circuit under test is not part of the RTL: it is the
  design being tested. `tb/cut_model.sv` is a behavioural stand-in with M
  chains of L cells, a nonlinear capture function and an optional stuck-at
  defect.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=... failures=...` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ring_generator` | cycle-by-cycle against the polynomial and injector positions; clear/load; period exactly 2^16-1 for N = 16 |
| `tb_hold_latches` | transparent when enabled, last value when disabled |
| `tb_phase_shifter` | tap table on one-hot and random inputs; a chain with frozen latches stays constant |
| `tb_shift_register`, `tb_toggle_control_register` | shifting, multiplexer, per-pattern reload, AND gating, force-all |
| `tb_weighted_logic_v`, `tb_weighted_logic_h` | exhaustive over the 1024 input combinations: exact number of 1s for each of the 16 codes (and both T states) |
| `tb_lp_config_regs`, `tb_down_counter`, `tb_lp_mode_control` | register writes and decoders; counter reload; hold/toggle period lengths `offset+1`, `Hold+1`, `Toggle+1`; T following H |
| `tb_bist_controller` | strobe counts and exact cycle totals in both modes; normal mode blocks and aborts |
| `tb_response_analyzer` | MISR against a reference; pass/fail with and without a data error |
| `tb_lp_decompressor` | both modes under random programming, every cycle against the reference model `tb/lp_ref_model.sv`; frozen scan inputs in hold periods; switching reduction; share of enabled control bits for five Switching codes against the programmed probability |
| `tb_lp_bist_top` | end to end at the default size: normal mode, PRPG run with cycle count and signature, golden-signature pass, defect detected (fail), low-power-off comparison, decompressor run with reprogramming and No Hold; every mechanism counted |
| `tb_lp_encode` | compression workload at the default size: 10 patterns, 40 random care bits each, encoded as above and checked bit by bit in the running hardware, together with the encoded control maps and the predicted latch enables |

Measured switching, from `tb_lp_bist_top`: at Switching = 0011, with short
toggle and long hold periods, the scan inputs make about 30 % of the
transitions they make with low power off. In `tb_lp_encode`, encoded
patterns with about half the latches enabled and random hold schedules make
50 to 65 % of the transitions of the low-power-off run. About 88 % of the
requested care bits are encodable. This encoder picks the control maps at
random instead of from the cubes, which explains the lower figure.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/lp_prpg_pkg.sv tb/tb_lp_bist_top.sv --top-module tb_lp_bist_top
./obj_dir/Vtb_lp_bist_top
```

Replace `tb_lp_bist_top` with any other testbench name. All testbenches
finish in well under a second. To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/lp_prpg_pkg.sv rtl/lp_bist_top.sv
```

Lint reports only style warnings: unused package constants in the modules
that do not use them, and two sub-module status outputs that are left
unconnected on purpose.
