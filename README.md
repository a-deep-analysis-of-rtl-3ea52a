# Single-cycle glitch-free masking: SESYM and LMDPL in SystemVerilog

Boolean masking splits every secret bit into random shares (here two:
`x = x0 ^ x1`) so that no single wire of the circuit carries information about
the secret. In hardware, glitches can recombine shares inside combinational
logic, so masked gadgets normally need register stages, which costs latency.
Dual-rail pre-charge (DRP) logic is glitch-free by construction, and two
schemes use it to mask arbitrary functions with a latency of one cycle:

* **SESYM** (self-synchronized masking) takes a Domain-Oriented Masking (DOM)
  circuit, replaces every gate with its WDDL dual-rail gadget and removes the
  resharing registers. The circuit is fully combinational. A completion
  detector ends the evaluation phase, and Muller C-elements hold the result.
* **LMDPL** (LUT-based masked dual-rail pre-charge logic) keeps exactly one
  register stage per non-linear gadget. A single-rail layer builds a table
  blinded by a fresh mask from the first shares. A dual-rail layer selects one
  table entry with the second shares.

This repository gives RTL for both, plus the rail-delay experiment that shows
why the difference matters. Glitch-free logic can still leak through *when*
a signal switches. In SESYM, a delay on one rail spreads through the
combinational circuit and mixes both shares of a variable, so the
time of evaluation depends on the unmasked data. In LMDPL, the register stage
resynchronises the data, so the time of evaluation depends on the second shares
and the blinded table only. Both effects can be reproduced in simulation here
(see *Rail delays and what the testbenches show*).

## Dual-rail pre-charge encoding

Every DRP signal is a `drp_pkg::dr_t` with a true rail `t` and a false rail `f`:

| t f | meaning |
|-----|---------|
| 0 0 | NULL (pre-charged) |
| 0 1 | logic 0 |
| 1 0 | logic 1 |
| 1 1 | INVALID, never produced |

All rails are 0 in the pre-charge phase. In the evaluation phase, exactly one
rail of each signal rises. Every gadget uses only AND/OR gates (monotone), so
a NULL input keeps the output NULL and no rail can pulse. Inversion needs no
gate: the two rails are swapped (`dr_not`).

## Gadgets

| module | function |
|--------|----------|
| `wddl_and2` | `z.t = x.t & y.t`, `z.f = x.f | y.f`. The OR settles as soon as one false input is 1 (*early propagation*). |
| `wddl_and2_noee` | `z.t = x.t & y.t`. `z.f` is the OR of the three minterms that give 0, so the gadget waits for both inputs. |
| `wddl_xor2` | `z.t = x.t&y.f | x.f&y.t`, `z.f = (x.t|y.f) & (x.f|y.t)` |

## SESYM

### Multiplier (`sesym_and2`)

This is a first-order DOM AND built from WDDL gadgets, with no registers:

```
z0 = (x0 & y0) ^ ((x0 & y1) ^ r)
z1 = (x1 & y1) ^ ((x1 & y0) ^ r)
```

Each share domain has an inner-domain AND gadget and a cross-domain AND
gadget. One XOR gadget blinds the cross product with the fresh mask `r`, and a
second XOR gadget forms the output share. The parameters are:

* `NOEE` selects the AND gadget without early evaluation.
* `DLY_Y0_STAGES` / `DLY_Y1_STAGES` put an `inverter_delay_chain` on the true
  rail of `y0` / `y1` in front of every AND gadget these rails feed. This
  unbalances the rails. The default of 0 leaves the multiplier unchanged.
* The input `geval` is a global pre-charge signal. Every gadget output is
  ANDed with it, so `geval = 0` sends all gadgets to NULL at the same moment,
  even while their inputs still hold values. This is how the FPGA variant of
  the scheme ends evaluation (there combined with noEE gadgets). Tie `geval`
  to 1 for the plain construction.

### Any masking order (`sesym_dom_and`)

`sesym_and2` is the two-share instance of `sesym_dom_and`, which takes any
number of shares `SHARES = d + 1`. Output share `i` is

```
z[i] = x[i]y[i] ^ XOR over j != i of (x[i]y[j] ^ r{i,j})
```

One fresh mask bit `r{i,j} = r{j,i}` serves each pair of domains, so
`SHARES*(SHARES-1)/2` bits are needed. The mask for `i < j` is at index
`i*SHARES - i*(i+1)/2 + j-i-1`. Each domain has one AND gadget per `y`
share. Each cross product is blinded by its mask in one XOR gadget and then
folded onto the inner product in a chain of XOR gadgets, in increasing `j`.
`DLY_Y_STAGES` holds one 8-bit inverter count per `y` share. `NOEE` and
`geval` work as above.

### Masked Keccak chi (`keccak_chi_sesym`)

The 5-bit chi step is `b[i] = a[i] ^ (~a[i+1] & a[i+2])`. It uses five
multipliers with five fresh mask bits and five masked XORs (one WDDL XOR per
share domain). `geval` reaches every multiplier and XOR gadget. `~a[i+1]`
swaps the rails of share 0. The operand order is `x = ~a[i+1]`,
`y = a[i+2]`.

### The surrounding circuit (`sesym_chi_system`)

```
start ─► sesym_controller ── load ──► input register (a0, a1, r: 15 bits)
                  │  eval                   │
                  ▼                         ▼
            precharger ◄──────── single_to_dual_rail
                  │
                  ▼
          keccak_chi_sesym ──► c_element_array ──► b0, b1 (single rail, held)
                  │
                  ▼
        completion_detector ── all_valid / all_null ──► sesym_controller
```

* **Converter and precharger.** `single_to_dual_rail` turns every bit into a
  valid code. `precharger` forces all codes to NULL while `eval` is 0. The
  masks go through the same path as the shares.
* **Completion detector.** `all_valid` is the product of sums
  `AND_i (t_i | f_i)` over the ten output signals. `all_null` tells when the
  pre-charge wave has passed.
* **C-elements.** `c_element_array` has one Muller C-element per output, with
  inputs `t` and `~f`. The element follows a valid code and holds its value
  through NULL. It is a level-sensitive latch by nature. The synthesis tools
  report these 10 latch bits, which is intended.
* **Global pre-charge.** With the parameter `GLOBAL_PC = 1`, the controller's
  `eval` also drives `geval` of the chi. This gives the FPGA variant's gating.
  The completion detector is kept in both settings.
* **Controller.** `sesym_controller` is a clocked IDLE → EVAL → PRECH state
  machine. The first evaluation cycle in which the completion detector reports
  all outputs valid ends the evaluation phase. The original scheme runs this
  loop self-timed, without a clock. Sampling it with a clock is a choice of
  this implementation. It keeps the RTL synchronous and matches the
  FSM-controlled FPGA variant of the scheme.

Timing:

* `start` in cycle 0 loads the inputs.
* Cycle 1 is the evaluation phase.
* In cycle 2 the circuit pre-charges and `done` is 1.
* `b0`, `b1` are valid from cycle 2 and stay until the next evaluation.
* A `start` while `busy` is ignored.

## LMDPL

`lmdpl_and2` = `lmdpl_mask_table` → register stage → `lmdpl_operation_layer`.

**Mask table.** This layer is single rail and sees only first shares. For the
four possible second-share values (`j` for `x1`, `i` for `y1`) it computes:

```
t[4+2i+j] = F(x0 ^ j, y0 ^ i) ^ r       t[2i+j] = ~t[4+2i+j]       z0 = r
```

`F` is the parameter `F_TT` (`F(a,b) = F_TT[{b,a}]`). The default `4'b1000`
is AND.

**Register stage.** It captures `t` when `load` is 1. The register
outputs are ANDed with `eval`, so the table is pre-charged together with the
dual-rail inputs. Without this gating the operation layer would not start
every evaluation from NULL.

**Operation layer.** Two AND-OR 4:1 multiplexers select with the dual-rail
`x1`, `y1`:

```
s7 = x1.t & y1.t & t7   s6 = x1.f & y1.t & t6   s5 = x1.t & y1.f & t5   s4 = x1.f & y1.f & t4
z1.t = s4 | s5 | s6 | s7          z1.f = the same with t3..t0
```

Exactly one of the eight AND gates fires per evaluation. Then
`z0 ^ z1 = F(x0 ^ x1, y0 ^ y1)`.

Timing:

* `load` in cycle n. The first output share `z0 = r` leaves the mask table
  layer directly, ahead of the register stage, so it is valid in this cycle.
  The top level keeps it in a register.
* `eval` in cycle n+1 or later, with the matching `x1`, `y1` in dual rail.
* `z1` is valid while `eval` is 1 and NULL otherwise.

**Linear gadget (`lmdpl_xor2`).** A linear function needs neither the fresh
mask nor the register stage. The single-rail layer computes `z0 = x0 ^ y0`, and
the dual-rail layer is one `wddl_xor2` on the second shares, `z1 = x1 ^ y1`.
It is fully combinational, and `z1` is NULL while either input is NULL.

The scheme allows the pre-charge and evaluation phases to share one clock
cycle (for example, one phase per clock level). Here they are given as
separate cycles by the caller.

## Top level (`glitch_free_masking_top`)

The two schemes sit side by side, each with its own ports:

* **SESYM part.** A `sesym_chi_system`. Its five mask bits come from five
  `lfsr31` instances, one per bit. The LFSRs advance on every accepted
  `sesym_start`.
* **LMDPL part.** An `lmdpl_and2` with a sixth LFSR, an `lmdpl_xor2` on the
  same input shares, and a small sequencer:
  * `lmdpl_start` registers `x0`, `y0`, the mask and `x1`, `y1` (cycle 0).
  * Cycle 1 evaluates, with `lmdpl_busy` = 1. `x1`, `y1` are driven in dual
    rail and `z1` is captured.
  * In cycle 2, `lmdpl_done` = 1, `lmdpl_z0 ^ lmdpl_z1 = F(x, y)` and
    `lmdpl_xor_z0 ^ lmdpl_xor_z1 = x ^ y`. A new start is accepted in the
    same cycle.
* **Masks.** `mask_seed_load` loads all six LFSRs from `mask_seed` (power-up
  seeding).
* **LFSR details.** Each LFSR uses the polynomial `x^31 + x^28 + 1`, and a
  zero seed is replaced by 1. Both are choices of this implementation.

Parameters of the top:

| parameter | default | meaning |
|-----------|---------|---------|
| `SESYM_NOEE` | 0 | use WDDL-AND2-noEE in the multipliers |
| `DLY_Y0_STAGES` | 0 | inverters on `y_t^0` of every multiplier (6 in the unbalanced experiment) |
| `DLY_Y1_STAGES` | 0 | inverters on `y_t^1` (10 in the unbalanced experiment) |
| `SESYM_GLOBAL_PC` | 0 | drive the evaluation signal to every SESYM gadget as a global pre-charge |
| `LMDPL_F_TT` | `4'b1000` | truth table of the LMDPL gadget |

Reset is asynchronous and active low. It clears all registers and the
C-elements, and loads fixed non-zero LFSR states.

## Rail delays and what the testbenches show

`inverter_delay_chain` is a behavioural model: `STAGES` inverters with
`STAGE_DELAY` time units each. An even count keeps the polarity. Synthesis
sees only the inverter chain. The delays exist only in simulation (verilator
`--timing`).

* **Gadget testbenches.** `tb_wddl_and2`, `tb_wddl_and2_noee` and
  `tb_wddl_xor2` put a 4-stage chain on one rail (`y.f` for the ANDs, `y.t`
  for the XOR). For each input vector they check whether the output rail
  switches at once or after the delay, in evaluation and in pre-charge. With
  early propagation, the time at which the AND output rises depends on the
  input values. The noEE gadget waits for both inputs before it evaluates,
  but with an unbalanced rail its output still rises at a data-dependent
  time.
* **`tb_sesym_and2`.** The multiplier runs with 6 units of delay on `y_t^0`
  and 10 on `y_t^1`. For each of the 16 input vectors on which `z0.t` rises,
  the rise comes at 0, Δ0, Δ1 or max(Δ0, Δ1), exactly as predicted gate by
  gate. Averaged over the vectors, the rise time depends on the unmasked `y`:
  * plain gadgets: Δ1/4 for y = 0 and (Δ0+Δ1)/4 for y = 1;
  * noEE gadgets: Δ1/2 and (Δ0+Δ1)/2.

  Removing early evaluation does not remove the dependency. A fifth,
  gated multiplier checks that dropping `geval` sends both outputs to NULL at
  once for all 32 input vectors. This is the only thing the global pre-charge
  changes: the time of evaluation is unaffected.
* **`tb_sesym_dom_and`.** A three-share multiplier has 6, 10 and 14 units of
  delay on the true rails of `y0`, `y1` and `y2`. Output share 0 is valid
  once every AND gadget of its domain is valid. That happens at the largest
  delay among the `y` shares that are 1 (noEE), or at 0 when `x0 = 0`
  (plain). The testbench checks this time for all 512 vectors. The mean,
  taken per unmasked `y`, is 4.75 against 5.5 for the plain gadget and 9.5
  against 11 for noEE. A probe on one share still tells `y` apart: more
  shares do not help.
* **`tb_lmdpl_timing`.** Every input of the LMDPL operation layer gets its own
  delay. The rise of `z1.t` (or `z1.f`) always comes at the delay of the one
  AND gate that fires. Its mean over the four sharings of each (x, y) is the
  same for all (x, y).
* **`tb_sesym_chi_delayed`.** The whole chi circuit runs unbalanced, with
  plain and with noEE gadgets. For each input row, the tb averages the summed
  switching times of the ten outputs over random sharings. The average varies
  with the unmasked row. The balanced circuit switches at once for every row.
  This is only an indication in the logic domain. No power model is involved,
  and the per-row means are taken over 100 random sharings each.

## Files and simulation

`rtl/` holds one module or package per file. `drp_pkg.sv` must be compiled
first. Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.
`tb_glitch_free_masking_top` runs the top at its default parameters. It does
400 operations of each scheme concurrently, predicts every mask with an
independent LFSR model, checks each share and latency, and counts that every
mechanism occurred: seeding, mask advance, evaluation ended by the completion
detector, pre-charge, held result, LMDPL load/evaluate/pre-charge, and
ignored start.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/drp_pkg.sv tb/tb_glitch_free_masking_top.sv --top-module tb_glitch_free_masking_top
./obj_dir/Vtb_glitch_free_masking_top
```

Replace the testbench name to run any other testbench. The timing testbenches
need `--timing` for the delays.

## Departures and limits

* No AES S-box is included. The two S-box case studies that motivate the
  schemes (a Canright S-box with 18 fresh mask bits, and an LMDPL S-box) are
  not specified at gate level. The LMDPL part is therefore one non-linear and
  one linear gadget, and the SESYM part is the 5-bit chi.
* The inside of the linear LMDPL gadget is not drawn in detail. Each share is
  processed on its own here, with a WDDL XOR on the dual-rail side.
* SESYM's self-timed pre-charge loop is clocked here (see *Controller*).
* The way the register stage of LMDPL is pre-charged is a choice of this
  implementation.
* The input register of the SESYM circuit, the extra `all_null` output of the
  completion detector and the reset of the C-elements are additions of this
  implementation.
* Side-channel behaviour beyond switching times is not modelled. This covers
  power, glitch energy and placement.
