# Binary modular inverter for prime fields (256-bit default)

Elliptic-curve arithmetic in affine coordinates needs a field division for
every point addition and doubling (the slope λ = Δy/Δx), and even projective
coordinates need one inversion at the end of a scalar multiplication. This
design computes that inversion, `r = a⁻¹ mod p` for an odd prime `p` of up to
`N` bits, with the *binary* extended Euclidean algorithm: nothing but shifts,
additions, subtractions and comparisons, no multiplier. It is written as a
small finite-state machine driving a datapath, and for `N = 256` it finishes
in about 1.25·N clocks on average (319 clocks for random elements of the NIST
P-256 field, never more than 2N+1).

## The algorithm

Four values are kept: `u`, `v`, `x`, `y`, starting from `u = a`, `v = p`,
`x = 1`, `y = 0`. Throughout, two invariants hold:

    a·x ≡ u (mod p)        a·y ≡ v (mod p)

and `gcd(u, v) = gcd(a, p) = 1`. Every step below keeps the invariants and
makes `u` or `v` smaller, until one of them is 1; then `x` (if `u = 1`) or
`y` (if `v = 1`) is the inverse.

* **Halving.** If `u` is even, `u ← u/2` and `x ← x/2 mod p`. Division by two
  modulo an odd `p` is `x/2` when `x` is even and `(x+p)/2` when `x` is odd.
  The same applies to `v` and `y`. Since `gcd(u, v) = 1`, `u` and `v` are
  never both even.
* **Subtraction.** If `u ≥ v`, `u ← u − v` and `x ← x − y mod p`, computed
  as `x − y` when `x > y` and `x + p − y` otherwise. Else `v ← v − u` and
  `y ← y − x mod p` in the same way.

`x` and `y` stay in `[0, p]` (the value `p` itself appears only when
`x = y` at a subtraction), so `x + p` is below `2^(N+1)`: every register is
`N+2` bits wide, and a single conditional subtraction of `p` is enough to
bring the final result into `[0, p−1]`.

## From flow chart to one clock per loop pass

The algorithm is naturally described as a flow chart with one state per
operation: test `u = 1`, then a *parallel* section (the PSM, "parallel state
machine") with one branch that checks `u`'s parity, halves `u`, and halves
`x` one way or the other, and a mirror branch for `v` and `y`; then a
compare-and-subtract section that picks `u ≥ v` or `u < v` and updates `x`
or `y` with or without adding `p`. Drawn that way the loop body is seventeen
states (S3 … S19) and a pass would take about eight clocks, some 2500 clocks
for a 256-bit inversion.

This design executes the **whole loop body in one clock**. Each branch of the
flow chart is turned into a multiplexer choice rather than a state:

| flow-chart states | here |
|---|---|
| S3–S7 (u/x branch of the PSM) | `mod_half` instance `u_branch` in `psm` |
| S8–S12 (v/y branch of the PSM) | `mod_half` instance `v_branch` in `psm` |
| S13–S19 (compare and subtract) | `uv_sub` |
| S2 (loop test) plus the above | controller state `S2`, one pass per clock |

The chain per clock is therefore: registers → parallel halving (`psm`) →
compare-and-subtract (`uv_sub`) → registers. The halving results are separate
signals from the registers, so the two parallel branches never write the
same variable. Each pass halves `u` or `v` at most once, as in the flow chart
(the chart has no inner loop back to the parity test); the outer loop repeats
the halving when needed. Measured over random operands:

| modulus | n | average clocks | max seen | 2n+1 | 1.33n+10 |
|---|---|---|---|---|---|
| NIST P-256 | 256 | 319 | 354 | 513 | 350 |
| secp256k1 | 256 | 320 | 349 | 513 | 350 |
| 2^255 − 19 | 255 | 319 | 359 | 511 | 349 |
| NIST P-224 (N = 256 build) | 224 | 280 | 322 | 449 | 307 |
| NIST P-224 (N = 224 build) | 224 | 281 | 305 | 449 | 307 |

The price of this folding is a long combinational path: a 258-bit adder in the
halving stage, then a 258-bit comparator and two subtractors in series. If a
faster clock matters more than the clock count, the register boundary can be
moved between `psm` and `uv_sub` (two clocks per pass).

## Controller (`inv_ctrl`)

| state | work | next |
|---|---|---|
| S0 | idle | S1 when `go` |
| S1 | load `u=a, v=p, x=1, y=0`, capture `p`; clear `sig_inv` | S2 |
| S2 | if `u = 1` or `v = 1`: leave; else one loop pass | S20 on exit, else S2 |
| S20 | set `sig_inv` | S21 if `u = 1`, else S22 |
| S21 | `r ← x mod p`; clear `sig_inv` | S0 |
| S22 | `r ← y mod p`; clear `sig_inv` | S0 |

`sig_inv` and `done` are registers written as a state is left, so `sig_inv`
is high during S21/S22 (the final reduction) and `done` pulses in the clock
after it, when `r` holds the result. The controller's outputs `load`, `iter`,
`store_r` and `sel_y` steer the datapath in the current clock.

## Datapath (`inv_datapath`)

Registers `u`, `v`, `x`, `y`, `p` (each `N+2` bits) and `r` (`N` bits).
Priority on a clock edge: reset, `load`, `iter` (one loop pass), `store_r`.
The final reduction is `mod_add` with its second operand tied to zero: it
subtracts `p` once if its input is `p` or more. For a valid input the value
reduced is never `p` (that would mean `a·p ≡ 1`), so it normally passes
through; it is kept so that `r` is guaranteed to lie in `[0, p−1]`.
Assertions check that `x, y ≤ p` and `u, v ≠ 0` on every loop pass.

## Using `fp_inv`

```
fp_inv #(.N(256)) inv (
  .clk, .rst,             // synchronous, active-high reset
  .go,                    // start; accepted when busy is low
  .a, .p,                 // N bits each; p odd, 1 <= a < p, gcd(a, p) = 1
  .r,                     // result, valid from the done pulse until the next one
  .done,                  // one-clock pulse
  .sig_inv,               // high during the final reduction
  .busy,                  // high from the clock after go until done
  .state,                 // controller state (inv_pkg::inv_state_t), status only
  .step                   // what the current loop pass does (inv_pkg::inv_step_t), status only
);
```

Raise `go` for one clock while `busy` is low. `a` and `p` are sampled on the
clock edge that ends S1, one clock after `go` is seen, so hold them until
`busy` has been high for a clock (or simply until `done`). The latency from
the clock that samples `go` to the `done` pulse is `k + 4` clocks for `k`
loop passes. A new `go` may be given in the clock of `done`.

Inputs outside the contract are not detected: `a = 0` or a `p` sharing a
factor with `a` never reaches `u = 1` or `v = 1`, and the unit stays busy
until reset.

`N` is the only parameter (default 256). Any `N` of a few bits or more works;
the moduli may be shorter than `N` (a 224-bit prime in the 256-bit build, or
`p = 17`).

## Files

| file | contents |
|---|---|
| `rtl/inv_pkg.sv` | state enum, loop-pass status struct, `N_DEFAULT`, the P-256 prime |
| `rtl/fp_inv.sv` | top: controller plus datapath |
| `rtl/inv_ctrl.sv` | controller FSM |
| `rtl/inv_datapath.sv` | registers, loop pass, final reduction |
| `rtl/psm.sv` | parallel halving of u/x and v/y |
| `rtl/mod_half.sv` | one halving branch |
| `rtl/uv_sub.sv` | compare and subtract |
| `rtl/mod_add.sv` | modular adder, used as the final reduction |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fp_inv_n224` |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a time limit. The expected values are computed independently of the
RTL:

* `tb_mod_add`, `tb_mod_half`, `tb_psm`, `tb_uv_sub`: random operands at
  18 bits, checked with 64-bit modular arithmetic (`(a+b) mod p`,
  `2·t' ≡ t`, `x' + y ≡ x`), plus full-width edge cases for `mod_add`.
* `tb_inv_ctrl`: state sequence and every control output, both exits,
  back-to-back operations, `sig_inv` and `done` timing.
* `tb_inv_datapath` (N = 16): the invariants `a·x ≡ u`, `a·y ≡ v` after every
  clock, and `a·r ≡ 1` for 300 random 16-bit primes, including 13⁻¹ mod 17 = 4.
* `tb_fp_inv` (N = 256, default parameters): 244 inversions modulo P-256,
  P-224, secp256k1, 2^255−19 and 17, each checked as `a·r mod p = 1` with
  512-bit arithmetic; latency within 2n+1, average within 1.33n+10; every
  path of the loop body, both exits, idle gaps and back-to-back starts are
  counted and must occur. It runs in well under a second.
* `tb_fp_inv_n224`: the N = 224 build with the P-224 prime.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/inv_pkg.sv tb/tb_fp_inv.sv \
          --top-module tb_fp_inv -o sim
./obj_dir/sim
```

(`-Wall` reports only unused-signal and unused-parameter warnings.)

## Where this design departs from its source description

* **One clock per loop pass** (see above) instead of one clock per
  flow-chart state. The source itself notes that synthesis shrinks its
  23-state chart to about ten states and quotes a latency of at most 2n+1
  and on average 1.33n+10 clocks, which only a folded loop body can reach.
* **Loop exit on `u = 1` or `v = 1`.** The flow chart labels only `u = 1` at
  the loop test but branches on both afterwards; the algorithm and the prose
  test both, and so does this design.
* **One halving per pass.** The algorithm text halves `u` "while" it is even;
  the flow chart halves once per pass. This design follows the chart; the
  latency above is measured with it.
* **`sig_inv` cleared in S1**, together with the load, as the chart shows
  (the prose places it in S2).
* **Overhead of 4 clocks** (load, the exiting test, S20, the reduction). The
  source mentions about ten extra clocks due to an undescribed pipeline; this
  design has no pipeline.
* **Own choices** where the source is silent: synchronous active-high reset;
  the `done`, `busy`, `state` and `step` outputs; capturing `p` at load; the
  priority of register updates; the inside of the modular adder.
* Not part of this RTL: the elliptic-curve point arithmetic that would use
  the inverter, and any FPGA or standard-cell mapping. Reported results for
  this architecture (about 168 MHz on a Virtex-7 with 1069 slices; 833 MHz
  and 32 K gates in 65 nm) were not reproduced here.
