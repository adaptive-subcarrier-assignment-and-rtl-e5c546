# DPG accelerator for multiuser OFDM subcarrier and bit allocation

In a downlink OFDM system with K users and N subcarriers, the base station must
choose which user gets each subcarrier and how many bits (0 to M) it carries on
it. The goal is to meet every user's rate R_k at the lowest total transmit power.
Sending c bits to user k on subcarrier n costs f(c)/α²_{k,n}, where
f(c) = B(2^c − 1) and B = (N0/3)·[Q⁻¹(Pe/4)]² sets the bit-error rate.

That integer problem is hard. This RTL solves its continuous relaxation in
hardware: ρ_{k,n} ∈ [0,1] is the share of subcarrier n given to user k, and
r_{k,n} ∈ [0, M·ρ_{k,n}] is the rate. A term σ/2·ρ² is added so the problem is
strictly convex. The solver maximises the dual by gradient ascent with a constant
step. It uses two sets of multipliers:

* λr_k, one per user rate constraint Σ_n r_{k,n} = R_k;
* λρ_n, one per subcarrier constraint Σ_k ρ_{k,n} = 1.

σ is lowered geometrically (σ ← η·σ), which brings the relaxed solution closer to
the integer one. The result that matters is which ρ̂_{k,n} end up nonzero: they
give the candidate subcarrier assignments that a later, software stage refines
into an actual allocation. That software stage is not part of this RTL.

## The iteration

For each σ step j (j_max of them) and each dual iteration t (t_max of them), the
users k = 1..K are visited one per clock. In that clock every subcarrier n
computes in parallel:

1. **PE1**, the unconstrained minimiser of the (k,n) Lagrangian term:
   `x = log2(λr·α²/(B ln2))`,
   `ρ̃ = (−λρ − λr/ln2 + B/α² + λr·x) / σ`,
   `r̃ = ρ̃·x`.
2. **PE2**, the Euclidean projection of (r̃, ρ̃) onto the triangle
   0 ≤ ρ ≤ 1, 0 ≤ r ≤ Mρ (see below).
3. **PE6**, a running sum Σ_{l≤k} ρ̂_{l,n} − 1, kept in a "type-3" register. This
   register reads −1 whenever k = 1, so no clock is spent clearing it.

One shared unit per design then works on user k:

4. **PE4**, an adder tree of ⌈log2(N+1)⌉ levels: `g_k = R_k − Σ_n r̂_{k,n}`.
5. **PE5**: `λr_k += β·g_k`, written back to bank k of the λr register.

Update rules:

* On the last user (k = K), every array's **PE3** performs `λρ_n += β·(Σ_k ρ̂_{k,n} − 1)`.
* On the last user of the last t, **PE7** lowers σ.
* When the last j finishes, `done` rises and the output buffer lets the host read
  r̂_{k,n}, ρ̂_{k,n} and a support bit.

The loop counters (`dpg_counters`) run k every clock, t every K clocks and j every
K·t_max clocks. A solve therefore takes exactly K·t_max·j_max busy clocks plus one
clock for `done`.

### Timing estimate

The circuit is one long combinational path per clock: PE1 → PE2 → PE4 → PE5 (and
PE7), plus a register write and read. Using 1.0 ns per 16×16 multiply, 1.2 ns per
ROM read and 0.2 ns per add (a 90 nm estimate), the path takes
6.6 + 2.2 + 1.6 + 1.2 + 1.0 + 0.4 = 13 ns. That gives these solve times:

| K  | t_max·j_max | clocks  | time at 13 ns |
|----|-------------|---------|---------------|
| 2  | 8 000       | 16 000  | 0.21 ms       |
| 4  | 10 000      | 40 000  | 0.52 ms       |
| 8  | 12 000      | 96 000  | 1.25 ms       |
| 16 | 15 000      | 240 000 | 3.12 ms       |
| 32 | 18 000      | 576 000 | 7.49 ms       |

The RTL is not pipelined and does not try to meet any particular period. The
period is whatever synthesis achieves for that path.

## The projection (PE2)

Let s = M·r̃ + ρ̃. PE2 checks the regions in the order below and takes the first
one that matches. This order gives the exact nearest point of the triangle.

| case (`prj_case_e`) | condition                   | result                              |
|---------------------|-----------------------------|-------------------------------------|
| `PRJ_INSIDE`        | 0 ≤ ρ̃ ≤ 1 and 0 ≤ r̃ ≤ Mρ̃    | (r̃, ρ̃)                              |
| `PRJ_LEFT`          | 0 ≤ ρ̃ ≤ 1, r̃ < 0            | (0, ρ̃)                              |
| `PRJ_TOP`           | ρ̃ > 1, 0 ≤ r̃ ≤ M            | (r̃, 1)                              |
| `PRJ_VTX_01`        | ρ̃ > 1, r̃ < 0                | (0, 1)                              |
| `PRJ_VTX_00`        | ρ̃ < 0, s < 0                | (0, 0)                              |
| `PRJ_VTX_M1`        | s > M² + 1                  | (M, 1)                              |
| `PRJ_DIAG`          | otherwise                   | (M·s, s)/(M² + 1), each rounded     |

The division by M² + 1 is a multiplication by a rounded 16-bit reciprocal. On the
diagonal, r̂ may exceed M·ρ̂ by less than M/2 LSB because both coordinates are
rounded separately.

## Number format

Every value is a 16-bit two's-complement fixed-point number with 6 fraction bits
(`dpg_pkg::fx_t`): the range is ±512 and one LSB is 1/64.

* Products are formed at full width, shifted down with rounding toward −∞, and
  saturated to 16 bits when they are written back.
* The logarithm in PE1 combines a leading-one detector with a 64-entry table of
  round(64·log2(1 + m/64)). The table is computed at elaboration by an integer
  routine (`log2_frac`), so there is no data file.
* σ is stored as its reciprocal. PE7 multiplies 1/σ by 1/η, so PE1 multiplies
  instead of divides.
* The constants B, 1/(B ln2) and 1/ln2 are parameters `CB`, `CU`, `CL`, in LSBs.
  The defaults (351, 17, 92) are for Pe = 10⁻⁴ with N0 = 1. Change them to
  target another error rate.

The 16-bit word matches the multipliers the timing estimate assumes. Six fraction
bits are this design's choice: they keep multipliers of a few hundred in range
while ρ still has a resolution of 1/64.

## Using it

Parameters of `dpg_top` (defaults in brackets):

* `N` [128]: subcarriers, one PE array each.
* `K` [32]: user register banks.
* `M` [6]: bits per symbol at most.
* `CB`, `CU`, `CL`: the constants above.
* `TMAX_RESET` [1500], `JMAX_RESET` [12]: reset values of t_max and j_max.
  Their product of 18 000 is the iteration budget for 32 users.

While idle, load the constants through the write port. `cfg_sel` chooses the
register (`dpg_pkg::cfg_sel_e`):

| sel | register             | addressed by         | reset |
|-----|----------------------|----------------------|-------|
| 0   | α²_{k,n}             | cfg_k, cfg_n         | 0     |
| 1   | 1/α²_{k,n}           | cfg_k, cfg_n         | 0     |
| 2   | R_k (bits, fx_t)     | cfg_k                | 0     |
| 3   | β                    | –                    | 0.5   |
| 4   | 1/η                  | –                    | 2.0   |
| 5   | t_max (integer)      | –                    | 1500  |
| 6   | j_max (integer)      | –                    | 12    |
| 7   | active users (≤ K)   | –                    | K     |

After loading, pulse `start` for one clock. The start restores the initial state
(λ = 0, 1/σ = 1, empty support mask), then `busy` stays high for
users·t_max·j_max clocks. Once `done` is high, drive `rd_en` with `rd_k` and
`rd_n`; one clock later `rd_valid` comes back with:

* `rd_r` = r̂_{k,n} and `rd_rho` = ρ̂_{k,n} from the final iteration;
* `rd_sup`, set if ρ̂_{k,n} was nonzero at the end of any σ step.

Reads before `done` are refused. Assertions check that the port is written only
while idle and that k stays in range.

### Simulating

Each `tb/tb_<module>.sv` is a self-checking test that prints
`TB_RESULT checks=… failures=…`. `tb_dpg_model_pkg.sv` is a bit-exact integer
model of the whole solve, written separately from the RTL. The end-to-end tests
compare every output against it.

* `tb_dpg_top` is the reduced run: N = 16, K = 4, t_max = 100, j_max = 4. It also
  requires that each mechanism happens at least once: all seven projection cases,
  the λρ and σ updates, the −1 reset and support-mask set.
* `tb_dpg_top_full` runs the default size: 128 × 32, 576 000 clocks. Building it
  takes about 3 minutes; the run takes about 20 s.

```
verilator --binary --timing --assert -Irtl rtl/dpg_pkg.sv tb/tb_dpg_model_pkg.sv \
  $(ls rtl/*.sv | grep -v dpg_pkg) tb/tb_dpg_top.sv --top-module tb_dpg_top -o sim
./obj_dir/sim
```

Unit tests need only the package and their module: `dpg_pe1` also needs
`dpg_log2`, and `dpg_pe_array` needs its PEs and registers.

## How far to trust it

* **The hardware matches the model.** Every r̂, ρ̂, support bit, λρ and the final
  1/σ are bit-exact against the model at both sizes, and the cycle count is exact.
  PE1 and PE2 are also checked against real-valued formulas: PE1 within an error
  budget for the floor roundings, PE2 within 1 LSB of the true nearest point.
* **The sign in ρ̃ is this design's reading.** The formula for ρ̃ is solved from
  the stationarity condition of the Lagrangian term, so raising λρ_n lowers ρ̃.
  The form in which it is often printed has the opposite sign on λρ and on the
  bracket, and with that sign the ascent diverges.
* **The fixed-point iteration does not converge reliably.**
  * β = 0.5 makes it oscillate. The reduced test uses β = 1/64, the smallest value
    the format can hold, with η = 0.8.
  * At full size (32 users, rates of 4 bits per subcarrier on average), the
    multipliers reach the 16-bit limits. Most ρ̃ then land in the (0,1) corner,
    and Σ_k ρ̂_{k,n} is far from 1.
  * The hardware still does what the model does. But a useful full-size solve
    needs a smaller step, and therefore more fraction bits (widen `FW` and the
    constants).
* **Not specified, so chosen here:** the reset value of η, the split of the
  18 000-iteration budget into t_max and j_max, the support mask, the
  configuration bus and the read port.
* **Tool warning that remains:** Verilator reports the 8-bit k/n indices as
  wider than small arrays need. Every such access is range-checked first.

## Files

* `rtl/dpg_pkg.sv`: types, configuration bus, arithmetic helpers.
* `rtl/dpg_top.sv`: the accelerator.
* `rtl/dpg_pe_array.sv`: per-subcarrier array containing `dpg_pe1` (with
  `dpg_log2`), `dpg_pe2`, `dpg_pe3`, `dpg_pe6`, `dpg_reg_t3`, `dpg_reg_t1`,
  `dpg_reg_bank` and `dpg_support_mask`.
* Shared units: `dpg_pe4`, `dpg_pe5`, `dpg_pe7`, `dpg_counters`, `dpg_out_buffer`.
