# Scan-based logic BIST with substitute test vectors

At-speed logic BIST with launch-on-capture (LOC) clocking loads a
pseudorandom vector into the scan chains and then launches it into the logic
under test. At the launch about half of all scan flip-flop outputs toggle.
The resulting supply droop slows the logic, and the BIST can then report a
delay fault in a good chip. This design lowers that switching without
changing the LBIST architecture. After an original vector `T(i-1)`, it loads
`N` *substitute test (ST) vectors* whose bits move monotonically towards the
next original vector `T(i+N)`. In the whole group, each scan flip-flop output
toggles at most once, where a plain LBIST lets it toggle up to `N+1` times.
Vector-to-vector activity therefore drops to about `1/(N+1)` of the plain
LBIST's: 50 % less for `N = 1` and 89 % less for `N = 8`.

The RTL is SystemVerilog (IEEE 1800-2017). It simulates with Verilator 5 and
elaborates with the slang front end of Yosys.

## The substitute-vector rule

Number the vectors that the LFSR and phase shifter produce `T0, T1, T2, …`.
They are used in groups of `N+1`: each group applies one original vector and
then `N` ST vectors in place of the next `N` originals:

```
T(i-1) | ST(i) ST(i+1) … ST(i+N-1) | T(i+N) | ST … 
```

For the bit of chain `m` at scan position `j`:

* If `T(i-1)[m][j] == T(i+N)[m][j]`, every ST vector of the group holds that
  value, so the bit does not toggle at all.
* Otherwise every ST vector of the group holds one random bit `R`. The bit
  then toggles exactly once: either on entering the group or on leaving it.

`R` is the bit that the first replaced vector `T(i)` has at that position. It
is pseudorandom, and it stays the same through the group. If `R` changed from
one ST vector to the next, a differing bit could toggle several times, and the
reduction would stay at 50 % whatever `N` is.

The number of vectors applied is unchanged: ST vectors take the capture
phases that the replaced originals would have used.

## Where the past and future bits come from

An ST bit needs, *while it is being shifted in*, the bit of `T(i-1)` at the
same position and the bit of `T(i+N)` at the same position. Two facts provide
them:

* Every chain takes one phase-shifter bit per shift clock, and a vector is
  `LEN` shift clocks long. So the bit of the vector `k` places away is the
  same phase-shifter output `k·LEN` shift clocks earlier or later.
* The LFSR and the phase shifter are linear over GF(2), and the LFSR step can
  be inverted. So any past or future value of an output is a fixed XOR of the
  *present* LFSR bits.

`phase_shifter` therefore has three extra sets of XOR outputs next to the
normal outputs `o`. For each group offset `q = 0 … N-1` it gives:

| output      | value               | meaning |
|-------------|---------------------|---------|
| `prev[q][m]`| `O_m(ξ-(q+1)·LEN)`  | bit of `T(i-1)` |
| `next[q][m]`| `O_m(ξ+(N-q)·LEN)`  | bit of `T(i+N)` |
| `orig[q][m]`| `O_m(ξ-q·LEN)`      | bit of `T(i)`, used as `R` |

The tap rows are computed at elaboration by `lbist_pkg::ps_shift_row`, which
steps unit vectors forwards or backwards through the LFSR. Changing the
polynomial, the phase-shifter matrix or `LEN` recomputes them. Hardware cost:
about `3·N·S` XOR trees of at most `W` inputs each.

Per chain, `st_generator` is built from four multiplexers and an XOR:

* `M3 = prev[q]` and `M4 = next[q]`: `q` selects among the `N` candidates (the
  `log2 N` select lines).
* `sel = M3 ^ M4`.
* `M1 = sel ? R : M4`.
* `M2 = int1 ? M1 : o[m]`.

`M2` drives the chain's scan input. `int1` and `q` come from the controller
and stay constant for a whole shift phase.

## Scan flip-flop and LOC clocking

`scan_ff` is a latch-level scan cell with two master-slave pairs:

* **Scan portion.** `LA` is transparent to `scan_in` while `shift_ck` is high,
  and to `data_out` while `capture` is high. `LB` follows `LA` while
  `shift_ck` is low, and its output is `scan_out`.
* **System portion.** `PH2` follows `data_in` while `ck` is low. `PH1` follows
  `LB` while `update` is high, and `PH2` while `ck` is high. Its output is
  `data_out`.

`bist_controller` runs on a master clock `clk`. Every scan pulse is exactly
one `clk` cycle wide and comes straight from a flip-flop:

```
shift phase (se=1), LEN times:  shift_ck=1 | shift_ck=0     (LFSR steps at the end of the low cycle,
                                                             MISR samples at the end of the high cycle)
capture phase (se=0):           idle | update | idle | ck | idle | capture | idle
```

* `update` is the launch: the shifted-in vector appears at `data_out`.
* `ck` takes the response of the logic under test into `PH2`/`PH1`.
* `capture` copies it into `LA`. `LB` is open while `shift_ck` is low, so the
  response already shows at `scan_out`, and it leaves the chain during the
  next shift phase.

`data_out` does not move during a shift phase.

Latches and the loop `LA → LB → PH1 → LA` make tools report latches and a
combinational loop. This is the structure of the cell. The loop is never
transparent end to end, because the three pulses that would open it are never
high together. The controller asserts that `shift_ck`, `update`, `ck` and
`capture` never overlap.

**Activity in this cell.** `PH1` takes the response at `ck`, so during a shift
phase the cell holds the *captured response*. At `update`, its output
therefore changes from that response to the new vector. The ST rule bounds the
vector-to-vector changes, which is the quantity the scheme targets. The change
from response to vector is not bounded by the rule. The end-to-end testbenches
print both counts: at the defaults, 136 vector-to-vector toggles and 271
response-to-vector toggles at launch over 16 vectors.

## A BIST run

1. Pulse `start` for one clock. That clock reseeds the LFSR and clears the
   MISR and the verdict.
2. Shift phase 0 loads `T0`. The MISR does not sample, because the chains held
   no response yet.
3. Each of the `NV` vectors gets a capture phase. The shift phase after it
   unloads the response into the MISR through the space compactor, while the
   next vector (original or ST) goes in.
4. After the `NV`-th capture, a last shift phase unloads the final response.
5. `check` has `tra` compare the signature with `golden_sig`. Then `done`
   rises, `pass` shows the verdict and `signature` the MISR contents.

`done` rises `NV·(2·LEN+7) + 2·LEN + 2` clock cycles after the cycle in which
`start` was taken: 216 cycles at the defaults.

## Blocks

| file | block |
|------|-------|
| `rtl/lbist_pkg.sv` | default sizes, polynomials, phase-shifter matrix, GF(2) helper functions |
| `rtl/lfsr.sv` | 4-bit Fibonacci LFSR, x⁴+x³+1, seed 0001 |
| `rtl/phase_shifter.sv` | 12-output XOR network plus the past/future outputs |
| `rtl/st_generator.sv` | per-chain ST logic (M1–M4, XOR) |
| `rtl/scan_ff.sv` | latch-based scan flip-flop |
| `rtl/scan_chain.sv` | `LEN` scan flip-flops; scan-in enters SFFn, scan-out leaves SFF1 |
| `rtl/space_compactor.sv` | XOR of chains `m ≡ k (mod 4)` onto MISR input `k` |
| `rtl/misr.sv` | 4-bit internal-XOR MISR, x⁴+x+1 |
| `rtl/tra.sv` | signature comparison, pass/fail |
| `rtl/bist_controller.sv` | phase sequencing, vector count, `int1`/`q` |
| `rtl/lbist_top.sv` | the whole LBIST |

The combinational logic of the circuit under test is not part of the design.
`lbist_top` connects to it through two ports:

* `cut_data_out[m][j]`: output of scan flip-flop SFF(j+1) of chain m+1, an
  input of the logic.
* `cut_data_in[m][j]`: the logic's output captured back into the same flip-flop.

`tb/cut_comb_model.sv` is a small behavioural stand-in used by the testbenches.

### Parameters (`lbist_top`)

| name | default | meaning |
|------|---------|---------|
| `S` | 12 | scan chains = phase-shifter outputs |
| `LEN` | 3 | scan flip-flops per chain (shift clocks per vector) |
| `N` | 1 | ST vectors per original vector (2, 4, 8 give 67 %, 80 %, 89 %) |
| `NV` | 16 | vectors applied per run |
| `W` | 4 | LFSR bits |
| `MW` | 4 | MISR bits = space-compactor outputs |
| `TAPS`, `SEED` | `4'b1100`, `4'b0001` | LFSR polynomial and seed |
| `POLY` | `4'b0011` | MISR polynomial |
| `PS` | `lbist_pkg::PS_MATRIX` | phase-shifter rows, `S × W` |

The phase-shifter matrix is only given for 12 outputs and 4 LFSR bits. A
different `S` or `W` needs a new `PS` (and `TAPS`). `N`, `LEN` and `NV` can
be changed freely.

The default network (`X_k` is LFSR bit `k`):

| output | XOR of | output | XOR of |
|--------|--------|--------|--------|
| O1 | X1 X3 | O7  | X2 X3 |
| O2 | X1 | O8  | X3 |
| O3 | X1 X2 X3 X4 | O9  | X1 X4 |
| O4 | X1 X2 | O10 | X3 X4 |
| O5 | X2 | O11 | X4 |
| O6 | X1 X3 X4 | O12 | X2 X4 |

## What follows the source design and what is chosen here

These follow the source design:

* the LBIST architecture;
* the LOC pulse order update → ck → capture;
* the scan-cell latch wiring;
* the per-chain multiplexer structure;
* the 4-bit LFSR feeding 12 chains with vectors 3 shift clocks apart;
* the ST rule for bits that agree or differ;
* the scalable family of `N`.

The source design does not give the following; they are this design's
choices:

* **Polynomials, widths and run size.** The LFSR and MISR polynomials, the
  seed, the MISR width, the compactor grouping and the number of vectors per
  run.
* **Phase-shifter rows O1 and O12.** They are set to X1⊕X3 and X2⊕X4, two
  combinations no other output uses, so that all 12 outputs differ.
* **Past and future outputs.** They are derived from the polynomial rather
  than taken from a table.
* **The random bit `R`.** Its source (`T(i)`) and the fact that it stays
  constant over the group.
* **Timing and handshake.** The one-cycle pulse widths and idle cycles, the
  start/busy/done handshake and the expected signature given as an input.
* **Chain lengths.** All chains have the same length.
* **The extra update pulse.** The source's timing also shows an update pulse
  where the next shift phase begins. It is left out, because at that moment
  it would copy into `PH1` the response that `PH1` already holds.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lbist_pkg.sv tb/lbist_top_tb.sv --top-module lbist_top_tb -o sim
./obj_dir/sim
```

Testbenches:

* **Unit testbenches.** `tb/<block>_tb.sv` for each block of the table above.
* **`tb/lbist_top_tb.sv`**, at the default sizes. An independent reference
  model recomputes the original and ST vectors, the responses and the MISR
  signature. Every launched vector is checked at the scan flip-flop outputs,
  and each ST group must toggle every bit at most once. The testbench makes
  three runs: fault-free (must pass, with the exact cycle count), with a
  stuck-at-1 fault in the logic model (must fail) and with a wrong expected
  signature (must fail).
* **`tb/lbist_top_scal_tb.sv`**, the same checks for `N = 2, 4, 8`, side by
  side (`tb/lbist_top_check.sv`).

Measured vector-to-vector toggles of the scan flip-flop outputs, against the
original vector sequence:

| N | LEN | vectors | with ST | original | reduction | ideal `1-1/(N+1)` |
|---|-----|---------|---------|----------|-----------|-------------------|
| 1 | 3 | 16 | 136 | 270  | 49 % | 50 % |
| 2 | 3 | 24 | 133 | 401  | 66 % | 67 % |
| 4 | 5 | 40 | 227 | 1117 | 79 % | 80 % |
| 8 | 3 | 45 | 79  | 689  | 88 % | 89 % |

Fault coverage and the number of vectors needed for a coverage target depend
on the real circuit under test and are not evaluated here.
