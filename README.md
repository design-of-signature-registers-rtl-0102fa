# Scan-based on-chip path delay measurement with signature registers

Small-delay defects shift a path's delay by less than the slack left by the
normal clock, so an ordinary at-speed test passes them. One way to catch them
is to measure the real delay of each sensitized path on every chip and flag
chips whose delays fall outside the normal spread. This RTL implements the
on-chip part of such a measurement.

A path is measured by testing it again and again. Each test uses a test clock
width one resolution step shorter than the one before. A path that passes the
first *k* tests and fails the rest has a delay between the *k*-th and the
(*k*+1)-th width. Doing this with plain scan would need a full scan-in and
scan-out per test, and the scan clock is slow. This design saves both:

* **Extra latches** hold the test vector. After one scan-in, every repeat
  reloads the vector into the flip-flops in one clock.
* **Signature registers** (LFSRs) compact the pass/fail sequence of each
  measured path on chip. Only the final signature is shifted out. The tester
  compares it with a small precomputed table of the signatures for "passes
  the first *k* tests", *k* = 0 … *N*.
* **Clusters.** The flip-flops are grouped into clusters. Each cluster has its
  own signature register, so one path per cluster is measured in parallel.
* **Variable clock generator (VCG).** It supplies the fast double pulses
  (launch edge, capture edge) whose spacing is the test clock width.

## Block overview

| module | role |
|---|---|
| `delay_meas_chip` | top: clusters, signature registers, decoder, VCG, clock select |
| `scan_cluster` | `N` measurement scan flip-flops with their latches, one scan segment |
| `meas_scan_ff` | scan flip-flop with modes normal / scan / load-from-latch |
| `vector_latch` | level latch that stores one test-vector bit |
| `signature_register` | reconfigurable LFSR: compact, trace, hold, read-out shift |
| `bcd_decoder` | binary `scj` code → one-hot capture enables `sck` |
| `vcg` | variable clock generator = `pi_clock_gen` + `two_pulse_gen` |
| `two_pulse_gen` | passes exactly two clock pulses per trigger rise |
| `pi_clock_gen` | **behavioural model** of the phase-interpolator clock generator |
| `dm_pkg` | clock generator constants and the period function |

Everything except `pi_clock_gen` is synthesizable. `pi_clock_gen` uses delays
and real arithmetic, so synthesis of `vcg` and `delay_meas_chip` needs a real
clock macro in its place.

## Structure of the chip

```
 sci -> [cluster 0: FF(0,0) .. FF(0,n-1)] -> [cluster 1] -> ... -> [cluster m-1] -> sco
                           |tail                  |tail                |tail
                           v                      v                    v
                        SIG_0 --sgo/sgi-->     SIG_1  --> ... -->   SIG_(m-1) --> sgo
                           ^ sck0                 ^ sck1               ^ sck(m-1)
                           +------ bcd_decoder(scj) -------------------+
 clk = cs ? vcg double pulse : tck      (drives every flip-flop and SIG)
```

Flip-flop `(i, j)` is position `j` of cluster `i`. On the `d`/`q` ports of the
top it is bit `i*CL_SIZE + j`. The last cluster holds `N_FF mod CL_SIZE`
flip-flops, or `CL_SIZE` if that is 0. The `d`/`q` ports connect to the
user's combinational logic, the circuit under test.

### Scan flip-flop modes (`se0`, `se1`)

| se0 | se1 | next q |
|---|---|---|
| 0 | x | `d` (normal capture) |
| 1 | 1 | `si` (scan shift) |
| 1 | 0 | value in the latch (vector reload) |

`lck` high copies every flip-flop into its latch.

## How a measurement runs

The tester changes control lines only while `tck` is low. One stage measures
at most one path per cluster:

1. Scan in the vector (`se0 = se1 = 1`, `cs = 0`), tail bit first. Pulse
   `lck`. Optionally reload and scan out on `sco` to check the latches.
2. Pulse `rst_sig`, set `sge = 1`.
3. For each of the *N* tests, with the width shrinking each time:
   1. reload (`se0 = 1, se1 = 0`, one `tck`);
   2. set `se0 = 0` and `cnt`, set `cs = 1`, raise `trg`. The VCG sends two
      fast pulses: the first launches the transition, the second captures
      the response. Then drop `trg` and return `cs` to 0;
   3. shift (`se0 = se1 = 1`) for as many `tck` clocks as the deepest
      measured flip-flop needs. A response in position `j` reaches the
      signature register on shift clock `CL_SIZE - j`. On each clock, `scj`
      names the one register that samples (`scj = 0`: none).
4. Read out: `sge = 0`, `sgs = 1`, `M*SIG_WIDTH` clocks of `tck`. `sgo`
   shows, before each rising edge, `SIG_(M-1)` bit `W-1` first and `SIG_0`
   bit 0 last.
5. Off chip, look the signature up in the table (next section).

Only one register can sample per shift clock. The paths of a stage must
therefore sit at different depths `CL_SIZE - j` in their clusters. This is
why a `CL_SIZE`-deep cluster with `L` code lines serves `2^L - 1` registers.

**Example (six flip-flops, two clusters).** Stage 0 measures `FF(0,1)` and
`FF(1,2)`. They need 2 shift clocks, with capture sequences `01` on `sck0`
and `10` on `sck1`. Stage 1 measures `FF(0,2)` and `FF(1,0)`. They need 3
clocks, with `100` on `sck0` and `001` on `sck1`. In each sequence, the first
character is the first shift clock.

## Signature register and the signature table

`signature_register` is a Galois LFSR. Stage 0 takes the input, and the last
stage is added (mod 2) into stages 0 and 1. That is the polynomial
x^W + x + 1. The register starts from zero. With W = 3 and five tests, the
table is:

| case | responses #1…#5 | delay lies | sig rising (P=1) | sig falling (P=0) |
|---|---|---|---|---|
| 0 | F F F F F | above width 1 | 000 | 010 |
| 1 | P F F F F | width 2 … width 1 | 011 | 001 |
| 2 | P P F F F | width 3 … width 2 | 101 | 111 |
| 3 | P P P F F | width 4 … width 3 | 100 | 110 |
| 4 | P P P P F | width 5 … width 4 | 110 | 100 |
| 5 | P P P P P | below width 5 | 010 | 000 |

Signatures are written stage 0 first. For a rising transition a pass captures
1; for a falling one a pass captures 0. For other widths or test counts,
compute the table the same way: run the response sequence of each case
through the LFSR. The 4-bit default keeps all six cases of a five-test run
distinct.

Register modes, in priority order:

| shift | sck | sge | action |
|---|---|---|---|
| 1 | x | x | read-out shift, stage 0 ← `sgi` (no feedback, no cluster input) |
| 0 | 1 | 1 | compact `din` (signature mode) |
| 0 | 1 | 0 | shift `din` in raw, no feedback (**tracing mode**) |
| 0 | 0 | x | hold |

`sgo` equals the last stage while `sge = 0` and is 0 while `sge = 1`.

**Tracing mode.** A path that is not single-path sensitizable can pass at a
short width and fail at a longer one (e.g. `P P F P F`). No table entry then
fits. With `sge = 0` the register keeps the last `W` raw responses instead,
and they are read out in the same way.

## Variable clock generator

`two_pulse_gen` samples `trg` through three flip-flops clocked on the
**falling** edge of the generator clock. The clock passes while the first
stage is 1 and the third is still 0. That window is two periods long and
opens and closes while the clock is low, so exactly two whole pulses come out.
`trg` must stay high for at least three generator periods, and it must fall
before the next double pulse.

`pi_clock_gen` is the model of a phase-interpolator generator with these
figures: 1 GHz to 2 GHz output, 5.2 ps steps. Its period is
`1000 ps - 5.2 ps * cnt`, never below 500 ps (`cnt` is 7 bits). The test clock
width, the time between the two rising edges, is one period. The model starts
once its reference clock (`clk_ref`) toggles. Jitter, duty-cycle control and
the step errors of a real interpolator are not modelled.

## Parameters of `delay_meas_chip`

| parameter | default | meaning |
|---|---|---|
| `N_FF` | 9 | flip-flops |
| `CL_SIZE` | 3 | flip-flops per cluster |
| `SCJ_BITS` | 2 | decoder input lines. Requires `ceil(N_FF/CL_SIZE) <= 2^SCJ_BITS - 1` (checked at elaboration) |
| `SIG_WIDTH` | 4 | bits per signature register |

The defaults are the three-cluster example size. No larger reference design
was available to take sizes from.

## Where this RTL makes its own choices

* **`sgs` read-out line (added port).** The decoder can enable only one
  register per clock, but read-out must shift all of them together. Read-out
  must also not mix cluster data into the stream. `sgs` clocks every register
  as a plain shift register fed from `sgi`.
* **Decoder code.** Code 0 means "no capture", and code k+1 enables register
  k, with `scj[0]` as the least significant bit. This follows the
  three-cluster slice table. A plain 2^L-output decoder without an idle code
  would not allow shift clocks on which no register samples.
* **`sck` as a clock enable.** It is not a clock gate. The two are the same
  because `sck` only changes while the clock is low.
* **Resets.** `rst_ff` and `rst_sig` are asynchronous, active high, and clear
  to 0. `rst_ff` also resets the pulse generator. The latches have no reset.
* **Read-out chain order.** `SIG_0`'s `sgi` is tied to 0, and `SIG_(M-1)`
  drives `sgo`.
* **Assertion.** The top asserts that `scj` is 0 on every clock edge while
  `cs = 1`, so no register samples on the double pulse.
* **Clock select** is a plain multiplexer. Switch `cs` only while `tck` is low
  and no double pulse is under way.
* **Latch.** `vector_latch` is a real level-sensitive latch. Inside a cluster,
  Verilator's lint reports "no latch detected" for it; the hold behaviour is
  tested directly.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_signature_register`: the twelve table signatures above (3-bit
  instance), a random compaction run against an independent LFSR model,
  hold, tracing and chained read-out.
* `tb_two_pulse_gen`, `tb_vcg`, `tb_pi_clock_gen`: pulse count, width
  (= period for each `cnt`) and pulse shape.
* `tb_meas_scan_ff`, `tb_vector_latch`, `tb_scan_cluster`, `tb_bcd_decoder`:
  mode tables, scan/latch/reload sequences, decoder table.
* `tb_delay_meas_chip`: the whole chip at default parameters. It models the
  circuit under test as `d[k] = ~q[k]` after a per-flip-flop path delay (a
  continuous-assignment delay), and measures six paths in two stages of five
  tests (1000 ps down to 792 ps in 52 ps steps). It checks every response
  and every double-pulse width. Each retrieved signature must name the delay
  interval of the modelled path; all six cases occur. It also runs tracing
  mode with a non-monotonic width sequence and checks the latches through
  `sco`.
* `tb_fig_examples`: the six-flip-flop, two-cluster example with 3-bit
  registers. It checks the capture sequences (`01`/`10`, `100`/`001`) and
  the signatures against the table above.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/dm_pkg.sv tb/tb_delay_meas_chip.sv --top-module tb_delay_meas_chip
./obj_dir/Vtb_delay_meas_chip
```

Zero-delay simulation cannot show path delays. The delay model belongs to the
testbench: replace `g_cut` in it with your own netlist (with SDF or
`#`-delays) to measure real paths.

## Limits

* The off-chip side is only modelled in the testbenches: sequencing the
  tester, building the signature table, and choosing which paths share a
  stage (test generation for single-path-sensitizable paths).
* `pi_clock_gen` is a model. Absolute widths are bounded by its 500–1000 ps
  range, so a measurement with, say, a 10 ns normal clock and 2 ns steps
  needs a different generator (change the constants in `dm_pkg`).
* Area, measurement time and test data volume of the scheme on real
  benchmark circuits were not reproduced here.
