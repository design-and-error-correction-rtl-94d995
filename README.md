# Fault-tolerant parallel FFTs: parity FFT plus Parseval checks

Communication receivers often run several identical FFTs side by side, for
example one per antenna in MIMO-OFDM. A soft error (a flipped bit in a
register or a RAM) in any of them corrupts that block's spectrum. The usual
fix, triplicating every FFT, costs three times the area. This design uses two
properties of the FFT to protect K parallel FFTs far more cheaply:

* **Linearity.** One extra *parity FFT* transforms the sum of the K inputs.
  Its output is the sum of the K outputs. So any one output can be rebuilt
  from the parity output and the other K - 1 outputs:
  `X1 = X - X2 - X3 - X4`.
* **Parseval's theorem.** A transform scaled by 1/sqrt(N) keeps the energy of
  a block: the sum of squares (SOS) of the inputs equals the SOS of the
  outputs. Two accumulators and a comparator, far smaller than an FFT, detect
  an FFT whose output energy drifts from its input energy.

The Parseval checks say *which* FFT is wrong, and the parity FFT supplies the
*correct* value. Two ways to arrange the checks are built, side by side, in the
top module `ft_parallel_fft`:

| array (port prefix) | checks | extra FFTs | locating the error |
|---|---|---|---|
| parity-SOS (`sos_`) | one per FFT (K = 4 checks) | 1 | the FFT whose own check fails |
| parity-SOS-ECC (`ecc_`) | Hamming-coded groups (3 checks for K = 4) | 1 | the pattern of failing checks |

The second arrangement needs fewer checks: about log2(K) of them instead of K.
It is the cheaper of the two.

## Locating the error with Hamming-coded checks

In the parity-SOS-ECC array, each check compares the energy of a *sum* of
inputs with the energy of the same sum of outputs. The sum is linear, so a
fault-free block passes every check. With four FFTs the three groups are:

| check | input side | output side |
|---|---|---|
| c1 | x1 + x2 + x3 | X1 + X2 + X3 |
| c2 | x1 + x2 + x4 | X1 + X2 + X4 |
| c3 | x1 + x3 + x4 | X1 + X3 + X4 |

An error in one FFT fails exactly the checks whose group contains it. The
syndrome `c1 c2 c3` therefore names the FFT:

| c1 c2 c3 | meaning | action |
|---|---|---|
| 000 | no error | pass everything |
| 111 | FFT 1 | rebuild output 1 |
| 110 | FFT 2 | rebuild output 2 |
| 101 | FFT 3 | rebuild output 3 |
| 011 | FFT 4 | rebuild output 4 |
| 100, 010, 001 | a check itself was hit | `check_error`, pass everything |

For other K the design builds the check matrix at elaboration
(`fft_pkg::check_column`). FFT i gets the i-th R-bit value of weight two or
more, counting down from all ones. R is the smallest number of checks with
2^R - R - 1 >= K. This gives R = 3 for K = 4 and R = 4 for K = 5 to 11.

With one check per FFT, a single failing check names its FFT. More than one
failing check is reported as `uncorrectable`. A hit on a check causes an
unneeded correction, but the result is still correct, because the rebuilt
value equals the true one. An error in the parity FFT is harmless in both
arrays: it is only read when another FFT is being rebuilt.

A Parseval check compares energies, not values, so its verdict is a
threshold decision and not an exact code. A double error in the Hamming array
usually looks like a single one and is miscorrected. For four FFTs every
non-zero pattern is either a column or a single bit, so `uncorrectable` is
always 0 in that array. Likewise `check_error` is always 0 in the
one-check-per-FFT array.

## The Parseval tolerance, and what it can and cannot detect

This is the part that needs the most care when the design is reused.

Each check has two 39-bit accumulators. They are compared when the block
ends: the check fails if `|SOS_in - SOS_out| > TAU * 2^TAU_SHIFT`, counted in
squared output LSBs. `TAU = 1`. The unit `2^TAU_SHIFT`, with
`TAU_SHIFT = 21` (about 2.1e6), is this design's choice, and it is forced by
fixed-point rounding. Each of the five radix-4 passes rounds its results. The
output energy of a clean 1024-point block of random full-scale data therefore
differs from its input energy by about 2^17 to 2^18. A tolerance of one LSB²
would fail every block.

The consequence is that a check only sees errors whose energy stands out
from the signal. An error E added to an output Y changes the energy by
`2*Re(Y*E) + |E|^2`. The cross term has random sign. In practice:

* Upsets of the low bits of a word are not detected. They also barely change
  the output: a bit-b flip adds at most 2^b LSBs to one output word.
* Upsets of bit 12 and above (errors of 4096 LSBs and more) are normally
  detected and corrected.
* The Hamming-coded checks sum three signals, so the cross term is larger.
  They miss more large errors than the one-check-per-FFT array does. A missed
  check also changes the syndrome: for example 110 becomes 100, a "check
  error", and the faulty FFT is not corrected.

The fault-injection testbench `tb_fault_campaign` runs 1024-point blocks, each
with one random single-bit upset. By default it injects 5000 upsets into the
stage RAMs and then 5000 into rotation coefficients (`NINJ`, `NCOEF`). The
results of a run with 10000 of each, which takes about three and a half
minutes:

| array | stage-RAM upsets detected | outputs correct (within 48 LSB) | upsets of bit 11 and above in an original FFT, outputs correct |
|---|---|---|---|
| parity-SOS-ECC | 2358 / 10000 | 8550 / 10000 | 1589 / 1770 |
| parity-SOS | 2012 / 10000 | 8769 / 10000 | 1770 / 1770 |

| array | coefficient upsets detected | located and corrected | outputs correct |
|---|---|---|---|
| parity-SOS-ECC | 2720 / 10000 | 2390 / 10000 | 9657 / 10000 |
| parity-SOS | 2486 / 10000 | 2486 / 10000 | 9691 / 10000 |

A coefficient upset spoils every output that uses the coefficient in that
pass, one output for most coefficients and a quarter of the block for `W^0`.
Every upset that a scheme located was fully corrected. The Hamming-coded
array sometimes sees the error in only some of the groups that contain the
faulty FFT. It then points at the wrong FFT or reports a check error.

The counts are well below the near-total coverage that the scheme's original
description reports for its own tolerance, whose unit it does not state. To
trade false alarms against coverage, change `TAU` or `TAU_SHIFT`. Smaller
blocks have less rounding noise and tolerate a lower threshold.

## The FFT core (`fft_r4`)

The core is an iterative radix-4 decimation-in-frequency FFT that handles one
complex sample per clock. A block of N' = 4^m points (m = `cfg_stages`, 1 to
5, so 4 to 1024 points) goes through three phases:

1. **Load**: N' cycles. Samples are written in natural order into bank 0 of a
   two-bank stage RAM (2 x 1024 words per core).
2. **Transform**: m passes of N' cycles each, 5 x 1024 = 5120 cycles for 1024
   points, plus a 6-cycle pipeline drain. Each pass reads one bank and writes
   the other. Four reads fill a butterfly register. The 4-point butterfly
   runs in one cycle. A single complex multiplier then applies the twiddle
   factor to the four results, one per cycle, while the next four reads are
   issued. Passes overlap without a gap. This is safe because every word a
   pass reads was written by the previous pass at least one cycle earlier
   (checked exhaustively for every size).
3. **Unload**: N' cycles, in natural frequency order, read with base-4
   digit-reversed addresses. Unloading waits for `unload_go`.

The next block can only be loaded after the unload ends, so one block takes
about (m + 2) x N' cycles.

**Scaling.** Each pass scales by 1/2 with rounding. The butterfly has a gain of
4, and the product is shifted by 15 bits: 14 for the twiddle format and 1 for
the 1/2. Results saturate. Over m passes the transform is scaled by
2^-m = 1/sqrt(N'). With this scaling Parseval holds with no correction
factor, and input and output share one LSB. The original FFTs take 12-bit
inputs and produce 14-bit outputs; the growth to 14 bits is headroom. The
parity FFT takes the 14-bit sum of four inputs and works on 16-bit words.

**Twiddle factors** are `W^e = cos(2πe/N) - j sin(2πe/N)`, rounded to 14
fractional bits in 16-bit words, for e = 0 to 3N/4 - 1. They are held in a ROM
that the constant function `gen_twiddles` computes at elaboration, so no
table file is involved. The original design computes them on line for each
stage and keeps them in registers. The ROM is a simpler choice with the same
values. Each coefficient read passes through a register (`tw_q`), and the
injection port can corrupt one coefficient for a whole pass, which is the
effect an upset in a stored coefficient would have.

Against a floating-point DFT, the error per component is at most 8 LSB for
1024 points and 1 to 4 LSB for the smaller sizes.

## Block timing of a protected array (`pfft_system`)

All K + 1 cores run in lockstep from one `in_valid`. Per block:

* **Load.** `in_valid` is high for N' cycles while `in_ready` is high, with
  one sample of every input per cycle. The parity input and the check inputs
  are formed combinationally.
* **Transform.** The output side of each check accumulates the *last-pass
  writes* of the cores, in digit-reversed order, which does not matter for a
  sum. So the verdict is known before anything is read out.
* **Verdict.** `status_valid` pulses m x N' + 9 cycles after the last input
  sample. The syndrome, `err_loc` (1-based, 0 = none), `check_error` and
  `uncorrectable` are then held for the whole output block.
* **Output.** Two cycles after `status_valid`, `out_valid` is high for N'
  cycles. `y_re/y_im` carry all K outputs of bin `out_idx`, with the faulty one
  rebuilt on the fly as `Xi + (X - sum of all Xj)`, saturated to 14 bits.

The adder that forms the parity input, both adders of every check, and the
corrector are each triplicated and followed by a bitwise majority voter
(`tmr_voter`). Only one copy's fault can be outvoted; `tmr_mismatch` reports
any disagreement. A synthesis tool merges identical copies unless they are
marked to be kept, and no such attributes are written here.

**Soft-error injection (test only).** `fi_fft[i]` arms the injection port of
FFT i (i = K is the parity FFT). The word written to address `fi_addr` by
`fi_stage` (0 = load, p = pass p) is XORed with `fi_mask_re/fi_mask_im`.
With `fi_coef` high the upset is in a rotation coefficient instead: while
pass `fi_stage` uses `W^e` with e = `fi_addr`, the coefficient register holds
`W^e` XOR the mask. This models an upset in a stored coefficient that lasts
for one pass. `fi_check` inverts syndrome bits. Tie them all low in use.

## Modules

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | scheme enum; check-matrix and size functions |
| `rtl/fft_r4.sv` | radix-4 DIF FFT core |
| `rtl/parseval_check.sv` | SOS accumulators and tolerance comparison |
| `rtl/comb_adder.sv` | masked sum of K complex streams |
| `rtl/tmr_voter.sv` | bitwise 2-of-3 voter with disagreement flag |
| `rtl/err_correct.sv` | syndrome decoding and output reconstruction |
| `rtl/pfft_system.sv` | one protected array (either scheme) |
| `rtl/ft_parallel_fft.sv` | top: both arrays side by side |

Top parameters: `K = 4` FFTs per array, `LOG4N = 5` (up to 1024 points),
`IN_W = 12`, `OUT_W = 14`, `ACC_W = 39`, `TAU = 1`, `TAU_SHIFT = 21`. The
parity widths (`OUT_W + clog2(K)`) and the number of checks follow from K.
`K = 8`, `K = 11` and `K = 32` (six Hamming-coded checks) are tested with
64-point blocks (`tb_pfft_sizes`). The check masks are 32-bit,
so K must stay at or below 32.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/tb_ft_parallel_fft.sv --top-module tb_ft_parallel_fft
    ./obj_dir/Vtb_ft_parallel_fft

| testbench | what it shows |
|---|---|
| `tb_fft_r4` | every size from 4 to 1024 points against a DFT, exact cycle count, energy preserved, an injected error visible |
| `tb_parseval_check` | exact sums, verdict just below and above the threshold, clearing |
| `tb_comb_adder`, `tb_tmr_voter` | all masks and extremes; every single-copy fault outvoted |
| `tb_err_correct` | every syndrome of both arrangements against the location table |
| `tb_pfft_system` | both schemes: clean block, an error in each FFT, coefficient upset, parity-FFT error, check hit, double error, 1024-point block with verdict at 5x1024 + 9 cycles |
| `tb_ft_parallel_fft` | the top at its default parameters, end to end, counting every mechanism above and the switch between block sizes |
| `tb_pfft_sizes` | 8 and 11 FFTs with four Hamming-coded checks, 32 FFTs with six, 8 FFTs with one check each |
| `tb_fault_campaign` | random single-bit upsets in stage RAMs and rotation coefficients at 1024 points, coverage counts as in the tables above |

The reference spectra are computed in the testbenches in floating point.
Outputs that were rebuilt carry the rounding of five FFTs, so they are
compared with a wider tolerance.

## Departures and limits

* Twiddle factors come from an elaboration-time ROM and are not computed on
  line. Upsets in them are modelled at the coefficient register that follows
  the ROM, one coefficient for one pass. An upset that lasts beyond one pass
  is not modelled.
* Load, transform and unload of successive blocks do not overlap. Overlapping
  them would need a third RAM bank per core.
* The check's output side sees the last-pass writes. An upset in the final
  bank after it is written, while the block waits to be read out, is not
  covered.
* The unit of the Parseval tolerance is this design's choice (see above).
  Coverage is lower than the original description reports.
* Only single errors are corrected. The Hamming arrangement miscorrects most
  double errors.
* TMR covers the adders and the corrector, as in the original scheme. The
  syndrome register and block control are not triplicated.
* A larger figure of the scheme shows 32 transforms and a correction stage
  labelled "min of two". That stage is not described anywhere and is not
  built. The 32 transforms themselves are built with `K = 32`, which gives six
  Hamming-coded checks; this size is simulated only with 64-point blocks.
* The ECC-only scheme with three redundant FFTs is a point of comparison and
  is not included.
