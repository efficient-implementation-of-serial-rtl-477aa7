# One-bit serial-search synchronizer for a DS/SS receiver

A direct-sequence spread-spectrum (DS/SS) receiver must line up its local copy
of the spreading code with the received code before it can despread anything.
This design does it by serial search: it correlates the received samples with
the local code over a fixed interval, compares the result with thresholds, and
when the match is too weak it delays the local code a little and tries again.

The main idea is that the detector uses **only the sign bit** of every sample.
Received and local samples are 8-bit numbers, but each one is cut down to one
bit before anything else is done. Multiplying two signs is then a single
EX-OR, and integrating products is a counter. A detector that would otherwise
need 8×8 multipliers, filters and squarers shrinks to a handful of gates and
three small counters. Noise still flips some signs. A majority vote over each
data bit absorbs those errors at moderate signal-to-noise ratios.

The system parameters are those of the reference system: a 127-chip PN code
at 1 Mchip/s, 8-bit samples at 6 MHz (6 samples per chip), alternating data at
100 kb/s (10 chips, 60 samples per bit), and a 30-chip (180-sample)
correlation interval.

## Structure

```
                    +------------------------------------------------------------+
 ds_ss_tx --tx-->   |  (channel: delay, noise; outside the RTL)                  |
                    +------------------------------------------------------------+
                                                    | rx            | rx_clk0
                                                    v               v
   vclk_gen --v_clk--> local_code_gen --lc, dc--> proposed_detector --> dout
       ^                                            |  esb x3
       |                                            |  maxcorr: 2 EX-OR multipliers,
       +---- dec_valid, acq_dec, track_dec ---------+          2 integrators, choose_max,
                                                    |          2 threshold comparators
                                                    |  majority_limiter
```

| module | role |
|---|---|
| `dsss_sync_top` | Whole sub-system. It holds the test transmitter and the receiver side by side; the channel between them is left to the testbench. |
| `ds_ss_tx` | Test transmitter: alternating data EX-ORed with the PN code, BPSK mapped to ±127. |
| `local_code_gen` | Local references `lc = BPSK(PN)` and `dc = BPSK(PN xor alternating data)`. The PN steps on `v_clk` and the data toggles on `clk0`. |
| `pn_gen` | 7-stage LFSR, x^7 + x^6 + 1, period 127. |
| `alt_data_src` | Data bit that toggles on each `clk0` strobe. |
| `bpsk_mod` | Bit to ±127 sample, registered. |
| `vclk_gen` | Variable chip clock. It carries out the search steps. |
| `proposed_detector` | ESB + MAXCORR + LIMITER. |
| `esb` | Sign bit of an 8-bit sample: 1 = positive or zero. |
| `maxcorr` | Multipliers, integrators, maximum and thresholds. Gives one decision per interval. |
| `mf_integrator` | Counts positive products over an interval. |
| `choose_max` | Larger of the two branch counts. |
| `majority_limiter` | Majority vote per data bit. |
| `delay_line` | Helper that aligns strobes with the pipelined data. |
| `dsss_pkg` | Shared numbers and the `sample_t` type. |

Everything runs on one clock, the 6 MHz sample clock. Every cycle is one
sample. The chip clock, the data clock and the variable clock `v_clk` are
clock enables, not clocks. Reset is synchronous and active high.

## Why two local references

The received signal carries data, so over a 30-chip interval its code
polarity flips at every data boundary. Correlating it against the bare code
(`lc`) would then partly cancel. The local generator therefore also makes `dc`:
the code EX-ORed with a local copy of the alternating data. The receiver's data
clock (`rx_clk0`) is assumed to be aligned with the received data boundaries.
Under that assumption, `dc` matches the received signal sample for sample once
the code is aligned. `lc` is still needed to recover the data, because
`rx xor lc` is the data itself.

The data-clock alignment is an input to this design, not something it
recovers. The top takes `rx_clk0` as a port, and the testbench derives it from
the transmitter's data clock, delayed exactly like the samples.

## How the search works

`maxcorr` counts, for each branch, how many of the 180 samples of an interval
have equal received and local signs (product positive). Aligned and noiseless,
the `dc` count is 180. An unrelated code position gives about 90. Each sample
of misalignment costs roughly one count per code transition in the interval,
about 15. At the end of the interval the larger count `corr_max` is compared
with two thresholds:

| decision | condition | action of `vclk_gen` |
|---|---|---|
| `acq_dec = 0` | `corr_max <= VTH1` (128) | retard local code by Tc/2 = 3 samples |
| `acq_dec = 1`, `track_dec = 0` | `VTH1 < corr_max <= VTH2` (160) | retard by Tc/6 = 1 sample |
| both 1 | `corr_max > VTH2` | keep the code phase (locked) |

A retard of k samples freezes `vclk_gen`'s chip-phase counter for k cycles.
Every later `v_clk` pulse, and so the whole local code, moves k samples later.
The search only ever delays the local code, never advances it. It sweeps in
3-sample steps until a position within about 2 samples of alignment passes
VTH1. Then it walks forward 1 sample per interval until the count passes VTH2.
Across the 762-sample code period, acquisition takes at most one sweep of
254 intervals (about 46,000 cycles, 7.6 ms). In simulation the lock time came
out at about 60·D + 1,000 cycles for a channel delay of D samples.

Because the search moves in one direction only, a noise hit that pushes the
count under VTH2 while locked delays the code by one sample. If the count at
the new position also fails, the code keeps slipping until acquisition is lost
and a new sweep starts. VTH2 = 160 is set low enough that this is rare at
5 dB SNR, where the aligned count averages about 173. A code one sample late
usually still passes it.

The two threshold values are this design's own choice; they are parameters
(`VTH1`, `VTH2` in `dsss_pkg`, `TH1`, `TH2` on the detector). The windows are
counted by a free-running counter from reset and are not aligned to the code.
Products computed during a retard belong to the interval in which they occur.

## Sign conventions and the data output

* `esb` outputs 1 for a positive (or zero) sample and 0 for a negative one.
* A one-bit multiplier is an EX-OR of two sign bits. Its output `det` is 0
  for a positive product.
* The limiter counts `Cp` (samples with `det = 0`) and `Cm` (`det = 1`) over a
  data bit. At the bit boundary it sets `dout = 1` if `Cp > Cm` and
  `dout = 0` if `Cp < Cm`. On a tie it keeps the old value.

The transmitter spreads with EX-OR and maps bit 1 to +127. With these rules
`dout` is the polarity of the despread signal, which is the **complement** of
the transmitted bit. Invert it if true data is wanted.

The limiter counters are 11 bits wide and saturate, so a data bit of up to
2,047 samples can be voted. This covers a worst case of 1,800 samples, while
this system uses 60.

## Timing

| path | latency |
|---|---|
| `rx`/`lc`/`dc` → `det` | 2 cycles (ESB register, multiplier register) |
| last sample of an interval at the multipliers → `dec_valid` | 3 cycles; `dec_valid` comes every 180 cycles, 181 cycles after reset release for the first |
| `dec_valid` → retard applied | the next cycle; the retard lasts 3 or 1 cycles |
| `rx_clk0` → first sample of the new bit at `rx` | 2 cycles (same as transmitter `clk0` → `tx`) |
| `rx_clk0` → `dout_valid` (decision on the finished bit) | 5 cycles |
| `clk0` or `v_clk` → `local_code_gen` outputs | 2 cycles |

## Where this design departs from the reference scheme or fills gaps

* **No carrier.** BPSK is built at baseband: each chip is ±127. The reference
  system speaks of a carrier and of sampling at 8 or 16 times its frequency,
  but gives no carrier frequency or phase for the implemented receiver. The
  detector never removes a carrier explicitly, so a carrier common to the
  received and local signals would cancel in the sign product.
* **Thresholds** VTH1 = 128 and VTH2 = 160 are chosen here. No values were
  given.
* **PN polynomial** x^7 + x^6 + 1 and the all-ones seed are chosen here. Only the
  length, 127, was given.
* **Data rate.** 100 kb/s data gives 60 samples per bit. A figure of 1,800
  samples per bit also appears, for the worst case. The limiter counters are
  sized for 1,800 (11 bits) and the system runs at 60.
* **Single clock** with enables instead of separate data, chip, variable and
  sample clocks.
* **Data-clock alignment** (`rx_clk0`) is supplied from outside, as the scheme
  assumes. It is not recovered.
* **Tie handling.** Ties in `choose_max` report the `lc` branch; ties in the
  limiter hold `dout`.
* The conventional multi-bit detector is not included. It would use 8×8
  multipliers, low-pass filters and squarers, and the one-bit detector
  replaces it. The published FPGA cost figures (cells and delay units on a
  Xilinx Virtex) are not reproduced; a generic synthesis of
  `proposed_detector` gives about 80 word-level cells and 82 flip-flop bits.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
A watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dsss_pkg.sv \
    tb/tb_dsss_sync_top.sv --top-module tb_dsss_sync_top
./obj_dir/Vtb_dsss_sync_top
```

Replace the testbench name to run another. `tb_dsss_sync_top` runs the whole
system at its default parameters through a channel with a random delay and
about 5 dB of noise. It runs three delays (two random, one of 3 samples), and
`+delay=N` sets the first one. It checks that lock comes within 60·D + 3,600 cycles, i.e. one 3-sample
step per interval. Then it checks 150 bits of `dout` per delay, the decision
rate and the `dout` latency. It also counts
every mechanism: Tc/2 retards, Tc/6 retards, lock decisions, wins of each
branch, and noise sign errors absorbed by the vote. It takes well under a
second.

The block testbenches check against models written independently of the RTL:

| testbench | checks |
|---|---|
| `tb_pn_gen` | the LFSR recurrence, period 127, balance |
| `tb_ds_ss_tx` | the transmitter, cycle by cycle, against a closed-form model |
| `tb_local_code_gen` | `lc`/`dc` under random `v_clk` and `clk0` |
| `tb_vclk_gen` | the gaps between `v_clk` pulses after each kind of decision (6, 9, 7 samples) |
| `tb_maxcorr`, `tb_proposed_detector` | decisions per window, including window timing, plus the `dout` of each bit |
| `tb_majority_limiter` | including ties and a 1,800-sample bit |
| `tb_esb`, `tb_bpsk_mod`, `tb_alt_data_src`, `tb_mf_integrator`, `tb_choose_max` | the small blocks |

## Changing it

The system numbers live in `rtl/dsss_pkg.sv`: samples per chip, code length
and taps, chips per data bit, interval length, counter widths, thresholds and
amplitude. If the interval length changes, move the thresholds with it. They
are counts out of `WIN_SAMPLES`, and `ACC_W` must hold that many. A different
code length needs a primitive polynomial of the matching degree in
`LFSR_TAPS`.
