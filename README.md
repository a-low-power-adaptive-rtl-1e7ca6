# Adaptive 8x8 MMSE MIMO detector with DVFS

An 8x8 MIMO-OFDM receiver (IEEE 802.11ac, eight spatial streams, 40 MHz,
108 data subcarriers) must separate the spatial streams on every subcarrier.
The linear MMSE detector does this with a weight matrix per subcarrier,

    G_k = (H_k^H H_k + sigma2 I)^-1 H_k^H,        s_hat = G_k y_k

Computing the 108 matrix inversions in time for every packet needs a fast
and power-hungry datapath. But when the station hardly moves, the channel
changes slowly and the weights of one packet stay good for several later
packets. This design uses that fact:

* it measures how fast the channel changes, which gives an estimate of the
  Doppler shift;
* it computes new weights only once every *N* packets, where *N* depends on
  the Doppler shift (0, 2, 4 or 8);
* it spreads each computation over those *N* packets, so the weight unit
  can run on a lower clock with a lower supply voltage (DVFS).

At 2 Hz Doppler with eight skipped packets, the weight unit runs at 2 MHz
and 0.43 V instead of 40 MHz and 1.0 V.

The SystemVerilog in `rtl/` covers all of the digital part. The PLL and the
DC/DC converter are analog parts outside it. The channel estimator and the
FFT that feed the detector are also outside it. `tb/` holds a self-checking
testbench for every module and one end-to-end testbench at full size.

## Structure

```
              receiver clock (clk_sys)                 |  DVFS clock (clk_det)
                                                       |
 cest_* --+--> channel_buffer (write, ref read B) ------+--> (read A) mmse_9step
          |        |                                   |      |  matrix_arith_unit x2
          +--> nmse_unit --> dvfs_ctrl --> PLL / DC-DC |      |  matrix_inv4
                              ^   |  (freq/vdd ports)  |      v
 pkt_start --> adaptive_sched +   +--> skip_est        |   weight_memory (write bank)
                 | start/done via pulse_sync <---------+------'
 y_* ----------> mimo_decoder <-- weight_memory (read bank) --> s_*
```

| module | role |
|---|---|
| `adaptive_mimo_detector` | top level; wires the two clock domains together |
| `mmse_9step` | computes G_k for all subcarriers in 9 steps per subcarrier |
| `matrix_arith_unit` | reconfigurable 4x4 complex multiply/add/subtract ("Sel") |
| `matrix_inv4` | 4x4 Hermitian inverse by Strassen block inversion |
| `channel_buffer` | channel matrices of the captured packet, two read ports |
| `weight_memory` | two banks of G_k: one is written while the other is read |
| `mimo_decoder` | s_hat = G_k y_k, one vector per cycle |
| `nmse_unit` | channel-change metric used for the Doppler estimate |
| `dvfs_ctrl` | Doppler class, skip count, clock/supply commands |
| `adaptive_sched` | per-packet capture / start / bank swap / overrun |
| `pulse_sync` | toggle synchronizer between the clock domains |
| `mimo_pkg` | data types, fixed-point and matrix helper functions |

## Number format

Every value is a complex number. The real and imaginary parts are each 24-bit
two's-complement words with 16 fractional bits, so the range is about ±128
and one LSB is 1.5e-5. The 24-bit word length comes from the reference
9-step design. The split into integer and fractional bits is this design's
own choice: the Gram matrix H^H H of an 8x8 channel with unit-scale entries
needs 7 integer bits.

Products are accumulated at full precision in 56-bit accumulators. Each matrix
element is rounded once (round half up, with saturation). The reciprocal of a
determinant has 32 fractional bits (see `matrix_inv4`).

Matrices are packed arrays indexed `[row][col]`:

* `cmat4_t` is a 4x4 matrix.
* `cmat8_t` is an 8x8 matrix.
* `cblk8_t` holds an 8x8 matrix as four 4x4 blocks, numbered 0 = top-left,
  1 = top-right, 2 = bottom-left, 3 = bottom-right.

## The 9-step weight computation

This is the core of the design and the hardest part to follow.

### Block formulas

The 8x8 matrix P = H^H H + sigma2 I is Hermitian. It is split into 4x4
blocks, P = [A B; C D], with C = B^H. Its inverse is computed with Strassen's
block formulas:

    E   = D - C A^-1 B                    (Schur complement)
    D'  = E^-1
    C'  = -E^-1 C A^-1
    B'  = C'^H
    A'  = A^-1 + A^-1 B E^-1 C A^-1

Because P is Hermitian, A^-1 B = (C A^-1)^H. So only X = C A^-1 = B^H A^-1
is formed, and A' = A^-1 - X^H C'.

With H = [H11 H12; H21 H22] and R = P^-1, the weights are G = R H^H.

### Step schedule

`mmse_9step` has two matrix arithmetic units (MAU0 and MAU1) and one 4x4
inversion unit. It runs one step per clock cycle:

| step | MAU0 | MAU1 | inversion |
|---|---|---|---|
| 0 | A = H11^H H11 + H21^H H21 + s2 I | B = H11^H H12 + H21^H H22 | |
| 1 | D = H12^H H12 + H22^H H22 + s2 I | | A^-1 |
| 2 | X = B^H A^-1 | | |
| 3 | E = D - X B | | |
| 4 | | | E^-1 |
| 5 | C' = -E^-1 X | | |
| 6 | F = A^-1 - X^H C' | G21 = C' H11^H + E^-1 H12^H | |
| 7 | G11 = F H11^H + C'^H H12^H | G22 = C' H21^H + E^-1 H22^H | |
| 8 | G12 = F H21^H + C'^H H22^H → write G_k | | |

Each MAU evaluation is `Z ± (op(X1) op(Y1) + op(X2) op(Y2))`. Here op() is
either the matrix or its conjugate transpose, and the Z term is nothing, a
matrix, or sigma2·I. A `mau_sel_t` word selects the operation for each step;
it plays the part of the reference design's "Sel" input. The eighteen 4x4
products and two inversions that one subcarrier needs fill the nine steps
exactly.

The count of nine steps, one 4x4 datapath reused across them, and the block
formulas follow the reference design. Which operation goes into which step
is this design's own choice. A fully pipelined variant that produces one
subcarrier per cycle (about seven times larger) is not included.

### Inversion unit

`matrix_inv4` inverts a 4x4 Hermitian block by applying the same Strassen
formulas again, this time to 2x2 blocks. A 2x2 Hermitian block is inverted
directly as adj/det; its determinant is real. The reciprocal of the
determinant is formed by one division to 32 fractional bits. A non-positive
determinant saturates the reciprocal.

The unit assumes a positive-definite input. sigma2 > 0 guarantees this for P
and for its Schur complement E.

### Timing

A start pulse processes subcarriers 0..NSC-1:

* two cycles fetch H_0 from the channel buffer;
* each subcarrier then takes 9 cycles, and H_{k+1} is prefetched during
  step 7;
* `done` pulses one cycle after the last write.

From start to done takes 9·NSC + 3 cycles, which is 975 cycles for 108
subcarriers: 9.75 µs at 100 MHz and 24.4 µs at 40 MHz. The reference
implementation quotes 9.63 µs and 24 µs.

## Adaptive operation

### Doppler estimate

For every packet, `nmse_unit` accumulates two sums over all subcarriers and
all 64 matrix elements:

    num = Σ |H_ref - H(t)|²        den = Σ |H_ref|²

H_ref is the channel of the last captured packet, read from port B of the
channel buffer. For Jakes-type fading, the normalised error grows as
xi = num/den ≈ (2π f_D t T)²/2, where t is the number of packets since the
reference and T is the packet interval. `dvfs_ctrl` takes T as the parameter
`PKT_US`, by default 80 µs.

`dvfs_ctrl` classifies f_D against boundaries at 4, 8, 12, 16 and 20 Hz
without a divider, by testing `num·2^32 > THR_b·t²·den`. The thresholds
`THR_b` are computed at elaboration from `PKT_US`. Until a first measurement
exists, the class is ">20 Hz", which means no skipping. The classifier is
this design's own; the reference design only says that the Doppler shift is
estimated from the FFT outputs.

### Skip count and operating point

| Doppler class | 2 Hz | 6 Hz | 10 Hz | 14 Hz | 18 Hz | >20 Hz |
|---|---|---|---|---|---|---|
| skip, method A | 4 | 4 | 4 | 2 | 2 | 0 |
| skip, method B | 8 | 8 | 4 | 2 | 2 | 0 |

| skip N | clock | supply | time for 975 cycles | window (N × 80 µs) |
|---|---|---|---|---|
| 0 | 40 MHz | 1.00 V | 24.4 µs | one packet |
| 2 | 8 MHz | 0.52 V | 121.9 µs | 160 µs |
| 4 | 4 MHz | 0.47 V | 243.8 µs | 320 µs |
| 8 | 2 MHz | 0.43 V | 487.5 µs | 640 µs |

The `method_b` input selects the skip table. The operating point follows
from the skip count with either method.

The reference design describes method B as having a shorter detection delay,
but its power figures run method B at eight skipped packets and 2 MHz. This
design follows the power figures. Method B's shorter-delay timing is not
modelled.

### DVFS sequencing

On a new window, `dvfs_ctrl` changes the supply and the clock in a safe
order:

* When speeding up, it raises the supply first: it sets `vdd_mv`, pulses
  `vdd_chg` and waits for `vdd_good` to fall and then rise. Only then does it
  set `freq_mhz`, pulse `freq_chg` and wait the same way for `pll_lock`.
* When slowing down, it changes the clock first and the supply second.

The weight unit is started only when `settled` is high. This handshake is
this design's own.

### Packet schedule

`adaptive_sched` acts on each `pkt_start`:

1. If a computation has finished, the weight-memory banks swap. The decoder
   uses the new weights from this packet on.
2. If the weight unit is idle and P = max(N,1) packets have passed since the
   last capture, this packet is captured. Its estimates are written into the
   channel buffer, N for the new window is taken from `dvfs_ctrl`, and an
   operating-point request is sent.
3. If P packets have passed but the weight unit is still busy, the capture
   moves to the next packet and `overrun_evt` pulses. This happens only if
   packets arrive faster than `PKT_US` assumes.

`det_start` is issued once the last subcarrier of a captured packet has been
written and the DVFS controller has settled.

## Clock domains and interfaces

Only `mmse_9step` runs on the DVFS clock `clk_det`. Everything else runs on
the receiver clock `clk_sys`. The testbench uses 40 MHz for `clk_sys`; the
decoder needs at least 216 cycles per packet.

The domains cross at four places:

* Port A of `channel_buffer`. The scheduler never writes the buffer while
  the weight unit is reading it.
* The write port of `weight_memory`. The weight unit writes only the bank
  that is not being read.
* Two `pulse_sync` toggle synchronizers, one for start and one for done.
* The static signals `sigma2`, `method_b` and the write-bank select. Hold
  them stable while `det_busy` is high.

`rst_n` must be released synchronously to both clocks.

Top-level streams carry one subcarrier per `clk_sys` cycle:

* `cest_valid/cest_k/cest_h`: channel estimates, subcarriers in order
  0..107, after `pkt_start`.
* `y_valid/y_k/y`: received vectors, any order. `s_valid/s_k/s_hat` follows
  two cycles later.

The PLL and the DC/DC converter connect through `freq_mhz`, `freq_chg`,
`pll_lock`, `vdd_mv`, `vdd_chg` and `vdd_good`. `clk_det` is the PLL output.

## What was chosen here rather than taken from the reference design

* The fixed-point format: 16 fractional bits, single rounding, and a 32-bit
  reciprocal.
* The assignment of operations to the nine steps, and the use of two MAUs
  plus one inverter.
* Strassen at the 2x2 level inside the 4x4 inverter.
* The channel buffer, the two-bank weight memory, and the bank swap at the
  packet boundary.
* The NMSE-based Doppler classifier, its thresholds and the 80 µs packet
  interval.
* The PLL/DC-DC handshake and its ordering, and the handling of overruns.
* The placement of the clock-domain boundary: only the weight unit is
  scaled.
* The update period of max(N,1) packets.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_matrix_arith_unit` | all Sel combinations against a double-precision model, within 1 LSB |
| `tb_matrix_inv4` | 203 Hermitian matrices against Gauss-Jordan; worst relative error 2.5e-4 |
| `tb_mmse_9step` | G_k against double-precision MMSE (worst 1.1e-4); 9·NSC+3 cycles; write order |
| `tb_channel_buffer`, `tb_weight_memory` | contents, latency, read-before-write, bank independence |
| `tb_mimo_decoder` | G y within 1 LSB, index and two-cycle latency |
| `tb_nmse_unit` | exact integer sums and timing |
| `tb_dvfs_ctrl` | class and skip for 2–25 Hz at t = 1..8; every operating point; supply/clock order |
| `tb_adaptive_sched` | capture period, swap timing, start conditions, overruns |
| `tb_adaptive_mimo_detector` | full size: 69 packets in five Doppler/method phases |

The full-size test `tb_adaptive_mimo_detector` runs with behavioural PLL and
DC/DC models (`tb/pll_model.sv`, `tb/dcdc_model.sv`). It checks:

* every decoded vector against MMSE weights computed in double precision
  from the captured channel;
* the 975-cycle computation time;
* the clock and supply of every window.

It also counts that each mechanism happens: captures, skipped packets, bank
swaps, clock raises and lowerings, all four operating points, a method-B
8-packet window, and overruns.

The shared reference models are in `tb/tb_ref_pkg.sv`. They use IEEE double
precision and Gauss-Jordan inversion, independent of the RTL arithmetic.

Run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`. List the package files first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/mimo_pkg.sv tb/tb_ref_pkg.sv tb/tb_adaptive_mimo_detector.sv \
  --top-module tb_adaptive_mimo_detector
./obj_dir/Vtb_adaptive_mimo_detector
```

`-y` lets Verilator find each module in its own file. The packages must be
named explicitly, ahead of the files that import them. Replace the
testbench name to run any other test; block tests that need no reference
model or PLL/DC-DC model still build with the same command. The full-size
run takes about 50 s to build and 2 s to simulate.

## Limits

* The datapath is combinational within a step. A 4x4 inversion with two
  dividers, or two 4x4 matrix products, is one cycle. That is fine in
  simulation, but a real 100 MHz implementation would need to pipeline or
  retime the inverter and the MAUs.
* There is no overflow flag. Ill-conditioned channels with a small sigma2
  saturate silently. The tests use channel entries up to ±0.7 and
  sigma2 ≥ 0.1.
* The Doppler thresholds assume a Jakes-type channel and `PKT_US`. Noise in
  the channel estimates raises the measured NMSE and biases the estimate
  toward higher Doppler, which is the safe direction.
* Method B's one-packet detection delay is not modelled; see above.
