# Hierarchical AdaBoost classifier computed inside a 6T SRAM

This RTL implements a 10-class image classifier (for example MNIST digits
reduced to 16 x 16 pixels). Its one expensive operation, comparing a pixel with
a threshold, runs inside the memory array that stores the thresholds. Thresholds
never cross a memory port during inference. The bitlines carry the comparison
result to 128 comparators at the edge of the array, and each comparator produces
one weak decision per operation.

The design is hierarchical in two ways:

* **Classifier hierarchy.** Weak classifiers (pixel vs. threshold) are combined
  into 45 boosted binary "one-versus-one" classifiers. Their 45 decisions are
  combined into one class by a plurality vote.
* **Energy/accuracy hierarchy.** A cheap low-power (LP) pass runs first. The
  expensive high-accuracy (HA) pass runs only for binary decisions the LP pass
  was unsure about (the hybrid mode).

The analog parts are modelled behaviourally: bitline discharge, charge sharing
and comparators. Everything else is synthesizable SystemVerilog.

## The classification algorithm

An image has 256 pixels `X[i]` of 8 bits each. The strong classifiers
`n = 0 .. 44` separate the class pairs 0v1, 0v2, ..., 0v9, 1v2, ..., 8v9, in
that order. Each strong classifier has 256 weak classifiers `m`:

    q[n][m]   = 1 if T[n][m] > X[pixel(n,m)] else 0          (weak decision)
    y~[n]     = sum over m of alpha[n][m] * q[n][m]           (soft decision)
    y^[n]     = 1 if y~[n] >= T^[n] else 0                    (strong decision)
    SDM[n]    = |y~[n] - T^[n]|                               (soft decision margin)

`y^[n] = 1` is a vote for the first class of the pair and 0 a vote for the
second. The class with the most votes wins, and a tie goes to the lower class
index.

The parameters are trained offline and loaded by a host. For each strong
classifier and each mode they are:

* the thresholds `T` (8 bits);
* the pixel indices `p` (6 bits, HA mode only);
* the alphas (8-bit two's complement);
* the strong threshold `T^` (18-bit two's complement).

## Three modes

| mode | pixel feeding a weak classifier | thresholds | cost |
|---|---|---|---|
| LP | fixed one-to-one mapping, crossbar bypassed | `T_LP` | 2 comparison cycles per strong classifier |
| HA | any pixel of its sub-sampled bank, chosen by a stored index through a crossbar | `T_HA` | the same 2 cycles, each with a 16-read crossbar set-up first |
| hybrid | LP first. If `SDM > T_h` the LP decision is voted; otherwise the strong classifier is re-run in HA mode and the HA decision is voted. | both | LP cost plus HA cost for low-margin decisions |

**Deterministic sub-sampling (DSS).** A single 256:1 crossbar per comparator
would be too large. The image is therefore split into four banks:

* bank `g` holds the pixels `i` with `i % 4 == g` (64 pixels);
* comparators `32g .. 32g+31` can only pick pixels from bank `g`;
* each of the four crossbars is a 64 x 32 (64:1 per output) selector;
* a pixel index is 6 bits.

**LP mapping.** In comparison cycle `h` (0 or 1), comparator `32g+j` receives
pixel `32h+j` of bank `g`. Across the two cycles every pixel is used exactly
once.

Weak classifier `m` of a strong classifier is handled in cycle `h = m / 128`
by comparator `w = m % 128`. The same numbering is used for thresholds, pixel
indices and alphas.

## The in-memory comparison (the core of the design)

### Where the bits sit

The bit-cell array has 512 rows x 256 columns and is organised as 128 row
groups of 4 rows each. A row group stores 128 8-bit words:

* word `w` occupies column `2w` (the MSB column) and column `2w+1` (the LSB
  column);
* row `r` of the group (r = 0..3) holds bit `4+r` in the MSB column and bit
  `r` in the LSB column.

A 4 x 256 replica array sits on the same bitlines. It holds the 128 pixels
that are being compared, in the same layout but with every bit inverted. It has
its own write wordlines and write bitlines, so it can be refilled in four
cycles.

### What the bitlines compute

The multi-row wordline driver opens all four rows of one group and the four
replica rows at once. Row `r` stays open for `2^r * T0` cycles. A cell pulls
its bitline down while its row is open if that side of the cell stores 0. So a
column's discharge is the binary-weighted sum of the bits it holds:

    MSB column:  dBL  = sum_r 2^r (~t[4+r] + x[4+r])     dBLB = sum_r 2^r (t[4+r] + ~x[4+r])
    LSB column:  same with bits r

Charge sharing between the two columns, weighted 16:1, turns these into
8-bit quantities:

    dV_BL  ~ (255 - T) + X
    dV_BLB ~ (255 - X) + T        =>   dV_BLB - dV_BL = 2 (T - X)

The comparator outputs `q = 1` when `V_BL > V_BLB`, which is exactly `T > X`.
`imc_compare` does this arithmetic in integer units of the per-LSB swing. It
also adds an input-referred offset per comparator (`cmp_offset`, in threshold
LSBs), so its realised threshold is `T + offset`. This is how mismatch enters
the model.

### One comparison cycle (`imc_controller`)

| phase | cycles (T0 = 1) | signals |
|---|---|---|
| crossbar set-up, HA only | 18 | 16 normal-port reads of the pixel-index group build `p_idx`; `cb_en` high |
| replica write | 4 | `wwl[3]` .. `wwl[0]`, one row per cycle; bitlines precharged (`pre`) |
| functional read | 1 + 8*T0 | `fire`, then binary-weighted WL/RWL pulses |
| charge sharing | 1 | `cs_en` |
| compare | 1 | `comp_en`; q valid the next cycle (`done`) |

From `start` to `done` this is 17 cycles for LP and 35 for HA. Two such cycles
make one strong decision, and an image needs 90 of them in LP or HA mode.

## Storage map and batches

A strong classifier occupies one *slot* of 6 row groups (24 rows):

| group in slot | contents |
|---|---|
| 0, 1 | pixel indices for weak classifiers 0-127, 128-255 (low 6 bits of each word) |
| 2, 3 | HA thresholds |
| 4, 5 | LP thresholds |

The 512-row (16 kB) array holds 21 slots. All 45 strong classifiers need
1080 rows, so an image is classified in batches of at most 21 strong
classifiers. A batch is started with `start`, `n_base` and `n_count`; the host
reloads the array between batches. `first_batch` clears the vote counters,
and the vote builds up over the batches. The pixel buffer, the alphas and the
strong thresholds stay loaded for the whole image.

## Foreground calibration (`fg_calibrator`)

Mismatch moves the threshold that a comparator actually realises from `T` to
`T~ = T + dT`. Calibration works on one row group at a time:

1. Read the 128 stored thresholds.
2. Write a ramp `R_k = 0 .. 255` into all replica words and run one comparison
   per step.
3. For each comparator, record the first step at which `q` reads 0. That step
   is `T~`.
4. Write back `T - dT = 2T - T~`, clipped to 0..255.

After calibration the realised threshold equals the intended one. Only the
rails are an exception: there the clipping, or a `T~` outside the ramp, limits
the correction. One group takes about 4.6k clock cycles. `cal_start` and
`cal_grp` start a calibration, and the host calibrates the threshold groups
(2..5 of each slot) after loading a batch.

## Module map

| file | role |
|---|---|
| `abc_pkg.sv` | constants, `mode_e`, word-layout packing, class pair of strong classifier `n` |
| `abc_top.sv` | top: all blocks, normal-port arbitration (calibrator > comparison controller > host), strong-threshold registers, assertions on the handshakes between the control blocks |
| `dss_input_buffer.sv` | 256-pixel buffer, 8 pixels per write, read out as 4 DSS banks |
| `crossbar.sv` | one 64x32 crossbar |
| `crossbar_switch.sv` | four crossbars plus the LP bypass |
| `sram_bca.sv` | 512x256 array: 64-bit normal port through a 4:1 column mux (contiguous 64-column slices), 4-row functional-read view |
| `replica_bca.sv` | 4x256 replica array, complemented pixels, row-wise writes |
| `mrwl_driver.sv` | multi-row WL/RWL driver with binary pulse widths |
| `imc_compare.sv` | **behavioural model** of bitline discharge, 16:1 charge sharing and 128 comparators with offsets |
| `imc_controller.sv` | sequencer of one comparison cycle |
| `fg_calibrator.sv` | foreground calibration state machine |
| `strong_accum.sv` | alpha memory (2 modes x 45 x 256) and alpha*q accumulation, 8 per cycle |
| `strong_decision.sv` | `y^`, `SDM`, `SDM > T_h` |
| `plurality_voter.sv` | vote counters and arg-max |
| `abc_sequencer.sv` | LP / HA / hybrid control over a batch, event counters |

## Using the top (`abc_top`)

All ports are synchronous to `clk`. `rst_n` is an asynchronous active-low
reset.

1. **Pixels.** Write 32 words on `pix_we/pix_addr/pix_wdata`. Pixel
   `8*pix_addr + k` goes in byte `k`.
2. **Alphas.** Write on `alpha_we/alpha_addr/alpha_wdata`. The address is
   `{mode_ha, n[5:0], m[7:3]}` and alpha `m` goes in byte `m % 8`.
3. **Strong thresholds.** Write `T^` on `that_we/that_ha/that_n/that_data`.
4. **Array.** Write each slot through `mem_*`. Row `4*group + r`, column
   select `c` holds the words `32c .. 32c+31` of the group, packed as
   `abc_pkg::pack_slice(words, r)`. Reads return data one cycle later.
5. **Calibration** (optional). Pulse `cal_start` with `cal_grp`, then wait for
   `cal_busy` to fall.
6. **Classification.** Set `mode` (0 LP, 1 HA, 2 hybrid) and `t_h`, then pulse
   `start` with `n_base`, `n_count` and `first_batch`. Each voted decision
   appears on `strong_vld/strong_n/strong_y`, with its margin on
   `strong_sdm`. `done` pulses at the end of the
   batch; `y_hat` and `votes` then hold the running result.

The counters `cnt_lp_cmp`, `cnt_ha_cmp`, `cnt_switch` and `cnt_confident`
describe the last batch. `cmp_offset` feeds the comparator model; tie it to 0
for an ideal array.

Measured in simulation with `T0 = 1`, one image takes the following numbers of
clock cycles, not counting the reloads between batches:

| mode | cycles per image |
|---|---|
| LP | 3423 |
| HA | 5043 |
| hybrid, 15 of 45 strong classifiers below the margin | 5103 |

## Departures, choices and limits

* **Analog behaviour is idealised.** The comparator model has no noise and no
  non-linearity. The reduced wordline voltage, the precharge level and the
  per-LSB swing do not appear. Only a static offset per comparator is modelled.
* **Own choices.** The following are this design's choices:
  * the host interface and the batch/slot scheme;
  * the contiguous column-mux slices;
  * the order of the replica writes;
  * `T0` = 1 cycle;
  * the widths of alpha (8 bits) and of `T^`/`T_h`/soft decision (18 bits);
  * the sign convention `y~ >= T^` for a vote to the first class;
  * the tie-break;
  * the LP pixel mapping.
* **Separate tables per mode.** LP and HA have separate alpha tables and
  separate `T^`, because their weak classifiers differ.
* **`SDM == T_h`.** The hybrid mode treats this as low confidence and re-runs
  in HA mode.
* **Work that could be off-chip is built in.** Accumulating `alpha*q`, the
  strong decision, the vote and the calibration search can all run in host
  software. Here they are digital blocks, so that one simulation covers a
  whole classification.
* **Throughput is not calibrated to silicon.** The cycle counts above come
  from this RTL's own phase lengths. A real macro's comparison cycle would be
  set by analog settling, not by one clock per phase.
* **Not modelled.** The sense amplifiers and write drivers of the normal port
  are not modelled as circuits. Their function (64-bit access through a 4:1
  mux) is part of `sram_bca`.

## Simulation

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. It also has a watchdog. With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_abc_top \
        rtl/abc_pkg.sv rtl/*.sv tb/tb_abc_top.sv -o sim
    obj_dir/sim

The package must come first; listing it twice is harmless. Swap the testbench
name to run another. `tb_abc_top` runs the full-size design (default
parameters) end to end in about half a minute:

* three images in LP, HA and hybrid mode, each in three batches with reloads;
* a run with random comparator offsets, which shows wrong strong decisions;
* a run with calibration of every threshold group, which matches the ideal
  reference model again.

It checks every strong decision, the vote counts and the winner, 90 comparison
cycles per image and pass, and the hybrid switch count. It also requires that
each mechanism occurs: LP, HA, hybrid switch, confident LP decision, reload,
calibration and offset error.

The block testbenches check their block against independent reference
computations:

* `tb_imc_compare`: the bitline arithmetic at `T = X` and at the offset
  boundary;
* `tb_mrwl_driver`: pulse widths at `T0` = 1 and 3;
* `tb_imc_controller`: the phase order and cycle counts;
* `tb_fg_calibrator`: the update rule near the rails.
* `tb_plurality_voter`: random tournaments, plus a set of 45 results whose
  class totals are 3 3 4 4 3 9 5 5 3 6, which must elect class 5.
