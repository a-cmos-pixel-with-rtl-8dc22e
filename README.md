# Digital pixel imager with in-pixel ADC, digital CDS and gain correction

This is a 128 × 128 image sensor in which each pixel digitises its own
signal. All pixels share one RAMP and one set of clocks, so a whole frame
is converted at once. Each pixel holds a single-slope ADC made of a
comparator and a 9-bit reversible counter. The pixel converts its
reset level while counting down, then its photo level while counting up. The
counter ends up holding the difference of the two samples. This is
correlated double sampling (CDS) done in digital form: the pixel's offset
(dark-signal nonuniformity) cancels and no subtractor is needed.

The last column adds gain correction (GC), which compensates
photo-response nonuniformity. Each pixel there multiplies its own result
by a stored coefficient between 0 and 1, in steps of 1/511. It does this by
skipping a chosen share of the counting pulses, so no multiplier is needed.

The RTL covers the digital side in full: the counter, its register cell, the
per-pixel count control, the GC circuit, the REF pulse generator, the frame
sequencer and the readout. The photogate sense node and the comparator
are analog. They are modelled behaviourally so that the array can be
simulated end to end.

## The counting pixel

`pixel` chains four parts:

| part | module | what it does |
|---|---|---|
| light-to-voltage converter | `lvc_model` (model) | Sense node. RSTA sets it to the pixel's reset level. A TG pulse with PG low lowers it by the collected charge. |
| comparator | `comparator_model` (model) | `cmp = sense > RAMP`. 1 means stop, 0 means count. |
| count control | `pixel_count_ctrl` | A D-latch samples `cmp` on PHI2. Gates produce STAT and the gated clock phases. |
| counter | `reversible_counter` + 9 × `latch2p` | 9-bit up/down LFSR. Its word is the pixel output. |

The count control is written exactly as the gates of the pixel schematic:

```
stat     = NOR(CNT_FORCE, CNT_EN & ~Q)      Q: latched comparator, 0 = count
phi_up   = NOR(stat, PHI1UP_n)
phi_down = NOR(stat, PHI1DOWN_n)
```

While the pixel counts, each global PHI1 pulse that reaches it is followed
by a PHI2 pulse, and together they move the counter one state. When the
RAMP falls below the sense node, the comparator flips and the latch catches
the flip on the next PHI2. The pixel then ignores further pulses. STAT
also switches the counter registers to static hold, so the value survives
until readout.

CNT_EN is the global "this sample is still running" line. It drops after
the last step of each sample. That stops any pixel whose comparator never
flipped, for example an over-driven pixel. CNT_FORCE makes every counter
count whatever its comparator says. It is used only to reset the counters.

### Why an LFSR counter, and how to read it

The counter is a 9-bit maximal-length LFSR with 511 states, built from nine
two-phase registers and two XOR gates:

- **Counting up** shifts towards bit 8 and feeds bit 0 with `bit8 ^ bit4`.
- **Counting down** shifts towards bit 0 and feeds bit 8 with `bit0 ^ bit5`,
  which is the exact inverse of an up step.

An up step therefore undoes a down step. After a frame the word is the
state reached from the reset word (all ones) after `n_up - n_down` up
steps, taken modulo 511. The polynomial, x^9 + x^5 + 1, is this design's
choice; any maximal 9-bit polynomial would do.

The code is pseudo-random, so to get a number, build a 511-entry table
once: walk up from all ones and note the step at which each word appears.
The testbenches do exactly this (`tb_util_pkg::lfsr_word`).

A dark pixel reads 0. A result of `n_up - n_down` ≥ 511 wraps around: a
saturated pixel reads as nearly dark. Nothing in the pixel prevents this,
so an operator must keep a margin below 511 counts.

Only the first register (LATCH2PR) has a reset input, which sets its
output to 1. The sequencer resets the whole counter by holding RST and
CNT_FORCE high for nine up steps, so the ones shift through all nine bits.

### Two-phase dynamic registers, synchronously

The original registers are dynamic latches driven by a non-overlapping
two-phase clock. Here each `latch2p` is a pair of flip-flops on one master
clock:

- on a cycle with `phi_up` (or `phi_down`), the inner node takes `in_up`
  (or `in_down`);
- on a cycle with `phi2`, OUT takes the inner node;
- with `stat` and no phase-1 enable, the inner node copies OUT.

The sequencer never raises a phase-1 enable and PHI2 in the same cycle.
Assertions in `conversion_sequencer` check this. PHI1UP and PHI1DOWN are
active low, as in the schematic, and PHI2 is active high.

## Gain correction by pulse blocking

A GC pixel (`gc_pixel`) is an ordinary pixel whose CNT_EN comes from its
`gc_circuit`:

```
CNT_EN_LOCAL = CNT_EN_GLOBAL & ~| ( REF[k] & ~COEFF[k] )   for k = 0..8
```

`ref_generator` drives REF(8:0) during conversion. In each counting step
exactly one REF line pulses. Over 511 steps, line k pulses 2^k times, and
its pulses are evenly spaced:

- REF(8) pulses on every odd step;
- REF(0) pulses once, in step 256.

The generator produces this by numbering the steps 1..511. In step c it
pulses line `8 - (trailing zeros of c)`.

A 0 in coefficient bit k blocks the 2^k steps in which REF(k) pulses.
Over a full 511-step ramp a pixel therefore keeps `COEFF` of every 511
counts, which multiplies its result by `COEFF/511`. For example, 341/511
keeps 17 of the first 26 steps, and this is checked. The coefficient is
plain binary, whatever coding the counter uses.

The blocking pattern restarts at the first step of each sample. Both
samples then lose the same pulses over their common first steps, so the
offset cancels as before. The result is `kept(n_up) - kept(n_down)`, where
`kept(n)` counts the unblocked steps among the first n.

The multiplication is slightly nonlinear, because the blocking is uneven
over short stretches. Multiplying by 0 or by 1 is exact.

**Coefficient loading.** Coefficients sit in a 9-bit shift register in
each GC circuit, and the 128 registers form one serial chain:

- data enters at `coeff_sdi` (row 0) and leaves at `coeff_sdo` (row 127);
- bits are sent MSB first, one per cycle with `coeff_shift` high;
- the last row's coefficient is sent first.

**Fewer GC bits.** `GC_BITS` below 9 drops the high-order coefficient
bits, and with them the fastest REF lines. The range shrinks, for example
to 448/511 … 1 with 6 bits, but the step stays 1/511. Correcting
photogate gain spread needs only about 0.88 … 1.

## One frame

`conversion_sequencer` drives all pixels through the lines in
`pixel_pkg::pix_ctrl_t`. `start` runs these phases:

| phase | cycles (defaults) | lines |
|---|---|---|
| counter reset | 9 steps = 18 | RST, CNT_FORCE, PHI1UP / PHI2 |
| sense-node reset | 8 | RSTA |
| prime | 1 | RAMP at start, PHI2: every latch reads "count" |
| 1st sample (reset level) | 511 steps = 1022 | CNT_EN, PHI1DOWN / PHI2, RAMP falling |
| charge transfer | 80 | RAMP at top (comparators off); PG low and TG high in the middle half |
| prime | 1 | as above |
| 2nd sample (photo level) | 511 steps = 1022 | CNT_EN, PHI1UP / PHI2, RAMP falling |
| done | 1 | `done` pulse; counters hold |

A CDS frame takes 2152 cycles from the `start` cycle to `done`. With
`cds_en = 0`, the first prime and the first sample are skipped. This is
single sampling: the result then keeps the pixel's offset.

In step j the RAMP code is `RAMP_START - j*RAMP_STEP`. The defaults,
3640 and 6 codes on a 1.8 V 12-bit scale, put the ramp top at 1.6 V and
make one count about 2.6 mV. When no sample is running, RAMP sits at 4095
(1.8 V), which is also how the comparators are powered down.

The parameters are `N_DOWN`, `N_UP`, `RAMP_START`, `RAMP_STEP`,
`RSTA_CYCLES` and `TRANSFER_CYCLES`. A sample of 511 steps, the 80-cycle
transfer and the 8-cycle RSTA are choices of this design: they match a
50 fps, 1.4 ms conversion at about 1.5 MHz.

After `done`, set `rd_row` and `rd_col`. `data_out` then shows that
pixel's word in the same cycle, through `row_decoder`, the column buses and
`column_mux`. Read everything you need before the next `start`, because
each frame begins by resetting the counters.

## Top level

`imager_top` has these parameters:

- `ROWS` = 128 and `COLS` = 128;
- columns 0 … 126 are `pixel`, column 127 is `gc_pixel`;
- the sequencer sizes listed above, and `GC_BITS`.

Its ports:

- **control:** `clk`, `rst_n` (asynchronous, active low; resets the
  sequencer and the REF generator), `start`, `cds_en`, `gc_en`, `busy`,
  `done`;
- **coefficient chain:** `coeff_shift`, `coeff_sdi`, `coeff_sdo`;
- **readout:** `rd_row`, `rd_col`, `data_out`;
- **RAMP:** `ramp_code`, the code an external RAMP DAC would receive;
- **scene:** `reset_level[r][c]` and `photo_level[r][c]`. These are
  12-bit codes per pixel and drive the sense-node models.

`gc_en = 0` keeps REF low. The GC column then behaves as plain CDS pixels.

## Where this model departs from the silicon

- **Analog front end.** The sense node and the comparator are ideal
  behavioural models. They have no noise, leakage, dark current, offset,
  comparator delay or image lag. The 50 µs transfer gap, PG/TG voltages
  and comparator bias are reduced to pulse timing.
- **Dynamic logic.** It is modelled as flip-flops with enables, and the
  two clock phases are one-cycle strobes of a single clock. The precharged
  NOR of the GC circuit is plain combinational logic.
- **Blocking polarity.** The GC circuit follows the blocking equation:
  REF on and coefficient bit 0 blocks. A transistor-level drawing of the
  circuit gates each pull-down by the stored bit directly. That only
  agrees if the memory presents the complement of the coefficient.
- **Shared column buses.** In silicon, the column data buses also carry
  REF and the coefficient data, through a bidirectional pass-transistor
  multiplexer. Here those are separate nets and only reading is modelled.
- **Not built:** the clock buffers and the off-chip RAMP DAC with its
  buffer.
- **Own choices:** the counter polynomial, the REF construction, the
  sequencer's pulse lengths and clock rate, the single-sampling mode, the
  coefficient chain order and the readout timing.

## Files and simulation

`rtl/` holds one module per file, plus the package `pixel_pkg.sv`.
`lvc_model.sv` and `comparator_model.sv` are behavioural models of
analog parts. `tb/` holds one self-checking testbench per module, plus
`tb_util_pkg.sv` with the reference models and `tb_imager_full.sv`.
`tb_imager_full.sv` runs one full 128 × 128 frame at the default
parameters and checks all 16384 pixels.

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_imager_top \
  rtl/pixel_pkg.sv tb/tb_util_pkg.sv rtl/*.sv tb/tb_imager_top.sv -o sim
./obj_dir/sim
```

`tb_imager_top` runs an 8 × 8 array through several kinds of frame:

- CDS frames with and without REF;
- a single-sampling frame;
- two sets of coefficients.

It counts that gain-correction blocking, CNT_EN stopping an over-driven
pixel, counter overflow, comparator power-down, chain loading and readout
each happened. The full-size testbench needs several minutes of C++
compile time, because the array is 16384 pixel instances; the simulation
itself is short.
