# CNN-based local motion estimator for image stabilization

Electronic image stabilization has to find, for every video frame, how far
the background has moved since the last frame. This is the local motion
vector (LMV). The costly part is block matching. For each region of the frame, the
absolute differences between the current frame and a set of reference pixels
are summed into a small matrix. Then the position of the smallest sum must be
found. A processor does this search by comparing and storing one element at a
time.

This design moves the search into a mixed-signal array of 19 x 25 pixel
processing units, one per candidate displacement. Each unit stores its sum of
absolute differences (SAD) as a voltage on a local analog memory (LAM). A
shared threshold current then rises in 32 steps. Each unit holds a cellular
neural network (CNN) cell that works as a current comparator, and the first
cell whose input falls below the threshold flips its output. AND chains along
every row and column turn that flip into a row index and a column index at
once, with no scan of the array. With a 20 MHz clock, loading one region takes
30,877 cycles (1.54 ms). The search takes at most 64 cycles, whatever the size
of the array.

The RTL contains the digital controller, the chains, the decoder and the
representative-point front end as synthesizable SystemVerilog. The analog
parts are behavioural models with `real` signals: the DACs, the LAM, the
voltage-to-current converter and the CNN cell. They are for simulation only.

## Algorithm: representative point matching

A stabilizer first crops every 312 x 200 frame to 300 x 190, keeping the
border as room for the compensating shift. Here the crop takes 6 columns on
the left and 5 rows on the top. The cropped image is split into four regions
of 150 x 95 pixels, each giving its own LMV: region 0 upper left, 1 upper
right, 2 lower left and 3 lower right. A region is cut into 30 sub-images of
19 rows x 25 columns (5 rows by 6 columns of sub-images, numbered row by
row). From the previous frame, only the centre pixel of each sub-image is kept
(row 9, column 12, counted from 0). This is its *representative point*. For
the current frame, every pixel (r,c) of sub-image k gives
`|pixel_t(k,r,c) - rp(k)|`. Summing over the 30 sub-images gives a 19 x 25 SAD
matrix. Its minimum lies where the background pixels that matched the centres
have moved. The LMV is that position minus the centre (9,12).

The windowing front end has two parts:

* `window_addr` turns (region, sub-image, row, column) into frame
  coordinates: `x = 6 + 150 (g mod 2) + 25 (k mod 6) + c` and
  `y = 5 + 95 (g div 2) + 19 (k div 6) + r`.
* `rpm_sad` holds the 30 representative points and returns the 8-bit absolute
  difference for the pixel the chip asks for.

The host writes the 30 representative points of a region, sets `region` and
pulses `start`. It then answers each request, naming the pixel by `pix_x` and
`pix_y`, with the current-frame pixel on `pix`. After `finish` it reads the
position. Repeating this for the four regions gives the four LMVs of a frame.

## The array and its analog signal path

Each `processing_unit` is a chain of four parts:

1. **Selection.** The unit is written only while both its row line `vx[r]` and
   its column line `vy[c]` are high. The controller raises exactly one of each,
   so a single DAC and a single input line serve all 475 units.
2. **LAM** (`lam_cell`). A capacitor behind a transmission gate. `vrst`
   discharges every LAM at the start. Before loading, the selected LAM is
   pre-charged to 0.65 V, the knee of the MOS capacitor. Each difference then
   adds charge in proportion to its code. The scale is 3.3 V per 1024
   difference units, so four full-scale codes fill the supply. The voltage
   clips at 3.3 V.
3. **Voltage-to-current converter** (`vcc`). 8 uA per volt above 0.65 V. The
   reliable LAM swing, 0.65 V to 3.15 V, therefore maps onto 0 to 20 uA,
   which is the span of the bias. A LAM clipped at 3.3 V gives 21.2 uA.
4. **CNN cell** (`cnn_cell`). This is a CNN cell with only a self-feedback
   weight of 2, an input weight of 1 and zero initial state:
   `dx/dt = -x + 2 f(x) + u - I_bias`, where `f` saturates at +-20 uA. Starting
   from x = 0, the state runs away in the direction of `u - I_bias` and
   saturates. The cell is thus a comparator whose output stays 1 while the
   stored SAD current exceeds the bias and drops to 0 once the bias is larger.
   The model integrates this equation with Euler steps. While the CNN switch
   is off, the output rests at 1.

The 8-bit DAC (`sad_dac`) has a synchronising input register and
binary-weighted current branches of 0.43091 uA per code. The 5-bit bias
circuit (`bias_dac`) gives `VB x 20.15/31` uA, from 0 to 20.15 uA.

### What the bias resolution means

One bias step is 0.65 uA. That is 0.081 V of LAM voltage, or about 25
difference units. The top level, 20.15 uA, corresponds to a SAD of about 782.
So:

* Two positions whose sums differ by less than about 25 can flip at the same
  level (see the tie rule below).
* A region whose smallest SAD is above about 782 finds nothing in 32 levels.
  The result is then the all-ones code, meaning the vector is not dependable.
  This is intended: such a region usually holds a large moving object or
  deliberate panning.

## Global output connected chains and decoding

`global_chain` gives every unit two AND gates. One combines the unit's CNN
output with the chain arriving from its left neighbour; the other combines it
with the chain arriving from above. The right end of row r is therefore 0
exactly when some unit in row r has flipped, and the bottom end of column c
likewise. This takes 19 + 25 wires and no clock cycles.

`location_decoder` reports the lowest-numbered marked row and the
lowest-numbered marked column. **Ties:** the row and the column are resolved
separately. If units (2,20) and (15,3) flip at the same level, the reported
position is (2,3), which is neither of them. This is a property of row/column
chains, not an error in the decoder. The end-to-end testbench exercises this
case on purpose. A finer bias (more levels) makes it rarer.

## Controller and timing

`ascnn_controller` has eight states: IDLE, INIT, PRE, LOAD, REST, BIAS,
CHECK and DONE.

| Phase | Cycles (default) | Signals |
|---|---|---|
| INIT | 2 | `vrst`: every LAM and the input line discharged |
| per unit, raster order (row 0 left to right, then row 1, ...) | 65 | |
| PRE | 2 | unit selected, `pre` |
| LOAD | 30 x 2 | `dac_en`; one difference per 2-cycle slot |
| REST | 3 | no unit selected, input line reset |
| BIAS / CHECK, per level | 1 + 1 | new `vb` with CNN off, then `cnn_sw` on and the chains sampled |

Loading takes 2 + 475 x 65 = 30,877 cycles. The search takes 2 cycles per
level, at most 64. At 20 MHz that is 1.547 ms per region, and 6.19 ms for
the four regions of a frame, representative-point writes included. This fits
easily in the 25 ms of a 40 Hz frame.

**Sample handshake.** `load_en` (`pix_req` on the top) is high in the cycle
whose closing edge captures `din` into the DAC register. That is the cycle
before the sample's slot, so every code drives the line for exactly its two
cycles. During that cycle, `ld_row`/`ld_col`/`ld_sub` name the wanted sample. On
the top they become the frame coordinates `pix_x`/`pix_y`, and the host must
present the pixel combinationally.

**Results.** `axis_x` is the 0-based row (0..18) and `axis_y` the 0-based
column (0..24). Both read 31 from reset, from every `start`, and after a
fruitless search. `vb` keeps the level at which the minimum was found.
`finish` stays high until the next `start`. A `start` in any state abandons
the current operation and begins a new one. `rst_n` is an asynchronous,
active-low reset.

Two assertions in the controller check that exactly one row and one column
are selected while loading, and that the CNN switches are never on during
loading.

## Files

| File | Contents |
|---|---|
| `rtl/ascnn_pkg.sv` | sizes, failure code, controller state type |
| `rtl/ascnn_lmv_top.sv` | top: `window_addr` + `rpm_sad` + `ascnn_chip` |
| `rtl/ascnn_chip.sv` | controller, DAC, 19x25 units, chains, decoder, bias |
| `rtl/ascnn_controller.sv` | FSM, one-hot addressing, bias counter, result registers |
| `rtl/global_chain.sv`, `rtl/location_decoder.sv` | row/column AND chains and their decoder |
| `rtl/window_addr.sv` | frame coordinates of a requested sample (crop, region, sub-image) |
| `rtl/rpm_sad.sv` | representative-point buffer and absolute difference |
| `rtl/processing_unit.sv`, `rtl/lam_cell.sv`, `rtl/vcc.sv`, `rtl/cnn_cell.sv` | behavioural models of the analog unit |
| `rtl/sad_dac.sv`, `rtl/bias_dac.sv` | behavioural models of the 8-bit and 5-bit current DACs |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ascnn_chip_full.sv` | the chip at full size on a test-frame difference matrix |
| `tb/tb_lmv_frame.sv` | one whole frame: four regions, a moving object, the 40 Hz budget |
| `tb/tb_ascnn_ref_pkg.sv` | independent reference model and synthetic scene for the chip and top testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/ascnn_pkg.sv tb/tb_ascnn_lmv_top.sv \
  --top-module tb_ascnn_lmv_top -o sim && ./obj_dir/sim
```

* `tb_ascnn_lmv_top` runs the top at its full default size. It builds a
  textured frame, shifts it by a known motion and adds noise. It then checks
  four operations against a reference model: two shifted frames (the motion is
  recovered exactly), a restart in the middle of loading, a frame with no
  match (all-ones code) and a frame with two equal matches (tie rule). It also
  checks the 30,877-cycle loading time and the search time. It counts how
  often the bias was raised, a minimum was found, a result was not dependable,
  a LAM saturated, a restart happened and a tie occurred, and fails if any
  count is zero. It needs about 2 minutes to build and under a minute to run.
* `tb_lmv_frame` runs the four regions of one frame back to back, as the
  host would. The background moves by (4,-3) pixels; a large object moving by
  (-5,6) covers the lower-left region. It checks the three background LMVs,
  the object's LMV in region 2 and the frame time (about 6.2 ms at 20 MHz). It
  takes about as long as `tb_ascnn_lmv_top`.
* `tb_ascnn_chip_full` runs the chip alone at its full size on a difference
  matrix shaped like the chip's own test frame. The smallest sum, 89, sits at
  row 5, column 3 (0-based), and 109 sits just above it. It checks all 475 LAM
  voltages after loading, the level at which the search stops and the
  position, although the two sums are only 20 apart in the same column. It
  runs in about 15 seconds after a 2-minute build.
* `tb_ascnn_chip` runs the chip on a 5 x 6 array with 4 sub-images and
  several scenarios, including random ones.
* The block testbenches check each module alone. The controller testbench
  checks the request order, the one-hot selection and the cycle budget.

## Where this model departs from the silicon

* **The analog parts are idealised.** The DACs are exactly linear, and the LAM
  is a linear capacitor without leakage or charge sharing. The converter is a
  straight line, the bias steps are equal and the unity-gain bias buffer is
  omitted. The scale factors come from the design's charge budget (3.3 V per
  1024 units; 32 levels over the 0.65 V to 3.15 V swing). They were not fitted
  to transistor-level results, so the level at which a given SAD is found is
  not the one the silicon shows. For instance, a SAD of 89 is found at level 3
  here rather than at a level in the low twenties.
* **The converter's current above 3.15 V** continues past 20 uA up to
  21.2 uA. The original text describes this part inconsistently. The
  continuation was chosen so that a saturated memory never wins, which the
  "not dependable" result needs.
* **Choices made where the original is silent:**
  * the eight state names and the 2-cycle reset phase
  * the order pre-charge, load, rest within a unit
  * the one-cycle-early `load_en`
  * the lowest-index tie rule
  * the output of the CNN cell while switched off
  * the host's pixel-read interface on the top
  * how the crop is split between the sides of the frame, and the numbering
    of regions and sub-images
* **Not included:** the scan chain and the analog unity-gain buffer. The
  stabilization steps after the LMVs are also outside this design. These are
  the reliability test on the SAD curves, the choice of the global motion
  vector and the compensating vector. They run on a host processor. Their constants are not fixed by the
  original either.
