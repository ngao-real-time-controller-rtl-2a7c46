# NGAO real-time controller: tomography engine and wavefront-sensor front end

An adaptive-optics system measures the atmosphere's turbulence with several
wavefront sensors looking at different guide stars, estimates the turbulence
in a few thin layers (atmospheric tomography), and projects the estimate
onto the science direction to drive deformable mirrors. This must happen
2,000 times a second. This RTL implements the parts of such a real-time
controller that are built as FPGA logic:

* the **tomography engine**: a three-dimensional systolic array of simple
  complex multiply-accumulate processing elements (PEs), one per voxel
  (sub-aperture x layer). All PEs run one program from a cycle-accurate
  sequencer. A frame controller starts the iterations on the frame clock and
  stops them on convergence, at an iteration limit, or when too little of the
  frame is left.
* the **woofer/tweeter split** around the engine: a low-pass stage makes the
  woofer (large-stroke mirror) wavefront from the science wavefront, a
  one-frame delay feeds it back into the sensor inputs, and the tweeter DM
  data is the science wavefront minus the woofer wavefront.
* the **wavefront-sensor front end**: dark/background correction,
  threshold, weighted 4 x 4 pixel centroids, reference subtraction, and
  tip/tilt extraction.
* **frame timing** and **frame-synchronous control registers**.

Processors, GPUs, cameras and analog electronics are outside. Their signals
are ports of the top level `ngao_rtc_top`. These outside parts are the
control processor, the wavefront reconstructors, the stage that combines
layers into the science wavefront, the DM and tip/tilt command generators,
and the chip-to-chip links.

All files are SystemVerilog 2017. The RTL is in `rtl/`, one module or package
per file. There is one self-checking testbench per module in `tb/`.

## Number formats and streams

* Data words are 18-bit signed (`te_pkg::word_t`). Accumulators are 48-bit
  signed (`acc_t`), as in an FPGA DSP slice.
* A complex number travels over one 18-bit path on two clocks: the real part
  first, then the imaginary part.
* Tomography streams are one word per array row per clock. A wavefront of
  NX columns is 2*NX words per row when real and imaginary parts alternate.
* Centroids are signed with 8 fraction bits (pixel units x 256).
* Low-pass weights are unsigned Q2.16 (65536 = 1.0). The bit select that
  turns an accumulator back into a word is an arithmetic right shift by
  `shift` bits followed by saturation to 18 bits.

## The processing element (`te_pe`, `te_macc`, `te_coef_ram`)

This is the part that takes the most explanation.

Each PE holds one complex value in two registers:

* `out_q` is what the neighbours see.
* `delay_q` sits behind it.

Every clock, a common control word chooses three things:

* **Input source**: the horizontal neighbour (x-1), the vertical
  neighbour (y-1), the same PE in the previous layer, or zero. The
  data-path source can instead be the PE's own output (loopback) or the
  constant 1.
* **Output switch**, with four codes:
  * `00` pass: one register per hop, so a word moves one PE per clock.
  * `01` delay: two registers per hop, so a complex pair moves one PE per
    two clocks.
  * `10` write back: both accumulators are written back. The real part goes
    to `out_q` and the imaginary part to `delay_q`.
  * `11` imaginary: the imaginary accumulator goes to `out_q`.
* **MAC operations and RAM mode**.

Two MACCs share the data word as one operand:

* The **real MACC** multiplies it by RAM port A, addressed by the real
  coefficient counter.
* The **imaginary MACC** multiplies it by RAM port B, addressed by the
  imaginary coefficient counter.

Multiplying a stream `(xr, xi)` by a coefficient `C + jc` therefore takes
two table entries per input word. The RAM holds `{C, -c}` for port A and
`{c, C}` for port B, and both MACCs add. Over the two clocks this gives
`re += xr*C - xi*c` and `im += xr*c + xi*C`. With the data recirculating
around a ring of PEs and the counters stepping through each PE's own table,
every PE accumulates one output of a DFT in place. The testbenches load such
tables and check the results bit-exactly.

Other RAM modes:

* Write the data word into the RAM at counter A. This is how coefficients
  shifted in from the array's north edge are stored.
* Multiply the data by itself (squares).
* Address the RAM with the low 11 bits of the real accumulator (table
  look-up).

Timing: the RAM is read synchronously, so an operand register delays the
data word and the MAC operations by one clock. A product therefore reaches
the accumulator at the end of the clock *after* its control word. Write-back
(`10`) must come at least one clock after the last MAC operation.

## The array (`te_array`)

NX x NY x NL PEs form rings along rows, columns and layers:

* **Row ring.** The PE at x = 0 takes either the east-edge PE of its row
  (`recirc = 1`) or the west input.
* **Column ring.** The PE at y = 0 takes either the south-edge PE
  (`recirc = 1`) or the north input.
* **Layer ring.** The layer ring is always closed.

External data enters at two edges:

* Sensor wavefronts enter at the west edge and results leave at the east
  edge.
* Coefficients and other per-PE parameters enter at the north edge.
  Telemetry leaves at the south edge.

With `ssq_en` set in the control word, the array adds the squares of all
words on the east edge into a 64-bit register. During one full row
recirculation every word passes the east edge exactly once, so this is the
squared norm of the array contents: the error measure for the convergence
test. The clock where `evt` and `ssq_en` are both set marks the end of an
iteration and adds nothing.

**Size.** The full NGAO array is 88 x 88 x 5. The extended aperture is 88
sub-apertures across, to avoid wrap-around in Fourier processing. In
hardware it is spread over many FPGAs, each holding a square sub-domain of
all layers. The defaults of `te_array`, `tomography_engine` and
`ngao_rtc_top` are one such sub-domain: NX = NY = 10, NL = 5 (500 PEs). A
netlist of all 38,720 PEs does not fit in the memory of a typical synthesis
host. The code is written for any size. The board-to-board links that would
join tiles into the full array are not part of this RTL.

## The sequencer (`te_cacs`)

The PEs have no branching. Control is a stream of 20-bit control words from
a program RAM (1024 x 24 bits). Instructions:

| bits 23..20 | meaning |
|---|---|
| `1xxx` IDLE | this instruction occupies N = data[19:0] clocks. The control word stays as it is. |
| `0001` BRANCH | if condition data[19:16] holds, jump to data[PAW-1:0]. Condition 0 = always, 1..7 = status bit set, 8 = never, 9..15 = status bit (c-8) clear. |
| `01xx` / `0x1x` LOAD | load the real (bit 22) and/or imaginary (bit 21) coefficient counter with data[10:0] |
| `0000` CONTROL | the control word becomes data[19:0] |

Timing rules for writing programs:

* Every instruction takes one clock, except IDLE N, which takes N clocks.
  Its effect is visible in the clock after it executes.
* The coefficient counters count up every clock unless they are loaded. To
  have counter A equal 0 in the clock of control word W, load 2047 in the
  instruction just before W.
* A LOAD or BRANCH instruction keeps the previous control word on the bus
  for its clock. Count that clock when sizing a load window.
* Status bits reflect an iteration end two clocks after the `evt` word is on
  the bus. Put one more instruction between the `evt` word and the branch
  that tests them.

Control word fields (`te_pkg::cbus_t`):

| bit | field |
|---|---|
| 19 | evt |
| 18 | ssq_en |
| 17 | recirc |
| 16:12 | shift |
| 11:10 | RAM mode |
| 9:8 | imaginary MAC op |
| 7:6 | real MAC op |
| 5:4 | output switch |
| 3:2 | data source |
| 1:0 | neighbour select |

The testbenches `tomography_engine_tb` and `ngao_rtc_top_tb` contain a
complete 20-word example program. It has three parts:

1. One-time setup: load a coefficient from the north edge and store it in
   every PE's RAM.
2. Wait for a frame, acknowledge it and load the sensor data.
3. Iterate until stopped: each iteration scales every PE by its coefficient,
   recirculates the rows while forming the sum of squares, signals the end
   of the iteration, and branches on CONTINUE.

## Frame control (`te_frame_ctrl`)

The frame controller and the sequencer talk through the control word and
status bits:

* **Frame start.** `frame_sync` makes a frame start pending (status
  FRAME_GO). The sequencer acknowledges it with `evt=1, ssq_en=0`.
* **Iteration end.** Each `evt=1, ssq_en=1` ends an iteration. The
  controller compares the sum of squares with `err_limit`, counts the
  iteration, and clears the sum.
* **CONTINUE.** The CONTINUE status bit is set while all of these hold:
  * the error is above the limit;
  * the count is below `max_iter`;
  * there is time left: `cycles since sync + iter_cycles <= frame_len`.
* **End-of-frame report.** At the next `frame_sync` the frame is reported on
  `ev_*`: iteration count, why it stopped, the last error, and *overrun* if
  the sequencer never acknowledged the frame.
* **Invalid state.** An invalid state of the state machine is counted,
  flagged and recovered.

## Woofer/tweeter path (`tomography_engine`, `te_lpf`, `te_frame_delay`)

* **Sensor inputs.** Sensor wavefront g enters the west edge of layer g
  (layers without a sensor get zeros). It is first added to the woofer
  wavefront of the previous frame, read from `te_frame_delay`. That block is
  a ping-pong buffer swapped at `frame_sync`, advanced by `wfs_valid`.
* **Science wavefront.** The science wavefront `sci_in` comes back from the
  external layer-combination stage.
* **Woofer wavefront.** `te_lpf` multiplies the science wavefront by one
  weight per spatial frequency. Weights can be loaded, so any low-pass shape
  works.
* **Outputs.** `woofer_out` and `dm_out = sci - woofer` follow `sci_in` by
  two clocks.

## Sensor front end (`wfs_centroider`, `wfs_tt_extract`)

**Centroider.** The camera streams 16-bit pixels in raster order, one per
clock. For each pixel, the dark and background values of that pixel are
subtracted, and values at or below a threshold become 0. For each 4 x 4
pixel sub-aperture the centroider then computes two things:

* the weighted sums `Sx = sum(wx*p)` and `Sy = sum(wy*p)`;
* the plain sum `S = sum(p)`.

The centroid is `(Sx*256/S, Sy*256/S)` minus the sub-aperture's reference
centroid. It appears three clocks after the sub-aperture's last pixel. The
4 x 4 weight sets select the algorithm:

* column or row offsets give centre of mass;
* +-1 by quadrant gives quad cell.

**Tip/tilt extraction.** `wfs_tt_extract` stores a frame of centroids and
averages x and y over the sub-apertures in a valid mask. That gives tip and
tilt. It then replays the stored centroids with tip/tilt removed, one per
clock.

## Timing and registers (`rtc_timing`, `rtc_param_bank`, `ngao_rtc_top`)

**Frame timing.** `rtc_timing` makes `frame_sync` every 50,000 clocks
(100 MHz / 2 kHz), or follows an external frame clock. It also makes a
low-order pulse every 8th frame (250 Hz), a frame number and a phase counter.

**Registers.** `rtc_param_bank` double-buffers the control registers.
Writes land in a shadow copy, which becomes active at the next
`frame_sync`. A write in the same clock as `frame_sync` waits one more
frame. The top's register map:

| register | contents |
|---|---|
| 0 | bit 0: sequencer run; bit 1: use the external frame clock |
| 1, 2 | error limit, low and high 32 bits |
| 3 | iteration limit |
| 4 | clocks per iteration |

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. Example:

    verilator --binary --timing -Irtl -y rtl --top-module ngao_rtc_top_tb \
        rtl/te_pkg.sv tb/ngao_rtc_top_tb.sv && obj_dir/Vngao_rtc_top_tb

`-y rtl` lets verilator find each module in the file of the same name; the
package is listed first. Sizes simulated:

* `rtc_timing_tb` runs at full size: 50,000-clock frames.
* `wfs_centroider_tb` uses a 16 x 16 camera.
* `te_array_tb` uses a 5 x 4 x 3 array.
* `tomography_engine_tb` uses a 4 x 3 x 3 array with 2 sensors.
* `ngao_rtc_top_tb` uses a 4 x 3 x 3 array, 2 sensors, an 8 x 8 camera with
  4 x 4-pixel sub-apertures and 400-clock frames. This is the largest size at
  which the whole design was simulated.

No testbench runs the top level at its default size (a 10 x 10 x 5 tile, four
256 x 256 cameras, 50,000-clock frames); at that size it was checked by lint
and elaboration. Its synthesis takes more than ten minutes and about 1 GB;
a 4 x 4 x 3 array with 16 x 16 cameras synthesizes in under two minutes.

## Limits and departures

**Not built:**

* The full 88 x 88 x 5 array is not built as one netlist. Neither are the
  chip-to-chip serial links that would join the tiles.
* The wavefront reconstructors, the layer-combination stage, the DM and
  tip/tilt command generators, and the control processor are outside. The
  design document gives their function but no logic, or places them on
  processors.

**Departures from the design document:**

* The complex arithmetic uses two adding MACCs and a `{C,-c}/{c,C}` table
  instead of the document's coefficient layout. Bit select saturates.
* Each frame starts from freshly loaded sensor data. The document also
  describes continuing a frame that has not converged into the next one. The
  frame controller does not carry state over; a program could do it by not
  loading new data.
* Piston is not removed from centroids (it has no meaning for slopes).
  Offsets other than reference centroids are not applied.

**Throughput limits:**

* One pixel per clock at 100 MHz is 65,536 clocks for a 256 x 256 frame.
  That is more than the 50,000 clocks of a 2 kHz frame, so a full-rate
  camera needs a faster pixel clock or two pixels per clock (not built).
* `wfs_tt_extract` needs the replay of one frame (4,096 clocks) to finish
  before the next frame's centroids arrive.

**Untested:**

* The invalid-state recovery of the frame controller is not exercised by a
  testbench. It cannot be reached without forcing the state register.
