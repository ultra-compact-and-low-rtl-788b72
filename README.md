# Pixel-level time converters for SPAD image sensors

A time-resolved single-photon imager needs one time measurement per pixel:
each pixel's SPAD fires when a photon arrives, and the pixel must turn the
interval between that pulse and a laser-synchronous STOP signal into a
number, for every pixel in parallel and every frame. This RTL models three
compact ways of doing that inside a 50 µm pixel. Each comes as a 32 x 32 array:

| Array | Idea | Code | LSB (default) | Range |
|---|---|---|---|---|
| **RO-TDC** (`ro_tdc_array`) | a local 4-stage ring oscillator runs from photon to STOP; its period count and frozen phase give the time | 7 + 3 bit | 52 ps (one stage delay) | 1024 LSB ≈ 53 ns |
| **TDC-EC** (`tdc_ec_array`) | a 280 MHz global clock, doubled in the pixel, counts coarse time; a 16-tap delay line measures the photon-to-first-edge fraction | 6 + 4 bit | 1/32 of 3.57 ns ≈ 111.6 ps | 1024 LSB ≈ 114 ns |
| **TADC** (`tadc_array`) | a current charges a capacitor from photon to STOP (TAC); an in-pixel copy of the ramp, stepped by global CNT pulses, digitises the voltage against a global Gray-code counter | 6 bit Gray | 160 ps | 64 LSB ≈ 10.2 ns |

`tdc_tac_top` puts the three arrays side by side, each with its own ports,
so that they can be compared. In silicon they were three separate chips with
the same front-end and readout.

All three measure in *reverse start-stop*. The photon starts the converter
and the next STOP edge stops it. A STOP edge before the photon is ignored, and
so is any later photon in the same frame. A pixel with no photon reads 0.

## What is logic and what is a model

The converters are mixed-signal. Their digital parts are synthesizable
SystemVerilog: counters, coders, memories, arming latches, controllers and
readout. The analog parts are **behavioural models** written with `#` delays
and `real` voltages. They simulate, but they do not synthesize. Each model
says so in its first comment:

| Model | Stands for |
|---|---|
| `ring_osc` | the 4-stage differential ring oscillator with its bias-controlled delay |
| `delay_line` | the 16-tap differential delay line |
| `freq_doubler` | the clock doubler in the pixel |
| `tac_stage` | a current-source/capacitor ramp (Stage1, Stage2, StageREF) |
| `tadc_comparator` | the pixel comparator |

Three parts are left out entirely. The SPAD and its quenching circuit become
the `*_spad` input ports. The 280 MHz PLL becomes the `ec_ck` port. The
chip-level readout chain and pads become the row-select column buses.

## RO-TDC: counting ring periods and reading the ring phase

`ro_tdc_pixel` is made of the following parts:

- **`start_stop_latch`** turns the SPAD pulse and STOP into `run`, which is
  high from the photon to the next STOP edge.
- **`ring_osc`** has four stages. The last stage feeds back with inverted
  polarity, so the node levels step through eight states per period, one per
  stage delay: 0000, 0001, 0011, 0111, 1111, 1110, 1100, 1000, with node 0 as
  bit 0. This is a Johnson sequence. When `run` falls, the state freezes.
- **`coarse_counter`** (7 bit) counts falling edges of the last node. Those
  edges come exactly once every 8 stage delays, at the step where the state
  returns to 0000.
- **`johnson_coder`** maps the frozen state to the 3-bit step within the
  period. The mapping is the number of ones on nodes 0..2, plus 4 and
  complemented when node 3 is high.

Together, `{coarse, fine}` is the number of stage delays that elapsed. With
four stages, a power of two, this is a plain binary number and needs no
correction. The counter wraps after 1024 LSB.

**Calibration.** All rings share a bias code `tune`. In `ring_osc` the code
scales the stage delay by `1 - 0.01·(tune - 32)`; it stands for the gate
voltage of the NMOS tail-current transistors. `ro_calib` keeps the resolution
fixed against process and supply drift. It works as follows:

1. It runs a replica ring for `CAL_WINDOW` cycles of `clk_ref`.
2. It stops the ring and waits two settling cycles.
3. It compares the number of ring periods with `TARGET`, which is
   `CAL_WINDOW·T_ref / (8·TD_TARGET_PS)`.
4. It steps `tune` up by one if the count is short, or down by one if it is
   long, and flags `cal_locked` when the count is within 1 %.

This is a frequency-locked bang-bang loop. Each iteration takes
`CAL_WINDOW + 4` reference cycles. The hardware it stands for locks the mean
delay of the whole array; a replica ring is this design's simplification of
that.

The hysteresis output stage that keeps a frozen ring from going metastable is
not modelled, so the frozen state is always a clean one.

## TDC-EC: clock count plus delay-line interpolation

In `tdc_ec_pixel`, `ck` is doubled to `ck2x`, which runs at 560 MHz with a
period of 1.786 ns. The pixel then works in this order:

1. The SPAD pulse sets `started` and sends an edge down `delay_line`, where
   tap *i* toggles after (*i*+1) tap delays.
2. A flip-flop on `ck2x` raises `fine_stop` at the first `ck2x` edge after
   the photon. This opens the switches of the line and freezes its
   thermometer code.
3. `thermo_coder` counts the toggled taps, saturated at 15, to give the 4-bit
   fine value.
4. `coarse_counter` (6 bit) counts the following `ck2x` edges until the next
   STOP edge.

The tap delay is 1/16 of the `ck2x` period, so the code is

    code = {coarse, fine} = (last ck2x edge before STOP − photon) / (T_ck2x / 16)

STOP should therefore arrive shortly after a clock edge. That holds when the
laser is synchronous to the clock. The error is the STOP-to-previous-edge
time.

## TADC: time to voltage, then a single-slope ADC in every pixel

`tadc_pixel` has two identical signal ramps that take turns, frame by frame:

- **Acquisition.** `tac_aec_selector` steers the EVENT pulse to the stage
  that is acquiring (`acq_sel`).
  - In TAC mode the stage charges from the first photon to the next STOP
    edge, so its voltage is proportional to the arrival time.
  - In AEC mode (`mode_aec = 1`) the stage charges for the length of every
    event pulse. It then accumulates a voltage proportional to the number of
    events, for time-uncorrelated intensity imaging. The charge per event is
    set by the event pulse width that the front-end delivers.
- **Conversion** (during the next frame). The other stage (`conv_sel`) drives
  the + input of the comparator. The in-pixel reference ramp StageREF drives
  the − input. `tadc_ctrl` broadcasts to the whole array:

      CLR      reset StageREF, clear memory word conv_sel, clear the Gray counter
      CNT      one clock-long CNT pulse: every StageREF rises by one LSB step
      SAMPLE   pixels whose comparator still reads 1 copy GCC into the memory
      (CNT, SAMPLE) x 63   -> 127 clock cycles per conversion

  When the reference passes the stored voltage the comparator drops, and the
  memory keeps the last code. That code is the largest *k* with
  V_signal > k·V_step, which is ⌊t / 160 ps⌋ clipped to 63.
- **Readout** (the frame after that). `rd_sel` points at the memory word that
  the previous conversion wrote.

GCC is a Gray code, so a pixel that latches during a bus transition is at
most one code off. Readout is in Gray code; decode it with
`tdc_pkg::gray2bin`.

Mismatch cancels because the reference ramp is a copy of the signal ramp in
the same pixel. In the model this appears as the reference slope being
derived from the signal slope. The slope is scaled by 160 ps / `CNT_PULSE_PS`
so that one CNT pulse equals one LSB. **`CNT_PULSE_PS` must equal the
period of `clk`**; the top takes it as `CLK_PERIOD_PS`, default 5000 ps
(200 MHz). At 200 MHz a conversion takes 0.64 µs, which fits a 1 µs frame.

## Frames, double buffering and readout

Every pixel has two result words (`pixel_dual_mem`).

- **TDC arrays.** `tdc_frame_ctrl` answers `frame_end` in two steps: it
  stores all codes into bank `wbank`, then on the next cycle it clears the
  converters and swaps the banks. From then on `rbank` names the bank that
  holds the frame just finished. That bank can be read out while the next
  frame is acquired.
- **TADC array.** `frame_start` swaps the stage roles and starts the
  conversion.

For readout, `row_addr` selects a row and its pixels drive the column buses
`col_data`. Reading one row is combinational.

The converters clear on the rising edge of their clear signal, so the
controllers issue one clear pulse in the first cycle after reset. Leave
about four clock cycles after reset before the first photon.

## Departures and choices to be aware of

- **TADC width.** The TADC uses 6-bit Gray codes and 6-bit memories. One
  drawing of the original circuit shows an 8-bit bus and 8-bit memories,
  while its description and performance figures give 6 bits. 6 bits were
  used.
- **TADC range.** Sixty-four 160 ps steps cover 10.2 ns. The original quotes
  both a 20 ns time range and a 25 ns STOP period. Reaching those would need
  a smaller ramp slope: `LSB_PS`, or a larger reference capacitor.
- **TDC-EC LSB.** The TDC-EC LSB is an ideal 111.6 ps. The measured device
  reports 119 ps.
- **RO-TDC LSB.** The RO-TDC default LSB is 52 ps. The measured device
  reports 178 ps or 52 ps depending on the operating point, and
  `TD_TARGET_PS` selects it.
- **Ripple counters.** They are written as synchronous counters clocked by
  the same signal. The value is the same once the ripple has settled.
- **Design-specific choices.** The following are this design's own: the
  start/stop arming latch, the freeze flip-flop of the TDC-EC, the memory
  write timing, the frame controllers, the TADC conversion sequence, the
  calibration loop's algorithm, and the row-select readout.
- **Models are ideal.** They have no mismatch, no jitter and no
  nonlinearity. The measured DNL/INL and jitter of the real circuits are not
  represented.
- **No valid flag.** "No photon" and "photon exactly at STOP" both read 0,
  and codes wrap past full scale in the two TDCs.

## Simulating

Every file starts with `timeunit 1ps; timeprecision 1fs;`. The timing models
need `--timing`. Read the package first, and let Verilator find the other
files by module name:

    verilator --binary --timing --assert -y rtl -y tb rtl/tdc_pkg.sv tb/tb_tadc_pixel.sv \
              --top-module tb_tadc_pixel -o sim
    ./obj_dir/sim

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a
watchdog that counts a failure if the test hangs. The testbenches compute
expected codes from the photon and STOP times they generate, not from the
RTL.

| Testbench | Covers |
|---|---|
| `tb_<block>` | each block alone: coders, counters, memories, models, controllers, pixels |
| `tb_ro_tdc_array`, `tb_tdc_ec_array`, `tb_tadc_array` | 4 x 4 arrays over several frames. The RO-TDC rings are 10 % slow, so the calibration loop must lock first. |
| `tb_tdc_tac_top` | all three arrays at 8 x 8 through complete frames |
| `tb_tdc_tac_top_full` | the same at the full 32 x 32 with no parameter overrides |

`tb_tdc_tac_top` and `tb_tdc_tac_top_full` share their stimulus module,
`tdc_tac_top_stim`. Besides the per-pixel checks, it counts each mechanism
and fails if any never occurs. The mechanisms are: calibration lock, bank
swap, coarse carry, nonzero fine code, pixel without photon, ignored early
STOP, TAC and AEC modes, TADC clipping, and acquisition during conversion.

The full-size build is large: one coroutine set per pixel model, 3072 pixels
in all. Verilating it peaks at about 11 GB of memory. It then took about
7 minutes to compile the C++ and 1.5 minutes to run on one core. The 8 x 8
version builds and runs in about 20 seconds.

## Files

- `rtl/tdc_pkg.sv`: widths, the 280 MHz period, and the Gray conversion
  functions.
- RO-TDC: `ro_tdc_array`, `ro_tdc_pixel`, `ring_osc`, `johnson_coder`,
  `ro_calib`.
- TDC-EC: `tdc_ec_array`, `tdc_ec_pixel`, `freq_doubler`, `delay_line`,
  `thermo_coder`.
- TADC: `tadc_array`, `tadc_pixel`, `tac_stage`, `tadc_comparator`,
  `tac_aec_selector`, `tadc_ctrl`, `gray_counter`.
- Shared: `coarse_counter`, `pixel_dual_mem`, `start_stop_latch`,
  `tdc_frame_ctrl`, and the top `tdc_tac_top`.
