# Three-channel picosecond time interval counter

This is RTL for a time interval counter with three input channels. It is meant for a small, low-power FPGA (a Spartan-7 class device). Every rising edge on an input gets a timestamp. Each timestamp has a 40-bit count of main-clock periods (300 MHz, about one hour before it wraps) and a 14-bit fraction of a period (3.33 ns / 2^14, about 0.2 ps per unit). A time interval is the difference of two timestamps. They can come from the same channel (burst mode) or from two channels (start-stop mode).

The fraction comes from a **two-stage interpolator**:

1. The **first interpolation stage (FIS)** decides whether the event fell in the first or the second half of the clock period. It then produces a clean `phase` edge on a clock edge of matching polarity.
2. The **second interpolation stage (SIS)** measures the rest of the interval with tapped delay lines. Because the first stage already settled which half of the period the event is in, the SIS only needs to cover about half a period (about 2 ns).

A **code processor** compresses the raw delay-line data into a single code. It turns that code into time through a table in block RAM, and it rebuilds that table itself by a **statistical code density test (SCDT)**.

## Timestamp arithmetic

With `N_eff` the number of the rising clock edge that follows the event:

```
TS = N_eff * 2^14 - table[{phase180, code}]        (units of T_CLK / 2^14)
```

The table entry is `T_FIS + T_SIS`: the time from the event back to that clock edge.

- For events caught by the 0 degree (rising-edge) synchroniser it is just the SIS time.
- For events caught by the 180 degree synchroniser it also contains the measured length of the 0 degree half period.

The calibration measures both halves, so a clock whose two half periods differ by a few percent is handled with no extra step.

The period register latches its count one main-clock cycle later when the 0 degree synchroniser answers. `code_processor` subtracts one in that case (`N_eff = N - 1` when `t_fis = 1`).

## First interpolation stage (`fis.sv`)

The stage has two double synchronisers: one on the rising and one on the falling edge of the main clock. In each one, the second flip-flop stores the inverse of the first, so an idle synchroniser outputs 1 and `phase = NAND(outputs)` is 0.

- The synchroniser whose clock edge comes first after the event drops its output one period later. That raises `phase` 1 to 1.5 clock periods after the event.
- Through a clock enable, the winner freezes the other synchroniser's second flip-flop.
- `t_fis` is the falling-edge synchroniser's output: 1 means 0 degrees, 0 means 180 degrees.

Only the second flip-flop of each synchroniser is gated. The first keeps following the event. This way, when the event input drops, both synchronisers return to idle without a stray `phase` edge. The conversion controller also clears the stage asynchronously to shorten the dead time.

## Second interpolation stage and wave-union lines (`sis_tdl_model.sv`, `tdc.sv`)

Each TDC has four independent delay lines of 148 carry-chain stages. In the FPGA these are carry multiplexers, and the `phase` edge captures all taps at once.

The first 20 stages of each line form a **wave-union launcher**. While idle, taps 0..18 are high and the rest are low. The event toggles the first and the last launcher stage. A 0 front then starts at tap 0 and a 1 front at tap 19, so a pulse of about 19 ones travels up the line. The leading edge has 128 taps, about 2 ns at 16 ps per stage.

Each captured line holds two edges, so four lines give eight edges per measurement. That is roughly eight times the resolution of a single line with one edge.

A delay line is a timing element, not logic. `sis_tdl_model` is therefore a **behavioural model** and is not synthesizable:

- Stage delays are drawn once per instance, uniformly from 8 to 24 ps (mean 16 ps).
- Each tap has up to ±6 ps of fixed skew, which creates the bubbles that real carry chains show.
- `OFFSET_PS` removes the fixed one-period latency of the FIS. The default suits a 3334 ps clock; change it together with the clock period.

For an FPGA build, replace the model with a carry-chain primitive line that has the same ports. That primitive is vendor-specific and is not included.

## Encoder: bubbles and two edges per line (`sis_encoder.sv`)

Bubbles (isolated wrong bits near an edge) never span more than 4 neighbouring taps. So each 148-tap line is read as four **sub-lines** of 37 taps each: taps j, j+4, j+8, … Every sub-line is then a clean `0…0 1…1 0…0` pattern.

Each sub-line has two priority encoders:

- **From the LSB side:** counts the zeros below the first one. This is the 0-1 edge.
- **From the MSB side:** counts the zeros above the last one. That count is subtracted from 37, which gives the 1-0 edge.

Both values grow with the measured interval. All 32 partial results (4 lines × 4 sub-lines × 2 edges) are summed into one 11-bit code (0..1184). The encoder has two register stages.

Worked example (one 32-tap line, 4 sub-lines of 8 taps):

- Register, tap 1 first: `0000 1010 1111 1110 0010 0000 0000 0000`
- LSB-side partial results: 1, 2, 1, 2, so R = 6
- MSB-side partial results: 8−4, 8−4, 8−3, 8−5, so F = 16
- Code = 22

`tb_sis_encoder` checks this example.

## Calibration by code density (`scdt_calib.sv`)

During calibration each channel measures a square wave that has no relation to the main clock. Events then fall uniformly over the period, and the share of events that produce a code equals the width of that code's bin.

The engine works in three passes:

1. Clear a histogram of 4096 counters (1 phase bit + 11 code bits, 21 bits each).
2. Count `CAL_SAMPLES` = 2,000,000 events.
3. Walk the histogram once, 0 degree codes first, writing for each address `(count below + count/2) / CAL_SAMPLES × 2^14`. This is the centre of the bin. The division is a multiplication by a reciprocal that is fixed at elaboration.

Calibration runs once after reset and again whenever `cal_req` pulses. While it runs, the input selector feeds the calibrator signal to the channel and no timestamps are produced. For 6 system cycles after it ends, captured events are discarded, so that one latched from the calibrator is not reported.

At 2 million samples the bin boundaries have a statistical error of about 1 ps rms. In simulation of the full-size design, intervals came out with 2.6 ps rms error against the ideal, with the random 8–24 ps delay elements above.

## Channel and clocks (`tic_channel.sv`, `conv_ctrl.sv`, `tic_top.sv`)

Per channel, the signal path is:

- `input_circuit` → `tdc` (FIS + 4 lines)
- `period_register` → `code_processor` → `ts_fifo`

`tic_top` adds one shared `period_counter` and the start-up calibration pulse.

The design uses two clocks:

- **`clk_main` (300 MHz):** drives the period counter, the period registers and the FIS. The SIS is clocked by `phase`.
- **`clk_sys` (100 MHz):** drives everything else. The two clocks are treated as asynchronous.

`conv_ctrl` synchronises `phase` into `clk_sys` with two flip-flops. When it sees `phase` high, all interpolator results are stable, and it:

- hands them to the code processor in that same cycle,
- pulses `clear` for one cycle, which resets the input flip-flop and the FIS,
- ignores the synchroniser for two cycles, while it still shows the old `phase`.

**Dead time** from an event until the channel is armed again is 33–45 ns, depending on where the event falls relative to the clocks. A timestamp reaches the FIFO about 8 system cycles after the event.

## Interfaces

| port (tic_top) | dir | meaning |
|---|---|---|
| `clk_main`, `clk_sys`, `rst_n` | in | 300 MHz, 100 MHz, asynchronous active-low reset (assert it with a falling edge) |
| `meas_in[2:0]` | in | measured signals, rising edges are timestamped |
| `cal_in` | in | calibrator square wave |
| `cal_req` / `cal_busy` | in / out | request a calibration (one `clk_sys` pulse) / calibration running |
| `rd_en[c]`, `rd_data[c]`, `rd_valid[c]` | in / out / out | per-channel FIFO read; data valid the cycle after `rd_en` with `empty` low |
| `empty[c]`, `overflow[c]` | out | FIFO empty; sticky flag set when a timestamp was lost to a full FIFO |

`rd_data` is `{periods[39:0], fraction[13:0]}` read as one 54-bit number, in units of T_CLK/2^14. The host interface, the synthesiser that makes the clocks and the calibrator circuit are outside this RTL.

## Parameters

All sizes are in `tic_pkg.sv` and can be overridden per module.

- **Defaults taken from the described design:** 3 channels, 40-bit counter, 4 lines × 148 taps, 20-stage launcher, sub-line step 4, 14-bit fraction, 2 million calibration samples.
- **This design's own choices:** the FIFO depth (512), and the timing details of the controller and the pipeline.

## Where this departs from the described device, or fills gaps

- **Delay lines:** behavioural models (see above). Delay values, skew and path offset are invented.
- **FIS clock enables:** gated as described in the FIS section above. The asynchronous clear of the FIS is this design's own addition.
- **Period register:** the clock enable is an edge detect on `phase`.
- **Transfer table:** uses bin centres and stores `T_FIS + T_SIS` in one lookup.
- **Dead time:** 33–45 ns against the ~40 ns of the original. A strict 40 ns spacing (25 MSa/s) is therefore not guaranteed for every clock phase; 45 ns spacing is.
- **FIFOs:** one per channel, each with its own read port; there is no merge into a single host stream.
- **Not included:** the host (USB) controller, the synthesiser and calibrator controllers, XADC, the analog front end, and the option to use an input as an external trigger.
- **Noise:** the delay-line models have no jitter, supply noise or temperature drift. The simulated spread therefore shows only quantisation and calibration error; on hardware, clock jitter and noise add to it.

## Simulating

Each module has a self-checking testbench in `tb/` that ends with a `TB_RESULT checks=… failures=…` line. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tic_top \
          -y rtl -y tb +libext+.sv rtl/tic_pkg.sv tb/tb_tic_top.sv
./obj_dir/Vtb_tic_top
```

The end-to-end testbenches are:

- **`tb_tic_top`:** 32k calibration samples and 16-word FIFOs; a few seconds. It covers start-up and requested calibration, both FIS phases, burst and start-stop intervals, a pulse lost in the dead time, pulses 60 ns apart, and FIFO overflow.
- **`tb_tic_top_full`:** the same sequence with every parameter at its default (2 million calibration samples); about 5 minutes.
- **`tb_tic_precision`:** repeats fixed intervals at random clock phases, as in a precision measurement: 1 ns start-stop, 1 µs and 100 µs in both modes. It requires a standard deviation below 8 ps; the models give 1.5–2.5 ps. Calibration uses 262,144 samples; the run takes about 30 s.

Timestamps are checked against the known pulse times within 45 ps (`tb_tic_top`) and 20 ps (`tb_tic_top_full`).
