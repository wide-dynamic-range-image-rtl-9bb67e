# Digital-pixel readout with adaptive integration window

This is the digital part of a 16 × 16 image-sensor readout in which every pixel
holds its own analog-to-digital converter. There is no analog column readout.
Each pixel turns its photocurrent into a count of equal charge packets. At the
end of the frame, all the counts are shifted out of the array as one long
shift register.

The count is bounded by a 10-bit counter, which limits the dynamic range. To
go past that limit, every pixel chooses between two integration windows:

- **T1** is a short window.
- **T2** is a long window, typically about 1000 × T1.

A pixel that is already bright at the end of T1 stops there. It marks its word
with a flag bit. All other pixels keep counting until T2.

After a ratio correction, dim pixels have the resolution of the long window,
while bright pixels do not saturate. A receiver-side calibrator then removes
the gain spread between pixels (fixed-pattern noise).

Everything that is logic is written as SystemVerilog:

- the pixel's digital cell;
- the array;
- the timing generator;
- the configuration scan chain;
- the output stage;
- the calibrator.

The analog front end is not logic. For simulation it is a behavioural model in
`tb/`. In the RTL it connects through two signals per pixel.

The architecture follows the description of a 16 × 16 prototype chip in 65 nm CMOS, including its block diagrams and measured results. Below, "the original" refers to that description, and "the measured chip" to its test results. The places where this RTL departs from the original, or fills in what it leaves open, are listed at the end.

## How a pixel digitises light

The analog part of a pixel works as follows:

- The photodiode current discharges an integration node (FD).
- When the voltage on FD crosses a threshold, the comparator goes high (`comp`).
- A reset transistor then puts FD back to its starting voltage.

In other words, the front end is a charge-balancing oscillator. For a photocurrent `I` and a charge `Q` per trip, it fires about once every `Q/I` seconds. The digital cell (`pixel_cell`) reacts to each trip as follows:

1. **`pulse_gen`** turns the comparator edge into a pulse of fixed width, 0.3 ns by default. That pulse does two jobs:
   - It resets FD, through `fd_rst`.
   - It clocks the counter.

   The fixed width means the counter always gets a clean clock, however briefly the comparator itself stays high. The pulse is made by a flip-flop that clears itself through a delay line. For that reason this one module is a behavioural model: its width is a `#` delay, not logic.
2. **`counter_shift`** is a 10-bit counter clocked by the pulse.
3. **`itcu`** (integration time control unit) decides the window. It has two stages:
   - A latch is set by the first trip after the frame reset.
   - At `INT_CLK`, the end of T1, the latch is copied into the window flag `win_t1`.

   If the flag is set, the pixel has stopped. The cell then does three things:
   - It blocks further counter clocks.
   - It holds FD in reset for the rest of the frame.
   - It keeps the count it had at T1.

   If the flag is clear, the pixel counts on until the end of T2.

A pixel stops at T1 exactly when it tripped at least once before T1. Such a
pixel's count at T1 is at least 1. A pixel that stays below one trip in T1
keeps integrating and has up to 1023 trips available in T2.

The 11-bit pixel word is `{win_t1, cnt[9:0]}`, defined as `pix_word_t` in
`droic_pkg`.

## Frame timing

`timing_control` makes all pixel control signals from two free-running clocks:

- HCLK is fast, for example 2 MHz.
- LCLK is slow; its period is the frame.

One frame runs like this:

```
LCLK      ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________________/‾‾‾
GLOBAL_RST     /‾\                                                          /‾\
INT_CLK            <-t1_count->/‾\
RD_EN     ‾‾‾‾\___________________________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___
PCLK                                               |_|‾|_|‾|_ ... (HCLK)
               |<-- T1 -->|
               |<------------- T2 --------------->|<----- readout ------>|
```

- **Rising edge of LCLK.** `GLOBAL_RESET` is high for `GRST_CYCLES` HCLK cycles. While it is high, it clears counters, flags and latches, and holds FD in reset. Integration starts when it falls.
- **T1.** `INT_CLK` pulses for one HCLK cycle, exactly `t1_count` HCLK cycles after the reset falls. So T1 = `t1_count` × T_HCLK. `t1_count` is a 16-bit field of the scan chain.
- **Falling edge of LCLK.** `RD_EN` goes high, so T2 is the high phase of LCLK. With `RD_EN` high:
  - every pixel stops integrating;
  - the counters become shift registers;
  - `PCLK` (HCLK gated by `RD_EN`) shifts the array.

  PCLK runs for the whole low phase of LCLK. Once the array has been emptied, the words that come out are zero.

LCLK is synchronised into the HCLK domain by two flip-flops, so each LCLK edge
takes effect 2 to 3 HCLK cycles later.

`RD_EN` is re-timed on the falling edge of HCLK. Because of this, `PCLK = HCLK & RD_EN` has no glitches, and the first PCLK edge comes half an HCLK cycle after `RD_EN` rises. During readout, PCLK is the same clock as HCLK.

Reading out takes 256 PCLK cycles, so the frame rate is
`1 / (T2 + 256 × T_PCLK)`. Two examples:

- With T2 = 1 ms and a 5 MHz clock, that is 1 / (1 ms + 51.2 µs) ≈ 950 Hz.
- With a 20 MHz clock, the readout takes 12.8 µs.

## Readout chain

During readout, the 256 pixel cells form one 11-bit-wide shift register:

- In each row, the chain runs from left to right.
- The right-most pixel of a row feeds the left-most pixel of the row above.
- The chain starts at the bottom row.
- The right-most pixel of the top row drives the output.
- The input at the start of the chain is tied to zero.

The first word out is therefore the top-right pixel. In general, word `j`
(counting from 0) comes from row `j / NCOLS` and column `NCOLS-1 - j % NCOLS`.
The `comp` and `fd_rst` arrays of the top level are indexed `row*NCOLS + col`.

`fpga_readout` re-samples the end of the chain into an output register `D[10:0]`. It also buffers PCLK out as `DCLK`:

- On each rising edge of PCLK, the register takes the word that was at the end of the chain just before that edge shifted it.
- So `D` changes on the rising edge of DCLK. The receiver should sample it on the falling edge.
- The first rising edge of DCLK in a readout delivers word 0.
- The top level also brings out `sync`, which is `RD_EN`. It is high for the whole readout, and D carries word 0 from the first rising DCLK edge after `sync` rises.

When the scan bit `testmode` is set, `D` ignores the array. It alternates between 0 and 2047 on successive PCLK cycles, starting with 0. A receiver can use this pattern to align its sampling phase.

## Configuration (scan chain)

`scan_chain` is a 19-bit serial register plus a shadow register:

- While `scan_en` is high, each rising edge of `scan_clk` shifts in `scan_in`, MSB first.
- A rising edge of `scan_clk` with `scan_load` high copies the shift register into the active configuration.
- `scan_out` is the bit that falls out of the far end, so chips can be chained.

| bits  | field      | reset | use                                          |
|-------|------------|-------|----------------------------------------------|
| 18:3  | t1_count   | 4     | length of T1 in HCLK cycles (4 = 2 µs at 2 MHz) |
| 2     | testmode   | 0     | readout block sends the 0/2047 test pattern   |
| 1     | cal_en     | 0     | front-end switch: on-chip calibration current (port `cal_en`) |
| 0     | pd_en      | 1     | front-end switch: photodiode connected (port `pd_en`) |

## Output code and linearisation

A pixel word is decoded as follows:

- **Flag clear.** `cnt` is the number of trips in T2.
- **Flag set.** `cnt` is the number of trips in T1.

To put both on one scale, multiply a flagged count by T2/T1. With the 2 MHz, 4-cycle, 2 ms operating point, that ratio is 1000. The calibrator uses the parameter `WIN_RATIO`, which is 1024 by default: a flagged word `1024 + n` becomes `n × 1024`, a 20-bit code.

Set `WIN_RATIO` to the actual T2/T1 if the frame timing is not a power-of-two ratio.

## Fixed-pattern-noise calibration

The comparator offsets, the capacitors and the trip charge differ a little from pixel to pixel. So under the same light, pixels give counts that are off by a fixed percentage. `fpn_calibrator` removes that spread. It works on the stream of words captured from `D`; in a system, it belongs in the receiving FPGA.

1. **Reference frame** (`cal_mode = 1`). All pixels see the same reference current, for example from the on-chip calibration current source enabled by `cal_en`.
   - The next frame that starts with `in_first` is linearised, stored and summed.
   - A sequential divider then forms the average `AVG = SUM / NPIX`.
   - It also forms a 32-bit fixed-point reciprocal `RECIP = 2^32 / AVG`.
   - Each stored value is overwritten by its deviation `DEV = value − AVG`.
   - `cal_busy` is high throughout. It takes `2·NPIX + 2·33 + 3` clocks from the first reference word.
2. **Correction** (`cal_mode = 0`, after `cal_done`). Each incoming linear code `TP` of pixel `m` is corrected as

   `TP_CAL = TP − DEV[m] · TP / AVG`,

   The subtracted term is computed as `(DEV · TP · RECIP + 2^31) >> 32`, which is exact to within one code.

   The correction scales a pixel's deviation by the ratio of today's signal to the reference level. A pixel with 3 % too much gain loses 3 % of its signal at every level.

   The outputs appear one clock after their input word:
   - `cal_out_code` is signed, 21 bits;
   - `cal_out_lin` is the uncorrected linear code.

   Before the first calibration, codes pass through uncorrected.

The only per-pixel memory is `NPIX` words of 21 bits. With the default `NPIX = 256`, that is 5376 bits.

## Hierarchy and parameters

```
droic_top
├── scan_chain         configuration register (droic_pkg::scan_cfg_t)
├── timing_control     GLOBAL_RESET / INT_CLK / RD_EN / PCLK
├── pixel_array        NROWS × NCOLS pixel_cell, chained
│   └── pixel_cell
│       ├── pulse_gen      fixed-width trip pulse (behavioural, delay line)
│       ├── itcu           window decision and flag bit
│       └── counter_shift  10-bit counter / shift register
├── fpga_readout       output register, test pattern, DCLK
└── fpn_calibrator     receiver-side linearisation and FPN correction
    └── seq_divider    restoring divider for AVG and RECIP
```

| parameter   | default | meaning |
|-------------|---------|---------|
| NROWS, NCOLS | 16, 16 | array size |
| PULSE_W     | 0.3 ns  | trip pulse width |
| GRST_CYCLES | 1       | GLOBAL_RESET width in HCLK cycles |
| WIN_RATIO   | 1024    | T2/T1 used for linearisation |
| RECIP_SHIFT | 32      | fraction bits of the calibrator's reciprocal |

The top level has three groups of ports:

- **Chip:** `hclk`, `lclk` and `reset`, the scan port, `comp` and `fd_rst`, `cal_en`/`pd_en`, and `d`/`dclk`/`sync`.
- **Calibrator:** the `cal_*` stream ports. The calibrator has its own clock.
- **Front end:** there is no analog in the RTL. In a mixed-signal simulation, connect each pixel's comparator to `comp[row*NCOLS+col]`, and let `fd_rst` drive its reset transistor.

## Simulation

Everything runs on Verilator 5 with `--timing`. The package has to come first on the command line:

```
verilator --binary --timing --top-module tb_droic_full -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/droic_pkg.sv tb/tb_droic_full.sv
./obj_dir/Vtb_droic_full
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>`. Each has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| tb_pulse_gen | fixed width for short and long comparator pulses; no retrigger during a pulse |
| tb_itcu | flag set only by a trip before INT_CLK; later trips ignored; shift mode |
| tb_counter_shift | counting, asynchronous reset, shifting on PCLK |
| tb_pixel_cell | pixel with the analog model, 0 to 6 µA: flag and count against the trip count worked out by hand; FD held after a T1 stop |
| tb_pixel_array | 3 × 4 array: early and late pixels, readout order, zeros after the last word |
| tb_timing_control | reset, INT_CLK position, RD_EN and PCLK against LCLK, several t1_count values |
| tb_scan_chain | reset values, MSB-first shift, load strobe, scan_out returning the old contents |
| tb_fpga_readout | capture of each word, test pattern, DCLK |
| tb_fpn_calibrator | 96 pixels with random gains: latency, average, every corrected code, spread at 807 codes, with the T1 flag, and at levels from 64 to 1000 codes |
| tb_droic_top | small array end to end: scan, imaging frame with both windows, test mode, calibration at one current and correction at twice that current; counts each mechanism |
| tb_droic_full | full 16 × 16 chip at default parameters, HCLK 2 MHz, 250 Hz frames, T1 = 2 µs, T2 = 2 ms, currents from 8 pA to 22 µA, codes compared with those of the measured chip; then one 10 kHz frame with a 20 MHz clock (256 words read in 13 µs) |
| tb_linearity | one pixel, window swept from 2 µs to 16 ms in 2 µs steps: all 1024 codes, DNL and INL |

All the tests use the front-end model `tb/pixel_frontend_model.sv`:

- The trip charge is 15.5 fC.
- The model has no noise and no analog error.
- After each `fd_rst` it waits `Q/I`, plus an optional comparator loop delay `tdly`, and then raises `comp`.

The block tests use `tdly = 0`, so their counts are ideal trip counts, within one code. The full-chip test uses `tdly = 1 ns`. That delay, together with the 0.3 ns pulse, limits the trip rate at high currents, the way a real comparator and reset loop does. Typical results:

- **Full chip.** The numbers were obtained with the full chip at 2 MHz, T1 = 2 µs and T2 = 2 ms.
  - 1 nA reads 129 in the long window.
  - 1 µA reads flag + 119 in the short window.
  - 20 µA reads flag + 964, so the counter does not overflow.
  - Non-zero codes span about 128.7 dB, from 8 pA to 22 µA.
  - Every test current from 240 pA to 20 µA reads within 2 codes or 6 % of the codes measured on the real chip.
- **Linearity sweep.** The staircase has |DNL| ≤ 0.11 LSB.
- **Calibration.**
  - In the small end-to-end test, the spread drops from about 21 codes to below 1 code.
  - In the 96-pixel test, it drops from about 12 codes to below 1 code.

## Departures, limits and choices

- **Analog front end.** The photodiode, integration capacitor, comparator, calibration current mirror, biasing and pads are not modelled in the RTL. Their behaviour in the tests is that of the ideal model above.
- **Pulse generator.** This is a behavioural model: the width comes from a delay, and no synthesis tool can build that. A real design uses a buffer chain in the flip-flop's reset path. The clear input from `GLOBAL_RESET` is an addition of this design.
- **Counter.** The counter is described as a ripple counter. Here it is one synchronous incrementer clocked by the trip pulse, which counts the same values. In readout mode both forms become the same shift register.
- **Counter overflow.** The counter wraps above 1023, as a ripple counter would. Nothing stops it. What keeps the count in range at the top of the 2 µs window is the finite trip rate of the front end: at most about 1 trip per 2 ns. With an ideal front end (`tdly = 0`), more than 1023 trips would fit into 2 µs above about 8.8 µA.
- **Readout edge.** The output register samples on the rising edge of PCLK, as in the block diagram. One passage of the original text speaks of the falling edge. With the chain shifting on the rising edge, sampling on the falling edge would lose the first word of every frame.
- **Own choices.** The scan chain's contents, order and reset values, and its load strobe, are this design's own. The original only says that a scan chain holds start-up settings. The same holds for:
  - the 16-bit width of `t1_count`;
  - the HCLK-counted reset pulse, which the original makes with a delay cell;
  - the LCLK synchroniser;
  - the re-timed PCLK gate.
- **Window ratio.** `WIN_RATIO` defaults to 1024, so that linearisation is a shift. The original mixes 1000 and 1024; set the parameter to the real T2/T1.
- **Calibration memory.** The calibrator keeps 21-bit deviations. For a much larger array (256 × 256), a narrower deviation format would be needed to keep the memory near 7 bits per pixel; this is not implemented. The array size of the calibrator is the parameter `NPIX`.
- **Pixel types.** All 256 pixels share the same digital cell. The split of the array into light-sensitive pixels and electrically driven test pixels concerns only the analog front ends.
