# Camera DSP for a single-chip complementary-colour CCD

A low-cost video camera uses one CCD, not three. Each photosite sits under one
filter of a complementary mosaic: magenta, green, cyan or yellow. This RTL takes
the digitised sensor output, one 10-bit sample per 14.318 MHz pixel clock, and
recovers luminance and colour from it in real time. It delivers two outputs:

* digital 4:2:2 YCbCr (8-bit Y, plus 8-bit signed Cb and Cr on one multiplexed bus);
* the 8-bit codes for two video D/A converters that produce NTSC S-video Y and C.

The processing chain is black-level clamp, line buffering, edge enhancement,
colour separation, colour matrixing, white balance, gamma correction, a CCIR 601
Cb/Cr matrix, and an NTSC encoder. It follows the camera DSP described in the
paper "A Real-Time Digital Signal Processor for Use with the Interline Transfer
Color CCD Imager" (a 0.8 µm CMOS chip of about 76k gates, clocked at 14.3 MHz).
That paper gives the block diagram and the main equations. Everything else here
(widths, formats, timing, coefficients the paper leaves open) is this design's
own choice, and each choice is listed below.

## What a sample is: the colour filter array

The filter rows repeat in this pattern:

```
Mg G  Mg G  ...
Cy Ye Cy Ye ...
G  Mg G  Mg ...
Cy Ye Cy Ye ...
```

The sensor reads out two vertically adjacent photosites added together. The
odd and even fields pair the rows with a one-row offset. So every sample the
DSP receives is one of four sums:

| line kind | even column       | odd column        |
|-----------|-------------------|-------------------|
| C1/C2     | C1 = Cy+G = 2g+b  | C2 = Ye+Mg = 2r+g+b |
| C3/C4     | C3 = Cy+Mg = r+g+2b | C4 = Ye+G = r+2g |

(Here Cy = g+b, Ye = r+g and Mg = r+b.) Line kinds alternate from line to line.
The first line of the odd field is a C1/C2 line, and the first line of the even
field is a C3/C4 line. Two facts make the rest of the design work:

* Any two horizontally adjacent samples add up to 2r+3g+2b, on either kind of
  line. Luminance is therefore a two-tap sum, and the colour carrier at half the
  pixel rate cancels.
* The difference between neighbours gives colour: C2−C1 = 2r−g and C3−C4 = 2b−g.
  A single line holds only one of these differences. The other comes from the
  lines above and below, which are of the other kind.

`pixel_timing` tracks which sample is which. It takes `hd` (first pixel of a
line), `vd` (first line of a field) and `field`, and produces the column parity
and the line kind.

## Signal flow

```
id ─► black_level_clamp ─► scanning_line_buffer ─┬─ H1 ─► y_lpf ────────── YH ─┐
                                                 ├─ H1,H02 ► aperture_hpf ─ AP ┤
                                                 │                 level_adjust ◄┘ ─► gamma_lut ─► digital_y ─► encoder_y ─► y_dac
                                                 └─ H1,H02 ► line_switching ─► color_separation ─► white_balance
                                                        ─► gamma_lut (G), gamma_lut (B/R) ─► cbcr_matrix ─► digital_c ─► encoder_c ─► c_dac
serial_interface ─► gains and thresholds            encoder_timing (hsync/vsync or csync) ─► encoders
```

The clamp averages 16 optical-black pixels per line. It subtracts that average
from all following samples, floored at zero.

The scanning line buffer holds two 910-word line memories. One NTSC line at
14.318 MHz is 910 clocks. The buffer outputs three lines: H0 (the current
line), H1 (the centre line) and H2 (the oldest line). It also outputs
H02 = H0 + H2.

## Luminance path and edge enhancement

* `y_lpf`: YH = x(n−1) + x(n−2) on H1, the two-tap sum described above.
* `aperture_hpf`: forms the detail signal d, the sum of a horizontal filter
  (1+z⁻¹)(−1+2z⁻¹−z⁻²)/2 on H1 and a vertical filter (1+z⁻¹)(2·H1 − H02)/2.
  Both filters include the (1+z⁻¹) factor so that they ignore the colour
  carrier. The detail is then shaped by level:
  * |d| below `core` is treated as noise and dropped;
  * |d| above 16·`limit` is a large edge, and is also dropped to avoid ringing
    artifacts;
  * anything in between is scaled by `gain`/16.

  The source gives only the horizontal filter. The vertical filter is this
  design's choice.
* `level_adjust`: YAP = YH + AP, then YAD = clip(YAP·gain/128) to 10 bits. The
  default gain of 64 maps YH's 11-bit range onto 10 bits.
* `gamma_lut`: a 512×8 ROM (`rtl/gamma_table.hex`). It is addressed by the lower
  9 bits, and inputs of 512 or more give 255. The table is
  out(x) = round(255·f(x/511)), with f(v) = 4.5v for v < 0.018 and
  f(v) = 1.099·v^0.45 − 0.099 otherwise. All three gamma blocks (Y, G and B/R)
  use the same table.

## Chrominance path

* `line_switching` sends H1 to the output of its own kind (C1/C2 or C3/C4). It
  sends the average of the two outer lines, H02/2, to the other output. Both
  streams are then present on every line.
* `color_separation` computes these quantities at every pixel, from a sample and
  its left neighbour:
  * CY = (C1+C2+C3+C4)/2 = 2r+3g+2b
  * CR = C2−C1 = 2r−g
  * CB = C3−C4 = 2b−g

  CR and CB go through the colour low-pass filter
  H(z) = 0.125(1+z⁻⁴) + 0.25(z⁻¹+z⁻³) + 0.3125z⁻², which is taps 2,4,5,4,2 /16
  with a DC gain of 17/16. Each pair of filtered values is then averaged and held
  for two pixels, since chroma needs only half the luminance rate. Finally:

      R = MATR·CY + CR      G = MATG·CY − (CR + CB)      B = MATB·CY + CB

  MATR, MATG and MATB are in units of 1/128. The defaults 35/94/35 make a white
  scene come out R ≈ G ≈ B (within 1.5 %). They should be tuned to the sensor
  and the display.

  **Departure:** the source prints the G and B rows the other way round
  (G = matg·CY + CB, B = matb·CY − (CR+CB)). That contradicts its own
  definitions of CR and CB. This design uses the pairing that puts the blue
  difference into B and cancels r and b in G.

  The outputs are G at every pixel and a B/R bus. The bus carries B in odd
  cycles (`br_is_b`), followed by the R of the same averaged pair.
* `white_balance` multiplies G, R and B by loadable gains (64 = 1.0) and clips
  the results to 10 bits.
* `cbcr_matrix` computes Cb = 0.512(B−G) − 0.174(R−G) and
  Cr = −0.083(B−G) + 0.512(R−G). The coefficients are rounded to 1/1024. G is
  the mean of the pair's two G samples. Cb and Cr are saturated to 8 bits signed
  (no +128 offset) and sent as Cb, Cr, Cb, Cr… with `digital_c_is_cr`.

## NTSC encoder

* `encoder_timing` accepts separate `hsync`/`vsync` (`sync_mode` = 0) or
  composite `csync` (`sync_mode` = 1). All sync inputs are active high. A line
  counter restarts on line sync edges and ignores the half-line equalising
  pulses. In composite mode, a sync pulse longer than 200 clocks marks the
  vertical interval. Blanking and the burst gate use NTSC positions at
  14.318 MHz.
* `encoder_y` outputs code 16 during sync, code 80 during blanking, and
  80 + 5/8·Y otherwise (peak white 238). This works out to about 1.6 codes per
  IRE.
* `encoder_c` converts Cb/Cr to U = 0.545·Cb and V = 0.769·Cr (the CCIR 601 to
  NTSC scaling, times the same 5/8 as Y) and filters both with 1,2,1/4. The
  pixel clock is four times the subcarrier, so the modulator is a four-phase
  selector: +U, +V, −U, −V. A 910-clock line advances the subcarrier by the NTSC
  half cycle per line with no extra logic. Blanking gives code 128. The burst is
  128 ∓ 32 on the −U axis.

The D/A converters are analog and are not included. `y_dac` and `c_dac` are
their input codes.

## Serial control interface

This is a three-wire link from the camera microcontroller. The microcontroller
computes the white-balance gains. To write a register:

1. Pull `sen_n` low.
2. Shift 16 bits in MSB first, one on each rising edge of `sclk`.
3. Raise `sen_n` to write.

Frames with a bit count other than 16 are ignored, as are unknown addresses.
The inputs are synchronised to the pixel clock, so `sclk` must stay high and low
for at least two pixel clocks each. The frame layout is
`[15:12]` address, `[11:8]` unused, `[7:0]` data.

| addr | register    | reset | meaning                        |
|------|-------------|-------|--------------------------------|
| 0    | wb_r        | 64    | R gain, 64 = 1.0               |
| 1    | wb_g        | 64    | G gain                         |
| 2    | wb_b        | 64    | B gain                         |
| 3    | level_gain  | 64    | luma gain, 128 = 1.0           |
| 4    | ap_gain     | 16    | detail gain, 16 = 1.0          |
| 5    | ap_core     | 8     | detail below this is dropped   |
| 6    | ap_limit    | 128   | detail above 16× this is dropped |
| 7    | sync_mode   | 0     | bit 0: 0 = H/V sync, 1 = composite |

## Top-level interface and timing

The top module is `ccd_dsp_top`. It has two parameters: `H_TOTAL` (910) and
`OB_LOG2` (4).

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | pixel clock; asynchronous active-low reset |
| id | in | 10 | A/D sample |
| hd, vd, field | in | 1 | first pixel of a line; first line of a field (with hd); 0 = odd field |
| ob_win | in | 1 | high over the optical-black pixels of the line |
| sclk, sdata, sen_n | in | 1 | serial link |
| hsync, vsync, csync | in | 1 | encoder sync inputs |
| digital_y | out | 8 | gamma-corrected Y |
| digital_c, digital_c_is_cr | out | 8 signed, 1 | Cb/Cr bus |
| y_dac, c_dac | out | 8 | D/A codes |

Every block takes one sample per clock, and nothing ever stalls. Lines must be
exactly `H_TOTAL` clocks long, because the line memories are fixed delays. The
two lines after reset, and the first lines of a field, carry no valid vertical
context. Pipeline depths from H1 are:

* luma: 6 stages;
* chroma: 11 stages to Cb.

The chroma's colour content is also about 3 cycles older than its position
suggests. One cause is the pair averaging, the other is sending B before R.
`digital_y` is therefore delayed by `Y_ALIGN` = 8 (in `ccd_dsp_pkg`). With that
delay, luminance and chroma edges of the same scene edge leave together. From
`id` to the digital outputs the delay is one line plus about 16.5 clocks. In
the encoders, Y is delayed by three more clocks to match the C encoder.

## How far to trust it, and where it departs

Taken from the source:

* the block structure and signal names;
* the 10-bit input and 8-bit outputs;
* the 9-bit gamma ROM;
* the horizontal aperture filter;
* the colour-separation, colour-LPF and Cb/Cr equations;
* the two encoder sync modes;
* the 4:2:2 output;
* the serially loaded white balance.

This design's own choices:

* the clamp averaging;
* the Y LPF;
* the vertical aperture filter and the coring rule's thresholds;
* the level adjustment;
* the gamma curve;
* the use of H02/2 in line switching;
* the matrix coefficients;
* all bus formats and the serial protocol;
* the NTSC levels and the encoder filter.

Departures:

* **Multipliers.** The original chip avoided multipliers altogether. Here, the
  fixed coefficients are constant multiplies, which synthesise to shift-add
  logic. The run-time gains (white balance, level, aperture gain) use true
  multipliers.
* **G and B rows** of the RGB matrix are swapped relative to the printed
  equations (see above).
* **Colour LPF gain.** The LPF keeps its printed coefficients, including the
  17/16 DC gain. The matrix defaults compensate for it.

Not modelled: the sensor, CDS/AGC, the A/D converter, the microcontroller and
the D/A converters. The top-level testbench models the sensor's output samples
and the microcontroller's serial writes.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Run them from the directory that holds `rtl/`
and `tb/`, because the gamma ROM is loaded from `rtl/gamma_table.hex`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ccd_dsp_pkg.sv \
          tb/tb_ccd_dsp_top.sv --top-module tb_ccd_dsp_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Two testbenches are worth
knowing about:

* `tb_ccd_dsp_top` runs the whole chip at its default size. It drives two
  262-line fields of a synthetic scene (grey, red, blue, black and an edge
  block), one with H/V sync and reset settings. Between the fields it loads
  new settings over the serial link, and the second field runs with composite
  sync. It checks the black level, grey Y against the gamma curve, neutral
  grey chroma, the effect of the white-balance gain, the chroma sign of the
  colour patches, the one-sample-per-clock rate, sync insertion and the burst.
  It also requires every mechanism to occur at least once: clamp update, both
  line kinds, detail cored, enhanced and limited, vertical interval in both
  sync modes. It runs in a few seconds.
* `tb_color_separation` feeds the block patches sampled as the colour filter
  does. It compares the block's output with a real-number model of the
  equations.

To change the design:

* `ccd_dsp_pkg.sv` holds the shared widths, the register map and the pipeline
  depths.
* If you change a block's pipeline depth, update its `LAT_*` constant so that
  `Y_ALIGN` stays right.
* To regenerate `gamma_table.hex` for a different curve, evaluate the formula
  above for x = 0…511 and write one two-digit hex value per line.
