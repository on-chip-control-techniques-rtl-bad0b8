# On-chip exposure, gain and colour balance control for single-chip CMOS cameras

A single-chip CMOS video camera has to look after itself. With a fixed-aperture lens and no host
processor, the chip must measure every picture it takes and, once per frame, decide whether it
was too bright or too dark and whether its colours were off. It then sets the next integration
time, output gain and per-colour gains. It also generates all the sensor and composite video
timing, and it lets an optional host take over through a two-wire serial port.

This repository holds synthesizable SystemVerilog for the digital control logic of two such
chips:

* **A monochrome camera** (312 x 287 pixels, 625-line / 50 Hz video, 12 MHz clock). It has
  automatic exposure over a 40,000:1 range, automatic gain, and pad-controlled options.
* **A colour camera** (three 305 x 240 arrays, one per primary, 525-line / 60 Hz video,
  14.31818 MHz clock). On top of exposure and gain it has automatic colour balance, optical
  centre registration of the three arrays, and a serial host interface.

The analogue parts are not here: the arrays, the threshold comparators, the MDAC gain stage,
black-level calibration and the video output multiplexer. Their digital signals are ports of the
top level. The comparator outputs come in; gain codes, row word lines and timing pulses go out.

## The frame loop

Both chips run the same loop, once per frame:

```
 pixel stream --> comparators --> judgement counters --(FOE)--> decision
                  (analogue)      clear at FS, count valid pixels       |
                                                                       v
        FI / RST  <-- exposure encoder <-- integration time ALU <-- AEC/AGC switch --> gain ALU --> MDAC code
        row word lines (monochrome)                                                  \--> colour balance offsets
```

* **FS** (field start) clears the counters.
* Every valid pixel (PV) is classified by the comparators and counted.
* **FOE** (end of the odd field) loads the counts into a registered decision `{en, down}`.
* One clock later the ALUs move. On the colour chip the offset counters move one clock after
  that, and the channel gain registers load one clock after that.
* The new exposure reaches the array through FI and RST in the next field.

All logic runs on the chip clock. The pixel rate is a one-cycle enable (`pclk_en`), so the whole
design is a single clock domain per chip.

## Exposure: coarse lines plus fine pixel clocks

The integration time of a row runs from the end of its reset to its read. It is split into two
parts:

* a **coarse** part, in whole lines;
* a **fine** part, in pixel clocks.

FI is a pulse fed into the vertical shift register, and its width in lines is the coarse time.
RST is a line-rate pulse, and the position of its falling edge in the line is the fine time.
So the shortest exposure is a few pixel clocks and the longest is a whole field.

**Monochrome.** The limits are coarse 0..310 lines and fine 3..376 pixel clocks (384 pixel
clocks per line). This gives 310 x 384 + 376 = 119,416 pixel clocks against a minimum of 3:
a range of about 40,000:1.

**Colour.** The limits are coarse 0..260 and fine 37..356.

### The integration time ALU (`int_time_alu`)

The controller changes the exposure in fixed ratios. Each frame it multiplies by 17/16 or 15/16,
a 6.25 % step. A 20-bit register holds the exposure, and the adder adds or subtracts the register
shifted right by four.

A line is 384 pixel clocks, which is not a power of two, so a plain binary number cannot carry
from the fine part into the coarse part at the right moment. The register therefore stores:

| bits  | field         | meaning                                |
|-------|---------------|----------------------------------------|
| 19:11 | coarse        | whole lines                            |
| 10:4  | fine integer  | units of 3 pixel clocks, 0..127        |
| 3:0   | fraction      | keeps small exposures from sticking    |

The fine integer carries into the coarse part at 128. The fine output is the fine integer times
3 (x + 2x, no multiplier), so 128 units are exactly 384 pixel clocks: one line.

Decoders clamp the result:

* The coarse part is held at its maximum. The whole value becomes `{COARSE_MAX, 127, 15}`.
* The value never goes below the minimum fine count.
* The fine output is clamped to FINE_MIN..FINE_MAX.

On the colour chip's 364-clock line the same ALU is used unchanged. Its fine output is limited to
356, so the top few fine codes saturate.

### The exposure encoder (`exp_encoder`)

The encoder compares the line and pixel counters with positions worked out from the exposure.

**FI.** FI rises at line `V_START - coarse` (modulo the field) and falls at line `V_START`, where
reading starts. It is therefore `coarse` lines wide.

**RST.** RST rises at the end of the SAM pulse and falls `fine` pixel clocks before the next
SAM end. The reset pulse is `L - fine` clocks wide, so it never disappears even at the longest
fine setting.

### Row decoding (`vsr_decoder`)

FI travels down the vertical shift register one row per line clock (`cv`). Rows holding a 1 are
integrating.

* **Read row.** The row just behind the pulse (`d[i] = 0`, `d[i+1] = 1`) has finished. Its word
  line carries SAM.
* **Reset rows.** Every other row not integrating is held in reset.

An older decoder released all reset rows at the RST edge. So many drivers switching at once
pulled the supply and showed up as a bright vertical bar in dark pictures. The decoder here lets
only the row next in line (`d[i] = 0`, `d[i-1] = 1`) end its reset at the RST edge. All other
reset rows stay in reset through the line. The testbench checks that a change of RST changes
the state of at most one row.

This decoder is built into the monochrome chip, 290 rows (287 plus 3 black lines). The colour
chip's array drivers are analogue and are not modelled.

## Exposure judgement

### Colour (`col_exp_judge`)

Each channel has four comparator levels, V1..V4 = 0.86, 0.93, 1.0 and 1.07 of the target level.
Two of them are used here, ORed over red, green and blue:

* **Very bright pixels (N1):** a pixel at or above V3 on any channel.
* **Well-exposed pixels (N2):** a pixel at or above V2 on any channel.

The decision:

| condition                          | action            |
|------------------------------------|-------------------|
| N1 > 2 % of pixels                 | decrease exposure |
| otherwise, N2 < 1 % of pixels      | increase exposure |
| otherwise                          | no change         |

On the full array, 2 % is 1464 pixels, which fits an 11-bit counter, and 1 % is 732, which fits
10 bits. Each counter sets a flag when it crosses its threshold and then stops.

### Monochrome (`mono_exp_judge`)

Pixels are counted as very white (comparator above VWT) or very black (below VBT). The ITS pad
selects a narrow or a wide gap:

| ITS | too bright when white > | too dark when white <= 0.5 % and black > |
|-----|-------------------------|------------------------------------------|
| 1   | 2 %                     | 10 %                                     |
| 0   | 4 %                     | 20 %                                     |

These percentages are this design's choice. Only the structure is given: counts of very white
and very black pixels against a group of thresholds, with ITS = 0 as the wider gap.

## Handing over between exposure and gain (`aec_agc_switch`, `gain_alu`)

Longer exposure is always preferred to more gain, because gain adds noise.

* **Increase request:** goes to the exposure until the exposure is at its maximum. Only then
  does it go to the gain, if AGC is enabled.
* **Decrease request:** goes to the gain while the gain is above its nominal value. Only then
  does it go to the exposure.

The gain is a 7-bit up/down counter that steps by one per frame. It runs between a nominal
register and a maximum:

| chip       | nominal                         | maximum |
|------------|---------------------------------|---------|
| monochrome | 24, or from pads GS7..GS5       | 120     |
| colour     | 80                              | 112     |

The monochrome chip drives its MDAC with the inverted code (GB, active low). With AGC off, the
monochrome gain returns to the pad value, while the colour gain holds whatever the host wrote.

## Colour balance

The green gain is the common gain above. Red and blue each add a signed offset to it. The
controller looks at the brightest parts of the picture, assuming they are white or grey, and
nudges the red and blue offsets until their highlights match green.

**Bands (`cb_max1`).** The four comparators of a channel give a band number 0..4. For every
channel, `cb_max1` keeps the highest band seen in the frame (the peak) and counts the pixels at
that band. A peak is trusted only when more than 64 pixels reached it. Otherwise it is reported
one band lower, so that a few noisy pixels cannot set the reference. This gives the whole-image
peaks Gpw, Rpw and Bpw.

**Peaks under the green highlight (`cb_max2`).** For red and blue, a second recorder keeps two
registers. Each pixel's green band is compared with the green peak found so far (Bigger, Equal or
Lower), and the channel's band is compared with each register (`bigpix1`, `bigpix2`):

| bigpix1 | bigpix2 | green      | action                    |
|---------|---------|------------|---------------------------|
| yes     | any     | Equal      | `peakreg` takes the band  |
| yes     | any     | Bigger     | `peakreg` takes the band  |
| any     | yes     | Lower      | `lowpkreg` takes the band |
| any     | yes     | Bigger     | `lowpkreg` takes the band |

So `peakreg` is the channel's peak where green is at its highlight, and `lowpkreg` its peak where
green is below it. At the end of the frame the recorder reports `peakreg` if the green peak was
trusted and `lowpkreg` otherwise, matching what `cb_max1` reported for green. This gives Rpg and
Bpg, measured on about the same pixels as the green reference.

**Decision (`cb_judge`),** per channel, shown here for red:

| condition                      | action               |
|--------------------------------|----------------------|
| Rpg > Gpw                      | lower red (too red)  |
| otherwise, Rpw < Gpw           | raise red            |
| otherwise                      | balanced             |

The first test uses the highlight peak, so a red object is not mistaken for a red cast. The
second uses the whole-image peak, so that a scene without any red does not drive the red gain up
without bound.

**Offset counter (`offset_galu`).** The offset is an 8-bit two's complement counter from −127 to
+127. It steps by one per frame unless one of these holds:

* **Exposure priority (Xenab).** The exposure judgement acted in the same frame, so the levels
  being compared are about to change.
* **Overflow (Oflow).** The channel gain, common gain plus offset, is already at 0 or 112 in the
  direction of the step.
* **Automatic balance off.** With colour balance switched off (set-up bit 9 cleared), the counter
  only takes host writes.

The channel gain register loads the clamped sum once per frame.

## Video timing (`video_timing`, `pclk_div`)

The pixel clock is the chip clock divided by 2.5 (colour: 14.31818 → 5.727 MHz) or by 2
(monochrome: 12 → 6 MHz). `pclk_div` does this with a fractional accumulator.

`video_timing` counts pixels in a line and lines in a field. Colour lines are 364 pixel clocks
and monochrome lines 384. Decoders and set/reset flip-flops on the counts make these outputs:

* **Sensor pulses:** `cv` (line clock), `cal` (column calibration), `sam` (row sample), `rebit`
  (bit line reset) and `ls` (line start).
* **Video pulses:** `pv`/`pvb` (pixel valid), `fst` (field start), `feoe` (odd/even field) and
  `foe` (end of the odd field).
* **Composite sync and blanking:** `ss` and `si`, with equalising and broad pulses in the
  vertical interval.

The array is scanned non-interlaced. Both fields read the same rows: the odd field has 263 lines
and the even field 262 (colour), or 313 and 312 (monochrome).

## Optical centre registration (`optical_reg`)

The three colour arrays cannot be placed on the die exactly under the three images from the
optics. Each array's LS (horizontal start) and FI (vertical start) are therefore delayed through
a 15-stage shift register:

* **Green** is taken from the middle stage.
* **Red and blue** are taken from stages selected by 4-bit settings, up to 7 stages either side.

The LS register shifts per pixel clock and the FI register per line. The settings come from the
serial interface, from two registers: X (red in bits 3:0, blue in bits 7:4) and Y (the same
layout). Their reset value 77h puts every colour on the green stage.

## Serial interface (`serial_if`)

The colour chip is an I²C-style slave at address byte 20h (write) and 21h (read). A write is a
sequence of two-byte messages: a 4-bit header followed by a 12-bit value.

| header | destination            | value                                                  |
|--------|------------------------|--------------------------------------------------------|
| 0001   | set-up code            | bit 2 AGC on, bit 4 AEC on, bit 5 chequer board test, bit 9 colour balance on |
| 0010   | exposure               | bits 11:3 coarse lines, bits 2:0 top three fine bits   |
| 0011   | common gain            | bits 6:0 (0..112)                                      |
| 0100   | red offset             | bit 7 sign (1 = minus), bits 6:0 magnitude             |
| 0101   | blue offset            | as red                                                 |
| 0110   | centre X               | bits 7:4 blue, bits 3:0 red                            |
| 0111   | centre Y               | as X                                                   |

A read returns two bytes: the last header written and the present value for it. For exposure,
gain and offsets this is the live value from the control loop, so a host can watch the automatic
functions. After reset AEC, AGC and colour balance are on and the chequer board is off.

## Top level and parameters

`cam_ctrl_top` places the two chips side by side (`c_*` colour, `m_*` monochrome), each with its
own clock and reset. They share no logic. Every parameter's default is the chip's real value.

| parameter (colour / monochrome)       | colour     | monochrome |
|---------------------------------------|------------|------------|
| `CLK_NUM/CLK_DEN` (clock to pixel clock) | 5/2     | 2/1        |
| `PCLK_PER_LINE`                        | 364        | 384        |
| `LINES_PER_FRAME`                      | 525        | 625        |
| `H_ACTIVE x V_ACTIVE`                  | 305 x 240  | 312 x 287  |
| `COARSE_MAX` (lines)                   | 260        | 310        |
| `FINE_MIN..FINE_MAX` (pixel clocks)    | 37..356    | 3..376     |
| gain nominal / maximum                 | 80 / 112   | 24 / 120   |
| `CB_MIN_COUNT` (trusted peak)          | 64         | –          |
| `REG_DEPTH` (registration stages)      | 15         | –          |
| `N_ROWS` (row decoder)                 | –          | 290        |

## What is this design's own choice

The structure of every block follows the original chip descriptions. These details were not
given there and were filled in here:

* Where `cv`, `cal`, `sam`, `rebit` and `ls` sit in the line, and the sync pulse width (27 or 28
  pixel clocks, 4.7 µs).
* The equalising and broad pulse shapes of the vertical interval.
* The monochrome judgement thresholds (0.5 %, 2 %, 4 %, 10 %, 20 %).
* The reset value of the exposure (64 lines) and of the channel gain registers (56).
* Which `cb_max2` register is reported, chosen by whether the green peak was trusted.
* How `cb_max1` lowers an untrusted peak by one band.
* The read-back format of the serial interface, the bit-level I²C protocol, the unused header
  codes and the reset defaults of the set-up code.
* The pad-to-nominal mapping GS7..GS5 → gain = `{GS, 1000}` (GS = 001 gives 24).
* AGC pad polarity. The published pin list and the text disagree; here AGC = 1 enables gain
  control.
* The exact clock offsets of the frame sequence (judgement at FOE, ALUs +1, offsets +2,
  channel gains +3).

Not built: monochrome test features (central-window output clock, synchronisation input, test
vectors), the chequer board generator in the array (only its enable bit is here), and all
analogue circuits.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb --top-module tb_offset_galu \
    rtl/cam_pkg.sv rtl/*.sv tb/tb_offset_galu.sv -o sim && obj_dir/sim
```

List `rtl/cam_pkg.sv` first; the order of the rest does not matter. `tb/i2c_master.svh` holds
the two-wire master tasks shared by the interface tests.

The block testbenches compare against independent models and use random stimulus:

* exhaustive band combinations for `cb_judge`;
* random fields of pixels for the peak recorders;
* random decision and overflow sequences for the offset counter;
* a bit-level I²C master for the serial interface;
* a full-field timing check of every output for `video_timing`.

Three testbenches close the loop through a scene model. Each active pixel has a reflectance,
made from a grey ramp plus a few percent of white highlight pixels. The signal is reflectance x
light x exposure x gain, with a red cast and a weak blue on the colour chip. The model produces
the comparator outputs.

* **`tb_asis3000_ctrl` and `tb_asis1011_ctrl`** run the chips at a reduced format (96 clocks per
  line, 61 lines, 40 x 16 pixels) for several hundred frames. The phases are normal light, very
  dim light, normal light again, then host control (serial writes and reads, AEC/AGC/balance
  off), HLD, MAX, AGC and ITS.
* **`tb_cam_ctrl_top`** runs both chips at full size with no parameter changes, for about 135
  colour and 113 monochrome frames. It takes about four and a half minutes with Verilator.

Throughout, the loop testbenches check the switching rules:

* the gain rises only at maximum exposure;
* the exposure falls only at nominal gain;
* the offsets never move in a frame where the exposure acted;
* the exposure moves only in the direction the judgement asked.

They also count each mechanism, and one that never happens is a failure: exposure up and down,
gain up and down, red and blue balance steps, exposure priority, serial accesses, registration
taps and row sampling.
