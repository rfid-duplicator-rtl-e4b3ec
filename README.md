# 125 kHz RFID duplicator

This design reads a 125 kHz proximity card (the MIT ID kind), keeps up to
eight captured IDs, and gets them back out in two ways. It can replay an ID
as the waveform a card would produce, or write it into a programmable
T5577 tag. A 720p HDMI screen shows the stored IDs.

The reader has no demodulator. The FPGA drives the antenna with a 125 kHz
carrier. The card answers by loading the field with a 62.5 kHz BPSK
subcarrier. After a notch filter and a 12-bit ADC, that answer shows up as
carrier peaks that alternate between a high and a low amplitude. The whole
receiver works on the heights of those peaks: where the high/low
alternation slips, the data bit has changed.

Everything runs on a 100 MHz system clock except the display, which uses
the 74.25 MHz pixel clock and its 371.25 MHz serial clock. All RTL is
SystemVerilog in `rtl/`, one module per file. The self-checking testbenches are in `tb/`.

## Signal chain

```
            receive (clk_100)
 antenna -> notch filter -> AD7476A --SPI--> adc_reader -> peak_finder
   -> bitflip_detector -> id_decoder --(btn_store, slot sw[15:13])--> id_memory
                                      \-> led_valid

            transmit (clk_100)
 carrier_gen --wave/tick--> spoofer ------------\
            \--tick--> t5577_writer (ID, 7 blocks) -> tx_select -> dac[7:0] -> R2R DAC
            \--tick--> t5577_config (block 0, reset)/     -> current amplifier -> antenna

            display (clk_pix)
 id_memory user codes -> 2-stage sync -> image_sprite <- video_sig_gen
   -> 3 x tmds_encoder -> tmds_red/green/blue (10-bit words per pixel)
   -> 3 x tmds_serializer (clk_5x) -> tmds_*_pair (2 bits per 371.25 MHz cycle)
```

`rfid_duplicator` is the top. It brings out these pins:

* the ADC pins (`adc_cs_n`, `adc_sclk`, `adc_sdata`)
* the 8-bit DAC code
* the 16 switches and three buttons
* two LEDs
* the three 10-bit TMDS words, and the same lanes as serial bit pairs
  (`tmds_*_pair`) on the 371.25 MHz `clk_5x` input

The 10:1 HDMI serialisers are included: they produce bit pairs on the
371.25 MHz clock. The analog stages, the DDR output cells with their
differential pads, and the clock generator are not part of the RTL.

## Decoding the card (the hard part)

### Timing numbers

The receiver is built on these figures:

| quantity | value |
|---|---|
| carrier | 125 kHz = 800 system clocks |
| ADC rate | 1 MSPS: 8 samples per carrier period, 20 MHz SCLK |
| subcarrier | 62.5 kHz BPSK, so peaks alternate high/low |
| bit time | 32 carrier periods = 32 peaks (RF/32) |
| frame | 224 bits: 30 zeros, 20 constant bits, 32 user bits, 142 further bits |

### adc_reader

A 16-bit SPI frame is read every 100 clocks. CS goes low for 85 clocks.
There is a 5-clock lead-in, then 16 SCLK periods of 5 clocks each. The
AD7476A puts a new bit on SDATA after each falling edge of SCLK, so the
reader takes SDATA on the last clock before each falling edge. Of the 16
bits, the last 12 are the sample. `sample_valid` pulses when CS rises.

### peak_finder

The peak finder keeps a window of four samples, v0 (newest) to v3. It
judges v1:

* v1 is a peak if it is greater than both v2 and v0, or
* v1 is a peak if it equals v2 (a flat top made of two samples) and is
  greater than both v3 and v0.

With 8 samples per period, exactly one peak comes out per carrier period.
The result appears one clock after the sample that completes the window.

### bitflip_detector

This block compares each peak with the one before it. Two peaks that
differ by less than `TOLERANCE` (31 LSB by default) are two highs or two
lows in a row: the subcarrier phase has flipped. The detector repeats the
peak strobe one clock later as `peak_out`, and sets `bit_flip` in the same
cycle.

Tune `TOLERANCE` to the front end. The source measured about 50 mV of
high/low clearance in an 850 mV swing. With a 3.3 V, 12-bit ADC at unity
gain, that is about 62 LSB, and the default tolerance is half of it. Noise
on a peak must therefore stay well below ±15 LSB.

### id_decoder

The decoder is a three-state machine.

* **HUNT.** It counts peaks since the last flip. A frame opens with 30
  zero bits, which is 960 peaks without a flip. So a flip that arrives
  after at least 944 quiet peaks (30 bits less half a bit) marks the end of
  the zeros. That flip is the first peak of bit 30, and bit 30 is a 1.
* **COLLECT.** The current bit value toggles at every flip. A bit ends in
  one of two ways:
  * a flip arrives after at least 24 peaks of the bit, or
  * 32 peaks pass with no flip.

  Each finished bit shifts in MSB-first, so the first bit received ends up
  in `id_data[223]`. A flip earlier than 24 peaks into a bit means lock is
  lost, and the frame is abandoned. Once the 20 constant bits are in, they
  must equal `rfid_pkg::MIT_SIG`; if they do not, the frame is rejected.
* **HOLD.** All 224 bits are in. `id_valid` (the green LED) stays high
  until `store` or `discard` is pressed, and then hunting starts again.

Frame polarity is relative: "zero" means the level held during the long
run without flips. A frame becomes valid at the first peak after its last
bit. That is 224 × 32 peaks (57.3 ms) after its first bit, plus up to one
frame spent waiting for the zeros.

`MIT_SIG` (20'hB271A) is an example value. Set it to the constant bits of
the cards you want to accept. Its first bit must be 1: the decoder finds a
frame by the flip that ends the leading zeros.

## Sending

### carrier_gen

`carrier_gen` makes the signed 8-bit carrier. Each half period is a
parabola t·(400−t), scaled to a peak of ±127, which stays within 6 % of a
sine. No table is needed. The block also pulses `tick` at each period
start, which is a zero crossing. All amplitude changes and carrier on/off
switching happen on that edge.

### spoofer (sw[2] high)

The spoofer replays slot `sw[15:13]`. It plays carrier periods alternately
at full and at 3/4 amplitude. At the first period of a bit that differs
from the previous bit, it repeats the amplitude instead of alternating.
The receiver reads that as a flip. The 224 bits loop without a pause,
exactly as a card sends them.

### T5577 downlink (downlink_tx)

A T5577 tag is written by cutting the carrier. All times are in carrier
periods of 8 µs:

| element | this design | allowed |
|---|---|---|
| start gap (enter write mode) | 30 | 8–50 |
| write gap (after every bit) | 12 | 8–20 |
| carrier on before a gap, bit 0 | 24 | 24 |
| carrier on before a gap, bit 1 | 56 | 56 |
| programming hold after a packet | 700 (5.6 ms) | 5.6 ms |

While the downlink is running, a cut carrier puts out the DAC mid-scale
code, 128.

### t5577_writer (btn_write with sw[1:0] = 10)

The writer cuts the selected 224-bit ID into seven 32-bit blocks. It sends
each block as a 38-bit packet:

* opcode `10` (page 0)
* lock bit `0`
* 32 data bits
* 3-bit block address

Block k (1..7) carries `id[223-32(k-1) -: 32]`. Each packet is followed by
the programming hold.

### t5577_config (btn_write with sw[1:0] = 11)

The configurator writes `0x000810E0` to block 0. That word sets RF/32,
BPSK, and a read-out of blocks 1 to 7. It then waits the programming time
and sends the reset command (start gap plus opcode `00`), so the tag
answers like a card from then on.

### tx_select

This is the DAC multiplexer, registered. The priority order is:

1. the downlink, whenever a write or configuration is running
2. the spoofer, when sw[2] is high
3. the plain carrier, otherwise

The plain carrier powers a card while it is being read.

## Display

* **`video_sig_gen`** generates CEA 720p60 timing: 1650 × 750 total, and
  1280 × 720 visible. Syncs are positive polarity.
* **`image_sprite`** draws in black and white, with two register stages,
  so RGB comes out two clocks after the pixel position. The top delays
  hsync, vsync and active by two clocks to match.
* **Text rows.** From (32, 32), each stored slot gets one row, every 24
  lines. A row holds 54 characters of 8 × 16 pixels: the 22 MIT bits (the
  last two leading zeros plus the 20 constant bits), then the 32 user bits.
  The selected slot (`sw[15:13]`) is drawn inverted. Empty slots stay
  black.
* **Waveform tiles.** From (704, 32), the selected slot's 32 user bits are
  drawn as 4 rows of eight 64 × 32 tiles. Each tile shows a square wave,
  with a half period of 8 pixels, starting high for a 1 and low for a 0.
* **Templates.** Six 1-bit templates make up every pixel: '0', '1', their
  inverted forms, and the two wave tiles. The glyphs are 128-bit constants.
  The wave tiles are computed from the pixel position.
* **`tmds_serializer`** sends each word LSB first, as five bit pairs on
  the 5x clock, to an external DDR output cell. That gives 742.5 Mbit/s
  per lane. The pixel clock must be edge-aligned with the 5x clock. The
  pixel domain toggles a flag every pixel; the fast domain resynchronises
  that flag and restarts its five-slot count at each change.
* **`tmds_encoder`** is the standard DVI 8b/10b encoder: XOR/XNOR
  transition minimising plus running-disparity DC balance. During blanking
  it sends the control words, with hsync/vsync on the blue channel.

The user codes and `sw[15:13]` reach the pixel domain through two register
stages. They only change when a button is pressed, so at worst one line is
drawn from a half-updated value.

## Controls

| input | effect |
|---|---|
| `sw[15:13]` | slot to store into, to replay, to write, and to highlight |
| `sw[2]` | spoof: the DAC plays the selected slot |
| `sw[1:0]` = 10 + `btn_write` | write the selected slot to a T5577 |
| `sw[1:0]` = 11 + `btn_write` | configure the T5577 |
| `btn_store` / `btn_discard` | keep or drop the ID held on `led_valid` |
| `led_busy` | a tag write or configuration is running |

Buttons must be debounced outside the design. Only their rising edge is
used.

## Where this departs from, or adds to, the source design

* **ADC timing.** The 1 MSPS sample rate and the exact SPI frame timing are
  this design's choice. The source fixes only the 20 MHz serial clock.
* **Peak rule.** The flat-top rule also requires the flat top to be
  followed by a lower sample. Without that, a rising plateau would count as
  a peak.
* **Numbers chosen here.** The source gives no value for the flip
  tolerance, the constant MIT bits, the low spoof amplitude (3/4), the gap
  lengths within their ranges, or the screen layout.
* **Ambiguous bit count.** The source gives the number of MIT-specific bits
  as 20 in one place and 22 in another. Matching uses 20. The display shows
  22 by including the last two leading zeros.
* **Resynchronisation.** The flip acceptance window (24 to 32 peaks) and
  abandoning a frame on an early flip are this design's choice.
* **Waveform bits.** The source says both that the waveform shows "the
  first 32 bits" of an ID and that the display receives only the 32-bit
  user codes. Here the waveform shows the selected ID's 32 user bits.
* **Decoding on the fly.** Samples are decoded as they arrive. Only
  complete, checked IDs are stored. A stored ID is not checked against the
  other slots for duplicates; the user picks the slot.
* **Templates.** The display templates are generated in logic rather than
  loaded from memory files.
* **Memory.** The eight IDs are held in registers (1792 bits), so all eight
  user codes can be read at once.
* **Write-mode switches.** Starting a data write with sw[1:0] = 10 is
  assumed. The source names only the 11 setting, for configuration.
* **Not included:**
  * the analog receive and transmit circuits
  * the ADC and DAC parts themselves
  * the DDR output cells and differential pads of the HDMI lanes (the
    serialisers are included)
  * the clock generator
  * any support for 13.56 MHz cards, which this sampling rate cannot reach

## How far it has been checked

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against values worked out independently in the testbench, and
prints `TB_RESULT checks=N failures=M`.

* **Block testbenches.** These cover:
  * both peak rules
  * flips with a noisy level
  * bad constant bits and stray flips
  * random memory traffic
  * the carrier's period and shape
  * spoofer repeats at every bit change
  * random downlink packets, decoded by a tag-side monitor
    (`tb/downlink_monitor.sv`)
  * whole 720p frames, pixel by pixel
  * TMDS round trips with a disparity bound
  * serial streams rebuilt from the bit pairs
* **End-to-end test.** `tb_rfid_duplicator` runs the top at its default
  size. A card model feeds the AD7476A model (`tb/ad7476a_model.sv`).
  The test checks the following, in order:
  1. A frame with wrong constant bits is rejected.
  2. A good ID is captured, discarded, captured again and stored.
  3. In spoof mode, the DAC output is looped back into the ADC, and the
     stored ID is decoded again from it.
  4. The tag write is decoded into its 7 packets and compared with the ID.
  5. The configuration and reset packets are decoded and checked.
  6. The display draws the stored data and sends sync words. The sync
     words are also found in the serial stream rebuilt from the blue
     lane's bit pairs.

  The card's high and low peaks are about 62 LSB apart and carry ±8 LSB of
  random noise. The run takes about
  2.5 minutes of CPU time for 0.4 s of simulated time.

Not checked: real analog signals (drift, larger noise, amplitude changes
within a frame) and real T5577 or HDMI hardware.

## Simulating

With Verilator 5, from the folder above `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_id_decoder \
  -y rtl -y tb +libext+.sv -Irtl rtl/rfid_pkg.sv tb/tb_id_decoder.sv
./obj_dir/Vtb_id_decoder
```

Replace `tb_id_decoder` with any testbench name. For the whole system, use
`tb_rfid_duplicator`.

## Changing it

* Protocol constants (frame layout, downlink timings, configuration word,
  `MIT_SIG`) are in `rtl/rfid_pkg.sv`. Module parameters default to them.
* `CARRIER_DIV` on the top, and `SCLK_DIV` / `SAMPLE_PERIOD` on
  `adc_reader`, set the clocking. Keep 8 samples per carrier period, or at
  least enough for the four-sample peak window to see exactly one peak per
  period.
* `TOLERANCE` on `bitflip_detector` must sit between the noise on one
  level and the high/low separation.
