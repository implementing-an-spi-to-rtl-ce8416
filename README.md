# APB-to-SPI converter interface for a Leon3 audio board

This is a small APB peripheral. It lets a Leon3 processor stream audio samples to an
LTC1654 dual 16-bit DAC and read them from an LTC1865L dual-channel 16-bit ADC over SPI,
at a fixed and exact sample rate. The processor writes one enable word that holds the
sample rate and the converter's word length. After that, the peripheral paces itself: every
sample period it runs one SPI transfer, whether or not the processor has a new sample ready.
So the audio sample rate never drifts. When the software is late, one sample is dropped:
the previous word is sent again.

The two converters need different word lengths. The DAC takes 24 bits: 4 control, 4
address and 16 data. The ADC takes 16 bits. One SPI waveform meets the timing of both:
SCK is high for three processor clocks and low for three, at a 30 MHz processor clock.

## Files

| file | what it is |
|---|---|
| `rtl/spi_apb_pkg.sv` | state codes, PWDATA/PRDATA field structs, widths |
| `rtl/spi_apb.sv` | the peripheral: APB slave, rate counter, state machine, SPI master |
| `rtl/spi_top.sv` | two peripherals on one APB bus: ADC on PSEL13, DAC on PSEL14, plus a half-clock probe |
| `tb/spi_apb_tb.sv` | unit testbench of the peripheral |
| `tb/spi_top_tb.sv` | end-to-end testbench at default parameters, with converter models |
| `tb/ltc1654_model.sv`, `tb/ltc1865l_model.sv` | behavioural DAC and ADC models (simulation only) |

## Software view

Each peripheral has a single 32-bit register. Writes and reads both go to it. PADDR is not
decoded: the bus decoder's PSEL picks the peripheral. The reference system maps the ADC
peripheral at 0x80000d00 and the DAC peripheral at 0x80000e00.

**Write, while the peripheral is idle (the enable word):**

| bits | field |
|---|---|
| 31 | enable |
| 30 | disable. It works in every state and resets the peripheral. |
| 29:22 | unused |
| 21:5 | sample rate in samples/s. The field is 17 bits, so up to 131071. |
| 4:0 | bits per sample: 16 for the ADC, 24 for the DAC. The value is clamped to 1..24. |

**Write, while the peripheral is running (the data word):**

| bits | field |
|---|---|
| 31:24 | unused. Bit 30 must be 0, because it is the disable bit. |
| 23:20 | converter control bits |
| 19:16 | converter address bits |
| 15:0 | data |

Bits go out MSB first from bit 23, so a 16-bit transfer sends bits 23:8. For the ADC, the
two configuration bits (single-ended/differential and the odd channel) are therefore bits
23:22.

**Read (always valid, combinational from registers):**

| bits | field |
|---|---|
| 31 | ready |
| 30 | enabled |
| 29:25 | current state. The codes are listed below. |
| 24 | 0 |
| 23:0 | word shifted in from the converter during the last transfer. An n-bit transfer fills bits n-1:0, so an ADC sample is bits 15:0. |

Ready is bit 31, so a signed read is negative when the peripheral is ready. The intended
driver loop is:

1. Write the disable word. This puts the peripheral in its idle state whatever it was doing.
2. Write the enable word.
3. Poll until the read value is negative, then write the next data word.
4. Repeat step 3.

The data returned by a transfer is valid once ready rises.

## How a sample period works

### Pacing without a divider

The period length is clk_rate / rate clocks. The design gets this without a divider.
When it is enabled, it computes

    counter = clk_rate - rate - 6 * bits * rate

It multiplies once, in the clock after the enable word is written. The convert phase then
subtracts `rate` from the counter on every clock, and ends on the clock where the counter is
below `rate`. So the convert phase lasts `floor(counter / rate) + 1` clocks. The load phase
lasts `6 * bits` clocks. Together they make exactly `clk_rate / rate` clocks when the
division is exact. If it is not exact, the period is rounded down. The fraction is not
carried into the next period, because the counter is reloaded with the same start value
every period.

| rate (samples/s) | bits | convert | load | period |
|---|---|---|---|---|
| 50 000 | 24 (DAC) | 456 | 144 | 600 |
| 50 000 | 16 (ADC) | 504 | 96 | 600 |
| 88 200 | 24 | 196 | 144 | 340 |
| 100 000 | 24 | 156 | 144 | 300 |
| 127 000 | 16 | 140 | 96 | 236 |

The ADC needs at least 4.66 µs to convert. That is 140 clocks at 30 MHz, which sets the
highest ADC rate at about 127 ksamples/s aggregate (63.5k per channel).

### State machine

The state codes appear in PRDATA[29:25].

| code | state | action |
|---|---|---|
| 0 | Init | idle. Any APB write goes to InitParse. |
| 1 | InitParse | Without the enable bit, go back to Init. With it, latch rate and bits, load the counter, clear ready, go to ConvertReady. |
| 2 | ConvertReady | Count down. A write goes to Convert. |
| 3 | Convert | Copy the written word into the transmit register, clear ready, count down, go to ConvertWait. |
| 4 | ConvertWait | Count down. |
| 5–10 | Talk0–Talk5 | one bit per pass (described below) |

In ConvertReady, Convert and ConvertWait, once the counter is finished, the state machine
does four things:

* loads the bit counter with bits-1
* drives CS low
* drives SCK low
* goes to Talk0

Talk0 to Talk5 handle one bit per pass:

| state | action |
|---|---|
| Talk0 | Drive the bit selected by the bit counter on SDI. |
| Talk1 | nothing |
| Talk2 | SCK high |
| Talk3 | nothing |
| Talk4 | Sample SDO into the receive word at the bit counter. |
| Talk5 | SCK low. If this was the last bit: reload the convert counter, set ready, raise CS, go to ConvertReady. Otherwise, decrement the bit counter and go to Talk0. |

### SPI waveform, in processor clocks (33.3 ns)

```
CS   ‾‾\_____________________________________ ... ___/‾‾‾
SCK  _________/‾‾‾‾‾‾‾‾\________/‾‾‾‾‾‾‾‾\___ ... ______
SDI      X bit n-1          X bit n-2
         |<1>|<-2->|           sampled by the slave on rising SCK
     CS low -> SDI: 1 clock, SDI -> SCK rise: 2 clocks (66 ns >= 52 ns setup)
     CS low -> first SCK rise: 3 clocks (99 ns >= 85 ns)
     SCK rise -> SDO sampled: 2 clocks; SCK fall -> SDO sampled: 5 clocks (>= 82 ns)
```

### Ready and dropped samples

Ready has four rules:

* It is 1 after reset.
* It is cleared when the peripheral is enabled and when a data word is taken.
* It is set again when a transfer ends.
* It stays set through the convert phase until the next word arrives.

A word is taken only in ConvertReady. The first transfer after an enable has no word yet,
so it sends zeros. That is the dropped sample every enable produces.

If a word is written during a transfer, or after a word was already taken in the same
period, it only overwrites the stored write register. It is not sent unless it is written
again in ConvertReady.

A word written on the exact clock the counter finishes is also not taken. The transfer then
repeats the previous word.

### Disable

Disable is part of the reset. The synchronous reset condition is
`!reset_n || stored_word[30]`. A write with bit 30 set returns everything to Init on the
next clock: ready is 1, CS is high, the registers are cleared. The stored word is cleared
too, so the next write is a fresh enable.

Disabling during a transfer raises CS in the middle of a word.

## Running two peripherals together

`spi_top` puts the ADC peripheral on PSEL13 and the DAC peripheral on PSEL14. They share
PENABLE, PWRITE and PWDATA. The pins carry the board net names: `ad_conv_st` (ADC CONV),
`spi_ad_*`, `dac_ld` (DAC CS/LD) and `spi_dac_*`.

A peripheral's transfers always end at its enable time plus a whole number of periods,
whatever the word length. Software that moves samples ADC → DAC by polling only the ADC's
ready should therefore enable the DAC first and the ADC right after. The DAC transfer then
ends a few clocks before the ADC's, so the DAC word written after the ADC is ready lands in
the DAC's ConvertReady.

If the ADC is enabled first, the DAC is still mid-transfer when the ADC is ready. The DAC
word is then lost, because words are only taken in ConvertReady.

`test_half_clk` toggles on every clock. It is a probe for looking at clock jitter next to
the SPI pins.

## Where this design makes its own choices

These points are not fixed by the reference description of the peripheral. They are choices
of this RTL:

* **State codes.** The numbers 0–10 are this design's own. The state names and their order
  follow the reference.
* **Stored write word.** It is captured on every APB write to *this* peripheral, in any
  state. The reference stores the bus data on every clock while idle. The result at the
  enable is the same, and writes to the other slot cannot disturb this one.
* **Ready after reset.** Ready is 1 after reset, so software that waits for ready before
  each command can issue its first enable.
* **Counter end condition.** The counter is finished when it is below `rate`. This is
  chosen so that the period comes out at exactly clk_rate / rate clocks.
* **Clamping.** Bits per sample is clamped to 1..24, and a rate of 0 is treated as 1. A
  negative counter start value is clamped to 0, which gives a convert phase of one clock.
* **Reset values.** The transmit and receive words reset to 0.
* **Reset style.** The reset is synchronous and active low.

The reference description's worked figure for the ADC convert phase at 50 ksamples/s is
16.7 µs. The counter formula gives 504 clocks, which is 16.8 µs, and the formula is what is
implemented.

## Verification

Both testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`.

* `spi_apb_tb` drives the peripheral with an APB master task and a testbench SPI slave that
  answers random words. It checks:
  * status after reset, enable and disable
  * that every transfer carries exactly `bits` bits, equal to the top bits of the written
    word
  * that the slave's word comes back in PRDATA
  * CS-to-SCK = 3 clocks, SCK low = 3 and high = 3 clocks
  * the period from the counter rule, for 24 and 16 bits at 50k, 100k and 127k samples/s
  * the dropped-sample path
* `spi_top_tb` runs the whole interface at its default parameters against the converter
  models:
  * DAC: fast mode, then 1000 words of 0xDEAD to each DAC channel, with one late word
  * ADC: 1000 samples per channel of a 500 Hz sine sampled at 25 ksamples/s, each value
    compared with the code the model sampled
  * ADC at 127k samples/s, checking that the 4.66 µs conversion time is met
  * DAC at 88.2k samples/s
  * ADC → DAC loop-back, checking that the two peripherals stay locked to each other
  * playback of a 2500-point 500 Hz sine on both DACs, checked point by point, lasting
    100 ms (4999 periods of 600 clocks from the first word to the last)
  * capture of a 50 Hz tone, 25000 samples per channel. Every value is checked, and the
    first 1000 samples of channel 0 must span exactly two periods of the tone.

  It counts each mechanism (enable, disable, word taken, dropped word, 16- and 24-bit
  transfers, rate change) and fails if any never happens. The run takes about 30 seconds.

The converter models check the SPI timing they see: SDI setup, CS-to-SCK setup and word
length, plus the ADC conversion time. Their command codes and delays are the models'
own. They are not a substitute for the datasheets.

Simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spi_apb_pkg.sv rtl/spi_apb.sv \
    rtl/spi_top.sv tb/ltc1654_model.sv tb/ltc1865l_model.sv tb/spi_top_tb.sv \
    --top-module spi_top_tb && ./obj_dir/Vspi_top_tb
```

For the unit test, use `rtl/spi_apb_pkg.sv rtl/spi_apb.sv tb/spi_apb_tb.sv` with
`--top-module spi_apb_tb`.

## Limits

* The Leon3 processor, its AHB/APB bridge and the converters themselves are not part of
  this RTL. The top brings the APB and converter pins out as ports.
* `CLK_RATE_HZ` (default 30 000 000) must match the real clock, or every rate will be off by
  the same factor.
* The peripheral has no interrupt and no FIFO. Software must keep up with ready, or samples
  are dropped. At 88.2 ksamples/s and above, the reference software could not keep up.
* PRDATA[24] is always 0.
