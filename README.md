# GASTONE64 digital section — SystemVerilog model

GASTONE64 is a 64-channel mixed-signal front-end chip for reading out the
strips of a cylindrical triple-GEM tracker. Each channel amplifies and shapes
the charge from one strip, compares it with a threshold and turns a hit into
a digital pulse. The chip does not digitise amplitudes or keep a time stamp. It
keeps one bit per channel: "this strip fired within the last few hundred
nanoseconds". When the experiment's level-1 trigger arrives, those 64 bits
are frozen and sent out on a single serial line. The readout clock runs only
while a word is being sent, so the digital section stays quiet while the
analog channels are working.

This RTL covers everything in the chip that behaves as logic:

* the per-channel **monostable**, which holds a hit until the trigger comes;
* the **channel mask** and the **global OR**, a self-trigger output;
* the **readout**, which builds a 96-bit event word on the trigger and sends
  it on both edges of the readout clock;
* the **slow-control** port (SPI-like, 1 MHz) and its **28 eight-bit
  registers**: mask, DAC settings, chip ID and configuration.

The preamplifier, shaper, discriminator, DACs, test-pulse injection and LVDS
pads are analog and are not modelled. The discriminator outputs enter the top
module as a 64-bit input. The DAC settings leave it as output codes.

## Signal path of one channel

```
strip -> preamp -> shaper -> discriminator -> [monostable] -> [mask] --+--> readout word
          (analog, outside this RTL)       disc[ch]                    +--> global OR
```

The discriminator fires on the leading edge of the shaped pulse. The
monostable stretches that edge into a pulse whose width is programmable from
200 ns to 1 µs. That width must cover the trigger latency: a hit is seen by the
readout only if its discriminator edge came less than one width before the
trigger. The model is retriggerable: a new edge during the pulse restarts the
width from the new edge. The width code is 8 bits and maps linearly:

    width = 200 ns + round(code × 800 ns / 255)

`monostable.sv` is a behavioural model that uses delays, because in the chip
it is an analog one-shot. It is the only non-synthesizable part of `rtl/`.

The mask switches a channel off in both the event word and the OR when its
bit is 1. The OR is taken after the mask, so a masked noisy strip cannot
self-trigger the system.

## The event word and the double-edge readout

On the rising edge of `lev1` the readout stores:

| bits    | width | content                                                |
|---------|-------|--------------------------------------------------------|
| 95:86   | 10    | header, `10'b11_1111_1010`                             |
| 85:81   | 5     | trigger number: lev1 edges since reset, modulo 32      |
| 80:72   | 9     | chip ID (registers 19 and 20)                          |
| 71:8    | 64    | masked hits, channel 0 in bit 71 … channel 63 in bit 8 |
| 7:0     | 8     | zeros                                                  |

The first event after reset carries trigger number 0.

The receiver then supplies **exactly 48 periods** of `ck_ro` (50 MHz in the
chip's use). The word leaves MSB first, one bit per clock edge, which gives
100 Mbit/s:

```
ck_ro      ____/‾‾‾‾\____/‾‾‾‾\____ ... /‾‾‾‾\____
data_out   ====X b95X b94X b93X b92 ... X b1 X b0 X 0 ...
               ^rise0    ^rise1         ^rise47
```

After rising edge *k* (k = 0…47), bit 95−2k is on the line while the clock
is high. After the following falling edge, bit 94−2k is on the line while the
clock is low. A receiver should therefore sample each half period away from
the edges (the testbenches sample in the middle). After the 48th period the
line stays low, and any extra clocks send zeros.

How it is built (`readout_ser.sv`):

* `frame_q` is a capture register clocked by `lev1`. The trigger counter is
  clocked by `lev1` too.
* A 6-bit counter on the rising edge of `ck_ro` picks two bits per period:
  one to show while the clock is high, and one for the falling-edge register.
* `data_out = ck_ro ? q_rise : q_fall` merges the two halves. This
  multiplexer uses the clock as data, which is the usual way to build a
  double-data-rate output. Lint reports it and it is intended.
* While `lev1` is high, it clears the counter asynchronously, through
  `clr = rst | lev1`. A trigger therefore always restarts the word, even if
  the previous word was cut short.

The chip calls this store a "transmission shift register". A capture register
with a bit counter sends the same bit sequence, and it keeps each flip-flop in
a single clock domain (lev1 or ck_ro).

Timing requirements: the hits must be stable around the rising edge of
`lev1`, and `lev1` must be low again before the first rising edge of `ck_ro`.
An assertion in `readout_ser` flags a rising edge of `ck_ro` while `lev1`
is still high. The testbenches use a 25 ns trigger pulse followed by 15 ns
of quiet.

## Slow control

The slow-control port has only four pins: `sc_ck`, `sc_din`, `sc_dout` and
`rst`. There is no chip select, so transactions are framed by counting clocks
from reset. Each transaction is 16 clocks long, MSB first:

```
 bit 15    14..8        7..0
 W/R̄   | address(7) | data(8)
```

* `sc_din` is sampled on the rising edge of `sc_ck`. `sc_dout` changes on the
  falling edge.
* **Write** (bit 15 = 1): the register is written on the 16th rising edge.
* **Read** (bit 15 = 0): the register is fetched on the 8th rising edge. Its
  bits 7…0 appear on `sc_dout` after the 8th…15th falling edges, so the
  master samples them on rising edges 9…16. The data bits that the master
  sends during a read are ignored.
* Addresses 28…127 are ignored on write and read as 0.
* `sc_dout` is 0 outside the data byte of a read.
* If the master loses count, a pulse on `rst` realigns the port. Note that
  `rst` also resets every register.

Register map:

| address | content                                           | reset |
|---------|---------------------------------------------------|-------|
| 0–7     | channel mask, byte *i* = channels 8i…8i+7, 1 = off | 0x00  |
| 8–15    | test-pulse enable per channel, same layout         | 0x00  |
| 16      | threshold DAC code (one for all channels)          | 0x80  |
| 17      | monostable pulse-width DAC code                    | 0x00  |
| 18      | test-input amplitude DAC code                      | 0x00  |
| 19      | chip ID bits 7:0                                   | 0x00  |
| 20      | chip ID bit 8 (in bit 0)                           | 0x00  |
| 21–27   | general configuration, brought out as `cfg_regs`   | 0x00  |

The number and width of the registers, and what they hold, follow the chip.
The addresses, the reset values and the use of a single global threshold are
this design's choices.

## Reset

`rst` is asynchronous and active high. It clears:

* all registers, to the values in the table above;
* the trigger number;
* the serializer;
* the slow-control bit counter.

It does not affect the monostables, which are analog in the chip.

## Choices made here

These points are not fixed by the chip description; each can be changed in
one place:

* the header pattern (`HEADER` in `gastone64_pkg.sv`);
* the bit order inside each field, with channel 0 sent first;
* the slow-control framing and the register map (`gastone64_pkg.sv`,
  `sc_spi_slave.sv`);
* the mask polarity, and taking the OR after the mask;
* a linear code-to-width law and a retriggerable monostable;
* the test-pulse enables (registers 8–15). The chip has a test-input DAC,
  but how channels are selected for the test pulse is not known.

The chip ID comes from registers here. On the real chip it might come from
pins.

## Files

`rtl/`

| file               | content                                                    |
|--------------------|------------------------------------------------------------|
| `gastone64_pkg.sv` | sizes, word layout, register map, `sc_cfg_t`, reset values |
| `gastone64.sv`     | top: wires the blocks below for 64 channels                |
| `sc_spi_slave.sv`  | slow-control serial port                                   |
| `sc_regfile.sv`    | 28 × 8 registers and their decoding                        |
| `channel_mask.sv`  | mask and global OR                                         |
| `readout_ser.sv`   | event capture, trigger counter, double-edge serializer     |
| `monostable.sv`    | behavioural pulse stretcher (delays, not synthesizable)    |

`tb/`: one self-checking testbench per block (`tb_<block>.sv`), plus:

* `tb_gastone64.sv`: end to end at full size. It configures the chip through
  slow control, reads every register back, fires random channels at random
  times before the trigger and compares the whole 96-bit word with a model. It
  changes the width and the mask, and resets the chip. It also counts each
  mechanism — masked hit, stretched hit, expired hit, OR high and low, trigger
  number wrap, read-back, width change, reset — and fails if any of them never
  happened.
* `tb_hit_rate.sv`: 30 kHz of hits per strip on all 64 channels for 1 ms at
  each of the two extreme widths, with about 190 triggers at random intervals.
  Every word is checked against a model, and the observed occupancy is
  printed (about 1.5 %).

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Verilator 5 with timing support is needed, because the monostable and the
testbenches use delays. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/gastone64_pkg.sv rtl/sc_spi_slave.sv rtl/sc_regfile.sv \
  rtl/channel_mask.sv rtl/readout_ser.sv rtl/monostable.sv rtl/gastone64.sv \
  tb/tb_gastone64.sv --top-module tb_gastone64 -Mdir obj_top
./obj_top/Vtb_gastone64
```

A block testbench needs only the package, its block and itself. All runs take
seconds. Every file uses `timeunit 1ns; timeprecision 1ps`.

For synthesis, treat `monostable` as a black box, which is what it is in the
chip: an analog cell in each channel. Everything else in `rtl/` is
synthesizable.

## How far it has been checked

* All testbenches pass with Verilator 5.
* Every file lints with `verilator -Wall` and elaborates in the slang front
  end of Yosys. The remaining lint messages are style warnings, plus the
  intended clock-as-data multiplexer.
* Each block testbench has also been run against a copy of its block with one
  deliberate bug, and it caught the bug. The bugs were: OR before the mask,
  reversed mask bytes, LSB-first read data, trigger number off by one, a
  non-retriggerable monostable, and the wrong width code at the top.
* Not checked: anything analog (gain, noise, peaking time, thresholds in
  millivolts), LVDS electrical behaviour, and real timing margins of the
  double-edge output.
