# Extensible Sensor Platform: ASK sensor link in SystemVerilog

The Extensible Sensor Platform (ESP) idea is to pair a standard sensor bus
with a software defined radio, so that one piece of hardware can read any
I2C sensor and send the readings over whatever radio link is around. The
prototype this RTL models is deliberately simple: two FPGA nodes behind
analog 900 MHz transceivers that share a 10.7 MHz intermediate frequency
(IF).

* The **transmitter node** reads a temperature sensor over I2C and sends the
  reading by switching a 10.7 MHz carrier on and off (amplitude shift
  keying, ASK).
* The **receiver node** digitizes the IF, detects whether carrier energy is
  present, recovers the on/off stream and decodes the reading. Software
  then turns an LED on or off by comparing the temperature with a
  threshold.

Both nodes run on one 25 MHz system clock, which is also the DAC and ADC
sample rate. Each node has a 32-bit soft processor with 32 KiB of RAM,
timers, bit I/O and an I2C master. The I2C bus also carries the tuning and
gain control of the RF front-end.

This repository holds synthesizable RTL for everything digital in the two
nodes except the processor, plus self-checking testbenches. The processor,
the converters, the RF boards and the sensor are outside the RTL. Their
connections are ports.

## The on-air format: sub-bits, bits and sync

Plain on/off keying cannot tell a transmitted 0 (carrier off) from a
transmitter that is switched off. So every data bit is sent as six
**sub-bits** of 375 µs each, which makes a bit 2.25 ms long. Each data bit
contains carrier-on sub-bits:

| sub-bit           | 1   | 2   | 3  | 4   | 5   | 6  |
|-------------------|-----|-----|----|-----|-----|----|
| logic 0           | off | on  | on | off | on  | on |
| logic 1           | off | off | on | off | off | on |

A frame starts with a 13 sub-bit **sync pattern** (4.875 ms), and the data
bits follow it directly:

    on off on on off off on off on on off off on

The first sync sub-bit is a carrier-on, which tells the receiver to start
timing. This encoding is the one used by the Holtek HT-680 remote-control
encoder. In `rtl/esp_pkg.sv` the patterns are constants, first sub-bit in
the most significant position:

    SYNC_PATTERN = 13'b1011001011001
    BIT0_PATTERN =  6'b011011
    BIT1_PATTERN =  6'b001001

A frame with an 8-bit payload has 13 + 6·8 = 61 sub-bits. That is
22.875 ms, or 571 875 clocks at 25 MHz. The payload width is a parameter,
`DATA_BITS` (default 8: one byte of whole degrees C). Data is sent most
significant bit first.

## Transmitter node (`esp_tx_node`)

```
 processor bus ──► esp_bus_decoder ─┬─ ram_32k        (32 KiB, instr + data ports)
                                    ├─ timer32 ×2     (sensor interval, 375 µs sub-bit tick)
                                    ├─ gpio           (OUT[0] = carrier enable)
                                    ├─ i2c_master ────► SCL/SDA (sensor, RF tuning/AGC)
                                    └─ ASK regs ──► ask_encoder ─┐
                            GPIO OUT[0] ─────────────────────────┴─ OR ─► dds ─► dac_o[13:0]
```

The **DDS** (`dds`) is a 32-bit phase accumulator. Its top 10 bits address
a 1024-entry sine table, which is computed at elaboration with `$sin`. With
the tuning word `FTW_10M7 = round(10.7/25 · 2^32)` it produces 14-bit
signed samples of a 10.7 MHz sinusoid with amplitude 8191. The DAC receives
these samples. When the carrier is disabled the output is 0, but the phase
keeps running.

The carrier can be keyed in two ways:

1. **By software**, as in the original prototype. The program writes
   GPIO OUT[0] once per sub-bit, timed by timer 1 loaded with 9374 (a
   period of 9375 clocks).
2. **By the hardware encoder** (`ask_encoder`). Write a byte to the ASK TX
   register and the encoder sends the whole frame. `busy` is high for
   exactly 61 × 9375 clocks.

The carrier enable is the OR of the two. Software keying needs no support
from the encoder.

## Receiver node (`esp_rx_node`) and the detection chain

```
 adc_i ─► freq_downconverter ─► decimator ÷50 ─► envelope_detector ─► lowpass_filter ─► binary_decision ─► carrier
            (I/Q mixer, LO=dds)   (25 MHz→500 kHz)  (|I|+|Q|)          (y+=(x−y)/8)       (energy > THRESH)
                                                                                            │
                                          GPIO IN[0] ◄─────────────────────────────────────┤
                                          ask_decoder ─► DATA / STATUS / frame_irq ◄───────┘
```

This chain is the heart of the design. Its stages and the reasoning behind
their sizes:

* **Downconversion.** `freq_downconverter` multiplies each 14-bit ADC
  sample by the cosine and sine outputs of a local `dds` running at the
  same 10.7 MHz. It then drops 13 fraction bits, which leaves 15-bit I and
  Q values. Detection is non-coherent: the local oscillator's phase is
  unrelated to the transmitter's, and a small frequency offset does no
  harm, because only the magnitude is used.
  The mixer also makes a 21.4 MHz image, which aliases to 3.6 MHz at
  25 MHz sampling. The next stage removes it.
* **Decimation by 50** (`decimator`). Integrate-and-dump: each channel
  adds 50 samples and emits the sum at 500 kHz. For a carrier of ADC
  amplitude A, each sum is about 25·A·cos φ (I) and 25·A·sin φ (Q). The
  3.6 MHz image adds at most a few percent. There are 187.5 decimated
  samples per sub-bit.
* **Envelope** (`envelope_detector`). |I| + |Q|. This is an absolute-value
  detector that needs no multiplier. Whatever the carrier phase, the result
  lies between 25·A and 35.4·A.
* **Low pass filter** (`lowpass_filter`). A first-order recursive filter,
  y += (x − y)/8, updated at 500 kHz. Its time constant is 8 samples
  (16 µs), well inside a 375 µs sub-bit.
* **Decision** (`binary_decision`). Outputs 1 when the filtered energy is
  strictly above the threshold register. The reset value is 50 000, about
  40 % of the level of a half-scale carrier (A = 4096). Software can read
  the live energy in the ENERGY register and choose its own threshold.

Measured in simulation with a half-scale carrier, the stream follows the
carrier about 230 clocks (9 µs) after it switches on and about 430 clocks
(17 µs) after it switches off. Both delays are small against the
9375-clock sub-bit.

### Frame decoding (`ask_decoder`)

1. In IDLE the decoder waits for a rising edge (carrier off to on).
2. It samples the stream in the middle of every sub-bit: 4 687 clocks after
   the edge, then every 9 375 clocks.
3. The first 13 samples must match the sync pattern. At the first mismatch
   it pulses `sync_fail` and returns to IDLE. A false start caused by noise,
   or by joining in the middle of a frame, therefore costs only a sub-bit
   or two.
4. Each following group of six samples becomes one bit. A group that
   matches neither pattern is decoded by its second sub-bit (on = 0) and
   sets `bit_err` for the frame.

Sampling in the middle of each sub-bit tolerates edge shifts of almost
±187 µs from filter delay or clock offset, accumulated over the frame. The
original prototype did this decoding in its program, with a timer as the
sample reference. The raw stream is still available on GPIO IN[0] for such
software.

## Processor bus and register map

The processor is not part of the RTL. Each node exposes its data bus as
`bus_req_t {valid, we, addr, wdata, be}` / `bus_rsp_t {ready, rdata}`. A
request is a one-clock `valid`, and `ready` with the read data follows on
the next clock. An assertion in `esp_bus_decoder` enforces this. Each node
also exposes the RAM's instruction fetch port (`iaddr` → `idata`, one
clock).

| address              | transmitter                     | receiver                          |
|----------------------|---------------------------------|-----------------------------------|
| 0x0000_0000–0x7FFF   | RAM                             | RAM                               |
| 0x4000_0000          | timer 0 (sensor interval)       | timer 0 (sample reference)        |
| 0x4000_0100          | timer 1 (375 µs sub-bit tick)   | (none)                            |
| 0x4000_0200          | GPIO: +0 OUT (bit 0 = carrier), +4 IN | GPIO: +0 OUT (bit 0 = LED), +4 IN (bit 0 = carrier) |
| 0x4000_0300          | I2C master                      | I2C master                        |
| 0x4000_0400          | ASK TX: +0 send/busy, +8 FTW    | ASK RX: +0 THRESH, +4 ENERGY, +8 FTW, +12 STATUS, +16 DATA |

* **Timer:** +0 CTRL (bit 0 enable, bit 1 auto-reload, bit 2 interrupt
  enable), +4 LOAD (a write also loads the counter), +8 COUNT, +12 STATUS
  (bit 0 expired; write 1 to clear). With auto-reload the period is
  LOAD+1 clocks.
* **I2C:** +0 CMD, +4 TXDATA, +8 RXDATA, +12 STATUS (bit 0 busy, bit 1
  NACK seen, bit 2 bus held). CMD bits [2:0] select the command:
  * 1 START: a start or repeated start, then TXDATA is sent as the 7-bit
    address and R/W bit.
  * 2 WRITE.
  * 3 READ. CMD bit 8 = 1 sends NACK after the byte.
  * 4 STOP.

  SCL runs at 25 MHz / (4·63) = 99.2 kHz. The controller is the only
  master on the bus and does not support clock stretching.
* **ASK RX STATUS:** bit 0 frame received (sticky, also `frame_irq`;
  write 1 to clear), bit 1 bit error in that frame, bit 2 carrier present
  now, bit 3 sync failure seen (sticky; write 1 to bit 3 to clear).

`esp_top` places both nodes side by side. Every port name has a `tx_` or
`rx_` prefix.

## How far this follows the original prototype

These parts follow the prototype's description directly:

* 25 MHz clock and sample rate, 10.7 MHz IF, 14-bit DDS samples.
* The sub-bit, bit and sync timing and patterns.
* Decimation by 50, absolute-value envelope detection, low pass filtering
  and threshold decision, in that order.
* Two 32-bit timers on the transmitter and one on the receiver.
* The 32 K RAM.
* A 100 kHz, 7-bit-address I2C master.
* Carrier keying through one enable bit, with the recovered bit stream
  read by the processor.

These parts are this design's own choices:

* The sine table size and accumulator width of the DDS. The original DDS
  was a vendor black box.
* The I/Q mixer, the boxcar decimator, |I|+|Q|, the filter coefficient and
  all internal widths.
* 14-bit ADC samples.
* The 8-bit payload.
* The default threshold.
* The bus protocol, address map and every register layout.
* The dual-port RAM. "32 K" is read as 32 KiB.
* The hardware `ask_encoder` and `ask_decoder`. The original did this work
  in software, and the same software path is still available.
* The writable tuning word.
* The reset behaviour: an asynchronous active-low `rst_n` that clears all
  registers but not the RAM.

Not modelled at all:

* The processor and its program.
* The ADC, the DAC and the analog filters.
* The 900 MHz transceivers.
* The temperature sensor. The testbenches use a small I2C slave model
  (`tb/ds1721_model.sv`).

No FPGA implementation of this RTL has been run. Timing at 25 MHz and
area are therefore unverified.

## Simulating

Every block has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
For example, to run the end-to-end test at full size:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-lint -Wno-style \
      -Irtl -y rtl -y tb +libext+.sv rtl/esp_pkg.sv tb/esp_top_tb.sv \
      --top-module esp_top_tb -o sim && ./obj_dir/sim

`esp_top_tb` runs every parameter at its default. It plays both processors
and the radio link: the DAC output is halved, delayed and given noise
before it reaches the ADC. Both programs first write tuning and gain bytes
to an I2C slave model that stands in for their RF front-end. The test then
sends:

* three sensor readings through the hardware encoder;
* one frame keyed by software with timer 1;
* one frame with a corrupted sync.

It checks every received value, the LED decision at 27 °C, the frame time
(571 876 clocks) and that each mechanism happened at least once:

* interval timer;
* I2C read;
* hardware and software frames;
* sub-bit ticks;
* LED on and LED off;
* sync failure;
* receiver timer;
* front-end tuning over I2C.

It simulates about 3.2 M clocks in a few seconds.

The block testbenches shorten the sub-bit (`SUBBIT`) where the check does
not depend on it:

* `ask_encoder_tb`: 20 clocks.
* `ask_decoder_tb`: 40 clocks, with random edge jitter.
* `esp_tx_node_tb`: 40 clocks.
* `esp_rx_node_tb`: 3000 clocks. This is long enough for the real
  detection chain.

## Changing it

* **Payload:** `DATA_BITS` on `esp_top`, `esp_tx_node`, `esp_rx_node`,
  `ask_encoder` and `ask_decoder`.
* **Sub-bit length in clocks:** `SUBBIT`. Use it for another clock rate.
  The receiver needs a sub-bit of at least roughly 40 decimated samples for
  the filter to settle.
* **Carrier and local oscillator frequency:** the FTW registers.
* **Decision level:** `THRESHOLD` or the THRESH register.
* **Filter time constant:** `SHIFT` in `ask_receiver`.
* **I2C rate:** `SCL_FREQ` and `CLK_FREQ` of `i2c_master`.
