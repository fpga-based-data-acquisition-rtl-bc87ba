# Data acquisition and telemetry with threshold fault detection

This design is a small FPGA data-acquisition system. It takes three sensor readings:
temperature, voltage and current. It packs them behind a sync byte into a 32-bit telemetry
packet and streams the packets out over a 9600-baud UART. At the same time it raises a fault
flag, intended for a status LED, whenever any reading is above its limit. The readings come
from on-chip counters that stand in for real sensors, so the whole chain can be exercised
without external hardware.

```
 sensor_generator ──temp/volt/curr──► telemetry_packet_generator ──live packet──► fault_detection_unit ──► fault_flag
   (+1/+2/+3 per clock)                 {0xAA,temp,volt,curr}                      T>200 | V>180 | C>150
                                            │ held copy ▲ capture
                                            ▼           │
                                     telemetry_frame_sender ──start/byte──► uart_tx ──► tx
                                                          ◄──── busy ─────   8N1, 9600 baud
```

All files are SystemVerilog (IEEE 1800-2017). Every module and package is in its own file in
`rtl/`, and the testbenches are in `tb/`.

## The sensor stand-in

`sensor_generator` holds three 8-bit counters. On every clock edge it adds 1 to the
temperature, 2 to the voltage and 3 to the current, so *n* cycles after reset the readings
are *n*, 2*n* and 3*n*, each modulo 256. The first cycles give 01/02/03, 02/04/06,
03/06/09 and so on. The counters wrap around, so the readings keep climbing through their
fault limits and dropping back below them. This exercises the fault flag in both directions
without any stimulus. The step sizes are parameters (`TEMP_STEP`, `VOLT_STEP`, `CURR_STEP`).

## Packet format

| bits    | 31:24       | 23:16       | 15:8    | 7:0     |
|---------|-------------|-------------|---------|---------|
| field   | sync header | temperature | voltage | current |
| value   | `0xAA`      | reading     | reading | reading |

For example, readings 01, 02, 03 give `0xAA010203`. The format is the `telemetry_packet_t`
packed struct in `rtl/daq_pkg.sv`, which also holds the header constant and the thresholds.

`telemetry_packet_generator` produces two versions of the packet:

* **`packet` (live).** This is combinational and changes in the same cycle as the readings.
  The fault detector watches this version.
* **`held_packet` (held copy).** This register loads the live packet on a clock edge where
  `capture` is high and keeps it until the next capture. The serial link sends this version.

## Fault detection

`fault_detection_unit` is purely combinational:

```
fault_flag = (temp > 200) | (volt > 180) | (curr > 150)
```

A reading equal to its limit is still normal. The flag has no latch: it rises in the cycle a
reading crosses its limit and falls as soon as all three are back in range. The three
comparison results are also available separately on `fault_bits` = {temp, volt, curr}. The
thresholds are parameters (`TEMP_TH`, `VOLT_TH`, `CURR_TH`), compared as unsigned 8-bit values.

With the counter stand-in, the temperature is over its limit for 55 of every 256 cycles.
The voltage and current go over theirs several times per temperature cycle. For part of each
cycle more than one reading is over its limit.

## Getting a 32-bit packet through an 8-bit UART

This is the part that needs the most care. It is also where this design adds the most of its
own. The UART carries one byte per frame, but a packet is four bytes. The readings change
every clock cycle, while a packet takes 40 bit times to send (416,649 cycles at 100 MHz). If
the bytes were taken from the live packet, the four bytes of one packet would come from four
different samples.

`telemetry_frame_sender` therefore works on a frozen copy. Its three states work as follows:

1. **LOAD.** It raises `capture` for one cycle, and the packet generator freezes the live
   packet into `held_packet`.
2. **SEND.** It offers the byte at `byte_idx` (header first, then temperature, voltage and
   current) with `uart_start`, but only while the transmitter's `busy` is low.
3. **WAIT.** It waits for `busy` to fall. It then moves on to the next byte, or back to LOAD
   after the fourth.

Packets go out back to back, and each carries a fresh sample. The exact timing, which the
testbenches check, is as follows:

* Each byte occupies 10 × `CLKS_PER_BIT` + 2 cycles from one start pulse to the next.
* A packet occupies 4 × (10 × `CLKS_PER_BIT` + 2) + 1 cycles.
* Packet *k* after reset carries the readings of cycle *k* × that period. The first packet is
  therefore `AA000000`.

At 100 MHz and 9600 baud the packet period is 416,649 cycles, about 240 packets per second.
Only one sensor sample in 416,649 is transmitted, but the fault flag watches every sample.

`packet_sent` pulses once per packet, when the fourth byte is handed over.

## UART transmitter

`uart_tx` sends each byte as 8N1: one start bit (0), eight data bits least significant bit
first, and one stop bit (1). A four-state machine steps through IDLE, START, DATA and STOP. A
down-counter times each bit to `CLKS_PER_BIT` = `CLK_FREQ_HZ / BAUD_RATE` cycles, which is
10416 at the defaults (9600.6 baud). The signals behave as follows:

* `start` is accepted only in IDLE, and a request while busy is ignored.
* `busy` rises in the cycle after `start` is accepted and stays high for exactly
  10 × `CLKS_PER_BIT` cycles.
* `tx` is registered and idles high.

An assertion checks that the line is never low while `busy` is low. A second assertion, in
the frame sender, checks that `uart_start` is never raised while the transmitter is busy.

## Top level

`daq_top` (parameters `CLK_FREQ_HZ` = 100 MHz and `BAUD_RATE` = 9600) has four ports:

| port         | dir | meaning                                  |
|--------------|-----|------------------------------------------|
| `clk`        | in  | system clock                             |
| `rst`        | in  | synchronous, active-high reset           |
| `tx`         | out | telemetry serial line, idle high         |
| `fault_flag` | out | high while any reading is over its limit |

The fault detector reads the three fields of the live packet. These hold exactly the current
readings, so the flag responds in the same cycle as the readings change. After generic
synthesis the design has 85 flip-flop bits:

* 24 in the sensor counters;
* 25 for the held packet and its valid bit;
* 14 in the baud counter;
* the rest in the state machines and the shift register.

## Where this design makes its own choices

The block structure, the packet format and header, the three thresholds, the flag equation,
the 8N1 framing, the 9600-baud rate and the busy behaviour are given by the original
description of the system. The following are not, and were chosen here:

* **Clock frequency.** 100 MHz is assumed, from the 10 ns sample period of the reference
  waveforms. Change `CLK_FREQ_HZ` for another board clock.
* **Splitting the packet into bytes.** The held copy, the capture handshake, the byte order
  (header first) and back-to-back packets are all choices made here. The original
  description says only that the packet is sent through the UART.
* **Fault status on the serial link.** The original block diagram draws a fault-status
  connection into the UART block but never says what it carries. It is not built here. The
  flag leaves the chip only on `fault_flag`, and the packet stays at exactly 32 bits.
* **Reset and bit order.** The reset input and the LSB-first bit order are also choices made
  here. The reset makes the design use four I/O pins, where the original reports three.
* **Per-sensor fault bits.** `fault_bits` is an addition. It is kept internal at the top.
* **Size.** The original implementation reports 40 registers and 34 LUTs. This design has 85
  flip-flop bits, mostly because of the 25-bit held packet copy and the 14-bit counter for
  the full 100 MHz to 9600-baud division. Both are still a tiny fraction of a small FPGA.

Not part of the RTL are the status LED, which is a board component driven by `fault_flag`,
and the receiving computer or terminal. The testbenches decode the line with a behavioural
receiver model, `tb/uart_rx_model.sv`.

## Verification

Every block has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

| testbench                        | what it checks |
|----------------------------------|----------------|
| `tb_sensor_generator`            | readings against *n*, 2*n*, 3*n* mod 256 for 600 cycles (two wraps); the first five sample triples; reset in mid-run |
| `tb_telemetry_packet_generator`  | the five reference packets `AA010203` to `AA050A0F`; every value of every field; random triples; held copy against a model register under random capture |
| `tb_fault_detection_unit`        | the six reference cases (two normal, each sensor alone over its limit, all three over); the boundaries 200/180/150 and one above; exhaustive sweeps; random triples |
| `tb_uart_tx`                     | bytes 0x55, 0xA5, 0x3C and 40 random bytes, comparing `tx` and `busy` on every cycle of each frame; start ignored while busy; bytes decoded by the receiver model; a 10416-cycle bit time at the default 100 MHz / 9600 baud |
| `tb_telemetry_frame_sender`      | four bytes per packet, header first, all from one sample; cycle-exact spacing after `busy` falls; no start while busy; `packet_sent` count |
| `tb_daq_top`                     | end to end with 16 clocks per bit, over 60 packets |
| `tb_daq_top_full`                | end to end at the default parameters, over 12 packets (about 5 million cycles) |

The two end-to-end testbenches compare `fault_flag` on every cycle with their own sensor
model. They decode `tx` and check each packet's header and readings against the sample
expected at that cycle. They also count each mechanism and fail if any of them never
happens:

* a fault raised and a fault cleared;
* cycles in fault caused by temperature alone, voltage alone, current alone and by several at
  once;
* packets whose transmitted readings are in fault;
* back-to-back packets;
* counter wrap-around.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/daq_pkg.sv tb/tb_daq_top.sv --top-module tb_daq_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. `daq_pkg.sv` is given first because the other files
import it. Each testbench finishes in a few seconds at most.

## Changing the design

* **Board clock or line rate.** Set `CLK_FREQ_HZ` and `BAUD_RATE` on `daq_top`.
* **Fault limits or header value.** Change the constants in `daq_pkg`, or override the
  parameters on `fault_detection_unit` and `telemetry_packet_generator`.
* **Real sensors.** Replace `sensor_generator` with an ADC interface that presents three
  8-bit readings. Nothing downstream depends on how the readings change.
* **A wider packet (more channels).** Extend `telemetry_packet_t`. `PACKET_BYTES` follows
  from its width, and the frame sender adapts its byte count and byte selection. The sensor
  generator, the packet generator's inputs and its 32-bit live `packet` output, and the
  fault detector are written for three channels. Each of these needs a new field or
  comparison.
