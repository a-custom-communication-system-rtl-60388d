# Two-wire I/O network for industrial machine control

An industrial machine with a couple of hundred sensors and actuators spread
over tens of metres normally needs one cable per signal back to the
controller. This design replaces that wiring with a single two-wire line. A
**central unit** (an 8051-based controller chip) sits at one end. Along the
line hang small **peripheral units**, each serving 10 digital outputs, 10
digital inputs, one analogue output and one analogue input. The central unit
is the only master. It polls the peripherals in turn and forwards output
changes ordered by its processor. A peripheral speaks only to answer.
Manchester coding and a 16-bit CRC on every message keep the link robust in
a noisy plant. After repeated faults the master stops and raises a failure
signal.

This repository holds synthesizable SystemVerilog for the logic of both chips:
the link (encoder, decoder, framing, CRC), the master's receiver-transmitter
(URT) with its polling engine, the peripheral's URT, and the central unit's
bus control, RAM and real-time clock. A system top joins one central unit and
`N_PER` peripherals on a modelled shared line.

## The messages

Every message starts with a sync pattern, then carries fields most
significant bit first, and ends with a CRC-16 over the fields:

| Message | From | Fields after sync | Payload bits |
|---|---|---|---|
| Checking | master | address(5), type `11` | 7 |
| Switch-off | master | address `00000`, type `01` | 7 |
| Digital | master | address(5), type `00`, digital outputs(10) | 17 |
| Mixed | master | address(5), type `10`, digital outputs(10), analogue output(8) | 25 |
| Inputs state answer | peripheral | address(5), digital inputs(10), analogue input(8) | 23 |

Address 0 is the broadcast address of the switch-off message. The sweep
polls addresses 1 to the last address, so at most 31 peripherals take part.

**Line coding.** Each bit is one cell of `2*HALF` clocks with a transition
in its middle: `1` is high then low, `0` is low then high. The sync pattern
is three half-bits high and then three half-bits low. Data never holds a
level longer than two half-bits, so a receiver can always tell the sync from
data. The line idles low. With the default 11.0592 MHz clock, `HALF = 576`,
so a cell lasts 1152 clocks: 9600 bit/s.

**CRC.** CRC-16-CCITT (polynomial 0x1021), preset to 0xFFFF, no reflection
and no final inversion. It covers the fields but not the sync. The CRC
register of a receiver that has shifted in fields and CRC ends at zero.

**End of a message.** The receiver does not use the type field to find a
message's length. After the last CRC bit the sender returns the line to low
and stops. The first bit cell without a middle transition therefore ends the
frame. The receiver reports the number of bits it got, and the user checks
that this length fits the type. One receiver design thus takes every message
kind, and a frame cut short by noise fails the length or CRC check.

## Decoding the line (`manchester_rx`)

The decoder is the part of the design that has to cope with real signals:

1. The line passes two synchroniser flip-flops.
2. While idle, the decoder measures every high period. A high period of 2.5
   to 3.5 half-bits that ends in a falling edge is taken as a sync. The line
   must still be low in the middle of the sync's low half.
3. The first data cell starts three half-bits after the sync's falling edge.
   Each cell is sampled at 1/4 and at 3/4 of its length. Different samples
   give a bit whose value is the first sample. Equal samples end the frame.
4. Any edge between the two sampling points is the cell's middle transition.
   It resets the cell timer to the middle of the cell. The receiver follows
   a transmitter whose clock is several percent off; the testbench passes
   frames sent 12 % fast and 12 % slow.

A station turns its receiver off while it transmits, so it never decodes its
own message from the shared line.

## The master's polling engine (`urt_uc`)

This is the behaviour that matters most in the field:

* **Sweep.** The master sends a checking message to address 1 and waits for
  the answer. A good answer goes into the *input image* (one entry per
  address), and the master moves on to the next address up to `last_addr`.
  Then it starts again at 1.
* **Fault.** A fault is any of: no complete frame within `TIMEOUT_BITS` (64)
  bit cells after the master's message ends, a bad CRC, a wrong length, or
  an answer from a different address.
* **Resends.** After a fault the same message is sent again, up to
  `RETRIES` = 5 more times. Each transaction thus has at most six attempts.
* **Failure.** If the fifth resend also fails, `fail` rises. The failing
  address is stored and the sweep stops: the line stays silent.
* **Processor messages.** The processor writes a message (any of the four
  types) into registers and sets the command bit. The message goes out
  between two sweep transactions, with the same resend rule. A switch-off
  message is sent to address 0 and expects no answer. Sending a processor
  message clears `fail`. If the sweep had stopped, it restarts at address 1.
  A new command may be written while the previous message is still waiting
  for its answer, since the message is copied when it is taken.
* **Spacing.** Between one message and the next the master leaves
  `GAP_BITS` (2) idle bit cells.

### URT registers (page `0xE0xx` of the processor's data space)

| Offset | Access | Content |
|---|---|---|
| 0x00 | W | bit 0 = 1: send the message in 0x01..0x05 |
| 0x00 | R | `{4'b0, last_ok, sweeping, fail, busy}` |
| 0x01 | RW | message address [4:0] |
| 0x02 | RW | message type [1:0] (00 digital, 01 switch-off, 10 mixed, 11 check) |
| 0x03 / 0x04 | RW | digital outputs [7:0] / [9:8] |
| 0x05 | RW | analogue output |
| 0x06 | RW | last address of the sweep (reset: `LAST_ADDR_RST`, `N_PER` in the system) |
| 0x07 | R | address that caused the failure |
| 0x80 + 4a + k | R | input image of unit a: k=0 inputs [7:0], k=1 inputs [9:8], k=2 analogue input, k=3 bit 0 = entry valid |

`busy` means a processor message is queued or under way. `last_ok` tells
whether the last processor message was answered; a switch-off always counts
as answered.

### Timing of one poll

At the default rates, one poll of one peripheral takes about 85,000 clocks,
or 7.7 ms:

| Step | Clocks |
|---|---|
| checking message, (6 + 2·23) half-bits | 29,952 |
| end detection plus 2-cell turnaround at the peripheral | about 3,500 |
| answer, (6 + 2·39) half-bits | 48,384 |
| end detection plus 2-cell gap at the master | about 3,500 |

A sweep of ten units therefore refreshes every input about every 77 ms; the
full-size simulation measures 76 ms. A sweep of all 31 possible addresses
would take about 240 ms.

## The peripheral unit (`urt_per`)

A peripheral listens to every frame. A frame is ignored if its CRC is bad or
its length does not fit its type code. Otherwise:

* **Checking message** to its address: it answers.
* **Digital message** to its address: it sets the 10 digital outputs and
  answers.
* **Mixed message** to its address: it sets the digital outputs and the
  8-bit analogue output code, then answers.
* **Switch-off message** (address 0): every peripheral clears all its
  outputs. None answers.

The answer starts `TURN_BITS` (2) bit cells after the peripheral has seen the
end of the frame. The digital inputs, after a two-flop synchroniser, and the
A/D value are sampled at that moment. The address comes from five switches
(`my_addr`); address 0 never answers. All outputs are off after reset.

## The central unit (`asicuc`)

The central unit's processor is an 8051-compatible core, a bought-in block
that is not part of this RTL. Its external bus is assumed already
demultiplexed: 16-bit address, 8-bit data in and out, and active-low `RD`,
`WR` and `PSEN`. That bus is the processor port of `asicuc`. On it sit:

* **`combina`**, the bus controller. It decodes addresses into block selects
  and enables, returns the selected block's read data (0xFF when nothing is
  selected), and turns each write cycle into one clock-wide write strobe at
  the falling edge of `WR`. Memory map:

  | Range | Block |
  |---|---|
  | program fetch (`PSEN` low) | external ROM, `rom_oe_n` |
  | 0x0000-0x00FF | internal RAM |
  | 0xE000-0xE0FF | URT |
  | 0xE100-0xE1FF | real-time clock |
  | 0xE200-0xE2FF | external I/O (serial port, modem, keyboard): `ext_cs_n`, `ext_rd_n`, `ext_wr_n` |

* **`int_ram`**, 256 bytes, synchronous, with one clock of read latency.
  That latency is hidden inside the processor's multi-clock read strobe.
* **`urt_uc`**, described above.
* **`rtc`**, the real-time clock. It keeps seconds, minutes, hours and a
  16-bit day number for usage records. It counts `rtc_tick` pulses, one-clock
  enables from a 32.768 kHz time base (`TICKS_PER_SEC`). Registers 0-4 hold
  seconds, minutes, hours, day[7:0] and day[15:8]. Writing the seconds
  register restarts the current second.

## Files

| File | Content |
|---|---|
| `rtl/urt_pkg.sv` | field widths, type codes, payload lengths, CRC constants, line timing |
| `rtl/crc16_serial.sv` | bit-serial CRC generator and checker |
| `rtl/manchester_tx.sv`, `rtl/manchester_rx.sv` | line encoder and decoder |
| `rtl/urt_frame_tx.sv`, `rtl/urt_frame_rx.sv` | whole messages: fields + CRC |
| `rtl/urt_uc.sv` | master URT: sweep, resends, failure, registers, input image |
| `rtl/urt_per.sv` | peripheral unit logic |
| `rtl/combina.sv`, `rtl/int_ram.sv`, `rtl/rtc.sv` | central unit bus control, RAM, clock |
| `rtl/asicuc.sv` | central unit chip (all of the above but the 8051 core) |
| `rtl/io_control_system.sv` | system top: one central unit, `N_PER` peripherals, shared line |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_io_control_system_full` |
| `tb/tb_line_tasks.svh` | reference line model (CRC, sender, receiver) written independently of the RTL |
| `tb/tb_io_cpu_tasks.svh` | 8051-style bus cycles for the system testbenches |

In `io_control_system` the shared line is the wired OR of all stations'
transmit outputs; each station holds its output low when silent. The system
brings out the processor bus, the ROM and external I/O enables, `fail`, the
line level, and per peripheral its address switches, digital inputs and
outputs, A/D input value and D/A output code.

Parameters and defaults:

| Parameter | Default | Where |
|---|---|---|
| `N_PER` | 10 (about 200 I/O at 22 per unit) | `io_control_system` |
| `HALF` | 576 clocks (11.0592 MHz, 9600 bit/s) | all line blocks |
| `RETRIES` | 5 | `urt_uc`, `asicuc` |
| `TIMEOUT_BITS` | 64 bit cells | `urt_uc`, `asicuc` |
| `GAP_BITS`, `TURN_BITS` | 2 bit cells | `urt_uc`, `urt_per` |
| `LAST_ADDR_RST` | 31 (`N_PER` in the system) | `urt_uc`, `asicuc` |
| `TICKS_PER_SEC` | 32768 | `rtc`, `asicuc`, `io_control_system` |

All registers use the active-low asynchronous reset `rst_n`, except the RAM
array.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_io_control_system rtl/urt_pkg.sv tb/tb_io_control_system.sv
./obj_dir/Vtb_io_control_system
```

Run this from the repository root, because the testbenches include
`tb/*.svh` by that path. Replace the top module name to run any other
testbench. The block testbenches and `tb_io_control_system` use
`HALF` = 4 or 8 to keep runs short. `tb_io_control_system_full` runs the
system at its defaults: ten units at 9600 bit/s. It checks the sync and
bit-cell lengths on the line (1152 clocks per bit), one complete sweep into
the input image, a mixed message and a switch-off. Its ten units carry 220
I/O, the size of machine the system was built for. It takes a few seconds.

`tb_io_control_system` counts every mechanism seen on the line and fails if
one never happened: sweep polls, stored answers, the five resends, the
failure and the silence after it, the restart by a processor message, and
the digital, mixed and switch-off messages. The resends and the failure are
provoked by moving one unit's address switches.

## What follows the original description and what does not

Taken from the original description of the system:

* the master/slave structure and the polling sweep from address 1 to the
  last address
* the five message layouts, their field widths and type codes
* the 9600 bit/s rate, Manchester coding and the 16-bit CRC
* five resends, then a failure signal that stops the sweep until the
  processor sends a message
* the I/O count of a peripheral (10 + 10 digital, 1 + 1 analogue) and its
  5-bit switch address
* the central unit's blocks: 8051, bus control, 256-byte RAM, URT and
  real-time clock

Choices of this design, where the description gives no detail:

* sync shape, bit polarity and idle level; CRC polynomial and preset; MSB-first
  order; ending a frame when the transitions stop
* the count of attempts. The description both says "resends five times more"
  and says the failure comes after "five successive" faults. Here the
  failure follows the fifth resend, six attempts in all.
* what counts as a fault; the timeout, gap and turnaround lengths; restarting
  the sweep at address 1 after a failure
* answering digital and mixed messages as well as checks; the switch-off
  message clearing all outputs of every unit
* the processor bus form, memory map, register maps, input image and
  real-time clock layout
* the 11.0592 MHz clock and the default of ten peripherals

Not in this RTL, because these parts are bought in, analogue or mechanical;
their signals are ports instead:

* the 8051 core and the external program ROM
* the serial port, modem and keyboard
* the frequency-shift-keying modem that puts the Manchester signal on the
  coaxial cable, and the cable itself. The line here is a logic level.
* the A/D and D/A converters
* the address switches
* the battery supply of the clock
