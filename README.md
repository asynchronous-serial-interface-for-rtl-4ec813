# BBN 1822 host interface card, in SystemVerilog

An ARPANET IMP (or a packet-radio station) talks to its host computer over
the BBN 1822 interface: two bit-serial, fully handshaken data paths, one per
direction, plus a "ready" relay on each side that tells the other end whether
this end has power. This design is the logic of a small card that gives any
PDP-11 such an interface. The PDP-11 side is a standard DEC DR11-C (or
DRV-11) 16-bit parallel interface, which already provides three program
registers and two interrupt requests. The card turns the DR11-C's output word
into a serial byte for the IMP, assembles serial bits from the IMP into the
DR11-C's input word, drives the host relay and watches the IMP relay.

The card moves one byte at a time. The program writes a byte, waits for an
interrupt (or polls), writes the next. Reading works the same way. Packets of
any length pass through, because the buffers are in host memory.

The original card was clockless 1976 TTL: 74193 counters, a 74152
multiplexer, a 74164 shift register and 74123 one-shots. This version keeps
that structure and runs it on one clock. Each TTL delay becomes a counted
number of cycles.

## The two handshakes

These are the parts that need the most care. Both directions use the same
pair of lines: a *ready-for-next-bit* line from the receiving end and a
*there's-your-bit* line from the sending end. The data line and the *last
bit* line have the same timing as the there's-your-bit line. The card works
with both handshake styles of the 1822 specification:

* **4-way** (levels): ready goes up; bit offered; ready goes down; bit
  withdrawn; and so on.
* **2-way** (pulses): each end only pulses its line. Pulses must be long
  enough to survive long cables, so the card stretches its own pulses with
  one-shots.

### Host to IMP (transmitter)

```
RFNHB (in)   ___/‾‾‾‾‾‾‾‾\________/‾‾‾‾‾‾‾‾‾\____ ...
TYHB  (out)  _____/‾‾‾‾‾‾\_____________/‾‾‾‾‾\___
T4 pulse     ____________/‾‾‾‾T4‾‾‾‾\_______________
bit counter          n   |n+1  (advances on the leading edge of T4)
```

* A 4-bit counter picks the OUTBUF bit on Host Data through a multiplexer.
  Count 0 selects bit 7 and count 7 selects bit 0, so the MSB goes first.
* TYHB is high when all of these hold: RFNHB is high, transmit enable
  (DRCSR bit 0) is set, the hold-off flip-flop is clear, the count is below
  8, and no load pulse or T4 pulse is running.
* The IMP lowers RFNHB to accept the bit. That edge fires T4 (1 µs). The
  leading edge of T4 advances the counter. TYHB stays low for all of T4, and
  after that for as long as RFNHB stays low. T4 is what makes the 2-way
  handshake work.
* When the count reaches 8:
  * counting stops, and a later rise of RFNHB is ignored;
  * REQUEST A (transmit interrupt request, DRCSR bit 7) comes on, if
    transmit enable is set.
* Each write of OUTBUF makes the DR11-C send a load pulse (NEW DATA READY).
  The load pulse:
  * resets the counter, so any unsent bits of the old byte are lost;
  * holds TYHB low for its duration;
  * clears the hold-off flip-flop.
* The hold-off flip-flop is set whenever transmit enable is low. So after
  enable is set, nothing is sent until the program writes OUTBUF. Turning
  enable off and on in the middle of a byte therefore loses the rest of that
  byte.
* LHDB (Last Host Data Bit) is high while the count is 7 (bit 0 on the line)
  and OUTBUF bit 11 is set.

### IMP to host (receiver)

```
TYIB  (in)   ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________/‾‾‾ ...
RFNIB (out)  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________________/‾‾‾‾
                |<-- T1 -->|<-- T2 -->| ...until TYIB low
strobe                     ^ data, LIDB and counter sampled here
```

* RFNIB is high when all of these hold: receive enable (DRCSR bit 1) is set,
  fewer than 8 bits have been taken, the Last Data Bit flag is clear, the
  clear line is inactive, and no bit is in progress.
* TYIB high starts T1 (1 µs). T1 gives the data and LIDB lines time to
  settle, because they may be skewed against TYIB on the cable.
* At the end of T1 a strobe does three things at once:
  * shifts IMP Data into bit 0 of an 8-bit register; earlier bits move
    toward bit 7, so the first bit ends in bit 7;
  * advances the bit counter;
  * samples LIDB into the Last Data Bit flip-flop.
* RFNIB then goes low and stays low for T2 (1 µs), and after that until the
  IMP has dropped TYIB.
* The receiver stops after 8 bits, or after a bit that came with LIDB. It
  then raises REQUEST B (DRCSR bit 15) and accepts nothing more until the
  program reads INBUF.
* Reading INBUF produces the DR11-C's DATA TRANSMITTED pulse. T3 (1 µs)
  starts at the trailing edge of that pulse and drives the *clear line*.
  INIT drives the clear line too.
* The clear line empties the shift register, the bit counter and the
  flags. While it is active, TYIB is ignored and T2 is stopped.
* A TYIB the IMP raised while the receiver was full is taken as soon as the
  clear ends.

## What the program sees

DR11-C addresses for the first unit: DRCSR 167770, OUTBUF 167772,
INBUF 167774 (octal). Interrupt vectors are 300 (transmit) and 304 (receive).

| DRCSR bit | meaning |
|---|---|
| 15 | REQUEST B: receive request (read only) |
| 7 | REQUEST A: transmit request (read only) |
| 6 | transmit interrupt enable |
| 5 | receive interrupt enable |
| 1 | receive enable (CSR1) |
| 0 | transmit enable (CSR0) |

| OUTBUF bit | meaning |
|---|---|
| 13 | open the host relay (host down) |
| 12 | close the host relay (host up) |
| 11 | last byte: LHDB goes with bit 0 |
| 7..0 | data, bit 7 sent first |

| INBUF bit | meaning |
|---|---|
| 15 | special: bit 14 OR bit 11 |
| 14 | the IMP relay changed state since the last read |
| 13 | host relay open (1) / closed (0) |
| 12 | IMP power off (1) / on (0), current level |
| 11 | last byte: LIDB came with the last bit taken |
| 10..8 | bits taken, modulo 8 (0 = a full byte, or none) |
| 7..0 | data, bit 7 = first bit received |

A partial last byte is right-aligned. With `k` bits received, they sit in
bits `k-1..0`, and bits 10..8 read `k`.

Bits 12 and 13 of OUTBUF need to be written only once. A latch holds the
relay state, and a word with both bits clear leaves it alone. With both bits
set, the relay closes. INIT opens it. The relay bounces for up to about
1 ms, so the program should close it before it sets transmit enable. Then
the write that closes the relay does not also send a byte.

The IMP relay level comes in through a debounce filter on the board. Every
change of that level, in either direction, sets the power flag (INBUF
bit 14). The power flag raises REQUEST B but does not stop data reception.
The result is one receive interrupt for each change of the IMP's state.

## Modules

| file | role |
|---|---|
| `rtl/if1822_pkg.sv` | `outbuf_t` and `inbuf_t` register structs, DRCSR bit numbers, default 1 µs width |
| `rtl/if1822_card.sv` | top: joins the four parts below and assembles INBUF |
| `rtl/transmitter.sv` | transmit data section: `xmt_control`, `xmt_serializer`, RFNHB synchroniser |
| `rtl/xmt_control.sv` | TYHB, T4, hold-off flip-flop, REQUEST A |
| `rtl/xmt_serializer.sv` | bit counter, bit multiplexer, LHDB |
| `rtl/host_power_latch.sv` | host relay latch |
| `rtl/receiver.sv` | receive data section: `rcv_control`, `rcv_deserializer`, synchronisers |
| `rtl/rcv_control.sv` | RFNIB state machine (IDLE, DESKEW, HOLD), T1/T2/T3, clear line, REQUEST B |
| `rtl/rcv_deserializer.sv` | shift register, bit counter, Last Data Bit flip-flop |
| `rtl/imp_power_sense.sv` | IMP relay level, exclusive-OR change pulse, power flag |
| `rtl/one_shot.sv` | retriggerable pulse generator (one per 74123 half) |
| `rtl/sync2.sv` | two-flip-flop synchroniser |

Ports of `if1822_card`:

* DR11-C side (synchronous to `clk`): `init`, `outbuf`, `load_pulse` (NEW
  DATA READY), `read_pulse` (DATA TRANSMITTED), `csr0`, `csr1` in; `inbuf`,
  `req_a`, `req_b` out.
* IMP side (single-ended logic levels): `tyhb`, `host_data`, `lhdb`,
  `rfnib`, `host_relay_closed` out; `rfnhb`, `tyib`, `imp_data`, `lidb`,
  `imp_relay_open` in. The inputs may be asynchronous.

## Clock and timing

* One clock, assumed to run at 10 MHz. All delays are parameters in clock
  cycles. Their defaults are the card's 1 µs: `T1_CYCLES`, `T2_CYCLES`,
  `T3_CYCLES` and `T4_CYCLES` are all 10. For another clock, scale them. On
  the original board these delays were changed by changing timing
  capacitors.
* `PWR_PULSE_CYCLES = 3` is the width of the IMP relay change pulse. It
  stands for the board's 120 Ω / 0.002 µF delay, about 240 ns.
* Every IMP-side input passes through a two-flip-flop synchroniser. So:
  * TYHB answers an RFNHB edge within 3 cycles;
  * the receive strobe comes T1 + 1 cycles after TYIB is seen high, and
    T1 + 3 cycles after TYIB reaches the pin.
* Data and LIDB are synchronised the same way. They may lag TYIB by up to
  about T1 minus 2 cycles and still be sampled correctly.
* DR11-C signals are taken as already synchronous to `clk`. If the DR11-C
  side runs on another clock, add synchronisers there.
* `rst_n` is an asynchronous power-on reset. After it:
  * the transmitter is held off;
  * the host relay is open;
  * the IMP is taken to be off, so a card that powers up with the IMP down
    reports no change.

## Where this design departs from the 1976 card, and why

* **Clocked instead of clockless.** Edges of TTL signals became
  edge detections on sampled signals. The 74123 one-shots became
  counters (`one_shot`). The RC delay of the exclusive-OR pulse generator
  became a shift register.
* **T4 trigger gating.** The transmit T4 one-shot is triggered only when
  TYHB could have been high: enabled, not held off, count below 8, and no
  load pulse. RFNHB edges while the transmitter is idle therefore do not
  move the counter. The original wiring of that input could not be
  confirmed.
* **Host relay latch.** The original cross-coupled gates give an undefined
  state when bits 12 and 13 drop together from 1,1. This latch stays closed.
  INIT wins over bit 12.
* **Receiver HOLD state.** HOLD ends only when the real TYIB line is low,
  even during a clear. A bit that is still being offered when the program
  reads INBUF is therefore not taken a second time. A clear that arrives
  during T1 drops that bit without a strobe.
* **Power flag against a long clear.** The change pulse wins over the clear
  line while both are active. A clear that lasts longer than the pulse still
  empties the flag, just as the 7474 on the board does. An IMP relay change
  in the last part of a 1 µs read-clear, or during a 10 µs INIT, shows only
  in bit 12.
* **Analog parts are not modelled.** These include the differential line
  drivers (DM8830) and receivers (DM8820), the relays, the RC debounce on
  the IMP relay input and the power wiring. The ports are the logic levels
  on the inner side of those parts.
* The DR11-C itself is DEC's part, not part of this design.
  `tb/dr11c_model.sv` is a behavioural stand-in for simulation only.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/if1822_pkg.sv tb/tb_if1822_card.sv --top-module tb_if1822_card
./obj_dir/Vtb_if1822_card
```

Replace `tb_if1822_card` to run another test. The block tests are:

| testbench | what it checks |
|---|---|
| `tb_one_shot` | pulse width, retriggering, clear |
| `tb_host_power_latch` | the relay truth table, including INIT |
| `tb_xmt_serializer` | bit order, LHDB, stop at 8, clear |
| `tb_xmt_control` | hold-off, one advance per bit, TYHB low for at least T4, REQUEST A and its gating |
| `tb_transmitter` | random bytes into an IMP receiver model, alternating 4-way and 2-way handshakes |
| `tb_rcv_deserializer` | shift order, count, Last Data Bit flag |
| `tb_rcv_control` | strobe at T1+1 cycles, RFNIB low for at least T2 and until TYIB falls, 2-way pulses, stop when full or on LDB, clear lasting T3 after the read pulse, the three causes of REQUEST B |
| `tb_receiver` | random packets of 1 to 40 bits from an IMP sender model, including partial last bytes |
| `tb_imp_power_sense` | synchroniser delay, pulse width, one flag per change, clear |

`tb_if1822_card` runs the whole card at default parameters. The DR11-C model
sits on the program side. The IMP side is closed with the wiring of the
loopback test plug:

* Host Data to IMP Data;
* LHDB to LIDB;
* TYHB to TYIB;
* RFNIB to RFNHB;
* host relay contacts to the IMP relay input.

An interrupt-driven program model then runs these steps:

1. Closes the host relay and checks the power-change interrupt (INBUF
   140000).
2. Waits 1 ms.
3. Runs the scope-loop pattern three times: words 000000, 000002, 000200,
   004001. The last byte carries LHDB.
4. Runs a 16-word source/sink buffer of random bytes.
5. Opens the relay (INBUF 170000).
6. Issues INIT.

Every INBUF word is compared with what was sent. The test counts how often
each mechanism happened:

* bits sent and taken;
* hold-off;
* the transmitter waiting for a full receiver;
* last-bit transfers;
* full-byte and last-byte interrupts;
* power changes;
* clear pulses.

A mechanism that never happened counts as a failure. The test takes about
2 ms of simulated time and runs in well under a second.

`tb_if1822_source_sink` also runs the whole card at default parameters, but
against an IMP model instead of the loopback plug, using the 2-way (pulse)
handshake. It covers the two one-way modes of the source/sink program:

* transmit only (DRCSR 101 octal): 16 words, every bit and LHDB checked at
  the IMP side;
* receive only (DRCSR 042 octal): packets of random bit length, read into a
  16-word circular buffer. Each INBUF word is checked, including partial last
  bytes.

The transmitter asserts that Host Data and LHDB do not change while TYHB is
high. The receiver asserts that a strobe only ends a T1 pulse. Build with
`--assert` to enable these checks.

## Limits

* All timing is checked in clock cycles. The nanosecond figures given here
  assume the 10 MHz clock.
* The IMP models in the tests follow the handshake rules as described here.
  They are not a model of a real IMP.
* Bits 10..8 of OUTBUF are unused. An earlier version of the card used them
  to set how many bits of a byte to send; that mode is not built.
