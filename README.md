# Keypad-to-LCD serial link

A key pressed on a telephone-style 4x3 keypad shows up as a character on a
small LCD. The two ends share nothing but one wire. Each end runs on its own
clock, and the two clocks have no phase relationship. The transmitting end
turns the key into an ASCII byte and sends it one bit at a time in an
RS232-style frame. The receiving end finds each frame by sampling the wire
four times per bit, rebuilds the byte, and writes it to the LCD. Inside each
end, blocks pass bytes to each other with a four-phase request/acknowledge
handshake. With that handshake, neither block needs to know how long the
other takes.

The design is the serial-line case study from an introductory
digital-design course. Its structure, signal names, frame format, decode table
and LCD command sequence come from that case study. Where this RTL departs from it,
the change is listed under [Departures and design choices](#departures-and-design-choices).

```
  transmitting end (ClkS)                         receiving end (ClkR = 4 x bit rate)
 +---------+ 7  +----------------+ Send       +----------+ Rcvd        +----------------+  RS, DB[7:0], E
 | keypad  |--->| KeyboardDecode |----------->|          |------------>| DisplayControl |----------------> LCD
 | R1..R4  |    |                |  CharToSend|  Sender  |             |                |
 | C1..C3  |    |                |===========>|          |  TxD = RxD  |                |
 +---------+    |                |<-----------|          |---wire--->  |                |
                +----------------+ AckS       +----------+   Receiver  +----------------+
                                                          CharRcvd ===>   <--- AckR
```

(`Receiver` sits between the wire and `DisplayControl`: it takes `RxD`, and it drives
`Rcvd` and `CharRcvd` to `DisplayControl`, which answers on `AckR`.)

## The frame on the wire

The line rests high. A frame has ten bit slots of one bit time each:

| slot | 0     | 1  | 2  | ... | 8  | 9 and after          |
|------|-------|----|----|-----|----|----------------------|
| TxD  | 0 (start) | D7 | D6 | ... | D0 | 1 (stop, then idle) |

The data goes most significant bit first, unlike the usual UART order. The
line must stay high for at least one bit time before the next start bit. One
bit time is one `ClkS` period. RS232 rates of 9600 to 56000 bit/s therefore
need `ClkS` at the bit rate and `ClkR` at four times the bit rate.

## Four-phase handshakes

The same protocol is used twice: `Send`/`AckS`, carrying `CharToSend`, on the
transmitting end, and `Rcvd`/`AckR`, carrying `CharRcvd`, on the receiving end.

1. The requester puts the byte on the bus and raises the request.
2. The responder takes the byte and raises the acknowledge.
3. The requester, seeing the acknowledge, drops the request.
4. The responder finishes its work and drops the acknowledge.

The byte must be stable from step 1 until the acknowledge is seen. `SerialLink`
carries assertions for the two ordering rules: a request falls only after its
acknowledge was high, and an acknowledge falls only while the request is low.

## Transmitting end

**`KeyboardDecode`**. A key counts as pressed when any row line (`R1`..`R4`) and any
column line (`C1`..`C3`) are high together. On each `ClkS` edge where a key is
pressed and `AckS` is low, the block loads `DOut` with the key's ASCII code
and sets `Send`. The keys in row order are `1 2 3 / 4 5 6 / 7 8 9 / * 0 #`,
giving 0x31..0x39, 0x2A, 0x30 and 0x23. If several keys are closed at once,
the lowest row wins, then the lowest column. `Send` drops on the first edge
that sees `AckS`. The keypad is ignored while `AckS` is high, so a second key
pressed during a frame is lost. A key still held when `AckS` falls is sent
again, so holding a key repeats it about once per frame.

**`Sender`**. On the edge that sees `Send` high and `AckS` low, it loads `DIn` into
an 8-bit shift register, raises `AckS` and clears `BitCount`. `TxD` then
carries the start bit while `BitCount` is 0, and the register's MSB while it
is 1 to 8. The register shifts on every edge after the start bit. `AckS` falls
on the edge where `BitCount[3]` is first seen set, after exactly nine cycles,
and `TxD` returns high. That high is the stop bit.

Frames can follow each other closely. `KeyboardDecode` cannot raise `Send` until
it has seen `AckS` low, and `Sender` accepts it one edge later. A held key
therefore gives a stop bit two bit times long between frames.

## Receiving end: oversampling receiver

This is the most delicate part of the design. `ClkR` runs at four times the
bit rate, but with an unknown phase to the sender. The receiver has three
pieces of state:

* `Receiving`, the idle/busy flag;
* `CycleCount`, 2 bits, counting the sample within the bit;
* `BitCount`, 4 bits, counting the frame slot. It advances when `CycleCount` wraps from 3.

While idle, the first `ClkR` edge that sees `RxD` low sets `Receiving` and
clears both counters. The falling edge of the start bit came somewhere in the
`ClkR` period before that edge. The shift register takes `RxD` on each edge
where `CycleCount` is 1. That edge comes 2 to 3 `ClkR` periods after the
bit's leading edge, just past the middle of the bit. Nine samples (start bit
plus D7..D0) go through the 8-bit register, so it ends holding D7..D0 with the
start bit pushed out.

On the first edge with `BitCount` = 9 and `CycleCount` = 0, which falls early
in the stop bit, three things happen:

* the byte is copied into the output register;
* `Rcvd` rises;
* `Receiving` drops.

On that same edge `CycleCount` steps to 1, so this condition cannot repeat
while idle. `Rcvd` stays high until `AckR` is seen. `CharRcvd` holds until the
next frame completes, so the display side has about nine bit times to answer.

**Clock tolerance.** Let the bit time be 4·T<sub>ClkR</sub>·(1+d). The link
works for d between about −2.7% and +5.5%. Each end of that range has its own
limit:

* **Sender fast (d < 0).** The ninth sample, D0, would fall after the end of
  its slot.
* **Sender slow (d > 0).** The receiver goes idle 37 `ClkR` cycles after the
  start bit. It can look for a new start bit from the 38th. A low D0 still on
  the line at that point is taken for a start bit.

Simulated, d = −2.5% and +5.5% pass; d = −3% and +6% fail. The receiver's
testbench covers ±2%. The full-link test runs `ClkR` at 10.1 ns against a
40 ns `ClkS`.

**Not handled.**

* `RxD` is not synchronised to `ClkR`, so a sample taken just as the line
  changes can go metastable. A two-flop synchroniser in front of `RxD` would
  fix this and move every sample one `ClkR` later.
* The stop bit is not checked, so framing errors are not reported.
* A byte that completes before the previous one was acknowledged overwrites
  it.

The three generic pieces the receiver is built from are `Counter`,
`ShiftRegister` and `Register`. Each has synchronous controls in this
priority order:

* `Counter`: reset, set, load, count.
* `ShiftRegister`: reset, load, shift toward the MSB with the new bit entering at bit 0.
* `Register`: reset, set, load.

The `Sender` uses the same `ShiftRegister`, loading in parallel and taking bits out of its MSB.

## LCD controller

The LCD has no clock. It reads `RS` and `DB` on each falling edge of `E`: `RS`
= 0 for a command, 1 for a character. `DisplayControl` runs in two modes.

**Initialisation**, after every `ResetR`. `RS` is 0, a counter `CS` steps once per
`ClkR` cycle, and `E` follows `CS[0]`. `DB` is loaded when `CS` is 0, 2, 4 and 6,
which is the edge where `E` rises. Each command is therefore stable for a full
cycle on both sides of the falling edge of `E`:

| order | command        | DB        | latched on falling edge of E at cycle |
|-------|----------------|-----------|---------------------------------------|
| 1     | Clear Display  | 0000 0001 | 2 after reset                         |
| 2     | Function Set   | 0011 0011 | 4                                     |
| 3     | Display On     | 0000 1100 | 6                                     |
| 4     | Entry Mode Set | 0000 0110 | 8                                     |

On the edge where `CS` is 8, initialisation ends, `RS` becomes 1 and `CS`
stops.

**Characters.** `E` follows `AckR`. The first edge that sees `Rcvd` loads `DB` and
raises `AckR`, and so `E`. The receiver then drops `Rcvd`, and the next edge
lowers `AckR`. The resulting falling edge of `E` writes the character, which
is still on `DB`. A `Rcvd` that arrives during initialisation waits for it to
end. The LCD's setup and hold times (about 10 ns) must be shorter than a
`ClkR` period. The LCD's command execution time is not modelled: a real
controller may need `ClkR` slow enough, or extra wait states, for Clear
Display in particular.

## Departures and design choices

* **End of initialisation.** In the original sequence, initialisation ends on
  the edge where `CS` = 9. One of its own timing diagrams, however, stops the
  count at 8. Ending at 9 leaves `E` (= `CS[0]`) high for one more cycle with
  Entry Mode Set on the bus. That pulse's falling edge then coincides with
  `RS` switching to 1, giving a stray write of character 0x06 (or a repeat of
  the command, depending on hold time). This design ends at `CS` = 8.
* **Resets and tied pins.** `DOut` in `KeyboardDecode`, the shift registers and
  `DB` are cleared at reset so every register starts defined. Library-module
  pins that the original leaves open are tied to 0.
* **Library modules.** The port lists of `Counter`, `ShiftRegister` and `Register` come
  from their uses in the receiver. Their internal priorities are choices made here.
* **Sender shift register.** The `Sender`'s shift register is the shared `ShiftRegister` module
  rather than inline logic. Its behaviour is the same.
* **Parameters.** `Receiver` has parameters `CYCLE_WIDTH` (default 2, so 4 samples per
  bit) and `SAMPLE_CYCLE` (default 1). Only the defaults have been verified.
* **Not built.** The keypad and the LCD are bought-in parts, not logic. Their lines are the
  top's ports. The keypad has no debouncing: a bouncing key can be sent more
  than once.

## Files

| file | contents |
|------|----------|
| `rtl/serial_pkg.sv` | shared types, key codes and LCD commands |
| `rtl/SerialLink.sv` | top: both ends and the wire, handshake assertions |
| `rtl/KeyboardDecode.sv`, `rtl/Sender.sv` | transmitting end |
| `rtl/Receiver.sv`, `rtl/DisplayControl.sv` | receiving end |
| `rtl/Counter.sv`, `rtl/ShiftRegister.sv`, `rtl/Register.sv` | generic building blocks |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/LcdModel.sv` | behavioural LCD: records RS/DB at each falling edge of E |

## Simulating

Each testbench prints one line `TB_RESULT checks=N failures=M` and stops
itself. It also has a watchdog that counts a failure if the bench hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module SerialLink_tb rtl/serial_pkg.sv tb/SerialLink_tb.sv -o sim
./obj_dir/sim
```

Substitute any other `*_tb` for `SerialLink_tb`.

`SerialLink_tb` runs the whole link at its default parameters:

* `ClkS` at 40 ns and `ClkR` at 10.1 ns, so the two clocks drift against each other;
* 40 key presses, some of them pressed over a busy sender and some held past the end of a frame;
* an LCD model that records every write.

The bench checks the four initialisation commands, then every expected
character in order, both on the LCD and as decoded independently from the
wire. It also fails if any of these never happens: a handshake on either end,
a start bit being found, a key being ignored while busy, or a held key being
repeated.

The per-module benches check the following:

* `KeyboardDecode_tb`: every key code; `Send` timing; that keys are ignored while `AckS` is high.
* `Sender_tb`: frame bits and the nine-cycle `AckS`.
* `Receiver_tb`: 300 frames with random phase, ±2% rate error and random gaps; byte, latency and frame count.
* `DisplayControl_tb`: command order and timing; a `Rcvd` raised during initialisation; each character once, with `RS` = 1.
* `Counter_tb`, `ShiftRegister_tb`, `Register_tb`: random traffic against reference models.
