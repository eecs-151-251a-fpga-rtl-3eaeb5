# UART piano

This is a small FPGA system that turns a serial terminal into a piano. Each key
typed on the host is sent over a 115200-baud UART. The FPGA echoes the character
back and plays the key's note as a square wave on the audio pin for a fixed time.
While a note sounds, two synchronous FIFOs hold what the slower parts cannot take
yet. The receive FIFO holds keys typed faster than notes are played. The transmit
FIFO holds echoes waiting for the serial line. A build option swaps in a second
controller. It plays a note from a key-press message until the matching
key-release message arrives.

Everything is written in synthesizable SystemVerilog for a 125 MHz board clock. It
has no vendor primitives.

## Data path

```
 BUTTONS ──► button_parser ──► rst (BUTTONS[3]), note-length control (BUTTONS[0])
                (synchronizer → debouncer → edge_detector)

 FPGA_SERIAL_RX ─► uart_receiver ─(ready/valid)─► rv_to_fifo ─(wr_en/full)─► RX fifo
                                                                               │ rd_en/empty/dout
                                                                               ▼
 aud_pwm ◄── tone_generator ◄── tone_switch_period ◄── piano ◄── piano_scale_rom
                                                         │ wr_en/full/din
                                                         ▼
 FPGA_SERIAL_TX ◄─ uart_transmitter ◄─(ready/valid)─ fifo_to_rv ◄─(rd_en/empty)─ TX fifo
```

A character takes this path:

1. The receiver raises `data_out_valid`. The `rv_to_fifo` bridge writes the byte
   into the RX FIFO in the same cycle, if the FIFO has room.
2. The piano sees the RX FIFO is not empty and pulses `rd_en`. One cycle later it
   latches the FIFO's registered `dout`.
3. The piano writes the same byte into the TX FIFO. If that FIFO is full, it
   waits.
4. The piano drives the byte's `tone_switch_period`, read from the ROM, to the
   tone generator. It does this for exactly `note_length` cycles and then returns
   for the next character. Between two notes there are three silent cycles.
5. In parallel, `fifo_to_rv` pops the echo from the TX FIFO and offers it to the
   transmitter. The transmitter sends it as a 10-bit frame.

The piano fetches the next character only after the current note has ended. So
the RX FIFO is what lets a user type ahead: with 16 entries, one character held
in the piano and one in the receiver, 18 keys typed during one note are all kept.
A 19th key overwrites the byte waiting in the receiver. The system does not
signal backpressure to the host.

## The two FIFO bridges

The UART speaks ready/valid. A transfer happens in a cycle where both `valid`
and `ready` are high. The FIFO speaks `wr_en`/`full` and `rd_en`/`empty`, and its
read data is registered.

* **Receive side (`rv_to_fifo`)** is combinational. `ready = !full` and
  `wr_en = valid && !full`, so the handshake and the FIFO write fall on the same
  clock edge.
* **Transmit side (`fifo_to_rv`)** has to bridge the FIFO's one-cycle read
  latency. It pulses `rd_en` only when it holds no word and none is in flight.
  The next cycle it raises `valid` with `data = dout`. It keeps `valid` high until
  the transmitter accepts the word. No new read is issued meanwhile, so `dout`
  cannot change under a pending word. At most one word moves every three cycles,
  which is far faster than a UART needs.

## FIFO (`fifo.sv`)

The FIFO is a circular buffer with a write pointer, a read pointer and an
occupancy counter of `ADDR_WIDTH+1` bits. The counter is what tells a full
buffer from an empty one: in both cases the two pointers are equal.

* Write: with `wr_en` high and `full` low, `din` is stored and the write pointer
  advances.
* Read: with `rd_en` high and `empty` low, the addressed word is registered onto
  `dout` and the read pointer advances.
* A write while full, or a read while empty, is ignored and corrupts nothing.
* A read and a write in the same cycle leave the count unchanged. When full, such
  a cycle performs only the read. When empty, it performs only the write.
* `rst` is synchronous and empties the FIFO.
* Any depth works, not only powers of two.
* The flags are decoded from the registered count.

The FIFO has no almost-full, almost-empty, programmable-threshold, count,
acknowledge, overflow or underflow outputs.

## Piano controllers

### Fixed note length (`piano.sv`, default build)

The controller is a four-state machine: `IDLE → FETCH → ECHO → PLAY → IDLE`.

* **Note length.** `note_length` resets to `CLOCK_FREQ/5` (0.2 s).
* **Adjusting it.** A press of BUTTONS[0] changes it by `NOTE_LENGTH_STEP`
  (20 ms by default). SWITCHES[0]=1 adds the step and SWITCHES[0]=0 subtracts it.
* **Saturation.** The value never goes below one step and never wraps past the
  top of its 32-bit register.
* **Change during a note.** The new length applies to the note already sounding.
* **Unknown characters.** A character with no note is still echoed, and then
  "plays" silence for `note_length`.

The LEDs show:

| LED | Meaning |
|---|---|
| 0 | A note is playing. |
| 1 | The echo is waiting on a full TX FIFO. |
| 2 | The RX FIFO is not empty. |
| 3 | `note_length` is at its minimum. |
| 4 | `note_length` is at its maximum. |
| 5 | `note_length` is at its default. |

### Variable note length (`piano_variable.sv`, `VARIABLE_NOTE_LENGTH=1`)

The host sends a packet for every key-down event and every key-up event:

* Key down: `0x80` followed by the character.
* Key up: `0x81` followed by the character.

A three-state parser (`WAIT_HEADER`, `WAIT_PRESS_KEY`, `WAIT_RELEASE_KEY`) pops
one byte at a time. It reacts to packets as follows:

* A press while silent starts that key's note.
* A press while a note plays is dropped.
* A release of the sounding key stops the note.
* A release of any other key is dropped.
* A byte that is neither header, arriving where a header is expected, is dropped.
  The parser then re-aligns on the next header.

This build echoes nothing. LED 0 shows that a note is playing, and LEDs 1 and 2
show the parser state.

## Notes and pitches (`piano_scale_rom.sv`, `tone_generator.sv`)

The ROM has 256 words of 24 bits, indexed by ASCII code. It is not a data file:
every word is computed at elaboration as
`round(CLOCK_FREQ / (2 · f))`, where `f = 440 · 2^((n − 69)/12)` and the key's
note number is `n`, with C4 = 60. The result is the number of clock cycles in
half a period of the note. Changing `CLOCK_FREQ` therefore retunes the whole
table.

| Keys | Notes |
|---|---|
| `z s x d c v g b h n j m ,` | C3 … C4 chromatically (`<` also plays C4) |
| `q 2 w 3 e r 5 t 6 y 7 u i` | C4 … C5 |
| `Z S X D C V G B H N J M` (shifted) | one octave lower |
| `Q @ W # E R % T ^ Y & U I` (shifted) | one octave higher |

Every other code reads 0, which means silence.

The tone generator toggles `aud_pwm` every `tone_switch_period` cycles while it
is enabled. It holds the output low and clears its counter when the period is 0
or when it is disabled. Every note therefore starts on a fresh half period. At
125 MHz, A4 ('y') is 142,045 cycles per half period.

## Buttons

Each button passes through three stages. First, two synchronizing flip-flops.
Second, a debouncer that samples every 25,000 cycles and needs 150 consecutive
high samples (30 ms). Third, a rising-edge detector. A press thus becomes one
single-cycle pulse, about 30 ms after the button goes down.

BUTTONS[3] is the system reset. Its pulse synchronously resets the UART, both
FIFOs, both bridges, the piano and the tone generator. The parser's own
registers start at zero through initial values, since it produces the reset.
With `verilator -Wall` this gives `PROCASSINIT` warnings, which are expected.

Nothing else has a power-on reset. On an FPGA, configuration clears every
register, so the system starts idle. In a simulator that starts registers at
random values, the UART, FIFOs and piano produce garbage until the first
BUTTONS[3] press. The top-level testbenches press reset first and ignore
anything before it.

## Parameters (`z1top`)

| Parameter | Default | Notes |
|---|---|---|
| `CLOCK_FREQ` | 125,000,000 | This sets the bit time, note length, debounce time and pitch table. |
| `BAUD_RATE` | 115,200 | 1085 cycles per bit at 125 MHz. |
| `FIFO_DEPTH` | 16 | Used for both FIFOs. |
| `VARIABLE_NOTE_LENGTH` | 0 | 1 selects the key-press/key-release controller. |
| `NOTE_LENGTH_DEFAULT` | `CLOCK_FREQ/5` | 0.2 s. |
| `NOTE_LENGTH_STEP` | `CLOCK_FREQ/50` | Step size and minimum. |
| `B_SAMPLE_CNT_MAX`, `B_PULSE_CNT_MAX` | 25,000 / 150 | Debounce timing. |

`piano_pkg.sv` holds the shared types (`char_t`, `period_t`), the 24-bit period
width and the two packet header codes.

## What is this design's own choice

The overall structure is fixed: the block structure, the FIFO behaviour and
interface, the 0.2 s default note, the button/switch control of the note length,
the echo, the packet protocol and the 16-deep FIFOs. The points below are
choices this implementation makes and could reasonably be made otherwise:

* **Clock.** The board clock is 125 MHz.
* **Reset.** BUTTONS[3] is the reset.
* **Board I/O.** There are four buttons, two switches and six LEDs, and the LED
  meanings are as listed above.
* **Note length.** The step is 20 ms, and the value saturates at one step and at
  the register maximum.
* **Debounce timing.** The debouncer samples every 25,000 cycles and needs 150
  high samples.
* **Semitone layout.** The order of semitones within each keyboard row is this
  design's.
* **Pitch table.** The table is computed in equal temperament, and each word is a
  half period in clock cycles.
* **Tone generator.** It has an explicit `output_enable`.
* **UART frames.** The UART uses 8N1 frames, samples each bit in its middle, and
  does not check the stop bit.
* **Lost bytes.** A received byte the RX FIFO could not take is overwritten by
  the next one.
* **Unknown bytes.** The variable-length parser drops unknown bytes.
* **Audio output.** No amplifier enable or other audio-path pin is generated.

## Verification

Every module has a self-checking testbench, `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The main ones:

* **`fifo_tb`** compares the FIFO against a queue model through fill, overflow
  attempts, drain, underflow attempts, write/read bursts, random simultaneous
  traffic, and reset.
* **`uart_transmitter_tb` and `uart_receiver_tb`** check frames bit by bit at
  8 and 16 cycles per bit. The receiver test adds bit-time skew and a start-bit
  glitch.
* **`uart_tb`** runs the UART in loopback.
* **`piano_tb`** checks echo order, exact note lengths, pitches, the wait on a
  full TX FIFO, and saturation at both ends.
* **`piano_variable_tb`** checks every discard rule, including several keys held
  at once.
* **`z1top_tb`** runs the whole system at a reduced clock (1.152 MHz, so 10
  cycles per bit), with 20,000-cycle notes and a short debounce. It instantiates
  both the default build and the variable-length build. It checks:
  * echo of every character in order;
  * note length and `aud_pwm` half period;
  * the RX FIFO filling during an 18-key burst, with no key lost;
  * lengthening and shortening of the note, and saturation at the minimum;
  * reset during a note;
  * the press/release behaviour of the variable-length build.

  It counts each of these mechanisms and fails if one never happens.

  The TX FIFO cannot fill inside the full system, because echoes leave as fast
  as characters arrive. Its backpressure path is tested in `piano_tb` instead.
* **`z1top_full_tb`** uses all defaults. It presses reset for 35 ms and sends
  'q' at 115200 baud. It then checks the echo, a note of exactly 25,000,000
  cycles, and a half period of 238,891 cycles (C4). This is about 30 million
  cycles, a few tens of seconds in Verilator.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/piano_pkg.sv tb/z1top_tb.sv --top-module z1top_tb
./obj_dir/Vz1top_tb
```

Replace `z1top_tb` with any other testbench name. Each testbench uses only the
modules it needs, which Verilator finds in `rtl/` through `-Irtl`. The
testbenches initialise everything they read and use `$urandom` for random
stimulus, so they also run on two-state simulators.
