# Serial ID transmitter: a state-machine UART transmitter

This design sends a short fixed text string, a nine-character ID
(`A00123456` by default), over an asynchronous serial line each time a reset
button is pressed and released. Any terminal or logic-analyser UART decoder set
to 9600 bit/s, 8 data bits, no parity and 1 stop bit (8N1) can read it. It
targets a small CPLD with a 50 MHz clock and uses only three pins: `clk`,
`reset_n_in` (the button) and `txd`.

The core is the transmit half of a UART built as an explicit finite-state
machine. It keeps no time of its own. It walks through the eleven states of a
serial frame, one state per strobe from its driver. A small control part
supplies those strobes and the characters. That part is a bit-period timer, a
string sequencer and a reset debouncer.

## The serial frame

The line is high when idle. Each character is sent as ten bit periods:

| bit period | 0     | 1..8                                | 9    |
|------------|-------|-------------------------------------|------|
| level      | 0     | data bits 0..7, least-significant first, 1 = high | 1 |
| name       | start | D0..D7                              | stop |

Example: `A` = 0x41 = 0100_0001. The line shows, in time order,
`0 | 1 0 0 0 0 0 1 0 | 1`.

At 9600 bit/s one bit lasts 5208 clocks of 50 MHz. That is 50e6/9600 =
5208.33, rounded, so the real rate is 9600.6 bit/s, 0.006 % fast. The
characters of the string follow each other with no idle time: the stop bit of
one is followed at once by the start bit of the next. A whole string takes
9 × 10 × 5208 = 468 720 clocks, 9.4 ms. After the last stop bit the line stays
high until the button is pressed again.

## Structure

```
              reset_debounce       bit_timer          chr_sequencer
reset_n_in --> sync + filter --+--> ÷5208 strobe --+--> frame / char count --+ nextchr
                               |    (nextbit)      |                         | chr[7:0]
                               | reset_n           |  nextbit                v
                               +-------------------+-----------------------> uart --> txd
```

| module            | role                                                                 |
|-------------------|----------------------------------------------------------------------|
| `uart_pkg`        | frame constants, default clock and bit rate, the state type `tx_state_t` |
| `uart`            | the transmitter state machine                                        |
| `bit_timer`       | `nextbit`: a one-clock strobe every bit period                       |
| `chr_sequencer`   | `nextchr` and `chr`: starts each character of the string in turn     |
| `reset_debounce`  | synchronises and debounces the button into `reset_n`                 |
| `lab6`            | top level, wiring the four together                                  |

Every block runs on the single clock. `reset_n` is a synchronous, active-low
reset to all blocks except the debouncer that makes it.

## The transmitter state machine (`uart`)

### Interface

| port      | dir | meaning |
|-----------|-----|---------|
| `clk`     | in  | clock |
| `reset_n` | in  | synchronous reset, active low |
| `nextchr` | in  | one-clock strobe: begin a new character |
| `nextbit` | in  | one-clock strobe: move to the next bit of the frame |
| `chr`     | in  | the character; it is not stored and must stay valid until the next `nextchr` |
| `txd`     | out | serial line |

The driver normally pulses `nextchr` and `nextbit` in the same clock. The
transmitter also accepts `nextchr` on its own. An assertion, `a_chr_stable`,
checks the one rule the driver must keep: `chr` may not change from the start
bit through the last data bit, unless a new `nextchr` restarts the frame.

### States and transitions

The state type is an enumeration with an `int unsigned` base type. Its states,
in the order they are sent, are `S_IDLE`, `S_START`, `S_D0` … `S_D7` and
`S_STOP`. Declaring the state this way lets FPGA/CPLD synthesis tools recognise
and re-encode the machine, typically as one-hot. Each clock edge applies the
first rule that matches:

| condition (in priority order) | next state |
|-------------------------------|------------|
| `!reset_n`                    | `S_IDLE`; a character in progress is abandoned |
| `nextchr`                     | `S_START`, from any state |
| `nextbit`                     | the following state: `S_START→S_D0→…→S_D7→S_STOP→S_IDLE`; `S_IDLE` stays |
| otherwise                     | unchanged |

Two points are easy to miss:

- **`nextchr` beats `nextbit`.** On the strobe that ends a stop bit, the
  driver raises both. The machine then goes straight from `S_STOP` to
  `S_START`, and back-to-back characters cost no idle time. The same rule makes
  `nextchr` in mid-character restart the frame.
- **The state is never an output.** The state register, the next-state logic
  and the output logic are separate processes. `txd` is its own flip-flop,
  loaded with the level that belongs to the *next* state: high for idle and
  stop, low for start, and `chr[i]` for data bit *i*. So `txd` changes on the
  same edge as the state, cannot glitch, and resets to high.

### Timing

```
clk       _|‾|_|‾|_|‾|_|‾|_ … _|‾|_|‾|_|‾|_
nextbit   __|‾‾‾|___________ … ___|‾‾‾|______
nextchr   __|‾‾‾|___________ … ______________
state       IDLE | START            | D0
txd       ‾‾‾‾‾‾‾|________ … _______|<chr[0]>
```

From a strobe to its new level on `txd` takes one clock. Every bit then lasts
exactly one strobe period.

## Strobes and characters

**`bit_timer`.** A counter runs from 0 to DIV−1, where
DIV = round(`CLK_HZ`/`BAUD`) = (`CLK_HZ` + `BAUD`/2) / `BAUD`. A registered
strobe marks each wrap. After reset the first strobe comes DIV clocks later.
So the line is idle for one bit period before the first start bit. That bit
begins DIV+1 clocks after the reset is released, counting the `txd` register.

**`chr_sequencer`.** It counts strobes in frames of ten. The strobe that opens
a frame also raises `nextchr`, combinationally and in the same clock. This
happens only while characters remain. The index of the current character moves
on at the strobe that *enters the stop bit*. So `chr` already shows the next
character when its `nextchr` arrives. It never changes while data bits are
being sent, because the stop bit does not use it. After the last character,
`done` rises. The next strobe carries no `nextchr` and takes the transmitter
from stop to idle. An assertion checks that `nextchr` never comes without
`nextbit`.

The string is a packed parameter, `TEXT`, with the first character in the
most-significant byte. This is how a SystemVerilog string literal packs it, so
`.TEXT("B00765432")` works directly. `NCHARS` sets its length.

## Reset and debouncing (`reset_debounce`)

A normally-open pushbutton on `reset_n_in` pulls it low while pressed. The
signal goes through a two-flop synchroniser. A counter then requires the
synchronised level to differ from the output for `DEBOUNCE_CYCLES` clocks in a
row before the output follows it. The default is 500 000 clocks, 10 ms. Any
shorter bounce restarts the count. Press and release are filtered alike, so
each takes `DEBOUNCE_CYCLES` + 2…3 clocks to reach `reset_n`.

The debouncer's flip-flops have declaration initial values, so they power up
with reset asserted. CPLD and FPGA flows load these at configuration. That is
the one place the design relies on power-up values, and Verilator reports it
as `PROCASSINIT`. Until the first clock edge `txd` holds whatever level its
flip-flop powered up with; from that edge on the reset holds it high.

A press during a character stops that character as soon as the press has
passed the debouncer. The line is high one clock after `reset_n` falls. After
release, the whole string is sent again from its first character.

## Parameters (top level `lab6`)

| parameter         | default       | meaning |
|-------------------|---------------|---------|
| `CLK_HZ`          | 50 000 000    | clock frequency |
| `BAUD`            | 9 600         | bit rate |
| `DEBOUNCE_CYCLES` | 500 000       | button debounce time in clocks (10 ms) |
| `NCHARS`          | 9             | string length |
| `TEXT`            | `"A00123456"` | the string, first character leftmost |

The transmitter itself has no parameters. The frame is fixed at 8N1.

## What is specified and what is chosen here

These points follow the original specification of the interface:

- the 50 MHz clock and the three top-level pins;
- the `uart` ports;
- the one-clock, aligned `nextchr`/`nextbit` strobes;
- the frame format and bit order;
- the line idling high;
- the synchronous reset that abandons a character;
- the explicit state machine with an unsigned-integer enumerated state type,
  and its transition rules, including the priority of `nextchr`;
- the nine-character ID string;
- 9600 bit/s.

The following are this design's own choices. The original treats the control
part as given and does not describe its insides.

- The control part itself: the bit timer, the string sequencer and the
  debouncer.
- `txd` is registered rather than decoded from the state, which adds one clock
  of latency.
- The divisor is rounded to the nearest integer.
- The line is idle for one bit period before the first character.
- The string is sent once per reset, with characters back to back.
- The debounce time is 10 ms, applied to both edges, and the design powers up
  in reset.

Not provided: a receiver, parity, and more than one stop bit. Nor are the
extra debug output pins that can be added for troubleshooting.

**Resources.** A reference build on a MAX II EPM240 (240 logic elements) used
3 pins and about half the device. After the state is re-encoded, this RTL has
49 to 56 flip-flops. That breaks down as 22 in the debouncer, 14 in the bit
timer, 8 in the sequencer and 5 (binary state) to 12 (one-hot state) in the
transmitter, counting `txd`. Its
logic-element count has not been measured with a device fitter.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench           | what it checks |
|---------------------|----------------|
| `uart_tb`           | `txd` on every clock against the expected frame, for fixed and random characters. Also back-to-back frames, idle gaps, `nextbit` while idle, restart by `nextchr` mid-frame, `nextchr` without `nextbit`, and reset mid-frame. |
| `bit_timer_tb`      | strobe spacing and first-strobe delay for an exact divisor (10) and a rounded one (10.5 → 11), and restart on reset |
| `chr_sequencer_tb`  | the default string. `nextchr` only on strobes 0, 10, …, 80, `chr` valid and stable, `done`, no further characters, restart on reset. |
| `reset_debounce_tb` | power-up in reset, delay window of clean changes, and bursts of short bounces that must never pass, even when their total length is far above the debounce time |
| `lab6_tb`           | the whole design at 16 clocks per bit and a 40-clock debounce; details below |
| `lab6_full_tb`      | the whole design at the default parameters (about 1.2 M clocks): one bouncy release, the nine characters, exact bit timing, 10-bit spacing, debounce plus one-bit delay to the first start bit, and idle afterwards |

`lab6_tb` checks three things:

- power-up, then the string after a bouncy release;
- short bounces during a string, which must be ignored;
- a press in the middle of the fourth character, which must halt it, followed
  by a full resend.

It also counts how often each mechanism occurred, and fails if one never did:

- power-up reset;
- ignored bounce;
- back-to-back characters;
- stop to idle;
- `nextbit` on an idle line;
- a halt by reset.

Both top-level testbenches decode `txd` with `tb/serial_rx.sv`, a receiver
model that samples mid-bit. It also flags any line transition that is not on a
bit boundary.

To run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module lab6_tb rtl/uart_pkg.sv tb/lab6_tb.sv
./obj_dir/Vlab6_tb
```

Replace `lab6_tb` with any other testbench name. The package file must come
first because the modules import it. To lint the RTL alone:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv --top-module lab6 rtl/uart_pkg.sv rtl/lab6.sv
```

Expected lint warnings:

- `PROCASSINIT` on the debouncer's power-up values;
- `UNUSEDSIGNAL` for the sequencer's `done` output, which the top does not
  need;
- `UNUSEDPARAM` for package constants that not every module uses.
