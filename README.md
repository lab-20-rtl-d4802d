# Push-button UART string sender

A small FPGA design for a board with five push buttons and a USB-serial port
(written with the Digilent Basys3 in mind, 100 MHz clock). Press a button and
a fixed line of ASCII text comes out on the UART transmit pin. A serial
terminal on the PC shows it, e.g. `minicom -D /dev/ttyUSB1 -b <baud>`. Each
button has its own string. Pressing several buttons at once sends the first
string.

The design has three parts:

```
BTN[4:0] ──► mult_debouncer ──► edge detect ──► sequencer FSM ──DATA/DV──► uart_tx ──► UART_TXD
             (5 x debouncer)                     │        ▲  ◄─BUSY/DONE─┘
                                                 ▼        │
                                          uart_word_rom (string table, uart_pkg)
```

| file | what it is |
|---|---|
| `rtl/uart_pkg.sv` | character type, sizes, and the five strings with their lengths |
| `rtl/uart_tx.sv` | UART transmitter, 8N1, one byte per DV strobe |
| `rtl/debouncer.sv` | one-button synchronizer and debouncer |
| `rtl/mult_debouncer.sv` | N debouncers side by side |
| `rtl/uart_word_rom.sv` | combinational lookup: (string, index) → character, length |
| `rtl/top_uart.sv` | the board top: debouncing, sequencer FSM, transmitter |

## The transmitter (`uart_tx`)

Each bit lasts `CLKS_PER_BIT = CLKRATE / BAUDRATE` clocks. This is integer
division, so the defaults of 100 MHz and 96000 baud give 1041 clocks, a rate
error of 0.03 %. A frame has three parts:

- a start bit (low);
- the eight data bits, least significant first;
- a stop bit (high).

There is no parity bit. Four states run the frame: `IDLE → START → SEND_DATA → STOP → IDLE`. Two counters
do the timing. One counts the clocks within the current bit. The other counts
which data bit is on the line.

Handshake, cycle by cycle:

- **DV** is sampled only in `IDLE`. The rising edge that sees DV high copies
  DATA into an internal register and starts the start bit. From then on DATA
  and DV are ignored until the frame ends.
- **BUSY** is high for the whole frame, exactly `10*CLKS_PER_BIT` clocks.
- **DONE** is high for one clock, the last clock of the stop bit. In the
  next clock the machine is back in `IDLE`. So DONE and BUSY are both low
  whenever the transmitter is idle.
- **TX_OUT** comes straight from a flip-flop, so the pin does not glitch.
- If DV is held high, the next frame starts in the first idle clock. Frames
  then start `10*CLKS_PER_BIT + 1` clocks apart.
- **RST** is a synchronous reset, active high.

Two assertions are checked in simulation. The line is low only while BUSY
is high. DONE comes only while BUSY is high.

## The sequencer (`top_uart`)

The top has two states, `IDLE` and `SEND_DATA`. It feeds the string to the
transmitter one character at a time:

- **IDLE**: wait for any debounced button to *rise*. Then latch the whole
  debounced button vector as `command`, clear the character index, and go
  to `SEND_DATA`.
- **SEND_DATA**: while the transmitter is BUSY, keep DV low. When it is not
  busy, drive the current character on DATA and raise DV. Each DONE pulse
  moves the index on by one. The DONE of the last character clears the
  index and DV and returns to `IDLE`.

`command` picks the string:

| command | string |
|---|---|
| `00001` | 0 |
| `00010` | 1 |
| `00100` | 2 |
| `01000` | 3 |
| `10000` | 4 |
| anything else | 0 |

The handover between the FSM and the transmitter costs two clocks per
character:

1. The transmitter sends DONE in the last clock of the stop bit.
2. In the next clock BUSY is low, so the FSM registers the next character
   with DV high.
3. One clock later the transmitter accepts it.

So characters go out every `10*CLKS_PER_BIT + 2` clocks. That is 10412
clocks (104.12 µs) at the defaults. The 27-character banner takes 281,124
clocks, about 2.8 ms.

DV must really go low while the transmitter is busy. Otherwise the
transmitter would take the old character again as soon as it went idle.

Design choices to be aware of:

- **Edge, not level.** A string starts on a button's rising edge. A button
  that is held down sends its string once. A level test would repeat the
  string for as long as the button is down. Because of the debounce, even a
  quick press would then send the banner several times.
- **Presses during a string are ignored.** They are not queued.
- **Power-on reset.** The board has no spare reset button, because all five
  buttons are inputs. A 4-bit counter holds the whole design in reset for
  its first 15 clocks. The FPGA bitstream loads this counter with zero. For
  an ASIC, or an FPGA without initial values, replace it with a real reset
  input. Verilator's lint reports PROCASSINIT on this counter. This is
  intended.

## Debouncing (`debouncer`, `mult_debouncer`)

Each button first passes through a two-flip-flop synchronizer. A counter then
lets the output take a new level only after the input has held that level
for `DEB_CYCLES` clocks in a row. A bounce back to the old level restarts the
count.

- Both presses and releases are delayed by `DEB_CYCLES + 2` clocks.
- A pulse shorter than `DEB_CYCLES` clocks never reaches the output.
- The default is 1,000,000 clocks, 10 ms at 100 MHz.

`mult_debouncer` places N of these side by side.

## The strings (`uart_pkg`, `uart_word_rom`)

Each string is a SystemVerilog string literal stored as a `MAX_LEN*8`-bit
vector, together with its length in `WORD_LEN`. Octal escapes give the
control characters: `\012` is LF and `\015` is CR. A short literal is
zero-padded on the left. Character `i` of string `w` is therefore byte
`WORD_LEN[w]-1-i` counted from the least significant end.

| # | text (LF = `\n`, CR = `\r`) | length |
|---|---|---|
| 0 | `\n\rBASYS3 GPIO/UART DEMO!\n\n\r` | 27 |
| 1 | `\n\rHELLO, WORLD!\n\r` | 17 |
| 2 | `\n\rFPGA SAYS HI\n\r` | 16 |
| 3 | `\n\r0123456789\n\r` | 14 |
| 4 | `\n\rThe quick brown fox\n\r` | 23 |

String 0 is the board-demo banner. Strings 1 to 4 are placeholders: change
them in `uart_pkg`, and update `WORD_LEN` to match. Keep every string between
1 and `MAX_LEN` characters long. If you raise `MAX_LEN`, the index width
follows from it. Past the end of a string the ROM returns `0x00`. A selector
of 5 to 7 reads as string 0.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `top_uart`, `uart_tx` | `BAUDRATE` | 96000 | line rate, bits/s |
| `top_uart`, `uart_tx` | `CLKRATE` | 100000000 | clock frequency, Hz |
| `top_uart`, `(mult_)debouncer` | `DEB_CYCLES` | 1000000 | debounce time in clocks |
| `mult_debouncer` | `N` | 5 | number of buttons |

The default rate is 96000 baud. Many terminals only offer the standard
rates, so for a plain 9600-baud terminal set `BAUDRATE = 9600`. That gives
10416 clocks per bit; the counter widens by itself.

## Ports of `top_uart`

| port | dir | width | |
|---|---|---|---|
| `CLK` | in | 1 | 100 MHz clock |
| `BTN` | in | 5 | raw push buttons, active high, asynchronous |
| `UART_TXD` | out | 1 | serial output, idles high |

## Verification

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_uart_tx` runs at 10 clocks per bit and checks every clock of 26
  frames against the expected waveform. This covers the corner bytes and
  random bytes. It checks:
  - the BUSY and DONE timing;
  - that DV and DATA are ignored during a frame;
  - the `10*CLKS_PER_BIT+1` spacing when DV is held high.
- `tb_debouncer` and `tb_mult_debouncer` check:
  - the exact `DEB_CYCLES+2` delay;
  - that a pulse of `DEB_CYCLES-1` clocks is rejected and one of
    `DEB_CYCLES` clocks passes;
  - that a bouncing press or release gives a single edge;
  - that the buttons are independent.
- `tb_uart_word_rom` compares every character of every string, and the
  out-of-range results, against strings written out in the testbench.
- `tb_top_uart` runs the whole design at 8 clocks per bit with a 16-clock
  debounce. `uart_rx_model`, a behavioural receiver, decodes the line. The
  test covers:
  - each button alone;
  - two buttons at once (string 0);
  - a button held for three string-lengths (sent once);
  - a glitch (nothing sent);
  - a second press during a string (ignored).

  It also checks the `10*CLKS_PER_BIT+2` character spacing and that there
  are no framing errors. It counts each of these behaviours and fails if
  one never happens.
- `tb_top_uart_full` runs `top_uart` at its default parameters. It sends a
  bouncing press of button 0, checks that the 27-character banner arrives
  once at 96000 baud, and checks the debounce latency and character
  spacing. This is about 2.2 million clocks and takes a few seconds in
  Verilator.

To simulate with plain Verilator:

```
verilator --binary --timing --assert \
    rtl/uart_pkg.sv rtl/uart_word_rom.sv rtl/uart_tx.sv \
    rtl/debouncer.sv rtl/mult_debouncer.sv rtl/top_uart.sv \
    tb/uart_rx_model.sv tb/tb_top_uart.sv --top-module tb_top_uart -o sim
./obj_dir/sim
```

The package must come first.

For a unit test, compile its module, the modules it uses (`uart_pkg.sv` for
the ROM and the top) and its testbench, e.g.
`rtl/uart_tx.sv tb/tb_uart_tx.sv --top-module tb_uart_tx`.

## Limits and departures from the reference design

The reference design gives the ports of the top and of the transmitter, the
transmitter's four states and bit timing, the sequencer's two states, the
command decode with its default case, and the banner string. Against that:

- `uart_tx` and the debouncers have an `RST` input that the reference
  transmitter does not list. The top drives them from its power-on counter,
  so the board-level ports are unchanged.
- The default `BAUDRATE` is 96000, the value of the reference parameter
  list. Its bring-up example uses a 9600-baud terminal instead; see
  Parameters.
- DONE is high in the last clock of the stop bit, not in `IDLE`. This keeps
  DONE low whenever the transmitter is idle, as the reference also asks.
- The index advances while it is below the string length minus one. This
  way exactly the string's characters are sent, and no byte past the end.

- The reference design's string table fixes only the banner. The other four
  strings, the debounce scheme and its 10 ms time, the reset, the edge
  trigger and the exact DONE clock are this design's own choices, described
  above.
- Only the transmit direction exists. There is no receiver in the RTL. The
  one in `tb/` is a simulation model.
- Not tested on hardware. The pin constraints for the board are not part of
  this RTL.
