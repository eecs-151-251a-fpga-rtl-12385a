# UART serial link with a case-swapping echo

This design makes an FPGA talk to a terminal over an asynchronous serial line.
The line runs at 115200 baud with 8 data bits, no parity and one stop bit.
A UART (receiver plus transmitter) turns the line into 8-bit characters on
ready/valid interfaces. A small state machine takes each received character,
swaps upper and lower case for ASCII letters, and sends it straight back.
Type `Hello, World` on the far end and `hELLO, wORLD` comes back.

The receiver and transmitter are written to be reused: the echo machine is
only a first client, and any logic with a ready/valid interface can take its
place.

```
            FPGA_SERIAL_RX                                   FPGA_SERIAL_TX
                  |                                                ^
   +--------------|------------------ uart ------------------------|--+
   |        [pin register]                                 [pin register]
   |              v                                                |  |
   |        uart_receiver --data_out/valid/ready--+   uart_transmitter |
   +----------------------------------------------|-------^-----------+
                                                  v       | data_in/valid/ready
                                                echo_fsm -+
```

## The frame and the symbol time

When idle, the line is high. A character is sent as ten symbols of equal
length:

| symbol | 0     | 1 .. 8                          | 9    |
|--------|-------|---------------------------------|------|
| value  | 0     | data[0] .. data[7], LSB first   | 1    |
| name   | start | data                            | stop |

Everything is timed in system clock cycles:

* `SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE` cycles per symbol (integer
  division). At the defaults, 125 MHz and 115200 baud, this is 1085 cycles, so
  one frame takes 10850 cycles.
* `SAMPLE_TIME = SYMBOL_EDGE_TIME / 2`. The receiver reads each symbol this
  many cycles after the symbol starts, which is 542 cycles at the defaults.

Both sides must use the same baud rate. All timing inside a frame is measured
from the falling edge of the start bit. Sampling in the middle of each symbol
leaves up to half a symbol of margin for the drift that builds up over the
frame. By the stop bit, 9.5 symbols in, that margin allows the two ends' bit
rates to differ by about 5 %. The end-to-end testbench runs a sender that is
1.6 % fast.

## Transmitter (`uart_transmitter`)

A ten-bit shift register is loaded with `{1, data, 0}`, and its bit 0 *is*
the serial output. Every `SYMBOL_EDGE_TIME` cycles it shifts right and fills
with ones. After ten symbols the register holds all ones, so the line idles
high with no extra multiplexer. Two counters track the position: a
cycle-in-symbol counter (11 bits at the defaults) and a symbol counter
(0..9).

`data_in_ready` is high while the transmitter is idle. It is also high in the
last cycle of the stop bit. A character that is already waiting is therefore
loaded the moment the previous frame ends, and its start bit follows the stop
bit with no idle cycle. A stream of characters leaves at the full baud rate,
one frame every `10 * SYMBOL_EDGE_TIME` cycles. The start bit appears on the
line in the cycle after the handshake.

## Receiver (`uart_receiver`)

The receiver waits in idle until it sees the line low. That cycle counts as
cycle 0 of the start bit. From then on it counts cycles exactly as the
transmitter does. At `SAMPLE_TIME` into each symbol it shifts the line level
into an eight-bit shift register, so the start-bit sample falls out of the
bottom.

When the stop bit is sampled, three things happen:

* the eight data bits are copied into the output register `data_out`;
* the `has_byte` flag, which drives `data_out_valid`, is set;
* the receiver goes back to idle.

Because the receiver is idle again halfway through the stop bit, it is ready
for a start bit that follows the stop bit directly.

`has_byte` makes the output a proper ready/valid source. Once set, it stays
set until a cycle in which `data_out_ready` is high, and then it clears.
`data_out` has its own register, so it stays unchanged while the next frame
shifts in. An assertion in the module checks that valid is never withdrawn
before ready.

Timing: `data_out_valid` rises `9*SYMBOL_EDGE_TIME + SAMPLE_TIME + 1` cycles
after the cycle in which the receiver first sees the start bit.

What the receiver does **not** do:

* It does not check that the start bit is still low at its middle.
* It does not check that the stop bit is high, so there is no framing-error
  flag.
* It has no overrun flag. If a second character completes while the first is
  still unread, the first is overwritten.

## The UART wrapper and the pin registers (`uart`)

`uart` places a receiver and a transmitter side by side. Each serial line
passes through one flip-flop marked `(* iob = "true" *)`, so that the FPGA
tools put it in the I/O block next to the pin. The pin is then driven and
sampled by a flip-flop with a short, predictable path. The input flip-flop is
also the only stage that brings the asynchronous RX pin into the clock
domain; there is no second synchronizer flip-flop. Both flip-flops reset to 1, the idle level.

Each pin register adds one cycle on its line. Between two `uart`s wired to
each other, a character accepted by one transmitter is offered by the other
receiver `3 + 9*SYMBOL_EDGE_TIME + SAMPLE_TIME` cycles after the handshake.
That comes to 10310 cycles at the defaults.

## Echo machine and back-pressure (`echo_fsm`, `z1top`)

`echo_fsm` has two states and one 8-bit character register:

* **RECV**: `rx_ready` is high. When `rx_valid` arrives, the character is
  stored with its case swapped (codes 0x41..0x5A and 0x61..0x7A get bit 5
  flipped; all other codes pass unchanged), and the machine moves to SEND.
* **SEND**: `tx_valid` is high and offers the stored character. Once
  `tx_ready` is high, the machine returns to RECV.

`z1top` connects the UART's receive interface to the machine's `rx_*` side
and its transmit interface to the `tx_*` side. It also brings out the pins
`FPGA_SERIAL_RX` and `FPGA_SERIAL_TX`.

The tricky part is what happens when characters arrive faster than they can
leave. The receiver's `data_out` register and the machine's character
register together form a two-character buffer:

1. With both ends at the same baud rate, each echo frame starts a fixed
   number of cycles after its input frame. The transmitter is always free in
   time, and nothing ever waits.
2. If the sender is slightly faster, the echoes fall behind by a little each
   character.
   * First, the machine sits in SEND while the transmitter finishes the
     previous frame (`tx_valid` high, `tx_ready` low).
   * Once the lag passes one frame, the next received byte has to wait in the
     receiver (`data_out_valid` high, `data_out_ready` low).
   * From then on the echoes leave back to back at the full rate.
3. If the faster stream goes on long enough for the lag to pass two frames,
   a byte is overwritten in the receiver and lost. With a 1.6 % faster sender
   this happens after more than a hundred characters without a pause. The
   end-to-end test stays below that.

Interactive typing is nowhere near either limit.

## Parameters

| module                                    | parameter    | default     | meaning                  |
|-------------------------------------------|--------------|-------------|--------------------------|
| `uart_transmitter`, `uart_receiver`, `uart`, `z1top` | `CLOCK_FREQ` | 125000000 | system clock in Hz |
| same                                      | `BAUD_RATE`  | 115200      | bits per second          |

`CLOCK_FREQ / BAUD_RATE` must be at least 2; an elaboration-time assertion
checks this. The counter widths follow from the ratio. The shared constants
and helper functions (`symbol_edge_time`, `make_frame`, `invert_case`) are in
`uart_pkg`. Reset is synchronous and active high in every module.

## Where this design makes its own choices

The frame format, the baud rate, the mid-symbol sampling, the shift-register
transmitter, the `has_byte` flag, the two pin registers, the echo behaviour
and the pin names are those of the original lab design. The following are
this implementation's own choices:

* The 125 MHz clock. The usual Pynq-Z1 fabric clock was picked; only the
  ratio matters.
* The synchronous active-high reset and a plain `reset` input on the top. A
  board would drive it from a debounced button.
* Handing a waiting character to the transmitter in the last stop-bit cycle,
  so frames follow with no gap.
* A separate output register in the receiver, no framing or overrun
  detection, and overwrite-on-overrun.
* A two-state echo machine with one character of storage.

Not included: the terminal software on the far end, the external
USB/RS-232 level-shifter module, and the button debouncer and synchronizer
from an earlier design step.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/uart_pkg.sv tb/z1top_tb.sv --top-module z1top_tb
./obj_dir/Vz1top_tb
```

| testbench             | what it shows |
|-----------------------|---------------|
| `uart_transmitter_tb` | 60 characters with and without gaps, at 16 cycles per symbol. A line monitor checks every symbol's value and its exact length, the one-cycle start latency, zero-gap back-to-back frames, and that ready is low during a frame except in its last cycle. A default-size instance is checked for 1085-cycle symbols. |
| `uart_receiver_tb`    | 60 frames: with gaps; waiting for ready (valid and data must hold); back to back with every symbol edge moved at random by up to ±3 of 16 cycles. Checks each byte and the exact valid latency, at 16 cycles per symbol and at the default size. |
| `uart_tb`             | Two UARTs with crossed lines. 40 back-to-back characters one way must arrive exactly one frame apart, with the first one at the expected latency. At the same time, 30 characters go the other way and are taken late. |
| `echo_fsm_tb`         | All 256 codes and 200 random ones through the echo machine, under random back-pressure and at full speed (one character every two cycles). |
| `z1top_tb`            | The whole design at its defaults, against a second `uart` as the far end. 122 characters, checked in order and case-swapped. Back-to-back echoes must be exactly 10850 cycles apart. A 1.6 % fast sender makes both internal waits happen, and the test counts them. Runs in seconds. |

The simulator is expected to be two-state: every register that is read is
reset.
