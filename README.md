# Serial-line Booth multiplier (8 x 8 bits) with a UART

This design multiplies two 8-bit numbers sent from a computer over an RS-232
serial line and sends the 16-bit product back over the same line. The
multiplication uses a sequential radix-2 Booth multiplier, which handles
negative (two's-complement) operands the same way as positive ones. A switch
input selects signed or unsigned operands. The serial side is a complete UART
(baud rate generator, receiver, transmitter and a FIFO in each direction).
Everything is synthesizable SystemVerilog and targets a 50 MHz FPGA board
clock.

```
 uart_rxd ──► uart ──► booth_uart_ctrl ──bit-serial──► operand_loader A ─┐
              (baud gen, rx,    ▲   │                  operand_loader B ─┤
               rx FIFO, tx FIFO,│   │                                    ▼
               tx)              │   └── start ───────────────► booth_multiplier
 uart_txd ◄── uart ◄── 2 bytes ─┴──────────── product ◄──────────────┘
```

## Protocol seen from the computer

* Line format: 19200 baud, 8 data bits sent LSB first, no parity, 1 stop bit
  (8N1). The line idles at '1'. Every one of these is a parameter.
* For each multiplication, send two bytes: operand A first, then operand B.
  The bytes are binary numbers, not text: to multiply 67 by 34, send 0x43 and
  0x22.
* The board answers with two bytes: the high byte of the product first, then
  the low byte.
* `signed_mode` = 1 reads the operands as -128..127, and the product is a
  16-bit two's-complement number. `signed_mode` = 0 reads them as 0..255, and
  the product is 0..65025. Change the switch only between operations.
* You can send the next pair while the previous result is still coming back.
  Each direction has a 4-byte FIFO.

## How the Booth multiplier works (`booth_multiplier`)

The multiplier uses four registers, as in the usual pencil-and-paper method:

| register | width | content |
|---|---|---|
| A   | N+1 | accumulator, starts at 0 |
| M   | N+1 | multiplicand |
| Q   | N+1 | multiplier; the low half of the product ends up here |
| Q-1 | 1   | the bit last shifted out of Q, starts at 0 |

Each clock cycle does one step. The pair {Q[0], Q-1} selects the action:

| Q[0] | Q-1 | action |
|---|---|---|
| 0 | 0 | shift only |
| 1 | 1 | shift only |
| 1 | 0 | A = A − M, then shift |
| 0 | 1 | A = A + M, then shift |

The shift is an arithmetic right shift of the joined {A, Q, Q-1}. A keeps its
sign bit, A's LSB moves into Q's MSB, and Q's LSB moves into Q-1. Read from
right to left, a run of 1s in the multiplier costs only one subtraction, where
the run starts, and one addition, just past its end. This is why one datapath
handles negative multipliers with no special case.

**Choosing the multiplier.** The number of add/subtract steps equals the
number of bit transitions in the multiplier, counted from the right with an
implied 0 below bit 0. At start, the operand with fewer transitions goes into
Q and the other into M. On a tie, `op_b` is the multiplier. The `swapped`
output tells which way the operands went. In this design every step takes one
cycle either way, so the latency does not change. The choice only reduces
adder activity. `SELECT_Q = 0` turns it off.

**Signed and unsigned with one datapath.** The registers are one bit wider
than the operands. Operands are sign-extended in signed mode and zero-extended
in unsigned mode, and N+1 = 9 steps are done. The low 2N bits of {A, Q} are
then the product in either mode. The extra bit also stops A − M from
overflowing when M = −128. In signed mode the ninth step always decodes to
"shift only".

Example, −16 × −15 in signed mode. −16 (111110000) has one transition and
−15 (111110001) has three, so Q = −16 and M = −15:

| step | Q[0] Q-1 | action | A | Q | Q-1 |
|---|---|---|---|---|---|
| start | | | 000000000 | 111110000 | 0 |
| 1–4 | 0 0 | shift | 000000000 | 000011111 | 0 |
| 5 | 1 0 | A − M, shift | 000000111 | 100001111 | 1 |
| 6–9 | 1 1 | shift | 000000000 | 011110000 | 1 |

The low 16 bits of {A, Q} are 0x00F0 = 240. The product needs only one
subtraction.

**Timing.** Pulse `start` for one cycle while `busy` is low. The operands are
captured on that clock edge. The next N+1 edges each do one step. `done`
pulses for one cycle N+2 cycles after the cycle in which `start` was sampled
(10 cycles for 8-bit operands). `product` then holds its value until the next
start. A `start` while busy is ignored. `step_o` and `op_o` show the action of
the current step, for observation.

## Operand path: shift register, modulo-8 counter, parallel load

Each operand reaches the multiplier through an `operand_loader`. The loader
has three parts:

* `shift_register`: a chain of 8 D flip-flops. Each enabled clock moves the
  bits one place toward bit 0 and loads the new bit at the top. A byte sent
  LSB first is complete after 8 shifts.
* `mod_counter` (MOD = 8): counts the shifted bits. Its `wrap` output marks
  the eighth bit.
* A parallel-load register: it copies the shift register one clock after the
  wrap and pulses `valid`. The multiplier's operand stays stable while the
  next word is shifted in.

`booth_uart_ctrl` pops a byte from the receive FIFO and sends its bits into
loader A, one per cycle. It then does the same with the next byte and
loader B, starts the multiplier, and writes the two product bytes into the
transmit FIFO. It waits whenever the receive FIFO is empty or the transmit
FIFO is full. From the arrival of the second byte, the product is ready in
about 30 clock cycles: 2 × (1 + 8 + 2) cycles to load the operands, 1 to
start and 10 to multiply. Serial transfer takes far longer. One byte lasts
10 bit times, about 0.52 ms.

## The UART (`uart`)

* `uart_baud_gen`: a modulo-163 counter. It gives one tick every 163 cycles of
  50 MHz, 16 ticks per bit, for 19171 baud (0.15 % below 19200). The divisor
  is round(CLK_FREQ / (BAUD × OVERSAMPLE)).
* `uart_rx`: the input passes through a two-flop synchroniser. After a falling
  edge, the receiver waits 8 ticks (half a bit) and checks the line is still
  low, so shorter pulses are rejected as glitches. It then samples every
  16 ticks, which is the middle of each bit, and shifts the data bits into a
  register. It reports the byte in the middle of the (last) stop bit,
  together with `frame_err` (stop bit read as 0) and `parity_err`. The
  testbench checks that a sender 2 % fast or slow is received correctly.
* `uart_tx`: loads a byte in parallel and shifts out the start bit, the data
  bits, the optional parity bit and the stop bit(s), each lasting 16 ticks.
  Its output is registered.
* `fifo` (2 instances): a 4-entry register FIFO. The head entry always shows
  on `r_data`, and `rd` pops it. A write to a full FIFO is dropped and
  flagged on `overflow`, unless a read in the same cycle frees a place.
  Reading an empty FIFO triggers an assertion.
* The transmitter starts as soon as it is idle and its FIFO is not empty, so
  the two result bytes go out back to back.

`booth_uart_pkg` holds the shared types: `parity_e` (none / even / odd) and
`booth_op_e` (shift / add / subtract). It also holds the Booth decode and
parity functions.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CLK_FREQ` | 50 000 000 | top, uart, baud gen | clock frequency in Hz |
| `BAUD` | 19 200 | top, uart, baud gen | line rate |
| `OVERSAMPLE` | 16 | top, uart, rx, tx | ticks per bit |
| `STOP_BITS` | 1 | top, uart, rx, tx | stop bits per frame |
| `PARITY` | `PARITY_NONE` | top, uart, rx, tx | optional parity bit |
| `FIFO_DEPTH` | 4 | top, uart | bytes per FIFO (power of two) |
| `SELECT_Q` | 1 | top, multiplier | put the operand with fewer transitions in Q |
| `N` | 8 | multiplier, controller | operand width (the top fixes it at 8, one byte) |

## Which parts follow the original design and which are choices

These follow the original design:

* the Booth algorithm, with its A/M/Q/Q-1 registers and the decode table;
* the rule of putting the operand with fewer transitions in Q;
* the 8-bit operands and the 16-bit product, with signed and unsigned use;
* two 8-bit serial-in shift registers built from D flip-flops, a modulo-8
  counter and a parallel load feeding the multiplier;
* the UART built from a baud generator, receiver, FIFOs and transmitter;
* the frame format: start bit 0, 8 data bits, optional parity, stop bit 1.

These are this design's own choices:

* **Controller.** The original design does not show how two received bytes
  reach the multiplier. It treats that link as unfinished work.
  `booth_uart_ctrl` provides it: two bytes per operation, operand A first,
  product high byte first.
* **Binary operands.** The intended computer program sends the numbers as
  decimal text (for example "67" as the characters 0x36 0x37). This design
  has no text-to-binary converter. The computer must send the binary values.
* **Shift details.** The shift is the standard arithmetic shift of {A, Q, Q-1}.
  The original's text speaks of a circular shift of Q.
* **Unsigned support.** Unsigned operands use an N+1-bit datapath with N+1
  steps. The original algorithm runs 8 steps on 8 bits.
* **Unstated values.** 50 MHz, 19200 baud, 16× oversampling, 8N1, FIFO
  depth 4, active-low asynchronous reset, and all handshakes.
* **Not included.** The RS-232 level shifter is an analog board part, so
  connect `uart_rxd`/`uart_txd` to its logic side. The computer-side program
  is not part of the design.

## Files

`rtl/` has one module or package per file: `booth_uart_pkg`,
`booth_multiplier`, `shift_register`, `mod_counter`, `operand_loader`,
`uart_baud_gen`, `uart_rx`, `uart_tx`, `fifo`, `uart`, `booth_uart_ctrl`, and
the top, `booth_uart_top`. `tb/` has one self-checking testbench per module,
named `<module>_tb`. Each ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `booth_multiplier_tb` | all 65 536 operand pairs in both modes; product, latency (N+2 cycles), operand choice, number of add and subtract steps |
| `shift_register_tb`, `mod_counter_tb`, `operand_loader_tb` | random streams against a reference model; load timing |
| `uart_baud_gen_tb` | tick period of 163 cycles |
| `uart_rx_tb` | random bytes at nominal and ±2 % rate, with and without parity; frame error, parity error, glitch rejection, report time |
| `uart_tx_tb` | frame decode, parity, frame length, busy, request ignored while busy |
| `fifo_tb` | random traffic against a queue model; full, empty, overflow |
| `uart_tb` | loopback through the whole UART; transmit FIFO full, receive FIFO overflow |
| `booth_uart_ctrl_tb` | sequencer with the real loaders and multiplier; random FIFO stalls; byte order |
| `booth_uart_top_tb` | whole design at default parameters, driven by a serial model of the computer (see below) |
| `booth_uart_top_parity_tb` | whole design with even parity, two stop bits and 115200 baud |

`booth_uart_top_tb` sends 20 operand pairs: the examples −16 × −15 = 240 and
17 × 57 = 969, corner values (−128 × −128, 127 × −128, 255 × 255 unsigned) and
random pairs. It decodes the answers from `uart_txd`. It also counts add,
subtract and shift-only steps, operand swaps, signed and unsigned products,
operand loads, a transmit FIFO holding two bytes, and a frame error. It fails
if any of these never happened.

To run a testbench with Verilator 5 (this example runs the whole design at
full size, in about a second):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/booth_uart_pkg.sv tb/booth_uart_top_tb.sv --top-module booth_uart_top_tb
./obj_dir/Vbooth_uart_top_tb
```

To run a single block's test, swap in its testbench and top-module name.
Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/booth_uart_pkg.sv rtl/<module>.sv`.
Lint warnings remain for status outputs that the top leaves unused, and for
an assertion that samples the reset synchronously.
