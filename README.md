# UART with built-in self-test

A serial port (UART: 8 data bits, one start bit, one stop bit, no parity) that can
test itself. When `Test_En` is high, the UART is cut off from its normal inputs. A
pseudo-random pattern generator then feeds both halves of the UART with the same
byte, 256 times over: the transmitter gets it in parallel, the receiver as a serial
frame. Each half's output is folded into its own 8-bit signature register (MISR).
At the end, both signatures are compared with one golden signature supplied from
outside. A 2-bit result says which half, if either, is faulty. No external tester,
no stored expected responses: one byte of reference data is enough.

The design is written in synthesizable SystemVerilog-2017 and has a single clock
domain.

## Block structure

```
                         bist_uart_top
   +-------------------------------------------------------------------+
   |  bist_ctrl ---trg---> tpg (lfsr + piso)                            |
   |     ^   |              | pattern (8b)     | serial frame           |
   |     |   |clr,cmp       v                  v                        |
   |     |   |          [test-mode input multiplexers]                  |
   |     |   |              |                  |                        |
   |     |   |       uart_top: baud_uart -> bit-clock select            |
   |     |   |              tx_top                 rx_top               |
   |     |   |                | Tx_out             | Rx_Data_out        |
   |     |   v                v                    v                    |
   |     |  tra:  sipo -> misr (TX)           misr (RX)                 |
   |     |                 \----- comparator -----/  <- Golden_sign     |
   |     +-- Tx_done / Rx_done                  -> Test_result          |
   +-------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `bist_uart_top` | Top level. Holds the test-mode input multiplexers and wires the generator, UART, analyzer and controller. |
| `bist_ctrl` | Test controller. Sequences clear, 256 pattern requests, the waits for both UART paths, and the final compare. |
| `tpg` | Test pattern generator: `lfsr` plus a `piso` that serialises each pattern as a UART frame. |
| `lfsr` | 8-stage external-XOR LFSR, stepped by `trg`. |
| `piso` | Parallel-in serial-out register. It shifts ones in behind the word. |
| `uart_top` | UART core: `baud_uart`, the bit-clock select, `tx_top` and `rx_top`. |
| `baud_uart` | Divides the clock to one tick per bit (CLK_HZ / BAUD). |
| `tx_top` | Transmitter: buffer register (TBR), 10-bit output register, TxRDY/TxE flags. |
| `rx_top` | Receiver: input register, buffer register (RBR), read/discard control. |
| `tra` | Test response analyzer: `sipo` on the serial output, two `misr`s and a `comparator`. |
| `sipo`, `misr`, `comparator` | Serial-to-parallel register, signature register and result encoder. |
| `uart_bist_pkg` | Widths, the polynomial, the frame builder and the result enum. |

## How a self-test runs

1. **Clear.** When `Test_En` rises, the controller clears the SIPO, both MISRs and the
   result. The bit-clock select now gives one bit per system clock instead of one
   per baud period, so a frame takes 10 cycles.
2. **One pattern.** The controller pulses `trg`. The LFSR steps. One cycle later its
   new value is on `pattern`, and `pattern_valid` marks it. In that cycle:
   * the transmitter's buffer register takes the byte;
   * the PISO loads `{1, byte, 0}` and starts sending it to the receiver input.
3. **Compaction.**
   * Transmitter path: the serial output `Tx_out` is shifted into a 10-bit SIPO on
     every bit tick. When `Tx_done` pulses, the SIPO holds the frame just sent, and
     its eight data bits go into the TX MISR.
   * Receiver path: the receiver delivers a parallel byte, so it goes straight into
     the RX MISR when `Rx_done` pulses. In test mode the receiver is always read.
4. **Next.** The controller waits until it has seen both `Tx_done` and `Rx_done`,
   then issues the next pattern. If one of them has not come after 64 cycles, the
   pattern is closed anyway. A dead path then shows up as a wrong signature
   instead of a hung test.
5. **Compare.** After 256 patterns the comparator checks both signatures against
   `Golden_sign`, and `Test_done` rises. `Test_result` holds:

   | `Test_result` | meaning |
   |---|---|
   | `00` | both signatures match |
   | `01` | transmitter path faulty |
   | `10` | receiver path faulty |
   | `11` | both faulty |

   The result stays until `Test_En` falls. Raising it again starts a fresh test.

A test takes exactly 16 cycles per pattern plus 3, so 4099 cycles in total. The
per-pattern time breaks down like this:

* 1 cycle to issue the request;
* 1 cycle for the LFSR;
* a wait until the next bit tick;
* 10 bit periods for the frame;
* the receiver's 2-flop synchroniser and its hand-over.

### The polynomial and the golden signature

The LFSR and both MISRs use x^8 + x^6 + x^5 + x^4 + 1, which is primitive.
* The LFSR is in external-XOR form. Its stages X7..X0 shift toward X0, and the new
  X7 is X0 ^ X4 ^ X5 ^ X6. Seeded with `8'h01`, it runs through all 255 non-zero
  states. The 256th pattern is therefore the first one again.
* Each MISR is the internal-XOR (Galois) form of the same polynomial, shifting
  right. Each step computes `sig' = (sig >> 1) ^ (sig[0] ? 8'hB8 : 0) ^ data`.
  Bits 7, 5, 4 and 3 of `8'hB8` stand for x^8, x^6, x^5 and x^4.

A fault-free device delivers the same 256 bytes on both paths, so both MISRs end on
the same value. That is why one `Golden_sign` serves both. For the defaults it is
obtained like this:
1. Start with p = 0x01 and s = 0x00.
2. Repeat 256 times: step p through the LFSR, then compute s = misr(s, p).

The final s is the golden signature. `uart_bist_tb_pkg::golden_signature(256)`
computes it. If you change the seed, taps or pattern count, recompute it the same
way.

## The UART itself (normal mode)

With `Test_En` low, the top is a plain UART clocked by `baud_uart`. The defaults are
a 50 MHz clock and 9600 baud, so a bit lasts 5208 cycles.

**Transmitter.**
* While `Tx_en` is high and the buffer register is empty (`Tx_rdy`), `TxData_in`
  is copied into it.
* On the next bit tick with the output register free, the byte moves into the
  10-bit output register as start-data-stop, and the start bit appears.
* Each later tick moves to the next bit, LSB first. Zeros are shifted in behind the
  frame, and the line is held at 1 while the output register is empty.
* `Tx_done` pulses on the tick that ends the stop bit. If the buffer register holds
  the next byte by then, that frame starts on the same tick.
* Holding `Tx_en` high therefore streams `TxData_in` frame after frame.

**Receiver.**
* The line goes through a two-flop synchroniser and is sampled once per bit tick.
* A 0 while idle is taken as the start bit. Eight data bits follow, and the stop
  bit must be 1, or the frame is dropped with `rx_frame_err`.
* A good frame goes to the receiver buffer register (`Rx_full`). The peripheral's
  request `Rx_rd` then hands it over on `Rx_Data_out`, and `Rx_done` pulses.
* A frame that completes while the buffer is still full and unread is discarded
  (`Rx_discard`). Nothing is overwritten.

**Caution: no oversampling.** The receiver samples once per bit and does not
oversample, so it only works when the incoming line changes in step with its own
bit clock. That holds in test mode, and in loop-back from this transmitter. It does
not hold for an arbitrary asynchronous sender. To talk to foreign equipment, replace
the sampling in `rx_top` with a 16x oversampling receiver that aligns to the middle
of the start bit.

## Interface of `bist_uart_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `Test_En` | in | 1 | 1 = self-test, 0 = normal UART |
| `TxData_in`, `Tx_en` | in | 8, 1 | byte to send; send enable |
| `Rx_in`, `Rx_rd` | in | 1, 1 | serial input; peripheral read request |
| `Golden_sign` | in | 8 | expected signature |
| `Tx_out`, `Tx_done` | out | 1, 1 | serial output; end-of-frame pulse |
| `Rx_Data_out`, `Rx_done` | out | 8, 1 | received byte; hand-over pulse |
| `Test_result`, `Test_done` | out | 2, 1 | result code; result valid |
| `Tx_rdy`, `Rx_full`, `Rx_discard` | out | 1 each | transmitter buffer free; receiver buffer full; frame lost |
| `Sign_tx`, `Sign_rx` | out | 8 each | running signatures |

Parameters: `CLK_HZ` (50 000 000), `BAUD` (9600), `N_PATTERNS` (256).

## What is assumed, and how this departs from the usual description

These are the design's own choices:

* **Clock and rate.** The 50 MHz clock and 9600 baud defaults.
* **Polynomial and seed.** The polynomial; the seed 0x01, which keeps only the last
  stage set at start.
* **Clock enables, not clocks.** The bit-clock mux switches a clock *enable*, not a
  clock.
* **Controller.** The test controller's handshake and its 64-cycle timeout.
* **Result encoding.** The result code `11` for two faulty paths.
* **Test-mode inputs.** The receiver is read automatically in test mode.
* **Extra ports.** `Tx_en`, `Rx_rd` and the status outputs.

Where it departs from the original description of this architecture:

* **Result width.** That description gives both a 2-bit per-path result code and,
  elsewhere, a single pass/fail bit. This design keeps the 2-bit code.
* **Generator type.** The generator is called a cellular-automaton LFSR there, but
  the circuit drawn for it is a plain external-XOR LFSR. That circuit is what is
  built here.
* **Direct comparison.** A closing summary there mentions comparing the
  transmitter's input directly with the pattern at the receiver, and lighting an
  LED on a mismatch. That is not built. The MISR-based analyzer is the checking
  scheme the architecture is built around.
* **Transmitter pins.** The transmitter is drawn with an ACK pin and an inverted
  clock. Their behaviour is not defined, so they are left out. Everything here runs
  on the rising edge of one clock, with bit-rate clock enables.
* **Clocks.** Separate receive and transmit clocks are drawn as well. Here one
  selected bit clock serves both halves.
* **Not built: control, status and bus.** A UART control and status register pair,
  and a bidirectional CPU data-bus buffer, are named but not specified, so neither
  is built. The transmitter and receiver flags come out as plain signals instead.
* **Stop bits.** The frame format allows "one or more" stop bits. This design
  always sends and expects exactly one.
* **Compaction coverage.** Only the data bits of each transmitted frame enter the TX
  MISR. A fault that corrupts only a start or stop bit shows up only when it also
  disturbs the data, or makes the frame arrive late.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and contains a watchdog. The reference models they
compare against (LFSR step, MISR step, golden signature) are in
`tb/uart_bist_tb_pkg.sv`. They are written from the polynomial, not from the RTL.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/uart_bist_pkg.sv tb/uart_bist_tb_pkg.sv tb/tb_bist_uart_top.sv \
    --top-module tb_bist_uart_top -o sim
./obj_dir/sim
```

`tb_bist_uart_top` runs the whole design at its default parameters, in under a
second. It does the following:

* a passing self-test, whose signatures must equal the reference;
* a self-test with a wrong golden signature, which must give `11`;
* normal-mode loop-back of 10110101, 11110101 and random bytes, timed at 10 bit
  periods per frame;
* transmitter back-pressure;
* the hold-then-discard behaviour of the receiver buffer.

It counts each of these and fails if one never happens. The codes `01` and `10`
cannot occur in a fault-free device. `tb_tra` and `tb_comparator` exercise them
instead, by corrupting a transmitted bit or a received byte.

## Numbers

* Data width is 8 bits and a frame is 10 bits.
* A self-test uses 256 patterns and takes 4099 clock cycles.
* An earlier FPGA implementation of this architecture reported a minimum period of
  5.093 ns (196 MHz) on a Spartan-6 (-3). That figure has not been re-measured for
  this RTL.
