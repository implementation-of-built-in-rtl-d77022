# UART with built-in signature self test

A serial link can corrupt a byte without anyone noticing. This UART can
protect each byte it sends with an 8-bit signature computed by a multiple
input signature register (MISR). In **MISR mode** the transmitter appends
the signature of the byte to the same frame. The receiver recomputes the
signature from the data bits it actually received and compares it with the
signature that came over the line. A difference raises the `error` pin. In
**normal mode** the same hardware is a plain 8-bit UART.

The design is small: 76 flip-flop bits after generic synthesis, 27 I/O pins.
It is written in synthesizable SystemVerilog with no vendor primitives.

## Frames on the line

One bit lasts exactly one clock. There is no baud-rate divider: the clock
*is* the bit clock, so a 9600 Hz clock gives 9600 bit/s (104.167 µs per
bit). Both ends must run from the same clock. The receiver takes one sample
per bit, so it works in loopback or with a shared clock. It is not meant for
an unrelated remote clock.

```
normal mode   idle.. 1 | 0 | d0 d1 d2 d3 d4 d5 d6 d7 | 1 | idle..
MISR mode     idle.. 1 | 0 | d0 .. d7 | s0 .. s7 | 1 | idle..
                         ^start                    ^stop
```

Data and signature are both sent LSB first. For the byte `8'hAA`:

| mode   | bits after the start bit, in time order | signature |
|--------|------------------------------------------|-----------|
| normal | `01010101`                               | –         |
| MISR   | `01010101` `10100000`                    | `8'h05`   |

If data bit 5 of that MISR frame is flipped on the line, the receiver
delivers `8'h8A` (`10001010`) and raises `error`. The end-to-end testbench
runs these three cases first.

## The signature register

`misr` is an 8-stage register of D flip-flops with XOR gates. On every
enabled clock, stage *i* loads

    Q[i] <= D[i] ^ Q[i-1] ^ (POLY[i] & Q[7])        (Q[-1] = 0)

so the word on the parallel inputs is folded into a shifting register, and
the last stage is fed back into the stages selected by `POLY`. The number of
stages sets the signature width.

A signature is made by `misr_siggen`. It clears the register, then clocks it
**5 times** with the same byte held on `D`. The signature is what is left in
the register. With the default taps `POLY = 8'hD9`
(x^8 + x^7 + x^6 + x^4 + x^3 + 1), `8'hAA` gives `8'h05`.

**Where the taps come from.** The 8 stages, the XOR feedback, the 8-bit
signature, the 5 clocks and the `8'hAA -> 10100000` example are the
original design's. Its tap positions are not known. `8'hD9` is the choice
of this implementation: with a clear register and the byte held for 5
clocks, it is the tap set that reproduces that example. Change
`bist_uart_pkg::MISR_POLY` to use other taps. The testbenches' reference
model has its own copy, `tb_misr_ref_pkg::REF_POLY`, which must be changed
with it.

**What it detects.** Everything is XOR, so the signature is a linear
function of the byte: `sig = M · data` over GF(2). For `8'hD9` and 5 clocks,
`M` is invertible: the single-bit columns are 1F 3E 7C F8 29 52 A4 91.
So every corruption of the data bits alone changes the expected signature
and is caught, including multi-bit ones. Every corruption of the signature
bits alone is caught too. Only a corruption that hits both fields in one
exact matching way passes unseen: for a random corruption of both fields,
that happens with a chance of 1 in 256. With other taps `M` may be singular,
and then some data errors alias to the correct signature.

## Blocks

```
 parallel_in ─┬──────────────► uart_tx ──► serial_out
 write, mode  │   tx_data ◄─────┘ ▲
              └► misr_siggen (MISR_TX) ─ signature, valid
 cts ─────────────────────────────┘

 serial_in ──► uart_rx ──► parallel_out, rxrdy, ctr
                 │ rx_data, sig_start
                 ▼
             misr_siggen (MISR_RX) ──► sig_tester ◄── rx_sig (received signature)
                                           │
                                         error
```

| file | role |
|------|------|
| `rtl/bist_uart_pkg.sv` | widths (8/8), the 5-clock signature time, taps, mode type |
| `rtl/misr.sv` | the 8-stage MISR |
| `rtl/misr_siggen.sv` | clear + 5 clocks around `misr`; used as MISR_TX and MISR_RX |
| `rtl/uart_tx.sv` | transmitter: capture on `write`, wait for `cts`, serialise |
| `rtl/uart_rx.sv` | receiver: start detection, store register, `rxrdy`, `ctr` |
| `rtl/sig_tester.sv` | comparator that drives `error` |
| `rtl/bist_uart.sv` | top level, wiring the five blocks |

## Pins of `bist_uart`

| pin | dir | meaning |
|-----|-----|---------|
| `clk` | in | bit clock |
| `reset` | in | active high, synchronous; clears all control logic and registers |
| `mode` | in | 1 = MISR mode, 0 = normal; each side latches it at the start of its frame |
| `parallel_in[7:0]` | in | byte to send |
| `write` | in | one clock high captures `parallel_in` (only while `txrdy`) |
| `txrdy` | out | transmitter can take a byte |
| `cts` | in | clear to send: the transmitter starts a frame only while it is high |
| `serial_out` | out | line out, high when idle |
| `serial_in` | in | line in |
| `ctr` | out | clear to receive: the receiver is idle, waiting for a start bit |
| `parallel_out[7:0]` | out | last received byte |
| `rxrdy` | out | `parallel_out` holds a received byte; cleared by the next start bit |
| `error` | out | the last MISR frame's signatures differed |

For a self-test loop, tie `serial_out` to `serial_in` and `ctr` to `cts`.
The transmitter then waits until the receiver is idle.

## Timing, clock by clock

Transmitter, with `write` seen on edge *w*:

* `txrdy` falls after *w*. The byte and `mode` are captured, and in MISR
  mode MISR_TX starts on the captured byte.
* The start bit goes out on the first edge after *w* at which `cts` is high.
  That is *w+1* at the earliest. `cts` is not looked at again during the
  frame.
* Payload bit *k* goes out one edge after bit *k−1*. The signature is ready
  5 clocks after *w*. Its first bit goes out at least 10 clocks after *w*, so
  signing never slows the link. An assertion in `uart_tx` checks this.
* The stop bit goes out on the next edge, and `txrdy` rises with it. If a
  new byte is written at once, the line stays high for at least two clocks
  between frames.
* A `write` while `txrdy` is low is ignored.

Receiver, with the start bit sampled on edge *s*:

* `ctr` and `rxrdy` fall after *s*. The error from the previous frame is
  cleared.
* Data bit *i* is sampled on *s+1+i*. After *s+8* (the last data bit),
  MISR_RX starts on the received byte. It finishes before the signature bits
  have all arrived.
* The stop bit is sampled on *s+9* (normal) or *s+17* (MISR). After it,
  `parallel_out` is updated and `rxrdy` and `ctr` rise.
* `error` is updated one clock later. It holds until the next start bit.
  After a normal-mode frame it is 0.

In loopback, `rxrdy` rises n+2 clocks after the start bit is driven
(n = 8 or 16 payload bits). A whole frame takes 10 clocks in normal mode and
18 in MISR mode.

## Choices made here

These points are this implementation's own decisions, not taken from the
original design:

* The clock is the bit clock, one sample per bit. There is no baud-rate
  generator and no input synchroniser. The original work names an internal
  clock mechanism as future work.
* The MISR taps (`8'hD9`), the clear-then-5-clocks procedure and the
  start/valid handshake of `misr_siggen`.
* MISR_TX is fed from the transmitter's captured byte, not from the
  `parallel_in` pins. This is because `write`, and with it the byte, only
  needs to be held for one clock.
* `cts` only gates the start of a frame. Writes while busy are ignored.
  `txrdy` rises with the stop bit.
* `rxrdy` stays high until the next start bit. The stop bit's value is not
  checked, so there is no framing-error output.
* `error` is a register that holds its verdict until the next start bit. An
  incomplete recomputed signature at the check would count as an error, but
  this cannot happen in the assembled design.
* Reset is synchronous.

Nothing here targets delay faults specifically. Nothing buffers more than
one frame either: there is no FIFO.

## Resources

Generic synthesis (yosys, coarse) gives 76 flip-flop bits and about 120
word-level cells for the whole UART. The original FPGA implementation of the
same function reports 100 slice flip-flops, 176 4-input LUTs, 93 slices and
27 I/O pins on a device with 4656 slices. The 27 pins match this top level.

## Simulating

Every testbench checks itself. Each prints one line
`TB_RESULT checks=N failures=M` and stops with `$finish`. Each also has a
watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_uart_pkg.sv tb/tb_misr_ref_pkg.sv tb/tb_bist_uart.sv --top-module tb_bist_uart
./obj_dir/Vtb_bist_uart
```

| testbench | what it checks |
|-----------|----------------|
| `tb_misr` | the `8'hAA -> 8'h05` example; 500 random steps against a stage-by-stage model; clear and hold |
| `tb_misr_siggen` | the signature is ready in exactly 5 clocks and then holds; 100 random bytes |
| `tb_uart_tx` | line pattern bit by bit, `cts` wait, `txrdy`, ignored writes, both example frames |
| `tb_uart_rx` | strobes and outputs on the clock they are due; back-to-back frames |
| `tb_sig_tester` | the error register against a reference, over 1000 random steps |
| `tb_bist_uart` | the whole UART in loopback at 9600 bit/s with bit flips on the line (details below) |

`tb_bist_uart` runs the top level with its default parameters. It checks:

* the bit time;
* the frame length, as clocks from the start bit to `rxrdy`;
* the received byte;
* the `error` pin, against a signature it works out itself.

It also counts each mechanism and fails if one never happens. The mechanisms
are: normal frames, MISR frames, detected errors, clean MISR frames, `cts`
holds, mode switches and ignored writes.

`tb/tb_misr_ref_pkg.sv` holds the reference model that the testbenches
share. It is written stage by stage, apart from the RTL.
