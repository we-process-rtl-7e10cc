# We Process — a serial-port calculator in SystemVerilog

A host computer types two bytes into a terminal (9600 baud, 8 data bits, no
parity, 1 stop bit). The FPGA receives them, stores the first in register RA
and the second in RB, runs them through a small microcoded ALU under a 4-bit
opcode, and shows the 8-bit result as two hexadecimal digits on two
seven-segment displays. The ALU does arithmetic, shifts, bitwise logic and
comparisons, and it multiplies with a Wallace tree of carry-save adders rather
than a ripple-adder array.

This RTL is a reconstruction of the "We Process" student project (a UART
receiver plus a small processor on a Nexys 4 DDR board). That project
published block diagrams and state diagrams, but not the code of its serial
receiver or the full ALU opcode list. The parts that description pins down are
built as drawn. Where it is silent, this design makes its own choice, and the
section [Where this design departs or fills gaps](#where-this-design-departs-or-fills-gaps)
lists each of those choices.

```
             +--------------------- uart_receiver ----------------------+
 uart_rxd -->| uart_rx --data--> demux --0--> RA (load_reg, E1) --------+--ra--+
             |   ^  |done          |  `--1--> RB (load_reg, E2) --------+--rb--+
             |   |ER v             |S                                    |      |
             |  uart_fsm <--Zt-- uart_counter ("3count", Ec)            |      |
             +------|------------------------------------------------- -+      |
                    | done_rx (= E)                                             |
             +------v------------------ microprocessor -------------------+    |
             |  proc_fsm --SM, R, EALU, EU, Eout, display load            |<---+
             |  mux_n(RA, RB, OUT) --> R --> alu(R, mux) --> OUT --+      |
             |        ^-------------------------------------------+       |
             |  mux_n --> display register -------------------------------+--> result
             +------------------------------------------------------------+      |
                                                      seg_display <---------------+
                                                        |--> seg[6:0], an[1:0]
```

## Receiving bytes: how RA and RB alternate

`uart_rx` is an ordinary oversampling-free receiver. A two-flop synchroniser
cleans the line. A low level on an idle line starts a frame. The start bit is
confirmed half a bit later, so a shorter glitch is ignored. The eight data
bits are then sampled at their centres, LSB first, into a right-shift
register, and the stop bit must read 1. A frame with a 0 stop bit is dropped.

The receiver has a small handshake with its controller. `er` arms it for
exactly one frame and clears `done`. After a good frame, `done` rises and
stays high, and the receiver disarms until the next `er`.

The controller `uart_fsm` and the 2-bit counter `uart_counter` decide which
register gets the byte:

| state | action | next |
|---|---|---|
| S1 | `er` = 1 | S2 |
| S2 | wait for the receiver's `done`; when it is 1, `Ec` = 1 | S3 |
| S3 | counter `Zt` = 00 or 11: `Ec` = 1 (step again) | S3 |
| S3 | `Zt` = 01: `E1` = 1, `S` = 0 (byte → RA) | S4 |
| S3 | `Zt` = 10: `E2` = 1, `S` = 1 (byte → RB) | S4 |
| S4 | `Done` = 1 (the one-cycle `done_rx` pulse) | S1 |

The counter is stepped once per byte in S2. S3 keeps stepping it until it
reads 01 or 10. So the counter goes 1, 2, then 3→0→1, 2, 3→0→1, ... and bytes
land in RA, RB, RA, RB, ... The 11/00 skipping is what makes the counter
behave as a two-way toggle. It also explains the latency: `done_rx` follows
the receiver's `done` by 2 clocks for bytes 1, 2, 4, 6, ... and by 4 clocks for
bytes 3, 5, 7, ... The `demux` routes the byte to the RA side (`S`=0) or the RB
side (`S`=1); RA and RB are also gated by their own enables `E1` and `E2`.

At 100 MHz and 9600 baud a bit lasts 10417 clocks. `done` rises
`CLKS_PER_BIT/2 + 9*CLKS_PER_BIT + 3` clocks after the start-bit edge, in the
middle of the stop bit.

## The processor: one pass per received byte

Every `done_rx` pulse starts the processor (`E` of its controller). The
processor therefore recomputes after *every* byte. After the first byte of a
pair the display shows `new RA op old RB`; after the second it shows
`RA op RB`. The opcode comes from the 4-bit `ir` input, which on the board
would be four slide switches.

The datapath has one three-input multiplexer (`mux_n`, select `SM`):
input 0 is RA, input 1 is RB, and input 2 is the ALU's output register OUT.
The multiplexer output feeds register R, the ALU's second operand and the
display register. R feeds the ALU's first operand. OUT feeds back to
multiplexer input 2.

`proc_fsm` steps through one state per clock:

| state | SM | strobes | effect |
|---|---|---|---|
| S1 | 10 | – | wait for `E` |
| S2 | 00 | R load | R ← RA |
| S3 | 00 | – | – |
| S4a | 01 | EALU | ALU captures R, RB and the opcode; multiply opcodes go to S4b, others to S5 |
| S4b | 01 | EU | product register ← Wallace-tree product (multiply only) |
| S5 | 10 | – | multiplexer shows OUT |
| S6 | 10 | Eout | OUT ← ALU result |
| S7 | 10 | Done, display load | display ← OUT; stay while `E` = 1, else go to S1 |

The display register changes 7 clocks after `E` is sampled for ordinary
opcodes and 8 clocks after for multiplies. `done` is high in the cycle before
that change. Against a byte time of about 104,000 clocks, this is negligible.
Assertions in the two controllers check the handshakes: a byte never goes to
both registers, and `EU` only follows `EALU` with a multiply opcode.

### ALU and its multiplier

The ALU (`alu`) is clocked. On `EALU` it registers A (from R), B (from the
multiplexer) and the opcode. Non-multiply results are combinational in those
registers, so they are valid from the next cycle. Multiplication needs the
extra `EU` strobe, which copies the 16-bit product into a product register.
As a result, a multiply result appears one cycle later than the others.

| opcode | result | opcode | result |
|---|---|---|---|
| 0000 | A + B | 1000 | A ^ B |
| 0001 | A − B | 1001 | ~(A & B) |
| 0010 | A << B[2:0] | 1010 | ~(A \| B) |
| 0011 | A >> B[2:0] | 1011 | ~(A ^ B) |
| **0100** | low byte of A×B | 1100 | ~A |
| **0101** | high byte of A×B | 1101 | A < B ? 1 : 0 |
| 0110 | A & B | 1110 | A == B ? 1 : 0 |
| 0111 | A \| B | 1111 | A |

All operations are unsigned and 8 bits wide. Only the two bold codes are
fixed by the original state diagram, which sends exactly 0100 and 0101
through the product-capture state. The other codes are this design's own
assignment.

`wallace_mul` forms eight partial products. Each is `A` gated by one bit of
`B` (a 2:1 mux choosing A or 0), shifted into place. It then reduces them with
16-bit carry-save adders (`csa`, a row of independent `full_adder` cells)
in four levels: 8 → 6 → 4 → 3 → 2 rows. Each CSA turns three rows into a sum
row and a carry row; the carry row is shifted left by one. A single ordinary
adder adds the last two rows. The tree is generated from the parameter `W`
(any W ≥ 3).

## Display

`seg_display` splits the displayed byte into two nibbles and decodes each with
`hex7seg`. The two digits share segment lines, so they are lit in turn. The
top bit of a free-running `REFRESH_BITS`-bit counter chooses the digit:
about 0.65 ms per digit at 100 MHz with the default 17 bits. Segments
`seg = {g,f,e,d,c,b,a}` and digit enables `an` (`an[0]` = low nibble) are
active low, as on the Nexys 4 DDR. After reset every register is 0, so the
displays read `00`.

## Top-level interface (`we_process`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock (100 MHz by default) |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `uart_rxd` | in | 1 | serial line from the host |
| `ir` | in | 4 | ALU opcode; must be stable while a byte is processed |
| `seg` | out | 7 | segments, active low |
| `an` | out | 2 | digit enables, active low |
| `result` | out | 8 | the byte on the displays |
| `done` | out | 1 | processor's Done (S7) |

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 100_000_000 | clock frequency; the receiver uses round(CLK_HZ/BAUD) clocks per bit |
| `BAUD` | 9600 | serial rate |
| `REFRESH_BITS` | 17 | display multiplex counter width |

## Where this design departs or fills gaps

Taken as drawn in the original: the receiver's parts (receiver, steering
multiplexer, RA, RB, controller, counter) and the receiver controller's states
and conditions; the processor datapath (3-input multiplexer, R, clocked ALU,
two output registers); and the processor controller's states, including the
extra `EU` state for opcodes 0100/0101. Also taken: the 9600 baud rate, the
carry-save/Wallace-tree multiplier with mux-generated partial products, the
two-hex-digit display, and the zeros shown after power-up.

This design's own choices:

- **Serial receiver insides.** The original reused outside example code. The
  synchroniser, half-bit start check, centre sampling, framing-error drop and
  the `er`/`done` arm-and-hold handshake are this design's own.
- **Counter width and wrap.** The counter is 2 bits and wraps 3 → 0, read from
  the name "3count" and the four Zt cases.
- **Display register timing.** The original labels both output registers with
  the same enable, `Eout`. Loading the display register in S6 would show the
  *previous* result, because in S6 the multiplexer still presents the old OUT.
  So here OUT loads in S6 and the display register loads in S7.
- **Leaving S7.** The exits of the final `E` test are unlabelled. This design
  stays in S7 while `E` = 1 and returns to S1 when `E` = 0.
- **SM in S1.** `SM` is treated as holding its last assignment, so it is 10 in
  S1.
- **Start signal and opcode source.** The processor's start `E` is the
  receiver's `done_rx`. The opcode comes from the `ir` port, because the
  original does not say where it comes from.
- **Opcodes.** All opcodes except 0100/0101 are this design's assignment.
  Reading 0100/0101 as low/high product byte is also an interpretation.
- **Board details.** The 100 MHz clock, active-low segments and time-multiplexed
  digits come from the Nexys 4 DDR board, not from the project description.
- **Not built.** The original mentions a "shift left register" timing
  simulation. Here shifting exists only as ALU opcodes 0010/0011, and the
  receiver's shift register shifts right, LSB first. A decimal display,
  mentioned as a possible change, is not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_uart_rx` | bytes at 16 clocks/bit, exact `done` latency, hold until `er`, unarmed receiver ignores frames, bad stop bit dropped, glitch rejected |
| `tb_uart_counter` | random enables against a reference count |
| `tb_uart_fsm` | six bytes: RA/RB alternation, `S` values, extra counter steps, latency 2 or 4, one-cycle Done |
| `tb_uart_receiver` | ten bytes over the line into RA/RB, one `done_rx` per byte and its timing |
| `tb_demux`, `tb_mux_n`, `tb_load_reg` | random data against reference behaviour |
| `tb_full_adder`, `tb_csa` | exhaustive / random, including per-bit independence of the CSA |
| `tb_wallace_mul` | all 65,536 operand pairs |
| `tb_alu` | all opcodes with random operands, result timing after EALU/EU, product not visible before EU |
| `tb_proc_fsm` | every opcode: exact strobe sequence per state, S7 hold while E |
| `tb_microprocessor` | 300 random operations: result and 7/8-cycle latency |
| `tb_hex7seg`, `tb_seg_display` | all digits; digit alternation and nibble placement |
| `tb_we_process` | whole design at default parameters (100 MHz, 9600 baud), described below |

`tb_we_process` sends 17 serial frames: 8 operand pairs plus one frame with a
bad stop bit. The pairs cover both multiplies, add, subtract, and, xor, shift
and compare. After every byte the testbench checks the displayed result, and
for three pairs it also decodes both seven-segment digits. It counts RA loads,
RB loads, extra counter steps, multiply captures, ordinary ALU operations,
dropped frames and digit switches, and fails if any of them never happened.
It runs in about a second.

To simulate, for example the top:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_we_process \
    -y rtl -Irtl rtl/we_pkg.sv tb/tb_we_process.sv
./obj_dir/Vtb_we_process
```

Use the same command with another testbench name for the other blocks.
`we_pkg.sv` must come first, because the controllers and the ALU import it.
The `rtl/` files are synthesizable. `verilator --lint-only -Wall` accepts them
with no warnings.
