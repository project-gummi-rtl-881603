# Gummi: a 16-bit bus processor driven over a serial line

Gummi is a small 16-bit processor meant to be used from a PC without touching the
FPGA board it runs on. The PC sends each instruction as three ordinary characters
over a 9600 bit/s serial line. The processor runs the instruction on four 16-bit
registers, then sends a 16-bit value back as sixteen ASCII `0`/`1` characters and a
carriage return. The PC can print that reply directly as a binary number.

There are 27 operations:

* 21 single-cycle ALU operations (arithmetic, logic, comparison, Gray code).
* Division and modulus, done by a separate 16-step divider.
* Four register moves: load in, save, copy and load out.

Everything is plain synthesizable SystemVerilog. The defaults assume a 100 MHz clock.

## The instruction

An instruction has three fields. Each arrives in its own character:

| character | field used | meaning |
|-----------|------------|---------|
| 1st | low 5 bits | operation code `op` |
| 2nd | low 4 bits | register selection `{Ry, Rx}` (Ry = bits 3:2, Rx = bits 1:0) |
| 3rd | low 7 bits | 7-bit unsigned number `num` |

The host picks printable characters that carry these bits. For example, copy
(`01110`) is sent as `N` (0x4E). The number 77 is sent as `M`, which is character 77.

The processor keeps the 9-bit word `{op, Ry, Rx}` in its instruction register.

* **Rx** is the destination. It is read into the ALU's A operand and written with the result.
* **Ry** is the second operand. It is also the source of copy and load out.

Operation codes:

| code | op | effect | | code | op | effect |
|-----:|----|--------|-|-----:|----|--------|
| 0  | load in  | G ← num (zero-extended) | | 15 | not  | Rx ← ~Rx |
| 1  | div      | Rx ← Rx / Ry | | 16 | and  | Rx ← Rx & Ry |
| 2  | mod      | Rx ← Rx mod Ry | | 17 | or   | Rx ← Rx \| Ry |
| 4  | inc      | Rx ← Rx + 1 | | 18 | nand | Rx ← ~(Rx & Ry) |
| 5  | dec      | Rx ← Rx − 1 | | 19 | nor  | Rx ← ~(Rx \| Ry) |
| 6  | add      | Rx ← Rx + Ry | | 20 | xor  | Rx ← Rx ^ Ry |
| 7  | sub      | Rx ← Rx − Ry | | 21 | xnor | Rx ← ~(Rx ^ Ry) |
| 8  | abssub   | Rx ← \|Rx − Ry\| | | 22 | max  | Rx ← larger of Rx, Ry |
| 9  | mul      | Rx ← Rx[7:0] × Ry[7:0] | | 23 | min  | Rx ← smaller of Rx, Ry |
| 10 | shl      | Rx ← Rx << 1 | | 24 | eq   | Rx ← (Rx == Ry) ? 1 : 0 |
| 11 | shr      | Rx ← Rx >> 1 | | 25 | b2g  | Rx ← Rx ^ (Rx >> 1) |
| 12 | save     | Rx ← G | | 26 | g2b  | Rx ← Gray-to-binary of Rx |
| 13 | load out | OUT ← Ry | | 27 | reset| Rx ← 0 |
| 14 | copy     | Rx ← Ry | | 3, 28–31 | — | no operation |

The following codes come from the original design's own examples:

* load in, save, load out and copy
* add, absolute subtract and multiply
* the two shifts

The other codes are this implementation's choice. They fill the free codes in the
order the operations were listed: arithmetic first, then logic. If your host
software uses a different table, change `opcode_t` in `rtl/gummi_pkg.sv`.

The multiplier uses only the low 8 bits of each operand, so the product always fits
in 16 bits. Arithmetic wraps modulo 2^16. Comparisons are unsigned.

Loading a value takes two instructions:

1. `load in` puts the number into G.
2. `save` copies G into a register.

`save` also stores the result of the last ALU operation, because that result is also in G.

## How an instruction runs

This is the core of the design (`control_unit`, `datapath`). One 16-bit bus
connects R0–R3, the operand register A, the result register G and the output
register OUT. A 3-bit select drives the bus from one of these sources:

* `{1, r}`: register Rr
* `000`: the zero-extended input number
* `001`: G

The ALU and the divider take A as their first input and the bus as their second.
Their result goes to G. Register writes pass through a 2-to-4 decoder of Rx.

The control state machine:

```
        w=1                     one-step ops (load in, save, copy, load out, unused)
  S1 ───────▶ S2 ─────────────────────────────────────────────────────────▶ S27
  ▲  IR←instr  │ bus←Rx, A←bus                                              │ done=1
  │            ▼                                                            │
  │           SQa  bus←Ry, G←ALU(A,bus) ──────────────▶ SQb  bus←G, Rx←bus ─┤
  │            │ div/mod: start divider                  ▲                  │
  │            ▼                                         │                  │
  │           SDIV  wait; on done G←quotient/remainder ──┘                  │
  └──────────────────────────────────── w=0: tx_start pulse ────────────────┘
```

* **S1** waits for the receiver's `finish` signal (`w`) and loads the instruction register.
* **S2** decodes the instruction.
  * The four register moves finish in S2.
  * Every other operation copies Rx into A.
* **SQa** puts Ry on the bus and captures the ALU output in G.
* **SQb** writes G back to Rx.
* **S27** raises `done`. It leaves when `w` is low again, and in that cycle pulses
  `tx_start` to start the reply.

Count the S1 cycle that sees `w` as cycle 1. `tx_start` then comes in:

* cycle 3 for a register move
* cycle 5 for an ALU operation
* cycle 22 for division or modulus

The reply always sends OUT, and only `load out` writes OUT. After any other
operation the PC sees the last value that was loaded out. To see a result, end with
a `load out` of the register.

## Division and modulus

Division and modulus are kept out of the ALU so that the single-cycle operations do
not wait for them (`div_unit`). The divider is a restoring divider that retires one
quotient bit per clock:

* The dividend is shifted out of the top of the quotient register into a partial remainder.
* In each step the divisor is subtracted if it fits.
* The quotient bit is shifted in at the bottom.

`start` loads the operands (A and the bus). Sixteen steps follow, then `done` pulses.
The control unit waits in SDIV and then loads G with either the quotient or the
remainder. Dividing by zero gives quotient 0xFFFF and leaves the dividend as the
remainder. No special case handles this; it is simply what the algorithm produces.

## Receiving an instruction

`baud_gen` is a modulo-651 counter. At 100 MHz it ticks 16 times per 9600 bit/s bit.

`uart_rx` samples the line on these ticks:

* On a falling edge, it waits 8 ticks to reach the middle of the start bit.
* If the line is high again there, it treats the edge as a glitch. It pulses
  `false_start` and goes back to idle.
* Otherwise it samples each of the 8 data bits 16 ticks apart, in the middle of
  the bit, LSB first. A modulo-8 counter counts the bits.
* It then waits out the stop bit. The stop bit's value is not checked.

`rx_instr` is a three-state machine: op, register selection, number. It keeps
the low bits of each character. After the third character it updates all three
fields together and pulses `finish`. The fields also drive the board LEDs as
`{num, op, Ry, Rx}`, so you can see that an instruction arrived. The top adds a
two-flop synchroniser on the serial input.

## Sending the reply as ASCII

ASCII `0` is 0x30 and `1` is 0x31. They differ only in bit 0, so `uart_tx_ascii`
does not need a binary-to-ASCII table:

* A 16-bit output shift register is loaded once at `start`.
* For each character, a 7-bit shift register is reloaded with the common pattern `0011000`.
* Serial data goes out LSB first. So after the start bit, the transmitter sends the
  current result bit, then the seven common bits, then a stop bit.
* Characters go out MSB of the result first, so the text reads left to right.
* The 17th character is a carriage return (0x0D). It is made the same way, from a
  first bit of 1 and the pattern `0000110`.

Counters track clocks per bit, data bits, characters and idle clocks between
characters. A reply takes `17 × (10 × BIT_CLKS + GAP_CLKS)` clocks. At the
defaults (10416 clocks per bit, one bit of gap) that is about 19.5 ms. An
instruction takes about 3.1 ms to arrive. A host should wait for the carriage
return before sending the next instruction. An instruction that completes while a
reply is still going out is executed, but it gets no reply of its own.

## Files

| file | role |
|------|------|
| `rtl/gummi_pkg.sv` | widths, operation codes, bus/G select and state enums |
| `rtl/gummi_top.sv` | top: synchroniser, baud_gen, uart_rx, rx_instr, gummi_cpu, uart_tx_ascii |
| `rtl/gummi_cpu.sv` | processor = control_unit + datapath |
| `rtl/control_unit.sv` | state machine, instruction register, 2-to-4 decoder |
| `rtl/datapath.sv` | R0–R3, A, G, OUT, bus multiplexer; holds alu and div_unit |
| `rtl/alu.sv`, `rtl/div_unit.sv` | operations |
| `rtl/baud_gen.sv`, `rtl/uart_rx.sv`, `rtl/rx_instr.sv`, `rtl/uart_tx_ascii.sv` | serial link |

Top-level parameter: `BAUD_DIV` (default 651). One bit lasts `16 × BAUD_DIV`
clocks in both directions. Ports: `clk`, `rst` (synchronous, active high),
`uart_rxd`, `uart_txd`, `led[15:0]`.

## Simulation

Each block has a self-checking testbench in `tb/`. It ends with a line
`TB_RESULT checks=N failures=M`. The testbenches use these helpers:

* `tb/gummi_ref_pkg.sv` is an independent reference model of all operations.
* `tb/serial_host.sv` is a behavioural model of the PC side. It sends three-character
  instructions and decodes and validates the replies.

The control unit, the divider and the transmitter also carry concurrent
assertions: at most one register is written per cycle, `tx_start` occurs only in
S27, `done` follows `busy`, and the line is high while the transmitter is idle.
Build with `--assert` to check them. Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gummi_pkg.sv tb/gummi_ref_pkg.sv tb/tb_gummi_top.sv --top-module tb_gummi_top
./obj_dir/Vtb_gummi_top
```

What each testbench covers:

* **`tb_gummi_top`** runs the whole system with `BAUD_DIV = 2`. It covers:
  * the original demonstration sequence: load 4, 6, 2, 3 into R0–R3, shift R0 left
    (8), shift R1 right (3), R3 += R2 (5), R1 = |R1 − R3| (2), R2 = R2 × R3 (10),
    then load out each register
  * division and modulus
  * every operation code, with the replies compared against the model
  * a line glitch
  * an instruction sent while a reply is still going out

  It counts each of these mechanisms and fails if one never happened.
* **`tb_gummi_top_full`** uses every parameter at its default: 100 MHz, 9600 bit/s.
  It loads 77 and 7, divides them, and reads back 11 over the serial line. It runs
  in a few seconds.
* **`tb_gummi_cpu`** runs the demonstration sequence and 3000 random instructions
  against the model. It also checks the cycle count of each operation class.
* **The block testbenches** (`tb_alu`, `tb_div_unit`, `tb_datapath`,
  `tb_control_unit`, `tb_uart_rx`, `tb_rx_instr`, `tb_uart_tx_ascii`, `tb_baud_gen`)
  check their block against the model. Where a timing is defined, they check it too:
  * the 651-clock tick period
  * the 16-step divider latency
  * the reply length
  * the state-by-state control signals

## What is fixed by the original design and what is not

These parts follow the original design:

* the three-character instruction format and field widths
* 16× oversampling with a 651 divider, and the start-bit check in its middle
* the ASCII reply built from one result bit plus a common 7-bit pattern, with a
  closing carriage return
* the bus, A, G and `{1, R}` register select
* the S1/S2/SQa/SQb/S27 sequence with the `done`/`w` handshake
* a separate 16-step divider
* an 8-bit-input multiplier
* the operation list

Choices made here, which you may want to revisit:

* the codes of the 18 operations whose encoding was not given (see the table)
* load in goes through G, and save copies G into Rx
* a dedicated OUT register, written only by load out, is what the reply sends
* unsigned comparisons
* `eq` gives 0 or 1
* shifts are by one bit
* divide-by-zero result
* the divider needs one load cycle before its 16 steps, and the control unit waits
  for it in an extra state, SDIV
* synchronous active-high reset
* an input synchroniser
* LED field order
* the receiver does not check the stop bit
* one bit time of idle between reply characters, and MSB-first character order
* four counters in the transmitter, rather than the five the original mentions
* no queueing of a reply that would overlap one still being sent

The host-side PC program and the FPGA board itself are outside the RTL.
