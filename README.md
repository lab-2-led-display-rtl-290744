# LED display port for a PC-104 bus

A one-digit output device for a PC-compatible computer. A program writes a
byte to I/O port 220H, for example with `OUT DX, AL`; the peripheral keeps
the byte and shows its two low bits as the digit 0, 1, 2 or 3 on a
seven-segment LED. Writes to any other port leave the digit alone.

The circuit has no clock of its own. It uses the bus's I/O-write strobe,
IOW*, as its clock. IOW* is low only while the processor writes to I/O
space. The address and data lines are valid at its rising edge, which ends
the cycle, so the register samples at that edge.

## Signals

| Port    | Dir | Width | Bus signal | Meaning |
|---------|-----|-------|------------|---------|
| `addr`  | in  | 10    | A9..A0     | I/O port address (low 10 bits) |
| `data`  | in  | 8     | D7..D0     | write data |
| `iow_n` | in  | 1     | IOW*       | I/O write strobe, active low; rising edge clocks the register |
| `seg`   | out | 7     | -          | LED segments, `seg[0]` = a ... `seg[6]` = g |

Only these bus lines are used. The PC-104 bus also has A19..A10, but
PC-compatible I/O decoding looks only at A9..A0. The port therefore also
answers at every address that differs from 220H only in A19..A10.

## How a write reaches the display

```
 addr[9:0] ──► io_addr_decoder ── sel ─┐
                (== 220H)              ▼
 data[7:0] ─────────────────────► io_write_register ── reg_q[1:0] ──► seg7_decoder ──► seg[6:0]
 iow_n ───────────── clock (rising edge) ─┘   (8 bits)
```

* **`io_addr_decoder`** compares all ten address lines with `PORT_ADDR`.
  The compare is combinational.
* **`io_write_register`** is an 8-bit flip-flop register clocked by
  `posedge iow_n`. The address match is a load enable. At each rising edge
  the register takes either the data bus (match) or its own value (no
  match). The strobe is never ANDed with the address match. Gating a clock
  like that would give a glitch-prone clock, and the enable mux avoids it.
* **`seg7_decoder`** turns register bits 1..0 into segments:

  | value | lit segments | `seg` (gfedcba) |
  |-------|--------------|-----------------|
  | 0     | a b c d e f  | `0111111` |
  | 1     | b c          | `0000110` |
  | 2     | a b d e g    | `1011011` |
  | 3     | a b c d g    | `1001111` |

The register keeps all eight bits, but only bits 1..0 reach the display.
Linters therefore report bits 7..2 as unused. Bits 7..2 are still stored
because the port is an 8-bit register. A full byte such as F2H shows as 2.

### Timing

A write to 220H changes the display right after the rising edge of IOW*.
The delay is one flip-flop clock-to-output plus the segment decoder. The
address and data must meet the register's setup and hold times around that
edge. The ISA write cycle gives that: data is valid well before IOW* rises
and is held after it. The falling edge of IOW* does nothing. Nor does
anything on the bus while IOW* is low.

### Start-up

The bus signals used here include no reset. The register starts at zero,
which is its FPGA configuration value, so the LED shows 0 until the first
write. In the RTL this is an initialiser on the register's declaration.

## Where it follows the lab specification and where it chooses

Taken from the specification:
* port address 220H;
* decoding of A9..A0;
* an 8-bit register;
* IOW* as the clock, rising edge active;
* a hold-or-load mux in place of a gated clock;
* a display of the two low bits as the digit 0–3.

This design's own choices:
* **Segment order and polarity.** The order is {g,f,e,d,c,b,a}, and a 1
  lights a segment. Set `SEG_ACTIVE_LOW = 1` for a display whose segments
  light when driven low, such as a common-anode display. Check this against
  your board's LED wiring.
* **Digit shapes.** The table above uses the usual shapes for 0–3.
* **Start value.** The register starts at zero, with no reset input.
* **Module split.** The three units above are separate modules, joined in
  the top, `led_display_peripheral`.

### Board wiring used with this design

The bus signals reach the FPGA through jumpers. This placement goes in the
FPGA tool's pin constraints, not in the RTL:

| Signal | FPGA pin | Signal | FPGA pin |
|--------|----------|--------|----------|
| D7 | 113 | A9 | 138 |
| D6 | 114 | A8 | 139 |
| D5 | 115 | A7 | 141 |
| D4 | 116 | A6 | 142 |
| D3 | 117 | A5 | 143 |
| D2 | 118 | A4 | 144 |
| D1 | 119 | A3 | 146 |
| D0 | 120 | A2 | 147 |
| IOW* | 157 | A1 | 148 |
|    |     | A0 | 149 |

The LED segment pins depend on the board and are not listed here.

## Software side

The program that drives the port is short:
1. Read one key through DOS: INT 21H with AH = 1, which returns the
   character in AL.
2. Subtract ASCII `'0'` from it.
3. Write the result to port 220H.
4. Exit with INT 20H.

Typing `2` therefore writes 02H, and the LED shows 2. Keys outside `0`–`3`
write other bytes, and the display shows their two low bits.

## Files

| File | Contents |
|------|----------|
| `rtl/led_pkg.sv` | widths, port address, segment type and segment names |
| `rtl/io_addr_decoder.sv` | port address compare |
| `rtl/io_write_register.sv` | IOW*-clocked 8-bit register with load enable |
| `rtl/seg7_decoder.sv` | 2-bit to seven-segment decoder |
| `rtl/led_display_peripheral.sv` | top: the three blocks wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters: `PORT_ADDR` (default `10'h220`) and `SEG_ACTIVE_LOW` (default
0) on the top. `AW` and `W` on the sub-blocks default to 10 and 8.

## Verification

Each testbench checks the module's outputs against expected values that
the testbench works out itself. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_io_addr_decoder` runs all 1024 addresses, for port 220H and for a
  second instance set to 378H. Exactly one address must match in each.
* `tb_seg7_decoder` checks all four digits with both polarities.
* `tb_io_write_register` runs 300 random strobes and checks four things:
  1. the register loads at the rising edge;
  2. it holds when not selected;
  3. it ignores the falling edge;
  4. it ignores changes while the strobe is low.
* `tb_led_display_peripheral` tests the whole port at its default
  parameters, using timed ISA-style write cycles. It checks these cases:
  1. the digit shown at power-up;
  2. the program's writes of `'0'`–`'3'` minus `'0'`;
  3. writes to 21FH, 221H, 020H and 320H, which must not change the display;
  4. a full-byte write of F2H;
  5. 2000 random writes.

  It counts each of the following, and one that never happens is a
  failure: loads on a match, holds on a miss, and each of the four digits
  being shown.

All four pass. Each also fails against a deliberately broken copy of its
module:
* A9 dropped from the address compare;
* the register clocked on the falling edge;
* segment d missing from the digit 3;
* bits 1 and 0 swapped at the decoder input.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/led_pkg.sv rtl/io_addr_decoder.sv \
  rtl/io_write_register.sv rtl/seg7_decoder.sv rtl/led_display_peripheral.sv \
  tb/tb_led_display_peripheral.sv --top-module tb_led_display_peripheral -Mdir obj
./obj/Vtb_led_display_peripheral
```

For a sub-block, use the same command with the package, that block's file,
and its testbench.

## Limits

* The model has no metastability or bus-timing checks. It assumes the bus
  meets the register's setup and hold times at the rising edge of IOW*.
* The segment polarity and order are not fixed by anything outside this
  design. Check them against the board before building it.
* The top reads nothing back. A read of port 220H (IOR*) is not decoded,
  so the stored byte cannot be read by software.
