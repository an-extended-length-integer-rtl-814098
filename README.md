# Extended-length integer calculator

A desktop-style calculator for integers of up to 524,272 decimal digits, built for a
Spartan 3 FPGA board with two external 256K x 16 SRAM chips, a 20-character LCD and a
25-key matrix keypad. It adds, subtracts and multiplies signed integers whose length
is limited only by the external memory. The FPGA holds no number. It holds only
sequencers that walk through the numbers one 32-bit memory word at a time.

The user types a number and sees the last 18 digits on the LCD. Shift keys move the
18-digit window over longer numbers. Pressing `+`, `-` or `*`, a second number and
`=` converts both numbers from decimal to binary, runs the operation word by word,
and converts the answer back to decimal for the display.

## Memory: four registers

The two 16-bit SRAMs share address and control lines and act as one 256K x 32
memory. It is split into four equal registers of 65,536 words each. The register
number forms the top two address bits: `addr = {reg[1:0], offset[15:0]}`.

| register | contents |
|---|---|
| 0 | the displayed number, in BCD |
| 1 | first operand, binary |
| 2 | second operand, binary |
| 3 | answer, binary |

Every register has the same layout (`calc_pkg`):

- word 0: length. Register 0 counts digits; the binary registers count 32-bit words.
  Zero has length 0.
- word 1: sign in bit 0 (1 = negative). Zero is always stored as positive.
- word 2 onward: the magnitude, least significant word first. In register 0,
  decimal digit *i* is nibble *i* mod 8 of word 2 + *i*/8.

That leaves 65,534 data words per register. Register 0 therefore holds
65,534 × 8 = 524,272 digits, which is where the digit limit comes from. A binary
register holds 2,097,088 bits, more than the 1,741,594 bits that 524,272 digits need.
Numbers are sign and magnitude throughout. There is no two's complement.

## Units and how they talk

```
 keypad -> keypad_interface -> control_unit -+-> display_controller -> display_interface -> LCD
                                             +-> convert_transfer_unit
                                             +-> alu
 display_controller, convert_transfer_unit, alu -> memory_interface -> SRAM
```

Only `control_unit` starts work, and it runs one unit at a time. Each unit has a
`start`/`done` pair; the display controller uses `valid`/`ready`, then `done`.

The three memory users share one request port type (`mem_req_t`: `req`, `we`,
`addr`, `wdata`) and one response type (`mem_rsp_t`: `ack`, `rdata`). A client raises
`req` and holds it unchanged until it sees the one-cycle `ack`. For a read, `rdata`
is valid in the same cycle as `ack`. An assertion in `memory_interface` checks that
the request is held. The memory interface arbitrates by fixed priority: display
controller, then convert/transfer unit, then ALU.

### Memory interface

Each SRAM access takes two clock cycles at 50 MHz:

- For a read, OE is low in both cycles and the data is captured at the end.
- For a write, the FPGA drives the data bus and pulses WE low in the first cycle.
  Address and data are held in the second cycle.

OE is never low while the FPGA drives the bus. The `ack` comes 3 to 4 clocks after
`req` rises, depending on the phase of the arbiter, so every memory word costs 4 clocks. The bidirectional data bus
leaves the top as `sram_dq_o`, `sram_dq_oe` and `sram_dq_i`. The tri-state pad
belongs in a board wrapper.

## Number conversion (`convert_transfer_unit`)

This is the slow part of the calculator, and the hardest to follow.

**Decimal to binary.** The unit reads register 0 from its most significant BCD word
down. Each word holds 8 digits and is turned at once into a value *v* < 10^8. The
binary number *B* is then updated as B = B × 10^8 + v. This takes one pass over
B's words, least significant first, with a 64-bit multiply-accumulate:
`acc = word × 10^8 + carry`. The low 32 bits are written back and the high 32 bits
are the next carry. A final carry becomes a new top word.

Digits above the length in the last BCD word are ignored, whatever they hold. The
cost is about 10 clocks per binary word per BCD word, so it grows with the square of
the length: 524,272 digits take about 1.8·10^10 clocks, about 6 minutes at 50 MHz.

**Binary to decimal.** Each pass divides the binary number by 10^8 in place, from
its top word down. The division is bit-serial long division, one quotient bit per
clock, and the running remainder never exceeds 28 bits. The last remainder is turned
into 8 BCD digits by shift-and-add-3 (`bin_to_bcd8`). Those digits become the next
BCD word of register 0, least significant first.

The quotient shrinks by one word when its top word becomes zero. The pass ends when
the number is zero. Leading zeros of the last group are trimmed from the digit
count. This operation consumes its source register.

If the answer would have more digits than register 0 holds, the unit stops and
raises `error`. The cost is about 42 clocks per word per pass, roughly 25 minutes
for the largest answer.

**Copy.** Copies a binary register, header included, to another one.

## Arithmetic (`alu`)

The ALU computes register 3 = register 1 op register 2.

**Add and subtract.** The unit first works out the effective operation from the two
signs and the operation:

- If the effective operation is addition, the magnitudes are added word by word with
  a carry, and the result takes the first operand's sign.
- Otherwise the magnitudes are compared: first by length, then word by word from the
  top. The smaller is subtracted from the larger with a borrow, and the result takes
  the sign of the larger. Leading zero words are trimmed afterwards, and a zero
  result is positive.

Word pairs take about 12 clocks: two reads and one write.

**Multiply: shift-and-add.** The unit reads each word of the second operand in turn
and examines its bits from bit 0 to bit 31:

- If the bit is set, the shifted first operand is added into the answer.
- After each bit, the first operand is shifted left one place in register 1.

The last word is examined only up to its highest set bit, and the shift after that
bit is left out. Register 1 is clobbered by the shifts. The control unit refills it
from the answer after every `=` (see below), so no value is lost.

Multiplication takes time proportional to (bits of the multiplier) × (words of the
multiplicand). Use the shorter number as the second operand.

**Overflow.** A result longer than 65,534 words stops the operation with `error` and
leaves register 3 at length 0.

## Display and keys

### LCD line

The 20-character line reads:

| position | 0 | 1 | 2 … 19 |
|---|---|---|---|
| shows | pending operation `+ - *`, or `E` after an error | `-` for a negative number | 18 digits, right aligned |

`display_controller` owns register 0 and the window offset (the digit index shown in
position 19). It accepts these commands:

| command | action |
|---|---|
| APPEND *d* | shift the BCD number up one digit and insert *d*. A leading zero, or a digit beyond the capacity, is refused. |
| BACK | shift the number down one digit |
| CLEAR | set the number to zero |
| NEG | flip the sign, unless the number is zero |
| SHL / SHR | move the window toward less / more significant digits, within the number |
| REFRESH | redraw after another unit changed register 0 |

APPEND and BACK touch every BCD word of the number, since each word passes a nibble
to its neighbour. Each command ends with a full redraw of the line: one memory read
per visible digit and one character request per position. CLEAR and REFRESH
return the window to the least significant digits. APPEND keeps the window where
it is. BACK moves the window down one digit when it would otherwise run past the
top of the shortened number.

`display_interface` sends each character request as two writes to the LCD: a
set-address instruction (`0x80 | pos`, RS = 0), then the character (RS = 1). At reset
it waits for power-up and sends `0x38`, `0x0C`, `0x06`, `0x01`. The instruction set
is that of the common HD44780-type controller. Waits are fixed clock counts
(`CMD_WAIT`, `CLEAR_WAIT`, `POWERUP_WAIT`), and RW is held low because the busy flag
is never read.

### Keypad

`keypad_interface` pulls one of the 5 column lines low for `SCAN_CYCLES` clocks
(1 ms), then moves to the next. It samples the synchronised row lines at the end of
each column period.

- A scan reports the first key found, by lowest column and then lowest row.
- A key is reported once, as `key_valid` with `key_code = row*5 + column`, after
  `DEBOUNCE_SCANS` identical scans (4, so about 20 ms).
- A new press is accepted only after the same number of empty scans.

Key codes (`calc_pkg`):

| code | key | code | key |
|---|---|---|---|
| 0–9 | digits | 16 | NEG (change sign) |
| 10 | `+` | 17 | BACK |
| 11 | `-` | 18 | C |
| 12 | `*` | 19 | CE |
| 13, 14 | `/`, `%` (ignored) | 20, 21 | shift left / right |
| 15 | `=` | 22–24 | unused |

The assignment of keys to codes is this design's own. Change the `KEY_*` constants to
match a particular keypad.

## Calculator behaviour (`control_unit`)

**Digits.** A digit is appended to the display. The first digit after an operation
key or a result first clears the display.

**Operation keys.** An operation key converts the display into register 1, records
the operation and shows it in position 0. The conversion is skipped when register 1
already holds the displayed result.

- Pressed again straight away, an operation key replaces the pending operation.
- Pressed after a second number, it first evaluates the pending operation, then
  records the new one (chaining, as in `1 + 2 + 3 =`).

**`=`.** Runs this sequence:

1. Convert the display into register 2.
2. Run the ALU.
3. Copy register 3 into register 1, so the result can be the next first operand
   without a conversion.
4. Convert register 3 into register 0.
5. Redraw.

**Other keys.**

- C clears the displayed number. CE also drops the pending operation.
- BACK, NEG and the shift keys go straight to the display controller.
- Keys pressed while a command runs are dropped. A long conversion can take minutes.
- An ALU or conversion error clears the display and shows `E`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `REG_WORDS` | 65536 | words per register (data capacity `REG_WORDS-2`) |
| `SCAN_CYCLES` | 50000 | clocks per keypad column (1 ms at 50 MHz) |
| `DEBOUNCE_SCANS` | 4 | identical scans before a key counts |
| `E_CYCLES` | 16 | LCD enable pulse width, in clocks |
| `CMD_WAIT` | 2500 | wait after an LCD write (50 µs) |
| `CLEAR_WAIT` | 100000 | wait after the clear instruction (2 ms) |
| `POWERUP_WAIT` | 1000000 | wait before initialisation (20 ms) |

All timing is in cycles of the single 50 MHz clock. Reset is synchronous and active
high.

## Where this design departs from the original calculator

The original hardware had the same seven units and the same four-register memory
plan. It also did add, subtract and multiply in hardware with a 64-bit conversion
register and a bit-by-bit shift-and-add multiplier. The following are this design's
own choices:

- Division and modulo are not built. The original ran them only in simulation; they
  did not fit the FPGA and are not described.
- The register header (length and sign words) and the digit packing are chosen here
  to give the 524,272-digit limit.
- The conversion algorithm details are chosen here: 8-digit groups, Horner's method,
  and division by 10^8. The original reported a worst-case conversion of about
  32 minutes. The estimates above for this design are about 6 and 25 minutes.
- The memory handshake, arbitration and SRAM timing are chosen here.
- The LCD command set (HD44780 type) and the line layout are assumed.
- The key codes, the debounce rule and the exact calculator sequencing (chaining,
  result reuse, error display) are chosen here.
- The clock manager is not used. The design runs straight from the 50 MHz clock.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`, calls
`$finish`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/calc_pkg.sv tb/tb_alu.sv --top-module tb_alu -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_memory_interface` | random reads and writes from three clients against a pin-level SRAM model. Checks latency, priority, held requests and the bus rules (OE never low with WE or with the data bus driven). |
| `tb_keypad_interface` | every key once, short presses below the debounce time, long holds, two keys at once |
| `tb_display_interface` | initialisation sequence, address/character pairs, enable pulse timing |
| `tb_display_controller` | every command against a model of the line and of register 0, including the window limits and refused digits |
| `tb_convert_transfer_unit` | decimal to binary and back against reference arithmetic, capacity error, copy, cycle budget. Uses 6-word registers. |
| `tb_alu` | random signed add, subtract and multiply against 300-bit reference arithmetic, overflow, addition time. Uses 10-word registers. |
| `tb_control_unit` | key sequences against stub units. Checks the order of commands for entry, chaining, result reuse and errors. |
| `tb_calc_top` | the whole calculator on keypad, LCD and SRAM models. Uses 6-word registers (32 digits) and short timing. See below. |
| `tb_long_operands` | the convert/transfer unit and the ALU at full register size, sharing the memory interface and SRAM model. Runs add, subtract and multiply on signed operands of up to 1,233 digits. Checks every digit against 4096-bit reference arithmetic, and checks both conversions against the clock-cost models used for the timing estimates above. |
| `tb_calc_top_full` | the whole calculator at its real sizes and timing. Types `12 + 34 =` and `* 2 =` and reads 46 and 92 off the LCD. About half a second of simulated time, since each key is held 30 ms and released for 30 ms. |

`tb_calc_top` computes every expected LCD line independently. It counts each
mechanism of the design and fails if any never happened:

- every display command
- every conversion
- add, subtract and multiply
- operand swap in subtraction
- ALU overflow and conversion overflow
- chaining and result reuse
- refused digits

The helper models in `tb/` are `sram_model` (pin level), `word_mem` (request-port
level), `lcd_model` (decodes the LCD bus into a 20-character line) and
`keypad_model` (a switch matrix).

The largest operands simulated are 1,233 digits, in `tb_long_operands`. The
end-to-end runs through the keypad and LCD use 32-digit registers (`tb_calc_top`),
or the real registers with short numbers (`tb_calc_top_full`). Half-million-digit
runs were not simulated: one conversion takes minutes of hardware time, and far
longer in simulation. The run times quoted for them are extrapolated from the
measured per-word clock rates.
