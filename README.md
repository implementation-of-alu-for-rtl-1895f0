# One-unit-per-operation 64-bit ALUs: 8 binary operations, and 15 with rotate, shift and BCD

This RTL describes two *conventional* arithmetic and logic units for an FPGA.
They serve as the reference organisation that low-power ALU work (clock gating,
for example) is measured against. The idea is simple and deliberately wasteful:

* every operation has its own hardware unit, made of combinational logic
  followed by a bank of D flip-flops;
* every unit receives both operands and the clock on **every** cycle,
  whether or not it is selected;
* an output multiplexer, driven by a 4-bit selection code, passes the
  registered result of one unit to the output `Z`.

Only one unit's result is used in any cycle, but all of them toggle. The
dynamic power of that switching is the cost this organisation makes
visible.

There are two ALUs:

* **`alu8`** has 8 operations: AND, XNOR, XOR, OR, add, subtract, increment
  and decrement, on 64-bit operands.
* **`alu15`** has the same eight plus seven more: rotate right and left,
  shift right and left, BCD addition, BCD subtraction and BCD
  multiplication. Code `1111` is a NOP.

`alu_top` places the two side by side with separate ports.

## Operation codes

| `sel` | operation | `alu8` | `alu15` | result `Z` |
|------|-----------|:-----:|:------:|------------|
| 0000 | logical AND | yes | yes | `A & B` |
| 0001 | logical XNOR | yes | yes | `~(A ^ B)` |
| 0010 | logical XOR | yes | yes | `A ^ B` |
| 0011 | logical OR | yes | yes | `A \| B` |
| 0100 | binary addition | yes | yes | `A + B` mod 2^64, carry dropped |
| 0101 | binary subtraction | yes | yes | `A - B` mod 2^64 (two's complement) |
| 0110 | binary increment | yes | yes | `A + 1` mod 2^64 |
| 0111 | binary decrement | yes | yes | `A - 1` mod 2^64 |
| 1000 | rotate right | 0 | yes | A rotated right by one bit |
| 1001 | rotate left | 0 | yes | A rotated left by one bit |
| 1010 | shift right | 0 | yes | A shifted right by one, 0 enters bit 63 |
| 1011 | shift left | 0 | yes | A shifted left by one, 0 enters bit 0 |
| 1100 | BCD addition | 0 | yes | 16-digit BCD `A + B` mod 10^16 |
| 1101 | BCD subtraction | 0 | yes | 16-digit BCD `A - B` mod 10^16 |
| 1110 | BCD multiplication | 0 | yes | `A[15:0] × B[15:0]` (4 digits each), 8-digit product in `Z[31:0]` |
| 1111 | NOP | 0 | yes | 0 |

The codes are the enum `alu_pkg::alu_op_e`. In the `alu8` column, "0" means
the code is not an operation of that ALU and `Z` is 0. Increment and
decrement act on A only. The rotates and shifts act on A only and move it by
exactly one position. Bit 63 is the most significant bit, and "right" means
towards bit 0.

## Timing: what `Z` shows, and when

Each unit registers its own result. The selection code does not pass
through a register: it drives the output multiplexer directly. Two things
follow:

* **Latency.** Apply A and B before a rising edge. After that edge, `Z`
  shows op(A, B) for the operation currently on `sel`. A new operand pair
  can be applied every cycle.
* **Selecting without a clock edge.** Changing `sel` between edges changes
  `Z` at once, to another unit's registered result *for the same
  operands*. All units were clocked, so all results exist. The top
  testbench exercises this deliberately.

There is one exception. BCD addition and subtraction share one unit, whose
add/subtract control is `sel[0]`. That unit therefore computes at the rising
edge with whatever `sel[0]` is then. For codes `1100`/`1101`, hold `sel`
across the edge, which is the normal way to use the ALU anyway.

No flip-flop has a reset. Every register is loaded on every edge, so `Z` is
defined from the first rising edge on. Leaving out a reset also keeps the
port count at 64 + 64 + 4 + 1 inputs and 64 outputs (197 pins) for `alu8`.
That is the I/O count reported for this design on a Kintex-7.

## The decimal (BCD) datapath

This is the only part of the design with real structure inside a unit.

**Operand format.** For BCD operations each 64-bit operand holds 16 packed
decimal digits, with digit *k* in bits 4k+3..4k. Operands with a nibble
above 9 are not BCD, and their results are not meaningful.

**One-digit adder/subtractor (`bcd_digit_addsub`).** The datapath is:

1. A 2:1 multiplexer passes either digit B (add) or the nine's complement
   of B (subtract).
2. A 4-bit binary adder with carry-in adds that digit to digit A.
3. A BCD correction stage adjusts the 5-bit binary sum. If it exceeds 9,
   the stage adds 6 to the low nibble and raises the decimal carry.

**Nine's complement (`nines_complement`).** 9 − x is produced without a
table. The digit is inverted with four XOR gates, which gives 15 − x. A
4-bit adder then adds the constant `1010` (ten) modulo 16:
15 − x + 10 − 16 = 9 − x.

**Sixteen digits (`bcd_adder_n`, `bcd_addsub_unit`).** Sixteen digit cells
ripple their decimal carries. For subtraction the carry into the lowest
digit is 1, so the unit computes A + (99…9 − B) + 1 = A − B + 10^16. The
final carry is dropped, so the result is the ten's complement when B > A.
For example, 3 − 10 gives `9999999999999993`. Neither the final carry nor
the borrow reaches `Z`.

**Digit multiplier (`bcd_digit_mult`, `bin2bcd`).** Two digits are
multiplied in binary. The product is at most 81, so 7 bits suffice. A
binary to BCD converter splits the product into a high digit H (tens) and a
low digit L (units).

**Array multiplier (`bcd_mult4`).** Each of the 16 digit pairs
(y_i, x_j) gives a low digit L(i,j) of weight 10^(i+j) and a high digit
H(i,j) of weight 10^(i+j+1). These digits form eight rows of eight digits:
for each y digit, one row of L digits and one row of H digits. A chain of
seven 8-digit BCD adders sums the rows into the product P7..P0. The product
of two 4-digit numbers is below 10^8, so nothing overflows. `bcd_mult_unit`
feeds the array with the low four digits of A and B and registers the
product, zero-extended to 64 bits.

## Module hierarchy

```
alu_top
├── alu8            8 units + output multiplexer
│   └── and_unit, xnor_unit, xor_unit, or_unit,
│       adder_unit, subtractor_unit, incrementer_unit, decrementer_unit
└── alu15           the same 8 units, plus
    ├── rotr_unit, rotl_unit, shr_unit, shl_unit
    ├── bcd_addsub_unit ── bcd_adder_n ── bcd_digit_addsub ── nines_complement
    └── bcd_mult_unit ── bcd_mult4 ─┬─ bcd_digit_mult, bin2bcd   (16 of each)
                                     └─ bcd_adder_n (8 digits, 7 of them)
```

`alu_pkg` holds the width (64), the select width (4) and the operation enum.
Every datapath module has a `WIDTH` parameter (`DIGITS` for
`bcd_addsub_unit`), which defaults to the 64-bit configuration.

Generic synthesis (yosys, coarse cells) gives these register counts:

* `alu8`: 512 flip-flop bits, 8 units × 64.
* `alu15`: 862 flip-flop bits. Each shift unit drops one constant flip-flop
  and the multiplier unit keeps 32.

The top holds 1374 flip-flop bits.

## Design choices beyond the original description

The unit structure is taken as described: a logic array followed by a D
flip-flop, all units clocked, and an output multiplexer under `sel`. So are
the operation codes, the 64-bit width, the one-position rotate/shift wiring,
the BCD digit adder/subtractor with its nine's complement, and the 4 × 4
digit array multiplier. The following points were left open and were
decided here:

* **Operand distribution.** Both operands go to every unit; there is no
  demultiplexer that idles the unselected units. That is the point of the
  conventional organisation.
* **Arithmetic results.** `Z` is the only output. No carry, borrow or
  overflow flag is brought out.
* **Codes that do nothing.** `alu8` gives `Z = 0` for codes `1xxx`.
  `alu15` gives `Z = 0` for NOP.
* **BCD operand size.** Addition and subtraction use all 16 digits.
  Multiplication uses the low 4 digits of each operand.
* **BCD subtraction.** The carry into the lowest digit is 1, which makes
  the result ten's complement.
* **Nine's complement constant.** The XOR-then-add structure is the
  design's. The added constant `1010` is the one that yields 9 − x.
* **Digit multiplier.** The original is drawn as an area-optimised
  half/full-adder network. Here it is a plain sum of four shifted
  partial-product rows, with the same function.
* **Binary to BCD converter.** The original is drawn as a gate network.
  Here it is a division by the constant 10, which synthesis reduces to
  logic.
* **Array summation.** The original places digit adders in a diagonal
  array. Here the rows are summed with a chain of 8-digit ripple adders.
  The result is the same.
* **Direction convention.** Bit 63 is the most significant bit. For both
  rotates and shifts, "right" means towards bit 0: `rotr` takes output bit
  i from input bit i+1, and `shr` does the same with a 0 entering bit 63.
* **No reset.** See the timing section above.

A 16 × 16 digit extension of the BCD multiplier is mentioned in connection
with floating-point multiplication. Neither ALU uses it, and it is not
included.

## Simulating

The code is SystemVerilog-2017. Every module file begins with a comment
that describes its function, interface and timing. The packages must come
first on the command line. To build and run the end-to-end testbench at
full size:

```
verilator --binary --timing --assert -Irtl -Itb \
    tb/tb_bcd_pkg.sv tb/tb_alu_ref_pkg.sv rtl/*.sv tb/tb_alu_top.sv \
    --top-module tb_alu_top
./obj_dir/Vtb_alu_top
```

Any other testbench `tb/tb_<module>.sv` is run the same way, with
`--top-module tb_<module>`. Each testbench checks its outputs itself and
ends with a line `TB_RESULT checks=N failures=M`. Each also has a watchdog
that ends the run with a failure if the simulation hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_<op>_unit` (12 units) | Corner and 2000 random operand pairs against a bit-by-bit model. Before each edge the old result must still be held; after it the new one must appear (one-cycle latency). |
| `tb_nines_complement`, `tb_bin2bcd`, `tb_bcd_digit_mult`, `tb_bcd_digit_addsub` | Exhaustive over all BCD inputs, both modes and both carry inputs. |
| `tb_bcd_mult4` | 4-digit products, corners (9999 × 9999) plus 3000 random, against integer arithmetic. |
| `tb_bcd_addsub_unit`, `tb_bcd_mult_unit` | 16-digit add/subtract and the multiplier unit with latency. The multiplier test sets random bits above bit 15, which must be ignored. |
| `tb_alu8`, `tb_alu15` | 4000 random operations over all 16 codes. Before the edge, `Z` must show the newly selected unit's old result; after it, the new result. |
| `tb_alu_top` | Both ALUs at the default 64-bit width with independent traffic: directed corners, then 20000 random cycles. It counts each mechanism and fails if any never happened: every code, binary carry and borrow wrap, rotate wrap bit, lost shift bit, BCD correction, decimal carry out, ten's-complement BCD result, carrying digit products, selection switch without an edge, NOP and undefined codes. |

The reference models live in `tb/tb_bcd_pkg.sv` (BCD ↔ binary conversion)
and `tb/tb_alu_ref_pkg.sv` (expected `Z` for any code). They use integer
arithmetic and share no structure with the RTL.

## Limits

* Only function and cycle timing are verified. The design's point is
  power: the dynamic power of clocking all units, against a clock-gated
  alternative. That needs an FPGA implementation flow and power analysis,
  which this RTL does not contain.
* BCD results for non-BCD operands are whatever the digit logic produces.
  They are not checked.
