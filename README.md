# A small ternary computer behind a binary interface

Ternary logic works with three levels, 0, 1 and 2, instead of two. A trit holds
log2(3) ≈ 1.58 bits, so fewer digits, wires and storage cells carry the same
information: two trits address nine memory cells where three bits address
eight. Today's hosts are binary, though. This design therefore wraps a ternary
datapath in converters. Binary numbers come in and are turned into trits. A
4-trit ALU and a nine-trit memory process them. The results are turned back
into binary.

All the logic here is ordinary synthesizable SystemVerilog. Each trit is
carried on two binary wires, so the design models the ternary *function* of
each part. It does not model the ternary *circuits* (multi-threshold
transistors and the like) that a true three-level chip would use.

```
            bin_a ─► binary_to_ternary ─┐
            bin_b ─► binary_to_ternary ─┤ (6 trits each, low 4 used)
           bin_op ─► binary_to_ternary ─┤
                                        ▼
                       ┌────────── ternary_alu ──────────┐
  b_from_mem ─► B mux ◄┘  (gates + full-adder chain)     │ c[3:0], bc
        ▲                                                 ├─► ternary_to_binary ─► bin_out
        │ output_data            input_data = c[0]        │
        └──────────── ternary_mmu ◄───────────────────────┘
                      (ind, rwc) │
                                 ▼
                      ternary_memory: 9 × ternary_dff
```

## Trits on binary wires

`ternary_pkg` defines `trit_t` as `logic [1:0]` with this encoding:

| code | trit |
|------|------|
| 2'b00 | 0 |
| 2'b01 | 1 (the intermediate level) |
| 2'b10 | 2 |
| 2'b11 | illegal; every block reads it as 2 |

Because 2'b11 is read as 2, an illegal input code never produces an illegal
output. Multi-trit values are unpacked arrays `trit_t x [N]`. Element 0 is the
least significant trit, and the value is `sum(x[i] * 3**i)`.

## The gate set

Everything is built on five one-trit gates. Each is a small module wrapping a
function of the package.

| gate | module | rule | 0 → | 1 → | 2 → |
|------|--------|------|-----|-----|-----|
| standard inverter (STI) | `ternary_sti` | 2 − a | 2 | 1 | 0 |
| negative inverter (NTI) | `ternary_nti` | 2 if a = 0, else 0 | 2 | 0 | 0 |
| positive inverter (PTI) | `ternary_pti` | 0 if a = 2, else 2 | 2 | 2 | 0 |
| AND | `ternary_and` | min(a, b) | | | |
| OR | `ternary_or` | max(a, b) | | | |

NTI and PTI are also "literal detectors". NTI outputs 2 exactly when its
input is 0, and PTI outputs 0 exactly when its input is 2. The MMU uses this
pair to decode its three-way command trit.

## The 4-trit ALU (`ternary_alu`)

Operands `a` and `b` and the result `c` are four trits each, covering the
values 0..80. The operation input `o` is also four trits, read as a number:

| code | operation | per-trit rule / result | `bc` |
|------|-----------|------------------------|------|
| 1 | or | max(a, b) | 0 |
| 2 | and | min(a, b) | 0 |
| 3 | nor | 2 − max | 0 |
| 4 | nand | 2 − min | 0 |
| 5 | xor | max(min(a, 2−b), min(2−a, b)) | 0 |
| 6 | xnor | 2 − xor | 0 |
| 7 | add | (a + b) mod 81 | carry: 1 when a + b ≥ 81 |
| 8 | subtract | (a − b) mod 81 | borrow: 1 when a < b |
| other | none | 0 | 0 |

The logic operations are built from gate instances, trit by trit. Ternary
xor has no single standard definition. This design uses the min/max form
above, which reduces to ordinary xor on the values 0 and 2.

**Arithmetic.** Arithmetic uses one ripple chain of four `ternary_full_adder`s.
Each adder produces a sum of (a + b + cin) mod 3 and a carry of
(a + b + cin) div 3.

- **Add:** the chain gets `b` and a carry-in of 0.
- **Subtract:** the chain gets `STI(b)` and a carry-in of 1. This is the
  radix-3 form of two's complement. Inverting every trit of `b` gives
  `80 − b`, so the chain computes `a + (80 − b) + 1 = a − b + 81`. The chain's
  carry-out is therefore 1 when `a ≥ b` and 0 when a borrow occurred. The ALU
  inverts it to report `bc = 1` for a borrow.

The ALU is purely combinational.

## Converters (`binary_to_ternary`, `ternary_to_binary`)

Both converters are registered, with one clock of latency. Both have a
synchronous, active-high `reset` that clears the output to 0.

- **`binary_to_ternary`:** takes an 8-bit input and produces six trits, digit
  i being `(x / 3**i) mod 3`. Six trits are needed because 3⁵ = 243 < 256.
- **`ternary_to_binary`:** weights the six input trits by powers of three and
  registers the low 8 bits. Six trits reach 728, so larger values wrap modulo
  256.

Both are parameterised by `BIN_W` and `TRITS`.

## Memory and MMU (`ternary_memory`, `ternary_mmu`, `ternary_dff`)

`ternary_dff` is a one-trit register that loads on the rising edge. It has no
reset.

`ternary_memory` holds nine such registers. Each register has a
hold/write/clear multiplexer in front of it. Cells are selected by a binary
cell number, which also selects the cell on the combinational read port.

`ternary_mmu` is the ternary face of that memory. It has these ports:

- **`ind`:** two trits, the cell index. The MMU turns it into the binary cell
  number `ind[0] + 3*ind[1]`. This is the ternary-address to binary-address
  translation.
- **`rwc`:** one trit, the command, applied at the next rising edge:
  - 0 = read: `output_data` takes the addressed cell's trit, one clock after the read.
  - 1 = write: the addressed cell takes `input_data`.
  - 2 = clear: all nine cells and `output_data` become 0.
- **`output_data`:** itself a `ternary_dff`. It keeps its value during writes.

The MMU and memory have no reset, so issue a clear before the first read.

## The system (`ternary_system`, the top)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `reset` | in | 1 | clock (nominally 6.25 MHz) and synchronous reset of the converters |
| `bin_a`, `bin_b`, `bin_op` | in | 8 | operands and operation code from the binary host |
| `b_from_mem` | in | 1 | ALU operand B = MMU output trit (value 0..2) instead of `bin_b` |
| `mem_rwc` | in | trit | MMU command |
| `mem_ind` | in | 2 trits | MMU cell index |
| `bin_out` | out | 8 | `c + 81*bc` of the ALU, in binary |
| `mem_out` | out | trit | MMU output trit |

**Timing.** Inputs presented before edge *k* are converted at edge *k*. During
cycle *k* the ALU works on the converted words. The ALU uses only the low four
trits of each six-trit word, so operands are taken mod 81. Operand B comes
from `bin_b` or, when `b_from_mem` is high, from `mem_out`.

At edge *k+1* two things happen:

- The result trits `{0, bc, c}` are converted to `bin_out`. For an add, this
  is the exact sum.
- The MMU executes `mem_rwc`/`mem_ind`, writing the ALU's lowest result trit
  `c[0]` when the command is a write.

A result therefore reaches `bin_out` two edges after its inputs.

Parameters: `BIN_W = 8`, `CONV_TRITS = 6`, `ALU_TRITS = 4`, `ADDR_TRITS = 2`.
`CONV_TRITS` must be at least `ALU_TRITS + 1`.

## What is specified and what is chosen here

These parts of the design are fixed:

- the three inverters' and the AND/OR truth tables
- the eight ALU operations and their numbering 1..8
- the 4-trit operand, operation and result width, and a carry/borrow trit
- a full adder inside the ALU
- 8-bit binary ports, six output trits per converter, `clk` and `reset` on the converters
- a one-trit D flip-flop with ports `clk`, `data`, `o`
- a nine-trit memory of ternary flip-flops, behind an MMU with ports `ind` (2 trits), `input_data`, `rwc` (read/write/clear) and `output_data`
- the MMU's job of translating ternary addresses into binary ones
- the data flow binary → ternary → ALU ↔ MMU → memory → binary

These are this implementation's own choices:

- the two-wire trit code and reading 2'b11 as 2
- the min/max xor
- complement subtraction and the meaning of `bc`
- zero output for unused operation codes
- one-clock registered converters with synchronous reset, and wrap-around above 255
- rising-edge flip-flops with no reset
- the `rwc` code values (0 read, 1 write, 2 clear)
- clear-all and the one-clock read latency in the MMU
- the three input converters, using the low four trits, storing `c[0]` and the `b_from_mem` path in the top

The converters carry six trits, not five, because five trits stop at 242 and
cannot hold every 8-bit value.

A ternary clock with four edges per period is sometimes proposed for ternary
systems. This design uses an ordinary binary clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- The gates and the full adder are tested exhaustively, including the illegal code.
- The ALU is tested on corner and random operands for every code 0..12, against an integer model.
- The converters are tested on all 256 binary values and all 729 six-trit words. The tests also check the one-clock latency and reset.
- The flip-flop, memory and MMU are tested against reference arrays, with random command streams.
- `tb_ternary_system` runs the top at its default sizes for about 3000 random cycles plus a directed sequence, against a cycle-level model. It counts every operation, carries, borrows, reads, writes, clears, operand B taken from memory, operands above 80 and resets, and fails if any of them never happens.

Each testbench has also been run against a deliberately broken copy of its
module, and each one caught the fault.

## Simulating

With Verilator 5, compile the package first, then the modules, then a testbench:

```
verilator --binary --timing --assert rtl/ternary_pkg.sv \
  $(ls rtl/*.sv | grep -v ternary_pkg) tb/tb_ternary_system.sv \
  --top-module tb_ternary_system
./obj_dir/Vtb_ternary_system
```

Replace `tb_ternary_system` with any other `tb_*` to test a single block.
Every testbench finishes in well under a second.
