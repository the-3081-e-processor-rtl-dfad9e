# 3081/E emulating processor in SystemVerilog

The 3081/E is a microprogrammed processor built to run IBM System/370 FORTRAN
programs for high-energy physics event reconstruction at mainframe speed. It
does not decode IBM instructions in hardware. An off-line translator turns IBM
object code into the processor's own 32-bit microcode, and the translator also
schedules that microcode. The hardware is therefore simple: four independent
execution units sit on two 64-bit buses, and no interlock logic is needed. Every
cycle one microinstruction moves operands over the buses. It can also compute
the next memory address, start a unit, collect a finished result, write a
register and store to memory.

This repository holds synthesizable RTL for the whole processor, plus a
self-checking testbench for every block. The floating-point units follow IBM
hexadecimal floating point exactly, in short and long precision. The main
testbench runs the processor on the published hand-scheduled example and
checks the result bit for bit, along with the microinstruction in which the
result is stored.

## Block diagram

```
            +--------------------- control and register unit ---------------------+
 host  <->  | host_if | control_store -> sequencer -> mop_decoder                  |
 (32-bit    |         |                                   |                        |
  slave)    |         |  regfile (16 x 64, ports A/B)   addr_unit (MAR, D(B) adder)|
            +------------------|-----------|-----------------|--------------------+
                          port A|      port B|                 | MAR
   ABUS (64) ===================+===========|=================|====== data_memory read
   BBUS (64) ===============================+====== unit results ===== data_memory write
                  |            |            |            |
              int_unit      fp_add       fp_mul       fp_div
```

| Module | Role |
|---|---|
| `top_3081e` | Wires everything together: bus multiplexers, condition code, microcode-rule assertions |
| `e3081_pkg` | Shared types, microinstruction fields, MOP encoding helpers, floating-point packing |
| `control_store` | 64K x 32 microprogram memory, asynchronous read |
| `sequencer` | Micro-program counter, IBM-mask conditional branches, link register, halt |
| `mop_decoder` | 10-bit micro-operation code to bus/destination/unit controls |
| `regfile` | 16 x 64-bit two-port register file (one 29705 per word in the original) |
| `addr_unit` | MAR with the 24-bit D(B) / MAR+X adder |
| `data_memory`, `mem_board` | 14 boards x 1/4 MByte = 3.5 MByte, 8 bytes per cycle |
| `int_unit` | Integer arithmetic/logical/shift/halfword/byte-insert/multiply |
| `fp_add` | Hexadecimal floating add/subtract/compare, 2-stage pipeline |
| `fp_mul` | Floating multiply: 9 byte multipliers for short operands, 7 iterated for long |
| `fp_div` | Floating divide, restoring, 2 quotient bits per cycle |
| `host_if` | Host slave port, start/halt, microinstruction injection, debug stops |

## Registers

The register file has sixteen 64-bit words. A 5-bit register address names a
32-bit half: bits [4:1] select the word and bit 0 selects the half. An even
address selects the left (most significant) half.

| Word | Left half | Right half |
|---|---|---|
| 0-7 | R0, R2, ... R14 | R1, R3, ... R15 |
| 8-11 | F0, F2, F4, F6 (64-bit) | |
| 12-15 | spare: R24/F8 ... R30/F14 | R25 ... R31 |

A 64-bit access ignores address bit 0. As a result, an even/odd register pair
(used for multiply results and LM/STM) or a long floating register moves in a
single cycle. To the microcode, integer and floating registers look the same.

## Bus conventions

Every operand travels **left-justified** on the 64-bit buses. A 32-bit integer
or short float sits in bits [63:32], a halfword in [63:48] and a byte in [63:56].
A short float is therefore exactly the high half of a long float. Three parts
of the design share this convention:

- the register file places a 32-bit half in [63:32];
- the memory rotates the addressed doubleword so that the addressed byte
  appears at [63:56];
- the memory store path takes 32/64-bit operands left-justified. Byte and
  halfword stores take the low-order bits of the 32-bit word ([39:32] or
  [47:32]), because IBM STC/STH store the right end of a register.

## Microinstructions

Two formats. Bit 31 here is IBM bit 0.

```
register transfer:  MOP[31:22] MBA[21:20] R1[19:16] R2[15:12] D[11:0]
branch:             11 tt[29:28] MASK[27:24] ADDRESS[23:0]
```

R1 and R2 are the low 4 bits of two register addresses, and MBA holds their
top bits (R1 address = {MBA[1], R1}, R2 address = {MBA[0], R2}). D is the IBM
12-bit displacement. Port A of the register file reads R2. Port B reads or
writes R1.

### MOP encoding (this implementation's own)

The original only states what the MOP controls: ABUS source, BBUS source,
destinations and operand length. The layout used here is:

| MOP bits | Meaning |
|---|---|
| [9:8] | address operation: `00` none, `01` MAR <= D + R2 (R2 = 0 means no base), `10` MAR <= MAR + R2 (index cycle). `11` marks a branch |
| [7:5] | form |
| [4:0] | form-specific |

| Form | ABUS | BBUS | Action | [4:0] |
|---|---|---|---|---|
| `F_MISC` | depends | depends | `M_LOAD` (M)->R1, `M_MOVE` R2->R1, `M_STORE` R1->(M), `M_MAR` MAR->R1, `M_SETCC` | {sub-op, length} |
| `F_ST_MR` | memory | R1 | start unit: op1 = BBUS, op2 = ABUS | unit/function |
| `F_ST_RR` | R2 | R1 | start unit | unit/function |
| `F_CH_M` | memory | result of unit R1[1:0] | start unit (chaining) | unit/function |
| `F_CH_R` | R2 | result of unit R1[1:0] | start unit (chaining) | unit/function |
| `F_RES_R` / `_M` / `_RM` | - | result of unit | write R1, store, or both | {set CC, length, unit} |

The unit/function field is: `0ffff` integer function `ffff`, `10dff` float
add/sub/compare (`d` = long), `110-d` float multiply, `111-d` float divide. The
package provides `uinstr`, `ubranch`, `mop_misc`, `mop_start`, `mop_res` and
`euf_*` helpers to assemble microinstructions.

Port A can serve the address adder or the ABUS, but not both in one cycle. A
register-to-register operation therefore cannot compute an address in the same
cycle, so the translator moves the address calculation one cycle earlier. A
simulation assertion in `top_3081e` flags a microinstruction that asks for
port A twice.

### Branches

`MASK` is the IBM mask: bits 8, 4, 2 and 1 select condition code 0, 1, 2 and 3.
`tt` is this implementation's encoding:

- `00` branch on condition
- `01` branch on condition and save the return address in a link register
- `10` branch on condition to the link register
- `11` halt

A branch takes one cycle and has no delay slot.

## Timing: what the microcode must respect

This is the key to the design. The hardware never stalls. The translator puts
each microinstruction at a cycle where its operands are ready.

| Event | Cycle |
|---|---|
| Address computed into MAR | end of cycle t; memory is read (ABUS) or written at that address in t+1 or later; MAR holds |
| Unit started (operands latched) | t |
| Integer result readable | t+1 |
| Float add/sub result (AR) readable | t+3; a new add may start every cycle |
| Short multiply result (MR) readable | t+3; a new short multiply may start every cycle |
| Long multiply result readable | t+9 (7 multiply cycles + 1 accumulate), `busy` meanwhile |
| Divide result readable | t+16 short, t+32 long (1 set-up + 2 bits/cycle), `busy` meanwhile |
| Result register | keeps its value until the next operation of that unit finishes |

Address pipelining gives a load an effective cost of one cycle. Every
memory-operand microinstruction also computes the address for the next one.
An address with both an index and a base register takes two cycles:
`D(B)->MAR`, then `MAR(X)->MAR`.

*Overlapping* sends one unit's result straight into another unit over the BBUS
(for example `AR->M1` while `(M)->M2`). *Pipelining* starts independent
operations in the add unit or the multiply unit before earlier ones finish. A
result can also be written to a register and stored to memory in the same
cycle, so the store costs no extra time.

Here is the example used by the top-level testbench. It is
`XC = VIX*(XA-XZERO) + VIY*(YB-YZERO)`, eight IBM instructions in 14
microinstructions:

```
 1: 316(13)->MAR
 2: 688(13)->MAR   (M)->F0
 3: 320(13)->MAR   (M)->A2  F0->A1       subtract starts (F0 - XZERO)
 4: 692(13)->MAR   (M)->F2
 5: 1672(10)->MAR  (M)->A2  F2->A1       second subtract, pipelined
 6:                (M)->M2  AR->M1       multiply fed from the adder
 7: 1676(10)->MAR
 8:                (M)->M2  AR->M1
 9:                MR->F0
11:                F0->A2   MR->A1       add fed from the multiplier
13: 144(13)->MAR
14:                AR->F2, (M)           register write and store together
```

Add a load and an add on F4 (`LE 4,404(13)`, `AE 4,668(13)`), and the
translator can still fit all ten IBM instructions into 14 microinstructions:

- 404(13)->MAR moves into microinstruction 6;
- (M)->F4 happens at 7;
- 668(13)->MAR goes into 9, together with MR->F0;
- the AE starts at 10, one cycle before the AER;
- AR->F4 happens at 13, together with 144(13)->MAR.

The two instructions therefore finish out of program order.

## Floating point

All three floating units use IBM System/370 hexadecimal format: a sign, a
7-bit excess-64 characteristic (base 16) and a 6-digit (short) or 14-digit
(long) hexadecimal fraction. Results are truncated, as on IBM machines, so
results can be compared bit for bit with a mainframe.

- **Add/subtract.** The first stage compares characteristics and shifts the
  smaller operand right by whole digits, keeping one guard digit. The second
  stage adds or subtracts the sign-magnitude fractions. It then handles the
  carry (shift right one digit) or shifts out leading zero digits, and corrects
  the characteristic. Compare runs the same subtraction but only sets the
  condition code.
- **Multiply.** Short: nine 8x8 byte products are registered, then summed into
  the 48-bit product. Long: seven 8x8 multipliers take one byte of the second
  fraction per cycle, least significant first. Each row of partial products is
  summed and added, shifted, into a full 112-bit accumulator. The accumulator
  is full width, so the truncated result is exact. Post-normalization happens
  on the output, combinationally. Both precisions return a long result, as
  IBM ME/MD do.
- **Divide.** Both fractions are normalized in a set-up cycle. A restoring
  divider then produces two quotient bits per cycle. It computes one extra
  digit, so a dividend fraction that is not smaller than the divisor's gives
  a leading integer digit; the quotient is then shifted right one digit and
  the characteristic incremented.
- **Exceptions.** Exponent underflow or a zero fraction gives a true zero.
  Exponent overflow wraps the characteristic and raises `exc` (IBM behaviour
  with the interrupt masked). Divide by zero suppresses the operation and
  raises `exc`.

Condition codes: add/subtract gives 0 zero, 1 negative, 2 positive, 3 overflow.
Compare gives 0 equal, 1 low, 2 high. For the multiply and divide units, the
condition code is set from the sign and zero-ness of the result.

## Integer unit

The integer unit handles 32-bit operations: add, subtract and compare (signed
and logical), AND, OR and XOR. It also provides load-and-test, load
complement, halfword add and load (the halfword is sign-extended from ABUS
[63:48]), insert character, shifts and a signed 32x32 multiply. The shifts
take their amount and type from the second operand: bits [5:0] are the amount
and bits [7:6] select SLL/SRL/SLA/SRA. The multiply returns its 64-bit product
on the whole bus, for an even/odd register pair. Condition codes follow IBM
conventions. The result is readable one cycle after the start.

Integer divide and the multi-byte character instructions are not implemented.

## Memory

There are 14 boards (`MEM_BOARDS`) of 32K x 64-bit static RAM (`BOARD_WORDS`),
3.5 MByte in all. The memory uses a 24-bit byte address. Bits [23:18] select
the board, so unused board slots read as zero. An operand must not cross a
doubleword boundary. Reads are asynchronous, like the original static RAM
inside its 120 ns cycle. To model the later 1 MByte boards (14 MByte in
total), set `BOARD_WORDS = 131072`.

## Host interface

The interface is a single-cycle 32-bit slave port. It stands in for the
processor's FASTBUS slave connection; the FASTBUS protocol itself is not
implemented. `h_addr[31:30]` selects the interface registers (`00`), data
memory (`01`, byte address, one 32-bit word per access) or control store
(`10`). Memory and control store can be reached only while the processor is
stopped. While it runs, such an access is refused with `h_err`. The
registers are:

| Index | Register |
|---|---|
| 0 | CTRL: bit0 start, bit1 halt, bit2 execute INJECT once. Read: running, stop reason |
| 1 | START micro-address |
| 2 | INJECT: microinstruction executed once on request, while stopped |
| 3 | PERCTL: enables for stop-on-store-in-range and stop-on-register-write |
| 4/5 | PERLO/PERHI store address range |
| 6 | PERREG register address |
| 7 | UPC, read only |

Stop reasons are 1 for a halt microinstruction, 2 for a host halt, 3 for a
store in range and 4 for a register write. The microinstruction that triggers
a debug stop completes, and then the processor stops.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
floating-point testbenches import `tb/tb_hfp_ref_pkg.sv`, an independent
digit-by-digit reference model. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/e3081_pkg.sv tb/tb_hfp_ref_pkg.sv tb/tb_top_3081e.sv --top-module tb_top_3081e
./obj_dir/Vtb_top_3081e +verilator+rand+reset+2
```

Replace `tb_top_3081e` with `tb_fp_add`, `tb_fp_mul`, `tb_fp_div`,
`tb_int_unit`, `tb_regfile`, `tb_addr_unit`, `tb_sequencer`,
`tb_control_store`, `tb_mop_decoder`, `tb_mem_board`, `tb_data_memory` or
`tb_host_if` to run a single block. All testbenches run at the default sizes.
`tb_top_3081e` uses the full 3.5 MByte memory and 64K control store and
finishes in seconds.

What the top-level test covers:

- the 14-cycle floating-point sequence above, checked bit for bit and for the
  cycle of the store;
- the same sequence with `LE 4,404(13)` and `AE 4,668(13)` woven in: ten
  IBM instructions still take 14 microinstructions. The later AE finishes in
  microinstruction 13, before the earlier AER;
- a 64-bit register-pair load and store;
- an integer loop closed by a conditional branch;
- an indexed address and load address;
- overlapped long divide and long multiply;
- a floating compare and branch;
- an integer multiply into a pair;
- a debug stop on a store in range;
- microinstruction injection;
- a refused host access.

It counts each mechanism (address pipelining, chaining, add and multiply
pipelining, store together with a register write, index cycle, branches taken
and not taken, pair transfers, iterative units, injection, debug stop) and
fails if any never happens.

## How far to trust it, and where it departs from the original

The original description gives the architecture, the register organization,
the microinstruction formats, the unit algorithms and cycle counts for add and
multiply, and worked microcode examples. This RTL reproduces those exactly
where they are given. The following are this implementation's own choices:

- the MOP bit layout, the branch `tt` codes and the link register;
- the integer function set, and the integer unit's one-cycle latency;
- the divide latency; only "2 bits per cycle" is given;
- short multiplies being accepted every cycle;
- left-justified bus alignment and aligned operands;
- the size of the control store (64K words);
- condition-code handling, via a set-CC bit in result microinstructions;
- the host bus and register map;
- exception handling, which follows masked IBM behaviour.

Not implemented:

- the FASTBUS protocol;
- integer divide, decimal and multi-byte character instructions;
- further debug-stop conditions beyond the two described;
- the translator, which is software.

The design has no interlocks. Microcode that reads a result too early gets
stale data. The simulation assertions catch this only for the multiply and
divide units.
