# GF(2^83) microcode coprocessor for genus-2 hyperelliptic curve cryptography

Public-key cryptography on hyperelliptic curves of genus 2 needs operands only
about half as long as elliptic-curve cryptography for the same security: 83 bits
here. That is still far too much arithmetic for an 8-bit microcontroller on its
own. This design splits the work. A small coprocessor does the GF(2^83) field
arithmetic. The microcontroller keeps the control flow in software:

| level                                              | where                        |
|----------------------------------------------------|------------------------------|
| scalar multiplication (NAF recoding, loop)         | C code on the 8-bit CPU      |
| divisor doubling / addition                        | routines of coprocessor instructions, issued by the CPU |
| combinations of field operations, e.g. `C1 = A1*B1 + D1, C2 = A2*B2` | microcode instructions (hardware) |
| GF(2^83) multiply, add                             | datapath (hardware)          |

The coprocessor has two multipliers and two adders, because the divisor formulae
are scheduled so that two field multiplications (or additions) can always run
side by side. One *microcode instruction* runs one line of such a schedule: a
short fixed sequence of register moves, multiplications and additions. The CPU
therefore issues one instruction per formula line, not one per field operation.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and has no
vendor primitives.

## Block structure

```
            8-bit microcontroller (not included)
   P0 Instruction   P3 Addr        P1 Data-in        P2 Data-out
        |  + instr_valid, busy       |                    ^
        v             v              v                    |
  +------------------------+   +------------+   +---------------+
  |  toplevel_controller   |   | input_word |   |  output_word  |
  |  decode + microcode    |   |  84 bit    |   |   84 bit      |
  +------------------------+   +------------+   +---------------+
     | control to all blocks    ^   | 3 x 32       ^ 3 x 32 |  | 84
     |                          |   v              |        |  v
     |                          | local_storage 128 x 32    |  coproc_datapath
     |                          |  (32 variables of 84 bit) |  (din)
     |                          +---------------------------+------- dout (C1/C2)
```

* Every value enters the local RAM through the **Input-word**: from the CPU,
  one byte per instruction, or from the datapath output (C1 or C2).
* Every value leaves the RAM through the **Output-word**: to the CPU, one byte
  per instruction, or to the datapath input (into A1, B1, D1, A2, B2 or D2).
* The datapath never addresses the RAM itself. A routine loads operands with
  Read-from-RAM followed by Outword-to-Xn. It stores results with Cn-to-inword
  followed by Load-to-RAM.

| module                | role |
|-----------------------|------|
| `hecc_coproc`         | top level; wires the blocks below to the four 8-bit ports |
| `toplevel_controller` | accepts instructions, runs RAM transfers and the microcode sequences |
| `coproc_datapath`     | two lanes, each with A, B, D, C registers, a multiplier and an adder |
| `gf_mult_serial`      | bit-serial GF(2^83) multiplier, 84 cycles |
| `gf_adder`            | GF(2^83) adder (XOR), combinational |
| `local_storage`       | 128 x 32-bit single-port RAM |
| `input_word`, `output_word` | the 84-bit transfer registers with their byte and lane multiplexers |
| `hecc_pkg`            | field constants, instruction codes, datapath control word types |

## Field arithmetic

Elements of GF(2^83) are polynomials of degree below 83 over GF(2), in
polynomial basis. They are reduced modulo

    F(x) = x^83 + x^7 + x^4 + x^2 + 1      (FIELD_POLY = 83'h95, the low terms)

This pentanomial is irreducible. It is this implementation's choice: any
irreducible degree-83 polynomial works if you change `FIELD_POLY`. Elements
travel in 84-bit words, the coprocessor word length, and bit 83 is always zero.
All operands must be reduced.

**Multiplier** (`gf_mult_serial`). It works most significant bit first. In each
cycle the accumulator is multiplied by x and reduced, and `a` is added if the
current bit of `b` is 1. It scans all 84 bits of `b`, so one product takes
exactly **84 cycles**. It is small: an 83-bit accumulator, operand registers and
a 7-bit counter. The price is latency, and the dual-lane datapath wins back half
of it. `done` is high in the cycle before the last iteration edge, with the
final product already on `p`. The C register that is loaded on `done` therefore
holds the product 84 edges after the start edge.

**Adder**. A bitwise XOR. The C register after it makes it a one-cycle
operation.

## The datapath and its cross connections

Each lane i (1, 2) has these register sources:

| register | sources |
|----------|---------|
| Ai | datapath input (Output-word), Di, C of the *other* lane, own Ci |
| Bi | datapath input, own Ci |
| Di | datapath input |
| Ci | lane multiplier (when it finishes) or lane adder |

The output multiplexer picks C1 or C2 for the Input-word. The cross connections
(C2→A1, C1→A2) and the feedbacks (Ci→Bi, Di→Ai) are what make the combined
instructions possible without a trip through the RAM:

| instruction (code)     | result | micro-steps |
|------------------------|--------|-------------|
| Multi-Mult (20h)       | C1 = A1·B1, C2 = A2·B2 | mult1 ∥ mult2 |
| Add-Mult (21h)         | C1 = A1+B1, C2 = A2·B2 | add1 ∥ mult2 |
| TwoAdd-Mult (22h)      | C1 = (A1+B1)·(A2+B2) | add1 ∥ add2 → B1←C1, A1←C2 → mult1 |
| TwoMult-Add (23h)      | C1 = A1·B1 + A2·B2 | mult1 ∥ mult2 → B1←C1, A1←C2 → add1 |
| MultiAdd-Mult (24h)    | C1 = A1·B1 + D1, C2 = A2·B2 | mult1 ∥ mult2 → B1←C1, A1←D1 → add1 |
| Two-MultAdd (25h)      | C1 = A1·B1 + D1, C2 = A2·B2 + D2 | mult1 ∥ mult2 → B1←C1, A1←D1 ∥ B2←C2, A2←D2 → add1 ∥ add2 |

The D registers hold the addend of a multiply-accumulate while the product is
being formed. A squaring is a multiplication with A = B. A chain of squarings
(as in an inversion) can stay inside lane 1 with C1-to-A1 and C1-to-B1.

In the original instruction table, TwoMult-Add reads as a product of the two
products. This implementation follows the instruction's name and computes their
sum. A product of products would need a third multiplication and a place to keep
both products.

## Instruction set and timing

The CPU puts an opcode on the Instruction port and a value on the Addr port (and
Data-in, for Load-data-in), and raises `instr_valid`. The controller accepts on
a rising edge while `busy` is low. `busy` stays high from the next cycle until
the instruction has fully completed, including any multiplication. If the CPU
holds `instr_valid` through a busy period, the instruction is taken as soon as
the coprocessor is free.

| code    | instruction | effect | busy cycles |
|---------|-------------|--------|-------------|
| 00h     | NOP | nothing | 1 |
| 01h     | Load-data-in | Input-word ← {Input-word[75:0], Data-in} | 1 |
| 02h     | Get-data-out | Data-out ← byte Addr[3:0] of Output-word (0 = bits 7:0 … 10 = bits 83:80) | 1 |
| 03h     | Load-to-RAM | RAM[Addr..Addr+2] ← Input-word lanes 0..2 | 3 |
| 04h     | Read-from-RAM | Output-word lanes 0..2 ← RAM[Addr..Addr+2] | 4 |
| 05h/06h | C1-to-inword / C2-to-inword | Input-word ← C1 / C2 | 1 |
| 08h–0Dh | Outword-to-A1, B1, D1, A2, B2, D2 | register ← Output-word | 1 |
| 10h/11h | Do-mult1 / Do-mult2 | C1 = A1·B1 / C2 = A2·B2 | 86 |
| 12h/13h | Do-add1 / Do-add2 | C1 = A1+B1 / C2 = A2+B2 | 1 |
| 14h–1Bh | C1-to-B1, D1-to-A1, C2-to-B2, D2-to-A2, C2-to-A1, C1-to-A2, C1-to-A1, C2-to-A2 | register moves | 1 |
| 20h–25h | microcode instructions (above) | | 86 (one step), 88 (three steps) |

Other codes behave as NOP. All instructions are defined in `hecc_pkg::opcode_e`.

**Storage layout.** A field element takes three 32-bit RAM words: lane 0 = bits
31:0, lane 1 = bits 63:32, lane 2 = bits 83:64 zero-extended. Variables are
placed on 4-word boundaries (Addr = 4·k, k = 0..31), which gives 32 variables.
The RAM address is Addr[6:0] taken as is, so other alignments also work.

**Byte transfer.** A word goes in as 11 Load-data-in instructions, most
significant byte first (the first byte carries bits 83:80 in its low nibble). It
comes out as Read-from-RAM followed by up to 11 Get-data-out instructions, in any
order.

**Why `busy` exists.** The four 8-bit ports alone carry no strobe and no
completion flag. The reference system relies on the host being slower than the
84-cycle multiplier. An 8051 executes one instruction every 12 clocks, so it
cannot issue the next coprocessor instruction before a product is done. This
implementation adds `instr_valid` and `busy` so that it is correct with a host of
any speed. A slow host can ignore `busy` if it keeps the spacing that the
latency table guarantees.

## Performance

Measured in simulation with a host that issues one instruction per cycle, for a
random 83-bit scalar (NAF: 83 doublings, 32 additions):

| operation | coprocessor cycles | port instructions |
|-----------|-------------------:|------------------:|
| divisor doubling (17 multiplications) | 2,247 | 246 |
| mixed divisor addition (24 multiplications) | 3,443 | 378 |
| projective → affine (inversion = 82 squarings + 8 multiplications, then 4 products) | 8,551 | 330 |
| I/O transfer: 13 elements in (base divisor, its negated V1, curve constant f3, constants, start point), 4 coordinates out | 490 | 204 |
| whole scalar multiplication, including the I/O transfer | 305,916 | 33,117 |

On a real 8-bit host, the time per port instruction (several CPU instructions,
12 clocks each on an 8051) dominates. The coprocessor is idle while the host
prepares the next instruction. For scale: the published system with an 8051
host at 12 MHz needs about 0.11 M clocks per doubling, 0.13 M per addition and
7.87 M (656 ms) for the whole scalar multiplication; with an AVR host, 0.938 M
clocks (78 ms). The coprocessor's share of that is the cycle column above, so
its 84-cycle multiplier is never the bottleneck. The scalar multiplication needs at most 29 of the
32 RAM variables at once.

## Departures and choices

These points are not fixed by the original description and were decided here:

* the reduction polynomial `F(x)`;
* the instruction encoding, the `instr_valid`/`busy` handshake and all cycle counts;
* the single instructions beyond the published examples. The symmetric lane-2
  versions, C1-to-A1, C2-to-A2, C2-to-A1 and C1-to-A2 were added;
* the A-multiplexer sources. Three follow the datapath diagram (input, D,
  other lane's C). The own-lane C input was added so that squaring chains can
  stay in one lane;
* TwoMult-Add computes a sum of products (see above);
* the byte order on the ports, the 32-bit lane split and the use of Addr[3:0]
  as the Data-out byte select;
* the RAM is single-port with a one-cycle synchronous read. The original
  "every four words per variable" and "transfers addr .. addr+2" are both
  honoured: three of the four words are used;
* an asynchronous active-low reset clears all registers except the RAM.

Not included: the 8-bit microcontroller (8051 or AVR) and its software. The
testbenches contain a host model that runs the divisor routines.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_gf_adder` | XOR against a bit-by-bit model |
| `tb_gf_mult_serial` | x·x^82 = x^83 mod F, 1·a = a, 40 random products against a schoolbook-then-reduce model, latency exactly 84, start ignored while busy |
| `tb_local_storage` | fill, shuffled read-back, overwrite, hold of read data |
| `tb_input_word`, `tb_output_word` | byte shifting, lane multiplexers, byte multiplexer |
| `tb_coproc_datapath` | every microcode combination and every register move, driven by raw control words |
| `tb_toplevel_controller` | the exact control-word sequence, RAM strobes and busy time of every instruction, and both RAM transfers at all 32 variable slots, against a behavioural multiplier |
| `tb_hecc_coproc` | end to end at default size: port round trip of all 32 variables, busy times, a full divisor doubling as a routine of coprocessor instructions compared with the formulae, every instruction issued at least once, host stalls on `busy` |
| `tb_hecc_scalar_mult` | a complete 83-bit NAF scalar multiplication with mixed additions and the Itoh–Tsujii conversion, compared with the formulae evaluated in software; checks the 90-multiplication inversion and the 32-variable bound, and prints the performance table above |

The reference arithmetic (`tb/gf_ref_pkg.sv`) forms the full 165-bit product and
reduces it afterwards. It shares no code with the RTL. The curve inputs are
random field elements, so the tests show that the hardware carries out the
doubling and addition schedules exactly. They do not show that those formulae
implement the group law. In the addition formula, the adjusted coordinates Ṽ20,
Ṽ21 are read as V20, V21 of the projective input.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hecc_pkg.sv tb/gf_ref_pkg.sv tb/tb_hecc_coproc.sv --top-module tb_hecc_coproc
./obj_dir/Vtb_hecc_coproc
```

Replace the testbench name for the others. Files are found by module name
through `-Irtl -Itb`. Lint with
`verilator --lint-only -Wall -Irtl rtl/hecc_pkg.sv rtl/hecc_coproc.sv`.

## Changing the design

* **Another field:** set `M`, `W` (at least M+1, and at most 96 with the
  three-lane RAM layout) and `POLY` on `hecc_coproc`. The multiplier latency
  follows `W`.
* **Faster multiplier:** `gf_mult_serial` can be swapped for a digit-serial unit
  with the same start/busy/done/p interface. The controller waits on `busy` and
  needs no change.
* **New microcode instruction:** add a code to `opcode_e`, a case to the
  `ucode` table in `toplevel_controller` (up to three steps), and the code to
  `is_dp_op`.
