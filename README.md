# A programmable accelerator for elliptic and hyperelliptic curve cryptography

Scalar multiplication `[k]P`, the core of ECC and HECC, decomposes into
point additions and doublings, which themselves are long sequences of
finite-field operations (`x ± y`, `x × y`, `x⁻¹`) on elements of 128 to 600
bits. This design does not hard-wire any curve formula. Instead, a small
controller runs a program that moves field elements, one `w`-bit word per
cycle, between a register file and a set of field arithmetic units. Several
units can compute at the same time. The scalar `k` never leaves a dedicated
key unit: the unit recodes it on the fly, and the program only branches on
its digits. So the same hardware serves ECC over a 256-bit field and HECC
over a 128-bit field. Only the program, the word counts and the number of
multipliers change.

The RTL is SystemVerilog (IEEE 1800-2017), written to synthesize. The default
configuration is `w = 32`, a 256-bit prime field, one adder/subtracter, one
inverter and one Montgomery multiplier with one multiplier sub-block.

## Block map

```
            host bus (h_*)
                 |
            +---------+   private code path    +----------+
            | host_if |----------------------->| code_mem |
            +---------+                        +----------+
             |   |   |  private key path             | instruction
             |   |   +-------------+                 v
             |   |                 v            +---------+   digit k_i, done
             |   |            +----------+<-----|  ctrl   |<----------------+
             |   |            | key_mgmt |----->|         |                 |
             |   |            +----------+      +---------+                 |
             |   | modulus, pinv, lambda          |  @Rid, i     |          |
             |   v                                v              |          |
             |  (to units)                  +------------+       |          |
             |                              | addr_table |       |          |
             | RF access while idle         +------------+       |          |
             v                                | physical address  |
         +----------+   x[i], y[i]     +-----------------+        |
         | reg_file |----------------->| fu_interconnect |<-------+ load/launch/store
         |  A: r/w  |<-----------------|                 |
         |  B: r    |      r[i]        +-----------------+
         +----------+                    |      |      |
                        fu_addsub  fu_inv  fu_mont_mul x N_MUL  (fu_f2m)
```

| File | Role |
|---|---|
| `rtl/ecc_pkg.sv` | Opcodes, the instruction format, flag, unit and host-register numbers, and the `mk()` assembler helper |
| `rtl/ecc_acc_top.sv` | Top level: wiring and register-file port sharing |
| `rtl/ctrl.sv` | Instruction fetch, decode and execute; word loops; call stack; flags |
| `rtl/code_mem.sv` | Program memory (writable or ROM) |
| `rtl/addr_table.sv` | Intermediate address table: `@Rid` → (first word, word count) |
| `rtl/reg_file.sv` | Dual-port memory of `w`-bit words |
| `rtl/fu_interconnect.sv` | Operand broadcast, per-unit strobes, result multiplexer |
| `rtl/fu_operands.sv` | Local operand registers and output-to-input bypass, shared by all units |
| `rtl/fu_addsub.sv` | Fp addition and subtraction, word-serial |
| `rtl/fu_mont_mul.sv` | Fp Montgomery multiplication with `NB` sub-blocks |
| `rtl/fu_inv.sv` | Fp inversion |
| `rtl/fu_f2m.sv` | optional binary-field (F2m) addition, multiplication and inversion |
| `rtl/key_mgmt.sv` | Key storage and on-the-fly binary or λ-NAF recoding |
| `rtl/host_if.sv` | Basic host bus |

## How field elements move: the address table and the word loop

Programs never use physical addresses. An element is named by an entry
`@Rid` (0..15) of the address table. An entry holds the offset of the
element's first word `x[0]` and its length `l` in words. `SETADDR0 @Rid, OFFSET`
and `SETADDRN @Rid, #WORD` fill an entry. A single `READ` or `WRITE` then runs
a hardware loop over `x[0] … x[l-1]`:

* `READ FU, @Ra, @Rb` reads word `i` of both elements in the same cycle
  through ports A and B. One cycle later the word pair reaches the unit's
  local registers, because the register file reads synchronously. The
  instruction takes `l + 1` cycles, where `l` is the length of `@Ra` (or of
  `@Rb` when the first operand is bypassed).
* `WRITE FU, @R` stores the unit's result words `r[0..l-1]` through port A in
  `l` cycles.

A unit learns the operand length from the loads it receives: the highest
index loaded plus one. Loading word 0 clears the words above it. The field
size is therefore a run-time property, up to `NW` words. The default NW = 8
covers 256-bit ECC, and 4-word elements give 128-bit HECC.

**Bypass.** With the bypass bit set, `READ` fills the unit's first operand
from the unit's own last result. No `WRITE`/`READ` round trip through the
register file is needed. The second operand still comes from the register
file.

## Instruction set and timing

Every instruction is 32 bits wide:

```
[31:27] opcode   [26:23] fu / flag id   [22:19] @Ra   [18:15] @Rb   [14] bypass   [13:0] imm
```

| Mnemonic | Operands | Effect | Cycles |
|---|---|---|---|
| `READ` | fu, @Ra, @Rb, bypass | stream x[i], y[i] into the unit | l + 1 |
| `WRITE` | fu, @Ra | store the unit's r[i] | l |
| `LAUNCH` | fu, MODE (imm[7:0]) | one-cycle start to the unit | 1 |
| `WAIT` | fu | hold until the unit's busy is low | 1 + stall |
| `SETADDR0` | @Ra, OFFSET | table entry: first word | 1 |
| `SETADDRN` | @Ra, #WORD | table entry: word count | 1 |
| `WRITEK` | #WORD | load the stored key (#WORD words) into the recoder | 1 |
| `CALL` / `RET` | @DEST / – | push PC and jump / jump to popped PC + 1 | 1 |
| `JMP`, `BZ`, `BNZ` | @DEST | jump always / if Z / if not Z | 1 |
| `CMPD` | DIGIT (signed imm[7:0]) | Z ← (current key digit = DIGIT) | 1 |
| `SET` | flag, value (imm[0]) | write a flag; `SET KNEXT,1` advances the key one digit | 1 |
| `TST` | flag | Z ← (flag = 0) | 1 |
| `NOP`, `HALT` | – | nothing / stop and raise `done` | 1 |

The flags are `OPMODE` (0: the adder subtracts when it is 1), `KNEXT`
(1, write-only), `KDONE` (2, read-only: every key digit has been consumed)
and `USER` (3). The units are numbered 0 = add/sub, 1 = inverter,
2 … 1 + N_MUL = multipliers, and 2 + N_MUL = the F2m unit when it is built.

Issue never blocks on a unit, except at `WAIT`. `LAUNCH` returns at once, so
a program can load and launch a second unit while the first one computes.
This is how the two products of `r = ((a×b)+c)+(d×e)` overlap in the test
program (see `tb/tb_ecc_acc_top.sv`):

```
READ   mul0, a, b ; LAUNCH mul0
READ   mul1, d, e ; LAUNCH mul1          // both multipliers now busy
WAIT   mul0       ; WRITE  mul0, t
SET    OPMODE, 0  ; READ add, t, c ; LAUNCH add
WAIT   mul1       ; WRITE  mul1, u
WAIT   add        ; WRITE  add, t
READ   add, t, u  ; LAUNCH add ; WAIT add ; WRITE add, r
```

The code memory has one cycle of read latency. The controller hides it by
addressing the memory with the next program counter, so straight-line code
issues one instruction per cycle. `start` costs one extra fetch cycle.

The call stack holds 8 entries. A `CALL` on a full stack jumps without
pushing. A `RET` on an empty stack falls through.

## Functional units

All units share the same port shape. Word loads come in (`ld_*`), plus
`start`, `busy`, and a combinational result read (`rd_idx` → `rd_word`).
Operands and results must be below `p`. The host writes the prime `p`, and
for the multiplier `pinv = -p⁻¹ mod 2^w`.

* **fu_addsub**: one word per cycle, with two carry chains side by side:
  `s = x ± y` and `t = s ∓ p`. After the last word it selects `t` when the
  sum reached `p` or the difference went negative. Busy for `l` cycles.
  It subtracts when the `OPMODE` flag or bit 0 of the `LAUNCH` MODE field is 1.
* **fu_mont_mul**: returns `x·y·2^(-w·l) mod p` (Montgomery form). It uses
  the CIOS schedule. For each word `y[i]` there are three phases:
  accumulate `x·y[i]`, compute `m = T[0]·pinv`, then add `m·p` and shift one
  word. A final word-serial pass subtracts `p` if needed. The `NB`
  sub-blocks are `w×w` multiply-add blocks. Each cycle they process `NB`
  consecutive words, with the carries rippling from one block to the next.
  Busy for `l·(2·⌈l/NB⌉ + 3) + l + 1` cycles: 161 cycles for 256 bits with
  NB = 1, 97 with NB = 2 and 65 with NB = 4.
* **fu_inv**: the binary extended Euclidean algorithm, one step per cycle, on
  full-width registers. It returns the ordinary inverse, not the Montgomery
  form, and takes about 520–550 cycles for a 256-bit `p`. The input 0 gives 0.
* **fu_f2m** (only when `HAS_F2M = 1`): works in a binary field, polynomial
  basis. The reduction polynomial `f(t)` goes in the modulus register, and
  the field degree `m` is its leading one. The LAUNCH MODE field selects
  the operation:
  * MODE = 0 is addition, an XOR. The result is ready the cycle after
    start, and busy stays low.
  * MODE = 1 is multiplication, bit-serial and MSB first, with an
    interleaved reduction. Busy for `m` cycles, e.g. 233 for
    `t^233 + t^74 + 1`. A square is a product with the same element twice.
  * MODE = 2 is inversion, the binary extended Euclidean algorithm over
    polynomials. It runs one step per cycle and reuses the multiplier's
    registers. Busy for at most `4m` cycles; up to about 600 for m = 233.
    The input 0 gives 0.

## The key unit

The host writes `k` into the key storage over a private path. The key is
write-only: it never appears in the register file, the units or the host
read-back. `WRITEK #WORD` copies `#WORD` words into the recoding register.
From then on the unit shows the current digit `k_i`, least significant
first, and `SET KNEXT,1` moves to the next digit. Recoding is the width-λ
non-adjacent form, computed on the fly. If the remaining value `v` is odd,
the digit is the signed residue of `v` modulo `2^λ`, which is odd and lies in
`(-2^(λ-1), 2^(λ-1))`. Otherwise the digit is 0. Then `v ← (v − digit)/2`.
λ = 1 gives plain binary, λ = 2 the NAF, and λ = 3, 4 or 5 the windowed
forms. The host selects λ; the reset value is 4. `KDONE` rises when `v`
reaches 0.

A right-to-left scalar-multiplication loop therefore reads:

```
WRITEK 8
loop: TST KDONE ; BNZ end
      CMPD 1    ; BNZ n1 ; CALL addQP
n1:   CMPD -1   ; BNZ dbl ; SET OPMODE,1 ; CALL addQP ; SET OPMODE,0
dbl:  (P ← 2P) ; SET KNEXT,1 ; JMP loop
```

With λ ≥ 3, a program also needs one `CMPD` branch per odd digit value, and
the matching odd multiples of P. The next section shows one way to form
them.

## Complete scalar multiplications

`tb/tb_ecc_kp.sv` runs `[k]G` in the default build on the NIST curves P-256
and P-192 (`y² = x³ − 3x + b`), with random keys. It uses the key recodings
λ = 1, 2 and 5 on P-256, and λ = 1, 3 and 4 on P-192. The program is the
same for both curves. Only the word count it writes with `SETADDRN` changes:
8 words for P-256, 6 for P-192. It shows how the units are meant to be
combined.

* **Montgomery form.** The multiplier returns `x·y·R⁻¹` with `R = 2^(w·l)`.
  So the program keeps every element as `x·R mod p`. The host writes the
  inputs and constants in that form. Addition and subtraction need no
  change.
* **Inversion.** The inverter returns the ordinary inverse. Given `d·R`, it
  gives `d⁻¹·R⁻¹`. While it runs, the multiplier turns the numerator `n·R`
  into `n·R³` with a product by the constant `R³ mod p`. The product of
  the two is then the slope `n·d⁻¹·R`, back in Montgomery form. Issue does
  not block, so the inverter and the multiplier overlap.
* **Points.** Points stay in affine coordinates, so each addition or
  doubling costs one inversion and three or four products. The accumulator
  starts as the point at infinity, which the program tracks in the `USER`
  flag: the first addition only copies. A negative digit adds `(x, 0 − y)`,
  computed on the adder with `OPMODE` set by the caller.
* **Wide digits.** The key unit delivers digits least significant first, so
  the multiple `Q = 2^j·G` changes at every digit and cannot come from a
  table. For a digit `±(2i+1)` the program copies `Q` to a scratch point
  `S`, doubles `Q` (it must anyway), and adds the new `Q` to `S` `i` times.
  It then points the address-table entries that name `Q` at `S`, adds `±S`
  to the accumulator, and points them back. The subroutines never learn
  that their operands moved. Wider digits make the key loop shorter but
  each nonzero digit dearer, so this program is slower with λ = 5 than with
  λ = 2.
* **Overlap.** The doubling starts `x²` on the multiplier and computes `2y`
  on the adder while it runs. It then forms `3x² + a` by two bypassed
  additions.
* **Output.** A final product with 1 takes the result out of Montgomery form.

One P-256 `[k]G` takes about 0.49 to 0.67 million cycles, and one P-192
`[k]G` about 0.26 to 0.29 million. Most of it goes to the inverter. A
design with a word-serial inverter and projective coordinates would spend
its time differently. So these counts say little about the original
accelerator's timing.

## Host bus

The bus is a simple synchronous word port, `W` bits wide, in the
accelerator's clock domain. The address is `h_addr = {region[3:0], offset[11:0]}`.
A read returns its data one cycle after `h_re`, together with `h_rvalid`.

| region | name | access |
|---|---|---|
| 0 | CTRL | write bit 0 = start the program at address 0 (ignored while running) |
| 1 | STATUS | read `{running, done}` |
| 2 | CODE | write instruction at `offset` |
| 3 | KEY | write key word `offset` (write-only) |
| 4 | RF | read/write register-file word `offset`, only while no program runs |
| 5 | MOD | modulus word `offset` |
| 6 | PINV | `-p⁻¹ mod 2^W` |
| 7 | LAMBDA | recoding width λ (1..5) |

A code word fits in one bus word, so `W` must be at least 32.

## Parameters (`ecc_acc_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 32 | word width of all data paths |
| `NW` | 8 | maximum element length in words (256 bits) |
| `N_MUL` | 1 | number of Montgomery multipliers (up to 14) |
| `NB` | 1 | multiplier sub-blocks per multiplier |
| `RF_DEPTH` | 1024 | register-file words (10-bit addresses) |
| `CODE_DEPTH` | 1024 | instructions |
| `NREG` | 16 | address-table entries |
| `HAS_F2M` | 0 | add the binary-field unit |
| `CODE_WRITABLE` | 1 | 0 makes the code memory a ROM: host code writes are ignored |
| `CODE_INIT_FILE` | "" | `$readmemh` file of 32-bit instructions loaded at configuration |

The original accelerator was evaluated with 1 to 5 multipliers for ECC-256
and 1 to 12 for HECC-128, and with 1, 2 or 4 sub-blocks. These are all
settings of `N_MUL` and `NB`. Elements up to 600 bits need `NW` ≥ 19 at
`W = 32`.

## What follows the original architecture and what does not

These parts follow the original architecture:

* the block set and the `w`-bit word paths;
* the dual-port register file;
* the address table with its word loop;
* the instruction list;
* non-blocking issue, with `WAIT` as the only blocking instruction;
* `CALL`/`RET`;
* the private code and key paths and the code ROM option;
* on-the-fly binary and λ-NAF recoding (λ = 2..5);
* an Fp adder/subtracter, an Fp inverter, and Montgomery multipliers with
  sub-blocks;
* polynomial-basis F2m addition, multiplication and inversion;
* the basic host port without rate or width adaptation.

These are this design's own choices:

* the instruction encoding, NOP/HALT, and the flag numbering and semantics;
* `KNEXT`/`KDONE` as the way to step through the key;
* the reading of READ's `B/U` field as the bypass bit;
* how the `OPMODE` flag and the LAUNCH MODE field combine;
* all unit algorithms: dual-chain add/sub, CIOS Montgomery, binary-Euclid
  inversion, bit-serial F2m multiplication, binary-Euclid F2m inversion;
* every latency, the host register map, the memory depths and the stack
  depth.

Not implemented:

* Units:
  * normal bases, and the Montgomery, Mastrovito and two-step F2m
    multipliers. The F2m multiplier here is a plain bit-serial one.
  * the side-channel-protected multipliers and circuit-level
    countermeasures;
  * randomized register-file addressing.
* Key recodings:
  * fixed and sliding variants;
  * double-base and multiple-base recoding;
  * addition-chain recoding;
  * randomized recoding.
* External connections:
  * the AXI and PLB bus adapters;
  * the processors that would drive them;
  * the ASIC pad ring.
* Curve-level programs other than the affine one described above: no
  projective or Jacobian formulas, no Montgomery ladder or unified
  formulas, and no HECC divisor arithmetic.

Two points may matter to a reuser. The key loop is not constant-time: its
length depends on `k`. The inverter runs a data-dependent number of cycles.

## Simulating

Every testbench in `tb/` checks its own results. Each prints
`TB_RESULT checks=N failures=M` and stops through a cycle-count watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/ecc_pkg.sv \
          tb/tb_ecc_acc_full.sv --top-module tb_ecc_acc_full
./obj_dir/Vtb_ecc_acc_full
```

Run the simulations from the repository root. `tb_ecc_acc_rom` reads its
ROM file by a path relative to it.

| Testbench | What it checks |
|---|---|
| `tb_ecc_acc_full` | default build: programs A and B below, with the single multiplier |
| `tb_ecc_kp` | default build: `[k]G` on P-256 (λ = 1, 2, 5) and P-192 (λ = 1, 3, 4) with random keys, against a left-to-right reference and the curve equation |
| `tb_ecc_acc_rom` | code memory as a ROM from `tb/tb_ecc_acc_rom.hex`: runs, ignores code writes |
| `tb_ecc_acc_top` | N_MUL = 2, NB = 2, HAS_F2M = 1: `((a×b)+c)+(d×e)` with parallel multipliers, bypassed `r−c`, `r⁻¹`; `[k]P` in (Fp, +) with binary and NAF digits; F(2^233) product, sum and inverse |
| `tb_fu_mont_mul` | NB = 1, 2 and 4; 256-, 192- and 127-bit primes; exact latency |
| `tb_fu_addsub`, `tb_fu_inv` | random and edge operands against wide-integer arithmetic |
| `tb_fu_f2m` | F(2^163) and F(2^233) products, sums and inverses against a carry-less reference, latency `m`, inversion within `4m` |
| `tb_key_mgmt` | digit-stream properties for λ = 1..5 |
| `tb_ctrl` | every instruction's side effects and timing, from a behavioural code memory |
| `tb_reg_file`, `tb_addr_table`, `tb_code_mem`, `tb_fu_interconnect`, `tb_host_if` | block-level behaviour |

The top-level tests count each mechanism: parallel units, `WAIT`
stalls, bypass loads, subtractions, inversion, `CALL`/`RET`, taken branches,
key steps and negative digits. A mechanism that never occurs counts as a
failure. Each test runs in a few seconds, except `tb_ecc_kp`, which takes
under a minute.
