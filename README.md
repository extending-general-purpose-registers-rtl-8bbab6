# Carry and overflow bits in every general-purpose register: an RV64IM core

Most instruction sets keep carry and overflow in one condition-code register.
Only one carry can be live at a time, and almost every instruction overwrites
it. Compilers therefore rarely use it. RISC-V has no flags at all, and must
rebuild each carry with `sltu`.

This design takes a different route: **every general-purpose register is 66
bits wide**. Each register holds its 64 data bits plus the carry and overflow
that the instruction which wrote it produced. Flags live and die with the
value they describe. They are renamed, moved and kept alive exactly like
data, and as many carries can be live as there are registers.

The RTL is a small single-cycle RV64IM integer core built around that idea.
It adds three instructions and two special registers:

| addition | what it does |
|---|---|
| `addc rd, rs1, rs2` | adds the carry bit of `rs2` to the 65-bit result that an add left in `rs1`; yields new carry and overflow |
| `bo rs1, rs2, label` | branches if the overflow bit of `rs1` **or** of `rs2` is set |
| `ldx rd, imm(rs1)` | loads a doubleword and restores `rd`'s carry/overflow from `loadextra` |
| `storeextra` | 64-bit register; every store records the flags of its source register here |
| `loadextra` | 64-bit register that `ldx` takes flags from |

## The extended register

`cov_pkg::xreg_t` is `{ovf, carry, data[63:0]}`. Every unit takes and
returns this type. The register file (`cov_regfile`) writes all 66 bits at
once, so flags and data can never get out of step. `x0` reads as zero with
both flags clear.

Memory is still 64 bits wide. A store writes only the data bits, and an
ordinary load returns clear flags. The flags survive a spill only through the
context-switch mechanism described below.

## How instructions set the flags

No existing instruction reads the flags, with one exception: the bitwise
operations. Every instruction with a destination writes the flags. Unless
the table below says otherwise, it clears them.

| instruction | carry | overflow |
|---|---|---|
| `add`, `addi` | bit 64 of the zero-extended sum (unsigned overflow) | bit 64 xor bit 63 of the sign-extended sum (signed overflow) |
| `sub` | set when there is **no** borrow (`rs1 >= rs2` unsigned), i.e. the carry of `rs1 + ~rs2 + 1` | signed overflow of `rs1 - rs2` |
| `and`, `or`, `xor` (+ immediates) | operate on all 66 bits; an immediate brings zero flags | same |
| `sll`, `slli` | any shifted-out bit is 1 | any shifted-out bit differs from the result's sign bit |
| `mul` | the unsigned 128-bit product does not fit in 64 bits | the upper half of the signed product is not all copies of the result's sign bit |
| `div*`, `rem*` (all forms) | division by zero | division by zero, or most-negative ÷ −1 |
| `addw`, `subw`, `sllw`, `mulw`, `*w` divides | the same rules on 32 bits; result sign-extended | same |
| `srl`, `sra`, `slt`, `sltu`, `mulh*`, loads, `lui`, `auipc`, `jal(r)` link, CSR reads | 0 | 0 |

Two consequences matter in practice. First, `mv` should be written as
`or rd, x0, rs` (or `xor`), which keeps the flags; `addi rd, rs, 0` clears
them. Second, a subtraction's carry has the ARM meaning (1 = no borrow), not
the x86 one.

## addc: carry between registers

`addc` is the heart of the extension, and the least obvious part of it.

After `add r3, r1, r2`, register `r3` holds the exact 65-bit result twice
over:

* **Unsigned:** `{r3.carry, r3.data}`.
* **Signed:** `{r3.data[63] ^ r3.ovf, r3.data}`. The overflow bit is defined
  as bit 64 xor bit 63 of the sign-extended sum, so xoring it back onto bit 63
  recovers bit 64.

`addc rd, rs1, rs2` adds the single bit `rs2.carry` to both 65-bit values:

```
u65 = {rs1.carry, rs1.data}                + rs2.carry
s65 = {rs1.data[63] ^ rs1.ovf, rs1.data}   + rs2.carry
rd  = { ovf: s65[64] ^ s65[63], carry: u65[64], data: u65[63:0] }
```

So `add r3, r1, r2; addc r3, r3, r4` is a three-input add, `r1 + r2 +
carry(r4)`. The result has the correct carry-out and the correct signed
overflow of the whole sum (`tb_cov_alu` checks both on 20,000 random
cases against exact arithmetic).

A multi-word add needs one `add` and one `addc` per word. The `add`s are
independent of one another; only the `addc`s form a chain, one per word.
`addc rd, x0, rs` turns a carry into a 0/1 word. Adding −1 to such a word
turns it back into a carry bit. The same trick replaces a branch on carry:
`or t, a, b; addc t, x0, t; bnez t, label` branches if either register
carries, because `or` keeps the flags of both.

A multi-word subtract with carry-in uses `xori t, a, -1; add t, b, t;
addc t, t, cin` to compute `b - a`. The carry is again "no borrow".

If `{carry, data}` is all ones and the carry-in is 1, the sum wraps within
65 bits. This case cannot arise after an `add`.

## Saving the flags over a context switch: storeextra, loadextra, ldx

The flags cannot be stored with the data, so a context switch saves them
separately:

1. Store x1..x31 as usual. Each store also writes its source register's
   carry into `storeextra` bit `2*rs2` and its overflow into bit `2*rs2+1`.
   A store from x1, for example, updates bits 2 and 3.
2. Read `storeextra` into a register (`csrr t, 0x800`) and store it.
3. To restore, load that word and write it to `loadextra`
   (`csrw 0x801, t`).
4. Reload every register with `ldx`. It loads the 64 data bits and takes
   carry and overflow from `loadextra` bits `2*rd` and `2*rd+1`.

Both special registers sit in the load/store unit (`cov_lsu`). In an
out-of-order machine the read of `storeextra` and the write of `loadextra`
would have to drain the pipeline. This core is in order and executes one
instruction per cycle, so no drain is needed.

The register numbers used are the architectural ones, `rs2` for stores and
`rd` for `ldx`.

## Encodings and CSR numbers

The extension does not assign code points. These are this design's:

| instruction | format | opcode | funct3 | funct7 |
|---|---|---|---|---|
| `addc` | R | custom-0 `0001011` | `000` | `0000000` |
| `bo` | B | BRANCH `1100011` | `010` (reserved in RV64I) | – |
| `ldx` | I | LOAD `0000011` | `111` (reserved in RV64I) | – |

`storeextra` is CSR `0x800` and `loadextra` is CSR `0x801`. Both are
accessed with `csrrw`/`csrrs`/`csrrc` and their immediate forms. Reads give
the value with flags clear. Both registers can be read and written.

## Core organisation

`cov_core` (top) executes one instruction per clock cycle, with no pipeline:

```
imem_rdata -> cov_decoder -> cov_regfile (2 reads) -> cov_alu / cov_muldiv / cov_branch / cov_lsu -> write back
```

* **Instruction memory:** `imem_addr` is the PC, and `imem_rdata` must
  return the 32-bit word in the same cycle.
* **Data memory:** the port is 64 bits wide and byte addressed. The core
  drives `dmem_addr`, `dmem_we`, `dmem_wstrb` and `dmem_wdata`, with data
  already shifted into its byte lanes. Memory must return the doubleword
  that contains `dmem_addr` on `dmem_rdata` in the same cycle. It writes at
  the clock edge that ends the cycle. Accesses must be naturally aligned.
* **Halting:** `ecall` and `ebreak` stop the core, and so does any illegal
  instruction, which also raises `illegal`. `halted` stays high until reset.
* **Reset:** `rst_n` is active low and synchronous. It sets the PC to
  `RESET_PC` (default 0) and clears the registers, `storeextra` and
  `loadextra`.
* **Retire:** `retire` is high in every cycle in which an instruction
  completes.
* **Arithmetic:** multiply and divide are combinational, so a divide takes
  one cycle like everything else. This suits simulation and functional
  study. A real implementation would make the divider iterative and stall.

| module | role |
|---|---|
| `cov_pkg` | types (`xreg_t`, `decoded_t`, op enums), opcodes, new encodings, CSR numbers |
| `cov_regfile` | 31 × 66-bit registers, x0 hard-wired to zero |
| `cov_alu` | add/sub/logic/shift/compare, W forms, `addc`, with flag generation |
| `cov_muldiv` | RV64M with flag generation |
| `cov_branch` | RV64 branch conditions and `bo` |
| `cov_lsu` | lane alignment, load extension, `storeextra`, `loadextra`, `ldx` flag fill |
| `cov_decoder` | RV64IM + `addc`/`bo`/`ldx` + CSR access to the two special registers |
| `cov_core` | top: wires the above into a single-cycle core |

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_cov_alu` | 51k random and corner-case vectors against a reference written differently from the RTL (carry from unsigned compares, overflow from sign rules). Also 20k `add`+`addc` pairs against exact 65/66-bit arithmetic. |
| `tb_cov_muldiv` | 52k vectors covering all operations, including division by zero and most-negative ÷ −1 |
| `tb_cov_branch` | all conditions; `bo` must depend only on the two overflow bits |
| `tb_cov_regfile` | random writes and reads against a shadow copy; writes to x0 are ignored |
| `tb_cov_lsu` | strobes, load extension, `storeextra` after each store, `ldx` flags from `loadextra` |
| `tb_cov_decoder` | every instruction form with random fields; reserved encodings decode as illegal |
| `tb_cov_core` | end-to-end program: mul/div flags, the −1 carry-restore idiom, branch on carry built from `or`/`addc`/`bnez`, `slli` flags, `bo` taken and not taken, a 128-bit subtract, a 1024-bit add, and a full context switch that must restore all 31 registers with their flags. It also counts each mechanism and fails if one never happens. |
| `tb_cov_mpn_add` | 1024-bit add, once with `add`/`addc` and once with the plain RV64 `sltu` idiom |
| `tb_cov_mpn_mul` | 1024 × 1024-bit product, 16 rows of a `mul`/`mulhu`/`addc` multiply-accumulate loop, plus the `sltu` version, against a schoolbook reference |

Measured on this core, where cycles equal instructions:

* **1024-bit add:** the loop takes 120 cycles with `addc` and 168 without.
  Both versions handle two words per iteration, using 15 instructions
  instead of 21.
* **1024 × 1024-bit multiply:** the inner loops take 3328 cycles with
  `addc` and 3840 without, i.e. 13 instead of 15 instructions per word.

The latency benefit of `addc` (a one-cycle carry chain instead of a
three-instruction one) only appears on a pipelined or superscalar
implementation. This core cannot show it.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/cov_pkg.sv tb/tb_cov_core.sv \
          --top-module tb_cov_core -Mdir obj_core
./obj_core/Vtb_cov_core
```

Replace `tb_cov_core` with any other testbench name. The package must come
first on the command line; `-y rtl` finds the rest. The testbenches
assemble their programs with small encoder functions (`r_t`, `i_t`, `s_t`,
`b_t`). Write new programs the same way, or load a hex image into the
testbench's `imem` array.

## Scope and departures

* **Base ISA.** The base is RV64IM plus `fence` (a no-op) and the CSR
  instructions for the two special registers. RV64G's F, D and A extensions
  and the privileged architecture are not included; their opcodes are
  illegal. Under this extension, any of their instructions that writes an
  integer register would simply clear both flags.
* **Sign conventions.** The overflow bit always means *signed* overflow. The
  carry of a subtraction means "no borrow".
* **Choices made here.** The bit order inside a register, which of each
  `storeextra`/`loadextra` bit pair is carry (the even one), the encodings,
  the CSR mapping, the halt behaviour and the reset values were not
  prescribed. They are choices made for this design.
* **Not built.** Fusing an `add`/`addc` pair into one operation, a separate
  `subc`, a dedicated branch-on-carry instruction, a "sticky" overflow variant, and a flag-testing
  clean-sheet ISA are possible variations of the idea. They are not part of
  this core.
