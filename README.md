# Table-lookup and multi-word-multiply datapaths for cryptography

Two small processor datapaths, one for each end of a secure wireless link.
Both attack the operation that dominates a class of ciphers.

* **Client (`pax_core`).** Symmetric ciphers such as AES, DES, RC4, Blowfish,
  MARS and Twofish spend much of their time on S-box table reads. The client
  core gives them eight small on-chip tables (T0–T7, 256 entries of one machine
  word each) and one instruction, **ptlu** (parallel table lookup). A ptlu
  performs up to four lookups in one table in a single cycle. It has no address
  arithmetic and never misses a cache. The word size `W` is a parameter: 32, 64
  or 128 bits. Registers, ALU, shifter, multiplier and table entries all scale
  with it. A wider word lets one ptlu do more lookups, and lets the multiplier
  handle more of a long-integer or binary-polynomial product at a time.
* **Server (`mr_dual_issue_dp`).** Public-key algorithms (RSA, DH, DSA and their
  binary-field elliptic-curve versions) spend almost all their time in
  word-by-word multiplication. A server cannot change its word size. So this
  32-bit, 2-way in-order datapath makes the multiplier return both halves of
  the 64-bit product in one operation, a *two-word-result* (2-R) multiplier.
  Hardware in the issue stage spots a `mul.lo` immediately followed by a
  `mul.hi` of the same two registers. It executes the pair as one multiply
  that writes both destinations.

`crypto_top` places the two side by side. They share nothing but the clock and
reset.

The architecture follows a published study of performance scaling for
cryptography: the ptlu instruction of the PAX cryptographic processor, word-size
scaling, and multi-word-result functional units. This RTL is an independent
implementation of those ideas. Where the study is silent, the choices are this
implementation's own; they are listed under "What follows the original design
and what is chosen here" below.

## The ptlu operation

```
ptlu.subword.table.offset.step  Rd, Rs
```

| field    | width | meaning |
|----------|-------|---------|
| subword  | 5     | bytes returned per lookup: 1, 2, 4, 8 or 16 (≤ W/8) |
| table    | 3     | which of T0–T7 |
| offset   | 4     | byte of Rs holding the first index |
| step     | 4     | distance in bytes between successive index bytes |

Byte 0 is the least significant byte of a register. Lookup *k* (k = 0, 1, …)
takes its 8-bit index from byte `(offset + k·step) mod (W/8)` of Rs. It reads
that entry of the selected table and writes the entry's low `subword` bytes to
bytes `[k·subword, (k+1)·subword)` of Rd. The number of lookups is
`min(4, W/8 / subword)`. Any bytes of Rd above the last lookup are zero.

Two examples at W = 32:

* `ptlu.4.6.2.0 Rd, Rs` makes one lookup. The index is byte 2 of Rs, and the
  result is the full 32-bit entry of T6.
* `ptlu.1.3.0.1 Rd, Rs` makes four lookups in T3, indexed by bytes 0, 1, 2
  and 3 of Rs. Byte k of Rd is the low byte of entry `Rs.byte[k]`. This is a
  byte substitution of a whole word, as in AES key expansion.

At W = 128, one AES round of the T-table form is four ptlu and four XORs. The
state holds byte (row r, column c) at byte r + 4c. The round needs, for each
row r, the bytes `(r, c+r mod 4)` for c = 0…3. These sit at byte positions
`offset = 5r`, `step = 4`, wrapping modulo 16:

```
ptlu.4.T0.0.4   r12, state     ; rows 0 of the shifted state through T0
ptlu.4.T1.5.4   r13, state     ; row 1 (bytes 5, 9, 13, 1)
xor             r12, r12, r13
ptlu.4.T2.10.4  r14, state     ; row 2 (bytes 10, 14, 2, 6)
ptlu.4.T3.15.4  r15, state     ; row 3 (bytes 15, 3, 7, 11)
xor             r14, r14, r15
xor             r12, r12, r14
xor             state, r12, roundkey
```

The last round uses T4–T7 instead. These hold the S-box value in byte 0, 1, 2
or 3 of the entry. A 128-bit AES-128 block then takes 81 cycles: one key XOR
plus ten rounds of eight operations. That covers round processing only, with
state and round keys already in registers.

Tables are loaded by a table-write operation, `OP_TWR`: `T[table][rs1[7:0]] ← rs2`.
The same operation lets RC4 update its state table.

## Timing

* **Client.** One decoded operation per cycle. Operands are read, computed
  and written back in the same cycle. There is no pipeline hazard: the next
  operation sees the result, and that includes a ptlu result. `wb_valid/wb_rd/wb_data`
  repeat each register write one cycle later.
* **Table reads** are combinational. Table writes take effect at the clock
  edge.
* **Server.** Up to two operations per cycle enter an 8-entry issue window
  (`in_valid[0]` older, `in_valid[1]` younger; `in_ready` means room for two).
  Each cycle it looks at the two oldest entries:
  * **fused.** The older is `mul.lo` (or `gmul.lo`) and the younger is
    `mul.hi` (`gmul.hi`), with the same `rs1` and `rs2`. One multiply writes
    the low word to the older destination (result bus A) and the high word to
    the younger (bus B). A pair is *not* fused when the `mul.lo` destination is
    one of its own sources, because `mul.hi` must see the original value.
  * **dual.** Both issue unless both are multiplies, the younger reads the
    older's destination, or both write the same register. Slot B has the only
    multiplier, which shares its result bus with the second ALU.
  * **single.** Otherwise only the oldest issues.

  Execution and write-back finish in the issue cycle. `issue_n` and
  `issue_fused` show what issued. Setting `MR_EN = 0` gives the conventional
  one-word-result machine, for comparison.

Sixteen independent `mul.lo`/`mul.hi` pairs take 16 issue cycles with fusion
and 32 without. In a random mix of ALU operations and multiply pairs, fusion
cut issue cycles by about 19 %.

## Operations and interfaces

Both datapaths take **decoded operations**, not instruction words
(`pax_pkg::pax_op_t`, `pax_pkg::srv_op_t`). No binary instruction encoding is
defined here, so the decoded form is the interface.

| op | client | server | result |
|----|:-:|:-:|--------|
| `OP_LI` | ✓ | ✓ | rd ← immediate (`imm` port on the client, `imm` field on the server) |
| `OP_ADD/SUB/AND/OR/XOR/ANDN` | ✓ | ✓ | rd ← rs1 op rs2 |
| `OP_SLL/SRL/ROL/ROR` | ✓ |  | rd ← rs1 shifted/rotated by rs2[6:0], or by `shamt` if `use_imm` |
| `OP_MULLO/MULHI` | ✓ | ✓ | low/high word of the unsigned product rs1·rs2 |
| `OP_GMULLO/GMULHI` | ✓ | ✓ | low/high word of the carry-less (GF(2)[x]) product |
| `OP_PTLU` | ✓ |  | see above; `sub` carries subword/table/offset/step |
| `OP_TWR` | ✓ |  | table write |

Both use 32 registers, all cleared by the asynchronous active-low reset.
Register 0 is an ordinary register. Each datapath has an extra read port
(`dbg_raddr`/`dbg_rdata`) for inspecting registers.

The multiplier (`dual_field_mul`) is combinational. It builds one array of
W partial products and accumulates them by addition in integer mode, or by
exclusive-or in binary-field mode. That is the sense in which one integer
multiplier array also serves binary-field (elliptic-curve) arithmetic.

## Modules

| file | module |
|------|--------|
| `rtl/pax_pkg.sv` | shared types: op codes, ptlu sub-op struct, decoded operations |
| `rtl/ptlu_unit.sv` | eight 256 × W tables, four read ports, ptlu assembly, write port |
| `rtl/dual_field_mul.sv` | W × W → 2W integer / carry-less multiplier |
| `rtl/pax_alu.sv`, `rtl/pax_shifter.sv` | ALU; shifter/rotator |
| `rtl/regfile.sv` | parameterised multi-port register file |
| `rtl/pax_core.sv` | client datapath (W = 128 by default) |
| `rtl/mr_pair_detect.sv` | mul.lo/mul.hi pair detection |
| `rtl/mr_dual_issue_dp.sv` | server datapath (W = 32, 8-entry window, MR_EN = 1) |
| `rtl/crypto_top.sv` | both datapaths, ports prefixed `c_` and `s_` |

At W = 128 the tables are 8 × 256 × 128 bits = 32 KiB of storage. They are
written as a plain array. A silicon implementation would map them to SRAM
macros with four read ports, or to replicated single-port arrays.

## What follows the original design and what is chosen here

The following come from the original design:

* the client structure: register file, ALU, shifter, multiplier and eight
  tables on one result path
* eight 256-entry, word-wide tables
* the ptlu fields, up to four lookups, and single-cycle lookup
* word sizes of 32, 64 and 128 bits
* a dual-field multiplier with word-sized inputs
* the two-result-bus server datapath
* the pair-fusion rule

The following are this implementation's own choices:

* the operation list and decoded formats
* single-cycle execution of every operation
* modulo wrap-around of ptlu byte positions
* zero-fill of unused result bytes
* the subword field encoding
* the table-write operation
* register count and reset
* the server issue rules and window size
* the no-fusion-when-overwriting-a-source safeguard
* which result bus carries which product half

These are not built:

* instruction fetch and decode, with any instruction encoding
* data memory, caches and the memory pipes of larger server configurations
* permutation instructions
* a carry or compare operation for multi-precision integer addition. So
  1024-bit RSA cannot be run entirely in these datapaths: it needs operands
  larger than the register file and a data memory.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models are written
independently in `tb/aes_ref_pkg.sv` and `tb/srv_ref_pkg.sv`.
`aes_ref_pkg` computes the S-box from the GF(2^8) inverse and the affine map,
and runs byte-level AES-128 encryption and key expansion.

* `tb_ptlu_unit`: both 32-bit worked examples, three thousand random
  128-bit lookups against a reference, an illegal subword, and write-then-read.
* `tb_pax_core`: 3000 random back-to-back operations, each write-back checked.
  Then AES-128 through ptlu: the FIPS-197 vector plus random blocks, each
  required to take exactly 81 cycles.
* `tb_mr_dual_issue_dp`: a random program rich in multiply pairs, run in
  40 chunks on both MR_EN = 1 and 0, with every register compared after each
  chunk. A directed dependent pair, and the 16-versus-32-cycle rate check.
* `tb_crypto_top`: the whole design at default parameters. The client
  encrypts AES blocks. At the same time the server multiplies two 163-bit
  binary polynomials (the NIST B-163 field size, six 32-bit words each) with
  36 fused `gmul` pairs and checks the 325-bit product. The test counts ptlu
  lookups, table writes, back-to-back ptlu use, fused pairs, dual issues and
  single issues, and fails if any count is zero.
* `tb_aes_wordsize`: the same AES-128 block on client cores of 32, 64 and
  128 bits. Round keys come in by load-immediate at all three sizes, since 44
  key words do not fit in 32 registers at 32 bits. The blocks take 368, 244
  and 92 cycles. At 64 bits each round first builds two realigned copies of
  the state, so that a two-lookup ptlu finds its index bytes in one register.
* `tb_gf163_client`: multiplication in GF(2^163) with the NIST B-163
  polynomial x^163 + x^7 + x^6 + x^3 + 1, on the 128-bit client. It forms
  four word products with seven gmul operations, then folds the high part back with the constant
  0xC9 = x^7 + x^6 + x^3 + 1, twice. That is 26 cycles per multiplication,
  checked against a bit-serial reference.
* `tb_rc4_client`: RC4 with its state array in T0, rewritten by table
  writes while it runs. Each keystream byte takes three single-lookup ptlu
  reads, two writes and six ALU operations, so 11 cycles. It is checked
  against the published keystream for the key "Key", and against a reference
  for a random key.
* `tb_sha1_client`: SHA-1 compression on the client at a 32-bit word size,
  using only add, logic, and-not and fixed rotate. The five working variables
  sit in five registers whose roles rotate each round, and the message
  schedule is expanded in place in a 16-register window. The 80 rounds take
  956 cycles, plus 10 to add the chaining value. It is checked against the
  digest of "abc" and a reference model over random multi-block messages.
* `tb_dual_field_mul`, `tb_pax_alu`, `tb_pax_shifter`, `tb_regfile`,
  `tb_mr_pair_detect`: unit checks against independent formulas.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_crypto_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/pax_pkg.sv tb/tb_crypto_top.sv
./obj_dir/Vtb_crypto_top
```

Each testbench has a watchdog and finishes in seconds.

For scale, the published study reports 384, 308 and 144 cycles per AES block
on 32-, 64- and 128-bit PAX with ptlu, against 878 on a basic 32-bit RISC.
Those counts are for complete programs with memory traffic. The register-only
kernels above take 368, 244 and 92 cycles. The direction is the same: the gain
comes from more lookups per ptlu as the word widens.

## Workload fit at default sizes

* **AES-128** fits on the 128-bit client. It needs eight 256 × 32-bit tables,
  and 16 of the 32 registers for state, round keys and temporaries. At 32 and
  64 bits the round keys have to be streamed in.
* **RC4** fits and runs: state array in T0, repeated key bytes in T1.
* **DES, RC4, Blowfish, MARS and Twofish** tables fit. Each needs at most
  8 tables of at most 256 entries of at most 32 bits.
* **SHA-1** fits and runs on the 32-bit client: 27 of the 32 registers.
  It needs no tables, so the wider word sizes do not help it: at 64 or 128
  bits a 32-bit rotate needs extra shifts and masks. The published study
  reports about 1200 cycles per block at every word size, for a complete
  program; the register-only kernel here takes 966.
* **A 163-bit binary-field product** fits on the server: 26 registers, as
  simulated.
* **A full GF(2^163) multiplication** fits on the 128-bit client: two words
  per element.
* **1024-bit RSA** does not fit without a data memory and a carry operation,
  neither of which is part of this design.
