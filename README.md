# ECDSA over GF(2^409) with SHA3-512 — SystemVerilog core

This core signs and verifies messages with the Elliptic Curve Digital
Signature Algorithm on the NIST binary curve B-409. The curve is
y² + xy = x³ + x² + b over GF(2^409), with the field built on
f(x) = x^409 + x^87 + 1. Messages are hashed with SHA3-512. One datapath runs
all three ECDSA operations:

* key generation: Q = d·G;
* signature generation: (r, s) for a message, a private key d and a nonce k;
* signature verification: accept or reject (r', s') for a message and a public key Q.

The architecture follows the paper "Hardware Implementation of Elliptic
Curve Digital Signature Algorithm over GF(2^409) Using SHA-3" (Trujillo-Olaya
and Velasco-Medina). That paper gives the block structure, the processing
element of the field multiplier, the SHA-3 datapath and the algorithms. It
does not give the sequencing, the register use, the interfaces or the
encodings, so this RTL supplies its own. The places where it does so are
listed under "Design choices and departures" below.

## Top level: buses, RAM and control (`ecdsa_top`, `ecdsa_ctrl`)

```
 param_data(64) ─► parameter buffer ─┐                       ┌─► signature shift reg ─► sig_out(64)
 msg_data(16) ──► SHA3-512 ── e ─────┤ Bus 1                 │
                  ECC processor ─────┼──────► RAM 16x409 ────┤ Bus 2 ─► ECC input registers
                  mod-n processor ───┘                       ├─► hold register ─► mod-n operand a
                                                             ├─► mod-n operand b
                                                             └─► comp (zero / range / equality)
```

Bus 1 writes into the RAM. Its sources are the parameter buffer, the hash
value, the ECC output registers and the mod-n result. Bus 2 is the RAM's
synchronous read port, which feeds every unit. Two-operand mod-n operations
and the final equality test need a second value, so a hold register keeps the
first operand while the second one is read.

The control unit (`ecdsa_ctrl`) runs a fixed program for each command. The
program lives in a 57-step ROM. Each step is one transaction: a check, a hash
store, a mod-n operation, an ECC load, an ECC run, an ECC store or a
signature output.

| RAM | contents | RAM | contents |
|---|---|---|---|
| 0 | d (private key) | 7, 8 | point result x, y |
| 1 | k (nonce) | 9 | k⁻¹ (sign) or c = s'⁻¹ (verify) |
| 2 | r (or r' to verify) | 10 | e + d·r (sign) or u1 (verify) |
| 3 | s (or s' to verify) | 11 | u2 |
| 4 | e = hash value | 12, 13 | u1·G |
| 5, 6 | public key Qx, Qy | 15 | v |

The three programs:

* **Sign**: check d and k are in [1, n−1] → store e → e mod n → k·G →
  r = x mod n → error if r = 0 → k⁻¹ → d·r → e + d·r → s → error if s = 0 →
  shift out r, then s.
* **Verify**: check r' and s' are in [1, n−1] → store e → c = s'⁻¹ → u1 = e·c →
  u2 = r'·c → u1·G → u2·Q → affine addition → error if the sum is the point
  at infinity → v = x mod n → compare v with r'.
* **Key generation**: check d → d·G → store Q → shift out Qx, then Qy.

The hash value e is the leftmost 409 bits of the 512-bit digest, read as a
big-endian integer. This is the FIPS 186 rule.

Error codes (`ecdsa_pkg::ecdsa_err_e`):

| code | meaning |
|---|---|
| 1 | r = 0 |
| 2 | s = 0 |
| 3 | k, d, r' or s' is outside [1, n−1] |
| 4 | the point result is the point at infinity |
| 5 | signature invalid |
| 6 | unknown command |

There is no random number generator, so k comes in as a parameter. When
r = 0 or s = 0 the core stops with an error. The algorithm's "pick another k"
loop is left to the host.

## Field arithmetic GF(2^409)

**Processing element (`gf2m_pe`).** One step of LSB-first shift-and-add
multiplication takes three cells:

* A unity-degree reduction cell (URC) computes A·x mod f. It shifts A up one
  place, puts a₄₀₈ into bit 0 and XORs a₄₀₈ into bit 87.
* A NAND cell combines bit b_i with every bit of A.
* An XOR cell adds that product to the partial sum. Its partial-sum input is
  complemented, so the NAND/XOR pair works out to x2 ⊕ (b_i ∧ A).

**Multiplier (`gf2m_mult`).** It reuses one PE instead of building a full
systolic array:

1. A load cycle fills Areg and the right-shifting Breg.
2. PE[1] starts from a zero partial sum.
3. PE[i] runs 407 times. Its 2:1 multiplexers pick the stage registers S2/S3
   on the first pass and its own registers S8/S9 afterwards.
4. PE[m] writes Creg.

`done` comes 410 cycles after `start`: one load cycle plus m = 409 PE cycles.

**Squarer (`gf2m_sqr`)** and **adder (`gf2m_add`)** are combinational. The
squarer spreads the bits and folds with x^409 = x^87 + 1. The adder is an XOR.

**Inverter (`gf2m_inv`).** It uses Itoh–Tsujii with β_k = a^(2^k−1) and walks
the bits of 408 = 110011000₂. This takes 409 single-cycle squarings and 11
multiplications, about 4,900 cycles.

## The elliptic-curve processor (`ecc_proc`)

This is the part of the core that needs the most explanation.

**Resources.**

* Register file A (16 words) and register file B (8 words). Addresses 0, 1
  and 2 decode to the constants 0, 1 and b; they are not stored.
* Mult 1 and Mult 2.
* Squarer 1 and Squarer 2.
* Addition 1 and Addition 2.
* One inversion unit.
* The key register.
* Input registers (key, PX, PY, QX, QY) and output registers (xo, yo, inf).

**Micro-instructions.** The double-and-add FSM issues micro-instructions from
a 41-entry ROM (`urom`). Each micro-instruction has two slots, and each slot
has the form `d ← a op b`:

* slot 1 drives Mult 1, Squarer 1, Addition 1 or the inverter;
* slot 2 drives Mult 2, Squarer 2 or Addition 2.

The engine works in three phases:

1. ISSUE reads up to four operands and starts the multipliers and the inverter.
2. EXEC waits until both slots are done.
3. WB writes both results.

Slots always take their operands at ISSUE, so one instruction may read and
write the same register.

**Scalar multiplication (`op = ECC_SMUL`).** This is the López–Dahab
Montgomery ladder in projective x-only coordinates:

1. The main controller shifts the key left until its top bit is 1. A key of 0
   returns the point at infinity.
2. It sets up the ladder: X1 = x, Z1 = 1, X2 = x⁴ + b, Z2 = x².
3. It runs one 7-instruction step for each remaining key bit.

Every step computes A ← A + B (differential addition using x) and B ← 2B.
The key bit chooses which pair is A and which is B. With bit = 1,
A = (X1, Z1) and B = (X2, Z2). With bit = 0 the register addresses of X1↔X2
and Z1↔Z2 are swapped while the step runs. Every bit therefore executes the
same instructions.

The step uses three multiplier rounds, with both multipliers busy in each:

```
T1=XA·ZB | T2=XB·ZA ;  T3=T1+T2 | T4=XB² ;  ZA=T3² | T5=ZB² ;  T6=T4² | T7=T5²
T3=x·ZA  | XA=T1·T2 ;  T7=b·T7  | ZB=T4·T5 ;  XA=XA+T3 | XB=T6+T7
```

**y recovery.** After the ladder, the affine result comes from
(X1, Z1, X2, Z2) and P with one inversion of x·Z1·Z2 and ten multiplications:

* x₃ = X1/Z1
* y₃ = (x + x₃)·[(X1 + xZ1)(X2 + xZ2) + (x² + y)Z1Z2]/(xZ1Z2) + y

Two special cases are handled:

* Z1 = 0 means kP = O.
* Z2 = 0 means (k+1)P = O, so kP = −P = (x, x + y).

**Point addition (`op = ECC_PADD`).** Verification needs this operation. It
uses affine formulas with λ = (y1 + y2)/(x1 + x2). The cases work as follows:

* Equal points switch to the doubling formulas.
* P + (−P) and a point of order two give O.
* If `p_inf` or `q_inf` is set, the other operand is copied.

**Cost.** About 1,250 cycles per key bit. A 409-bit scalar multiplication
takes about 512,000 cycles.

## Modular arithmetic mod n (`mod_arith`, `mod_mont_mult`, `mod_inv`)

| op | result | how | cycles |
|---|---|---|---|
| `MOD_RED` | a mod n | one conditional subtraction (2^409 < 2n) | 2 |
| `MOD_ADD` | a + b mod n | subtract n if the sum ≥ n | 2 |
| `MOD_MUL` | a·b mod n | two radix-2 Montgomery products: t = abR⁻¹, then t·R²·R⁻¹ | ≈ 2·(M+3) |
| `MOD_INV` | a⁻¹ mod n | Kaliski phase 1 (a⁻¹·2^k), then k halvings mod n | ≤ ≈ 4M |

R² = 2^818 mod n is not stored as a constant. After reset the processor
derives it with 818 modular doublings of 1, and `busy` stays high while it
does.

## SHA3-512 (`sha3_512`, `keccak_round`)

Message words are 16 bits wide; byte 0 is in bits 7:0.

* A serial-in/parallel-out register collects 36 words, one 576-bit rate
  block. Its word counter reaches its terminal count Z0 when the block is full.
* The block is XORed into the rate part of the 1600-bit round register.
* A 2:1 multiplexer picks that sum for the first round of a block and the
  plain round register for rounds 1–23.
* A 5-bit round counter selects the Keccak round constant. Its terminal count
  Z1 ends the permutation.

One round runs per clock, so a block takes 24 cycles. Padding is done in
hardware: the 0x06 suffix, the final 0x80, and an extra block when the
message ends on a block boundary. The digest is the low 512 bits of the
state, with byte i in bits 8i+7:8i. `digest_valid` stays high until the next
`msg_init`.

## Using the core

Parameters are 409-bit values sent as 7 words of 64 bits each, most
significant word first. The first word carries bits 408:384 in its low 25
bits.

1. While the core is idle, pulse `param_valid` once per word, then pulse
   `param_write` with `param_addr` to store the value in the RAM.
2. Stream the message into SHA-3: pulse `msg_init`, then send words with
   `msg_valid`/`msg_ready`. Mark the last word with `msg_last`, and give the
   number of valid bytes in it (0–2) on `msg_bytes`.
3. Pulse `start` with `cmd` (`CMD_KEYGEN`, `CMD_SIGN` or `CMD_VERIFY`).
4. Results leave on `sig_out` whenever `sig_valid` is high. Each value takes
   7 words, in the same format as the parameters: r then s, or Qx then Qy.
5. `done` pulses at the end, with `error` and `signature_ok` valid.

Cycle counts measured in simulation:

| operation | cycles |
|---|---|
| key generation | ≈ 517,000 |
| signature generation | ≈ 520,000 |
| signature verification | ≈ 1,046,000 |

The paper reports 2.176 ms for signature generation and 4.032 ms for
verification on a Cyclone V. It does not give the clock frequency, so those
times cannot be converted to cycles and compared.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches print
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/tb_ref_pkg.sv` and are written independently of the RTL:

* MSB-first field multiplication and Fermat inversion;
* wide-integer mod-n arithmetic;
* affine double-and-add point arithmetic;
* Keccak, with round constants and rotation offsets generated from their
  recurrences.

The SHA-3 test also checks the FIPS 202 digests of "" and "abc".

`tb_ecdsa_top` runs the whole core at full size. It performs:

* key generation;
* signing a 100-byte message, with r and s compared against the reference;
* verification, which must accept;
* verification of a changed message, which must be rejected;
* r' = 0, which must give a range error;
* k = 0, which must give a range error;
* a private key chosen so that s = 0, which must give the s = 0 error.

It takes about a minute. The r = 0 error cannot be produced on purpose,
because that needs x(kG) ≡ 0 mod n.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ecdsa_pkg.sv tb/tb_ref_pkg.sv tb/tb_ecdsa_top.sv --top-module tb_ecdsa_top -o sim
./obj_dir/sim
```

Replace `tb_ecdsa_top` with the name of any other testbench, for example
`tb_ecc_proc`, `tb_sha3_512` or `tb_mod_arith`.

## Design choices and departures

* **SHA-3 rate.** This core uses rate 576 and capacity 1024, which is the
  SHA3-512 standard. The paper's SHA-3 figure labels the absorbing path 1024
  bits wide and the bypass 576.
* **Host interface, handshakes, RAM map, error encoding and word order.**
  All are this core's own. The output word order matches the signature
  waveform in the paper, which shows the 25-bit top word first.
* **ECC processor internals.** The register-file sizes, the micro-program,
  the two-slot issue and the register renaming for the ladder are this
  core's own. The paper names the units, the two register files, the
  double-and-add FSM and main controller, and the López–Dahab method.
* **Point addition.** Verification needs u1·G + u2·Q. The paper does not
  say how the addition is done; here the ECC processor does it in affine
  coordinates.
* **Operand registers on Bus 2.** The paper's datapath figure shows a row of
  four operand registers between Bus 2 and the units. Here the ECC processor
  loads its own input registers (PX, PY, QX, QY and key) one word at a time,
  and one hold register serves the mod-n processor and the comparator. The
  values reach the same places, but the staging is different.
* **Multiplier latency.** The paper gives m clock cycles for a
  multiplication. This core spends m cycles in the processing element plus one
  cycle to load the operands, so a multiplication takes m + 1 cycles.
* **Modular inversion.** The paper names a "modified Montgomery inversion".
  This core reads that as Kaliski's algorithm followed by k modular halvings.
* **Modular multiplication.** The radix-2 form and the R² start-up
  computation are this core's own.
* **Curve constants.** b, G and n are the published NIST B-409 values, in
  `ecdsa_pkg`.
* **Reset.** Every register has a synchronous active-low reset, except the
  RAM array and its read-data register.
* **Hardening.** The core has no side-channel hardening beyond the ladder's
  uniform steps. The leading zeros of the key are skipped, so timing depends
  on the bit length of the scalar. The core does not check that Q is on the
  curve.

## Files

| file | contents |
|---|---|
| `rtl/ecdsa_pkg.sv` | field/curve constants, operation and error enums |
| `rtl/gf2m_pe.sv`, `gf2m_mult.sv`, `gf2m_sqr.sv`, `gf2m_add.sv`, `gf2m_inv.sv` | GF(2^409) arithmetic |
| `rtl/ecc_proc.sv` | elliptic-curve processor |
| `rtl/mod_arith.sv`, `mod_mont_mult.sv`, `mod_inv.sv` | mod-n arithmetic |
| `rtl/keccak_round.sv`, `sha3_512.sv` | SHA3-512 |
| `rtl/param_buffer.sv`, `sig_shift.sv`, `ecdsa_ram.sv`, `comp.sv` | I/O buffers, RAM, comparator |
| `rtl/ecdsa_ctrl.sv`, `ecdsa_top.sv` | control unit and top level |
| `tb/tb_ref_pkg.sv` | reference models |
| `tb/tb_*.sv` | one testbench per module; `tb_ecdsa_top` is end to end |
