# Ed25519 key generation and signing accelerator

This RTL computes Ed25519 public keys and signatures (RFC 8032) entirely in
hardware. A 32-byte secret key goes in, and the encoded public key comes out.
A message of up to 128 bytes goes in, and the 64-byte signature (R, S) comes
out. The expensive part is the fixed-base scalar multiplication [s]B. It runs
as a constant-time Montgomery ladder on the birationally equivalent
Montgomery curve (Curve25519), followed by y-coordinate recovery and
conversion back to Edwards coordinates. An optional mode randomizes the
projective coordinates against differential power analysis.

The architecture follows Bisheh-Niasar, Azarderakhsh and Mozaffari-Kermani,
"Cryptographic Accelerators for Digital Signature Based on Ed25519". Like
that work, one parameter gives two organisations of the field arithmetic:

| `DESIGN` | field multiplier | adder/subtractor | keygen / sign, clocks |
|---|---|---|---|
| 1 (default), high-performance | 4-level Karatsuba, one product per clock, 5-clock latency | 255-bit, 2 clocks | 10,473 / 10,799 |
| 2, efficient | one 64×64 core used 16 times, one product per 16 clocks | 128-bit digits, 4 clocks | 59,927 / 60,413 |

The signing figures are for a 128-byte message. Signature verification is
**not** implemented.

## Block structure

```
                 +-------------------------------------------------+
 cmd, sk, msg -->| ed25519_top: command FSM, SHA-512 block builder |--> pk, sig_r, sig_s
                 +-------------------------------------------------+
                   |            |             |             |
             sha512_core   modl_reduce    key_buffer    ecpm_ctrl + ecpm_rom + inv_rom
                   |            |  (uses the   |             |
                   |            |  multiplier) |             |
                   +------------+------+-------+-------------+
                                       |
                          mem_unit (32 x 256-bit words)
                                       |
          field ALU: hp_modmul + hp_addsub   (DESIGN = 1, kara_mul inside)
                  or eff_modmul + eff_addsub (DESIGN = 2, eff_mul64 inside)
```

* **`ed25519_top`** sequences a command. It builds padded SHA-512 blocks
  from a header (the key, the prefix, or R‖A) and the message. It moves
  values between the units and keeps the secret scalar s, the prefix and the
  public key A.
* **`ecpm_ctrl` / `ecpm_rom` / `inv_rom`** perform the point multiplication
  on the field ALU and the memory unit.
* **`modl_reduce`** reduces 512-bit hashes and k·s + r modulo the group
  order L. It borrows the field multiplier in its nonmodular mode.
* **`key_buffer`** holds the scalar and hands out one bit per ladder step. On
  key generation it also clamps the scalar.
* **`ed25519_pkg`** holds the shared constants, the micro-instruction type
  and the memory map.

### Command flow

Key generation:

1. h = SHA-512(sk), one block.
2. The low half of h is clamped into s, and the high half is kept as the prefix.
3. A = [s]B.
4. pk = enc(A).

Signing, with the stored s, prefix and pk:

1. r = SHA-512(prefix ‖ M) mod L.
2. R = [r]B.
3. k = SHA-512(enc(R) ‖ pk ‖ M) mod L.
4. S = (r + k·s) mod L.
5. The signature is (enc(R), S).

k·s is computed as a plain 512-bit product on the field multiplier. r is
added to it, and the sum goes through the same mod-L unit. All byte strings
are little-endian integers, as in RFC 8032. Bit 8i of `sk` is the least
significant bit of byte i.

## Field arithmetic (p = 2^255 − 19)

### Design I multiplier (`hp_modmul`, `kara_mul`)

The 256×256 product uses four levels of Karatsuba, which gives 3^4 = 81 leaf
multipliers, each registered.

`kara_mul` is written recursively. Each level splits an operand in halves,
multiplies the high halves, the low halves and the two half-sums, and merges
the results. The half-sums are one bit wider than the halves, so the leaves
are 16 to 20 bits wide. `LEAF` = 18 is the width at which recursion stops.

The first Karatsuba level is not merged in full. With a = a1·2^128 + a0 and
b = b1·2^128 + b0:

- C0 = a0·b0
- C2 = a1·b1
- C1 = (a0 + a1)(b0 + b1)

Because 2^256 ≡ 38 (mod p), the pipeline forms the 387-bit value
C = 38·C2 + C0 + (C1 − C2 − C0)·2^128. It then folds C = Ch·2^255 + Cl into
19·Ch + Cl, which is below 2p. One conditional subtraction of p finishes the
reduction.

There are five register stages:

1. operands
2. leaf products
3. Karatsuba merge
4. first-level merge and fold by 38
5. fold by 19 and subtraction

A new multiplication can enter every clock.

The same pipeline also provides the plain 512-bit product (`out_raw`). The
mod-L unit and the k·s product use it. Every operation carries a 5-bit tag,
which is its destination address. The controller uses the tag to write the
result back.

### Design II multiplier (`eff_modmul`, `eff_mul64`)

A 256-bit operand is split as a = a1·2^128 + a0. The four 128×128 partial
products are taken in the order C3 = a1b1, C0 = a0b0, C1 = a0b1, C2 = a1b0.
Each one takes four 64×64 products from `eff_mul64`, one per clock. The core
itself is a schoolbook of sixteen 16×16 products with two pipeline stages.

Each 64×64 product is added into a 512-bit accumulator at its weight. The C3
products are first multiplied by 38 (32 + 4 + 2, by shifts and adds). After
the sixteenth product, the sum moves to a T register, so the accumulator is
free for the next multiplication. The value is then folded by 19 and reduced
by one subtraction of p.

- `in_ready` lets a new multiplication start every 16 clocks.
- The result appears 21 clocks after acceptance.
- With `raw = 1`, the C3 products go in at 2^256 instead, which gives the
  plain product.

### Adders

- **`hp_addsub`** forms a ± b and the corrected value (∓ p) in one clock. It
  chooses between them by the carry or borrow in the next clock.
- **`eff_addsub`** works on 128-bit digits with a carry register:
  - 2 clocks for C = a ± b;
  - 2 clocks for C ∓ p;
  - the choice is made by the flags.

  The two halves form a pipeline, so one operation can start every two clocks.

Both adders expect operands already below p and return fully reduced results.

## Point multiplication (`ecpm_ctrl`, `ecpm_rom`)

### Routines

The ROM holds short routines of micro-instructions:

- MUL, ADD, SUB, and CONST (load a constant).
- A repeat count that adds n squarings of the destination.
- A flag that marks protected-mode instructions.
- A flag that marks the last instruction of a routine.

The routines, in order:

1. **INIT** builds the projective base point. The host writes B = (u = 9,
   v, 1) and λ into memory. INIT computes (λu : λv : λ), sets R0 = (1 : 0)
   and R1 = B.
2. **LADDER**, 255 steps, key bit 254 first. One step is the combined
   doubling and differential addition of RFC 7748: 8 additions and
   subtractions and 11 multiplications. Four of the multiplications are
   squarings, one is by a24 = 121665, and two are by X1 and Z1, because the
   base point is kept projective.
3. **CONV** recovers the y coordinate of [k]B (Okeya–Sakurai). It uses the
   ladder outputs R0 = [k]B and R1 = [k+1]B together with the base point. The
   result is a projective (X : Y : Z) on the Montgomery curve.
4. **INV** inverts one value by Fermat's little theorem. It uses the standard
   addition chain of 254 squarings and 11 multiplications. The chain sits in
   its own small ROM, `inv_rom`, which `ecpm_rom` maps into its address space.
5. **POST** forms the affine Edwards point:
   x = √(−486664)·u / v and y = (u − 1)/(u + 1).
   It needs only the one shared inversion. The top then reads x and y and
   encodes y with the low bit of x in bit 255.

### Issue and the scoreboard

The controller issues at most one instruction per clock, in program order.
Operands are read from `mem_unit` in the issue clock, through two
asynchronous read ports, and travel with the operation. The multiplier
writes back on write port 0 and the adder on port 1. Each unit tags its
result with the destination.

A 32-bit scoreboard has one pending bit per memory word. An instruction
waits while any of its sources or its destination is pending, or while its
unit cannot take work (`mul_ready` / `as_ready`; the Design I units are
always ready). This lets the same ROM run on both ALUs. Design II simply
stalls more.

### Constant time and the swap

The conditional swap of the ladder is not a data move. When the current key
bit is 1, the controller remaps the logical addresses of the two ladder
points (X2, Z2 ↔ X3, Z3) during that step. The physical X2/Z2 always holds
R0 at the end of a step. The instruction stream is the same for every key
bit.

A remap changes which physical words a step waits on. For that reason, INIT
and every ladder step are followed by a wait until the scoreboard is empty,
so each step starts from the same state. The clock count of a point
multiplication is then independent of the key. The end-to-end testbench
checks this across all its keys.

### Randomization (`protect = 1`)

- λ enters through `rnd_lambda`. It must be nonzero and fresh for every
  command. Random number generation is outside this design.
- INIT multiplies the base point by λ.
- Every ladder step starts with X2·λ and Z2·λ. This is continuous
  re-randomization of the projective ladder state, at two extra
  multiplications per step.
- With `protect = 0` these instructions are skipped.

The result does not depend on λ.

### Counts

| | Design I | Design II |
|---|---|---|
| Point multiplication, unprotected | 10,380 clocks | 59,834 clocks |
| Point multiplication, protected | 11,657 clocks | 69,316 clocks |
| Field multiplications (unprotected / protected) | 3,090 / 3,603 | same |

The published point-multiplication figures of the reference are 9,181 and
10,966 clocks (Design I) and 48,450 and 57,120 clocks (Design II). Those
come from hand-made schedules, whereas this controller uses a generic
in-order scoreboard.

## Reduction modulo L (`modl_reduce`)

L = 2^252 + l0, where l0 has 125 bits. The reduction runs three rounds that
always take the same time.

1. **Round 1.** Write x = x1·2^256 + x0. Then x ← x0 − 16·(x1·l0), because
   2^256 ≡ −16·l0.
2. **Rounds 2 and 3.** Write x = x1·2^252 + x0, where x0 is the low 252 bits
   and x1 is signed. Then x ← x0 − x1·l0.
3. **Correction.** One final addition or subtraction of L gives the
   canonical result.

The unsigned product |x1|·l0 comes from the field multiplier's raw output.
The sign is applied inside the unit. One reduction takes 23 clocks with the
Design I multiplier.

## SHA-512 (`sha512_core`)

The core has a 64-bit datapath. One clock loads the block and the chaining
value, then 80 round clocks follow, using an on-the-fly 16-word message
schedule. `init` selects the standard initial value for the first block of
a message; otherwise it chains from the previous digest. Padding is done by
the top-level block builder. A 128-byte message needs 2 blocks for r and 2
for k.

## Interface of `ed25519_top`

- **Starting a command.** Assert `cmd_valid` while `ready` is high, with
  `cmd_sign` = 0 for key generation or 1 for signing. `protect` and
  `rnd_lambda` are sampled at the same time.
- **Inputs.** `sk` must be valid for key generation. `msg[0..msg_len-1]` must
  stay valid during signing.
- **Completion.** `done` pulses when the command has finished. `pk`, `sig_r`
  and `sig_s` then hold until the next command.
- **Order.** Signing uses the key material of the last key generation, so run
  key generation first.
- **Activity counters of the last command.** These are for evaluation:
  `cycles`, `hash_blocks`, `ecpm_cycles`, `ecpm_mults`, `ecpm_stalls` and
  `ecpm_swaps`.

Parameters:

- `DESIGN` (1 or 2).
- `MSG_BYTES` (128): the message buffer size.
- `NBITS` (255): the number of ladder steps.

## How far it is checked

Every block has a self-checking testbench in `tb/`. Each one compares
against values computed independently in the testbench: wide integer
arithmetic, or a reference model in `ed25519_ref_pkg` of field operations,
SHA-512 compression, and Edwards-curve double-and-add. Each testbench also
checks the latency or issue rate of its unit.

The end-to-end tests run at the default parameters:

- **`ed25519_top_tb`** (Design I) and **`ed25519_top_d2_tb`** (Design II,
  the same test with `DESIGN = 2`).
- They run key generation and signing for RFC 8032 test vectors 1 and 2, and
  for a 128-byte message with its key and signature from an independent
  Ed25519 implementation.
- Each command runs once unprotected and once protected.
- They also count that multi-block hashing, controller stalls, ladder swaps
  and protected runs all occurred.
- They check the constant point-multiplication time.

To simulate with Verilator, for example the end-to-end test, use the
commands below. `-y` lets Verilator find every other module by its file name.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ed25519_pkg.sv tb/ed25519_ref_pkg.sv tb/ed25519_top_tb.sv \
  --top-module ed25519_top_tb
./obj_dir/Ved25519_top_tb
```

For a unit test, use `tb/<unit>_tb.sv` and `--top-module <unit>_tb`. The two
end-to-end tests share their stimulus and checks, which live in
`tb/ed25519_top_stim.sv`. Each testbench prints one
`TB_RESULT checks=N failures=M` line.

The design passes Verilator lint and the Yosys/slang front end. Timing
closure and FPGA mapping have not been evaluated.

## Departures from the reference architecture

- **Not implemented:**
  - Signature verification, with its Shamir's-trick double-point
    multiplication.
  - The random number generator.
  - The DPA-hardened hashing variant (random key padding, which breaks
    deterministic signatures).
- **Design I leaves** are up to 18 to 20 bits wide rather than 16×16, since
  the Karatsuba half-sums grow by one bit per level. There are still 81
  leaves.
- **The Design II multiplier** accumulates into one 512-bit register rather
  than redundant 136-bit digit registers. Its latency is 21 clocks rather
  than 32; the throughput of 16 clocks is kept.
- **Design II** shares the memory unit, hash unit and mod-L unit with
  Design I at full width. Only the field ALU changes.
- **The Design II adder** selects between C and C ∓ p internally instead of
  storing both in memory.
- **Scheduling** uses a scoreboard with in-order issue instead of fixed
  per-step schedules.
- **The conditional swap** is an address remap, with a drain after each step
  so that the time is constant.
- **SHA-512** takes 81 clocks per block (80 rounds plus a load).
- **Messages** are limited to `MSG_BYTES` bytes and are presented on an input
  array.
