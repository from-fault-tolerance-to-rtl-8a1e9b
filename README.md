# Fault-attack-tolerant AES-128: error-correcting redundancy and low-latency inverse checking

A differential fault attack (DFA) on AES makes the chip compute a block with a
fault injected at a known place. A classic target is one byte of the
MixColumns input in round 9. The attacker then compares the faulty
ciphertext with the correct one. The attack works only if the faulty
ciphertext leaves the chip *and* the fault has the form the attack assumes,
for example a one-bit error in one byte.

This RTL implements the countermeasures proposed in *From Fault Tolerance to
Fault Attack Tolerance in the Implementations of Advanced Encryption
Standard*:

1. **RS1-protected AES** (`aes_rs1_core`). Every byte of the state and of the
   round key carries an 8-bit redundancy byte from a small Reed-Solomon-like
   code, RS1. Separate hardware carries the redundancy through every AES
   operation. Byte guards check data against redundancy after each
   operation. The core comes in two variants:
   * **AES_Check** detects the fault and withholds the ciphertext.
   * **AES_Correct** rewrites the data from the redundancy. Faults on the
     data vanish, and faults that reach the redundancy come out as some
     other, unpredictable error that no longer fits the attack's fault model.
2. **Low-latency concurrent error detection (CED) with inverse modules**
   (`aes_ced_core`). Each AES operation is checked by its inverse one clock
   after it ran, while the next operation is already running. Over a whole
   block this costs one extra clock.
3. **Two further byte codes**, RS2 (6 redundancy bits) and a Hamming code
   (4 check bits). Each comes as an encoder, a checker and a corrector. They
   are stand-alone codecs, as the paper only evaluates them at byte level.

`aes_fat_top` puts all of them side by side, each with its own ports.

## The RS1 code

A data byte `I` is split into nibbles `I2` (high) and `I1` (low). The
redundancy byte is `R = {R2, R1}`:

```
R1 = I2 ^ I1
R2 = 2*I2 ^ I1
```

All products here are **carry-less and truncated to 4 bits**: `2*x` is `x`
shifted left by one with the top bit dropped. The bit-level form is
`R[3:0] = I[7:4]^I[3:0]`, `R[4] = I[0]`, `R[5] = I[1]^I[4]`,
`R[6] = I[2]^I[5]`, `R[7] = I[3]^I[6]`.

Two properties drive the whole design:

* **The map I → R is one-to-one.** The redundancy alone determines the data:
  `3*I1 = 2*R1 ^ R2` and `3*I2 = R1 ^ R2`. Multiplication by 3 is
  invertible, with inverse `15*x = x^2x^4x^8x`.
* **RS1 is linear over GF(2).** `R(a ^ b) = R(a) ^ R(b)`. This is why
  AddRoundKey, the XOR chain of the key schedule and the XOR sums inside
  MixColumns can be applied to the redundancy unchanged.

### Decoding: Check_Redundancy and Correct_Redundancy

Take a received byte `I` with redundancy `R`. Assume `R` is intact. The
errors on the two data nibbles are then:

```
E1' = I1 ^ 2*I1 ^ 2*R1 ^ R2      E1 = E1' ^ 2E1' ^ 4E1' ^ 8E1'
E2' = I2 ^ 2*I2 ^ R1 ^ R2        E2 = E2' ^ 2E2' ^ 4E2' ^ 8E2'
```

* `rs1_check` (Check_Redundancy) first re-encodes `I`. If that matches `R`,
  the byte passes. Otherwise:
  * If exactly one of `E1`, `E2` is non-zero, it repairs the byte and raises
    `corrected_o`.
  * In every other case it raises `uncorrectable_o`.
* `rs1_correct` (Correct_Redundancy) always outputs `I ^ {E2,E1}` and has no
  flags. Because R determines I, this output is simply the unique byte that
  `R` encodes.

Exhaustive simulation covers all 256 data bytes × all 65,535 non-zero 16-bit
error patterns (`tb_rs1_codec`):

| | this RTL | paper (Tables 3/4) |
|---|---|---|
| Check: undetected | 0.39 % | 0.39 % |
| Check: correctly repaired | 0.046 % | 0.05 % |
| Check: flagged / wrongly repaired | 87.8 % / 11.7 % | 76.6 % + 0.04 % / 23.0 % |
| Correct: repaired / changed to another value / unchanged | 0.39 % / 99.22 % / 0.39 % | 0.39 % / 99.22 % / 0.39 % |

The paper does not give the exact decision logic of its checker. That is why
the split between "flagged" and "wrongly repaired" differs. Every other
figure agrees.

### Carrying the redundancy through AES (`aes_rs1_core`)

| operation | data path | redundancy path |
|---|---|---|
| SubBytes | AES S-box | **SR-box**: `SR[R(x)] = R(S(x))`, a second 256-entry table (`sr_box`) |
| ShiftRows | permutation | the same permutation (a second `aes_shift_rows`) |
| MixColumns | `2a^3b^c^d` per byte | `R(2a)^R(3b)^R(c)^R(d)`. `R(2a)` is an XOR network of the bits of `R(a)` alone, and `R(3a) = R(a)^R(2a)` (`rs1_mix_columns`) |
| AddRoundKey | `s ^ k` | `R(s) ^ R(k)` |
| key schedule | RotWord, SubWord, Rcon, XOR chain | same, with SR-boxes and `R(rcon)` (`rs1_key_expand`) |

The redundancy is never recomputed from the data inside the rounds. A fault
on either path therefore leaves data and redundancy inconsistent. A bank of
sixteen guards (`rs1_guard`) follows SubBytes, ShiftRows, MixColumns,
AddRoundKey and the new round key. Each guard is `rs1_check` or
`rs1_correct`, selected by the parameter `GUARD`.

Where a fault is injected decides what a guard sees. A fault injected
*before* an operation is spread by that operation before the next guard sees
it. One flipped bit at the MixColumns input becomes errors in four bytes,
usually with both nibbles wrong, so AES_Check flags it instead of repairing
it. AES_Correct still restores the data, because it rebuilds every byte from
its redundancy. The testbench models this exactly.

**Timing.** The core computes one full round per clock and expands the key
on the fly.
* `start_i` is accepted while `busy_o` is low. It loads `pt ^ key` and the
  RS1 codes of `pt` and `key`.
* `done_o` pulses **10 clocks later** together with `ct_o`, `err_o` and
  `corrected_o`.
* In AES_Check, `err_o = 1` forces `ct_o` to zero.
* In AES_Correct, `err_o` and `corrected_o` are always 0.

## Low-latency CED (`aes_ced_core`)

Each AES operation gets one time slot (one clock). Operation *k* writes its
result into the state register. It also saves its input (and, for
AddRoundKey, the round key) in a check register. In the next slot operation
*k+1* runs. At the same time the inverse unit of operation *k*
(InvSubBytes, InvShiftRows, InvMixColumns, or AddRoundKey with the same
key) is applied to the state register, and the result is compared with the
saved input.

```
slot:      1      2      3      4      5      ...   40      41
forward:  ARK0   SB1    SR1    MC1    ARK1    ...   ARK10   -
inverse:   -     ARK0   SB1    SR1    MC1     ...   SR10    ARK10
```

AES-128 needs 40 operation slots: the initial AddRoundKey, 9 × 4, then 3
for the last round, which has no MixColumns. The check of the last
AddRoundKey needs one more slot. `done_o` therefore pulses **41 clocks**
after start, one clock more than the unprotected schedule, as the paper
reports. Any comparison mismatch sets `err_o` and forces `ct_o` to zero.
Every AES operation is a bijection, so any non-zero error injected into one
operation's output is caught.

## Behaviour under the round-9 fault attack

`tb_dfa_campaign` attacks the first byte of the round-9 MixColumns input in
both RS1 cores. It injects three sets of faults at that byte:

* every non-zero mask on the data byte;
* every non-zero mask on its redundancy byte;
* 255 random masks on both at once.

Each ciphertext is then sorted into one of three outcomes: correct, withheld
(AES_Check only), or faulty. A faulty ciphertext is also tested against the
one-bit fault model (it equals the ciphertext of a one-bit flip of that
byte). Results for one plaintext and key (FIPS-197 Appendix B):

| core, fault on | correct | withheld | faulty | faulty, fits one-bit model |
|---|---|---|---|---|
| AES_Check, data | 14 | 241 | 0 | 0 |
| AES_Check, redundancy | 0 | 241 | 14 | 6 |
| AES_Check, both | 0 | 242 | 13 | 0 |
| AES_Correct, data | 255 | 0 | 0 | 0 |
| AES_Correct, redundancy | 0 | 0 | 255 | 8 |
| AES_Correct, both | 0 | 0 | 255 | 6 |

**Data faults.** No data fault ever produces a faulty ciphertext. AES_Check
repairs a data fault when MixColumns happens to leave only one wrong nibble
per byte. Otherwise it withholds the ciphertext.

**Redundancy faults.** These behave differently. AES_Correct rebuilds data
from the redundancy, so a redundancy fault `m` acts exactly like the data
fault `R^-1(m)` at the same place. In AES_Check, such a fault leaks whenever
every byte the guard sees has only one wrong nibble.

Consequences for the attack:

* A fault that still fits the one-bit model the paper considers needs the
  attacker to hit the redundancy byte with one of 8 particular values out of
  255.
* A single-byte fault model with an arbitrary fault value stays reachable
  through the redundancy byte.

This is a limit of the scheme, not of this implementation.

## RS2 and Hamming codes

* **RS2** (`rs2_encode`, `rs2_check`, `rs2_correct`, helper `rs2_decode`)
  splits the byte into `I3` (2 bits), `I2` and `I1` (3 bits each). It uses
  `R1 = I3^I2^I1` and `R2 = 4*I3^2*I2^I1`, computed on 3 bits.
  * A byte with one wrong part is correctable. The decoder evaluates the
    three single-part error equations, verifies each candidate by
    re-encoding, and takes the first valid one (I1, then I2, then I3).
  * Exhaustive simulation leaves 1.56 % of error patterns undetected, the
    same as the paper.
* **HC** (`hc_encode`, `hc_check`, `hc_correct`) is a (12,8) Hamming code.
  * Check bit `p[k]` sits at codeword position 2^k; the data bits fill
    positions 3,5,6,7,9,10,11,12. The paper does not give its HC equations,
    so this placement is this design's own choice.
  * The checker only detects. The corrector flips the data bit named by the
    syndrome.
  * 6.23 % of error patterns go undetected, against about 6.1 % in the
    paper.

## Where this RTL departs from or goes beyond the paper

* **AES key size.** AES-128 is assumed. The paper never states a key size,
  but its attack targets round 9, which implies 10 rounds.
* **Base AES datapath.** The paper adds its checks to an existing FPGA core
  that it does not describe. Here, `aes_rs1_core` is one round per clock and
  `aes_ced_core` is one operation per clock. The area figures of the paper
  (slices, LUTs, BRAM on a Virtex-II) are not comparable. The second CED
  architecture of its overhead table (4 clocks of overhead) is not
  described there and is not built.
* **CED check registers.** `aes_ced_core` keeps a copy of the last
  operation's input and round key (256 flip-flops) for the delayed
  comparison. The paper's first architecture reports no flip-flop overhead,
  presumably by reusing registers of its own datapath, which it does not
  describe.
* **Guard placement** after every operation and on the round key, and the
  reaction to a detected fault (zeroed ciphertext plus an error flag), are
  choices of this design. The paper only says that faulty ciphertexts must
  not be released.
* **Multiplication.** The paper's products are read as truncated carry-less
  products. This is the only reading under which its inverse formulas hold,
  and its bit-level equations confirm it.
* **Key schedule.** Protecting the key schedule follows the paper's closing
  remark that the same technique applies there.
* **Fault hooks.** The `fault_i` ports (type `aes_pkg::fault_t`) exist for
  fault-injection experiments. Each names a round, an operation, a byte, a
  data mask and a redundancy mask. Tie `en` low in a product.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | state type, operation codes, `fault_t`, GF(2^8) arithmetic, S-box tables computed at elaboration |
| `rtl/ecc_pkg.sv` | RS1/RS2/HC encoding functions, `guard_e` |
| `rtl/aes_{sub_bytes,shift_rows,mix_columns}.sv`, `rtl/aes_inv_*.sv`, `rtl/aes_key_expand.sv` | AES operations and their inverses |
| `rtl/rs1_*.sv`, `rtl/sr_box.sv` | RS1 codec, guard bank and protected operations |
| `rtl/rs2_*.sv`, `rtl/hc_*.sv` | RS2 and Hamming codecs |
| `rtl/aes_rs1_core.sv`, `rtl/aes_ced_core.sv`, `rtl/aes_fat_top.sv` | cores and top |
| `tb/tb_ref_pkg.sv` | independent reference models (AES, RS1, RS2, HC) |
| `tb/tb_*.sv` | self-checking testbenches, one per group of blocks |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
run the whole design end to end:

```
verilator --binary --timing -Wno-fatal rtl/aes_pkg.sv rtl/ecc_pkg.sv tb/tb_ref_pkg.sv \
  -y rtl -y tb tb/tb_aes_fat_top.sv --top-module tb_aes_fat_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_aes_fat_top` with any of the following:

* `tb_aes_ops`: AES operations against FIPS-197 values.
* `tb_rs1_ops`: SR-box, protected operations and guards.
* `tb_rs1_codec`, `tb_rs2_codec`, `tb_hc_codec`: exhaustive code coverage,
  with the outcome statistics printed.
* `tb_aes_rs1_core`: both guard modes under injected faults.
* `tb_aes_ced_core`: latency, and detection per operation type.
* `tb_dfa_campaign`: the fault-attack campaign above.

The simulator used is two-state, so every register read is reset. The
exhaustive RS1 test takes a few seconds; all other tests take well under a
second.
