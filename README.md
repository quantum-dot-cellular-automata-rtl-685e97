# 4-bit RSA encrypter/decrypter in majority logic

This design is a complete RSA public-key round trip: 4-bit messages, with the
textbook key pair built from the primes p = 2 and q = 5:

| quantity | value |
|---|---|
| modulus n = p·q | 10 |
| φ(n) = (p−1)(q−1) | 4 |
| public exponent e | 3 |
| private exponent d | 7  (3·7 = 21 ≡ 1 mod 4) |
| public key PU | {3, 10} |
| private key PR | {7, 10} |

Encryption is C = M³ mod 10 and decryption is M = C⁷ mod 10, for messages
M < 10. The circuit targets Quantum-dot Cellular Automata (QCA), where the
natural gate is the three-input majority gate, so the datapath is built from
majority gates, inverters and a majority-gate full adder. Here it is written
as ordinary synthesizable SystemVerilog, so it runs in any simulator and
synthesizes to CMOS logic too.

The key size offers no security. The design shows the RSA datapath structure
(modular multiplication and exponentiation) at a size where every case can be
checked by hand:

| M | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| C = M³ mod 10 | 0 | 1 | 8 | 7 | 4 | 5 | 6 | 3 | 2 | 9 |

## Hierarchy

```
rsa_qca_top            registers, valid bits, range flag
├── rsa_encrypt        C = M^3 mod 10  (2 multipliers, 2 reducers)
└── rsa_decrypt        M = C^7 mod 10  (3 multipliers, 3 reducers, select gates)
    └── rsa_encrypt    (reused: gives C^2 and C^3)
        qca_array_mult     4x4 array multiplier
        rsa_mod_reduce     8-bit -> residue mod 10
            qca_full_adder     3 majority gates + 2 inverters
                qca_majority, qca_inverter
rsa_qca_pkg            key constants, message type
```

## Modular multiplication: multiply, then fold to 4 bits

Each exponentiation step multiplies two 4-bit residues into an 8-bit product
(`qca_array_mult`) and immediately reduces it back to a 4-bit residue
(`rsa_mod_reduce`), so the multipliers never grow beyond 4×4.

**Multiplier.** A carry-ripple array: partial-product bits are
majority gates with one input tied to 0 (M(a,b,0) = a·b). Each of the
following rows adds one partial product to the running sum with a ripple
chain of four full adders.

**Reducer.** This is the least obvious part of the design. A product bit at
position i ≥ 4 is worth 2ⁱ mod 10, not 2ⁱ, so it can be folded into the low
nibble as a small constant:

| product bit | weight | mod 10 | added into bits |
|---|---|---|---|
| p4 | 16 | 6 | 1 and 2 |
| p5 | 32 | 2 | 1 |
| p6 | 64 | 4 | 2 |
| p7 | 128 | 8 | 3 |

For each high bit the reducer has two rows of four full adders:

1. **Fold row:** adds the bit's weight to the running nibble when the bit is set.
2. **End-around row:** a carry out of bit 3 is worth 16 ≡ 6, so 6 is added
   back into bits 1 and 2 when the fold row carried. Because n > 8, this row
   can never carry again.

After the last high bit, the nibble is congruent to the product but may lie
between 10 and 15. A final row corrects it the way a BCD adder corrects a
digit. It adds 6 (= 16 − n), which carries exactly when the value is ≥ 10. On
a carry the low four bits of the sum (value − 10) are taken; otherwise the
value is kept.

The output is therefore always the canonical residue 0..9. For 8-bit inputs
the reducer is 9 rows of 4 full adders. It is parameterized
(`IN_W`, `OUT_W`, `MODULUS`) and works for any modulus with
2^(OUT_W−1) < MODULUS ≤ 2^OUT_W. The weights are computed at elaboration.

## Encryption: two multiplications

`rsa_encrypt` unrolls e = 3: M·M → reduce → M² mod 10, then (M² mod 10)·M →
reduce → C. It also outputs the square, because the decrypter reuses it.

## Decryption: seven multiplications replaced by three

Done naively, C⁷ takes six or seven multiplications, and even an optimal
addition chain needs four. `rsa_decrypt` uses three and replaces the last
with a few gates:

* multipliers 1 and 2 (a reused `rsa_encrypt`): C² and C³ mod 10
* multiplier 3: C⁴ = C²·C² mod 10
* C⁷ = C⁴·C³ mod 10, by selection rather than multiplication

This works because C⁴ mod 10 can take only four values:

| C⁴ mod 10 | when | C⁴·C³ mod 10 |
|---|---|---|
| 0 | C ≡ 0 | 0 |
| 1 | C odd, not 5 | C³ |
| 6 | C even, not 0 | C³ (6·y ≡ y mod 10 for even y, and C³ is even) |
| 5 | C ≡ 5 | 5 |

Bits 0 and 2 of C⁴ separate the four cases:

* their AND (a majority gate with one input at 0) selects the constant 5;
* their XOR selects C³;
* when both are 0 the output is 0.

This selection is valid only for n = 10. The module checks that at
elaboration.

## Top level and timing

`rsa_qca_top` chains the two halves the way the public-key scheme is used.
The sender encrypts with the public key, the ciphertext is held in a register
as the transmitted word, and the receiver decrypts with the private key.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous active-low reset; clears valid bits and data |
| `in_valid`, `msg_in` | in | 1, 4 | message M, taken on every edge where `in_valid` is 1 |
| `cipher_valid`, `cipher_out` | out | 1, 4 | C = M³ mod 10, two edges after M was taken |
| `range_err` | out | 1 | with `cipher_valid`: M was not below 10 |
| `plain_valid`, `plain_out` | out | 1, 4 | C⁷ mod 10, three edges after M was taken |

* There is no back-pressure. A new message can enter on every clock, and all
  paths between the registers are combinational.
* A message of 10 or more breaks the RSA rule M < n. It is still encrypted
  (its residue mod 10 goes through the chain) and flagged with `range_err`,
  and it will not come back unchanged.
* A reset discards the messages in flight.

In the original technology the data moves through four-phase QCA clock
zones. Those are a physical clocking scheme with no logic function, so here
the three register stages and their valid bits set the timing instead. That
pipelining is this design's own choice.

## What follows the source design and what does not

These parts follow the source design:

* the key pair and the 4-bit width;
* encryption as square, reduce, multiply, reduce;
* reduction by folding high bits into the low nibble, with an end-around
  carry and a BCD-style correction;
* decryption with three multiplications plus majority/XOR logic that reuses
  the encryption stage;
* a full adder with Sum = A ⊕ B ⊕ Cin, built on majority gates.

These are this implementation's choices:

* The full adder's gate structure is the standard three-majority form:
  Cout = M(A,B,Cin), Sum = M(¬Cout, Cin, M(A,B,¬Cin)). The QCA adder is a cell
  layout (49 cells, one QCA clock of latency) that has no gate-level
  counterpart here.
* The multiplier is a plain carry-ripple array.
* Each product bit gets its exact weight 2ⁱ mod n. The original reducer's
  wiring of some high bits, such as where p6 goes, is not reproduced literally.
* Every intermediate value is reduced to the canonical residue 0..9, not just
  to some congruent 4-bit value.
* The decryption select logic is derived from the C⁴ table above.
* Registers, valid bits, `range_err` and the reset are this design's own.

Not built:

* key generation, since the keys are fixed constants in `rsa_qca_pkg`;
* the QCA clock zones and wires, which are physical, not logic.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
integer arithmetic computed in the testbench:

* `tb_qca_majority`, `tb_qca_inverter`, `tb_qca_full_adder`: all input combinations.
* `tb_qca_array_mult`: all 256 4×4 products and all 4096 6×6 products.
* `tb_rsa_mod_reduce`: all 256 inputs for n = 10, plus n = 13 and n = 7 (3-bit output).
* `tb_rsa_encrypt`: all 16 inputs against M³ and M² mod 10; checks that
  messages 0..9 map onto 0..9 one-to-one.
* `tb_rsa_decrypt`: all 16 inputs against C⁷ mod 10 (seven multiplications);
  round trip for all ten messages.
* `tb_rsa_qca_top`: runs at the top's default size, 400 cycles. It starts with
  all 16 messages back to back, then random traffic with gaps and
  out-of-range messages, then a reset in the middle of traffic. A three-deep
  reference pipeline checks valid timing, ciphertext, range flag and
  recovered plaintext every cycle, and that every accepted message came out
  once unless the reset discarded it. It also requires back-to-back messages,
  gaps, out-of-range messages, round trips and a reset flush each to have
  happened at least once.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

From the project root, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/rsa_qca_pkg.sv \
    tb/tb_rsa_qca_top.sv --top-module tb_rsa_qca_top -Mdir obj_top
./obj_top/Vtb_rsa_qca_top
```

Any other testbench runs the same way with its name in place of
`tb_rsa_qca_top`. Verilator finds the modules in `rtl/` through `-Irtl`. The
package file must be listed first.

## Changing it

* **Reducer:** `rsa_mod_reduce` is fully parameterized. Other moduli in
  (2^(OUT_W−1), 2^OUT_W] work unchanged.
* **Multiplier:** `qca_array_mult` takes any width `W`.
* **Other keys:** `rsa_encrypt` takes `MSG_W` and `KEY_N`, but its exponent is
  fixed at 3 by its structure. A different private exponent or modulus needs a
  new decryption chain, because the C⁴ selection trick in `rsa_decrypt`
  depends on n = 10.
