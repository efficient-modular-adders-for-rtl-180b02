# SEA loop core with interchangeable modular adders

SEA (Scalable Encryption Algorithm) is a small Feistel block cipher for
resource-constrained devices. It is parametric in the block/key size `n` and
the processor word size `b`. Its whole round function is built from
word-sized operations: XOR, a 3-bit S-box applied bitsliced, word and bit
rotations, and a word-wise modular addition. This RTL is an iterative
("loop") hardware implementation. Each clock computes one cipher round and,
alongside it, one key-schedule round.

Its main point is that the word adder can be swapped. Apart from XORs, the modular addition and
the S-boxes are the only parts of SEA that cost logic; the rotations are
only wiring. So the core takes its adder from a parameter, with three
architectures:

| `ADDER`      | modulus | structure                                                        |
|--------------|---------|------------------------------------------------------------------|
| `MOD_ADDER1` | m = 2^b | generic modulo-m operator: two carry-propagate adders + one 2:1 mux |
| `MOD_ADDER2` | 2^b − 1 | `x+y` and `x+y+1` computed in parallel, the carry-out of `x+y` selects |
| `MOD_ADDER3` | 2^b − 1 | end-around carry: `x+y` plus its own carry-out, no mux           |

`MOD_ADDER1` gives standard SEA and is the default. The two `2^b − 1` adders
give a *modified SEA*. The addition sits inside the Feistel function `f`,
which never has to be inverted, so the modified cipher can still be decrypted.
It is a different cipher, though: its ciphertexts differ from SEA's.

The design follows "Efficient Modular Adders for Scalable Encryption
Algorithm" (K.J. Jegadish Kumar, K. Chenna Kesava Reddy, S. Salivahanan, IJCA
vol. 23 no. 4, 2011). That paper builds on the SEA specification by
Standaert et al. (CARDIS 2006) and on the FPGA loop architecture of Macé,
Standaert and Quisquater (IEEE TVLSI 2008). Below, "the paper" means that
2011 article. Where it leaves something open, this RTL follows the SEA
specification or makes its own choice, as noted.

## The cipher, as the hardware sees it

A text block of `n` bits is split into halves `L` (upper) and `R` (lower). Each
half holds `n_b = n/(2b)` words of `b` bits, and `n_b` must be a multiple of 3.
Word `i` occupies bits `[b*i +: b]` of a half. The key is split the same way
into `KL` and `KR`.

With `f(x, k) = r(S(x ⊞ k))`:

```
encrypt round  F_E:  R' = R(L) ^ f(R, K)        L' = R
decrypt round  F_D:  R' = R⁻¹(L ^ f(R, K))      L' = R
key round      F_K:  KR' = KL ^ R(r(S(KR ⊞ C(i))))   KL' = KR
```

* `⊞`: word-wise modular addition, with no carry between words (`sea_mod_add_vec`).
* `S`: for every group of three words `(a, b, c) = (x_3i, x_3i+1, x_3i+2)`, the
  bitsliced S-box `a ^= c&b; b ^= c&a; c ^= a|b; a ^= c&b` (`sea_sbox`).
  Read as a table on `{c, b, a}` bit by bit, this is `{0,5,7,6,4,3,1,2}`.
* `r`: in each group, word `3i` is rotated right by one bit, word `3i+2` left
  by one bit, and word `3i+1` is unchanged (`sea_bit_rot`).
* `R`: word rotation, `y_(i+1) = x_i`, `y_0 = x_(n_b−1)`: the half is rotated
  left by `b` bits. `R⁻¹` is the reverse (`sea_word_rot`).
* `C(i)`: all words zero except word 0, which holds `i`.

Encryption and decryption differ only in where the word rotation sits: before
the XOR with `f`, or after it. `sea_round` builds both wirings and a mode bit
chooses between them. The output block is `R_nr & L_nr`.

The round count is `n_r = 3n/4 + 2(n_b + ⌊b/2⌋)`, rounded up to an odd number
(`sea_pkg::sea_rounds`). For the default SEA₉₆,₈ this is 92 → **93 rounds**.

## Key schedule: Swap, Switch and why decryption reuses it

This is the least obvious part of the design.

The key schedule runs forward alongside the cipher. Let `h = ⌊n_r/2⌋`:

* rounds `1 … h` use key constants `C(1) … C(h)`;
* after round `h`, the two key halves are exchanged (the **switch**);
* rounds `h+1 … n_r−1` use constants counting back down: `C(n_r − i)`.

The cipher round `i` takes `KR_(i−1)` for `i ≤ h+1` and `KL_(i−1)` after that.
Round `h+1` takes `KR_h` as it was *before* the exchange.

Because `F_K` is itself a Feistel round, the second half of the schedule
retraces the first in mirror image: `K_(h+j) = swap(K_(h−j))`. As a result,
the sequence of round keys reads the same forwards and backwards. Decryption
needs the round keys in reverse order, and that is the same order. So a
decryption is an encryption with `F_D` in place of `F_E`, running the *same*
forward key schedule from the *same* key. The core never has to pre-compute
or store a last round key.

In hardware (`sea_top`, `sea_ctrl`) this comes down to two control signals:

* **Swap**, high in round `h`: the key registers take the key-round result
  with its halves exchanged, `{KL, KR} <= {KR', KL'}`.
* **Switch**, high in rounds `h+1 … n_r`: the cipher round takes its key
  from the `KL` register instead of `KR`. Right after the swap, `KL` holds
  the pre-switch `KR_h`, which is exactly the key round `h+1` needs. No extra
  register is required.

The controller also supplies the constant index: `t` for rounds `t ≤ h`, and
`n_r − t` after that.

```
round t      1   2  ...  h-1   h     h+1   h+2  ...  n_r
key used     KR  KR ...  KR    KR    KL    KL   ...  KL     (register read)
C index      1   2  ...  h-1   h     h     h-1  ...  (0)
Swap         0   0  ...  0     1     0     0    ...  0
```

The key round computed in round `n_r` is never used.

## Interface and timing (`sea_top`)

| port       | dir | width | meaning                                                   |
|------------|-----|-------|-----------------------------------------------------------|
| `clk`      | in  | 1     | clock                                                     |
| `rst_n`    | in  | 1     | asynchronous, active-low reset                            |
| `start`    | in  | 1     | load `text_in`, `key_in`, `decrypt` and begin; ignored while `busy` |
| `decrypt`  | in  | 1     | 0 = encrypt, 1 = decrypt                                  |
| `key_in`   | in  | N     | key `KL & KR`                                             |
| `text_in`  | in  | N     | plaintext or ciphertext `L & R`                           |
| `busy`     | out | 1     | rounds in progress                                        |
| `done`     | out | 1     | one-cycle pulse: `text_out` is valid                      |
| `text_out` | out | N     | `R_nr & L_nr`, held until the next `start`                |

The clock edge that sees `start` high (with `busy` low) loads the registers.
Rounds 1 … `NR` are written on the next `NR` edges, so `done` is high in the
cycle after the `NR`-th round edge. One operation therefore takes `NR + 1`
cycles from the start cycle, or 94 at the defaults. The inputs are needed only
in the start cycle.

| parameter | default            | meaning                                            |
|-----------|--------------------|----------------------------------------------------|
| `N`       | 96                 | block and key size `n`; must be a multiple of `6*B` |
| `B`       | 8                  | word size `b` (2 … 16 covered by the testbenches)  |
| `NR`      | `sea_rounds(N, B)` | number of rounds, must be odd                      |
| `ADDER`   | `MOD_ADDER1`       | word adder architecture                            |

The state is `2N` flip-flops (text and key) plus a `⌈log2(NR+1)⌉`-bit round
counter, a mode bit and a `done` flag. The combinational part has two
complete round functions, each with `n_b` word adders and `n_b/3` bitsliced
S-boxes.

## The modular adders

All three are purely combinational and `W` bits wide.

* **`mod_adder1`** implements `(x+y) mod m = x+y` if `x+y < m`, else `x+y−m`.
  The first adder forms `x+y` with its carry. The second subtracts `m` from
  that sum (an addition of `−m` in `W+2` bits). The sign of the difference
  drives the output multiplexer. `M` can be any modulus from 2 to `2^W`, and
  operands must already be below `M`. Inside SEA it is used with `M = 2^b`.
* **`mod_adder2`** adds modulo `2^W − 1`. It forms `x+y` and `x+y+1` side by
  side, and the carry-out of `x+y` picks the second one. A sum of exactly
  `2^W − 1` is *not* folded to zero: all-ones stays as the second encoding of
  zero in one's complement. This saves the logic needed to detect it.
* **`mod_adder3`** computes the same function with one adder and an
  end-around carry: `z = (x+y)[W-1:0] + carry`. The second addition can never
  carry out again. There is no multiplexer.

`mod_adder2` and `mod_adder3` produce bit-identical results for all inputs.
The choice between them only affects area and delay.

## Files

```
rtl/sea_pkg.sv          adder_e enum, sea_rounds() round-count function
rtl/sea_top.sv          loop core: registers, Swap and Switch multiplexers
  rtl/sea_ctrl.sv         round counter, Swap/Switch, constant index, done
  rtl/sea_round.sv        F_E / F_D
  rtl/sea_key_round.sv    F_K
    rtl/sea_mod_add_vec.sv  n_b word adders of the selected architecture
      rtl/mod_adder1.sv / mod_adder2.sv / mod_adder3.sv
    rtl/sea_sbox.sv         bitsliced S-box layer
    rtl/sea_bit_rot.sv      r (wiring)
    rtl/sea_word_rot.sv     R and R⁻¹ (wiring)
tb/sea_ref_pkg.sv       behavioural reference model of SEA (any n, b, adder)
tb/sea_top_driver.sv    reusable stimulus/checker for one sea_top instance
tb/tb_*.sv              one self-checking testbench per module, plus
                        tb_sea_top (defaults) and tb_sea_top_variants
```

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sea_pkg.sv tb/sea_ref_pkg.sv tb/tb_sea_top.sv --top-module tb_sea_top
./obj_dir/Vtb_sea_top
```

Replace `tb_sea_top` with any other testbench name. Each takes well under a
second to simulate.

* `tb_mod_adder1/2/3`: exhaustive over all 8-bit and 4-bit operand pairs.
  `mod_adder1` is also run with the moduli 200 and 13. The 2^b−1 adders are
  checked against the selection rule and for congruence modulo `2^W−1`.
* `tb_sea_mod_add_vec`, `tb_sea_sbox`, `tb_sea_round`, `tb_sea_key_round`:
  random vectors against the reference model, with all three adders.
  `tb_sea_round` also checks that `F_D` undoes `F_E`.
* `tb_sea_ctrl`: cycle-by-cycle Swap, Switch, constant index, `done`, and
  ignored `start`, at 93 and 7 rounds.
* `tb_sea_top`: the core at its default parameters. Eight encrypt/decrypt
  pairs, with ciphertexts compared against the reference model and
  decryption checked to restore the plaintext. It also checks the latency of
  exactly `NR` round edges, output hold, an ignored `start` during an
  operation, and reset in mid-operation. It counts the Swap and Switch events
  and fails if any mechanism never occurred.
* `tb_sea_top_variants`: the same checks for all three adders at SEA₉₆,₈, and
  for SEA₂₄,₄, SEA₄₈,₈, SEA₁₄₄,₈ and SEA₁₉₂,₁₆.

## How far to trust it, and where it departs from the paper

* **No official test vectors.** The paper gives none. The RTL is checked
  against an independently written reference model (table-lookup S-box,
  explicit key list with a literal switch) and by round-trip decryption.
  That shows the hardware computes the algorithm as described above. It does
  not show that the S-box bit order, the bit-rotation directions or the
  round-count formula match published SEA ciphertexts bit for bit. These come
  from the SEA specification, not from the paper. Compare against known-answer
  vectors before using `MOD_ADDER1` as SEA interoperably.
* **Sizes.** The paper evaluates several `(n, b)` pairs but names no main
  one. SEA₉₆,₈ is the default here; every `n` that is a multiple of `6b` is
  supported.
* **Round count.** The paper calls `n_r` an optional input that can be
  derived from `n` and `b`. Here it is a parameter with the derived value as
  its default, not a run-time input.
* **Encrypt and decrypt in one core.** The paper describes the two as
  variants of the loop that differ only in where `R`/`R⁻¹` sits. This core
  builds both and selects them with the `decrypt` input, at the cost of one
  `n/2`-bit multiplexer.
* **Default adder.** The paper compares the three adders and does not name a
  final choice. `MOD_ADDER1` is the default because it keeps the cipher
  standard.
* **Own choices:** the `start`/`busy`/`done` handshake, asynchronous reset,
  bit packing (upper half = `L`/`KL`, word 0 in the least significant
  bits), and reducing the constant `i` modulo `2^b` when `b` is too small
  to hold it (never needed for the advised round counts with `b ≥ 8`).
* **Not reproduced:** the paper's FPGA area and power figures. They come from
  a vendor flow and are not part of the RTL.
