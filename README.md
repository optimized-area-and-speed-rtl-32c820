# AES-128 crypto core with logic built-in self-test

An AES-128 engine is a hard block to test from outside. Its S-boxes, MixColumns network and key
schedule scatter every input bit over the whole block within two rounds. As a result a stuck-at
fault deep inside shows up only as "wrong ciphertext", and only when a pattern happens to
exercise it. This design puts the test inside the chip, as logic built-in self-test (LBIST):

* a **test pattern generator**: a 128-bit maximal-length LFSR that steps through all
  2^128 - 1 non-zero words;
* the **circuit under test**: an AES-128 core that encrypts and decrypts. A second, identical
  core computes the result that should appear, the *reference*;
* an **output response analyser**: 128 XOR gates per direction compare the CUT with the
  reference and raise a fault flag. A multiple-input signature register (MISR) per direction
  also folds every CUT response into a 128-bit signature.

In mission mode the same hardware is an ordinary AES-128 engine. It encrypts one block and
decrypts another in every clock cycle.

```
                 ctrl                              +-------------------- ORA ---------------------+
  +--------+      |      +-----------------+ out1  |  +-------------+                             |
  |  LFSR  |-pattern->mux-> u_cut           |------>|->| ora_compare |-> faulten                   |
  | 128 b  |      |  ^   | aes128_core     | out2  |  |  (128 XOR)  |                             |
  +--------+      |  |   |  (practical)    |------>|->| ora_compare |-> faultde                   |
                  |  |   +-----------------+       |  +-------------+                             |
  input_encrypt --+--+   +-----------------+out1_f |        ^                                     |
  input_decrypt   |      | u_ref           |------>|--------+      misr(out1) -> sig_en          |
  input_key       +----->| aes128_core     |out2_f |               misr(out2) -> sig_de          |
                         |  (reference)    |------>|                                             |
                         +-----------------+       +---------------------------------------------+
```

## The AES datapath

`aes128_core` holds one key schedule (`aes_key_expansion`) and two fully unrolled datapaths,
`aes_encrypt` and `aes_decrypt`. Both datapaths read the same 11 round keys. Nothing inside is
clocked, so the core turns a block into its result within one clock period.

* **Encryption**: AddRoundKey(k0), then rounds 1 to 9 (SubBytes, ShiftRows, MixColumns,
  AddRoundKey(kj)), then round 10 (SubBytes, ShiftRows, AddRoundKey(k10)). Each round is a
  separate hardware copy of the four step modules.
* **Decryption**: AddRoundKey(k10), then for j = 9 down to 0: InvShiftRows, InvSubBytes,
  AddRoundKey(kj), and InvMixColumns unless j = 0. This is the straightforward inverse
  cipher, not the "equivalent inverse cipher", so no round keys need changing.
* **Key schedule**: all 44 words are produced at once. Round key j sits in
  `round_keys[1407-128*j -: 128]`. The round constants are generated by repeated doubling in
  GF(2^8).

Byte order is that of FIPS-197. The first byte of a block is bits `[127:120]`. Byte k of the
block is state row `k % 4`, column `k / 4`.

### S-boxes without a typed-in table

`aes_pkg` builds `SBOX` and `INV_SBOX` at elaboration from their mathematical definition.
Walking the 255 powers of the generator 03 gives every inverse: if a = 03^e, then
a^-1 = 03^(255-e). Each inverse then passes through the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse S-box is the
forward table inverted. For a synthesiser each lookup is a 256 x 8 constant ROM, so the
datapath holds 160 S-box ROMs for encryption, 160 for decryption and 40 for the key schedule.

### MixColumns with shared terms

MixColumns is the step this design is built to make cheap. The textbook form multiplies each
column a0..a3 by the circulant matrix (02 03 01 01), which needs a doubling (`xtime`) and an
extra XOR for every 03 coefficient. Because 03·x = 02·x ^ x, each output can be rewritten as:

```
t   = a0 ^ a1 ^ a2 ^ a3                      (shared by the whole column)
b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1))         (indices mod 4)
```

A column then costs one shared 4-input sum, four pair sums, four `xtime` operations and two
XORs per output byte. An `xtime` is a shift plus three conditional bit flips. The critical path
is three XOR levels plus the `xtime` reduction.

The inverse matrix (0e 0b 0d 09) equals the forward matrix times the circulant
(05 00 04 00). `aes_inv_mix_columns` therefore first computes
`u = 04·(a0^a2)` and `v = 04·(a1^a3)`, XORs u into bytes 0 and 2 and v into bytes 1 and 3,
and then reuses the forward `aes_mix_columns` network. The inverse costs only four extra
doublings and four byte XORs per column over the forward step.

Both forms are this design's own choice of an area- and depth-reduced MixColumns. They compute
exactly the standard transformation and pass the FIPS-197 worked example.

## Self-test operation

`lbist_top` has two modes, selected by `ctrl`:

| `ctrl` | Name | Data, ciphertext and key of both cores | LFSR | MISRs |
|---|---|---|---|---|
| 1 | self-test | the current LFSR word (the same word for all three) | steps every cycle | compact `out1` / `out2` |
| 0 | mission | `input_encrypt`, `input_decrypt`, `input_key` | holds | hold |

Timing, with one register stage after the combinational cores:

* At clock edge n the results for the stimulus that was present before edge n are captured.
  These are `out1`/`out2` from the CUT and `out1_f`/`out2_f` from the reference. The latency
  is one cycle, and the throughput is one block per direction per cycle.
* `faulten` (= OR of `out1 ^ out1_f`) and `faultde` (= OR of `out2 ^ out2_f`) are
  combinational from those registers. They are meaningful while `valid` is 1, which is from
  the first edge after reset.
* The MISRs compact the registered responses one edge later, and only in cycles whose
  response came from self-test. At the end of a run, `sig_en` and `sig_de` stand for the whole
  response sequence. Comparing them with a golden signature catches a fault in a way that
  does not depend on the reference core.
* Reset (`rst_n`) is synchronous and active low. It loads the LFSR with 1, clears the MISRs
  and output registers and drops `valid`.

The LFSR and MISR both use the primitive polynomial x^128 + x^126 + x^101 + x^99 + 1. The LFSR
shifts left and feeds back into bit 0. The MISR does the same shift and XORs the 128-bit
response word in parallel. Starting from seed 1, the first ~100 patterns are mostly zeros,
since the non-zero bits take 128 steps to fill the register. Change `SEED` on the `lfsr`
instance if faster coverage at the start matters.

`fault_inject[0]` flips bit 0 of the CUT ciphertext before its register, and
`fault_inject[1]` flips bit 0 of the CUT plaintext. This emulates a defect so the analyser
and the signatures can be shown to react. Tie both bits to 0 in a product.

`lbist_top` asserts that the key schedules of the two cores always agree (`a_keys_agree`).

## How far the design follows its description, and where it departs

Taken from the original description of the scheme:

* the three-part LFSR / AES / ORA structure;
* the 128-bit LFSR with 2^128 - 1 patterns;
* AES-128 with 10 rounds, unrolled as one hardware round per AES round;
* the ORA comparing a "practical" and a "theoretical" result with 128 XOR gates;
* the MISR inside the ORA;
* the port and signal names (`ctrl`, `out1`, `out1_f`, `faulten`, `input_encrypt`,
  `out_keys`, ...).

This design's own choices, where the description gives no details:

* the LFSR taps and seed, and the MISR polynomial and reset value;
* the meaning of `ctrl`, the active-low synchronous reset, and the single register stage;
* using one LFSR word as plaintext, ciphertext and key at the same time;
* the shared-XOR MixColumns and the factorised InvMixColumns;
* one key schedule shared by encryption and decryption;
* the fault-inject hook.

Not built:

* **192- and 256-bit keys.** They are mentioned as possible extensions only; `NR_P` exists on
  the round modules, but the key schedule is AES-128's.
* **A low-transition (bit-swapping) pattern generator, scan-chain reordering and a secure scan
  path.** They are named as goals but not specified; the generator here is a plain LFSR and
  there is no scan chain.
* **A third self-test mode.** It is mentioned but never described.
* **Any speed or area figure.** The design has no timing results of its own. The unrolled,
  unpipelined datapath is a deep combinational path: the key schedule's ten S-box steps feed
  ten rounds in series, in each direction. Expect a slow clock unless registers are added
  between rounds.

## Files

| Module | Role |
|---|---|
| `aes_pkg` | types, `xtime`, computed `SBOX` / `INV_SBOX`, `NR` |
| `aes_sub_bytes`, `aes_inv_sub_bytes` | 16 S-box lookups |
| `aes_shift_rows`, `aes_inv_shift_rows` | byte permutations |
| `aes_mix_columns`, `aes_inv_mix_columns` | column mixing, described above |
| `aes_add_round_key` | 128-bit XOR |
| `aes_key_expansion` | 11 round keys at once |
| `aes_encrypt`, `aes_decrypt` | unrolled ciphers |
| `aes128_core` | key schedule plus both ciphers |
| `lfsr`, `misr`, `ora_compare` | self-test resources |
| `lbist_top` | the complete device |

Every module has a self-checking testbench `tb/tb_<module>.sv`. Expected values come from
`tb/aes_model_pkg.sv`, a behavioural AES written independently of the RTL: its S-box comes
from a brute-force inverse search, and its MixColumns is a direct matrix product. The
testbenches also use the FIPS-197 worked examples (Appendix B, C.1 and the A.1 key schedule).
`tb_lbist_top` runs the complete device at its real size:

* mission mode with known answers and random blocks;
* a 300-pattern self-test;
* mode switches in both directions;
* injected faults in both directions.

It checks every output in every cycle against a cycle-level model, including the LFSR sequence
and both signatures. It also counts that each mechanism (self-test, mission, mode switch, MISR
compaction, encryption fault, decryption fault) occurred. Every testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_model_pkg.sv tb/tb_lbist_top.sv --top-module tb_lbist_top
obj_dir/Vtb_lbist_top
```

Replace `tb_lbist_top` with any other testbench name to test one block. Each build takes
seconds to a minute, and each run takes well under a second.
