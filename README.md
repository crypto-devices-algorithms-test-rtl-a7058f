# Self-testing AES-128 and DES crypto-cores

A block cipher such as AES or DES is built in hardware as a loop: a single round circuit is
applied again and again to a state register, 10 times for AES-128 and 16 times for DES. Two
properties of these ciphers make that loop a very good test machine:

* **Diffusion**: every input bit of a round affects many output bits. A fault inside the round
  shows up at its output almost at once, so the round is highly observable.
* **Bijectivity and confusion**: the round output looks random, and feeding it back to the input
  gives a pseudorandom sequence.

Because of this, small changes to the datapath let a crypto-core do three extra jobs without
any visible scan chain. A scan chain would let an attacker read out secret state.

| mode        | what the core does                                                                        |
|-------------|-------------------------------------------------------------------------------------------|
| `MISSION`   | normal encryption                                                                         |
| `SELF_TEST` | loops the round on its own output for a fixed number of encryptions; the final state is a signature to compare with a known-good value |
| `TPG`       | the same loop, with the state copied out on every clock cycle: a 128-bit (AES) or 64-bit (DES) pseudorandom test-pattern generator for other circuits on the chip |
| `ORA`       | each cycle, the response of another circuit is XORed into the loop; at the end the state is a compacted signature (output response analyser) |

This repository holds synthesizable SystemVerilog for both cores, AES-128 and DES, each with all
four modes, plus self-checking testbenches.

## The datapath

```
             din (plaintext / seed / response)
              |                          |
        +-----v------+          SA --> [gate]      (din & SA)
        | Initial Op |                   |
        +-----+------+    R ---------> (XOR)
              |0                         |1
              +----------> [ Select mux ] <-------+
                                |
        Key --> Key Gen --> [  Round  ]
                                |
                              [ R ] ----------> back to the XOR
                                |
                          [ Final Op ]          (DES only)
                                |
                  Write-out -> [ R-out ] ------> r_out
```

Without the grey parts (the SA gate and the XOR), this is an ordinary iterative cipher:

* **Initial Op** prepares the block. For AES it XORs the plaintext with the key. For DES it is
  the initial permutation IP.
* The **Round** is applied once per clock cycle. The state sits in register **R**.
* **Final Op** sits between R and **R-out**. For DES it is the half swap plus IP⁻¹. AES has no
  Final Op, so R-out takes R directly.

The test modes add only:

* **SA gate and XOR** (`bist_input_mux`). Input 1 of the Select mux is
  `R ^ (din & {W{SA}})`. With SA = 0 the XOR passes R through unchanged. That is the feedback
  used in MISSION, SELF_TEST and TPG. With SA = 1 (ORA) one external response is folded into the
  state each cycle.
* **Select**. Select = 0 only in the first round of a run, to load the plaintext, message, seed
  or first response through Initial Op. Select = 1 in every later round. In the looping modes
  this includes the first round of the second, third, … encryption, so the state never leaves
  the loop.
* **Write-out**, the load enable of R-out:
  * MISSION: once at the end.
  * SELF_TEST and ORA: once at the end, plus at every encryption boundary when `diag` is set
    (intermediate signatures).
  * TPG: every cycle, or once per encryption when `diag` is set.
* **A shadow test-key register** (`shadow_key_reg`). It holds the key used in every mode except
  MISSION. The same test key can be used in every chip, so one fault simulation gives one golden
  signature for all of them, while each chip keeps its own secret mission key.
* **Controller changes** (`bist_ctrl`) that sequence the above.

## Key schedules in the looping modes

This is the least obvious part of the design.

**AES.** `aes_key_gen` computes round keys on the fly. Its register holds the previous round key,
and each cycle it produces the next one with the round constant of round `rnd`.

* In MISSION mode it starts from the cipher key at the first round of every encryption.
* In SELF_TEST, TPG and ORA it is loaded only once, at the start of the run. When one encryption
  ends, the tenth round key is treated as the cipher key of the next encryption, and expansion
  goes on from it.

This way the key-expansion logic sees new values throughout a long self-test instead of
repeating ten keys, so its faults are found as well. It also follows that, after the first
encryption of a run, each 10-round block is `AES_K'(x ^ K')` with `K'` the previous tenth round
key. This identity is how the expected signatures were derived.

**DES.** `des_key_gen` is the standard C/D register with 1- or 2-place rotations, PC-1 and PC-2.
It reloads PC-1(key) at round 0 of every encryption. Since the rotations add up to 28 places,
this is the same as letting it run on. In a DES key schedule almost everything is wiring, so
feeding it varied keys gains little. Instead, the last encryption of a SELF_TEST run uses the
**bitwise inverse of the test key**. Every key line is then driven to both values at least once.
`bist_ctrl` raises `key_inv` for that encryption when its `KEY_INV_LAST` parameter is set. The
DES core sets it; the AES core does not.

## Timing and interface of a core

`aes_bist_core` and `des_bist_core` have the same ports. W is 128 for AES and 64 for DES.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all registers to 0, shadow key to `TEST_KEY`) |
| `mode` | in | 2 | `bist_pkg::bist_mode_e`, sampled with `start` |
| `start` | in | 1 | starts a run from idle. `din`, `mode` and (in MISSION) `key` must be valid in this cycle, which computes the first round |
| `stop` | in | 1 | ends a TPG run |
| `diag` | in | 1 | extra R-out writes at encryption boundaries (see above) |
| `din` | in | W | plaintext, self-test message, TPG seed or ORA response |
| `din_valid`, `din_last` | in | 1 | ORA only: a response is present / it is the last one |
| `key` | in | W | mission key; also the write data of the shadow test key |
| `test_key_load` | in | 1 | write `key` into the shadow test-key register |
| `r_out` | out | W | R-out: ciphertext, signature or current pattern |
| `rout_upd` | out | 1 | R-out was written on the previous edge |
| `busy`, `done` | out | 1 | run in progress; pulse when the run has ended and R-out holds its result |

One round is computed per clock cycle. Call the `start` cycle cycle 0.

* **MISSION**: rounds in cycles 0 … NR−1, the R-out write in cycle NR. The ciphertext and
  `done` are visible from cycle NR+1: 11 cycles for AES, 17 for DES. Inputs are needed only in
  cycle 0.
* **SELF_TEST**: `SELFTEST_ENC` encryptions back to back, then one write.
  * AES: 210 × 10 rounds, so `done` at cycle 2101.
  * DES: 25 × 16 rounds, so `done` at cycle 401.
* **TPG**: a new pattern in `r_out` every cycle from cycle 2 on, until `stop`. With `diag` set,
  a new pattern every NR cycles instead.
* **ORA**: `start` carries the first response, then one response per cycle with `din_valid`.
  While `din_valid` is low, R and the key register hold, so responses may arrive with gaps. The
  cycle that has `din_last` absorbs the last response. The signature is in `r_out` two edges
  later, with `done`.

Assertions in `bist_ctrl` check that `din_last` comes only with `din_valid`, and that the round
counter stays inside an encryption.

## Using a core as pattern generator or signature analyser

* **Patterns.** Each bit of `r_out` is a pseudorandom bit stream.
  * For a single scan chain, one bit is enough. The rightmost bit is the natural choice.
  * For many chains, any subset of bits can be used, up to all 128 for AES.
  * In a DES round, the right half of the state becomes the left half one cycle later. The two
    halves are therefore the same stream shifted by one cycle. For several scan chains, use only
    one half. DES R-out goes through IP⁻¹, so the current right half appears at the even bit
    positions `r_out[0], r_out[2], …, r_out[62]`.
* **Signatures.** The ORA signature has m = W bits. If all error patterns are equally likely,
  the probability that a faulty response sequence gives the good signature approaches 2⁻ᵐ. This
  is the same as a MISR of the same width.
* **Self-test length.** The defaults come from fault-simulation results for this scheme:
  25 DES encryptions and 210 AES encryptions, reported as enough for 100 % stuck-at coverage of
  round, key schedule and controller. A coupon-collector bound gives similar numbers. At 99 %
  confidence, exercising every input of a 6-input DES S-box needs about 540 random patterns
  (34 encryptions). Every input of an 8-input AES S-box needs about 2593 (260 encryptions). To
  use those bounds instead, set `SELFTEST_ENC`; the encryption counter is 16 bits wide.

The golden signature depends on the test key, the start message and `SELFTEST_ENC`. It has to
be computed once from a reference model. The comparison of `r_out` with it is left to whatever
reads the core.

## Hierarchy and files

```
crypto_bist_top            both cores side by side; ports prefixed aes_ / des_
├── aes_bist_core
│   ├── bist_ctrl          (NR = 10, KEY_INV_LAST = 0)
│   ├── shadow_key_reg     (W = 128)
│   ├── aes_initial_op     plaintext XOR key
│   ├── bist_input_mux     SA gate, XOR, Select mux
│   ├── aes_key_gen        on-the-fly key expansion, 4 × aes_sbox
│   └── aes_round          SubBytes (16 × aes_sbox), ShiftRows, MixColumns, AddRoundKey
└── des_bist_core
    ├── bist_ctrl          (NR = 16, KEY_INV_LAST = 1)
    ├── shadow_key_reg     (W = 64)
    ├── des_initial_op     IP
    ├── bist_input_mux
    ├── des_key_gen        PC-1, C/D rotations, PC-2
    ├── des_round          Feistel round, 8 × des_sbox
    └── des_final_op       half swap and IP⁻¹
packages: bist_pkg (mode and state enums), aes_pkg (GF(2^8) arithmetic, S-box, rcon),
          des_pkg (FIPS 46 tables and the permutation functions)
```

The AES S-box is computed, not stored. It is the GF(2⁸) inverse (a²⁵⁴), followed by the affine
map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The DES S-boxes and permutations
are the tables of the standard.

Top-level parameters: `AES_SELFTEST_ENC` (210), `DES_SELFTEST_ENC` (25), `AES_TEST_KEY` and
`DES_TEST_KEY`. The test keys default to the well-known example keys of FIPS 197 and of the
classic DES worked example. In a product they would be chosen once for all chips.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example, the
end-to-end test at the default parameters:

```
verilator --binary --timing --assert -y rtl \
    rtl/bist_pkg.sv rtl/aes_pkg.sv rtl/des_pkg.sv \
    tb/crypto_bist_top_tb.sv --top-module crypto_bist_top_tb
./obj_dir/Vcrypto_bist_top_tb
```

Replace the testbench name to run any other one: `<module>_tb` for each module.

What the testbenches establish:

* **Leaf blocks.** Each is checked against standard examples and against vectors from an
  independent reference model:
  * the whole AES S-box;
  * all 512 DES S-box entries;
  * AES round 1 of the FIPS 197 example, and the FIPS 197 key expansion including w[40..43];
  * the round key and IP of the DES worked example.
* **Cores** (`aes_bist_core_tb`, `des_bist_core_tb`):
  * MISSION known-answer vectors, with the latency checked;
  * all 210 / 25 intermediate self-test signatures;
  * 35 / 53 consecutive TPG patterns, and per-encryption TPG patterns with their cycle
    positions;
  * an ORA run with random gaps in `din_valid`;
  * a reload of the test key.
* **Top** (`crypto_bist_top_tb`). Both cores run concurrently in MISSION and SELF_TEST. The AES
  core in TPG mode drives a small stand-in circuit under test. The DES core in ORA mode compacts
  that circuit's responses, with held-back cycles. The testbench counts each mechanism (mission
  runs, self-tests, inverted-key rounds, intermediate writes, TPG patterns, ORA stalls,
  signatures, test-key loads, per-encryption patterns) and fails if any of them never happens.
* **Workloads.**
  * `tpg_randomness_tb` runs both generators for 1,500,000 patterns. On the fly it applies the
    NIST SP 800-22 frequency test, at significance 0.01, to:
    * the rightmost AES bit;
    * each of the 128 AES bit streams;
    * the concatenated AES vectors;
    * the 32 DES right-half streams.

    It also applies the runs test to the rightmost AES bit. All streams pass. This takes about
    40 s.
  * `selftest_length_tb` runs the self-test at the coupon-collector lengths instead of the
    defaults: 28 and 34 DES encryptions, 240 and 260 AES encryptions. It checks the signatures
    and the cycle counts.
  * `ora_aliasing_tb` compacts 200-response sequences on both cores. It does so once fault-free,
    then 300 times with 1 to 4 corrupted responses. No faulty sequence gives the good signature.

The expected values come from a round-level model of both cores. Its full encryptions were
checked against a library AES and DES. For the AES self-test chain they were also checked
through the identity given under "Key schedules in the looping modes".

## What follows the published scheme, and what was chosen here

Taken from the scheme:

* the datapath loop with SA gate, XOR and Select mux, and their settings in each mode;
* R-out loaded every cycle in TPG;
* intermediate signatures through Write-out;
* the tenth AES round key as the next primary key in the looping modes;
* the inverted DES key in the last self-test encryption;
* a shadow register for a common test key;
* the round counts, data widths, self-test lengths, and one round per cycle.

Chosen here, because the scheme leaves them open:

* the gate in front of the XOR is an AND with SA;
* the start/stop/`din_valid`/`din_last` handshake and the mode encoding;
* the first ORA cycle goes through Initial Op (Select = 0), like the first round of every other
  mode, so R needs no separate clear;
* the self-test length is a parameter, not a run-time input;
* asynchronous reset, and the reset value and write port of the shadow key register;
* the S-box implementations;
* the AES key schedule computed on the fly rather than stored;
* the DES Final Op applied in every mode, including TPG;
* the test-key values;
* `diag` also selects one TPG pattern per encryption.

Not included:

* decryption;
* the golden-signature comparator;
* the circuits under test and their scan chains;
* the baselines the scheme was compared with (LFSR generator, MISR, BILBO).

The area figures reported for the scheme (about 6 % for DES, 3 % for AES, in a 350 nm library)
were not reproduced here.
