# AES-128 engine built from lookup tables

This is an AES-128 encryption and decryption engine. It runs one full cipher
round per clock cycle, so a 128-bit block takes 10 cycles. Every non-linear
or multiplicative step is a table lookup: SubBytes and InvSubBytes are S-box
ROMs, and MixColumns and InvMixColumns are built from ROMs of constant GF(2^8)
products. The idea is to keep the datapath small and shallow: one round of
table lookups and XORs between two registers. At 10 cycles per block, the
throughput is 12.8 bits per clock. At 292 MHz that is 3.74 Gbit/s.

The engine has two independent paths that share the cipher key input:

* **Encryption path.** It runs in ECB mode, or in output-feedback (OFB)
  mode, which turns the block cipher into a stream cipher. Round keys are
  computed on the fly, next to the rounds (*online key expansion*), so the
  key can change with every block at no cost.
* **Decryption path.** It runs the inverse cipher. Round keys are expanded
  once per key change and kept in a block-RAM style memory (*offline key
  expansion*). This trades an 11-cycle key set-up for a datapath without
  key-expansion logic.

OFB decryption is the same operation as OFB encryption, so it uses the
encryption path.

## Hierarchy

```
aes_top
├── aes_ofb                      OFB / ECB mode control, keystream feedback
│   └── aes_encrypt              iterative encryptor, 10 cycles per block
│       ├── aes_key_round        RotWord, SubWord (4 x aes_sbox), Rcon, XOR chain
│       └── aes_enc_round        16 x aes_sbox, ShiftRows, 4 x aes_mix_column, AddRoundKey
│                                  aes_mix_column: 4 x (gf_mul_rom x2, x3)
└── aes_decrypt                  iterative decryptor, offline key expansion
    ├── aes_key_round            key expansion, one round key per cycle
    ├── aes_key_ram              11 x 128-bit round-key memory, registered read
    └── aes_dec_round            InvShiftRows, 16 x aes_inv_sbox, AddRoundKey,
                                   4 x aes_inv_mix_column (gf_mul_rom x9, x11, x13, x14)
aes_pkg                          types, GF(2^8) helpers, table builders, ShiftRows wiring
```

## The tables

All tables are 256 x 8 constant arrays. They are filled at elaboration time
by functions in `aes_pkg`, so no data file is needed. A synthesis tool turns
them into LUTs or ROMs.

* **S-box** (`aes_sbox`). S(a) = affine(a^-1), where the inverse is taken in
  GF(2^8) modulo x^8+x^4+x^3+x+1 and 0 maps to 0. The affine map is
  s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, with c = 0x63.
  The inverse is computed with exponent and logarithm tables over the
  generator 0x03: inv(3^k) = 3^(255-k). This form keeps the elaboration-time
  work small.
* **Inverse S-box** (`aes_inv_sbox`). It is the inverse permutation of the
  S-box table.
* **Constant multipliers** (`gf_mul_rom`, parameter `MULT`). ROM[a] = MULT·a
  in GF(2^8).
  * One MixColumns column uses x2 and x3 tables for each of its 4 bytes:
    b_i = 2a_i ^ 3a_(i+1) ^ a_(i+2) ^ a_(i+3).
  * One InvMixColumns column uses x9, x11, x13 and x14 tables:
    b_i = 14a_i ^ 11a_(i+1) ^ 13a_(i+2) ^ 9a_(i+3).

Each round has four column units working in parallel, one per column.
The columns are independent, so this splits the 16-byte mixing step into
four 4-byte steps.

Per round datapath, that makes 16 S-boxes plus 32 multiplier tables for
encryption, and 16 inverse S-boxes plus 64 multiplier tables for decryption.
Each key-expansion unit adds 4 more S-boxes.

### State layout

A 128-bit vector holds the state in the byte order of the AES standard.
Byte i is bits `[127-8i -: 8]` and sits at row i mod 4, column i div 4.
Columns are therefore 32-bit words, with column 0 in bits 127:96. A 128-bit
key uses the same layout. FIPS-197 test vectors can be written directly as
hex literals: key `000102…0f` with plaintext `00112233…ff` gives
`69c4e0d8…c55a`.

## Timing of a block

Both cores are a state register, a round-key source and one combinational
round. The trick that gives exactly 10 cycles is to do extra work in the
accepting cycle:

* The encryptor computes `state ← Round1(pt ^ key, k1)`, with k1 derived
  from `key` in the same cycle.
* The decryptor computes `state ← InvRound1(ct ^ k10, k9)`.

The nine remaining rounds take the following nine clock edges. The result is
in the state register after the 10th edge counted from the accept. It is
flagged by a one-cycle `out_valid` pulse.

The core returns to idle in that same cycle, so the next block can be
accepted while the result is being shown:

```
edge     0        1     ...     9        10        ...  19        20
        accept A  rnd2          rnd10    accept B       rnd10     accept C
                                out_valid(A) ↑          out_valid(B) ↑
```

Back to back, the input is taken every 10 cycles. The output register
(`ct` / `pt`) holds its value only until the next block is accepted. A
consumer must take it in the `out_valid` cycle. There is no output
back-pressure.

The longest combinational path runs from the key input through one key
expansion (an S-box and XORs) and then through one full round. If that limits
the clock, the usual fix is to register the key at accept and spend an 11th
cycle. That would change the block time given above.

## Online key expansion (encryptor)

`aes_encrypt` keeps the current round key in a 128-bit register next to the
state. Each cycle the key-round unit turns round key r-1 into round key r
using RotWord, SubWord, the round constant Rcon(r) = x^(r-1) and the XOR
chain w[i] = w[i-1] ^ w[i-4]. The same round uses the new key straight
away, and the register stores it for the next cycle.

The key is sampled only with each block. Every block may therefore use a
different key, and no set-up is ever needed.

## Offline key expansion and key prefetch (decryptor)

Decryption needs the round keys in reverse order, k10 first. The decryptor
therefore expands them ahead of time:

1. **Key load.** `key_valid` starts the expansion. The key is written to
   memory word 0. One new round key is written per cycle to words 1…10.
   After 11 cycles `key_ready` rises. The expansion register keeps k10,
   which is the first key any decryption needs.
   * While the keys are expanding, `in_ready` is low.
   * A key request is ignored while a block is in flight.
2. **Decryption.** `aes_key_ram` has a registered read, like an FPGA block
   RAM: data comes out one cycle after the address. The read address is
   therefore always the key for the *next* cycle:

   | decryptor state                     | read address |
   |-------------------------------------|--------------|
   | idle, no block accepted this cycle  | 9            |
   | idle, block accepted this cycle     | 8            |
   | running, `cnt` rounds done, cnt < 9 | 8 - cnt      |
   | running, last round (cnt = 9)       | 9            |

   Because k9 is waiting on the memory output while the core is idle, the
   accepting cycle can do round 1 without a stall. After the last round the
   address returns to 9 in time for a back-to-back block.

The round itself follows the straight inverse cipher: InvShiftRows,
InvSubBytes, AddRoundKey, then InvMixColumns (skipped in the last round).
This order uses the encryption round keys unchanged, so the memory holds
exactly the keys the encryptor would generate.

## OFB mode and the feedback bypass

With `enc_ofb_en = 1` the encryption path generates a keystream:

* O_1 = E_K(IV)
* O_i = E_K(O_(i-1))
* dout_i = din_i ^ O_i

The keystream never depends on the data. Two consequences:

* The same sequence of operations with the same IV decrypts.
* A bit flipped in a stored or transmitted ciphertext block flips only the
  same bit of the recovered plaintext. Errors do not spread, which suits
  noisy channels.

The opposite holds for faults inside the encryptor. A corrupted keystream
block is fed back, so every later block is wrong as well.

Details of `aes_ofb`:

* **Feedback register.** `fb_q` holds the next cipher input.
  `enc_iv_load` writes the IV into it and restarts the keystream. An IV load
  blocks input for that cycle and wins over the feedback write.
* **Data register.** The data block is stored at accept and XORed with the
  keystream block as it leaves the cipher.
* **Bypass.** To keep OFB at one block per 10 cycles, a block accepted in the
  same cycle as the previous keystream block appears takes that keystream
  block straight from the cipher output. It does not wait for it to reach
  `fb_q`.
* **ECB.** With `enc_ofb_en = 0` the wrapper is a plain ECB encryptor and
  `fb_q` is left unchanged. ECB blocks can therefore be interleaved with an
  OFB stream without breaking it. `enc_ofb_en` is sampled with each block.

## Interfaces (`aes_top`)

All signals are synchronous to `clk`. Reset `rst_n` is active low and
synchronous. All data are 128 bits in the layout above.

| signal                                  | dir | meaning |
|-----------------------------------------|-----|---------|
| `key`                                   | in  | cipher key. The encryption path samples it with every block; the decryption path samples it on `dec_key_load`. |
| `enc_ofb_en`                            | in  | 1 = OFB, 0 = ECB, sampled with each block |
| `enc_iv_load`, `enc_iv`                 | in  | load a new IV; input is held off for that cycle |
| `enc_in_valid`, `enc_in_ready`, `enc_din` | in/out/in | block handshake; the block is taken when valid and ready are both high at a rising edge |
| `enc_out_valid`, `enc_dout`             | out | one-cycle result pulse, 10 cycles after the accept |
| `dec_key_load`                          | in  | one-cycle request to expand `key` (11 cycles) |
| `dec_key_ready`                         | out | round keys are stored; stays high until the next key load |
| `dec_in_valid`, `dec_in_ready`, `dec_din` | in/out/in | ciphertext handshake; ready is low until keys are ready |
| `dec_out_valid`, `dec_dout`             | out | one-cycle plaintext pulse, 10 cycles after the accept |

The cores carry concurrent assertions: `out_valid` is a single-cycle pulse,
and the decryptor accepts no block without stored keys.

## Size and performance

* **Throughput.** One block per 10 cycles on each path, measured back to
  back in simulation. 128 × f / 10 gives 3.74 Gbit/s at 292.4 MHz per path.
* **Flip-flops.** The whole engine has 784 flip-flop bits:
  * 128 state bits in each core;
  * 128 round-key bits in the encryptor and 128 bits of k10 in the
    decryptor;
  * 256 bits of feedback and data in the OFB wrapper;
  * small counters.

  A bare iterative encryptor with its key held elsewhere would need only
  its 128 state bits. The extra bits pay for per-block keys, the mode logic
  and a decryptor that can run at the same time.
* **Memory.** The decryptor's round keys, 11 × 128 bits, sit in memory
  rather than in registers.
* **Tables.** The lookup tables synthesize as ROM or LUT logic.

## Relation to the published FPGA implementation

This RTL follows a published architecture for a Virtex-5 FPGA that was
reported with these figures:

* 10 cycles per encryption;
* a 3.42 ns critical path (292.4 MHz);
* 3.74 Gbit/s;
* 1106 LUTs and 128 slice registers;
* decryption keys in block RAM;
* substitution and mixing steps as LUTs and ROMs;
* OFB mode for noisy links.

What matches, and what could not be confirmed:

* **Matches.** The cycle behaviour (10 cycles per block, back to back), the
  table-based round, the block-RAM key storage, and the OFB behaviour under
  channel errors and internal upsets. All of these are checked in
  simulation.
* **Differs.** The register count. See the flip-flop breakdown above; 128
  registers cannot hold both a state and a round key.
* **Not confirmed.** The clock rate and the LUT count. They depend on the
  device and tools and cannot be confirmed from RTL simulation.
* **Unknown.** How the original split the tables, how its interfaces
  looked, and whether encryption and decryption shared hardware. Those
  parts are this RTL's own (next section).

## Where this design makes its own choices

These points are not fixed by the algorithm or the architecture. They were
chosen here:

* Valid/ready on the inputs, a one-cycle result pulse without back-pressure,
  and the exact 10-cycle latency (round 1 merged into the accepting cycle).
* MixColumns built from one table per coefficient, rather than, for
  example, combined T-tables.
* Table contents computed in SystemVerilog from the field arithmetic,
  rather than listed.
* Separate encryption and decryption datapaths that can run at the same
  time.
* The exact round-key memory (11 words, registered read, read-old-data on a
  same-address collision) and its prefetch schedule.
* The IV-load strobe, and ECB as the non-OFB mode of the encryption path.

## Limits

* Only AES-128 is built (Nk = 4, Nr = 10). AES-192 and AES-256 would need a
  different key-expansion step, a longer round count and a larger key
  memory.
* Of the block-cipher modes, only ECB (both directions) and OFB are built.
  CBC, CFB and CTR are not.
* The `NR` parameter of the cores sets counters and the key-memory depth
  only. AES-128 needs the default of 10.
* Clock rate and FPGA resource figures depend on the target device and
  tools. No timing constraint is part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/` that compares its
outputs with `aes_ref_pkg`. That package is a separate software model of
AES-128. It computes the S-box by exponentiation (a^254), works on
rows and columns directly, and does not use the RTL's helper functions.
The tests also check published FIPS-197 and NIST SP 800-38A values:

* the S-box entries 63, 7c, ed and 16;
* the MixColumns column db135345 → 8e4da1bc;
* the round-1 state of the FIPS-197 worked example;
* the key schedule of 2b7e1516…;
* the two AES-128 example ciphertexts;
* the first two OFB blocks.

| testbench | what it covers |
|-----------|----------------|
| `tb_aes_sbox`, `tb_aes_inv_sbox`, `tb_gf_mul_rom` | all 256 entries of every table |
| `tb_aes_mix_column`, `tb_aes_inv_mix_column` | published column and 4000 random columns |
| `tb_aes_enc_round`, `tb_aes_dec_round` | random rounds, last/non-last; the inverse round undoes the forward steps |
| `tb_aes_key_round` | full published key schedule, random keys and constants |
| `tb_aes_key_ram` | random traffic, read latency, read-old-data collisions |
| `tb_aes_encrypt`, `tb_aes_decrypt` | random blocks and keys; 10-cycle latency; 10-cycle back-to-back spacing; 11-cycle key load with input held off |
| `tb_aes_ofb` | OFB vector, OFB round trips with and without gaps, IV reloads, ECB/OFB switching; counts feedback-bypass uses |
| `tb_aes_top` | both paths at once: ECB ciphertexts decrypted on the decryption path, OFB streams encrypted and decrypted, key reloads. Counts ECB/OFB blocks, bypasses, IV loads, mode switches, key expansions and blocks held off, and fails if any never occurs |
| `tb_ofb_image` | a 500 × 500 pixel, 24-bit image (46,875 blocks, generated from a pixel formula) through OFB. Checks every block and the 468,750-cycle run time. Then decrypts with one ciphertext bit flipped and checks that exactly one bit of the image is wrong. Then flips one bit of the SubBytes input (state byte 3) in round 3 of block 20,000, and checks that every block from then on is wrong and none before it. Finally repeats that check with a one-bit error on byte 7 at the MixColumns input of round 6 of block 40,000 |

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
cycle watchdog. To run one with Verilator 5 (two-state simulation, so every
register that is read is reset):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_top \
    -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv
./obj_dir/Vtb_aes_top
```

`tb_aes_top` takes the parameters `NBLK` (blocks per stream, default 8)
and `NROUND` (key changes, default 4). All RTL parameters stay at their
defaults in every system-level test.
