# Iterative AES crypto-chip for IoT devices

This is a small AES (FIPS-197) block-cipher engine meant for resource- and
energy-constrained IoT nodes. It encrypts and decrypts 128-bit blocks. One
round datapath is reused for every round, one round per clock. The cipher key
is expanded once into a round-key store, and then any number of blocks can be
processed under it. The default build is AES-128: 10 rounds, and a result 11
clocks after a block is taken. The same RTL builds for 192- and 256-bit keys
through one parameter.

The design targets low area and few clock cycles per block. The
S-boxes are plain 256-entry lookup tables. No pipelining is attempted.

## Block diagram

```
            key_load, key                          in_valid/in_ready, in_decrypt, in_data
                 |                                              |
      +----------v-----------+   rk_index (4b)       +----------v-----------------------+
      |  aes_key_expansion   |<----------------------|            aes_core               |
      |  key register +      |   round_key (128b)    |  state register, round counter,   |
      |  schedule (1 word/clk)|--------------------->|  IDLE -> RUN (Nr clk) -> DONE     |
      |  round-key store     |                       |        +-------------+            |
      |  4 x aes_sbox        |                       |        |  aes_round  |            |
      +----------------------+                       |        +-------------+            |
                                                     +----------+------------------------+
                                                                |
                                                    out_valid/out_ready, out_data
```

`aes_round` contains two transform chains side by side:

```
encrypt: aes_sub_bytes -> aes_shift_rows -> aes_mix_columns* -> aes_add_round_key
decrypt: aes_shift_rows(inv) -> aes_sub_bytes(inv) -> aes_add_round_key -> aes_mix_columns(inv)*
                                               (* skipped in the final round)
```

`aes_sub_bytes` is sixteen `aes_sbox` lookups. All types, sizes and the
table-building functions live in `aes_pkg`.

## The state and its byte order

All blocks, keys and round keys are plain bit vectors whose most significant
byte comes first:

* state byte 0 is `data[127:120]` and state byte 15 is `data[7:0]`;
* the 16 bytes fill the 4x4 state matrix column by column, so byte `n` is in
  row `n % 4` and column `n / 4`;
* key word 0 is `key[KEY_BITS-1 -: 32]`.

This is the FIPS-197 convention. A test vector written as a hex string maps
straight onto the port: for example, `128'h3243f6a8885a308d313198a2e0370734`
is the Appendix B plaintext.

## One round per clock

`aes_core` holds the state in one 128-bit register and has three states:

| state | what happens |
|-------|--------------|
| IDLE  | `in_ready = key_ready`. When a block is taken, the initial AddRoundKey is applied in that same clock. It uses round key 0 to encrypt and round key Nr to decrypt. The result goes into the state register. |
| RUN   | Each clock applies `aes_round` once and increments the round counter `r = 1..Nr`. Encryption uses round key `r`. Decryption uses round key `Nr - r`. Round `Nr` is the final round, which leaves out (Inv)MixColumns. |
| DONE  | `out_valid` is high and `out_data` holds the result until `out_ready`. |

The round-key store has a combinational read port. In IDLE, the core drives
`rk_index` from `in_decrypt` (0 or Nr), so the initial key XOR needs no extra
clock.

Decryption uses the straightforward inverse cipher, not the "equivalent
inverse cipher". The round keys are used as stored, in reverse order, so the
same store serves both directions. The price is that the decrypt chain puts
InvMixColumns after AddRoundKey. That gives a different operator order from
the encrypt chain, and so two separate chains with a 128-bit multiplexer.
This implementation does not share logic between the forward and inverse
transforms.

The state register is written only when a block is taken or while rounds are
running. It holds its value at all other times, which keeps switching activity
low when the engine is idle.

## S-box tables

Each `aes_sbox` is a constant 256-byte table addressed by the input byte: the
high nibble picks the row, the low nibble the column. The table is computed
at elaboration by `aes_pkg::gen_sbox()`, so no numbers are pasted into the
source:

* `exp[k] = 03^k` and `log[03^k] = k` are built by repeated multiplication by
  `{03}` in GF(2^8) modulo `x^8+x^4+x^3+x+1`;
* `inv(x) = exp[255 - log[x]]`, with `inv(0) = 0`;
* `S(x) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63` with
  `b = inv(x)`. In the RTL this is written bit by bit as
  `s[j] = b[j]^b[j+4]^b[j+5]^b[j+6]^b[j+7]` (indices mod 8).

The inverse table (`INVERSE=1`) is the forward table read backwards. The
design has 36 tables in total: 16 forward and 16 inverse in the round, and 4
forward in the key schedule for SubWord. Synthesis sees them as ROMs or LUT
logic.

## Key schedule and round-key store

`aes_key_expansion` takes `key_load` and writes the key into the first `Nk`
words of a `4*(Nr+1)`-word store. That part of the store is the key register.
It then generates one word per clock:

```
temp = w[i-1]
if (i mod Nk == 0)              temp = SubWord(RotWord(temp)) ^ {Rcon, 24'h0}
else if (Nk > 6 && i mod Nk == 4) temp = SubWord(temp)
w[i] = w[i-Nk] ^ temp
```

`Rcon` starts at `01` and is doubled in GF(2^8) after each use. A new key
costs `4*(Nr+1) - Nk` clocks: 40, 46 and 52 for 128-, 192- and 256-bit keys.
`key_ready` is low during this time. All round keys stay in the store until
the next key load, so blocks that follow pay nothing for key expansion.

## Interface and timing (`aes_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `key_load` | in | 1 | one-clock strobe: expand `key` |
| `key` | in | KEY_BITS | cipher key |
| `key_ready` | out | 1 | round keys valid |
| `in_valid` / `in_ready` | in / out | 1 | a block is taken when both are high |
| `in_decrypt` | in | 1 | 0 encrypt, 1 decrypt (sampled with the block) |
| `in_data` | in | 128 | plaintext or ciphertext |
| `out_valid` / `out_ready` | out / in | 1 | the result is handed over when both are high |
| `out_data` | out | 128 | result, stable while `out_valid && !out_ready` |
| `busy` | out | 1 | key expansion or rounds in progress |

The rules:

* `in_ready` is low when there are no round keys, while a block is in the
  core (RUN or DONE), and in any clock where `key_load` is taken. A key load
  in the same clock as a block wins, and the block waits.
* A `key_load` arriving while a block is in its rounds is ignored. The
  running block finishes with the key it started with. Reload the key after
  `out_valid`.
* Timing from the rising edge that takes the block: `out_valid` is high after
  Nr+1 edges. That is 11 edges for AES-128, 13 for AES-192 and 15 for
  AES-256. The next block can be taken in the clock after the hand-over, so a
  stream runs at Nr+2 clocks per 128-bit block: 12 clocks at AES-128.
* After reset, nothing is accepted until a key has been loaded.

A parameter sets the key size:

| KEY_BITS | Nk | Nr | round-key words | key expansion | block latency |
|----------|----|----|-----------------|---------------|---------------|
| 128 (default) | 4 | 10 | 44 | 40 clk | 11 clk |
| 192 | 6 | 12 | 52 | 46 clk | 13 clk |
| 256 | 8 | 14 | 60 | 52 clk | 15 clk |

The key size is fixed when the design is built. It cannot be switched at run
time.

## What follows the published design and what is this implementation's own

The following come straight from the AES design this RTL implements:

* 128-bit blocks and a 4x4 byte state;
* the four round transforms and their definitions;
* Nr = 10/12/14 for Nk = 4/6/8;
* Nr+1 round keys built with RotWord, SubWord and Rcon;
* the key held in a register;
* S-box substitution by lookup table;
* one datapath for both encryption and decryption;
* AES-128 as the main configuration.

The following are choices made here, because the published description does
not specify them:

* one round per clock, and a key schedule that makes one word per clock into
  a full round-key store;
* the straightforward inverse cipher for decryption, with separate encrypt
  and decrypt chains;
* the valid/ready handshakes, the ignored `key_load` during rounds, and the
  rule that a key load wins over a block in the same clock;
* asynchronous active-low reset;
* the FIPS-197 byte order on the ports;
* a key size fixed by parameter rather than selected at run time;
* S-box tables computed at elaboration rather than typed in.

The published implementation reports 4,635 LUTs and a 6.548 ns critical path
(about 152.7 MHz) on a Virtex-7 FPGA. This RTL has not been mapped to that
device, so those figures are not claimed for it. The critical path here is one
full round plus the combinational round-key read: S-box lookup, two XOR
levels of MixColumns, the key XOR and the final multiplexer.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/aes_ref_pkg.sv`. That package is a separate reference model: it finds
the S-box inverse by brute-force search, and it runs the cipher and key
schedule step by step on byte arrays. The tests also check published FIPS-197
vectors:

* the Appendix A key schedules for all three key sizes;
* the Appendix B round-1 intermediate states;
* the Appendix B block;
* the Appendix C.1, C.2 and C.3 known answers.

| testbench | covers |
|-----------|--------|
| `tb_aes_sbox` | all 256 forward and inverse entries |
| `tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`, `tb_aes_add_round_key` | each transform and its inverse, on FIPS states and random states, including round trips |
| `tb_aes_round` | all four round variants |
| `tb_aes_key_expansion` | 128/192/256 schedules, every round key, expansion clock count |
| `tb_aes_core` | core with a behavioural key store: known answers, random enc/dec, latency, hold-off, result holding |
| `tb_aes_top` | whole chip at its default size, see below |
| `tb_aes_top_keysizes` | whole chip built for 192- and 256-bit keys, FIPS C.2/C.3 and random blocks |

`tb_aes_top` runs the default AES-128 chip end to end. It covers the FIPS
vectors and random blocks under several keys. It also counts each mechanism
and fails if any of them never happens:

* a key expansion;
* encryption and decryption;
* a block waiting for keys;
* a block waiting for the core;
* output backpressure;
* a refused key load;
* a key load that wins over a block in the same clock.

`aes_core` contains assertions for the output handshake (result stable until
taken) and for the round-counter range.

## Simulating and changing it

Each testbench is a top of its own. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Other modules are found through `-Irtl` by file name: each file holds one
module or package with the same name. Replace `tb_aes_top` with any other
testbench name to run that test.

To build for a longer key, set `KEY_BITS` on `aes_top` to 192 or 256. The key
schedule asserts at elaboration that the value is legal.

The two places most likely to be changed are these:

* `aes_round`, to share logic between the encrypt and decrypt chains, or to
  switch to the equivalent inverse cipher. That would need InvMixColumns
  applied to the stored round keys.
* `aes_core`, to overlap the hand-over with the next block's take, which
  would give Nr+1 clocks per block.
