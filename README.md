# Triple-DES block cipher in SystemVerilog

This is a hardware Triple-DES (TDEA) engine. It encrypts or decrypts one
64-bit block per clock. Three full single-DES cores sit in a row:

- encrypting runs DES-encrypt with `key1`, then DES-decrypt with `key2`, then DES-encrypt with `key3` (EDE);
- decrypting runs the same path backwards: decrypt with `key3`, encrypt with `key2`, decrypt with `key1`.

Each DES core has all 16 Feistel rounds unrolled, so a block passes through
all 48 rounds in three clock cycles.

DES is old, and single DES is breakable by brute force. Triple-DES stretches
the key without a new cipher. With `key1 = key3` you get the two-key variant,
which has an effective strength of 112 bits. With `key1 = key2 = key3` the
first two passes cancel, and the engine behaves exactly like single DES, so it
still works with old single-DES peers.

## The DES core (`des_core`)

A single DES core works like this:

1. **Initial permutation (IP).** The 64-bit input is reordered, then split into two 32-bit halves, L0 and R0.
2. **Sixteen rounds (`des_round`).** Round *n* computes
   `L[n] = R[n-1]` and `R[n] = L[n-1] XOR f(R[n-1], K[n])`.
   The round function *f* works in four steps:
   - it expands R from 32 to 48 bits with table E, which repeats the edge bits of each 4-bit group;
   - it XORs the result with the 48-bit subkey;
   - it feeds each 6-bit slice to its own S-box. The slice's first and last bits pick one of four rows, and the middle four bits pick one of sixteen columns. Each S-box returns 4 bits;
   - it permutes the 32 S-box output bits with table P.
3. **Swap and inverse permutation.** After round 16 the halves are put back in swapped order (`R16 L16`). The inverse permutation IP⁻¹ then gives the result.

The core decrypts with exactly the same datapath. Only the order of the
subkeys changes: K16 goes to the first round and K1 to the last.

All 16 rounds are combinational. One 64-bit output register, loaded when
`enable` is high, closes the core. The latency is one clock, and a new block
can enter every clock. This is the longest logic path in the design: IP, then
16 × (E, XOR, S-box, P, XOR), then IP⁻¹.

### Key schedule (`des_key_schedule`)

The subkeys are built in three steps:

- **PC-1.** Permuted choice 1 drops the eight parity bits (bits 8, 16, …, 64) of the 64-bit key. It arranges the other 56 bits into two 28-bit halves, C and D.
- **Rotation.** Before each round, C and D are rotated left by 1 or 2 places:

  | round    | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
  |----------|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|----|
  | rotation | 1 | 1 | 2 | 2 | 2 | 2 | 2 | 2 | 1 | 2  | 2  | 2  | 2  | 2  | 2  | 1  |

  The rotations add up to 28, so after round 16 C and D are back where they started.
- **PC-2.** Permuted choice 2 picks 48 of the 56 bits as subkey K[n].

All sixteen subkeys exist at the same time, because the rounds are unrolled.
In silicon the rotations and permutations are only wiring. The only real logic
is a 2:1 multiplexer per round that picks between forward and reverse order.

### Bit numbering

All tables use the DES convention: bit 1 is the left-most (most significant)
bit. An *n*-bit SystemVerilog vector `v[n-1:0]` holds DES bit *b* in
`v[n-b]`. Keys and blocks are written as in the usual hex test vectors. For
example, key `0123456789ABCDEF` with plaintext `4E6F772069732074` ("Now is t")
encrypts to `3FA40E8A984D4815`.

## The Triple-DES pipeline (`tdes_top`)

```
            encrypt=1: E(key1)          D(key2)           E(key3)
data_in ──► des_core #1 ──reg──► des_core #2 ──reg──► des_core #3 ──reg──► data_out
            encrypt=0: D(key3)          E(key2)           D(key1)
```

The three stages work as a three-stage pipeline:

- Each stage starts when the stage before it signals valid.
- The `encrypt` bit moves down the pipeline with its block. Stage 2 runs in the opposite direction from that bit. Stages 1 and 3 pick `key1` or `key3` from it.
- A block taken at a rising edge with `enable` high appears on `data_out` three cycles later. `out_valid` is high for that one cycle.
- Blocks can follow each other every clock, and each one may go in a different direction.

There are two limits:

- **Keys are not pipelined.** `key1`–`key3` must stay constant while blocks are in flight, which is three cycles after the last `enable`. Change keys only when the pipeline is empty.
- **Reset drops blocks.** Blocks in flight when `rst` is asserted are lost. The outputs go to zero.

### Ports

| port | width | direction | meaning |
|------|-------|-----------|---------|
| `clk` | 1 | in | clock |
| `rst` | 1 | in | synchronous reset, active high; clears all output registers and valid flags |
| `enable` | 1 | in | take `data_in` at this rising edge |
| `encrypt` | 1 | in | 1 = encrypt, 0 = decrypt |
| `key1`, `key2`, `key3` | 64 each | in | DES keys. Parity bits (8, 16, …, 64) are ignored |
| `data_in` | 64 | in | plaintext or ciphertext block |
| `data_out` | 64 | out | result. Holds its value between results |
| `out_valid` | 1 | out | `data_out` carries a new result this cycle |

Without `out_valid`, these are the pins of the original chip: three 64-bit
keys, a 64-bit input, a 64-bit output, clock, enable, encrypt and reset. The
chip also had supply pins. `out_valid` is an addition of this implementation.
Because the latency is fixed at three cycles, a system can ignore it.

An assertion in `tdes_top` checks that every accepted block reaches the
output exactly three cycles later.

## Files

| file | contents |
|------|----------|
| `rtl/des_pkg.sv` | types, table constants (IP, IP⁻¹, E, P, PC-1, PC-2, rotations, S1–S8) and the functions that apply the bit tables |
| `rtl/des_sbox.sv` | one S-box (`INDEX` 1–8) |
| `rtl/des_round.sv` | one Feistel round |
| `rtl/des_key_schedule.sv` | 16 subkeys in encryption or decryption order |
| `rtl/des_core.sv` | single DES, 16 rounds, output register |
| `rtl/tdes_top.sv` | Triple-DES top, three cores |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_des_tables` for the bit tables of `des_pkg` |

None of the modules has a size parameter. DES fixes every width.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Expected values come from an
independent software implementation of DES and Triple-DES (OpenSSL), and from
the published DES examples. No testbench takes its expected values from the
RTL's own tables.

- `tb_des_tables` checks each bit table against a description that does not use the table:
  - the closed-form rule of IP;
  - IP⁻¹(IP(x)) = x;
  - the neighbour rule of E;
  - P is a bijection;
  - PC-1 and PC-2 drop the right bits;
  - single known entries, such as key bit 30 becoming bit 41 after PC-1.
- `tb_des_sbox` checks that every S-box row is a permutation of 0–15, plus known entries such as S1(011011) = 0101.
- `tb_des_round` checks one round against reference vectors. These include round 1 of the classic worked example (key `133457799BBCDFF1`).
- `tb_des_key_schedule` checks all 16 subkeys for three keys, in both orders. It also checks that the parity bits have no effect.
- `tb_des_core` covers:
  - 15 known-answer vectors, including the two "Now is the time" blocks, each encrypted and then decrypted;
  - the one-cycle latency;
  - back-to-back blocks in alternating directions;
  - the hold behaviour with `enable` low;
  - reset.
- `tb_tdes_top` runs the whole design at its only size. A scoreboard checks every output value, the output order and the three-cycle latency. The test runs:
  - single-DES compatibility (three equal keys);
  - a 24-digit payment record (customer number, card number, expiry date), as three ASCII blocks, encrypted and decrypted with three independent keys;
  - the published Triple-DES example block "The qufck" → `A826FD8CE53B855F`;
  - ten random key sets.

  It counts each mechanism and fails if any never happens:
  - encryption and decryption;
  - back-to-back blocks;
  - a change of direction between blocks in flight;
  - a pause with blocks in flight;
  - a reset that drops blocks in flight.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/des_pkg.sv tb/tb_tdes_top.sv --top-module tb_tdes_top
./obj_dir/Vtb_tdes_top
```

The other testbenches work the same way. Each one runs in well under a second
of simulation time.

## How far this follows the original design, and where it departs

These parts follow the original design:

- the DES algorithm and all its tables;
- the unrolled structure of 16 round instances per DES core;
- the enable, encrypt/decrypt and reset inputs;
- the use of three DES instances for Triple-DES.

These parts are choices of this implementation, because the original does not
specify them:

- **Registers.** There is one output register per DES core, so the whole engine is a three-stage pipeline. The original says only that Triple-DES is slower than single DES.
- **Reset.** The reset is synchronous and active high.
- **Direction pin.** `encrypt = 1` means encrypt.
- **Keys in Triple-DES.** Triple-DES uses three independent keys in E-D-E order. The original describes the scheme both with two keys (K1, K2, K1) and with three keys. The three-key form covers both: set `key3 = key1` for the two-key form.
- **Decryption order.** Decryption is the exact inverse: D(key3) E(key2) D(key1).
- **Key stability.** Keys must be held while blocks are in flight.
- **Valid flags.** The `out_valid` and per-core `valid` outputs are added.
- **S-boxes 2–8.** The original prints only S-box 1. S-boxes 2–8 are the standard FIPS 46-3 tables. The full-cipher known-answer tests pass with them.
- **Corrected test vector.** The original's expected ciphertext for "Now is t" with key `0123456789ABCDEF` reads `3FA40E8A984D4315`. The correct DES result is `3FA40E8A984D4815`, and the tests use that value.

The original is an ASIC in a 180 nm process (1.8 V; 766,359 µm²; 32.38 mW;
326 pins). The pad ring, supply pins and layout are outside this RTL.
Nothing here does power optimisation beyond what synthesis does: the output
registers load only when `enable` (or the stage's valid) is high, which a
clock-gating tool can use.

The design holds roughly 197 flip-flops: three 65-bit stages plus two
direction bits. It has 48 copies of each of the eight S-boxes, one set per
round per core.
