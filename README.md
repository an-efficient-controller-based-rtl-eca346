# Iterative AES-128 encryption core with a round-constant controller

This is a compact AES-128 encryption engine. It has one round of logic and
runs it ten times. Its distinguishing feature is the round control. There is
no state machine and no round counter. The sequencer is the round-constant
register of the key schedule itself. That register starts at 0x01 and is
multiplied by x in GF(2^8) every clock. It therefore walks through the ten
AES round constants 01, 02, 04, 08, 10, 20, 40, 80, 1B, 36. Two comparators
read it: when it holds 0x36 the current round is the last one, and one step
later it holds 0x6C, which means the ciphertext is ready.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is verified against
the FIPS-197 examples and against an independent reference model.

## Datapath

```
            plaintext                        key
                |                             |
 rst ----> [ mux 1 ]<---------+    rst ---> [ mux 2 ]<------------------+
                |             |               |                          |
           [ reg_1 ] state    |          [ key register ]                |
                |             |               |  round_key               |
                +---- XOR <---|---------------+                          |
                       |  (add_round_key) ---> ciphertext                |
                  [ sub_byte ]                |                          |
                  [ shift_rows ]--+           +-> [ key_round_function ]-+
                  [ mix_columns ] |                       ^ rcon
                       |          |                       |
                   [ mux 3 ]<-----+            [ controller: 01 -> *x -> ... ]
                       |  sel = is_final_round (rcon == 36)   done = (rcon == 6C)
                       +------> back to mux 1
```

One clock performs one full round. ARK below stands for AddRoundKey.


1. AddRoundKey: the state register is XORed with the current round key.
2. SubBytes, then ShiftRows, then MixColumns.
3. Mux 3 returns the MixColumns result, or the ShiftRows result in the final round.
4. The key register takes the next round key in the same clock.

The XOR output is also the core's `ciphertext` output. After the tenth round
the state register holds SubBytes/ShiftRows of round 10 and the key register
holds round key 10. Their XOR is therefore the ciphertext. No separate output
stage is needed.

## Round control and timing

| clock edge after load | state register holds       | key register | rcon | flags            |
|-----------------------|----------------------------|--------------|------|------------------|
| load (rst high)       | plaintext                  | key (rk0)    | 01   |                  |
| 1                     | round 1, before its ARK    | rk1          | 02   |                  |
| ...                   | ...                        | ...          | ...  |                  |
| 9                     | round 9, before its ARK    | rk9          | 36   | `is_final_round` |
| 10                    | round 10, before its ARK   | rk10         | 6C   | `done`           |

How to use the core:

- Hold `rst` high for at least one rising edge, with `plaintext` and `key` valid.
  `rst` is a synchronous load, not an asynchronous reset.
- Drop `rst`. The inputs are no longer read.
- Ten rising edges later, `done` is high for exactly one cycle. `ciphertext` is valid during that cycle.
- Raising `rst` at any time abandons the current block and loads a new one.

The loop has no hold state. After `done`, the registers keep iterating:
`rcon` goes to D8 and `done` falls. Capture `ciphertext` in the `done` cycle.

A block takes 11 clocks including the load, so the throughput is
128 bits x f / 11. The next block can be loaded by the clock edge that ends
the current block's `done` cycle, so consecutive blocks need no idle clock.

## Modules

| module               | role |
|----------------------|------|
| `aes_enc`            | top: state mux and register, datapath, mux 3, key schedule, controller |
| `controller`         | mux (0x01 on load, else rcon times x), 8-bit register, comparators for 0x36 and 0x6C |
| `key_schedule`       | key mux and key register; output is the current round key |
| `key_round_function` | next round key: `g(w3) = SubWord(RotWord(w3)) ^ {rcon,0,0,0}`, then `w4=w0^g, w5=w1^w4, w6=w2^w5, w7=w3^w6` |
| `reg_1`              | 128-bit state register (no reset; loaded through mux 1) |
| `add_round_key`      | 128-bit XOR |
| `sub_byte`           | 16 S-boxes in parallel |
| `aes_sbox`           | one S-box: a 256-entry ROM indexed by row (high nibble) and column (low nibble) |
| `shift_rows`         | rotate row r left by r bytes |
| `mix_columns`        | column times matrix [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02], using xtime |
| `aes_pkg`            | types, xtime, GF(2^8) functions, S-box table generation |

The controller's three constants, 0x01, 0x36 and 0x6C, are parameters of
`controller`. They are the only place where the round count is fixed.

### Byte order

All 128-bit buses use FIPS-197 byte order. Byte 0 is in bits 127:120.
State byte S(r,c) is bus byte 4c + r, so the state fills column by column.
Key word w0 is bits 127:96.

### S-box

The S-box table is not written out. `aes_pkg::gen_sbox_table` computes it at
elaboration from the definition:

- take the multiplicative inverse in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1,
  computed as a^254 (0 maps to 0);
- then apply the affine map b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,
  with c = 0x63.

Each `aes_sbox` is a constant 256 x 8 ROM. A synthesizer may build it from
LUTs or place it in block RAM. There are 20 S-boxes in total: 16 in the round
and 4 in the key function.

## Where this design departs from, or fills in, its source description

- The description credits pipelining, sub-pipelining and parallel block
  processing for speed, and gives throughput as 128 bits per critical-path
  delay. That figure implies one block per clock. The architecture it
  actually draws is a single round loop with one state register, and that
  loop is what is built. It gives one block per 10 round clocks.
- The description mentions precomputing the round keys into memory. The
  drawn architecture computes them one per clock in the loop, and that is
  what is built.
- The final round bypasses MixColumns through mux 3. The select comes from the
  0x36 comparator, as AES requires.
- These points are this design's own choices: `rst` as a synchronous load,
  the byte order, the one-cycle `done` pulse with no output hold, the S-box
  built as a computed ROM, and the affine constant 0x63 (standard AES).
- Not built: decryption, for which no datapath is described, and AES-192/256,
  which are named but not part of the architecture.
- Not built: the block RAM reported in the resource figures, which is not
  described.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`. `tb/aes_ref_pkg.sv` is a separate reference
model. It uses long-division field multiplication, an inverse found by search,
and a 4x4 array state. The testbenches use it together with published FIPS-197
vectors:

- `tb_aes_sbox`: all 256 entries.
- `tb_sub_byte`, `tb_shift_rows`, `tb_mix_columns`, `tb_add_round_key`: FIPS-197
  Appendix B round-1 values and random states.
- `tb_key_round_function`, `tb_key_schedule`: the full FIPS-197 A.1 key
  expansion and random keys.
- `tb_controller`: the RC sequence, `is_final_round` at 0x36, `done` at 0x6C
  (10 clocks after load), reload mid-sequence.
- `tb_aes_enc`: end to end at default parameters. It checks:
  - FIPS-197 Appendix B and C.1 ciphertexts;
  - 43 random blocks against the reference model;
  - a latency of exactly 10 clocks and a one-cycle `done`;
  - reloads in mid-encryption.

  It also counts loads, full rounds, final (bypass) rounds, `done` pulses and
  reloads, and it fails if any of them never occurs.

To simulate with Verilator, list the package files first:

```
verilator --binary --timing -y rtl -y tb --top-module tb_aes_enc \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_enc.sv
./obj_dir/Vtb_aes_enc
```

`-y` lets Verilator find each module in the file of the same name. To test
another module, replace `tb_aes_enc` with its testbench.
