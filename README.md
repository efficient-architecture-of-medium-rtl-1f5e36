# Compact AES-128 engine with round keys held in small ROMs

This is synthesizable SystemVerilog for an AES-128 block cipher engine that
trades speed for area. It does not unroll the ten AES rounds. Each datapath
has a single round unit and applies it once per clock. The round keys are
computed once, when a key is loaded, and kept in forty tiny 4 x 8-bit ROM
sub-modules rather than recomputed for every block. A multiplexer in front of
the AddRoundKey step picks either the cipher key itself (round key 0) or one
of the ten stored round keys. An encryption core and a decryption core share
the stored keys and can run at the same time.

The architecture follows the publication *Efficient Architecture of Medium
Throughput AES Encryption* (Harish B E, Prasanna D Kulkarni). That publication
targets "medium throughput" (1.2 Gbit/s on a Spartan-3E FPGA) at low area.
It fixes the main ideas: the AES round flow, round keys 1..10 held in 40 ROMs
of 4 x 8 bits, a multiplexer between the key-expansion output and the ROMs,
and a dedicated MixColumns unit. It does not give the clocking, the
handshakes, the bit ordering or the insides of any unit. Those are this
design's choices, and the sections below point them out.

## Data flow of one block

AES-128 processes a 128-bit block in 10 rounds under a 128-bit key:

```
state = block ^ RK0
rounds 1..9 : state = MixColumns(ShiftRows(SubBytes(state))) ^ RKr
round 10    : state = ShiftRows(SubBytes(state)) ^ RK10
```

`aes_encrypt_core` keeps the state in one 128-bit register:

| cycle | what happens                                                    | round-key address |
|-------|-----------------------------------------------------------------|-------------------|
| 0     | `in_valid && in_ready`: the plaintext is loaded                 | –                 |
| 1     | state ^= RK0                                                    | 0 (direct key)    |
| 2..10 | full round r = 1..9                                             | r (ROMs)          |
| 11    | round 10, MixColumns bypassed; result goes to `out_block`       | 10 (ROMs)         |
| 12    | `out_valid` is high for one cycle                               |                   |

In cycle 11, `in_ready` is already high again, so the next block can be loaded
in the same cycle as the last round of the previous one. A steady stream
therefore runs at **one block every 11 cycles** per core, with a **latency of
12 cycles**. At 128/11 bits per clock, 1.2 Gbit/s needs a clock of about
103 MHz. The initial key addition takes a cycle of its own because the
round-key multiplexer delivers one key per cycle.

`aes_decrypt_core` is the same machine running the FIPS-197 inverse cipher.
It starts with RK10, runs inverse rounds with RK9..RK1 (InvShiftRows,
InvSubBytes, AddRoundKey, InvMixColumns), and ends with a last inverse round
under RK0 that has no InvMixColumns. Its timing is the same as the
encryption core's.

## Round-key storage

This is the part of the design that is least like a textbook AES.

* **Key expansion** (`aes_key_expansion`) captures the key on a load. The key
  itself is round key 0: it stays in a register (`rk0`) and goes straight to
  the multiplexer, never through the ROMs. In the next 10 cycles the module
  computes round keys 1..10, one per cycle, using the standard schedule
  (RotWord, SubWord with four S-boxes, the round constant). Each key is
  presented on a write port together with its round number.
* **ROM sub-modules** (`aes_rk_rom`): each one holds 4 locations of 8 bits,
  which is one 32-bit word of a round key. There are 40 of them (10 keys x 4
  words). Sub-module *g* holds word *g mod 4* of round key *g/4 + 1*. A
  round key depends on the cipher key, so these "ROMs" are really
  write-once-per-key memories. The datapath only reads them, and they are
  loaded only while a key is being expanded. All four locations are written
  together and read together, so a group of four sub-modules returns a whole
  round key combinationally.
* **The multiplexer** (`aes_round_key_store`) has one read port per core.
  Address 0 returns `rk0`. Addresses 1..10 return the four sub-modules of
  that round.

Key reload rules in `aes_top`:

* `key_ready` is high only when the key schedule and both cores are idle. A
  new key never replaces round keys under a block in flight, and an
  assertion checks this.
* After a load, `keys_valid` is low for 10 cycles while the ROMs are
  rewritten. During that time both cores hold `in_ready` low.
* If a key and a block are offered in the same cycle, the key wins.

Storing the keys costs 1280 bits of storage plus the 128-bit `rk0` register.
In return, the key schedule logic is idle while data is encrypted. It also
lets decryption, which needs the keys in reverse order, read them directly.

## Arithmetic inside the round

* **SubBytes / S-box** (`aes_sbox`, `aes_inv_sbox`): a 256-entry table read
  combinationally. The table is not typed in. `aes_pkg::make_sbox()` computes
  it at elaboration time. It takes the multiplicative inverse in GF(2^8)
  (modulus x^8+x^4+x^3+x+1, with 0 mapping to 0), found through exp/log
  tables over the generator 3. It then applies the affine map
  `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse
  table is the forward table read backwards.
* **MixColumns** (`aes_mix_column`, x4 in `aes_mix_columns`) multiplies each
  column by the matrix `[2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]`. Instead of
  separate products, it uses the shared form
  `t = a0^a1^a2^a3; b_i = a_i ^ t ^ 2*(a_i ^ a_(i+1))`, where `2*` is one
  xtime (shift plus conditional XOR with 0x1b). That is four xtime units per
  column.
* **InvMixColumns** (`aes_inv_mix_columns`) is built from the forward unit.
  A pre-step computes `u = 4*(a0^a2)` and `v = 4*(a1^a3)` and XORs `u, v,
  u, v` into the column; the forward MixColumns then gives the inverse
  matrix `[14 11 13 9; ...]`.
* **ShiftRows** and **InvShiftRows** are pure wiring (row r is rotated by r
  bytes). **AddRoundKey** is a 128-bit XOR.

## Byte and bit order

A block is 16 bytes. Byte 0 is in bits `[127:120]` and byte 15 in `[7:0]`.
Byte *i* sits in row *i mod 4* and column *i / 4* of the 4 x 4 state, so the
state is filled column by column. This is the FIPS-197 convention, so a
standard test vector written as one hex string can be applied directly, for
example key `000102...0f` and plaintext `00112233...ff`, which encrypt to
`69c4e0d86a7b0430d8cdb78070b4c55a`.

## Top-level interface (`aes_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_valid` / `key_ready` | in / out | 1 | key handshake |
| `key_in` | in | 128 | cipher key |
| `keys_valid` | out | 1 | all round keys stored; low for 10 cycles after a load and after reset until the first load |
| `enc_in_valid` / `enc_in_ready` | in / out | 1 | plaintext handshake |
| `enc_in_block` | in | 128 | plaintext |
| `enc_out_valid` | out | 1 | one-cycle pulse, 12 cycles after the handshake |
| `enc_out_block` | out | 128 | ciphertext, held until the next result |
| `dec_in_valid` / `dec_in_ready` | in / out | 1 | ciphertext handshake |
| `dec_in_block` | in | 128 | ciphertext |
| `dec_out_valid` | out | 1 | one-cycle pulse, 12 cycles after the handshake |
| `dec_out_block` | out | 128 | plaintext, held until the next result |

The outputs have no back-pressure. A consumer must take each result in the
cycle `out_valid` is high, or within the following 11 cycles, before the next
result overwrites it.

The only parameters are on `aes_round_key_store`: `NUM_ROMS` (default 40,
i.e. 10 round keys) and `N_READ` (default 2 read ports). Both are set by
`aes_top` for AES-128 with two cores.

## Departures from the source and open points

* **Clocking and throughput.** The source says the design runs "in pipelining
  mode" at 1.2 Gbit/s with low area. It gives no clock, stage count or
  latency. The round-iterative structure here (one round per clock, 11
  cycles per block) is an interpretation that fits the low-area and
  medium-throughput aims. A fully unrolled pipeline would be a different
  design. The RTL says nothing about the FPGA clock it would reach.
* **Published waveform values.** The simulation result printed in the source
  uses key `65787aecd43ae34e45a55ccdaed67898` and plaintext
  `5145ac8e4a45bde3a45e6a6c7d876543`. Its first intermediate value (plaintext
  XOR key) agrees with AES. Its ciphertext `36727d80...578b` and its later
  intermediate values do not. This design implements standard AES, which
  gives `a1756505a4ce5fbc8876278561601a07` for that pair. The testbenches
  check that value.
* **Decryption.** The source reports a decryption result but describes no
  decryption hardware. The decryption core here is the standard inverse
  cipher with the same timing and key storage as the encryption core.
* **Handshakes, reset, key reload, port widths of the ROMs.** These are
  this design's choices, as described above.
* **Key sizes.** Only 128-bit keys are supported. 192- and 256-bit keys (12
  and 14 rounds) would need more ROM groups, a different schedule and a
  wider round counter.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Expected values come
from `tb/aes_ref_pkg.sv`, an independent behavioural AES model. It works on a
4 x 4 byte matrix and finds S-box entries by searching for the field inverse,
not from the RTL's table. The model is itself checked against the FIPS-197
Appendix B and C.1 vectors.

* Units: all 256 S-box entries; FIPS-197 Appendix B round-1 values for
  SubBytes, ShiftRows, MixColumns and AddRoundKey; random states.
* `tb_aes_key_expansion`: every round key of 12 keys, the cycle in which each
  one is written, and `keys_valid` 11 cycles after the load.
* `tb_aes_round_key_store`, `tb_aes_rk_rom`: fill and read back through both
  ports, including the direct round-key-0 path.
* `tb_aes_encrypt_core`, `tb_aes_decrypt_core`: known vectors, random blocks,
  12-cycle latency, 11-cycle spacing in a stream, and no acceptance without
  keys.
* `tb_aes_top` runs the whole engine at its default parameters: seven key
  loads, concurrent encryption and decryption streams, and an
  encrypt-then-decrypt round trip. It counts and requires each mechanism at
  least once: a block held off during key expansion, a block accepted in the
  previous block's last-round cycle, both cores busy together, and a key load
  held off by a busy core.

A timing (clock-frequency) or FPGA-resource claim has not been verified.

## Simulating

With Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name to run a single unit. The
reference model in the testbenches is written as static class methods so that
Verilator compiles it as ordinary functions. Written as plain package
functions, it would be expanded at every call site and the build would become
very slow.

## Files

| file | content |
|------|---------|
| `rtl/aes_pkg.sv` | types, `xtime`, S-box table generators |
| `rtl/aes_top.sv` | top level: key unit, key store, both cores |
| `rtl/aes_key_expansion.sv` | serial key schedule, round key 0 register |
| `rtl/aes_round_key_store.sv` | 40 ROM sub-modules and the read multiplexers |
| `rtl/aes_rk_rom.sv` | one 4 x 8-bit ROM sub-module |
| `rtl/aes_encrypt_core.sv`, `rtl/aes_round.sv` | encryption control and round |
| `rtl/aes_decrypt_core.sv`, `rtl/aes_inv_round.sv` | decryption control and inverse round |
| `rtl/aes_sbox.sv`, `rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_column.sv`, `rtl/aes_mix_columns.sv`, `rtl/aes_add_round_key.sv` | round steps |
| `rtl/aes_inv_sbox.sv`, `rtl/aes_inv_sub_bytes.sv`, `rtl/aes_inv_shift_rows.sv`, `rtl/aes_inv_mix_columns.sv` | inverse round steps |
| `tb/aes_ref_pkg.sv` | reference model for the testbenches |
| `tb/tb_*.sv` | one testbench per unit, `tb_aes_top` end to end |
