# Sub-pipelined AES for 128-, 192- and 256-bit keys

This is an unrolled AES engine that takes a new 128-bit block every clock
cycle and handles all three AES key lengths in one pipeline. Every round of
the cipher is a separate hardware stage. Each stage is cut into two
clock cycles, so the clock period covers half a round instead of a whole
one. Three variants are provided, built from the same parts:

| variant | what it does | first block after a key load | latency per block |
|---|---|---|---|
| encryption core | AES encryption | 2 cycles (runs alongside key expansion) | 22 / 26 / 30 cycles |
| decryption core | AES decryption | 22 / 18 / 28 cycles (waits for the full key schedule) | 22 / 26 / 30 cycles |
| joint core | either direction, one direction in the pipeline at a time | as above, per direction | 22 / 26 / 30 cycles |

Latencies are listed for 128 / 192 / 256-bit keys. The throughput is one
block per clock in all cases, i.e. 128 bits times the clock frequency. At
the clock rates reported for this architecture on a Virtex-4 FPGA (278.5,
263.5 and 247 MHz) that would be about 35.6, 33.7 and 31.6 Gbit/s. Those
figures were not reproduced here; they depend on vendor synthesis and
placement.

## Why two registers per round

An AES round is SubBytes, ShiftRows, MixColumns and AddRoundKey in
sequence. A pipeline with one register per round must fit all four into one
clock period. Putting a register after every one of the four operations
shortens the period only down to the slowest operation, MixColumns, and
costs four registers and four cycles of latency per round.

This design uses two registers per round and pairs the operations so that
the two halves take about the same time:

* **first half**: SubBytes + ShiftRows. ShiftRows is only a byte permutation,
  so it costs no logic (see below).
* **second half**: MixColumns + AddRoundKey.

The clock period is then the slower of (SubBytes + ShiftRows) and
(MixColumns + AddRoundKey), plus register overhead. Reported post-layout
delays for the four operations were about 2.02, 0.49, 2.65 and 0.56 ns, so
the pairs are about 2.5 ns and 3.2 ns long. The clock is a little slower
than with four registers per round. In exchange, the design has half the
registers and half the latency.

## The round stage (`aes_round`)

```
            register A                      register B
state_i --> [128] --16 S-box ROMs------->  [128]  --MixColumns--XOR rk--> state_o
                    (ShiftRows = where                                    (into the next
                     each ROM reads from)                                  round's A)
```

* **SubBytes as ROMs.** Each of the 16 state bytes has its own S-box, a
  256 x 8 look-up table with a registered output. This is what a block RAM in
  ROM mode provides. The ROM's output register *is* register B. The tables
  are computed at elaboration time by a constant function in `aes_pkg`
  (powers of the generator 3 give the multiplicative inverse, followed by
  the affine map). No data file is read.
* **ShiftRows for free.** The ROM that fills byte position *k* of register B
  is addressed by the byte that ShiftRows moves to *k*. For decryption it is
  the byte that InvShiftRows moves there. SubBytes and ShiftRows commute, so
  this gives the same result and needs no shifting logic.
* **MixColumns without multipliers** (`aes_mixcolumn`). {02}·x is a left
  shift with a conditional XOR of 0x1B, and {03}·x is {02}·x ⊕ x.
* **InvMixColumns by reusing MixColumns.** The inverse coefficients split as

  ```
  {0e} = {02}+{08}+{04}   {0b} = {03}+{08}   {0d} = {01}+{08}+{04}   {09} = {01}+{08}
  ```

  so for output row *i*:

  ```
  InvMix(s)[i] = Mix(s)[i] ^ {08}·(s0^s1^s2^s3) ^ {04}·(s[i]^s[i+2])
  ```

  The forward network is shared. The inverse only adds two sums per column
  and a few more xtime steps. In the joint core one network serves both
  directions.
* **Decryption order.** A decryption stage computes
  `InvMixColumns(B ^ rk)`, which is the standard inverse cipher. The
  alternative "equivalent inverse cipher" would put AddRoundKey last, but
  then InvMixColumns would have to be applied to the round keys. With the
  order used here, both directions use the same unmodified round keys. The
  final round of either direction skips the mixing (`last` input).

## Three key sizes in one pipeline (`aes_datapath`)

The data path has 14 round stages, enough for 256-bit keys. It also has an
input register, the initial AddRoundKey, and an output register. That makes
30 registers, and every block passes through them at one block per cycle.

* **Encryption** always enters at stage 1. Stage *s* uses round key *s*. The
  final round, which skips MixColumns, is stage 10, 12 or 14 depending on the
  key size. A multiplexer in front of the output register takes the result
  of that stage. Stages beyond it are idle.
* **Decryption** enters at stage 15 − Nr, which is stage 5, 3 or 1. So every
  key size exits through stage 14, which is always the final round. Stage *s*
  always uses round key 14 − *s*, whatever the key size. Only the initial
  AddRoundKey (round key Nr) and the entry point depend on the key size.

A valid bit travels beside every register. It is live only between the
entry stage and the exit stage of the current key size. So nothing stale
comes out when the key size or the direction changes. The data registers
themselves have no reset.

## Key schedule and round key store

`aes_key_expansion` computes the key schedule. It writes the words into
`aes_round_key_store`, which presents all 15 round keys at once, one to each
stage. The store is written as a memory array, but every entry is read in
parallel.

The unit keeps the last eight schedule words in a window register. After one
cycle that writes the key itself, it repeats a two-cycle step:

1. **LOOK.** The newest word, rotated, addresses four S-box ROMs. For
   256-bit keys every other step is not rotated (the extra SubWord of the
   256-bit schedule).
2. **GEN.** The next 4 words (128/256-bit keys) or 6 words (192-bit keys)
   are formed by the XOR chain `w[i] = w[i-Nk] ^ w[i-1]`, with SubWord and
   Rcon folded into the first word. They are written to the store.

Each step therefore yields at least one round key every two cycles. That is
exactly the speed at which a block moves through the rounds. So an
encryption block can enter the cycle after the key words are written, and
each round key is in the store before the block reaches its stage. The
whole schedule is written 21, 17 or 27 cycles after the key is taken, for
128-, 192- and 256-bit keys. A 192-bit schedule writes two spare words into
round key 13, which a 192-bit key never uses.

Decryption starts with the *last* round key. So a decryption block waits
until the schedule is complete (`rk_all`). This is why decryption has the
longer start-up time.

## The core and its handshakes (`aes_core`)

`aes_core #(.DP(...))` combines the key expansion, the store and the data
path with a small controller. `DP_ENC`, `DP_DEC` and `DP_JOINT` select the
variant. `aes_subpipe_top` instantiates all three side by side, each with its
own ports (`enc_*`, `dec_*`, `ed_*`). A real system would keep only the one
it needs.

| port | dir | meaning |
|---|---|---|
| `key_valid` / `key_ready` | in / out | Offer a key and take it when both are high. `key_ready` is high only when no block is in flight and the previous schedule has finished. An offered key must stay offered; an assertion checks this. |
| `key[255:0]`, `key_size` | in | The key, left-aligned (a 128-bit key sits in `key[255:128]`). `key_size` is `KEY128`, `KEY192` or `KEY256`. |
| `in_valid` / `in_ready`, `in_data` | in / out, in | One 128-bit block, taken when both are high. |
| `in_dec` | in | Joint core only: 1 = decrypt this block. |
| `out_valid`, `out_data`, `out_dec` | out | One-cycle strobe per result, in input order, 2·Nr+2 cycles after the block was taken. There is no output back-pressure. |

`in_ready` is low in these cases:

* No key has been loaded yet.
* A key is being taken in this very cycle.
* An encryption block arrives before the key words are in the store (one
  cycle).
* A decryption block arrives before the schedule is complete.
* In the joint core, the block's direction differs from the blocks still
  in flight. The joint pipeline runs one direction at a time, because its
  multiplexers are set by a single direction signal. Switching directions
  therefore costs a drain of up to 2·Nr+3 cycles.

Bytes are in FIPS-197 order throughout: byte *k* of a block is
`data[127-8k -: 8]`, in row *k* mod 4, column *k*/4.

## What follows the published architecture and what is this design's own

Taken from the published architecture:

* two registers per round, with SubBytes+ShiftRows and
  MixColumns+AddRoundKey paired;
* ShiftRows done by placing bytes;
* S-boxes as synchronous ROMs, 16 per round;
* multiplier-less MixColumns, and InvMixColumns through the
  {08}/{04} decomposition;
* 14 unrolled stages with the output multiplexer after rounds 10, 12 and 14;
* decryption entering at a stage chosen by the key size;
* expanded keys held in a store;
* encryption that does not wait for the key schedule, and decryption that
  does;
* a joint variant with multiplexers and one key expansion unit.

Choices made here where the published description is silent:

* the inverse-cipher order in decryption (AddRoundKey before InvMixColumns);
* one 512-entry ROM holding both S-boxes in the joint core;
* the structure and speed of the key expansion (window, two-cycle step);
* the store's write port;
* every handshake, the drain rules, and one direction at a time in the joint
  pipeline;
* left-aligned keys;
* valid bits, reset only on control state, and no output back-pressure.

The FPGA-specific results (slice counts, block RAM use, clock rates) are
not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. The reference is
`tb/aes_ref_pkg.sv`, a separate behavioural AES model. It builds its S-box
by brute-force search for inverses and uses full GF(2^8) multiplies. Every
testbench first checks this model against the FIPS-197 Appendix C vectors.

| testbench | what it establishes |
|---|---|
| `tb_aes_sbox` | all 256 entries of all three ROM types; data one clock after the address |
| `tb_aes_mixcolumn` | forward and inverse against the matrix products; inverse after forward returns the input |
| `tb_aes_round` | all three stage types, random states, keys and final-round flags; latency of exactly two edges |
| `tb_aes_round_key_store` | random multi-word writes, including runs past the end; all 15 outputs |
| `tb_aes_key_expansion` | every round key for FIPS and random keys of each size; write timing, `rk_first` / `rk_all` timing; start ignored while busy |
| `tb_aes_datapath` | the three builds, all key sizes and directions; bursts at one block per cycle; latency 2·Nr+2 |
| `tb_aes_core` | the three cores through key loads, block streams and direction switches |
| `tb_aes_subpipe_top` | the whole design, end to end, at full size |
| `tb_aes_throughput` | the throughput workload: 64 back-to-back blocks per key size and direction on each core; no stall after start-up, one result per cycle (printed as Gbit/s at 278.5 / 263.5 / 247 MHz) |

`tb_aes_core` and `tb_aes_subpipe_top` drive the cores through
`tb/aes_core_agent.sv`. The agent checks every block's value, direction,
order and latency, and the start-up delay after every key. It fails any
stall that the rules above do not explain. It also counts each mechanism,
and the testbench fails if any of them never occurred:

* encryption overlapping key expansion;
* decryption waiting for the schedule;
* a joint-core drain;
* a key load waiting for the pipeline;
* every key size on every core.

To run a testbench with Verilator (5.x), from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal +libext+.sv -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_subpipe_top.sv \
    --top-module tb_aes_subpipe_top -Mdir obj_top
./obj_top/Vtb_aes_subpipe_top
```

Replace the testbench name to run any other. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog.

## Files

* `rtl/aes_pkg.sv` — types (`state_t`, `key_size_e`, `datapath_e`), S-box
  tables, xtime and ShiftRows index helpers.
* `rtl/aes_sbox.sv` — S-box / inverse / combined ROM with registered read.
* `rtl/aes_mixcolumn.sv` — shared MixColumns / InvMixColumns of one column.
* `rtl/aes_round.sv` — the two-register round stage.
* `rtl/aes_datapath.sv` — 14-stage pipeline with key-size entry and exit
  selection.
* `rtl/aes_key_expansion.sv` — key schedule.
* `rtl/aes_round_key_store.sv` — expanded-key store.
* `rtl/aes_core.sv` — one complete engine with its control.
* `rtl/aes_subpipe_top.sv` — the three engines side by side.
* `tb/` — reference model, core agent and testbenches.
