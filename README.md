# AES-128 counter-mode key-stream generator in three pipelined organisations

Optical links run at tens of Gbit/s. Encrypting traffic at that rate needs a
source of cryptographically strong pseudo-random bits that is just as fast. This
design gets those bits from AES-128 in counter mode. A 128-bit counter starts
at a seed, advances by one per block, and each counter value is encrypted under
a fixed key. The ciphertexts, one after another, are the key-stream.

Counter mode has no feedback: a block's input never depends on an earlier
block's output. So the ten AES rounds can be fully unrolled and pipelined, and
throughput is limited only by how short a pipeline stage can be made. The RTL
provides three ways of cutting the cipher into stages. They trade area against
throughput:

| unit (`aes_arch_e`)            | module                 | stages                         | latency | clocks per block |
|--------------------------------|------------------------|--------------------------------|---------|------------------|
| `ARCH_INNER_OUTER`             | `aes_core_inner_outer` | 1 key-add + 10 rounds x 4      | 41      | 1                |
| `ARCH_OUTER`                   | `aes_core_outer`       | 1 key-add + 10 rounds x 1      | 11      | 1                |
| `ARCH_MULTI_ROUND`             | `aes_core_multi_round` | 1 key-add + 5 stages x 2 rounds| 11      | 2                |

The architecture follows A. Hodjat and I. Verbauwhede, "Speed-Area Trade-off for
10 to 100 Gbits/s Throughput AES Processor". Their 0.18 um standard-cell
synthesis reports these ranges, depending on the timing target:

| unit        | clock       | throughput       | area          |
|-------------|-------------|------------------|---------------|
| inner+outer | 467-606 MHz | 59.7-77.6 Gbit/s | 313-473 Kgates|
| outer only  | 246-377 MHz | 31.5-48.2 Gbit/s | 211-372 Kgates|
| multi-round | 245-362 MHz | 15.7-23.1 Gbit/s | 116-225 Kgates|

Throughput is 128 bits x clock / clocks-per-block. This RTL reproduces each
unit's cycle behaviour: rate and latency are checked in simulation. The clock
rates and gate counts are the publication's figures and have not been
reproduced here.

`aes_prng_top` places the three generators side by side, so they can be
compared or one can be picked. In a product you would keep only one:
instantiate `aes_ctr_prng` with the `ARCH` you need.

## Module hierarchy

```
aes_prng_top                    three generators, index 0/1/2 = inner+outer / outer / multi-round
 └─ aes_ctr_prng #(ARCH)        seed register, counter register, AES unit, output register
     ├─ aes_core_inner_outer    aes_add_key_stage + 10 x aes_round_pipe4
     ├─ aes_core_outer          aes_add_key_stage + 10 x (aes_round + register)
     └─ aes_core_multi_round    aes_add_key_stage + 5 x aes_mr_stage (each one aes_round)
aes_round        = aes_sub_bytes (16 x aes_sbox) -> aes_shift_rows -> aes_mix_columns -> XOR key
                   aes_key_sched (4 x aes_sbox, round constant, XOR chain)
aes_pkg          types (block_t, pipe_t, aes_arch_e), NR = 10, S-box table, rcon, mix_column
```

## The generator: `aes_ctr_prng`

There are three control inputs. `seed_load_i` writes `seed_i` into the seed
register. `start_i` copies the seed register into the counter register, and
the counter holds the seed from the next cycle on. While `run_i` is high, each
cycle in which the AES unit is ready, the counter value enters the unit
together with `key_i`, and the counter advances by one, modulo 2^128. When
`run_i` is low the counter holds, and a later run carries on where it stopped.
Each ciphertext goes through one output register to `ks_o`, with `ks_valid_o`
high for one cycle.

Timing: if `start_i` and `run_i` are raised in cycle S, the first number
appears in cycle S + latency + 2. For the multi-round unit it can be one
cycle later if that unit was not ready in cycle S+1. After that a number
comes out every cycle, or every second cycle for the multi-round unit. The
generator's output register comes on top of the unit's latency.

The key travels down the pipeline with its block (see below). A key change
therefore takes effect from the next counter value on, with no flushing.

## Data layout

`block_t` is a 128-bit vector. State byte *i* is bits `[127-8i -: 8]`. Bytes
run column by column, so byte *i* is row *i* mod 4 of column *i*/4. This is the
FIPS-197 input order: the standard test vectors can be applied as written, for
example key `000102...0f` and plaintext `00112233...ff` give
`69c4e0d86a7b0430d8cdb78070b4c55a`. Round keys use the same layout, with key
word *j* being bytes 4j..4j+3.

`pipe_t` = `{valid, state, key}`, 257 bits. It is the bundle passed from stage
to stage in every unit.

## Key schedule on the fly

No unit stores expanded keys. Every stage receives the previous round key next
to the round data. It derives its own round key and passes it on. The derivation
has three phases:

1. **substitution**: rotate the last key word by one byte and pass it through
   four S-boxes;
2. **round-constant table**: XOR the round constant (01, 02, 04, ..., 80, 1b,
   36) into its first byte;
3. **XOR**: w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'.

`aes_key_sched` does all three in one combinational step. It takes the round
constant as an input, so it serves a fixed round and a run-time-selected round
alike.

## Inner- and outer-round pipelining (`aes_round_pipe4`)

The fastest unit puts a register after every phase of every round, on both the
data side and the key side. The key schedule is spread over the same four
cycles:

| stage | data side                              | key side                                          |
|-------|----------------------------------------|---------------------------------------------------|
| 1     | substitution (16 S-boxes)              | rotated last word through 4 S-boxes, XOR into w0  |
| 2     | shift row (wiring only)                | round constant XOR into byte 0                    |
| 3     | mix column (bypassed in round 10)      | XOR chain across w1..w3                           |
| 4     | add the finished round key             | pass the round key on                             |

The stage-1 S-box lookup is the longest path. Round 10 keeps all four stages,
with an empty mix-column stage, so every round has the same length and the
total stays 1 + 4 x 10 = 41.

## Multi-round pipelining (`aes_mr_stage`, `aes_core_multi_round`)

Here each of the five stages has one round datapath, with a data mux and a key
mux in front of it and a register behind it. A block spends two cycles in a
stage: once for the odd round, once for the even round. A single counter bit,
`cnt`, toggles every cycle after reset and drives all stages together:

```
cycle            ... | cnt=0              | cnt=1               | cnt=0 ...
stage s          ... | take stage s-1,    | take own register,  | take stage s-1 ...
                     | compute round 2s-1 | compute round 2s    |
key-add register ... | holds              | loads a new block   | holds ...
in_ready_o = cnt
out_valid_o      = last stage valid and cnt == 0   (it then holds round 10)
```

The round constant and the round-10 mix-column bypass follow the round being
computed: round FIRST_ROUND + cnt. A block sampled in a `cnt = 1` cycle has
its ciphertext on `data_o` 11 cycles after it was presented: 1 key-add cycle
plus 5 x 2. The unit accepts a block every second cycle. `data_o` is only
meaningful while `out_valid_o` is high, because in the other cycles the last
stage holds round 9 of the next block.

## S-box

Each S-box is a direct lookup in a constant 256-entry table. This is faster
than computing the GF(2^8) inverse from GF(2^4) arithmetic while the data goes
through. The table values are not typed in. `aes_pkg::sbox_table()` computes
them at elaboration time: the inverse of x in GF(2^8) modulo
x^8+x^4+x^3+x+1 (with 0 mapping to 0), followed by the affine map
b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. The function finds
the inverses by stepping through the field's multiplicative group: it
multiplies by the generator 3 and divides by 3 in parallel. After elaboration
only the constant table remains.

## Where this RTL fills gaps or departs from the source

- The source describes datapaths, not interfaces. These are this design's own
  choices: the valid/ready signalling, the `seed_load_i` / `start_i` / `run_i`
  controls and the reset. Reset is asynchronous and active low, and it clears
  only valid bits and control state.
- The source says the counter is incremented every clock cycle. With the
  multi-round unit, which takes a block only every second cycle, the counter
  here advances only when a block is accepted, so no counter value is skipped.
- How the multi-round stages are synchronised, and which mux input each value
  of the counter selects, is this design's reading: one shared counter bit,
  with 0 meaning "take the previous stage".
- The byte-level details of ShiftRows, MixColumns, the key expansion and the
  S-box contents come from the AES standard, which the source relies on
  without restating.
- The key is carried with every block, so it can change per block. The source
  does not say how the key is loaded.
- The synthesis results (frequency, gate count) are not reproduced. No timing
  constraints or technology files are part of this RTL.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. The expected
values come from `tb/aes_ref_pkg.sv`, a behavioural AES model that shares no
code with the RTL. It builds its S-box by brute-force inverse search and uses a
general GF(2^8) multiplier. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- Leaf blocks are checked against FIPS-197 example values and against the model
  on random inputs. The S-box is checked exhaustively.
- Each unit's testbench (`tb_aes_core_*`) runs the two FIPS-197 vectors, then
  400 random key/plaintext pairs. The key changes on every block. Blocks come
  in a continuous burst and then with random gaps. The testbench checks every
  ciphertext, the exact latency, and the spacing between outputs (1 or 2
  cycles).
- `tb_aes_prng_top` (and `tb_aes_ctr_prng`, for the generator on its own) run
  all three generators at their default sizes. The run covers a seed load and
  start, a pause and resume, a key change, and a restart from seed 2^128-5,
  which makes the counter wrap. It counts each of these, and the multi-round
  unit's two-cycle iteration, and fails if any of them never happened.
- `tb_aes_prng_throughput` runs all three generators without a break for 3000
  cycles. It checks every number and counts the outputs in that window: 3000,
  3000 and 1500. It then converts the measured bits per cycle to Gbit/s at each
  published clock rate and compares the result with the published throughput.
  All fifteen agree within 0.1 Gbit/s.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_prng_top.sv \
    --top-module tb_aes_prng_top -o sim
./obj_dir/sim
```

To test another block, replace the testbench file and the top-module name. A
run of the full top takes well under a minute, most of it compilation.

## Changing the design

- Pick an organisation with `aes_ctr_prng #(.ARCH(ARCH_OUTER))`, for example.
- `aes_round_pipe4 #(ROUND)` and `aes_mr_stage #(FIRST_ROUND)` are generic over
  the round number. Other pipeline cuts can be made from `aes_round`,
  `aes_sub_bytes`, `aes_shift_rows`, `aes_mix_columns` and `aes_key_sched`.
- The latencies and the clocks-per-block figure are in `aes_pkg`
  (`LAT_*`, `CPS_MULTI_ROUND`). The testbenches read them from there, so a
  re-pipelined unit needs those constants updated.
- The cipher is fixed to 128-bit keys (`NR = 10`). Keys of 192 and 256 bits
  would need a different key schedule and more rounds.
