# AES-128 encryption core protected by secure double rate registers

A power-analysis attack recovers a key by correlating a device's supply
current with values the cipher computes. Much of that current is drawn by the
registers and combinational logic of the datapath when they switch from one
key-dependent value to the next. This core makes that switching random. It is
a plain iterative AES-128 encryptor, but every register in it is a **secure
double rate register (SDRR)**. An SDRR is clocked at twice the reference rate.
On alternate edges it captures a fresh random word instead of the real datum.

The result is as follows:

* each combinational layer spends half of every reference period evaluating
  random data, so each real evaluation starts from a random previous state;
* each SDRR always holds one real word and one random word in its two
  registers, so what the registers store costs a random amount of power;
* the combinational logic is **not** duplicated for the random data. Real and
  random words share the same gates and wires, which keeps the area low and
  avoids fan-out imbalance between a "true" and a "dummy" path.

Functionally the core is a standard FIPS-197 AES-128 encryptor. A block takes
44 reference periods (88 cycles of the doubled clock).

## The SDRR (`rtl/sdrr.sv`)

```
            sel_real
               |
 d   ----->|\  |
           | |-+--> [ reg1 ] ---> [ reg2 ] ---> q   (to the next layer)
 rnd ----->|/         q1
             both registers on clk (CK, 2x the reference rate)
```

`sel_real` is the reference clock. On a clk edge where it is 1 (a *real
edge*), `reg1` takes the real datum `d`. On the other edges (*random edges*)
it takes the random word `rnd`. `reg2` copies `reg1` on every edge. One
reference period is therefore two clk cycles:

```
clk edge      R(n)          X            R(n+1)        X
sel_real   1 ------ 0 ------------ 1 ------------ 0 -------
reg1         real(n)      random        real(n+1)    random
reg2 = q     random       real(n)       random       real(n+1)
logic sees   random       real(n)  ->   random       real(n+1)
```

(R = real edge, X = random edge.)

The output is taken from the second register. So `q` carries random data
during the first half of each reference period and real data during the
second half, which ends with the next real edge. The next stage's
combinational layer thus has the real value settled in time for the next real
capture. On real edges alone, the SDRR acts as an ordinary register with one
reference period of latency. That is why it can replace every register of an
existing design without changing that design's schedule, feedback loops
included.

## The datapath (`rtl/sdrr_aes128.sv`)

```
        load? pt                                                    (bypass in rounds 0, 10)
            |                                                                 |
   +--> [SDRR ARK] --> SubBytes --> [SDRR SB] --> ShiftRows --> [SDRR SR] --> MixColumns --> [SDRR MC]
   |                      |                          |                                           |
   |            (bypass in round 0)        (bypass in round 0)                                   v
   +------------------------------------------------------------------------------------- AddRoundKey --> ct register
                                                                                                 ^
                       load? key --> [SDRR KEY] --+-----------------------------------------------+
                                        ^         |
                                        +-- key step (once per round) <--+
```

The datapath is an iterative core with an inner-round pipeline. There are
four combinational layers, each followed by its own register. The output of
AddRoundKey feeds back to SubBytes. One round takes four reference periods,
one period per layer. AES-128 has 11 rounds:

* round 0 is AddRoundKey only;
* rounds 1 to 9 are SubBytes, ShiftRows, MixColumns and AddRoundKey;
* round 10 has no MixColumns.

To give every round the same four stages, each of the first three layers has
a bypass multiplexer. SubBytes and ShiftRows are bypassed in round 0.
MixColumns is bypassed in rounds 0 and 10. So a block takes 11 × 4 = 44
reference periods.

The plaintext is loaded into the AddRoundKey SDRR on the accepting edge.
Round 0 then starts at SubBytes like every other round, with the layers
bypassed.

Only one block is in the pipeline at a time. The pipeline registers capture on
every real edge. While the live block sits in one stage, the other three
stages hold stale copies of it, which are overwritten before they are used.

**Key schedule** (`rtl/aes_key_expand.sv`). The round key is expanded on the
fly. The current round key is kept in its own SDRR. On the real edge that ends
stage 3 of rounds 0 to 9, one key-schedule step replaces round key r−1 with
round key r:

* RotWord, then SubWord on four S-boxes;
* XOR with the round constant;
* the chain of four word XORs.

No key table is stored. Because the key register is an SDRR too, the
key-schedule logic and the AddRoundKey layer also see random data half of the
time.

**Layers.** `aes_sub_bytes`, `aes_shift_rows`, `aes_mix_columns` and
`aes_add_round_key` are the standard AES transforms on a 128-bit state in
FIPS-197 byte order. Byte 0 is bits [127:120], and the state is filled column
by column. The S-box is not stored as a table. `aes_pkg` computes it from its
definition: the inverse in GF(2^8), taken as x^254 by square-and-multiply,
followed by the affine map. MixColumns uses `xtime`.

## Control (`rtl/aes_ctrl.sv`)

* `sel_real` is a toggle flip-flop on clk. It is 0 after reset, so the first
  edge after reset is a random edge.
* The FSM has two states, idle and run. It has a round counter (0 to 10) and a
  stage counter (0 to 3). They move only on real edges, which an assertion
  checks.
* The FSM derives the two bypass selects, the key-step enable and `last`.
  `last` marks the final stage of round 10.
* A new block can be accepted on the same edge that captures the previous
  ciphertext. Back-to-back blocks therefore leave one every 44 reference
  periods. Assertions check this latency and the range of the round counter.

## Random words (`rtl/sdrr_prng.sv`)

Each of the five SDRRs has its own generator. Each generator is a xorshift128
(four 32-bit words) unrolled four steps per clock, so every clock produces a
completely new 128-bit word.

* During reset each generator loads `prng_seed` XOR a constant that is
  different for each instance.
* Bit 0 of the seed is forced to 1, so the state can never be all zeros.

This is a **stand-in**. The SDRR scheme only needs a fresh random word on
every random edge. Its protection is only as good as that randomness. A
product should feed the `rnd` inputs from a true random number generator,
and should reseed it. Swapping the source only means replacing
`sdrr_prng`, which has a clock, a reset, a seed and a 128-bit output.

## Interface and timing of the top (`sdrr_aes128`)

All signals are synchronous to `clk`, the doubled clock. `rst_n` is a
synchronous, active-low reset.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | CK, twice the reference clock rate |
| `rst_n` | in | 1 | synchronous reset, active low |
| `prng_seed` | in | 128 | seed of the random generators, loaded while `rst_n` is 0 |
| `in_valid` | in | 1 | `pt` and `key` are valid |
| `in_ready` | out | 1 | a block is taken on a clk edge where `in_valid` and `in_ready` are both 1 |
| `pt`, `key` | in | 128 | plaintext and cipher key. They are read only on the accepting edge |
| `out_valid` | out | 1 | high for one reference period (two clk cycles) when `ct` is new |
| `ct` | out | 128 | ciphertext. It holds until the next result |
| `sel_real` | out | 1 | the reference phase: 1 ahead of a real edge |
| `busy` | out | 1 | a block is being encrypted |

* `in_ready` is only ever 1 ahead of real edges. It is high while the core is
  idle, and also during the last stage of a block.
* `out_valid` rises exactly 88 clk cycles (44 reference periods) after the
  accepting edge.
* The ciphertext register is a plain register because the ciphertext is
  public.

## What comes from the published design and what does not

**Taken from the published design:**

* the SDRR structure: an input multiplexer, two cascaded registers, a doubled
  clock, and the reference clock used as the real/random select;
* the replacement of every datapath register by an SDRR;
* the iterative core with its four-layer inner-round pipeline;
* 4 cycles per round and 44 per block.

**Choices made here, where the published design is silent:**

* the output of an SDRR is its second register;
* the SEL signal is generated inside the core from CK;
* the round-key register is an SDRR too;
* the key schedule runs on the fly;
* the bypass multiplexers in rounds 0 and 10;
* the valid/ready handshake and the output pulse;
* the synchronous reset to zero;
* the xorshift random source and its seeding;
* the computed S-box.

**Not reproduced:**

* The unprotected reference core. It is the same RTL with plain registers in
  place of the SDRRs.
* An FPGA build. The published utilisation report (about 8.6 k LUTs, 514 I/O)
  belongs to a different, combinational-round implementation with separate
  output buses.
* Anything about the prototype chip.

The security results (lower correlation, more than three orders of magnitude
more traces to disclosure, about 33 % more area, about 3× power) were measured
on silicon and FPGA. This RTL does not reproduce them. How much of that
protection survives depends on the random source, on synthesis keeping the
shared datapath, and on the clock tree.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/aes_ref_pkg.sv` is a reference AES
written separately from the RTL: its S-box comes from log/antilog tables over
the generator 0x03, and it works on byte arrays. It also holds a reference
xorshift128.

| testbench | what it checks |
|---|---|
| `tb_sdrr` | real and random captures with the select toggling or random; the output alternates random and real |
| `tb_aes_sub_bytes` | published S-box entries, all 256 byte values, random states, bypass |
| `tb_aes_shift_rows` | a hand-worked labelled state, random states, bypass |
| `tb_aes_mix_columns` | FIPS-197 column vectors, random states, bypass |
| `tb_aes_add_round_key` | the FIPS-197 round-0 step, random pairs |
| `tb_aes_key_expand` | FIPS-197 round keys 1, 2 and 10, random keys through all ten steps |
| `tb_aes_ctrl` | SEL toggling, the 44-period schedule with all control outputs, back-to-back acceptance |
| `tb_sdrr_prng` | seed load, the sequence against the model, an all-zero seed |
| `tb_sdrr_aes128` | see below |

`tb_sdrr_aes128` runs the whole core at its only configuration. It encrypts:

* FIPS-197 Appendix B;
* FIPS-197 C.1;
* the all-zero key and block;
* 24 random back-to-back blocks.

It also checks:

* the 88-cycle latency and the 88-cycle back-to-back spacing;
* that every SDRR's first register holds its generator's word after each
  random edge;
* that the AddRoundKey SDRR shows random data during the random half.

It counts every mechanism and fails if one never happened: idle and
back-to-back acceptance, the round-0 and round-10 bypasses, the key steps, and
real and random captures.

To run it with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_sdrr_aes128.sv --top-module tb_sdrr_aes128
./obj_dir/Vtb_sdrr_aes128
```

Use the same command for the other testbenches. Change the testbench file and
the top module name each time.

## Files

* `rtl/aes_pkg.sv`: types, GF(2^8) arithmetic, the S-box and round constants
* `rtl/sdrr.sv`: the secure double rate register
* `rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_columns.sv`,
  `rtl/aes_add_round_key.sv`: the four round layers
* `rtl/aes_key_expand.sv`: one key-schedule step
* `rtl/aes_ctrl.sv`: the SEL generator and the round FSM
* `rtl/sdrr_prng.sv`: the random-word generator
* `rtl/sdrr_aes128.sv`: the top
* `tb/`: the testbenches and the reference model
