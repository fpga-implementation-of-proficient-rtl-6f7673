# Two-lane PRESENT-80 encryptor

PRESENT is a lightweight 64-bit block cipher built for small hardware: 31
rounds, each made of a key XOR, sixteen 4-bit S-boxes and a fixed bit
permutation that costs only wiring. This RTL encrypts **two 64-bit blocks at
once, each with its own 80-bit key**. Two identical round-iterative lanes
share one pair of control strobes. Each lane does one full round per clock,
so both ciphertexts are ready 32 clocks after the plaintexts go in. That is
twice the throughput of a single lane that handles the two blocks one after
the other (64 clocks), for roughly twice the registers.

Only encryption is implemented. Decryption is not part of this design.

## The cipher, as built

Bit 0 is always the rightmost bit of a word.

| step | what happens to the 64-bit state |
|---|---|
| addRoundKey | `state ^= K_i`, where K_i is bits [79:16] of the key register |
| sBoxLayer | each nibble x becomes S(x), with S = `C 5 6 B 9 0 A D 3 E F 8 4 7 1 2` for x = 0..F |
| pLayer | bit i moves to bit 16·i mod 63; bit 63 stays put |

After round i (i = 1..31), the 80-bit key register is updated in three steps:

1. Rotate it left by 61 bits.
2. Replace the top nibble [79:76] with its S-box value.
3. XOR the 5-bit round number i into bits [19:15].

After round 31, the key register holds K32. The ciphertext is `state ^ K32`
(post-whitening).

These tables are the published PRESENT standard (ISO/IEC 29192-2). The
testbenches confirm them against the standard's four known answers:

| key | plaintext | ciphertext |
|---|---|---|
| 0 | 0 | 5579C1387B228445 |
| FF..F | 0 | E72C46C0F5945049 |
| 0 | FF..F | A112FFC72F68417B |
| FF..F | FF..F | 3333DCD3213210D2 |

## One lane, clock by clock

A lane (`present_core`) has three registers:

- a 64-bit state register;
- an 80-bit key register;
- a 5-bit round counter.

The lane has no enable and no start pulse. The two load strobes drive
everything.

| rising edge with | state | key | counter |
|---|---|---|---|
| `key_load` | holds | ← `data_i` (all 80 bits) | holds |
| `data_load` | ← `data_i[63:0]` | holds | ← 1 |
| neither, block in flight, counter = i ≠ 0 | ← round(state, K_i) | ← update(key, i) | i + 1 (31 wraps to 0) |
| neither, counter = 0 | `data_o` ← state ^ K32; `done_o` high for the next clock | — | ← 1, lane rests |

The first two rows combine when both strobes are high: the key and the
plaintext (the key's low 64 bits) load together.

So the timeline after the plaintext-load edge is:

- edges 1 to 31 run rounds 1 to 31;
- edge 32 writes the ciphertext.

`data_o` then keeps its value until the next ciphertext is written. The
counter passes 1, 2, …, 31, 0, 1 and then stays at 1 while the lane is idle.

Three details matter when you drive it:

- **The key is used up.** The rounds overwrite the key register with the key
  schedule. Every block therefore needs its key loaded again before its
  plaintext. If you load a new key on its own while a block is in flight,
  that block is abandoned and it never raises `done_o`.
- **The key load can overlap the output.** A load on the 32nd edge is
  allowed: that edge both writes the ciphertext and takes the new key. With a
  fresh key per block, a lane can therefore start a block every 33 clocks:
  key load on the output edge, plaintext load on the next edge, then 31
  rounds.
- **Reset is optional for the data.** The state and key registers have no
  reset, because loading them is what starts a block. `rst_ni` (asynchronous,
  active low) clears only the counter, the busy flag and `done_o`, so that no
  spurious `done_o` appears after power-up.

An assertion in `present_core` checks that `done_o` is only ever high 32
clocks after a `data_load`.

## Two lanes: `present_top`

`present_top` places `LANES` lanes side by side (default 2). Each lane has
its own 80-bit `data_i[n]`, its own registers and counter, and its own
`data_o[n]`. `key_load` and `data_load` go to every lane, so the lanes run
in lock step and finish on the same edge.

Usage:

1. Put each key on `data_i[n]` and pulse `key_load` for one clock.
2. Put each plaintext on `data_i[n][63:0]` and pulse `data_load` for one
   clock.
3. Wait 32 clocks. `done_o[n]` is high in the clock after the ciphertexts
   land on `data_o[n]`.

Rates at `LANES = 2`:

- **Latency rate:** 128 bits per 32 clocks of latency, 4 bits per clock. At
  250 MHz that is 1 Gbit/s.
- **Sustained rate with a fresh key per block:** 128 bits per 33 clocks,
  about 970 Mbit/s at 250 MHz.

Whether a given FPGA reaches 250 MHz has not been checked here.

Ports of `present_top`:

| port | width | meaning |
|---|---|---|
| `clk_i` | 1 | clock, rising edge |
| `rst_ni` | 1 | asynchronous active-low reset of the control flags |
| `key_load`, `data_load` | 1 each | shared load strobes |
| `data_i[LANES]` | 80 | key, or plaintext in [63:0] |
| `data_o[LANES]` | 64 | last ciphertext |
| `done_o[LANES]` | 1 | one-clock pulse after `data_o` is written |
| `round_counter[LANES]` | 5 | current round, for observation |

## Files

Everything below `present_top` is one lane and its parts:

- `rtl/present_pkg.sv`: widths, types, the S-box table and the permutation
  rule.
- `rtl/present_sbox_layer.sv`, `rtl/present_player.sv`: the two round
  layers.
- `rtl/present_round.sv`: key XOR followed by the two layers.
- `rtl/present_key_update.sv`: one key-schedule step.
- `rtl/present_key_reg.sv`: the key register with its load path and the
  schedule.
- `rtl/present_state_reg.sv`: the state register with its load path and the
  round datapath.
- `rtl/present_core.sv`: one lane, with the counter, the output register and
  the flags.
- `rtl/present_top.sv`: the lanes side by side.

Synthesis of the two-lane top gives about 430 flip-flop bits:

- per lane: 64 state bits, 80 key bits, 64 output bits, 5 counter bits and
  2 flags;
- no memories.

## Where this departs from the original description

The architecture, the two load strobes and their bit fields, the counter
starting at 1, the 32-clock latency, the two lanes under one control, and the
missing datapath reset all follow the source description. These are this
design's own choices:

- the `done_o` pulse;
- the registered output that holds between blocks;
- the lane resting after a block, instead of cycling on;
- the overlap of a load with the output edge;
- a lone key load abandoning a block;
- both strobes in one clock;
- the reset of the control flags;
- one key register and one state register per lane, each loaded by the
  shared strobes. A block diagram of the original shows single shared
  "key load" and "data load" boxes; functionally these are the same.

The round flow is sometimes drawn as rounds 1 to 31 separated by flip-flops,
which could be read as an unrolled 31-stage pipeline. Here it is built as a
single round register that is reused 31 times. That matches the round
counter, the 32-clock latency and the quoted throughput formula
(frequency × block size ÷ latency).

## Simulation

Each block has a self-checking testbench in `tb/`. `tb/present_ref_pkg.sv`
is a software model of PRESENT-80 written independently of the RTL: a case
table S-box, and the permutation written as a 4 × 16 transposition. Each
testbench prints `TB_RESULT checks=N failures=M` and stops.

`tb_present_top` runs the default two-lane top end to end. It covers:

- the known answers;
- 30 random pairs, including identical plaintexts on both lanes;
- a 16-pair stream at 33 clocks per pair;
- combined key-and-plaintext loads;
- abandoned blocks;
- a reset in the middle of a block.

It counts each of these mechanisms and fails if any never happened.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/present_pkg.sv tb/present_ref_pkg.sv tb/tb_present_top.sv \
    --top-module tb_present_top -o sim
./obj_dir/sim
```

Replace `tb_present_top` with any other `tb_*` module to test a single block.
All simulations finish in well under a second.

To try a different number of lanes, override `LANES` on `present_top`. The
lanes are independent copies, so nothing else changes.
