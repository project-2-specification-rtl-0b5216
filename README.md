# SHA-1 compression in hardware: iterative and partially unrolled

SHA-1 turns a message into a 160-bit digest by running a compression
function over each 512-bit block: five 32-bit words A..E go through 80
steps, each step adding a rotated A, a logic function of B, C, D, the
previous E, a message word W_t and a constant K_t. This RTL builds that
compression function two ways and puts both on one chip:

* **Basic iterative architecture** – one step of logic behind the A..E
  register, used 80 times: 80 clocks per block.
* **Partially unrolled architecture** – five steps chained in one clock,
  used 16 times: 16 clocks per block.

The two differ only in how many steps sit between the registers. Unrolling
by five cuts the clock count by five but makes the critical path about five
steps long. The clock rate therefore falls by a little less than five, and
the throughput per second rises only a little. The design aims at the rate
of 1 Gbit/s IPsec authentication.

## Structure

```
sha1_top
├── sha1_core #(UNROLL=1)   basic architecture   (b_* ports)
└── sha1_core #(UNROLL=5)   unrolled architecture (u_* ports)
      ├── sha1_ctrl         iteration counter, handshake, step number
      ├── sha1_msg_sched    16-word window, UNROLL message words per clock
      └── sha1_round_chain  UNROLL x sha1_round, combinational
sha1_pkg                    state struct, IV, K_t, f_t, rotation, phases
```

| File | What it is |
|---|---|
| `rtl/sha1_pkg.sv` | `state_t` (A..E), `phase_e`, `K_CONST`, `IV`, `f_func`, `rotl`, `state_add` |
| `rtl/sha1_round.sv` | one step, combinational |
| `rtl/sha1_round_chain.sv` | `UNROLL` steps in series |
| `rtl/sha1_msg_sched.sv` | message expansion, `UNROLL` words per clock |
| `rtl/sha1_ctrl.sv` | iteration counter and block handshake |
| `rtl/sha1_core.sv` | one complete architecture |
| `rtl/sha1_top.sv` | both architectures side by side |

## The step and how f_t and K_t are chosen

One step (`sha1_round`) computes

```
A' = rotl(A,5) + f_t(B,C,D) + E + W_t + K_t     (mod 2^32)
B' = A    C' = rotl(B,30)    D' = C    E' = D
```

The 80 steps fall into four groups of 20:

| steps | f_t | K_t |
|---|---|---|
| 0–19  | (B & C) \| (~B & D) | 5A827999 |
| 20–39 | B ^ C ^ D | 6ED9EBA1 |
| 40–59 | (B & C) \| (B & D) \| (C & D) | 8F1BBCDC |
| 60–79 | B ^ C ^ D | CA62C1D6 |

In the unrolled core, pass p (p = 0..15) does steps 5p..5p+4. Since 20 is a
multiple of 5, all five steps of a pass share one f and one K: passes 0–3
use the first group, 4–7 the second, and so on. `sha1_round_chain` still
gives each step its own step number, so `UNROLL` may be any divisor of 80
(1, 2, 4, 5, 8, 10, 16, 20, 40, 80). `sha1_ctrl` stops elaboration with an
error for any other value.

The sum of five operands is written as one expression. Synthesis is free to
build it as a carry-save tree or a chain of adders. This is the place to
change if a specific adder structure is wanted, since it sets the critical
path: one such sum per clock in the basic core, five in a row in the
unrolled one.

## Message schedule

W_0..W_15 are the sixteen 32-bit words of the block, most significant word
first. Later words are

```
W_t = rotl(W_{t-3} ^ W_{t-8} ^ W_{t-14} ^ W_{t-16}, 1)
```

`sha1_msg_sched` keeps only a 16-word window. Its first `UNROLL` words are
the words of the current pass. Each clock it moves on by `UNROLL` words.
It computes the new words in order, so new word j can use new word j-3 from
the same clock; this is needed for `UNROLL` = 5. The words it makes past
W_79 are never used.

## Handshake and timing

`sha1_core` has a block interface:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `start` | in | 1 | a block is offered |
| `first` | in | 1 | 1: block starts a message (start from the IV); 0: continue from the previous digest |
| `block` | in | 512 | padded message block, word 0 in bits 511:480 |
| `ready` | out | 1 | the block is taken at the rising edge where `start & ready` |
| `done` | out | 1 | one-clock pulse: `digest` is the result of a block |
| `digest` | out | 160 | H0..H4 (H0 in bits 159:128), held until the next `done` |

Call the rising edge that takes a block edge 0. Then iteration i is written
at edge i+1, and `done` and `digest` are set at edge N = 80/UNROLL. That is
80 clocks for the basic core and 16 for the unrolled core.

`ready` is high when the core is idle, and also during the last iteration
of a block. So a source that keeps `start` high gets one block every N
clocks with no gap. In that case the next block's chaining value comes
straight from the final adder (`h_new`) rather than from the `digest`
register, which is only written at that same edge. This bypass is the
least obvious part of the core, and the testbenches check it both for a
continued message and for a new message (`first = 1`) that follows another
back to back.

Reset (`rst_n`, active low) is synchronous. It idles the controller and
loads the IV into the state registers.

`sha1_top` instantiates the core twice. `b_*` ports drive the basic core
and `u_*` ports the unrolled one; clock and reset are shared.

## Throughput

With blocks back to back, the basic core delivers 512/80 = 6.4 bits per
clock and the unrolled core 512/16 = 32 bits per clock. For 1 Gbit/s the
basic core needs a 156.25 MHz clock and the unrolled core 31.25 MHz. The
clock these cores reach depends on the target and is not claimed here.

In simulation, a one-million-byte message (15,626 padded blocks) takes
1,250,080 clocks on the basic core and 250,016 on the unrolled core from
the first accepted block to the final `done`: exactly 80 and 16 clocks per
block.

## What is outside the cores

* **Padding.** SHA-1 appends a 1 bit, zeros and the 64-bit message length,
  so the message fills whole 512-bit blocks. The cores expect padded
  blocks, and the source that feeds them does the padding. The testbench
  `tb_sha1_messages` shows how.
* **Host interface.** The cores were meant to sit on a PCI accelerator
  board. No bus interface is included; the block ports of `sha1_top` are
  where one would connect.

## Departures and choices

The step equations, the constants, the 80 and 16 clock counts and the two
architectures follow the specification this RTL implements. The following
are this implementation's own:

* the 16-word sliding window for the message schedule;
* the start/ready/done handshake, with gap-free acceptance in the last
  iteration;
* the `first` input that picks the IV or the previous digest;
* the synchronous active-low reset;
* having both architectures in one top level.

The final addition of the chaining value and the IV are those of the SHA-1
standard (FIPS 180-1).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference model
`tb/sha1_ref_pkg.sv` is a separate, loop-based transcription of the
standard that shares no code with the RTL.

| Testbench | What it checks |
|---|---|
| `tb_sha1_round` | 800 random steps, all step numbers, against the reference step |
| `tb_sha1_round_chain` | five chained steps, all 16 passes, random data |
| `tb_sha1_msg_sched` | all 80 words at 1 and 5 words per clock; load over advance |
| `tb_sha1_ctrl` | cycle-by-cycle model of the controller, start held while busy, back-to-back |
| `tb_sha1_core` | both architectures: published digests of "abc" and the 448-bit two-block message, random multi-block messages, latency of every block, spacing of a back-to-back stream |
| `tb_sha1_top` | the same through `sha1_top` at its defaults. It counts idle starts, chained blocks, back-to-back blocks and back-to-back restarts, and fails if any of them never happened |
| `tb_sha1_messages` | pads messages of many lengths in the testbench (including empty, 55/56/64 bytes, and one million 'a') and hashes them on both cores against published digests and the reference model |

Run one with plain Verilator, e.g.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_sha1_top rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv tb/tb_sha1_top.sv
./obj_dir/Vtb_sha1_top
```

`sha1_ctrl` also carries two assertions: the iteration counter stays in
range, and `done` follows the last iteration by one clock.
