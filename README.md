# RIPEMD-160 in hardware: a five-stage pipelined engine and an iterative engine

RIPEMD-160 turns a message into a 160-bit digest. The message is padded into
512-bit blocks, and each block is folded into a 160-bit chaining value by a
compression function. The compression function runs two independent "lines"
(left and right) side by side. Each line keeps five 32-bit words A..E and runs
80 steps. A step mixes in one message word, a round constant and one of five
bitwise functions, then rotates. At the end both lines are added back into the
chaining value.

This RTL has two engines for that compression function, side by side in
`ripemd160_top`:

* **Pipelined engine** (`ripemd160_pipelined`). There is one stage per round,
  so five stages of 16 steps each. Up to five independent blocks are in flight.
  A new block is accepted every 16 clocks. Latency is 82 clocks.
* **Iterative engine** (`ripemd160_iterative`). One step unit per line is
  reused for all 80 steps. It takes one block per 82 clocks.

Both engines follow the architecture published in "Design of Optimized
Pipelined RIPEMD-160 with High Frequency and Throughput" (2016). The section
"Where this RTL departs from the paper" lists the places where this
implementation had to choose for itself.

## The algorithm, as the hardware sees it

For step `t` (0..79), round `r = t/16`:

```
left : T  = rol_s(t) ( A  + f_{r+1}(B,C,D)    + X[m(t)]  + K[r]  ) + E
       A <- E, B <- T, C <- B, D <- rol_10(C), E <- D
right: T' = rol_s'(t)( A' + f_{5-r}(B',C',D') + X[m'(t)] + K'[r] ) + E'
       (same word shuffle)
```

* `f_1..f_5` are `B^C^D`, `(B&C)|(~B&D)`, `(B|~C)^D`, `(B&D)|(C&~D)` and
  `B^(C|~D)`. The left line uses them in order 1..5 over the rounds. The right
  line uses them in reverse order.
* `m, m'` (message-word selection), `s, s'` (rotation amounts) and `K, K'`
  are the standard RIPEMD-160 tables. They live in `ripemd160_pkg`.
* Final addition: `H0'=H1+C+D'`, `H1'=H2+D+E'`, `H2'=H3+E+A'`,
  `H3'=H4+A+B'`, `H4'=H0+B+C'`.
* Byte order is little-endian. Message bytes are packed into words with the
  first byte in the least significant bits. The digest is the five words
  written out least significant byte first.

## Pipelined engine

### Stages

`ripemd160_pipelined` chains five `ripemd160_round_stage` instances, with
`ROUND = 0..4`. Each stage runs one round of both lines. Its functions are
fixed: left `f_{ROUND+1}`, right `f_{5-ROUND}`. Its constants are also fixed:
`K[ROUND]` and `K'[ROUND]`. A stage holds everything its block needs:

* the ten working words;
* the two pre-computed words per line (`W`, `h`);
* its own 16-word copy of the message (`ripemd160_msg_mem`);
* the block's chaining value, which is needed again at the final addition.

Because the message words and the chaining value travel with the block, five
unrelated blocks can sit in the five stages at once.

After round 5 there is an output register. Then comes `ripemd160_final_add`,
which registers the sum and the digest.

### Taking `M + K + A` out of the step

This is the main timing idea of the design, and it is the hardest part to
follow. In a plain step (figure in `ripemd160_step`), the adds
`A + f + X + K` sit in series before the rotation. The pipelined step
(`ripemd160_pipe_step`) instead assumes that

```
W_t = X[m(t)] + K(t) + A_t
```

was formed in an earlier cycle. What is left in the step's critical path is:

```
Z = f(B,C,D) + W              (pre-computation)
B <- E + rol_s(Z)             (final calculation; A,C,D,E shuffle as usual)
```

`W_t` can be formed early because `A` is only a delayed copy of other words:
`A_{t+1} = E_t`, and `A_{t+2} = E_{t+1} = D_t`. So while step `t` runs, the
unit already forms the word for step `t+2`:

```
hin = X[m(t+2)] + K(t+2) + D_t
```

Each stage has two registers per line. `h` holds the word for step `t+1`.
`W` holds the word for step `t`. Every clock does `W <- h` and `h <- hin`.

When a block enters a stage, the two registers are filled from the incoming
state through multiplexers:

```
W = X[m(t0)] + K + A_in,   h = X[m(t0+1)] + K + E_in      (t0 = 16*ROUND)
```

The `hin` values of a round's last two steps belong to the next round. They
are discarded, because the next stage forms its own first two words.

### Hand-over timing

`out_valid` of a stage is high during its 16th step. Its `out_state` output is
the combinational result of that step, and the next stage loads it on the same
clock edge. The two entry words are computed from `out_state.A` and
`out_state.E`. Those are just the finishing stage's `E` and `D` registers, so
the load path is one adder deep.

Cycle by cycle, for a block accepted at edge N:

| edge        | what happens                                              |
|-------------|-----------------------------------------------------------|
| N           | stage 1 loads the block, `W`, `h`                         |
| N+1..N+16   | steps 0..15; edge N+16 also loads stage 2                 |
| ...         | ...                                                       |
| N+65..N+80  | steps 64..79; edge N+80 loads the round-5 output register |
| N+81        | final addition registered, `out_valid` = 1 for one cycle  |

Latency is therefore 82 clocks, counting the load cycle. Stage 1 is free again
during its 16th step (`in_ready` = `can_load`), so blocks can be accepted at
N, N+16, N+32, and so on. That is 32 bits of message per clock in steady
state. There is no output back-pressure: `out_valid` is a one-cycle pulse, and
results leave in the order blocks were accepted.

### Chaining

The engine compresses independent blocks. The blocks of one message depend on
each other through the chaining value, so a single message goes through at one
block per 82 clocks. The pipeline fills only with blocks of different
messages. The end-to-end testbench interleaves twelve messages this way.
Padding, and feeding `h_out` back as the next block's `h_in` (starting from
the RIPEMD-160 initial value), are up to the user.

## Iterative engine

`ripemd160_iterative` follows the classic loop:

1. **Load cycle.** `load && ready`: the 16 message words are written into
   `ripemd160_msg_mem`. Both lines start from `h_in`, and the step counter `t`
   is cleared.
2. **80 step cycles.** The counter drives `ripemd160_sched`, which gives
   `m, m', s, s', K, K'` and the function numbers. Its outputs address the two
   read ports of the message memory and configure two `ripemd160_step` units,
   one per line.
3. **One final cycle.** `ripemd160_final_add` registers the result.
   `out_valid` pulses.

`ready` is low from the load until the result appears, and a `load` during
that time is ignored. A block is accepted at edge N, and `out_valid` is high
after edge N+81. Blocks follow every 82 clocks.

## Interface

Both engines have the same shape of interface (signal names of `ripemd160_top`):

| port                      | dir | width | meaning                                          |
|---------------------------|-----|-------|--------------------------------------------------|
| `clk`, `rst_n`            | in  | 1     | clock; synchronous active-low reset (clears valid/busy flags only) |
| `pl_in_valid`/`it_in_valid` | in | 1    | block offered (the iterative engine's `load`)    |
| `pl_in_ready`/`it_in_ready` | out | 1   | block taken at this edge if valid                |
| `*_block`                 | in  | 512   | 64 message bytes, byte 0 in `[511:504]`          |
| `*_h_in`                  | in  | 5x32  | chaining value, `H0` in `[31:0]`                 |
| `*_out_valid`             | out | 1     | result valid for one cycle                       |
| `*_h_out`                 | out | 5x32  | new chaining value                               |
| `*_digest`                | out | 160   | `h_out` as a byte string, byte 0 in `[159:152]`  |

## Modules

```
ripemd160_top
├── ripemd160_pipelined
│   ├── ripemd160_round_stage  x5 (ROUND 0..4)
│   │   ├── ripemd160_msg_mem    16x32 words, 2 read ports
│   │   └── ripemd160_pipe_step  x2 (left, right) -> ripemd160_f
│   └── ripemd160_final_add
└── ripemd160_iterative
    ├── ripemd160_sched          step-indexed tables
    ├── ripemd160_msg_mem
    ├── ripemd160_step           x2 (left, right) -> ripemd160_f
    └── ripemd160_final_add
ripemd160_pkg                    types, IV, K/K', m/m', s/s', rol, byte order
```

Every file in `rtl/` is synthesizable SystemVerilog. The only code outside
synthesis is a pair of assertions, guarded by `ifndef SYNTHESIS`. One checks
that a stage is never loaded while busy. The other checks that the iterative
engine drops `ready` after a load.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The reference model `tb/ripemd160_ref_pkg.sv`
is a separate, loop-based RIPEMD-160 with its own copy of the tables, plus the
standard test messages and their digests. Example, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ripemd160_pkg.sv tb/ripemd160_ref_pkg.sv tb/tb_ripemd160_top.sv \
    --top-module tb_ripemd160_top
./obj_dir/Vtb_ripemd160_top
```

Replace `top` with any other module name to run its testbench.

What the testbenches check:

* **`tb_ripemd160_top`** runs both engines at their default size. Twelve
  messages are used: the six standard test messages plus random strings of
  0..199 characters, so there are multi-block messages. The pipelined engine
  gets them interleaved, and the iterative engine gets them one after another.
  It checks every digest and the 82-cycle latency of every block. It also
  counts each mechanism and fails if one never occurs:
  * all five stages busy at once;
  * `in_ready` holding a block back, on each engine;
  * a chained multi-block message.
* **`tb_ripemd160_pipelined`** streams 12 random blocks with random chaining
  values. It checks the 16-clock acceptance spacing, the latency, in-order
  results, and that five stages are busy at once. It then checks the standard
  test messages.
* **`tb_ripemd160_iterative`** checks the standard messages, random blocks,
  the 82-cycle latency, and that loads while busy are ignored.
* **Unit testbenches**:
  * `tb_ripemd160_round_stage`: rounds 1 and 4, a 16-cycle stage time, and
    back-to-back loads.
  * `tb_ripemd160_pipe_step`: the `hin` look-ahead.
  * `tb_ripemd160_step`, `tb_ripemd160_f`, `tb_ripemd160_sched` (all 80
    steps), `tb_ripemd160_msg_mem`, `tb_ripemd160_final_add`.

## Where this RTL departs from the paper, and how far to trust it

* **Algorithm.** The result is bit-exact RIPEMD-160. Both engines reproduce
  the standard test digests, for example `"abc"` →
  `8eb208f7e05d987a9b044a8e98c6b087f15a0bfc`. They also match the reference
  model on random blocks with random chaining values. The tables are those of
  the RIPEMD-160 definition.
* **Right-line functions.** One top-level drawing of the pipelined design
  labels all five right-hand round boxes `f_1`. The RTL uses the reverse order
  `f_5..f_1`, which is what the algorithm requires and what the paper's round
  table says.
* **Look-ahead adder operand.** The published datapath labels the third
  operand of the two-steps-ahead adder as `A`. The RTL uses the current `D`,
  which is the value `A` will have two steps later. That is the only choice
  that gives correct digests with the `W <- h <- hin` delay line.
* **Pipeline depth and throughput.** The paper's throughput figure
  (7804.88 Mbps at 250 MHz) equals five blocks per 82 clocks. This RTL accepts
  one block per 16 clocks, which is 8000 Mbps at the same clock. The 82-clock
  latency matches.
* **Register count.** The paper reports 517 registers for its pipelined
  design. That is too few for five blocks in flight, since the working state
  alone is 5 × 320 bits. The RTL follows the five-stage, five-blocks-in-flight
  structure described in the text and figures. It therefore uses far more
  flip-flops: about 5.9k bits for the pipelined engine, mostly the
  per-stage message copies and states. The paper also mentions a single
  shared "final calculation" unit. That cannot serve five blocks at once, so
  every stage has its own.
* **Own choices.** The paper does not specify these:
  * the 512-bit single-cycle load and the byte order of the block input;
  * the reset behaviour;
  * the valid/ready handshake;
  * the 16-clock hand-over between stages;
  * asynchronous reads from the message memory.
* **Not verified.** Clock frequency, area and power are not evaluated here.
  The paper's 250 MHz and 134.35 MHz figures were measured on an FPGA
  (Arria II GX) with vendor tools.
* **Lint warnings left as they are.** The pipelined step unit ignores its `A`
  input, because `A` is already folded into `W`. The iterative engine leaves
  the message memory's whole-content output unconnected.
