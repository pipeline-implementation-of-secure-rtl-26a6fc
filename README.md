# Pipelined SHA-1 core, one step per clock

This is a SHA-1 hashing core for network-security offload. It runs the 80
steps of the SHA-1 compression function at one step per clock cycle. A
512-bit block takes 84 cycles, and blocks follow each other with no idle
cycles. At 10 MHz that is 512 bits / (84 × 100 ns) ≈ 61 Mbit/s.

The speed comes from how the five-operand addition of a SHA-1 step is
split up:

    TEMP = ROTL5(A) + f(B,C,D) + E + W(t) + K(t)

Only `ROTL5(A)` and `f(B,C,D)` depend on the step just before. The other
three operands are summed ahead of time in two pipeline registers. Each
clock cycle then closes only a three-input addition.

Everything a host does more cheaply in software stays in software:

- padding the message;
- cutting it into 512-bit blocks;
- cutting each block into sixteen 32-bit words;
- joining the five result words into a 160-bit digest.

All buses are 32 bits wide and all words are big-endian, as SHA-1 defines
them.

## Files

| file | contents |
|---|---|
| `rtl/sha1_pkg.sv` | constants (IV, K1..K4, 84-cycle period), `round_t`, `seed_t`, the `ctrl_t` timing bundle, `rotl()` |
| `rtl/msg_conv.sv` | message scheduler: 16-word register window that produces W(0..79) |
| `rtl/logic_unit.sv` | round function f(t;B,C,D): choose / parity / majority / parity |
| `rtl/sha1_cu.sv` | control unit: mod-84 counter, decode of all timing signals, seed sequencer |
| `rtl/sha1_dpu.sv` | datapath: Reg1 (A–D), Reg2 (H0–H4), RegP1/RegP2, K selection, seed adder, digest output |
| `rtl/sha1_pipeline.sv` | top: control unit plus datapath |
| `tb/sha1_ref_pkg.sv` | plain unpipelined SHA-1 model and message padding, used only by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Using the core

Ports of `sha1_pipeline`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `blk_start` | in | 1 | starts a block; word 0 is on `msg_in` in this cycle |
| `blk_first` | in | 1 | sampled with `blk_start`: first block of a message, so the chaining values restart from the IV |
| `blk_last` | in | 1 | sampled with `blk_start`: last block, so its chaining values are the digest |
| `msg_in` | in | 32 | word 0 with `blk_start`, then words 1..15 on the next 15 cycles, with no gaps |
| `ready` | out | 1 | high when a block may start |
| `cnt` | out | 7 | the mod-84 count (0 while idle), for observation |
| `digest_valid` | out | 1 | a digest word is present |
| `digest_idx` | out | 3 | which word: 4, 3, 2, 1, 0 for H4..H0 |
| `digest_word` | out | 32 | the word |

Call the cycle that carries `blk_start` cycle 0:

- words 1..15 go in at cycles 1..15;
- `ready` is low from cycle 1 and high again at cycle 84, so the next block
  can start at cycle 84;
- for a last block, the digest words come out at cycles 82, 83, 84, 85 and
  86, in the order H4, H3, H2, H1, H0;
- the digest is H0‖H1‖H2‖H3‖H4; use `digest_idx` to place each word.

A new message can start at cycle 84, right behind the last block of the
previous one. The last two digest words of the old message then come out
while the new message's first words are going in.

`blk_start` while `ready` is low is a protocol error, and an assertion in
`sha1_cu` reports it. The core has no input stall: once a block has
started, its sixteen words must arrive on consecutive cycles.

## The 84-cycle schedule

The control unit is a counter and nothing else. It counts 0..83 while a
block is in progress. Every enable and select in the datapath is decoded
from that count.

For step t (0..79) the stages are:

| count | stage | work |
|---|---|---|
| t | Msg_conv | select W(t): the input word for t < 16, otherwise ROTL1(W(t-3)⊕W(t-8)⊕W(t-14)⊕W(t-16)); registered |
| t+1 | RegP1 | RegP1 ← W(t) + K(t) |
| t+2 | RegP2 | RegP2 ← RegP1 + E(t) |
| t+3 | Reg1 | A ← ROTL5(A) + f(B,C,D) + RegP2; B ← A; C ← ROTL30(B); D ← C |

A word therefore reaches Reg1.A four cycles after it enters. The last step
(t = 79) finishes at count 82.

How the RegP2 stage gets E(t):

- E(t) equals D one step earlier. In the RegP2 stage of step t, Reg1 holds
  the state before step t-1, so E(t) is simply Reg1.D.
- Step 0 is the exception: it takes H4, or the IV on a first block.
- Reg1 therefore has no E register. The document names the initialisation
  of Reg1.C and Reg1.D from Reg2.C and Reg2.D; here A and B are loaded
  from Reg2 as well.

Reg1 is loaded at count 2. It comes from Reg2, or from the hardwired IV
on a first block. On a first block Reg2 is also reset to the IV at the
same time.

### Seed additions

At the end of a block each chaining value gets its working variable
added: H(i) ← H(i) + A..E. The operands become final at different times:

| cycle (from block start) | addition | operand read from |
|---|---|---|
| 81 | H4 += E(80) | Reg1.C |
| 82 | H3 += D(80) | Reg1.C |
| 83 | H2 += C(80) | Reg1.C |
| 84 (next count 0) | H1 += B(80) | Reg1.B |
| 85 (next count 1) | H0 += A(80) | Reg1.A |

So a single seed adder, fed by a 5:1 select on Reg2 and a 3:1 select on
Reg1, does all five additions on consecutive cycles. These cycles overlap
the last steps of the block and the first two cycles of the next block.
The step adders are otherwise idle then.

The next block needs Reg2 only at count 2, when it loads Reg1. H4 is ready
long before that, and H0 is written at count 1. The digest is complete two
cycles after the 84-cycle block period ends. A small sequencer in
`sha1_cu`, separate from the main counter, runs these five cycles. That
lets them run on whether or not a new block has started.

## Where this design departs from the document, or fills in for it

The document gives:

- the division into a counter-based control unit and a datapath;
- the register groups Reg1 (working variables), Reg2 (chaining values) and
  RegP (adder pipeline);
- Msg_conv as sixteen flip-flop words;
- the hardwired IV and K;
- the four-cycle adder latency;
- the mod-84 count;
- the 84-cycle period;
- seed additions on otherwise idle adders, with the digest finished two
  steps after the block.

Not given there, and chosen here:

- **Adder pipeline split.** The document fixes the four-cycle latency and
  the one-step-per-cycle rate, not which operand enters at which stage.
  The W+K → +E → +ROTL5(A)+f split above is this design's.
- **Host handshake.** `blk_start`/`ready`/`blk_first`/`blk_last` and the
  rule of no gaps within a block are this design's own.
- **Digest output.** The output is registered, in the order H4..H0, with
  an index. The document says the five words leave in sequence through a
  4:1 multiplexer. It gives neither their order nor what feeds that
  multiplexer.
- **Seed adder.** One shared adder over five cycles. The document says
  only that idle adders do these additions.
- **Reset.** Synchronous and active low. Reg2 resets to the IV and
  everything else to zero.
- **Adders.** Plain `+`. The original FPGA used carry-lookahead adders,
  which is a technology choice.
- **Resource figures.** The original FPGA build used 1191 logic cells and
  879 flip-flops. Generic synthesis of this RTL reports 243 flip-flop bits
  plus 768 bits kept as register arrays (the W window and the chaining
  values among them), about 1011 state bits in all. The numbers are not
  directly comparable.

Not built, because the document presents them only as future work:

- an embedded-RAM version of the Msg_conv window;
- an extra pipeline register after the logical function.

The PCI card that carried the original FPGA is not described. Its place is
taken by the plain word ports of the top.

## Verification

Each testbench checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`.

- `tb_logic_unit`: all four round functions against bit-level truth
  tables, using random and all-0/all-1 operands.
- `tb_msg_conv`: W(0..79) for six blocks against the reference schedule.
  Hold cycles are mixed in.
- `tb_sha1_cu`: every timing signal, the count and `ready` on every cycle
  of six blocks:
  - back to back and after gaps;
  - with all combinations of the first and last flags.
- `tb_sha1_dpu`: the datapath driven by a schedule generated in the
  testbench, over eight blocks, including the one-block "abc" vector.
  Every digest word is checked for its value, index and cycle.
- `tb_sha1_pipeline`: the whole core at its default configuration, over 26
  messages and 58 blocks:
  - the FIPS 180 vectors "abc" (A9993E36 4706816A BA3E2571 7850C26C
    9CD0D89D) and the 448-bit two-block vector (84983E44 1C3BD26E BAAE4AA1
    F95129E5 E54670F1);
  - random messages of 0–250 bytes;
  - `ready` returning exactly 84 cycles after each start;
  - each digest word at cycle 82..86.

  It also counts, and requires at least one of each:
  - chained blocks;
  - back-to-back blocks;
  - a new message started during the previous digest's seed additions;
  - idle gaps.

- `tb_sha1_abc_timing`: one "abc" block straight after reset, at a
  10 MHz clock. It checks the published digest, the 84-cycle block period
  (61 Mbit/s at 10 MHz), the step counter running through 0..83, and the
  last digest word at cycle 86.

Run one testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv tb/tb_sha1_pipeline.sv \
        --top-module tb_sha1_pipeline -o sim && ./obj_dir/sim

The full-core test runs in well under a second. Verilator simulates with
two states, so every register that is read has a reset value.

## Changing the design

- **Round constants, IV and period.** They are in `sha1_pkg`. The period
  (84) and the stage offsets are tied to each other. If you add a
  pipeline stage, for example a register after `logic_unit`, move the
  decode in `sha1_cu` (`p1_en`, `p2_en`, `step_en`, `f_rnd`, the seed
  start) and the E(t) source in `sha1_dpu` together. `tb_sha1_cu` checks
  those counts.
- **Word order.** The core expects words in message order, each as the
  big-endian 32-bit value of four message bytes.
