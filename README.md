# Pipelined RIPEMD-160 core with pre-computed operation blocks

RIPEMD-160 hashes a message in 512-bit blocks. Each block goes through two
independent lines of five rounds, and each round is 16 operations on a
five-word state. This core gives every round its own pipeline stage. Five
blocks are in flight at once, and a new block can enter every 16 clock
cycles.

The stages are cheap, so the clock period limits the speed. In a plain
implementation one operation per clock puts three 32-bit adders, the
non-linear function `f` and the state multiplexer in series. This core
restructures the operation block so that the loop holds only **two adders,
`f` and the multiplexer**. It does this with two tricks:

* **Spatial pre-computation.** The stage's register is moved from the end of
  the operation into its middle. Half of the next operation ("pre-computation")
  runs in the same cycle as the second half of the current one ("final
  calculation").
* **Temporal pre-computation.** The term `(X + K) + a` is built two operations
  early. This works because `a` of operation t+1 equals `d` of operation t-1.

The cost is two 32-bit registers per operation block, `Z` and `h`.

At one block per 16 cycles, the throughput is `512 / 16 = 32` bits per clock.
At 87.6 MHz that would be 2.8 Gbit/s. The clock rate is not verified here:
this RTL has not been synthesized for an FPGA.

## The operation block (`op_block`)

This is the part that takes the most thought, so it comes first.

The textbook RIPEMD-160 operation is:

```
b_t = e + ROL_s( f(b,c,d) + a + X + K )      a_t = e      c_t = b
d_t = ROL_10(c)                                e_t = d
```

`op_block` keeps six registers: `b* c* d* e*` (the state going into an
operation), `Z` and `h`. Every clock it does two things at once:

| unit | computes |
|---|---|
| final calculation (operation t, from the registers) | `a_t = e*`, `b_t = e* + ROL_s(Z)`, `c_t = b*`, `d_t = ROL_10(c*)`, `e_t = d*`, `W = h`, `h_out = (X_{t+2} + K) + d*` |
| multiplexer | chooses the final calculation's outputs, or a new start state when loading |
| pre-computation (operation t+1) | `b* c* d* e* <= b c d e`, `Z <= W + f(b,c,d)`, `h <= h_out` |

Why this gives the right answer:

* `d*` in operation t is `d_{t-1}`, and `a_{t+1} = e_t = d_{t-1}`.
* So `h_out` equals `(X_{t+2} + K) + a_{t+1}`. It is stored as `h`.
* One clock later it is read back as `W`.
* In the cycle where operation t+2 starts, `Z = W + f(b_{t+1}, c_{t+1}, d_{t+1})`.
  That is exactly the sum that `b_{t+2}` rotates.

The loop runs from the register through the `b_t` adder, the multiplexer, `f`
and the `Z` adder back to the register. The `h` path (two adders, starting at
a register) and the initialisation adders run alongside that loop and do not
lengthen it.

**Loading a round.** `load` is high in phase 0. In that cycle the multiplexer
takes the start state `a_0..e_0`, and the block sets up the two look-ahead
values:

* `W_1 = (X_1 + K) + a_0`, used at once to form `Z`
* `h_1 = (X_2 + K) + e_0`, which is `(X_2 + K) + a_1`

This needs two word reads in the load cycle: `x_a = X_1` and `x_b = X_2`. In
every other phase p, only `x_a = X_{p+2}` is read.

**Cycle timing of one round:**

| phase | final calculation | pre-computation |
|---|---|---|
| 0 | op 16 of the previous round (its result leaves the stage now) | op 1 of the new round, W/h initialised |
| p = 1..15 | op p | op p+1 |

A round therefore takes exactly 16 cycles. A stage reloads in the same cycle
as it delivers the previous round's result, so there are no idle cycles.

**What is not stored.** The source's drawing also passes an `a*` value through
the pre-computation unit. The final calculation never reads it (`a_t = e*`),
so it has no register here. `W` is simply the output of the `h` register.

## Pipeline organisation

```
 in_* words ─► padding_unit ─► control_unit ─┬─► ms_ram bank0 ─► bank1 ─► … ─► bank4
                                             │     (one 16×32 bank per stage, copied on each hand-off)
                                             └─► TEMP DATA0 ─► round 0 ─► round 1 ─► … ─► round 4 ─► md_extraction ─► digest
                                                 (tag: valid, last, chaining value)
```

* **Phase.** One 4-bit counter in `control_unit` runs all stages in lock
  step. Phase 0 is the load phase. At the end of phase 15 (`shift`) every
  block moves on by one stage.
* **Hand-off without an extra register.** Stage r loads, in phase 0, the state
  that stage r-1's final calculation produces in that same cycle. The
  register inside `op_block` is the pipeline register. The path this adds to
  the load cycle is no longer than the loop path described above.
* **Message words (`ms_ram`).** Each stage reads its words from its own bank.
  At each shift:
  * bank 0 takes the newly accepted block;
  * bank r takes bank r-1.

  A stage reads its last word (`X_16`) in phase 14, so this copy never
  overwrites a word that is still needed.
* **Constants (`constants_array`).** There is one instance per stage. It
  converts the phase into:
  * the word indices of both lines: X_1 and X_2 in phase 0, X_{p+2} in
    phase p;
  * the rotation amount of the operation now finishing;
  * K and K'.

  The right line uses f5..f1 where the left line uses f1..f5, as RIPEMD-160
  defines.
* **TEMP DATA.** This is the tag that travels with each block:
  * `valid`;
  * `last` (last block of its message);
  * the chaining value the block started from, which the final addition
    needs.

  Stage 0 takes its start state from this chaining value.
* **Digest extraction (`md_extraction`).** At the shift it captures the tag of
  the block that is leaving. In the next phase 0 it forms RIPEMD-160's final
  combination:

  ```
  h0' = h1 + cL + dR   h1' = h2 + dL + eR   h2' = h3 + eL + aR
  h3' = h4 + aL + bR   h4' = h0 + bL + cR
  ```

  The result is registered. Then it either:
  * pulses `digest_valid` (last block), or
  * pulses `chain_done` (any other block), so the next block of that message
    can start from the new chaining value.

### Latency and rate

| quantity | cycles |
|---|---|
| block issue to two-line result | 80 (5 stages × 16) |
| last block accepted to `digest_valid` | 82 |
| between blocks of different messages | 16 |
| between blocks of the same message | 96 (issue waits for the previous block's result) |

RIPEMD-160 chains the blocks of one message: each block starts from the
previous block's result. A five-deep pipeline therefore runs at full rate
only on independent blocks, for example a stream of short messages. Inside
one long message, blocks follow at the chaining rate.

## Interfaces

`ripemd160_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (control flags only) |
| `in_valid` / `in_ready` | in / out | 1 | word handshake; a word is taken on a clock edge with both high |
| `in_data` | in | 32 | message bytes, the first byte in bits 7:0 (little-endian, as RIPEMD-160 reads words) |
| `in_bytes` | in | 3 | message bytes in the word flagged `in_last` (0..4); earlier words are full |
| `in_last` | in | 1 | last word of the message; an empty message is one word with `in_bytes = 0` |
| `digest_valid` | out | 1 | one-cycle pulse per message |
| `digest` | out | 160 | digest in the usual printed order: h0 first, each word byte-swapped |

The output has no back-pressure. `digest` holds its value until the next
message's digest.

Inside the core, padded blocks move from `padding_unit` to `control_unit` on a
`blk_valid` / `blk_ready` handshake, with `blk_first` and `blk_last` flags.
`blk_ready` is high only in phase 15, and only when no chained result is
pending.

The padding unit follows RIPEMD-160's padding rule:

* append the byte 0x80;
* append zero bytes;
* put the bit length, as a 64-bit little-endian number, in words 14-15.

If fewer than 8 bytes are free after the 0x80, the unit emits a second,
length-only block. If the 0x80 itself does not fit, the second block starts
with it. The length counter is 64 bits wide.

## Files

| file | contents |
|---|---|
| `rtl/rmd_pkg.sv` | types (`state_t`, `tag_t`, `block_t`), the algorithm's tables (r, r', s, s', K, K', initial value), `rol` and `fnl` |
| `rtl/op_block.sv` | the pre-computed operation block |
| `rtl/constants_array.sv` | per-stage constant and word-index generator |
| `rtl/ms_ram.sv` | banked message register file |
| `rtl/transformation_round.sv` | one stage: two `op_block`s, `constants_array`, TEMP DATA |
| `rtl/ripemd160_pipeline.sv` | five stages and `ms_ram` |
| `rtl/md_extraction.sv` | final combination, chaining register, digest output |
| `rtl/control_unit.sv` | phase counter, issue window, chaining wait |
| `rtl/padding_unit.sv` | word-stream padding into 512-bit blocks |
| `rtl/ripemd160_top.sv` | the complete core |
| `tb/rmd_ref_pkg.sv` | behavioural reference: textbook step function, compression, padding, hash |
| `tb/*_tb.sv` | one self-checking bench per module |

## Simulation

Each bench prints `TB_RESULT checks=N failures=M` and ends. For example, the
end-to-end bench of the core at its default configuration:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rmd_pkg.sv tb/rmd_ref_pkg.sv tb/ripemd160_top_tb.sv \
    --top-module ripemd160_top_tb -Mdir obj
./obj/Vripemd160_top_tb
```

To run another bench, replace `ripemd160_top_tb` with its name. The benches
use `$urandom` and no constrained randomisation. All of them run in well
under a second.

What the benches check:

* **Reference model.** It is first checked against eight published
  RIPEMD-160 digests: the empty string, "a", "abc", "message digest", the
  alphabet, the 56-byte two-block string, the 62-character alphanumeric
  string and the 80-digit string.
* **`ripemd160_top_tb`.** Streams 94 messages back to back and compares each
  digest with the model. It also checks:
  * the 16-cycle minimum issue interval;
  * the 82-cycle digest latency;
  * the sustained rate: a closing burst of 24 one-block messages must leave in
    exactly 23 × 16 cycles, which is 32 bits per clock.

  It counts, and requires at least one of, each of the following:
  * one-block messages;
  * extra length blocks;
  * an extra block that begins with 0x80;
  * multi-block chaining with its issue wait;
  * back-to-back digests 16 cycles apart.
* **`op_block_tb`.** Compares each of the 16 operations of every round, on
  both lines, with the textbook step. The 16th result must appear in the next
  load cycle.
* **Other benches.** They cover the round stages, the pipeline (80-cycle
  result, tag alignment, empty slots), the message banks, the constant
  generator, the extraction pulses, the control window and the chaining
  wait. The padding bench covers every length from 0 to 130 bytes under
  random back-pressure.

## Design decisions and departures

These follow the published architecture:

* five pipeline stages, one per round;
* one operation block per round and line;
* the pre-computation/final-calculation split;
* the Z/h/W look-ahead and its initialisation;
* 16 cycles per block;
* a block diagram made of a padding unit, a constants array, a message
  register file, the round pipeline, digest extraction and a control unit.

These are this design's own choices, because the architecture leaves them
open:

* the word-stream input format and all handshakes;
* the 64-bit length counter;
* one message register bank per stage, copied on each hand-off;
* one constants generator per stage;
* the TEMP DATA contents (valid, last, chaining value);
* one shared phase counter;
* the rule that a chained block waits for its predecessor's result;
* the digest byte order and the valid pulse;
* resetting only the control flags.

The RIPEMD-160 constants, padding and final combination come from the
algorithm's definition.

Departures and limits:

* **`a*` and `W` are not registered.** The final calculation never reads
  `a*`, and `W` is the `h` register's output. The extra storage per operation
  block is therefore exactly the two 32-bit registers `Z` and `h`.
* **Interleaving.** Full throughput needs independent blocks in the pipeline.
  The core has one padding unit and one input stream, so it interleaves
  blocks of successive messages, not several long messages at once.
* **Timing is not checked.** Clock frequency and area have not been
  measured. The reduced loop depth is a structural property of the RTL.
* **No comparison baseline.** The conventional operation block used for
  comparison (three adders in the loop) is not included.
