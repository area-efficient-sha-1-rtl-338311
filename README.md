# SHA-1 hasher with explicit modulo-2^32 adders

This is an iterative SHA-1 engine: it turns a message of any bit length into
the standard 160-bit SHA-1 digest, computing one of the 80 rounds per clock.
The design's main idea is about how its adders are written. SHA-1 needs
additions modulo 2^32. Here every one of them is a small `mod_add32` unit,
not a bare `+` that relies on the result being cut to 32 bits. The unit
forms the sum one bit wider, subtracts 2^32 from it, and keeps the reduced
value when the subtraction does not go negative. The design this RTL follows
reports that, on a Spartan-3E FPGA, writing the adders this way took the
implementation from 732 to 625 slices (669 to 662 flip-flops). Those figures
come from that design, not from this RTL.

The digest is bit-exact SHA-1 (FIPS 180). The testbenches check it against
the published vectors for `""`, `"abc"` and the 448-bit
`"abcdbcdecdefdefg..."` message, and against an independent reference model
for random messages of many lengths.

## Block structure

```
sha1_top ─┬─ sha1_pad          padding of the last chunk (1, zeros, 64-bit length)
          └─ sha1_core ─┬─ sha1_schedule   W_t, 16-word sliding window
                        ├─ sha1_step ─┬─ sha1_f     f_t(B,C,D)
                        │             ├─ sha1_k     K_t
                        │             └─ 4 x mod_add32
                        └─ 5 x mod_add32  (final H += A..E)
sha1_pkg: word and state types, initial values, constants, rotate function
```

## The modulo adder (`mod_add32`)

This is the part that is easiest to misread. The selection rule is:

1. `temp = a + b`, computed in 33 bits.
2. `diff = temp - 2^32`, computed in 34 bits so that its sign can be seen.
3. If `diff` is not negative (so `temp >= 2^32`), the result is `diff[31:0]`.
   Otherwise the result is `temp[31:0]`.

The outcome is always `(a + b) mod 2^32`. The source states the test as
"the difference is greater than the temporary". This RTL reads that as a
test on the sign (borrow) of the difference, the only reading that gives
modulo addition. The `wrap` output reports whether the reduction was applied.
In other words, it is the carry out. It is brought out so that testbenches
can count reductions. Nothing in the datapath uses it.

Whether this form actually synthesises smaller than `+` depends on the tool.
Most synthesis tools reduce both to the same 32-bit adder. The slice savings
quoted above were measured on the original implementation, and this RTL makes
no claim to reproduce them.

## One round: the step function (`sha1_step`)

The five 32-bit working words A..E are updated every round:

- new A = E + f_t(B,C,D) + S^5(A) + W_t + K_t. The four additions are chained
  in exactly this order: E + f first, then S^5(A), then W_t, then K_t.
- new B = A, new C = S^30(B), new D = C, new E = D.

S^n is a left rotation by n bits. The chain is four `mod_add32` deep, and it
is the critical path of the design.

| rounds | f_t(B,C,D) | K_t |
|---|---|---|
| 0–19 | (B and C) xor (not B and D) | 0x5a827999 |
| 20–39 | B xor C xor D | 0x6ed9eba1 |
| 40–59 | (B and C) or (B and D) or (C and D) | 0x8f1bbcdc |
| 60–79 | B xor C xor D | 0xca62c1d6 |

## Message schedule (`sha1_schedule`)

W_0..W_15 are the sixteen big-endian words of the block. Word 0 sits in bits
511:480. Later words follow W_t = ROTL1(W_t-3 ^ W_t-8 ^ W_t-14 ^ W_t-16).
Only a 16-word window is stored. Each round shifts the window by one word
and appends the next expanded word, so `w` always shows the word of the round
in progress. The source names W_t but does not give its expansion. The
standard SHA-1 rule is used.

## Engine and timing (`sha1_core`)

Registers: the chaining value H0..H4 and the working state A..E. Both reset
to the standard initial values 67452301, efcdab89, 98badcfe, 10325476 and
c3d2e1f0.

| edge (relative to accept) | action |
|---|---|
| 0 | `start` taken while `ready`. The schedule loads the block. A..E ← H0..H4, or both ← initial values when `init` is high. |
| 1 … 80 | one round per edge (t = 0..79) |
| 81 | H0..H4 ← H0..H4 + A..E (five `mod_add32`). `done` is high for the following cycle and `ready` returns. |

A block thus takes 81 cycles to `done` and 82 cycles between accepts, so a
long message is hashed at 512 bits per 82 clocks. The final feed-forward
addition of A..E into H is standard SHA-1. The source does not spell it out,
but without it the output would not be SHA-1.

## Message interface and padding (`sha1_top`, `sha1_pad`)

A message arrives as 512-bit chunks on a valid/ready handshake (`in_valid`,
`in_ready`), with the first message bit in bit 511.

- A full chunk is sent with `in_last = 0`.
- The final chunk is sent with `in_last = 1` and `in_nbits` = 0..511 valid
  bits. Bits below the valid ones are ignored. A message whose length is a
  multiple of 512 therefore ends with an empty final chunk (`in_nbits = 0`).
- The top counts the message length in a 64-bit register. `sha1_pad` appends
  a 1 bit, zeros and the 64-bit bit length, making the padded length a
  multiple of 512 (the message plus the 1 and zeros comes to 448 mod 512).
- If the final chunk holds 448 bits or more, the length does not fit. The
  padding then needs a second block (zeros plus length), which the top stores
  and sends to the core as soon as the core is free. `in_ready` stays low
  until then.
- The first chunk of each message starts the core from the initial values.
  Messages can follow each other back to back.
- `digest_valid` pulses for one cycle when the final block completes.
  `digest` (H0 in bits 159:128) keeps its value until the next block
  finishes.

Reset (`rst_n`) is asynchronous and active low. One assertion checks that
the core never reports a block the top did not issue.

## Where this RTL departs from, or fills in, the source

- **Table of round functions.** For rounds 40–59 the source's table lists the
  term (B and D) twice and leaves out (B and C). This RTL uses the standard
  majority function. With the table's version the digest would not be SHA-1.
- **Initial value of E.** It is 0xc3d2e1f0, the FIPS value the source refers
  to.
- **Length field.** One passage puts the length in the last 48 bits. Another
  requires the padded message to be 448 mod 512, which leaves 64 bits. This
  RTL uses 64 bits, as SHA-1 does.
- **Not specified by the source, chosen here:**
  - the message schedule's construction
  - the final addition into H
  - one round per clock
  - all handshakes, the chunk interface and reset behaviour
- **Area.** After generic synthesis the whole design has 463 flip-flop bits
  plus a 512-bit schedule window (16 x 32, inferred as a memory). That is
  more state than the 662 flip-flops the source reports. The schedule window
  and the two 160-bit register sets alone come to 832 bits. The message
  interface adds a 64-bit length counter and the stored length of a pending
  second padding block. The source does not break down its own flip-flop
  count, so the two cannot be compared in detail. FPGA slice counts were not
  measured.
- The round count (80) is fixed in `sha1_pkg`, not a parameter. Changing it
  would no longer give SHA-1.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Those that need
expected SHA-1 values use
`tb/sha1_ref_pkg.sv`, a behavioural SHA-1 written with plain 32-bit `+`
arithmetic and queue-based padding, kept separate from the RTL.

| testbench | what it checks |
|---|---|
| `tb_mod_add32` | corner cases and 2000 random pairs against 33-bit addition; both the wrap and the no-wrap case occur |
| `tb_sha1_f`, `tb_sha1_k` | all 80 round numbers |
| `tb_sha1_step` | 800 random single rounds; 80 chained rounds on the `"abc"` block, where A after round 79 must equal 0x42541b35 |
| `tb_sha1_schedule` | W_0..W_79 of 8 random blocks, including a hold cycle |
| `tb_sha1_pad` | every final-chunk length 0..511 with random ignored bits; 64 cases need two blocks |
| `tb_sha1_core` | `"abc"`, the two-block 448-bit vector and random block chains; latency of exactly 81 cycles; one-cycle `done` |
| `tb_sha1_top` | the three known vectors and 25 random messages of 0..2000 bits, fed with random gaps |

`tb_sha1_top` also counts how often each mechanism happens: one-block
padding, two-block padding, an empty final chunk, multi-chunk chaining,
back-to-back messages and back-pressure. If any of them never happens, it
counts a failure. The top has no parameters, so this end-to-end test runs the
design at its only size. It finishes in well under a second.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv rtl/*.sv tb/tb_sha1_top.sv \
    --top-module tb_sha1_top -Mdir obj_top
./obj_top/Vtb_sha1_top
```

To run another testbench, replace `tb_sha1_top` with its name. Lint a module
with `verilator --lint-only -Wall -Irtl rtl/sha1_pkg.sv rtl/<module>.sv`.
Verilator's only remaining lint warning, SYNCASYNCNET on `rst_n` in
`sha1_top`, comes from the assertion's `disable iff` using the asynchronous
reset. It is harmless.
