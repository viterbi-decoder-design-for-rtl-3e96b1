# A 480 Mb/s soft-decision Viterbi decoder for multiband-OFDM UWB

The multiband-OFDM ultra-wideband physical layer protects its payload with a
rate-1/3, constraint-length-7 convolutional code. Puncturing raises the rate
to 11/32, 1/2, 5/8 or 3/4. At its top rate of 480 Mb/s a one-bit-per-clock
Viterbi decoder would need a 480 MHz add-compare-select (ACS) loop. That loop
is recursive, so pipelining cannot shorten it. This decoder closes the gap in
three ways:

* **Four trellis stages per clock.** Two radix-4 ACS ranks are chained
  combinationally inside one register loop. A radix-4 step is two radix-2
  stages merged. 120 MHz is then enough for 480 Mb/s.
* **Branch metrics summed outside the loop.** The metric of a radix-4 branch
  is the sum of two radix-2 metrics. It is added up in the branch metric unit,
  so each ACS unit has one adder in the loop, not two.
* **Arithmetic compare-select.** Each ACS unit must pick the best of four
  candidates. Instead of a two-level compare-and-mux tree, it compares all six
  pairs in parallel. A small fixed logic block turns the six result bits into
  the winner's index. The loop then holds one adder, one subtractor, that
  logic and one 4:1 mux.

The survivor decisions are kept in registers. A combinational one-hot
traceback, spread over two clocks, decodes 8 bits every second clock.

For FPGA prototyping the decoder is wrapped with a synthesizable built-in
self-test: a pattern generator that encodes and punctures a pseudo-random
frame, and a checker that counts decoded bit errors. `viterbi_fpga_top` is
that wrapper and the top of the design.

The architecture comes from the thesis *Viterbi Decoder Design for Ultra-Wide
Band System*. That includes the code, 3-bit soft decisions, the correlation
branch metric, the 5-bit branch metric limit, path metrics with threshold
subtraction, the arithmetic CS, traceback length 40 with decoding
length 8, and the 56-stage survivor bank. It also includes the idea of an on-chip pattern generator and self-check
circuit. The interfaces, the puncture patterns, the pipeline registers, the
self-test frame format, the path metric width (8 bits, not 7) and a few
arithmetic details are this implementation's own. They are listed under "Departures and open points".

## Data flow

```
in_soft chunks ─► depuncture ─► bmc ───────────► acs ───────────► tb_control ─► traceback ─► out_bits
 (valid/ready)    12 slots/clk   2 x bm_r4        2 ranks x 64      56-stage      2-clock       8 bits /
                  + erasures     64 metrics each  acs_r4 + ovf_prev register bank one-hot TB    2 clocks
```

In `viterbi_fpga_top`, a mux in front of `depuncture` selects either the
external chunk interface or `bist_gen`. `bist_check` watches `out_bits`:

```
bist_gen (prbs15 -> encoder -> puncture -> soft 0/7) ─► mux ─► viterbi_top ─► out_bits ─► bist_check (prbs15, compare, count)
```

| module | role |
|---|---|
| `vit_pkg` | constants, types, encoder function, radix-4 branch labels, puncture tables |
| `depuncture` | collects received soft values and puts them into the 12 coded-bit slots of four stages; stolen bits become erased slots |
| `bm_r4` | the 64 radix-4 branch metrics of one step (6 soft values), reduced to 5 bits |
| `bmc` | two `bm_r4`, one per radix-4 step of the clock, registered |
| `arith_cs4` | four-input arithmetic compare-select |
| `acs_r4` | one radix-4 ACS unit: 4 adders and an `arith_cs4` |
| `ovf_prev` | overflow prevention for the 64 path metrics |
| `acs` | 2 x 64 `acs_r4`, 2 `ovf_prev`, path metric and decision registers |
| `tb_element` | radix-4 traceback element for one state |
| `tb_column` | 64 traceback elements: one radix-4 step back |
| `tb_control` | survivor register bank and traceback scheduling |
| `traceback` | 23 traceback columns in two register-separated halves, bit decoding |
| `viterbi_top` | the decoder |
| `prbs15` | 1 + D^14 + D^15 pseudo-random sequence, N bits per clock |
| `bist_gen` | self-test pattern generator: random bits, encoder, puncturer, soft values, optional weak errors |
| `bist_check` | self-test checker: regenerates the bits, counts wrong decoded bits and checked bytes |
| `viterbi_fpga_top` | decoder plus self-test, with a mode switch (top) |

## Trellis conventions

A state holds the last six information bits, with the newest bit in bit 0.
A radix-4 step with information bits `u1` then `u2` goes from state `p` to
`s = {p[3:0], u1, u2}`. Each state therefore has four predecessors,
`{j, s[5:2]}` for `j = 0..3`. The ACS decision is that `j` (2 bits per state
per step). Because the newest bits sit at the bottom, the two bits decoded for
a step are the low two bits of the state the path is in after the step.

The encoder's generator taps are package constants `G_A`, `G_B` and `G_C`
(bit k = coefficient of D^k):

* G_A = 1 + D^2 + D^3 + D^5 + D^6
* G_B = 1 + D + D^4 + D^5
* G_C = 1 + D + D^2 + D^3 + D^4 + D^6

`r4_label(s, j)` runs the encoder over the two stages to get the six
reference bits of branch `{j, s[5:2]} -> s`. Bit i of the label belongs to
slot i: first stage A,B,C, then second stage A,B,C. The ACS array computes
these labels at elaboration time. If you change the taps, everything
follows.

## Branch metrics

Soft values are 3 bits: 0 is a strong zero, 7 a strong one. Each coded bit
contributes a *correlation* metric: the soft value if the reference bit is 1,
and 7 minus it if the reference bit is 0. **Larger is better** throughout the
decoder, and the compare-select looks for maxima. An erased (stolen) slot
contributes 0 to both hypotheses, so it cannot favour either.

A radix-4 branch covers six coded bits, so its raw metric reaches 42 (6 bits).
To keep the ACS at 5-bit branch metrics, `bm_r4` takes the best label's sum
(the sum of the larger of the two per-bit metrics) and, if it exceeds 31,
subtracts the excess from every label, with a floor of 0. The same offset on
all branches of a step leaves every ACS decision unchanged. Only branches
that are far worse than the best one get clipped at 0.

## ACS and overflow prevention

`acs` does two radix-4 steps per clock. Metrics flow from the path metric
registers through 64 `acs_r4` units (first step), then `ovf_prev`, then 64 more
`acs_r4` units (second step), then `ovf_prev` again, and back into the
registers.

Path metrics are 8 bits (`PMW`) and only grow. `ovf_prev` watches the top
bit of every metric. If any metric has reached `THRESH` = 128, it subtracts
`SUB` = 64 from all of them, and metrics below 64 become 0. Because this runs
after every radix-4 step, a metric is at most 127 before an add, and
127 + 31 = 158 still fits in 8 bits. That is why the adders in `acs_r4` need
no carry-out.

The original design uses the same rule with 7-bit metrics: threshold 64,
subtract 32, so that 70, 40, 33, 10 becomes 38, 8, 1, 0. That version was
built and tested here, and it fails on clean input. With full-strength
rate-1/3 soft values the best path gains the most it can every step. Every
other state then falls more than 32 behind and is clamped to 0 at each
subtraction. Their survivors become ties, resolved towards index 0, and a
traceback that starts in state 0 then follows a wrong path. The self-test saw
12 wrong bits in 800. With 8 bits the gap that survives clamping is twice as
large, and every test frame decodes without error. To go back to the
original sizing, set `PMW = 7` in `vit_pkg`. `THRESH`, `SUB` and `PM_INIT`
then default to 64, 32 and 63.

After reset or `clr`, state 0 starts at `PM_INIT` = 127 and all other states
at 0, because the encoder starts in state 0.

### How the arithmetic compare-select decides

With candidates v0..v3, `arith_cs4` forms r(i,j) = (v_i >= v_j) for the six
pairs i < j. Each comparison is one subtractor's borrow. Input i is the
maximum when it beats the three others:

```
max0 =  r01 &  r02 &  r03
max1 = ~r01 &  r12 &  r13
max2 = ~r02 & ~r12 &  r23
sel  = {~max0 & ~max1, ~max0 & ~max2}     // 3 when none of 0..2 wins
```

Ties go to the lower index. This makes the six bits a strict order, so
exactly one input qualifies and the "no maximum" patterns of a general
relation can never occur. `sel` is the 0-based index of the winner, which is
the survivor decision itself.

## Survivor bank and two-clock traceback

This is the part that needs the most care.

`tb_control` holds 28 radix-4 steps (56 trellis stages) of decisions,
128 bits per step. Row 0 is always the newest step. Every valid clock the bank
shifts by two rows. The traceback is purely combinational: a one-hot 64-bit
"path is here" vector passes through `tb_column`s, one per radix-4 step. In
each column every state with the path forwards it to the predecessor named by
its decision.

Tracing 40 stages (20 columns) plus decoding 8 more is too long for one
clock, so it is split over two consecutive shifts:

1. **First clock (`do_a`).** Start in state 0 at row 0 and go through rows
   0..11. Register the one-hot vector.
2. **Second clock (`do_b`, the next shift).** The bank has moved by two
   rows, so the step that was row 12 is now row 14. Continue through rows
   14..21, which completes 20 steps. The path is now taken as merged. Then
   decode four steps, rows 22..25 as seen now. For each step, OR the low two
   state bits over the one-hot vector (state 4i+j decodes to bits j).
   `out_bits` is registered with bit 0 as the oldest bit.

A traceback starts on every second shift, and each decodes the 8 stages that
follow the previous one. Output is therefore continuous: 4 bits per clock on
average, as a byte every other clock. The first 12 shifts after a (re)start
fill the window. `start_ok` marks the first traceback whose decode window
holds real data, and its byte is exactly bits 0..7 of the frame.

Timing with a word every clock, counting the edge that accepts the first
chunk as edge 0:

* edge 1: depunctured word
* edge 2: branch metrics
* edge 3: ACS decisions
* edges 4 to 17: shifts 1 to 14
* edge 17: the first byte is registered

After that a byte follows every two clocks. The decoder does not flush.
Decoding the last bit of a frame needs 48 more trellis stages fed behind it:
the tail bits plus padding.

## Interface (`viterbi_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; 120 MHz gives 480 Mb/s |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `clr` | in | 1 | synchronous restart: metrics, buffer and traceback schedule |
| `rate` | in | `rate_e` | `RATE_1_3`, `RATE_11_32`, `RATE_1_2`, `RATE_5_8`, `RATE_3_4` |
| `in_valid`, `in_ready` | in/out | 1 | chunk handshake; a chunk moves when both are high |
| `in_count` | in | 4 | values in the chunk, 1..12 |
| `in_soft` | in | 12 x 3 | received soft values in transmission order, element 0 first |
| `out_valid` | out | 1 | `out_bits` holds 8 decoded bits |
| `out_bits` | out | 8 | decoded bits, bit 0 oldest |
| `ovf_evt` | out | 1 | overflow prevention acted in the last ACS clock |

To switch rates, for example from a header to a payload, let the old frame
drain, then pulse `clr` with the new `rate`. `in_ready` is high while the
24-entry buffer can take a full chunk. At every rate a full-throughput stream
needs at most 12 values per clock.

## Built-in self-test (`viterbi_fpga_top`)

`viterbi_fpga_top` has all the `viterbi_top` ports above plus these:

| port | dir | width | meaning |
|---|---|---|---|
| `bist_mode` | in | 1 | 0: the decoder ports are brought straight out. 1: the self-test drives the decoder |
| `bist_start` | in | 1 | pulse to start a self-test frame; it also restarts the decoder |
| `bist_inject` | in | 1 | replace every 97th sent value with a weak value of the wrong sign |
| `bist_nbits` | in | 16 | information bits per frame, a multiple of 8 |
| `bist_done` | out | 1 | the whole frame has been sent and checked |
| `bist_errors` | out | 16 | wrong decoded bits (saturating) |
| `bist_bytes` | out | 13 | decoded bytes checked |

In self-test mode `rate` selects the code rate and `in_ready` is held low.
`bist_gen` sends `bist_nbits` bits of the 1 + D^14 + D^15 sequence (seed
0x1D2B), then 56 zero bits: the encoder tail plus the traceback window. It
encodes four bits per clock, keeps the bits the puncture pattern transmits,
and sends them as soft values 0 or 7 through the same valid/ready chunk
interface. Injected errors are 3 in place of a strong one and 4 in place of a
strong zero. `bist_check` runs its own copy of the sequence. It compares the
first `bist_nbits/8` decoded bytes with it and the next byte with zero, so
`bist_bytes` ends at `bist_nbits/8 + 1`. `out_valid` and `out_bits` stay
visible in both modes. At full throughput a frame takes about
`bist_nbits/4 + 30` clocks.

## Parameters

Parameters: `TB_LEN` (40, the traceback length in stages) and `MEM_STEPS`
(28, the bank depth in radix-4 steps) on `viterbi_top`, `tb_control` and
`traceback`; `IN_W` and `BUFN` on `depuncture`; `PM_INIT` on `acs`; `THRESH` and `SUB` on
`ovf_prev`; `INJ_PERIOD` (97) on `bist_gen`. The widths (3-bit soft values,
5-bit branch metrics, 8-bit path metrics) are package constants. The two-clock traceback assumes decoding
length 8 and `MEM_STEPS >= TB_LEN/2 + 5`.

## Departures and open points

* **Puncture patterns are this design's own.** The rates are the standard's.
  The stolen-bit positions chosen are:
  * 11/32: C of bit 10 of every 11 is stolen.
  * 1/2: every C is stolen.
  * 5/8: all A are kept, plus B of bits 0, 2 and 4 of every 5.
  * 3/4: all A are kept, plus B of bit 0 of every 3.

  Bits go out in the order A, B, C. To match another transmitter, edit
  `punct_keep` and `punct_period` in `vit_pkg`. The depuncturer follows
  those functions.
* **G_B = 1 + D + D^4 + D^5 as stated**, although the other two generators
  end in D^6. Check it against the standard revision you target. It is a
  one-line change.
* **Branch metric limit** is read as a common per-step offset (see above),
  not as per-branch saturation.
* **Path metrics are 8 bits, not 7**, with threshold 128 and subtraction 64
  (see "ACS and overflow prevention" for why).
* **Overflow prevention runs after each radix-4 step** (twice per clock).
  With 5-bit branch metrics, subtracting only once per four stages could
  wrap.
* **Traceback** is two register-separated halves instead of one two-clock
  multicycle path. The result and the throughput are the same, and no timing
  exception is needed.
* **Latency** is 17 clocks to the first registered byte. The source gives
  16 in one place and a 24 + 4 breakdown in another, so its exact pipeline
  registers are unknown.
* **Output** is a byte every other clock, not 4 bits every clock.
* **Self-test:** the original only says that a synthesizable pattern and a
  self-check circuit were built for cycle-accurate checking on the FPGA. The
  sequence, frame format, error injection, mode switch and status ports are
  this design's.
* **Not included:** the QPSK soft demapper, deinterleaver and descrambler
  around the decoder, and the transmitter as separate blocks (scrambler,
  interleaver, and a stand-alone encoder and puncturer). The self-test
  generator and the testbenches contain their own encoder and puncturer.
* The source's "48 x 40 traceback elements" does not match a 64-state,
  20-step traceback. Here each step uses 64 elements, 23 columns in all.

## Verification

Each module has a self-checking testbench in `tb/` against a reference
written independently inside the bench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `viterbi_top_tb` is end to end, at default parameters. It runs seven
  frames of 320 random bits plus padding, covering all five rates. The bench
  encodes with its own shift-register encoder and punctures with its own
  table. Noise pulls soft values towards the middle, and on the three lowest
  rates it adds isolated wrong-sign values. Input arrives in random-size
  chunks with idle clocks, and `clr` sits between frames. Every decoded byte
  must equal the sent bits. Full-rate frames also check the 17-clock latency
  and the byte-every-two-clocks throughput. The bench counts backpressure,
  erased slots, overflow prevention and rate changes, and fails if any never
  occurred.
* `viterbi_fpga_top_tb` is the full-size bench of the top. It runs normal-mode
  frames at 1/2, 5/8 and 3/4 through the pass-through ports. It then runs
  self-test frames at all five rates, with and without injected errors, and
  a 2000-bit frame at 3/4. Each must end with zero errors and the right byte
  count. It also checks the byte-every-two-clocks rate in self-test mode and
  switches modes between frames.
* `bist_gen_tb` decodes the generator's chunks with its own sequence, encoder
  and puncture table, and checks the chunk sizes, padding, injected values
  and `done`, including under random backpressure.
* `bist_check_tb` feeds bytes with known numbers of flipped bits, up to a
  whole byte, and checks the error and byte counts and `done`.
* `acs_tb` compares the whole ACS array, clock by clock, with a behavioural
  model using random branch metrics.
* `traceback_tb` plants a known survivor path in a random bank, shifting the
  bank between the two clocks.
* `depuncture_tb`, `tb_control_tb`, `bmc_tb`, `bm_r4_tb`, `acs_r4_tb`,
  `ovf_prev_tb`, `tb_column_tb` and `tb_element_tb` check their units with
  random or exhaustive stimulus.
* `arith_cs4_tb` is exhaustive at 3 bits and random at 7 bits.
* `ovf_prev_tb` checks both the original 7-bit rule (with the worked example)
  and the 8-bit default.
* `vit_pkg_tb` checks the package functions.

Run a bench with Verilator 5, for example:

```
verilator --binary --timing -Irtl -y rtl rtl/vit_pkg.sv tb/viterbi_fpga_top_tb.sv \
          --top-module viterbi_fpga_top_tb -Mdir obj && obj/Vviterbi_fpga_top_tb
```

These tests show that the decoder matches the transmitted data under light
noise and that each unit matches its reference. They are not a bit-error-rate
characterisation: the decoder has not been run against an AWGN channel model.
