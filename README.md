# A 48-tap multiplierless FIR filter with flattened coefficients and shared shift-add patterns

A constant-coefficient FIR filter is usually built in transposed form. Every
coefficient becomes a shift-add multiplier on the current input, and a long
chain of wide accumulation registers adds up the products. That form has a
short critical path, but it spends many flip-flops. Every delay in it is as
wide as the accumulator (19 bits here), although the sample it delays is only
8 bits.

This filter moves part of that delay to the input. A coefficient term on tap
`n` can be formed from any delayed input `X^d` and then delayed `n - d` more
times in the accumulation chain. This rests on the identity

    x[m - n] = (x delayed d times) delayed (n - d) more times  ->  X^-n = X^-d Z^-(n-d)

With a 27-sample input shift register, the 94 nonzero coefficient terms can be
regrouped into 24 "patterns" of at most four terms. Each pattern reads
whatever delayed inputs it needs. A two-level adder tree sums it, and it
enters the accumulation chain at one position. A pattern whose value is needed
at several positions (with its own shift and sign at each) is built once and
fanned out. This is the adder sharing. The result is a hybrid of the direct
and transposed forms:

* 27 input registers of 8 bits plus 24 accumulation registers of 19 bits:
  672 flip-flops, where a plain transposed 48-tap filter has 48 x 19 = 912.
* 23 accumulation adders instead of 47. Most of the addition happens in the
  narrow 9- to 18-bit pattern adders.
* The critical path is at most two pattern adders plus one accumulation
  adder. This holds for any pattern table that follows the rules below,
  because no position takes more than one pattern of at most four terms.

## What the filter computes

`flat_fir` is a 48-tap linear-phase low-pass filter. Its passband edge is at
0.075 and its stopband edge at 0.125 of the sample rate, with about -42 dB of
stopband ripple. Its coefficients are 10-bit canonical-signed-digit (CSD)
values. The first half (the second half mirrors it, `C[47-i] = C[i]`):

| i | C_i | i | C_i |
|---|-----|---|-----|
| 0 | 2^-9 | 12 | 2^-6 |
| 1 | 2^-8 + 2^-10 | 13 | 2^-7 - 2^-10 |
| 2 | 2^-9 | 14 | -2^-7 |
| 3 | 2^-9 | 15 | -2^-5 + 2^-7 - 2^-9 |
| 4 | -2^-9 | 16 | -2^-5 - 2^-7 + 2^-9 |
| 5 | -2^-8 - 2^-10 | 17 | -2^-5 - 2^-8 |
| 6 | -2^-7 | 18 | -2^-6 - 2^-10 |
| 7 | -2^-7 + 2^-10 | 19 | 2^-6 + 2^-8 + 2^-10 |
| 8 | -2^-8 + 2^-10 | 20 | 2^-4 + 2^-7 + 2^-10 |
| 9 | 2^-8 | 21 | 2^-3 |
| 10 | 2^-6 - 2^-8 | 22 | 2^-2 - 2^-4 - 2^-6 - 2^-10 |
| 11 | 2^-6 + 2^-10 | 23 | 2^-2 - 2^-4 + 2^-7 + 2^-10 |

The hardware works in integers: the coefficients are scaled by 2^10
(`C_0 = 2`, ..., `C_23 = 201`). For an 8-bit two's-complement input `x_in`,
the 19-bit two's-complement output is

    y_out (after the clock edge that takes x[n]) = sum_{i=0}^{47} (2^10 C_i) * x[n-i]

There is no rounding and no overflow. The absolute coefficients sum to 1630,
so `|y_out| <= 128 * 1630 = 208640 < 2^18`. To get the fractional result,
divide by 1024.

Timing: one sample per clock and no handshake. The output is the last
accumulation register, so a sample affects `y_out` one clock after it is
applied (the C_0 term) and for 47 clocks after that. `rst_n` is an
asynchronous active-low reset that clears every register.

## How the structure is described: the pattern table

The heart of the design is a small table in `rtl/fir_pkg.sv`. All modules are
generated from it. Reading it is the key to the RTL.

Every signal the adders can read is a **node**, numbered like this:

| node id | what it is |
|---------|------------|
| 0 .. 27 | delayed inputs `X^0 .. X^27` (`X^0` is `x_in` itself) |
| 28 .. 46 | the 19 level-1 adders (`make_pattern_2`) |
| 47 .. 60 | the 14 level-2 adders (`make_pattern_4`) |

Level-1 adder `i` computes

    (X^L1_A[i] <<< L1_ASH[i])  +  (X^L1_B[i] <<< L1_BSH[i])      (minus if L1_SUB[i] = 1)

Level-2 adder `i` combines two nodes the same way, using `L2_A/L2_ASH/L2_B/L2_BSH/L2_SUB`.
Each operand is a level-1 node, or a delayed input when the pattern has three
terms.

Accumulation position `p` (0 = nearest the output, 23 = farthest) adds node
`ACC_NODE[p]`, shifted left by `ACC_SH[p]`, or subtracts it when `ACC_SUB[p] = 1`.
A term on input `X^d` that enters at position `p` reaches the output after
`p + 1` clocks. It therefore implements tap `n = p + d`, with the extra clock
being the output register.

Worked example, one of the two most-shared patterns (node 48):

    level 1:  node 30 = (X^14 <<< 2) + X^15
              node 31 = (X^0  <<< 1) - X^14
    level 2:  node 48 = node 30 + node 31 = 2 X^0 + 3 X^14 + X^15

Node 48 is used at four positions:

| position p | shift | sign | adds to taps (p + d) |
|------------|-------|------|----------------------|
| 1 | 1 | + | +4 on tap 1, +6 on tap 15, +2 on tap 16 |
| 17 | 1 | - | -4 on tap 17, -6 on tap 31, -2 on tap 32 |
| 18 | 3 | - | -16 on tap 18, -24 on tap 32, -8 on tap 33 |
| 23 | 2 | + | +8 on tap 23, +12 on tap 37, +4 on tap 38 |

Each of these contributions is a sum of CSD terms of the scaled
coefficients. For example, 6 on tap 15 is the `+8 - 2` part of
`C_15 = -32 + 8 - 2`. The node holds four CSD terms (`2 X^0`, `4 X^14`,
`-X^14` and `X^15`). Its four uses therefore supply 16 of the 94 coefficient
terms with three adders.

Sharing happens at both adder levels:

* Whole patterns are shared. Four level-2 nodes serve 14 of the 24
  positions: two are used four times and two three times. The other 10
  positions have a pattern of their own.
* Level-1 pairs are shared. Seven level-1 adders each feed two different
  level-2 adders.

The table satisfies these rules. Any replacement table must satisfy them too:

1. Summed over all positions, the expansion
   `sum_p (+/-) (node value <<< ACC_SH[p])`, with `X^d` counted on tap `p + d`,
   gives exactly the scaled coefficients. The end-to-end testbench checks
   this against a direct convolution.
2. Exactly one node per position, so every accumulation adder has two
   operands. Where two patterns would land on one position, one of them is
   moved to a free position, together with its inputs (`d` changes by the same
   amount in the opposite direction).
3. All uses of a shared node keep the same spacing in position as their
   occurrences have in tap index: the node's inputs are fixed, so only `p`
   can vary.
4. `d <= 27` and `p <= 23`. Every tree is at most two adders deep.

### How this table was found

Finding the best sharing is a hard combinatorial problem. The table comes
from a greedy search, refined by a local search:

1. Write every coefficient in CSD. That gives 94 terms `(tap n, shift k, sign s)`.
2. Among the remaining terms, list every set of four whose taps lie within 27
   of each other. Normalise each set to its shape: taps, shifts and signs
   relative to its first term.
3. For the shape with the most occurrences that can be placed, build it once.
   Placing means choosing one input offset `d0` such that every occurrence
   lands on its own free position `p = n0 - d0` in 0..23. A shape is only
   accepted if the terms left over can still be packed. Remove those terms and
   repeat while some shape occurs at least twice. Four shapes were shared
   this way: twice four times and twice three times, covering 14 positions.
4. Pack the remaining terms, at most four per free position, in
   earliest-deadline order. Term `n` may go to positions `max(0, n-27)` ..
   `min(n, 23)`.
5. Split each pattern into level-1 pairs. Prefer a pair that already exists,
   so identical pairs share one level-1 adder.
6. Improve the grouping by local search. Move one term to another position
   within its reach, or swap two terms, and accept changes that do not
   increase the number of distinct level-1 and level-2 adders (with an
   occasional worse step, as in simulated annealing). Two positions hold the
   same level-2 node when their terms, written as `(d, shift, sign)`, are
   equal up to a common shift and sign. The greedy result had 27 + 13
   pattern adders; the local search brought this to 19 + 14. The four shared
   patterns of step 3 survived: two are used four times and two three times.

The original design used the same two-step method of pattern search and then
positioning. Its exact grouping was not published, so this table is this
implementation's own. The register and accumulation resources match the
original design, and so does the total adder count. The adders are split
differently between the two levels and are slightly wider in total:

| resource | original design | this RTL |
|----------|-----------------|----------|
| level-1 adders | 21 (189 bits) | 19 (205 bits, 9-17 bits each) |
| level-2 adders | 12 (168 bits) | 14 (185 bits, 10-18 bits each) |
| accumulation adders | 23 x 19 bits | 23 x 19 bits |
| input registers | 27 x 8 bits | 27 x 8 bits |
| accumulation registers | 24 x 19 bits | 24 x 19 bits |
| total adders / adder bits | 56 / 794 | 56 / 827 |

For comparison, a conventional transposed filter built from a shared
multiplier block needs 58 adders (1022 bits) and 48 registers (912 bits).

## The blocks

| file | block | role |
|------|-------|------|
| `rtl/fir_pkg.sv` | package | sizes, the pattern table, and functions that give each adder its width |
| `rtl/input_delay.sv` | input delay | 27 x 8-bit shift register that produces `X^0 .. X^27` |
| `rtl/make_pattern_2.sv` | level 1 | 19 two-operand shift-add/subtract units on delayed inputs |
| `rtl/make_pattern_4.sv` | level 2 | 14 shift-add/subtract units on level-1 outputs (or a level-1 output and an input) |
| `rtl/accumulation_block.sv` | accumulation | 24 registers and 23 adders at 19 bits; one pattern per position |
| `rtl/shift_add.sv` | helper | one adder: `(a <<< ASH) +/- (b <<< BSH)` at its own width |
| `rtl/flat_fir.sv` | top | wires the four blocks through one node bus |

Adder widths follow the operands instead of a fixed size:

* Level 1: `max(8 + ASH, 8 + BSH) + 1` bits.
* Level 2: `max(w_a + ASH, w_b + BSH) + 1` bits.

Results are sign-extended onto a 19-bit bus. Synthesis removes the copied
sign bits, so the bus itself costs no logic.

## Departures from the original design and choices of this implementation

* The pattern table is this implementation's own (see above). It is
  functionally exact. It has the same number of adders as the original
  (56) but 33 more adder bits (827 against 794), and one level-1 adder is
  17 bits wide where the original stays within 16.
* Only the first 24 coefficients were specified. The 48 taps are taken as the
  mirrored linear-phase set, which gives the stated 94 nonzero terms.
* Reset, the absence of a sample-valid handshake, two's-complement number
  format, the 2^10 integer scaling and the one-clock output latency are
  choices of this implementation.
* The filter runs only its own coefficients. Other filters need a new table
  built by the rules above; the modules themselves need no change.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_input_delay`: `taps[k]` equals the input from `k` clocks before.
* `tb_make_pattern_2` and `tb_make_pattern_4`: every adder is compared with
  32-bit integer arithmetic. The inputs include all-`-128` and all-`+127`
  vectors, which exposes any adder that is one bit too narrow.
* `tb_accumulation_block`: random node values, compared with a reference
  rebuilt from the value history (position `p` shows after `p + 1` clocks).
* `tb_flat_fir`: end to end, at default sizes. The reference is a direct-form
  convolution whose coefficients are rebuilt from the CSD terms in the
  coefficient table above. It covers:
  * both impulse responses, +1 and -128;
  * input sequences that drive the output to its largest positive and
    negative values, above 2^17 in magnitude;
  * 3000 random samples;
  * a reset in the middle of a stream.

  Each phase is counted, and a phase that never ran counts as a failure.
* `tb_flat_fir_response`: the frequency response measured on the hardware.
  It feeds 8-bit sine waves on exact DFT bins and correlates the output with
  the tone. The measured gain must match `|H(f)|` computed from the
  coefficients, within 0.2 % of the DC gain. The passband (up to 0.075) must
  be flat within 0.5 dB, and the stopband (from 0.125) at least 41.5 dB down.
  The coefficients reach -41.96 dB at worst, and the hardware measurements
  agree with them to 0.02 dB.

Simulating with Verilator 5 (the package must come first):

    verilator --binary --timing -Irtl rtl/fir_pkg.sv rtl/shift_add.sv \
      rtl/input_delay.sv rtl/make_pattern_2.sv rtl/make_pattern_4.sv \
      rtl/accumulation_block.sv rtl/flat_fir.sv tb/tb_flat_fir.sv \
      --top-module tb_flat_fir -o sim && ./obj_dir/sim

For a block test, replace the last two files and the top module (for example
`tb/tb_make_pattern_4.sv` with `--top-module tb_make_pattern_4`).
`tb_flat_fir_response` uses the same files as `tb_flat_fir`. A lint run
is `verilator --lint-only -Wall -Irtl rtl/*.sv --top-module flat_fir`.

## Changing the filter

* **Other coefficients:** rebuild the table (node ids, `NL1`, `NL2`, and the
  `L1_*`, `L2_*` and `ACC_*` arrays) by the rules above. Then update the
  coefficient list in `tb_flat_fir` (`build_coefs`). If the new table needs
  more input registers or positions, change `ND` and `NPOS`.
* **Wider input:** `XW` can grow without touching the table. `ACCW` must then
  hold `2^(XW-1) * sum|C_i * 2^10|`.
