# Fault-tolerant 32-bit ALU with BCH-protected operands

A 32-bit ALU whose two operands reach it through an error-correcting channel.
Each operand is encoded with a binary BCH code that corrects up to **six** bit
errors. The code word may be corrupted on the way. A decoder then restores the
operand before the ALU sees it. A word with more errors than the code can
correct is, in almost all cases, flagged as `wrong`, so a bad result is never
silently presented as a good one.

The design follows a published design of a "32-bit fault-tolerant ALU with
checking of up to 6 bits". That work describes a serial BCH encoder, a serial
decoder, a codec that combines them and injects errors, and a 32-bit ALU built
from a Sklansky adder and a radix-4 Booth / Wallace-tree multiplier. It gives
their functions, signal names and simulation results, but not their insides.
Everything inside the blocks here is this implementation's own, and is listed
as such below.

```
            errora[N-1:0]                          errorb[N-1:0]
                 |                                       |
 a[31:0] --> [ bch_codec A ] --douta-->+<--doutb-- [ bch_codec B ] <-- b[31:0]
              encoder -> XOR -> decoder |              (same)
                                        v
                 opcode (captured) -> [ alu32 ] -> dout register -> dout, vdout
                                          |               wrong = wronga | wrongb
              sklansky_adder  booth_wallace_mul (booth_radix4_pp -> wallace_tree -> sklansky_adder)
```

## The code, and why the word is 74 bits

The source design speaks of a 63-bit code word (BCH over GF(2^6)) correcting 6
errors while carrying a 32-bit operand. Those three numbers do not fit
together. For length 63 and t = 6, the generator polynomial g(x) is the product
of the minimal polynomials of α, α³, α⁵, α⁷, α⁹ and α¹¹. Their degrees are
6 + 6 + 6 + 6 + 3 + 6 = 33, so only 63 − 33 = **30** data bits remain.

This implementation keeps both the 32-bit operand and the 6-error correction:

* The top level (`ft_alu`) uses the BCH code over **GF(2^7)** with t = 6. Its
  generator has degree 42 (six cyclotomic cosets of 7 elements each). The
  length-127 code is *shortened* to 32 data bits, giving **N = 74-bit** code
  words, 7-bit syndromes and 74-bit `errora` / `errorb` inputs.
* The codec blocks are parameterised (`M`, `T`, `K`). Their defaults are the
  length-63 code, BCH(63,30), with 6-bit syndromes and a locator polynomial of
  degree 6. Their testbenches run at that size, and the encoder emits exactly
  63 bits per word.

`bch_pkg` computes everything at elaboration time from `M` and `T`:
GF(2^M) arithmetic in polynomial basis, and g(x) as the product of the distinct
minimal polynomials of α^1, α^3, …, α^(2T−1).

| M | primitive polynomial | field |
|---|----------------------|-------|
| 6 | x⁶ + x + 1           | GF(64) |
| 7 | x⁷ + x³ + 1          | GF(128) |

The resulting generators match the standard tables: octal 157464165547 for
(63,30), and 130704476322273 for length 127 with t = 6. The testbenches hold
these as independent constants. The codes are the same for any K, as long as
K + deg g ≤ 2^M − 1.

**Bit order.** The code is systematic. A word is sent highest-degree
coefficient first: K data bits (data MSB first), then the deg g parity bits.
Bit i of an error pattern flips the coefficient of x^i. So `error[N-1]` hits
the data MSB and `error[deg g − 1:0]` hit the parity bits.

## Decoder (`bch_decoder`): the part that does the work

The decoder takes received words serially and works in three pipeline stages.
Each stage holds its own word, so one word can arrive while the previous one
is in Berlekamp–Massey and the one before leaves through the Chien search.

1. **Syndromes, while the word arrives (N clocks).** For j = 1…2T it keeps
   S_j = r(α^j), using Horner's rule with one constant multiplier per syndrome:
   `S_j <= S_j·α^j ⊕ bit`. This works unchanged for shortened codes, because the
   positions simply stop at N−1. The bits are also shifted into an N-bit
   register. With the last bit, the syndromes and the word pass to stage 2.
2. **Berlekamp–Massey, inversionless (2T clocks).** Each iteration r computes
   the discrepancy Δ = Σ σ_i·S_(r+1−i). It then updates
   σ ← γ·σ − Δ·x·B. If Δ ≠ 0 and 2L ≤ r, the auxiliary polynomial, the length
   and the scale take B ← σ_old, L ← r+1−L, γ ← Δ. Otherwise B ← x·B. The
   result is the error locator σ(x) of degree ≤ T, times a non-zero constant
   that leaves its roots alone. No field inversion is needed, so each
   iteration is 3(T+1) general GF multipliers and one clock. The locator and
   the word pass to stage 3 when it is idle or in its last clock.
3. **Chien search, one position per clock (N clocks).** Registers hold
   c_i = σ_i·α^(−i·p) for the current position p, starting at p = N−1. The
   start loads σ_i·α^(i·(2^M − N)); each step multiplies c_i by α^i. When
   Σ c_i = 0, position p is in error and the stored bit is inverted as it
   leaves. The first K positions are the data bits and leave on `dout` with
   `vdout`. The parity positions are still searched, only to count roots.

**Uncorrectable words.** At the end `done` pulses. `wrong` is set when the
number of roots found differs from L, or when L > T. With more than T errors
this catches almost every case. The remaining case is that the word happens to
lie within distance T of another code word. The decoder then delivers that
word's data without a flag, as any bounded-distance decoder must. With a
distance-13 code this is rare: about 1 word in 60 in the 7–12-error tests.

**Timing.** `done` follows the last input bit by N + 2T + 1 clocks. Words may
arrive back to back, one every N clocks, and then leave at the same rate, one
`done` every N clocks. This works because stage 2 needs only 2T + 1 < N
clocks. `busy` shows that stage 2 or 3 holds a word; input is always
accepted.

## Encoder (`bch_encoder`)

This is an LFSR that divides by g(x). Data bits pass straight to `dout`, one
clock after `din` / `vdin`. They also feed the LFSR, whose feedback is
`din ⊕ msb`. After the K-th data bit the encoder is `busy` for deg g clocks
and shifts out the remainder, MSB first. `vdin` may have gaps. A word sent at
full rate takes exactly N consecutive output clocks (63 at the default size).

## Codec (`bch_codec`)

This block provides parallel in and parallel out around encoder, channel and
decoder. A `vdin` pulse samples `din[K-1:0]` and `error[N-1:0]`. The data word
is shifted into the encoder, and each code bit is XORed with the matching
error bit. The decoder's corrected data bits are shifted back into a register.
`vdout` pulses, with `dout` and `wrong` valid, exactly **2N + 2T + 3** clocks
after the edge that took `vdin`. That is 141 clocks for (63,30) and 163 for
the 74-bit code. `vdin` is ignored while `busy`.

## ALU (`alu32`)

The ALU is combinational. The 3-bit opcode with `000` = ADD comes from the
source design. The other seven codes are this implementation's assignment of
the operations the source lists:

| opcode | operation |
|--------|-----------|
| 000 | a + b |
| 001 | a − b (a + ~b + 1, same adder) |
| 010 | a × b, low 32 bits of the signed product |
| 011 | a & b |
| 100 | a \| b |
| 101 | a ^ b |
| 110 | ~a |
| 111 | shift a by b[4:0]: left if b[5] = 0, logical right if b[5] = 1 |

`cout` is the adder's carry out for ADD/SUB (1 = no borrow on SUB) and 0
otherwise. No other flags exist.

* **`sklansky_adder`** is a parallel-prefix adder with log2(W) levels. At level
  l, every bit whose index has bit l set merges its (G,P) with the group ending
  at `((i>>l)<<l) − 1`. It has a carry in and a carry out, and is
  parameterised so that the multiplier reuses it at 64 bits as its final
  carry-propagate adder.
* **`booth_radix4_pp`** recodes y into 16 digits in {−2,−1,0,1,2}, taken from
  the triplets {y[2i+1], y[2i], y[2i−1]}. Each row is the digit times x,
  sign-extended to 64 bits and shifted by 2i. A negative digit gives the
  one's complement, and its +1 goes into a 17th row at bit 2i.
* **`wallace_tree`** reduces the 17 rows to 2 with rows of full adders:
  17 → 12 → 8 → 6 → 4 → 3 → 2, six levels. Each group of three gives a sum row
  and a carry row shifted left by one; leftover rows pass through.
* **`booth_wallace_mul`** chains these three blocks into a 32×32 → 64-bit
  signed multiplier.

## Top level (`ft_alu`) interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst | in | 1 | clock, synchronous active-high reset |
| a, b | in | 32 | operands |
| opcode | in | 3 | operation (table above) |
| errora, errorb | in | 74 | error patterns XORed onto the code words of a and b |
| vdin | in | 1 | start; a, b, opcode and error patterns are sampled on this clock |
| dout | out | 32 | ALU result |
| vdout | out | 1 | one-clock pulse: dout, wrong, douta, doutb valid |
| wrong, wronga, wrongb | out | 1 | an operand (a, b, either) was uncorrectable |
| douta, doutb | out | 32 | the corrected operands |
| busy | out | 1 | operation in progress, vdin ignored |

Parameters: `W` (32), `M` (7), `T` (6). N = W + deg g is derived, and is 74 at
the defaults. Both codecs run in lock step. `vdout` rises 2N + 2T + 4 = **164**
clocks after the start edge. When `wrong` is high, `dout` must be discarded.
`douta` / `doutb` show which operand was damaged.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. A watchdog stops each one.

| testbench | what it checks |
|-----------|----------------|
| tb_sklansky_adder | 32 and 64 bits random and corner cases; 5 bits exhaustive |
| tb_booth_radix4_pp | rows sum to the signed product; row alignment; 8-bit exhaustive |
| tb_wallace_tree | sum + carry equals the sum of the rows, for 17/3/4/5 rows |
| tb_booth_wallace_mul | 64-bit product, corner and random cases; 8×8 exhaustive |
| tb_alu32 | all opcodes against a behavioural model |
| tb_bch_encoder | code words against a reference long division by the tabulated g(x); 63-clock word; busy length; gaps in vdin |
| tb_bch_decoder | 0–6 errors corrected exactly; 7–12 errors never accepted as the original; done latency N+2T+1; 40 words streamed back to back, one done per 63 clocks |
| tb_bch_codec | parallel words with error patterns (bursts, ends of the word, random); 141-clock latency; start during busy ignored |
| tb_ft_alu | full size, end to end (see below) |

`tb_ft_alu` first replays the reference case: a = 11111111h, b = 22222222h,
ADD with 0, 6 and 7 errors per operand. The result is 33333333h for 0 and 6
errors, and flagged or visibly corrupted for 7. It then runs ABCDEFDDh with 4
and with 9 errors, and 240 random operations over all opcodes with 0–9 errors
per operand. It checks the result against a model, the 164-clock latency, the
`wrong = wronga | wrongb` rule and the ignored restart. It also counts that
corrections on A, corrections on B, uncorrectable detection, every opcode and
an ignored restart each happened at least once.

`tb_ft_alu_figures` replays the reference cases with their exact error
patterns. Each is a 64-bit value in the low bits of the 74-bit error input, so
the ones fall on the parity end of the word:

| case | error pattern | result |
|------|---------------|--------|
| operand ABCDEFDDh | 1100000000000011h (4 bits) | ABCDEFDDh, not flagged |
| operand ABCDEFDDh | 0000000111111111h (9 bits) | flagged `wrong` |
| 11111111h + 22222222h | none | 33333333h |
| 11111111h + 22222222h | errorb 0000000011001111h (6 bits) | 33333333h |
| 11111111h + 22222222h | errorb 0000000001111111h (7 bits) | flagged `wrong` |

The original design reported an unflagged wrong result (37777777h) in the
7-error case. Here that word is flagged instead. What happens beyond six errors
depends on the code and the decoder, and the design guarantees nothing there.

To run a testbench with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bch_pkg.sv rtl/alu_pkg.sv tb/bch_ref_pkg.sv tb/tb_ft_alu.sv \
    --top-module tb_ft_alu -Mdir obj_tb_ft_alu
./obj_tb_ft_alu/Vtb_ft_alu
```

The other modules are found through `-Irtl`. The full-size top test builds in
about 20 s and runs in well under a second.

## Departures from the source design and choices made here

* **74-bit code words at the top instead of 63** (GF(2^7), shortened), for the
  reason given above. The 63-bit code remains the default of the codec blocks.
* The opcode assignment beyond `000` = ADD, the shift operand format, and the
  `cout` output.
* The decoder's internals: inversionless Berlekamp–Massey, serial Chien
  search, and the `wrong` rule. The source shows signals named `wrong` and
  `wrongnow`; only the final `wrong` flag is provided here.
* The codec works on one word at a time, from `vdin` to `vdout`. The decoder
  inside it can stream words back to back, but the parallel front end does not
  use that.
* The systematic bit order and the mapping of error-pattern bits to code
  positions.
* Synchronous active-high resets everywhere; sampling of operands, opcode and
  error patterns at `vdin`.
* Multiplication is signed, with full sign extension of the Booth rows (no
  sign-extension-reduction trick). The low 32 bits, which the ALU returns, are
  the same for unsigned operands.
* The fault-tolerance schemes the source only surveys for comparison (residue
  checking, TMR with single or triplicated voters) are not part of this design.
