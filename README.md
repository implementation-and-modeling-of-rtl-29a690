# Resource-shared Reed-Solomon decoder

A Reed-Solomon (RS) decoder corrects up to `t` corrupted symbols in a block of `N` symbols of
`m` bits. Its heaviest part is solving the *key equation*, which finds the error locator
polynomial Λ and the error evaluator polynomial Ω. The usual textbook hardware for this, the
reformulated inversionless Berlekamp algorithm, uses `3t+1` identical processing elements
(PEs). Each PE holds two GF(2^m) multipliers, and the array finishes in `2t` clocks. A new
codeword, though, arrives only every `N` clocks. This decoder therefore spreads the same
work over a few shared PEs. Their number is

    NPE = ceil( 2t(3t+1) / (2^m - 1) )

which is just enough to finish within one codeword time. For the main configuration,
RS(255,239) over GF(2^8) with t = 8, that is **2 PEs instead of 25**. The rest of the decoder
runs at one symbol per clock: syndrome computation, Chien search, Forney algorithm and the
delay FIFO.

Everything is parametrised: symbol width `M`, primitive polynomial `POLY`, codeword length
`N` (shortened codes allowed), correction capability `T`, first generator root `FCR`, the
number of shared PEs `NPE` and the calculation-unit pipeline depth `PIPE`.

## Data flow

```
in ──┬─> rs_syndrome ──S──> rs_iba ──Λ,Ω──> rs_chien ──Λeven,Λodd,Ω'──> rs_forney ──e──┐
     │   (2T MAC units)    (shared iBA)    (per-position sums)     (ROM 1/Λodd, ×)    │
     └─> rs_fifo (received symbols) ─────────────────────────────────────────────> XOR ──> out
```

All four stages work at the same time on consecutive codewords. While word *k+1* streams
into the syndrome units, the key equation of word *k* is being solved. Word *k−1* is still
leaving through the Chien search and the Forney stage.

## Conventions of the code

* A codeword is `c(x) = Σ c_j x^j`. Symbols are sent **highest degree first**: `c_(N-1)` is
  the first symbol of a word, `c_0` the last. The decoder returns them in the same order.
* α is the element `x` of GF(2^M) = GF(2)[x]/POLY. The default `POLY = 'h11D` is
  x^8+x^4+x^3+x^2+1.
* The generator polynomial has the roots α^FCR … α^(FCR+2T−1). The default `FCR = 0` gives
  syndromes `S_i = r(α^i)`, i = 0..2T−1. These are the conventions of, for example, the DVB
  RS(204,188) code.
* An error at position `j` has the locator `X = α^j` and makes `Λ(X^-1) = 0`.

## Syndromes (`rs_syndrome`)

There are 2T multiply-accumulate units, one per syndrome. Each evaluates `r(α^(FCR+i))` by
Horner's rule as the word streams in: `acc ← acc·α^(FCR+i) + r`. The multiplier constant is
fixed, so each unit is a small XOR network and an M-bit register. The block counts symbols
internally. After the N-th symbol it copies the sums to its output registers and pulses
`syn_valid` one clock later. The outputs then stay stable for at least N clocks, and the
key-equation solver relies on that.

## Key equation with shared processing elements (`rs_iba`, `rs_pe`, `rs_pe_last`, `rs_ce`)

This is the part that needs the most explanation.

### The algorithm

The solver works on the vector δ_0..δ_3t and on a helper vector θ_0..θ_3t. Both start as

    δ_i = θ_i = S_i (i < 2t),   0 (2t ≤ i < 3t),   1 (i = 3t)

with γ = 1 and k = 0. Each of the 2t iterations computes, for every i,

    δ_i ← γ·δ_(i+1) + θ_i·δ_0            (δ_(3t+1) = 0)
    θ_i ← MC ? δ_(i+1) : θ_i
    MC = (δ_0 ≠ 0) and (k ≥ 0)
    MC: γ ← δ_0, k ← −(k+1);   otherwise k ← k+1

After the last iteration, δ_t..δ_2t hold Λ_0..Λ_t and δ_0..δ_(t−1) hold Ω_0..Ω_(t−1). Both
carry the same unknown scale factor, which cancels in the Forney division. No field inversion
is needed anywhere.

### The building blocks

* **`rs_pe`** is one PE. Its *calculation unit* (two multipliers and an XOR) computes the δ
  update, and a multiplexer computes the θ update. With `PIPE = 1` the two products are
  registered before the XOR. The critical path then holds one multiplier, or one XOR. The PE
  keeps no state of its own. Its δ and θ registers are the register chains of `rs_iba`.
* **`rs_pe_last`** handles index 3t. There δ_(3t+1) is always 0, and θ_3t is 1 until the
  first MC = 1 and 0 afterwards. Its update therefore reduces to a *hold* flip-flop and a
  multiplexer: `δ_3t ← hold ? δ_0 : 0`, with `hold ← hold & ~MC`. It needs no multiplier.
* **`rs_ce`** is the control element. It holds δ_0, γ and k for the current iteration and
  drives MC. All three values are broadcast to every PE.

### The schedule

There are NE = 3t indices to share, because `rs_pe_last` takes index 3t. The NPE shared PEs
take them in groups of NPE consecutive indices, one group per clock, lowest indices first.
One iteration therefore lasts G = ceil(3t/NPE) clocks, and a whole solution 2t·G clocks. For
the defaults that is G = 12 and 192 clocks.

The schedule rests on three points:

1. **Operand of the top PE.** Index i needs the *old* δ_(i+1). Inside a group this is the
   neighbouring PE's input. For the highest PE of a group it is the first value of the next
   group, which is still old because groups are processed upwards. For index 3t−1 it is the
   register of `rs_pe_last`. A multiplexer driven by the group counter picks that register
   in the last clock of an iteration.
2. **Register chains.** The PE results go into two chains, one for δ and one for θ, each
   G−PIPE groups long. Together with the PIPE stages inside the PEs, a group takes exactly G
   clocks to come round. It is therefore at the head of the chain when the next iteration
   asks for it. The chains shift every clock and need no addressing.
3. **The next δ_0 comes early.** Index 0 is in the first group, so δ_0(r+1) leaves PE 0 PIPE
   clocks after iteration r starts. The control element keeps it until the iteration ends,
   and then updates γ, k, MC and `rs_pe_last`. Because of this ordering, the broadcast values
   are ready without a stall.

In iteration 0 the PEs take their operands straight from the syndrome inputs instead of the
chains. Loading the solver therefore costs no clocks.

`done` pulses 2t·G + PIPE + 1 clocks after `start`. Λ and Ω stay valid until the next
solution ends. The schedule needs G ≥ PIPE + 2, and `rs_decoder` also requires
2t·G + PIPE + 1 ≤ N so that one solution fits into one codeword. Elaboration stops with an
error if either rule is broken. Very short codes can break them with the default NPE. For
RS(31,25), for example, NPE = 3 has to be given, one more than the formula. RS(7,5) over
GF(2^3) needs `PIPE = 0`, because its iteration is only two clocks long. Over GF(2^2)
(N = 3) no shared schedule fits into a codeword, so that field size is not supported.

Key-equation budget for 8-bit codes (NPE from the formula above, clocks = 2t·G + 2):

| t  | NPE | G  | clocks (≤ 255) |
|----|-----|----|----------------|
| 2  | 1   | 6  | 26  |
| 4  | 1   | 12 | 98  |
| 6  | 1   | 18 | 218 |
| 8  | 2   | 12 | 194 |
| 12 | 4   | 9  | 218 |
| 16 | 7   | 7  | 226 |
| 20 | 10  | 6  | 242 |

## Chien search and Forney algorithm (`rs_chien`, `rs_forney`, `rs_inv_rom`)

`rs_chien` keeps one register per coefficient. The register of Λ_k starts at
Λ_k·α^(−k(N−1)), the value for position N−1 (this start value is what lets shortened codes
work). Each clock it is multiplied by the constant α^k, moving one position towards 0. The
even-indexed and odd-indexed terms are summed separately, giving Λ_even(X^-1) and
Λ_odd(X^-1).

For this solver and these generator roots the error value is

    e = X^-(2t+FCR) · Ω(X^-1) / Λ_odd(X^-1)

The constant factor X^-(2t+FCR) is folded into the Ω registers. Their start values and step
constants use the exponent k+2t+FCR instead of k. The Forney stage therefore only divides.

`rs_forney` marks a position as an error when Λ_even + Λ_odd = 0. It then looks up
1/Λ_odd in `rs_inv_rom` and multiplies the result by Ω. The ROM holds 2^M words and is
filled at elaboration time from the primitive polynomial: the word at address α^e holds
α^(−e), and the word at address 0 holds 0. Its read is synchronous, like an FPGA memory
block. The ROM cannot be pipelined further, so on an FPGA it tends to set the clock of the
whole decoder. The Forney stage has a latency of 2 clocks.

## FIFO and output (`rs_fifo`, `rs_decoder`)

The received symbols are written into a RAM FIFO as they arrive. They are read back one
clock after the matching Chien sum appears, so each symbol meets its error value at the
output XOR. The FIFO holds at most one word plus the symbols received while that word's key
equation is solved. The default depth is the next power of two ≥ 2N, which is 512.

## Interface and timing of `rs_decoder`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_data` | in | 1, M | one received symbol per clock when valid |
| `out_valid`, `out_data` | out | 1, M | corrected symbol |
| `out_first`, `out_last` | out | 1 | first (degree N−1) and last (degree 0) symbol of a word |
| `out_err` | out | 1 | this symbol was corrected |
| `out_nerr` | out | clog2(T+2) | number of corrected symbols in the word, valid with `out_last` |

* The input must be a sequence of whole N-symbol words; there is no start-of-word input.
  `in_valid` may drop between symbols.
* Throughput is one symbol per clock.
* With gap-free input, the first corrected symbol of a word appears
  `N + 2t·G + PIPE + 6` clocks after the word's first symbol. For RS(255,239) that is 454
  clocks.
* With more than t errors the output is not correct and nothing flags it. Roots found by the
  Chien search are still reported in `out_err`/`out_nerr`, so a count that differs from the
  degree of Λ would be a possible extension.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `M` | 8 | symbol width in bits |
| `POLY` | `'h11D` | primitive polynomial, bit M set |
| `N` | 255 | codeword length, ≤ 2^M − 1 |
| `T` | 8 | correctable symbol errors; N − 2T data symbols |
| `FCR` | 0 | generator roots α^FCR … α^(FCR+2T−1) |
| `NPE` | ceil(2T(3T+1)/(2^M−1)) = 2 | shared PEs in the key-equation solver |
| `PIPE` | 1 | register stages in the calculation unit (0 or 1) |
| `DEPTH` | 2^ceil(log2 2N) = 512 | FIFO depth |

## How faithful the design is

These parts follow the design described in the source publication:

* the block structure;
* the Berlekamp iteration in its inversionless form;
* the shared-PE count formula;
* the simplified last PE;
* the control element;
* the pipelined calculation unit;
* the inverter ROM.

The following are this implementation's own choices:

* **The shared schedule.** The published drawing of the shared solver shows two PEs, a
  simplified last PE, register stacks, and a multiplexer switched by a cycle signal. It does
  not fix the timing. Here both PEs process neighbouring indices in the same clock. The
  drawing may instead chain the PEs one after the other; the count of PEs and registers is
  the same either way.
* **Where the control element sits.** The source places the control element inside PE 0.
  Here it is a separate module beside the PEs. It takes δ_0 from the PE slot that handles
  index 0.
* **The Forney scale factor.** Its exact form, X^-(2t+FCR), was derived for this
  algorithm. It is folded into the Chien registers.
* **Conventions and small blocks.** These are also this implementation's own:
  * the default polynomial, the generator-root convention and the symbol order;
  * the reset, the streaming interface and the error count;
  * the FIFO depth, the ROM read latency and the pipeline depths.
* **Standards compliance.** CCSDS codes need a different field polynomial, a dual-basis
  symbol mapping, and generator roots spaced by α^11. These are not supported. The DVB
  RS(204,188) code is: set `N = 204`, or feed 51 leading zeros to the RS(255,239) default.
* **The non-shared baseline.** The baseline solver without sharing (one PE per index,
  `2t` clocks) is not included.
* **No clock-rate claims.** No FPGA timing was done for this RTL. The published results
  reach about 1 Gbit/s on an APEX 20KE and 1.3 Gbit/s on a Stratix device. At one 8-bit
  symbol per clock, 1.3 Gbit/s would need about 163 MHz.

## Verification

Each module has a self-checking testbench in `tb/`. They all end with a line
`TB_RESULT checks=N failures=F`. The reference model `tb/rs_ref_pkg.sv` is written
separately from the RTL: log/antilog tables, a systematic encoder, direct syndrome
evaluation, and an unshared iteration of the algorithm.

| testbench | what it checks |
|-----------|----------------|
| `tb_rs_syndrome` | syndromes of clean, corrupted and random words, with input gaps; `syn_valid` timing |
| `tb_rs_pe` | the δ and θ updates against table multiplication, with a 1-clock latency |
| `tb_rs_pe_last`, `tb_rs_ce` | the hold and MC/γ/k rules against behavioural models |
| `tb_rs_iba` | Λ and Ω equal the unshared algorithm for 0..8 errors; Λ has a root at every error; latency 194 |
| `tb_rs_chien` | every position of a shortened code (N = 204), against direct polynomial evaluation |
| `tb_rs_inv_rom` | every word, for GF(2^8) and GF(2^5) |
| `tb_rs_forney` | random sums, roots and error values, 2-clock latency |
| `tb_rs_fifo` | random traffic against a queue model, including full, empty and wrap-around |
| `tb_rs_decoder` | end to end at the default size, described below |
| `tb_rs_workloads` | RS(255,223) t=16 (7 PEs), RS(204,188) t=8, RS(31,25) over GF(2^5) |
| `tb_rs_fieldsizes` | RS(7,5) over GF(2^3) with `PIPE = 0`, RS(15,11) over GF(2^4), RS(511,495) over GF(2^9) with 1 PE |

`tb_rs_decoder` runs eight RS(255,239) words through the decoder with 0, 8 and random
numbers of errors. Odd-numbered words have random input gaps. Even-numbered words follow
without gaps, so consecutive words also arrive exactly N clocks apart. The test checks
every symbol, flag and count, and the latency. It also counts how often each mechanism occurs, and fails if one never does:

* MC = 1 and MC = 0 iterations;
* the hold signal of the last PE dropping;
* the last-PE operand multiplexer being selected;
* syndrome and key-equation work overlapping;
* a new Chien load in the last clock of the previous scan;
* input gaps.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal rtl/rs_pkg.sv tb/rs_ref_pkg.sv \
    rtl/rs_*.sv tb/rs_dec_harness.sv tb/tb_rs_decoder.sv --top-module tb_rs_decoder -Mdir obj
./obj/Vtb_rs_decoder
```

Replace `tb_rs_decoder` with any other testbench name; the extra files do no harm. The
simulations take well under a minute. To change the code, override parameters on
`rs_decoder`; for example `#(.N(204))` or `#(.T(16))`, with NPE following automatically.
