# Reed–Solomon encoder and decoder, RS(255,239) over GF(2^8)

A Reed–Solomon code appends 2t parity symbols to a block of k data symbols.
The receiver can then repair up to t symbols in the block, wherever they are
and however many of their bits are wrong. Because it works on whole symbols,
a burst of bit errors that hits only a few symbols costs little. This
repository holds synthesizable SystemVerilog for both ends of such a code:

* **Encoder:** a serial systematic encoder. It outputs the k data symbols
  unchanged, then the 2t parity symbols.
* **Decoder:** a serial decoder, pipelined so that a new word can start
  every N+1 clocks. Its stages are syndrome computation, a
  Berlekamp–Massey key-equation solver, a combined Chien search and Forney
  evaluator, and a FIFO delay line holding the received word.

The default code is RS(255,239). Symbols are 8 bits, and the field is GF(2^8)
built from p(x) = x^8 + x^4 + x^3 + x^2 + 1 (`9'h11D`). The generator
polynomial's roots are α^1 … α^16, so t = 8 symbol errors per 255-symbol
word can be corrected. All of this is set by parameters: symbol width `M`,
field polynomial `POLY`, code length `N` (a shortened code is allowed) and
`T`. The same RTL runs RS(31,19) over GF(2^5), RS(255,223) and RS(255,191),
among others.

## Galois-field arithmetic

Every symbol is an element of GF(2^M), stored as the coefficients of a
polynomial in α, with bit i holding the coefficient of α^i.

* **Addition** is bitwise XOR (`gf_add`). In characteristic 2, subtraction
  is the same operation, which is why no signs appear anywhere in the
  decoder equations.
* **Multiplication** (`gf_mult`) is shift-and-add. Each bit of `b` selects a
  copy of `a` shifted by that bit's position, and every shift is reduced
  modulo p(x). For M = 8 this is the usual 64-term partial-product array
  folded back by the reduction terms.
* **Constant multipliers** are `gf_mult` with one operand tied to a constant
  such as α^i. Synthesis reduces them to a few XORs. The syndrome cells, the
  Chien stages and the field generator use them.
* **Constants** such as α^e, and the 2^M-entry inverse table, are computed
  at elaboration by functions in `rs_pkg`. Changing `POLY` or `M` therefore
  needs no hand-made tables.

## Encoder

```
 rs_field_gen ──root──► rs_code_gen ──g0..g2T-1──► rs_parity ──q0..q2T-1──► rs_cw_gen ──► t_out
   (p(x), α-LFSR)        (∏ (x+α^i))              (2T-stage LFSR)         (data / parity mux)
                                          rs_enc_ctrl: clr, enc_en, sel_parity, par_idx, dvalid
```

**Generator polynomial.** g(x) = ∏_{i=0}^{2T-1} (x + α^(H·(GEN_START+i)))
is built in hardware after reset, not stored as a table:

1. `rs_field_gen` is a Galois LFSR. It starts at α^(H·GEN_START) and
   multiplies by α^H on every step.
2. `rs_code_gen` multiplies its running product by (x + root) once per clock,
   using 2T+1 parallel multipliers.

After 2T clocks `g_ready` rises. The encoder ignores `start` until then.
g(x) is monic, so only g0 … g(2T-1) are passed on.

**Parity.** `rs_parity` is the classic division LFSR:

```
fb = data + q[2T-1];   q[0] <= fb·g0;   q[i] <= q[i-1] + fb·g[i]
```

It advances only on symbols marked valid. After the k-th symbol it holds the
remainder of data(x)·x^2T divided by g(x). `q[2T-1]` is the highest-degree
parity symbol. The registers are also brought out as the `q` bus.

**Control and output.** `rs_enc_ctrl` runs three phases:

* **Idle:** waits for `start`, which clears the parity registers.
* **Message:** K = N − 2T symbols, each accepted when `enable` is high.
  Gaps are allowed.
* **Parity:** 2T clocks in a row. The parity registers are read out, highest
  first.

`rs_cw_gen` registers the selected symbol.

* **Timing:** a data symbol sampled at clock edge c appears on `t_out` after
  edge c+1, with `dvalid` high. The first parity symbol follows on the clock
  after the last data symbol.
* **Bypass:** `bypass` is sampled together with `start`. A bypassed block is
  the K data symbols only, with no parity appended and the LFSR left idle.
* **Status:** `status` shows the phase: 0 idle, 1 message, 2 parity.

## Decoder

```
recword ──► rs_syndrome ──S1..S2T──► rs_kes_bm ──Λ, Ω, deg──► rs_chien_forney ──e──┐
   │                                                                               ▼
   └───────────────► rs_srl_fifo (delay line) ─────────────────────────► rs_err_correct ──► corr_recword
```

### Syndromes

Each of the 2T Horner cells evaluates the received polynomial at one root:
S_i = R(α^i) for i = 1 … 2T. Symbols arrive highest degree first, and every
clock does `S_i <= S_i·α^i + r`. If all syndromes are zero the word is a
codeword. In that case the solver and Chien/Forney stages are skipped and
the word is passed through unchanged.

### Key equation: inversion-free Berlekamp–Massey

`rs_kes_bm` finds the error locator Λ(x), whose roots are the inverses of the
error locations. Then it finds the error evaluator Ω(x) = Λ(x)·S(x) mod x^2T,
with S(x) = S_1 + S_2 x + … + S_2T x^(2T-1). Each iteration takes one clock:

```
d  = Σ_j Λ_j · S_(r+1-j)                        discrepancy
Λ <= γ·Λ + d·x·B
if d ≠ 0 and 2L ≤ r:  B <= Λ(old), L <= r+1-L, γ <= d
else                  B <= x·B
```

This runs for r = 0 … 2T-1. After that, T more clocks reuse the
discrepancy dot-product unit to form Ω_i = Σ_{j≤i} Λ_j S_(i+1-j).

This form needs no field inversion. The price is that Λ and Ω both come out
multiplied by the same unknown nonzero constant. That constant cancels in the
Forney quotient, so it does no harm.

* **Sizes:** Λ and B are kept to T+1 coefficients. Whenever the final
  degree L ≤ T, this gives exact results.
* **Degree:** `deg` = L. If L > T, the word has more errors than the code
  can correct.
* **Latency:** 3T+1 clocks.
* **Syndromes:** copied into the solver when it starts, so the syndrome
  cells can take the next word while the solver runs.

### Chien search and Forney, in received order

`rs_chien_forney` has T+1 locator stages and T evaluator stages:

* **Locator stages:** stage j holds Λ_j·x^j. On every step it is multiplied
  by the constant α^j.
* **Evaluator stages:** stage j holds Ω_j·x^(j+1) and is multiplied by
  α^(j+1).
* **Sums:** the locator stages add up to Λ(x). Their odd-numbered stages add
  up to x·Λ'(x), because the formal derivative keeps only the odd terms. The
  evaluator stages add up to x·Ω(x).
* **Error value:** at a root of Λ, the error value is x·Ω(x) / (x·Λ'(x)).
  The x factors cancel. The division is a lookup in the inverse ROM followed
  by one multiplier. Off a root, the value is forced to 0.

The trial points run from α^-(N-1) up to α^0. That is the order in which
positions N-1 … 0 arrive. On load, each coefficient is pre-scaled by
α^(j·(2^M − N)), which makes the first trial point α^-(N-1) even for a
shortened code.

The error vector therefore comes out in the same order as the received word.
The delay path only has to be a plain FIFO; nothing needs reversing. This
ordering is the most important implementation choice in the decoder.

### Failure detection

When the last position has been evaluated, the number of roots found is
compared with deg Λ. The word is declared uncorrectable (`decode_fail`) if:

* the degree exceeds T, or
* the root count differs from the degree.

The verdict is known only at the end of the word, so a failing word has
already been output with whatever corrections were computed. The flag comes
with `dataoutend`, and downstream logic must wait for it before trusting the
word.

Detection is not guaranteed for more than T errors. Occasionally such a word
lands within t symbols of another codeword and is silently decoded to that
codeword.

### Delay FIFO

`rs_srl_fifo` works like a chain of addressable shift registers (SRL16
style):

* A write shifts every entry one place and stores `data_in` at place 0.
* The address counter points at the oldest entry. It counts up on a write
  and down on a read.
* `data_out` is valid whenever the FIFO is not empty (first-word
  fall-through).
* It provides `fifo_count`, `full`, `empty` and a synchronous `sinit`.

Up to two and a half words are in flight at once: one being output, one
being solved and one being received. The depth is therefore the next power
of two above 2N+1, which is 512 for the default code. Assertions check
three things:

* it holds at least one word when output starts;
* it never overflows;
* it never underflows.

### Schedule: a three-stage pipeline

The decoder has three stages, each working on a different word:

1. **Receive:** N clocks. Symbols go into the syndrome cells and the FIFO.
2. **Solve:** 1 clock to check the syndromes, which the solver copies. If
   they are nonzero, the solver then takes 3T+1 clocks. The result waits,
   if necessary, until the output stage is free.
3. **Output:** N clocks. Chien/Forney is loaded on entry, then steps once
   per symbol.

Each stage holds at most one word, and registers hand a word from one stage
to the next:

* The solver copies the syndromes when it starts, so the syndrome cells are
  free for the next word at once.
* The solver keeps Λ and Ω until its next start.
* Chien/Forney copies Λ and Ω on entry to the output stage.

`ready` falls with `start` and rises on the clock after the last symbol.
The exception is when the solve stage still holds the previous word. The
finished syndromes then wait in the syndrome cells, and `ready` stays low
until the solve stage takes them.

With 3T+2 < N this never happens when words are sent as fast as allowed.
So a word can start every N+1 clocks: one clock for `start`, then N
symbols. At that rate one word is received, the previous one solved and
the one before it output, all at the same time.

## Interfaces and timing

### `rs_encoder` / encoder half of `rs_codec_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, **active high** |
| `start` | in | 1 | begin a block (ignored until `g_ready`, and outside idle) |
| `enable` | in | 1 | `data_in` holds a message symbol |
| `bypass` | in | 1 | sampled with `start`: no parity for this block |
| `data_in` | in | M | message symbol, highest degree first |
| `t_out`, `dvalid` | out | M, 1 | codeword symbol and its valid |
| `status` | out | 2 | 0 idle, 1 message, 2 parity |
| `g_ready` | out | 1 | generator polynomial computed (2T clocks after reset) |
| `q` | out | 2T×M | parity registers q0 … q(2T-1) |

### `rs_decoder` / decoder half of `rs_codec_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clock`, `reset` | in | 1 | clock; synchronous reset, **active low** |
| `start` | in | 1 | one-clock pulse while `ready`; the N symbols follow on the next N clocks |
| `recword` | in | M | received symbol, R(N-1) first |
| `ready` | out | 1 | a word can be started (receiver idle and syndrome cells free) |
| `corr_recword` | out | M | corrected symbol, N consecutive clocks |
| `dataoutstart`, `dataoutend` | out | 1 | mark the first and the last output symbol |
| `errfound` | out | 1 | one-clock pulse after reception if the syndrome is nonzero |
| `decode_fail` | out | 1 | with `dataoutend`: the word could not be corrected |

`dataoutstart` is high N+2 clocks after the clock edge that samples `start`
for an error-free word, and N+3T+4 clocks after it otherwise. For RS(255,239)
these are 257 and 283 clocks.

There is one exception. An error-free word that follows a word with errors
also waits for the output stage. Its output then starts N clocks after the
previous word's output started, so the two output blocks follow each other
without a gap.

`ready` is low while a word is being received, and a `start` then is
ignored. Words can be sent every N+1 = 256 clocks.

`rs_codec_top` places the encoder and the decoder side by side. They share
only the clock and the code parameters, so the decoder can be fed from a
channel model, as the end-to-end testbench does.

## Parameters

| parameter | default | used by | meaning |
|---|---|---|---|
| `M` | 8 | all | symbol width, field GF(2^M) |
| `POLY` | `9'h11D` | all | field polynomial, bit M set |
| `N` | 255 | encoder control, decoder | code length, ≤ 2^M − 1 |
| `T` | 8 | all | correctable symbols; 2T parity symbols |
| `GEN_START`, `H` | 1, 1 | encoder | generator roots α^(H·(GEN_START+i)); the decoder assumes 1, 1 |
| `DEPTH` | 256 | `rs_srl_fifo` | FIFO depth; the decoder sets it to the next power of two above 2N+1 (512) |

After coarse synthesis with yosys, the default codec is about 2,350
word-level cells and 960 flip-flop bits, plus 6,144 bits of memory: the
2,048-bit inverse ROM and the 4,096-bit FIFO store.

For comparison, the reference FPGA implementation reports:

* **Encoder:** 16 eight-bit parity registers and 139 flip-flops in all,
  with the generator coefficients supplied on input pins. Here they are
  computed on chip.
* **Decoder:** 517 flip-flops and 1,480 four-input LUTs. Its pin count
  points to 5-bit symbols.

## Where this implementation departs from, or adds to, the reference design

This RTL re-implements an FPGA Reed–Solomon codec described in an M.Tech
thesis. The block structure, the field, the 16-parity-symbol encoder with
its `g`/`q` buses, the decoder pin set and the decoding steps follow that
source. The following are this implementation's own choices:

* **Key-equation algorithm.** The source names both Euclid's algorithm and
  Berlekamp–Massey. It calls Euclid the usual choice and Berlekamp–Massey
  the more hardware-efficient one, and gives the steps of neither. Only an
  inversion-free Berlekamp–Massey is built here.
* **Decoder schedule.** The source speaks of pipeline stages of 255 clocks
  each. Its waveforms show a new word received while the previous one is
  output. Here the three stages likewise overlap. The stage hand-over rules
  are this design's own. So is the one clock taken by `start`, which makes
  the word period N+1 rather than N.
* **`ready` during reception.** The source's waveforms show `ready` high
  during parts of reception. Here it is low then, since a `start` would be
  ignored.
* **Output order.** In the source the error vector comes out in reverse
  order, and a LIFO/FIFO sits in front of the correction adder. Here the search is run
  in received order, so the FIFO is only a delay line.
* **Generator coefficients.** They are computed in hardware after reset,
  not held as a table.
* **Signals added here.** The encoder control's phases, `bypass`, `status`,
  the parity-register `clr`, the `start` framing and the flag pulse widths.
  Only their names come from the source.
* **Encoder width.** One of the source's figures shows a 64-tap encoder. The
  16-tap version is the default here; 64 taps is `T = 32`.
* **Decoder example configuration.** The source's decoder example uses
  5-bit symbols and t = 6. The field polynomial used for it here,
  x^5 + x^2 + 1, is an assumption.
* **Resets.** The encoder reset is active high. The decoder reset is active
  low, because the decoder's example waveforms hold `reset` at 1 while
  decoding. Both are synchronous.

## Verification

Every block has a self-checking testbench in `tb/`. Expected values come
from `tb_rs_model`, a package that does GF arithmetic with exponent and
logarithm tables built at run time. That is a different method from the
RTL's shift-and-reduce multipliers. The model encodes by polynomial long
division and evaluates syndromes and polynomials directly.

| testbench | what it establishes |
|---|---|
| `tb_gf_mult` | all 65,536 GF(2^8) products and all GF(2^5) products |
| `tb_rs_code_gen`, `tb_rs_field_gen` | root sequence and g(x) for t = 8 and t = 6, set-up time |
| `tb_rs_parity`, `tb_rs_enc_ctrl`, `tb_rs_cw_gen`, `tb_rs_encoder` | codewords equal the reference and have zero syndromes, with input gaps; latency; parity order; bypass |
| `tb_rs_syndrome` | syndromes for 0–9 errors with input gaps; values held while idle |
| `tb_rs_kes_bm` | for 1–8 errors: deg = number of errors, Λ vanishes at each location, Forney values match; latency; syndromes changed after `start` have no effect; more than t errors detected |
| `tb_rs_chien_forney` | error values and root flags at every position, full-length and shortened (N = 200) |
| `tb_rs_srl_fifo` | random traffic against a queue model, full/empty limits, `sinit` |
| `tb_rs_decoder` | 0–8 errors corrected, 9–11 flagged; framing, `ready`, `errfound`, latency; a back-to-back stream of 12 words: order, overlap, N+1 start spacing, every latency |
| `tb_rs_codec_top` | end to end at the default size; pass-through, correction, failure, input gaps, bypass, busy `start` and overlapped decoding all exercised and counted |
| `tb_rs_workloads` | RS(31,19) in GF(2^5) with words of 0, 6 and 8 errors; RS(255,223) with 0, 16 and 17 errors; RS(255,191) with 0, 32 and 33 errors |

Not verified: timing closure on an FPGA, and `GEN_START`/`H` values other
than 1 in the decoder (the decoder does not support them).

## Simulating

The testbenches print `TB_RESULT checks=<n> failures=<n>` and stop by
themselves. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rs_pkg.sv tb/tb_rs_model.sv tb/tb_rs_codec_top.sv \
    --top-module tb_rs_codec_top -o sim
./obj_dir/sim
```

For another test, replace `tb_rs_codec_top` with its name. Every module sits
in its own file under `rtl/`. `rs_pkg.sv` must be read first, and
`tb/tb_check.svh` provides the `CHECK` macro the testbenches use.

To change the code, override `M`, `POLY`, `N` and `T` on `rs_codec_top`,
`rs_encoder` or `rs_decoder`. For example:

```
rs_codec_top #(.M(5), .POLY(6'h25), .N(31), .T(6))
```

Each full-length RS(255,239) word takes a few hundred clocks. Every
testbench here simulates in well under a second once built.
