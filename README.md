# RS(255,239) link with a Welch–Berlekamp remainder decoder

This is synthesizable SystemVerilog for a Reed–Solomon protected link over GF(2^8). Data
blocks of 239 bytes are encoded into 255-byte codewords. The decoder corrects up to
t = 8 corrupted bytes per codeword. It targets links between Internet-of-Things devices,
where the data travels over a noisy channel or sits in unreliable storage.

Most RS decoders start by computing 2t syndromes. This decoder does not. It **re-encodes**
the received word, which gives the 2t-symbol remainder r(x) = v(x) mod g(x). It then solves
a rational interpolation problem on those 2t values with a **modified Welch–Berlekamp (WB)
algorithm**. The WB solver keeps two polynomial pairs and uses a small up/down counter J in
place of polynomial-length comparisons. It needs exactly 4 clocks per remainder symbol,
64 clocks per codeword. A Chien search then locates the errors, and a closed-form
expression gives each error value.

```
 source ─► rs_encoder ─► (channel / storage, noise) ─► rs_wb_decoder ─► sink
                                                   ┌── rs_reencoder ──► wb_key_solver ──► chien_error_eval ──┐
 received symbols ─────────────────────────────────┤                                                         ⊕──► corrected
                                                   └── rs_buffer (3 codewords) ──────────────────────────────┘
```

## The code

* Field: GF(2^8) with p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D). α = 0x02. A symbol is a
  byte: bit i is the coefficient of α^i.
* Generator: g(x) = ∏_{i=0}^{15} (x − α^i), so the first root is α^0.
* Systematic form: c(x) = I(x)·x^16 + (I(x)·x^16 mod g(x)). The information occupies
  degrees 254…16 and the parity occupies degrees 15…0.
* Symbol order on every stream: highest degree first. Stream index j carries the coefficient
  of x^(254−j). The first 239 symbols are data and the last 16 are parity.

## Encoder (`rs_encoder`, `gf2_example_encoder`)

The encoder divides by g(x) in a 16-stage LFSR:

* The feedback is the input symbol XOR the last stage.
* Stage i loads stage i−1 XOR g_i·feedback.

The information symbols pass straight to the output while they are divided. After the
239th symbol the LFSR holds the parity. It is shifted out with the feedback forced to zero,
and `in_ready` is low during those 16 cycles. Both sides use valid/ready handshakes.
`out_sync` marks the first symbol of a codeword and `out_parity` marks the parity symbols.
A synchronous `clr` abandons a partly encoded word and starts the next one from scratch. The
decoder contains a second copy of this encoder, described below.

`gf2_example_encoder` is the same structure reduced to GF(2) for g(x) = 1 + x + x^3. After
shifting in b2, b1, b0, it holds R0 = b0+b2, R1 = b0+b1+b2, R2 = b1+b2. It is an
illustration only and is not part of the link.

## Stage 1: re-encoding (`rs_reencoder`)

The re-encoder is the encoder's LFSR run over the received word v(x):

* For the 239 data symbols it behaves exactly like the encoder. At the end it holds r'(x),
  the parity that the *received* data would have had.
* During the 16 received parity symbols an output switch closes. It emits
  r_i = v_i + r'_i (highest degree first) while the register shifts out with zero feedback.

The result is r(x) = v(x) mod g(x). Codewords are multiples of g(x), so r depends only on
the error pattern: it is zero for a clean word. The 16 values land in `r_vec`, and `done`
pulses one clock after the last symbol.

## Stage 2: the key equation and the modified WB algorithm (`wb_key_solver`)

### What is being solved

Each remainder symbol is scaled to a *check value* R_k = r_k·G_k and paired with its
*check location* α_k = α^k, for k = 0…15. The solver looks for an error locator Q(x) of
degree ≤ t and a polynomial N(x) of lower degree such that

    Q(α_k)·R_k = N(α_k)        for all 16 pairs.

Q(x) has a root at α^i for every error position i. The constants are:

    C   = [ (α^0 α^1 … α^14) · (α^0−α^1)(α^0−α^2)…(α^0−α^15) ]^-1
    G_k = C · ∏_{j≠k} (α^k − α^j)
    f(x) = C · g(x)

With this scaling, the error value at a data position i is exactly

    e_i = N(α^i) / ( f(α^i) · Q'(α^i) ).

This holds because G_k is g'(α^k) up to the factor C, the value that turns the remainder
into a Lagrange-interpolation problem over the check locations. The constant tables are
computed at elaboration by functions in `rs_pkg`, so no table files are needed. Numerically,
C = 0x0C and G_15 = 0x01.

### The iteration

The solver keeps two pairs, (Q, N) and (W, V). Each pair k updates them:

| start | Q = 1, N = 0, W = x, V = 1, J = 1 |
|---|---|
| D1 = Q(α_k)R_k − N(α_k) | |
| **A**: D1 = 0 | (W,V) ← (W,V)(x − α_k); J ← J + 1 |
| otherwise | D2 = W(α_k)R_k − V(α_k); (Wt,Vt) = (W,V) + (D2/D1)(Q,N); (Qt,Nt) = (Q,N)(x − α_k) |
| **B**: J ≠ 0 | (Q,N) ← (Qt,Nt); (W,V) ← (Wt,Vt); J ← J − 1 |
| **C**: J = 0 | (Q,N) ← (Wt,Vt); (W,V) ← (Qt,Nt); J ← 1 |

J equals L(W,V) − L(Q,N), where L(P,R) = max(deg P, deg R + 1) is the length of a pair.
The classical algorithm compares these lengths directly; tracking their difference turns the
comparison into a zero test on a 6-bit counter. After each pair, both pairs satisfy every
check processed so far, because (Wt,Vt) is built to cancel D2. The (Q,N) pair always stays
the shorter of the two.

### Schedule and sharing

Every pair takes 4 clocks, whatever branch it takes, so a solve is always 8t = 64 clocks:

1. Evaluate Q and N at α_k (the powers α_k^0…α_k^8 come from `gf_powers`). Form D1 and
   register D1 and 1/D1.
2. Evaluate W and V at α_k. Form D2 and register D2/D1.
3. If D1 = 0, form (W,V)(x − α_k). Otherwise form (Qt,Nt).
4. Form (Wt,Vt) = (W,V) + (D2/D1)(Q,N) and commit branch B or C. Increment k and
   step α_k ← α·α_k.

All four phases run on one bank of 9 multipliers for Q/W and 8 for N/V. Only the operand
multiplexers change between phases. Five more multipliers and one inverter handle:

* r_k·G_k
* X(α_k)·R_k
* D2·(1/D1)
* α·α_k
* 1/D1 (the inverter)

W is kept to degree 8 and V to degree 7. Larger degrees only arise once more than t errors
are present, so dropping them does not change any correctable result.

`step_valid`/`step_branch` report the branch of every pair, for observation.

## Stage 3: Chien search and error values (`chien_error_eval`)

Three register banks hold the coefficients of Q (9 registers), N (8) and f (17).

* Each clock of `advance` multiplies register l by α^−l.
* The bank sum is then the polynomial evaluated at the next lower position.
* Starting from the raw coefficients, the first point is α^−1 = α^254.

Positions are therefore visited 254, 253, …, 0, the order in which the decoder outputs
symbols.

The formal derivative needs no extra registers. Q'(α^i) = α^−i · (sum of the odd-degree
terms of Q at α^i), so

    e_i = α^i · N(α^i) / ( f(α^i) · Q_odd(α^i) ),

which takes one inverter and three multipliers.

At the 16 parity positions f(α^i) = 0, so the formula does not apply, and `err_val` is
meaningless there. The decoder rebuilds the parity in a different way instead.

### Rebuilding the parity

After correction, the 239 information symbols are fed through an embedded `rs_encoder` as
they leave the decoder. The 16 parity symbols it produces replace the received ones. The
embedded encoder runs in step with the output handshake, so it adds no latency and no
stall. With ≤ t errors, anywhere in the word, every output word is therefore the codeword
that was sent. At a parity position `do_error` is high when the rebuilt symbol differs from
the received one.

## The decoder (`rs_wb_decoder`)

### Pipeline

The three stages work on three consecutive codewords at once. `rs_buffer` has three banks
of 255 symbols: one is being written, one waits while the solver runs, and one is being
read and corrected.

* A word moves from stage to stage as soon as the next stage is free.
* With a continuous input stream and `do_acpt` held high, the decoder takes and delivers one
  symbol per clock with no stall.
* The first corrected symbol appears **N + 8T + 3 = 322 clocks** after the first received
  symbol.

### Ports

| port | dir | meaning |
|---|---|---|
| `clk` | in | rising-edge clock |
| `reset_n` | in | asynchronous reset, active low |
| `reset_sync_n` | in | synchronous reset, active low |
| `di[7:0]`, `di_rdy` | in | received symbol and its valid flag |
| `di_sync_in` | in | marks the first symbol of a codeword |
| `di_acpt` | out | the decoder takes `di` this cycle (`di_rdy && di_acpt`) |
| `dout[7:0]`, `do_rdy` | out | output symbol and its valid flag |
| `do_acpt` | in | the receiver takes `dout` this cycle |
| `do_sync_out` | out | first symbol of an output codeword |
| `do_error` | out | this output symbol differs from the received one (corrected data, or rebuilt parity) |
| `do_parity_n` | out | low on the 16 parity symbols |

### Synchronisation and flow control

* Symbols that arrive before the first `di_sync_in` after reset are dropped.
* A `di_sync_in` in the middle of a word drops the partial word and starts a new one.
* After a complete word, the next word may follow with or without `di_sync_in`.
* `di_acpt` falls only on the last symbol of a word whose predecessor's solver result is still
  waiting for the output stage. That happens only when `do_acpt` back-pressure has stalled
  the output long enough to fill all three banks.
* `dout` and the flags are combinational from registers and the buffer's asynchronous read.

### Assertion

One assertion states that a finished remainder never finds the solver busy.

### Not included

There is no detection of uncorrectable words (more than t errors). Such a word leaves the
decoder with wrong or no corrections and no flag.

## Field arithmetic (`rs_pkg`, `gf_mult`, `gf_inv`, `gf_powers`)

* `rs_pkg` holds the symbol type, the field polynomial, the WB branch enum and the constant
  functions. It also holds the squaring maps x^2, x^4 and x^8. These are fixed XOR networks
  over the 8 bits, checked exhaustively against multiplication.
* `gf_mult` is a one-cycle bit-parallel polynomial-basis multiplier.
* `gf_inv` computes a^254 with seven squarings and six multiplications.
* `gf_powers` builds α_k^0…α_k^8 from the squaring maps and three multiplications:
  x^3 = x^2·x, x^5 = x^4·x, x^6 = (x^3)^2, x^7 = x^6·x.

## Departures from the original design

* The original multipliers are Berlekamp (dual-basis, bit-serial) multipliers. This design
  uses bit-parallel polynomial-basis multipliers with the same count and sharing.
* The original gives the re-encoder and the WB solver one codeword period each, a latency of
  two codeword periods. Here the stages hand over as soon as possible (latency 322 clocks).
  The throughput is the same.
* Parity symbols are rebuilt by re-encoding the corrected data. The error-value formula
  divides by zero there, and re-encoding is one of the two options the original allows; the
  other is leaving them uncorrected.
* The scale factors G_k are written in the closed form above. It matches the original's
  normalising constant C and error-value formula.
* The buffer depth (three codewords), the exact handshake timing, the behaviour of sync and
  resync, and a per-symbol `do_error` are this design's choices.
* The original decoder's clock rate (86 MHz) and area (8651 logic elements on a Stratix
  EP1S25) belong to its own implementation. They have not been measured for this RTL. The
  error-value path (three multipliers and an inverter after the Chien sums) is a single
  combinational stage and would be the first place to pipeline.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`. The reference arithmetic is in `tb/tb_gf_pkg.sv` and is
written independently of the design: a carry-less product with bitwise reduction, an inverse
by search, and long division by g(x).

| testbench | what it establishes |
|---|---|
| `tb_gf_mult` | all 65 536 products |
| `tb_gf_inv` | all 256 inverses |
| `tb_gf_powers` | all powers 0…8 (and 0…10 at T = 10) of every element |
| `tb_gf2_example_encoder` | every row of the shift table for all 8 messages |
| `tb_rs_encoder` | codewords equal data + reference remainder, under random stalls; `clr` mid-word |
| `tb_rs_reencoder` | r = v mod g, restart by sync, synchronous clear, `done` timing |
| `tb_wb_key_solver` | 64-clock solve; key equation; roots exactly at the error positions; deg Q = number of errors; error values; branches A, B, C all seen |
| `tb_chien_error_eval` | position sequence, root detection and error values for random Q, N |
| `tb_rs_buffer` | bank-separated write and read |
| `tb_rs_wb_decoder` | 10 words with 0…8 errors; the whole output word, parity included, equals the sent codeword; `do_error` exactly at the error positions; an all-zero word with single-bit errors 01, 02 … 80 in its first 8 symbols; 322-clock latency; no stall on a continuous stream; back-pressure |
| `tb_rs_link_top` | full-size end-to-end run (described below) |

`tb_rs_link_top` runs at the default parameters. It encodes 14 random blocks and checks the
codeword roots. It then corrupts them with up to 8 errors in data and parity positions and
decodes them. Every output symbol, parity included, must equal the sent codeword. Along the
way it exercises:

* idle input cycles
* long output back-pressure that stalls the input
* dropped pre-sync symbols
* an aborted word with resynchronisation
* a synchronous reset

It counts each of these mechanisms and each WB branch, and fails if any never occurs.

## Simulating

All testbenches use plain Verilator 5 (two-state). From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rs_link_top \
    rtl/rs_pkg.sv tb/tb_gf_pkg.sv tb/tb_rs_link_top.sv
./obj_dir/Vtb_rs_link_top
```

Substitute any other testbench name. Verilator finds the remaining modules in `rtl/`
through `-I`. A lint check of a single module:

```
verilator --lint-only -Wall -Irtl rtl/rs_pkg.sv rtl/rs_wb_decoder.sv
```

## Changing it

* `T` (error-correcting capability, default 8) is a parameter of every codec module. The
  constant tables follow it automatically, for 2T up to 64.
* `N` must stay 255: the Chien search starts at α^254.
* `BANKS` of the buffer is fixed at 3 inside the decoder.
* A different field polynomial needs changes in two places: `PRIM_POLY`, and the three
  squaring maps in `rs_pkg`.
