# Bit-serial BCH(15,7,5) encoder and decoder

This is a small forward-error-correction chain built around the binary BCH code
with length 15, 7 message bits and minimum distance 5. The code corrects any 1
or 2 inverted bits in a 15-bit word. A 7-bit message goes in, is encoded into a
15-bit codeword, passes a "channel" that inverts the bits you choose, and is
decoded. Up to two inverted bits are corrected, and words that cannot be
corrected are flagged. Everything works one bit per clock cycle. It uses the
classic structure: a shift-register divider as the encoder, and a decoder made
of syndrome calculation, Berlekamp–Massey, Chien search and correction. A
character-LCD driver shows the last input and output frames, as on a
Spartan-3E starter board.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). There is no vendor IP.

## The code

| item | value |
|---|---|
| length n, message k, parity n−k | 15, 7, 8 |
| correctable errors t | 2 |
| field | GF(2^4), primitive polynomial p(x) = x^4 + x + 1, α a root of p |
| generator | g(x) = m1(x)·m3(x) = (x^4+x+1)(x^4+x^3+x^2+x+1) = x^8+x^7+x^6+x^4+1 |

A field element is a 4-bit vector: bit i is the coefficient of α^i. On the
serial line, the codeword goes **highest degree first**. The 7 message bits
(x^14 … x^8) come first, then the 8 parity bits (x^7 … x^0). At the parallel
ports, index 0 is the first bit on the line, so `din[0:6]` and `error[0:14]`
use ascending ranges.

`rtl/bch_pkg.sv` holds these constants and the field arithmetic. `gf_mul` is
shift-and-add multiplication. `gf_inv` computes a^14 = a^2·a^4·a^8.
`gf_alpha(e)` gives α^e. Every function is combinational.

## Encoder (`bch_encoder`)

The encoder is a systematic divider. An 8-stage LFSR with the taps of g(x)
accumulates the remainder of x^8·m(x) / g(x):

* **Message phase (7 slots).** `in_ready` is high. Each accepted bit goes
  straight to the output. It is also added to the top LFSR stage, and the sum
  is fed back through the taps.
* **Parity phase (8 slots).** Feedback is cut and the LFSR shifts its contents
  out, top stage first. This takes 8 cycles in a row with `in_ready` low.

The output is registered, so a bit leaves one cycle after it is accepted.
`out_last` marks the 15th bit. Message bits may arrive with gaps; parity bits
never have gaps.

## Decoder (`bch_decoder`): three words in flight

The decoder is the involved part. It takes one received bit per cycle, and
words may follow each other without a gap. Three words are processed at once,
each in a different stage:

```
 in_bit ──┬─> bch_syndrome ──S1,S3──> (S2=S1², S4=S2²) ──> bch_bm ──Λ(x),L──> bch_chien ──e_j──┐
          │        ^                                          ^                 ^             v
          │        └──────────── bch_ctrl (framing, hand-over) ┴─────────────────┘        bch_correct ──> out_bit
          └────────────────────────────> bch_fifo (received bits) ──────────────────────────┘
```

Timeline of one word, in cycles, with cycle 0 the cycle of its last received
bit:

| cycle | event |
|---|---|
| −14 … 0 | bits enter the syndrome accumulators and the FIFO |
| 1 | `syn_valid`; the control unit starts the solver |
| 2 … 5 | Berlekamp–Massey, one iteration per cycle (2t = 4 iterations) |
| 6 | `done`; the Chien search loads Λ(x) |
| 7 … 21 | Chien search tests positions 14 … 0; each FIFO bit is read and XORed with its flag |
| 8 … 22 | corrected bits on `out_valid/out_bit`. `out_last` comes at cycle 22, together with `fail`, `detected` and `nerr` |

So the first decoded bit follows the last received bit by 8 cycles. Each stage
needs at most 15 cycles per word, so a stage is always free when the next word
arrives. The Chien search accepts a new locator in its own last cycle (`ready`),
so back-to-back searches have no gap.

### Syndromes (`bch_syndrome`)

S1 = r(α) and S3 = r(α^3) are evaluated with Horner's rule as the bits arrive:
`S ← S·α^j + r_i`. The code is binary, so S2 = S1² and S4 = S2². Only the odd
syndromes need accumulators. `in_first` restarts the accumulators and
`in_last` latches the result. The control unit drives both from its bit counter.

### Key equation (`bch_bm`)

This is the Massey form of the Berlekamp–Massey algorithm. It starts with
Λ(x) = 1, correction polynomial D(x) = x and L = 0. For n = 0 … 3:

```
d = Σ_{j=0..L} Λ_j · S_{n+1-j}                 discrepancy
if d ≠ 0:
    Λ'(x) = Λ(x) − d·D(x)
    if 2L < n+1:  L = n+1−L ;  D(x) = Λ(x)/d   (the Λ from before this update)
    Λ(x) = Λ'(x)
D(x) = x·D(x)
```

Each iteration is one clock cycle, including a combinational GF(16) inverse.
Λ is kept up to degree 4, so a failing case with L > 2 is still visible
downstream. For e ≤ 2 errors, the solver returns L = e and
Λ(x) = Π(1 + α^j x) over the error positions j.

### Chien search (`bch_chien`)

Bit r_j is in error when Λ(α^−j) = 0. The code is binary, so every error has
the value 1. No error-value (evaluator) polynomial is needed; flagging a
position is the whole correction. Positions are tested in line order,
j = 14 down to 0. Two registers hold the terms Λ_i·α^(−j·i). At load they are
Λ_i·α^i (for j = 14, since α^15 = 1). Each step multiplies term i by the
constant α^i.

Some locators cannot describe a correctable pattern. They are **masked at
load**, so that no bit gets flipped:

* L > 2;
* Λ_L = 0 (the degree is lower than L);
* L = 2 with Λ_1 = 0 (a double root).

A degree-2 locator can also have no roots at all. It then flips nothing, and
the correction stage notices that the number of roots differs from L.

### Correction (`bch_correct`) and what "uncorrectable" means

Each output bit is `r_j XOR e_j`. A word is reported `fail` when the search
masked it, or when the number of flipped bits differs from L. In both cases no
bit was flipped. A failed word therefore leaves **exactly as received**.

In effect, the decoder is a bounded-distance decoder. If a codeword lies within
Hamming distance 2 of the received word, it is returned. Otherwise the word is
returned unchanged, with `fail` set. With 3 or more errors the received word
can be within distance 2 of a *different* codeword. It is then "corrected" to
that wrong codeword without `fail`, as with any t = 2 decoder.
`detected` tells that the syndromes were non-zero. `nerr` gives the number of
corrected bits.

### FIFO (`bch_fifo`) and control (`bch_ctrl`)

The FIFO holds received bits until their flags are ready. At most 23 bits are
in flight: one full word, plus 8 bits of the next word at full rate. The
default depth is 32. The FIFO is first-word-fall-through, with pointer and
count registers.

The control unit counts valid input bits modulo 15 and starts the solver on
`syn_valid`. It keeps a solver result in a pending flag until the Chien search
is `ready`. At the full input rate that flag is never needed. Assertions check
that no stage is restarted while busy and that the FIFO never overflows or
underflows.

## The demonstration chain (`bch_top`)

```
din[0:6], error[0:14], vdin ─> serialiser ─> bch_encoder ─> XOR with error bit ─> bch_decoder ─> deserialiser ─> dout[0:6], vdout
                                                                                                     wrongnow, wrong, err, ncorr
last din / last dout / wrongnow ─> lcd_ctrl ─> lcd_e, lcd_rs, lcd_rw, lcd_d[3:0]
```

* A frame is taken when `vdin && rdy`. `rdy` is high while idle and in the last
  slot of the frame being sent, so frames can follow every 15 cycles.
* `error[i] = 1` inverts codeword bit i in line order: i = 0 is x^14, and
  i = 7 … 14 are the parity bits.
* `vdout` pulses **39 cycles** after the cycle in which the frame was taken.
  `dout`, `wrongnow`, `err` and `ncorr` then hold that frame's result until the
  next pulse. `wrong` is sticky: it stays set after the first uncorrectable
  frame since reset.

## LCD (`lcd_ctrl`)

This drives an HD44780-type 2×16 display over a 4-bit, write-only bus. After
the power-on wait, it sends the 4-bit initialisation nibbles 3, 3, 3, 2. It then
sends the commands 0x28, 0x06, 0x0C and 0x01. After that it rewrites both
lines forever:

```
IN  1000100
OUT 1000100 ERR        (ERR while the last frame was uncorrectable)
```

Each nibble follows the same pattern. The data is set up for `T_AS` cycles.
`lcd_e` is then high for `T_E` cycles. A pause follows: `T_NIB` between the
two nibbles of a byte, then the step's own wait (`T_CMD`, `T_CLEAR`, `T_INIT1`
or `T_INIT2`). The defaults are clock cycles at 50 MHz (15 ms, 4.1 ms, 100 µs,
40 µs, 1.64 ms, 1 µs, 240 ns, 40 ns). For another clock, scale them. One full
refresh pass takes about 1.4 ms.

## Where this RTL departs from the original description

* **The demonstration error patterns are beyond the code.** The original
  demonstration uses the patterns 011000010000000 and 100001000100000, and
  shows the output frame equal to the input frame. Each pattern inverts
  **three** bits, while the code corrects two. This design follows the code.
  With these patterns the frames come out flagged `wrongnow` and uncorrected:
  1000100 gives 1110100, 0100010 gives 0010010, and 0011101 gives 1011111.
  The top-level testbench runs these sequences and checks exactly this
  against an exhaustive reference decoder.
* **The Berlekamp–Massey loop runs 2t = 4 times.** The original flow chart of
  the algorithm is inconsistent in its length-change and stop tests. The
  standard Massey rules above are used.
* Not given in the original, so chosen here:
  * the primitive polynomial;
  * the serial bit order;
  * all handshakes and latencies;
  * the FIFO depth;
  * the masking rule of the Chien search;
  * the meaning of `wrongnow`/`wrong`;
  * the added `err`/`ncorr` outputs;
  * the LCD protocol, text and timing;
  * an asynchronous active-low reset.
* The original FPGA build reports 73 flip-flops and 94 LUTs. This design is
  larger (about 238 flip-flop bits plus 32 FIFO bits, coarse count) for two
  reasons. Its decoder keeps three words in flight at one bit per cycle, and
  it includes the LCD driver.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/bch_ref_pkg.sv` is an
independent reference. It builds GF(16) from log/antilog tables, encodes by
long division, and decodes exhaustively by comparing with all 128 codewords.

| testbench | what it checks |
|---|---|
| `tb_bch_pkg` | all 256 products, inverses, α powers, and g(x) = m1·m3 |
| `tb_bch_encoder` | all 128 messages with random input gaps, codeword bits, `out_last`, gap-free parity |
| `tb_bch_syndrome` | S1/S3 against direct evaluation; zero for codewords |
| `tb_bch_bm` | every pattern of weight ≤ 2 (exact Λ and L, 4-cycle latency); weight-3 patterns |
| `tb_bch_chien` | every locator of weight ≤ 2; rejected locators |
| `tb_bch_fifo` | random traffic against a queue model, including full |
| `tb_bch_correct`, `tb_bch_ctrl` | XOR, counts and flags; framing and hand-over |
| `tb_bch_decoder` | all 576 patterns of weight ≤ 3 plus weight 4–5, back to back and gapped; every word against bounded-distance decoding; 8-cycle latency |
| `tb_lcd_ctrl` | a display model decodes the bus: init sequence, strobe widths, pauses, both text lines |
| `tb_bch_top` | the whole chain at default parameters (see below) |

`tb_bch_top` runs the chain with every parameter at its default, including
the real LCD delays. It sends the two demonstration sequences, then 2000
random frames with 0–3 inverted bits, back to back and with gaps. For every
frame it checks `dout`, `wrongnow`, `err`, `ncorr`, `wrong` and the 39-cycle
latency. It also decodes the LCD bus. It fails if any of these never happens:

* a clean frame;
* a frame with one corrected bit;
* a frame with two corrected bits;
* an uncorrectable frame;
* a back-to-back frame;
* a gapped frame;
* a display refresh.

It runs in a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bch_top \
    -y rtl -y tb +libext+.sv rtl/bch_pkg.sv tb/bch_ref_pkg.sv tb/tb_bch_top.sv
./obj_dir/Vtb_bch_top
```

To run another testbench, replace `tb_bch_top` with its name. For lint, run
`verilator --lint-only -Wall -y rtl rtl/bch_pkg.sv rtl/bch_top.sv`. The
remaining warnings are:

* ascending-range warnings, which are intended: they keep the line order;
* async-reset flops next to `disable iff` assertions, which is harmless;
* the unused `G_POLY` constant in modules that do not encode.

`lcd_rw` is tied low because the driver only writes.
