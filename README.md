# π/4 QPSK transmitter in SystemVerilog

This is a complete digital transmitter for π/4-shifted QPSK. Bytes of user data are
protected by a Reed-Solomon RS(32,16) code and wrapped in frames with a sync word and
a header. The framed bits are then sent two at a time as phase steps of ±π/4 or ±3π/4
of a carrier. The output is a 24-bit real passband sample stream on a 25 MHz carrier,
ready for a DAC.

π/4 QPSK is a QPSK variant in which the constellation is rotated by π/4 after every
symbol. The carrier therefore alternates between two QPSK grids, {0, π/2, π, −π/2} and
{π/4, 3π/4, −3π/4, −π/4}. The largest phase jump is 3π/4 instead of π, and the signal
never passes through the origin. Its envelope stays smoother after filtering than plain
QPSK's, and because the information is in the phase *difference* a receiver can
demodulate it differentially, with no carrier recovery.

## Signal chain

```
 din ─► rs_encoder ─► framer ─► serial_to_parallel ─► diff_encoder ─► shaping_filter ─► upconverter ─► rf_out (to DAC)
        RS(32,16)     sync+hdr    bit pairs (I,Q)       phase steps     SRRC, ×8         I·cos − Q·sin
                      +codeword                          → Xk, Yk        polyphase        ▲
                                                                                           dds (25 MHz)
```

| module | job | key widths |
|---|---|---|
| `rs_encoder` | systematic RS(32,16) over GF(2^8), LFSR division | 8-bit symbols, 16 parity registers |
| `framer` | 38-byte frames: 4-byte sync, 2-byte header, 32-byte codeword, MSB first | 1-bit out |
| `serial_to_parallel` | first bit of each pair → I, second → Q | 2 bits per symbol |
| `diff_encoder` | phase accumulator in units of π/4, table to (Xk, Yk) | 3-bit phase, 8-bit Xk/Yk |
| `shaping_filter` | square-root raised cosine interpolator, 8 samples per symbol | 16-bit taps, 26-bit sum, output bits [25:10] |
| `dds` | 32-bit phase accumulator, 1024-entry sine table | 8-bit cos/sin |
| `upconverter` | `x_band = I·cos`, `y_band = Q·sin`, `rf_out = x_band − y_band` | 24 bits |
| `pi4qpsk_tx` | top: symbol timer and wiring | |
| `qpsk_pkg` | shared types, GF(2^8) multiply, SRRC formula | |

Everything runs on one clock, the DAC sample clock, assumed to be 100 MHz. A symbol timer
in the top counts `SPS` = 8 clocks per symbol and strobes the framer twice per symbol.
With the defaults that gives 25 Mbit/s, 12.5 Msymbol/s and one 304-bit frame every
1216 clocks (12.16 µs). Every stage after the framer has a fixed latency and passes
exactly one item per strobe, so no stage needs flow control. An assertion in the top
checks that symbols reach the filter exactly `SPS` clocks apart.

## Reed-Solomon encoder

The code is RS(32,16) over GF(2^8): 16 message bytes in, 32 bytes out, and up to 8 byte
errors correctable. The field polynomial is x^8+x^4+x^3+x^2+1 (0x11D). The generator is
g(x) = (x − α)(x − α²)…(x − α¹⁶), with α = x. Its 16 low-order coefficients are computed
at elaboration (`make_gen`), so changing `N`, `K`, `PRIM_POLY` or `FIRST_ROOT` needs no
new tables.

The hardware is the textbook division LFSR. There are 16 byte registers, and each adds a
constant-multiplier product of the feedback byte `fb = datain ^ b[15]` to its
predecessor:

* **message positions 0–15:** the byte goes straight to `dataout` and is divided into
  the registers;
* **parity positions 16–31:** the feedback is cut, and the registers shift their
  contents out, highest first.

Every cycle with `en` high advances one codeword position, and `dataout` is valid from
the following cycle. `msg_phase` says whether the next `en` consumes `datain`.
`code_end` pulses together with the last parity byte. `en` may be high for a whole
codeword (one byte per clock) or strobed at any slower rate.

## Frame format and the framer

```
| 1A CF FC 1D | 5A A5 | m0 … m15 | p0 … p15 |   38 bytes = 304 bits, each byte MSB first
   sync word    header   message    RS parity
```

The framer walks a byte index 0…37 and a bit index 0…7, sending one bit per `bit_ce`.
Sync and header bytes come from parameters. Codeword bytes are fetched from the RS
encoder one byte ahead: on the strobe that sends bit 7 of a byte, `en_rs` pulses if the
next byte is a codeword byte. The encoder's registered output is then ready before that
byte's first bit is due. This works even if `bit_ce` is high in every cycle.

Frames are requested with `start`. A pulse at any time is remembered, and the frame
begins at the next byte boundary. While `start` is held high, frames follow each other
with no gap. Because a request is remembered, dropping `start` during a frame still
lets one more frame follow. Between frames the framer sends zero bytes, so the modulator
never stops. `frame_start` and `frame_done` mark a frame's first and last bit. `field`
tells which part of the frame the next bit comes from.

Message bytes come from outside through `din`/`din_rd`, with the semantics of a
first-word-fall-through FIFO read port. `din` must already hold the next byte, and
`din_rd` (which is `en_rs & msg_phase`) pulses when the byte is taken. The framer reads
16 bytes per frame at the byte rate of the line: one byte per 32 clocks. There is no
under-run detection: the source must keep up.

## π/4 differential encoding

`diff_encoder` holds the carrier phase as a 3-bit count of π/4. Each (I, Q) pair adds a
step, and the new phase indexes an 8-entry table of (127·cos, 127·sin):

| I Q | step | | phase | Xk | Yk |
|---|---|---|---|---|---|
| 0 0 | +π/4 | | 0 | 127 | 0 |
| 0 1 | +3π/4 | | π/4 | 90 | 90 |
| 1 1 | −3π/4 | | π/2 | 0 | 127 |
| 1 0 | −π/4 | | … | … | … |

Every step is an odd multiple of π/4, so the least significant phase bit toggles on
every symbol. Reset puts the phase at 0, so after reset the odd-numbered symbols (1st,
3rd, …) are on the diagonal grid. Counting phases instead of multiplying by rotation
factors keeps the recursion exact: errors cannot build up over a long burst. The Gray
step table is the common one for π/4 QPSK. It is a choice of this implementation, as is
the first bit of a pair going to I.

## Pulse shaping: a polyphase interpolator

This is the least obvious block. In effect, the filter inserts 7 zeros after every
symbol and runs a 65-tap square-root raised cosine FIR at the sample rate. The FIR uses
roll-off 0.35 and spans 8 symbols. Most of those products would be with zeros, so the
filter does not do that. It keeps only the last 9 symbols, `hist[0..8]`, and a phase
counter `p`, which is the number of clocks since the newest symbol. Each output is:

```
y[p] = Σ_k hist[k] · h[p + 8k]        (h[j] = 0 for j > 64)
```

That is 9 multipliers per rail, and the result equals the zero-stuffed FIR exactly.
When a symbol is late (no `in_valid` 8 clocks after the last one), a zero symbol is
shifted in, just as in the zero-stuffed FIR.

The taps are computed at elaboration with the formula

```
h[j] = round( 32767 · srrc((j − 32)/8) / srrc(0) ),
srrc(t) = [sin(πt(1−β)) + 4βt·cos(πt(1+β))] / [πt(1 − (4βt)²)],   srrc(0) = 1 − β + 4β/π
```

with the usual limit at |t| = 1/(4β). The products (8-bit × 16-bit) are summed in 26 bits,
and the output is bits [25:10]. A single full-scale symbol peaks at 127·32767/1024 ≈ 4063,
and the largest possible sum (≈5.5·10⁶) stays well inside 26 bits. Timing: a symbol
taken in cycle *t* gives its phase-0 output sample in cycle *t*+2.

## Carrier and up-conversion

`dds` adds `FTW` = 2^30 to a 32-bit accumulator every clock. The top 10 bits address a
full sine table, round(127·sin(2πn/1024)), built at elaboration, and the cosine is read
a quarter turn ahead. f = FTW/2^32 · f_clk, which gives 25 MHz at 100 MHz. At that ratio
the carrier is exactly 127, 0, −127, 0. For another clock rate or carrier, change `FTW`.

`upconverter` registers `x_band = I·cos` and `y_band = Q·sin` (16 × 8 → 24 bits) and
outputs `rf_out = x_band − y_band`, the standard I·cos − Q·sin. Because |cos|+|sin| ≤ 180,
the output never exceeds ±5.9·10⁶ in its 24 bits. `rf_out` is a two's-complement sample.
Any offset-binary conversion a particular DAC needs is left to the board.

## Latency through the chain

From a `bit_ce` strobe: the bit appears 1 clock later. The second bit of a pair gives a
symbol pair 1 clock after it and (Xk, Yk) 1 clock after that. The filter's first sample
for the symbol follows 2 clocks later, and the passband sample 1 clock after that. The
end-to-end testbench checks each of these hand-offs sample by sample.

## What is given and what is chosen

The following come from the original design description:
* the chain order;
* RS(32,16) with one cycle of encoder delay and the LFSR division structure;
* sync + header + codeword framing;
* the eight phase states and their alternation;
* a shaping filter before the mixers;
* a DDS at 25 MHz;
* the word widths: 8-bit Xk/Yk with diagonal value 90, 16-bit shaped I/Q taken as
  bits [25:10], 24-bit `x_band`/`y_band`/output;
* the output formed as `x_band − y_band`;
* a 38-byte frame.

These are choices of this implementation, all of them parameters or local and easy to
change:
* the field polynomial;
* the sync and header values and their 4 + 2 byte split;
* MSB-first bit order and zero idle fill;
* the step table;
* the filter type, roll-off, span, tap width and 8 samples per symbol;
* the 100 MHz clock;
* the start/`din_rd` handshake.

Known differences to be aware of:
* The illustration of the encoder that accompanies the design shows 32 multiplier taps
  (g0…g31). RS(32,16) needs 16, and 16 are built.
* Example parity bytes published with the design were not reproduced by this encoder
  with any primitive polynomial and first root that was tried. The encoder is
  self-consistent: all 16 syndromes of every codeword are checked to be zero. But
  interoperating with another RS(32,16) implementation requires matching its field
  polynomial and first root, which are parameters here.
* Only the transmitter exists. The DAC, the RF stage, the A/D converter and a receiver
  are not part of this RTL.

## Testbenches and simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | reference it checks against |
|---|---|
| `tb_rs_encoder` | table-based GF arithmetic and long division; zero syndromes; timing of `dataout`, `msg_phase`, `code_end`; with and without gaps in `en` |
| `tb_framer` | rebuilt frames against sync, header and the bytes supplied; idle zeros; 32 fetches per frame; strobes every cycle and at random |
| `tb_serial_to_parallel` | pairs at random spacing |
| `tb_diff_encoder` | a real phasor rotated by each step; phase-set alternation |
| `tb_shaping_filter` | a direct-form 65-tap FIR on the zero-stuffed stream; impulse response and its symmetry; dropped symbols |
| `tb_dds` | 25 MHz pattern, and a second instance with an odd tuning word against `$sin`/`$cos` |
| `tb_upconverter` | exact products at random and extreme values |
| `tb_pi4qpsk_tx` | the whole chain at default parameters, as described below |

`tb_pi4qpsk_tx` sends five frames: one from a pulse, then back-to-back ones. It checks:
* every frame bit against its own RS model;
* frame length and cycle count;
* every symbol against a phasor model;
* every baseband sample against a direct FIR;
* every carrier and passband sample.

It also counts each mechanism: single and back-to-back frames, idle fill, each field,
all four steps, both phase sets, zero-stuffed filter phases, and non-zero output.

Running any of them with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/qpsk_pkg.sv tb/tb_pi4qpsk_tx.sv --top-module tb_pi4qpsk_tx
./obj_dir/Vtb_pi4qpsk_tx
```

Replace the testbench name for the others. The package is named first because the other
files import it. The whole-chain test runs about 9000 clocks, in well under a second.
The RTL uses only synthesizable constructs. All tables (GF generator, sine, SRRC taps)
are constant functions evaluated at elaboration, so no data files are needed.
