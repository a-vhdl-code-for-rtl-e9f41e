# Offset-PPM optical link with Reed–Solomon RS(31,23) error correction

This design is a serial optical link, written in synthesizable SystemVerilog. It
uses **offset pulse position modulation (OPPM)** and protects the data with a
**Reed–Solomon RS(31,23) code**.

OPPM sends each group of 3 PCM bits as a frame of 4 time slots:

- The most significant bit gets a slot of its own.
- The other two bits are sent as *at most one* pulse among the three remaining
  slots.

This has two consequences:

- The line rate is only 4/3 of the PCM rate.
- Half of the 16 possible slot patterns can never be sent. A receiver that sees
  one of them knows that the frame is damaged.

The RS code works on 5-bit symbols. It adds 8 parity symbols to every 23-symbol
message, so it can repair up to 4 wrong symbols per 31-symbol codeword. It can
repair up to 8 symbols if the receiver already knows where they are; such symbols
are called *erasures*.

The link joins the two ideas. A symbol that contains a bit from an impossible OPPM
frame goes to the RS decoder as an erasure. A damaged slot therefore costs the
decoder about half as much as an undetected error.

Besides the protected link, the design contains an **OPPM bit-error test link**. It
is a PRBS transmitter, an OPPM coder, a noisy channel, an OPPM decoder and a
PRBS-locked checker with error and bit counters. It measures the raw OPPM error
rate without any coding.

```
                  RS-protected link (rs_oppm_link)

 PRBS-15 ─► RS(31,23) ─► bridge ─► OPPM ─► channel ─► OPPM ─► bridge ─► RS(31,23) ─► data,
 source     encoder      coder     coder   (PRBS-7    decoder  decoder   decoder       #errors,
 (5-bit     (parallel    (5 bits   (3 bits  errors,                      (errors +     #erasures,
  symbols)   symbols)     → serial) → 4 slots) ext. path)   violation ──► erasures)     fail
                                                            flags
             oppm_clkgen: one 12× master clock → en3 (PCM bit), en4 (slot), frame strobes
```

The top module `oppm_rs_top` holds the RS link and the bit-error test link side by
side:

- The two links share only the clock and reset.
- The ports of the RS link start with `rs_`; those of the test link start with
  `ber_`.
- The top has three parameters: `N = 31`, `K = 23`, and `CNT_W = 16`, the width of
  the error counters.

## The OPPM code

| PCM `A B C` | OPPM slots `D E F G` |
|---|---|
| 000 | 0 000 |
| 001 | 0 001 |
| 010 | 0 010 |
| 011 | 0 100 |
| 100 | 1 000 |
| 101 | 1 001 |
| 110 | 1 010 |
| 111 | 1 100 |

### Encoder

The encoder (`oppm_enc_logic`) reduces to three 2-input ANDs and two inverters:

```
D = A    E = B·C    F = B·C̄    G = B̄·C
```

### Decoder

The decoder (`oppm_dec_logic`) inverts the table:

```
A = D
B = E·F̄·Ḡ + Ē·F·Ḡ
C = E·F̄·Ḡ + Ē·F̄·G
```

A frame with two or more pulses among E, F and G matches no PCM word. For such a
frame the decoder raises `viol = E·F + E·G + F·G`. It still outputs the bits that
the equations give, with B = C = 0.

The violation flag is what turns OPPM's built-in error detection into erasure
information for the RS decoder. A flip of slot D is not detectable. Nor is a flip
that moves a single pulse, or adds one to an empty E F G group. Those errors reach
the RS decoder as ordinary errors.

## One clock, three rates

Everything runs from one master clock at 12 times the OPPM frame rate. There are no
derived clocks. `oppm_clkgen` makes three clock enables from a 4-bit ring and a
3-bit ring:

| strobe | period | meaning |
|---|---|---|
| `en3` | every 4 clocks | one PCM bit (3 per frame) |
| `en4` | every 3 clocks | one OPPM slot (4 per frame) |
| `frame` | every 12 clocks | `en3 & en4`, start of a frame |

All serial interfaces follow one rule. The producer updates its output register on
its strobe, and the consumer samples the value that was there before the strobe.
Every serial hop therefore adds exactly one strobe period of delay, and no hop
depends on gate delays.

### OPPM coder (`oppm_coder`)

The coder takes PCM bits on `en3`, most significant bit first.

1. A one-hot position counter steers them into a 2-bit partial word.
2. The third bit completes the word.
3. A completed word is encoded and loaded into a 4-bit parallel-in/serial-out
   register at the next `frame` strobe, which then shifts one slot per `en4`.

A word can be completed on the very clock of the frame strobe. It then bypasses the
hold register and goes out in that frame. Otherwise it waits in the hold register
until the next frame.

Frames without a complete word are sent as empty frames (four zero slots), and
`frame_valid` marks which frames carry data.

An optional start-up mode (`sync_i = 1`) copies the original test arrangement. The
coder ignores its input until a 15-bit shift register has seen 15 consecutive ones,
the start pattern of the PRBS-15 source. Then the coder starts encoding.

### OPPM decoder (`oppm_decoder`)

1. The decoder samples the slots on `en4` into a shift register.
2. At each frame strobe, the three stored slots plus the slot on the line form the
   whole received frame. This frame is decoded.
3. The 3 PCM bits and the violation flag go out one bit per `en3` from a 3-bit
   serial register.

Coder and decoder together delay the PCM stream by one to two frames.

## Bridges: 155 bits in 52 OPPM frames

An RS codeword is 31 × 5 = 155 bits. That is not a multiple of 3.

- **`bridge_coder`** serialises the symbols most significant bit first. It appends
  one padding zero, giving 156 bits, which is exactly 52 OPPM frames.
- **`bridge_decoder`** drops the padding bit again.

As a result, a codeword always begins on a frame boundary.

A codeword-start flag (`sop`) travels with the first bit through coder, channel and
decoder as a side signal. The receive bridge uses it to find symbol boundaries. The
channel does not corrupt these side signals. They stand in for the frame
synchronisation that a real optical receiver would have to recover from the slot
stream.

The receive bridge also ORs the OPPM violation flags over the 5 bits of each symbol.
The result is the symbol's erasure flag.

The link runs at one codeword per 156 × 4 = **624 clocks**.

## The Reed–Solomon codec

### Field and code

- Symbols are elements of GF(2^5), built with the primitive polynomial
  x^5 + x^2 + 1 and α = 2 (package `gf32_pkg`).
- The code is narrow-sense: its generator polynomial has the roots α^1 … α^8:

  g(x) = ∏_{i=1..8} (x + α^i)

  It is computed when the encoder elaborates, so changing `N` or `K` gives the
  matching code. The symbol width stays 5 bits.
- Field multiplication is a 5-step shift-and-add, flattened into combinational
  logic.
- The inverse of x is computed as x^30.

### Encoder (`rs_encoder`)

The encoder is the usual systematic LFSR divider.

1. The 23 message symbols pass straight through to the output and also feed the
   division by g(x).
2. The 8 remainder symbols follow as parity.
3. While the parity is shifted out, `in_ready` is low.

Both sides use valid/ready handshakes:

- `out_sop` and `out_eop` mark symbols 0 and 30.
- `in_last` tells the source that the next symbol it hands over completes a message.
- Symbols flow at up to one per clock. In the link, the bridge coder paces them to
  one symbol per 20 clocks.

### Decoder (`rs_decoder`)

This is the part that takes the most care. It corrects *s* errors and *r* erasures
whenever 2s + r ≤ 8, and works in three stages. The stages overlap with the
reception of the next codeword.

**1. Receive.** While the 31 symbols arrive (highest degree first), the decoder does
three things:

- It accumulates the 8 syndromes S_i = r(α^i) by Horner's rule:

  S_i ← S_i·α^i + r_j

- It stores the symbols in a buffer.
- For each symbol flagged as an erasure, it multiplies the erasure locator
  Γ(x) = ∏(1 + X_k x) by (1 + X x). Here X = α^(30 − index) is the locator of that
  position.

More than 8 erasures cannot be decoded. They are counted and cause a failure.

**2. Solve.** After the last symbol, syndromes, Γ and buffer are copied into a second
register set, so the next codeword can already be received.

Berlekamp–Massey then runs, one iteration per clock:

1. It starts from Λ(x) = B(x) = Γ(x), with length L = r.
2. It runs iterations k = r+1 … 8, each computing the discrepancy
   Δ = Σ Λ_j S_{k−j}.
3. Λ is updated to Λ − Δ·x·B.
4. If Δ ≠ 0 and 2L ≤ k − 1 + r, the length grows to k + r − L and B becomes Δ⁻¹·Λ
   (the old Λ). Otherwise B becomes x·B.

Starting from Γ is what makes the algorithm solve for errors and erasures at once.
The result Λ(x) locates both. The evaluator Ω(x) = S(x)·Λ(x) mod x^8 is then formed
in one clock.

**3. Search and correct.** A Chien search evaluates Λ at x = X⁻¹ for all 31
positions, in order of arrival. It steps x from α^−30 by one multiplication by α per
clock.

- **First pass:** it only counts roots. Decoding *fails* if the number of roots
  differs from L, which is the usual sign that the word had more errata than the
  code can handle. It also fails if there were more than 8 erasures.
- **Second pass:** it streams the 31 symbols out. At each root it adds the Forney
  error value e = Ω(X⁻¹) / Λ′(X⁻¹). In GF(2^m), Λ′ keeps only the odd-degree terms.
  If decoding failed, the symbols go out as received.

Outputs:

- `out_data` carries the (corrected) symbol and `out_raw` the received one.
- `err_num_o` gives the number of located errata, errors plus erasures. It is 0 when
  decoding fails.
- `era_num_o` gives the number of erasures, and `fail_o` is the failure flag.
- All three are valid with `out_eop`.

Latency: the first corrected symbol leaves (8 − r) + 2 + 31 + 1 clocks after the
last received symbol, at most 42 clocks. That is far less than the 624 clocks per
codeword, so the decoder never stalls the link.

Like any bounded-distance decoder, it can *miscorrect* a word that has far more
errata than 2s + r ≤ 8 allows, turning it into a different valid codeword. The
root-count check catches most such words, but not all.

## Source modes

The PRBS-15 source (x^15 + x^14 + 1, reset to all ones) supplies 5-bit message
symbols. It has two modes:

- **Multi-codeword mode.** While `rs_run_i` is high, codewords follow each other
  without a gap.
- **Single-codeword mode.** With `rs_run_i` low, each pulse on `rs_start_i` sends
  exactly one codeword.

If `rs_run_i` falls in the middle of a message, the source still finishes that
message, so a codeword is never left half sent.

## Channel and bit-error test link

The channel (`oppm_channel`) has three options:

- It loops the slot stream straight back.
- It takes the stream from an external return path (`ext_sel_i`, `return_i`), so
  that real optical hardware can be placed between `coder_out_o` and `return_i`.
- It flips slots. A slot is flipped when the external error input is high, or when
  all the bits of a free-running PRBS-7 (x^7 + x^6 + 1) selected by `err_mask_i`
  are ones. With m selected bits, roughly 2^−m of the slots are hit. A zero mask
  turns this error source off.

In the test link (`oppm_ber_link`):

- The PRBS-15 bit stream is sent through coder, channel and decoder.
- `rx_prbs_checker` shifts the received bits into a 15-bit register. When that
  register holds all ones, the checker starts its own PRBS-15 and compares every
  following bit.
- Two saturating counters (`sync_counter`) count wrong bits and checked bits.
  Their ratio is the bit error ratio.
- `ber_cnt_clr_i` clears both counters.

## Where this departs from the original description

The original design was given as VHDL block diagrams, truth tables and waveforms.
This RTL follows its chain of blocks and its OPPM code exactly. It differs in these
places:

- **Clocking.** The original uses separate divided clocks for the 3-bit and 4-slot
  rates. Here the design has one master clock and clock enables, which is safer for
  synthesis. The 12:4:3 ratio is kept.
- **OPPM decoder gates.** The decoder equations are re-derived from the table
  rather than copied gate by gate. The violation flag is this design's addition.
- **Erasures.** Marking a symbol as an erasure on an OPPM violation is this design's
  choice. An external erasure input (`rs_era_i`) is ORed in, as in the original.
- **Framing.** Codeword start and frame-valid flags travel beside the data instead
  of being recovered from the slot stream.
- **Padding.** One padding bit per codeword makes 155 bits fit 52 frames. The
  original does not say how it aligns 5-bit symbols with 3-bit words.
- **Polynomials.** The field polynomial, the code roots, and both PRBS polynomials
  are standard choices. They are not taken from the original.
- **Decoder algorithm.** Syndromes, Berlekamp–Massey with erasures, Chien search and
  Forney are this design's choice. The original gives only the code size and the
  decoder's inputs and outputs.
- **Handshakes.** The valid/ready handshake on the encoder and the `sop`/`eop`
  markers are this design's own.
- **Clock rate.** The original reports 50 MHz on its FPGA. No timing analysis was
  made for this RTL.

## Files

The RTL files are in `rtl/`:

| file | content |
|---|---|
| `gf32_pkg.sv` | GF(2^5) types and arithmetic functions |
| `oppm_clkgen.sv` | strobe generator (en3, en4, frame) |
| `prbs15.sv` | PRBS-15 bit/symbol source |
| `rs_encoder.sv`, `rs_decoder.sv` | RS(31,23) codec |
| `bridge_coder.sv`, `bridge_decoder.sv` | symbol ↔ bit-stream bridges |
| `oppm_enc_logic.sv`, `oppm_dec_logic.sv` | combinational OPPM code |
| `oppm_coder.sv`, `oppm_decoder.sv` | serial OPPM coder and decoder |
| `oppm_channel.sv` | loop-back / external path with error injection |
| `rx_prbs_checker.sv`, `sync_counter.sv` | test-link checker and counters |
| `rs_oppm_link.sv`, `oppm_ber_link.sv` | the two links |
| `oppm_rs_top.sv` | top level |

Each file opens with a comment on its function, interface and timing.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`:

- The testbenches compare against models written independently of the RTL. The RS
  reference arithmetic is in the package `tb/tb_gf_pkg.sv`, built from log/exp
  tables.
- Random stimulus comes from `$urandom`.
- Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.
- A watchdog ends a hung simulation with a failure.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/gf32_pkg.sv tb/tb_gf_pkg.sv \
    tb/tb_oppm_rs_top.sv --top-module tb_oppm_rs_top
./obj_dir/Vtb_oppm_rs_top
```

Replace the testbench name to run another one. Sources are found through `-I`.

`tb_oppm_rs_top` runs the whole top at its default parameters. It takes about
21,000 clocks for 33 codewords. The run has these phases:

| codewords | mode | what is checked |
|---|---|---|
| 0–3 | clean | error-free decoding |
| 4–11 | light PRBS noise | corrected errors and erasures |
| 12–15 | external return path | the external path works |
| 16–19 | external erasure flags on three symbols | erasures from the external input |
| 20–23 | heavy noise | decoding fails cleanly and is flagged |
| 24–32 | clean | recovery; the last three sent one at a time in single-codeword mode |

Along the way the testbench checks:

- that the codeword interval is exactly 624 clocks;
- that every decoded codeword equals the transmitted one unless a failure is
  reported;
- that every mechanism (correction, OPPM erasures, external erasures, failures,
  external path, single mode) occurred.

It also runs the bit-error test link. For the first 5,000 clocks the link is clean:
it must lock, count bits and count no errors. Then errors are injected on its
external path, and the error counter must agree in size with the number of flipped
slots.

`tb_rs_decoder` is the most thorough unit test. Over 400 random words it mixes
errors and erasures up to and beyond the 2s + r ≤ 8 limit, and checks the data,
counts and failure flag against the reference.
