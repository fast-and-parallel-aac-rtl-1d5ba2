# Parallel AAC-LC decoder for many broadcast streams

A radio indexing system listens to dozens of Digital Radio Mondiale stations
at once, and every station sends an AAC-compressed audio stream. One
fixed-point AAC decoder core decodes a frame in roughly 11–14 thousand clock
cycles. A 48 kHz stream, however, delivers a new frame only every 21.3 ms. At
tens of MHz, one core is therefore idle most of the time. This design uses
that slack in two ways:

* each core is **time-multiplexed between two streams**, decoding one frame of
  stream 2c, then one of stream 2c+1, and so on;
* the design instantiates **N/2 identical cores**. By default N = 50 streams
  run on 25 cores.

Every stream has its own input FIFO and its own PCM output. A small global
controller decides which stream each core reads and where its PCM goes.

```
 stream 0 ─► FIFO ─┐            ┌─► PCM 0
                   ├─► mux ─► AAC core 0 ─► demux ─┤
 stream 1 ─► FIFO ─┘    ▲            │            └─► PCM 1
                        │ Start      │ Frame Ready
                 global controller ◄─┘   (one per core pair)
 ...
 stream 48/49 ─► FIFOs ─► AAC core 24 ─► PCM 48/49
```

## The top level: `aac_parallel_decoder`

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `enable` | in | lets the global controller start cores |
| `cfg` (`hcb_cfg_t`) | in | loads Huffman codebook entries into every core (see below) |
| `in_word[N]`, `in_last[N]`, `in_valid[N]` / `in_ready[N]` | in/out | compressed ADTS stream per stream: 32-bit words with the first bit in bit 31, `in_last` on the last word of a frame |
| `pcm_out[N]`, `out_valid[N]` | out | decoded PCM per stream: 16-bit values sign-extended to 32 bits, one strobe per sample |
| `core_error[N/2]` | out | the last frame of the core held syntax the core does not decode |
| `ifft_*[N/2]` | out/in | the interface to each core's external IFFT (see "IMDCT") |

Parameters: `N_STREAMS` (50) and `FIFO_DEPTH` (512 words per stream).

Each frame must be word-aligned. Pad it with zeros after the ADTS payload up
to a 32-bit boundary and mark its last word with `in_last`. A stream FIFO
counts complete frames. Core c gets `Start` only while the FIFO of its
*selected* stream holds a whole frame, and it waits with `Start` low
otherwise. After each `Frame Ready` the selection flips to the other stream
of the pair. This alternation is strict: if one stream of a pair stops
delivering frames, the core waits for it, and its partner stream is not
served either. That is the intended behaviour for two live broadcasts. A
stream that must keep going on its own needs a different selection rule.

A FIFO must be able to hold a complete frame, or it deadlocks. AAC limits a
channel to 6144 bits (192 words) per frame, and 512 words hold two such
frames.

## Inside one core: `aac_core`

A core decodes one frame at a time through four stages. The `local_controller`
runs them in order: Do Demux → Do IQ → Do IMDCT → Do Win_OV. It then pulses
`frame_ready` and waits in Do Demux for the next `Start`. The stages hand data
over through on-chip RAMs:

```
stream ─► DEMUX_HUFF ─► SD-RAM (1024×16, quantized lines)
                    └─► SF-RAM (64×8, scale factors)
          IQ_RESC    ─► IQ-RAM (1024×32, spectral coefficients)
          IMDCT ⇄ external IFFT, Re/Im RAMs ─► IMDCT RAM (2048×32)
          WIN_OV (OV RAM 2×1024×32) ─► PCM converter ─► pcm
```

Number format: spectral and time samples are signed 32-bit values with 14
fraction bits, where one PCM LSB is 2^14. Inverse quantization pre-scales by
2^-7, as fixed-point FAAD2 does, so that a loud full-band frame still fits in
32 bits through the IMDCT.

Measured cycle counts per frame (`tb_aac_core`, IFFT latency 20 cycles):

| stage | cycles | what sets it |
|---|---|---|
| DEMUX_HUFF | 1.4k–4.4k | 1 per codeword, 1 per sign bit, 2 per escape, plus header and side info |
| IQ_RESC | ≈4.3k | 4 per line, 5 when interpolating |
| IMDCT | 3,610 | 2 per point pre-twiddle, IFFT latency plus 1 per point post-twiddle, 1 per output sample reorder |
| WIN_OV | 2,050 | 2 per output sample |
| total | 11.1k–11.6k typical, 14.2k for an escape-heavy frame | |

For comparison, the reference figures this design was built against are DEMUX
1,883, IQ 4,257, IMDCT 4,416 and WIN_OV 2,064, for a total of 12,620 cycles.

### What a core decodes

The core decodes AAC Low Complexity ADTS frames that carry **one single
channel element with long windows** (ONLY_LONG_SEQUENCE) at 44.1 or 48 kHz.
It accepts frames with or without a CRC and in both window shapes (sine or
KBD). The core stops at anything else and sets `error`, then skips the rest
of the frame. That covers short windows, start and stop windows, TNS, pulse
data, gain control, prediction, channel pairs, intensity and noise codebooks,
and non-LC profiles. In this respect the design is narrower than a complete
AAC-LC decoder.

### DEMUX_HUFF: bitstream parser, PLA Huffman decoder, controller

**Bitstream parser.** Two 32-bit registers, `Reg_0` and `Reg_1`, feed a
barrel shifter. The shifter always presents the next 21 bits of the stream as
`window`. A length mux chooses between the length of the Huffman codeword
just matched and the width of a fixed field. An accumulator adds that length
to the bit position. When the position passes 32, `Reg_1` moves into `Reg_0`
and the next word is loaded. Up to 21 bits can be consumed per cycle.

**Huffman decoder.** Every codebook is a *parallel match array* (`hcb_pla`).
Each entry compares its codeword with the window at the same time, so one
codeword of any length decodes in one cycle. The entry returns the codeword
length and the already de-grouped tuple {W, X, Y, Z}, which is loaded into
four registers and read out one element per cycle. The 11 spectral books and
the scale-factor book are all present. The escape sequence (N ones, a zero,
then an (N+4)-bit word, value 2^(N+4) + word) uses a leading-ones counter and
a shifter, so it takes two cycles: prefix and word.

**The codebook tables are loaded at run time, not built in.** After reset,
write every entry through `cfg`: `we`, book (1–11 spectral, 12 scale factor),
entry index, the codeword left-aligned in 21 bits, its length, and the value.
For a spectral book the value is four 6-bit two's-complement elements
{W, X, Y, Z}, W in the top bits; pairs use W and X. For the scale-factor book
the value is the index 0..120. An entry with length 0 never matches. The bus
is shared by all cores. To decode real AAC, load the Huffman tables of
ISO/IEC 14496-3. The testbenches instead load a prefix-free code of their own
(`eg_code` in `tb_aac_pkg`) with the standard books' sizes and value ranges,
and encode their frames with it.

**Demux controller.** The controller walks the ADTS header, the optional CRC
and the element ID, then `ics_info`, section data, scale factors and spectral
data, and finally the END element. Section lengths use the escape value 31.
Scale factors are coded as differences from the global gain. Each tuple goes
through decode, element output, sign bits and escapes, in the bit order of
the standard. The sign bits of all non-zero elements come first, then the
escapes. Bands coded with codebook 0 and bands above `max_sfb` are written as
zeros, so SD-RAM always holds 1024 lines.

### IQ_RESC: |q|^(4/3) and 2^(sf/4)

Values below 1026 look up a table of round(q^(4/3)·2^14). The table is
computed in SystemVerilog at elaboration by an integer cube root. Larger
values up to 8191 use the entry at q>>3 and the next one, then interpolate
linearly with the fraction q&7, and multiply by 16 = 8^(4/3).
Rescaling splits the gain 2^((sf−100)/4) into shifts. The integer part is a
left or right shift by sf/4 − 32, where −25 is the offset and −7 the
pre-scale. The fractional part multiplies by one of 1, 2^0.25, 2^0.5 or
2^0.75, taken from a 4-entry POW_ROM in Q28.

### IMDCT with an external IFFT

The 2048-point IMDCT uses a 512-point complex IFFT, the FAAD2 algorithm:

1. **Pre-twiddle.** Read X[2k] and X[N/2−1−2k] and rotate them by the
   twiddle factor. Stream the 512 complex points to the IFFT, one point every
   2 cycles, and pulse `ifft_start` after the last one.
2. **IFFT.** This is an external block. It must accept `ifft_in_valid`
   samples in natural order. Some time after `ifft_start` it streams 512 (64
   if `ifft_short`) results in natural order, with `ifft_out_valid`, one per
   cycle. The transform is unscaled: y[n] = Σ x[k]·e^(+j2πkn/N), with no 1/N.
   Any latency is accepted.
3. **Post-twiddle.** Rotate the results as they arrive, with no buffering
   before it, and write them to the Re/Im RAMs.
4. **Reorder.** Read the rotated points back in the interleaved, partly
   negated order that produces the 2048 time samples, and write them to the
   IMDCT RAM.

Twiddles are Q23, computed with `$cos`/`$sin` at elaboration. The overall
gain equals the textbook sum y[n] = Σ_k X[k]·cos(2π/N·(n + n0)(k + ½)) with
N = 2048 and n0 = 512.5. The datapath also has the 64-point (short-window)
mode, but the demux never produces short-window frames.

`tb/ifft_model.sv` is a behavioural DFT with a settable latency that
satisfies this interface. Use it in simulation; it is not synthesizable.

### WIN_OV: windowing and overlap-add for two streams

Output sample n = z[n]·w_prev(n) + OV[n], and the new OV[n] =
z[1024+n]·w_cur(1023−n). The window is the sine or KBD (α = 4) rising half,
1024 entries each in Q31, computed at elaboration with a Bessel-series I0.
As the standard requires, the previous frame's shape (Win_P) windows the
first half and the current shape (Win_C) the second.

Because a core alternates between two streams, the overlap state belongs to
the stream, not to the core. The OV RAM holds two 1024-sample halves. The
`slot` input, which is the global controller's stream select, chooses the
half, the stored Win_P and a "primed" flag. The flag makes a stream's first
frame overlap with silence instead of with uninitialised RAM.

### PCM converter

The converter rounds away the 14 fraction bits, rounding half away from zero,
and saturates to −32768..32767. It is combinational.

## Following the reference design, and where this design departs

The design follows the reference architecture in several respects:

* the N/2-cores-for-N-streams organisation, the FIFOs and the global
  controller with Start, Frame Ready and OUT Valid;
* the four-module core with a sequential local FSM;
* the Reg_0/Reg_1 barrel-shifter parser with a length mux;
* PLA-style one-cycle Huffman decoding, and two cycles for escapes;
* LUT plus interpolation inverse quantization above 1025, with
  shift-and-POW_ROM rescaling;
* the FFT-based IMDCT around a third-party IFFT, with the post-twiddle
  running as the IFFT streams out;
* WIN_OV with Win_C/Win_P registers and an OV RAM;
* a PCM stage that saturates to 16 bits.

Choices made here, where the reference leaves the detail open:

* Codebook contents are **loadable**, not hard-wired.
* The word widths are SD 16, SF 8 and data 32 bits. The 14 fraction bits and
  the 2^-7 pre-scale follow FAAD2's fixed-point conventions.
* The FIFO depth is 512, and a FIFO counts whole frames.
* Streams are paired 2c and 2c+1, and the selection alternates strictly.
* The overlap state is kept per stream slot inside WIN_OV.
* The module handshakes are start/busy/done.
* `core_error` is added.
* Each sign bit takes one cycle, and each escape takes a prefix cycle and a
  word cycle.

Differences from the reference design:

* Only long-window single-channel frames are decoded. The reference also
  handles short windows, window transitions, TNS and stereo tools.
* The reference overlaps the modules of a core more tightly. Here the four
  stages run strictly one after another, and the cycle counts in the table
  above are what that gives.
* The IFFT is not part of the RTL. Its ports leave each core and the top.

## Simulating

All files are SystemVerilog 2017. Testbenches use `$urandom` and report
`TB_RESULT checks=<n> failures=<n>`. A testbench needs `rtl/aac_pkg.sv` and
`tb/tb_aac_pkg.sv` first, then the RTL and its own helper files:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -Irtl -Itb -y rtl -y tb rtl/aac_pkg.sv tb/tb_aac_pkg.sv \
  tb/ifft_model.sv tb/tb_frame_gen.sv tb/tb_ref_model.sv \
  tb/tb_aac_parallel_decoder.sv --top-module tb_aac_parallel_decoder
./obj_dir/Vtb_aac_parallel_decoder
```

| testbench | what it checks |
|---|---|
| `tb_pcm_converter`, `tb_core_ram`, `tb_stream_fifo` | rounding and saturation; RAM read/write; FIFO order, back-pressure and frame counting |
| `tb_bitstream_parser`, `tb_hcb_pla`, `tb_huffman_decoder` | the window at every bit position and shift; one-cycle matching; tuples, scale factors and escapes for all books |
| `tb_demux_huff` | whole ADTS frames (CRC, section escapes, zero bands, escapes) decoded into SD/SF-RAM, |
| `tb_iq_resc` | every coefficient against \|q\|^(4/3)·2^((sf−100)/4), and the exact cycle count |
| `tb_imdct` | the 2048 outputs against a floating-point IMDCT sum (needs `ifft_model`) |
| `tb_win_ov` | windowing and overlap for both shapes, shape changes and both slots |
| `tb_local_controller`, `tb_global_controller` | stage sequencing; stream alternation, start gating and output routing |
| `tb_aac_core` | four frames end to end against a floating-point decoder (`tb_ref_model`) |
| `tb_aac_parallel_decoder` | 50 streams on 25 cores at default size, all PCM against the float decoder (≤ 2 LSB) |

`tb_aac_parallel_decoder` counts each mechanism and fails if any count is
zero:

* stream switches;
* start stalls, from a stream that starts late;
* escape decoding;
* CRC frames;
* both window shapes;
* interpolated inverse quantization;
* PCM saturation;
* FIFO back-pressure, from a stream that sends six frames without pause.

It runs in about half a minute of simulation after compiling. The floating
point reference in `tb_ref_model` evaluates the IMDCT as a direct sum, and
agrees with the RTL to within 1 LSB.

## Changing the design

* **Number of streams:** `N_STREAMS` must be even.
* **FIFO size:** `FIFO_DEPTH` must hold at least one maximum-size frame
  (192 words).
* **Real AAC tables:** load them through `cfg`. For the scale-factor book,
  `len` goes up to 19 bits and the window is 21 bits wide. Spectral tuple
  elements must fit 6 bits signed. The escape book 11 stores 16 for an
  escaped element.
* **Other sampling rates:** replace `swb_offset_long` in `aac_pkg`. It
  currently holds the 44.1/48 kHz long-window band table.
