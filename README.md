# Two-stage test data decompressor: 2^n PRL + bitmask dictionary

Scan test sets are large, yet most of their bits are fill. This design is the
on-chip half of a two-stage compression scheme that shrinks the data a tester
must store and send. Off-line, the test slices are first coded against a small
dictionary: a slice is sent as a dictionary index, as an index plus one or two
small bitmasks that patch the dictionary entry, or uncompressed. That
bit stream is then cut into 8-bit segments and coded again with 2^n pattern
run-length (PRL) code words, which replace runs of repeated or inverted segments
and segments made of a repeated pattern by short code words.

On chip the two codes are undone in the reverse order. The tester sends one
compressed bit per cycle. The decompressor rebuilds 16-bit slices, one bit for
each of 16 scan chains, and shifts them into the circuit under test.

The scheme follows the published method "Test Data Compression Using a Hybrid
of Bitmask Dictionary and 2^n Pattern Runlength Coding Methods". The method
fixes the two codes, their order, the 8-bit PRL segment and the XOR of a
dictionary entry with a composed bitmask. Many details are not fixed by it:
field widths, the exception code, mask sizes, dictionary depth, interfaces and
timing. These are choices made for this RTL, listed in
[Design choices](#design-choices-not-fixed-by-the-method).

```
 tester                                                            scan chains
 ate_bit ──► prl_decoder ──► seg_serializer ──► bm_decoder ──► cgu ──► scan_in[15:0]
 (1 bit/cyc)  8-bit segments    bit stream        │   ▲ XOR      │      scan_shift
                                                  ▼   │          │      scan_capture
 dict_we/waddr/wdata ─────────────────────────►  dict_mem        └─ clears the decoders on start
```

Every arrow is a valid/ready stream, so any stage can stall the one before it.
When a stage stalls, the tester sees `ate_ready` low.

## Stage 1: 2^n PRL decoding (`prl_decoder`)

The decoder keeps a **reference segment** (8 bits, zero after reset and on every
start). Every code word starts with a sign bit `S` and a 3-bit two's-complement
exponent `E`. All fields are sent MSB first.

| E | kind | payload | segments produced | new reference |
|---|------|---------|-------------------|---------------|
| 0..3 | external, n = E | none | 2^E segments, each `ref` (S=0) or `~ref` (S=1) | `ref` or `~ref` |
| -1, -2, -3 | internal, n = E | pattern p of 8/2^\|E\| bits | one segment of 2^\|E\| copies of p | that segment |
| -4 | exception | 8 raw bits | the raw segment | that segment |

In an internal code word with S=1, the copies alternate between p and ~p, and
the first copy is in the most significant place. Examples, with the bits in the
order they are sent:

* `0 111 1011` (E=-1, p=1011) → segment `1011_1011`
* `1 101 1` (E=-3, S=1, p=1) → segment `1010_1010`
* `1 010` (E=2, S=1) → four segments `~ref`; afterwards `ref := ~ref`
* `0 100 xxxxxxxx` is an exception carrying the raw segment `xxxxxxxx`

In an external run with S=1, every segment is the inverse of the *old*
reference. The reference flips once, at the end of the run. So a later S=0
run repeats the inverted segment.

Timing: the decoder takes one code-word bit per cycle. From the cycle after the
last bit it offers its segment(s), one per cycle. It takes no input while it
offers segments.

## Between the stages (`seg_serializer`)

Bitmask code words are not aligned to segments, so the segments are turned
back into the serial stream they were cut from, MSB first. The next segment is
loaded in the cycle the last bit of the current one leaves. With a steady
supply there is no bubble. The compressor pads the last segment with zeros.
Those bits reach the second stage after the last slice and are never used.

## Stage 2: bitmask-dictionary decoding (`bm_decoder`, `mask_compose`, `dict_mem`)

One code word gives one 16-bit slice:

```
1  <16 raw bits>                                   uncompressed slice
01 <index:4>                                       dict[index]
00 <n-1:1> { <type:1> <location> <pattern> } x n <index:4>
                                                   dict[index] XOR (mask_1 | ... | mask_n)
```

Two kinds of mask exist:

| type | name | location | pattern | placement |
|------|------|----------|---------|-----------|
| 0 | sliding | 4 bits (any bit) | 2 bits | pattern bit 0 on bit `location`; bits past bit 15 are dropped |
| 1 | fixed | 2 bits (nibble number) | 4 bits | bits `[4*location+3 : 4*location]` |

A sliding mask costs 7 bits and fixes up to two adjacent bits anywhere. A fixed
mask costs 7 bits too and fixes any change inside one aligned nibble.
`mask_compose` places one mask. The decoder ORs each mask into an accumulator as
soon as the mask's pattern arrives. So when the last index bit arrives, only the
combinational dictionary read and one XOR are left. The slice is offered in the
next cycle.

Code-word lengths at the default sizes: 17 bits uncompressed, 6 bits for a
direct match, 3 + 7n + 4 bits with n masks (14 or 21 bits).

The dictionary is a 16 x 16-bit register file. The tester writes it
through `dict_we/dict_waddr/dict_wdata` before a run. Its contents are not reset.

## Scan control (`cgu`)

The control and generation unit shifts each slice into the chains:
`scan_in` carries it and `scan_shift` is high. After `chain_len` shifts it holds
`scan_capture` high for one cycle and takes no slice. After `num_vectors`
vectors it raises `done`. A `start` pulse, given while it is idle or done,
clears the three decoder stages for one cycle, including the PRL reference, and
begins a run. `chain_len` and `num_vectors` must be at least 1 and must stay
constant during a run.

A test set of V vectors on C scan cells is spread over the 16 chains. That gives
`chain_len = ceil(C/16)`. Shorter chains are padded, with fill chosen by the
compressor.

## Using the top (`tdc_decompressor`)

1. Reset (`rst_n` low, asynchronous).
2. Write the 16 dictionary entries, one per cycle.
3. Set `chain_len` and `num_vectors`, and pulse `start` for one cycle.
4. Send the compressed stream on `ate_bit/ate_valid`. A bit is taken in each
   cycle where `ate_ready` is high.
5. Wait for `done`. Bits still unsent at that point are padding.

Throughput is at most one compressed bit per cycle. The tester is stalled
in these cases:
* while the PRL stage offers its segments (one cycle per segment);
* for one cycle per slice while the bitmask stage offers it, once the serializer
  runs full;
* while the scan side captures.

The test bench bounds the cycles of a full-rate run between the number of
compressed bits and that number plus one cycle for each segment, slice and
capture.

| parameter | default | meaning |
|-----------|---------|---------|
| `L` | 8 | PRL segment length (power of two) |
| `K` | 3 | PRL exponent width (must satisfy 2^(K-1) > log2 L) |
| `W` | 16 | slice width = number of scan chains = dictionary word |
| `DEPTH` | 16 | dictionary entries |
| `SMW`, `FMW` | 2, 4 | sliding and fixed mask widths (`W` a multiple of `FMW`) |
| `CW` | 16 | width of `chain_len` and `num_vectors` |

The defaults live in `rtl/tdc_pkg.sv`. All modules take them from there, and
the enum types of the state machines are declared there as well. The method
also reports 8-bit dictionary words: set `W=8` (with `FMW=4` the fixed mask
then has one location bit).

## Design choices not fixed by the method

* 16-bit slices, taken from the better of the two dictionary widths (8 and
  16 bits) reported for the method.
* `K=3`, `E=-4` as the exception code, and alternating inversion inside an
  internal S=1 segment.
* A zero initial PRL reference.
* A 16-entry dictionary, a 1-bit mask-count field (one or two masks), 2-bit
  sliding and 4-bit fixed masks, and location numbering from the least
  significant bit.
* Serial tester interface, valid/ready streams, a dictionary write port, a
  single capture cycle per vector, and start/done control.
* MSB-first order of every field.

If a compressor uses other field widths or conventions, its output will not
decode correctly. The encoders in `tb/tb_codec_pkg.sv` define the format
exactly.

## Not included

* The compressor: dictionary and bitmask selection, and PRL encoding. It is an
  off-line program, not hardware. `tb/tb_codec_pkg.sv` holds simple greedy
  encoders for the same formats. They only make stimulus. They do not select
  dictionaries or fill don't-care bits.
* Response compaction on the scan outputs, the tester, and the circuit under
  test.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_prl_decoder` | 600 structured segments encoded and decoded, at full rate and under random stalls. It checks the exact cycle count (one per bit plus one per segment) and that every code-word kind occurs |
| `tb_seg_serializer` | bit order, no bubble between segments, stalls, clear |
| `tb_mask_compose` | exhaustive: both types, all locations and patterns |
| `tb_dict_mem` | write/read-back and partial rewrites |
| `tb_bm_decoder` | 500 random code words of every kind against a model dictionary, with the exact cycle count at full rate, then stalls |
| `tb_cgu` | shift data, exact capture placement, clear on start, done, two runs |
| `tb_tdc_decompressor` | end to end at the default parameters, five test sets, see below |
| `tb_tdc_decompressor_w8` | the same end-to-end test with `W=8` (8 chains, 8-bit dictionary words) |

The end-to-end test runs five test sets sized like the ISCAS'89 sets s5378
(214 cells x 97 vectors), s9234 (247 x 105), s13207 (700 x 233), s15850
(611 x 94) and s35932 (1763 x 12). That is 18,288 slices in all, checked on
the scan pins. The slice contents are synthetic, because the real test cubes
are not part of this design. The compression the testbench reports is
therefore no measure of the method: random slices compress poorly.
Every code-word kind, both mask types, external runs longer than one segment,
capture cycles, tester backpressure and restarts occur, and the testbench
counts them.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tdc_pkg.sv tb/tb_codec_pkg.sv tb/tb_tdc_decompressor.sv \
    --top-module tb_tdc_decompressor -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `tb_codec_pkg.sv` is only needed by
the testbenches that import it. The full end-to-end run takes a few seconds.
