# Re-timing and cleaning video at the receiver of an optical/electrical link

A board-level video link can send its wide, fast data over an optical channel
(driver, VCSEL, waveguide, photodiode, receiver) and keep its slow clock and
control signals (line and field timing) on ordinary copper. That saves optical
channels and a clock-and-data-recovery circuit, but the two paths no longer
arrive together: the optical path adds conversion and transmission latency, and
the E/O and O/E conversions add background noise and flicker to the picture.

This RTL is the receiver-side *synchronization block* of such a link. It

1. **measures** how many clocks the optical data lags the electrical control
   (the *signal comparator*),
2. **buffers** the optical byte stream in a 4-line memory at a position set by
   that delay, so that it comes out aligned to the electrical timing without
   delaying the electrical signals themselves (*delay control*), and
3. **cleans** each 4x4 block of the picture while it sits in the buffer:
   2D DCT, a coefficient threshold against scattered noise, a Haar
   threshold across consecutive blocks against flicker, 2D IDCT, and write-back
   (*noise reduction*), in an 8-clock pipeline.

The architecture (comparator plus delay-and-process block, a 6,864-byte
buffer, 4x4 separable DCT computed row then column, the 8-clock schedule, the
16/32/48-bit datapath of the 1D DCT and IDCT) follows J. Sangirov et al.,
"Signal Synchronization Using a Flicker Reduction and Denoising Algorithm for
Video-Signal Optical Interconnect", ETRI Journal, 2012. That article gives the
structure and widths but not every rule; the choices made here to fill the
gaps are listed in [Departures and interpretations](#departures-and-interpretations).

```
                     electrical link: clk, e_hs, e_field ───────────────┐
                                                                        │
 optical link ── opt_data ─┬─► signal_comparator ── delay_amount ──┐    │
                           │     (656 field bit vs e_field)        ▼    ▼
                           └────────────────────────────────► delay_process ──► vid_out, out_hs, out_field
                                                               block_buffer (4 lines)
                                                               dct2d → coef_threshold → haar_deflicker → idct2d
```

## Measuring the optical latency

The stream is taken to be ITU-R 601 4:2:2 video in the ITU-R 656 byte format
(what the camera's video decoder produces): 1716 bytes per line of a 525-line
frame at 27 MHz, each line starting with an end-of-active-video code
`FF 00 00 XY` and carrying a start-of-active-video code before the 1440 active
bytes. Bit 6 of `XY` is the field bit F.

`signal_comparator` watches two things: the electrical field level `e_field`,
and the F bit of every timing code in the optical stream. A change of
`e_field` starts a counter; the first timing code whose F differs from the
previous one stops it. The code is recognised on its fourth byte, so the delay
is `count - 3`. This relies on one convention at the transmitter: it changes
`e_field` in the same clock in which it sends the first byte (`FF`) of the
first timing code of the new field. A measurement is made at every field, so
the delay tracks slow drift. If no field change is seen within
`MAX_DELAY + 3` clocks, `delay_over` is raised and `MAX_DELAY` is reported.
The delay must be zero or positive (the optical path is the slower one).

## Re-timing without delaying the control signals

This is the central idea of the design. The receiver keeps a position counter
driven by the electrical timing: column 0..1715 (reset by `e_hs`) and row 0..3
(the line number modulo 4). Call the current position *E*. The byte that
arrives on the optical link at the same moment was sent when the electrical
link showed *E − D*, where *D* is the measured delay. So:

* the incoming byte is **written** at ring position *E − D*;
* the outgoing byte is **read** at ring position *E* (registered, one clock).

The ring is the 4-line buffer (4 × 1716 = 6,864 bytes). The slot read at *E*
was written 4·1716 − *D* clocks earlier and will be overwritten *D* clocks
later. Every byte therefore leaves exactly four lines (plus the one-clock read
register) after the electrical control that belongs to it, whatever *D* is.
The line and field signals only pass one alignment flip-flop
(`out_hs`, `out_field`); the line they mark is the electrical line n+4 when
`vid_out` carries line n. The buffer that holds the picture for processing is
the only delay element.

In the latency budget of the link (optical: transmission, E/O and O/E
conversion, buffering, processing; electrical: transmission only), the
buffering and processing of this receiver thus add a fixed four lines
(254.2 µs at 27 MHz) to the data and nothing to the control signals; *D*
absorbs everything else.

The subtraction *E − D* borrows one row when it crosses the start of a line,
so *D* may be up to nearly a line. The hard limit comes from the processing:
a block must be written back before its first row is read out (see below),
which allows *D* ≤ line length − 12; `MAX_DELAY` is set to line length − 16
(1700 clocks, 63 µs at 27 MHz).

## The 4-line buffer and the block schedule

`block_buffer` stores the 4 lines as 429 words of 16 bytes. Word *e* is the
4x4 block of columns 4e..4e+3 of the four lines; byte lane = row·4 + column.
This lets one clock read or write a whole block. The memory has four ports,
all usable in the same clock:

| port        | width   | used for                                   |
|-------------|---------|--------------------------------------------|
| byte write  | 8 bit   | the optical stream, one byte per clock     |
| byte read   | 8 bit   | the output stream, registered              |
| block read  | 128 bit | a completed block into the pipeline        |
| block write | 128 bit | the processed block back to its place      |

Reads return the contents before a same-clock write; a byte write wins over a
block write on the same byte.

When the byte at row 3, column 4e+3 is written, block *e* of the current band
of four lines is complete. If it lies in the active picture
(column ≥ `ACTIVE_START` = 276, i.e. after the timing codes and horizontal
blanking), it enters the pipeline:

| clock | stage      | module            |
|-------|------------|-------------------|
| 1     | read       | `block_buffer` block port |
| 2     | DCT rows   | `dct2d` (first pass)      |
| 3     | DCT columns| `dct2d` (second pass)     |
| 4     | Haar transform, with both thresholds | `coef_threshold` + `haar_deflicker` |
| 5     | reverse Haar | `haar_deflicker`        |
| 6     | IDCT rows  | `idct2d` (first pass)     |
| 7     | IDCT columns | `idct2d` (second pass)  |
| 8     | write back | `block_buffer` block port |

`blk_start` is high in clock 1 and `blk_done` in clock 8, seven clocks apart.
The block is written back 8 clocks after its last byte arrived, long before
the output reaches its first row (about one line later, minus *D*). Blocks in
the blanking interval are never touched, so the timing codes leave the
receiver unchanged. Blocks complete at most one every four clocks while the
pipeline accepts one per clock, so it never stalls and needs no handshake.

The bands of four lines are counted from reset and run on across field
boundaries; a band may straddle the vertical blanking.

## Arithmetic

All transform data is signed 16-bit. An 8-bit sample enters as
`{4'b0, pixel, 4'b0}`, i.e. with 4 fraction bits. Cosines and weights are
signed 16-bit with 14 fraction bits. The transform is the orthonormal 4-point
DCT-II:

```
y[k] = w[k] · Σn c[k][n] · x[n]        c[k][n] = cos((2n+1)kπ/8)
x[n] = Σk c[k][n] · w[k] · y[k]        w[0] = 1/2,  w[k>0] = 1/√2
```

`dct1d` computes one `y[k]`: four 16×16 products (32 bit), their 32-bit sum,
a 32×16 product with `w[k]` (48 bit), and a rounding stage. `idct1d` computes
one `x[n]` from four 16×16×16 products (48 bit) and their 48-bit sum, then
rounds. Rounding adds 2^27, shifts right by 28 (the fraction bits that the two
Q1.14 factors add) and saturates to 16 bits, so every intermediate result keeps
the 4 fraction bits. A pass (`dct4_pass`) holds 16 of these units and
transforms all rows, or all columns, of a block in one clock.

Accuracy: each unit stays within 2 LSB (1/8 of a pixel step) of the ideal
real-valued transform, and with both thresholds off a block goes through DCT
and IDCT and comes back bit-exact after the final rounding to 8 bits
(`round(x/16)`, clamped to 0..255).

## Denoising and deflickering

**Denoising** (`coef_threshold`): every AC coefficient whose magnitude is below
`cfg.dn_thr` is cleared; the DC coefficient always passes. Scattered noise
spreads into many small coefficients, while edges and texture give large ones.

**Deflickering** (`haar_deflicker`): each coefficient *a* of the current block
is paired with the same coefficient *b* of the block processed just before it.
Clock 4 forms the integer Haar pair `s = floor((a+b)/2)`, `d = a − s`, and
clears *d* when `|d| < cfg.fl_thr`; clock 5 applies the reverse transform
`a' = s + d`. A kept *d* reproduces *a* exactly; a cleared one replaces it by
the average of the two blocks. Small block-to-block fluctuations are thus
flattened while real changes pass. The pairing restarts at the first active
block of every band (that block and the first block after reset pass
unchanged).

The three operating modes of the link map to `cfg`: no processing (both
enables off: the picture passes unchanged, only delayed), denoising only
(`dn_en`), denoising and deflickering (`dn_en`, `fl_en`). Threshold values are
run-time inputs; no particular values are prescribed. The testbenches use 40
and 48 (2.5 and 3 pixel steps in the 4-fraction-bit format).

## Interface of `sync_rx_top`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1  | byte clock from the electrical link (27 MHz) |
| `rst_n`       | in  | 1  | asynchronous active-low reset of the control state |
| `opt_data`    | in  | 8  | byte stream from the optical receiver, one byte per clock |
| `e_hs`        | in  | 1  | electrical line start, high in column 0 |
| `e_field`     | in  | 1  | electrical field level |
| `cfg`         | in  | `nr_cfg_t` | `dn_en`, `dn_thr`, `fl_en`, `fl_thr` |
| `vid_out`     | out | 8  | re-timed, cleaned stream for the video encoder |
| `out_hs`, `out_field` | out | 1 | `e_hs`, `e_field` one clock later, aligned with `vid_out` |
| `delay_amount`| out | 11 | measured latency in clocks |
| `delay_valid` | out | 1  | at least one measurement completed |
| `delay_over`  | out | 1  | latency above `MAX_DELAY` |
| `opt_field`   | out | 1  | field bit recovered from the optical stream |
| `blk_start`, `blk_done` | out | 1 | block enters / leaves the pipeline |

Parameters: `LINE_BYTES` (1716), `ACTIVE_START` (276) and `MAX_DELAY`
(`LINE_BYTES − 16`). `LINE_BYTES` and `ACTIVE_START` must be multiples of 4.
Data registers are not reset; after reset the first measured field sets the
delay. Until then the delay is taken as 0, and the first output line may hold
a few wrong bytes.

Size at the defaults: 54,912 bits of buffer (written as a register array, so
an FPGA needs multi-ported RAM or banking), about 2,100 flip-flops, and
64 1D transform units (16 in each of the four passes).

## Departures and interpretations

The source describes the structure and widths; the following are this
design's own readings where it is silent or ambiguous:

* **Field detection** uses the ITU-R 656 timing codes inside the stream, with
  the transmitter convention described above. The source only says that the
  start of the field is captured on the optical side and compared with the
  electrical control signal.
* **Buffer geometry**: the 6,864-byte buffer is read as four lines of 1716
  bytes, which also matches the 0.2542 ms buffering time stated for 4x4 blocks.
  Its organisation into 16-byte words and its four ports are this design's own.
* **What a pixel is**: every byte is one sample, so Cb, Y and Cr share a 4x4
  block. This keeps the buffer at four lines; separating the components would
  need a wider buffer. Only the active picture is processed.
* **Haar pairing**: the source applies a "temporal" Haar step in clocks 4 and 5
  but has no frame memory. Here the partner is the previous block in time,
  which is the horizontally neighbouring block of the same band. A true
  frame-to-frame pairing would need a frame of coefficient storage.
* **Rounding**: the source speaks of keeping "the most significant 16 bits" of
  the 48-bit result. Literally that would discard integer precision, so here
  the 28 fraction bits are dropped with round-to-nearest and the rest is
  saturated.
* **Thresholds**: hard thresholds, DC spared in the denoiser, values supplied
  at run time.
* **Output timing**: output is exactly four lines plus one clock behind the
  electrical timing.

Not part of this RTL: the transmitter FPGA, the optical components, the video
decoder and the encoder. The testbenches model the transmitter side with
`tb/video_tx_model.sv` and the optical link as a plain delay.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_dct1d`, `tb_idct1d` | exact fixed-point result and ≤ 2 LSB from the ideal transform; round trip |
| `tb_dct2d`, `tb_idct2d` | back-to-back random blocks, exact result, 2-clock latency; `tb_dct2d` also compares the row pass and the 2D result with the ideal DCT (largest error about 0.08 pixel step) |
| `tb_coef_threshold` | clearing rule at and around the threshold, DC kept, disabled = pass |
| `tb_haar_deflicker` | pairing, restart flag, 2-clock latency, smoothing happens |
| `tb_block_buffer` | random traffic on all four ports against a shadow model |
| `tb_signal_comparator` | delays 0, 5, 17, 60 (= max) and 70 (over range) |
| `tb_delay_process` | 64-byte lines: processed, denoise-only and pass-through instances, every output byte against a reference, 7-clock start-to-done |
| `tb_sync_rx_top` | whole receiver on 64-byte lines over three frames: delay measured every field, every byte checked, pass-through mode, over-range delay |
| `tb_sync_rx_top_full` | the top at its default parameters: one full 525-line frame plus 8 lines (about 915,000 clocks), every output byte checked against the reference |

The references in `tb/tb_ref_pkg.sv` derive the cosines from `$cos` and
compute in 64-bit integers, separately from the RTL. The end-to-end benches
count each mechanism (delay measurements, processed blocks, cleared
coefficients, cleared Haar details, blanking bytes passed through) and fail if
one never occurred.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vsync_pkg.sv tb/tb_ref_pkg.sv -y rtl -y tb +libext+.sv \
    tb/tb_sync_rx_top.sv --top-module tb_sync_rx_top --Mdir obj
./obj/Vtb_sync_rx_top
```

The full-size bench runs in about ten seconds. Uninitialised state can be
randomised with `+verilator+rand+reset+2`; the benches pass that way.

## Files

* `rtl/vsync_pkg.sv`: widths, number formats, cosine/weight tables, block
  types, rounding helpers, `nr_cfg_t`.
* `rtl/dct1d.sv`, `rtl/idct1d.sv`: the 1D transform units.
* `rtl/dct4_pass.sv`: 16 units transforming all rows or all columns in one clock.
* `rtl/dct2d.sv`, `rtl/idct2d.sv`: two passes each.
* `rtl/coef_threshold.sv`, `rtl/haar_deflicker.sv`: noise and flicker stages.
* `rtl/block_buffer.sv`: the 4-line, four-port buffer.
* `rtl/delay_process.sv`: position counters, delay control, block launch,
  pipeline.
* `rtl/signal_comparator.sv`: latency measurement.
* `rtl/sync_rx_top.sv`: the receiver.
* `tb/`: testbenches, `tb_ref_pkg.sv` (reference models) and
  `video_tx_model.sv` (656-style source with electrical timing).
