# Video phone core: call control and JPEG still-image codec

This is the digital core of a desktop video phone in the ITU-T H.324 style. Voice and
pictures share one ordinary telephone line through a V.34 modem. Most of such a phone is bought
parts: a CCD front end, a DSP for the G.723 audio codec, microcontrollers for the protocols,
memories, the modem and the LCD. Two pieces are logic in their own right, and this RTL
provides both:

* **the call controller**, a twelve-state machine. It decides, call by call, whether the
  phone acts as a phone or as an answering machine, and whether pictures are sent, received,
  shown and recorded;
* **the still-image path** of the video unit. A baseline-JPEG style transform codec works on
  8x8 pixel blocks: level shift, forward DCT and quantization on the sending side, and
  dequantization, inverse DCT, clamping and level shift on the receiving side.

The two pieces sit side by side in `videophone_top`, as the main controller and the video
unit do in the phone's block diagram. The call controller's outputs are the enables that the
rest of the phone (answering machine, camera capture, display, recorder) acts on. Those
parts are outside this core, so the outputs are brought out as ports.

## Module map

```
videophone_top
 |- videophone_fsm            call controller (package videophone_pkg: states, outputs)
 |- jpeg_encoder              pixels -> quantized coefficients
 |   |- dct8x8 (INVERSE=0)    2-D forward DCT
 |   |- quantizer             divide by table entry, round
 |   '- quant_table           64-entry loadable table
 '- jpeg_decoder              quantized coefficients -> pixels
     |- dequantizer           multiply by table entry, saturate
     |- quant_table
     '- dct8x8 (INVERSE=1)    2-D inverse DCT
jpeg_pkg                      DCT kernel, default table, widths
```

## The call controller (`videophone_fsm`)

Inputs: `an` (the user answers), `imo` (the user presses the button to send a picture),
`imi` (a picture is coming in) and `hang_up`. Outputs: `audio_rec`, `video_rec`,
`image_send` and `image_display`. It is a Moore machine with an asynchronous active-high
reset to IDLE. The outputs come from the state register alone.

| state | next state | audio_rec | video_rec | image_send | image_display |
|---|---|---|---|---|---|
| IDLE | `an` ? RESPOND : ANS_MACHINE | 0 | 0 | 0 | 0 |
| RESPOND | `imo` ? IMAGEOUT_ON : IMAGEOUT_OFF | 0 | 0 | 0 | 0 |
| IMAGEOUT_ON | `imi` ? IMAGEIN_ON : IMAGEIN_OFF | 0 | 0 | 1 | 1 |
| IMAGEOUT_OFF | `imi` ? IOOIN_ON : IOOIN_OFF | 0 | 0 | 0 | 0 |
| IMAGEIN_ON | `hang_up` ? HANGUP : stay | 0 | 1 | 0 | 1 |
| IMAGEIN_OFF * | `hang_up` ? HANGUP : stay | 0 | 0 | 0 | 0 |
| IOOIN_ON | `hang_up` ? HANGUP : stay | 0 | 1 | 0 | 1 |
| IOOIN_OFF | `hang_up` ? HANGUP : stay | 0 | 0 | 0 | 0 |
| ANS_MACHINE * | `imi` ? ANSIN_ON : ANSIN_OFF | 1 | 0 | 0 | 0 |
| ANSIN_ON * | `hang_up` ? HANGUP : stay | 1 | 1 | 0 | 1 |
| ANSIN_OFF | `hang_up` ? HANGUP : stay | 1 | 0 | 0 | 0 |
| HANGUP | IDLE | 0 | 0 | 0 | 0 |

Some points of this machine are easy to misread:

* IDLE does not wait for a ring. Each clock it goes either to RESPOND or to the answering
  machine, according to `an`. A system that must wait for a ring holds the machine in
  reset, or in IDLE by other means, until the phone rings.
* `image_send` is high only during the single IMAGEOUT_ON state: one pulse per call that
  triggers capture and sending. After it, the conversation states show and record what
  comes in, but they do not keep sending.
* Rows marked * are this design's own reading:
  * The outputs of IMAGEIN_OFF follow the pattern of IOOIN_OFF.
  * ANSIN_ON records audio and the incoming picture and shows it, because an incoming
    picture is to be processed, displayed and saved.
  * The original state table sends ANS_MACHINE to HANGUP when a picture arrives and to
    ANSIN_ON when none does. ANSIN_OFF then cannot be reached. This RTL instead follows the
    operation flow chart, in which the answering machine checks for an incoming picture
    and goes on to picture processing.

## The still-image codec

### Data format and handshakes

All streams carry one value per transfer with a `valid`/`ready` handshake. A value moves
on a rising edge where both are high. A block is 64 values in raster order (row 0 first,
left to right). Each output stream marks the 64th value with a `*_last` signal. Pixels are
8-bit unsigned. Coefficients are signed 12-bit. Coefficients stay in raster order: the
zig-zag scan belongs to entropy coding, which this core does not contain (see *Limits*).

### The 2-D DCT engine (`dct8x8`)

This is the most involved block. One module does both directions. The 8-point DCT matrix is

    A[u][x] = 0.5 * C(u) * cos((2x+1) u pi / 16),   C(0) = 1/sqrt(2), C(u>0) = 1

and the 2-D transform of a block X is `A X A^T` (forward) or `A^T X A` (inverse). The engine
applies a kernel K (K = A forward, K = A^T inverse) in two passes:

    rows:    T[r][k] = sum_j X[r][j] * K[k][j]
    columns: Y[k][c] = sum_j K[k][j] * T[j][c]

A single datapath of eight multipliers and an adder tree produces one output of a pass
per clock. In the row pass it reads row `r` of the input buffer; in the column pass it
reads column `c` of the intermediate buffer, so no separate transpose step is needed. The
engine runs in four phases of 64 clocks: LOAD (accept inputs, `in_ready` high), ROW, COL, and
OUT (`out_valid` high, waits on `out_ready`).

Fixed point:

* The kernel entries are integers scaled by 2^14 (`COEF_FRAC`). All 64 are generated at
  elaboration from nine stored cosines, `round(2^13 cos(k pi/16))` for k = 0..8, by the
  cosine's symmetries (`jpeg_pkg::dct_a`).
* The intermediate T keeps 4 fraction bits (`MID_FRAC`) in 20 bits (`MID_W`).
* Both passes round to nearest (add half, then arithmetic shift). The final result
  saturates to `OUT_W` bits.

Against a floating-point evaluation of the DCT definition, the results are never off by
more than one.

Timing: a block takes 256 clocks when nothing waits. The first output is available 129
clocks after the clock edge that takes the last input. The engine does not overlap blocks;
a pixel stream therefore runs at one pixel per four clocks on average.

### Quantizer, dequantizer and tables

* `quantizer`: `Sq = sign(S) * floor((|S| + floor(Q/2)) / Q)`, i.e. division rounded to
  nearest with halves away from zero, by a combinational divider. It has a one-entry output
  register, one clock of latency and full rate when `out_ready` stays high.
* `dequantizer`: `R = Sq * Q`, saturated to 12 bits, with the same register and timing.
* `quant_table`: 64 8-bit entries, in raster order like the coefficients. Reset loads the
  JPEG standard luminance table (T.81 Annex K, Table K.1). A write port replaces one entry
  per clock, and a written 0 is stored as 1. The encoder and the decoder each own a table,
  loaded through `enc_qt_*` and `dec_qt_*`. To decode correctly, both must hold the same
  values.

The encoder subtracts 128 from each pixel before the forward DCT (an XOR of the top bit).
The decoder clamps the inverse DCT's result to -128..127 and adds 128 back.

Latency: 130 clocks from the last pixel taken to the first coefficient out of the
encoder, and 130 clocks from the last coefficient into the decoder to its first pixel.

### Loopback

`videophone_top` has a `loopback` input. When it is high, the encoder's output feeds the
decoder directly. A picture then goes through compression and restoration
with no entropy coding, which shows what the quantization costs. In this mode the
external coefficient ports are idle (`coef_out_valid` and `coef_in_ready` are low). When
`loopback` is low, coefficients leave at `coef_out_*` (toward the multiplexer and modem)
and received ones enter at `coef_in_*`. Change `loopback` only while both paths are idle.

## Sizes

At the phone's 320x240 camera resolution a picture is 1200 blocks, which is 307,200
clocks per picture through the encoder. The encoder and decoder overlap in loopback, so
compressing and restoring a picture takes about the same number of clocks. Moving video at up to 30 frames per second is
the job of the H.263 codec, not of this still-image path. If this path were asked to keep
pace, it would need a clock of at least 9.2 MHz. Frame storage is external: the core
holds only the blocks in flight.

## Limits and departures

* **Entropy coding is not built.** There is no Huffman encoder or decoder, and no zig-zag
  ordering. The original defines no code tables, and its own compression example also
  stops before entropy coding.
* The DCT architecture, the fixed-point formats, the rounding rules, the saturation, the
  handshakes, the default quantization table and the loopback switch are this design's
  choices. The original gives only the chain of functions.
* The three state-machine points marked * above are interpretations.
* Parts the phone buys rather than designs have no RTL:
  * the CCD front end and its ADC;
  * the audio DSP and the G.723, H.263, H.245 and H.223 protocol processing;
  * the microcontrollers, the memories, the modem (V.34, V.8), the A/D and D/A
    converters, the camera, the LCD, and the video and audio controllers.

## Simulating

Every testbench in `tb/` checks itself. It ends with a line `TB_RESULT checks=N failures=M`
and has a watchdog. The float reference models are in `tb/tb_jpeg_ref_pkg.sv`. Example,
the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_videophone_top \
  -y rtl -Irtl rtl/jpeg_pkg.sv rtl/videophone_pkg.sv \
  tb/tb_jpeg_ref_pkg.sv tb/tb_videophone_top.sv -o sim
./obj_dir/sim
```

Testbenches:

* `tb_videophone_fsm`: compares the FSM against an independent model on every clock, over
  directed calls and 3000 random clocks; all 12 states must be reached.
* `tb_dct8x8`: both directions against the DCT definition; checks the 129-clock latency
  and `out_last`.
* `tb_quantizer`, `tb_dequantizer`, `tb_quant_table`: integer references, random
  back-pressure, table rewrites and the full-rate timing.
* `tb_jpeg_encoder`, `tb_jpeg_decoder`: whole paths against float references, with
  130-clock latency checks and table reloads.
* `tb_videophone_top`: every call scenario; then blocks in external mode, where the
  coefficients are checked and fed back; then in loopback, where the output must match
  exactly; then again with new tables. It counts every mechanism (each call state, stalls
  at each port, both modes, table loads, clamping at 0 and 255) and fails if one never
  happens.
* `tb_image_320x240`: a generated 320x240 picture (1200 blocks) through the loopback path
  at full size. It checks the restored picture's PSNR against a floating-point codec with
  the same table and rounding, and the total clock count. On the built-in test picture
  both reach 29.06 dB. The whole picture takes 307,394 clocks, the 256-clock-per-block
  rate plus the pipeline fill.
