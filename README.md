# Non-separate VLSI architecture for the 2-D discrete periodized wavelet transform

This is synthesizable SystemVerilog for a multi-stage 2-D wavelet transform
engine with a 4-tap Daubechies filter. The transform is *periodized*: at the
edges the image wraps around. As a result every subband has exactly a quarter
of the input's size and the inverse transform reconstructs the image exactly.
The engine follows the "non-separate" architecture published for this
transform. It does not filter rows and then columns with 1-D filters. Instead
it multiplies each input datum once by the 2-D filter coefficients h(k)·h(l).
It then gets all four subbands by adding those weighted data up in different
directions.

## The idea: one set of products, four accumulation directions

One stage turns an N×N image f into four (N/2)×(N/2) subbands. Each is a
correlation with a 4×4 operator, with a step of two and indices taken
modulo N:

    b(n1,n2) = Σk Σl f((2n1+k) mod N, (2n2+l) mod N) · W[k][l]

    W_LL[k][l] = c(k,l)                    -> SS (LL band)
    W_LH[k][l] = (-1)^(3-l) c(k,3-l)       -> SD (LH band)
    W_HL[k][l] = (-1)^(3-k) c(3-k,l)       -> DS (HL band)
    W_HH[k][l] = (-1)^(k+l) c(3-k,3-l)     -> DD (HH band)

`c(k,l) = h'(k)·h'(l)`, where `h' = [(1+√3), (3+√3), (3−√3), (1−√3)]/8`. This
is Daubechies-4 scaled so that the LL operator sums to 1. The high-pass
filter is circularly shifted so that all four bands use the same input
window. Without this shift the high band would lag the low band by two
samples, and the wrap-around data would be needed at two different times.

The three other operators are mirror images of W_LL with alternating signs.
Because of this, the hardware needs only the 16 products `f·c(k,l)`. Ten of
them are distinct, because c is symmetric. From these products:

* a **row accumulator** per operator row k forms the horizontal sums. For the
  low band the sum runs left to right. For the high band it runs right to
  left with signs (−,+,−,+).
* a **column accumulator** adds four consecutive rows of these row sums. For
  LL and LH it adds top to bottom. For HL and HH it adds bottom to top with
  alternating signs.

The coefficients are quantised to p = 12 bits:
`C[k][l] = round(c(k,l) · 2048)`. This gives the table in `dpwt_pkg`, whose
entries sum to exactly 2048:

|     | l=0 | l=1  | l=2 | l=3  |
|-----|-----|------|-----|------|
| k=0 | 239 | 414  | 111 | −64  |
| k=1 | 414 | 717  | 192 | −111 |
| k=2 | 111 | 192  | 51  | −30  |
| k=3 | −64 | −111 | −30 | 17   |

All data are q = 21-bit two's complement. The bands leave the engine in units
of 2^-11. The LL band is shifted right by p−1 = 11 bits, with floor
(arithmetic shift), before it becomes the next stage's input. Its values
therefore stay on the pixel scale from stage to stage.

## Block structure

```
 pixels ──► dpwt_input_ctrl ──slot──► dpwt_par_mult ──w[4][4]──┬──► dpwt_data_acc (stage 1, N)   ──► bands[0]
              ▲  ▲                                             ├──► dpwt_data_acc (stage 2, N/2) ──► bands[1]
              │  └─────────── SS of stage 1 (>>>11) ───────────┘    ...
              └────────────── SS of stage 2 (>>>11) ──────────────── dpwt_data_acc (stage S, N/2^(S-1))

 dpwt_data_acc = dpwt_stage_ctrl + 4 × dpwt_row_acc + dpwt_col_acc (16 × dpwt_shift_buf)
```

| file | role |
|---|---|
| `rtl/dpwt_pkg.sv` | d, p, q, pixel width, coefficient table, `data_t`, `bands_t` |
| `rtl/dpwt_top.sv` | whole engine: controller, multipliers, one data accumulator per stage |
| `rtl/dpwt_input_ctrl.sv` | builds the interleaved input stream |
| `rtl/dpwt_par_mult.sv` | ten constant multipliers, 4×4 weighted-data matrix |
| `rtl/dpwt_data_acc.sv` | one decomposition stage |
| `rtl/dpwt_stage_ctrl.sv` | column counter and strobes for the row accumulators |
| `rtl/dpwt_row_acc.sv` | horizontal systolic sums, with the column wrap-around |
| `rtl/dpwt_col_acc.sv` | vertical sums in line buffers, with the row wrap-around and last-row delay |
| `rtl/dpwt_shift_buf.sv` | the N/2-word shift-register buffer used everywhere in the column accumulator |

## The interleaved input stream

All stages share one set of multipliers. Original pixels enter every other
clock cycle (even slots). The odd slots carry the LL coefficients that
earlier stages have produced, each of which is an input datum of the next
stage. Stage s therefore gets data at an average rate of f_s/2^s. Its data
accumulator advances only on slots tagged with its stage (`en`). The
published design uses a divided clock of f_s/2^k for stage k; here a clock
enable plays that role.

Each stage's LL output goes into a 4-entry queue in `dpwt_input_ctrl`. In an
odd slot, the lowest-numbered stage whose queue is not empty wins. Each queue
is first-in first-out, so every stage receives its image in raster order. The
queues never overflow in the tested configurations. An assertion and the
sticky `overflow` output would report it if one did. The published
description draws this controller as a register chain with switches at fixed
positions, but gives no schedule. The queues and the priority rule are this
implementation's own.

## Row accumulator and the column wrap-around

For row k, the weighted data are `p[l] = C[k][l]·f(x)`. Two three-register
chains are in transposed form, which gives a systolic array where each cell
is one adder and one register:

    low  : L(x) =  C0 f(x-3) + C1 f(x-2) + C2 f(x-1) + C3 f(x)
    high : H(x) = -C3 f(x-3) + C2 f(x-2) - C1 f(x-1) + C0 f(x)

These sums are taken at odd x ≥ 3, which gives output column n = (x−3)/2.
The last column n = N/2−1 needs f(N−2), f(N−1), f(0), f(1). At x = 0 and
x = 1, two extra cells per band collect `C2 f(0) + C3 f(1)` (low) and
`−C1 f(0) + C0 f(1)` (high). The result stays in a storage cell for the rest
of the row. At x = N−1 the storage cell is added to the chain's first-cell
value plus the current product. The result waits in a delay register,
because x = N−1 also produces the ordinary sum for n = N/2−2. In the next
clock a multiplexer outputs the delayed value. That clock never carries data
of the same stage, since each stage gets at most every second clock. So each
row gives N/2 row sums in column order, and the last of them arrives one
clock after the row's last datum.

## Column accumulator: line buffers, boundary holding, last row

This is the least obvious part. Each row delivers N/2 row sums for each of
the eight inputs: `rl[k]` and `rh[k]` for k = 0..3. The vertical sums use the
same transposed chains as the row accumulator. Every register, though, is a
**shift-register buffer of N/2 words**. A word written in one row comes out
at the same column of the next row:

    A1 ← R0;      A2 ← A1 + R1;   A3 ← A2 + R2;   low  = A3 + R3     (LL from rl, LH from rh)
    B1 ← −R3;     B2 ← B1 + R2;   B3 ← B2 − R1;   high = B3 + R0     (HL from rl, HH from rh)

Results are taken at odd rows r ≥ 3, for output row n1 = (r−3)/2.

**Row wrap-around.** The last output row needs rows N−2, N−1, 0 and 1. While
rows 0 and 1 pass, a boundary buffer per band collects `R2(0) + R3(1)` (or
`−R1(0) + R0(1)` for the high chain). For the remaining N−2 rows it
recirculates through a multiplexer. At row N−1 the buffer is added to
`A1 + R1`, which is the partial sum of rows N−2 and N−1. So the last two
output rows are formed in the same row time. The last row goes into a
last-row buffer. After row N−1 it is shifted out on its own, one word every
`GAP` clocks, so the stage's last output row takes one row time (the
published text: "the last row will be delayed by a row scanning time").
`GAP` is set by the top to the stage's normal output spacing, 4·2^(s−1)
clocks for stage s. Draining uses only clocks that carry no data of this
stage. This keeps each stage's output, and therefore the next stage's input,
in raster order, and needs no further input frame.

There are 16 buffers per stage: for each of the two horizontal bands, three
for each vertical chain, one boundary buffer for each chain, and one
last-row buffer for each chain.

## Timing

* **Input rate:** one pixel per two clocks. `pix_ready` is high every other
  cycle, and a continuously fed N×N frame takes exactly 2N² cycles.
* **Latency:** a coefficient is registered one clock after the slot holding
  the datum that completes it. That clock covers the multiply, the two final
  adds and the shift. The last column of each row takes two clocks, because
  it passes the row accumulator's delay register.
* **Last row:** stage s delivers its last subband row about s row times
  (s·2N clocks, i.e. s·N pixel periods) after the frame's last pixel. This
  matches the published "kN clock cycles for the k-th decomposition stage".
  Measured: 35, 72 and 108 clocks for N = 16; 1027 to 6168 clocks for
  stages 1 to 6 at N = 512. When frames follow back to back, stage 1 ends
  during the first row of the next frame and stage 2 during the second.
  Frames can also come with gaps; nothing needs to be flushed.
* **Output order:** for each stage, raster order of its (N/2^s)² subband
  image. The same cycle carries all four bands.

## Parameters

| parameter | default | where |
|---|---|---|
| `N` | 16 | image side, power of two; stage s works on N/2^(s−1) |
| `STAGES` | 3 | decomposition stages; needs N/2^(STAGES−1) ≥ 4 |
| `D`, `P_BITS`, `Q_BITS`, `PIX_BITS` | 4, 12, 21, 8 | `dpwt_pkg` |
| `QDEPTH` | 4 | controller queue depth |
| `GAP` | 4·2^(s−1) | `dpwt_data_acc`/`dpwt_col_acc`: clocks between last-row words of stage s, set by the top |

The defaults match the published simulation: 16×16 image sequences, three
stages. The 512×512 case used in the published accuracy analysis runs with
`#(.N(512), .STAGES(6))`, down to 8×8 subbands. The column accumulators then
hold 16·(256+128+…+8) = 8064 words of 21 bits.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=… failures=…`. Example, the end-to-end test at default
size:

```
verilator --binary --timing --assert -Mdir obj rtl/dpwt_pkg.sv tb/dpwt_ref_pkg.sv \
  rtl/*.sv tb/tb_dpwt_top.sv --top-module tb_dpwt_top && obj/Vtb_dpwt_top
```

Replace `tb_dpwt_top` by another testbench name to run that one.
`tb/dpwt_ref_pkg.sv` is the reference model. It computes the periodized
transform straight from the operator formula above. It builds its own
coefficient table in floating point, with no knowledge of the hardware.

| testbench | what it checks |
|---|---|
| `tb_dpwt_top` | 16×16, 3 stages, defaults. 3 frames (random, smooth with random input gaps, checkerboard), no flush. Every band of every stage is compared with the reference. Also checks the 2-cycle pixel rate, how late each stage's last row comes, and the queues. It counts column wraps, row wraps, back-pressure, input gaps and slots per stage. |
| `tb_dpwt_top_512x512` | same test at 512×512, six stages, two frames (about 2.4 M checks, a few seconds) |
| `tb_dpwt_accuracy_512x512` | 512×512, six stages, a textured test image. Measures the signal-to-noise ratio of every band against a double-precision transform, per stage and end to end (see below) |
| `tb_dpwt_data_acc` | one stage (N = 8) with random enable gaps; all bands, `ss_next`, latency (1 clock, 2 on the last column) |
| `tb_dpwt_col_acc` | random row sums with random spacing, both wrap-arounds, last-row drain spacing and lateness, latency |
| `tb_dpwt_row_acc` | random taps and data; ordinary and wrapped row sums |
| `tb_dpwt_par_mult`, `tb_dpwt_shift_buf`, `tb_dpwt_stage_ctrl`, `tb_dpwt_input_ctrl` | unit behaviour, against independent models |

All of them pass.

**Accuracy with p = 12, q = 21.** Compared with a double-precision transform
of the same integer input it received, each stage reaches 54 to 79 dB SNR over
all bands. Stage 1
gives 60 to 79 dB, similar to the published 63 to 86 dB for d = 4. End to
end, the later stages fall to 14 to 48 dB for this image. The cause is the
integer floor of the 11-bit shift between stages. The bit-exact reference
applies the same floor, so the functional tests are unaffected. A design
that needs better deep-stage accuracy would keep fraction bits between stages.

## Where this implementation departs from, or adds to, the published architecture

* **Filter length.** Only d = 4 is built. The published description shows a
  different, more complex boundary circuit for d = 8 and longer filters. It
  does not give its control schedule, so that circuit is not included. Other
  4-tap filters need only a new coefficient table.
* **Controller.** The published controller is a register chain with
  switches at fixed positions, with no schedule given. Here it is even/odd
  slots with per-stage queues and lowest-stage-first priority.
* **Stage clocks.** A clock enable per stage replaces the divided clocks.
* **Last-row drain.** The published text says only that the last row is
  delayed by a row scanning time. The last-row buffer and its fixed drain
  spacing `GAP` are this implementation's own.
* **Output scaling.** All four bands leave at full 21-bit scale (units of
  2^-11). Only the LL value passed to the next stage is shifted. The
  published figure shows the shift on the LL output itself.
* **Rounding** of the 11-bit shift is floor (arithmetic shift). Products and
  sums wrap at 21 bits. With 8-bit images the largest stage-1 value is below
  255·2048·1.4 ≈ 7.3·10^5 < 2^20. Only unusual images with extreme LL
  overshoot over many stages could exceed the range, and nothing detects it.
* **Handshake and reset** are this implementation's own: valid/ready on the
  pixel input, and asynchronous active-low reset that clears every register
  and buffer word.
* The multiply, two adds and output register form one long combinational
  path per cycle, as the published timing implies. The code adds no
  pipelining.
