# Row-oriented pipeline convolution accelerator

This is a small convolution engine for CNN inference on low-cost FPGAs. It
targets MobileNet-style networks, whose layers are mostly 3x3 depth-wise
convolutions followed by 1x1 point-wise convolutions. It does not hold a whole
feature map on chip. It keeps only the three input rows a 3x3 kernel needs, in
a row buffer of shift registers. It slides the kernel along those rows with a
3x3 array of multiply-accumulate (MAC) cells, split into three pipelined
columns. Once the pipeline is full it produces **one output element per
clock**. A row of F outputs takes **F + 2 cycles**, so a whole F x F plane
takes F x (F + 2) compute cycles, plus the cycles spent fetching rows.

Each depth-wise result then passes through a single point-wise MAC (multiply
by a 1x1 weight and add a bias) and into an output FIFO, which a DMA engine
empties. The DMA, the AXI interconnect, the host processor and the external
memory are not part of this RTL. Their streams and control signals are plain
ports of the top module.

## Block structure

```
 in stream ──► row_buffer ──taps──► conv_core ─────────────────► pointwise_unit ──► out_buffer ──► out stream
 (DMA)         3 row FIFOs          3x3 mac_unit                 mac_unit (x*w+b)   FIFO          (DMA)
                  ▲                 2 x col_pipe_reg             or pass-through
                  │                 sum_unit (Σ + bias)
               accel_ctrl  (clear / shift-up / load / rotate, pipeline enable, valid)
```

| file | role |
|---|---|
| `rtl/cnn_pkg.sv` | widths (data 16, partial sums 32, point-wise 48 bits), kernel size 3, largest map 128, controller state type |
| `rtl/mac_unit.sv` | one MAC cell: kernel register plus `k*f + acc_in` |
| `rtl/col_pipe_reg.sv` | register between two MAC columns (partial sums, forwarded taps, valid) |
| `rtl/sum_unit.sv` | Σ block: adds the last column's three row sums and the bias, registered |
| `rtl/conv_core.sv` | 3x3 MAC array, two column registers and Σ |
| `rtl/row_buffer.sv` | three row FIFOs with zero padding, circular shift, shift-up and row fetch |
| `rtl/pointwise_unit.sv` | point-wise MAC with a pass-through mode |
| `rtl/out_buffer.sv` | output FIFO with valid/ready read side |
| `rtl/accel_ctrl.sv` | state machine that runs one channel plane |
| `rtl/cnn_accel_top.sv` | the accelerator top |

## How the MAC columns pipeline a window

This is the least obvious part of the design. Number the MAC columns 1..3.
Cell (r, c) holds kernel element K[r,c] for the whole plane. In every cycle
each buffer FIFO r presents its first three elements as taps 0, 1 and 2.

* Column 1 takes tap 0 directly and computes `F[r,t] * K[r,1]`. Its partial
  sum enters the first column register.
* Tap 1 also enters the first column register. It reaches column 2 one cycle
  later. Tap 2 crosses both column registers and reaches column 3 two cycles
  later. Because the row moves one position per cycle, every column therefore
  sees element t of the row in cycle t.
* Column c adds `F[r,t] * K[r,c]` to the partial sum that column c-1 made in
  the cycle before. After column 3, each row holds the full 3-element dot
  product of one window position. The Σ block adds the three rows and the
  bias, and registers the result.

So the window that starts at column 1 in cycle t is complete at the end of
cycle t+2. With cycles counted from 1 at the start of a row pass:

| cycle | column 1 | column 2 | column 3 | leaves Σ at end of cycle |
|---|---|---|---|---|
| 1 | P[1]·K[·,1] | idle | idle | – |
| 2 | P[2]·K[·,1] | +P[2]·K[·,2] | idle | – |
| 3 | P[3]·K[·,1] | +P[3]·K[·,2] | +P[3]·K[·,3] | output 1 |
| 4 | P[4]·K[·,1] | +P[4]·K[·,2] | +P[4]·K[·,3] | output 2 |

P is the zero-padded row (see below). Output j of a row leaves in cycle j+2.
The last of the F outputs leaves in cycle F+2, which is why a row pass is
F+2 cycles long. A valid bit travels with the data through the column
registers and the Σ register. The controller sets it for the first F cycles
of a pass; the other 2 cycles only drain the pipeline.

Every register in the pipeline has the same enable `en`. The controller holds
`en` high only while the output FIFO has room. When the FIFO is full the whole
pipeline freezes and resumes without loss. An element counts as delivered on
a clock edge where `en` is high.

## The row buffer

`row_buffer` holds KS = 3 FIFOs. Each FIFO is a shift register of
`MAX_F + 2` positions. Position 0 is the tap end. A row of width F sits in
positions 1..F, with a zero at position 0 and at position F+1. These zeros
give the one-element padding on the left and right. The design pads on every
side ("same" convolution), so an F x F plane gives an F x F output.

There are four commands. Only one acts in a cycle, in this order of priority:

* **clear** zeroes all FIFOs. These zero rows are the padding above the map.
* **shift_up** moves every row up one FIFO and drops the first row. The last
  FIFO becomes zero. Left like that, it is the zero padding row below the
  map.
* **load** shifts one incoming element into the far end of the last FIFO's
  data region. After F loads, the new row is in place.
* **rotate** shifts every FIFO one position toward the taps, circularly over
  F+2 positions. After a full pass of F+2 cycles each row is back where it
  started. It can then move up and be used again for the next output row.
  This way each input element is fetched from memory only once.

The row width is an input, up to `MAX_F`. The same hardware therefore serves
the 128, 64, 32, 16, 8 and 4 element maps of MobileNet. The storage is one
packed register of 3 x 130 x 16 bits, not a memory.

## Sequence and timing of one plane

`accel_ctrl` runs one plane per `start`:

1. **CLEAR** for 1 cycle.
2. **SHIFT** and **LOAD** twice, to fetch map rows 0 and 1. The buffer then
   holds the window rows -1, 0 and 1.
3. Repeat for output rows 0..F-1:
   * **PASS** for F+2 enabled cycles.
   * **SHIFT**.
   * **LOAD** of the next row, F elements, one per cycle while `in_valid` is
     high. After the last map row, the load is skipped and the shifted-in
     zero row is the bottom padding.
4. **DRAIN** for 2 enabled cycles, until the last result is in the output
   FIFO. Then `done` pulses.

Fetching and computing do not overlap. With no stalls a plane takes

    busy cycles = F*(F+2)            row passes
                + F*F + (F+1)        row fetches: loads and shift-ups
                + 1 + 2              clear and drain

For F = 128 that is 16,640 + 16,513 + 3 = 33,156 cycles. The output
`pass_cycles` reports the F*(F+2) part. The testbenches check both numbers.

## Point-wise stage and output buffer

`pointwise_unit` is one MAC cell of the same kind. The depth-wise result is
its data input, the 1x1 weight is its kernel register, and the point-wise bias
takes the place of the partial sum. The result is `y = x*w + pw_bias` at
48 bits. With `pw_on` low the stage passes the depth-wise result through. Use
this for a standard convolution layer that has no point-wise step.

This stage handles **one channel plane**. A full point-wise layer sums
`x*w` over all C input channels. That sum is not done here: there is no
partial-sum memory, and the outputs go to external memory for the host.

`out_buffer` is a 128-word FIFO (one output row at the largest size). Its
read side uses valid/ready. An assertion checks that it is never written
while full.

## Top-level interface (`cnn_accel_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `start` | in | 1 | start a plane (sampled while `busy` is low) |
| `width` | in | 8 | F, the plane's width and height, 1..128 |
| `pw_on` | in | 1 | 1: apply the point-wise weight and bias; 0: pass through |
| `k_we`, `k_row`, `k_col`, `k_data` | in | 1, 2, 2, 16 | write kernel element K[k_row][k_col] |
| `bias` | in | 32 | depth-wise bias b |
| `w_we`, `w_data` | in | 1, 16 | write the 1x1 weight |
| `pw_bias` | in | 48 | point-wise bias |
| `in_valid`, `in_ready`, `in_data` | in, out, in | 1, 1, 16 | input plane, row-major; an element moves when both are high |
| `out_valid`, `out_ready`, `out_data` | out, in, out | 1, 1, 48 | output plane, row-major |
| `busy`, `done` | out | 1 | plane running; one-cycle pulse when all outputs are in the FIFO |
| `pass_cycles` | out | 32 | row-pass cycles of the last plane |

Kernel, weights and biases must be loaded before `start` and stay fixed for
the plane. All numbers are signed two's complement integers. Products are not
rounded or saturated; sums wrap at 32 bits (depth-wise) and 48 bits
(point-wise). To use fixed point, choose the binary point and rescale outside.

Parameters: `KS_P` (kernel size, default 3), `MAX_F_P` (largest map, default
128) and `OUT_DEPTH` (output FIFO depth, default 128). The widths are set in
`cnn_pkg`. `KS_P` may be any odd size of 3 or more. Padding is then
(KS-1)/2 and a row pass takes F+KS-1 cycles. A 5x5 build is tested end to
end.

## Where this design makes its own choices

These points are this design's own choices, not taken from the reference
architecture:

* The number widths and the wrap-around arithmetic.
* Zero padding of one element on every side. It gives the F x (F+2) compute
  time per plane.
* The circular rotation in the row buffer.
* The valid bit and the global stall enable.
* The controller's states.
* The valid/ready streams and the output FIFO depth.
* The point-wise pass-through mode.

These are left out:

* **Stride.** Only stride 1 is built. MobileNet's stride-2 layers would need
  the host to keep every other output.
* **Sums across channels.** The sum over input channels for a standard
  convolution, and the sum over channels for a point-wise layer, are left to
  the host. The engine works one plane at a time.
* **Activation function.** There is none (no ReLU or ReLU6).
* **Multiple cores.** There is one depth-wise core. The reference system
  shows several stacked MAC arrays but does not say how many.
* **Overlapped fetching.** Row fetch and compute do not overlap.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values computed independently in the testbench, ends with a
`TB_RESULT checks=N failures=M` line, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mac_unit` | `k*f+acc` against 64-bit arithmetic, kernel hold and reset |
| `tb_col_pipe_reg`, `tb_sum_unit`, `tb_pointwise_unit` | register, hold and arithmetic behaviour with random enables |
| `tb_out_buffer` | FIFO against a queue model, including full |
| `tb_row_buffer` | every tap of every pass against padded model rows, for several widths, with gaps in loading |
| `tb_conv_core` | outputs against a window model; first output at the end of cycle 3; F+2 cycles per row; random stalls |
| `tb_accel_ctrl` | command counts: loads F², rotations F(F+2), shift-ups F+1, exact busy time |
| `tb_cnn_accel_top` | end-to-end on 16x16 maximum size, with a 4-deep output FIFO, several widths, input gaps, slow readout and both point-wise modes. It counts every mechanism (clear, fetch, bottom zero row, input stall, output-full stall, point-wise and pass-through planes) and fails if one never happens. |
| `tb_cnn_accel_top_k5` | the same end-to-end test with the top built for 5x5 kernels |
| `tb_cnn_accel_top_full` | default parameters, two 128x128 planes, every output checked, 33,156 busy cycles each |
| `tb_mobilenet_layers` | default parameters, planes of 64, 32, 16, 8 and 4, with stalls |

To run one with Verilator (about a second each):

    verilator --binary --timing --assert -Irtl rtl/cnn_pkg.sv rtl/*.sv \
        tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top -Mdir obj
    ./obj/Vtb_cnn_accel_top

## Sizing against MobileNet

The layer sizes used for sizing are the ones of a MobileNet with a 128x128x3
input:

* 128x128 for the first, standard 3x3 layer with 3 channels.
* 64x64 with 32 to 64 channels.
* Down to 4x4 with 1024 channels.

Every plane fits the 128-element row buffer. At one input element per cycle:

* A 128x128 plane takes 33,156 cycles.
* A 64x64 plane takes 8,388 cycles.
* An F x F plane in general takes F(F+2) + F² + F + 4 cycles.
* A layer takes that time multiplied by its channel count.
