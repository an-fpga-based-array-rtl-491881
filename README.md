# Correlation array processor for a passive ionospheric radar

A passive radar can image turbulence in the ionosphere by listening to an FM
broadcast transmitter twice: once directly (the reference signal `x`) and once
after scattering off the ionosphere (the scattered signal `y`). The expensive part
of the processing is the cross-ambiguity function

    z[t;r] = sum_{s=0}^{T-1} conj(x[t+s]) * y[t+r+s]

evaluated for every range `r` (1536 of them) and every `T`-th sample time `t`.
`T` is the integration length, also called the decimation factor. It can be set
from 32 to 128. This is the bottleneck: with samples arriving at 250 kHz it needs
about 384 million complex multiply-accumulates per second. A later stage, run in
software on a DSP, computes the autocorrelation of `z` over `t`. That stage is not
part of this RTL.

This RTL is the hardware that computes `z`. The idea behind it is a **virtual
1536-stage systolic array folded onto 16 physical slices**. The 1536 ranges are
split into 96 range blocks of 16 ranges each. Each block is integrated in `T`
consecutive clocks, so one output time `t` (a *frame*) takes `15 + 96*T` clocks.
At 25 MHz that is less than the `100*T` clocks that `T` input samples take to
arrive at 250 kHz, so the array keeps up in real time. Each slice has only one
accumulator and two 2-bit pipeline registers. All sample storage is in two
ordinary memories outside the array.

The precision is low on purpose. `x` is 6-bit complex (6 bits I, 6 bits Q). `y`
is 1-bit complex: each component is only a sign. So every complex multiply
becomes sign selection followed by two additions. Sums are 13 bits per component.

## Blocks

| file | role |
|---|---|
| `rtl/radar_pkg.sv` | sizes and packed types: `xsample_t`, `ysample_t`, `cacc_t`, `yword_t`, `outword_t` |
| `rtl/radar_array_top.sv` | the whole processor, wired as described below |
| `rtl/sram_bank.sv` | sample memory with a host write port and a 1-clock read port; instantiated as x (32K x 12) and y (32K x 6) |
| `rtl/array_control.sv` | frame sequencer, the two 15-bit address generators and the data-flow controls |
| `rtl/input_select.sv` | splits each 6-bit y word into the two y pipelines |
| `rtl/systolic_array.sv` | 16 slices in a chain, plus the frame bit on the output |
| `rtl/array_slice.sv` | one slice: y pipeline registers, pipeline mux, sign-select multiply, accumulator, output register |
| `rtl/async_fifo.sv` | 27-bit dual-clock FIFO towards the DSP |

Data path: the x memory feeds all 16 slices at once (broadcast). The y memory
feeds `input_select`, which feeds two 2-bit pipelines. Each pipeline moves one
slice per clock. The results leave through a chain of output registers. The last
register is 27 bits wide: 26 bits of sum plus the frame bit. From there the words
go into the FIFO.

## How a range block is computed

Slice `k` (counting from 0 at the input end) sees the y stream `k` clocks late,
because y passes through `k` pipeline registers to reach it. x is broadcast, so
every slice sees the same x in the same clock. Both streams are read in forward
time order:

- x address: `t + c`
- y stream of block `b`: `y[t + D + 16b + 15 + c]`, where `c` is the step

With that order, slice `k` accumulates `conj(x[t+c]) * y[t + r + c]` with
`r = D + 16b + 15 - k`. The last slice therefore holds the lowest range of the
block. `D` is a run-time range offset (the "delay").

The delay causes a problem at block boundaries. In step 0 of block `b`, slice `k`
needs the y sample that entered the array `k` clocks earlier. At that moment the
array was still busy with block `b-1`.

There are two y pipelines, A and B, to solve this. Even blocks use A and odd
blocks use B. In the last 15 steps of a block, the idle pipeline is filled
(*preloaded*) with the first samples of the next block. The next block then starts
on the very next clock: blocks follow each other with no dead cycles. Each slice
taps both pipelines *before* its own registers. A mux driven by the block parity
(`act`, which also drives the `ysel` input) picks the active pipeline.

The first block of a frame has no block before it. Each frame therefore starts
with 15 cycles that only preload pipeline A (the `PRE` phase).

### One address, two samples: the y word layout

While preloading, the array needs two y samples per clock: one for the running
block and one for the next block. The memory delivers one word per address.
Because of that, every y word carries both samples:

    y word at address a = { spare[1:0], pre = y[a + 16 - T], cur = y[a] }

`array_control` issues the address `t + D + 16b + 15 + c` (the `cur` sample of
the running block). In the last 15 steps of a block, the `pre` field of that same
word is exactly the sample the next block's pipeline needs at that moment. It is
`y[t + D + 16(b+1) + 15 + (c - T)]`.

The `PRE` phase at the start of a frame uses the same address formula with
`b = -1` and `c = T-15 .. T-1`. Its `pre` fields fill pipeline A. So one formula
covers every cycle of a frame. `input_select` sends `cur` to the active pipeline
and `pre` to the other one. Outside the last 15 steps of a block, the `pre` field
feeds a pipeline nobody reads.

The consequence for software: the host must write the y memory for the `T` in
use. Whenever `T` changes, the `pre` fields must be rewritten. Both memories are
rings of 2^15 entries, indexed by sample time modulo 2^15. The host keeps them
filled ahead of `t`.

## Slice arithmetic

A y component bit of `0` means +1 and `1` means -1. Then

    re = xi*yi + xq*yq
    im = xi*yq - xq*yi

Each term is `+x` or `-x`. A slice therefore has four sign multiplexers, two
adders and two 13-bit accumulators. In the first step of a block (`acc_clr`), the
accumulator loads the product instead of adding to the old sum.

The accumulators are 13 bits per component and wrap on overflow. 13 bits is 6
bits of sample plus 7 bits for 128 steps. However, the sum of the two terms can
reach 64 when the inputs are near full scale. So `T = 128` with full-scale
signals can wrap. Real receiver data quantized at its noise level stays well
below this limit.

## Results, frame bit and output FIFO

A block's sums are complete one clock after its last step. In that clock,
`out_load` copies all 16 accumulators into the output registers. In the same
clock edge, the accumulators restart with the next block's first product. Then
the output chain shifts one slice per clock. The last slice emits the block's 16
results in increasing range order. `out_valid` marks those 16 clocks, and the FIFO
is written while it is high.

The output register's 27th bit is the *frame indication bit*. It is set on the
first word of block 0, which is range `D` of each frame. The DSP uses it to find
frame boundaries in the stream.

The FIFO connects the array clock to the DSP clock. The pointers cross between
the two clock domains in Gray code. The read side is first-word-fall-through:
`dsp_data` is valid whenever `dsp_empty` is low, and `dsp_rd` pops it. The array
cannot be stalled. If the FIFO is full, the word is dropped and the sticky
`fifo_overflow` flag is set (cleared by `rst_n`). A full frame produces 1536
words. The default depth is 1024, so the DSP must keep reading during a frame.

## Controlling it

The configuration inputs are sampled when a frame starts, so they can change
while the array runs:

- `cfg_t`: `T`. Values outside 32..128 are clamped to that range.
- `cfg_nblocks`: range blocks per frame. Values outside 1..96 are clamped.
- `cfg_delay`: range offset `D`.

Raising `run` starts a frame. While `run` stays high, frames follow each other
with no gap. Each frame advances `t` by the `T` of the frame just finished. `t`
starts at 0 after reset and is visible on `t_frame`. `frame_done` pulses when the
last step of a frame has been issued. `busy` stays high until the last result has
left the array. `preloading` is high during the `PRE` phase.

Host writes go in through `host_x_*` and `host_y_*`. They are synchronous to
`clk`, and each bank's write port has the same width as its read port.

Timing, relative to an issued address:

1. Clock `n`: address issued. The memories return data in clock `n+1`.
2. Clock `n+1`: `act` and `acc_clr` are aligned with that data.
3. Clock `n+2`: `out_load` follows a block's last step.
4. Clocks `n+3 .. n+18`: the 16 results are on the array output.

## Where this departs from, or adds to, the original system

The original system specifies these parts: the 16-slice structure, the
broadcast-x and pipelined-y data flow, the two y pipelines with preload, the
multiplexer-based multiply, the 6/12/2/13/26/27/15-bit widths, 96 blocks, `T`
from 32 to 128, the 6-bit packed y word, the frame indication bit, the
asynchronous FIFO, and run-time control of range, delay and decimation.

The following are choices made in this RTL:

- the y sign encoding, and forming the conjugate of `x` in the slices;
- the bit layout of the y word, whose two top bits are unused;
- the address formula, the `PRE` phase, the frame sequence and the range order;
- the meaning given to "range, delay, decimation": number of blocks, offset `D`
  and `T`;
- clamping of out-of-range settings;
- the 1-clock memory latency, and a single clock shared by host writes and array
  reads;
- the FIFO depth (1024), the drop-on-full policy and the overflow flag;
- asynchronous active-low resets everywhere;
- wrap-around accumulation.

In the original, the array was split across several FPGAs and the memories were
separate SRAM chips on a 16-bit host bus. Here everything is one synthesizable
design with memory arrays, and the host bus width is not modelled. The host-side
formatting software and the DSP autocorrelation (a 512-point FFT, then square and
accumulate) are not hardware in the original either. They are not included: the
top brings out the memory write ports and the FIFO read port where they connect.

## Verification

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_radar_array_top` runs at the default sizes. It plays the host: it fills the
  memories with random samples packed as above. It plays the DSP: it reads the
  FIFO. Every word read is compared with `z[t;r]`, which the testbench computes
  directly from the sample arrays. It runs four frames:
  - `T=128` over all 1536 ranges;
  - two back-to-back frames at `T=32` with offset 100, which also checks that a
    frame lasts `15 + 96*T` clocks;
  - one frame with the DSP stalled, so that the FIFO must overflow and keep its
    first 1024 words.

  It also counts preload phases, block starts, result loads, frame bits, the mode
  switch, back-to-back frames, use of the offset and overflow. It fails if any of
  them never happened.
- `tb_array_control` compares addresses and controls clock by clock against a
  schedule the testbench builds itself. The frames are: `T=40` with 3 blocks, then
  `T=32` with 2 blocks directly behind it, then clamped settings.
- `tb_systolic_array` feeds five blocks the way the controller would. It checks
  every result, the output order and the frame bit.
- `tb_array_slice`, `tb_input_select`, `tb_sram_bank` and `tb_async_fifo` test the
  smaller blocks: the slice at random, the input select exhaustively, the memory
  with a full write and read-back, and the FIFO with random two-clock traffic plus
  fill and overflow.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/radar_pkg.sv tb/tb_radar_array_top.sv --top-module tb_radar_array_top
    ./obj_dir/Vtb_radar_array_top

The full-size end-to-end test takes well under a second of CPU time. Sizes can be
changed through the package constants (`NSLICE`, `NBLOCKS`, `AW`, ...) and through
the module parameters. The address rule assumes 16 ranges per block only through
`N`, so `N` and the y word layout must change together.
