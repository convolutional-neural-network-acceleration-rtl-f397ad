# L-register load path: sharing convolution inputs through the GPU register file

In a convolutional layer mapped onto a GPU, each thread computes one output
neuron from a window of the input image, for example 5x5 pixels. Neighbouring
threads' windows overlap. With a stride of 2, thread 0 and thread 1 share three
of five columns, and threads one block-row apart share three of five rows. A
plain GPU loads every one of those pixels again from global memory for each
thread. The threads of a warp execute in lockstep, so when thread 0 needs a
pixel, its neighbour has usually fetched it already.

This RTL implements the hardware that exploits that overlap. The loads that
fetch pixels and weights get their own class of destination registers, the
**L registers**. The hardware numbers them 1, 2, 3, ... per warp in issue order.
From that number alone, plus a short kernel descriptor given at launch, it can
tell whether a pixel is already in a neighbouring thread's L register. If it
is, the load never reaches memory. It is replaced by a **warp shuffle**, which
copies the neighbour's register into this thread's register. L registers sit
in otherwise unused rows of the existing register file. Each one is released
as soon as its own thread and every neighbour that copies it have read it, so
the scheme adds no storage and does not raise register pressure.

For a 5x5 kernel with stride 2, only 4 of the 25 pixel loads per thread reach
memory. The 25 weight loads still do. That makes 29 memory loads per window
instead of 50.

## How one L-type load is handled

`lreg_top` sits between the warp issue stage and the load-store unit. Every
load the compiler marked as L-type arrives on the `ld_*` handshake, with the
warp number, the active mask and 32 lane addresses. In the cycle it is
accepted:

1. **Rename** (`lreg_renamer`). The warp's counter gives the load the next L
   number. With a skip factor of 2, pixel and weight loads alternate, so odd
   numbers hold pixels and even numbers hold weights. After the last number of
   a window (KX·KY·S, which is 50 here) the count starts again at 1 for the
   next pass, such as the next input channel.
2. **Decide** (`lreg_share_calc`). The block tests the number against the
   overlap rules below. The result is one of three sources: memory, the
   horizontal neighbour (lane+1), or the vertical neighbour (lane+block row
   length).
3. **Allocate**. A free register-file row is taken from `lreg_free_list`. It
   is recorded in `lreg_lifetime` for this (warp, L number), together with the
   number of reads it will receive.
4. **Memory load**. The load leaves on `mem_req_*` with the warp's active mask
   unchanged. The response writes the row and marks it written.
5. **Shuffle**. Nothing is sent to memory: the load's active mask is nullified
   for every lane of the warp. The source register's row is read from
   `banked_regfile` in this cycle. In the next cycle `warp_shuffle` moves lane
   N+delta's value to lane N, and the result is written into the new row.
   With the launch bit `edge_load` set, the lanes whose source lies beyond
   the warp are still loaded from memory (see "Boundary threads").

The compute side reads L registers through `rd_*`. Each such read, and each
shuffle that uses a register as its source, lowers the register's remaining
read count. The read that brings the count to zero frees the row.

## The overlap rules

Kernel element (row r, column c) of a thread's window has its pixel in L
register `id = S·(KX·r + c) + 1`. Here KX is the kernel width, S the skip
factor, CS and RS the column and row strides, and BDX the thread-block row
length. Only pixel registers are shared.

| region | test on the L number | source register | source lane |
|---|---|---|---|
| horizontal | `(id-1) mod (KX·S) >= CS·S` (column c >= CS) | `id - CS·S` | lane + 1 |
| vertical | `(id-1) >= KX·S·RS` (row r >= RS) | `id - KX·RS·S` | lane + BDX |

When both rules apply, the horizontal neighbour is used. The source register
always has a smaller number, so in lockstep execution it was filled earlier.
It may itself have been filled by a shuffle, in which case a pixel travels
along a chain of neighbours. For 5x5, stride 2, S = 2:

```
pixel element   r\c  0   1   2   3   4
                0    L   L   H   H   H      L = load from memory
                1    L   L   H   H   H      H = shuffle from lane+1, register id-4
                2    V   V   H   H   H      V = shuffle from lane+BDX, register id-20
                3    V   V   H   H   H
                4    V   V   H   H   H
```

The horizontal test, written for S = 2 as `id mod (KX·S) > CS·S`, is
implemented in the equivalent form `(id-1) mod (KX·S) >= CS·S`, which also
holds for S = 1. The vertical shift includes the skip factor (KX·RS·S). This
is the shift that lands on the matching pixel register when pixels and
weights alternate. A shift of KX·RS is correct only when registers hold
pixels alone (S = 1); with S = 1 the two forms are equal.

## Lifetime of an L register

An L register has up to three readers: its own thread, the thread to its left
(if column c+CS is still inside the window), and the thread one block-row up
(if row r+RS is inside the window and the register is in one of the first CS
columns, which are the only ones copied vertically). `lreg_share_calc` counts
the later shuffles that will read the register (0, 1 or 2).
`lreg_lifetime` keeps that count plus one per (warp, L number). When the count
reaches zero the row returns to the pool. Weights, and pixels that no
neighbour copies, are therefore released right after their own thread reads
them.

Each map entry also carries a *written* bit. A shuffle waits while its source
is still waiting for memory data (`stall_src`). A compute read waits until the
register is written.

## Boundary threads

The shuffle never crosses a warp. The horizontal neighbour of the last
thread in a row is the first thread of the next row, and the threads of the
last block-rows of a warp have no vertical neighbour inside the warp. These
are the **boundary threads**. What happens to them depends on the launch bit
`edge_load`:

* **`edge_load = 0`.** The load is skipped for the whole warp all the same,
  so boundary threads receive wrong pixels. Lanes whose source lies beyond
  lane 31 are left unwritten and reported on `shfl_oob`. Lanes whose source
  is in the wrong row are not reported.
* **`edge_load = 1`.** The shuffle still happens. In the same cycle, a memory
  request goes out for the same L register. Its mask holds only the active
  lanes whose source lies beyond lane 31, so those lanes load their own
  pixel. The register counts as written only once that response has been
  written. The response cannot overtake the shuffle's write, because memory
  responses are held off in the cycle the shuffle writes. This removes every
  error at the warp edge. Only the wrong-row case of the last thread in each
  row is left, and worker threads cover that case.

Pixels travel along chains. For 5x5, stride 2, element (4, 4) of a thread
comes from two threads to the right, and element (4, 0) comes from two block
rows down. So with `edge_load = 0`, a thread's result is exact only if both
of these hold:

* the two threads to its right are in its own row;
* the two block rows below it are in its own warp and active.

With a block row of BDX threads, the second condition needs
`lane + 2*BDX <= 31`. Rows wider than about 10 threads therefore leave almost
no exact thread.

With `edge_load = 0`, the ways to use the design are:

* **Ignore the error.** Accept wrong values on the border of each warp's
  region. A 13x13 block on a 29x29 image gives 102 exact outputs out of 1014.
* **Add worker threads.** These extra threads only fetch pixels for their
  neighbours, and their own results are discarded. Widening the block by two
  threads in each direction (15x15) fixes the right and bottom edge of the
  block. It does not fix the rows at the bottom of each warp. Padding rows to
  16 or 32 threads does not help either, because the vertical chain then
  leaves the warp.
* **Give each warp its own border.** Use rows of 8 threads, so that a warp is
  8 x 4 threads. Only the top-left 6 x 2 threads produce outputs, and the
  others are workers. Every output is then exact, at the cost of 32 threads
  per 12 outputs. `tb_lreg_workloads` runs this layout for layers 1 and 2
  and finds no wrong output.

With `edge_load = 1`, widen the block by two threads in each direction and
discard the results of the extra threads. Every output is then exact, for any
row length. For 5x5, stride 2, each warp pays with up to 21 partial memory
loads per window, on top of the 29 full ones. Each partial load fetches only
the lanes past the warp's end: one lane for a horizontal shuffle, BDX lanes
for a vertical one. `tb_lreg_workloads`
runs this for layers 1 and 2 and for 33x33 and 73x73 inputs.

## Interface and timing of `lreg_top`

| group | signals | notes |
|---|---|---|
| launch | `cfg_load`, `cfg_in` (`lreg_cfg_t`) | enable, KX, KY, CS, RS, S, BDX, edge_load. Clears all counters and mappings and refills the pool. `enable=0` is for non-convolutional kernels: every load goes to memory. |
| L load | `ld_valid/ld_ready`, `ld_warp`, `ld_mask`, `ld_addr[32]` → `ld_id`, `ld_src` | accepted when valid and ready; `ld_id` is the L number given |
| memory | `mem_req_*` (valid/ready, warp, id, row, mask, addresses), `mem_resp_*` (valid/ready, same tag, 32 data words) | the response must return the request's tag; responses may arrive in any order |
| compute read | `rd_valid/rd_ready`, `rd_warp`, `rd_id` → `rd_data_valid`, `rd_data` | data one cycle after acceptance |
| status | `evt` (`lreg_evt_t`), `shfl_oob`, `free_count` | one-cycle event pulses: load, hshfl, vshfl, release, wrap, stall_free, stall_src, stall_busy, edge_load |

A load stalls (`ld_ready` low) in four cases:

* The pool is empty.
* The register with the same number from the previous pass is still live.
* For a shuffle, its source is not yet written.
* For a memory load, or a shuffle with a warp-edge load, the memory is not
  ready.

The register file has one read and one write per cycle, like its single-ported
banks. A shuffle takes the read port ahead of compute reads, and the shuffle's
write takes the write port ahead of memory responses.

Defaults: 48 warps, 32 lanes, 32-bit registers, 1024 rows (32 banks x 1024
registers = 128 KB), and an L-register pool in rows 512-1023. The highest L
number is 63, so KX·KY·S must not exceed 63.

## Files

| file | content |
|---|---|
| `rtl/lreg_pkg.sv` | widths, `lreg_cfg_t`, `lreg_src_e`, `lreg_evt_t` |
| `rtl/lreg_top.sv` | the load path (top) |
| `rtl/lreg_renamer.sv` | per-warp L numbering |
| `rtl/lreg_share_calc.sv` | overlap rules, source register and lane, reader count |
| `rtl/lreg_lifetime.sv` | map table, read counts, written bits, release |
| `rtl/lreg_free_list.sv` | free physical rows |
| `rtl/warp_shuffle.sv` | lane crossbar |
| `rtl/banked_regfile.sv`, `rtl/rf_bank.sv` | 32 single-lane banks |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_lreg_workloads.sv` | whole layers of a small handwritten-digit network through `lreg_top` |

## Design choices beyond the scheme

These parts follow the scheme:

* the L numbering and its pixel/weight alternation
* the overlap tests and shifts
* skipping the load for the whole warp
* shuffles within a warp
* release after the last access by the register's own thread and its
  neighbours
* use of spare register-file rows
* the launch-time descriptor

These are this design's own choices:

* all handshakes and stall rules
* the reference count as the way a register's death is detected
* horizontal before vertical when both apply
* wrapping the numbering after each window
* the pool location and size
* the one-cycle register-file latency
* port priorities
* leaving out-of-warp lanes unwritten when `edge_load` is clear
* the partial memory load for those lanes when `edge_load` is set

Where the behaviour differs from the scheme's own description:

* The scheme asks both that the load be skipped for the whole warp and that
  loads not be skipped at a warp boundary. The `edge_load` bit selects
  between the two.
* The scheme treats worker threads plus row padding to 8, 16 or 32 threads
  as enough to remove all boundary errors. With whole-warp skipping, that
  holds only when each output's vertical chain stays inside its warp. The
  warp-tile layout in "Boundary threads" meets that condition, but padded
  rows of 16 or 32 threads do not. With `edge_load` set, worker threads
  alone are enough.

Not included:

* Warp shuffles across warp boundaries, which would need a register decoder
  based on global thread IDs.
* Sharing of weights (identical across a warp, but still loaded).
* The rest of the SM: scheduler, operand collector, ALUs, load-store unit,
  global memory. The testbench models memory behaviourally.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/lreg_pkg.sv tb/tb_lreg_top.sv \
          --top-module tb_lreg_top -Mdir obj_top
obj_top/Vtb_lreg_top
```

Replace `tb_lreg_top` with any other `tb/tb_<module>` to test one block.
`tb_lreg_top` runs the top with its default parameters, in about 7000 cycles,
and simulates four phases:

1. **16 warps with sharing on.** Two input channels and four filters. The
   compute side starts late, so the pool runs dry.
2. **One warp.** Memory latency exposes shuffles waiting for their source,
   and the second pass waits on live registers of the first.
3. **Two warps with sharing off.**
4. **Four warps with warp-edge loads.** Exactly 21 warp-edge loads per
   window, no lane left unwritten, and the lanes with x <= 5 exact in all
   four rows.

The test checks:

* the output of every non-boundary neuron, against a reference convolution
* the exact numbers of loads (29 per window), horizontal shuffles (15) and
  vertical shuffles (6)
* that every pool row is free again at the end of each phase
* that each stall and event type occurred at least once

`tb_lreg_workloads` runs the layer shapes of a four-layer digit-recognition
network, with the top at its default size, in about 60,000 cycles:

* 29x29 input: a 13x13 block, a 15x15 block with and without warp-edge
  loads, and 8x4 warp tiles
* the 13x13 x 6-channel second layer: a 7x7 block with and without
  warp-edge loads, and warp tiles
* a 33x33 input with a 17x17 block, with and without warp-edge loads
* a 73x73 input with a 37x37 block (43 warps) and warp-edge loads

For every output neuron it predicts from the geometry alone whether all its
pixels arrive intact. Every predicted-exact neuron must match a reference
convolution. With warp tiles or warp-edge loads, every output must be
exact. It also checks that each window makes 29 full memory loads and that
every pool row is free again at the end. For the other neurons it prints the count and
the mean squared error.
