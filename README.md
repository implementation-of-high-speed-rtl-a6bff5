# Memory structures for an MPEG DCT/quantization front end

A DCT-based image or video encoder (MPEG-1, MPEG-2, JPEG-like codecs) works
on 8x8 pixel blocks. Its transform and quantization stage needs three kinds of
on-chip storage, each shaped for the access pattern of that stage rather than
as a generic RAM or ROM:

* a **pixel-block double buffer** that a host fills row by row over a wide bus
  while the transform reads the previous block column by column, so loading
  and processing overlap and the transpose comes for free;
* a **dual-address constant table** that returns two 64-bit words per clock,
  for example two rows of the DCT basis matrix;
* a **single-address reciprocal table** holding 1/Q for each quantizer, so
  that quantization multiplies instead of divides.

This repository holds synthesizable SystemVerilog for all three, a top level
that places them side by side, and a self-checking testbench for each.

## Pixel layout

All word-wide paths carry one row or one column of an 8x8 block of 8-bit
(monochrome) pixels in a 64-bit word. Byte `c` (bits `8c+7:8c`) of a written
word is column `c`; byte `r` of a read word is row `r`. `video_mem_pkg`
defines `pixel_t` and `row_t` for this.

## The pixel-block double buffer (`dual_port_vm`, `vm_bank`)

This is the part that takes the most care to use correctly.

### Banks and roles

Two identical banks, VM1 and VM2 (`vm_bank`), each hold one 8x8 block. The
input `rnw` assigns their roles:

| `rnw` | written (pci_clk side) | read (clk side) |
|-------|------------------------|-----------------|
| 1     | VM1                    | VM2             |
| 0     | VM2                    | VM1             |

The intended sequence is: set `rnw = 1`, write block 0 into VM1; toggle
`rnw`; now write block 1 into VM2 while block 0 is read from VM1; toggle
again; and so on. Each block is written once and read once, and the write of
block n+1 runs in parallel with the read of block n.

### Write port (pci_clk)

On a rising edge of `pci_clk` with `din_valid = 1`, row `wa` of the bank
being written takes the bytes of `di` whose byte enable `be[c]` is 1. Other
bytes of that row keep their value. One full row (64 bits) per cycle, so a
block enters in 8 cycles; idle cycles (`din_valid = 0`) may be inserted
anywhere, and a row may be assembled from several partial writes.

### Read port (clk) and the transpose

On a rising edge of `clk`, `d0` is loaded with **column** `ra` of the bank
being read: byte `r` of `d0` is the pixel at row `r`, column `ra`. The data
appear one `clk` cycle after `ra` is applied and hold until the next edge.
Because the block was written by rows and is read by columns, the reader sees
the transpose, which is the order a separable 2-D DCT needs for its column
pass. To read a whole column at once, each bank is a flip-flop array
(8x8 bytes) rather than a single-port RAM macro.

### Clock domains and the swap rule

`pci_clk` and `clk` are independent. There is no synchroniser on `rnw`: it is
sampled directly in both domains. It must therefore change only between
blocks, when the host has stopped writing and the reader has finished the
previous block. An assertion (`a_rnw_stable_in_burst`) fires if `rnw` changes
between two back-to-back writes. The read-side mux follows the value of
`rnw` sampled at the same `clk` edge as the column, so `d0` always comes from
one bank.

Nothing is reset. Bank contents are undefined until written; `d0` is
undefined until the first `clk` edge.

## Dual-address constant table (`dual_addr_nvm`)

Eight 64-bit words, read through two independent addresses: on each `clk`
edge `dout1 <= word[a1]` and `dout2 <= word[a2]` (one cycle of latency;
`a1 = a2` is allowed). The contents are the parameter `INIT`. By default it is
the 8x8 DCT-II basis matrix, computed at elaboration by
`video_mem_pkg::dct_rom_init()`:

    C[k][n] = round(256 * c(k) * cos((2n+1) k pi / 16)),  c(0) = 1/sqrt(8), c(k>0) = 1/2

Word `k` is basis row `k`; byte `n` is the signed 8-bit coefficient `C[k][n]`.
With a column `x` from the double buffer and row `k` from this table, one
column DCT output is `sum_n C[k][n] * x[n]` (scaled by 256); two outputs per
cycle can be formed from `dout1` and `dout2`.

## Reciprocal quantizer table (`single_addr_nvm`)

64 entries of 8 bits, one per coefficient position of an 8x8 block in raster
order (`a = 8*row + column`); `d <= entry[a]` on each `clk` edge. By default
(`video_mem_pkg::qrecip_rom_init()`):

    R[i] = round(1024 / Q[i])

with `Q` the MPEG default intra quantizer matrix. The largest value is
1024/8 = 128, the smallest round(1024/83) = 12. A quantized coefficient is
`(Y * R) >>> 10`. Give `INIT` (and, if needed, `ADDR_W`, `DATA_W`) to use a
different matrix, scale or size; a 256-entry, 10-bit table is
`ADDR_W = 8, DATA_W = 10` with a matching 256-entry `INIT`.

## Top level (`video_mem_top`)

The three memories share only `clk` (the transform-side clock); every other
signal is a port. The single-address table's `a`/`d` become `qa`/`qd` at the
top. The host bus interface that drives the write side and the DCT/quantizer
datapath that consumes the outputs are not part of this RTL.

| Port | Dir | Width | Use |
|------|-----|-------|-----|
| `clk` | in | 1 | read clock of all three memories |
| `pci_clk` | in | 1 | pixel write clock |
| `di`, `din_valid`, `be`, `wa` | in | 64, 1, 8, 3 | pixel row write |
| `rnw` | in | 1 | bank select (see table above) |
| `ra` / `d0` | in / out | 3 / 64 | pixel column read |
| `a1`, `a2` / `dout1`, `dout2` | in / out | 3 / 64 | constant table |
| `qa` / `qd` | in / out | 6 / 8 | reciprocal quantizer table |

Every output is registered, one `clk` cycle after its address.

## Sizes and what is a design choice

Following the source design: the three structures and their port sets; an
8-word x 64-bit table with two addresses and two outputs, read on a clock;
a byte-wide, single-address table of quantizer reciprocals with 6-bit
address; the double buffer with a 64-bit bus, 8 byte enables, 3-bit write
and read addresses, `din_valid`, `rnw`, two clocks, row-wise write and
column-wise read, and writes on the rising edge of `pci_clk`, reads on the
rising edge of `clk`.

Choices made here, where the source is silent or inconsistent:

* The source also speaks of a 256-bit bus, ten 256-bit locations with a 5-bit
  address and 10 byte enables for the double buffer. Those figures do not fit
  together; this RTL uses the self-consistent 64-bit / 8-row form (one 8x8
  block per bank). A colour block (3 bytes per pixel) is handled as three
  successive one-byte component blocks.
* The source also describes the reciprocal table as 256 x 10 bits; the default
  here is 64 x 8 bits (one byte read per access), and the parameters allow
  the larger form.
* Table contents (DCT basis, MPEG default intra matrix, scale 1024) are not
  given by the source.
* The `rnw` level-to-bank mapping, the absence of synchronisers and resets,
  the flip-flop storage of the banks, and one cycle of read latency
  everywhere.

Physical implementation (placement, power pads, clock-tree results) is out of
scope.

## Files

| File | Contents |
|------|----------|
| `rtl/video_mem_pkg.sv` | pixel types, quantizer matrix, table-building functions |
| `rtl/vm_bank.sv` | one 8x8 bank, row write with byte enables, column read |
| `rtl/dual_port_vm.sv` | two banks as a ping-pong buffer, `rnw` steering |
| `rtl/dual_addr_nvm.sv` | 8 x 64 two-address constant table |
| `rtl/single_addr_nvm.sv` | 64 x 8 reciprocal quantizer table |
| `rtl/video_mem_top.sv` | the three side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus a workload testbench |
| `tb/vm_stream_check.sv` | block-streaming checker used by the workload testbench |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops; it also has
a watchdog. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/video_mem_pkg.sv rtl/*.sv tb/tb_video_mem_top.sv \
        --top-module tb_video_mem_top -Mdir obj_top
    ./obj_top/Vtb_video_mem_top

Replace the testbench file and top-module name to run another one.

What the testbenches cover:

* `tb_vm_bank`: full-block writes, random partial writes through byte
  enables, writes with `we` low (ignored), every column compared with the
  transpose of a reference copy, read latency of one cycle, unrelated clocks.
* `tb_dual_port_vm`: four blocks through the ping-pong buffer with writes and
  reads overlapping, `rnw` toggled between blocks, idle and half-row writes;
  checks that the written bank never disturbs the read bank and that a block
  takes 8 write cycles.
* `tb_dual_addr_nvm`: all 64 address pairs against independently computed DCT
  coefficients; outputs are registered.
* `tb_single_addr_nvm`: all 64 entries in random order against the testbench's
  own division.
* `tb_video_mem_top` (default sizes, no parameter overrides): six blocks
  streamed through the buffer while the testbench, acting as the transform
  stage, reads columns, two DCT rows and the matching reciprocal per cycle,
  forms the column DCT and quantized values and compares them with a
  reference. It counts bank swaps, reads overlapping writes, partial writes,
  idle bus cycles, dual reads with distinct addresses and quantizer reads,
  and fails if any of these never happened. It finishes in well under a
  second.
* `tb_vm_workloads`: three block workloads through the double buffer, each in
  its own instance (helper `tb/vm_stream_check.sv`): monochrome 8x8 blocks,
  one colour 8x8 block sent as its three component planes, and 256-pixel
  16x16 blocks (`ADDR_W = 4`, 128-bit bus).

## Changing the design

* Block size: `ADDR_W` of `dual_port_vm`/`vm_bank` sets an N x N block with
  N = 2^ADDR_W; `PIX_W` sets the pixel width. The bus is N*PIX_W bits wide.
* Tables: override `INIT` with any array of the declared shape. The default
  `INIT` functions build 8 and 64 entries; change them together with
  `ADDR_W`.
* `video_mem_top` fixes the default sizes in its port widths.
