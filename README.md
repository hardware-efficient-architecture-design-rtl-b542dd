# Zerotree coder with tree-depth scanning and power-of-two successive quantization

This is the zerotree-coding stage of a wavelet still-image coder (the AC
coefficient path of an MPEG-4 style scalable texture coder). Wavelet
coefficients come in one *wavelet tree* at a time. Each tree is quantized in
several successively finer SNR layers, and for every layer every coefficient
gets a zerotree symbol (ZTR, IZ, VAL, VZTR or ZTR_D) for a downstream
context-based arithmetic coder.

The architecture rests on three ideas:

* **Only one tree is on chip.** All the work for a tree, across all layers,
  happens in a small two-port memory that holds exactly that tree: 341
  coefficients for 5 decomposition levels. The tree is stored breadth-first,
  so parent and child addresses are simple arithmetic and the output order
  is a plain address sweep.
* **Flags instead of memory traffic.** Two pieces of information cross tree
  levels: "some descendant is significant", passed up, and "you are below a
  zerotree", passed down. Both travel through one flag bit per node, held in
  registers and not in the SRAM. Without this, marking the descendants of a
  zerotree would need either a third pass over the memory or several memory
  accesses in one cycle.
* **Power-of-two quantizer steps.** Each SNR layer quantizes what the
  previous layer left over. The step is 2^shift, so the division becomes a
  shift, and the quantize, reconstruct and subtract loop is a few gates.

With the default parameters the design codes a whole 704x576 (4CIF) frame
with 5 decomposition levels and 3 SNR layers in 2,851,203 clock cycles. That
is 35 frames/s at 100 MHz, so the 30 frames/s target is met.

## The wavelet tree and how it is stored

After L levels of 2-D wavelet decomposition, the DC band is the top-left
(H/2^L) x (W/2^L) block of the coefficient map. Every DC position (r, c) has
three trees. Their roots are in the coarsest HL, LH and HH bands, at
(r, c + W/2^L), (r + H/2^L, c) and (r + H/2^L, c + W/2^L). A node at
(y, x) has four children, at (2y, 2x), (2y, 2x+1), (2y+1, 2x) and
(2y+1, 2x+1) in the next finer band of the same orientation. A tree
therefore has 1 + 4 + 16 + ... = (4^L - 1)/3 nodes.

In the tree memory the nodes are stored level by level, and the four
children of a node sit side by side:

| index | contents |
|---|---|
| 0 | root (tree level 0) |
| 1..4 | its four children (level 1) |
| 5..20 | level 2: 5..8 are the children of node 1, 9..12 those of node 2, ... |
| (4^l-1)/3 ... | first index of level l |

The children of node i are 4i+1 .. 4i+4, and the parent of node i is
(i-1)/4. For the fourth child 4p+4 this equals i/4 - 1. The scan orders then
come for free:

* Increasing addresses (0 .. N-1) visit every parent before its children.
  This is the top-down *tree-depth* order in which symbols are output.
* Decreasing addresses visit every node after all of its descendants. This
  is the bottom-up order the symbol decisions need.

The frame-level read order is the same: the trees follow each other in the
raster order of their DC position, each as HL, LH, HH, and inside a tree the
nodes come level by level. On a 16x16 map with 3 levels this gives DC
positions 0..3, then the first tree is 4..24 (root at row 0, column 2), the
second is 25..45 (root at row 2, column 0), and so on. `tds_scan_addr`
produces this order. Let p be a node's position within its level. The base-4
digits of p are the child choices along the path from the root. Taking the
odd bits of p gives the row offset and the even bits give the column offset:
row = root_row·2^l + odd_bits(p), col = root_col·2^l + even_bits(p).

## Two passes per SNR layer

For each layer the tree is swept twice through the single tree memory.

**Symbol assignment (SA), bottom-up.** Each node's residual is read,
quantized with the layer's step, and its symbol is decided:

| quantized value | some descendant significant | symbol |
|---|---|---|
| ≠ 0 | no | VZTR (value, zerotree below) |
| ≠ 0 | yes | VAL |
| = 0 | yes | IZ (isolated zero) |
| = 0 | no | ZTR (zerotree root) |

The new residual, the quantized value and the symbol are written back to the
same address in the same cycle. The memory has one read port and one write
port, so the node read in the next cycle does not conflict. A leaf has no
children and is therefore VZTR or ZTR.

**Symbol generation (SG), top-down.** Every node is read again in
increasing address order, which is the tree-depth scan order. Its stored
symbol is sent out, unless its flag marks it as lying below a ZTR or VZTR.
In that case ZTR_D is sent instead. Each output record also carries the
quantized value, the node's tree level (which selects the spatial layer),
the layer number and end-of-layer and end-of-tree marks.

A residual left by one layer is what the next layer quantizes, so layer k
sees `residual_k = residual_{k-1} - Q^{-1}(Q(residual_{k-1}))`.

## Symbol registration: one flag bit per node

This is the least obvious part of the design (`ztrd_flags` together with
`symbol_assign`). In the bottom-up pass each node's flag bit is used for two
things, one after the other:

1. **Before node k is processed** the flag means "some descendant of k is
   significant". Each child, when it is processed, sets its parent's flag if
   it is non-zero or its own flag was set. All children of k have higher
   addresses, so they are processed before k, and when k is reached its flag
   is complete. k reads the flag, uses it for its symbol, and clears it.
2. **After k's parent is processed** the flag means "k is a ZTR_D
   candidate". When the parent is decided to be ZTR or VZTR, it writes 1
   into all four of its children's flags in one cycle. Otherwise it writes
   0. This is possible because the flags are 341 flip-flops, not SRAM
   words. A child below a ZTR or VZTR is necessarily a ZTR itself, so it has
   already marked its own children. After the pass, every node anywhere
   below a zerotree root carries a 1.

In a single cycle the flag set is therefore updated in up to six places: the
node itself is cleared, its parent is set, and its four children are
written. These are always distinct indices. The SG pass only reads the
flags. All flags are cleared at the start of every SA pass.

Example (3 levels, shift 0): the root 33 has children −16, 20, −13, −11. The
children of −13 are all zero, so −13 is a VZTR and flags 13..16 are set. The
SG pass then outputs ZTR_D for those four zeros, while the zero at index 6,
under the VAL node −16, goes out as ZTR.

## Power-of-two quantization

`pot_quant` computes, in sign-magnitude form, q = sign(r)·(|r| >> shift),
the reconstruction q·2^shift, and the remainder r − q·2^shift. The remainder
has the sign of r and is smaller than the step. Quantization truncates
towards zero and reconstructs without an offset. Each layer's shift is a
4-bit input. Later layers are expected to use smaller shifts (finer steps),
but this is not enforced.

## Block structure

```
                 frame memory (external)
                  ▲ fm_req_* (addresses)   │ in_valid / in_coef (data)
 ┌────────────────┼────── zerotree_coder ──┼──────────────────────────┐
 │ tds_scan_addr ─┘                        ▼                          │
 │ zt_ctrl ── tree_addr (index, level, parent, first child)           │
 │    │ mode = memory port switch                                     │
 │ tree_mem (341 x 34 bit, 1 read + 1 write port)                     │
 │    │ read ──▶ symbol_assign (pot_quant) ──▶ write-back to tree_mem │
 │    │ read ──▶ symbol_gen ──▶ out_valid / out_data ─────────────────┼──▶ arithmetic coder
 │ ztrd_flags (341 bits): updated by symbol_assign, read by both      │
 └────────────────────────────────────────────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/zt_pkg.sv` | widths, symbol enums, memory word and output record types, controller modes |
| `rtl/tree_mem.sv` | two-port tree memory, synchronous read, one cycle latency |
| `rtl/ztrd_flags.sv` | flag register set for symbol registration |
| `rtl/tree_addr.sv` | bottom-up / top-down address sweep with level, parent and first-child locations |
| `rtl/pot_quant.sv` | power-of-two quantizer, inverse quantizer, residual |
| `rtl/symbol_assign.sv` | SA stage: quantize, decide symbol, write back, update flags |
| `rtl/symbol_gen.sv` | SG stage: ZTR_D override, two-entry output queue, valid/ready |
| `rtl/zt_ctrl.sv` | controller: load, then SA and SG per layer; memory port switch |
| `rtl/tds_scan_addr.sv` | frame-memory addresses in tree-depth order |
| `rtl/zerotree_coder.sv` | top level |

The memory word is {16-bit residual, 16-bit quantized value, 2-bit symbol}.
That is 341 × 34 bits ≈ 1.45 kB for a 5-level tree.

## Interface and timing

* **Configuration.** `cfg_levels` (1..5) gives the tree depth, which is the
  number of spatial layers. `cfg_layers` (1..5) gives the number of SNR
  layers, and `cfg_shift[k]` the step exponent of layer k. All three are
  sampled when a tree's first coefficient arrives. The scan generator
  samples `cfg_levels` at `fm_start`.
* **Frame-memory side.** After `fm_start`, `fm_req_valid/ready/addr` asks
  for the AC coefficients of the IMG_W x IMG_H map in tree-depth order
  (row·IMG_W + col). The DC band is skipped. The memory must return the
  words in request order on `in_valid/in_ready/in_coef`. It may add any
  latency and gaps, but it has to buffer requests: `in_ready` is high only
  while a tree is being loaded.
* **Symbol side.** `out_valid/out_ready/out_data` (type `sym_out_t`). Data
  holds while `out_valid` is high and `out_ready` is low. Back-pressure
  stalls the SG sweep without losing or repeating symbols.
* **Cycle count.** A tree of N nodes with L layers takes
  1 + N + L·(2N + 4) cycles when nothing stalls. That breaks down as one idle
  cycle, N load cycles, and for each layer an SA start cycle, N SA cycles,
  one drain cycle, an SG start cycle, N SG cycles and one drain cycle. For
  N = 341 and L = 3 this is 2400 cycles. A 4CIF frame has 1188 trees, for
  2.85 M cycles. With 5 SNR layers a tree takes 3772 cycles, and a 4CIF frame
  runs at about 22 frames/s at 100 MHz.
* **Utilisation.** With one tree memory the load, SA and SG passes take turns
  on it, so each stage works at most half of the time. Overlapping them
  would need extra tree memories.
* **Reset.** `rst_n` is asynchronous and active low. It clears the
  controller, pipelines, flags and output queue. The memory contents are not
  reset and need not be.

Parameters: `LEVELS` (5) and `SNR` (5) set the largest tree and layer
count. `IMG_W` and `IMG_H` (704, 576) set the frame size and must be
multiples of 2^levels. The widths in `zt_pkg` (16-bit coefficients, 4-bit
shifts) are shared by all modules.

## How far it goes, and where it departs from the original architecture

* **Scope.** Only the zerotree coding is built. The wavelet transform, the
  quantization and DPCM of the DC band, the arithmetic coder and the frame
  memory are outside. The ports stand in for them.
* **SNR layers.** Every layer assigns symbols from its own quantized
  residual. Coefficients that became significant in an earlier layer get no
  special treatment (no refinement symbols and no separate context state).
  A standard MPEG-4 bitstream coder would need that on top.
* **Spatial layers.** They are supported through the tree depth and the
  level tag on each output symbol. The original architecture also mentions a
  quantization order reversed for spatial scalability, with more tree
  memories. That is not built, because no mechanism for it is specified.
* **Memory accesses.** Per node and layer the design makes one SA read, one
  SA write-back to the same address, and one SG read. That is two accesses
  per node and layer if the read-modify-write counts as one. The published
  per-frame access count of the architecture (3.23 M) could not be
  reproduced: this design's count is 2.84 M with read-modify-write counted
  once, or 4.05 M with read and write counted separately.
* **Design choices.** These are this design's own: the leaf rule (a
  non-zero leaf is a VZTR), truncating quantization without a reconstruction
  offset, the one-cycle start and drain states between passes, the
  valid/ready handshakes, the word layout, and reusing one flag bit for both
  the significance and the ZTR_D information.
* **Not applicable to RTL.** Chip-level figures of the original prototype
  (0.35 µm process, area, power) do not apply here.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops on its own, and each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/zt_pkg.sv tb/zerotree_frame_tb.sv --top-module zerotree_frame_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run another one. Sources are found through
`-y rtl`.

| testbench | what it covers |
|---|---|
| `zerotree_frame_tb` | Three whole 704x576 frames at default parameters, through a behavioural frame memory: 5 levels / 3 layers without stalls (checks ≤ 100e6/30 cycles and 2400 cycles per tree), 4 levels / 2 layers with memory gaps and output back-pressure, and 5 levels / 5 layers (3772 cycles per tree, measured 22.3 frames/s). Every symbol is compared with a reference model. About 10 s. |
| `zerotree_coder_tb` | 16 single trees with varying depth (1..5), layers (1..5), shifts, input gaps and output stalls. Checks every symbol and the exact cycle count of unstalled trees. One tree is the 3-level example from the symbol-registration section, checked against hand-derived symbols. |
| `tree_mem_tb`, `ztrd_flags_tb`, `tree_addr_tb`, `pot_quant_tb`, `symbol_assign_tb`, `symbol_gen_tb`, `zt_ctrl_tb`, `tds_scan_addr_tb` | one per block. `tds_scan_addr_tb` also checks positions of the published 16x16 scan example and a full 4CIF scan. |

The reference models in the testbenches work from the definitions. A node
is a zerotree root when it and all its descendants are zero, and a ZTR_D
when some ancestor is a ZTR or VZTR. They compute this recursively and do
not use the flag method, so they check the hardware's shortcut instead of
repeating it.
