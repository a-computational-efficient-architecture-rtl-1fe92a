# Sparse stereo-network accelerator with block-based chess mapping

Stereo-matching CNNs are two orders of magnitude heavier than classification
networks. Pruning their weights to 95 % sparsity removes most of the work, but
a sparse accelerator then loses its speed to memory conflicts. Such an
accelerator multiplies F non-zero weights with I non-zero activations per
cycle (a Cartesian product) and scatters the F x I products into accumulator
banks. When two products of the same cycle land in the same bank at different
addresses, the multipliers have to wait.

This RTL implements an accelerator built around three ideas:

* **Block-based chess mapping.** Output pixels are spread over the 32
  accumulator banks in 2-D 8 x 4 blocks rather than in a linear order. Each
  block is also split into four checkerboard groups. The products of one cycle
  then usually fall into different banks.
* **Stride-2 without waste.** A stride-2 convolution only pairs activations
  and weights of the same checkerboard group (group-to-group), so no product is
  computed that the down-sampling would throw away. A stride-2 deconvolution
  is split into four parity sub-kernels and computed as ordinary sparse
  products.
* **A conflict unit in front of every bank.** Products that target the same
  word are summed before they reach the bank. Clusters for different words
  wait in a small queue, so the bank's two-cycle read-and-store does not stall
  the multipliers.

The array has 64 processing elements (PEs) with 4 x 4 multipliers each, 1024
multipliers in total. Each PE works on its own output tile.

## Data representation

Nothing in the data path is dense. All records are defined in
`rtl/sparse_stereo_pkg.sv`:

| record | contents |
|---|---|
| `act_t` | valid, 16-bit signed value, tile-local `x`, `y` (6 bits each) |
| `act_vec_t` | 4 `act_t` of the **same checkerboard group** plus the 2-bit group tag; one group-buffer word, one multiplier-array input per cycle |
| `weight_t` | valid, 16-bit value, kernel position `kx`, `ky` (3 bits each), output channel `k` (4 bits) |
| `weight_row_t` | 4 `weight_t`; one weight-buffer word |
| `out_vec_t` | up to 4 compressed outputs (value, x, y, k) of one group plus the group tag |

Coordinates are local to the tile, and the input tile **includes its halo**.
The first output pixel of the tile is therefore `xo = 0` in every mode, and
padding at image borders is the loader's job: it simply stores no non-zeros
there.

The order of vectors in the group buffer is set by whoever writes it. For
stride-2 layers the four groups are kept apart. For unit-stride layers the two
diagonal groups are merged (groups 0+3 and 1+2), which keeps the output range
of one vector as compact as plain block mapping. The testbenches use this
order. The group tag of a unit-stride vector is not used by the hardware.

## Chess mapping of the output

`chess_map` places output pixel (x, y) of channel k as follows:

```
bank  = 16*x[2] + 4*y[1:0] + x[1:0]          (0..31, one bank per pixel of an 8x4 block)
addr  = k*BLOCKS + (y/4)*(TILE_W/8) + x/8     (BLOCKS = TILE_W/8 * TILE_H/4)
group = 2*y[0] + x[0]
```

Inside one 8 x 4 block the banks are laid out like this:

```
 0  1  2  3 | 16 17 18 19
 4  5  6  7 | 20 21 22 23
 8  9 10 11 | 24 25 26 27
12 13 14 15 | 28 29 30 31
```

Each checkerboard group therefore owns 8 of the 32 banks. The address order
(channel first, then block row, then block column) is this design's own
choice. With the default 16 x 16 tile and 16 channels per pass, each bank
holds 128 words.

## The three operation modes

`coord_compute` turns each weight/activation pair into an output pixel:

| mode | equation | pairing |
|---|---|---|
| `MODE_CONV1` unit-stride convolution | `xo = x - kx`, `yo = y - ky` | every weight with every activation |
| `MODE_CONV2` stride-2 convolution | `xo = (x - kx)/2`, valid only if `x - kx` and `y - ky` are even | weight row = activation group (group-to-group) |
| `MODE_DECONV` stride-2 deconvolution | `xo = 2x + kx - dc_off` | every weight with every activation; the parity of `kx - dc_off` picks the output group (the sub-kernel) |

A product is dropped if the pixel falls outside the `TILE_W x TILE_H` tile, if
`k >= KC`, or if either record is invalid.

The weight registers (`weight_regs`) hold four rows of four weights. In
stride-2 mode, row g holds only weights whose kernel parity `(ky[0], kx[0])`
equals group g. The row is then picked by each activation vector's group, so
one pass over the inputs uses all 16 weights. In the other two modes the
controller makes one pass over the input range for each row that holds at
least one valid weight, and each vector carries its row number through the
input FIFO. For deconvolution the loader should fill each row with weights of
different sub-kernels. Each row's four products then land in four different
output groups, which spreads them over the banks. The testbench's weight
packer does this, but the hardware computes correctly with any order.

## Conflict handling (bank_slice)

This is the part that decides throughput. Each of the 32 banks has a
`bank_slice` made of three stages:

1. **`conflict_detect`.** It holds the products for this bank from one array
   cycle, up to all 16 of them. Each cycle it does the following:
   * It finds the first pending lane (first-valid-index detector).
   * It marks every pending lane with the same address (identical-address
     detector).
   * It adds those lanes and emits the sum as one *cluster*. The marked lanes
     are then cleared.

   `ready` means "my pending set is empty after this cycle". The PE moves a
   new product set into the banks only when **all 32** slices are ready. A
   bank that received k distinct addresses therefore holds the array for
   k - 1 cycles. This is the same-cycle conflict, counted in `perf_stall` and
   `perf_conflict`.
2. **`conflict_buffer`.** A 4-entry queue of clusters. A cluster whose address
   is already queued is added into that entry (counted in `perf_merge`). The
   exception is the head entry while it is leaving.
3. **`acc_bank`.** A single-port SRAM of 32-bit words. An update takes two
   cycles: the first reads the word and pops the cluster, the second writes
   back word + sum. A bank therefore absorbs at most one cluster every two
   cycles, and the queue covers the gap. This avoids the adjacent-cycle
   conflict of a bank with no buffer. Clear (one cycle) and drain (read, then
   write zero) use the same port and are issued only while the bank is idle.

Correctness does not depend on the order in which clusters reach a bank,
because addition is exact in two's complement. The sums wrap at 32 bits.

## One PE

```
group buffer -> input FIFO -> weight_regs row select -> 4x4 multiplier_array
   (outside      (4 words,      + coord_compute/chess_map
    the PE)       tagged with row)      |
                                  product stage register
                                        |
                                 product_crossbar (16 products -> 32 banks)
                                        |
                           32 x bank_slice (detect, queue, bank)
                                        |  drain: one 8x4 block per read
                               compress_relu -> compress buffer (8) -> out
```

`pe_controller` accepts commands (`pe_cmd_t`, valid/ready):

* **`OP_MAC`**: `w_row`, `in_base`, `in_len`, `mode`, `dc_off`. The controller
  loads weight-buffer rows `w_row .. w_row+3` into the weight registers (about
  6 cycles). It then streams group-buffer words `in_base .. in_base+in_len-1`
  once (stride 2) or once per non-empty row (other modes). It reads a word
  only when the input FIFO has room for it and for the read already in flight,
  so the array takes at most one vector per cycle. The command ends when the
  FIFO and the product stage are empty. The banks may still be emptying their
  queues, so the next command's weight load overlaps with that.
* **`OP_DRAIN`** (`relu`): waits until every bank is idle, then reads
  addresses 0 .. DEPTH-1. Each read takes the same address from all 32 banks,
  which is one 8 x 4 block of one channel, and zeroes it. `compress_relu`
  applies ReLU if `relu` is set and saturates to 16 bits (there is no
  rescaling). It then emits the non-zero pixels four at a time, group 0 first.
  The output is therefore already in the group-tagged format the next layer
  reads.

After reset the controller spends `DEPTH` cycles clearing the banks. During
that time `cmd_ready` is low.

A layer on one PE runs like this:

1. Write the weights (`wb_*`) and the tile's vectors into the group buffer.
2. For each input channel, issue one `OP_MAC` per weight set of 4 rows. The
   accumulators keep summing across commands.
3. Issue one `OP_DRAIN`.

## The array (stereo_accel_top)

`stereo_accel_top` instantiates `NUM_PE` PEs, each with its own group buffer.
All PEs get the same weights (`wb_*` is broadcast), and commands are broadcast
too. A command is accepted only when every PE is ready, so the PEs stay in
step. Because of this, each PE's vector list for a channel must be padded with
empty vectors to a common length, and a PE with a sparser tile idles at the
end of each command. `gb_pe` selects which PE's group buffer `gb_*` writes.
`out_arbiter` merges the compressed outputs round-robin and tags each word
with its PE in `out_pe`. `perf_*` are per-PE 32-bit counters:

* `perf_vec`: vectors multiplied
* `perf_stall`: cycles the product stage waited for the banks
* `perf_conflict`: cycles with a same-cycle conflict in some bank
* `perf_merge`: clusters merged in a queue

## Parameters

| parameter | default | where from |
|---|---|---|
| F_NUM x I_NUM | 4 x 4 | published dataflow ("4 groups of weights", "4 non-zero inputs in a cycle") |
| N_BANKS | 32 | published |
| block | 8 x 4, 4 groups | published |
| NUM_PE | 64 | 1024 multipliers / 16 per PE |
| TILE_W x TILE_H | 16 x 16 | own choice; tile size is left open |
| KC (output channels per pass) | 16 | own choice |
| bank depth | KC * BLOCKS = 128 words x 32 bit | follows from the above |
| weight buffer | 256 rows x 4 weights | own choice |
| group buffer | 512 vectors x 4 activations | own choice |
| input FIFO / conflict queue / compress buffer | 4 / 4 / 8 | own choice |
| data / accumulator width | 16 / 32 bit | own choice |

With these defaults each PE holds about 16 KiB of accumulators, 7 KiB of
group buffer and 4 KiB of weights. For 64 PEs that is about 1.8 MB, more
than the roughly 1.16 MB the original chip reports. The split between the
buffers is not known, so treat these sizes as placeholders.

## Where this RTL departs from, or goes beyond, the published design

* The published description names the blocks and gives their function. The
  following are all this design's own: the command interface, the FIFO and
  buffer depths, the widths, the halo-inclusive coordinates, `dc_off`, the
  merge inside the conflict queue, saturation in place of requantisation, the
  PE-to-tile assignment and the output arbiter.
* The conflict detector is built with 16 lanes, the full F x I product set. A
  drawing of it shows four lanes.
* The DRAM side is a set of plain write ports and one output stream. Bandwidth
  is treated as ideal.
* The 3-D cost-volume layers of a PSMNet-style network are not addressed. The
  PE computes 2-D convolutions, so such layers would have to be fed as 2-D
  slices.
* Frame rate (10.36 fps at 400 MHz for a pruned PSMNet on 960 x 540 inputs),
  accuracy and area are not reproduced. The testbenches check function and
  count events. They do not check performance against the published numbers.
* Throughput was not tuned. In the random tests (50 % dense activations, 25 %
  dense weights), stall cycles are of the same order as array cycles.

## Simulating

Every file starts with a comment on what the module does and on its timing.
Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl \
    rtl/sparse_stereo_pkg.sv tb/stereo_ref_pkg.sv tb/tb_pe.sv --top-module tb_pe
./obj_dir/Vtb_pe
```

Leaf testbenches do not need `tb/stereo_ref_pkg.sv`. The main tests are:

* **`tb_pe`** runs one PE through three layers: a 3x3 unit-stride
  convolution with ReLU, a 3x3 stride-2 convolution, and a 4x4 stride-2
  deconvolution with ReLU. Each layer has 2 input channels and 16 output
  channels. Every output pixel is compared with a reference model in
  `stereo_ref_pkg`. The model works in gather form
  (`out[yo][xo] = sum in[s*yo+ky][s*xo+kx] * w`, and its deconvolution
  counterpart), so it does not share the scatter equations of the hardware.
  The test also checks that the array took the expected number of vectors, and
  that stalls, conflicts, merges, ReLU clamping and output back-pressure all
  occurred.
* **`tb_stereo_accel_top`** runs the same layers through the array with
  `NUM_PE = 4`. Each PE gets a different tile. The test also checks
  output-port arbitration.

The largest configuration simulated end to end is 4 PEs with every other
parameter at its default. The single-PE test also runs at full PE size. The
64-PE default top passes lint and elaboration, but building a Verilator model
of it takes far longer than running it, so it has not been simulated.
