# Fuzzy CMAC: a cerebellar model articulation controller with fuzzy quantization

A CMAC (cerebellar model articulation controller) is a neural network that works like a look-up
table with generalization. Each input selects a few weights, one "winning neuron" in each of K
layers. The output is the sum of those weights. Training moves only those weights toward the
desired output. Inputs that lie close together share some of their winners, so what the network
learns at one point carries over to its neighbourhood. There are no multiplications in the
forward path and no global weight update, so the network is fast to train and easy to build in
hardware.

The price is memory. A table with R cells per input axis needs about R² weights for two inputs,
and R has to be fine enough for the hardest part of the input space. **Fuzzy quantization**
addresses this. The cells on each axis are not equal intervals: each is one cluster (fuzzy set)
found in the training data. Cells are narrow where training inputs crowd together and wide where
they are sparse, so a much smaller table gives the resolution where it matters. The original
work formed the clusters with a hardware-friendly variant of discrete incremental clustering.
That ran as a separate FPGA configuration before learning (the two phases shared one device by
reconfiguration) and passed its results on through board flash.

This repository contains the second phase: a synthesizable two-input fuzzy CMAC that learns and
recalls, with cluster tables that are loaded from outside. Its default size is the 28 × 27
cluster configuration that classified the two-spiral benchmark. All arithmetic is in 16-bit
integers and no block needs a multiplier.

## Data path

```
             clu_* (cluster boundaries)
                 |            |
in_xi --> [latch] --> fuzzy_quantizer (28) --q_i--+
in_xj --> [latch] --> fuzzy_quantizer (27) --q_j--+--> cmac_addr_gen --+
                                                         ^ k           |  clear sweep / rb_addr
                                                         |             v
                                fcmac_ctrl ---------------+------> weight_mem (1024 x 16)
                                   |  sum_clr/sum_en                   | rdata
                                   v                                   v
                            output_summer <----------------------------+--> rb_data
                                   | out_y                             |
                                   v                                   v
               out_class = (out_y >= 0.5)     weight_update(out_y, target, buffered w) --> wdata
```

One sample goes through four steps:

1. **Quantize.** Each input is compared with the NC-1 cluster boundaries of its axis, all in
   parallel. Its cluster index `q` is the number of boundaries at or below it (`fuzzy_quantizer`).
2. **Address.** The winner of layer `k` (k = 0 … K-1) is the cell at row `q_i + k` and column
   `q_j + k` (`cmac_addr_gen`). The K winners lie on a short diagonal of the table. Two inputs
   whose clusters differ by one on each axis share K-1 of their winners. This overlap is the
   source of generalization.
3. **Recall.** The K weights are read one per cycle and summed (`weight_mem`, `output_summer`).
4. **Learn (training samples only).** Each of the K weights is written back as
   `w + ((d - y) >>> LR_SHIFT)`, saturated to 16 bits (`weight_update`). `d` is the desired
   output and `y` the sum. This is the usual CMAC rule `w += β(d-y)/K`, with β/K = 1/8 turned
   into a shift.

### Why the table is (R + K - 1) cells per axis

With indices `q + k`, the largest cluster index R-1 in the top layer reaches R + K - 2. The
table is therefore given R' = R + K - 1 locations per axis instead of R. This avoids scaling the
input down to make room, and no index can overflow. For the default 28 × 27 clusters and K = 4
that is 31 × 30 = 930 weights. The address is the concatenation `{row, column}` with 5 bits
each, so the RAM has 1024 words and the 94 words past row 30 or column 29 are never used.
Concatenating instead of computing `row * 30 + column` keeps the addressing free of multipliers.

### How clusters are represented

Neighbouring fuzzy sets on one axis overlap little or not at all in their kernels. The
quantizer therefore keeps each cluster as the boundary to its upper neighbour. Boundary `b` is
the lowest input value that belongs to cluster `b + 1`, and the boundaries must be ascending.
Repeated boundaries give empty clusters, so a table built for NC clusters can also hold a
clustering with fewer of them. Setting the surplus boundaries to 0xFFFF leaves those clusters
holding only the input 0xFFFF.

Only the cluster index is used, not a membership degree. After reset the boundaries are evenly
spaced (`floor((b+1)·2^16/NC)`), so a network whose boundaries were never loaded is a
conventional, uniformly quantized CMAC of the same size.

### Number format

Inputs are unsigned 16-bit values. Weights, the desired output `in_target` and the output
`out_y` are signed fixed point with `FRAC` = 12 fraction bits: class 1 is trained toward 4096
(1.0) and class 0 toward 0. `out_y` is 18 bits wide (16 + log2 K), so the sum of four weights
cannot overflow. `out_class` is `out_y >= 2048` (0.5).

## Timing

The weight table is one single-port RAM with a one-cycle read latency, and the controller
(`fcmac_ctrl`) works through it serially:

| phase | cycles | what happens |
|---|---|---|
| CLEAR | 2^(AW_I+AW_J) = 1024, after reset | every weight written to 0; `busy` high, `in_ready` low |
| IDLE | ≥ 1 | `in_ready` high; a sample is taken when `in_valid && in_ready`; otherwise `rb_req` reads a weight |
| READ | K + 1 = 5 | K reads, each added to the sum one cycle later and kept in a K-entry buffer |
| DONE | 1 | `out_valid` high with `out_y`, `out_class` |
| UPDATE | K = 4, training only | the K buffered weights written back adjusted |

Counted from the clock edge that accepts a sample, `out_valid` is sampled high at edge K + 2 = 6.
The next sample can be accepted at edge K + 3 = 7 after a recall and at edge 2K + 3 = 11 after a
training step. Weights read back with `rb_req`/`rb_addr` in IDLE appear on `rb_data` with
`rb_valid` one cycle later. A sample offered in the same cycle takes priority.

Cluster boundaries can be written at any time through `clu_*`, but should be written only while
no sample is in flight.

## Top-level interface (`fcmac`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which also starts the clear sweep |
| `clu_we`, `clu_dim`, `clu_addr`, `clu_data` | in | 1, 1, 5, 16 | write boundary `clu_addr` of input i (`clu_dim`=0) or j (1) |
| `in_valid` / `in_ready` | in / out | 1 | sample handshake |
| `in_xi`, `in_xj` | in | 16 | the two inputs |
| `in_train` | in | 1 | 1: train on the sample; 0: recall only |
| `in_target` | in | 16 | desired output, signed, FRAC fraction bits |
| `out_valid`, `out_y`, `out_class` | out | 1, 18, 1 | result pulse, sum of the K weights, class decision |
| `rb_req`, `rb_addr` / `rb_valid`, `rb_data` | in / out | 1, 10 / 1, 16 | weight read-back, address `{row, column}` |
| `busy` | out | 1 | clear sweep running |
| `sat` | out | 1 | a weight written this cycle was clipped |

Parameters, all with defaults in `fcmac_pkg`:

| parameter | default | origin |
|---|---|---|
| `XW`, `WW` | 16, 16 | 16-bit integer arithmetic of the original implementation |
| `NC_I`, `NC_J` | 28, 27 | the 28 × 27 fuzzy configuration of the original benchmark |
| `K` | 4 | chosen here; the original leaves the number of layers open |
| `LR_SHIFT` | 3 | chosen here (learning rate β/K = 1/8) |
| `FRAC` | 12 | chosen here |

## What follows the original design and what is chosen here

These parts follow the original design:
- the CMAC structure (memory addressing unit, one weight table, output summer, weights
  adjusting unit);
- look-up-table addressing with the `q + k` winners and R + K - 1 cells per axis;
- quantization through per-axis clusters;
- the two-input, 28 × 27 configuration;
- 16-bit integers and multiplier-free arithmetic.

These parts are chosen here, because the original does not specify them:
- K = 4;
- the learning rule and its shift;
- the fixed-point scaling and the 0.5 decision threshold;
- crisp cluster indexing from stored boundaries;
- one single-port RAM read and written serially, with a K-entry weight buffer;
- the clear sweep, the reset values, the handshakes and the read-back port.

These parts are not included:
- **Cluster formation.** The clustering algorithm is only outlined in the original (a
  multiplier-free simplification of discrete incremental clustering, with look-up tables for
  its non-linear and membership functions). Its steps, tables and thresholds are not given, so
  the boundaries have to come from outside through `clu_*`.
- **Membership degrees.** The fuzzy sets' membership functions play no part in recall or
  learning here.
- **Several outputs.** A CMAC can have several outputs, one weight table each, sharing the
  addressing. The benchmark needs one, so one is built.
- **The board around the design:** the flash memory that held data, clusters and results, the
  host PC, and the reconfiguration of the FPGA between the two phases. Their connections
  appear as the top's ports.

## Verification

Each block has a self-checking testbench in `tb/` that compares against values it computes on
its own:

| testbench | checks |
|---|---|
| `fuzzy_quantizer_tb` | reset (uniform) boundaries; uneven boundaries loaded through the port, each probed at, below and above |
| `cmac_addr_gen_tb` | every cluster pair and layer, against arithmetic addressing, within R' |
| `weight_mem_tb` | full write and random read-back, one-cycle latency, write does not disturb the read register |
| `output_summer_tb` | random and extreme sums of K words, clear |
| `weight_update_tb` | rule against real-number floor arithmetic, saturation both ways |
| `fcmac_ctrl_tb` | clear sweep, read order, summed words, buffered weights, latencies K+2, K+3, 2K+3, read-back |
| `fcmac_tb` | whole design at its default parameters on the two-spiral problem (below) |
| `fcmac_table2_tb` | the same benchmark at six network sizes, through `spiral_harness` |

`fcmac_tb` generates the two intertwined spirals. Training set A has 97 points per spiral, 194
in all; test set B has 385 per spiral, 770 in all. Inputs are scaled from [-6.5, 6.5] to 16
bits. The testbench then:
- loads clusters;
- trains 40 epochs on A;
- recalls A and B;
- drives two neighbouring inputs toward opposite extremes until weights saturate;
- reads the whole table back.

Every output and every weight is compared with a model in the testbench. The testbench also
counts each mechanism: clear sweep, boundary load, training, recall, handshake stall,
saturation and read-back. It fails if one of them never happened.

The testbenches do not implement the original clustering. They stand in for it by cutting each
axis into intervals that each hold an equal share of the training inputs. With that stand-in
the classification rates are as follows (`fcmac_table2_tb`, K = 4, 40 epochs):

| network | set A (194) | set B (770) |
|---|---|---|
| fuzzy 11 × 13 | 85.6 % | 79.9 % |
| fuzzy 17 × 20 | 94.3 % | 78.4 % |
| fuzzy 28 × 27 | 99.0 % | 80.0 % |
| uniform 12 × 12 | 91.2 % | 90.5 % |
| uniform 20 × 20 | 100 % | 90.9 % |
| uniform 30 × 30 | 100 % | 84.3 % |

These numbers show that the hardware computes what its model computes. They do not reproduce
the original results (100 % on both sets for the fuzzy 28 × 27 network, better than uniform
networks of the same size). Equal-count intervals per axis are a poor substitute for the
original clustering. K and the learning rate are also chosen here, not taken from the original.
Expect different rates with a real clustering and with tuned K and LR_SHIFT.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fcmac_pkg.sv rtl/*.sv tb/fcmac_tb.sv \
          --top-module fcmac_tb -o sim
./obj_dir/sim
```

For a block testbench, give the package, the block's file (for `fcmac`, all of `rtl/`) and the
testbench. `fcmac_table2_tb` also needs `tb/spiral_harness.sv`. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog and runs in well under a second.

## Files

- `rtl/fcmac_pkg.sv`: default sizes and the controller state type
- `rtl/fcmac.sv`: top level
- `rtl/fcmac_ctrl.sv`: sequencer
- `rtl/fuzzy_quantizer.sv`: cluster indexing for one axis
- `rtl/cmac_addr_gen.sv`: winner addressing
- `rtl/weight_mem.sv`: weight RAM
- `rtl/output_summer.sv`: accumulator
- `rtl/weight_update.sv`: learning rule
- `tb/*_tb.sv`: testbenches
- `tb/spiral_harness.sv`: one benchmark configuration, used by `fcmac_table2_tb`

## Changing it

- **Network size:** `NC_I`, `NC_J` and `K` set the table size. The RAM and the address widths
  follow from them.
- **Learning rate:** `LR_SHIFT`.
- **Another clustering:** needs no change to the hardware. Load its boundaries through `clu_*`.
- **More than two inputs:** add one quantizer per input and one more `q + k` field in
  `cmac_addr_gen`. The RAM then grows with the product of the per-axis sizes.
