# RP-GCN: a multi-core RRAM processing-in-memory accelerator for graph convolutional networks

A GCN layer computes `H' = f(A · H · W)`. `A` is the normalized adjacency matrix of the graph. It is huge and almost all zeros. `H` is the dense vertex-feature matrix and `W` the layer's weights. A conventional processor spends most of the layer moving `H` around, fetching it through irregular neighbor lists.

This design keeps `H` *inside* RRAM crossbars. Each vertex's feature vector occupies one crossbar row. To aggregate a vertex, the adjacency weights towards its neighbors are applied as word-line voltages. Every bit line then delivers a weighted sum of one feature over all neighbors in a single analog step.

Two ideas make this work at graph scale:

* **Vertex clustering.** The host clusters the graph (for example with Graclus) so that most neighbors of a vertex sit in the same crossbar core. Many cores then aggregate different clusters at the same time, and each input vector activates a useful number of rows. The few edges that cross clusters make a vertex need several cores. Their partial results are merged in the network that connects the cores.
* **Ping-pong feature storage and a three-stage pipeline.** Every aggregation core has a *work space*, which serves the current layer, and an *update space*, which receives the next layer's features as soon as they are computed. Aggregation of iteration k+2, combination (the MLP) of iteration k+1 and feature write-back of iteration k run at the same time. The cost of rewriting RRAM is then spread over the layer instead of stalling at its end.

This repository is synthesizable SystemVerilog for the digital architecture. It also has a behavioural model of the crossbar with its DACs and ADCs, which reproduces the crossbar's arithmetic exactly.

## Block diagram

```
            host: instructions, buffer fill, row map, weights, LUT, initial features
              |
   +----------v----------+        +-------------------+
   |    control_block    |<------>|  neighbor_buffer  |  adjacency vectors (64 KB)
   |  queue + decoder +  |        +-------------------+
   |  AGG / COMB / UPD   |
   |      engines        |
   +--+-------------+----+
      | requests    ^ slot release
   +--v-------------+--------------------------------+
   | agg_core_array                                  |
   |  agg_core x8 (work + update crossbar copies)    |
   |    | partial results (all-to-all)               |
   |  fwd_unit x4 (merge parts of one vertex)        |
   +--+------------------------------------------^---+
      | complete aggregation results             | feature update broadcast
   +--v------------------------------------------+---+
   | inter_buffer: aggregation region | update region |--> host (OUT)
   +--+------------------------------------------^---+
      |                                          |
   +--v------------------------------------------+---+
   | comb_core_array: waiting queue -> mlp_core x4   |
   +-------------------------------------------------+
```

## Number representation

All stored data is 8-bit fixed point: features, normalized adjacency weights and MLP weights (which are signed). The RRAM cells and the DAC input slices hold only 2 bits. Arithmetic on 8-bit operands is therefore bit-sliced in both directions:

* An 8-bit feature occupies **four adjacent 2-bit cells**, least significant slice first. A crossbar of 128 × 128 cells holds 128 vertices × 32 features. Each aggregation core has two such crossbars per space, so `FEAT = 64` features per vertex.
* An 8-bit input is applied as **four 2-bit slices on four consecutive cycles**.
* Each cycle, a bit line carries `Σ_rows input_slice · cell`. The core recombines this as `Σ_s col[4f+s] << 2s` across cell slices, and accumulates `<< 2t` across input slices t. After four cycles the accumulator holds the exact 8 × 8-bit dot product.

Requantization between layers uses right shifts set by the `CFG` instruction. The aggregation result enters the MLP as `min(255, acc >> agg_shift)`. The MLP pre-activation is `clamp(y >>> out_shift, -128, 127)`. That value indexes a 256-entry table that implements the non-linearity: ReLU, sigmoid or whatever the host loads.

The ADC model is lossless at the default sizes. Lowering `ADC_BITS` makes it saturate at full scale, which is how limited ADC resolution shows up as accuracy loss.

## Aggregation cores (`agg_core`)

A request names a vertex and carries its 128 adjacency weights towards this core's rows. Two aggregation functions are supported, chosen per request:

| mode | how | cycles after accept |
|---|---|---|
| `AGG_SUM` | adjacency weights drive the word lines, 2 bits per cycle; shift-and-add | 4, then the result is presented |
| `AGG_MAX` | each row with a non-zero weight is read alone (one-hot word-line input, so the bit lines return that row); a comparator keeps the element-wise maximum | one per neighbor (one if there are none), then presented |

Mean aggregation is `AGG_SUM` with weights the host has normalized. The result (`part_t`: vertex, merge slot, part count, 64 × 32-bit sums) is held until the network accepts it.

**Row map and duplicated rows.** The host loads, per core, which vertex each row holds. A feature update is broadcast as `(vertex id, 64 features)`. Every row in every core that holds that vertex is rewritten in the update space. This lets the mapping step copy a remote neighbor's features into a core's idle rows, so that fewer vertices need several cores, and the copies stay consistent automatically.

**Work and update spaces.** The two copies are two complete crossbar sets. Aggregation drives only the work copy; updates write only the other copy. `SWAP` exchanges the two in every core. An assertion checks that a swap never lands while a core is busy.

## Vertices spread over several cores: merge slots and forwarding units

When a vertex's neighbors live in `n > 1` cores, the controller issues `n` requests and the `n` partial results must be combined. This is done by `fwd_unit`; there are four of them, working in parallel.

* A **merge slot** is allocated by the controller *before* the first part of the vertex is issued, and travels with every part. If no slot is free, the controller stalls (slot stall). This ordering is what keeps the network free of deadlock: every part in flight already owns a slot.
* Parts of a multi-core vertex are routed to unit `slot mod 4`, so they all meet in one unit. The unit stores the first part, adds or max-combines later parts, and on the last part forwards the merged vector and releases the slot.
* Single-core results (`nparts = 1`) go to unit `vid mod 4` and **bypass** the merge table.
* Each unit serves its 8 core inputs round-robin. The complete results of the four units are arbitrated round-robin into the intermediate buffer.

Vertex parts are issued back to back, so the number of multi-core vertices in flight stays small. The default is `N_SLOTS = 2`; raising it costs only table storage.

## Combination array (`comb_core_array`, `mlp_core`)

Aggregation results wait in an 8-entry queue and go to the lowest-numbered idle MLP core. Every core stores the whole layer's weights: weight-row and LUT writes are broadcast. An MLP core is a three-stage pipeline:

1. input requantization;
2. bit-serial MVM over 4 cycles on a pair of 64 × 256 crossbars, positive and negative weight magnitudes, subtracted after recombination;
3. table look-up into the output register.

Output valid rises 5 cycles after a vector is accepted. A core accepts a new vector every 4 cycles.

## Control and instruction set (`control_block`)

The host pushes 32-bit instructions `{op[31:28], count[27:12], base[11:0]}` into a 16-entry queue. The decoder issues them in order to three engines that run concurrently. An instruction whose engine is busy stalls the queue (decoder stall).

| op | code | meaning |
|---|---|---|
| `NOP` | 0 | nothing |
| `CFG` | 1 | `base[0]`: aggregation mode; `count[4:0]`: aggregation shift; `count[9:5]`: MLP output shift. Takes effect at once, so put it after `SYNC` |
| `AGG` | 2 | send neighbor-buffer entries `base … base+count-1` to their cores; done when every vertex's complete result reached the intermediate buffer |
| `COMB` | 3 | move `count` aggregation results into the combination array; done when `count` results came back |
| `UPD` | 4 | pop `count` combination results and broadcast them into the update space |
| `OUT` | 5 | pop `count` combination results to the host output port |
| `SWAP` | 6 | exchange work and update spaces (waits for aggregation and update to be idle) |
| `SYNC` | 7 | wait until all engines are idle |
| `HALT` | 8 | wait until idle, then raise `done` |

A neighbor-buffer entry (`nb_entry_t`) holds a vertex id, its target core, the number of cores holding the vertex's neighbors, and 128 adjacency weights. The entries of one vertex must be adjacent. The aggregation engine treats a change of vertex id as the start of a new vertex.

A layer split into four iterations, in pipelined form:

```
CFG   mode/shifts
AGG it0 ; AGG it1 ; COMB it0 ; AGG it2 ; COMB it1 ; UPD it0 ;
AGG it3 ; COMB it2 ; UPD it1 ; COMB it3 ; UPD it2 ; UPD it3 ;
SYNC ; SWAP
```

The engines synchronize only through the intermediate buffer: `COMB` consumes results as they arrive. This is what lets aggregation of iteration k+2, combination of k+1 and update of k overlap.

## Using it

Host sequence:

1. Write the row map of every core (`map_*`).
2. Fill the neighbor buffer (`nb_*`).
3. Load the MLP weights (`w_*`) and the LUT (`lut_*`).
4. Write the initial features through `feat_*`; they land in the update space.
5. Push `SWAP`, then the layers' programs, with `SWAP` between layers, `OUT` for the last layer, and `HALT` at the end.
6. Collect `(vertex, features)` on `out_*` (valid/ready).

The `ev_*` outputs pulse when a mechanism acts: decoder stall, slot stall, three engines active, merge, bypass, network contention, parallel MLP cores. They are there for monitoring and for tests.

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/gcn_pkg.sv tb/tb_rp_gcn_top.sv --top-module tb_rp_gcn_top
./obj_dir/Vtb_rp_gcn_top
```

## Parameters

Shared sizes live in `rtl/gcn_pkg.sv`:

| name | default | notes |
|---|---|---|
| `DATA_W` | 8 | fixed-point width of features, adjacency weights and weights |
| `CELL_BITS`, `DAC_BITS` | 2, 2 | RRAM cell and input-slice precision |
| `XB_ROWS × XB_COLS` | 128 × 128 | crossbar size (own choice) |
| `XB_PER_CORE` | 2 | gives `FEAT = 64` features per vertex |
| `N_AGG`, `N_FWD`, `N_MLP` | 8, 4, 4 | aggregation cores, forwarding units, MLP cores (own choice) |
| `N_SLOTS` | 2 | merge slots |
| `NB_DEPTH` | 512 | neighbor-buffer entries = 64 KB of adjacency weights |
| `VID_W` | 18 | holds 232,965 vertices (the largest graph considered) |

Module parameters give the FIFO depths: intermediate buffer 128 + 256 entries (about 50 KB), waiting queue 8, instruction queue 16.

## Files

| file | content |
|---|---|
| `rtl/gcn_pkg.sv` | constants, packet structs, opcodes |
| `rtl/rram_crossbar.sv` | behavioural crossbar + DAC + ADC model |
| `rtl/agg_core.sv`, `rtl/fwd_unit.sv`, `rtl/agg_core_array.sv` | aggregation side |
| `rtl/mlp_core.sv`, `rtl/comb_core_array.sv` | combination side |
| `rtl/neighbor_buffer.sv`, `rtl/inter_buffer.sv`, `rtl/sync_fifo.sv` | storage |
| `rtl/control_block.sv` | instruction queue, decoder, engines |
| `rtl/rp_gcn_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Verification

* `tb_rp_gcn_top` runs the whole design at its default size. It runs a two-layer GCN on a clustered 200-vertex graph (425 neighbor-buffer entries, vertices copied into idle rows of other cores):
  * Layer 1 uses sum aggregation. It is issued as one batch while the host holds back `COMB` until the merge slots run out.
  * Layer 2 uses max aggregation and runs as four pipelined iterations.

  Every output vector is compared with an integer reference model. The test also requires that the decoder stall, slot stall, three-engine overlap, merge, bypass, network contention, parallel MLP cores, both swaps and output back-pressure each happen at least once. It runs in about 4,000 cycles and a few seconds.
* The unit testbenches check:
  * the crossbar MVM and ADC saturation;
  * the core's sum and max results, latencies, ping-pong isolation and duplicate-row updates;
  * forwarding-unit merging, bypass and slot release;
  * array-level routing;
  * MLP arithmetic, including −128 weights, latency and throughput;
  * out-of-order completion in the combination array;
  * buffer ordering and full behaviour;
  * the controller's request order, slot allocation, counts, swap safety and halt.

## What is this design's own, and where it departs

The architecture follows the RP-GCN organization: clustered multi-core RRAM aggregation, merging forwarding units, a waiting queue with crossbar-plus-LUT MLP cores, neighbor and intermediate buffers, ping-pong work and update spaces, and an instruction-driven three-stage pipeline. The following are choices made here, not taken from that description:

* The instruction set and its encoding, the engine structure and the stall rules.
* Crossbar size, crossbars per core, core counts, queue depths, the 64-feature vector length and the merge-slot mechanism.
* The network topology: all-to-all from cores to forwarding units. The original speaks only of a network-on-chip.
* Max aggregation by sequential one-hot row reads. Signed weights as a positive/negative crossbar pair. Requantization by shifts.
* The neighbor-buffer entry format: one dense 128-weight vector per (vertex, core). It stores zeros for non-neighbors rather than a compressed sparse form.
* The row map with broadcast updates for duplicated rows.

Places where this RTL reads the description differently or does less:

* **Crossbars within a core.** The original merges "results from multiple crossbars" inside a core with comparators or adders, which suggests that a core's crossbars hold different vertices. Here a core's two crossbars hold different feature columns of the same 128 vertices, so their outputs are concatenated, not merged. Merging over rows happens one level up, in the forwarding units.
* **Adjacency delivery.** Adjacency vectors go from the controller to the cores over a direct request bus. They do not pass through the forwarding units. The forwarding units only merge results.
* **Precision.** Data is 8 bits. The two smaller benchmark graphs keep accuracy at 8 bits, but the three larger ones are reported to need 12. `DATA_W` is a package constant, but the bit-slice counts and requantization are written for 8 bits.
* **Intermediate buffer size.** About 50 KB, against a stated buffer size of 64 KB.

Known limits:

* **Capacity.** The default build holds 1,024 vertices of 64 features, while the benchmark graphs have 2,708 to 232,965 vertices and 128 to 3,703 input features. Running them needs a larger configuration (more cores or crossbars per core) or host-side tiling across several passes; neither is provided here.
* **Crossbar physics.** RRAM write latency and energy, device non-idealities and ADC/DAC timing are not modelled. Crossbar writes take one cycle.
* **Host-side algorithms.** Quantization, Graclus clustering, the PIM-aware mapping and edge dropping are host software. The hardware only consumes their results (row map, copies, neighbor-buffer contents).
* The combination step is a single linear layer plus table per GCN layer. Multi-layer MLPs per GCN layer would need several COMB passes.
