# Soft-input soft-output tuple-search sphere detector with exact node enumeration

This is a MIMO detector for a 4x4 spatial-multiplexing link with 64-QAM.
For every received vector it produces 24 max-log LLRs, one per transmitted bit. It can take a-priori LLRs from a channel decoder, so it fits in an iterative detection/decoding receiver.

The search is a depth-first tree search of the tuple-search sphere detector (TSD) kind:
- The sphere radius is the worst of the T best leaf metrics found so far, with T = 8 by default.
- Soft outputs come from a per-bit list of the best metrics seen for bit = 0 and for bit = 1.

The core idea of this design is how the children of a tree node are visited. They are visited in **exactly** ascending order of their partial metric (Schnorr-Euchner order). This holds even when a-priori information bends the metric away from pure geometry, and it is done without computing and sorting all 64 metrics.

- With Gray mapping, a symbol's metric splits into a real part and an imaginary part. Each part covers the distance and the a-priori penalty of that dimension's 3 bits.
- So only 8 + 8 "quadrature components" are computed and sorted.
- The 64 metrics form a sum matrix `M[kI][kR] = cR[kR] + cI[kI]`, which grows to the right and downwards. Symbols are taken from it in order with a small sorted stack.

The loop is regularised: every iteration examines one node in 5 clock cycles. Five independent detections are interleaved in the 5 pipeline phases, so every unit is busy in every cycle.

## Files

| file | contents |
|---|---|
| `rtl/tsd_pkg.sv` | sizes, number formats, types (`det_in_t`, `la_vec_t`, `llr_vec_t`), Gray labelling |
| `rtl/fast_sorter.sv` | one-step N-input sorter: N² comparators, column counts, output multiplexers |
| `rtl/qmc_mcu.sv` | quadrature metric computation: 2x8 components of one layer, sorted (2 cycles) |
| `rtl/sse_neu.sv` | smart-sorting node enumeration, one state bank per (path, layer) |
| `rtl/iru.sv` | interference reduction and normalisation y''' (2 cycles) |
| `rtl/radius_unit.sv` | per-path sorted tuple of the T best leaf metrics; radius = last entry |
| `rtl/socu.sv` | counter-hypotheses at leaves, per-bit minimum tables, LLR output |
| `rtl/tsd_core.sv` | the 5-phase interleaved detection loop for 5 paths |
| `rtl/addr_gen.sv` | hands out vector addresses to free paths and counts finished ones |
| `rtl/vector_mem.sv` | 1-write/1-read synchronous memory (input, a-priori and output vectors) |
| `rtl/tsd_detector_top.sv` | memories + address generation + core, with a host port |
| `tb/tsd_ref_pkg.sv` | independent reference model and stimulus generators used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tsd_tuple_sweep` for tuple sizes 1 to 512 |

## Smart-sorting enumeration (`sse_neu`)

The hardest part to follow is how an ordered walk over an 8x8 sum matrix comes out of two sorted vectors.

- Because `cR` and `cI` are each sorted, every cell of the matrix is no smaller than the cell to its left and the cell above it. The first node is therefore always cell (0,0).
- After cell (a,b) is taken, only two cells can newly become the minimum: its right neighbour (a+1,b) and its lower neighbour (a,b+1). Each costs one adder.
- **Controlled expansion.** A neighbour enters the stack only if its other predecessor has already been examined:
  - for (a+1,b), that predecessor is the cell above it, (a+1,b-1);
  - for (a,b+1), it is the cell to its left, (a-1,b+1).
- Together these rules make every cell enter the stack exactly once.
- The examined cells always form a staircase. So the unit keeps only a count of examined cells per row, `cnt[row]`, and the test needs no metric comparison:
  - right neighbour allowed if `b == 0 || cnt[b-1] > a+1`;
  - lower neighbour allowed if `a == 0 || cnt[b+1] >= a`.
- The stack never holds more than one candidate per row, so 8 entries suffice.
- On each NEXT:
  - the head is removed;
  - the two candidates, or "infinite" where expansion is refused, join the other 7 entries;
  - an 8-input fast sorter reorders them, the same size as the component sorters. Nine items fit into 8 inputs because at most 8 of them are ever valid. When the last remaining entry is valid, at most one candidate is, and that candidate takes the last input. An assertion guards this bound.
- The new head is the next node. Its full metric adds λ_{i+1}, the metric of the upper layers.

**Equal metrics.** The stack is sorted on the key (metric, imaginary position, real position). Positions here mean positions in the sorted component lists. This key never ranks a cell before the cell above it or the cell to its left. So the enumeration always equals a full sort of the 64 symbols by that key, and the order of tied symbols does not depend on how the stack got there. This makes the node sequence reproducible by a plain software model.

Since the tree search returns to parent layers, each (path, layer) pair has its own copy of the enumeration state: a bank of sorted components plus the stack. That makes 20 banks, all sharing one datapath. When a layer is exhausted, `head_valid_o` drops.

## The detection loop and its 5-cycle interleaving (`tsd_core`)

A free-running counter `ph` runs from 0 to 4. Path `p` is in phase `(ph - p) mod 5`. In every cycle each phase serves a different path:

| phase | work |
|---|---|
| 0–1 | `qmc_mcu`: components of the layer being entered, from the IRU result |
| 2 | `sse_neu`: LOAD (first node of a new layer) or NEXT (next sibling) |
| 3 | radius test; at a leaf, tuple insert and soft-output update; layer decision; IRU issue for the next layer |
| 3–4 | `iru`: y''' = (y'_i − Σ_{j>i} r_ij x_j) / r_ii |
| 4 | a finished path writes its LLR vector and asks for the next vector |

Layer decision, with R the path's radius and λ the node's metric:

- λ > R, or the layer is exhausted: go up one layer and ask for the next sibling there. If this happens at the root, the detection ends.
- λ ≤ R above the leaves: descend.
- λ ≤ R at a leaf: update the tuple and the soft-output tables, then take the next leaf sibling.

Because enumeration is exact, the first sibling outside the sphere ends that layer.

Path life cycle: IDLE → FETCH (memory read issued) → INIT (tuple and tables cleared) → RUN → DONE (LLRs written, next vector requested in the same cycle). A single detection takes 5 cycles per examined node plus a small fixed overhead. In the test, 82 nodes took 417 cycles. With five paths in flight, a batch of 12 vectors with 1245 nodes in total took 1903 cycles.

Two assertions in the core check that the IRU and MCU results return, carrying their path tag, exactly in the phase of the path that uses them.

## Soft output (`socu`)

At each leaf the unit forms L + 1 = 7 candidates, each from two additions:

- The leaf itself.
- One counter-hypothesis per bit of the leaf symbol. The dimension that does not carry the bit is kept. In the dimension that carries it, the best sorted component whose Gray label has that bit flipped is taken.

The bits of the upper layers come from the path. For each of the 24 bits and both bit values, the unit keeps the smallest metric seen. LLR = min(bit = 0) − min(bit = 1), so a positive value means 1 is more likely. The result is saturated to ±32767; a bit value never seen stays at "infinite".

This leaf counter-hypothesis rule is this design's own. The document only says that leaf-specific sequences are used and does not list them.

## Number formats

| quantity | format |
|---|---|
| y', R, r_ii, 1/r_ii, y''' | 16-bit two's complement, 8 fraction bits |
| metrics | 24-bit unsigned, 8 fraction bits, saturating; all ones means infinite |
| a-priori L_a | 8-bit two's complement, 4 fraction bits, already scaled by N0/2 |
| LLR | 16-bit two's complement metric difference |

Constellation levels are 2k − 7 for k = 0..7 with Gray label k ^ (k >> 1). Bits 0..2 of a symbol are the real label, MSB first; bits 3..5 are the imaginary label. The a-priori penalty of a dimension is the sum of |L_a| over its bits that disagree with the sign of L_a.

## Memories and host interface (`tsd_detector_top`)

Three vector memories are used. Each holds 768 words, which is one 9216-bit information block at rate 1/2 with 24 bits per vector.

| memory | width | contents per word |
|---|---|---|
| input (VMEM) | 768 bits | `det_in_t`: y' = Qᴴy, R, r_ii and 1/r_ii |
| a-priori (VLAMEM) | 192 bits | 24 L_a values |
| output (VMEMO) | 384 bits | 24 LLRs |

The host uses the ports as follows:

1. Write vectors through the `vin_*` and `vla_*` ports.
2. Pulse `start_i` with `base_i` and `count_i`.
3. Wait for `done_o`.
4. Read LLRs at the same addresses through `vout_*`.

The activity counters `stat_nodes_o`, `stat_leaves_o`, `stat_prunes_o` and `stat_inserts_o` and the `active_o` count show what the search did.

The QR decomposition and the decoder are outside the design. The detector expects the upper-triangular R with a real positive diagonal, and 1/r_ii, in each input word.

## Where this design departs from or adds to the described architecture

- **One candidate per iteration.** The published loop prepares two things in every iteration, in parallel branches: the first child of the current node and the next sibling. This core makes the layer decision in phase 3 and prepares only the node it needs: the IRU, MCU and LOAD for a descent, or a NEXT for a sibling. It still examines one node per 5-cycle iteration, with a single IRU, MCU and NEU.
- **Sorter flag sense.** The sorter description defines the flag as "z_n greater than z_m" and uses the column count as the output position, which read literally gives descending order. Enumeration needs ascending order, so here the flag is "z_n smaller than z_m". Equal keys are ordered by input index.
- **Channel data placement.** The scalar memory and its cache are dropped, as intended for this enumeration scheme. R, r_ii and 1/r_ii are carried in each input vector word instead.
- **r_ii rather than r_ii².** The metric unit is drawn with r_ii² as its input. Here it receives r_ii and squares it once per layer, so each input word stores r_ii only once.
- **Normalisation by reciprocal.** y'' / r_ii is done as a multiplication by 1/r_ii, which is supplied with the data. This avoids a divider.
- **This design's own choices** (the source does not specify them):
  - the per-(path, layer) bank organisation;
  - the phase assignment inside the 5-cycle budget;
  - the request/grant handshake;
  - all word widths;
  - LLR saturation;
  - the leaf counter-hypothesis rule.
- **Tuple size.** T is a parameter of `tsd_detector_top` and `tsd_core` (default 8). The radius unit scales as P·T·24 flip-flops.
- **Left out:** radius and LLR clipping schemes beyond plain saturation, and the processor/instruction-set wrapper around the detector.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/tsd_pkg.sv tb/tsd_ref_pkg.sv tb/tb_tsd_detector_top.sv --top-module tb_tsd_detector_top
./obj_dir/Vtb_tsd_detector_top
```

Replace the testbench name to run any other test.

- `tb_tsd_detector_top` runs the whole detector at its default sizes, checking:
  - every LLR bit-exactly against the reference model;
  - node, leaf, prune and insert counts;
  - the 5-cycles-per-node timing;
  - five paths in flight;
  - that backtracking, pruning, leaves and tuple insertions all occur.
- `tb_tsd_tuple_sweep` builds eight detectors with T = 1, 2, 4, 16, 32, 64, 256 and 512 and runs them on the same vectors without a-priori values. It checks LLRs and node counts against the reference at each T. It also prints the cycles used: on its vectors the rate falls from about 1.6 bits per cycle at T = 1 to 0.005 at T = 512.
- `tb_tsd_core` drives the core alone with its own memories, and checks that a finished path takes new work in the same cycle.
- `tb_sse_neu` includes a hand-worked 4x4 example of the enumeration order.

The reference model in `tb/tsd_ref_pkg.sv` enumerates each layer by sorting all 64 symbols directly (by metric, ties by component rank), and finds counter-hypotheses by brute force over the leaf layer. It therefore checks the enumeration and soft-output logic independently of their implementation.
