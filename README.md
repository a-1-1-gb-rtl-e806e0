# Configurable early-pruned K-Best MIMO detector

This is synthesizable SystemVerilog for a MIMO signal detector. It recovers the transmitted
symbols of a 2x2, 3x3 or 4x4 spatially multiplexed link carrying QPSK, 16-QAM or 64-QAM.
The detector searches the symbol tree breadth-first and keeps the K best partial paths per
layer (K-Best detection). Its main idea is early pruning. A sphere decoder uses one global
radius and only rejects a node after computing its distance. Here, each surviving father
node may extend only a fixed number of its nearest children, L(i,k). That number is worked
out once per channel from the channel gain of the layer and the father's rank. Nodes that
are unlikely to matter are therefore never computed at all, and the work per vector is
constant.

The hardware is a parallel multistage folded pipeline. There is one process-element (PE)
stage per tree layer, eight in all. Each stage has K parallel units, one per father node.
A stage is time-multiplexed N_m = 1, 2 or 3 times for QPSK, 16-QAM or 64-QAM. The pipeline
therefore accepts one vector every N_m clock cycles, and the throughput is

    f_clk * 2N * log2(Omega) / N_m      (Omega = points per real dimension: 2, 4, 8)

For 4x4 64-QAM that is 8 bits per clock, or 1.1 Gb/s at 137.5 MHz.

## The detection problem and its numbering

After real-valued decomposition and QR decomposition of the channel, the receiver holds
`y = R s + v`. Here R is an upper-triangular 2N x 2N matrix, and every entry of s is an odd
integer in {-7..7} times a normalisation factor: 1/sqrt(2) for QPSK, 1/sqrt(10) for 16-QAM
and 1/sqrt(42) for 64-QAM. QR decomposition is not part of this RTL, so R and y are inputs.
Layer i of the tree fixes symbol s_i. The search goes from the last row up:

    P_i+1 = y_i - sum_{j>i} R_ij s_j          (father-dependent, shared by its children)
    T_i   = T_i+1 + (P_i+1 - R_ii s_i)^2      (partial Euclidean distance, PED)

The hardware numbers its layers 1..8, like its stages PE1..PE8. A 2N x 2N problem occupies
the **lower-right corner** of the 8x8 `cfg_r` and rows 9-2N..8 of `y`. Its search runs
through PE8 down to PE(9-2N). The lower stages are closed, and the result is taken from
PE(9-2N). For example, a 2x2 link uses PE8..PE5. Symbols are carried as 4-bit odd integers,
and `det_s` returns them in the same numbering.

## Early pruning: the extension counts (`ccu`)

For father rank k (1 = best) at layer i:

    L(i,k) = floor( beta * (Omega - k/Omega) / R_ii ),   saturated to 0..Omega

A larger beta means more children, better error rate and more work. The published operating
points are beta = 0.7 for 16-QAM and beta = 0.5 for 64-QAM. Weak layers (small R_ii) and
good fathers (small k) get more children. L = 0 trims the branch. When k >= Omega^2 the
formula goes negative or zero (QPSK once K reaches 4, 16-QAM once K reaches 16), and L is
then 0.

The counts are a per-frame computation, so the constraint calculation unit is sequential. It
produces one (i,k) per clock and needs 8*K cycles per channel. It also avoids division: beta
and R_ii share their fraction bits, so L is the number of m in 1..Omega with
`m*Omega*R_ii <= beta*(Omega^2 - k)`, found with Omega parallel comparators.

This design adds one clamp. A stage can issue at most 2*N_m children per father, because it
has two child PEs and N_m passes. L is therefore also limited to 2*N_m. This only changes
64-QAM, where the limit is 6 instead of 8.

## Inside a PE stage (`pe_stage`, `pcu`, `cgu`, `fpe`, `eu`, `cpe`)

A stage registers its K fathers and the receive vector, then spends N_m fold cycles on them.
In fold cycle t, each PCU (PED calculation unit) issues children 2t and 2t+1 of its father:

- **CGU (candidate sharing).** No multipliers sit on the per-vector data path. For each coefficient
  R_ij of the stage's row, one candidate generation unit forms all eight products
  R_ij * {±1, ±3, ±5, ±7} * scale. It scales once and then uses shifts and adds:
  3X = X+2X, 5X = X+4X, 7X = 8X-X. The products are registered once per channel frame.
  All K father PEs share them. A separate CGU for R_ii is
  shared by all 2K child PEs.
- **FPE.** Each father PE picks R_ij*s_j from the tables with multiplexers and forms P.
- **EU.** The enumeration unit needs the point nearest to P/R_ii. It avoids the division
  with a slicer: the decision thresholds R_ii * (even integer) are the means of neighbouring
  candidates. It then lists the points in zigzag (Schnorr-Euchner) order: nearest first, then
  alternately the neighbour on P's side and the neighbour on the other side, skipping points
  outside the constellation. It stops issuing after L(i,k) children.
- **CPE.** The two child PEs each pick R_ii*s_i, subtract, square and add the father's PED.

Timing: a stage's output comes N_m + 2 cycles after its input. That is one cycle for the
input register, N_m fold cycles, and one cycle for the sorter's second stage and output
register. A new vector may enter in the last fold cycle of the previous one (an assertion
checks this). The end-to-end latency from acceptance to `det_valid` is 2N*(N_m+2)+1 cycles.

## Choosing the K survivors: the two-stage sorter (`two_stage_sorter`)

Each fold cycle, the stage produces 2K children. Over a vector it produces 2K*N_m children,
and the best K of them must go on. A full sort of up to 24 entries per stage is the largest
cost. The sorter splits the job as follows:

1. **Stage 1, `bubble_sorter`.** Each fold cycle, a 2K-input bubble sorter keeps only the K
   best children, in ascending order. It is an odd-even transposition network. These K are
   written as set t into the **`data_buffer`** (3 sets of K). The sets come out sorted
   inside, and the early sets hold the nearer children, so their PEDs tend to be smaller.
2. **Stage 2, `distributed_sorter`.** The interleave-and-group block forms K groups. Group g
   is `set0[g], set1[K-1-g], set2[g]`: small PEDs of an early set meet large PEDs of a later
   one. One local sorter per group keeps the group's best.
   - For two sets (16-QAM) this is exactly the merge step of a bitonic merger, so the result
     is the exact K best.
   - For three sets (64-QAM) it is an approximation. It is made robust by the interleaving,
     and its output is at least as good as set 0.
3. **Output mux.** For QPSK (N_m = 1) the single bubble-sorted set is already exact, so
   buffer set 0 bypasses stage 2.

Stage 2 works on the buffer in the cycle after its last write. In that same cycle, the next
vector's set 0 overwrites buffer set 0, which is safe because the read happens first. The K
survivors leave in group order, not sorted. At the end of the pipeline, a K-input minimum
finder picks the path with the smallest PED as the detection result.

## Number formats

| quantity | format |
|---|---|
| y, R | signed 16 bit, 8 fraction bits |
| R*s candidates | signed 20 bit, 8 fraction bits |
| P | signed 24 bit (no overflow possible) |
| PED | unsigned 12 bit, 4 fraction bits; saturates at 4095 |
| beta | unsigned 10 bit, 8 fraction bits |
| normalisation factor | round(4096/sqrt(E)) = 2896, 1295, 632 |

A PED increment is `floor((P - R_ii*s)^2 / 2^12)`. A node that does not exist carries
PED 4095 and valid = 0, and it sorts after every real node.

## Interface of `mimo_detector`

| port | meaning |
|---|---|
| `cfg_load` | One cycle, only while `idle`. Latches `cfg_mod` (`mod_e`), `cfg_ant` (`ant_e`), `cfg_beta` and `cfg_r`, then starts the CCU. `cfg_ready` rises 8*K+1 cycles later. |
| `y_valid`/`y_ready`/`y` | One receive vector per accepted cycle. `y_ready` allows one every N_m cycles. |
| `det_valid` | Pulses with `det_s` (symbols), `det_ped` and `det_found`. `det_found` is 0 when pruning removed every path. |
| `idle` | No vector in flight. |

The clock is `clk`. The reset `rst_n` is asynchronous and active low. The parameter `K`
(survivors per layer) defaults to 4. Other sizes are in `rtl/mimo_pkg.sv`.

## How far to trust it, and where it departs from the source

The following follow the published architecture:

- the eight folded PE stages and the CCU;
- the FPE/EU/2xCPE structure of the PCU;
- candidate sharing through CGUs;
- the 2K bubble sorter, the 3K buffer, interleave-and-group plus local sorters, and the QPSK
  bypass;
- the antenna modes by closing stages, and the folding factors 1/2/3.

The following are this design's own choices:

- **K = 4.** The published design does not state K.
- All word widths except the 12-bit PED.
- The L <= 2*N_m clamp.
- The exact interleave pattern and one survivor per local-sorter group.
- Division-free slicing in the EU and the CCU.
- The handshake, the latency and the reset.
- The final minimum finder.
- Storing each node's path next to its PED in the buffer.

Power saving is not modelled as clock gating. Idle logic simply sees absent nodes. This
covers closed stages, the enumeration stopping after L children, and CPEs that are done.
The CGU products depend only on the channel, so they are computed once per frame. That
happens in the cycle after `cfg_load`, when every stage registers its candidate tables. The
per-vector path only multiplexes these registers.

What was verified:

- Each block against independent reference arithmetic: products by multiplication, children
  by sorting points by distance, K-best by stable sorting.
- The full detector at default size in all nine configurations, with vectors that are
  noise-free or carry a little noise. This covers exact symbols, exact PED, cycle-exact
  latency and rate, the L table, and a fully trimmed frame.
- Two 1024-byte packets over a random 4x4 channel with real noise: 64-QAM at beta = 0.5 and
  16-QAM at beta = 0.7. They match a bit-exact software model of the whole search vector for
  vector, including the vectors where noise causes symbol errors.

What was not verified: error-rate curves, the average node counts of the published scheme
(they depend on K and on the channel statistics), timing closure, and area.

## Simulating

Each testbench in `tb/` is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. `tb/mimo_ref_pkg.sv` holds the shared reference arithmetic. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/mimo_pkg.sv tb/mimo_ref_pkg.sv \
        rtl/*.sv tb/tb_mimo_detector.sv --top-module tb_mimo_detector
    ./obj_dir/Vtb_mimo_detector

| testbench | what it exercises |
|---|---|
| `tb_mimo_detector` | Whole detector at default parameters, all modes (about a second). |
| `tb_pe_stage` | One stage against a reference layer model. |
| `tb_two_stage_sorter` | The sorter pipeline. |
| `tb_workload_packet` | One 1024-byte packet each for 4x4 64-QAM (beta 0.5) and 16-QAM (beta 0.7), compared bit-exactly with a model of the full search. It also prints the node count per vector and the symbol errors. |
| others | One block each. |

To change K, override the `K` parameter of `mimo_detector`, or `KBEST` in the package. To
support larger constellations, widen `NSYM` and the candidate tables.
