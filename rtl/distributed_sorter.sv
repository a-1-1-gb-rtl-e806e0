// distributed_sorter: second sorter stage, interleave-and-group block (IGB)
// followed by K local sorters.
//
// Input: N_m (2 or 3) sets of K first-stage winners, each set sorted
// ascending, and the sets themselves in rising order of their mean PED because
// the zigzag enumeration issues the nearer children first. The IGB forms K
// groups of N_m so that small PEDs of an early set meet large PEDs of a later
// one: group g takes set0[g], set1[K-1-g] and (64-QAM) set2[g]. Each local
// sorter keeps the best node of its group, giving K survivors. This is the
// distributed sorter of the source made robust by the interleaving; it is still
// an approximate K-best selection. The exact interleave pattern is this
// design's reading of "smaller (larger) PEDs in the former sets are grouped
// with larger (smaller) PEDs in the later sets".
//
// Interface: sets, mod (16-QAM: two sets, 64-QAM: three); out_nodes[g] is the
// survivor of group g (not sorted across groups). Combinational.
module distributed_sorter
  import mimo_pkg::*;
#(
  parameter int K = KBEST
) (
  input  node_t [2:0][K-1:0] sets,
  input  mod_e               mod,
  output node_t [K-1:0]      out_nodes
);
  node_t [K-1:0][2:0] groups;
  logic  [1:0]        n_act;

  always_comb begin
    n_act = (mod == MOD_64QAM) ? 2'd3 : 2'd2;
    for (int g = 0; g < K; g++) begin
      groups[g][0] = sets[0][g];
      groups[g][1] = sets[1][K-1-g];
      groups[g][2] = sets[2][g];
    end
  end

  for (genvar g = 0; g < K; g++) begin : g_ls
    local_sorter u_ls (.grp(groups[g]), .n_act(n_act), .best(out_nodes[g]));
  end
endmodule
