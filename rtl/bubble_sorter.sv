// bubble_sorter: first sorter stage, 2K inputs, K sorted winners.
//
// Each fold cycle the 2K child-node PEs of a stage deliver 2K candidate nodes;
// this sorter keeps the K with the smallest PEDs, in ascending order, and drops
// the rest, so that the second stage only has to merge N_m short sorted lists.
// Absent nodes sort after every present one. It is a bubble sorter in its
// parallel form, an odd-even transposition network of 2K passes of
// compare-exchange cells; a cell swaps only on a strictly larger key, so equal
// PEDs keep their input order.
//
// Interface: in_nodes[0..2K-1], out_nodes[0..K-1] (out_nodes[0] the smallest).
// Combinational; the folding over N_m cycles happens in the enclosing sorter.
module bubble_sorter
  import mimo_pkg::*;
#(
  parameter int K = KBEST
) (
  input  node_t [2*K-1:0] in_nodes,
  output node_t [K-1:0]   out_nodes
);
  always_comb begin
    node_t v [2*K];
    node_t tmp;
    tmp = '0;
    for (int i = 0; i < 2 * K; i++) v[i] = in_nodes[i];
    for (int pass = 0; pass < 2 * K; pass++) begin
      for (int i = pass % 2; i + 1 < 2 * K; i += 2) begin
        if (nkey(v[i]) > nkey(v[i+1])) begin
          tmp    = v[i];
          v[i]   = v[i+1];
          v[i+1] = tmp;
        end
      end
    end
    for (int i = 0; i < K; i++) out_nodes[i] = v[i];
  end
endmodule
