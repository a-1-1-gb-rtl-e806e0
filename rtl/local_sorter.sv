// local_sorter: one local sorter of the distributed sorter.
//
// Picks the node with the smallest PED out of a group of up to three. The
// number of active comparators follows the group size: one comparison for
// 16-QAM (two nodes per group), two for 64-QAM (three nodes per group); an
// inactive input is ignored. Absent nodes lose against present ones.
//
// Interface: grp[0..2], n_act (2 or 3), best. Combinational.
module local_sorter
  import mimo_pkg::*;
(
  input  node_t [2:0] grp,
  input  logic  [1:0] n_act,
  output node_t       best
);
  always_comb begin
    best = grp[0];
    if (nkey(grp[1]) < nkey(best)) best = grp[1];
    if (n_act == 2'd3 && nkey(grp[2]) < nkey(best)) best = grp[2];
  end
endmodule
