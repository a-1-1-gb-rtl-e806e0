// fpe: father node process element.
//
// Computes the interference-cancelled receive value of one father node at PE
// layer H,
//   P = y_H - sum_{j=H+1..8} R_Hj * s_j,
// which every child of that father shares. As in the candidate-sharing PCU of
// the source, no multiplier is used: for each column j a multiplexer picks
// R_Hj*s_j from the candidate table that the stage's CGU for R_Hj produced, and
// an adder tree sums the picks. Columns below an antenna mode's corner are never
// above an active layer, so they need no masking.
//
// Interface: y (Q7.8), path (father's symbols; entries above H are used), cand
// (candidate table per column of row H; entries j<=H unused). Combinational.
module fpe
  import mimo_pkg::*;
#(
  parameter int H = 1
) (
  input  data_t                 y,
  input  sym_t  [NLAYER:1]      path,
  input  ctab_t [NLAYER:1]      cand,
  output pval_t                 p
);
  always_comb begin
    pval_t acc;
    acc = pval_t'(y);
    for (int j = H + 1; j <= NLAYER; j++)
      acc = acc - pval_t'(cand[j][cidx(path[j])]);
    p = acc;
  end
endmodule
