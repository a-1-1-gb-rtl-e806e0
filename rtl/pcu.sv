// pcu: PED calculation unit of one father node.
//
// One PCU handles the k-th surviving father of PE layer H: its FPE forms the
// interference-cancelled value P, its EU lists the children in zigzag order and
// issues two per cycle while the early-pruning count L lasts, and its two CPEs
// compute the PEDs of those two children. Over the N_m fold cycles of a vector
// (t = 0..N_m-1) it thus covers up to 2*N_m children. The candidate tables come
// from the stage's shared CGUs.
//
// Interface: y_h (receive value of layer H), father node, l, the candidate
// tables of row H (crow) and of R_HH (cdiag), mod and fold cycle t; child_a and
// child_b are the father's path extended by the issued symbol at layer H with
// its PED, or absent. Combinational.
module pcu
  import mimo_pkg::*;
#(
  parameter int H = 1
) (
  input  data_t                 y_h,
  input  node_t                 father,
  input  lcnt_t                 l,
  input  ctab_t [NLAYER:1]      crow,
  input  ctab_t                 cdiag,
  input  mod_e                  mod,
  input  logic [1:0]            t,
  output node_t                 child_a,
  output node_t                 child_b
);
  pval_t p;
  sym_t  s_a, s_b;
  logic  en_a, en_b;
  ped_t  t_a, t_b;
  logic  v_a, v_b;

  fpe #(.H(H)) u_fpe (.y(y_h), .path(father.path), .cand(crow), .p(p));

  eu u_eu (.p(p), .cdiag(cdiag), .mod(mod), .l(l), .t(t),
           .s_a(s_a), .s_b(s_b), .en_a(en_a), .en_b(en_b));

  cpe u_cpe_a (.p(p), .cdiag(cdiag), .s(s_a), .en(en_a), .t_in(father.ped),
               .v_in(father.valid), .t_out(t_a), .v_out(v_a));
  cpe u_cpe_b (.p(p), .cdiag(cdiag), .s(s_b), .en(en_b), .t_in(father.ped),
               .v_in(father.valid), .t_out(t_b), .v_out(v_b));

  always_comb begin
    child_a         = father;
    child_a.path[H] = s_a;
    child_a.ped     = t_a;
    child_a.valid   = v_a;
    child_b         = father;
    child_b.path[H] = s_b;
    child_b.ped     = t_b;
    child_b.valid   = v_b;
  end
endmodule
