// cpe: child node process element.
//
// Computes the PED of one child node, T_i = T_{i+1} + |P - R_ii*s_i|^2 (eq. 5
// of the K-Best recursion): a multiplexer picks R_ii*s_i from the shared
// candidate table of R_ii, then subtract, square and accumulate, as in the
// source's CPE. The square is scaled to the 12-bit PED format (4 fraction bits)
// and the sum saturates at all-ones. A child the enumeration unit did not issue,
// or whose father is absent, comes out absent with PED all-ones.
//
// Interface: p (from the FPE), cdiag (candidates of R_ii), s (child symbol),
// en (child issued), t_in/v_in (father PED and presence). Combinational; the
// stage folds it over N_m cycles to cover up to 2*N_m children per father.
module cpe
  import mimo_pkg::*;
(
  input  pval_t p,
  input  ctab_t cdiag,
  input  sym_t  s,
  input  logic  en,
  input  ped_t  t_in,
  input  logic  v_in,
  output ped_t  t_out,
  output logic  v_out
);
  logic signed [PVW:0]      diff;
  logic signed [2*PVW+1:0]  dx;
  logic [2*PVW+1:0]         sq;
  logic [2*PVW+1:0]         inc;
  logic [2*PVW+2:0]         sum;

  always_comb begin
    diff  = (PVW+1)'(p) - (PVW+1)'(cdiag[cidx(s)]);
    dx    = (2*PVW+2)'(diff);
    sq    = $unsigned(dx * dx);
    inc   = sq >> PED_SHIFT;
    sum   = (2*PVW+3)'(t_in) + (2*PVW+3)'(inc);
    v_out = en && v_in;
    if (!v_out)
      t_out = PED_MAX;
    else if (sum > (2*PVW+3)'(PED_MAX))
      t_out = PED_MAX;
    else
      t_out = ped_t'(sum);
  end
endmodule
