// eu: enumeration unit.
//
// Finds the constellation point nearest to the unconstrained estimate
// s~ = P / R_ii (eq. 6) and lists the points in zigzag (Schnorr-Euchner) order:
// nearest first, then alternately one step towards P's side of it and one step
// away, skipping points outside the active constellation. It issues two children
// per cycle, entries 2t and 2t+1 of that list in fold cycle t, and stops issuing
// once the early-pruning count L children have been issued.
//
// How: the division of eq. 6 is avoided by slicing. The decision thresholds
// between neighbouring points, R_ii*(even integer), are the mean of two
// neighbouring candidates of the shared R_ii candidate table, so the nearest
// index is the number of thresholds P lies at or above. R_ii is assumed positive
// (as a QR decomposition delivers it).
//
// Interface: p, cdiag (candidates of R_ii), mod, l (extension count), t (fold
// cycle, 0..N_m-1). Outputs the two symbols and their issue flags. Combinational.
module eu
  import mimo_pkg::*;
(
  input  pval_t       p,
  input  ctab_t       cdiag,
  input  mod_e        mod,
  input  lcnt_t       l,
  input  logic [1:0]  t,
  output sym_t        s_a,
  output sym_t        s_b,
  output logic        en_a,
  output logic        en_b
);
  always_comb begin
    int          lo, hi, near, n, cnt, off;
    logic        up;
    logic [2:0]  zz [NSYM];
    pval_t       thr;
    int          ia, ib;

    hi   = 3 + omega(mod) / 2;        // highest active index
    lo   = 4 - omega(mod) / 2;        // lowest active index
    near = lo;
    for (int c = 0; c < NSYM - 1; c++) begin
      thr = (pval_t'(cdiag[c]) + pval_t'(cdiag[c+1])) >>> 1;
      if (c >= lo && c < hi && p >= thr)
        near = c + 1;
    end
    up = (p >= pval_t'(cdiag[near[2:0]]));

    // zigzag list: offsets 0, +1, -1, +2, -2, ... (mirrored when P is below)
    for (int i = 0; i < NSYM; i++) zz[i] = 3'(near);
    cnt = 0;
    for (n = 0; n < 2 * NSYM; n++) begin
      if (n == 0)        off = 0;
      else if (n[0])     off = (n + 1) / 2;
      else               off = -(n / 2);
      if (!up) off = -off;
      if (near + off >= lo && near + off <= hi && cnt < NSYM) begin
        zz[cnt[2:0]] = 3'(near + off);
        cnt = cnt + 1;
      end
    end

    ia   = 2 * int'(t);
    ib   = 2 * int'(t) + 1;
    s_a  = csym(zz[ia[2:0]]);
    s_b  = csym(zz[ib[2:0]]);
    en_a = (ia < int'(l)) && (ia < cnt);
    en_b = (ib < int'(l)) && (ib < cnt);
  end
endmodule
