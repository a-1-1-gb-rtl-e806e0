// tb_eu: checks the enumeration unit's child order against a list of the active
// constellation points sorted by distance to P/R_ii, and its issue flags
// against min(L, Omega), for every fold cycle and all three modulations.
// P is odd and R_ii*1 even, so no two distances tie.
module tb_eu;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  pval_t p;
  ctab_t cdiag;
  mod_e  mod;
  lcnt_t l;
  logic [1:0] t;
  sym_t  s_a, s_b;
  logic  en_a, en_b;
  int checks = 0, failures = 0, n_edge = 0;

  eu dut (.*);

  initial begin
    for (int it = 0; it < 3000; it++) begin
      longint x, pv;
      int list[8], n, m;
      m   = it % 3;
      mod = mod_e'(m);
      x   = 2 * longint'($urandom_range(8, 400));
      for (int c = 0; c < 8; c++) cdiag[c] = cand_t'(x * (2 * c - 7));
      pv  = 2 * (longint'($urandom_range(0, 40000)) - 20000) + 1;
      if (it % 4 == 0) pv = 2 * (longint'($urandom_range(0, 20 * x)) - 10 * x) + 1;
      p   = pval_t'(pv);
      l   = lcnt_t'($urandom_range(0, 8));
      ref_zigzag(pv, x, m, list, n);
      if (list[0] == ref_omega(m) - 1 || list[0] == 1 - ref_omega(m)) n_edge++;
      for (int tt = 0; tt < ref_fold(m); tt++) begin
        t = 2'(tt);
        #1;
        checks += 2;
        if (en_a != (2 * tt < int'(l) && 2 * tt < n)) begin failures++; $display("FAIL en_a"); end
        if (en_b != (2 * tt + 1 < int'(l) && 2 * tt + 1 < n)) begin failures++; $display("FAIL en_b"); end
        if (en_a) begin
          checks++;
          if (int'(s_a) != list[2*tt]) begin
            failures++;
            $display("FAIL m=%0d p=%0d x=%0d t=%0d a got %0d exp %0d", m, pv, x, tt, s_a, list[2*tt]);
          end
        end
        if (en_b) begin
          checks++;
          if (int'(s_b) != list[2*tt+1]) begin
            failures++;
            $display("FAIL m=%0d p=%0d x=%0d t=%0d b got %0d exp %0d", m, pv, x, tt, s_b, list[2*tt+1]);
          end
        end
      end
    end
    checks++;
    if (n_edge == 0) begin failures++; $display("FAIL no boundary case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
