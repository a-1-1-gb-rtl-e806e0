// tb_fpe: checks P = y - sum_{j>H} R_Hj*s_j of the father PE for H = 3 and H = 8
// (no term) with random candidate tables, paths and receive values.
module tb_fpe;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  data_t y;
  sym_t  [NLAYER:1] path;
  ctab_t [NLAYER:1] cand;
  pval_t p3, p8;
  int checks = 0, failures = 0;

  fpe #(.H(3)) dut3 (.y(y), .path(path), .cand(cand), .p(p3));
  fpe #(.H(8)) dut8 (.y(y), .path(path), .cand(cand), .p(p8));

  initial begin
    for (int it = 0; it < 500; it++) begin
      longint e;
      y = data_t'($urandom);
      for (int j = 1; j <= NLAYER; j++) begin
        path[j] = sym_t'(2 * int'($urandom_range(0, 7)) - 7);
        for (int c = 0; c < 8; c++) cand[j][c] = cand_t'(int'($urandom_range(0, 1 << 20)) - (1 << 19));
      end
      #1;
      e = longint'(y);
      for (int j = 4; j <= NLAYER; j++) e -= longint'(cand[j][(int'(path[j]) + 7) / 2]);
      checks += 2;
      if (longint'(p3) != e) begin failures++; $display("FAIL H3 got %0d exp %0d", p3, e); end
      if (longint'(p8) != longint'(y)) begin failures++; $display("FAIL H8"); end
    end
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
