// tb_cpe: checks T_out = sat(T_in + floor((P - R_ii*s)^2 / 2^12)) of the child
// PE, including saturation and the absent cases (not issued, absent father).
module tb_cpe;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  pval_t p;
  ctab_t cdiag;
  sym_t  s;
  logic  en, v_in, v_out;
  ped_t  t_in, t_out;
  int checks = 0, failures = 0, n_sat = 0;

  cpe dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      longint x, e, d;
      int big;
      big  = (it % 10 == 0);
      x    = $urandom_range(20, big ? 4000 : 600);
      for (int c = 0; c < 8; c++) cdiag[c] = cand_t'(x * (2 * c - 7));
      s    = sym_t'(2 * int'($urandom_range(0, 7)) - 7);
      d    = longint'($urandom_range(0, big ? 60000 : 1200)) - (big ? 30000 : 600);
      p    = pval_t'(x * s + d);
      t_in = ped_t'($urandom_range(0, 4095));
      en   = ($urandom_range(0, 7) != 0);
      v_in = ($urandom_range(0, 7) != 0);
      #1;
      e = longint'(t_in) + ref_inc(d);
      if (e > 4095) begin e = 4095; n_sat++; end
      checks += 2;
      if (v_out != (en && v_in)) begin failures++; $display("FAIL valid"); end
      if (en && v_in) begin
        if (longint'(t_out) != e) begin failures++; $display("FAIL ped got %0d exp %0d", t_out, e); end
      end else if (t_out != PED_MAX) begin
        failures++; $display("FAIL absent ped %0d", t_out);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation seen"); end
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
