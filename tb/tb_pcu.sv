// tb_pcu: checks the PED calculation unit of layer H = 5: over the fold cycles
// of a vector its two child outputs must be the father's L nearest children in
// zigzag order, each with PED T_father + floor((P - R_55*s)^2/2^12), where P is
// computed from random R row, path and y by plain multiplication.
module tb_pcu;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int H = 5;
  data_t y_h;
  node_t father;
  lcnt_t l;
  ctab_t [NLAYER:1] crow;
  ctab_t cdiag;
  mod_e  mod;
  logic [1:0] t;
  node_t child_a, child_b;
  int checks = 0, failures = 0;

  pcu #(.H(H)) dut (.*);

  initial begin
    for (int it = 0; it < 1500; it++) begin
      longint xr[NLAYER+1], xd, pv;
      int list[8], n, m;
      m   = it % 3;
      mod = mod_e'(m);
      y_h = data_t'(int'($urandom_range(0, 2000)) - 1000);
      father.valid = ($urandom_range(0, 9) != 0);
      father.ped   = ped_t'($urandom_range(0, 1000));
      for (int j = 1; j <= NLAYER; j++)
        father.path[j] = sym_t'(2 * int'($urandom_range(0, ref_omega(m) - 1)) - ref_omega(m) + 1);
      for (int j = 1; j <= NLAYER; j++) begin
        xr[j] = ref_x(longint'($urandom_range(0, 600)) - 300, m);
        for (int c = 0; c < 8; c++) crow[j][c] = cand_t'(xr[j] * (2 * c - 7));
      end
      xd = ref_x(longint'($urandom_range(100, 900)), m);
      for (int c = 0; c < 8; c++) cdiag[c] = cand_t'(xd * (2 * c - 7));
      l  = lcnt_t'($urandom_range(0, 8));
      pv = longint'(y_h);
      for (int j = H + 1; j <= NLAYER; j++) pv -= xr[j] * longint'(father.path[j]);
      ref_zigzag(pv, xd, m, list, n);
      for (int tt = 0; tt < ref_fold(m); tt++) begin
        t = 2'(tt);
        #1;
        for (int b = 0; b < 2; b++) begin
          node_t c;
          int idx;
          logic ev;
          longint ep;
          c   = b ? child_b : child_a;
          idx = 2 * tt + b;
          ev  = father.valid && idx < int'(l) && idx < n;
          checks++;
          if (c.valid != ev) begin failures++; $display("FAIL valid idx=%0d", idx); end
          if (ev) begin
            ep = longint'(father.ped) + ref_inc(pv - xd * list[idx]);
            if (ep > 4095) ep = 4095;
            checks += 3;
            if (int'(c.path[H]) != list[idx]) begin failures++; $display("FAIL sym idx=%0d got %0d exp %0d", idx, c.path[H], list[idx]); end
            if (longint'(c.ped) != ep) begin failures++; $display("FAIL ped got %0d exp %0d", c.ped, ep); end
            if (c.path[NLAYER:H+1] != father.path[NLAYER:H+1]) begin failures++; $display("FAIL path"); end
          end
        end
      end
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
