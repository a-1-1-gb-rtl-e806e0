// tb_workload_packet: one 1024-byte packet per operating point through the
// 4x4 detector at default size, over one random channel realisation with
// Gaussian-like noise: 64-QAM with beta = 0.5 (342 vectors) and 16-QAM with
// beta = 0.7 (512 vectors). Every result is compared bit-exactly (symbols, PED,
// found flag) with a reference model of the whole early-pruned K-Best search:
// L table by integer division, children by distance sort, per fold cycle a
// stable K-best sort, then bypass or interleave-and-group, then the minimum.
// It also reports the average number of extended nodes per vector and the
// symbol error rate against the transmitted symbols (for information).
module tb_workload_packet;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K = KBEST;

  logic clk = 0, rst_n = 0;
  logic cfg_load = 0, cfg_ready, idle;
  mod_e cfg_mod = MOD_QPSK;
  ant_e cfg_ant = ANT_4X4;
  beta_t cfg_beta = '0;
  data_t [NLAYER:1][NLAYER:1] cfg_r;
  logic y_valid = 0, y_ready;
  data_t [NLAYER:1] y;
  logic det_valid, det_found;
  sym_t [NLAYER:1] det_s;
  ped_t det_ped;

  int checks = 0, failures = 0;
  longint n_ext = 0, n_vec = 0, n_symerr = 0, n_sym = 0;

  node_t [K-1:0]   exp_n[$];
  sym_t [NLAYER:1] tx_s[$];
  lcnt_t lt[NLAYER+1][K];
  longint xr[NLAYER+1][NLAYER+1];

  always #5 clk = ~clk;

  mimo_detector dut (.*);

  always @(negedge clk) if (rst_n && det_valid) begin
    node_t [K-1:0] e;
    node_t b;
    sym_t [NLAYER:1] tx;
    e  = exp_n.pop_front();
    tx = tx_s.pop_front();
    b  = e[0];
    for (int k = 1; k < K; k++) if (node_key(e[k]) < node_key(b)) b = e[k];
    checks++;
    if (det_found != b.valid || (b.valid && (det_s != b.path || det_ped != b.ped))) begin
      failures++;
      $display("FAIL vector %0d: got %0d/%0d exp %0d/%0d", n_vec, det_found, det_ped, b.valid, b.ped);
    end
    for (int i = 1; i <= NLAYER; i++) begin
      n_sym++;
      if (det_s[i] != tx[i]) n_symerr++;
    end
    n_vec++;
  end

  // reference: one layer of the search for the vector yv
  function automatic node_t [K-1:0] ref_layer(int m, int h, node_t [K-1:0] fa, data_t [NLAYER:1] yv);
    node_t [2:0][K-1:0] sets;
    node_t [K-1:0] res;
    int   lst[K][8];
    int   n[K];
    longint pv[K];
    for (int k = 0; k < K; k++) begin
      int tmp[8], tn;
      pv[k] = longint'(yv[h]);
      for (int j = h + 1; j <= NLAYER; j++) pv[k] -= xr[h][j] * longint'(fa[k].path[j]);
      ref_zigzag(pv[k], xr[h][h], m, tmp, tn);
      lst[k] = tmp;
      n[k] = tn;
    end
    sets = '0;
    for (int tt = 0; tt < ref_fold(m); tt++) begin
      node_t c[];
      c = new[2*K];
      for (int k = 0; k < K; k++)
        for (int b = 0; b < 2; b++) begin
          int idx;
          longint e;
          idx = 2 * tt + b;
          c[2*k+b] = fa[k];
          c[2*k+b].path[h] = sym_t'(lst[k][idx]);
          c[2*k+b].valid = fa[k].valid && idx < int'(lt[h][k]) && idx < n[k];
          if (c[2*k+b].valid) n_ext++;
          e = longint'(fa[k].ped) + ref_inc(pv[k] - xr[h][h] * lst[k][idx]);
          c[2*k+b].ped = c[2*k+b].valid ? ped_t'((e > 4095) ? 4095 : e) : PED_MAX;
        end
      ref_sort(c, 2 * K);
      for (int k = 0; k < K; k++) sets[tt][k] = c[k];
    end
    if (m == 0) return sets[0];
    for (int g = 0; g < K; g++) begin
      res[g] = sets[0][g];
      if (node_key(sets[1][K-1-g]) < node_key(res[g])) res[g] = sets[1][K-1-g];
      if (m == 2 && node_key(sets[2][g]) < node_key(res[g])) res[g] = sets[2][g];
    end
    return res;
  endfunction

  // roughly Gaussian noise: sum of four uniforms, standard deviation about sd
  function automatic longint noise(int sd);
    longint a;
    a = 0;
    for (int i = 0; i < 4; i++) a += longint'($urandom_range(0, 2 * sd)) - sd;
    return a * 866 / 1000;
  endfunction

  task automatic packet(int m, int beta_v, int nvec, int sd);
    longint ext0;
    ext0 = n_ext;
    wait (idle);
    @(negedge clk);
    cfg_mod = mod_e'(m); cfg_ant = ANT_4X4; cfg_beta = beta_t'(beta_v);
    cfg_r = '0;
    for (int i = 1; i <= NLAYER; i++)
      for (int j = i; j <= NLAYER; j++)
        cfg_r[i][j] = (i == j) ? data_t'($urandom_range(128, 640))
                               : data_t'(int'($urandom_range(0, 400)) - 200);
    for (int i = 1; i <= NLAYER; i++)
      for (int j = 1; j <= NLAYER; j++) xr[i][j] = ref_x(longint'(cfg_r[i][j]), m);
    for (int i = 1; i <= NLAYER; i++)
      for (int k = 1; k <= K; k++) begin
        longint om, lim, e;
        om  = ref_omega(m);
        lim = (2 * ref_fold(m) < om) ? 2 * ref_fold(m) : om;
        e   = (longint'(beta_v) * (om * om - k)) / (om * longint'(cfg_r[i][i]));
        if (e < 0) e = 0;
        lt[i][k-1] = lcnt_t'((e > lim) ? lim : e);
      end
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    wait (cfg_ready);
    for (int v = 0; v < nvec; v++) begin
      sym_t [NLAYER:1] s;
      node_t [K-1:0] nodes;
      @(negedge clk);
      for (int j = 1; j <= NLAYER; j++) s[j] = sym_t'(2 * int'($urandom_range(0, ref_omega(m) - 1)) - ref_omega(m) + 1);
      for (int i = 1; i <= NLAYER; i++) begin
        longint acc;
        acc = noise(sd);
        for (int j = i; j <= NLAYER; j++) acc += xr[i][j] * longint'(s[j]);
        y[i] = data_t'(acc);
      end
      nodes = '0;
      for (int k = 0; k < K; k++) nodes[k].ped = PED_MAX;
      nodes[0].valid = 1'b1;
      nodes[0].ped = '0;
      for (int h = NLAYER; h >= 1; h--) nodes = ref_layer(m, h, nodes, y);
      exp_n.push_back(nodes);
      tx_s.push_back(s);
      y_valid = 1;
      while (!y_ready) @(negedge clk);
    end
    @(negedge clk);
    y_valid = 0;
    wait (idle);
    $display("%s beta=%0d/256: %0d vectors, %0.1f extended nodes per vector, symbol errors %0d of %0d",
             m == 2 ? "64-QAM" : "16-QAM", beta_v, nvec, real'(n_ext - ext0) / nvec, n_symerr, n_sym);
  endtask

  initial begin
    cfg_r = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    packet(2, 128, 342, 25);    // 8192 bits / 24 bits per vector
    n_symerr = 0; n_sym = 0;
    packet(1, 179, 512, 45);   // 8192 bits / 16 bits per vector
    checks++;
    if (exp_n.size() != 0 || n_vec != 854) begin failures++; $display("FAIL %0d results", n_vec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
