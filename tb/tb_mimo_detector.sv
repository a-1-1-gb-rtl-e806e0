// tb_mimo_detector: end-to-end test of the detector at its default size.
//
// For each of the nine antenna/modulation configurations it loads a random
// well-conditioned upper-triangular channel (positive diagonal) into the
// mode's corner of R, checks the extension-count table against
// floor(beta*(Omega-k/Omega)/R_ii), then streams random symbol vectors back to
// back with y = R*s (candidate-exact products) plus small noise and checks that
// every vector comes back detected correctly, in order, at the expected
// latency 2N*(N_m+2)+1 and at one vector per N_m cycles. A last frame uses a
// tiny beta so that every branch is trimmed, which must yield det_found = 0.
// It counts the mechanisms it exercised (mode switches, closed stages, QPSK
// sorter bypass, stage-2 merge, pruning, full trimming) and fails if one never
// happened.
module tb_mimo_detector;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K = KBEST;
  localparam int NVEC = 40;

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

  int checks = 0, failures = 0, cycle = 0;
  int n_mode_switch = 0, n_closed = 0, n_bypass = 0, n_merge = 0, n_pruned = 0, n_trim = 0;
  int cur_m = 0, cur_n = 4;

  sym_t [NLAYER:1] exp_s[$];
  int              exp_c[$];
  longint          exp_p[$];
  logic            exp_found[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mimo_detector dut (.*);

  always @(negedge clk) if (rst_n && det_valid) begin
    sym_t [NLAYER:1] es;
    int ec;
    logic ef;
    checks += 3;
    if (exp_s.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      es = exp_s.pop_front();
      ec = exp_c.pop_front();
      ef = exp_found.pop_front();
      if (ef && longint'(det_ped) != exp_p[0]) begin failures++; $display("FAIL ped %0d exp %0d", det_ped, exp_p[0]); end
      void'(exp_p.pop_front());
      if (det_found != ef) begin failures++; $display("FAIL found=%0d exp %0d", det_found, ef); end
      if (ef) begin
        for (int i = NLAYER - 2 * cur_n + 1; i <= NLAYER; i++)
          if (det_s[i] != es[i]) begin
            failures++;
            $display("FAIL m=%0d n=%0d layer %0d got %0d exp %0d", cur_m, cur_n, i, det_s[i], es[i]);
            break;
          end
      end
      if (cycle != ec) begin failures++; $display("FAIL latency %0d vs %0d", cycle, ec); end
    end
  end

  task automatic frame(int m, int a, int beta_v, int nvec, logic expect_found);
    int n, lo, gap, last_acc;
    longint ped;
    longint x[NLAYER+1][NLAYER+1];
    n  = a + 2;                     // antennas
    lo = NLAYER - 2 * n + 1;        // first active row
    wait (idle);
    @(negedge clk);
    if (m != cur_m || n != cur_n) n_mode_switch++;
    cur_m = m; cur_n = n;
    cfg_mod = mod_e'(m); cfg_ant = ant_e'(a); cfg_beta = beta_t'(beta_v);
    cfg_r = '0;
    for (int i = lo; i <= NLAYER; i++)
      for (int j = i; j <= NLAYER; j++)
        cfg_r[i][j] = (i == j) ? data_t'($urandom_range(300, 600))
                               : data_t'(int'($urandom_range(0, 160)) - 80);
    for (int i = 1; i <= NLAYER; i++)
      for (int j = 1; j <= NLAYER; j++) x[i][j] = ref_x(longint'(cfg_r[i][j]), m);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    wait (cfg_ready);
    // extension-count table
    for (int i = lo; i <= NLAYER; i++)
      for (int k = 1; k <= K; k++) begin
        longint om, lim, e;
        om  = ref_omega(m);
        lim = (2 * ref_fold(m) < om) ? 2 * ref_fold(m) : om;
        e   = (longint'(beta_v) * (om * om - k)) / (om * longint'(cfg_r[i][i]));
        if (e < 0) e = 0;
        if (e > lim) e = lim;
        checks++;
        if (longint'(dut.lmat[i][k-1]) != e) begin failures++; $display("FAIL L(%0d,%0d)", i, k); end
        if (e < om) n_pruned++;
      end
    if (lo > 1) n_closed++;
    if (m == 0) n_bypass += nvec; else n_merge += nvec;
    if (!expect_found) n_trim++;
    gap = 0; last_acc = -1;
    for (int v = 0; v < nvec; v++) begin
      sym_t [NLAYER:1] s;
      @(negedge clk);
      s = '0;
      for (int j = lo; j <= NLAYER; j++) s[j] = sym_t'(2 * int'($urandom_range(0, ref_omega(m) - 1)) - ref_omega(m) + 1);
      y = '0;
      ped = 0;
      for (int i = lo; i <= NLAYER; i++) begin
        longint acc, nz;
        nz  = longint'($urandom_range(0, 6)) - 3;         // noise, a few LSB
        acc = nz;
        for (int j = i; j <= NLAYER; j++) acc += x[i][j] * longint'(s[j]);
        y[i] = data_t'(acc);
        ped += ref_inc(nz);                               // PED of the true path
      end
      y_valid = 1;
      while (!y_ready) @(negedge clk);
      if (last_acc >= 0) begin
        checks++;
        if (cycle - last_acc != ref_fold(m)) begin failures++; $display("FAIL rate %0d", cycle - last_acc); end
      end
      last_acc = cycle;
      exp_s.push_back(s);
      exp_c.push_back(cycle + 2 * n * (ref_fold(m) + 2) + 1);
      exp_found.push_back(expect_found);
      exp_p.push_back(ped);
    end
    @(negedge clk);
    y_valid = 0;
    wait (idle);
  endtask

  initial begin
    cfg_r = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 2; a >= 0; a--)
      for (int m = 0; m < 3; m++)
        frame(m, a, (m == 2) ? 700 : 500, NVEC, 1'b1);
    frame(2, 2, 128, NVEC, 1'b1);       // beta = 0.5, the 64-QAM setting
    frame(1, 2, 179, NVEC, 1'b1);       // beta = 0.7, the 16-QAM setting
    frame(1, 2, 1, 4, 1'b0);            // beta tiny: every branch trimmed
    repeat (5) @(negedge clk);
    checks++;
    if (exp_s.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_s.size()); end
    $display("mode switches %0d, closed-stage frames %0d, QPSK bypass vectors %0d, stage-2 merge vectors %0d, pruned counts %0d, trimmed frames %0d",
             n_mode_switch, n_closed, n_bypass, n_merge, n_pruned, n_trim);
    checks++;
    if (n_mode_switch == 0 || n_closed == 0 || n_bypass == 0 || n_merge == 0 || n_pruned == 0 || n_trim == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
