// tb_two_stage_sorter: streams vectors back to back through the K-best select
// unit in all three modulations (N_m fold cycles of 2K random children each)
// and checks the K survivors: QPSK must give the exact K best in order (stage 2
// bypassed); 16-QAM the exact K best as a set; 64-QAM the interleave-and-group
// result built from a reference sort of each fold cycle. It also checks that
// out_valid comes two cycles after the last fold cycle, and counts bypass and
// stage-2 uses.
module tb_two_stage_sorter;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K = KBEST;
  logic clk = 0, rst_n = 0;
  mod_e mod;
  logic in_valid = 0, last = 0, out_valid;
  logic [1:0] t = 0;
  node_t [2*K-1:0] in_nodes;
  node_t [K-1:0] out_nodes;
  int checks = 0, failures = 0, n_bypass = 0, n_ds = 0;
  int cycle = 0;
  int order[5] = '{0, 1, 0, 2, 0};   // QPSK also after stage 2 has held data

  node_t [K-1:0] exp_q[$];
  int    exp_cyc[$];
  int    exp_mode[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  two_stage_sorter #(.K(K)) dut (.*);

  always @(negedge clk) if (rst_n && out_valid) begin
    node_t [K-1:0] e;
    int m, ec;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front();
      ec = exp_cyc.pop_front();
      m = exp_mode.pop_front();
      if (cycle != ec) begin failures++; $display("FAIL timing %0d vs %0d", cycle, ec); end
      if (m == 1) begin
        node_t o[];
        o = new[K];
        for (int k = 0; k < K; k++) o[k] = out_nodes[k];
        ref_sort(o, K);
        for (int k = 0; k < K; k++) begin
          checks++;
          if (o[k] != e[k]) begin failures++; $display("FAIL m1 pos %0d", k); end
        end
      end else begin
        for (int k = 0; k < K; k++) begin
          checks++;
          if (out_nodes[k] != e[k]) begin failures++; $display("FAIL m%0d pos %0d got %0d exp %0d", m, k, out_nodes[k].ped, e[k].ped); end
        end
      end
      if (m == 0) n_bypass++; else n_ds++;
    end
  end

  task automatic vector(int m);
    node_t all[];
    node_t [2:0][K-1:0] setq;
    node_t [K-1:0] e;
    int nm;
    nm  = ref_fold(m);
    all = new[2*K*nm];
    for (int tt = 0; tt < nm; tt++) begin
      node_t c[];
      c = new[2*K];
      @(negedge clk);
      mod = mod_e'(m);
      in_valid = 1;
      t = 2'(tt);
      last = (tt == nm - 1);
      for (int i = 0; i < 2 * K; i++) begin
        in_nodes[i].valid = ($urandom_range(0, 6) != 0);
        in_nodes[i].ped   = ped_t'(2 * K * 3 * $urandom_range(0, 150) + 2 * K * tt + i);
        in_nodes[i].path  = {$urandom, $urandom};
        c[i] = in_nodes[i];
        all[2*K*tt+i] = in_nodes[i];
      end
      ref_sort(c, 2 * K);
      for (int k = 0; k < K; k++) setq[tt][k] = c[k];
    end
    if (m == 0) begin
      for (int k = 0; k < K; k++) e[k] = setq[0][k];
    end else if (m == 1) begin
      ref_sort(all, 2 * K * nm);
      for (int k = 0; k < K; k++) e[k] = all[k];
    end else begin
      for (int g = 0; g < K; g++) begin
        e[g] = setq[0][g];
        if (node_key(setq[1][K-1-g]) < node_key(e[g])) e[g] = setq[1][K-1-g];
        if (node_key(setq[2][g]) < node_key(e[g])) e[g] = setq[2][g];
      end
    end
    exp_q.push_back(e);
    exp_cyc.push_back(cycle + 2);
    exp_mode.push_back(m);
  endtask

  initial begin
    in_nodes = '0;
    mod = MOD_QPSK;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (order[o]) begin
      int m;
      m = order[o];
      for (int v = 0; v < 150; v++) vector(m);
      @(negedge clk);
      in_valid = 0;
      last = 0;
      repeat (4) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || n_bypass == 0 || n_ds == 0) begin
      failures++;
      $display("FAIL left=%0d bypass=%0d ds=%0d", exp_q.size(), n_bypass, n_ds);
    end
    $display("stage-2 bypass (QPSK) %0d times, stage 2 used %0d times", n_bypass, n_ds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
