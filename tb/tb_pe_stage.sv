// tb_pe_stage: streams vectors back to back (one every N_m cycles) through PE
// stage H = 4 with random fathers, R row, receive values and extension counts,
// in all three modulations, and compares the K survivors with a reference
// layer model: P by multiplication, children by distance sort, per fold cycle
// a stable sort of the 2K children, then bypass (QPSK) or interleave-and-group.
// The candidate products are loaded once per frame with cand_load before the
// vectors. Checks the carried receive vector, the N_m + 2 cycle latency and the
// one-vector-per-N_m-cycles rate.
module tb_pe_stage;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K = KBEST;
  localparam int H = 4;
  logic clk = 0, rst_n = 0;
  mod_e mod = MOD_QPSK;
  data_t [NLAYER:1] rrow, in_y, out_y;
  lcnt_t [K-1:0] l;
  logic in_valid = 0, out_valid, cand_load = 0;
  node_t [K-1:0] in_nodes, out_nodes;
  int checks = 0, failures = 0, cycle = 0, n_out = 0, n_pruned = 0;

  node_t [K-1:0]    exp_q[$];
  data_t [NLAYER:1] exp_y[$];
  int               exp_c[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  pe_stage #(.H(H), .K(K)) dut (.*);

  always @(negedge clk) if (rst_n && out_valid) begin
    node_t [K-1:0] e;
    int ec;
    n_out++;
    checks += 3;
    e  = exp_q.pop_front();
    ec = exp_c.pop_front();
    if (out_nodes != e) begin
      failures++;
      $display("FAIL nodes at %0d", cycle);
      for (int k = 0; k < K; k++) $display("  %0d: got %0d/%0d exp %0d/%0d", k, out_nodes[k].valid, out_nodes[k].ped, e[k].valid, e[k].ped);
    end
    if (out_y != exp_y.pop_front()) begin failures++; $display("FAIL y"); end
    if (cycle != ec) begin failures++; $display("FAIL latency %0d vs %0d", cycle, ec); end
  end

  // reference model of one layer
  function automatic node_t [K-1:0] ref_layer(int m, node_t [K-1:0] fa);
    node_t [2:0][K-1:0] sets;
    node_t [K-1:0] res;
    int   lst[K][8];
    int   n[K];
    longint pv[K], xd;
    xd = ref_x(longint'(rrow[H]), m);
    for (int k = 0; k < K; k++) begin
      int tmp[8], tn;
      pv[k] = longint'(in_y[H]);
      for (int j = H + 1; j <= NLAYER; j++) pv[k] -= ref_x(longint'(rrow[j]), m) * longint'(fa[k].path[j]);
      ref_zigzag(pv[k], xd, m, tmp, tn);
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
          c[2*k+b].path[H] = sym_t'(lst[k][idx]);
          c[2*k+b].valid = fa[k].valid && idx < int'(l[k]) && idx < n[k];
          e = longint'(fa[k].ped) + ref_inc(pv[k] - xd * lst[k][idx]);
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

  initial begin
    in_nodes = '0; in_y = '0; rrow = '0; l = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      mod = mod_e'(m);
      for (int j = 1; j <= NLAYER; j++) rrow[j] = data_t'(int'($urandom_range(0, 400)) - 200);
      rrow[H] = data_t'($urandom_range(150, 700));
      for (int k = 0; k < K; k++) begin
        l[k] = lcnt_t'($urandom_range(0, 2 * ref_fold(m)));
        if (int'(l[k]) < ref_omega(m)) n_pruned++;
      end
      @(negedge clk) cand_load = 1;
      @(negedge clk) cand_load = 0;
      for (int v = 0; v < 150; v++) begin
        @(negedge clk);
        in_valid = 1;
        for (int j = 1; j <= NLAYER; j++) in_y[j] = data_t'(int'($urandom_range(0, 1600)) - 800);
        for (int k = 0; k < K; k++) begin
          in_nodes[k].valid = ($urandom_range(0, 5) != 0);
          in_nodes[k].ped   = ped_t'($urandom_range(0, 300));
          for (int j = 1; j <= NLAYER; j++)
            in_nodes[k].path[j] = sym_t'(2 * int'($urandom_range(0, ref_omega(m) - 1)) - ref_omega(m) + 1);
        end
        exp_q.push_back(ref_layer(m, in_nodes));
        exp_y.push_back(in_y);
        exp_c.push_back(cycle + ref_fold(m) + 2);
        for (int g = 1; g < ref_fold(m); g++) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
      @(negedge clk);
      in_valid = 0;
      repeat (8) @(negedge clk);
    end
    checks++;
    if (n_out != 450 || n_pruned == 0) begin failures++; $display("FAIL outputs %0d pruned %0d", n_out, n_pruned); end
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
