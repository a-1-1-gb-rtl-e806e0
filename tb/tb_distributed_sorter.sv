// tb_distributed_sorter: feeds sorted sets of random nodes. For 16-QAM (two
// sets) the K outputs must be exactly the K smallest of the 2K inputs; for
// 64-QAM (three sets) output g must be the best of set0[g], set1[K-1-g] and
// set2[g], and no output may be worse than the K-th best overall of set 0.
module tb_distributed_sorter;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K = KBEST;
  node_t [2:0][K-1:0] sets;
  mod_e mod;
  node_t [K-1:0] out_nodes;
  int checks = 0, failures = 0;

  distributed_sorter #(.K(K)) dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int ns;
      mod = (it % 2) ? MOD_64QAM : MOD_16QAM;
      ns  = (mod == MOD_64QAM) ? 3 : 2;
      for (int s = 0; s < 3; s++) begin
        node_t a[];
        a = new[K];
        for (int k = 0; k < K; k++) begin
          a[k].valid = ($urandom_range(0, 7) != 0);
          a[k].ped   = ped_t'(3 * K * $urandom_range(0, 100) + s * K + k);
          a[k].path  = {$urandom, $urandom};
        end
        ref_sort(a, K);
        for (int k = 0; k < K; k++) sets[s][k] = a[k];
      end
      #1;
      if (ns == 2) begin
        node_t u[], o[];
        u = new[2*K];
        o = new[K];
        for (int k = 0; k < K; k++) begin u[k] = sets[0][k]; u[K+k] = sets[1][k]; o[k] = out_nodes[k]; end
        ref_sort(u, 2 * K);
        ref_sort(o, K);
        for (int k = 0; k < K; k++) begin
          checks++;
          if (o[k] != u[k]) begin failures++; $display("FAIL 16QAM pos %0d", k); end
        end
      end else begin
        for (int g = 0; g < K; g++) begin
          node_t b;
          b = sets[0][g];
          if (node_key(sets[1][K-1-g]) < node_key(b)) b = sets[1][K-1-g];
          if (node_key(sets[2][g]) < node_key(b)) b = sets[2][g];
          checks += 2;
          if (out_nodes[g] != b) begin failures++; $display("FAIL 64QAM group %0d", g); end
          if (node_key(out_nodes[g]) > node_key(sets[0][K-1])) begin failures++; $display("FAIL bound"); end
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
