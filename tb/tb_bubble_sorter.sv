// tb_bubble_sorter: feeds 2K random nodes (some absent, distinct PEDs) and
// checks that the K outputs are the K smallest in ascending order, each with
// its own path, against a stable insertion sort.
module tb_bubble_sorter;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K = KBEST;
  node_t [2*K-1:0] in_nodes;
  node_t [K-1:0]   out_nodes;
  int checks = 0, failures = 0;

  bubble_sorter #(.K(K)) dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      node_t ref_a[];
      ref_a = new[2*K];
      for (int i = 0; i < 2 * K; i++) begin
        in_nodes[i].valid = ($urandom_range(0, 5) != 0);
        in_nodes[i].ped   = ped_t'(i + 2 * K * $urandom_range(0, 200));
        in_nodes[i].path  = {$urandom, $urandom};
        ref_a[i] = in_nodes[i];
      end
      ref_sort(ref_a, 2 * K);
      #1;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (out_nodes[i] != ref_a[i]) begin
          failures++;
          $display("FAIL pos %0d got %0d/%0d exp %0d/%0d", i, out_nodes[i].valid, out_nodes[i].ped, ref_a[i].valid, ref_a[i].ped);
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
