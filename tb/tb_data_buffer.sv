// tb_data_buffer: checks the reset contents (all absent), that a write lands in
// the addressed set only, that disabled writes change nothing and that a read in
// the cycle of a write still returns the old contents.
module tb_data_buffer;
  import mimo_pkg::*;

  localparam int K = KBEST;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_set;
  node_t [K-1:0] wr_nodes;
  node_t [2:0][K-1:0] rd_sets;
  node_t [2:0][K-1:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_buffer #(.K(K), .NSETS(3)) dut (.*);

  initial begin
    wr_set = 0;
    wr_nodes = '0;
    #12;
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < K; k++) begin
        checks++;
        if (rd_sets[s][k].valid || rd_sets[s][k].ped != PED_MAX) begin failures++; $display("FAIL reset"); end
        model[s][k] = rd_sets[s][k];
      end
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 3) != 0);
      wr_set = 2'($urandom_range(0, 2));
      for (int k = 0; k < K; k++) wr_nodes[k] = {$urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      checks++;
      if (wr_en) model[wr_set] = wr_nodes;
      if (rd_sets != model) begin failures++; $display("FAIL contents it=%0d", it); end
    end
    // read-before-write in the same cycle
    @(negedge clk);
    wr_en = 1; wr_set = 0; wr_nodes = ~model[0];
    checks++;
    if (rd_sets[0] != model[0]) begin failures++; $display("FAIL old data"); end
    @(posedge clk); #1;
    checks++;
    if (rd_sets[0] != ~model[0]) begin failures++; $display("FAIL new data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
