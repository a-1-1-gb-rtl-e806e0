// data_buffer: survivor buffer between the two sorter stages.
//
// Holds up to three sets (N_m = 3 for 64-QAM) of K first-stage winners, i.e.
// the 3K x 12-bit PED words of the source plus, in this design, each node's
// path and presence flag, which must travel with the PED. Set t is written in
// fold cycle t; the second stage reads all sets in the cycle after the last
// write, which is also when the next vector's set 0 is written, so one buffer
// suffices for back-to-back vectors (the read sees the old contents).
//
// Interface: wr_en, wr_set (0..2), wr_nodes; rd_sets is the whole buffer.
// Synchronous write, asynchronous active-low reset to all-absent nodes.
module data_buffer
  import mimo_pkg::*;
#(
  parameter int K     = KBEST,
  parameter int NSETS = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [1:0]                    wr_set,
  input  node_t [K-1:0]                 wr_nodes,
  output node_t [NSETS-1:0][K-1:0]      rd_sets
);
  node_t [NSETS-1:0][K-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++)
        for (int k = 0; k < K; k++) begin
          mem_q[s][k]       <= '0;
          mem_q[s][k].ped   <= PED_MAX;
        end
    end else if (wr_en && int'(wr_set) < NSETS) begin
      mem_q[wr_set] <= wr_nodes;
    end
  end

  assign rd_sets = mem_q;
endmodule
