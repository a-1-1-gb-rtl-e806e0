// two_stage_sorter: K-best select unit (KSU) of a PE stage.
//
// Stage 1: in each of the N_m fold cycles of a vector, the 2K-input bubble
// sorter keeps the K best of the 2K children the CPEs just produced and writes
// them as set t into the data buffer. Stage 2: in the cycle after the last set
// was written, the distributed sorter (interleave-and-group plus local sorters)
// picks the final K survivors from the N_m sets. For QPSK (N_m = 1) the single
// bubble-sorted set is already exact, and the output multiplexer bypasses stage
// 2 by taking buffer set 0 directly; 16-QAM and 64-QAM differ only in the group
// size of the local sorters.
//
// Interface/timing: in_valid marks a fold cycle with 2K children in in_nodes,
// t its index and last the final fold cycle of the vector. out_nodes is loaded
// and out_valid pulses high for one cycle two clock edges after the last fold
// cycle (buffer write, then output register); out_nodes then holds until the
// next vector.
module two_stage_sorter
  import mimo_pkg::*;
#(
  parameter int K = KBEST
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mod_e             mod,
  input  logic             in_valid,
  input  logic [1:0]       t,
  input  logic             last,
  input  node_t [2*K-1:0]  in_nodes,
  output logic             out_valid,
  output node_t [K-1:0]    out_nodes
);
  node_t [K-1:0]      bs_out;
  node_t [2:0][K-1:0] buf_sets;
  node_t [K-1:0]      ds_out;
  logic               pending_q;

  bubble_sorter #(.K(K)) u_bs (.in_nodes(in_nodes), .out_nodes(bs_out));

  data_buffer #(.K(K), .NSETS(3)) u_buf (
    .clk(clk), .rst_n(rst_n), .wr_en(in_valid), .wr_set(t),
    .wr_nodes(bs_out), .rd_sets(buf_sets));

  distributed_sorter #(.K(K)) u_ds (.sets(buf_sets), .mod(mod), .out_nodes(ds_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= 1'b0;
      out_valid <= 1'b0;
      out_nodes <= '0;
    end else begin
      pending_q <= in_valid && last;
      out_valid <= pending_q;
      if (pending_q)
        out_nodes <= (mod == MOD_QPSK) ? buf_sets[0] : ds_out;
    end
  end
endmodule
