// pe_stage: one process-element stage (PE layer H) of the multistage folded
// detector.
//
// A stage takes the K surviving father nodes of the layer above and produces
// the K survivors of its own layer. It holds K PCUs working on the K fathers in
// parallel, the candidate generation units shared by them (one per coefficient
// R_Hj, j > H, for the father PEs and one for R_HH for the child PEs) and a
// two-stage sorter as its K-best select unit. The PCUs are folded: in fold
// cycle t = 0..N_m-1 every PCU issues its children 2t and 2t+1, so a stage
// accepts one vector every N_m cycles (N_m = 1, 2, 3 for QPSK, 16-QAM, 64-QAM).
//
// Following the source, the products R*s are moved out of the per-vector path:
// the CGU outputs are registered when cand_load is pulsed (once per channel
// frame, with rrow and mod stable), and the PCUs only read these registers.
//
// Interface/timing: cand_load after a new rrow/mod; in_valid (one cycle) with
// in_nodes (fathers, k-th father in slot k-1), in_y (the vector's receive
// values, carried down the chain) and the stage's extension counts l. The inputs are registered, fold cycles
// follow, and out_valid pulses N_m + 2 cycles after in_valid with out_nodes and
// out_y, which then hold. in_valid may come again in the last fold cycle at the
// earliest, which an assertion checks.
module pe_stage
  import mimo_pkg::*;
#(
  parameter int H = 1,
  parameter int K = KBEST
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mod_e                  mod,
  input  data_t [NLAYER:1]      rrow,
  input  logic                  cand_load,
  input  lcnt_t [K-1:0]         l,
  input  logic                  in_valid,
  input  node_t [K-1:0]         in_nodes,
  input  data_t [NLAYER:1]      in_y,
  output logic                  out_valid,
  output node_t [K-1:0]         out_nodes,
  output data_t [NLAYER:1]      out_y
);
  node_t [K-1:0]      fa_q;
  data_t [NLAYER:1]   y_q, y_hold_q;
  logic               busy_q, pend_q;
  logic [1:0]         t_q;
  logic               last;
  ctab_t [NLAYER:1]   crow_d, crow;
  ctab_t              cdiag_d, cdiag;
  node_t [2*K-1:0]    children;
  logic               ksu_valid;

  assign last = busy_q && (int'(t_q) == fold(mod) - 1);

  // shared candidate generation units of row H; their products are
  // registered once per channel frame (cand_load) and reused for every vector
  for (genvar j = 1; j <= NLAYER; j++) begin : g_cgu
    if (j > H) begin : g_off
      cgu u_cgu (.r(rrow[j]), .mod(mod), .cand(crow_d[j]));
    end else begin : g_none
      assign crow_d[j] = '0;
    end
  end
  cgu u_cgu_diag (.r(rrow[H]), .mod(mod), .cand(cdiag_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crow  <= '0;
      cdiag <= '0;
    end else if (cand_load) begin
      crow  <= crow_d;
      cdiag <= cdiag_d;
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_pcu
    pcu #(.H(H)) u_pcu (
      .y_h(y_q[H]), .father(fa_q[k]), .l(l[k]), .crow(crow), .cdiag(cdiag),
      .mod(mod), .t(t_q), .child_a(children[2*k]), .child_b(children[2*k+1]));
  end

  two_stage_sorter #(.K(K)) u_ksu (
    .clk(clk), .rst_n(rst_n), .mod(mod), .in_valid(busy_q), .t(t_q),
    .last(last), .in_nodes(children), .out_valid(ksu_valid), .out_nodes(out_nodes));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa_q     <= '0;
      y_q      <= '0;
      y_hold_q <= '0;
      out_y    <= '0;
      busy_q   <= 1'b0;
      pend_q   <= 1'b0;
      t_q      <= '0;
    end else begin
      if (last)
        y_hold_q <= y_q;
      if (in_valid) begin
        fa_q   <= in_nodes;
        y_q    <= in_y;
        busy_q <= 1'b1;
        t_q    <= '0;
      end else if (busy_q) begin
        if (last) begin
          busy_q <= 1'b0;
          t_q    <= '0;
        end else begin
          t_q <= t_q + 2'd1;
        end
      end
      pend_q <= last;
      if (pend_q)
        out_y <= y_hold_q;
    end
  end

  assign out_valid = ksu_valid;

  // A new vector may only arrive when the stage is idle or in its last fold cycle.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (!busy_q || last));
endmodule
