// mimo_detector: configurable early-pruned K-Best MIMO detector (top level).
//
// Detects the transmitted real-valued symbol vector s of y = R*s + noise (the
// QR-decomposed, real-valued model of a 2x2, 3x3 or 4x4 MIMO link carrying
// QPSK, 16-QAM or 64-QAM) by a breadth-first tree search that keeps K survivors
// per layer. Early pruning: instead of a sphere radius, every father node k of
// layer i extends only its L(i,k) nearest children, with L(i,k) computed once
// per channel frame by the constraint calculation unit (CCU) from beta and R_ii.
//
// Architecture (parallel multistage folded): eight PE stages PE8..PE1, one per
// layer of the 4x4 tree, in a pipeline. Each stage has K parallel PCUs and a
// two-stage sorter, and is folded N_m = 1/2/3 times for QPSK/16-QAM/64-QAM, so
// the pipeline takes one vector every N_m cycles: throughput
// f_clk * 2N * log2(Omega) / N_m bits per second. A 2N-layer antenna mode uses
// stages PE8..PE(9-2N) and closes the rest; the result is taken from PE(9-2N),
// and the path with the smallest PED among its K survivors is the detection.
//
// Interface:
//  * cfg_load (one cycle, only while idle): latches cfg_mod, cfg_ant, cfg_beta
//    (unsigned Q2.8) and cfg_r; the next cycle the stages register their
//    candidate products R*s, and the CCU runs for 8*K cycles; cfg_ready rises
//    when it is done. cfg_r[i][j] is R in hardware numbering: a 2N x 2N
//    matrix sits in rows/columns 9-2N..8, its diagonal positive (Q7.8).
//  * y / y_valid / y_ready: one receive vector (same numbering, Q7.8) per
//    accepted cycle; y_ready allows one every N_m cycles.
//  * det_valid pulses with det_s (symbols -7..7, odd, rows 9-2N..8 meaningful;
//    multiply by the normalisation factor for the constellation point),
//    det_ped (12 bit, 4 fraction bits) and det_found (0 when pruning removed
//    every path). Latency: 2N*(N_m+2)+1 cycles from acceptance.
// The reset is asynchronous, active low. Clock gating of closed stages and of
// idle CPEs is left to the implementation; here idle logic just sees no valid.
module mimo_detector
  import mimo_pkg::*;
#(
  parameter int K = KBEST
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration (per channel frame)
  input  logic                          cfg_load,
  input  mod_e                          cfg_mod,
  input  ant_e                          cfg_ant,
  input  beta_t                         cfg_beta,
  input  data_t [NLAYER:1][NLAYER:1]    cfg_r,
  output logic                          cfg_ready,
  output logic                          idle,
  // receive vectors
  input  logic                          y_valid,
  input  data_t [NLAYER:1]              y,
  output logic                          y_ready,
  // detection results
  output logic                          det_valid,
  output sym_t  [NLAYER:1]              det_s,
  output ped_t                          det_ped,
  output logic                          det_found
);
  mod_e                        mod_q;
  ant_e                        ant_q;
  beta_t                       beta_q;
  data_t [NLAYER:1][NLAYER:1]  r_q;
  data_t [NLAYER:1]            rdiag;
  lcnt_t [NLAYER:1][K-1:0]     lmat;
  logic                        ccu_busy, ccu_done;
  logic [1:0]                  gap_q;
  logic [7:0]                  inflight_q;
  logic                        accept;
  logic                        cand_load_q;

  // stage chain: index p is the output of PE p; index 9 is the input of PE8
  logic                        st_valid [NLAYER+1:1];
  node_t [K-1:0]               st_nodes [NLAYER+1:1];
  data_t [NLAYER:1]            st_y     [NLAYER+1:1];

  always_comb
    for (int i = 1; i <= NLAYER; i++) rdiag[i] = r_q[i][i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mod_q  <= MOD_QPSK;
      ant_q  <= ANT_4X4;
      beta_q <= '0;
      r_q    <= '0;
    end else if (cfg_load) begin
      mod_q  <= cfg_mod;
      ant_q  <= cfg_ant;
      beta_q <= cfg_beta;
      r_q    <= cfg_r;
    end
  end

  ccu #(.K(K)) u_ccu (
    .clk(clk), .rst_n(rst_n), .start(cfg_load), .rdiag(rdiag), .beta(beta_q),
    .mod(mod_q), .busy(ccu_busy), .done(ccu_done), .lmat(lmat));

  assign cfg_ready = ccu_done && !cfg_load;
  assign y_ready   = cfg_ready && (gap_q == 2'd0);
  assign accept    = y_valid && y_ready;
  assign idle      = (inflight_q == '0);

  // input of PE8: the root, one present father with PED 0
  always_comb begin
    st_valid[NLAYER+1] = accept;
    st_y[NLAYER+1]     = y;
    st_nodes[NLAYER+1] = '0;
    for (int k = 0; k < K; k++) st_nodes[NLAYER+1][k].ped = PED_MAX;
    st_nodes[NLAYER+1][0].valid = 1'b1;
    st_nodes[NLAYER+1][0].ped   = '0;
  end

  for (genvar p = NLAYER; p >= 1; p--) begin : g_pe
    logic en;
    // PE p is closed in an antenna mode with fewer than 9-p layers
    assign en = st_valid[p+1] && (p > closed_stages(ant_q));
    pe_stage #(.H(p), .K(K)) u_pe (
      .clk(clk), .rst_n(rst_n), .mod(mod_q), .rrow(r_q[p]), .cand_load(cand_load_q), .l(lmat[p]),
      .in_valid(en), .in_nodes(st_nodes[p+1]), .in_y(st_y[p+1]),
      .out_valid(st_valid[p]), .out_nodes(st_nodes[p]), .out_y(st_y[p]));
  end

  // final selection: smallest PED among the K survivors of the last active stage
  logic          fin_valid;
  node_t [K-1:0] fin_nodes;
  node_t         fin_best;

  always_comb begin
    int last_pe;
    last_pe   = closed_stages(ant_q) + 1;
    fin_valid = st_valid[last_pe];
    fin_nodes = st_nodes[last_pe];
    fin_best  = fin_nodes[0];
    for (int k = 1; k < K; k++)
      if (nkey(fin_nodes[k]) < nkey(fin_best)) fin_best = fin_nodes[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid  <= 1'b0;
      det_s      <= '0;
      det_ped    <= '0;
      det_found  <= 1'b0;
      gap_q      <= '0;
      inflight_q <= '0;
      cand_load_q <= 1'b0;
    end else begin
      cand_load_q <= cfg_load;          // R and mod registers are loaded by then
      det_valid <= fin_valid;
      if (fin_valid) begin
        det_s     <= fin_best.path;
        det_ped   <= fin_best.ped;
        det_found <= fin_best.valid;
      end
      if (accept)
        gap_q <= 2'(fold(mod_q) - 1);
      else if (gap_q != 2'd0)
        gap_q <= gap_q - 2'd1;
      case ({accept, det_valid})
        2'b10:   inflight_q <= inflight_q + 8'd1;
        2'b01:   inflight_q <= inflight_q - 8'd1;
        default: ;
      endcase
    end
  end

  // The configuration may only change while no vector is in flight.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_load |-> idle);
endmodule
