// ccu: constraint calculation unit.
//
// Computes, once per channel frame, the early-pruning extension counts
//   L(i,k) = floor( beta * (Omega - k/Omega) / R_ii ),  k = 1..K,
// saturated to 0..Omega as the source prescribes (a negative value, possible
// when k >= Omega^2, gives 0), for every PE layer i. The
// detector can extend at most 2*N_m children per father (two child-node PEs,
// N_m passes), so the count is further clamped to 2*N_m, which only matters for
// 64-QAM (6 instead of 8); that clamp is this design's reading of the folded
// architecture.
//
// How: division-free. beta and R_ii share 8 fraction bits, so
//   L = #{ m in 1..Omega : m * Omega * R_ii <= beta * (Omega^2 - k) },
// evaluated with Omega parallel comparators for one (i,k) pair per clock. A
// non-positive R_ii (a degenerate channel) gives the maximum count.
//
// Interface/timing: pulse start for one cycle with rdiag, beta and mod stable;
// busy is high for NLAYER*K cycles, then done stays high and lmat holds the
// table until the next start. lmat[i][k-1] is the count of the k-th father at
// PE layer i.
module ccu
  import mimo_pkg::*;
#(
  parameter int K = KBEST
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  data_t [NLAYER:1]              rdiag,
  input  beta_t                         beta,
  input  mod_e                          mod,
  output logic                          busy,
  output logic                          done,
  output lcnt_t [NLAYER:1][K-1:0]       lmat
);
  localparam int KW = $clog2(K) + 1;

  logic [3:0]    layer_q;   // 1..8
  logic [KW-1:0] kidx_q;    // 0..K-1, father index k = kidx_q + 1
  lcnt_t         lval;

  // One count per cycle, for (layer_q, kidx_q + 1).
  always_comb begin
    logic [BW+7:0]  num;
    logic [DW+6:0]  den;
    int             om, lim;
    om  = omega(mod);
    lim = (2 * fold(mod) < om) ? 2 * fold(mod) : om;
    num = (BW+8)'(beta) * (BW+8)'(om * om - (int'(kidx_q) + 1));
    den = (DW+7)'(rdiag[layer_q]) * (DW+7)'(om);
    lval = '0;
    if (om * om <= int'(kidx_q) + 1) begin
      lval = '0;                          // formula negative or zero: branch trimmed
    end else if ($signed(rdiag[layer_q]) <= 0) begin
      lval = lcnt_t'(lim);
    end else begin
      for (int m = 1; m <= NSYM; m++) begin
        if (m <= lim && (DW+BW+12)'(m) * (DW+BW+12)'(den) <= (DW+BW+12)'(num))
          lval = lcnt_t'(m);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      layer_q <= 4'd1;
      kidx_q  <= '0;
      lmat    <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      done    <= 1'b0;
      layer_q <= 4'd1;
      kidx_q  <= '0;
    end else if (busy) begin
      lmat[layer_q][kidx_q] <= lval;
      if (int'(kidx_q) == K - 1) begin
        kidx_q <= '0;
        if (layer_q == 4'(NLAYER)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          layer_q <= layer_q + 4'd1;
        end
      end else begin
        kidx_q <= kidx_q + 1'b1;
      end
    end
  end
endmodule
