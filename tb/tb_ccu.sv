// tb_ccu: runs the constraint calculation unit on random channels and checks
// every L(i,k) against floor(beta*(Omega - k/Omega)/R_ii), saturated to
// 0..min(Omega, 2*N_m), computed with integer division; also checks that the
// table takes NLAYER*K cycles. A second instance with K = 6 covers fathers
// with k > Omega^2 in QPSK, where the formula turns negative and L must be 0.
module tb_ccu;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  localparam int K  = KBEST;
  localparam int K6 = 6;
  logic clk = 0, rst_n = 0, start = 0;
  data_t [NLAYER:1] rdiag;
  beta_t beta;
  mod_e  mod;
  logic  busy, done;
  lcnt_t [NLAYER:1][K-1:0] lmat;
  logic  busy6, done6;
  lcnt_t [NLAYER:1][K6-1:0] lmat6;
  int checks = 0, failures = 0;
  int n_zero = 0, n_sat = 0, n_neg = 0;

  always #5 clk = ~clk;

  ccu #(.K(K)) dut (.*);
  ccu #(.K(K6)) dut6 (.clk(clk), .rst_n(rst_n), .start(start), .rdiag(rdiag), .beta(beta),
                      .mod(mod), .busy(busy6), .done(done6), .lmat(lmat6));

  function automatic longint ref_l(int m, int b, longint r, int k);
    longint om, lim, e;
    om  = ref_omega(m);
    lim = (2 * ref_fold(m) < om) ? 2 * ref_fold(m) : om;
    if (r <= 0) e = lim;
    else e = (longint'(b) * (om * om - k)) / (om * r);
    if (e > lim) e = lim;
    if (e < 0 || om * om - k <= 0) e = 0;
    return e;
  endfunction

  task automatic run(int m, int b, int rmin, int rmax);
    int cyc;
    mod  = mod_e'(m);
    beta = beta_t'(b);
    for (int i = 1; i <= NLAYER; i++) rdiag[i] = data_t'($urandom_range(rmin, rmax));
    rdiag[1] = '0;                       // degenerate diagonal
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NLAYER * K + 1) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    while (!done6) @(negedge clk);
    for (int i = 1; i <= NLAYER; i++) begin
      for (int k = 1; k <= K; k++) begin
        longint e;
        e = ref_l(m, b, longint'(rdiag[i]), k);
        if (e == 0) n_zero++;
        if (e == 2 * ref_fold(m) || e == ref_omega(m)) n_sat++;
        checks++;
        if (longint'(lmat[i][k-1]) != e) begin
          failures++;
          $display("FAIL m=%0d b=%0d R=%0d k=%0d got %0d exp %0d", m, b, rdiag[i], k, lmat[i][k-1], e);
        end
      end
      for (int k = 1; k <= K6; k++) begin
        if (m == 0 && k > 4 && rdiag[i] > 0) n_neg++;
        checks++;
        if (longint'(lmat6[i][k-1]) != ref_l(m, b, longint'(rdiag[i]), k)) begin
          failures++;
          $display("FAIL K6 m=%0d k=%0d got %0d", m, k, lmat6[i][k-1]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int rep = 0; rep < 20; rep++) begin
        run(m, $urandom_range(64, 400), 64, 1024);
        run(m, $urandom_range(1, 1023), 1, 4000);
      end
    checks++;
    if (n_zero == 0 || n_sat == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage zero=%0d sat=%0d", n_zero, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
