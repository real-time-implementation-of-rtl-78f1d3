// tb_fcs_mpc_core: self-checking test of the FCS-MPC core (N = 3) over
// sequences of consecutive control cycles.
//
// Random matrices (a well-conditioned and a skewed lattice V), slowly varying
// states and references. For every cycle the expected result is computed
// here: unconstrained solution, initial guess (Babai or the shifted previous
// optimum kept by this testbench), then the search model. Checks: visited
// nodes, certificate, cost of the returned sequence (equal to the exhaustive
// minimum when certified), applied switch position = first step of the
// sequence, selection of the initial guess, and done exactly nodes + 33
// clock edges after the edge that samples start.
module tb_fcs_mpc_core;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  localparam int N = 3;
  localparam int L = 3 * N;
  localparam int M = 2 * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_edu = 0, n_bab = 0, n_limit = 0, n_cert = 0;

  logic  start, busy, done, optimal, use_edu, better_found;
  data_t x_k [N_X];
  data_t iref [M];
  data_t gamma [M][N_X];
  data_t upsilon [M][L];
  data_t hinv [L][L];
  data_t v_mat [L][L];
  data_t lambda_u;
  sw_t   u_abc [N_PH];
  sw_t   u_seq [L];
  logic [CNT_W-1:0] nodes;

  fcs_mpc_core #(.N(N)) dut (.clk, .rst_n, .start, .x_k, .iref, .gamma, .upsilon, .hinv,
    .v_mat, .lambda_u, .busy, .done, .u_abc, .u_seq, .nodes, .optimal, .use_edu, .better_found);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gam_t g; ups_t ups; mat_t hi, v; longint xx [4]; longint ir [MT]; longint lam;
    int up [3]; useq_t prev, u0, uref, ugot, ubest; vec_t uu, ub;
    longint rho0, rho_ref, best; int nref, lat; bit oref, edu_won;
    start = 0;
    for (int i = 0; i < L; i++) prev[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 6; set++) begin
      for (int r = 0; r < MT; r++) begin
        for (int c = 0; c < 4; c++) g[r][c] = srand(ONE);
        for (int c = 0; c < LT; c++) ups[r][c] = srand(ONE / 2);
      end
      for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) hi[r][c] = srand(ONE / 2);
      v = (set % 2 == 0) ? rand_v(ONE, 2 * ONE, ONE / 4) : rand_v(ONE / 5, ONE / 2, 2 * ONE);
      lam = longint'($urandom_range(0, 32'(ONE / 2)));
      for (int c = 0; c < 4; c++) xx[c] = srand(ONE);
      for (int r = 0; r < MT; r++) ir[r] = srand(ONE);
      for (int r = 0; r < M; r++) begin
        for (int c = 0; c < N_X; c++) gamma[r][c] = data_t'(g[r][c]);
        for (int c = 0; c < L; c++) upsilon[r][c] = data_t'(ups[r][c]);
      end
      for (int r = 0; r < L; r++) for (int c = 0; c < L; c++) begin
        hinv[r][c] = data_t'(hi[r][c]); v_mat[r][c] = data_t'(v[r][c]);
      end
      lambda_u = data_t'(lam);
      for (int t = 0; t < 15; t++) begin
        // slowly varying operating point
        for (int c = 0; c < 4; c++) xx[c] += srand(ONE / 32);
        for (int r = 0; r < MT; r++) ir[r] += srand(ONE / 32);
        for (int c = 0; c < 4; c++) x_k[c] = data_t'(xx[c]);
        for (int r = 0; r < M; r++) iref[r] = data_t'(ir[r]);
        for (int p = 0; p < 3; p++) up[p] = prev[p];
        unc_model(g, ups, hi, v, xx, ir, up, lam, uu, ub);
        init_model(uu, ub, v, prev, u0, rho0, edu_won);
        ref_sphdec(ub, v, rho0, u0, NODE_MAX, nref, oref, uref, rho_ref);
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        lat = 0;
        while (!done && lat < 400) begin @(posedge clk); #1; lat++; end
        for (int i = 0; i < L; i++) ugot[i] = int'(u_seq[i]);
        check(int'(nodes) == nref, $sformatf("nodes %0d exp %0d", nodes, nref));
        check(lat == nref + 33, $sformatf("latency %0d for %0d nodes", lat, nref));
        check(optimal == oref, "certificate");
        check(use_edu == edu_won, "initial guess selection");
        check(cost(ugot, ub, v) == rho_ref, "cost of result");
        if (oref) begin
          best = brute(ub, v, ubest);
          check(cost(ugot, ub, v) == best, "certified result is the exhaustive optimum");
        end
        for (int p = 0; p < 3; p++) check(int'(u_abc[p]) == ugot[p], "u_abc is first step");
        prev = ugot;
        if (edu_won) n_edu++; else n_bab++;
        if (oref) n_cert++; else n_limit++;
      end
    end
    $display("educated=%0d babai=%0d certified=%0d node_limit=%0d", n_edu, n_bab, n_cert, n_limit);
    check(n_edu > 0 && n_bab > 0, "both initial guesses used");
    check(n_cert > 0 && n_limit > 0, "certificate and node limit both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
