// tb_unc_solver: self-checking test of the unconstrained-solution block (N = 3).
//
// Random matrices Gamma, Upsilon, H^-1, V, weight lambda_u, state, reference
// trajectory and previous switch position. The expected e, Theta, U_unc and
// ubar are computed here with the same truncation rule (full sums, one
// arithmetic shift per element) and must match bit for bit; a floating-point
// evaluation of -H^-1 Theta must agree within a small tolerance. done must be
// raised 4 + 2N + 2*3N + 1 = 29 clock edges after the edge that samples start.
module tb_unc_solver;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  localparam int N = 3;
  localparam int L = 3 * N;
  localparam int M = 2 * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  start, busy, done;
  data_t x [N_X];
  data_t iref [M];
  sw_t   u_prev [N_PH];
  data_t gamma [M][N_X];
  data_t upsilon [M][L];
  data_t hinv [L][L];
  data_t v_mat [L][L];
  data_t lambda_u;
  data_t u_unc [L];
  data_t ubar [L];

  unc_solver #(.N(N)) dut (.clk, .rst_n, .start, .x, .iref, .u_prev, .gamma, .upsilon,
    .hinv, .v_mat, .lambda_u, .busy, .done, .u_unc, .ubar);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint g [M][N_X]; longint ups [M][L]; longint hi [L][L]; mat_t v;
    longint xx [N_X]; longint ir [M]; int up [N_PH]; longint lam;
    longint e [M]; longint th [L]; longint uu [L]; longint ub [L]; longint acc;
    real    thr [L]; real uur;
    int     lat;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      for (int r = 0; r < M; r++) begin
        for (int c = 0; c < N_X; c++) g[r][c] = srand(ONE);
        for (int c = 0; c < L; c++) ups[r][c] = srand(ONE / 2);
        ir[r] = srand(ONE);
      end
      for (int r = 0; r < L; r++) for (int c = 0; c < L; c++) hi[r][c] = srand(ONE);
      v = rand_v(ONE / 2, 2 * ONE, ONE / 2);
      for (int c = 0; c < N_X; c++) xx[c] = srand(ONE);
      for (int p = 0; p < N_PH; p++) up[p] = int'($urandom_range(0, 2)) - 1;
      lam = longint'($urandom_range(0, 32'(ONE)));
      // expected values, same truncation as the datapath
      for (int r = 0; r < M; r++) begin
        acc = 0;
        for (int c = 0; c < N_X; c++) acc += g[r][c] * xx[c];
        e[r] = (acc >>> FRAC) - ir[r];
      end
      for (int r = 0; r < L; r++) begin
        acc = 0;
        for (int c = 0; c < M; c++) acc += ups[c][r] * e[c];
        th[r] = (acc >>> FRAC) - ((r < N_PH) ? lam * up[r] : 0);
        thr[r] = real'(th[r]);
      end
      for (int r = 0; r < L; r++) begin
        acc = 0;
        for (int c = 0; c < L; c++) acc += hi[r][c] * th[c];
        uu[r] = -(acc >>> FRAC);
      end
      for (int r = 0; r < L; r++) begin
        acc = 0;
        for (int c = 0; c <= r; c++) acc += v[r][c] * uu[c];
        ub[r] = acc >>> FRAC;
      end
      // drive
      for (int r = 0; r < M; r++) begin
        for (int c = 0; c < N_X; c++) gamma[r][c] = data_t'(g[r][c]);
        for (int c = 0; c < L; c++) upsilon[r][c] = data_t'(ups[r][c]);
        iref[r] = data_t'(ir[r]);
      end
      for (int r = 0; r < L; r++) for (int c = 0; c < L; c++) begin
        hinv[r][c] = data_t'(hi[r][c]);
        // upper triangle filled with junk: the block must ignore it
        v_mat[r][c] = (c > r) ? data_t'(srand(ONE)) : data_t'(v[r][c]);
      end
      for (int c = 0; c < N_X; c++) x[c] = data_t'(xx[c]);
      for (int p = 0; p < N_PH; p++) u_prev[p] = sw_t'(up[p]);
      lambda_u = data_t'(lam);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
      check(lat == 4 + M + 2 * L + 1, $sformatf("latency %0d", lat));
      for (int r = 0; r < L; r++) begin
        check(longint'(u_unc[r]) == uu[r], $sformatf("u_unc[%0d] %0d exp %0d", r, u_unc[r], uu[r]));
        check(longint'(ubar[r]) == ub[r], $sformatf("ubar[%0d] %0d exp %0d", r, ubar[r], ub[r]));
        // floating-point cross-check of U_unc = -H^-1 Theta
        uur = 0.0;
        for (int c = 0; c < L; c++) uur -= real'(hi[r][c]) * thr[c] / real'(ONE);
        check((real'(u_unc[r]) - uur) < 2.0 && (uur - real'(u_unc[r])) < 2.0,
              $sformatf("u_unc[%0d] float %f got %0d", r, uur, u_unc[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
