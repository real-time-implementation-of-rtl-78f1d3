// tb_init_radius: self-checking test of the initial-radius block (N = 3).
//
// Random lattices V, random unconstrained solutions (including values near
// and at +-0.5 and beyond +-1) and random previous optima. The expected Babai
// estimate, educated guess, both radii and the chosen minimum are computed
// here from their definitions. Runs are steered so that each of the two
// candidates wins at least once. Checked too: done is raised by the first clock edge after the one that
// samples start.
module tb_init_radius;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  localparam int N = 3;
  localparam int L = 3 * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_edu = 0, n_bab = 0;

  logic  start, done, use_edu;
  data_t u_unc [L];
  data_t ubar [L];
  data_t v_mat [L][L];
  sw_t   u_prev [L];
  dist_t rho2_ini, rho2_bab, rho2_edu;
  sw_t   u_ini [L];

  init_radius #(.N(N)) dut (.clk, .rst_n, .start, .u_unc, .ubar, .v_mat, .u_prev,
    .done, .rho2_ini, .u_ini, .use_edu, .rho2_bab, .rho2_edu);

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
    mat_t v; vec_t ub, uu; useq_t bab, edu, up, exp_u;
    longint cb, ce, ex;
    int lat;
    start = 0;
    for (int r = 0; r < L; r++) begin
      u_unc[r] = '0; ubar[r] = '0; u_prev[r] = '0;
      for (int c = 0; c < L; c++) v_mat[r][c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      v = rand_v(ONE / 2, 2 * ONE, ONE);
      for (int i = 0; i < L; i++) begin
        case ($urandom_range(0, 4))
          0: uu[i] = ONE / 2;
          1: uu[i] = -ONE / 2;
          2: uu[i] = srand(3 * ONE);
          default: uu[i] = srand(ONE);
        endcase
        up[i] = int'($urandom_range(0, 2)) - 1;
      end
      // Babai estimate from its definition: nearest integer, clipped
      for (int i = 0; i < L; i++) begin
        real x;
        x = real'(uu[i]) / real'(ONE);
        bab[i] = (x >= 0.5) ? 1 : (x < -0.5) ? -1 : 0;
      end
      // educated guess: shift by one step, repeat the last step
      for (int i = 0; i < L; i++) edu[i] = (i < L - 3) ? up[i + 3] : up[i];
      // unconstrained point near one of the two candidates
      for (int j = 0; j < L; j++) begin
        ub[j] = srand(ONE / 4);
        for (int i = 0; i <= j; i++) ub[j] += v[j][i] * ((t % 2 == 0) ? edu[i] : bab[i]);
      end
      cb = cost(bab, ub, v);
      ce = cost(edu, ub, v);
      ex = (ce < cb) ? ce : cb;
      exp_u = (ce < cb) ? edu : bab;
      for (int r = 0; r < L; r++) begin
        u_unc[r] = data_t'(uu[r]); ubar[r] = data_t'(ub[r]); u_prev[r] = sw_t'(up[r]);
        for (int c = 0; c < L; c++) v_mat[r][c] = data_t'(v[r][c]);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      check(lat == 1, $sformatf("latency %0d", lat));
      check(longint'(rho2_bab) == cb, $sformatf("rho2_bab %0d exp %0d", rho2_bab, cb));
      check(longint'(rho2_edu) == ce, $sformatf("rho2_edu %0d exp %0d", rho2_edu, ce));
      check(longint'(rho2_ini) == ex, "rho2_ini is the minimum");
      check(use_edu == (ce < cb), "selection flag");
      for (int i = 0; i < L; i++) check(int'(u_ini[i]) == exp_u[i], $sformatf("u_ini[%0d]", i));
      if (ce < cb) n_edu++; else n_bab++;
    end
    $display("educated_guess_chosen=%0d babai_chosen=%0d", n_edu, n_bab);
    check(n_edu > 0 && n_bab > 0, "both candidates chosen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
