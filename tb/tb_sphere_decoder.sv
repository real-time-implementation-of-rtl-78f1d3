// tb_sphere_decoder: self-checking test of the sphere decoder (N = 3, 9 levels).
//
// Random lower-triangular lattices, well conditioned ones (large switching
// weight) and skewed ones (small weight), with random unconstrained points.
// The initial guess is a random sequence and its exact cost the initial
// radius. Checks per run:
//   * visited nodes, certificate and cost match a from-scratch model of the
//     search (which also predicts whether the node limit is reached);
//   * with a certificate, the cost equals the exhaustive-search minimum and
//     at least 27 (= 9N) nodes were visited;
//   * rho2_opt equals the cost of the returned sequence and is never above
//     the initial radius;
//   * done is raised exactly `nodes` clock edges after the edge that samples
//     start (one node per cycle).
// The initial guess is usually the rounded unconstrained solution (Babai).
// Also run with the node limit lowered to 40 to force early termination.
module tb_sphere_decoder;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  localparam int N = 3;
  localparam int L = 3 * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_limit = 0, n_cert = 0, n_better = 0, n_min27 = 0;

  // Two instances: the described node limit and a low one.
  logic  start;
  data_t ubar [L];
  data_t v_mat [L][L];
  dist_t rho2_ini;
  sw_t   u_ini [L];
  logic  busy [2], done [2], optimal [2], better [2];
  sw_t   u_opt0 [L], u_opt1 [L];
  dist_t rho2_0, rho2_1;
  logic [CNT_W-1:0] nodes0, nodes1;

  sphere_decoder #(.N(N)) dut0 (
    .clk, .rst_n, .start, .ubar, .v_mat, .rho2_ini, .u_ini,
    .busy(busy[0]), .done(done[0]), .u_opt(u_opt0), .rho2_opt(rho2_0),
    .nodes(nodes0), .optimal(optimal[0]), .better_found(better[0]));

  sphere_decoder #(.N(N), .MAX_NODES(40)) dut1 (
    .clk, .rst_n, .start, .ubar, .v_mat, .rho2_ini, .u_ini,
    .busy(busy[1]), .done(done[1]), .u_opt(u_opt1), .rho2_opt(rho2_1),
    .nodes(nodes1), .optimal(optimal[1]), .better_found(better[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input mat_t v, input vec_t ub);
    useq_t  ui, ubest, uref, ugot;
    longint rho_in, best, rho_ref;
    int     nref, cyc0, cyc1, maxn;
    bit     oref;
    ui = babai(ub, v);
    // every fourth run starts from a random guess instead
    if ($urandom_range(0, 3) == 0)
      for (int i = 0; i < L; i++) ui[i] = int'($urandom_range(0, 2)) - 1;
    rho_in = cost(ui, ub, v);
    best   = brute(ub, v, ubest);
    for (int r = 0; r < L; r++) begin
      ubar[r] = data_t'(ub[r]);
      u_ini[r] = sw_t'(ui[r]);
      for (int c = 0; c < L; c++) v_mat[r][c] = data_t'(v[r][c]);
    end
    rho2_ini = dist_t'(rho_in);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc0 = -1; cyc1 = -1;
    for (int t = 1; t <= 300 && (cyc0 < 0 || cyc1 < 0); t++) begin
      @(posedge clk); #1;
      if (done[0] && cyc0 < 0) cyc0 = t;
      if (done[1] && cyc1 < 0) cyc1 = t;
    end
    for (int k = 0; k < 2; k++) begin
      maxn = (k == 0) ? NODE_MAX : 40;
      ref_sphdec(ub, v, rho_in, ui, maxn, nref, oref, uref, rho_ref);
      for (int i = 0; i < L; i++) ugot[i] = (k == 0) ? int'(u_opt0[i]) : int'(u_opt1[i]);
      check(((k == 0) ? int'(nodes0) : int'(nodes1)) == nref,
            $sformatf("inst %0d nodes %0d expected %0d", k, (k == 0) ? nodes0 : nodes1, nref));
      check(((k == 0) ? optimal[0] : optimal[1]) == oref, $sformatf("inst %0d certificate", k));
      check(cost(ugot, ub, v) == rho_ref, $sformatf("inst %0d cost %0d expected %0d", k,
            cost(ugot, ub, v), rho_ref));
      check(longint'((k == 0) ? rho2_0 : rho2_1) == cost(ugot, ub, v), "rho2_opt = cost(u_opt)");
      check(cost(ugot, ub, v) <= rho_in, "never worse than the initial guess");
      check(((k == 0) ? cyc0 : cyc1) == nref, $sformatf("inst %0d latency %0d for %0d nodes",
            k, (k == 0) ? cyc0 : cyc1, nref));
      if (oref) begin
        check(cost(ugot, ub, v) == best, $sformatf("inst %0d not optimal: %0d vs %0d", k,
              cost(ugot, ub, v), best));
        check(nref >= 9 * N, "at least 9N nodes");
      end
      if (k == 0) begin
        if (oref) n_cert++; else n_limit++;
        if (nref == 9 * N) n_min27++;
        if (better[0]) n_better++;
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t v;
    vec_t ub;
    start = 0;
    rho2_ini = '0;
    for (int r = 0; r < L; r++) begin
      ubar[r] = '0; u_ini[r] = '0;
      for (int c = 0; c < L; c++) v_mat[r][c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // well-conditioned lattices
    for (int t = 0; t < 25; t++) begin
      v = rand_v(ONE, 2 * ONE, ONE / 4);
      for (int i = 0; i < L; i++) ub[i] = srand(ONE);
      run_one(v, ub);
    end
    // skewed lattices
    for (int t = 0; t < 25; t++) begin
      v = rand_v(ONE / 5, ONE / 2, 2 * ONE);
      for (int i = 0; i < L; i++) ub[i] = srand(2 * ONE);
      run_one(v, ub);
    end
    // unconstrained point on a lattice point: only 27 nodes needed
    v = rand_v(ONE, 2 * ONE, ONE / 8);
    begin
      useq_t uz;
      for (int i = 0; i < L; i++) uz[i] = int'($urandom_range(0, 2)) - 1;
      for (int j = 0; j < L; j++) begin
        ub[j] = 0;
        for (int i = 0; i <= j; i++) ub[j] += v[j][i] * uz[i];
      end
    end
    run_one(v, ub);
    $display("certified=%0d node_limit=%0d better_found=%0d minimum_27=%0d",
             n_cert, n_limit, n_better, n_min27);
    check(n_cert > 0, "certificate reached at least once");
    check(n_limit > 0, "node limit reached at least once");
    check(n_min27 > 0, "minimum node count seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
