// tb_mpc_drive: closed-loop workload test of the controller on a model of
// the described drive: a three-level NPC inverter feeding an induction
// machine (Rs = 0.049, Rr = 0.052, Xm = 2.44, Xls = Xlr = 0.072, Vdc = 1.8,
// all per unit; 50 Hz base; rotor speed 0.957 p.u. = 2870 rpm), sampled every
// Ts = 25 us with a three-step horizon.
//
// The testbench acts as the processing system: from the machine parameters it
// computes, in floating point, the continuous model F, G, the exact
// discretisation A = e^(F Ts), B, the prediction matrices Gamma, Upsilon,
// H = Upsilon^T Upsilon + lambda_u S^T S, a lower-triangular V with
// V^T V = H and H^-1, converts them to Q16.16 and loads them over AXI4-Lite.
// It then closes the loop: the machine model is advanced with the switch
// position the controller returns, the exact machine state is fed back as
// the observer output, and a rotating stator-current reference of 1 p.u. at
// the stator frequency is supplied over the horizon.
//
// Two switching weights are run: lambda_u = 0.1, which gives a switching
// frequency near 300 Hz per device with a well-conditioned lattice, and
// lambda_u = 0.001 (a few kHz, skewed lattice). The weights are this
// testbench's own tuning. A third run, with lambda_u = 0.1, steps the
// reference amplitude from 0 to 1 p.u. and back (the current-loop side of a
// torque step) and measures the response time in periods. For each it reports the visited-node statistics (minimum 27 =
// 9N, mean, maximum, share at the minimum, share at the 130-node limit), the
// average switching frequency per phase and the current tracking error.
// Checks: every period's switch position, node count and certificate equal
// the bit-exact model; the large weight is always certified optimal and the
// small one sometimes stops at the node limit; certified results equal the exhaustive optimum
// (checked every 8th period); the current tracks its reference (RMS error
// below 0.25 p.u. after the start-up transient); each step settles within
// 40 periods (1 ms); the controller never
// overruns. The control period is shortened to 400 clock cycles to keep the
// simulation short; the computation itself is unchanged.
module tb_mpc_drive;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  localparam int N = 3;
  localparam int L = 3 * N;
  localparam int M = 2 * N;
  localparam int PER = 400;
  localparam int NSTEP = 1600;           // 40 ms, two fundamental periods
  localparam int SETTLE = 400;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic sample_tick, x_k_valid, iref_valid, u_valid, optimal, use_edu;
  data_t x_obs [N_X];
  data_t x_k [N_X];
  data_t iref [M];
  sw_t   u_abc [N_PH];
  logic [CNT_W-1:0] nodes;

  mpc_top #(.PERIOD(PER)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- drive model (floating point) ----------------
  real Fm [4][4]; real Gm [4][3]; real Am [4][4]; real Bm [4][3];
  real Gam [MT][4]; real Ups [MT][LT]; real Hm [LT][LT]; real Hi [LT][LT]; real Vm [LT][LT];
  real ts_pu, wr, ws;

  function automatic longint q(input real x);
    return longint'($rtoi(x * 65536.0 + ((x >= 0.0) ? 0.5 : -0.5)));
  endfunction

  task automatic build_model();
    real Rs, Rr, Xm, Xls, Xlr, Vdc, Xs, Xr, D, taus, taur;
    real K [2][3];
    real T [4][4]; real Sacc [4][4]; real P [4][4]; real fact;
    Rs = 0.049; Rr = 0.052; Xm = 2.44; Xls = 0.072; Xlr = 0.072; Vdc = 1.8;
    Xs = Xls + Xm; Xr = Xlr + Xm; D = Xs * Xr - Xm * Xm;
    taus = Xr * D / (Rs * Xr * Xr + Rr * Xm * Xm);
    taur = Xr / Rr;
    ts_pu = 25.0e-6 * 2.0 * PI * 50.0;
    wr = 2870.0 / 3000.0;
    ws = 1.0;
    Fm = '{'{-1.0/taus, 0.0, Xm/(taur*D), wr*Xm/D},
           '{0.0, -1.0/taus, -wr*Xm/D, Xm/(taur*D)},
           '{Xm/taur, 0.0, -1.0/taur, -wr},
           '{0.0, Xm/taur, wr, -1.0/taur}};
    K = '{'{2.0/3.0, -1.0/3.0, -1.0/3.0}, '{0.0, 1.0/$sqrt(3.0), -1.0/$sqrt(3.0)}};
    for (int r = 0; r < 4; r++) for (int c = 0; c < 3; c++)
      Gm[r][c] = (r < 2) ? Xr / D * Vdc / 2.0 * K[r][c] : 0.0;
    // A = sum F^k Ts^k / k!,  B = sum F^k Ts^(k+1) / (k+1)! G
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      P[r][c] = (r == c) ? 1.0 : 0.0;
      Am[r][c] = P[r][c];
      Sacc[r][c] = P[r][c] * ts_pu;
    end
    fact = 1.0;
    for (int k = 1; k < 12; k++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        T[r][c] = 0.0;
        for (int i = 0; i < 4; i++) T[r][c] += P[r][i] * Fm[i][c] * ts_pu;
      end
      P = T;
      fact = fact * real'(k);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        Am[r][c] += P[r][c] / fact;
        Sacc[r][c] += P[r][c] * ts_pu / (fact * real'(k + 1));
      end
    end
    for (int r = 0; r < 4; r++) for (int c = 0; c < 3; c++) begin
      Bm[r][c] = 0.0;
      for (int i = 0; i < 4; i++) Bm[r][c] += Sacc[r][i] * Gm[i][c];
    end
  endtask

  // Prediction matrices and the lattice for weight lam.
  task automatic build_mpc(input real lam);
    real Ap [4][4]; real T [4][4]; real CAB [MT][3];
    real S [LT][LT]; real Rc [LT][LT]; real Hr [LT][LT]; real acc;
    real aug [LT][2*LT]; real piv;
    // Gamma rows l: C A^l ; Upsilon block (l, m): C A^(l-m) B
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) Ap[r][c] = Am[r][c];
    for (int l = 0; l < N; l++) begin
      for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) Gam[2*l + r][c] = Ap[r][c];
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        T[r][c] = 0.0;
        for (int i = 0; i < 4; i++) T[r][c] += Ap[r][i] * Am[i][c];
      end
      Ap = T;
    end
    for (int r = 0; r < MT; r++) for (int c = 0; c < LT; c++) Ups[r][c] = 0.0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) Ap[r][c] = (r == c) ? 1.0 : 0.0;
    for (int d = 0; d < N; d++) begin            // d = l - m
      for (int r = 0; r < 2; r++) for (int c = 0; c < 3; c++) begin
        CAB[r][c] = 0.0;
        for (int i = 0; i < 4; i++) CAB[r][c] += Ap[r][i] * Bm[i][c];
      end
      for (int l = d; l < N; l++)
        for (int r = 0; r < 2; r++) for (int c = 0; c < 3; c++)
          Ups[2*l + r][3*(l - d) + c] = CAB[r][c];
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        T[r][c] = 0.0;
        for (int i = 0; i < 4; i++) T[r][c] += Ap[r][i] * Am[i][c];
      end
      Ap = T;
    end
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++)
      S[r][c] = (r == c) ? 1.0 : (r == c + 3) ? -1.0 : 0.0;
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) begin
      acc = 0.0;
      for (int i = 0; i < MT; i++) acc += Ups[i][r] * Ups[i][c];
      for (int i = 0; i < LT; i++) acc += lam * S[i][r] * S[i][c];
      Hm[r][c] = acc;
    end
    // V lower triangular with V^T V = H: Cholesky of the index-reversed H.
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) Hr[r][c] = Hm[LT-1-r][LT-1-c];
    for (int j = 0; j < LT; j++) begin
      acc = Hr[j][j];
      for (int k = 0; k < j; k++) acc -= Rc[j][k] * Rc[j][k];
      Rc[j][j] = $sqrt(acc);
      for (int i = j + 1; i < LT; i++) begin
        acc = Hr[i][j];
        for (int k = 0; k < j; k++) acc -= Rc[i][k] * Rc[j][k];
        Rc[i][j] = acc / Rc[j][j];
      end
      for (int i = 0; i < j; i++) Rc[i][j] = 0.0;
    end
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) Vm[r][c] = Rc[LT-1-c][LT-1-r];
    // H^-1 by Gauss-Jordan
    for (int r = 0; r < LT; r++) for (int c = 0; c < 2*LT; c++)
      aug[r][c] = (c < LT) ? Hm[r][c] : ((c - LT == r) ? 1.0 : 0.0);
    for (int p = 0; p < LT; p++) begin
      piv = aug[p][p];
      for (int c = 0; c < 2*LT; c++) aug[p][c] /= piv;
      for (int r = 0; r < LT; r++) if (r != p) begin
        piv = aug[r][p];
        for (int c = 0; c < 2*LT; c++) aug[r][c] -= piv * aug[p][c];
      end
    end
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) Hi[r][c] = aug[r][c + LT];
  endtask

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input int word, input logic [31:0] data);
    bit aw_acc, w_acc, aw_done, w_done;
    aw_done = 0; w_done = 0;
    s_awaddr = 12'(word * 4); s_wdata = data; s_wstrb = 4'hF;
    s_awvalid = 1; s_wvalid = 1;
    while (!(aw_done && w_done)) begin
      @(negedge clk);
      aw_acc = s_awvalid && s_awready;
      w_acc  = s_wvalid && s_wready;
      @(posedge clk); #1;
      if (aw_acc) begin s_awvalid = 0; aw_done = 1; end
      if (w_acc)  begin s_wvalid = 0;  w_done = 1;  end
    end
    while (!s_bvalid) begin @(posedge clk); #1; end
    s_bready = 1;
    @(posedge clk); #1;
    s_bready = 0;
  endtask

  task automatic axi_read(input int word, output logic [31:0] data);
    s_araddr = 12'(word * 4); s_arvalid = 1;
    @(posedge clk); #1;
    s_arvalid = 0;
    while (!s_rvalid) begin @(posedge clk); #1; end
    data = s_rdata;
    s_rready = 1;
    @(posedge clk); #1;
    s_rready = 0;
  endtask

  // Fixed-point copies of what was loaded (for the bit-exact model).
  longint qa [4][4]; longint qb [4][3]; gam_t qg; ups_t qu; mat_t qh, qv; longint qlam;

  task automatic load_matrices(input real lam);
    logic [31:0] rd;
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin qa[r][c] = q(Am[r][c]); axi_write(OFF_A + r*4 + c, 32'(qa[r][c])); end
      for (int c = 0; c < 3; c++) begin qb[r][c] = q(Bm[r][c]); axi_write(OFF_B + r*3 + c, 32'(qb[r][c])); end
    end
    for (int r = 0; r < MT; r++) begin
      for (int c = 0; c < 4; c++) begin qg[r][c] = q(Gam[r][c]); axi_write(OFF_GAMMA + r*4 + c, 32'(qg[r][c])); end
      for (int c = 0; c < LT; c++) begin qu[r][c] = q(Ups[r][c]); axi_write(off_ups(N) + r*LT + c, 32'(qu[r][c])); end
    end
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) begin
      qh[r][c] = q(Hi[r][c]); axi_write(off_hinv(N) + r*LT + c, 32'(qh[r][c]));
      qv[r][c] = q(Vm[r][c]); axi_write(off_v(N) + r*LT + c, 32'(qv[r][c]));
    end
    qlam = q(lam); axi_write(off_lambda(N), 32'(qlam));
    axi_write(1020, 32'h1);                  // commit, loop stopped
    do axi_read(1020, rd); while (rd[0]);
  endtask

  initial begin
    #60000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- closed loop ----------------
  // Reference amplitude at period k: constant 1 p.u., or for the step case
  // 0 -> 1 p.u. at period 400 and back to 0 at period 1200.
  function automatic real amp_at(input bit stp, input int k);
    if (!stp) return 1.0;
    return (k >= 400 && k < 1200) ? 1.0 : 0.0;
  endfunction

  task automatic run_case(input string name, input real lam, input bit stp, output int lim_cnt);
    real xp [4]; real xn [4]; real th; real err2; int nerr;
    int up [3]; int uapp [3]; useq_t prev, u0, uref, ubest;
    vec_t uu, ub; longint xo [4]; longint xkq [4]; longint irq [MT]; longint acc;
    longint rho0, rho_ref, best; int nref; bit oref, edu_won;
    int nsum, nmax, nmin27, ntrans; logic [31:0] rd;
    int t_up, t_dn, lim_tr, nmax_tr;
    build_mpc(lam);
    load_matrices(lam);
    for (int i = 0; i < 4; i++) xp[i] = 0.0;
    for (int i = 0; i < L; i++) prev[i] = 0;
    for (int p = 0; p < 3; p++) uapp[p] = 0;
    t_up = -1; t_dn = -1; lim_tr = 0; nmax_tr = 0;
    th = 0.0; err2 = 0.0; nerr = 0; nsum = 0; nmax = 0; nmin27 = 0; lim_cnt = 0; ntrans = 0;
    for (int c = 0; c < 4; c++) begin xo[c] = q(xp[c]); x_obs[c] = data_t'(xo[c]); end
    @(posedge clk); #1;
    axi_write(1020, 32'h2);                  // enable the loop; x_k_valid is held until served
    for (int k = 0; k < NSTEP; k++) begin
      // wait for the request of the reference block
      do @(posedge clk); while (!x_k_valid);
      #1;
      for (int r = 0; r < 4; r++) begin
        acc = 0;
        for (int c = 0; c < 4; c++) acc += qa[r][c] * xo[c];
        xkq[r] = acc >>> FRAC;
        for (int p = 0; p < 3; p++) xkq[r] += qb[r][p] * uapp[p];
        check(longint'(x_k[r]) == xkq[r], "delay-compensated state");
      end
      // reference trajectory for steps k+2 .. k+N+1 (one step of delay)
      for (int l = 0; l < N; l++) begin
        irq[2*l]     = q(amp_at(stp, k + l + 2) * $cos(th + ws * ts_pu * real'(l + 2)));
        irq[2*l + 1] = q(amp_at(stp, k + l + 2) * $sin(th + ws * ts_pu * real'(l + 2)));
      end
      for (int r = 0; r < M; r++) iref[r] = data_t'(irq[r]);
      iref_valid = 1;
      @(posedge clk); #1;
      iref_valid = 0;
      do @(posedge clk); while (!u_valid);
      #1;
      for (int p = 0; p < 3; p++) up[p] = prev[p];
      unc_model(qg, qu, qh, qv, xkq, irq, up, qlam, uu, ub);
      init_model(uu, ub, qv, prev, u0, rho0, edu_won);
      ref_sphdec(ub, qv, rho0, u0, NODE_MAX, nref, oref, uref, rho_ref);
      check(int'(nodes) == nref, $sformatf("%s step %0d nodes %0d exp %0d", name, k, nodes, nref));
      check(optimal == oref, "certificate");
      for (int p = 0; p < 3; p++) check(int'(u_abc[p]) == uref[p], "switch position");
      if (oref && (k % 8 == 0)) begin
        best = brute(ub, qv, ubest);
        check(rho_ref == best, "certified result is the exhaustive optimum");
      end
      nsum += nref;
      if (nref > nmax) nmax = nref;
      if (nref == 27) nmin27++;
      if (!oref) lim_cnt++;
      prev = uref;
      // advance the machine over the interval with the position applied now
      for (int r = 0; r < 4; r++) begin
        xn[r] = 0.0;
        for (int c = 0; c < 4; c++) xn[r] += Am[r][c] * xp[c];
        for (int p = 0; p < 3; p++) xn[r] += Bm[r][p] * real'(uapp[p]);
      end
      xp = xn;
      th += ws * ts_pu;
      if (stp) begin
        // response time: periods from the step until the current magnitude
        // first reaches 90 % of the new amplitude (up) or 10 % (down)
        if (k >= 400 && k < 1200 && t_up < 0 && $sqrt(xp[0] ** 2 + xp[1] ** 2) >= 0.9) t_up = k + 1 - 400;
        if (k >= 1200 && t_dn < 0 && $sqrt(xp[0] ** 2 + xp[1] ** 2) <= 0.1) t_dn = k + 1 - 1200;
        if ((k >= 400 && k < 440) || (k >= 1200 && k < 1240)) begin
          if (!oref) lim_tr++;
          if (nref > nmax_tr) nmax_tr = nref;
        end
      end else if (k >= SETTLE) begin
        err2 += (xp[0] - $cos(th)) ** 2 + (xp[1] - $sin(th)) ** 2;
        nerr++;
        for (int p = 0; p < 3; p++) if (uapp[p] != int'(u_abc[p])) ntrans++;
      end
      for (int p = 0; p < 3; p++) uapp[p] = int'(u_abc[p]);
      for (int c = 0; c < 4; c++) begin xo[c] = q(xp[c]); x_obs[c] = data_t'(xo[c]); end
    end
    axi_write(1020, 32'h0);                  // stop the loop
    axi_read(1023, rd);
    check(rd == 0, "no overrun");
    if (stp) begin
      $display("%s: lambda_u=%f step-up response %0d periods, step-down %0d periods, node-limit stops in the 40 periods after the steps %0d, max nodes there %0d",
               name, lam, t_up, t_dn, lim_tr, nmax_tr);
      check(t_up > 0 && t_up <= 40, $sformatf("%s: step-up reaches 90 %% within 1 ms", name));
      check(t_dn > 0 && t_dn <= 40, $sformatf("%s: step-down reaches 10 %% within 1 ms", name));
    end else begin
      $display("%s: lambda_u=%f nodes mean=%0.1f max=%0d at-27=%0.1f%% at-limit=%0.2f%% f_sw/phase=%0.0f Hz rms_err=%0.3f",
               name, lam, real'(nsum) / NSTEP, nmax, 100.0 * nmin27 / NSTEP, 100.0 * lim_cnt / NSTEP,
               real'(ntrans) / 3.0 / 2.0 / (real'(nerr) * 25.0e-6), $sqrt(err2 / nerr));
      check($sqrt(err2 / nerr) < 0.25, $sformatf("%s current tracking", name));
    end
    // reset the controller's stored sequence for the next case
  endtask

  initial begin
    int lim_hi, lim_lo, lim_st;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0; iref_valid = 0;
    for (int r = 0; r < M; r++) iref[r] = '0;
    for (int c = 0; c < 4; c++) x_obs[c] = '0;
    build_model();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_case("large_weight", 1.0e-1, 1'b0, lim_hi);
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_case("small_weight", 1.0e-3, 1'b0, lim_lo);
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_case("current_step", 1.0e-1, 1'b1, lim_st);
    check(lim_hi == 0, "large weight: every period certified optimal");
    check(lim_lo > lim_hi, "smaller weight: skewed lattice reaches the node limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
