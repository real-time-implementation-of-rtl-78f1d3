// tb_mpc_top: end-to-end test of the current-control loop at its default
// size (N = 3, 130-node limit, 2500-cycle control period).
//
// The testbench plays the parts outside the design:
//   * processing system: loads all matrices over AXI4-Lite, commits them and
//     enables the loop; later loads a second, skewed set while the loop runs
//     (online update) and reads the status, execution-time and overrun words;
//   * observer: presents a new state x(k-1) after every period;
//   * reference block: answers x_k_valid with a reference trajectory after a
//     random delay; once it stalls for longer than a period to force an
//     overrun.
// Every period is recomputed here from the definitions (delay compensation,
// unconstrained solution, initial guess, search) and x_k, u_abc, the node
// count, the certificate and the initial-guess selection are compared.
// Mechanisms counted, each must occur: certificate, node limit, better leaf
// found, educated guess chosen, Babai estimate chosen, online matrix
// update, overrun.
module tb_mpc_top;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  localparam int N = N_HOR;
  localparam int L = 3 * N;
  localparam int M = 2 * N;
  localparam int NPER = 48;

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

  mpc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- matrix sets ----------------
  longint a_s [2][4][4]; longint b_s [2][4][3];
  gam_t g_s [2]; ups_t ups_s [2]; mat_t hi_s [2]; mat_t v_s [2]; longint lam_s [2];
  int cur = 0;            // set used by the datapath
  logic [31:0] words [2][];

  task automatic make_set(input int s);
    int nc;
    nc = n_coef(N);
    words[s] = new[nc];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) a_s[s][r][c] = (r == c) ? ONE - longint'($urandom_range(0, 2000)) : srand(ONE / 20);
      for (int c = 0; c < 3; c++) b_s[s][r][c] = srand(ONE / 16);
    end
    for (int r = 0; r < MT; r++) begin
      for (int c = 0; c < 4; c++) g_s[s][r][c] = srand(ONE);
      for (int c = 0; c < LT; c++) ups_s[s][r][c] = srand(ONE / 2);
    end
    for (int r = 0; r < LT; r++) for (int c = 0; c < LT; c++) hi_s[s][r][c] = srand(ONE / 2);
    v_s[s] = (s == 0) ? rand_v(ONE, 2 * ONE, ONE / 4) : rand_v(ONE / 5, ONE / 2, 2 * ONE);
    lam_s[s] = longint'($urandom_range(0, 32'(ONE / 2)));
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) words[s][OFF_A + r*4 + c] = 32'(a_s[s][r][c]);
      for (int c = 0; c < 3; c++) words[s][OFF_B + r*3 + c] = 32'(b_s[s][r][c]);
    end
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < 4; c++) words[s][OFF_GAMMA + r*4 + c] = 32'(g_s[s][r][c]);
      for (int c = 0; c < L; c++) words[s][off_ups(N) + r*L + c] = 32'(ups_s[s][r][c]);
    end
    for (int r = 0; r < L; r++) for (int c = 0; c < L; c++) begin
      words[s][off_hinv(N) + r*L + c] = 32'(hi_s[s][r][c]);
      words[s][off_v(N) + r*L + c]    = 32'(v_s[s][r][c]);
    end
    words[s][off_lambda(N)] = 32'(lam_s[s]);
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

  // ---------------- shared model state ----------------
  longint xo [4];          // state presented by the observer
  longint xk_exp [4];      // expected delay-compensated state
  longint ir_cur [MT];     // reference trajectory sent for this period
  useq_t  prev;            // stored optimal sequence of the last period
  int     periods = 0;
  bit     stall_next = 0;
  int n_cert = 0, n_limit = 0, n_better = 0, n_edu = 0, n_bab = 0, n_commit = 0, n_ovr = 0;

  always @(posedge clk) if (rst_n && dut.committed) begin
    n_commit++;
    if (n_commit > 1) cur = 1;
  end

  initial begin
    #40000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observer + reference block
  initial begin
    longint acc;
    int d;
    iref_valid = 0;
    for (int r = 0; r < M; r++) iref[r] = '0;
    for (int c = 0; c < 4; c++) begin xo[c] = srand(ONE); x_obs[c] = data_t'(xo[c]); end
    forever begin
      @(posedge clk); #1;
      if (x_k_valid && !iref_valid) begin
        for (int r = 0; r < 4; r++) begin
          acc = 0;
          for (int c = 0; c < 4; c++) acc += a_s[cur][r][c] * xo[c];
          xk_exp[r] = acc >>> FRAC;
          for (int p = 0; p < 3; p++) xk_exp[r] += b_s[cur][r][p] * prev[p];
          check(longint'(x_k[r]) == xk_exp[r], $sformatf("x_k[%0d] %0d exp %0d", r, x_k[r], xk_exp[r]));
        end
        d = stall_next ? TS_CYCLES + 100 : int'($urandom_range(0, 3));
        stall_next = 0;
        repeat (d) @(posedge clk);
        #1;
        for (int r = 0; r < MT; r++) begin
          ir_cur[r] = (xk_exp[r % 2] >>> 1) + srand(ONE / 8);
          iref[r] = data_t'(ir_cur[r]);
        end
        iref_valid = 1;
        @(posedge clk); #1;
        iref_valid = 0;
      end
    end
  end

  // result monitor
  initial begin
    vec_t uu, ub; useq_t u0, uref, ugot, ubest; longint rho0, rho_ref, best;
    int nref, up [3]; bit oref, edu_won;
    for (int i = 0; i < L; i++) prev[i] = 0;
    forever begin
      @(posedge clk); #1;
      if (u_valid) begin
        for (int p = 0; p < 3; p++) up[p] = prev[p];
        unc_model(g_s[cur], ups_s[cur], hi_s[cur], v_s[cur], xk_exp, ir_cur, up, lam_s[cur], uu, ub);
        init_model(uu, ub, v_s[cur], prev, u0, rho0, edu_won);
        ref_sphdec(ub, v_s[cur], rho0, u0, NODE_MAX, nref, oref, uref, rho_ref);
        for (int i = 0; i < L; i++) ugot[i] = (i < 3) ? int'(u_abc[i]) : uref[i];
        check(int'(nodes) == nref, $sformatf("period %0d nodes %0d exp %0d", periods, nodes, nref));
        check(optimal == oref, "certificate");
        check(use_edu == edu_won, "initial guess selection");
        for (int p = 0; p < 3; p++) check(int'(u_abc[p]) == uref[p], "applied switch position");
        check(cost(ugot, ub, v_s[cur]) == rho_ref, "cost of result");
        if (oref) begin
          best = brute(ub, v_s[cur], ubest);
          check(rho_ref == best, "certified result is the exhaustive optimum");
        end
        if (oref) n_cert++; else n_limit++;
        if (rho_ref < rho0) n_better++;
        if (edu_won) n_edu++; else n_bab++;
        prev = uref;
        periods++;
        // observer: next state
        for (int c = 0; c < 4; c++) begin xo[c] += srand(ONE / 16); x_obs[c] = data_t'(xo[c]); end
      end
    end
  end

  // processing system
  initial begin
    logic [31:0] rd;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    make_set(0);
    make_set(1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < n_coef(N); i++) axi_write(i, words[0][i]);
    axi_write(1020, 32'h3);                 // commit + enable
    // skewed set while running, from period 16 on
    wait (periods == 16);
    for (int i = 0; i < n_coef(N); i++) axi_write(i, words[1][i]);
    axi_write(1020, 32'h3);
    do axi_read(1020, rd); while (rd[0]);
    // a reference block stall longer than one period
    wait (periods == 30);
    stall_next = 1;
    wait (periods == 33);
    axi_read(1023, rd);
    n_ovr = int'(rd);
    check(n_ovr == 1, $sformatf("overrun count %0d", n_ovr));
    @(posedge u_valid); #1;
    axi_read(1021, rd);
    check(rd[15:0] == 16'(nodes) && rd[16] == optimal && rd[17] == use_edu, "status word");
    axi_read(1022, rd);
    check(rd[15:0] != 0 && rd[15:0] < 16'(200) && rd[31:16] > 16'(TS_CYCLES), $sformatf("execution time word %h", rd));
    wait (periods == NPER);
    $display("periods=%0d certified=%0d node_limit=%0d better=%0d educated=%0d babai=%0d commits=%0d overruns=%0d",
             periods, n_cert, n_limit, n_better, n_edu, n_bab, n_commit, n_ovr);
    check(n_cert > 0, "certificate seen");
    check(n_limit > 0, "node limit seen");
    check(n_better > 0, "better leaf seen");
    check(n_edu > 0, "educated guess chosen");
    check(n_bab > 0, "Babai estimate chosen");
    check(n_commit == 2, "online matrix update");
    check(n_ovr > 0, "overrun seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
