// sphere_decoder: branch-and-bound search for the switch sequence U in
// {-1,0,1}^L (L = 3N) that minimises || ubar - V U ||^2, V lower triangular.
//
// How it works. The search tree has one level per element of U; level j
// fixes u_j. A pointer sp_j in {-1,0,+1,+2} names the sibling under test on
// each level, d_j holds the partial distance of the path above level j and
// rho2 the current sphere radius. Each clock cycle visits exactly one node:
//   * If sp_j = -1 (first visit of the level), the common part
//     dc = ubar_j - sum_{i<j} V(j,i) u_i is formed once and all three sibling
//     distances (dc + V(j,j))^2 + d_j, dc^2 + d_j and (dc - V(j,j))^2 + d_j are
//     computed in parallel; the one for -1 is used now, the other two are
//     stored in the per-level table DELTA (L x 2).
//   * Otherwise the distance is read from DELTA.
//   * If the distance is within rho2, a leaf becomes the new tentative
//     optimum and tightens rho2; an inner node descends one level. Otherwise
//     the branch is pruned and the next sibling is selected.
//   * Exhausted levels (sp > +1) are reset to -1 and the parent advances, for
//     all levels at once (a cascade through the levels in one cycle).
// The search ends with a certificate of optimality when sp_1 is exhausted,
// or without one when MAX_NODES nodes have been visited; the best sequence
// found so far (or the initial guess) is then returned.
//
// Interface: pulse start with ubar, V, the initial radius rho2_ini and the
// sequence u_ini that achieves it; ubar is captured at start, V must stay
// stable while busy. done pulses for one cycle; u_opt, rho2_opt, nodes and
// optimal hold until the next start.
// Timing: one node per clock cycle; the clock edge that samples start loads
// the search, and done is raised by the edge `nodes` edges later.
//
// Follows the described algorithm (visit order, look-up table of sibling
// radii, node limit with fallback to the tentative solution). Visiting one
// node per clock cycle, the fixed-point formats, and returning the initial
// guess when no better leaf is found are choices of this implementation.
module sphere_decoder
  import mpc_pkg::*;
#(
  parameter int N        = mpc_pkg::N_HOR,
  parameter int MAX_NODES = mpc_pkg::NODE_MAX,
  localparam int L       = 3 * N,
  localparam int JW      = $clog2(L + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  data_t       ubar     [L],
  input  data_t       v_mat    [L][L],
  input  dist_t       rho2_ini,
  input  sw_t         u_ini    [L],
  output logic        busy,
  output logic        done,
  output sw_t         u_opt    [L],
  output dist_t       rho2_opt,
  output logic [CNT_W-1:0] nodes,
  output logic        optimal,
  output logic        better_found
);

  typedef logic signed [DATA_W+7:0] ext_t;

  logic [JW-1:0] j_q, j_n;
  sp_t   sp_q [L];
  sp_t   sp_n [L];
  dist_t d_q  [L];
  dist_t d_n  [L];
  dist_t lut0_q [L];   // distance of sibling u_j = 0
  dist_t lut1_q [L];   // distance of sibling u_j = +1
  data_t ubar_q [L];
  sw_t   uopt_n [L];
  dist_t rho2_n;
  logic  better_n;
  logic  fin_n, opt_n;

  // ---- distance calculation (one node) ----
  ext_t  dc, e_m1, e_p1, vjj;
  dist_t dist_m1, dist_0, dist_p1, dprime;
  sp_t   s;

  always_comb begin
    s  = sp_q[j_q];
    dc = ext_t'(ubar_q[j_q]);
    for (int i = 0; i < L; i++) begin
      if (i < int'(j_q))
        dc = dc - mul_sw(v_mat[j_q][i], sw_t'(sp_q[i]));
    end
    vjj     = ext_t'(v_mat[j_q][j_q]);
    e_m1    = dc + vjj;
    e_p1    = dc - vjj;
    dist_m1 = sq_dist(e_m1) + d_q[j_q];
    dist_0  = sq_dist(dc)   + d_q[j_q];
    dist_p1 = sq_dist(e_p1) + d_q[j_q];
    unique case (s)
      -3'sd1:  dprime = dist_m1;
      3'sd0:   dprime = lut0_q[j_q];
      default: dprime = lut1_q[j_q];
    endcase
  end

  // ---- node update and backtracking ----
  always_comb begin
    sp_n     = sp_q;
    d_n      = d_q;
    j_n      = j_q;
    uopt_n   = u_opt;
    rho2_n   = rho2_opt;
    better_n = better_found;
    if (dprime <= rho2_opt) begin
      if (int'(j_q) == L - 1) begin
        // leaf: new tentative optimum, tighten the sphere
        better_n = 1'b1;
        for (int i = 0; i < L; i++) uopt_n[i] = sw_t'(sp_q[i]);
        rho2_n   = dprime;
        sp_n[j_q] = sp_q[j_q] + 3'sd1;
      end else begin
        // descend one level
        j_n       = j_q + 1'b1;
        d_n[j_q + 1'b1] = dprime;
      end
    end else begin
      // prune, move on to the next sibling
      sp_n[j_q] = sp_q[j_q] + 3'sd1;
    end
    // backtracking cascade over exhausted levels
    for (int q = L - 1; q >= 1; q--) begin
      if (sp_n[q] > 3'sd1) begin
        sp_n[q]   = -3'sd1;
        j_n       = JW'(q - 1);
        sp_n[q-1] = sp_n[q-1] + 3'sd1;
      end
    end
    opt_n = (sp_n[0] > 3'sd1);
    fin_n = opt_n || (int'(nodes) + 1 >= MAX_NODES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      j_q          <= '0;
      nodes        <= '0;
      optimal      <= 1'b0;
      better_found <= 1'b0;
      rho2_opt     <= '0;
      for (int i = 0; i < L; i++) begin
        sp_q[i]   <= -3'sd1;
        d_q[i]    <= '0;
        lut0_q[i] <= '0;
        lut1_q[i] <= '0;
        ubar_q[i] <= '0;
        u_opt[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy         <= 1'b1;
        j_q          <= '0;
        nodes        <= '0;
        optimal      <= 1'b0;
        better_found <= 1'b0;
        rho2_opt     <= rho2_ini;
        for (int i = 0; i < L; i++) begin
          sp_q[i]   <= -3'sd1;
          d_q[i]    <= '0;
          ubar_q[i] <= ubar[i];
          u_opt[i]  <= u_ini[i];
        end
      end else if (busy) begin
        if (s == -3'sd1) begin
          lut0_q[j_q] <= dist_0;
          lut1_q[j_q] <= dist_p1;
        end
        sp_q         <= sp_n;
        d_q          <= d_n;
        j_q          <= j_n;
        u_opt        <= uopt_n;
        rho2_opt     <= rho2_n;
        better_found <= better_n;
        nodes        <= nodes + 1'b1;
        if (fin_n) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          optimal <= opt_n;
        end
      end
    end
  end

  // The level index never leaves the tree.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> int'(j_q) < L);

endmodule
