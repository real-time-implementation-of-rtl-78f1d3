// tb_mpc_util_pkg: reference models shared by the controller testbenches.
//
// All models work on 64-bit integers holding the same Q16.16 numbers as the
// RTL. They are written directly from the equations, without the
// implementation tricks of the RTL (no look-up table, no column-serial MACs):
//   cost      || ubar - V U ||^2, each squared residual truncated to Q.16
//   brute     exhaustive search over all 3^L switch sequences
//   ref_sphdec  the sphere-decoding search, recomputing every distance from
//               scratch, to predict the number of visited nodes
// plus helpers that generate random test matrices with $urandom.
package tb_mpc_util_pkg;

  parameter int LT    = 9;      // 3N levels for N = 3
  parameter int MT    = 6;      // 2N reference entries for N = 3
  parameter int FRAC  = 16;
  parameter longint ONE = 64'sd1 <<< FRAC;

  typedef longint vec_t [LT];
  typedef longint mat_t [LT][LT];
  typedef int     useq_t [LT];

  function automatic longint sqd(input longint e);
    return (e * e) >>> FRAC;
  endfunction

  function automatic longint partial_cost(input useq_t u, input vec_t ub, input mat_t v,
                                          input int upto);
    longint acc, r;
    acc = 0;
    for (int j = 0; j <= upto; j++) begin
      r = ub[j];
      for (int i = 0; i <= j; i++) r -= v[j][i] * u[i];
      acc += sqd(r);
    end
    return acc;
  endfunction

  function automatic longint cost(input useq_t u, input vec_t ub, input mat_t v);
    return partial_cost(u, ub, v, LT - 1);
  endfunction

  function automatic longint brute(input vec_t ub, input mat_t v, output useq_t best);
    longint bc, c;
    useq_t  u;
    int     code;
    bc = -1;
    for (int n = 0; n < 3**LT; n++) begin
      code = n;
      for (int i = 0; i < LT; i++) begin
        u[i] = (code % 3) - 1;
        code = code / 3;
      end
      c = cost(u, ub, v);
      if (bc < 0 || c < bc) begin
        bc   = c;
        best = u;
      end
    end
    return bc;
  endfunction

  // Depth-first search in the order of the algorithm: siblings -1, 0, +1,
  // prune when the partial distance exceeds rho2, a leaf within rho2 becomes
  // the tentative optimum. Counts one node per evaluated distance.
  task automatic ref_sphdec(input vec_t ub, input mat_t v, input longint rho2_in,
                            input useq_t u_in, input int max_nodes,
                            output int nodes, output bit optimal,
                            output useq_t u_out, output longint rho2_out);
    int     sp [LT];
    int     j;
    longint dd;
    useq_t  u;
    longint rho2;
    rho2 = rho2_in;
    u_out = u_in;
    for (int i = 0; i < LT; i++) sp[i] = -1;
    j = 0; nodes = 0; optimal = 0;
    while (nodes < max_nodes) begin
      for (int i = 0; i < LT; i++) u[i] = (i <= j) ? sp[i] : 0;
      dd = partial_cost(u, ub, v, j);
      nodes++;
      if (dd <= rho2) begin
        if (j == LT - 1) begin
          u_out = u; rho2 = dd; sp[j]++;
        end else j++;
      end else sp[j]++;
      for (int q = LT - 1; q >= 1; q--)
        if (sp[q] > 1) begin sp[q] = -1; j = q - 1; sp[j]++; end
      if (sp[0] > 1) begin optimal = 1; break; end
    end
    rho2_out = rho2;
  endtask

  // Babai estimate: solve V U = ubar by forward substitution in floating
  // point, round to the nearest integer and clip to {-1,0,1}.
  function automatic useq_t babai(input vec_t ub, input mat_t v);
    real    uu [LT];
    real    acc;
    useq_t  u;
    for (int j = 0; j < LT; j++) begin
      acc = real'(ub[j]);
      for (int i = 0; i < j; i++) acc -= real'(v[j][i]) * uu[i];
      uu[j] = acc / real'(v[j][j]);
      u[j]  = (uu[j] >= 0.5) ? 1 : (uu[j] < -0.5) ? -1 : 0;
    end
    return u;
  endfunction

  // Unconstrained solution with the datapath's truncation rule: full sums,
  // one arithmetic shift per element.
  //   e = Gamma x - iref, Theta = Upsilon^T e - lambda [u_prev; 0],
  //   U_unc = -(H^-1 Theta), ubar = V U_unc.
  typedef longint gam_t [MT][4];
  typedef longint ups_t [MT][LT];
  task automatic unc_model(input gam_t g, input ups_t ups, input mat_t hi, input mat_t v,
                           input longint xx [4], input longint ir [MT], input int up [3],
                           input longint lam, output vec_t uu, output vec_t ub);
    longint e [MT]; longint th [LT]; longint acc;
    for (int r = 0; r < MT; r++) begin
      acc = 0;
      for (int c = 0; c < 4; c++) acc += g[r][c] * xx[c];
      e[r] = (acc >>> FRAC) - ir[r];
    end
    for (int r = 0; r < LT; r++) begin
      acc = 0;
      for (int c = 0; c < MT; c++) acc += ups[c][r] * e[c];
      th[r] = (acc >>> FRAC) - ((r < 3) ? lam * up[r] : 0);
    end
    for (int r = 0; r < LT; r++) begin
      acc = 0;
      for (int c = 0; c < LT; c++) acc += hi[r][c] * th[c];
      uu[r] = -(acc >>> FRAC);
    end
    for (int r = 0; r < LT; r++) begin
      acc = 0;
      for (int c = 0; c <= r; c++) acc += v[r][c] * uu[c];
      ub[r] = acc >>> FRAC;
    end
  endtask

  // Initial radius: Babai rounding of U_unc vs. shifted previous optimum.
  task automatic init_model(input vec_t uu, input vec_t ub, input mat_t v, input useq_t prev,
                            output useq_t u0, output longint rho2, output bit edu_won);
    useq_t bab, edu;
    longint cb, ce;
    for (int i = 0; i < LT; i++) begin
      bab[i] = (uu[i] >= ONE / 2) ? 1 : (uu[i] < -ONE / 2) ? -1 : 0;
      edu[i] = (i < LT - 3) ? prev[i + 3] : prev[i];
    end
    cb = cost(bab, ub, v);
    ce = cost(edu, ub, v);
    edu_won = (ce < cb);
    u0   = edu_won ? edu : bab;
    rho2 = edu_won ? ce : cb;
  endtask

  // Signed random value uniformly in [-range, +range] (Q16.16 units).
  function automatic longint srand(input longint range);
    longint r;
    r = longint'($urandom_range(0, 32'(2 * range)));
    return r - range;
  endfunction

  // Random lower-triangular V: diagonal in [dmin, dmax], below it in
  // [-off, off]. A small diagonal with large off-diagonal entries gives the
  // skewed lattices of small switching-effort weights.
  function automatic mat_t rand_v(input longint dmin, input longint dmax, input longint off);
    mat_t v;
    for (int r = 0; r < LT; r++)
      for (int c = 0; c < LT; c++)
        if (c == r)     v[r][c] = dmin + longint'($urandom_range(0, 32'(dmax - dmin)));
        else if (c < r) v[r][c] = srand(off);
        else            v[r][c] = 0;
    return v;
  endfunction

endpackage
