// unc_solver: unconstrained solution of the long-horizon FCS-MPC problem.
//
// Computes, in four matrix-vector phases on a bank of L = 3N row-parallel
// multiply-accumulate units (one column per clock cycle):
//   1. e     = Gamma x(k) - I*_s(k)                  (2N rows, 4 columns)
//   2. Theta = Upsilon^T e - lambda_u S^T E u(k-1)   (L rows, 2N columns)
//             (S^T E u(k-1) is u(k-1) in the first three rows, zero below)
//   3. U_unc = -H^-1 Theta                           (L rows, L columns)
//   4. ubar  = V U_unc                               (L rows, V lower triangular)
// Each phase accumulates full-width products and truncates once at the end:
// result = acc >>> FRAC_W (phase 3 negates after the shift).
//
// Interface: pulse start with x, iref (the current reference trajectory,
// alpha/beta pairs for steps k+1..k+N), u_prev and the matrices; all must
// stay stable until done pulses. Outputs hold until the next start.
// Timing: done is raised 4 + 2N + 2L + 1 clock edges after the edge that
// samples start (29 for N = 3).
//
// The equations are those of the described controller; the matrices are
// precomputed by the processing system. The column-serial schedule and the
// fixed-point format are choices of this implementation.
module unc_solver
  import mpc_pkg::*;
#(
  parameter int N  = mpc_pkg::N_HOR,
  localparam int L = 3 * N,
  localparam int M = 2 * N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t x       [N_X],
  input  data_t iref    [M],
  input  sw_t   u_prev  [N_PH],
  input  data_t gamma   [M][N_X],
  input  data_t upsilon [M][L],
  input  data_t hinv    [L][L],
  input  data_t v_mat   [L][L],
  input  data_t lambda_u,
  output logic  busy,
  output logic  done,
  output data_t u_unc   [L],
  output data_t ubar    [L]
);

  typedef enum logic [2:0] {P_IDLE, P_E, P_TH, P_U, P_UB, P_FIN} phase_e;
  typedef logic signed [2*DATA_W+7:0] acc_t;

  phase_e phase;
  logic [$clog2(L+1)-1:0] col;
  acc_t  acc [L];
  data_t e_q [M];
  data_t th_q[L];
  data_t coef [L];
  data_t opnd;
  logic  last_col;
  localparam int XW = $clog2(N_X), MW = $clog2(M);
  logic [XW-1:0] col_x;            // col narrowed to each operand's index width
  logic [MW-1:0] col_m;
  assign col_x = XW'(col);
  assign col_m = MW'(col);

  // Coefficient of each row and the shared column operand for this cycle.
  always_comb begin
    opnd = '0;
    for (int r = 0; r < L; r++) coef[r] = '0;
    last_col = 1'b0;
    unique case (phase)
      P_E: begin
        opnd = x[col_x];
        for (int r = 0; r < M; r++) coef[r] = gamma[r][col_x];
        last_col = (int'(col) == N_X - 1);
      end
      P_TH: begin
        opnd = e_q[col_m];
        for (int r = 0; r < L; r++) coef[r] = upsilon[col_m][r];
        last_col = (int'(col) == M - 1);
      end
      P_U: begin
        opnd = th_q[col];
        for (int r = 0; r < L; r++) coef[r] = hinv[r][col];
        last_col = (int'(col) == L - 1);
      end
      P_UB: begin
        opnd = u_unc[col];
        for (int r = 0; r < L; r++) coef[r] = (int'(col) <= r) ? v_mat[r][col] : '0;
        last_col = (int'(col) == L - 1);
      end
      default: ;
    endcase
  end

  function automatic acc_t prod(input data_t a, input data_t b);
    return acc_t'(a) * acc_t'(b);
  endfunction

  function automatic data_t trunc(input acc_t a);
    return data_t'(a >>> FRAC_W);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      col   <= '0;
      done  <= 1'b0;
      for (int r = 0; r < L; r++) begin
        acc[r]   <= '0;
        th_q[r]  <= '0;
        u_unc[r] <= '0;
        ubar[r]  <= '0;
      end
      for (int r = 0; r < M; r++) e_q[r] <= '0;
    end else begin
      done <= 1'b0;
      if (phase == P_IDLE) begin
        if (start) begin
          phase <= P_E;
          col   <= '0;
          for (int r = 0; r < L; r++) acc[r] <= '0;
        end
      end else if (phase == P_FIN) begin
        for (int r = 0; r < L; r++) ubar[r] <= trunc(acc[r]);
        phase <= P_IDLE;
        done  <= 1'b1;
      end else begin
        for (int r = 0; r < L; r++) acc[r] <= acc[r] + prod(coef[r], opnd);
        col <= col + 1'b1;
        if (last_col) begin
          col <= '0;
          for (int r = 0; r < L; r++) acc[r] <= '0;
          unique case (phase)
            P_E: begin
              for (int r = 0; r < M; r++)
                e_q[r] <= trunc(acc[r] + prod(coef[r], opnd)) - iref[r];
              phase <= P_TH;
            end
            P_TH: begin
              for (int r = 0; r < L; r++)
                th_q[r] <= trunc(acc[r] + prod(coef[r], opnd))
                           - ((r < N_PH) ? data_t'(mul_sw(lambda_u, u_prev[(r < N_PH) ? r : 0]))
                                         : data_t'(0));
              phase <= P_U;
            end
            P_U: begin
              for (int r = 0; r < L; r++)
                u_unc[r] <= -trunc(acc[r] + prod(coef[r], opnd));
              phase <= P_UB;
            end
            default: begin  // P_UB: keep the final sums for P_FIN
              for (int r = 0; r < L; r++) acc[r] <= acc[r] + prod(coef[r], opnd);
              phase <= P_FIN;
            end
          endcase
        end
      end
    end
  end

  assign busy = (phase != P_IDLE);

endmodule
