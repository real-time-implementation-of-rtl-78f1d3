// init_radius: initial sphere radius and tentative solution for the sphere
// decoder.
//
// Two candidate switch sequences are formed:
//   * the Babai estimate, U_unc rounded element-wise to the nearest integer
//     and clipped to {-1,0,1} (round half up: x >= 0.5 -> +1, x < -0.5 -> -1);
//   * the educated guess, the previous optimal sequence shifted forward by one
//     step (three elements) with the last step repeated.
// For each, rho^2 = || ubar - V U ||^2 is evaluated (V lower triangular, each
// residual squared in fixed point and summed), and the smaller of the two is
// passed on as rho2_ini with its sequence. On a tie the Babai estimate wins.
//
// Interface: pulse start with u_unc, ubar, V and the previous optimum u_prev;
// the inputs must stay stable until done pulses. Outputs hold until the next
// start. Latency: the clock edge that samples start registers the two
// candidates; the next edge registers the radii and raises done.
//
// The two candidates and the minimum follow the description; the rounding
// rule at exactly +-0.5, the tie rule and the two-cycle schedule are choices
// of this implementation.
module init_radius
  import mpc_pkg::*;
#(
  parameter int N  = mpc_pkg::N_HOR,
  localparam int L = 3 * N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t u_unc  [L],
  input  data_t ubar   [L],
  input  data_t v_mat  [L][L],
  input  sw_t   u_prev [L],
  output logic  done,
  output dist_t rho2_ini,
  output sw_t   u_ini  [L],
  output logic  use_edu,
  output dist_t rho2_bab,
  output dist_t rho2_edu
);

  localparam data_t HALF = data_t'(1) <<< (FRAC_W - 1);

  typedef logic signed [DATA_W+7:0] ext_t;

  sw_t  bab_q [L];
  sw_t  edu_q [L];
  logic stage2;

  function automatic dist_t seq_cost(input sw_t u [L], input data_t ub [L],
                                     input data_t v [L][L]);
    dist_t acc;
    ext_t  r;
    acc = '0;
    for (int jj = 0; jj < L; jj++) begin
      r = ext_t'(ub[jj]);
      for (int i = 0; i <= jj; i++) r = r - mul_sw(v[jj][i], u[i]);
      acc = acc + sq_dist(r);
    end
    return acc;
  endfunction

  dist_t cost_bab, cost_edu;
  always_comb begin
    cost_bab = seq_cost(bab_q, ubar, v_mat);
    cost_edu = seq_cost(edu_q, ubar, v_mat);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage2   <= 1'b0;
      done     <= 1'b0;
      rho2_ini <= '0;
      rho2_bab <= '0;
      rho2_edu <= '0;
      use_edu  <= 1'b0;
      for (int i = 0; i < L; i++) begin
        bab_q[i] <= '0;
        edu_q[i] <= '0;
        u_ini[i] <= '0;
      end
    end else begin
      done   <= 1'b0;
      stage2 <= start;
      if (start) begin
        for (int i = 0; i < L; i++) begin
          if (u_unc[i] >= HALF)       bab_q[i] <= 2'sd1;
          else if (u_unc[i] < -HALF)  bab_q[i] <= -2'sd1;
          else                        bab_q[i] <= 2'sd0;
          edu_q[i] <= u_prev[(i < L - 3) ? i + 3 : i];
        end
      end
      if (stage2) begin
        done     <= 1'b1;
        rho2_bab <= cost_bab;
        rho2_edu <= cost_edu;
        use_edu  <= (cost_edu < cost_bab);
        rho2_ini <= (cost_edu < cost_bab) ? cost_edu : cost_bab;
        for (int i = 0; i < L; i++)
          u_ini[i] <= (cost_edu < cost_bab) ? edu_q[i] : bab_q[i];
      end
    end
  end

endmodule
