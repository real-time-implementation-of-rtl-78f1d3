// delay_comp: one-step prediction that compensates the computation delay.
//
// The observer delivers the state x(k-1) = [i_sa i_sb psi_ra psi_rb] of the
// previous sampling instant. Since the switch position u_abc(k-1) applied
// over the interval is known, the state at the instant the new switch
// position takes effect follows from the discrete-time machine model:
//     x(k) = A x(k-1) + B u_abc(k-1).
// A (4x4) and B (4x3) come from the processing system. B u is formed with
// additions only (u in {-1,0,1}); A x uses 16 multipliers in parallel.
//
// Interface: pulse start with x_prev, u_prev, A and B stable; done pulses one
// cycle later with x_next, which holds until the next start.
//
// The equation follows the description. The original computes this block in
// floating point; here it uses the same Q16.16 format as the rest of the
// controller, products truncated once per row (sum >>> FRAC_W).
module delay_comp
  import mpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t x_prev [N_X],
  input  sw_t   u_prev [N_PH],
  input  data_t a_mat  [N_X][N_X],
  input  data_t b_mat  [N_X][N_PH],
  output logic  done,
  output data_t x_next [N_X]
);

  typedef logic signed [2*DATA_W+7:0] acc_t;

  data_t x_n [N_X];

  always_comb begin
    for (int r = 0; r < N_X; r++) begin
      acc_t acc;
      acc = '0;
      for (int c = 0; c < N_X; c++) acc = acc + acc_t'(a_mat[r][c]) * acc_t'(x_prev[c]);
      for (int p = 0; p < N_PH; p++) acc = acc + (acc_t'(mul_sw(b_mat[r][p], u_prev[p])) <<< FRAC_W);
      x_n[r] = data_t'(acc >>> FRAC_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int r = 0; r < N_X; r++) x_next[r] <= '0;
    end else begin
      done <= start;
      if (start) x_next <= x_n;
    end
  end

endmodule
