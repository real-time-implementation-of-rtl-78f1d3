// fcs_mpc_core: the FCS-MPC algorithm core (unconstrained solution, initial
// radius and sphere decoder), sharing one set of system matrices.
//
// Per control cycle, after start:
//   1. unc_solver   U_unc(k) = -H^-1 Theta(k) and ubar(k) = V U_unc(k);
//   2. init_radius  Babai estimate vs. educated guess (the stored previous
//                   optimum, shifted), smaller radius and its sequence;
//   3. sphere_decoder  optimal (or, at the node limit, best found) sequence.
// The resulting sequence U_opt(k) is stored: its first step u_opt(k) is the
// switch position applied to the inverter (u_abc), it is the u(k-1) of the
// switching-effort term in the next cycle, and its shifted form is the next
// educated guess. The stored sequence resets to all zeros.
//
// Interface: pulse start with x_k and iref stable until done; matrices must
// stay stable while busy. done pulses once per cycle; u_abc, u_seq and the
// statistics hold until the next done.
// Timing: done is raised nodes + 8N + 9 clock edges after the edge that
// samples start (nodes + 33 for N = 3): 29 for the unconstrained solution,
// 2 for the initial radius, one per node, and 2 hand-over cycles. With the
// 130-node limit that is at most 163 cycles.
//
// The order of the three steps and the reuse of the stored sequence follow
// the description; the control FSM is a choice of this implementation.
module fcs_mpc_core
  import mpc_pkg::*;
#(
  parameter int N         = mpc_pkg::N_HOR,
  parameter int MAX_NODES = mpc_pkg::NODE_MAX,
  localparam int L        = 3 * N,
  localparam int M        = 2 * N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t x_k      [N_X],
  input  data_t iref     [M],
  input  data_t gamma    [M][N_X],
  input  data_t upsilon  [M][L],
  input  data_t hinv     [L][L],
  input  data_t v_mat    [L][L],
  input  data_t lambda_u,
  output logic  busy,
  output logic  done,
  output sw_t   u_abc    [N_PH],
  output sw_t   u_seq    [L],
  output logic [CNT_W-1:0] nodes,
  output logic  optimal,
  output logic  use_edu,
  output logic  better_found
);

  typedef enum logic [2:0] {S_IDLE, S_UNC, S_INIT, S_SPH} state_e;
  state_e state;

  logic  unc_start, unc_done, unc_busy;
  data_t u_unc [L];
  data_t ubar  [L];
  logic  ir_start, ir_done, ir_use_edu;
  dist_t rho2_ini, rho2_bab, rho2_edu;
  sw_t   u_ini [L];
  logic  sd_start, sd_done, sd_busy, sd_optimal, sd_better;
  sw_t   sd_uopt [L];
  dist_t sd_rho2;
  logic [CNT_W-1:0] sd_nodes;
  sw_t   u_prev [N_PH];

  always_comb for (int p = 0; p < N_PH; p++) u_prev[p] = u_seq[p];
  assign u_abc = u_prev;

  assign unc_start = (state == S_IDLE) && start;
  assign ir_start  = (state == S_UNC)  && unc_done;
  assign sd_start  = (state == S_INIT) && ir_done;
  assign busy      = (state != S_IDLE);

  unc_solver #(.N(N)) u_unc_solver (
    .clk, .rst_n, .start(unc_start), .x(x_k), .iref, .u_prev,
    .gamma, .upsilon, .hinv, .v_mat, .lambda_u,
    .busy(unc_busy), .done(unc_done), .u_unc, .ubar
  );

  init_radius #(.N(N)) u_init_radius (
    .clk, .rst_n, .start(ir_start), .u_unc, .ubar, .v_mat, .u_prev(u_seq),
    .done(ir_done), .rho2_ini, .u_ini, .use_edu(ir_use_edu), .rho2_bab, .rho2_edu
  );

  sphere_decoder #(.N(N), .MAX_NODES(MAX_NODES)) u_sphere_decoder (
    .clk, .rst_n, .start(sd_start), .ubar, .v_mat, .rho2_ini, .u_ini,
    .busy(sd_busy), .done(sd_done), .u_opt(sd_uopt), .rho2_opt(sd_rho2),
    .nodes(sd_nodes), .optimal(sd_optimal), .better_found(sd_better)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      done         <= 1'b0;
      nodes        <= '0;
      optimal      <= 1'b0;
      use_edu      <= 1'b0;
      better_found <= 1'b0;
      for (int i = 0; i < L; i++) u_seq[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start)    state <= S_UNC;
        S_UNC:  if (unc_done) state <= S_INIT;
        S_INIT: if (ir_done)  state <= S_SPH;
        default: if (sd_done) begin
          state        <= S_IDLE;
          done         <= 1'b1;
          u_seq        <= sd_uopt;
          nodes        <= sd_nodes;
          optimal      <= sd_optimal;
          use_edu      <= ir_use_edu;
          better_found <= sd_better;
        end
      endcase
    end
  end

endmodule
