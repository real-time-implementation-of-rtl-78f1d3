// mpc_top: FPGA current-control loop of a three-level NPC inverter driving an
// induction machine, with long-horizon (N = 3) FCS-MPC solved by a sphere
// decoder once per 25 us sampling interval.
//
// Data flow per control period (started by the ctrl_timer tick):
//   x(k-1) from the observer (port x_obs, read in the tick cycle)
//   -> delay_comp: x(k) = A x(k-1) + B u(k-1)      -> port x_k, x_k_valid
//   -> the external reference block answers with I*_s(k) (iref, captured
//      in the cycle iref_valid is high while x_k_valid is high)
//   -> fcs_mpc_core: unconstrained solution, initial radius, sphere decoder
//   -> u_abc: new three-phase switch position, u_valid pulses.
// The processing system loads and updates the matrices through the
// AXI4-Lite port (mpc_cfg_regs), enables the loop with CTRL bit 1 and reads
// the status words (visited nodes, optimality, execution time, overruns).
// Observer, reference calculation, current sampling and the inverter are
// outside this design and connect through the ports listed above.
//
// Timing: a period needs 2 cycles (delay compensation) + the reference
// latency + 1 + the core (at most 163 cycles with N = 3 and 130 nodes), far
// below the 2500 cycles of the period at 100 MHz. A tick that arrives while a
// period is still being computed is skipped and counted as an overrun.
//
// The block structure follows the described implementation; the port-level
// handshakes, the clock frequency and the register map are choices of this
// implementation.
module mpc_top
  import mpc_pkg::*;
#(
  parameter int N         = mpc_pkg::N_HOR,
  parameter int MAX_NODES = mpc_pkg::NODE_MAX,
  parameter int PERIOD    = mpc_pkg::TS_CYCLES,
  localparam int L        = 3 * N,
  localparam int M        = 2 * N
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave (processing system)
  input  logic [11:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [11:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // sampling trigger and observer state x(k-1)
  output logic        sample_tick,
  input  data_t       x_obs [N_X],
  // delay-compensated state to the reference block, trajectory back
  output data_t       x_k   [N_X],
  output logic        x_k_valid,
  input  data_t       iref  [M],
  input  logic        iref_valid,
  // switch positions to the inverter
  output sw_t         u_abc [N_PH],
  output logic        u_valid,
  // status
  output logic [CNT_W-1:0] nodes,
  output logic        optimal,
  output logic        use_edu
);

  typedef enum logic [2:0] {T_IDLE, T_DC, T_REF, T_GO, T_CORE} tstate_e;
  tstate_e state;

  data_t a_mat [N_X][N_X];
  data_t b_mat [N_X][N_PH];
  data_t gamma [M][N_X];
  data_t upsilon [M][L];
  data_t hinv [L][L];
  data_t v_mat [L][L];
  data_t lambda_u;
  logic  ctrl_enable, committed;

  logic  tick;
  logic [15:0] exec_cycles, exec_max, overruns;
  data_t iref_q [M];
  logic  dc_start, dc_done;
  logic  core_start, core_busy, core_done, better_found;
  sw_t   u_seq [L];

  mpc_cfg_regs #(.N(N)) u_cfg (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .safe((state == T_IDLE) && !tick),
    .status_word({14'd0, use_edu, optimal, nodes}),
    .exec_word({exec_max, exec_cycles}),
    .overrun_word({16'd0, overruns}),
    .ctrl_enable, .committed,
    .a_mat, .b_mat, .gamma, .upsilon, .hinv, .v_mat, .lambda_u
  );

  ctrl_timer #(.PERIOD(PERIOD)) u_timer (
    .clk, .rst_n, .enable(ctrl_enable), .busy(state != T_IDLE), .done(core_done),
    .tick, .exec_cycles, .exec_max, .overruns
  );

  delay_comp u_delay_comp (
    .clk, .rst_n, .start(dc_start), .x_prev(x_obs), .u_prev(u_abc), .a_mat, .b_mat,
    .done(dc_done), .x_next(x_k)
  );

  fcs_mpc_core #(.N(N), .MAX_NODES(MAX_NODES)) u_core (
    .clk, .rst_n, .start(core_start), .x_k, .iref(iref_q),
    .gamma, .upsilon, .hinv, .v_mat, .lambda_u,
    .busy(core_busy), .done(core_done), .u_abc, .u_seq,
    .nodes, .optimal, .use_edu, .better_found
  );

  assign sample_tick = tick;
  assign dc_start    = (state == T_IDLE) && tick;
  assign core_start  = (state == T_GO);
  assign x_k_valid   = (state == T_REF);
  assign u_valid     = core_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      for (int i = 0; i < M; i++) iref_q[i] <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (tick) state <= T_DC;
        T_DC:   if (dc_done) state <= T_REF;
        T_REF:  if (iref_valid) begin
          iref_q <= iref;
          state  <= T_GO;
        end
        T_GO:   state <= T_CORE;
        default: if (core_done) state <= T_IDLE;
      endcase
    end
  end

endmodule
