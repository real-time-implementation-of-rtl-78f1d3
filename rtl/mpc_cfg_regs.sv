// mpc_cfg_regs: AXI4-Lite register bank for the controller's system matrices.
//
// The processing system computes the model and optimisation matrices (they
// depend on the sampling interval, the rotor speed and lambda_u) and writes
// them here as Q16.16 words. Writes go to a shadow bank. Setting bit 0 of the
// CTRL register requests a commit; the shadow bank is copied to the active
// bank in the first cycle in which `safe` is high (the controller is idle),
// so a control cycle never sees a half-updated set of matrices while the
// matrices are being updated online. The active bank drives the datapath.
//
// Word map (byte address = 4 * word):
//   0 .. NCOEF-1  coefficients, row-major, in the order A (4x4), B (4x3),
//                 Gamma (2N x 4), Upsilon (2N x 3N), H^-1 (3N x 3N),
//                 V (3N x 3N, lower triangular), lambda_u      (read/write)
//   1020 CTRL     bit 0 commit request (reads 1 while pending),
//                 bit 1 controller enable                        (read/write)
//   1021 STATUS   bits 15:0 visited nodes of the last cycle, bit 16 optimality
//                 certificate, bit 17 educated guess chosen       (read only)
//   1022 EXEC     bits 15:0 last execution time in cycles, 31:16 maximum
//   1023 OVERRUN  number of control periods missed               (read only)
// Unmapped reads return 0; every access answers OKAY.
//
// Interface: AXI4-Lite slave, 32-bit data, 12-bit byte address, one
// outstanding transaction per channel pair; write address and data may
// arrive in either order. Write response one cycle after both are held;
// read data one cycle after the address.
//
// That the matrices are written by the processing system over AXI-Lite
// and can be changed while the drive runs follows the description; the
// register map, the shadow/commit scheme and the status words are choices of
// this implementation.
module mpc_cfg_regs
  import mpc_pkg::*;
#(
  parameter int N      = mpc_pkg::N_HOR,
  localparam int L     = 3 * N,
  localparam int M     = 2 * N,
  localparam int NCOEF = n_coef(N)
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // controller side
  input  logic        safe,
  input  logic [31:0] status_word,
  input  logic [31:0] exec_word,
  input  logic [31:0] overrun_word,
  output logic        ctrl_enable,
  output logic        committed,
  output data_t       a_mat   [N_X][N_X],
  output data_t       b_mat   [N_X][N_PH],
  output data_t       gamma   [M][N_X],
  output data_t       upsilon [M][L],
  output data_t       hinv    [L][L],
  output data_t       v_mat   [L][L],
  output data_t       lambda_u
);

  localparam int W_CTRL = 1020, W_STATUS = 1021, W_EXEC = 1022, W_OVR = 1023;
  localparam int IW = $clog2(NCOEF);       // index width of the coefficient banks

  logic [31:0] shadow [NCOEF];
  logic [31:0] active [NCOEF];
  logic        pending;

  logic [9:0]  aw_word, ar_word;
  logic        aw_held, w_held;
  logic [31:0] w_data;
  logic [3:0]  w_strb;

  assign ar_word   = s_araddr[11:2];
  assign s_awready = !aw_held && !s_bvalid;
  assign s_wready  = !w_held && !s_bvalid;
  assign s_arready = !s_rvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held     <= 1'b0;
      w_held      <= 1'b0;
      aw_word     <= '0;
      w_data      <= '0;
      w_strb      <= '0;
      s_bvalid    <= 1'b0;
      s_rvalid    <= 1'b0;
      s_rdata     <= '0;
      pending     <= 1'b0;
      ctrl_enable <= 1'b0;
      committed   <= 1'b0;
      for (int i = 0; i < NCOEF; i++) begin
        shadow[i] <= '0;
        active[i] <= '0;
      end
    end else begin
      committed <= 1'b0;
      // write address / data capture
      if (s_awvalid && s_awready) begin
        aw_held <= 1'b1;
        aw_word <= s_awaddr[11:2];
      end
      if (s_wvalid && s_wready) begin
        w_held <= 1'b1;
        w_data <= s_wdata;
        w_strb <= s_wstrb;
      end
      // perform the write once both halves are held
      if (aw_held && w_held && !s_bvalid) begin
        aw_held  <= 1'b0;
        w_held   <= 1'b0;
        s_bvalid <= 1'b1;
        if (int'(aw_word) < NCOEF)
          shadow[IW'(aw_word)] <= merge(shadow[IW'(aw_word)], w_data, w_strb);
        else if (int'(aw_word) == W_CTRL) begin
          if (w_strb[0]) begin
            if (w_data[0]) pending <= 1'b1;
            ctrl_enable <= w_data[1];
          end
        end
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      // commit shadow -> active when the controller is idle
      if (pending && safe) begin
        for (int i = 0; i < NCOEF; i++) active[i] <= shadow[i];
        pending   <= 1'b0;
        committed <= 1'b1;
      end
      // reads
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        if (int'(ar_word) < NCOEF)      s_rdata <= shadow[IW'(ar_word)];
        else if (int'(ar_word) == W_CTRL)   s_rdata <= {30'd0, ctrl_enable, pending};
        else if (int'(ar_word) == W_STATUS) s_rdata <= status_word;
        else if (int'(ar_word) == W_EXEC)   s_rdata <= exec_word;
        else if (int'(ar_word) == W_OVR)    s_rdata <= overrun_word;
        else                                s_rdata <= '0;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // Active bank to matrix views.
  always_comb begin
    for (int r = 0; r < N_X; r++) begin
      for (int c = 0; c < N_X; c++)  a_mat[r][c] = active[OFF_A + r*N_X + c];
      for (int c = 0; c < N_PH; c++) b_mat[r][c] = active[OFF_B + r*N_PH + c];
    end
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < N_X; c++) gamma[r][c]   = active[OFF_GAMMA + r*N_X + c];
      for (int c = 0; c < L; c++)   upsilon[r][c] = active[off_ups(N) + r*L + c];
    end
    for (int r = 0; r < L; r++) begin
      for (int c = 0; c < L; c++) begin
        hinv[r][c]  = active[off_hinv(N) + r*L + c];
        v_mat[r][c] = active[off_v(N) + r*L + c];
      end
    end
    lambda_u = active[off_lambda(N)];
  end

  // AXI4-Lite handshake rules: a response stays valid until accepted.
  assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
