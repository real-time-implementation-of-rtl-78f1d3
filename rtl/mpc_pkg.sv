// mpc_pkg: types and constants shared by the long-horizon FCS-MPC controller.
//
// The controller solves, once per control period, the truncated integer
// least-squares problem  min || Ubar_unc - V U ||^2  over switch sequences
// U in {-1,0,1}^(3N) of a three-level inverter, using a sphere decoder.
// Everything in the fixed-point datapath uses one signed two's-complement
// format, Q(DATA_W-FRAC_W).FRAC_W (Q16.16 by default); squared distances are
// kept as unsigned DIST_W-bit numbers with FRAC_W fractional bits.
//
// Taken from the description: horizon N = 3, sampling interval 25 us
// (40 kHz), node limit 130, fixed-point arithmetic for the MPC algorithm.
// Own choices: the word widths, the 100 MHz clock, and the register map.
package mpc_pkg;

  // Prediction horizon (steps) and the resulting number of tree levels.
  parameter int N_HOR    = 3;
  parameter int N_LVL    = 3 * N_HOR;
  // State dimension (stator current and rotor flux in alpha/beta) and phases.
  parameter int N_X      = 4;
  parameter int N_PH     = 3;

  // Fixed-point format.
  parameter int DATA_W   = 32;
  parameter int FRAC_W   = 16;
  parameter int DIST_W   = 64;

  // Upper limit on visited nodes per control period.
  parameter int NODE_MAX = 130;
  parameter int CNT_W    = 16;

  // Clock and control period: 100 MHz * 25 us = 2500 cycles.
  parameter int CLK_HZ     = 100_000_000;
  parameter int TS_CYCLES  = 2500;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic        [DIST_W-1:0] dist_t;
  // Single-phase switch position -1, 0, +1.
  typedef logic signed [1:0]        sw_t;
  // Search-tree sibling pointer sp_j: -1, 0, +1, and +2 meaning "exhausted".
  typedef logic signed [2:0]        sp_t;

  // Number of 32-bit coefficient words the processing system loads for a
  // horizon of n steps: A (4x4), B (4x3), Gamma (2n x 4), Upsilon (2n x 3n),
  // H^-1 (3n x 3n), V (3n x 3n), lambda_u.
  function automatic int n_coef(input int n);
    return N_X*N_X + N_X*N_PH + 2*n*N_X + 2*n*3*n + 2*(3*n)*(3*n) + 1;
  endfunction

  // Word offsets of each matrix in the coefficient bank (row-major).
  parameter int OFF_A = 0;
  parameter int OFF_B = N_X*N_X;
  parameter int OFF_GAMMA = N_X*N_X + N_X*N_PH;
  function automatic int off_ups(input int n);   return OFF_GAMMA + 2*n*N_X; endfunction
  function automatic int off_hinv(input int n);  return off_ups(n) + 2*n*3*n; endfunction
  function automatic int off_v(input int n);     return off_hinv(n) + 9*n*n; endfunction
  function automatic int off_lambda(input int n);return off_v(n) + 9*n*n; endfunction

  // Fixed-point square of a residual, returned as a distance (FRAC_W frac bits).
  function automatic dist_t sq_dist(input logic signed [DATA_W+7:0] e);
    logic signed [2*DATA_W+15:0] p;
    p = e * e;
    return dist_t'(p >>> FRAC_W);
  endfunction

  // Multiply a coefficient by a switch position (-1, 0, +1) without a multiplier.
  function automatic logic signed [DATA_W+7:0] mul_sw(input data_t c, input sw_t u);
    logic signed [DATA_W+7:0] ce;
    ce = (DATA_W+8)'(c);
    case (u)
      2'sb01:  return ce;
      2'sb11:  return -ce;
      default: return '0;
    endcase
  endfunction

endpackage
