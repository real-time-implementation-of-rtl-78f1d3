// tb_delay_comp: self-checking test of the delay compensation
// x(k) = A x(k-1) + B u(k-1). Random A, B, states and switch positions; the
// expected state is computed here (A x summed at full width and shifted once,
// B u added exactly) and checked bit for bit, plus a floating-point check.
// done must be raised by the clock edge that samples start.
module tb_delay_comp;
  import mpc_pkg::*;
  import tb_mpc_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  start, done;
  data_t x_prev [N_X];
  sw_t   u_prev [N_PH];
  data_t a_mat [N_X][N_X];
  data_t b_mat [N_X][N_PH];
  data_t x_next [N_X];

  delay_comp dut (.clk, .rst_n, .start, .x_prev, .u_prev, .a_mat, .b_mat, .done, .x_next);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a [N_X][N_X]; longint b [N_X][N_PH]; longint xx [N_X]; int u [N_PH];
    longint acc, ex; real fx;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int r = 0; r < N_X; r++) begin
        for (int c = 0; c < N_X; c++) a[r][c] = srand(ONE);
        for (int p = 0; p < N_PH; p++) b[r][p] = srand(ONE / 4);
        xx[r] = srand(2 * ONE);
      end
      for (int p = 0; p < N_PH; p++) u[p] = int'($urandom_range(0, 2)) - 1;
      for (int r = 0; r < N_X; r++) begin
        for (int c = 0; c < N_X; c++) a_mat[r][c] = data_t'(a[r][c]);
        for (int p = 0; p < N_PH; p++) b_mat[r][p] = data_t'(b[r][p]);
        x_prev[r] = data_t'(xx[r]);
      end
      for (int p = 0; p < N_PH; p++) u_prev[p] = sw_t'(u[p]);
      @(negedge clk) start = 1;
      @(posedge clk); #1;
      check(done == 1'b1, "done one edge after start");
      start = 0;
      for (int r = 0; r < N_X; r++) begin
        acc = 0; fx = 0.0;
        for (int c = 0; c < N_X; c++) begin
          acc += a[r][c] * xx[c];
          fx += real'(a[r][c]) * real'(xx[c]) / real'(ONE);
        end
        ex = acc >>> FRAC;
        for (int p = 0; p < N_PH; p++) begin
          ex += b[r][p] * u[p];
          fx += real'(b[r][p] * u[p]);
        end
        check(longint'(x_next[r]) == ex, $sformatf("x_next[%0d] %0d exp %0d", r, x_next[r], ex));
        check((real'(x_next[r]) - fx) < 2.0 && (fx - real'(x_next[r])) < 2.0, "float agreement");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
