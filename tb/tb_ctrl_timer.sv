// tb_ctrl_timer: self-checking test of the control-period timer with a short
// period (40 cycles). An emulated controller becomes busy at each tick and
// raises done D cycles later, with D random and sometimes longer than the
// period. Checks: first tick PERIOD cycles after enable, tick spacing,
// execution time D, its maximum, and one overrun per tick that arrives
// while the emulated controller is still busy; no ticks while disabled.
module tb_ctrl_timer;
  localparam int P = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, busy, done, tick;
  logic [15:0] exec_cycles, exec_max, overruns;

  ctrl_timer #(.PERIOD(P)) dut (.clk, .rst_n, .enable, .busy, .done, .tick,
    .exec_cycles, .exec_max, .overruns);

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

  // emulated controller
  int remaining = 0, dur = 0, exp_exec = 0, exp_max = 0, exp_ovr = 0, n_ticks = 0;
  int cyc = 0, last_tick = -1, en_cyc = 0;
  bit go = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    enable = 0; busy = 0; done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    #1 check(tick == 0, "no tick while disabled");
    @(negedge clk) enable = 1;
    en_cyc = cyc;
    for (int t = 0; t < 30 * P; t++) begin
      @(negedge clk);
      done = 0;
      if (tick) begin
        if (n_ticks == 0) check(cyc - en_cyc == P, $sformatf("first tick after %0d", cyc - en_cyc));
        else check(cyc - last_tick == P, $sformatf("tick spacing %0d", cyc - last_tick));
        last_tick = cyc;
        n_ticks++;
        if (busy) exp_ovr++;
        else begin
          dur = (n_ticks % 7 == 3) ? P + 5 : int'($urandom_range(1, P - 5));
          remaining = dur;
          go = 1;
        end
      end else if (busy) begin
        remaining--;
        if (remaining == 0) begin
          done = 1;
          busy = 0;
          exp_exec = dur;
          if (dur > exp_max) exp_max = dur;
        end
      end
      @(posedge clk); #1;
      if (go) begin busy = 1; go = 0; end
      if (done) begin
        check(int'(exec_cycles) == exp_exec, $sformatf("exec %0d exp %0d", exec_cycles, exp_exec));
        check(int'(exec_max) == exp_max, "exec max");
      end
      check(int'(overruns) == exp_ovr, $sformatf("overruns %0d exp %0d", overruns, exp_ovr));
    end
    check(exp_ovr > 0, "overrun happened");
    $display("ticks=%0d overruns=%0d", n_ticks, exp_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
