// ctrl_timer: control-period time base and execution-time monitor.
//
// Issues a one-cycle tick every PERIOD clock cycles (the sampling interval
// Ts = 25 us is 2500 cycles of the assumed 100 MHz clock) while enable is
// high. It measures, for each control cycle, the clock cycles from the tick
// that started it to the controller's done pulse (exec_cycles, and the
// largest seen, exec_max), and counts ticks that arrive while the controller
// is still busy (overruns): the controller must finish within Ts.
//
// Interface: busy/done come from the controller. Counters reset with rst_n.
// Timing: first tick PERIOD cycles after enable rises.
//
// The period is the described one; the clock frequency and the monitoring
// counters are choices of this implementation.
module ctrl_timer #(
  parameter int PERIOD = mpc_pkg::TS_CYCLES,
  parameter int CW     = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          busy,
  input  logic          done,
  output logic          tick,
  output logic [CW-1:0] exec_cycles,
  output logic [CW-1:0] exec_max,
  output logic [CW-1:0] overruns
);

  logic [$clog2(PERIOD)-1:0] cnt;
  logic [CW-1:0] run;
  logic          running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      tick        <= 1'b0;
      run         <= '0;
      running     <= 1'b0;
      exec_cycles <= '0;
      exec_max    <= '0;
      overruns    <= '0;
    end else begin
      tick <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (int'(cnt) == PERIOD - 1) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      if (tick) begin
        if (busy || running) overruns <= overruns + 1'b1;
        else begin
          running <= 1'b1;
          run     <= CW'(1);
        end
      end else if (running) begin
        if (done) begin
          running     <= 1'b0;
          exec_cycles <= run;
          if (run > exec_max) exec_max <= run;
        end else begin
          run <= run + 1'b1;
        end
      end
    end
  end

endmodule
