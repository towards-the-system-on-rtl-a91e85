// tb_pi_ctrl -- self-checking testbench of the PI controller.
// Drives a sequence of errors and compares y = kp*e + sum(ki*Ts*e) with a
// real-valued model, first in the linear range, then with a large error
// that drives the integrator into saturation, then back out of it.  Latency
// must be two cycles.
module tb_pi_ctrl;
  import vc_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse start, wait for done, check the start-to-done latency
  task automatic pulse(input int lat);
    int cyc;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0; #1; cyc = 1;
    while (!done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != lat) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, lat);
    end
    @(posedge clk);
  endtask

  task automatic chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (!near(got, exp, tol)) begin
      failures++;
      $display("FAIL %s: got %f exp %f", what, got, exp);
    end
  endtask

  localparam real KP = 2.5, KI = 3.0, TS = 0.0314159;
  localparam real TOP = 127.99999994;

  fx_t err_i = '0, y_o;
  real integ = 0.0;
  int  nsat = 0;

  pi_ctrl #(.KP(KP), .KI(KI), .TS(TS)) dut (.clk, .rst_n, .start, .err_i, .done, .y_o);

  task automatic step(input real e);
    real y;
    err_i <= r2f(e);
    pulse(2);
    integ = integ + KI * TS * f2r(r2f(e));
    if (integ > TOP) begin integ = TOP; nsat++; end
    if (integ < -TOP) begin integ = -TOP; nsat++; end
    y = KP * f2r(r2f(e)) + integ;
    if (y > TOP) y = TOP;
    if (y < -TOP) y = -TOP;
    chk("y", f2r(y_o), y, 1e-5);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 60; k++) step($sin(0.2 * k) * 1.5 + 0.1);
    for (int k = 0; k < 20; k++) step(100.0);
    for (int k = 0; k < 20; k++) step(-30.0);
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
