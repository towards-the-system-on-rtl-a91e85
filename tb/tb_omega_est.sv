// tb_omega_est -- self-checking testbench of the frame-speed estimator.
// Random (i_sq, Psi_r, omega_r) points are compared with
// omega = Pp omega_r + M (Rr/Lr) i_sq / Psi_r in real arithmetic, plus a
// zero-flux point that must saturate; latency W+4 cycles.
module tb_omega_est;
  import vc_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  fx_t i_sq = '0, psi_r = '0, omega_r = '0, omega;
  omega_est dut (.clk, .rst_n, .start, .i_sq, .psi_r, .omega_r, .done, .omega);

  task automatic run(input real iq, input real ps, input real wr);
    real e;
    i_sq <= r2f(iq); psi_r <= r2f(ps); omega_r <= r2f(wr);
    pulse(W + 4);
    e = PP * wr + LM_PU * (RR_PU / LR_PU) * iq / ps;
    chk("omega", f2r(omega), e, 1e-5 * (1.0 + 1.0 / ps));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 150; k++)
      run((real'($urandom % 2000) - 1000.0) / 400.0, 0.05 + real'($urandom % 1500) / 1000.0,
          (real'($urandom % 2000) - 1000.0) / 800.0);
    // zero flux: the slip term saturates to the top of the range
    i_sq <= r2f(0.5); psi_r <= '0; omega_r <= r2f(0.3);
    pulse(W + 4);
    checks++;
    if (omega !== FX_MAX) begin failures++; $display("FAIL zero flux: %0d", omega); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
