// tb_rotor_flux_est -- self-checking testbench of the rotor flux estimator.
// Feeds a rotating stator voltage and current vector for a number of laps
// and compares the stator-flux integration, the rotor flux vector, its
// modulus and cos/sin of its angle with a real-valued model of the same
// equations; latency 2W+13 cycles per lap.
module tb_rotor_flux_est;
  import vc_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  ab_t i_ab = '0, u_ab = '0, psi_ab;
  fx_t psi_r, cos_th, sin_th;
  rotor_flux_est dut (.clk, .rst_n, .start, .i_ab, .u_ab, .done, .psi_r, .cos_th, .sin_th, .psi_ab);

  localparam real SIG = 1.0 - LM_PU * LM_PU / (LS_PU * LR_PU);
  real psa = 0.0, psb = 0.0;

  task automatic lap(input real ia, input real ib, input real ua, input real ub);
    real pra, prb, m;
    i_ab <= '{alpha: r2f(ia), beta: r2f(ib)};
    u_ab <= '{alpha: r2f(ua), beta: r2f(ub)};
    pulse(2 * W + 13);
    psa = psa + TS_PU * (ua - RS_PU * ia);
    psb = psb + TS_PU * (ub - RS_PU * ib);
    pra = (LR_PU / LM_PU) * (psa - SIG * LS_PU * ia);
    prb = (LR_PU / LM_PU) * (psb - SIG * LS_PU * ib);
    m   = $sqrt(pra * pra + prb * prb);
    chk("psi_ra", f2r(psi_ab.alpha), pra, 1e-4);
    chk("psi_rb", f2r(psi_ab.beta),  prb, 1e-4);
    chk("psi_r",  f2r(psi_r), m, 1e-4);
    if (m > 0.05) begin
      chk("cos", f2r(cos_th), pra / m, 1e-3);
      chk("sin", f2r(sin_th), prb / m, 1e-3);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 120; k++) begin
      real th;
      th = TS_PU * k;   // synchronous rotation, one rad per unit time
      lap(0.4 * $cos(th - 0.5), 0.4 * $sin(th - 0.5), $cos(th + 0.02), $sin(th + 0.02));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
