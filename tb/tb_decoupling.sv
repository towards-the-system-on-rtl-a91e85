// tb_decoupling -- self-checking testbench of the d/q voltage decoupling.
// Random operating points are compared with the real-valued decoupling
// equations built from the default machine constants; latency 3.
module tb_decoupling;
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

  dq_t v_dq = '0, i_dq = '0, u_dq;
  fx_t psi_r = '0, omega = '0;
  decoupling dut (.clk, .rst_n, .start, .v_dq, .i_dq, .psi_r, .omega, .done, .u_dq);

  localparam real SIG = 1.0 - LM_PU * LM_PU / (LS_PU * LR_PU);
  localparam real BR  = RR_PU / LR_PU;

  task automatic run(input real vd, input real vq, input real id, input real iq,
                     input real ps, input real w);
    real ed, eq;
    v_dq <= '{d: r2f(vd), q: r2f(vq)};
    i_dq <= '{d: r2f(id), q: r2f(iq)};
    psi_r <= r2f(ps); omega <= r2f(w);
    pulse(3);
    ed = vd - SIG * LS_PU * w * iq + (LM_PU / LR_PU) * BR * (LM_PU * id - ps);
    eq = vq + SIG * LS_PU * w * id + (LM_PU / LR_PU) * w * ps;
    chk("u_sd", f2r(u_dq.d), ed, 2e-5);
    chk("u_sq", f2r(u_dq.q), eq, 2e-5);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 200; k++)
      run((real'($urandom % 2000) - 1000.0) / 500.0, (real'($urandom % 2000) - 1000.0) / 500.0,
          (real'($urandom % 2000) - 1000.0) / 500.0, (real'($urandom % 2000) - 1000.0) / 500.0,
          real'($urandom % 1500) / 1000.0, (real'($urandom % 2000) - 1000.0) / 500.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
