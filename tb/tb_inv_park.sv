// tb_inv_park -- self-checking testbench of the inverse Park transform.
// Random (d,q) vectors and field angles are compared with the real-valued
// inverse rotation; latency 2.
module tb_inv_park;
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

  dq_t dq = '0;
  fx_t cos_th = '0, sin_th = '0;
  ab_t ab;
  inv_park dut (.clk, .rst_n, .start, .dq, .cos_th, .sin_th, .done, .ab);

  task automatic run(input real d, input real q, input real th);
    real c, s;
    c = f2r(r2f($cos(th))); s = f2r(r2f($sin(th)));
    dq <= '{d: r2f(d), q: r2f(q)};
    cos_th <= r2f(c); sin_th <= r2f(s);
    pulse(2);
    chk("alpha", f2r(ab.alpha), c * d - s * q, 1e-5);
    chk("beta",  f2r(ab.beta),  s * d + c * q, 1e-5);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 200; k++)
      run((real'($urandom % 4000) - 2000.0) / 100.0, (real'($urandom % 4000) - 2000.0) / 100.0,
          real'($urandom % 6283) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
