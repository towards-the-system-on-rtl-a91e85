// tb_inv_clarke -- self-checking testbench of the inverse Clarke transform.
// Random (alpha,beta) pairs are compared with a = alpha,
// b,c = -alpha/2 +- sqrt(3)/2 beta in real arithmetic; latency 2.
module tb_inv_clarke;
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

  ab_t  ab = '0;
  abc_t abc;
  inv_clarke dut (.clk, .rst_n, .start, .ab, .done, .abc);

  task automatic run(input real al, input real be);
    ab <= '{alpha: r2f(al), beta: r2f(be)};
    pulse(2);
    chk("a", f2r(abc.a), al, 1e-5);
    chk("b", f2r(abc.b), -al / 2.0 + $sqrt(3.0) / 2.0 * be, 1e-5);
    chk("c", f2r(abc.c), -al / 2.0 - $sqrt(3.0) / 2.0 * be, 1e-5);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 200; k++)
      run((real'($urandom % 4000) - 2000.0) / 100.0, (real'($urandom % 4000) - 2000.0) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
