// tb_clarke -- self-checking testbench of the Clarke transform.
// Balanced and unbalanced random three-phase sets are compared with
// alpha = (2a-b-c)/3, beta = (b-c)/sqrt(3) in real arithmetic; latency 2.
module tb_clarke;
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

  abc_t abc = '0;
  ab_t  ab;
  clarke dut (.clk, .rst_n, .start, .abc, .done, .ab);

  task automatic run(input real a, input real b, input real c);
    abc <= '{a: r2f(a), b: r2f(b), c: r2f(c)};
    pulse(2);
    chk("alpha", f2r(ab.alpha), (2.0 * a - b - c) / 3.0, 1e-5);
    chk("beta",  f2r(ab.beta),  (b - c) / $sqrt(3.0), 1e-5);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 100; k++) begin
      real th, m;
      th = 0.1 * k; m = 1.0 + 0.05 * k;
      run(m * $cos(th), m * $cos(th - 2.0943951), m * $cos(th + 2.0943951));
    end
    for (int k = 0; k < 100; k++)
      run((real'($urandom % 2000) - 1000.0) / 50.0, (real'($urandom % 2000) - 1000.0) / 50.0,
          (real'($urandom % 2000) - 1000.0) / 50.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
