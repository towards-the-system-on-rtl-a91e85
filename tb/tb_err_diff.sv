// tb_err_diff -- self-checking testbench of the error difference unit.
// Random and saturating operand pairs are compared with an exact integer
// subtraction clamped to the 32-bit range; latency must be one cycle.
module tb_err_diff;
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

  fx_t ref_i = '0, meas_i = '0, err_o;
  err_diff dut (.clk, .rst_n, .start, .ref_i, .meas_i, .done, .err_o);

  task automatic run(input fx_t r, input fx_t m);
    longint e;
    ref_i <= r; meas_i <= m;
    pulse(1);
    e = longint'(r) - longint'(m);
    if (e > 64'sd2147483647)  e = 64'sd2147483647;
    if (e < -64'sd2147483648) e = -64'sd2147483648;
    checks++;
    if (err_o !== fx_t'(e)) begin
      failures++;
      $display("FAIL %0d - %0d = %0d", r, m, err_o);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(FX_MAX, FX_MIN);
    run(FX_MIN, FX_MAX);
    run(FX_MIN, 32'sd1);
    for (int k = 0; k < 300; k++) run(fx_t'($urandom), fx_t'($urandom) >>> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
