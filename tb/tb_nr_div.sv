// tb_nr_div -- self-checking testbench of the sequential divider.
// Compares against exact 64-bit integer division of the scaled dividend,
// including negative operands, saturation and a zero divisor, and checks
// that every division takes W+2 cycles from start to done.
module tb_nr_div;
  import vc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t  num = '0, den = '0, quo;
  logic done, busy;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  nr_div dut (.clk, .rst_n, .start, .num, .den, .done, .busy, .quo);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t expect_q(input fx_t n, input fx_t d);
    longint e;
    if (n == 0) return '0;
    if (d == 0) return n < 0 ? FX_MIN : FX_MAX;
    e = (longint'(n) <<< FRAC) / longint'(d);
    if (e > 64'sd2147483647)  return FX_MAX;
    if (e < -64'sd2147483648) return FX_MIN;
    return fx_t'(e);
  endfunction

  task automatic run(input fx_t n, input fx_t d);
    int cyc;
    @(posedge clk);
    num <= n; den <= d; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0; #1; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (quo !== expect_q(n, d)) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d exp %0d", n, d, quo, expect_q(n, d));
    end
    checks++;
    if (cyc != W + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(r2f(1.0), r2f(2.0));
    run(r2f(-3.0), r2f(0.75));
    run(r2f(0.3), r2f(-0.9));
    run(r2f(100.0), r2f(0.5));      // saturates positive
    run(r2f(-100.0), r2f(0.5));     // saturates negative
    run(r2f(1.0), '0);              // zero divisor
    run('0, '0);
    run(FX_MIN, FX_MIN);
    run(FX_MAX, 32'sd1);
    run(32'sd7, FX_MAX);
    for (int k = 0; k < 400; k++) begin
      fx_t n, d;
      n = fx_t'($urandom) >>> ($urandom % 24);
      d = fx_t'($urandom) >>> ($urandom % 24);
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t r2f(input real r);
    return fx_t'($rtoi(r * (2.0 ** FRAC)));
  endfunction
endmodule
