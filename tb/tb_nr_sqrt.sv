// tb_nr_sqrt -- self-checking testbench of the sequential square root.
// The expected root is found by an independent integer bisection; edge
// values (0, 1, perfect squares and their neighbours, all ones) and random
// radicands of every magnitude are checked, and each root must take W+2
// cycles from start to done.
module tb_nr_sqrt;
  import vc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2*W-1:0] rad = '0;
  logic [W-1:0]   root;
  logic done, busy;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  nr_sqrt dut (.clk, .rst_n, .start, .rad, .done, .busy, .root);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // largest r with r*r <= x, by bisection over 33-bit candidates
  function automatic logic [W-1:0] isqrt(input logic [2*W-1:0] x);
    logic [W:0] lo, hi, mid;
    logic [2*W+1:0] sq;
    lo = '0; hi = {1'b1, {W{1'b0}}};   // answer in [lo, hi)
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      sq  = (2*W+2)'(mid) * (2*W+2)'(mid);
      if (sq <= (2*W+2)'(x)) lo = mid; else hi = mid;
    end
    return lo[W-1:0];
  endfunction

  task automatic run(input logic [2*W-1:0] x);
    int cyc;
    @(posedge clk);
    rad <= x; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0; #1; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (root !== isqrt(x)) begin
      failures++;
      $display("FAIL sqrt(%0d): got %0d exp %0d", x, root, isqrt(x));
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
    run('0); run(64'd1); run(64'd2); run(64'd3); run(64'd4);
    run(64'd144); run(64'd143); run(64'd145);
    run({2*W{1'b1}});
    run(64'hFFFF_FFFE_0000_0001);     // (2^32-1)^2
    run(64'hFFFF_FFFE_0000_0000);
    run(64'h4000_0000_0000_0000);
    for (int k = 0; k < 400; k++) begin
      logic [2*W-1:0] x;
      x = {$urandom, $urandom} >> ($urandom % 64);
      run(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
