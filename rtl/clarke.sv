// clarke -- Clarke transform, three-phase (a,b,c) to stationary (alpha,beta).
//
// Amplitude-invariant form: alpha = (2a - b - c)/3, beta = (b - c)/sqrt(3).
// With a balanced set (a+b+c = 0) this gives alpha = a.  Used once for the
// stator currents and once for the stator voltages.
//
// Timing: two registered stages.  abc is sampled with start; the sums
// 2a-b-c and b-c are registered first, the scaling by the constants 1/3 and
// 1/sqrt(3) second; done pulses two cycles after start and ab holds until
// the next done.  The transform is the one the source design names; the
// amplitude-invariant scaling and the two-stage split are this design's
// choices.
module clarke
  import vc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  abc_t abc,
  output logic done,
  output ab_t  ab
);

  localparam fx_t K_THIRD  = to_fx(1.0 / 3.0);
  localparam fx_t K_INVSQ3 = to_fx(1.0 / $sqrt(3.0));

  fx_t  d1, d2;
  logic s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      done <= 1'b0;
      d1   <= '0;
      d2   <= '0;
      ab   <= '0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        d1 <= sat(2 * fx2_t'(abc.a) - fx2_t'(abc.b) - fx2_t'(abc.c));
        d2 <= fx_sub(abc.b, abc.c);
      end
      if (s1) begin
        ab.alpha <= fx_mul(K_THIRD, d1);
        ab.beta  <= fx_mul(K_INVSQ3, d2);
      end
    end
  end

endmodule
