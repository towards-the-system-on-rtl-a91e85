// inv_clarke -- inverse Clarke transform, (alpha,beta) to three phases.
//
// a = alpha, b = -alpha/2 + (sqrt(3)/2) beta, c = -alpha/2 - (sqrt(3)/2) beta,
// the inverse of the amplitude-invariant Clarke transform.  Its outputs are
// the phase voltage references handed to the PWM stage.
//
// Timing: two registered stages (alpha/2 and (sqrt(3)/2) beta, then the
// sums); done pulses two cycles after start and abc holds until the next
// done.  The transform follows the source design; the scaling and staging
// are this design's choices.
module inv_clarke
  import vc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  ab_t  ab,
  output logic done,
  output abc_t abc
);

  localparam fx_t K_SQ3_2 = to_fx($sqrt(3.0) / 2.0);

  fx_t  a_r, half, kb;
  logic s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      done <= 1'b0;
      a_r  <= '0;
      half <= '0;
      kb   <= '0;
      abc  <= '0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        a_r  <= ab.alpha;
        half <= ab.alpha >>> 1;
        kb   <= fx_mul(K_SQ3_2, ab.beta);
      end
      if (s1) begin
        abc.a <= a_r;
        abc.b <= fx_sub(kb, half);
        abc.c <= sat(-fx2_t'(half) - fx2_t'(kb));
      end
    end
  end

endmodule
