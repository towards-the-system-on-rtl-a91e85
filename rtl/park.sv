// park -- Park transform, stationary (alpha,beta) to the rotating (d,q) frame.
//
// d =  cos(theta) alpha + sin(theta) beta
// q = -sin(theta) alpha + cos(theta) beta
// cos(theta) and sin(theta) come straight from the rotor flux estimator
// (Psi_ra/Psi_r and Psi_rb/Psi_r), so no trigonometric function is evaluated.
//
// Timing: the four products are registered in the first cycle, the sums in
// the second; done pulses two cycles after start and dq holds until the next
// done.  The transform is the source design's; the staging is this design's.
module park
  import vc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  ab_t  ab,
  input  fx_t  cos_th,
  input  fx_t  sin_th,
  output logic done,
  output dq_t  dq
);

  fx_t  ca, sb, sa, cb;
  logic s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      done <= 1'b0;
      {ca, sb, sa, cb} <= '0;
      dq   <= '0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        ca <= fx_mul(cos_th, ab.alpha);
        sb <= fx_mul(sin_th, ab.beta);
        sa <= fx_mul(sin_th, ab.alpha);
        cb <= fx_mul(cos_th, ab.beta);
      end
      if (s1) begin
        dq.d <= fx_add(ca, sb);
        dq.q <= fx_sub(cb, sa);
      end
    end
  end

endmodule
