// inv_park -- inverse Park transform, rotating (d,q) to stationary (alpha,beta).
//
// alpha = cos(theta) d - sin(theta) q
// beta  = sin(theta) d + cos(theta) q
// with cos/sin(theta) from the rotor flux estimator.
//
// Timing: products in the first registered stage, sums in the second; done
// pulses two cycles after start and ab holds until the next done.  The
// transform is the source design's; the staging is this design's.
module inv_park
  import vc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dq_t  dq,
  input  fx_t  cos_th,
  input  fx_t  sin_th,
  output logic done,
  output ab_t  ab
);

  fx_t  cd, sq, sd, cq;
  logic s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      done <= 1'b0;
      {cd, sq, sd, cq} <= '0;
      ab   <= '0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        cd <= fx_mul(cos_th, dq.d);
        sq <= fx_mul(sin_th, dq.q);
        sd <= fx_mul(sin_th, dq.d);
        cq <= fx_mul(cos_th, dq.q);
      end
      if (s1) begin
        ab.alpha <= fx_sub(cd, sq);
        ab.beta  <= fx_add(sd, cq);
      end
    end
  end

endmodule
