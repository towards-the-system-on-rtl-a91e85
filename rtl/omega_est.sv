// omega_est -- estimator of the speed omega of the (d,q) reference frame.
//
// omega = Pp * omega_r + (M beta_r) * i_sq / Psi_r,   beta_r = Rr / Lr,
// the rotor speed in electrical units plus the slip speed.  The constant
// products Pp*omega_r and (M beta_r)*i_sq are formed in one registered
// stage; the division by Psi_r uses the sequential non-restoring divider
// nr_div; a final stage adds the two terms.  A zero flux saturates the slip
// term.
//
// Timing: inputs are sampled with start; done pulses W+4 cycles after start
// (36 at W=32) and omega holds until the next done.  The equation is the
// source design's; the staging is this design's choice.
module omega_est
  import vc_pkg::*;
#(
  parameter real LM = LM_PU,
  parameter real RR = RR_PU,
  parameter real LR = LR_PU,
  parameter real NP = PP      // pole pairs
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  i_sq,
  input  fx_t  psi_r,
  input  fx_t  omega_r,
  output logic done,
  output fx_t  omega
);

  localparam fx_t K_MBR = to_fx(LM * RR / LR);
  localparam fx_t K_PP  = to_fx(NP);

  fx_t  num_r, den_r, wr_e, slip;
  logic dv_start, dv_done, dv_busy;

  nr_div u_div (
    .clk, .rst_n, .start(dv_start), .num(num_r), .den(den_r),
    .done(dv_done), .busy(dv_busy), .quo(slip)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dv_start <= 1'b0;
      done     <= 1'b0;
      num_r    <= '0;
      den_r    <= '0;
      wr_e     <= '0;
      omega    <= '0;
    end else begin
      dv_start <= start;
      done     <= dv_done;
      if (start) begin
        num_r <= fx_mul(K_MBR, i_sq);
        den_r <= psi_r;
        wr_e  <= fx_mul(K_PP, omega_r);
      end
      if (dv_done) omega <= fx_add(wr_e, slip);
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !dv_busy && !dv_start);

endmodule
