// decoupling -- d/q voltage decoupling.
//
// Turns the current-controller outputs v_sd, v_sq into stator voltage
// commands by adding the cross-coupling and back-EMF terms of the machine
// model in the (d,q) frame:
//   u_sd = v_sd - sigma Ls omega i_sq + (M beta_r / Lr) (M i_sd - Psi_r)
//   u_sq = v_sq + sigma Ls omega i_sd + (M / Lr) omega Psi_r
// where the last term of u_sd is (M/Lr) dPsi_r/dt with dPsi_r/dt taken from
// the rotor flux equation, and beta_r = Rr/Lr.
//
// Timing: three registered stages (the omega products and M i_sd; the
// constant scalings and M i_sd - Psi_r; the sums); done pulses three cycles
// after start and u_dq holds until the next done.  The terms follow the
// machine equations of the source design; the staging is this design's.
module decoupling
  import vc_pkg::*;
#(
  parameter real LS = LS_PU,
  parameter real LR = LR_PU,
  parameter real LM = LM_PU,
  parameter real RR = RR_PU
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dq_t  v_dq,
  input  dq_t  i_dq,
  input  fx_t  psi_r,
  input  fx_t  omega,
  output logic done,
  output dq_t  u_dq
);

  localparam real SIGMA = 1.0 - (LM * LM) / (LS * LR);
  localparam fx_t K_SLS = to_fx(SIGMA * LS);
  localparam fx_t K_MLR = to_fx(LM / LR);
  localparam fx_t K_M   = to_fx(LM);
  localparam fx_t K_DD  = to_fx(LM * RR / (LR * LR));

  // stage 1
  fx_t  w_isq, w_isd, w_psi, m_isd, psi1;
  dq_t  v1;
  // stage 2
  fx_t  c_d, c_q, emf_q, dflux;
  dq_t  v2;
  logic s1, s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      done <= 1'b0;
      {w_isq, w_isd, w_psi, m_isd, psi1} <= '0;
      {c_d, c_q, emf_q, dflux} <= '0;
      v1 <= '0;
      v2 <= '0;
      u_dq <= '0;
    end else begin
      s1   <= start;
      s2   <= s1;
      done <= s2;
      if (start) begin
        w_isq <= fx_mul(omega, i_dq.q);
        w_isd <= fx_mul(omega, i_dq.d);
        w_psi <= fx_mul(omega, psi_r);
        m_isd <= fx_mul(K_M, i_dq.d);
        psi1  <= psi_r;
        v1    <= v_dq;
      end
      if (s1) begin
        c_d   <= fx_mul(K_SLS, w_isq);
        c_q   <= fx_mul(K_SLS, w_isd);
        emf_q <= fx_mul(K_MLR, w_psi);
        dflux <= fx_sub(m_isd, psi1);
        v2    <= v1;
      end
      if (s2) begin
        u_dq.d <= fx_add(fx_sub(v2.d, c_d), fx_mul(K_DD, dflux));
        u_dq.q <= fx_add(fx_add(v2.q, c_q), emf_q);
      end
    end
  end

endmodule
