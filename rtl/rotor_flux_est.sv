// rotor_flux_est -- rotor flux estimator.
//
// Estimates the rotor flux vector in the stationary frame from the stator
// voltage and current vectors (voltage model), then its modulus and angle:
//   Psi_s  += Ts * (u_s - Rs i_s)                 stator flux, per lap
//   Psi_r   = (Lr/M) * (Psi_s - sigma Ls i_s)      rotor flux vector
//   Psi_r   = sqrt(Psi_ra^2 + Psi_rb^2)            modulus
//   cos th  = Psi_ra / Psi_r,  sin th = Psi_rb / Psi_r
// so the field angle is delivered as cos/sin without any trigonometric
// evaluation.  A zero modulus (at start-up, before any flux exists) has no
// angle; the estimator then reports theta = 0 (cos = 1, sin = 0) so that the
// controller can magnetise the machine along the alpha axis.  The squares are kept at full 2W-bit precision; the square
// root of that 2*FRAC-fraction sum is directly a FRAC-fraction value.  The
// root and the two divisions use the sequential non-restoring units
// nr_sqrt and nr_div; the two divisions run in parallel.
//
// Timing: i_ab/u_ab are sampled with start.  Four registered stages
// (error voltage, stator flux integration, subtraction of the leakage flux,
// scaling to rotor flux), one cycle forming the sum of squares and
// launching the square root, W+2 cycles of square root, one cycle to launch
// the dividers, W+2 cycles of division and two output cycles: done pulses
// 2W+13 cycles after start (77 at W=32).
// Outputs hold until the next done.  Reset clears the stator flux state.
//
// The modulus, cos/sin and the use of a sequential non-restoring square root
// and dividers follow the source design.  The voltage-model flux observer
// (its inputs are the stator voltages and currents) and the forward-Euler
// integration are this design's choices.
module rotor_flux_est
  import vc_pkg::*;
#(
  parameter real RS = RS_PU,
  parameter real LS = LS_PU,
  parameter real LR = LR_PU,
  parameter real LM = LM_PU,
  parameter real TS = TS_PU
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  ab_t  i_ab,
  input  ab_t  u_ab,
  output logic done,
  output fx_t  psi_r,
  output fx_t  cos_th,
  output fx_t  sin_th,
  output ab_t  psi_ab
);

  localparam real SIGMA = 1.0 - (LM * LM) / (LS * LR);
  localparam fx_t K_RS  = to_fx(RS);
  localparam fx_t K_TS  = to_fx(TS);
  localparam fx_t K_SLS = to_fx(SIGMA * LS);
  localparam fx_t K_LRM = to_fx(LR / LM);
  localparam fx_t FX_ONE = to_fx(1.0);

  typedef enum logic [3:0] {
    S_IDLE, S_EMF, S_INT, S_LEAK, S_SCALE, S_SQR, S_ROOT, S_DIV, S_OUT
  } state_e;
  state_e state;

  ab_t  i_r, e_r, psis, t_r;
  logic [2*W-1:0] sumsq;
  fx_t  psi_mod;

  logic sq_start, sq_done, sq_busy;
  logic [W-1:0] sq_root;
  logic dv_start, dva_done, dvb_done, dva_busy, dvb_busy;
  fx_t  q_cos, q_sin;

  nr_sqrt u_sqrt (
    .clk, .rst_n, .start(sq_start), .rad(sumsq),
    .done(sq_done), .busy(sq_busy), .root(sq_root)
  );

  nr_div u_div_cos (
    .clk, .rst_n, .start(dv_start), .num(psi_ab.alpha), .den(psi_mod),
    .done(dva_done), .busy(dva_busy), .quo(q_cos)
  );

  nr_div u_div_sin (
    .clk, .rst_n, .start(dv_start), .num(psi_ab.beta), .den(psi_mod),
    .done(dvb_done), .busy(dvb_busy), .quo(q_sin)
  );

  fx2_t sq_a, sq_b;
  assign sq_a = fx2_t'(psi_ab.alpha) * fx2_t'(psi_ab.alpha);
  assign sq_b = fx2_t'(psi_ab.beta)  * fx2_t'(psi_ab.beta);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      i_r      <= '0;
      e_r      <= '0;
      psis     <= '0;
      t_r      <= '0;
      psi_ab   <= '0;
      sumsq    <= '0;
      psi_mod  <= '0;
      psi_r    <= '0;
      cos_th   <= '0;
      sin_th   <= '0;
    end else begin
      done     <= 1'b0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_r   <= i_ab;
          e_r.alpha <= fx_sub(u_ab.alpha, fx_mul(K_RS, i_ab.alpha));
          e_r.beta  <= fx_sub(u_ab.beta,  fx_mul(K_RS, i_ab.beta));
          state <= S_EMF;
        end
        S_EMF: begin
          psis.alpha <= fx_add(psis.alpha, fx_mul(K_TS, e_r.alpha));
          psis.beta  <= fx_add(psis.beta,  fx_mul(K_TS, e_r.beta));
          state <= S_INT;
        end
        S_INT: begin
          t_r.alpha <= fx_sub(psis.alpha, fx_mul(K_SLS, i_r.alpha));
          t_r.beta  <= fx_sub(psis.beta,  fx_mul(K_SLS, i_r.beta));
          state <= S_LEAK;
        end
        S_LEAK: begin
          psi_ab.alpha <= fx_mul(K_LRM, t_r.alpha);
          psi_ab.beta  <= fx_mul(K_LRM, t_r.beta);
          state <= S_SCALE;
        end
        S_SCALE: begin
          sumsq    <= (2*W)'(sq_a) + (2*W)'(sq_b);
          sq_start <= 1'b1;
          state    <= S_SQR;
        end
        S_SQR: if (sq_done) begin
          // a root of 2^(W-1) or more only arises at the extreme of the range
          psi_mod  <= sq_root[W-1] ? FX_MAX : fx_t'(sq_root);
          state    <= S_ROOT;
        end
        S_ROOT: begin
          dv_start <= 1'b1;
          state    <= S_DIV;
        end
        S_DIV: if (dva_done) begin
          psi_r  <= psi_mod;
          // zero flux has no angle: take theta = 0 so the loop can start
          cos_th <= (psi_mod == '0) ? FX_ONE : q_cos;
          sin_th <= (psi_mod == '0) ? '0     : q_sin;
          state  <= S_OUT;
        end
        S_OUT: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // both dividers are started together and take the same time
  a_div_lockstep: assert property (@(posedge clk) disable iff (!rst_n) dva_done == dvb_done);
  a_units_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 (sq_start |-> !sq_busy) and (dv_start |-> !dva_busy && !dvb_busy));
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
