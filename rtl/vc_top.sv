// vc_top -- one-chip induction-motor vector controller, one lap per start.
//
// Field-oriented (vector) control of an induction machine.  Each lap takes
// one set of samples -- the three stator phase currents and voltages, the
// measured rotor speed and the speed and flux references -- and produces the
// three phase voltage references for the inverter PWM stage:
//
//   currents --clarke--> i_ab --+--> rotor_flux_est --> Psi_r, cos, sin
//   voltages --clarke--> u_ab --'        |
//   i_ab, cos, sin --park--> i_sd, i_sq  |
//   omega_est(i_sq, Psi_r, omega_r) --> omega
//   speed loop:  err(omega_r* - omega_r) --pi--> i_sq*
//   flux loop:   err(Psi_r*   - Psi_r)   --pi--> i_sd*
//   current loops: err(i_sq* - i_sq) --pi--> v_sq, err(i_sd* - i_sd) --pi--> v_sd
//   decoupling(v, i_dq, Psi_r, omega) --> u_sd, u_sq
//   --inv_park(cos, sin)--> u_ab --inv_clarke--> u_ref (a,b,c)
//
// Every unit registers its outputs and reports completion with a done
// pulse; this module starts each unit as soon as all of its operands are
// ready, so independent work (speed loop, flux loop, omega estimator) runs
// in parallel with the critical path Clarke -> flux estimator -> Park ->
// omega estimator -> decoupling -> inverse Park -> inverse Clarke.  The
// divider and square-root operators are sequential (one bit per clock).
//
// Interface: start (one-cycle pulse, only while not busy) samples all
// inputs; done pulses when u_ref and the observation outputs are updated;
// busy is high from the cycle after start up to and including the done
// cycle; lap_cycles, valid with done, is the number of clocks from start to
// done: 3W+28 = 124 with the 32-bit word (Clarke 2, flux estimator 2W+13,
// Park 2, omega estimator W+4, decoupling 3, inverse Park 2, inverse
// Clarke 2).  Reset clears all controller state (integrators,
// stator flux).  All values are Q7.24 per unit (see vc_pkg).
//
// The block set, the signal flow, the equations and the sequential
// non-restoring divider/square root with registered module outputs follow
// the source design; the number format, per-unit scaling, machine
// constants, gains and the start/done sequencing are this design's.
module vc_top
  import vc_pkg::*;
#(
  parameter real RS     = RS_PU,
  parameter real RR     = RR_PU,
  parameter real LS     = LS_PU,
  parameter real LR     = LR_PU,
  parameter real LM     = LM_PU,
  parameter real NP     = PP,
  parameter real TS     = TS_PU,
  parameter real KP_SPEED = KP_SPD,
  parameter real KI_SPEED = KI_SPD,
  parameter real KP_FLUX  = KP_FLX,
  parameter real KI_FLUX  = KI_FLX,
  parameter real KP_ICUR  = KP_CUR,
  parameter real KI_ICUR  = KI_CUR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fx_t         omega_r_ref,
  input  fx_t         psi_r_ref,
  input  abc_t        i_abc,
  input  abc_t        u_abc,
  input  fx_t         omega_r,
  output logic        done,
  output logic        busy,
  output abc_t        u_ref,
  output fx_t         psi_r,
  output fx_t         omega,
  output dq_t         i_dq,
  output fx_t         cos_th,
  output fx_t         sin_th,
  output ab_t         psi_ab,
  output logic [15:0] lap_cycles
);

  // ---------------------------------------------------------------- samples
  fx_t  wr_s, pref_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_s   <= '0;
      pref_s <= '0;
    end else if (start) begin
      wr_s   <= omega_r;
      pref_s <= psi_r_ref;
    end
  end

  // ------------------------------------------------------- Clarke transforms
  ab_t  i_ab, u_ab;
  logic ci_done, cu_done;

  clarke u_clarke_i (.clk, .rst_n, .start(start), .abc(i_abc), .done(ci_done), .ab(i_ab));
  clarke u_clarke_u (.clk, .rst_n, .start(start), .abc(u_abc), .done(cu_done), .ab(u_ab));

  // ------------------------------------------------------ rotor flux estimator
  logic rfe_done;

  rotor_flux_est #(.RS(RS), .LS(LS), .LR(LR), .LM(LM), .TS(TS)) u_rfe (
    .clk, .rst_n, .start(ci_done), .i_ab(i_ab), .u_ab(u_ab),
    .done(rfe_done), .psi_r(psi_r), .cos_th(cos_th), .sin_th(sin_th), .psi_ab(psi_ab)
  );

  // ------------------------------------------------------------ Park transform
  logic park_done;

  park u_park (
    .clk, .rst_n, .start(rfe_done), .ab(i_ab), .cos_th(cos_th), .sin_th(sin_th),
    .done(park_done), .dq(i_dq)
  );

  // ----------------------------------------------------------- omega estimator
  logic west_done;

  omega_est #(.LM(LM), .RR(RR), .LR(LR), .NP(NP)) u_west (
    .clk, .rst_n, .start(park_done), .i_sq(i_dq.q), .psi_r(psi_r), .omega_r(wr_s),
    .done(west_done), .omega(omega)
  );

  // ---------------------------------------------------- speed and flux loops
  fx_t  e_spd, e_flx, isq_ref, isd_ref;
  logic es_done, ef_done, spi_done, fpi_done;

  err_diff u_err_spd (.clk, .rst_n, .start(start), .ref_i(omega_r_ref), .meas_i(omega_r),
                      .done(es_done), .err_o(e_spd));
  pi_ctrl #(.KP(KP_SPEED), .KI(KI_SPEED), .TS(TS)) u_pi_spd (
    .clk, .rst_n, .start(es_done), .err_i(e_spd), .done(spi_done), .y_o(isq_ref));

  err_diff u_err_flx (.clk, .rst_n, .start(rfe_done), .ref_i(pref_s), .meas_i(psi_r),
                      .done(ef_done), .err_o(e_flx));
  pi_ctrl #(.KP(KP_FLUX), .KI(KI_FLUX), .TS(TS)) u_pi_flx (
    .clk, .rst_n, .start(ef_done), .err_i(e_flx), .done(fpi_done), .y_o(isd_ref));

  // ------------------------------------------------------------ current loops
  // both current errors need i_dq (Park) and both current references
  logic f_park, f_fpi, f_spi, cur_go;

  assign cur_go = (f_park || park_done) && (f_fpi || fpi_done) && (f_spi || spi_done);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {f_park, f_fpi, f_spi} <= '0;
    end else if (cur_go) begin
      {f_park, f_fpi, f_spi} <= '0;
    end else begin
      if (park_done) f_park <= 1'b1;
      if (fpi_done)  f_fpi  <= 1'b1;
      if (spi_done)  f_spi  <= 1'b1;
    end
  end

  fx_t  e_iq, e_id;
  dq_t  v_dq;
  logic eq_done, ed_done, qpi_done, dpi_done;

  err_diff u_err_iq (.clk, .rst_n, .start(cur_go), .ref_i(isq_ref), .meas_i(i_dq.q),
                     .done(eq_done), .err_o(e_iq));
  err_diff u_err_id (.clk, .rst_n, .start(cur_go), .ref_i(isd_ref), .meas_i(i_dq.d),
                     .done(ed_done), .err_o(e_id));
  pi_ctrl #(.KP(KP_ICUR), .KI(KI_ICUR), .TS(TS)) u_pi_iq (
    .clk, .rst_n, .start(eq_done), .err_i(e_iq), .done(qpi_done), .y_o(v_dq.q));
  pi_ctrl #(.KP(KP_ICUR), .KI(KI_ICUR), .TS(TS)) u_pi_id (
    .clk, .rst_n, .start(ed_done), .err_i(e_id), .done(dpi_done), .y_o(v_dq.d));

  // --------------------------------------------------------------- decoupling
  logic f_qpi, f_west, dec_go, dec_done;
  dq_t  u_dq;

  assign dec_go = (f_qpi || qpi_done) && (f_west || west_done);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {f_qpi, f_west} <= '0;
    end else if (dec_go) begin
      {f_qpi, f_west} <= '0;
    end else begin
      if (qpi_done)  f_qpi  <= 1'b1;
      if (west_done) f_west <= 1'b1;
    end
  end

  decoupling #(.LS(LS), .LR(LR), .LM(LM), .RR(RR)) u_dec (
    .clk, .rst_n, .start(dec_go), .v_dq(v_dq), .i_dq(i_dq), .psi_r(psi_r), .omega(omega),
    .done(dec_done), .u_dq(u_dq)
  );

  // ------------------------------------------------- inverse Park and Clarke
  ab_t  us_ab;
  logic ip_done;

  inv_park u_ipark (.clk, .rst_n, .start(dec_done), .dq(u_dq), .cos_th(cos_th), .sin_th(sin_th),
                    .done(ip_done), .ab(us_ab));
  inv_clarke u_iclarke (.clk, .rst_n, .start(ip_done), .ab(us_ab), .done(done), .abc(u_ref));

  // --------------------------------------------------------- lap bookkeeping
  logic [15:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= '0;
      lap_cycles <= '0;
    end else begin
      if (start) begin
        busy <= 1'b1;
        cnt  <= 16'd1;
      end else if (busy) begin
        cnt <= cnt + 16'd1;
      end
      // the inverse Clarke transform finishes two cycles after it starts
      if (ip_done) lap_cycles <= cnt + 16'd2;
      if (done)    busy       <= 1'b0;
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_clarke_lockstep: assert property (@(posedge clk) disable iff (!rst_n) ci_done == cu_done);
  // the d-current loop runs in lockstep with the q-current loop
  a_cur_lockstep: assert property (@(posedge clk) disable iff (!rst_n) qpi_done == dpi_done);

endmodule
