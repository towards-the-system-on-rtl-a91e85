// tb_vc_top -- end-to-end testbench of the vector controller at its default
// parameters.
//
// The controller runs in closed loop with a per-unit induction-machine model
// (stator and rotor flux linkages in the stationary frame plus the
// mechanical equation, integrated with sub-stepped forward Euler) fed by an
// ideal inverter: the phase voltage references of one lap are applied for
// one sample period.  Each lap samples the machine's phase currents, the
// phase voltages applied during the previous period and the rotor speed,
// with a flux reference from the start and a speed reference step part way
// through.  A
// real-valued model of the complete lap -- Clarke transforms, voltage-model
// flux observer, modulus and cos/sin, Park transform, omega estimator, the
// four error differences and PI controllers, decoupling, inverse Park and
// inverse Clarke -- keeps its own controller state and predicts every
// output, which is compared with the design.  The model's integrator
// states (stator flux, PI integrators) are loaded from the design at the
// start of every lap; everything within the lap is recomputed
// independently.  Also checked: the lap takes
// 3W+28 clock cycles (lap_cycles and the start-to-done time agree), busy
// is high for exactly the lap, the zero-flux start-up rule is used, the
// current loops wait for the flux loop and the decoupling waits for the
// omega estimator (each counted), the field angle visits all four quadrants so
// that every sign case of the dividers is exercised, the flux reaches its
// reference and the rotor follows the speed step.
module tb_vc_top;
  import vc_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done, busy;
  fx_t  omega_r_ref = '0, psi_r_ref = '0, omega_r = '0;
  abc_t i_abc = '0, u_abc = '0, u_ref;
  fx_t  psi_r, omega, cos_th, sin_th;
  dq_t  i_dq;
  ab_t  psi_ab;
  logic [15:0] lap_cycles;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  vc_top dut (.clk, .rst_n, .start, .omega_r_ref, .psi_r_ref, .i_abc, .u_abc, .omega_r,
              .done, .busy, .u_ref, .psi_r, .omega, .i_dq, .cos_th, .sin_th, .psi_ab,
              .lap_cycles);

  localparam int  NLAPS = 2000;
  localparam int  LAP   = 3 * W + 28;
  localparam real SIG   = 1.0 - LM_PU * LM_PU / (LS_PU * LR_PU);
  localparam real TOP   = 127.99999994;
  localparam real TOL   = 1e-4;   // relative to 1 + |expected|

  initial begin
    repeat (NLAPS * (LAP + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ reference model state
  real psa = 0.0, psb = 0.0;                 // stator flux
  real i_spd = 0.0, i_flx = 0.0, i_iq = 0.0, i_id = 0.0;   // PI integrators
  int  n_laps = 0, n_timing = 0, n_match = 0, n_busy = 0;
  int  quad[4] = '{0, 0, 0, 0};
  bit  flux_ok = 1'b0, speed_ok = 1'b0;
  // sequencing events inside the lap
  int  n_cur_wait = 0, n_dec_wait = 0, n_startup = 0;

  // current loops waiting: Park finished, flux PI not yet
  always @(posedge clk) if (rst_n && (dut.f_park || dut.park_done) && !dut.cur_go) n_cur_wait++;
  // decoupling waiting: current loops finished, omega estimator not yet
  always @(posedge clk) if (rst_n && (dut.f_qpi || dut.qpi_done) && !dut.dec_go) n_dec_wait++;

  function automatic real clamp(input real x);
    if (x > TOP)  return TOP;
    if (x < -TOP) return -TOP;
    return x;
  endfunction

  real max_dev = 0.0;

  task automatic chk(input string what, input real got, input real exp);
    real d;
    d = (got - exp) / (1.0 + (exp < 0.0 ? -exp : exp));
    if (d < 0.0) d = -d;
    if (d > max_dev) max_dev = d;
    checks++;
    if (d > TOL) begin
      failures++;
      $display("FAIL lap %0d %s: got %f exp %f", n_laps, what, got, exp);
    end
  endtask

  // ---------------------------------------------------- machine model
  localparam real JM = 0.2;                // inertia, per unit
  real m_psa = 0.0, m_psb = 0.0, m_pra = 0.0, m_prb = 0.0, m_wr = 0.0;
  real m_ia = 0.0, m_ib = 0.0;             // stator alpha/beta current
  real ap_a = 0.0, ap_b = 0.0, ap_c = 0.0; // phase voltages of the last period

  task automatic machine_currents();
    real dd;
    dd = LS_PU * LR_PU - LM_PU * LM_PU;
    m_ia = (LR_PU * m_psa - LM_PU * m_pra) / dd;
    m_ib = (LR_PU * m_psb - LM_PU * m_prb) / dd;
  endtask

  task automatic machine_step(input real va, input real vb, input real vc);
    real ual, ube, dd, ira, irb, we, te;
    ual = (2.0 * va - vb - vc) / 3.0;  ube = (vb - vc) / $sqrt(3.0);
    dd  = LS_PU * LR_PU - LM_PU * LM_PU;
    for (int k = 0; k < 20; k++) begin
      machine_currents();
      ira = (LS_PU * m_pra - LM_PU * m_psa) / dd;
      irb = (LS_PU * m_prb - LM_PU * m_psb) / dd;
      we  = PP * m_wr;
      te  = PP * (LM_PU / LR_PU) * (m_pra * m_ib - m_prb * m_ia);
      m_psa = m_psa + TS_PU / 20.0 * (ual - RS_PU * m_ia);
      m_psb = m_psb + TS_PU / 20.0 * (ube - RS_PU * m_ib);
      m_pra = m_pra + TS_PU / 20.0 * (-RR_PU * ira - we * m_prb);
      m_prb = m_prb + TS_PU / 20.0 * (-RR_PU * irb + we * m_pra);
      m_wr  = m_wr + TS_PU / 20.0 * te / JM;
    end
    machine_currents();
  endtask

  task automatic lap(input real wref, input real pref);
    real ia, ib, ic, ua, ub, uc, wr;
    real ial, ibe, ual, ube, pra, prb, m, c, s, id, iq, w;
    real es, ef, isq_r, isd_r, eq, ed, vq, vd, usd, usq, sal, sbe;
    int  cyc, busy_cyc;
    bit  ok;

    // samples of the machine
    ia = m_ia; ib = -m_ia / 2.0 + $sqrt(3.0) / 2.0 * m_ib; ic = -ia - ib;
    ua = ap_a; ub = ap_b; uc = ap_c; wr = m_wr;
    ia = f2r(r2f(ia)); ib = f2r(r2f(ib)); ic = f2r(r2f(ic));
    ua = f2r(r2f(ua)); ub = f2r(r2f(ub)); uc = f2r(r2f(uc));
    wr = f2r(r2f(wr)); wref = f2r(r2f(wref)); pref = f2r(r2f(pref));

    // the model starts each lap from the design's controller state, so that
    // rounding in the fixed-point integrators does not accumulate into a
    // drift between the two over many laps
    psa   = f2r(dut.u_rfe.psis.alpha);  psb  = f2r(dut.u_rfe.psis.beta);
    i_spd = f2r(dut.u_pi_spd.integ);    i_flx = f2r(dut.u_pi_flx.integ);
    i_iq  = f2r(dut.u_pi_iq.integ);     i_id  = f2r(dut.u_pi_id.integ);

    @(posedge clk);
    i_abc <= '{a: r2f(ia), b: r2f(ib), c: r2f(ic)};
    u_abc <= '{a: r2f(ua), b: r2f(ub), c: r2f(uc)};
    omega_r <= r2f(wr); omega_r_ref <= r2f(wref); psi_r_ref <= r2f(pref);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1; cyc = 1; busy_cyc = busy ? 1 : 0;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1; cyc++;
      if (busy) busy_cyc++;
    end
    n_laps++;

    // ---- reference lap
    ial = (2.0 * ia - ib - ic) / 3.0;  ibe = (ib - ic) / $sqrt(3.0);
    ual = (2.0 * ua - ub - uc) / 3.0;  ube = (ub - uc) / $sqrt(3.0);
    psa = psa + TS_PU * (ual - RS_PU * ial);
    psb = psb + TS_PU * (ube - RS_PU * ibe);
    pra = (LR_PU / LM_PU) * (psa - SIG * LS_PU * ial);
    prb = (LR_PU / LM_PU) * (psb - SIG * LS_PU * ibe);
    m   = $sqrt(pra * pra + prb * prb);
    if (m > 0.0) begin c = pra / m; s = prb / m; end
    else begin c = 1.0; s = 0.0; end
    id  =  c * ial + s * ibe;
    iq  = -s * ial + c * ibe;
    w   = PP * wr + ((iq == 0.0) ? 0.0 : LM_PU * (RR_PU / LR_PU) * iq / m);
    es  = wref - wr;
    i_spd = clamp(i_spd + KI_SPD * TS_PU * es);  isq_r = clamp(KP_SPD * es + i_spd);
    ef  = pref - m;
    i_flx = clamp(i_flx + KI_FLX * TS_PU * ef);  isd_r = clamp(KP_FLX * ef + i_flx);
    eq  = isq_r - iq;  ed = isd_r - id;
    i_iq = clamp(i_iq + KI_CUR * TS_PU * eq);    vq = clamp(KP_CUR * eq + i_iq);
    i_id = clamp(i_id + KI_CUR * TS_PU * ed);    vd = clamp(KP_CUR * ed + i_id);
    usd = vd - SIG * LS_PU * w * iq + (LM_PU / LR_PU) * (RR_PU / LR_PU) * (LM_PU * id - m);
    usq = vq + SIG * LS_PU * w * id + (LM_PU / LR_PU) * w * m;
    sal = c * usd - s * usq;
    sbe = s * usd + c * usq;

    // ---- compare
    checks++;
    if (cyc == LAP && lap_cycles == 16'(LAP)) n_timing++;
    else begin failures++; $display("FAIL lap %0d took %0d / %0d cycles", n_laps, cyc, lap_cycles); end
    checks++;
    if (busy_cyc == LAP) n_busy++;
    else begin failures++; $display("FAIL lap %0d busy for %0d cycles", n_laps, busy_cyc); end

    ok = 1'b1;
    begin
      int f0;
      f0 = failures;
      chk("psi_r", f2r(psi_r), m);
      chk("psi_ra", f2r(psi_ab.alpha), pra);
      chk("psi_rb", f2r(psi_ab.beta), prb);
      chk("cos", f2r(cos_th), c);
      chk("sin", f2r(sin_th), s);
      chk("i_sd", f2r(i_dq.d), id);
      chk("i_sq", f2r(i_dq.q), iq);
      chk("omega", f2r(omega), w);
      chk("u_a", f2r(u_ref.a), sal);
      chk("u_b", f2r(u_ref.b), -sal / 2.0 + $sqrt(3.0) / 2.0 * sbe);
      chk("u_c", f2r(u_ref.c), -sal / 2.0 - $sqrt(3.0) / 2.0 * sbe);
      if (failures != f0) ok = 1'b0;
    end
    if (ok) n_match++;
    if (psi_r == '0 && cos_th == r2f(1.0) && sin_th == '0) n_startup++;
    if (m > 0.05) quad[(c >= 0.0 ? 0 : 1) + (s >= 0.0 ? 0 : 2)]++;

    // the inverter applies the design's references for one period
    ap_a = f2r(u_ref.a); ap_b = f2r(u_ref.b); ap_c = f2r(u_ref.c);
    machine_step(ap_a, ap_b, ap_c);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < NLAPS; k++) begin
      lap((k < NLAPS / 5) ? 0.0 : 0.5, 0.9);
      repeat ($urandom % 4) @(posedge clk);   // idle gap between laps
    end
    flux_ok  = near(f2r(psi_r), 0.9, 0.05);
    speed_ok = near(m_wr, 0.5, 0.05);
    $display("at the end: flux %f, speed %f; largest deviation from the model %g",
             f2r(psi_r), m_wr, max_dev);
    checks++;
    if (!flux_ok)  begin failures++; $display("FAIL flux did not reach its reference"); end
    checks++;
    if (!speed_ok) begin failures++; $display("FAIL speed did not follow the step"); end
    $display("laps=%0d timed_ok=%0d busy_ok=%0d matched=%0d quadrants=%0d/%0d/%0d/%0d",
             n_laps, n_timing, n_busy, n_match, quad[0], quad[1], quad[2], quad[3]);
    $display("start-up angle rule used in %0d laps; cycles waiting: current loops %0d, decoupling %0d",
             n_startup, n_cur_wait, n_dec_wait);
    checks++;
    if (n_startup == 0)  begin failures++; $display("FAIL start-up angle rule never used"); end
    checks++;
    if (n_cur_wait == 0) begin failures++; $display("FAIL current loops never waited for the flux loop"); end
    checks++;
    if (n_dec_wait == 0) begin failures++; $display("FAIL decoupling never waited for the omega estimator"); end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad[q] == 0) begin failures++; $display("FAIL field angle quadrant %0d never visited", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
