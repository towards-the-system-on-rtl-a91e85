// vc_pkg -- number format and shared types of the vector controller.
//
// Every signal of the control loop is a 32-bit two's-complement fixed-point
// number with FRAC fractional bits (Q7.24 by default), holding per-unit motor
// quantities.  The 32-bit word length follows the precision the controller
// needs; the split into integer and fractional bits and the per-unit scaling
// are choices of this design.  Arithmetic helpers saturate instead of
// wrapping.  Machine constants are given as real parameters and converted to
// the fixed-point format at elaboration with to_fx().
package vc_pkg;

  localparam int unsigned W    = 32;   // word length of every datapath value
  localparam int unsigned FRAC = 24;   // fractional bits

  typedef logic signed [W-1:0]   fx_t;   // one fixed-point value
  typedef logic signed [2*W-1:0] fx2_t;  // full-precision product

  // three-phase quantity (stationary a,b,c frame)
  typedef struct packed {
    fx_t a;
    fx_t b;
    fx_t c;
  } abc_t;

  // two-axis quantity in the stationary alpha-beta frame
  typedef struct packed {
    fx_t alpha;
    fx_t beta;
  } ab_t;

  // two-axis quantity in the rotating d-q (Park) frame
  typedef struct packed {
    fx_t d;
    fx_t q;
  } dq_t;

  localparam fx_t FX_MAX = {1'b0, {(W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(W-1){1'b0}}};

  // real -> fixed point (elaboration-time constants only)
  function automatic fx_t to_fx(input real r);
    real s;
    s = r * (2.0 ** FRAC);
    if (s >= 2.0 ** (W-1) - 1.0) return FX_MAX;
    if (s <= -(2.0 ** (W-1)))    return FX_MIN;
    return fx_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  // clamp a wide signed value into fx_t
  function automatic fx_t sat(input fx2_t v);
    if (v > fx2_t'(FX_MAX)) return FX_MAX;
    if (v < fx2_t'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  function automatic fx_t fx_add(input fx_t x, input fx_t y);
    return sat(fx2_t'(x) + fx2_t'(y));
  endfunction

  function automatic fx_t fx_sub(input fx_t x, input fx_t y);
    return sat(fx2_t'(x) - fx2_t'(y));
  endfunction

  // fixed-point product, truncated toward minus infinity, saturated
  function automatic fx_t fx_mul(input fx_t x, input fx_t y);
    fx2_t p;
    p = fx2_t'(x) * fx2_t'(y);
    return sat(p >>> FRAC);
  endfunction

  // Default machine and loop constants, per unit (time base 1/omega_base).
  // The source design gives no machine data; these describe a generic
  // small induction machine and a 10 kHz loop at a 50 Hz base frequency.
  localparam real RS_PU  = 0.03;        // stator resistance
  localparam real RR_PU  = 0.025;       // rotor resistance
  localparam real LS_PU  = 2.0;         // stator inductance
  localparam real LR_PU  = 2.0;         // rotor inductance
  localparam real LM_PU  = 1.9;         // mutual inductance M
  localparam real PP     = 2.0;         // pole pairs
  localparam real TS_PU  = 0.0314159;   // sample period 100 us * 2*pi*50 rad/s

  // PI gains (kp, ki per unit time)
  localparam real KP_SPD = 4.0;
  localparam real KI_SPD = 2.0;
  localparam real KP_FLX = 8.0;
  localparam real KI_FLX = 4.0;
  localparam real KP_CUR = 0.5;
  localparam real KI_CUR = 1.0;

endpackage
