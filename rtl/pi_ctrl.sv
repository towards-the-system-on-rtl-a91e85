// pi_ctrl -- discrete proportional-integral controller.
//
// y = kp*e + ki * integral(e dt), integrated with the forward-Euler rule
// I[k] = I[k-1] + (ki*Ts)*e[k] once per loop lap.  The product ki*Ts is folded
// into one constant at elaboration.  All additions saturate, so the
// integrator clamps at the end of the number range instead of wrapping.
// Used four times: speed, rotor flux, q-current and d-current loops.
//
// Timing: err_i is sampled with start; the integrator and the proportional
// term are registered in the first cycle, their sum in the second; done
// pulses two cycles after start and y_o holds until the next done.  Reset
// clears the integrator.  The PI law follows the source design; the
// discretisation and gains are this design's choices.
module pi_ctrl
  import vc_pkg::*;
#(
  parameter real KP = 1.0,      // proportional gain
  parameter real KI = 1.0,      // integral gain, per unit time
  parameter real TS = TS_PU     // loop sample period, per unit time
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  err_i,
  output logic done,
  output fx_t  y_o
);

  localparam fx_t K_P  = to_fx(KP);
  localparam fx_t K_IT = to_fx(KI * TS);

  fx_t  p_term, integ;
  logic s1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1     <= 1'b0;
      done   <= 1'b0;
      p_term <= '0;
      integ  <= '0;
      y_o    <= '0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        p_term <= fx_mul(K_P, err_i);
        integ  <= fx_add(integ, fx_mul(K_IT, err_i));
      end
      if (s1) y_o <= fx_add(p_term, integ);
    end
  end

endmodule
