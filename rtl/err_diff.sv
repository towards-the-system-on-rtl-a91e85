// err_diff -- error difference of one control loop.
//
// err_o = ref_i - meas_i (the epsilon of a summing junction), saturated to
// the fixed-point range and registered.  Four instances form the speed,
// rotor-flux, q-current and d-current errors of the loop.
//
// Timing: inputs are sampled with start; done pulses on the next cycle and
// err_o holds until the next done.  The registered output is this design's
// choice (every arithmetic unit of the loop registers its result).
module err_diff
  import vc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  ref_i,
  input  fx_t  meas_i,
  output logic done,
  output fx_t  err_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done  <= 1'b0;
      err_o <= '0;
    end else begin
      done <= start;
      if (start) err_o <= fx_sub(ref_i, meas_i);
    end
  end

endmodule
