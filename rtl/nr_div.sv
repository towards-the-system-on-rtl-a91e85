// nr_div -- sequential non-restoring fixed-point divider.
//
// Computes quo = num / den for signed Q(W-FRAC-1).FRAC operands, producing one
// quotient bit per clock with the non-restoring recurrence: the partial
// remainder is shifted left, the divisor is subtracted while the remainder is
// non-negative and added back while it is negative, and each quotient bit is
// the sign of the new remainder.  The division runs on magnitudes; the sign is
// applied at the end.  The scaled dividend |num|*2^FRAC is W+FRAC bits wide,
// but only W quotient bits are iterated: its top FRAC bits seed the remainder,
// and a quotient that would not fit in W bits is caught before iterating and
// saturated.  A zero divisor saturates as well (0/0 gives 0).
//
// Timing: start is sampled with num/den; done pulses W+2 cycles later
// (one load cycle, W iterations, one sign/saturation cycle; 34 at W=32).  quo holds its value until
// the next done.  start while busy is not allowed.
//
// The sequential non-restoring algorithm follows the source design; the
// operand format, saturation and the one-bit-per-clock schedule are this
// design's choices.
module nr_div
  import vc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  num,
  input  fx_t  den,
  output logic done,
  output logic busy,
  output fx_t  quo
);

  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, ITER, FIN} state_e;
  state_e state;

  logic [W-1:0]        dvs;      // |den|
  logic signed [W+1:0] rem;      // partial remainder, non-restoring
  logic [W-1:0]        dvd_lo;   // dividend bits still to shift in
  logic [W-1:0]        q;        // quotient bits
  logic [CW-1:0]       cnt;
  logic                neg;      // sign of the result
  logic                ovf;      // quotient does not fit / zero divisor
  logic                zero_num;

  logic [W-1:0]        num_mag, den_mag;
  logic [W+FRAC-1:0]   scaled;
  logic signed [W+1:0] rem_sh, rem_nx;

  assign num_mag = num[W-1] ? W'(-num) : W'(num);
  assign den_mag = den[W-1] ? W'(-den) : W'(den);
  assign scaled  = {num_mag, {FRAC{1'b0}}};

  // one non-restoring step
  always_comb begin
    rem_sh = {rem[W:0], dvd_lo[W-1]};
    if (!rem[W+1]) rem_nx = rem_sh - $signed({2'b00, dvs});
    else           rem_nx = rem_sh + $signed({2'b00, dvs});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      quo   <= '0;
      rem   <= '0;
      q     <= '0;
      cnt   <= '0;
      dvs   <= '0;
      dvd_lo <= '0;
      neg   <= 1'b0;
      ovf   <= 1'b0;
      zero_num <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          dvs      <= den_mag;
          // top FRAC bits of the scaled dividend start the remainder
          rem      <= $signed({{(W+2-FRAC){1'b0}}, scaled[W+FRAC-1 -: FRAC]});
          dvd_lo   <= scaled[W-1:0];
          q        <= '0;
          cnt      <= '0;
          neg      <= num[W-1] ^ den[W-1];
          zero_num <= (num == '0);
          // quotient < 2^W  <=>  (scaled >> W) < |den|
          ovf      <= ({{(W-FRAC){1'b0}}, scaled[W+FRAC-1 -: FRAC]} >= den_mag);
          state    <= ITER;
        end
        ITER: begin
          rem    <= rem_nx;
          dvd_lo <= {dvd_lo[W-2:0], 1'b0};
          q      <= {q[W-2:0], ~rem_nx[W+1]};
          cnt    <= cnt + 1'b1;
          if (cnt == CW'(W-1)) state <= FIN;
        end
        FIN: begin
          if (zero_num)               quo <= '0;
          else if (ovf || q[W-1])     quo <= neg ? FX_MIN : FX_MAX;
          else                        quo <= neg ? -fx_t'(q) : fx_t'(q);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // handshake rule: a new operation may only start while idle
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
