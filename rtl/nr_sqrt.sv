// nr_sqrt -- sequential non-restoring square root.
//
// root = floor(sqrt(rad)) for an unsigned 2W-bit radicand, one root bit per
// clock.  Each step brings down the next two radicand bits into a signed
// partial remainder and either subtracts (4*root+1) when the remainder is
// non-negative or adds (4*root+3) when it is negative; the new root bit is
// 1 when the resulting remainder is non-negative.  No restoring step and no
// final correction are needed for the root itself.  With a radicand carrying
// 2*FRAC fractional bits (a sum of full-precision fixed-point products), the
// root is a fixed-point value with FRAC fractional bits.
//
// Timing: start samples rad; done pulses W+2 cycles later (load, W
// iterations, output; 34 at W=32); root holds until
// the next done.  start while busy is not allowed.
//
// The non-restoring sequential square root follows the source design; the
// widths and schedule are this design's choices.
module nr_sqrt
  import vc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] rad,
  output logic           done,
  output logic           busy,
  output logic [W-1:0]   root
);

  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, ITER, FIN} state_e;
  state_e state;

  logic [2*W-1:0]      d;      // radicand, shifted left two bits per step
  logic signed [W+2:0] r;      // partial remainder
  logic [W-1:0]        q;      // root bits so far
  logic [CW-1:0]       cnt;
  logic signed [W+2:0] r_sh, r_nx;

  always_comb begin
    r_sh = {r[W:0], d[2*W-1 -: 2]};
    if (!r[W+2]) r_nx = r_sh - $signed({1'b0, q, 2'b01});
    else         r_nx = r_sh + $signed({1'b0, q, 2'b11});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      root  <= '0;
      d     <= '0;
      r     <= '0;
      q     <= '0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          d     <= rad;
          r     <= '0;
          q     <= '0;
          cnt   <= '0;
          state <= ITER;
        end
        ITER: begin
          r   <= r_nx;
          d   <= {d[2*W-3:0], 2'b00};
          q   <= {q[W-2:0], ~r_nx[W+2]};
          cnt <= cnt + 1'b1;
          if (cnt == CW'(W-1)) state <= FIN;
        end
        FIN: begin
          root  <= q;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
