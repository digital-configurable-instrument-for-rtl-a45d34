// iir1: first-order IIR cell in Direct Form II.
//
// Computes H(z) = (b0 + b1 z^-1) / (1 + a1 z^-1), the canonic structure with a
// single state word w:  w[n] = x[n] - a1*w[n-1],  y[n] = b0*w[n] + b1*w[n-1].
// The denominator is normalised (a0 = 1) and the gain H0 is folded into b0,
// b1. With b0 = b1 and a1 = (1-c)/(1+c) it is the first-order Butterworth
// low-pass of the instrument's noise stages; with b1 = -b0 the high-pass.
// The cell is reused for the 1/f poles, the optional pulse low-pass and the
// first-order stage of the shaper.
//
// Formats: x, y are SAMPLE_W-bit integers; coefficients carry C1_FRAC fraction
// bits; the state carries S1_FRAC fraction bits in S1_W bits, enough for the
// DC gain of a pole a few ppm from z = 1. y saturates to SAMPLE_W bits.
// Timing: one sample per cycle in which in_valid is high; y appears one cycle
// later with out_valid. The structure follows the instrument's Fig. 6 cell;
// the number formats are this design's choice.
module iir1
  import emu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  iir1_coef_t coef,
  input  logic       in_valid,
  input  sample_t    x,
  output logic       out_valid,
  output sample_t    y
);
  localparam int PW = C1_W + S1_W;

  logic signed [S1_W-1:0] w_q, w_n;
  logic signed [PW-1:0]   fb, p0, p1;
  logic signed [PW-1:0]   acc;

  always_comb begin
    fb  = (coef.a1 * w_q) >>> C1_FRAC;
    w_n = S1_W'((PW'(x) <<< S1_FRAC) - fb);
    p0  = coef.b0 * w_n;
    p1  = coef.b1 * w_q;
    acc = (p0 + p1) >>> (C1_FRAC + S1_FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_q       <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w_q <= w_n;
        y   <= sat_sample(64'(acc));
      end
    end
  end
endmodule
