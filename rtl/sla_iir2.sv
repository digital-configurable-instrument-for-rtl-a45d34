// sla_iir2: second-order IIR cell pipelined by scattered look-ahead (M = 3).
//
// The cell H(z) = (1 - b1 z^-1) / (1 - a1 z^-1 - a2 z^-2) has a one-cycle
// feedback loop that limits the clock rate. Multiplying numerator and
// denominator by 1 + a1 z^-1 + (a1^2 + a2) z^-2 - a1 a2 z^-3 + a2^2 z^-4 adds
// two compensating poles per original pole, at the same radius and spaced in
// angle, which leaves the response unchanged and stable while the denominator
// keeps only the powers z^-3 and z^-6:
//     H(z) = (B0 + B1 z^-1 + ... + B5 z^-5) / (1 - A0 z^-3 - A1 z^-6),
//     A0 = a1^3 + 3 a1 a2,  A1 = a2^3.
// The recursion y[n] = w[n] + A0 y[n-3] + A1 y[n-6] reads outputs at least
// three samples old, so each feedback product is computed one cycle ahead and
// registered, and the loop holds only an adder.
//
// Arithmetic: the FIR (numerator) section uses FIR_CW-bit coefficients with
// FIR_FRAC fraction bits and a FIR_ACC_W-bit adder, its result w carrying
// SLA_SFRAC fraction bits (rounded and saturated). The recursive section uses IIR_W-bit
// coefficients (IIR_FRAC fraction bits), IIR_W-bit products and adder; its
// state keeps SLA_YFRAC fraction bits and the feedback products are rounded,
// so that a pole a few 1e-8 from z = 1 (a time constant of 200 ms at
// 312 MHz) still decays at the right rate instead of stalling or being
// pulled down by truncation. The output is the state's integer part,
// saturated. The host computes B0..B5, A0, A1 from a1, a2, b1 (any gain H0
// folded into the B's); for a zero at DC it should round the B's so that
// they sum exactly to zero.
// B's). Timing: one sample per cycle with in_valid, latency 2 cycles. The
// look-ahead transformation, the coefficient set and the 24/32/48-bit widths
// follow the instrument's shaper; the placement of pipeline registers is this
// design's choice.
module sla_iir2
  import emu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sla2_coef_t coef,
  input  logic       in_valid,
  input  sample_t    x,
  output logic       out_valid,
  output sample_t    y
);
  localparam int FPW = SAMPLE_W + FIR_CW;    // FIR product width
  localparam int PW  = 2 * IIR_W;            // recursive product width
  localparam logic [PW-1:0] RND = PW'(1) << (IIR_FRAC - 1);

  sample_t                     xd  [1:5];    // xd[i] = x[n-i]
  logic signed [FIR_ACC_W-1:0] w;            // FIR output, registered
  logic                        w_v;
  logic signed [IIR_W-1:0]     yd  [1:6];    // yd[i] = y[n-i]
  logic signed [IIR_W-1:0]     m0, m1;       // A0*y[n-3], A1*y[n-6]
  logic signed [IIR_W-1:0]     y_n;
  logic signed [FPW+3:0]       fsum;
  logic signed [PW-1:0]        p0, p1;

  always_comb begin
    fsum = '0;
    for (int i = 0; i < 6; i++) begin
      sample_t xi;
      xi   = (i == 0) ? x : xd[(i == 0) ? 1 : i];
      fsum += (FPW+4)'($signed(coef.b[i]) * $signed((FPW+4)'(xi)));
    end
  end

  always_comb begin
    y_n = (IIR_W'(w) <<< (SLA_YFRAC - SLA_SFRAC)) + m0 + m1;
    p0  = $signed(PW'(coef.a0)) * $signed(PW'(yd[2]));
    p1  = $signed(PW'(coef.a1)) * $signed(PW'(yd[5]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= 5; i++) xd[i] <= '0;
      for (int i = 1; i <= 6; i++) yd[i] <= '0;
      w         <= '0;
      w_v       <= 1'b0;
      m0        <= '0;
      m1        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      w_v       <= in_valid;
      out_valid <= w_v;
      if (in_valid) begin
        xd[1] <= x;
        for (int i = 2; i <= 5; i++) xd[i] <= xd[i-1];
        begin
          logic signed [FPW+3:0] ws, hi;
          ws = (fsum + (FPW+4)'(1 << (FIR_FRAC - SLA_SFRAC - 1))) >>> (FIR_FRAC - SLA_SFRAC);
          hi = ws >>> (FIR_ACC_W - 1);
          if (hi != '0 && hi != '1) w <= {ws[FPW+3], {(FIR_ACC_W-1){!ws[FPW+3]}}};
          else                      w <= FIR_ACC_W'(ws);
        end
      end
      if (w_v) begin
        yd[1] <= y_n;
        for (int i = 2; i <= 6; i++) yd[i] <= yd[i-1];
        m0 <= IIR_W'((p0 + PW'(RND)) >>> IIR_FRAC);
        m1 <= IIR_W'((p1 + PW'(RND)) >>> IIR_FRAC);
        y  <= sat_sample(64'(y_n >>> SLA_YFRAC));
      end
    end
  end
endmodule
