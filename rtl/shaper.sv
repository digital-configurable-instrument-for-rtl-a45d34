// shaper: digital emulation of the analog shaping amplifier.
//
// Placed at the end of the chain so that pulses, baseline and noise are all
// shaped. It is a cascade of two scattered look-ahead second-order cells
// (sla_iir2) and one first-order Direct Form II cell (iir1), so the host can
// set up to 5 poles and 3 zeros, e.g. a semi-Gaussian CR-RC^n response whose
// zero cancels the preamplifier pole. Each stage can be bypassed
// (en[0], en[1] for the second-order cells, en[2] for the first-order one);
// with en = 0 the input passes through unchanged.
//
// Timing: one sample per cycle with in_valid; latency 2 cycles per enabled
// second-order cell plus 1 for the first-order cell (a bypassed stage adds
// no delay). The stage order and counts follow the instrument; the bypass
// controls are this design's choice.
module shaper
  import emu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       en,
  input  sla2_coef_t [1:0] sla_coef,
  input  iir1_coef_t       iir_coef,
  input  logic             in_valid,
  input  sample_t          x,
  output logic             out_valid,
  output sample_t          y
);
  sample_t s1_y, s2_y, s3_y, s1_o, s2_o;
  logic    s1_v, s2_v, s3_v, s1_ov, s2_ov;

  sla_iir2 u_c0 (.clk(clk), .rst_n(rst_n), .coef(sla_coef[0]),
                 .in_valid(in_valid && en[0]), .x(x), .out_valid(s1_v), .y(s1_y));
  assign s1_o  = en[0] ? s1_y : x;
  assign s1_ov = en[0] ? s1_v : in_valid;

  sla_iir2 u_c1 (.clk(clk), .rst_n(rst_n), .coef(sla_coef[1]),
                 .in_valid(s1_ov && en[1]), .x(s1_o), .out_valid(s2_v), .y(s2_y));
  assign s2_o  = en[1] ? s2_y : s1_o;
  assign s2_ov = en[1] ? s2_v : s1_ov;

  iir1 u_c2 (.clk(clk), .rst_n(rst_n), .coef(iir_coef),
             .in_valid(s2_ov && en[2]), .x(s2_o), .out_valid(s3_v), .y(s3_y));
  assign y         = en[2] ? s3_y : s2_o;
  assign out_valid = en[2] ? s3_v : s2_ov;
endmodule
