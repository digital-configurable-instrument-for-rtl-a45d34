// flicker_gen: 1/f noise source.
//
// A 1/f power spectrum between f_min and f_max is approximated by the sum of
// N first-order low-pass filters fed with the same white noise. The poles are
// spread evenly on a log scale, f_pole,i+1 / f_pole,i = (f_max/f_min)^(1/(N-1)),
// and the DC gain of filter i is sqrt(f_pole,1 / f_pole,i), so each filter
// contributes a -20 dB/decade slope over a decade-wide band and their sum
// follows -10 dB/decade. The host computes the N coefficient sets (pole and
// gain folded into b0, b1, a1 of each iir1) from those two rules.
//
// White noise: the top SAMPLE_W bits of a 32-bit LFSR, one word per cycle.
// Output: saturated sum of the N filter outputs, registered; y is valid two
// cycles after the LFSR word it starts from (filter + adder). The structure
// and N = 10 follow the instrument; the noise word width is this design's
// choice.
module flicker_gen
  import emu_pkg::*;
#(
  parameter int unsigned N    = N_POLES,
  parameter logic [31:0] SEED = 32'h5eed_0f1f
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  iir1_coef_t [N-1:0]     coef,
  output sample_t                white,   // the shared white-noise word
  output sample_t                y
);
  logic [31:0]       rnd;
  sample_t           lp  [N];
  logic [N-1:0]      lpv;
  logic signed [63:0] sum;

  lfsr #(.W(32), .STEPS(32), .SEED(SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .en(en), .q(rnd)
  );
  assign white = sample_t'(rnd[31:32-SAMPLE_W]);

  for (genvar i = 0; i < N; i++) begin : g_pole
    iir1 u_lp (
      .clk(clk), .rst_n(rst_n), .coef(coef[i]),
      .in_valid(en), .x(white), .out_valid(lpv[i]), .y(lp[i])
    );
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum += 64'(lp[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else if (lpv[0]) y <= sat_sample(sum);
  end
endmodule
