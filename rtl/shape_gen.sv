// shape_gen: reference-shape generator with linear interpolation.
//
// Holds one reference pulse, stored by the host as DEPTH signed samples
// normalised to a maximum of +32767. A start event (start, amp) plays the
// shape back once, scaled by amp. Playback advances a read phase of
// AW integer and PH_FRAC fraction bits by `step` per cycle (step = 2^PH_FRAC/R
// for an up-sampling factor R, e.g. R = 1000), and linearly interpolates
// between the two stored samples k and k+1 around the phase:
//     s = s[k] + ((s[k+1] - s[k]) * frac) >> PH_FRAC
//     y = (s * amp) >> STAT_W
// Playback ends when k passes `last`; the output is 0 while idle. A start
// that arrives during playback is ignored and reported on `lost`.
//
// Timing: one output sample per cycle. The first sample of a pulse (phase 0)
// appears on y three cycles after start: one cycle to register the event,
// one for the synchronous memory read, one for interpolation and scaling.
// The 16 k-word memory, the normalised reference pulse, the amplitude scaling
// and the linear interpolator follow the instrument's pulse generator; the
// phase-accumulator form of the interpolator is this design's choice.
module shape_gen
  import emu_pkg::*;
#(
  parameter int unsigned DEPTH = SHAPE_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // shape memory loading
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  sample_t                 wr_data,
  // configuration
  input  logic [AW+PH_FRAC-1:0]   step,
  input  logic [AW-1:0]           last,
  // events
  input  logic                    start,
  input  logic [STAT_W-1:0]       amp,
  output logic                    busy,
  output logic                    lost,
  output sample_t                 y
);
  sample_t                  mem [DEPTH];
  logic [AW+PH_FRAC:0]      phase;     // one extra bit so passing `last` is seen
  logic [STAT_W-1:0]        amp_q;
  logic [AW:0]              k, k1;
  // read stage
  sample_t                  s0, s1;
  logic [PH_FRAC-1:0]       f_r;
  logic [STAT_W-1:0]        amp_r;
  logic                     v_r;
  // interpolation
  logic signed [SAMPLE_W:0]           d;
  logic signed [SAMPLE_W+PH_FRAC+1:0] lin;
  logic signed [SAMPLE_W+STAT_W+1:0]  scaled;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  logic [AW+PH_FRAC:0]      nxt_phase;
  logic [AW:0]              nxt_k;

  assign k         = phase[AW+PH_FRAC:PH_FRAC];
  assign nxt_phase = phase + (AW+PH_FRAC+1)'(step);
  assign nxt_k     = nxt_phase[AW+PH_FRAC:PH_FRAC];
  assign k1 = (k < (AW+1)'(last)) ? k + 1'b1 : k;

  // playback control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= '0;
      amp_q <= '0;
      lost  <= 1'b0;
    end else begin
      lost <= start && busy;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          phase <= '0;
          amp_q <= amp;
        end
      end else begin
        if (nxt_k > (AW+1)'(last)) busy <= 1'b0;
        phase <= nxt_phase;
      end
    end
  end

  // synchronous read of the two neighbouring samples
  always_ff @(posedge clk) begin
    s0    <= mem[k[AW-1:0]];
    s1    <= mem[k1[AW-1:0]];
    f_r   <= phase[PH_FRAC-1:0];
    amp_r <= amp_q;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) v_r <= 1'b0;
    else        v_r <= busy;
  end

  always_comb begin
    d      = (SAMPLE_W+1)'(s1) - (SAMPLE_W+1)'(s0);
    lin    = (SAMPLE_W+PH_FRAC+2)'(s0) + (((SAMPLE_W+PH_FRAC+2)'(d) * $signed({1'b0, f_r})) >>> PH_FRAC);
    scaled = ((SAMPLE_W+STAT_W+2)'(lin) * $signed({1'b0, amp_r})) >>> STAT_W;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   y <= '0;
    else if (v_r) y <= sat_sample(64'(scaled));
    else          y <= '0;
  end
endmodule
