// noise_gen: stationary noise generator, a three-band graphic equalizer plus a
// 1/f path.
//
// The noise spectrum is split into low, middle and high frequency regions.
// Each region has its own LFSR producing white noise, which is written into a
// small FIFO; the filter of the region reads the FIFO and shapes the noise:
//   low    first-order Butterworth low-pass        (iir1)
//   middle band-pass, low-pass cell then high-pass cell (iir1 -> iir1)
//   high   first-order Butterworth high-pass       (iir1)
// A fourth path (flicker_gen) gives 1/f noise. Band levels are set by the
// gain folded into each filter's b coefficients; en[3:0] = {1/f, HP, BP, LP}
// switches paths in the sum. The output is the saturated sum of the enabled
// paths, registered.
//
// Timing: after reset each FIFO fills from its LFSR; from then on every path
// delivers one sample per cycle and y is a new sample every cycle (latency
// from FIFO read to y: 2 cycles for LP/HP, 3 for BP). The structure follows
// the instrument's noise emulator; FIFO depth and word widths are this
// design's choice.
module noise_gen
  import emu_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [3:0]                   en,
  input  iir1_coef_t                   lp_coef,
  input  iir1_coef_t                   bp_lp_coef,
  input  iir1_coef_t                   bp_hp_coef,
  input  iir1_coef_t                   hp_coef,
  input  iir1_coef_t [N_POLES-1:0]     flicker_coef,
  output sample_t                      y
);
  localparam logic [31:0] SEEDS [3] = '{32'hace1_2468, 32'h1357_bdf0, 32'h0f0f_7a5c};

  logic [2:0]  full, empty, rd;
  sample_t     wd   [3];
  sample_t     rdat [3];
  logic [31:0] rnd  [3];
  sample_t     y_lp, y_bp1, y_bp, y_hp, y_1f, white_1f;
  logic        v_lp, v_bp1, v_bp, v_hp;
  logic signed [63:0] sum;

  for (genvar b = 0; b < 3; b++) begin : g_band
    lfsr #(.W(32), .STEPS(32), .SEED(SEEDS[b])) u_rng (
      .clk(clk), .rst_n(rst_n), .en(!full[b]), .q(rnd[b])
    );
    assign wd[b] = sample_t'(rnd[b][31:32-SAMPLE_W]);
    // LFSR output is registered: push it whenever there is room
    sync_fifo #(.W(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .wr_en(!full[b]), .wr_data(wd[b]), .full(full[b]),
      .rd_en(rd[b]), .rd_data(rdat[b]), .empty(empty[b])
    );
    assign rd[b] = !empty[b];
  end

  iir1 u_lp (.clk(clk), .rst_n(rst_n), .coef(lp_coef),
             .in_valid(rd[0]), .x(rdat[0]), .out_valid(v_lp), .y(y_lp));
  iir1 u_bp_lp (.clk(clk), .rst_n(rst_n), .coef(bp_lp_coef),
             .in_valid(rd[1]), .x(rdat[1]), .out_valid(v_bp1), .y(y_bp1));
  iir1 u_bp_hp (.clk(clk), .rst_n(rst_n), .coef(bp_hp_coef),
             .in_valid(v_bp1), .x(y_bp1), .out_valid(v_bp), .y(y_bp));
  iir1 u_hp (.clk(clk), .rst_n(rst_n), .coef(hp_coef),
             .in_valid(rd[2]), .x(rdat[2]), .out_valid(v_hp), .y(y_hp));

  flicker_gen #(.N(N_POLES)) u_1f (
    .clk(clk), .rst_n(rst_n), .en(en[3]), .coef(flicker_coef),
    .white(white_1f), .y(y_1f)
  );

  always_comb begin
    sum = '0;
    if (en[0]) sum += 64'(y_lp);
    if (en[1]) sum += 64'(y_bp);
    if (en[2]) sum += 64'(y_hp);
    if (en[3]) sum += 64'(y_1f);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= sat_sample(sum);
  end
endmodule
