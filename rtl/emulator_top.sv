// emulator_top: real-time emulator of the signal of a radiation detector.
//
// Synthesises, one sample per clock, the output of a detector and its
// front end from statistics rather than recordings:
//   pulses    two independent generators (pulse_source + shape_gen), each
//             triggered at random occurrence times and scaling a stored
//             reference shape by a random amplitude, both drawn from
//             user histograms; their outputs are added (pileup_ctrl), which
//             reproduces pile-up, or close pulses are inhibited; an optional
//             first-order low-pass (iir1) follows
//   baseline  a deterministic drift profile, up-sampled from key points by a
//             cubic spline (baseline_gen)
//   noise     three filtered LFSR bands and a 1/f source (noise_gen)
// The three are added (saturating), shaped by the emulated shaping amplifier
// (shaper), and leave through the output stage (nl_output): an offset-binary
// word for an external DAC, and a digital word with optional quantization and
// ADC nonlinearity.
//
// Interface: cfg holds all static settings (see emu_pkg::emu_cfg_t). Tables
// are written through mem_we/mem_sel/mem_addr/mem_wdata, mem_sel selecting
// one of emu_pkg::mem_sel_e; histogram tables must be written bin 0 first
// and in order. Samples are signed 16-bit. Status pulses report accepted
// pulse starts, inhibited and suppressed events, starts lost because a
// generator was still busy, and late triggers; st_base_prep is high while
// the baseline computes its spline coefficients.
//
// Timing: a single clock runs every section at one sample per cycle. From
// the adder input to dig_out/dac_data the latency is 1 (adder) + shaper
// latency + 2. The chain order and the sections follow the instrument; the
// single clock, the configuration port and the status outputs are this
// design's choice.
module emulator_top
  import emu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  emu_cfg_t      cfg,
  input  logic          mem_we,
  input  logic [3:0]    mem_sel,
  input  logic [15:0]   mem_addr,
  input  logic [31:0]   mem_wdata,
  output logic          out_valid,
  output sample_t       dig_out,
  output logic [15:0]   dac_data,
  output logic [1:0]    st_start,
  output logic [1:0]    st_inhibited,
  output logic [1:0]    st_suppressed,
  output logic [1:0]    st_lost,
  output logic [1:0]    st_late,
  output logic          st_base_prep
);
  localparam int BW = $clog2(HIST_BINS);

  logic [1:0]              ev_valid, start, busy;
  logic [1:0][STAT_W-1:0]  ev_amp, start_amp;
  sample_t                 shape_y [2];
  sample_t                 pulses, pulses_f, pulses_lp, noise, base, mix;
  logic                    lp_v, base_v, mix_v, sh_v, run;
  sample_t                 shaped;

  logic [7:0]              we;        // one write enable per table

  always_comb begin
    for (int i = 0; i < 8; i++) we[i] = mem_we && (mem_sel == 4'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;
  end

  // ---------------------------------------------------------------- pulses
  for (genvar g = 0; g < 2; g++) begin : g_gen
    localparam logic [31:0] TSEED = 32'h2545_f491 ^ (32'h1111_1111 * (g + 1));
    localparam logic [31:0] ASEED = 32'h9e37_79b9 ^ (32'h0707_0707 * (g + 1));
    pulse_source #(.BINS(HIST_BINS), .TIME_SEED(TSEED), .AMP_SEED(ASEED)) u_src (
      .clk(clk), .rst_n(rst_n), .en(cfg.gen_en[g]),
      .time_shift(cfg.time_shift[g]), .thr_en(cfg.thr_en[g]), .thr(cfg.thr[g]),
      .t_wr_en(we[MEM_TIME0 + g]),
      .t_wr_addr(mem_addr[BW-1:0]), .t_wr_count(mem_wdata),
      .a_wr_en(we[MEM_AMP0 + g]),
      .a_wr_addr(mem_addr[BW-1:0]), .a_wr_count(mem_wdata),
      .ev_valid(ev_valid[g]), .ev_amp(ev_amp[g]),
      .suppressed(st_suppressed[g]), .late(st_late[g])
    );

    shape_gen #(.DEPTH(SHAPE_DEPTH)) u_shape (
      .clk(clk), .rst_n(rst_n),
      .wr_en(we[MEM_SHAPE0 + g]),
      .wr_addr(mem_addr[SHAPE_AW-1:0]), .wr_data(sample_t'(mem_wdata[SAMPLE_W-1:0])),
      .step(cfg.shape_step[g]), .last(cfg.shape_last[g]),
      .start(start[g]), .amp(start_amp[g]),
      .busy(busy[g]), .lost(st_lost[g]), .y(shape_y[g])
    );
  end

  pileup_ctrl u_pileup (
    .clk(clk), .rst_n(rst_n),
    .inhibit_en(cfg.inhibit_en), .inhibit_win(cfg.inhibit_win),
    .ev_valid_0(ev_valid[0]), .ev_amp_0(ev_amp[0]),
    .ev_valid_1(ev_valid[1]), .ev_amp_1(ev_amp[1]),
    .start_0(start[0]), .start_1(start[1]),
    .start_amp_0(start_amp[0]), .start_amp_1(start_amp[1]),
    .inhibited_0(st_inhibited[0]), .inhibited_1(st_inhibited[1]),
    .y_0(shape_y[0]), .y_1(shape_y[1]), .y(pulses)
  );
  assign st_start = start;

  iir1 u_pulse_lpf (
    .clk(clk), .rst_n(rst_n), .coef(cfg.pulse_lpf),
    .in_valid(run), .x(pulses), .out_valid(lp_v), .y(pulses_lp)
  );
  assign pulses_f = cfg.pulse_lpf_en ? pulses_lp : pulses;

  // ----------------------------------------------------------------- noise
  noise_gen u_noise (
    .clk(clk), .rst_n(rst_n), .en(cfg.noise_en),
    .lp_coef(cfg.noise_lp), .bp_lp_coef(cfg.noise_bp_lp),
    .bp_hp_coef(cfg.noise_bp_hp), .hp_coef(cfg.noise_hp),
    .flicker_coef(cfg.flicker), .y(noise)
  );

  // -------------------------------------------------------------- baseline
  baseline_gen #(.KEYS(KEYPOINTS), .MAX_S(MAX_LOG2_FACTOR)) u_base (
    .clk(clk), .rst_n(rst_n), .en(cfg.base_en), .interp(cfg.base_interp), .loop(cfg.base_loop),
    .log2_factor(cfg.base_log2), .last(cfg.base_last),
    .wr_en(we[3'(MEM_KEYPT)]), .wr_addr(mem_addr[$clog2(KEYPOINTS)-1:0]),
    .wr_data(sample_t'(mem_wdata[SAMPLE_W-1:0])),
    .prep(st_base_prep), .out_valid(base_v), .y(base)
  );

  // ----------------------------------------------------------------- adder
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mix   <= '0;
      mix_v <= 1'b0;
    end else begin
      mix   <= sat_sample(64'(pulses_f) + 64'(noise) + 64'(base));
      mix_v <= run;
    end
  end

  // ---------------------------------------------------------------- shaper
  shaper u_shaper (
    .clk(clk), .rst_n(rst_n), .en(cfg.shaper_en),
    .sla_coef(cfg.sla), .iir_coef(cfg.shaper_iir1),
    .in_valid(mix_v), .x(mix), .out_valid(sh_v), .y(shaped)
  );

  // ---------------------------------------------------------------- output
  nl_output #(.AW(LUT_AW)) u_out (
    .clk(clk), .rst_n(rst_n),
    .quant_bits(cfg.quant_bits), .lut_en(cfg.lut_en),
    .wr_en(we[3'(MEM_NLLUT)]), .wr_addr(mem_addr[LUT_AW-1:0]),
    .wr_data(sample_t'(mem_wdata[SAMPLE_W-1:0])),
    .in_valid(sh_v), .x(shaped), .out_valid(out_valid),
    .dig_out(dig_out), .dac_data(dac_data)
  );
endmodule
