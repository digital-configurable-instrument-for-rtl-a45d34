// tb_emulator_top: end-to-end run of the whole emulator at its default sizes.
//
// Loads every table through the table port: two 256-sample reference
// shapes, the four histograms (occurrence intervals of 150..400 and 200..450
// cycles, a two-line energy spectrum on a flat continuum), 16 baseline key
// points and the full 65536-word nonlinearity table.
//
// Phase A (pile-up, quantization, nonlinearity, baseline loop): noise,
// low-pass and shaper off. The testbench rebuilds the expected digital output
// from the accepted start events alone: its own interpolation of the stored
// shapes, the busy rule of the shape generators, the saturating adders, the
// baseline samples, the quantizer and the table. It checks every sample.
// Phase B (pile-up inhibition, threshold check, noise, pulse low-pass,
// shaper, spline inverse step): all sections on; the baseline restarts with
// its inverse step and must pass through its key points; the output is
// compared within 8 LSB with a floating-point model of the shaper cascade and
// the table applied to the adder output; checks the output stays valid and varies, and
// that inhibition and suppression take place. Phase C (late triggers): very
// short intervals. Each mechanism is counted and must happen at least once.
module tb_emulator_top;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  emu_cfg_t cfg;
  logic mem_we = 0;
  logic [3:0] mem_sel = 0;
  logic [15:0] mem_addr = 0;
  logic [31:0] mem_wdata = 0;
  logic out_valid;
  sample_t dig_out;
  logic [15:0] dac_data;
  logic [1:0] st_start, st_inhibited, st_suppressed, st_lost, st_late;
  logic st_base_prep;
  sample_t keys [16];
  int n_prep = 0, n_knot = 0, n_shaped = 0;
  int checks = 0, failures = 0;
  int n_pileup = 0, n_lost = 0, n_inhib = 0, n_supp = 0, n_late = 0, n_loop = 0, n_quant = 0, n_nl = 0;

  localparam int NS = 256;       // stored shape samples
  localparam int NP = 2*NS;      // played samples at factor 2 (phases 0 .. NS-0.5)

  emulator_top dut (.*);
  always #5 clk = ~clk;

  sample_t shape [2][NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [3:0] sel, input int a, input int d);
    mem_we = 1; mem_sel = sel; mem_addr = 16'(a); mem_wdata = 32'(d);
    @(posedge clk);
    #1;
    mem_we = 0;
  endtask

  function automatic int sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  function automatic int charac(input int code);
    return sat(longint'(code) + ((longint'(code) * code) >>> 16) - 500);
  endfunction

  function automatic int shape_model(input int g, input longint i, input longint amp);
    longint ph, k, f, s0, s1, s;
    ph = i << (PH_FRAC - 1);
    k  = ph >> PH_FRAC;
    f  = ph & ((64'd1 << PH_FRAC) - 1);
    s0 = shape[g][k];
    s1 = (k < NS - 1) ? shape[g][k + 1] : shape[g][k];
    s  = s0 + (((s1 - s0) * f) >>> PH_FRAC);
    return sat((s * amp) >>> STAT_W);
  endfunction

  function automatic iir1_coef_t lp(input real p, input real g);
    return '{b0: C1_W'(longint'(g * (1.0 - p) / 2.0 * (2.0 ** C1_FRAC))),
             b1: C1_W'(longint'(g * (1.0 - p) / 2.0 * (2.0 ** C1_FRAC))),
             a1: C1_W'(longint'(-p * (2.0 ** C1_FRAC)))};
  endfunction

  function automatic sla2_coef_t dpole(input real p);
    sla2_coef_t c;
    real a1, a2, g;
    a1 = 2.0 * p; a2 = -p * p; g = (1.0 - p) * (1.0 - p);
    c.b[0] = FIR_CW'(longint'(g * (2.0 ** FIR_FRAC)));
    c.b[1] = FIR_CW'(longint'(g * a1 * (2.0 ** FIR_FRAC)));
    c.b[2] = FIR_CW'(longint'(g * (a1*a1 + a2) * (2.0 ** FIR_FRAC)));
    c.b[3] = FIR_CW'(longint'(g * (-a1*a2) * (2.0 ** FIR_FRAC)));
    c.b[4] = FIR_CW'(longint'(g * (a2*a2) * (2.0 ** FIR_FRAC)));
    c.b[5] = '0;
    c.a0 = IIR_W'(longint'((a1*a1*a1 + 3.0*a1*a2) * (2.0 ** IIR_FRAC)));
    c.a1 = IIR_W'(longint'((a2*a2*a2) * (2.0 ** IIR_FRAC)));
    return c;
  endfunction

  // ---------------------------------------------------------------- model
  localparam int TA = 30000;                 // phase A length
  longint ts [2];                            // accepted start of each generator
  longint tamp [2];
  int pg [2][TA + 8];
  int pile [TA + 8];
  int mix [TA + 8];
  int basev [TA + 8];

  initial begin
    int t0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // ------------------------------------------------------------ tables
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < NS; i++) begin
        real v;
        v = (i < 8) ? 32767.0 * i / 8.0 : 32767.0 * $exp(-(i - 8) / (40.0 + 20.0 * g));
        shape[g][i] = sample_t'($rtoi(v));
        wr(g == 0 ? MEM_SHAPE0 : MEM_SHAPE1, i, int'(shape[g][i]));
      end
    for (int i = 0; i < HIST_BINS; i++) begin
      wr(MEM_TIME0, i, (i >= 150 && i < 400) ? 1 : 0);
      wr(MEM_TIME1, i, (i >= 200 && i < 450) ? 1 : 0);
      wr(MEM_AMP0, i, 2 + ((i >= 295 && i < 305) ? 60 : 0) + ((i >= 700 && i < 706) ? 40 : 0));
      wr(MEM_AMP1, i, 2 + ((i >= 295 && i < 305) ? 60 : 0) + ((i >= 700 && i < 706) ? 40 : 0));
    end
    for (int i = 0; i < 16; i++) begin
      keys[i] = sample_t'(int'($urandom_range(0, 6000)) - 3000);
      wr(MEM_KEYPT, i, int'(keys[i]));
    end
    for (int a = 0; a < 65536; a++) begin
      wr(MEM_NLLUT, a, charac(a - 32768));
    end

    // ------------------------------------------------------------ phase A
    cfg.shape_step[0] = (SHAPE_AW+PH_FRAC)'(1 << (PH_FRAC - 1));
    cfg.shape_step[1] = (SHAPE_AW+PH_FRAC)'(1 << (PH_FRAC - 1));
    cfg.shape_last[0] = SHAPE_AW'(NS - 1);
    cfg.shape_last[1] = SHAPE_AW'(NS - 1);
    cfg.base_en = 1; cfg.base_loop = 1; cfg.base_log2 = 5'd6; cfg.base_last = 12'd15;
    cfg.quant_bits = 4'd3; cfg.lut_en = 1;
    cfg.gen_en = 2'b11;
    ts[0] = -100000; ts[1] = -100000;
    for (int t = 0; t < TA; t++) begin
      @(posedge clk); #1;
      // shape generators: accept a start when the previous pulse is over
      for (int g = 0; g < 2; g++) begin
        if (st_start[g]) begin
          if (t - ts[g] >= NP + 1) begin ts[g] = t; tamp[g] = longint'(dut.start_amp[g]); end
          else n_lost++;
        end
        pg[g][t] = (t - ts[g] - 3 >= 0 && t - ts[g] - 3 < NP) ? shape_model(g, t - ts[g] - 3, tamp[g]) : 0;
      end
      if (st_lost != 0) check(n_lost > 0, "lost start predicted");
      if (dut.busy == 2'b11) n_pileup++;
      basev[t] = int'(dut.base);
      if (t >= 1) pile[t] = sat(longint'(pg[0][t-1]) + pg[1][t-1]);
      if (t >= 2) mix[t]  = sat(longint'(pile[t-1]) + basev[t-1]);
      if (t >= 4 && t > 20) begin
        int q, e;
        q = (mix[t-2] >>> 3) <<< 3;
        e = charac(q);
        if (q != mix[t-2]) n_quant++;
        if (e != q) n_nl++;
        check(out_valid && int'(dig_out) == e, $sformatf("t=%0d dig=%0d expected %0d", t, dig_out, e));
        check(dac_data == 16'(mix[t-2] + 32768), "DAC word");
      end
    end
    // ------------------------------------------------------------ phase B
    cfg.inhibit_en = 1; cfg.inhibit_win = 16'd600;
    cfg.thr_en = 2'b11; cfg.thr = '{default: STAT_W'(200 << HIST_FRAC)};
    cfg.noise_en = 4'b1111;
    cfg.noise_lp = lp(0.99, 0.2); cfg.noise_bp_lp = lp(0.9, 0.2);
    cfg.noise_bp_hp = '{b0: C1_W'(longint'(0.99 * (2.0 ** C1_FRAC))), b1: C1_W'(longint'(-0.99 * (2.0 ** C1_FRAC))),
                        a1: C1_W'(longint'(-0.98 * (2.0 ** C1_FRAC)))};
    cfg.noise_hp = '{b0: C1_W'(longint'(0.05 * (2.0 ** C1_FRAC))), b1: C1_W'(longint'(-0.05 * (2.0 ** C1_FRAC))),
                     a1: '0};
    for (int i = 0; i < N_POLES; i++) cfg.flicker[i] = lp(1.0 - 0.001 * (2.0 ** i) / 4.0, 0.05 / $sqrt(2.0 ** i));
    cfg.pulse_lpf_en = 1; cfg.pulse_lpf = lp(0.5, 1.0);
    cfg.shaper_en = 3'b111; cfg.sla[0] = dpole(0.9); cfg.sla[1] = dpole(0.8);
    cfg.shaper_iir1 = '{b0: C1_W'(longint'(0.995 * (2.0 ** C1_FRAC))), b1: C1_W'(longint'(-0.995 * (2.0 ** C1_FRAC))),
                        a1: C1_W'(longint'(-0.99 * (2.0 ** C1_FRAC)))};
    cfg.quant_bits = 4'd0;
    // restart the baseline with the spline inverse step on
    cfg.base_en = 0;
    @(posedge clk); #1;
    cfg.base_en = 1; cfg.base_interp = 1;
    begin
      int mn = 32767, mx = -32768, nb = 0;
      bit prev_bv = 1'b0;
      real xh [2][6], yh [2][7], w1, mdl [30000];
      foreach (xh[c, i]) xh[c][i] = 0.0;
      foreach (yh[c, i]) yh[c][i] = 0.0;
      w1 = 0.0;
      for (int t = 0; t < 30000; t++) begin
        @(posedge clk); #1;
        // shaper and output table rebuilt from the adder output: the
        // look-ahead equation of each cell and the first-order cell in
        // floating point with the configured coefficients, then the table
        begin
          real v, w;
          v = real'(dut.mix);
          for (int c = 0; c < 2; c++) begin
            for (int i = 5; i > 0; i--) xh[c][i] = xh[c][i-1];
            xh[c][0] = v;
            for (int i = 6; i > 0; i--) yh[c][i] = yh[c][i-1];
            yh[c][0] = real'($signed(cfg.sla[c].a0)) / (2.0 ** IIR_FRAC) * yh[c][3]
                     + real'($signed(cfg.sla[c].a1)) / (2.0 ** IIR_FRAC) * yh[c][6];
            for (int i = 0; i < 6; i++)
              yh[c][0] += real'($signed(cfg.sla[c].b[i])) / (2.0 ** FIR_FRAC) * xh[c][i];
            v = real'(sat($rtoi(yh[c][0])));
          end
          w = v - real'($signed(cfg.shaper_iir1.a1)) / (2.0 ** C1_FRAC) * w1;
          v = real'($signed(cfg.shaper_iir1.b0)) / (2.0 ** C1_FRAC) * w
            + real'($signed(cfg.shaper_iir1.b1)) / (2.0 ** C1_FRAC) * w1;
          w1 = w;
          mdl[t] = real'(charac(sat($rtoi(v))));
          if (t >= 5000) begin
            real d;
            d = real'(dig_out) - mdl[t - 7];
            check(d <= 8.0 && d >= -8.0, $sformatf("phase B t=%0d dig=%0d shaper model %f", t, dig_out, mdl[t - 7]));
            n_shaped++;
          end
        end
        if (st_base_prep) n_prep++;
        // interpolating spline: segment m starts on key point m + 1
        if (dut.base_v) begin
          if (nb % 64 == 0) begin
            check(int'(dut.base) - int'(keys[nb / 64 + 1]) <= 1 && int'(keys[nb / 64 + 1]) - int'(dut.base) <= 1,
                  $sformatf("baseline knot %0d: %0d vs %0d", nb / 64 + 1, dut.base, keys[nb / 64 + 1]));
            n_knot++;
          end
          nb++;
        end else nb = 0;
        if (st_inhibited != 0) n_inhib++;
        if (st_suppressed != 0) n_supp++;
        if (t > 100) check(out_valid, "output valid in phase B");
        if (t > 1000) begin
          if (dig_out < mn) mn = dig_out;
          if (dig_out > mx) mx = dig_out;
        end
        if (prev_bv && !dut.base_v) n_loop++;
        prev_bv = dut.base_v;
      end
      check(mx - mn > 1000, $sformatf("phase B output varies (%0d..%0d)", mn, mx));
    end
    // ------------------------------------------------------------ phase C
    cfg.gen_en = 2'b00;
    @(posedge clk);
    for (int i = 0; i < HIST_BINS; i++) wr(MEM_TIME0, i, (i >= 2 && i < 5) ? 1 : 0);
    cfg.gen_en = 2'b01; cfg.inhibit_en = 0; cfg.thr_en = 2'b00;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk); #1;
      if (st_late != 0) n_late++;
    end

    $display("INFO pileup=%0d lost=%0d inhibited=%0d suppressed=%0d late=%0d baseline_loop=%0d quantized=%0d nonlinear=%0d spline_inverse=%0d knots=%0d",
             n_pileup, n_lost, n_inhib, n_supp, n_late, n_loop, n_quant, n_nl, n_prep, n_knot);
    check(n_pileup > 0, "pile-up happened");
    check(n_lost > 0, "start lost while busy happened");
    check(n_inhib > 0, "pile-up inhibition happened");
    check(n_supp > 0, "threshold suppression happened");
    check(n_late > 0, "late trigger happened");
    check(n_loop > 0, "baseline loop restart happened");
    check(n_prep == 2 * 15 + 4, $sformatf("baseline inverse step ran once (%0d cycles)", n_prep));
    check(n_knot > 13, "interpolated baseline passed its key points");
    check(n_shaped > 0, "shaper output compared");
    check(n_quant > 0, "quantization changed a code");
    check(n_nl > 0, "nonlinearity table changed a code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
