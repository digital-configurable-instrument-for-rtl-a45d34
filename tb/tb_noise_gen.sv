// tb_noise_gen: configures the three bands (low-pass, band-pass built from a
// low-pass and a high-pass cell, high-pass) and the 1/f path, then rebuilds
// the expected output from the words each band reads out of its FIFO (and the
// white word of the 1/f path) with floating-point filter models, and compares
// the sum every cycle. The first words of the low band are also compared with
// an independent model of its LFSR, which shows that the FIFO keeps the order
// of the random words. Band enables are switched during the run.
module tb_noise_gen;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] en = 0;
  iir1_coef_t lp_coef, bp_lp_coef, bp_hp_coef, hp_coef;
  iir1_coef_t [N_POLES-1:0] flicker_coef;
  sample_t y;
  int checks = 0, failures = 0;

  noise_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic iir1_coef_t butter(input bit hp, input real fc, input real g);
    real c, b;
    c = 1.0 / $tan(3.141592653589793 * fc);
    b = g / (1.0 + c);
    if (hp) b = b * c;
    return '{b0: C1_W'(longint'(b * (2.0 ** C1_FRAC))),
             b1: C1_W'(longint'((hp ? -b : b) * (2.0 ** C1_FRAC))),
             a1: C1_W'(longint'((1.0 - c) / (1.0 + c) * (2.0 ** C1_FRAC)))};
  endfunction

  // floating-point Direct Form II model using the quantised coefficients
  class df2_model;
    real w1 = 0.0;
    function real step(input iir1_coef_t k, input real x);
      real w, r;
      w  = x - (real'(k.a1) / (2.0 ** C1_FRAC)) * w1;
      r  = (real'(k.b0) * w + real'(k.b1) * w1) / (2.0 ** C1_FRAC);
      w1 = w;
      return r;
    endfunction
  endclass

  initial begin
    df2_model m_lp, m_bp1, m_bp2, m_hp;
    df2_model m_f [N_POLES];
    real exp_y [longint];
    longint t = 0;
    logic [31:0] s;
    int nread0 = 0;
    m_lp = new(); m_bp1 = new(); m_bp2 = new(); m_hp = new();
    for (int i = 0; i < N_POLES; i++) m_f[i] = new();
    lp_coef    = butter(0, 0.01, 1.0);
    bp_lp_coef = butter(0, 0.1, 1.0);
    bp_hp_coef = butter(1, 0.02, 1.0);
    hp_coef    = butter(1, 0.3, 0.5);
    for (int i = 0; i < N_POLES; i++)
      flicker_coef[i] = butter(0, 1.0e-3 * (100.0 ** (real'(i) / 9.0)), 0.3 * $sqrt(1.0 / (100.0 ** (real'(i) / 9.0))));
    s = 32'hace1_2468;   // seed of the low band
    repeat (2) @(posedge clk);
    rst_n <= 1; en <= 4'b1111;
    #1;
    for (int k = 0; k < 8000; k++) begin
      real v;
      if (k == 4000) en <= 4'b0101;
      #0;
      // models fed with what the block consumes in this cycle
      if (dut.rd[0]) begin
        v = m_lp.step(lp_coef, real'(dut.rdat[0]));
        if (en[0]) exp_y[t + 2] = (exp_y.exists(t + 2) ? exp_y[t + 2] : 0.0) + $floor(v);
        if (nread0 < 50) begin
          check(dut.rdat[0] == sample_t'(s[31:16]), $sformatf("low band word %0d", nread0));
          for (int b = 0; b < 32; b++) s = s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
        end
        nread0++;
      end
      if (dut.rd[1]) begin
        v = m_bp1.step(bp_lp_coef, real'(dut.rdat[1]));
        v = m_bp2.step(bp_hp_coef, $floor(v));
        if (en[1]) exp_y[t + 3] = (exp_y.exists(t + 3) ? exp_y[t + 3] : 0.0) + $floor(v);
      end
      if (dut.rd[2]) begin
        v = m_hp.step(hp_coef, real'(dut.rdat[2]));
        if (en[2]) exp_y[t + 2] = (exp_y.exists(t + 2) ? exp_y[t + 2] : 0.0) + $floor(v);
      end
      if (en[3]) begin
        real f;
        f = 0.0;
        for (int i = 0; i < N_POLES; i++) f += $floor(m_f[i].step(flicker_coef[i], real'(dut.white_1f)));
        exp_y[t + 3] = (exp_y.exists(t + 3) ? exp_y[t + 3] : 0.0) + f;
      end
      @(posedge clk); #1; t++;
      if ((t > 10 && t < 3990) || t > 4010) begin
        real e;
        e = exp_y.exists(t) ? exp_y[t] : 0.0;
        if (e > 32767.0) e = 32767.0;
        if (e < -32768.0) e = -32768.0;
        check(real'(y) - e < 16.0 && e - real'(y) < 16.0, $sformatf("t=%0d y=%0d model=%f", t, y, e));
      end
    end
    check(checks > 7900 && nread0 > 7000, "low band consumes one word per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
