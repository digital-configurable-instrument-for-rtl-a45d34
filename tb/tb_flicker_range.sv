// tb_flicker_range: 1/f noise over the full frequency range of the instrument.
//
// The 1/f source must cover a band from a few hertz to about 100 kHz at a
// sample rate of tens of MHz, which puts the lowest pole within 1e-6 of
// z = 1. This testbench sets the 10 low-pass cells of flicker_gen for poles
// log-spaced from 3 Hz to 100 kHz at 20 MHz, DC gains k sqrt(f_1 / f_i) with
// an overall gain k chosen for an output of a few thousand LSB rms, and runs
// three million samples. It checks:
//   - every output against a floating-point model of the 10 filters and their
//     sum, driven by the block's own white word (same tolerance as the unit
//     test: each cell rounds its output to an integer);
//   - the flicker signature: the Allan variance (half the mean square
//     difference of successive block averages) stays flat for block lengths
//     of 256 to 16384 samples, all inside the band, where white noise of the
//     same power would fall by a factor of 64;
//   - that the output never reaches the saturation limits.
// The first million samples are skipped for the statistics so that all but
// the two slowest cells have settled.
module tb_flicker_range;
  import emu_pkg::*;
  localparam int  N     = 10;
  localparam real FS    = 20.0e6;
  localparam int  NRUN  = 3_000_000;
  localparam int  NSKIP = 1_000_000;
  logic clk = 0, rst_n = 0, en = 0;
  iir1_coef_t [N-1:0] coef;
  sample_t white, y;
  int checks = 0, failures = 0;
  real pa [N], ws [N];
  real bsum [5], bprev [5], avar [5];
  int  bcnt [5], nblk [5];

  flicker_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real fmin = 3.0, fmax = 1.0e5, k = 50.0, f, c, b, a, sum, emax, amin, amax;
    real yq [$];
    int  ymax;
    repeat (2) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      real g;
      f = fmin * ((fmax / fmin) ** (real'(i) / real'(N - 1)));
      c = 1.0 / $tan(3.141592653589793 * f / FS);
      b = 1.0 / (1.0 + c);
      a = (1.0 - c) / (1.0 + c);
      g = k * $sqrt(fmin / f);
      pa[i] = a;
      coef[i] = '{b0: C1_W'(longint'(g * b * (2.0 ** C1_FRAC))),
                  b1: C1_W'(longint'(g * b * (2.0 ** C1_FRAC))),
                  a1: C1_W'(longint'(a * (2.0 ** C1_FRAC)))};
      ws[i] = 0.0;
      if (i == 0) $display("INFO lowest pole: 1 - |a1| = %e", 1.0 + a);
    end
    for (int m = 0; m < 5; m++) begin
      bsum[m] = 0; bprev[m] = 0; avar[m] = 0; bcnt[m] = 0; nblk[m] = 0;
    end
    emax = 0; ymax = 0;
    rst_n <= 1; en <= 1;
    #1;
    for (int t = 0; t < NRUN; t++) begin
      sum = 0;
      for (int i = 0; i < N; i++) begin
        real w, b0;
        b0 = real'(coef[i].b0) / (2.0 ** C1_FRAC);
        w  = real'(white) - pa[i] * ws[i];
        sum += b0 * (w + ws[i]);
        ws[i] = w;
      end
      yq.push_back(sum);
      @(posedge clk); #1;
      if (yq.size() >= 2) begin
        real e, d;
        e = yq.pop_front();
        d = real'(y) - e;
        if (d < 0) d = -d;
        if (d > emax) emax = d;
        check(d < 12.0, $sformatf("t=%0d y=%0d model=%f", t, y, e));
        if (y > ymax) ymax = y;
        if (-y > ymax) ymax = -y;
        if (t >= NSKIP) begin
          // block averages over 2^(8+2m) samples
          for (int m = 0; m < 5; m++) begin
            bsum[m] += real'(y);
            bcnt[m]++;
            if (bcnt[m] == (1 << (8 + 2*m))) begin
              real avg;
              avg = bsum[m] / real'(bcnt[m]);
              if (nblk[m] > 0) avar[m] += 0.5 * (avg - bprev[m]) ** 2;
              bprev[m] = avg;
              nblk[m]++;
              bsum[m] = 0;
              bcnt[m] = 0;
            end
          end
        end
      end
    end
    amin = 1.0e30; amax = 0;
    for (int m = 0; m < 5; m++) begin
      avar[m] /= real'(nblk[m] - 1);
      $display("INFO Allan deviation over %0d samples: %.2f LSB (%0d blocks)",
               1 << (8 + 2*m), $sqrt(avar[m]), nblk[m]);
      if (m < 4 && avar[m] < amin) amin = avar[m];
      if (m < 4 && avar[m] > amax) amax = avar[m];
    end
    check(amax < 3.0 * amin, $sformatf("Allan variance not flat: %f .. %f", amin, amax));
    check(ymax < 32767, $sformatf("output reached saturation (%0d)", ymax));
    $display("INFO largest |y| %0d LSB, largest model difference %.2f LSB", ymax, emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
