// tb_flicker_gen: sets up the 10 low-pass cells by the log-spaced pole rule
// (f_min = 1e-4, f_max = 1e-1 of the clock) and the gain rule
// G_i = sqrt(f_pole,1 / f_pole,i), feeds the block's own white-noise word to
// a floating-point model of the 10 filters and their sum, and compares the
// output every cycle. Also checks that the white source is balanced and that
// the low-frequency power exceeds the high-frequency power, as 1/f noise must.
module tb_flicker_gen;
  import emu_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, en = 0;
  iir1_coef_t [N-1:0] coef;
  sample_t white, y;
  int checks = 0, failures = 0;
  real pa [N], ga [N], ws [N];

  flicker_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real fmin = 1.0e-4, fmax = 1.0e-1, f, c, b, a, sum, diffp, lvl, ym1;
    real yq [$];
    longint nwhite = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      f = fmin * ((fmax / fmin) ** (real'(i) / real'(N - 1)));
      c = 1.0 / $tan(3.141592653589793 * f);
      b = 1.0 / (1.0 + c);
      a = (1.0 - c) / (1.0 + c);
      ga[i] = $sqrt(fmin / f) * 0.5;
      pa[i] = a;
      coef[i] = '{b0: C1_W'(longint'(ga[i] * b * (2.0 ** C1_FRAC))),
                  b1: C1_W'(longint'(ga[i] * b * (2.0 ** C1_FRAC))),
                  a1: C1_W'(longint'(a * (2.0 ** C1_FRAC)))};
      ws[i] = 0.0;
    end
    rst_n <= 1; en <= 1;
    #1;
    diffp = 0; lvl = 0; ym1 = 0;
    for (int t = 0; t < 20000; t++) begin
      // model of the filters driven by the word now at `white`
      sum = 0;
      for (int i = 0; i < N; i++) begin
        real w, b0;
        b0 = real'(coef[i].b0) / (2.0 ** C1_FRAC);
        w  = real'(white) - pa[i] * ws[i];
        sum += b0 * (w + ws[i]);
        ws[i] = w;
      end
      yq.push_back(sum);
      if (white > 0) nwhite++;
      @(posedge clk); #1;
      if (yq.size() >= 2) begin
        real e;
        e = yq.pop_front();
        check(real'(y) - e < 12.0 && e - real'(y) < 12.0, $sformatf("t=%0d y=%0d model=%f", t, y, e));
        if (t > 5000) begin
          diffp += (real'(y) - ym1) ** 2;
          lvl   += real'(y) ** 2;
        end
        ym1 = real'(y);
      end
    end
    check(nwhite > 9600 && nwhite < 10400, $sformatf("white balance %0d", nwhite));
    // differencing is a high-pass: for 1/f noise its power is far below the total
    check(diffp < 0.5 * lvl, $sformatf("low frequencies dominate: %e vs %e", diffp, lvl));
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
