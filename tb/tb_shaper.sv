// tb_shaper: a CR-(RC)^n style setting (two second-order cells and a
// first-order high-pass) is compared sample by sample with a floating-point
// model of the same cascade of original, non-pipelined recursions, with all
// stages on and with each stage bypassed in turn. Checks the latency (2
// cycles per second-order cell, 1 for the first-order cell), and that with every stage bypassed
// the input reaches the output unchanged in the same cycle.
module tb_shaper;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [2:0] en = 0;
  sla2_coef_t [1:0] sla_coef;
  iir1_coef_t iir_coef;
  sample_t x = 0, y;
  int checks = 0, failures = 0;

  shaper dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic sla2_coef_t mk(input real a1, input real a2, input real b1, input real g);
    sla2_coef_t c;
    real B [6];
    B[0] = 1.0; B[1] = a1 - b1; B[2] = a1*a1 - a1*b1 + a2;
    B[3] = -a1*a2 - a1*a1*b1 - b1*a2; B[4] = a2*a2 + a1*a2*b1; B[5] = -a2*a2*b1;
    for (int i = 0; i < 6; i++) c.b[i] = FIR_CW'(longint'(g * B[i] * (2.0 ** FIR_FRAC)));
    c.a0 = IIR_W'(longint'((a1*a1*a1 + 3.0*a1*a2) * (2.0 ** IIR_FRAC)));
    c.a1 = IIR_W'(longint'((a2*a2*a2) * (2.0 ** IIR_FRAC)));
    return c;
  endfunction

  // Runs a pulse train through the cascade with the given stage enables and
  // compares with a model in which a disabled stage passes its input on.
  task automatic run(input logic [2:0] e);
    real s1y1, s1y2, s2y1, s2y2, w1, v1, v2, v3, w;
    real q [$];
    int lat;
    lat = 2*int'(e[0]) + 2*int'(e[1]) + int'(e[2]);
    rst_n <= 0; in_valid <= 0; en <= e;
    @(posedge clk);
    rst_n <= 1;
    s1y1 = 0; s1y2 = 0; s2y1 = 0; s2y2 = 0; w1 = 0;
    for (int i = 0; i < 3005; i++) begin
      sample_t xi;
      xi = (i % 600 < 20) ? 16'sd20000 : 16'sd0;
      if (i < 3000) begin
        x <= xi; in_valid <= 1;
        v1 = real'(xi);
        if (e[0]) begin
          v1 = g0 * v1 + 2.0*0.9 * s1y1 - 0.81 * s1y2;  s1y2 = s1y1; s1y1 = v1;
        end
        v2 = v1;
        if (e[1]) begin
          v2 = g1 * v1 + 2.0*0.85 * s2y1 - 0.7225 * s2y2; s2y2 = s2y1; s2y1 = v2;
        end
        v3 = v2;
        if (e[2]) begin
          w  = v2 - ha1 * w1;
          v3 = hb0 * w - hb0 * w1;
          w1 = w;
        end
        q.push_back(v3);
      end else in_valid <= 0;
      @(posedge clk); #1;
      if (i >= lat - 1 && q.size() > 0) begin
        real ex;
        ex = q.pop_front();
        check(real'(y) - ex < 6.0 && ex - real'(y) < 6.0,
              $sformatf("en=%b n=%0d y=%0d model=%f", e, i - lat + 1, y, ex));
      end
    end
  endtask

  real p, g0, g1, hb0, ha1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // bypass
    en <= 3'b000;
    for (int i = 0; i < 50; i++) begin
      x <= sample_t'($urandom); in_valid <= 1;
      #1;
      check(y == x && out_valid, "bypass passes input through");
      @(posedge clk);
    end
    // double pole 0.9 (gain 0.01 -> DC 1), double pole 0.85 (gain 0.0225), HP pole 0.98
    p = 0.9;  g0 = (1.0 - p) * (1.0 - p);
    sla_coef[0] = mk(2.0*p, -p*p, 0.0, g0);
    p = 0.85; g1 = (1.0 - p) * (1.0 - p);
    sla_coef[1] = mk(2.0*p, -p*p, 0.0, g1);
    ha1 = -0.98; hb0 = (1.0 + 0.98) / 2.0;
    iir_coef = '{b0: C1_W'(longint'(hb0 * (2.0 ** C1_FRAC))), b1: C1_W'(longint'(-hb0 * (2.0 ** C1_FRAC))),
                 a1: C1_W'(longint'(ha1 * (2.0 ** C1_FRAC)))};
    run(3'b111);
    run(3'b101);
    run(3'b011);
    run(3'b110);
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
