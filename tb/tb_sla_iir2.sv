// tb_sla_iir2: the look-ahead cell must reproduce the original second-order
// filter (1 - b1 z^-1) / (1 - a1 z^-1 - a2 z^-2). The testbench derives the
// B0..B5, A0, A1 coefficients from a1, a2, b1, quantises them to the cell's
// formats, drives random and step inputs, and compares each output with a
// floating-point model of the original, non-pipelined recursion. Also checks
// the 2-cycle latency and the DC gain.
module tb_sla_iir2;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t x = 0, y;
  sla2_coef_t coef;
  int checks = 0, failures = 0;

  sla_iir2 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input real a1, input real a2, input real b1, input real gain, input int n);
    real B [6];
    real yq [$];
    real xm1, ym1, ym2, yr, tol;
    B[0] = 1.0;
    B[1] = a1 - b1;
    B[2] = a1*a1 - a1*b1 + a2;
    B[3] = -a1*a2 - a1*a1*b1 - b1*a2;
    B[4] = a2*a2 + a1*a2*b1;
    B[5] = -a2*a2*b1;
    for (int i = 0; i < 6; i++) coef.b[i] = FIR_CW'(longint'(gain * B[i] * (2.0 ** FIR_FRAC)));
    coef.a0 = IIR_W'(longint'((a1*a1*a1 + 3.0*a1*a2) * (2.0 ** IIR_FRAC)));
    coef.a1 = IIR_W'(longint'((a2*a2*a2) * (2.0 ** IIR_FRAC)));
    rst_n <= 0; in_valid <= 0;
    @(posedge clk);
    rst_n <= 1;
    xm1 = 0; ym1 = 0; ym2 = 0;
    tol = 4.0;
    for (int i = 0; i < n + 1; i++) begin
      sample_t xi;
      xi = (i < n/2) ? sample_t'($urandom_range(0, 8000)) - 16'sd4000 : 16'sd3000;
      if (i < n) begin
        x <= xi; in_valid <= 1;
        yr = gain * (real'(xi) - b1 * xm1) + a1 * ym1 + a2 * ym2;
        xm1 = real'(xi); ym2 = ym1; ym1 = yr;
        yq.push_back(yr);
      end else in_valid <= 0;
      @(posedge clk); #1;
      if (i >= 1) begin
        real e;
        check(out_valid, "out_valid after 2 cycles");
        e = yq.pop_front();
        check(real'(y) - e < tol && e - real'(y) < tol,
              $sformatf("a1=%f n=%0d y=%0d model=%f", a1, i - 1, y, e));
      end
    end
    // DC gain of the original filter
    check(real'(y) - 3000.0 * gain * (1.0 - b1) / (1.0 - a1 - a2) < tol + 1 &&
          3000.0 * gain * (1.0 - b1) / (1.0 - a1 - a2) - real'(y) < tol + 1, "DC gain");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(1.2, -0.5, 0.3, 1.0, 1200);      // complex poles
    run(1.6, -0.64, 0.0, 0.05, 2000);    // double real pole at 0.8
    run(1.9, -0.9025, 0.95, 0.1, 3000);  // double pole at 0.95, zero near it
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
