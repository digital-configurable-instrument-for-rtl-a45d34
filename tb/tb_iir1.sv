// tb_iir1: drives the first-order cell as a Butterworth low-pass and as a
// high-pass (coefficients from Eqs. (2)-(4) of the bilinear design) and
// compares every output with a floating-point Direct Form II model. Checks
// the one-cycle latency and the DC gains (1 for low-pass, 0 for high-pass).
module tb_iir1;
  import emu_pkg::*;
  logic       clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t    x = 0, y;
  iir1_coef_t coef;
  int checks = 0, failures = 0;

  iir1 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [C1_W-1:0] q(input real v);
    return C1_W'(longint'(v * (2.0 ** C1_FRAC)));
  endfunction

  task automatic run(input bit hp, input real fc);
    real c, b0, b1, a1, w, w1, yr;
    c  = 1.0 / $tan(3.141592653589793 * fc);   // cot(pi fc/fs)
    b0 = 1.0 / (1.0 + c);
    b1 = hp ? -b0 : b0;
    a1 = (1.0 - c) / (1.0 + c);
    coef = '{b0: q(hp ? c * b0 : b0), b1: q(hp ? -c * b0 : b1), a1: q(a1)};
    if (hp) begin b0 = c * b0; b1 = -b0; end
    rst_n <= 0;
    @(posedge clk);
    rst_n <= 1;
    w1 = 0.0;
    for (int i = 0; i < 600; i++) begin
      sample_t xi;
      xi = (i < 300) ? sample_t'($urandom_range(0, 16000)) - 16'sd8000 : 16'sd10000;
      x <= xi; in_valid <= 1;
      @(posedge clk); #1;
      w  = real'(xi) - a1 * w1;
      yr = b0 * w + b1 * w1;
      w1 = w;
      check(out_valid, "out_valid one cycle after in_valid");
      check((real'(y) - yr) < 2.0 && (yr - real'(y)) < 2.0,
            $sformatf("hp=%0d n=%0d y=%0d model=%f", hp, i, y, yr));
      if (i == 599) check(hp ? (y > -3 && y < 3) : (y > 9997 && y < 10003), "DC gain");
    end
    in_valid <= 0;
    @(posedge clk); #1;
    check(!out_valid, "out_valid drops");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(0, 0.02);
    run(1, 0.05);
    run(0, 0.2);
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
