// tb_shaper_range: time-constant range of the look-ahead second-order cell.
//
// The shaper is specified for time constants from 20 ns to 200 ms at
// 312 Msample/s. This testbench runs sla_iir2 at its default widths with
// poles taken from that range and a step input of 20000 LSB:
//   - CR differentiators H = (1 - z^-1) / (1 - p z^-1) for tau = 20 ns,
//     1 us, 1 ms and 200 ms (b1 = 1, a1 = p, a2 = 0). The B coefficients are
//     rounded so that they sum exactly to zero, which keeps the zero at DC
//     exact even when 1 - p is far below the coefficient step. The output
//     must follow the analog step response 20000 exp(-t/tau) within 2 LSB.
//   - normalised double-pole integrators (1 - p)^2 / (1 - p z^-1)^2 for
//     tau = 20 ns, 100 ns and 1 us. Their gain (1 - p)^2 is rounded to the
//     2^-20 coefficient step, which shifts the DC gain by up to a few 1e-4 at
//     the longer time constants, so only the 20 ns case is held against the
//     analog step response.
// Every output is also compared, within 1.5 LSB, with the look-ahead
// difference equation y[n] = sum B_i x[n-i] + A0 y[n-3] + A1 y[n-6]
// evaluated in floating point with the same rounded coefficients.
module tb_shaper_range;
  import emu_pkg::*;
  localparam real FS = 312.0e6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sla2_coef_t coef;
  sample_t x = 0, y;
  int checks = 0, failures = 0;

  sla_iir2 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Coefficients of Eq. (16) for H = g (1 - b1 z^-1) / (1 - a1 z^-1 - a2 z^-2);
  // with dc0 set, B5 (or B3 when a2 = 0) absorbs the rounding so that the
  // B's sum to zero.
  function automatic sla2_coef_t mk(input real a1, input real a2, input real b1, input real g, input bit dc0);
    sla2_coef_t c;
    real B [6];
    longint q [6], sum;
    B[0] = 1.0; B[1] = a1 - b1; B[2] = a1*a1 - a1*b1 + a2;
    B[3] = -a1*a2 - a1*a1*b1 - b1*a2; B[4] = a2*a2 + a1*a2*b1; B[5] = -a2*a2*b1;
    sum = 0;
    for (int i = 0; i < 6; i++) begin
      q[i] = longint'(g * B[i] * (2.0 ** FIR_FRAC));
      sum += q[i];
    end
    if (dc0) begin
      if (a2 == 0.0) q[3] -= sum;
      else           q[5] -= sum;
    end
    for (int i = 0; i < 6; i++) c.b[i] = FIR_CW'(q[i]);
    c.a0 = IIR_W'(longint'((a1*a1*a1 + 3.0*a1*a2) * (2.0 ** IIR_FRAC)));
    c.a1 = IIR_W'(longint'((a2*a2*a2) * (2.0 ** IIR_FRAC)));
    return c;
  endfunction

  // Runs n samples of a step; ideal(i) < -1e8 means "no analog reference".
  task automatic run(input string name, input real tau, input bit cr, input int n);
    real p, bq [6], a0q, a1q, yr [$], xr [$], ideal, e;
    int k;
    p = $exp(-1.0 / (tau * FS));
    if (cr) coef = mk(p, 0.0, 1.0, 1.0, 1'b1);
    else    coef = mk(2.0 * p, -p * p, 0.0, (1.0 - p) * (1.0 - p), 1'b0);
    for (int i = 0; i < 6; i++) bq[i] = real'($signed(coef.b[i])) / (2.0 ** FIR_FRAC);
    a0q = real'($signed(coef.a0)) / (2.0 ** IIR_FRAC);
    a1q = real'($signed(coef.a1)) / (2.0 ** IIR_FRAC);
    rst_n <= 0; in_valid <= 0; x <= '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    k = 0;
    for (int i = 0; i < n + 2; i++) begin
      x <= 16'sd20000; in_valid <= (i < n);
      @(posedge clk); #1;
      if (out_valid) begin
        real acc;
        // look-ahead equation in floating point, step input
        acc = 0.0;
        for (int j = 0; j < 6; j++) if (k - j >= 0) acc += bq[j] * 20000.0;
        if (k >= 3) acc += a0q * yr[k-3];
        if (k >= 6) acc += a1q * yr[k-6];
        yr.push_back(acc);
        check(real'(y) - acc <= 1.5 && acc - real'(y) <= 1.5,
              $sformatf("%s n=%0d y=%0d equation %f", name, k, y, acc));
        if (cr) ideal = 20000.0 * (p ** k);
        else    ideal = 20000.0 * (1.0 - real'(k + 2) * (p ** (k + 1)) + real'(k + 1) * (p ** (k + 2)));
        if (cr || tau < 50.0e-9)
          check(real'(y) - ideal <= 2.0 && ideal - real'(y) <= 2.0,
                $sformatf("%s n=%0d y=%0d analog %f", name, k, y, ideal));
        k++;
      end
    end
    check(k == n, $sformatf("%s: %0d outputs", name, k));
    $display("INFO %s: p = 1 - %e, last output %0d", name, 1.0 - p, y);
  endtask

  initial begin
    run("CR 20 ns", 20.0e-9, 1'b1, 300);
    run("CR 1 us", 1.0e-6, 1'b1, 3000);
    run("CR 1 ms", 1.0e-3, 1'b1, 40000);
    run("CR 200 ms", 0.2, 1'b1, 40000);
    run("RC^2 20 ns", 20.0e-9, 1'b0, 300);
    run("RC^2 100 ns", 100.0e-9, 1'b0, 1000);
    run("RC^2 1 us", 1.0e-6, 1'b0, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
