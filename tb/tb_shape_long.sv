// tb_shape_long: long pulse from a full shape memory by 1:1000 interpolation.
//
// A 16 k-word memory holds about 52 us of shape at the sample rate; played
// back with an up-sampling factor of 1000 it gives a pulse of about 52 ms.
// This testbench fills all 16384 words of shape_gen with a fast-rise,
// slow-decay detector pulse (rise over 40 words, decay constant 3000 words,
// peak 32767), plays it once with step = floor(2^24 / 1000) at full
// amplitude, and compares every one of the ~16.4 million output samples with
// the linear interpolation of the stored words at the exact read phase. It
// also checks the pulse length in samples against ceil(16384 * 2^24 / step)
// and that the shape generator goes idle afterwards.
module tb_shape_long;
  import emu_pkg::*;
  localparam int     AW   = SHAPE_AW;
  localparam int     N    = SHAPE_DEPTH;
  localparam longint STEP = (64'd1 << PH_FRAC) / 1000;
  logic clk = 0, rst_n = 0, wr_en = 0, start = 0, busy, lost;
  logic [AW-1:0] wr_addr = 0, last = AW'(N - 1);
  sample_t wr_data = 0, y;
  logic [AW+PH_FRAC-1:0] step = (AW+PH_FRAC)'(STEP);
  logic [STAT_W-1:0] amp = '1;
  sample_t shape [N];
  longint checks = 0, failures = 0;

  shape_gen dut (.*);
  always #5 clk = ~clk;

  function automatic int model(input longint ph);
    longint k, f, s0, s1, s;
    k  = ph >> PH_FRAC;
    f  = ph & ((64'd1 << PH_FRAC) - 1);
    s0 = shape[int'(k)];
    s1 = (k < N - 1) ? shape[int'(k) + 1] : shape[int'(k)];
    s  = s0 + (((s1 - s0) * f) >>> PH_FRAC);
    return int'((s * longint'(amp)) >>> STAT_W);
  endfunction

  initial begin
    longint ph = 0, n = 0, expected;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      real v;
      v = (i < 40) ? 32767.0 * i / 40.0 : 32767.0 * $exp(-(i - 40) / 3000.0);
      shape[i] = sample_t'($rtoi(v));
      wr_en <= 1; wr_addr <= AW'(i); wr_data <= shape[i];
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    repeat (2) @(posedge clk);
    #1;                                    // third cycle after start
    while ((ph >> PH_FRAC) < N) begin
      checks++;
      if (int'(y) != model(ph)) begin
        failures++;
        if (failures < 20) $display("FAIL sample %0d: %0d vs %0d", n, y, model(ph));
      end
      ph += STEP; n++;
      @(posedge clk); #1;
    end
    expected = ((longint'(N) << PH_FRAC) + STEP - 1) / STEP;
    checks++;
    if (n != expected) begin failures++; $display("FAIL pulse length %0d, expected %0d", n, expected); end
    checks++;
    if (busy || y != 0) begin failures++; $display("FAIL not idle after the pulse"); end
    $display("INFO pulse of %0d samples = %.1f ms at 315 MHz, %.1f ms at 350 MHz",
             n, real'(n) / 315.0e3, real'(n) / 350.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (17_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
