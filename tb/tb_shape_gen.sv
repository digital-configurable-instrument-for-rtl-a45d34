// tb_shape_gen: stores a short random shape, plays it back at up-sampling
// factors 1, 4 and 1000/1 (step 2^24/1000) with different amplitudes, and
// compares every sample with a model that evaluates the linear interpolation
// of the stored samples at each read phase. Checks the 3-cycle start latency,
// the pulse length, a zero output when idle, and that a start during playback
// is ignored and reported on `lost`.
module tb_shape_gen;
  import emu_pkg::*;
  localparam int AW = SHAPE_AW;
  logic clk = 0, rst_n = 0, wr_en = 0, start = 0, busy, lost;
  logic [AW-1:0] wr_addr = 0, last = 0;
  sample_t wr_data = 0, y;
  logic [AW+PH_FRAC-1:0] step = 0;
  logic [STAT_W-1:0] amp = 0;
  sample_t shape [64];
  int checks = 0, failures = 0, nlost = 0;

  shape_gen dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (lost) nlost++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int model(input longint ph, input int a, input int lst);
    longint k, f, s0, s1, s;
    k  = ph >> PH_FRAC;
    f  = ph & ((64'd1 << PH_FRAC) - 1);
    s0 = shape[int'(k)];
    s1 = (k < lst) ? shape[int'(k) + 1] : shape[int'(k)];
    s  = s0 + (((s1 - s0) * f) >>> PH_FRAC);
    return int'((s * a) >>> STAT_W);
  endfunction

  task automatic play(input longint stp, input int a, input int lst, input bit poke);
    longint ph = 0;
    int n = 0;
    step <= (AW+PH_FRAC)'(stp); last <= AW'(lst);
    @(posedge clk);
    start <= 1; amp <= STAT_W'(a);
    @(posedge clk);
    start <= 0;
    @(posedge clk); #1;
    check(y == 0, "no output before latency");
    @(posedge clk); #1;                       // third cycle after start
    while ((ph >> PH_FRAC) <= lst) begin
      check(y == model(ph, a, lst), $sformatf("step %0d sample %0d: %0d vs %0d", stp, n, y, model(ph, a, lst)));
      if (poke && n == 5) start <= 1;
      if (poke && n == 6) start <= 0;
      ph += stp; n++;
      @(posedge clk); #1;
    end
    check(y == 0, "zero after the pulse");
    check(!busy, "idle after the pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 64; i++) begin
      shape[i] = (i == 0 || i == 63) ? 16'sd0 : sample_t'($urandom_range(0, 32767));
      wr_en <= 1; wr_addr <= AW'(i); wr_data <= shape[i];
      @(posedge clk);
    end
    wr_en <= 0;
    play(64'd1 << PH_FRAC, 65535, 63, 0);
    play(64'd1 << (PH_FRAC - 2), 32768, 63, 1);
    check(nlost == 1, "start during playback reported lost");
    play((64'd1 << PH_FRAC) / 1000, 40000, 3, 0);
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
