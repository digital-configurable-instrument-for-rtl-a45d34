// tb_stat_gen: loads a histogram with counts 1 and 3 in two bins (zero
// elsewhere) and draws 2000 values. Every value must fall in one of the two
// bins, their frequencies must follow the 1:3 ratio, and each draw must take
// the documented $clog2(BINS) + 3 cycles. A second histogram with a single
// bin checks the search at the table ends.
module tb_stat_gen;
  import emu_pkg::*;
  localparam int BINS = 1024;
  localparam int BW   = 10;
  logic              clk = 0, rst_n = 0;
  logic              wr_en = 0, req = 0, ready, val_valid;
  logic [BW-1:0]     wr_addr = 0;
  logic [31:0]       wr_count = 0;
  logic [BW+HIST_FRAC-1:0] val;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  stat_gen #(.BINS(BINS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input int b0, input int c0, input int b1, input int c1);
    for (int i = 0; i < BINS; i++) begin
      wr_en <= 1; wr_addr <= BW'(i);
      wr_count <= (i == b0) ? c0 : (i == b1) ? c1 : 0;
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
  endtask

  task automatic draw(output int bin);
    int lat;
    while (!ready) @(posedge clk);
    req <= 1;
    @(posedge clk);
    req <= 0;
    lat = 1;
    #1;
    while (!val_valid) begin @(posedge clk); #1; lat++; end
    check(lat == BW + 3, $sformatf("draw latency %0d", lat));
    bin = int'(val >> HIST_FRAC);
    @(posedge clk);
  endtask

  initial begin
    int b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    load(100, 1, 500, 3);
    for (int i = 0; i < 2000; i++) begin
      draw(b);
      check(b == 100 || b == 500, $sformatf("bin %0d outside histogram", b));
      if (b == 100) n_lo++;
      if (b == 500) n_hi++;
    end
    // expected 500 +/- 19 (1 sigma): allow 4 sigma
    check(n_lo > 423 && n_lo < 577, $sformatf("bin 100 drawn %0d of 2000", n_lo));
    load(0, 5, 0, 5);
    for (int i = 0; i < 20; i++) begin draw(b); check(b == 0, "single bin 0"); end
    load(1023, 7, 1023, 7);
    for (int i = 0; i < 20; i++) begin draw(b); check(b == 1023, "single bin 1023"); end
    $display("INFO counts %0d %0d", n_lo, n_hi);
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
