// tb_event_timer: with a one-bin interval histogram the trigger spacing is
// known: bin 40 at shift 0 gives exactly 40 cycles, at shift 2 it gives
// 160..163 cycles (the dither bits enter). A bin shorter than a draw (3)
// must make the timer report `late` and space triggers by the draw time.
module tb_event_timer;
  import emu_pkg::*;
  localparam int BW = 10;
  logic          clk = 0, rst_n = 0, en = 0, wr_en = 0, trig, late;
  logic [4:0]    shift = 0;
  logic [BW-1:0] wr_addr = 0;
  logic [31:0]   wr_count = 0;
  int checks = 0, failures = 0, nlate = 0;

  event_timer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && late) nlate++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input int bin);
    en <= 0;
    for (int i = 0; i < 1024; i++) begin
      wr_en <= 1; wr_addr <= BW'(i); wr_count <= (i == bin) ? 9 : 0;
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
  endtask

  task automatic measure(input int n, input int lo, input int hi);
    longint last = -1, t = 0;
    int seen = 0;
    en <= 1;
    while (seen < n) begin
      @(posedge clk); #1; t++;
      if (trig) begin
        if (last >= 0) check(t - last >= lo && t - last <= hi,
                             $sformatf("spacing %0d not in [%0d,%0d]", t - last, lo, hi));
        last = t; seen++;
      end
      if (t > 100000) break;
    end
    check(seen == n, "enough triggers");
    en <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    load(40);
    shift <= 0; measure(50, 40, 40);
    shift <= 2; measure(50, 160, 163);
    check(nlate == 0, "no late trigger at long intervals");
    load(3);
    shift <= 0; measure(20, 3, 20);
    check(nlate > 0, "late reported for intervals shorter than a draw");
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
