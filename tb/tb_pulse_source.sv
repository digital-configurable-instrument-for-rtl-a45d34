// tb_pulse_source: time histogram with one bin (50 cycles) and amplitude
// histogram with two equal bins (10 and 900). Without threshold every event
// carries one of the two amplitudes and events come every 50 cycles; with the
// threshold at bin 500 only large amplitudes pass and the small ones are
// reported as suppressed, about half of each.
module tb_pulse_source;
  import emu_pkg::*;
  localparam int BW = 10;
  logic clk = 0, rst_n = 0, en = 0, thr_en = 0;
  logic [4:0] time_shift = 0;
  logic [STAT_W-1:0] thr = 0, ev_amp;
  logic t_wr_en = 0, a_wr_en = 0, ev_valid, suppressed, late;
  logic [BW-1:0] t_wr_addr = 0, a_wr_addr = 0;
  logic [31:0] t_wr_count = 0, a_wr_count = 0;
  int checks = 0, failures = 0;

  pulse_source dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int n, output int nev, output int nsup, output int nbig);
    longint t = 0, last = -1;
    nev = 0; nsup = 0; nbig = 0;
    en <= 1;
    while (nev + nsup < n && t < 200000) begin
      @(posedge clk); #1; t++;
      if (ev_valid || suppressed) begin
        if (last >= 0) check(t - last == 50, $sformatf("event spacing %0d", t - last));
        last = t;
      end
      if (ev_valid) begin
        nev++;
        check((ev_amp >> HIST_FRAC) == 10 || (ev_amp >> HIST_FRAC) == 900, "amplitude bin");
        if ((ev_amp >> HIST_FRAC) == 900) nbig++;
        if (thr_en) check(ev_amp >= thr, "threshold respected");
      end
      if (suppressed) nsup++;
      check(!(ev_valid && suppressed), "event and suppression exclusive");
    end
    en <= 0;
    @(posedge clk);
  endtask

  initial begin
    int nev, nsup, nbig;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1024; i++) begin
      t_wr_en <= 1; t_wr_addr <= BW'(i); t_wr_count <= (i == 50) ? 1 : 0;
      a_wr_en <= 1; a_wr_addr <= BW'(i); a_wr_count <= (i == 10 || i == 900) ? 2 : 0;
      @(posedge clk);
    end
    t_wr_en <= 0; a_wr_en <= 0;
    run(400, nev, nsup, nbig);
    check(nsup == 0, "no suppression with threshold off");
    check(nbig > 140 && nbig < 260, $sformatf("large amplitudes %0d of 400", nbig));
    thr_en <= 1; thr <= STAT_W'(500 << HIST_FRAC);
    run(400, nev, nsup, nbig);
    check(nev == nbig, "only large amplitudes pass");
    check(nsup > 140 && nsup < 260, $sformatf("suppressed %0d of 400", nsup));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
