// tb_pileup_ctrl: random events on both inputs with inhibition off and on.
// A model of the start-to-start rule predicts which events are accepted; the
// registered saturating sum of the two inputs is checked every cycle.
module tb_pileup_ctrl;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, inhibit_en = 0;
  logic [15:0] inhibit_win = 0;
  logic ev_valid_0 = 0, ev_valid_1 = 0, start_0, start_1, inhibited_0, inhibited_1;
  logic [STAT_W-1:0] ev_amp_0 = 0, ev_amp_1 = 0, start_amp_0, start_amp_1;
  sample_t y_0 = 0, y_1 = 0, y;
  int checks = 0, failures = 0, ninh = 0, nboth = 0;

  pileup_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint last_start = -100000, t = 0;
    int exp_sum;
    bit e0, e1, s0, s1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 6000; i++) begin
      inhibit_en  = (i >= 3000);
      inhibit_win = 16'd20;
      e0 = ($urandom_range(0, 99) < 6);
      e1 = ($urandom_range(0, 99) < 6);
      ev_valid_0 = e0; ev_valid_1 = e1;
      ev_amp_0 = STAT_W'($urandom); ev_amp_1 = STAT_W'($urandom);
      y_0 = sample_t'($urandom); y_1 = sample_t'($urandom);
      #1;
      if (!inhibit_en) begin
        s0 = e0; s1 = e1;
      end else begin
        s0 = e0 && (t - last_start >= 20);
        s1 = e1 && (t - last_start >= 20) && !s0;
      end
      check(start_0 == s0 && start_1 == s1, $sformatf("t=%0d starts %b%b vs %b%b", t, start_0, start_1, s0, s1));
      check(inhibited_0 == (e0 && !s0) && inhibited_1 == (e1 && !s1), "inhibited flags");
      if (s0) check(start_amp_0 == ev_amp_0, "amplitude 0 passed");
      if (s1) check(start_amp_1 == ev_amp_1, "amplitude 1 passed");
      if (s0 || s1) last_start = t;
      if (inhibited_0 || inhibited_1) ninh++;
      if (s0 && s1) nboth++;
      exp_sum = int'(y_0) + int'(y_1);
      if (exp_sum > 32767) exp_sum = 32767;
      if (exp_sum < -32768) exp_sum = -32768;
      @(posedge clk); #1;
      check(int'(y) == exp_sum, "registered saturating sum");
      t++;
    end
    check(ninh > 0, "inhibition happened");
    check(nboth > 0, "simultaneous starts with inhibition off");
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
