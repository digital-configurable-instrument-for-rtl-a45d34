// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/empty flags and that nothing is lost or invented.
module tb_sync_fifo;
  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wr_data = 0, rd_data;
  logic [15:0] q[$];
  int checks = 0, failures = 0, nfull = 0;

  sync_fifo #(.W(16), .DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      // drive from the flags seen before the edge
      check(empty == (q.size() == 0), "empty flag");
      check(full  == (q.size() == 8), "full flag");
      if (full) nfull++;
      if (!empty) check(rd_data == q[0], $sformatf("head %h vs %h", rd_data, q[0]));
      wr_en   = !full && ($urandom_range(0, 99) < (i < 1500 ? 70 : 30));
      wr_data = 16'($urandom);
      rd_en   = !empty && ($urandom_range(0, 99) < (i < 1500 ? 30 : 70));
      @(posedge clk); #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    check(nfull > 0, "full reached");
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
