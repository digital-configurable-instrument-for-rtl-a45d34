// tb_lfsr: checks the LFSR against a bit-serial model of the polynomial
// x^32 + x^22 + x^2 + x + 1, the hold behaviour of en, the reset seed and the
// balance of the output bits.
module tb_lfsr;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] q, model;
  int checks = 0, failures = 0, ones = 0;

  lfsr #(.W(32), .STEPS(16), .SEED(32'hdead_beef)) dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q));
  always #5 clk = ~clk;

  // one shift of the polynomial: feedback bit enters the top, taps toggle
  function automatic logic [31:0] shift1(input logic [31:0] s);
    logic fb;
    fb = s[0];
    s  = {1'b0, s[31:1]};
    if (fb) begin
      s[31] = 1'b1; s[21] ^= 1'b1; s[1] ^= 1'b1; s[0] ^= 1'b1;
    end
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(q == 32'hdead_beef, "seed after reset");
    model = q;
    @(posedge clk); #1;
    check(q == model, "hold while en low");
    for (int i = 0; i < 2000; i++) begin
      en <= 1;
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) model = shift1(model);
      check(q == model, $sformatf("word %0d: %h vs %h", i, q, model));
      check(q != 0, "nonzero");
      ones += $countones(q);
    end
    // 64000 bits: expect half ones within 2 %
    check(ones > 31360 && ones < 32640, $sformatf("bit balance %0d", ones));
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
