// tb_nl_output: fills the 65536-word table with a nonlinear characteristic
// (a cubic bow plus a code-dependent step pattern, computed here), then
// drives random codes with the table on and off and with 0..8 quantization
// bits. Checks the digital word against the characteristic of the quantized
// code, the DAC word against the offset-binary ideal code, and the 2-cycle
// latency.
module tb_nl_output;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, lut_en = 0, wr_en = 0, in_valid = 0, out_valid;
  logic [3:0] quant_bits = 0;
  logic [15:0] wr_addr = 0, dac_data;
  sample_t wr_data = 0, x = 0, dig_out;
  int checks = 0, failures = 0;

  nl_output dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic sample_t charac(input int code);
    real v;
    int r;
    v = real'(code) + 2000.0 * (1.0 - (real'(code) / 32768.0) ** 2) + real'((code & 16'h00f0) >> 4);
    r = int'(v);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return sample_t'(r);
  endfunction

  initial begin
    sample_t xs [$];
    logic [3:0] qs [$];
    bit ls [$];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 65536; a++) begin
      wr_en <= 1; wr_addr <= 16'(a); wr_data <= charac(a - 32768);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int i = 0; i < 4001; i++) begin
      if (i < 4000) begin
        sample_t xi;
        xi = sample_t'($urandom);
        x <= xi; in_valid <= 1;
        lut_en <= (i % 3 != 0); quant_bits <= 4'($urandom_range(0, 8));
        #1;
        xs.push_back(xi); qs.push_back(quant_bits); ls.push_back(lut_en);
      end else in_valid <= 0;
      @(posedge clk); #1;
      if (i >= 1) begin
        sample_t xe, xq;
        logic [3:0] qe;
        bit le;
        xe = xs.pop_front(); qe = qs.pop_front(); le = ls.pop_front();
        xq = sample_t'((int'(xe) >>> qe) <<< qe);
        check(out_valid, "valid after 2 cycles");
        check(dig_out == (le ? charac(int'(xq)) : xq), $sformatf("x=%0d q=%0d lut=%0d dig=%0d", xe, qe, le, dig_out));
        check(dac_data == 16'(int'(xe) + 32768), "offset-binary DAC word");
      end
    end
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
