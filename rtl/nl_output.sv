// nl_output: output stage with quantization and nonlinearity emulation.
//
// The ideal code produced by the emulator leaves the instrument in one of two
// forms. For the analog output, dac_data is the ideal code in offset binary,
// the usual input format of a 16-bit current-output DAC. For the digital
// output, the code first goes through a quantizer that clears the
// quant_bits least significant bits (emulating a converter with fewer bits),
// and then addresses a 2^LUT_AW-word look-up table that holds the DC transfer
// characteristic of an ADC and its front end; the table word is the output
// (lut_en = 0 bypasses the table). The host loads the table through wr_*,
// the word for input code v at address v + 2^(LUT_AW-1).
//
// Timing: one sample per cycle, latency 2 (table read, output register) for
// both outputs. The 2^16-word table addressed by the ideal code follows the
// instrument; the truncating quantizer and offset-binary DAC word are this
// design's choice.
module nl_output
  import emu_pkg::*;
#(
  parameter int unsigned AW = LUT_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3:0]    quant_bits,
  input  logic          lut_en,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  sample_t       wr_data,
  input  logic          in_valid,
  input  sample_t       x,
  output logic          out_valid,
  output sample_t       dig_out,
  output logic [SAMPLE_W-1:0] dac_data
);
  sample_t             lut [2**AW];
  sample_t             xq, xq_r, lut_r;
  logic [SAMPLE_W-1:0] mask;
  logic [AW-1:0]       addr;
  logic                v_r, en_r;
  logic [SAMPLE_W-1:0] dac_r;

  always_ff @(posedge clk) begin
    if (wr_en) lut[wr_addr] <= wr_data;
  end

  assign mask = {SAMPLE_W{1'b1}} << quant_bits;
  assign xq   = x & mask;
  assign addr = AW'({~xq[SAMPLE_W-1], xq[SAMPLE_W-2:0]} >> (SAMPLE_W - AW));

  always_ff @(posedge clk) begin
    lut_r <= lut[addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_r       <= 1'b0;
      en_r      <= 1'b0;
      xq_r      <= '0;
      dac_r     <= 16'h8000;
      out_valid <= 1'b0;
      dig_out   <= '0;
      dac_data  <= 16'h8000;
    end else begin
      v_r       <= in_valid;
      out_valid <= v_r;
      if (in_valid) begin
        xq_r  <= xq;
        en_r  <= lut_en;
        dac_r <= {~x[SAMPLE_W-1], x[SAMPLE_W-2:0]};
      end
      if (v_r) begin
        dig_out  <= en_r ? lut_r : xq_r;
        dac_data <= dac_r;
      end
    end
  end
endmodule
