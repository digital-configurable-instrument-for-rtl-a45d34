// lfsr: pseudorandom word source for the noise and statistic generators.
//
// A W-bit Galois linear-feedback shift register with the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1 (W = 32, right-shifting Galois form,
// tap mask POLY). It is advanced STEPS bit
// positions per enabled clock so that consecutive output words do not share
// shifted bits. The register is loaded with SEED at reset (a zero seed is
// replaced by 1). Output: the state after the update, registered; a new word
// every cycle in which en is high. The instrument names LFSRs as its random
// sources; polynomial, width and stepping are this design's choice.
module lfsr #(
  parameter int unsigned        W     = 32,
  parameter int unsigned        STEPS = 16,
  parameter logic [W-1:0]       POLY  = 32'h8020_0003,
  parameter logic [W-1:0]       SEED  = 32'h1234_5678
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] q
);
  logic [W-1:0] nxt;

  always_comb begin
    nxt = q;
    for (int unsigned i = 0; i < STEPS; i++)
      nxt = nxt[0] ? ((nxt >> 1) ^ POLY) : (nxt >> 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= (SEED == '0) ? W'(1) : SEED;
    else if (en) q <= nxt;
  end
endmodule
