// sync_fifo: single-clock first-in first-out buffer.
//
// Sits between each random-number generator and its filter in the noise
// generator, decoupling the rate at which words are produced from the rate at
// which the filter consumes them. DEPTH words of W bits held in an array;
// write when wr_en and not full, read when rd_en and not empty. rd_data shows
// the oldest word (first-word fall-through), so a read takes effect in the
// cycle it is requested. The buffer's presence follows the noise generator's
// structure; its depth and read style are this design's choice.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         do_wr, do_rd;

  assign full    = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign empty   = (wptr == rptr);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // The producer and consumer must respect the flags.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) full  |-> !do_wr);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) empty |-> !do_rd);
endmodule
