// event_timer: generator of pulse occurrence times.
//
// Inter-arrival intervals are drawn from a stat_gen whose table holds the
// histogram of the time between events. A drawn value v (bin index with
// HIST_FRAC dither bits) becomes an interval of max(1, (v << shift) >>
// HIST_FRAC) clock cycles, so the time unit of a bin is 2^shift cycles. A
// down-counter runs the current interval; when it expires, trig pulses for
// one cycle and the next interval, already drawn while the counter ran, is
// loaded. Drawing ahead keeps the intervals exact as long as they are longer
// than a draw (about 14 cycles); if the next value is not ready the trigger
// waits for it and `late` pulses.
//
// Interface: en starts and holds the generator; the table is loaded through
// wr_*. Timing: the first trigger comes one interval after the first draw
// completes. The instrument specifies a programmable occurrence-time
// statistic acting as the trigger; the counter scheme is this design's choice.
module event_timer
  import emu_pkg::*;
#(
  parameter int unsigned BINS = HIST_BINS,
  parameter logic [31:0] SEED = 32'h2545_f491
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [4:0]                   shift,
  input  logic                         wr_en,
  input  logic [$clog2(BINS)-1:0]      wr_addr,
  input  logic [31:0]                  wr_count,
  output logic                         trig,
  output logic                         late
);
  localparam int unsigned VW = $clog2(BINS) + HIST_FRAC;

  logic          s_req, s_ready, s_valid;
  logic [VW-1:0] s_val;
  logic [31:0]   next_iv, cnt;
  logic          next_ok, running, pending;
  logic [31:0]   iv;

  stat_gen #(.BINS(BINS), .FRAC(HIST_FRAC), .SEED(SEED)) u_stat (
    .clk(clk), .rst_n(rst_n),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_count(wr_count),
    .req(s_req), .ready(s_ready), .val_valid(s_valid), .val(s_val)
  );

  always_comb begin
    iv = 32'((64'(s_val) << shift) >> HIST_FRAC);
    if (iv == 0) iv = 32'd1;
  end

  // one draw in flight at most, issued whenever the look-ahead slot is empty
  assign s_req = en && s_ready && !next_ok && !pending;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      next_iv <= '0;
      next_ok <= 1'b0;
      pending <= 1'b0;
      running <= 1'b0;
      cnt     <= '0;
      trig    <= 1'b0;
      late    <= 1'b0;
    end else begin
      trig <= 1'b0;
      late <= 1'b0;
      if (s_req) pending <= 1'b1;
      if (s_valid) begin
        pending <= 1'b0;
        next_iv <= iv;
        next_ok <= 1'b1;
      end
      if (!running) begin
        if (next_ok) begin          // start of the first interval
          cnt     <= next_iv;
          next_ok <= 1'b0;
          running <= 1'b1;
        end
      end else if (cnt > 32'd1) begin
        cnt <= cnt - 1'b1;
      end else if (next_ok) begin   // interval expired, next one ready
        trig    <= 1'b1;
        cnt     <= next_iv;
        next_ok <= 1'b0;
      end else begin                // interval expired, next draw not back yet
        late    <= 1'b1;
      end
    end
  end
endmodule
