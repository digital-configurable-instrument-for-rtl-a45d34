// stat_gen: random-value generator that follows a user-loaded histogram.
//
// The host writes the histogram counts of a statistic variable (an energy
// spectrum for amplitudes, an interval distribution for occurrence times),
// bin 0 first and in increasing bin order. While they are written the block
// accumulates them and stores the running sum, so the table holds the
// cumulative distribution cdf[i] = count[0] + ... + count[i].
//
// A draw (req) takes a 32-bit uniform word r from an internal LFSR, scales it
// to u = (r * total) >> 32 with total = cdf[BINS-1], and finds the first bin i
// with cdf[i] > u by a bit-serial binary search, one bit per cycle. Bin i is
// therefore returned with probability count[i] / total. The value returned is
// {i, f}: the bin index with HIST_FRAC random bits below it, so the output
// spreads uniformly across the width of the bin.
//
// Timing: req is taken when ready is high; val_valid pulses
// $clog2(BINS) + 3 cycles later. Table writes must not overlap a draw. The
// instrument states only that the statistic is obtained from a histogram;
// the cumulative-table inverse-CDF method is this design's choice.
module stat_gen
  import emu_pkg::*;
#(
  parameter int unsigned BINS  = HIST_BINS,
  parameter int unsigned FRAC  = HIST_FRAC,
  parameter int unsigned CNT_W = 32,
  parameter logic [31:0] SEED  = 32'h0bad_cafe
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // table loading
  input  logic                          wr_en,
  input  logic [$clog2(BINS)-1:0]       wr_addr,
  input  logic [CNT_W-1:0]              wr_count,
  // draws
  input  logic                          req,
  output logic                          ready,
  output logic                          val_valid,
  output logic [$clog2(BINS)+FRAC-1:0]  val
);
  localparam int unsigned BW = $clog2(BINS);

  typedef enum logic [1:0] {S_IDLE, S_SCALE, S_SEARCH, S_DONE} state_e;

  logic [CNT_W-1:0] cdf [BINS];
  logic [CNT_W-1:0] run_sum;
  logic [31:0]      rnd;
  logic [CNT_W-1:0] u;
  logic [BW-1:0]    idx;
  logic [BW-1:0]    probe;
  logic [$clog2(BW+1)-1:0] bitn;
  state_e           st;

  lfsr #(.W(32), .STEPS(32), .SEED(SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .q(rnd)
  );

  // histogram -> cumulative table
  always_ff @(posedge clk) begin
    if (wr_en) cdf[wr_addr] <= (wr_addr == '0) ? wr_count : run_sum + wr_count;
  end
  always_ff @(posedge clk) begin
    if (!rst_n)     run_sum <= '0;
    else if (wr_en) run_sum <= (wr_addr == '0) ? wr_count : run_sum + wr_count;
  end

  assign ready = (st == S_IDLE);
  assign probe = idx | (BW'(1) << bitn);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      u         <= '0;
      idx       <= '0;
      bitn      <= '0;
      val       <= '0;
      val_valid <= 1'b0;
    end else begin
      val_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (req) st <= S_SCALE;
        S_SCALE: begin
          u    <= CNT_W'((64'(rnd) * 64'(cdf[BINS-1])) >> 32);
          idx  <= '0;
          bitn <= ($clog2(BW+1))'(BW - 1);
          st   <= S_SEARCH;
        end
        S_SEARCH: begin
          // probe is at least 1; cdf[probe-1] <= u means bin probe-1 lies below u
          if (cdf[probe - 1'b1] <= u) idx <= probe;
          if (bitn == '0) st <= S_DONE;
          else            bitn <= bitn - 1'b1;
        end
        S_DONE: begin
          val       <= {idx, rnd[FRAC-1:0]};
          val_valid <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
