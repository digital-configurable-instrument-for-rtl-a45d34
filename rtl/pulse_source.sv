// pulse_source: event source of one pulse generator.
//
// Combines an occurrence-time generator (event_timer) with an amplitude
// generator (stat_gen loaded with the energy spectrum). At each trigger it
// emits one event carrying the amplitude drawn for it. The amplitude of the
// next event is drawn in advance, right after the previous one was used. If
// the threshold check is on, an event whose amplitude is below thr is not
// emitted and `suppressed` pulses instead.
//
// Interface: ev_valid/ev_amp is a one-cycle event; ev_amp is an unsigned
// fraction of full scale (STAT_W bits, 1.0 = 2^STAT_W). Two table write
// ports load the time and amplitude histograms. Timing: the event follows
// its trigger by one cycle; if no amplitude is ready yet (intervals shorter
// than a draw) the trigger is held until it is. Pairing an occurrence time
// with an amplitude and the threshold check follow the instrument's pulse
// generator; the look-ahead draw is this design's choice.
module pulse_source
  import emu_pkg::*;
#(
  parameter int unsigned BINS      = HIST_BINS,
  parameter logic [31:0] TIME_SEED = 32'h2545_f491,
  parameter logic [31:0] AMP_SEED  = 32'h9e37_79b9
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [4:0]                   time_shift,
  input  logic                         thr_en,
  input  logic [$clog2(BINS)+HIST_FRAC-1:0] thr,
  input  logic                         t_wr_en,
  input  logic [$clog2(BINS)-1:0]      t_wr_addr,
  input  logic [31:0]                  t_wr_count,
  input  logic                         a_wr_en,
  input  logic [$clog2(BINS)-1:0]      a_wr_addr,
  input  logic [31:0]                  a_wr_count,
  output logic                         ev_valid,
  output logic [$clog2(BINS)+HIST_FRAC-1:0] ev_amp,
  output logic                         suppressed,
  output logic                         late
);
  localparam int unsigned VW = $clog2(BINS) + HIST_FRAC;

  logic          trig, t_late;
  logic          a_req, a_ready, a_valid;
  logic [VW-1:0] a_val, amp_next;
  logic          amp_ok, a_pend, trig_pend;

  event_timer #(.BINS(BINS), .SEED(TIME_SEED)) u_time (
    .clk(clk), .rst_n(rst_n), .en(en), .shift(time_shift),
    .wr_en(t_wr_en), .wr_addr(t_wr_addr), .wr_count(t_wr_count),
    .trig(trig), .late(t_late)
  );

  stat_gen #(.BINS(BINS), .FRAC(HIST_FRAC), .SEED(AMP_SEED)) u_amp (
    .clk(clk), .rst_n(rst_n),
    .wr_en(a_wr_en), .wr_addr(a_wr_addr), .wr_count(a_wr_count),
    .req(a_req), .ready(a_ready), .val_valid(a_valid), .val(a_val)
  );

  assign a_req = en && a_ready && !amp_ok && !a_pend;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      amp_ok     <= 1'b0;
      a_pend     <= 1'b0;
      amp_next   <= '0;
      trig_pend  <= 1'b0;
      ev_valid   <= 1'b0;
      ev_amp     <= '0;
      suppressed <= 1'b0;
      late       <= 1'b0;
    end else begin
      ev_valid   <= 1'b0;
      suppressed <= 1'b0;
      late       <= t_late;
      if (a_req) a_pend <= 1'b1;
      if (a_valid) begin
        a_pend   <= 1'b0;
        amp_next <= a_val;
        amp_ok   <= 1'b1;
      end
      if ((trig || trig_pend) && amp_ok) begin
        trig_pend <= 1'b0;
        amp_ok    <= 1'b0;
        if (thr_en && amp_next < thr) begin
          suppressed <= 1'b1;
        end else begin
          ev_valid <= 1'b1;
          ev_amp   <= amp_next;
        end
      end else if (trig) begin
        trig_pend <= 1'b1;
        late      <= 1'b1;
      end
    end
  end
endmodule
