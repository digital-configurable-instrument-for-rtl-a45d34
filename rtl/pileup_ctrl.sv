// pileup_ctrl: pile-up control and summing of the two pulse generators.
//
// The two event sources run independently, so their pulses overlap whenever
// two events fall close together; adding the two shape outputs reproduces
// the pile-up of a real detector. For testing pile-up rejection the overlap
// can be forbidden: with inhibit_en set, an event that comes less than
// inhibit_win cycles after the last accepted start (of either generator) is
// dropped, and when both generators fire in the same cycle only generator 0
// is kept. Dropped events pulse inhibited_0/1.
//
// Interface: ev_valid/ev_amp from each pulse_source in, start/start_amp to
// each shape_gen out (combinational, same cycle; start_amp is the event's
// amplitude passed along unchanged, so it is plain wiring); y_0/y_1 from the shape
// generators in, their saturated sum out, registered (1 cycle). The summing
// and the option to inhibit close pulses follow the instrument; the rule that
// decides which pulse survives is this design's choice.
module pileup_ctrl
  import emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inhibit_en,
  input  logic [15:0]       inhibit_win,
  input  logic              ev_valid_0,
  input  logic [STAT_W-1:0] ev_amp_0,
  input  logic              ev_valid_1,
  input  logic [STAT_W-1:0] ev_amp_1,
  output logic              start_0,
  output logic              start_1,
  output logic [STAT_W-1:0] start_amp_0,
  output logic [STAT_W-1:0] start_amp_1,
  output logic              inhibited_0,
  output logic              inhibited_1,
  input  sample_t           y_0,
  input  sample_t           y_1,
  output sample_t           y
);
  logic [15:0] since;      // cycles since the last accepted start, saturating
  logic        blocked;

  assign blocked     = inhibit_en && (since < inhibit_win);
  assign start_0     = ev_valid_0 && !blocked;
  assign start_1     = ev_valid_1 && !blocked && !(inhibit_en && start_0);
  assign start_amp_0 = ev_amp_0;
  assign start_amp_1 = ev_amp_1;
  assign inhibited_0 = ev_valid_0 && !start_0;
  assign inhibited_1 = ev_valid_1 && !start_1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      since <= 16'hffff;
      y     <= '0;
    end else begin
      if (start_0 || start_1)  since <= 16'd1;
      else if (since != 16'hffff) since <= since + 1'b1;
      y <= sat_sample(64'(y_0) + 64'(y_1));
    end
  end

  a_one_start_when_inhibiting: assert property (@(posedge clk) disable iff (!rst_n)
    inhibit_en |-> !(start_0 && start_1));
endmodule
