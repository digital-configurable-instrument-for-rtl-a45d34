// emu_pkg: types and constants shared by the detector-signal emulator.
//
// All signal samples are signed two's-complement words of SAMPLE_W bits
// (full scale +/-32767). Filter coefficients are signed fixed-point words; the
// number of fraction bits of each format is given by the *_FRAC constants
// below. The configuration of the whole instrument is one packed struct,
// emu_cfg_t, which the host holds static while the emulator runs; the
// on-chip tables are filled through a separate write port addressed by
// mem_sel_e. Sample width and coefficient formats are this design's choice;
// the 24-bit FIR and 48-bit IIR coefficient widths of the shaper follow the
// instrument description.
package emu_pkg;

  localparam int SAMPLE_W   = 16;  // sample word (16-bit DAC)

  // First-order Direct Form II cell (iir1)
  localparam int C1_W       = 48;  // coefficient width
  localparam int C1_FRAC    = 40;  // coefficient fraction bits
  localparam int S1_W       = 48;  // state width
  localparam int S1_FRAC    = 8;   // state fraction bits

  // Scattered look-ahead second-order cell (sla_iir2)
  localparam int FIR_CW     = 24;  // FIR (numerator) coefficient width
  localparam int FIR_FRAC   = 20;  // FIR coefficient fraction bits
  localparam int FIR_ACC_W  = 32;  // FIR adder width
  localparam int IIR_W      = 48;  // recursive multiplier/adder width
  localparam int IIR_FRAC   = 42;  // recursive coefficient fraction bits
  localparam int SLA_SFRAC  = 12;  // fraction bits of the intermediate signal
  localparam int SLA_YFRAC  = 24;  // fraction bits of the recursive state

  // Pulse section
  localparam int SHAPE_DEPTH = 16384;          // words per reference shape
  localparam int SHAPE_AW    = $clog2(SHAPE_DEPTH);
  localparam int PH_FRAC     = 24;             // fraction bits of the shape read phase
  localparam int HIST_BINS   = 1024;           // bins of a statistic table
  localparam int HIST_FRAC   = 6;              // random dither bits below a bin
  localparam int STAT_W      = $clog2(HIST_BINS) + HIST_FRAC;

  // Baseline
  localparam int KEYPOINTS   = 4096;
  localparam int MAX_LOG2_FACTOR = 19;

  // Noise
  localparam int N_POLES     = 10;   // low-pass cells of the 1/f path

  // Nonlinearity table
  localparam int LUT_AW      = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Coefficients of one first-order cell: w[n] = x[n] - a1*w[n-1],
  // y[n] = b0*w[n] + b1*w[n-1] (a0 normalised to 1, gain H0 folded into b).
  typedef struct packed {
    logic signed [C1_W-1:0] b0;
    logic signed [C1_W-1:0] b1;
    logic signed [C1_W-1:0] a1;
  } iir1_coef_t;

  // Coefficients of one look-ahead second-order cell, Eq. (16):
  // y[n] = sum_i B_i x[n-i] + A0 y[n-3] + A1' y[n-6]
  typedef struct packed {
    logic signed [5:0][FIR_CW-1:0] b;  // B0..B5
    logic signed [IIR_W-1:0]       a0; // A0 = a1^3 + 3 a1 a2
    logic signed [IIR_W-1:0]       a1; // coefficient of y[n-6] (= a2^3)
  } sla2_coef_t;

  // Targets of the table-loading port.
  typedef enum logic [3:0] {
    MEM_SHAPE0 = 4'd0,  // reference shape, generator 0
    MEM_SHAPE1 = 4'd1,  // reference shape, generator 1
    MEM_AMP0   = 4'd2,  // amplitude histogram, generator 0
    MEM_AMP1   = 4'd3,  // amplitude histogram, generator 1
    MEM_TIME0  = 4'd4,  // inter-arrival histogram, generator 0
    MEM_TIME1  = 4'd5,  // inter-arrival histogram, generator 1
    MEM_KEYPT  = 4'd6,  // baseline key points
    MEM_NLLUT  = 4'd7   // nonlinearity table
  } mem_sel_e;

  typedef struct packed {
    // pulse generators
    logic [1:0]                     gen_en;      // run generator g
    logic [1:0][4:0]                time_shift;  // interval = stat value << shift >> HIST_FRAC
    logic [1:0]                     thr_en;      // amplitude threshold check on
    logic [1:0][STAT_W-1:0]         thr;         // minimum amplitude
    logic [1:0][SHAPE_AW+PH_FRAC-1:0] shape_step; // read-phase increment (1.0 = 2^PH_FRAC)
    logic [1:0][SHAPE_AW-1:0]       shape_last;  // index of the last stored shape sample
    logic                           inhibit_en;  // pile-up inhibition on
    logic [15:0]                    inhibit_win; // minimum start-to-start distance, cycles
    logic                           pulse_lpf_en;
    iir1_coef_t                     pulse_lpf;
    // noise
    logic [3:0]                     noise_en;    // {1/f, HP, BP, LP}
    iir1_coef_t                     noise_lp;
    iir1_coef_t                     noise_bp_lp;
    iir1_coef_t                     noise_bp_hp;
    iir1_coef_t                     noise_hp;
    iir1_coef_t [N_POLES-1:0]       flicker;
    // baseline
    logic                           base_en;
    logic                           base_loop;
    logic                           base_interp; // run the spline inverse step
    logic [4:0]                     base_log2;   // interpolation factor 2^base_log2
    logic [$clog2(KEYPOINTS)-1:0]   base_last;   // index of the last key point
    // shaper
    logic [2:0]                     shaper_en;   // {first-order, 2nd cell, 1st cell}
    sla2_coef_t [1:0]               sla;
    iir1_coef_t                     shaper_iir1;
    // output
    logic [3:0]                     quant_bits;  // LSBs cleared by the quantizer
    logic                           lut_en;      // nonlinearity table on
  } emu_cfg_t;

  function automatic sample_t sat_sample(input logic signed [63:0] v);
    if (v > 64'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -64'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[SAMPLE_W-1:0]);
  endfunction

endpackage
