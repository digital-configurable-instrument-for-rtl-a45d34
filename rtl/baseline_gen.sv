// baseline_gen: deterministic baseline-drift emulator.
//
// The drift profile is stored as up to KEYS key points; an address generator
// scans them and a cubic B-spline interpolator up-samples them by L = 2^S,
// S = 1..MAX_S (factors 2 to 2^19). Spline interpolation has two steps.
//
// Inverse step (interp = 1). The B-spline curve takes the value
// (c[i-1] + 4 c[i] + c[i+1]) / 6 at knot i, so to pass through the key points
// k[i] the coefficients must solve that tridiagonal system. Its inverse
// 6 / (z + 4 + z^-1) factors into a causal and an anti-causal first-order
// recursion with the pole z1 = sqrt(3) - 2:
//     c+[i] = k[i] + z1 c+[i-1]                  (forward pass, i = 0..last)
//     c[i]  = z1 (c[i+1] - 6 c+[i])              (backward pass, i = last..0)
// started with c+[0] = k[0] / (1 - z1) and c[last] = (1 - z1) c+[last], the
// values for a profile that stays constant beyond its ends. At every inner
// knot (1..last-1) the result interpolates exactly whatever the start values;
// they only shape the curve near the ends. The two passes run over the key
// memory into a coefficient memory (CW bits, CF fraction bits) in about
// 2 (last + 1) cycles when en rises; constant multiplications by z1 and
// (1 - z1) have 20 fraction bits. With interp = 0 the key points are used as
// the coefficients directly (smoothing, the curve passes near them).
//
// Forward step. Four consecutive coefficients c0..c3 define one spline
// segment of L output samples,
//     p(t) = [(1-t)^3 c0 + (3t^3-6t^2+4) c1 + (-3t^3+3t^2+3t+1) c2 + t^3 c3] / 6,
// t = j/L, which is C2-continuous across segments. Written for integer j and
// scaled by 6 L^3 the segment is the integer cubic
//     P(j) = A j^3 + B L j^2 + C L^2 j + D L^3,
//     A = -c0+3c1-3c2+c3,  B = 3c0-6c1+3c2,  C = 3(c2-c0),  D = c0+4c1+c2,
// and it is produced by third-order forward differences: P += d1, d1 += d2,
// d2 += d3 each cycle. The start values P(0) = D L^3, d1 = A + B L + C L^2,
// d2 = 6A + 2 B L and d3 = 6A need only shifts and additions, and the
// accumulators are wide enough (ACC_W) for the recursion to be exact, so no
// error builds up along a segment. The output is P(j) / (6 L^3): a shift by
// 3S + CF and a multiplication by the constant 2^20/6. Segment m starts at
// knot m + 1, so with interp = 1 the output passes through k[1..last-1].
//
// Interface: en starts the scan from key point 0 (and clears it when low);
// keys 0..last are used (last >= 3), giving (last-2) segments; interp, loop,
// log2_factor and last are static while en is high. prep is high while the
// inverse step runs. At the end the scan restarts from key point 0 (loop,
// after a 7-cycle refill during which the output holds; the inverse step is
// not repeated) or the output holds. Timing: after en rises (and after the
// inverse step, if on), the first four coefficients are fetched and the first
// sample appears 7 cycles later; then one sample per cycle with out_valid,
// without gaps between segments (the next coefficient is read during the
// current segment). The key-point memory, address generator, inverse and
// forward spline steps and power-of-two factors up to 2^19 follow the
// instrument; the recursive-filter form of the inverse, the forward-difference
// evaluator and the accumulator widths are this design's choice.
module baseline_gen
  import emu_pkg::*;
#(
  parameter int unsigned KEYS  = KEYPOINTS,
  parameter int unsigned MAX_S = MAX_LOG2_FACTOR,
  parameter int unsigned KAW   = $clog2(KEYS),
  parameter int unsigned CF    = 8,                       // coefficient fraction bits
  parameter int unsigned CW    = SAMPLE_W + 3 + CF,       // coefficient width
  parameter int unsigned ACC_W = CW + 3*MAX_S + 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           interp,
  input  logic           loop,
  input  logic [4:0]     log2_factor,
  input  logic [KAW-1:0] last,
  input  logic           wr_en,
  input  logic [KAW-1:0] wr_addr,
  input  sample_t        wr_data,
  output logic           prep,
  output logic           out_valid,
  output sample_t        y
);
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [CW-1:0]    coef_t;
  typedef enum logic [2:0] {S_IDLE, S_PF, S_PB, S_FETCH, S_RUN, S_HOLD} state_e;

  localparam logic signed [21:0] INV6   = 22'sd174763;   // round(2^20 / 6)
  localparam logic signed [21:0] Z1     = -22'sd280965;  // round(2^20 (sqrt(3) - 2))
  localparam logic signed [21:0] ONEMZ1 = 22'sd1329541;  // round(2^20 (1 - z1))
  localparam logic signed [21:0] INVMZ1 = 22'sd826986;   // round(2^20 / (1 - z1))

  sample_t          kmem [KEYS];    // key points, written by the host
  coef_t            cmem [KEYS];    // spline coefficients, from the inverse step
  state_e           st;
  logic [4:0]       s;
  logic [KAW:0]     raddr;          // coefficient being read for the scan
  logic             rvld;
  sample_t          kdat;           // kmem read, one cycle after the address
  coef_t            cdat;           // cmem read, one cycle after the address
  coef_t            rdat;           // coefficient raddr of the previous cycle
  coef_t            c1, c2, c3;     // last three coefficients of the window
  logic             coef_ok;        // inverse step done since en rose
  logic [KAW-1:0]   pre_i, pre_wa;  // inverse step: read / write index
  logic             pre_go, pre_v;
  coef_t            pre_prev;       // c+[i-1] (forward) or c[i+1] (backward)
  coef_t            pre_wd;         // coefficient written at pre_wa
  logic             cm_we;
  logic [2:0]       nfill;
  logic [MAX_S-1:0] j, jlast;
  acc_t             p, d1, d2, d3;
  acc_t             np, nd1, nd2, nd3;
  acc_t             pq;
  logic signed [ACC_W+22:0] prod;

  always_ff @(posedge clk) begin
    if (wr_en) kmem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (cm_we) cmem[pre_wa] <= pre_wd;
  end

  always_comb begin
    s = log2_factor;
    if (s < 5'd1) s = 5'd1;
    if (32'(s) > MAX_S) s = 5'(MAX_S);
  end
  assign jlast = MAX_S'((64'd1 << s) - 1);

  // synchronous reads; the inverse step owns the addresses while it runs
  always_ff @(posedge clk) begin
    kdat <= kmem[(st == S_PF) ? pre_i : raddr[KAW-1:0]];
    cdat <= cmem[(st == S_PB) ? pre_i : raddr[KAW-1:0]];
  end
  assign rdat = interp ? cdat : (coef_t'(kdat) <<< CF);

  // one step of the inverse recursions, constants with 20 fraction bits
  function automatic coef_t cmul(input logic signed [CW+3:0] a, input logic signed [21:0] k);
    logic signed [CW+25:0] m;
    m = (CW+26)'(a) * (CW+26)'(k) + (CW+26)'(1 << 19);
    return coef_t'(m >>> 20);
  endfunction

  always_comb begin
    if (st == S_PF)
      pre_wd = (pre_wa == '0) ? cmul((CW+4)'(coef_t'(kdat) <<< CF), INVMZ1)
                              : (coef_t'(kdat) <<< CF) + cmul((CW+4)'(pre_prev), Z1);
    else
      pre_wd = (pre_wa == last) ? cmul((CW+4)'(cdat), ONEMZ1)
                                : cmul((CW+4)'(pre_prev) - 6 * (CW+4)'(cdat), Z1);
    cm_we = pre_v && (st == S_PF || st == S_PB);
  end
  assign prep = (st == S_PF) || (st == S_PB);

  // Start values of the segment whose window is {c1, c2, c3, rdat}.
  always_comb begin
    acc_t a, b, c, d;
    a   = -acc_t'(c1) + 3*acc_t'(c2) - 3*acc_t'(c3) + acc_t'(rdat);
    b   = 3*acc_t'(c1) - 6*acc_t'(c2) + 3*acc_t'(c3);
    c   = 3*(acc_t'(c3) - acc_t'(c1));
    d   = acc_t'(c1) + 4*acc_t'(c2) + acc_t'(c3);
    np  = d <<< (3*s);
    nd1 = a + (b <<< s) + (c <<< (2*s));
    nd2 = 6*a + (b <<< (s + 1));
    nd3 = 6*a;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      st    <= S_IDLE;
      raddr <= '0;
      rvld  <= 1'b0;
      nfill <= '0;
      j     <= '0;
      p     <= '0;
      d1    <= '0;
      d2    <= '0;
      d3    <= '0;
      c1    <= '0;
      c2    <= '0;
      c3    <= '0;
      coef_ok  <= 1'b0;
      pre_i    <= '0;
      pre_wa   <= '0;
      pre_go   <= 1'b0;
      pre_v    <= 1'b0;
      pre_prev <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          raddr <= '0;
          nfill <= '0;
          rvld  <= 1'b0;
          pre_i <= '0;
          pre_go <= 1'b1;
          pre_v <= 1'b0;
          st    <= (interp && !coef_ok) ? S_PF : S_FETCH;
        end
        S_PF, S_PB: begin
          // read one word per cycle, write its result one cycle later
          pre_v  <= pre_go;
          pre_wa <= pre_i;
          if (pre_go) begin
            if (st == S_PF ? (pre_i == last) : (pre_i == '0)) pre_go <= 1'b0;
            else pre_i <= (st == S_PF) ? pre_i + 1'b1 : pre_i - 1'b1;
          end
          if (pre_v) begin
            pre_prev <= pre_wd;
            if (st == S_PF && pre_wa == last) begin
              st     <= S_PB;
              pre_i  <= last;
              pre_go <= 1'b1;
              pre_v  <= 1'b0;
            end else if (st == S_PB && pre_wa == '0) begin
              st      <= S_IDLE;
              coef_ok <= 1'b1;
            end
          end
        end
        S_FETCH: begin
          // read key points 0..3 on consecutive cycles
          rvld <= (raddr < 4);
          if (raddr < 4) raddr <= raddr + 1'b1;
          if (rvld) begin
            nfill <= nfill + 1'b1;
            if (nfill == 3'd3) begin      // fourth key point on rdat
              p  <= np;
              d1 <= nd1;
              d2 <= nd2;
              d3 <= nd3;
              j  <= '0;
              st <= S_RUN;
            end
            c1 <= c2;
            c2 <= c3;
            c3 <= rdat;
          end
        end
        S_RUN: begin
          if (j == jlast) begin
            j <= '0;
            if (raddr <= (KAW+1)'(last)) begin   // next key point is on rdat
              c1    <= c2;
              c2    <= c3;
              c3    <= rdat;
              p     <= np;
              d1    <= nd1;
              d2    <= nd2;
              d3    <= nd3;
              raddr <= raddr + 1'b1;
            end else if (loop) begin
              st <= S_IDLE;
            end else begin
              st <= S_HOLD;
            end
          end else begin
            j  <= j + 1'b1;
            p  <= p + d1;
            d1 <= d1 + d2;
            d2 <= d2 + d3;
          end
        end
        S_HOLD: ;
        default: st <= S_IDLE;
      endcase
    end
  end

  // output: P(j) / (6 L^3)
  always_comb begin
    pq   = p >>> (3*s + CF);
    prod = (ACC_W+23)'(pq) * (ACC_W+23)'(INV6);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= (st == S_RUN);
      if (st == S_RUN) y <= sat_sample(64'(prod >>> 20));
    end
  end
endmodule
