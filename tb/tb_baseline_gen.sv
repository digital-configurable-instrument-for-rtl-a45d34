// tb_baseline_gen: loads random key points and checks the interpolated
// profile against a direct evaluation of the uniform cubic B-spline
// polynomial of each segment (computed in 128-bit integers, then mapped to
// the output by the same shift and constant-1/6 scaling). Runs factor 2^2
// over all segments with looping, factor 2^10 with hold at the end, and the
// first and last samples of a 2^19 segment. Checks that samples come every
// cycle without gaps between segments, the start latency, the sample count
// per segment, the loop restart and the hold. With the inverse step on, the
// coefficients are recomputed here in floating point from the two recursions
// and the whole curve is compared within 1.5 LSB; the sample at the start of
// each segment must also hit its key point (within 1 LSB), and the inverse
// step must take 2 (last + 2) cycles and not be repeated at a loop restart.
// The last run interpolates through all 4096 key points at factor 2.
module tb_baseline_gen;
  import emu_pkg::*;
  localparam int KAW = 12;
  logic clk = 0, rst_n = 0, en = 0, loop = 0, wr_en = 0, out_valid, interp = 0, prep;
  logic [4:0] log2_factor = 0;
  logic [KAW-1:0] last = 0, wr_addr = 0;
  sample_t wr_data = 0, y;
  sample_t key [KEYPOINTS];
  real     cr [KEYPOINTS];   // coefficients of the interpolating spline
  int checks = 0, failures = 0, loops = 0;

  baseline_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int model(input int seg, input longint j, input int s);
    logic signed [127:0] c0, c1, c2, c3, A, B, C, D, L, P, q;
    c0 = 128'(key[seg]); c1 = 128'(key[seg+1]); c2 = 128'(key[seg+2]); c3 = 128'(key[seg+3]);
    A = -c0 + 3*c1 - 3*c2 + c3;
    B = 3*c0 - 6*c1 + 3*c2;
    C = -3*c0 + 3*c2;
    D = c0 + 4*c1 + c2;
    L = 128'(1) << s;
    P = A*j*j*j + B*L*j*j + C*L*L*j + D*L*L*L;
    q = ((P >>> (3*s)) * 174763) >>> 20;
    return int'(q);
  endfunction

  // inverse step in floating point: c+[i] = k[i] + z1 c+[i-1], then
  // c[i] = z1 (c[i+1] - 6 c+[i]), with the constant-extension start values
  function automatic void prefilter(input int lst);
    real z1, cp [KEYPOINTS];
    z1 = $sqrt(3.0) - 2.0;
    cp[0] = real'(key[0]) / (1.0 - z1);
    for (int i = 1; i <= lst; i++) cp[i] = real'(key[i]) + z1 * cp[i-1];
    cr[lst] = (1.0 - z1) * cp[lst];
    for (int i = lst - 1; i >= 0; i--) cr[i] = z1 * (cr[i+1] - 6.0 * cp[i]);
  endfunction

  function automatic real model_r(input int seg, input longint j, input int s);
    real t;
    t = real'(j) / real'(64'd1 << s);
    return ((1.0-t)**3 * cr[seg] + (3.0*t**3 - 6.0*t**2 + 4.0) * cr[seg+1]
            + (-3.0*t**3 + 3.0*t**2 + 3.0*t + 1.0) * cr[seg+2] + t**3 * cr[seg+3]) / 6.0;
  endfunction

  task automatic run(input int s, input int lst, input bit lp, input longint nsamp, input longint skip_from, input longint skip_to, input bit ip = 0);
    longint n = 0, t = 0, lat = 0, np = 0;
    int seg = 0;
    longint j = 0;
    log2_factor <= 5'(s); last <= KAW'(lst); loop <= lp; interp <= ip;
    if (ip) prefilter(lst);
    en <= 1;
    @(posedge clk); #1;
    while (!out_valid) begin
      if (prep) np++;
      @(posedge clk); #1; lat++;
    end
    check(lat == (ip ? 2*lst + 11 : 6), $sformatf("start latency %0d", lat));
    check(np == (ip ? 2*lst + 4 : 0), $sformatf("inverse step took %0d cycles", np));
    while (n < nsamp) begin
      if (!out_valid) begin
        // only allowed during the refill of a loop restart
        check(lp && seg == 0 && j == 0, "gap only at a loop restart");
      end else begin
        check(!prep, "inverse step not repeated");
        if (ip) begin
          real e;
          e = model_r(seg, j, s);
          check(real'(y) - e <= 1.5 && e - real'(y) <= 1.5,
                $sformatf("interp S=%0d seg %0d j %0d: %0d vs %f", s, seg, j, y, e));
          if (j == 0)
            check(int'(y) - int'(key[seg+1]) <= 1 && int'(key[seg+1]) - int'(y) <= 1,
                  $sformatf("knot %0d: %0d vs key %0d", seg + 1, y, key[seg+1]));
        end else if (n < skip_from || n >= skip_to)
          check(int'(y) == model(seg, j, s), $sformatf("S=%0d seg %0d j %0d: %0d vs %0d", s, seg, j, y, model(seg, j, s)));
        n++;
        j++;
        if (j == (64'd1 << s)) begin
          j = 0; seg++;
          if (seg + 3 > lst) begin
            if (lp) begin seg = 0; loops++; end
            else break;
          end
        end
      end
      @(posedge clk); #1; t++;
    end
    if (!lp) begin
      sample_t hold;
      hold = y;
      repeat (20) @(posedge clk);
      #1;
      check(!out_valid && y == hold, "holds the last sample at the end");
    end
    en <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < KEYPOINTS; i++) begin
      key[i] = sample_t'($urandom_range(0, 40000)) - 16'sd20000;
      wr_en <= 1; wr_addr <= KAW'(i); wr_data <= key[i];
      @(posedge clk);
    end
    wr_en <= 0;
    run(2, 15, 1, 13*4*3, 1 << 40, 1 << 40);           // three passes of 13 segments
    check(loops >= 2, "loop restarts");
    run(10, 9, 0, 7*1024, 1 << 40, 1 << 40);           // 7 segments, then hold
    run(19, 4, 0, 2*524288, 2000, 2*524288 - 2000);    // two long segments, ends checked
    run(4, 15, 1, 13*16*3, 0, 0, 1);                   // interpolating, three passes
    run(6, 11, 0, 9*64, 0, 0, 1);                      // interpolating, hold at the end
    run(1, KEYPOINTS - 1, 0, (KEYPOINTS - 3)*2, 0, 0, 1); // whole key memory
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
