// tb_wd_thr_estimator: self-checking test of the noise threshold estimator.
//
// Feeds windows of pseudo-Gaussian detail samples (sum of uniforms) of known
// spread to each level, closes the window and compares the new threshold with
// th = floor(sqrt(floor(E4 / (4*(b_len-1))))) scaled by 998/256 and rounded,
// E4 being the energy of the last four windows of that level, all computed
// here. Also checks that the result is within 0.5% plus 5 LSB of 3.9*sqrt(E4/(4(b_len-1)))
// in real arithmetic, that other levels keep their thresholds, and that the
// update completes in the expected number of cycles.
module tb_wd_thr_estimator;
  import wd_pkg::*;

  localparam int unsigned LW = $clog2(MAX_LEVELS);
  localparam int unsigned SUM_W = 2 * WORD_W + $clog2(MAX_BLEN) + 2;
  localparam int unsigned LAT = 1 + SUM_W + (SUM_W + 1) / 2 + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  blen_t blen;
  logic in_valid, start, busy, done;
  word_t in_sample;
  logic [LW-1:0] level;
  thr_t th [MAX_LEVELS];

  int checks = 0, failures = 0;
  longint hist [MAX_LEVELS][4];
  longint exp_th [MAX_LEVELS];

  wd_thr_estimator dut (.*);

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint isqrt(longint v);
    longint r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic word_t noise(int unsigned spread);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom % (2 * spread + 1)) - int'(spread);
    return word_t'(s);
  endfunction

  task automatic window(int lv, int n, int unsigned spread, bit big);
    longint e = 0, sum, q, r, t, mx;
    int cyc;
    real ideal;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_sample = big ? word_t'(($urandom % 2) ? (1 << 19) - 1 : -(1 << 19)) : noise(spread);
      e += longint'(in_sample) * longint'(in_sample);
    end
    @(negedge clk);
    in_valid = 1'b0; start = 1'b1; level = LW'(lv);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int i = 3; i > 0; i--) hist[lv][i] = hist[lv][i-1];
    hist[lv][0] = e;
    sum = hist[lv][0] + hist[lv][1] + hist[lv][2] + hist[lv][3];
    q = sum / (4 * (longint'(blen) - 1));
    r = isqrt(q);
    t = (r * SC_Q + (1 << (SC_FRAC - 1))) >>> SC_FRAC;
    mx = (64'sd1 <<< WORD_W) - 1;
    if (t > mx) t = mx;
    exp_th[lv] = t;
    check("latency", cyc, LAT);
    for (int j = 0; j < MAX_LEVELS; j++) check("threshold", longint'(th[j]), exp_th[j]);
    ideal = 3.9 * $sqrt(real'(sum) / (4.0 * (real'(blen) - 1.0)));
    checks++;
    if (!big && ideal > 50.0 && (real'(th[lv]) < 0.995 * ideal - 5.0 || real'(th[lv]) > 1.005 * ideal + 5.0)) begin
      failures++;
      $display("FAIL accuracy: th %0d ideal %f", th[lv], ideal);
    end
  endtask

  initial begin
    blen = blen_t'(500); in_valid = 0; start = 0; level = '0; in_sample = '0;
    for (int j = 0; j < MAX_LEVELS; j++) begin
      exp_th[j] = 0;
      for (int i = 0; i < 4; i++) hist[j][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // six frames of a four-level decomposition, noise growing with level
    for (int f = 0; f < 6; f++)
      for (int lv = 0; lv < MAX_LEVELS; lv++) window(lv, 500, 100 << lv, 1'b0);
    // shorter frames
    blen = blen_t'(64);
    for (int f = 0; f < 3; f++) window(f % MAX_LEVELS, 64, 2000, 1'b0);
    // full-scale samples exercise the widest sums and the saturation
    blen = blen_t'(MAX_BLEN);
    for (int f = 0; f < 4; f++) window(3, MAX_BLEN, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
