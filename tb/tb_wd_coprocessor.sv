// tb_wd_coprocessor: end-to-end test of the wavelet denoiser at its default
// size (512-sample frame buffers, four levels, four taps).
//
// Synthetic neural recordings are generated here: biphasic spikes of a few
// thousand LSB at random times on top of pseudo-Gaussian background noise.
// Each frame is sent through the input stream, with random input gaps when
// enabled, and collected from the output stream, with random back-pressure
// when enabled. A reference model written here, on plain integer arrays,
// repeats the a-trous decomposition, the noise estimate, the hard threshold
// and the recomposition with the same number formats, and every output
// sample must match it exactly. Frames exercise: Haar and Daubechies-2 filters,
// 4 and 2 levels, 500 and 128 sample frames, removal of the last approximation
// on and off, host and estimated thresholds, and a register write during a
// frame, which must only affect the next frame. With zero thresholds and the
// approximation kept the output must also equal the input to within 4 LSB
// (perfect reconstruction). The estimated thresholds are read back over the
// register bus, and the processing time of each frame is checked against the
// cycle budget of the design and against the 41.7 ms a 500-sample frame lasts
// at 12 kHz with a 50 MHz clock. Each mechanism is counted and must occur.
module tb_wd_coprocessor;
  import wd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              reg_wr_en;
  logic [REG_AW-1:0] reg_wr_addr, reg_rd_addr;
  logic [REG_DW-1:0] reg_wr_data, reg_rd_data;
  logic              in_valid, in_ready, out_valid, out_ready, busy, frame_done;
  logic signed [SAMPLE_W-1:0] in_data, out_data;

  wd_coprocessor dut (.*);

  int checks = 0, failures = 0;
  localparam int unsigned SUM_W = 2 * WORD_W + $clog2(MAX_BLEN) + 2;
  localparam int unsigned EST_LAT = 1 + SUM_W + (SUM_W + 1) / 2 + 2;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ model state
  int     m_levels, m_taps, m_blen;
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  bit     m_remove, m_auto;
  longint m_coef [4][MAX_TAPS];
  longint m_host [MAX_LEVELS];
  longint m_hist [MAX_LEVELS][4];
  longint m_est  [MAX_LEVELS];

  // mechanism counters
  int n_cleared, n_kept, n_remove, n_keep_approx, n_auto, n_host, n_haar, n_db2;
  int n_lvl4, n_lvl2, n_blen_short, n_in_stall, n_out_stall, n_deferred, n_pr;

  function automatic longint sat(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    return (v > mx) ? mx : (v < -mx - 1) ? -mx - 1 : v;
  endfunction

  function automatic longint isqrt(longint v);
    longint r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic model(input longint x [MAX_BLEN], output longint y [MAX_BLEN]);
    longint a [MAX_LEVELS+1][MAX_BLEN];
    longint d [MAX_LEVELS][MAX_BLEN];
    longint s0, s1, e, sum, th, mag, av;
    int L = m_blen;
    for (int n = 0; n < L; n++) a[0][n] = x[n];
    for (int j = 0; j < m_levels; j++) begin
      e = 0;
      for (int n = 0; n < L; n++) begin
        s0 = 0; s1 = 0;
        for (int k = 0; k < m_taps; k++) begin
          s0 += m_coef[F_DEC_LO][k] * a[j][(n + (k << j)) % L];
          s1 += m_coef[F_DEC_HI][k] * a[j][(n + (k << j)) % L];
        end
        a[j+1][n] = sat((s0 + (1 << (COEF_FRAC - 1))) >>> COEF_FRAC, WORD_W);
        d[j][n]   = sat((s1 + (1 << (COEF_FRAC - 1))) >>> COEF_FRAC, WORD_W);
        e += d[j][n] * d[j][n];
      end
      for (int i = 3; i > 0; i--) m_hist[j][i] = m_hist[j][i-1];
      m_hist[j][0] = e;
      sum = m_hist[j][0] + m_hist[j][1] + m_hist[j][2] + m_hist[j][3];
      th = (isqrt(sum / (4 * (L - 1))) * SC_Q + (1 << (SC_FRAC - 1))) >>> SC_FRAC;
      if (th > (64'sd1 <<< WORD_W) - 1) th = (64'sd1 <<< WORD_W) - 1;
      m_est[j] = th;
      th = m_auto ? m_est[j] : m_host[j];
      for (int n = 0; n < L; n++) begin
        mag = (d[j][n] < 0) ? -d[j][n] : d[j][n];
        if (mag > th) n_kept++;
        else begin
          if (d[j][n] != 0) n_cleared++;
          d[j][n] = 0;
        end
      end
    end
    for (int j = m_levels - 1; j >= 0; j--) begin
      for (int n = 0; n < L; n++) begin
        s0 = 0;
        for (int k = 0; k < m_taps; k++) begin
          int i = n - (k << j);
          if (i < 0) i += L;
          av = (m_remove && j == m_levels - 1) ? 0 : a[j+1][i];
          s0 += m_coef[F_REC_LO][k] * av + m_coef[F_REC_HI][k] * d[j][i];
        end
        a[j][n] = sat((s0 + (1 << COEF_FRAC)) >>> (COEF_FRAC + 1), WORD_W);
      end
    end
    for (int n = 0; n < L; n++) y[n] = sat(a[0][n], SAMPLE_W);
  endtask

  // ------------------------------------------------------------ register bus
  task automatic wr(logic [REG_AW-1:0] a, logic [REG_DW-1:0] v);
    @(negedge clk); reg_wr_en = 1'b1; reg_wr_addr = a; reg_wr_data = v;
    @(negedge clk); reg_wr_en = 1'b0;
  endtask

  task automatic set_filters(bit db2);
    longint h [4];
    if (db2) begin
      h = '{7913, 13705, 3672, -2120};
      m_taps = 4;
    end else begin
      h = '{11585, 11585, 0, 0};
      m_taps = 2;
    end
    for (int k = 0; k < MAX_TAPS; k++) begin
      // high pass from low pass by the quadrature mirror rule g[k] = (-1)^k h[T-1-k]
      longint g = (k < m_taps) ? ((k % 2) ? -h[m_taps - 1 - k] : h[m_taps - 1 - k]) : 0;
      m_coef[F_DEC_LO][k] = h[k]; m_coef[F_REC_LO][k] = h[k];
      m_coef[F_DEC_HI][k] = g;    m_coef[F_REC_HI][k] = g;
      for (int f = 0; f < 4; f++) wr(RA_COEF + 8'(8 * f + k), 32'(m_coef[f][k]));
    end
    wr(RA_NTAPS, 32'(m_taps));
  endtask

  task automatic set_ctrl(int levels, bit remove, bit auto_t, int blen);
    m_levels = levels; m_remove = remove; m_auto = auto_t; m_blen = blen;
    wr(RA_CTRL, 32'(levels) | (32'(remove) << 3) | (32'(auto_t) << 4));
    wr(RA_BLEN, 32'(blen));
  endtask

  task automatic set_host_thr(longint base);
    for (int j = 0; j < MAX_LEVELS; j++) begin
      m_host[j] = base * (j + 1);
      wr(RA_THR + 8'(j), 32'(m_host[j]));
    end
  endtask

  // ------------------------------------------------------------ signal source
  function automatic longint noise(int unsigned spread);
    longint s = 0;
    for (int i = 0; i < 4; i++) s += longint'($urandom % (2 * spread + 1)) - longint'(spread);
    return s;
  endfunction

  task automatic make_frame(output longint x [MAX_BLEN], input int L, input int unsigned spread);
    for (int n = 0; n < MAX_BLEN; n++) x[n] = 0;
    for (int n = 0; n < L; n++) x[n] = noise(spread);
    for (int s = 0; s < 4; s++) begin
      int t = 10 + int'($urandom % (L - 30));
      longint amp = 1500 + longint'($urandom % 3000);
      for (int i = 0; i < 8; i++) begin
        // biphasic spike: sharp negative lobe, slower positive lobe
        longint v = (i < 3) ? -amp * (i + 1) / 3 : (i < 4) ? -amp / 2 : amp * (8 - i) / 8;
        x[t + i] = sat(x[t + i] + v, SAMPLE_W);
      end
    end
  endtask

  // ------------------------------------------------------------ one frame
  longint exp_y [MAX_BLEN];
  longint got_y [MAX_BLEN];

  task automatic run_frame(string name, int unsigned spread, bit stall_in, bit stall_out,
                           bit check_pr, bit defer_write);
    longint x [MAX_BLEN];
    longint y [MAX_BLEN];
    int t_last_in, t_first_out, dt, lower, upper, L;
    bit first_seen;
    L = m_blen;
    make_frame(x, L, spread);
    model(x, y);
    if (m_remove) n_remove++; else n_keep_approx++;
    if (m_auto) n_auto++; else n_host++;
    if (m_taps == 4) n_db2++; else n_haar++;
    if (m_levels == 4) n_lvl4++; else n_lvl2++;
    if (L < 500) n_blen_short++;
    t_last_in = 0; t_first_out = 0; first_seen = 0;
    // the design takes a whole frame before it answers, so the input and the
    // output side can be driven one after the other
    for (int n = 0; n < L; n++) begin
      @(negedge clk);
      while (stall_in && ($urandom % 4 == 0)) begin
        in_valid = 1'b0;
        @(posedge clk);
        if (in_ready) n_in_stall++;
        @(negedge clk);
      end
      in_valid = 1'b1; in_data = SAMPLE_W'(x[n]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      t_last_in = cyc;
    end
    @(negedge clk); in_valid = 1'b0;
    if (defer_write) begin
      // new thresholds written while the frame is processed
      @(negedge clk);
      checks++;
      if (!busy) begin failures++; $display("FAIL busy not set during a frame"); end
      for (int j = 0; j < MAX_LEVELS; j++) wr(RA_THR + 8'(j), 32'(m_host[j] * 3));
      n_deferred++;
    end
    for (int n = 0; n < L; n++) begin
      @(negedge clk);
      out_ready = !(stall_out && ($urandom % 3 == 0));
      @(posedge clk);
      while (!(out_valid && out_ready)) begin
        if (out_valid) n_out_stall++;
        @(negedge clk); out_ready = !(stall_out && ($urandom % 3 == 0)); @(posedge clk);
      end
      if (!first_seen) begin t_first_out = cyc; first_seen = 1; end
      got_y[n] = longint'(out_data);
    end
    @(negedge clk); out_ready = 1'b0;
    for (int n = 0; n < L; n++) check({name, " sample"}, got_y[n], y[n]);
    if (check_pr) begin
      for (int n = 0; n < L; n++) begin
        longint e = got_y[n] - x[n];
        checks++;
        if (e > 4 || e < -4) begin
          failures++;
          $display("FAIL %s reconstruction n=%0d in %0d out %0d", name, n, x[n], got_y[n]);
        end
      end
      n_pr++;
    end
    // processing time between the last input and the first output
    dt    = t_first_out - t_last_in;
    lower = m_levels * L * (2 * m_taps + 1);
    upper = lower + m_levels * (EST_LAT + 16) + 16;
    checks++;
    if (dt < lower || dt > upper) begin
      failures++;
      $display("FAIL %s processing took %0d cycles, expected %0d..%0d", name, dt, lower, upper);
    end
    checks++;
    if (L == 500 && dt + 3 * L > 2083333) begin
      failures++;
      $display("FAIL %s does not keep up with 12 kHz at 50 MHz", name);
    end
    $display("%s: %0d samples, %0d levels, %0d taps, processing %0d cycles", name, L, m_levels,
             m_taps, dt);
    // estimated thresholds are visible on the register bus
    for (int j = 0; j < m_levels; j++) begin
      reg_rd_addr = RA_ETHR + 8'(j);
      #1;
      check({name, " est thr"}, longint'(reg_rd_data), m_est[j]);
    end
  endtask

  initial begin
    reg_wr_en = 0; reg_wr_addr = '0; reg_wr_data = '0; reg_rd_addr = '0;
    in_valid = 0; in_data = '0; out_ready = 0;
    n_cleared = 0; n_kept = 0; n_remove = 0; n_keep_approx = 0; n_auto = 0; n_host = 0;
    n_haar = 0; n_db2 = 0; n_lvl4 = 0; n_lvl2 = 0; n_blen_short = 0; n_in_stall = 0;
    n_out_stall = 0; n_deferred = 0; n_pr = 0;
    for (int j = 0; j < MAX_LEVELS; j++) begin
      m_est[j] = 0; m_host[j] = 0;
      for (int i = 0; i < 4; i++) m_hist[j][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1: Haar, four levels, nothing removed: the output must equal the input
    set_filters(1'b0);
    set_ctrl(4, 1'b0, 1'b0, 500);
    set_host_thr(0);
    run_frame("haar identity", 150, 1'b0, 1'b0, 1'b1, 1'b0);

    // 2: evaluation set-up with host thresholds, flow control on both streams;
    //    thresholds rewritten while the frame runs
    set_ctrl(4, 1'b1, 1'b0, 500);
    set_host_thr(300);
    run_frame("haar host thr", 150, 1'b1, 1'b1, 1'b0, 1'b1);
    for (int j = 0; j < MAX_LEVELS; j++) m_host[j] = m_host[j] * 3;
    run_frame("haar deferred thr", 150, 1'b0, 1'b0, 1'b0, 1'b0);

    // 3: estimated thresholds, Haar then Daubechies-2, low and high noise
    set_ctrl(4, 1'b1, 1'b1, 500);
    run_frame("haar auto low noise", 100, 1'b0, 1'b1, 1'b0, 1'b0);
    run_frame("haar auto high noise", 400, 1'b1, 1'b0, 1'b0, 1'b0);
    set_filters(1'b1);
    run_frame("db2 auto low noise", 100, 1'b0, 1'b0, 1'b0, 1'b0);
    run_frame("db2 auto high noise", 400, 1'b1, 1'b1, 1'b0, 1'b0);

    // 4: two levels on short frames, approximation kept
    set_ctrl(2, 1'b0, 1'b0, 128);
    set_host_thr(200);
    run_frame("db2 two levels", 200, 1'b1, 1'b1, 1'b0, 1'b0);
    set_filters(1'b0);
    set_ctrl(2, 1'b0, 1'b1, 128);
    run_frame("haar two levels auto", 200, 1'b0, 1'b0, 1'b0, 1'b0);

    // 5: largest frame
    set_ctrl(4, 1'b1, 1'b1, MAX_BLEN);
    run_frame("haar full buffer", 150, 1'b0, 1'b0, 1'b0, 1'b0);

    $display("mechanisms: cleared=%0d kept=%0d remove=%0d keep=%0d auto=%0d host=%0d haar=%0d",
             n_cleared, n_kept, n_remove, n_keep_approx, n_auto, n_host, n_haar);
    $display("            db2=%0d lvl4=%0d lvl2=%0d short=%0d in_stall=%0d out_stall=%0d",
             n_db2, n_lvl4, n_lvl2, n_blen_short, n_in_stall, n_out_stall);
    $display("            deferred=%0d reconstruction=%0d", n_deferred, n_pr);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mech [15];
  always_comb mech = '{n_cleared, n_kept, n_remove, n_keep_approx, n_auto, n_host, n_haar,
                       n_db2, n_lvl4, n_lvl2, n_blen_short, n_in_stall, n_out_stall,
                       n_deferred, n_pr};
endmodule
