// tb_wd_accuracy: denoising accuracy on synthetic neural recordings.
//
// Runs the evaluation set-up of the denoiser: 12 kHz sampling, frames of 500
// samples, four levels, last approximation removed, thresholds estimated from
// the data, with Haar and with Daubechies-2 filters, each at a low and a high
// background noise level. The recording is a train of spikes of one neuron
// (about 1 ms long, a sharp negative and a slower positive lobe) at random
// times, plus smaller spikes of other neurons at random times and amplitudes,
// plus pseudo-Gaussian noise. For every configuration eight frames are
// processed; the first four fill the four-frame noise history and the last
// four are scored. The score is the power of (output - clean spike train)
// against the power of (input - clean spike train): the denoiser must lower it,
// and the improvement in dB is printed. The clean train has no content below
// the band kept by the denoiser worth counting, so no reference filtering is
// applied to it. Finally, with zero thresholds, tones at 96 Hz, 1488 Hz and
// 4800 Hz check the pass band: the lowest must be cut by more than 10 dB, the
// others must pass within 1 dB.
module tb_wd_accuracy;
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

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int L = 500;

  task automatic wr(logic [REG_AW-1:0] a, logic [REG_DW-1:0] v);
    @(negedge clk); reg_wr_en = 1'b1; reg_wr_addr = a; reg_wr_data = v;
    @(negedge clk); reg_wr_en = 1'b0;
  endtask

  task automatic set_filters(bit db2);
    int h [4];
    int t;
    if (db2) begin h = '{7913, 13705, 3672, -2120}; t = 4; end
    else     begin h = '{11585, 11585, 0, 0};       t = 2; end
    for (int k = 0; k < MAX_TAPS; k++) begin
      int g = (k < t) ? ((k % 2) ? -h[t - 1 - k] : h[t - 1 - k]) : 0;
      wr(RA_COEF + 8'(8 * F_DEC_LO + k), 32'(h[k]));
      wr(RA_COEF + 8'(8 * F_REC_LO + k), 32'(h[k]));
      wr(RA_COEF + 8'(8 * F_DEC_HI + k), 32'(g));
      wr(RA_COEF + 8'(8 * F_REC_HI + k), 32'(g));
    end
    wr(RA_NTAPS, 32'(t));
  endtask

  function automatic real gauss(real sigma);
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return (s - 6.0) * sigma;
  endfunction

  // spike shape, 12 samples (1 ms at 12 kHz), peak -1
  function automatic real shape(int i);
    real tt = real'(i);
    if (i < 3) return -tt / 3.0;
    if (i < 5) return -1.0 + (tt - 3.0) * 0.6;
    return 0.35 * $sin(3.14159 * (tt - 5.0) / 7.0);
  endfunction

  task automatic make_frame(real sigma, output int clean [L], output int noisy [L]);
    real c [L + 12];
    real v [L + 12];
    for (int n = 0; n < L + 12; n++) begin c[n] = 0.0; v[n] = gauss(sigma); end
    // target neuron: about 20 spikes per second
    for (int s = 0; s < 1 + int'($urandom % 2); s++) begin
      int t = int'($urandom % (L - 12));
      for (int i = 0; i < 12; i++) c[t + i] += 3000.0 * shape(i);
    end
    // background neurons: smaller spikes at random times and amplitudes
    for (int s = 0; s < 6; s++) begin
      int t = int'($urandom % (L - 12));
      real a = 100.0 + real'($urandom % 400);
      for (int i = 0; i < 12; i++) v[t + i] += a * shape(i);
    end
    for (int n = 0; n < L; n++) begin
      clean[n] = int'(c[n]);
      noisy[n] = int'(c[n] + v[n]);
    end
  endtask

  task automatic run_config(string name, bit db2, real sigma);
    int clean [L];
    int noisy [L];
    int y [L];
    real pin, pout, gain;
    pin = 0.0; pout = 0.0;
    set_filters(db2);
    for (int f = 0; f < 8; f++) begin
      make_frame(sigma, clean, noisy);
      for (int n = 0; n < L; n++) begin
        @(negedge clk); in_valid = 1'b1; in_data = SAMPLE_W'(noisy[n]);
        @(posedge clk); while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 1'b0; out_ready = 1'b1;
      for (int n = 0; n < L; n++) begin
        @(posedge clk); while (!out_valid) @(posedge clk);
        y[n] = int'(out_data);
      end
      @(negedge clk); out_ready = 1'b0;
      if (f >= 4)
        for (int n = 0; n < L; n++) begin
          pin  += real'(noisy[n] - clean[n]) ** 2;
          pout += real'(y[n] - clean[n]) ** 2;
        end
    end
    gain = 10.0 * $log10(pin / pout);
    $display("%s: error power in %0.1f out %0.1f per sample, improvement %0.2f dB", name,
             pin / (4.0 * L), pout / (4.0 * L), gain);
    checks++;
    if (!(gain > 0.0)) begin
      failures++;
      $display("FAIL %s: no noise reduction", name);
    end
  endtask

  // Pass band: with zero thresholds and the last approximation removed the
  // denoiser is a band-pass filter whose lower edge is near 12 kHz / 2^5 = 375 Hz.
  // Tones with a whole number of periods per frame (multiples of 24 Hz) are
  // sent and the output to input power ratio is measured.
  task automatic run_tone(string name, bit db2, int periods, real lo_db, real hi_db);
    int x [L];
    int y [L];
    real pin, pout, gain;
    pin = 0.0; pout = 0.0;
    set_filters(db2);
    for (int n = 0; n < L; n++)
      x[n] = int'(4000.0 * $sin(2.0 * 3.14159265358979 * real'(periods * n) / real'(L)));
    for (int n = 0; n < L; n++) begin
      @(negedge clk); in_valid = 1'b1; in_data = SAMPLE_W'(x[n]);
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 1'b0; out_ready = 1'b1;
    for (int n = 0; n < L; n++) begin
      @(posedge clk); while (!out_valid) @(posedge clk);
      y[n] = int'(out_data);
    end
    @(negedge clk); out_ready = 1'b0;
    for (int n = 0; n < L; n++) begin
      pin  += real'(x[n]) ** 2;
      pout += real'(y[n]) ** 2;
    end
    gain = 10.0 * $log10(pout / pin);
    $display("%s: %0d Hz gain %0.2f dB", name, periods * 24, gain);
    checks++;
    if (gain < lo_db || gain > hi_db) begin
      failures++;
      $display("FAIL %s: gain %0.2f dB outside %0.1f .. %0.1f dB", name, gain, lo_db, hi_db);
    end
  endtask

  initial begin
    reg_wr_en = 0; reg_wr_addr = '0; reg_wr_data = '0; reg_rd_addr = '0;
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // evaluation set-up: N = 4, approximation removed, estimated thresholds, 500 samples
    wr(RA_CTRL, 32'h4 | 32'h8 | 32'h10);
    wr(RA_BLEN, 32'd500);
    run_config("haar low noise", 1'b0, 80.0);
    run_config("haar high noise", 1'b0, 250.0);
    run_config("db2 low noise", 1'b1, 80.0);
    run_config("db2 high noise", 1'b1, 250.0);
    // pass band with host thresholds of zero
    wr(RA_CTRL, 32'h4 | 32'h8);
    for (int j = 0; j < MAX_LEVELS; j++) wr(RA_THR + 8'(j), 32'd0);
    for (int w = 0; w < 2; w++) begin
      run_tone(w ? "db2 tone" : "haar tone", w[0], 4, -100.0, -10.0);
      run_tone(w ? "db2 tone" : "haar tone", w[0], 62, -1.0, 1.0);
      run_tone(w ? "db2 tone" : "haar tone", w[0], 200, -1.0, 1.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
