// tb_wd_global_kernel: self-checking test of the shared denoiser datapath.
//
// Drives random filter computations through all three configurations:
// decomposition (two filters on one input), recomposition (two filters on two
// inputs, summed and halved) and hard thresholding. The expected outputs are
// computed here with 64-bit integer arithmetic: sum of products, rounding by
// adding half an LSB, arithmetic shift, saturation. out_valid must rise exactly
// one cycle after the last tap of each output.
module tb_wd_global_kernel;
  import wd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  kmode_e mode;
  logic en, first, last;
  word_t x0, x1, y0, y1;
  coef_t c0, c1;
  thr_t  thr;
  logic  out_valid;

  int checks = 0, failures = 0;

  wd_global_kernel dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    longint mx = (64'sd1 <<< (WORD_W - 1)) - 1;
    longint mn = -(64'sd1 <<< (WORD_W - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  function automatic word_t rnd_word(int unsigned span);
    return word_t'($signed($urandom % (2 * span + 1)) - $signed(span));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one output computed over ntaps taps
  task automatic run_filter(kmode_e m, int ntaps, int unsigned span);
    longint s0 = 0, s1 = 0, e0, e1;
    for (int t = 0; t < ntaps; t++) begin
      @(negedge clk);
      mode = m; en = 1'b1; first = (t == 0); last = (t == ntaps - 1);
      x0 = rnd_word(span); x1 = rnd_word(span);
      c0 = coef_t'($urandom); c1 = coef_t'($urandom);
      if (m == KM_DEC) begin
        s0 += longint'(x0) * longint'(c0);
        s1 += longint'(x0) * longint'(c1);
      end else begin
        s0 += longint'(x0) * longint'(c0) + longint'(x1) * longint'(c1);
      end
      @(posedge clk); #1;
      en = 1'b0;
      if (t < ntaps - 1) check("no early valid", longint'(out_valid), 0);
    end
    check("valid after last tap", longint'(out_valid), 1);
    if (m == KM_DEC) begin
      e0 = sat((s0 + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC);
      e1 = sat((s1 + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC);
      check("dec low", longint'(y0), e0);
      check("dec high", longint'(y1), e1);
    end else begin
      e0 = sat((s0 + (64'sd1 <<< COEF_FRAC)) >>> (COEF_FRAC + 1));
      check("rec", longint'(y0), e0);
    end
  endtask

  task automatic run_thr(word_t d, thr_t th);
    longint mag = (d < 0) ? -longint'(d) : longint'(d);
    @(negedge clk);
    mode = KM_THR; en = 1'b1; first = 1'b1; last = 1'b1; x1 = d; thr = th; x0 = rnd_word(1000);
    @(posedge clk); #1;
    en = 1'b0;
    check("thr valid", longint'(out_valid), 1);
    check("thr value", longint'(y1), (mag > longint'(th)) ? longint'(d) : 0);
  endtask

  initial begin
    mode = KM_DEC; en = 0; first = 0; last = 0; x0 = '0; x1 = '0; c0 = '0; c1 = '0; thr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) run_filter(KM_DEC, 1 + i % MAX_TAPS, 1 << 17);
    for (int i = 0; i < 300; i++) run_filter(KM_REC, 1 + i % MAX_TAPS, 1 << 17);
    // large operands reach the saturation limits
    for (int i = 0; i < 100; i++) run_filter(i[0] ? KM_DEC : KM_REC, MAX_TAPS, (1 << 19) - 1);
    for (int i = 0; i < 300; i++) begin
      automatic word_t d = rnd_word(5000);
      run_thr(d, thr_t'($urandom % 5000));
    end
    run_thr(word_t'(100), thr_t'(100));    // equal magnitude is cleared
    run_thr(word_t'(-101), thr_t'(100));   // larger negative is kept
    // modes interleave without disturbing each other
    for (int i = 0; i < 200; i++) begin
      automatic int unsigned pick = $urandom % 3;
      unique case (pick)
        0: run_filter(KM_DEC, 4, 1 << 16);
        1: run_filter(KM_REC, 2, 1 << 16);
        default: run_thr(rnd_word(3000), thr_t'(1500));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
