// tb_wd_regfile: self-checking test of the denoiser parameter registers.
//
// Checks the reset values (four levels, approximation removed, two Haar taps,
// 500-sample frames), writes and reads back every register, checks that
// out-of-range levels, tap counts and frame lengths are clamped, and that the
// status and estimated-threshold words show their inputs.
module tb_wd_regfile;
  import wd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              wr_en;
  logic [REG_AW-1:0] wr_addr, rd_addr;
  logic [REG_DW-1:0] wr_data, rd_data;
  logic              busy;
  logic [7:0]        frames_done;
  thr_t              est_thr [MAX_LEVELS];
  cfg_t              cfg;
  coef_t             coef [4][MAX_TAPS];
  thr_t              host_thr [MAX_LEVELS];

  int checks = 0, failures = 0;

  wd_regfile dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic wr(logic [REG_AW-1:0] a, logic [REG_DW-1:0] d);
    @(negedge clk); wr_en = 1'b1; wr_addr = a; wr_data = d;
    @(negedge clk); wr_en = 1'b0;
  endtask

  logic [REG_DW-1:0] rv;
  task automatic rd(logic [REG_AW-1:0] a);
    rd_addr = a;
    #1;
    rv = rd_data;
  endtask

  initial begin
    logic [15:0] cv [4][MAX_TAPS];
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0; busy = 0; frames_done = '0;
    for (int j = 0; j < MAX_LEVELS; j++) est_thr[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset levels", cfg.levels, 4);
    check("reset remove", cfg.remove_approx, 1);
    check("reset auto", cfg.auto_thr, 0);
    check("reset taps", cfg.ntaps, 2);
    check("reset blen", cfg.blen, 500);
    check("reset haar", coef[F_DEC_HI][1], -11585);
    rd(RA_COEF + 8'd9); check("reset haar rd", $signed(rv), -11585);
    // control word
    wr(RA_CTRL, 32'h12);   // 2 levels, keep approx, auto threshold
    check("levels", cfg.levels, 2);
    check("remove", cfg.remove_approx, 0);
    check("auto", cfg.auto_thr, 1);
    rd(RA_CTRL); check("ctrl rd", rv, 32'h12);
    wr(RA_CTRL, 32'h0);    check("levels clamp lo", cfg.levels, 1);
    wr(RA_CTRL, 32'h7);    check("levels clamp hi", cfg.levels, MAX_LEVELS);
    wr(RA_NTAPS, 32'd4);   check("taps", cfg.ntaps, 4);
    wr(RA_NTAPS, 32'd6);   check("taps clamp", cfg.ntaps, MAX_TAPS);
    wr(RA_NTAPS, 32'd0);   check("taps clamp lo", cfg.ntaps, 1);
    wr(RA_BLEN, 32'd300);  rd(RA_BLEN); check("blen", cfg.blen, 300);  check("blen rd", rv, 300);
    wr(RA_BLEN, 32'd9000); check("blen clamp", cfg.blen, MAX_BLEN);
    wr(RA_BLEN, 32'd3);    check("blen clamp lo", cfg.blen, MIN_BLEN);
    // thresholds
    for (int j = 0; j < MAX_LEVELS; j++) wr(RA_THR + 8'(j), 32'(1000 * j + 7));
    for (int j = 0; j < MAX_LEVELS; j++) begin
      check("thr", host_thr[j], 1000 * j + 7);
      rd(RA_THR + 8'(j)); check("thr rd", rv, 1000 * j + 7);
    end
    // coefficients
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < MAX_TAPS; k++) begin
        cv[f][k] = 16'($urandom);
        wr(RA_COEF + 8'(8 * f + k), {16'hffff, cv[f][k]});
      end
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < MAX_TAPS; k++) begin
        check("coef", coef[f][k], $signed(cv[f][k]));
        rd(RA_COEF + 8'(8 * f + k)); check("coef rd", $signed(rv), $signed(cv[f][k]));
      end
    // read-only views
    busy = 1; frames_done = 8'd77;
    for (int j = 0; j < MAX_LEVELS; j++) est_thr[j] = thr_t'(111 * (j + 1));
    rd(RA_STATUS); check("status", rv, (77 << 8) | 1);
    for (int j = 0; j < MAX_LEVELS; j++) begin rd(RA_ETHR + 8'(j)); check("ethr", rv, 111 * (j + 1)); end
    wr(RA_STATUS, 32'hffff_ffff);
    rd(RA_STATUS); check("status read only", rv, (77 << 8) | 1);
    rd(8'hff); check("unmapped", rv, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
