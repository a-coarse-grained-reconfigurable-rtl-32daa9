// tb_wd_fu_mult: self-checking test of the multiplier functional unit at its
// default widths (20-bit sample by 16-bit coefficient): random operands and
// the corner values, compared with 64-bit integer products.
module tb_wd_fu_mult;
  import wd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [WORD_W-1:0]        a;
  logic signed [COEF_W-1:0]        b;
  logic signed [WORD_W+COEF_W-1:0] y;
  int checks = 0, failures = 0;

  wd_fu_mult dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(longint x, longint z);
    longint e;
    a = WORD_W'(x); b = COEF_W'(z);
    #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL %0d * %0d gave %0d", a, b, y);
    end
  endtask

  initial begin
    try(0, 0); try(1, -1); try(-(1 << 19), -(1 << 15)); try((1 << 19) - 1, (1 << 15) - 1);
    try(-(1 << 19), (1 << 15) - 1); try(11585, 11585);
    for (int i = 0; i < 5000; i++) begin
      try(longint'($signed($urandom)) >>> (i % 13), longint'($signed($urandom)) >>> (i % 17));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
