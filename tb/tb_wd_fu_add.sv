// tb_wd_fu_add: self-checking test of the adder functional unit at its
// default 40-bit width: random operands of every magnitude and the corner
// values, compared with 64-bit integer sums.
module tb_wd_fu_add;
  import wd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [ACC_W-1:0] a, b, y;
  int checks = 0, failures = 0;

  wd_fu_add dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(longint x, longint z);
    longint e;
    a = ACC_W'(x); b = ACC_W'(z);
    #1;
    e = longint'(a) + longint'(b);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL %0d + %0d gave %0d", a, b, y);
    end
  endtask

  initial begin
    automatic longint mx = (64'sd1 <<< (ACC_W - 2)) - 1;
    try(0, 0); try(1, -1); try(mx, mx); try(-mx - 1, -mx - 1); try(mx, -mx - 1);
    for (int i = 0; i < 5000; i++) begin
      automatic int sh = i % (ACC_W - 1);
      automatic longint x = longint'({$urandom, $urandom}) >>> (64 - sh - 1);
      automatic longint z = longint'({$urandom, $urandom}) >>> (64 - (ACC_W - 2 - sh % 8) - 1);
      try(x, z);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
