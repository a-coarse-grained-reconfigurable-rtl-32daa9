// tb_wd_ram: self-checking test of the frame buffer.
//
// Writes random words to random addresses while reading others, and compares
// every read with a shadow array kept here. Checks the one-cycle read latency
// and that a read of the address being written returns the old word.
module tb_wd_ram;
  import wd_pkg::*;

  localparam int unsigned DEPTH = MAX_BLEN;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [WORD_W-1:0] wdata, rdata;
  logic [WORD_W-1:0] shadow [DEPTH];

  int checks = 0, failures = 0;

  wd_ram dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [WORD_W-1:0] got, logic [WORD_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [WORD_W-1:0] exp;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = WORD_W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // read back in order
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); raddr = AW'(a);
      @(posedge clk); #1;
      check("readback", rdata, shadow[a]);
    end
    // mixed traffic, including read-during-write of the same address
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      we    = $urandom % 2 == 0;
      waddr = (i % 7 == 0) ? raddr : AW'($urandom);
      wdata = WORD_W'($urandom);
      exp   = shadow[raddr];
      @(posedge clk); #1;
      check("mixed", rdata, exp);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
