// wd_ram: frame buffer of the denoiser, one write port and one read port.
//
// Holds one frame of samples (input, an approximation signal or the detail
// signal of one level). Writes take effect at the clock edge when we is high;
// reads are synchronous: rdata shows the word at raddr one cycle after raddr is
// applied. A read of the address written in the same cycle returns the old
// word. The contents are not reset: every word is written before it is read
// within a frame. The depth follows the 512-sample frame limit of the design;
// the port arrangement is this design's choice and maps to a block RAM.
module wd_ram #(
  parameter int unsigned DEPTH = wd_pkg::MAX_BLEN,
  parameter int unsigned W     = wd_pkg::WORD_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
