// wd_fu_mult: multiplier functional unit of the shared denoiser datapath.
//
// Combinational signed multiplier of a WA-bit sample by a WB-bit coefficient,
// giving the full WA+WB-bit product. The shared kernel contains exactly two
// of these. Multipliers as units that are shared between kernels follow the
// description of the design; the widths and the purely combinational form are
// this design's choices.
module wd_fu_mult #(
  parameter int unsigned WA = wd_pkg::WORD_W,
  parameter int unsigned WB = wd_pkg::COEF_W
) (
  input  logic signed [WA-1:0]    a,
  input  logic signed [WB-1:0]    b,
  output logic signed [WA+WB-1:0] y
);

  always_comb y = a * b;

endmodule
