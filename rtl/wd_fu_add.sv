// wd_fu_add: adder functional unit of the shared denoiser datapath.
//
// Combinational signed adder, y = a + b, with operands and result W bits wide
// (the caller sizes W so that no sum overflows). The shared kernel contains
// exactly three of these; which operands reach each one depends on the kernel
// configuration. Adders and multipliers as the units that are shared between
// kernels follow the description of the design; the width and the purely
// combinational form are this design's choices.
module wd_fu_add #(
  parameter int unsigned W = wd_pkg::ACC_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  always_comb y = a + b;

endmodule
