// wd_global_kernel: the shared, runtime-reconfigurable datapath of the denoiser.
//
// Three computational kernels of the wavelet denoiser are merged into one set
// of functional units: two multipliers (m0, m1, instances of wd_fu_mult) and
// three adders (accumulator adders aA and aB, and the combining adder aC,
// instances of wd_fu_add). The mode input plays the part
// of the configuration switches that route operands between the units:
//
//   KM_DEC  decomposition tap:  accA += c0*x0, accB += c1*x0
//           (low-pass and high-pass filter of one input sample, both filters
//            of the quadrature mirror pair advance in the same cycle)
//   KM_REC  recomposition tap:  accA += c0*x0 + c1*x1   (aC forms the sum)
//           (synthesis low pass on the approximation, high pass on the detail)
//   KM_THR  hard threshold:     y1 = (|x1| > thr) ? x1 : 0   (aC compares)
//
// Interface and timing: one filter tap is accepted per cycle with en high.
// first marks the first tap of an output sample and clears the accumulators
// (they are loaded with the rounding constant instead of zero); last marks the
// final tap. out_valid is high the cycle after the last tap and y0/y1 are then
// valid: y0 = accA >>> COEF_FRAC (DEC) or accA >>> (COEF_FRAC+1) (REC, which
// folds in the 1/2 of undecimated recomposition), y1 = accB >>> COEF_FRAC
// (DEC) or the thresholded sample (THR), all rounded and saturated to WORD_W.
// In KM_THR every sample is one tap with first and last high.
//
// The count of two multipliers and three adders is the one reported for the
// merged kernel; the assignment of operations to units, the number formats and
// the rounding are this design's choices.
module wd_global_kernel
  import wd_pkg::*;
#(
  parameter int unsigned W     = WORD_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned FRAC  = COEF_FRAC,
  parameter int unsigned AW    = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  kmode_e               mode,
  input  logic                 en,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [W-1:0]  x0,
  input  logic signed [W-1:0]  x1,
  input  logic signed [CW-1:0] c0,
  input  logic signed [CW-1:0] c1,
  input  logic        [W-1:0]  thr,
  output logic                 out_valid,
  output logic signed [W-1:0]  y0,
  output logic signed [W-1:0]  y1
);

  localparam logic signed [AW-1:0] RND_DEC = AW'(1) <<< (FRAC - 1);
  localparam logic signed [AW-1:0] RND_REC = AW'(1) <<< FRAC;
  localparam logic signed [AW-1:0] YMAX    = AW'((1 << (W - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN    = -AW'(1 << (W - 1));

  // Operand switch and the two multipliers m0, m1
  logic signed [W-1:0]      m1_x;
  logic signed [W+CW-1:0]   m0_y, m1_y;
  logic signed [AW-1:0]     p0, p1;
  always_comb m1_x = (mode == KM_REC) ? x1 : x0;

  wd_fu_mult #(.WA(W), .WB(CW)) u_m0 (.a(x0),   .b(c0), .y(m0_y));
  wd_fu_mult #(.WA(W), .WB(CW)) u_m1 (.a(m1_x), .b(c1), .y(m1_y));

  always_comb begin
    p0 = AW'(m0_y);
    p1 = AW'(m1_y);
  end

  // Adder aC: product sum when recomposing, magnitude compare when thresholding
  logic signed [AW-1:0] ac_a, ac_b, ac_sum;
  logic signed [W:0]    mag;
  always_comb begin
    mag = x1[W-1] ? -(W+1)'(x1) : (W+1)'(x1);
    if (mode == KM_THR) begin
      ac_a = AW'(mag);
      ac_b = -AW'({1'b0, thr});
    end else begin
      ac_a = p0;
      ac_b = p1;
    end
  end

  wd_fu_add #(.W(AW)) u_ac (.a(ac_a), .b(ac_b), .y(ac_sum));

  // Accumulator adders aA and aB
  logic signed [AW-1:0] acc_a, acc_b;
  logic signed [AW-1:0] acc_a_nxt, acc_b_nxt;
  logic signed [W-1:0]  thr_q;
  kmode_e               mode_q;
  logic signed [AW-1:0] a_base, b_base, a_add;
  always_comb begin
    a_base = first ? ((mode == KM_REC) ? RND_REC : RND_DEC) : acc_a;
    b_base = first ? RND_DEC : acc_b;
    a_add  = (mode == KM_REC) ? ac_sum : p0;
  end

  wd_fu_add #(.W(AW)) u_aa (.a(a_base), .b(a_add), .y(acc_a_nxt));
  wd_fu_add #(.W(AW)) u_ab (.a(b_base), .b(p1),    .y(acc_b_nxt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_a     <= '0;
      acc_b     <= '0;
      thr_q     <= '0;
      mode_q    <= KM_DEC;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en & last;
      if (en) begin
        mode_q <= mode;
        unique case (mode)
          KM_DEC: begin
            acc_a <= acc_a_nxt;
            acc_b <= acc_b_nxt;
          end
          KM_REC: acc_a <= acc_a_nxt;
          KM_THR: thr_q <= (ac_sum > 0) ? x1 : '0;
          default: ;
        endcase
      end
    end
  end

  function automatic logic signed [W-1:0] sat(input logic signed [AW-1:0] v);
    if (v > YMAX)      return W'(YMAX);
    else if (v < YMIN) return W'(YMIN);
    else               return W'(v);
  endfunction

  always_comb begin
    y0 = sat((mode_q == KM_REC) ? (acc_a >>> (FRAC + 1)) : (acc_a >>> FRAC));
    y1 = (mode_q == KM_THR) ? thr_q : sat(acc_b >>> FRAC);
  end

endmodule
