// wd_thr_estimator: noise-adaptive threshold of each decomposition level.
//
// The hard threshold of level j is a scaled estimate of the noise standard
// deviation, taken over the four most recent frames of detail samples:
//
//   s_n  = sum over one frame of d_j[k]^2                (window energy)
//   th_j = SC * sqrt( (s_1 + s_2 + s_3 + s_4) / (4 * (b_len - 1)) ),  SC = 3.9
//
// While in_valid is high the detail sample in_sample is squared and added to
// the energy of the current window. A start pulse closes the window of level
// `level`: its energy enters that level's four-entry history (the oldest entry
// drops out) and a sequential computation begins: sum of the history, restoring
// division by 4*(b_len-1) (one quotient bit per cycle), bit-serial integer
// square root (one result bit per cycle) and the multiplication by SC held as
// SC_Q / 2^SC_FRAC. done pulses for one cycle when th[level] holds the new
// value, about SUM_W + SUM_W/2 + 3 cycles after start; busy is high meanwhile,
// and start is ignored while busy. Histories and thresholds reset to zero, so
// the first three frames see a partly filled history.
//
// The formula and SC = 3.9 follow the description of the design; the
// rounding (floor division and square root, rounded scaling), the reset
// contents and the sequential arithmetic are this design's choices.
module wd_thr_estimator
  import wd_pkg::*;
#(
  parameter int unsigned W       = WORD_W,
  parameter int unsigned LEVELS  = MAX_LEVELS,
  parameter int unsigned BLEN_MX = MAX_BLEN,
  parameter int unsigned SCQ     = SC_Q,
  parameter int unsigned SCF     = SC_FRAC,
  localparam int unsigned LW     = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned BW     = $clog2(BLEN_MX + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [BW-1:0]       blen,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_sample,
  input  logic                start,
  input  logic [LW-1:0]       level,
  output logic                busy,
  output logic                done,
  output logic [W-1:0]        th [LEVELS]
);

  localparam int unsigned EW    = 2 * W + $clog2(BLEN_MX);   // one window energy
  localparam int unsigned SUM_W = EW + 2;                    // four windows
  localparam int unsigned RW    = (SUM_W + 1) / 2;           // square root width
  localparam int unsigned DVW   = $clog2(BLEN_MX) + 2;       // divisor width
  localparam int unsigned CNT_W = $clog2(SUM_W + 1);

  typedef enum logic [2:0] {S_IDLE, S_SUM, S_DIV, S_SQRT, S_SCALE} state_e;
  state_e state;

  logic [EW-1:0]    energy;
  logic [EW-1:0]    hist [LEVELS][4];
  logic [LW-1:0]    lvl;
  logic [SUM_W-1:0] num;
  logic [DVW-1:0]   dvs;
  logic [DVW-1:0]   rem;
  logic [SUM_W-2:0] quo;   // first SUM_W-1 quotient bits; the last goes straight to op
  logic [2*RW-1:0]  op, res, one;
  logic [CNT_W-1:0] cnt;

  // Square of the incoming detail sample
  logic signed [2*W-1:0] xs;
  logic        [2*W-1:0] sq;
  always_comb begin
    xs = (2*W)'(in_sample);
    sq = xs * xs;
  end

  // Restoring division step
  logic [DVW:0] rem_sh;
  always_comb rem_sh = {rem[DVW-1:0], num[SUM_W-1]};

  // Square root step
  logic [2*RW-1:0] trial;
  always_comb trial = res + one;

  // Scaling by SC
  localparam int unsigned PW = RW + 16;
  logic [PW-1:0] scaled;
  always_comb scaled = (PW'(res) * PW'(SCQ) + (PW'(1) << (SCF - 1))) >> SCF;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      energy <= '0;
      lvl    <= '0;
      num    <= '0;
      dvs    <= '0;
      rem    <= '0;
      quo    <= '0;
      op     <= '0;
      res    <= '0;
      one    <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      for (int l = 0; l < LEVELS; l++) begin
        th[l] <= '0;
        for (int i = 0; i < 4; i++) hist[l][i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (in_valid) energy <= (start && state == S_IDLE) ? EW'(sq) : energy + EW'(sq);
      unique case (state)
        S_IDLE: if (start) begin
          lvl <= level;
          for (int i = 3; i > 0; i--) hist[level][i] <= hist[level][i-1];
          hist[level][0] <= energy;
          if (!in_valid) energy <= '0;
          state <= S_SUM;
        end
        S_SUM: begin
          num   <= SUM_W'(hist[lvl][0]) + SUM_W'(hist[lvl][1])
                 + SUM_W'(hist[lvl][2]) + SUM_W'(hist[lvl][3]);
          dvs   <= DVW'((32'(blen) - 1) << 2);
          rem   <= '0;
          quo   <= '0;
          cnt   <= CNT_W'(SUM_W);
          state <= S_DIV;
        end
        S_DIV: begin
          num <= num << 1;
          if (rem_sh >= {1'b0, dvs}) begin
            rem <= DVW'(rem_sh - {1'b0, dvs});
            quo <= {quo[SUM_W-3:0], 1'b1};
          end else begin
            rem <= DVW'(rem_sh);
            quo <= {quo[SUM_W-3:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= S_SQRT;
        end
        S_SQRT: begin
          if (op >= trial) begin
            op  <= op - trial;
            res <= (res >> 1) + one;
          end else begin
            res <= res >> 1;
          end
          one <= one >> 2;
          if (one == (2*RW)'(1)) state <= S_SCALE;
        end
        S_SCALE: begin
          th[lvl] <= (scaled > PW'({W{1'b1}})) ? {W{1'b1}} : W'(scaled);
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // Load the square root operands when the division ends
      if (state == S_DIV && cnt == 1) begin
        op  <= (2*RW)'({quo, (rem_sh >= {1'b0, dvs})});
        res <= '0;
        one <= (2*RW)'(1) << (2*RW - 2);
      end
    end
  end

endmodule
