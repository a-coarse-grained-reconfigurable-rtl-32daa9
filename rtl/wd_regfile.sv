// wd_regfile: runtime parameter set of the wavelet denoiser coprocessor.
//
// Holds everything the host may change between frames: the number N of
// decomposition/recomposition levels, the number of taps and the values of the
// four filters (analysis low/high, synthesis low/high), whether the last
// approximation is removed (band-pass output), one hard threshold per level,
// whether the estimated thresholds replace the host ones, and the frame length
// b_len. Writes are single-cycle (wr_en with wr_addr/wr_data); reads are
// combinational on rd_addr. Out-of-range values are clamped on write: N to
// 1..LEVELS, taps to 1..TAPS, b_len to MIN_BLEN..BLEN_MX. The status word and the
// estimated thresholds are read-only views of inputs. The register map is in
// wd_pkg. The list of runtime parameters follows the description of the
// coprocessor; the register map, the clamping and the reset values (four
// levels, approximation removed, Haar filters, 500-sample frames, zero
// thresholds) are this design's choices.
module wd_regfile
  import wd_pkg::*;
#(
  parameter int unsigned LEVELS  = MAX_LEVELS,
  parameter int unsigned TAPS    = MAX_TAPS,
  parameter int unsigned BLEN_MX = MAX_BLEN,
  parameter int unsigned BLEN_MN = MIN_BLEN,
  parameter int unsigned W       = WORD_W,
  parameter int unsigned CW      = COEF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [REG_AW-1:0] wr_addr,
  input  logic [REG_DW-1:0] wr_data,
  input  logic [REG_AW-1:0] rd_addr,
  output logic [REG_DW-1:0] rd_data,
  // status inputs
  input  logic              busy,
  input  logic [7:0]        frames_done,
  input  logic [W-1:0]      est_thr [LEVELS],
  // parameter outputs
  output cfg_t              cfg,
  output logic signed [CW-1:0] coef [4][TAPS],
  output logic [W-1:0]      host_thr [LEVELS]
);

  localparam logic signed [CW-1:0] HAAR = CW'(11585);   // 2^14 / sqrt(2)

  function automatic logic [31:0] clamp(input logic [31:0] v, input int unsigned lo,
                                        input int unsigned hi);
    if (v < lo)      return lo;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.levels        <= 3'(LEVELS);
      cfg.remove_approx <= 1'b1;
      cfg.auto_thr      <= 1'b0;
      cfg.ntaps         <= 3'd2;
      cfg.blen          <= blen_t'(500);
      for (int f = 0; f < 4; f++)
        for (int k = 0; k < TAPS; k++) coef[f][k] <= '0;
      for (int f = 0; f < 4; f++) begin
        coef[f][0] <= HAAR;
        coef[f][1] <= f[0] ? -HAAR : HAAR;
      end
      for (int j = 0; j < LEVELS; j++) host_thr[j] <= '0;
    end else if (wr_en) begin
      if (wr_addr == RA_CTRL) begin
        cfg.levels        <= 3'(clamp(32'(wr_data[2:0]), 1, LEVELS));
        cfg.remove_approx <= wr_data[3];
        cfg.auto_thr      <= wr_data[4];
      end
      if (wr_addr == RA_NTAPS) cfg.ntaps <= 3'(clamp(32'(wr_data[2:0]), 1, TAPS));
      if (wr_addr == RA_BLEN)  cfg.blen  <= blen_t'(clamp(wr_data, BLEN_MN, BLEN_MX));
      for (int j = 0; j < LEVELS; j++)
        if (wr_addr == RA_THR + REG_AW'(j)) host_thr[j] <= wr_data[W-1:0];
      for (int f = 0; f < 4; f++)
        for (int k = 0; k < TAPS; k++)
          if (wr_addr == RA_COEF + REG_AW'(8 * f + k)) coef[f][k] <= wr_data[CW-1:0];
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr == RA_CTRL)   rd_data = {27'd0, cfg.auto_thr, cfg.remove_approx, cfg.levels};
    if (rd_addr == RA_NTAPS)  rd_data = {29'd0, cfg.ntaps};
    if (rd_addr == RA_BLEN)   rd_data = REG_DW'(cfg.blen);
    if (rd_addr == RA_STATUS) rd_data = {16'd0, frames_done, 7'd0, busy};
    for (int j = 0; j < LEVELS; j++) begin
      if (rd_addr == RA_THR  + REG_AW'(j)) rd_data = REG_DW'(host_thr[j]);
      if (rd_addr == RA_ETHR + REG_AW'(j)) rd_data = REG_DW'(est_thr[j]);
    end
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < TAPS; k++)
        if (rd_addr == RA_COEF + REG_AW'(8 * f + k)) rd_data = REG_DW'($signed(coef[f][k]));
  end

endmodule
