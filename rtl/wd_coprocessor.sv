// wd_coprocessor: runtime-reconfigurable wavelet denoiser for one input frame
// at a time.
//
// The denoiser removes Gaussian-like background noise with the translation
// invariant (a-trous, undecimated) wavelet transform and hard thresholding.
// For every frame of b_len samples it runs:
//
//   LOAD  accept b_len samples on the input stream into approximation bank 0
//   for j = 0 .. N-1:
//     DEC j  a_{j+1}[n] = sum_k h[k] a_j[n + 2^j k],  d_{j+1}[n] = sum_k g[k] a_j[n + 2^j k]
//     EST j  update the noise estimate of level j from the raw d_{j+1}
//     THR j  d_{j+1}[n] = |d_{j+1}[n]| > th_j ? d_{j+1}[n] : 0
//   for j = N-1 .. 0:
//     REC j  a_j[n] = 1/2 sum_k ( h~[k] a_{j+1}[n - 2^j k] + g~[k] d_{j+1}[n - 2^j k] )
//            with a_N taken as zero when the last approximation is removed
//   OUT   send a_0 on the output stream, saturated to SAMPLE_W bits
//
// Indices wrap around inside the frame (circular extension), which makes the
// transform exactly invertible for any frame length. All filtering of all
// levels goes through the single shared datapath wd_global_kernel (two
// multipliers, three adders), one filter tap per clock cycle; the dilation 2^j
// of the a-trous filters is only an address offset. Two approximation banks
// are used in ping-pong fashion (level j reads bank j%2 and writes bank
// (j+1)%2) and each level keeps its own detail bank for the recomposition.
//
// Interfaces: a register bus (wr_en/wr_addr/wr_data, combinational read on
// rd_addr, map in wd_pkg), a valid/ready input stream and a valid/ready output
// stream. The parameter set is sampled when the first sample of a frame is
// accepted, so writes during a frame affect the next one. frame_done pulses
// when the last output sample is taken. A frame takes about
// b_len*(1 + N*(2*taps + 1) + 3) + N*(SUM_W*1.5 + 10) cycles, with SUM_W the
// estimator's sum width (51 at the defaults): with b_len = 500, N = 4, Db2 taps
// about 21,000 cycles, far below the 41.7 ms a 500-sample frame lasts at 12 kHz
// for any clock above a few MHz.
//
// The algorithm steps, the runtime parameters and the resource sharing follow
// the description of the design; circular extension, the banked memories,
// the order of the steps and both stream handshakes are this design's choices.
// The assertions at the end are disabled during reset, which is why lint sees
// rst_n used both as an asynchronous reset and as a synchronous signal.
module wd_coprocessor
  import wd_pkg::*;
#(
  parameter int unsigned LEVELS  = MAX_LEVELS,
  parameter int unsigned TAPS    = MAX_TAPS,
  parameter int unsigned BLEN_MX = MAX_BLEN,
  localparam int unsigned AW     = $clog2(BLEN_MX),
  localparam int unsigned BW     = $clog2(BLEN_MX + 1),
  localparam int unsigned LW     = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned TW     = $clog2(TAPS + 1),
  localparam int unsigned KW     = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // register bus
  input  logic                       reg_wr_en,
  input  logic [REG_AW-1:0]          reg_wr_addr,
  input  logic [REG_DW-1:0]          reg_wr_data,
  input  logic [REG_AW-1:0]          reg_rd_addr,
  output logic [REG_DW-1:0]          reg_rd_data,
  // input sample stream
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [SAMPLE_W-1:0] in_data,
  // output sample stream
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic signed [SAMPLE_W-1:0] out_data,
  // status
  output logic                       busy,
  output logic                       frame_done
);

  typedef enum logic [2:0] {S_LOAD, S_DEC, S_EST, S_THR, S_REC, S_OUT} state_e;
  state_e state;

  // ---------------------------------------------------------------- parameters
  cfg_t               cfg, cfg_q;
  coef_t              coef [4][TAPS];
  coef_t              coef_q [4][TAPS];
  thr_t               host_thr [LEVELS];
  thr_t               host_thr_q [LEVELS];
  thr_t               est_thr [LEVELS];
  logic [7:0]         frames;

  wd_regfile #(.LEVELS(LEVELS), .TAPS(TAPS), .BLEN_MX(BLEN_MX)) u_regs (
    .clk, .rst_n,
    .wr_en(reg_wr_en), .wr_addr(reg_wr_addr), .wr_data(reg_wr_data),
    .rd_addr(reg_rd_addr), .rd_data(reg_rd_data),
    .busy, .frames_done(frames), .est_thr,
    .cfg, .coef, .host_thr
  );

  // ------------------------------------------------------------------ memories
  logic [AW-1:0] rd_addr, wr_addr;
  logic          bank_we [2];
  word_t         bank_wdata;
  word_t         bank_rdata [2];
  logic          det_we [LEVELS];
  word_t         det_rdata [LEVELS];
  word_t         k_y0, k_y1;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    wd_ram #(.DEPTH(BLEN_MX), .W(WORD_W)) u_bank (
      .clk, .we(bank_we[b]), .waddr(wr_addr), .wdata(bank_wdata),
      .raddr(rd_addr), .rdata(bank_rdata[b])
    );
  end
  for (genvar l = 0; l < LEVELS; l++) begin : g_det
    wd_ram #(.DEPTH(BLEN_MX), .W(WORD_W)) u_det (
      .clk, .we(det_we[l]), .waddr(wr_addr), .wdata(k_y1),
      .raddr(rd_addr), .rdata(det_rdata[l])
    );
  end

  // ------------------------------------------------------------ sequencer state
  logic [LW-1:0] lvl;          // current level j
  logic [AW-1:0] n;            // sample index being issued
  logic [TW-1:0] k;            // tap index being issued
  logic          iss_done;     // all taps of the pass issued
  logic          v1, first1, last1;
  logic [KW-1:0] k1;
  logic [AW-1:0] n1, n2;
  logic          rd_pend;      // output read in flight

  logic          k_out_valid;
  logic          est_busy, est_done, est_start;

  logic          pass;         // a filtering / thresholding pass is active
  logic          iss;
  logic [TW-1:0] taps_eff;
  logic [AW:0]   off;
  logic [AW:0]   idx_fwd;
  logic [AW-1:0] idx_bwd;
  logic [AW-1:0] blen_m1;
  logic          last_lvl;

  always_comb begin
    pass     = (state == S_DEC) || (state == S_REC) || (state == S_THR);
    iss      = pass && !iss_done;
    taps_eff = (state == S_THR) ? TW'(1) : TW'(cfg_q.ntaps);
    blen_m1  = AW'(cfg_q.blen - 1'b1);
    last_lvl = (32'(lvl) == 32'(cfg_q.levels) - 1);
    off      = (AW+1)'(k) << lvl;
    idx_fwd  = (AW+1)'(n) + off;
    if (idx_fwd >= (AW+1)'(cfg_q.blen)) idx_fwd = idx_fwd - (AW+1)'(cfg_q.blen);
    if ((AW+1)'(n) < off) idx_bwd = AW'((AW+1)'(n) + (AW+1)'(cfg_q.blen) - off);
    else                  idx_bwd = AW'((AW+1)'(n) - off);
  end

  // Read address: one address for every bank
  always_comb begin
    unique case (state)
      S_DEC:   rd_addr = AW'(idx_fwd);
      S_REC:   rd_addr = idx_bwd;
      default: rd_addr = n;
    endcase
  end

  // ---------------------------------------------------------- shared datapath
  kmode_e kmode;
  word_t  a_rd, d_rd, k_x0;
  coef_t  k_c0, k_c1;
  always_comb begin
    unique case (state)
      S_REC:   kmode = KM_REC;
      S_THR:   kmode = KM_THR;
      default: kmode = KM_DEC;
    endcase
    // DEC reads a_j from bank j%2, REC reads a_{j+1} from bank (j+1)%2
    a_rd = (state == S_REC) ? bank_rdata[~lvl[0]] : bank_rdata[lvl[0]];
    d_rd = det_rdata[lvl];
    k_x0 = (state == S_REC && cfg_q.remove_approx && last_lvl) ? '0 : a_rd;
    k_c0 = (state == S_REC) ? coef_q[F_REC_LO][k1] : coef_q[F_DEC_LO][k1];
    k_c1 = (state == S_REC) ? coef_q[F_REC_HI][k1] : coef_q[F_DEC_HI][k1];
  end

  wd_global_kernel u_kernel (
    .clk, .rst_n,
    .mode(kmode), .en(v1), .first(first1), .last(last1),
    .x0(k_x0), .x1(d_rd), .c0(k_c0), .c1(k_c1),
    .thr(cfg_q.auto_thr ? est_thr[lvl] : host_thr_q[lvl]),
    .out_valid(k_out_valid), .y0(k_y0), .y1(k_y1)
  );

  // ----------------------------------------------------- noise threshold update
  wd_thr_estimator #(.LEVELS(LEVELS), .BLEN_MX(BLEN_MX)) u_est (
    .clk, .rst_n, .blen(cfg_q.blen),
    .in_valid(state == S_DEC && k_out_valid), .in_sample(k_y1),
    .start(est_start), .level(lvl),
    .busy(est_busy), .done(est_done), .th(est_thr)
  );

  // ------------------------------------------------------------ write ports
  logic in_fire;
  assign in_fire  = in_valid && in_ready;
  assign in_ready = (state == S_LOAD);

  always_comb begin
    wr_addr    = (state == S_LOAD) ? n : n2;
    bank_wdata = (state == S_LOAD) ? word_t'(in_data) : k_y0;
    bank_we[0] = 1'b0;
    bank_we[1] = 1'b0;
    for (int l = 0; l < LEVELS; l++) det_we[l] = 1'b0;
    if (state == S_LOAD) bank_we[0] = in_fire;
    if (state == S_DEC) begin
      bank_we[~lvl[0]] = k_out_valid;
      det_we[lvl]      = k_out_valid;
    end
    if (state == S_REC) bank_we[lvl[0]] = k_out_valid;
    if (state == S_THR) det_we[lvl]     = k_out_valid;
  end

  // ------------------------------------------------------------- sequencing
  logic pass_end;
  assign pass_end = pass && iss_done && !v1 && !k_out_valid;
  assign busy     = !(state == S_LOAD && n == '0);

  function automatic logic signed [SAMPLE_W-1:0] sat_out(input word_t v);
    if (v > word_t'((1 << (SAMPLE_W - 1)) - 1))  return SAMPLE_W'((1 << (SAMPLE_W - 1)) - 1);
    else if (v < -word_t'(1 << (SAMPLE_W - 1))) return SAMPLE_W'(-(1 << (SAMPLE_W - 1)));
    else                                          return SAMPLE_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      cfg_q      <= '0;
      lvl        <= '0;
      n          <= '0;
      k          <= '0;
      iss_done   <= 1'b0;
      v1         <= 1'b0;
      first1     <= 1'b0;
      last1      <= 1'b0;
      k1         <= '0;
      n1         <= '0;
      n2         <= '0;
      rd_pend    <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      frame_done <= 1'b0;
      est_start  <= 1'b0;
      frames     <= '0;
      for (int f = 0; f < 4; f++)
        for (int t = 0; t < TAPS; t++) coef_q[f][t] <= '0;
      for (int l = 0; l < LEVELS; l++) host_thr_q[l] <= '0;
    end else begin
      frame_done <= 1'b0;
      est_start  <= 1'b0;

      // issue stage -> stage 1 (RAM read in flight)
      v1     <= iss;
      first1 <= (k == '0);
      last1  <= (k == taps_eff - 1'b1);
      k1     <= KW'(k);
      n1     <= n;
      if (v1 && last1) n2 <= n1;
      if (iss) begin
        if (k == taps_eff - 1'b1) begin
          k <= '0;
          if (n == blen_m1) iss_done <= 1'b1;
          else              n <= n + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end

      unique case (state)
        S_LOAD: begin
          if (n == '0) begin
            // parameter set of the coming frame
            cfg_q      <= cfg;
            coef_q     <= coef;
            host_thr_q <= host_thr;
          end
          if (in_fire) begin
            if (n != '0 && n == blen_m1) begin
              n     <= '0;
              lvl   <= '0;
              state <= S_DEC;
            end else begin
              n <= n + 1'b1;
            end
          end
        end
        S_DEC: if (pass_end) begin
          n <= '0; k <= '0; iss_done <= 1'b0;
          est_start <= 1'b1;
          state <= S_EST;
        end
        S_EST: if (est_done) state <= S_THR;
        S_THR: if (pass_end) begin
          n <= '0; k <= '0; iss_done <= 1'b0;
          if (last_lvl) state <= S_REC;
          else begin
            lvl   <= lvl + 1'b1;
            state <= S_DEC;
          end
        end
        S_REC: if (pass_end) begin
          n <= '0; k <= '0; iss_done <= 1'b0;
          if (lvl == '0) state <= S_OUT;
          else           lvl   <= lvl - 1'b1;
        end
        S_OUT: begin
          if (!out_valid && !rd_pend) rd_pend <= 1'b1;
          if (rd_pend) begin
            out_data  <= sat_out(bank_rdata[0]);
            out_valid <= 1'b1;
            rd_pend   <= 1'b0;
          end
          if (out_valid && out_ready) begin
            out_valid <= 1'b0;
            if (n == blen_m1) begin
              n          <= '0;
              frame_done <= 1'b1;
              frames     <= frames + 1'b1;
              state      <= S_LOAD;
            end else begin
              n <= n + 1'b1;
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Output stream rule: data is held while it waits for the consumer
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  // The estimator is only started when it is idle
  a_est_idle: assert property (@(posedge clk) disable iff (!rst_n) est_start |-> !est_busy);
  // The sequencer never issues a read beyond the frame
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
    iss |-> (32'(rd_addr) < 32'(cfg_q.blen)));

endmodule
