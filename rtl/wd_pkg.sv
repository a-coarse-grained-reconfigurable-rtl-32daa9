// wd_pkg: widths, constants and shared types of the reconfigurable wavelet
// denoiser.
//
// The denoiser works on frames of b_len signed samples (at most MAX_BLEN = 512)
// and decomposes them into up to MAX_LEVELS = 4 levels with the undecimated
// (a-trous) wavelet transform. Filter coefficients are signed fixed point with
// COEF_FRAC fractional bits, so Haar (1/sqrt2) and Daubechies-2 (largest
// magnitude 0.837) both fit. Internal samples are WORD_W bits wide: each
// analysis level of an orthonormal wavelet can raise the approximation by
// sqrt(2), so four levels need two more bits than the 16-bit input, plus
// margin. The frame length limit, the level count used in the evaluation and
// the threshold scale factor 3.9 follow the description of the design; the
// bit widths, the tap limit and the register map are this design's choices.
package wd_pkg;

  // Sizes
  localparam int unsigned MAX_BLEN   = 512;  // largest frame length
  localparam int unsigned MAX_LEVELS = 4;    // decomposition levels supported
  localparam int unsigned MAX_TAPS   = 4;    // FIR taps per filter (Db2 has 4)
  // Smallest frame: the widest dilated filter span, (MAX_TAPS-1)*2^(MAX_LEVELS-1),
  // must stay below b_len so that circular indexing needs one wrap at most.
  localparam int unsigned MIN_BLEN   = 32;

  // Number formats
  localparam int unsigned SAMPLE_W  = 16;    // input / output sample width
  localparam int unsigned WORD_W    = 20;    // internal sample width
  localparam int unsigned COEF_W    = 16;    // coefficient width
  localparam int unsigned COEF_FRAC = 14;    // coefficient fractional bits
  localparam int unsigned ACC_W     = 40;    // FIR accumulator width

  // Threshold scale factor SC = 3.9, held with 8 fractional bits
  localparam int unsigned SC_FRAC = 8;
  localparam int unsigned SC_Q    = 998;     // round(3.9 * 256)

  // Register bus
  localparam int unsigned REG_AW = 8;
  localparam int unsigned REG_DW = 32;

  // Register map (word addresses)
  localparam logic [REG_AW-1:0] RA_CTRL   = 8'h00; // [2:0] levels, [3] remove approx, [4] auto threshold
  localparam logic [REG_AW-1:0] RA_NTAPS  = 8'h01; // [2:0] taps per filter
  localparam logic [REG_AW-1:0] RA_BLEN   = 8'h02; // [9:0] frame length
  localparam logic [REG_AW-1:0] RA_STATUS = 8'h03; // read only: [0] busy, [15:8] frames done
  localparam logic [REG_AW-1:0] RA_THR    = 8'h10; // 0x10+j: host threshold of level j
  localparam logic [REG_AW-1:0] RA_ETHR   = 8'h18; // 0x18+j: read only, estimated threshold of level j
  localparam logic [REG_AW-1:0] RA_COEF   = 8'h20; // 0x20 + 8*f + k: coefficient k of filter f

  // Filter sets held in the coefficient bank
  typedef enum logic [1:0] {
    F_DEC_LO = 2'd0,   // analysis low pass  h
    F_DEC_HI = 2'd1,   // analysis high pass g
    F_REC_LO = 2'd2,   // synthesis low pass
    F_REC_HI = 2'd3    // synthesis high pass
  } filter_e;

  // Configuration of the shared datapath: one per kernel merged into it
  typedef enum logic [1:0] {
    KM_DEC = 2'd0,     // decomposition: one input, two filters in parallel
    KM_REC = 2'd1,     // recomposition: two inputs summed into one output
    KM_THR = 2'd2      // hard thresholding of detail samples
  } kmode_e;

  typedef logic signed [WORD_W-1:0]   word_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic        [WORD_W-1:0]   thr_t;    // thresholds are magnitudes
  typedef logic        [$clog2(MAX_BLEN+1)-1:0] blen_t;

  // Runtime parameter set as seen by the datapath
  typedef struct packed {
    logic [2:0] levels;        // N, 1..MAX_LEVELS
    logic       remove_approx; // drop a_N before recomposition (band pass)
    logic       auto_thr;      // use estimated instead of host thresholds
    logic [2:0] ntaps;         // taps per filter, 1..MAX_TAPS
    blen_t      blen;          // samples per frame
  } cfg_t;

endpackage
