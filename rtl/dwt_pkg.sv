// dwt_pkg: types and constants shared by the 2-D DWT pipeline.
//
// The pipeline computes, at every decomposition level j, four subbands of the
// LL data S(j-1) of the previous level with four 2-D L x M FIR filters and
// decimation by two in both directions (periodic extension at the borders):
//
//   Y_P(m,c) = sum_{k<L} sum_{i<M} H_P(k,i) * S((2m-k) mod n, (2c-i) mod n)
//
// for P in {LL, HL, LH, HH}.  The filter unit evaluates this as four
// independent (L/2 x M/2)-tap channels (even/odd rows x even/odd columns).
//
// Filter coefficients.  The architecture accepts any L x M coefficient
// matrices (separable or not); this package fills them with the 4-tap
// Daubechies (db2) filter pair, as an outer product, scaled to integers:
//   h = round(64 * db2 lowpass)  = {31, 54, 14, -8}
//   g(k) = (-1)^k * h(L-1-k)     = {-8, -14, 54, -31}
//   H_XY(k,i) = f_X(k) * f_Y(i),  X applies to rows (k), Y to columns (i).
// A result is rounded and shifted right by COEF_FRAC = 13 bits (the 64*64
// integer scale plus a further factor of two, so that the LL gain stays
// near one from level to level) and saturated to DATA_W bits.  The choice
// of filter, the integer scale and the data widths are this design's own.
package dwt_pkg;

  localparam int unsigned PIX_W     = 8;   // raw pixel width (unsigned)
  localparam int unsigned DATA_W    = 16;  // LL / subband sample width (signed)
  localparam int unsigned COEF_W    = 16;  // filter coefficient width (signed)
  localparam int unsigned COEF_FRAC = 13;  // right shift applied to a sum
  localparam int unsigned ACC_W     = 40;  // accumulator width
  localparam int unsigned FL        = 4;   // L: filter rows
  localparam int unsigned FM        = 4;   // M: filter columns
  localparam int unsigned HL2       = FL / 2;
  localparam int unsigned HM2       = FM / 2;
  localparam int unsigned CRD_W     = 12;  // row / column field width
  localparam int unsigned LVL_W     = 4;   // level field width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Subband code; the first letter is the filter along rows (k),
  // the second the filter along columns (i).
  typedef enum logic [1:0] {
    SB_LL = 2'd0,
    SB_HL = 2'd1,
    SB_LH = 2'd2,
    SB_HH = 2'd3
  } subband_e;

  // Four sub-windows of one L x M window: [row parity][col parity][k'][i'].
  // Element [ro][co][kk][ii] holds S(2m - (2kk+ro), 2c - (2ii+co)).
  typedef sample_t subwin_t [2][2][HL2][HM2];

  // One output coefficient.
  typedef struct packed {
    logic [LVL_W-1:0] level;
    subband_e         sb;
    logic [CRD_W-1:0] row;
    logic [CRD_W-1:0] col;
    sample_t          data;
  } coef_out_t;

  // 1-D integer taps.
  function automatic int lo_tap(int k);
    case (k)
      0: return 31;
      1: return 54;
      2: return 14;
      default: return -8;
    endcase
  endfunction

  function automatic int hi_tap(int k);
    int s;
    s = (k % 2 == 0) ? 1 : -1;
    return s * lo_tap(FL - 1 - k);
  endfunction

  // H_P(k,i) for subband P.
  function automatic int coef(subband_e sb, int k, int i);
    int fr, fc;
    fr = (sb == SB_LL || sb == SB_LH) ? lo_tap(k) : hi_tap(k);
    fc = (sb == SB_LL || sb == SB_HL) ? lo_tap(i) : hi_tap(i);
    return fr * fc;
  endfunction

  // Round, shift and saturate an accumulated sum.
  function automatic sample_t scale_sat(logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] r;
    r = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > ACC_W'(signed'(2 ** (DATA_W - 1) - 1)))
      return sample_t'(2 ** (DATA_W - 1) - 1);
    else if (r < -ACC_W'(signed'(2 ** (DATA_W - 1))))
      return sample_t'(-(2 ** (DATA_W - 1)));
    else
      return sample_t'(r);
  endfunction

endpackage
