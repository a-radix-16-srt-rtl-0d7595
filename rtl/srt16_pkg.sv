// srt16_pkg -- shared constants, types and selection-table generators of the
// radix-16 speculative SRT divider.
//
// Number formats
//   d, the divisor, is a normalized fraction in [1/2,1) given as MANT bits
//   (leading one included).  The partial remainder w is kept in two's
//   complement carry-save form with RES_INT integer bits (sign included) and
//   RES_FRAC = MANT+2 fraction bits, so that w[0] = x/4 holds the dividend
//   without loss.
//
// Quotient digits
//   Radix 16, maximally redundant set limited to a = 12, redundancy
//   rho = 12/15 (as in the original design).  A speculated digit is q_s = q_h + q_l
//   with q_h in {0,+-4,+-8} and q_l in {0,+-1,+-2,+-4}; +-11 cannot be formed
//   that way and is reached only through a correction, as the original
//   design does.  Correction digits are in {-2..+2}.
//
// Selection tables
//   The original design synthesizes its tables with boolean relations and does not
//   print them.  The tables here are this design's own: they are computed at
//   elaboration by the functions below from the bounds of the speculation method.
//   For every table cell the set of residual/divisor pairs that fall in that
//   cell is a box; the ratio r = w/d over that box lies between the ratios
//   at the box corners.  Each function picks the digit that minimises the
//   worst-case |r - q|, i.e. the worst |w_next|/d.
//   * F^s cell: estimate W of 16w in half units (carry-save truncation error
//     below one unit of 16w), d' = 2 bits after the leading one.  The ratio
//     is clipped to |r| <= 16*rho since a committed residual obeys
//     |w| <= rho*d.  q_h may depend only on the integer part of the estimate
//     (as in the original design), so q_h is chosen per pair of cells.  Worst
//     case speculated residual: |w_s| <= 2.8 d.
//   * F^c cell: estimate of w_s with 2 integer and 4 fraction bits (error
//     below 2^-3), d'' = 2 bits.  Ratios are clipped to |r| <= 2.8.  The
//     digit is 0 (no error) when the whole cell lies within |w_s| <= rho*d,
//     otherwise the one that minimises the worst |w|/d after correction,
//     which never exceeds rho.
//   All ratios are scaled by RSCALE = 1680, which makes every corner ratio
//   an exact integer (denominators 4..8 and 8..16).
package srt16_pkg;

  localparam int MANT       = 53;        // significand bits, leading one included
  localparam int LOG2R      = 4;         // radix 16
  localparam int NDIG       = 14;        // ceil(53/4) quotient digits
  localparam int RES_INT    = 3;         // residual integer bits (with sign)
  localparam int RES_FRAC   = MANT + 2;  // residual fraction bits
  localparam int RES_W      = RES_INT + RES_FRAC;

  localparam int WS_BITS    = 6;         // w' : 5 integer + 1 fraction bit of 16w
  localparam int DS_BITS    = 2;         // d'
  localparam int WC_BITS    = 6;         // w'': 2 integer + 4 fraction bits of w_s
  localparam int DC_BITS    = 2;         // d''

  // signed quotient digit, wide enough for -15..15
  typedef logic signed [4:0] digit_t;

  // residual in carry-save form
  typedef struct packed {
    logic [RES_W-1:0] s;
    logic [RES_W-1:0] c;
  } cs_res_t;

  localparam int RSCALE   = 1680;
  localparam int FS_CLIP  = 21504;   // 12.8 * RSCALE
  localparam int FC_CLIP  = 4704;    //  2.8 * RSCALE
  localparam int RHO_S    = 1344;    //  0.8 * RSCALE

  // tables: index {estimate, d'} ; entries are signed digits
  typedef logic [127:0][4:0] qh_table_t;   // {integer part of W (5b), d'}
  typedef logic [255:0][4:0] ql_table_t;   // {W (6b), d'}
  typedef logic [255:0][4:0] fc_table_t;   // {W'' (6b), d''}

  function automatic int imax(int a, int b); return (a > b) ? a : b; endfunction
  function automatic int imin(int a, int b); return (a < b) ? a : b; endfunction

  // worst |r - q| (scaled) over [rmin, rmax]
  function automatic int worst_dev(int rmin, int rmax, int q);
    return imax(rmax - q * RSCALE, q * RSCALE - rmin);
  endfunction

  typedef struct packed {
    int lo;
    int hi;
  } range_t;

  typedef struct packed {
    int cost;
    int q;
  } choice_t;

  // ratio range of a F^s cell; W = estimate of 16w in half units.  An empty
  // (unreachable) cell has lo > hi.
  function automatic range_t fs_range(int w, int i);
    int c0, c1, c2, c3;
    range_t r;
    c0 = (RSCALE * 4 * w) / (4 + i);
    c1 = (RSCALE * 4 * w) / (5 + i);
    c2 = (RSCALE * 4 * (w + 2)) / (4 + i);
    c3 = (RSCALE * 4 * (w + 2)) / (5 + i);
    r.lo = imax(imin(imin(c0, c1), imin(c2, c3)), -FS_CLIP);
    r.hi = imin(imax(imax(c0, c1), imax(c2, c3)), FS_CLIP);
    return r;
  endfunction

  localparam int QH_SET [5] = '{0, 4, -4, 8, -8};
  localparam int QL_SET [7] = '{0, 1, -1, 2, -2, 4, -4};

  // best q_l for a cell given q_h, with its worst deviation
  function automatic choice_t best_ql(range_t r, int qh);
    choice_t b;
    int c;
    b.q    = 0;
    b.cost = 0;
    if (r.lo <= r.hi) begin
      b.cost = 32'h7fffffff;
      for (int k = 0; k < 7; k++) begin
        c = worst_dev(r.lo, r.hi, qh + QL_SET[k]);
        if (c < b.cost) begin
          b.cost = c;
          b.q    = QL_SET[k];
        end
      end
    end
    return b;
  endfunction

  // q_h for integer part n of the estimate (cells W = 2n and 2n+1)
  function automatic int fs_qh(int n, int i);
    range_t r0, r1;
    int     c0, c1, best, bestc;
    r0    = fs_range(2 * n, i);
    r1    = fs_range(2 * n + 1, i);
    best  = 0;
    bestc = 32'h7fffffff;
    for (int h = 0; h < 5; h++) begin
      c0 = best_ql(r0, QH_SET[h]).cost;
      c1 = best_ql(r1, QH_SET[h]).cost;
      if (imax(c0, c1) < bestc) begin
        bestc = imax(c0, c1);
        best  = QH_SET[h];
      end
    end
    return best;
  endfunction

  function automatic qh_table_t build_qh_table();
    qh_table_t t;
    for (int n = -16; n < 16; n++)
      for (int i = 0; i < 4; i++)
        t[((n & 31) << 2) | i] = 5'(fs_qh(n, i));
    return t;
  endfunction

  function automatic ql_table_t build_ql_table();
    ql_table_t t;
    for (int w = -32; w < 32; w++)
      for (int i = 0; i < 4; i++)
        t[((w & 63) << 2) | i] = 5'(best_ql(fs_range(w, i), fs_qh(w >>> 1, i)).q);
    return t;
  endfunction

  // F^c: w'' = W/16, error of the carry-save estimate below 2/16
  function automatic int fc_digit(int w, int i);
    int c0, c1, c2, c3, rmin, rmax, best, bestc, c;
    c0 = (RSCALE / 2 * w) / (4 + i);
    c1 = (RSCALE / 2 * w) / (5 + i);
    c2 = (RSCALE / 2 * (w + 2)) / (4 + i);
    c3 = (RSCALE / 2 * (w + 2)) / (5 + i);
    rmin = imax(imin(imin(c0, c1), imin(c2, c3)), -FC_CLIP);
    rmax = imin(imax(imax(c0, c1), imax(c2, c3)), FC_CLIP);
    if (rmin > rmax) return 0;                          // unreachable cell
    if (worst_dev(rmin, rmax, 0) <= RHO_S) return 0;    // speculation correct
    best  = 0;
    bestc = 32'h7fffffff;
    for (int q = 1; q <= 2; q++)
      for (int sgn = 1; sgn >= -1; sgn -= 2) begin
        c = worst_dev(rmin, rmax, sgn * q);
        if (c < bestc) begin
          bestc = c;
          best  = sgn * q;
        end
      end
    return best;
  endfunction

  function automatic fc_table_t build_fc_table();
    fc_table_t t;
    for (int w = -32; w < 32; w++)
      for (int i = 0; i < 4; i++)
        t[((w & 63) << 2) | i] = 5'(fc_digit(w, i));
    return t;
  endfunction

endpackage
