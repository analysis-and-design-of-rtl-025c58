// r2r_pkg: filter definitions shared by the radix-2^r multiplierless FIR filters.
//
// The five benchmark low-pass filters G1, Y1, Y2, A1 and L2 are linear-phase
// (symmetric impulse response), so only the first ceil(L/2) coefficients
// h(0)..h(ceil(L/2)-1) are stored; h(L-1-k) = h(k).
//
// <NAME>_REC[u] holds distinct coefficient u and its radix-2^r recoding as
//   '{h(u), m0, s0, m1, s1, m2, s2}   with  h(u) = m0<<s0 + m1<<s1 + m2<<s2,
// where each m is a signed odd fundamental (or +-1) and m = 0 marks an unused
// term. The hardware builds h(u)*x from at most three shifted fundamentals.
//
// <NAME>_FUND[i] lists the odd positive fundamentals the multiplier block
// computes, as '{value, a, a_sh, b, b_sh} with value = a<<a_sh + b<<b_sh, where
// a is a positive earlier fundamental and b a signed one. Entry 0 is the input
// itself (value 1). A value of 0 ends the list.
//
// Coefficients, recodings and fundamentals follow the published benchmark
// recodings (radix-2^4 for G1 and A1, 2^6 for Y1, 2^5 for Y2 and L2), with
// these choices of this design: Y1 uses 17, Y2 uses 9 and L2 uses 9, 13 and 15
// as fundamentals, each built here with one adder; Y2's coefficient 9 is
// recoded as +1<<3 +1<<0; and L2's centre tap h(31) is 996, the value that best
// meets L2's stop-band specification given the other 31 coefficients.
//
// Filter length L follows the benchmark definitions (16, 30, 34, 59, 63 taps).
// X_WIDTH, the input sample width, is this design's choice.
package r2r_pkg;

  typedef enum logic [2:0] {
    FILT_G1 = 3'd0,
    FILT_Y1 = 3'd1,
    FILT_Y2 = 3'd2,
    FILT_A1 = 3'd3,
    FILT_L2 = 3'd4
  } filt_e;

  localparam int X_WIDTH    = 8;   // signed input sample width
  localparam int MAX_UNIQUE = 32;  // distinct coefficients of the longest filter
  localparam int MAX_FUND   = 7;   // fundamentals (input included) of the largest MCM block
  localparam int MAX_TERMS  = 3;   // shifted fundamentals per coefficient

  // G1: 16 taps, 8 distinct coefficients h(0)..h(7)
  localparam int G1_REC [MAX_UNIQUE][7] = '{
     0: '{  235,  -5, 0,  -1, 4,   1, 8},
     1: '{  732,   7, 2,  -5, 6,   1,10},
     2: '{  646,   3, 1,   5, 7,   0, 0},
     3: '{   28,   7, 2,   0, 0,   0, 0},
     4: '{ -191,   1, 0,  -3, 6,   0, 0},
     5: '{   31,  -1, 0,   1, 5,   0, 0},
     6: '{   33,   1, 0,   1, 5,   0, 0},
     7: '{  -10,  -5, 1,   0, 0,   0, 0},
    default: 0
  };

  localparam int G1_FUND [MAX_FUND][5] = '{
    0: '{  1,   0, 0,   0, 0},
    1: '{  5,   1, 2,   1, 0},
    2: '{  7,   1, 3,  -1, 0},
    3: '{  3,   1, 1,   1, 0},
    default: 0
  };

  // Y1: 30 taps, 15 distinct coefficients h(0)..h(14)
  localparam int Y1_REC [MAX_UNIQUE][7] = '{
     0: '{   -2,  -1, 1,   0, 0,   0, 0},
     1: '{   -8,  -1, 3,   0, 0,   0, 0},
     2: '{    0,   0, 0,   0, 0,   0, 0},
     3: '{   17,   1, 4,   1, 0,   0, 0},
     4: '{   16,   1, 4,   0, 0,   0, 0},
     5: '{  -21, -17, 0,  -1, 2,   0, 0},
     6: '{  -46, -23, 1,   0, 0,   0, 0},
     7: '{    0,   0, 0,   0, 0,   0, 0},
     8: '{   84,  17, 2,   1, 4,   0, 0},
     9: '{   68,  17, 2,   0, 0,   0, 0},
    10: '{  -92, -23, 2,   0, 0,   0, 0},
    11: '{ -205, -13, 0,  -3, 6,   0, 0},
    12: '{    0,   0, 0,   0, 0,   0, 0},
    13: '{  527,  15, 0,   1, 9,   0, 0},
    14: '{  994, -15, 1,   1,10,   0, 0},
    default: 0
  };

  localparam int Y1_FUND [MAX_FUND][5] = '{
    0: '{  1,   0, 0,   0, 0},
    1: '{ 15,   1, 4,  -1, 0},
    2: '{ 23,  15, 0,   1, 3},
    3: '{ 13,  15, 0,  -1, 1},
    4: '{  3,   1, 1,   1, 0},
    5: '{ 17,   1, 4,   1, 0},
    default: 0
  };

  // Y2: 34 taps, 17 distinct coefficients h(0)..h(16)
  localparam int Y2_REC [MAX_UNIQUE][7] = '{
     0: '{    6,   3, 1,   0, 0,   0, 0},
     1: '{    6,   3, 1,   0, 0,   0, 0},
     2: '{    9,   1, 3,   1, 0,   0, 0},
     3: '{  -22, -11, 1,   0, 0,   0, 0},
     4: '{    0,   0, 0,   0, 0,   0, 0},
     5: '{   43,  11, 0,   1, 5,   0, 0},
     6: '{   36,   1, 5,   1, 2,   0, 0},
     7: '{  -48,  -3, 4,   0, 0,   0, 0},
     8: '{ -101,  -5, 0,  -3, 5,   0, 0},
     9: '{    0,   0, 0,   0, 0,   0, 0},
    10: '{  171,  11, 0,   5, 5,   0, 0},
    11: '{  137,   9, 0,   1, 7,   0, 0},
    12: '{ -182,   5, 1,  -3, 6,   0, 0},
    13: '{ -404,  -5, 2,  -3, 7,   0, 0},
    14: '{  137,   9, 0,   1, 7,   0, 0},
    15: '{ 1020,  -1, 2,   1,10,   0, 0},
    16: '{ 1920,  15, 7,   0, 0,   0, 0},
    default: 0
  };

  localparam int Y2_FUND [MAX_FUND][5] = '{
    0: '{  1,   0, 0,   0, 0},
    1: '{  3,   1, 1,   1, 0},
    2: '{  9,   1, 3,   1, 0},
    3: '{ 11,   9, 0,   1, 1},
    4: '{  5,   1, 2,   1, 0},
    5: '{ 15,   1, 4,  -1, 0},
    default: 0
  };

  // A1: 59 taps, 30 distinct coefficients h(0)..h(29)
  localparam int A1_REC [MAX_UNIQUE][7] = '{
     0: '{    4,   1, 2,   0, 0,   0, 0},
     1: '{    6,   1, 2,   1, 1,   0, 0},
     2: '{    8,   1, 3,   0, 0,   0, 0},
     3: '{    8,   1, 3,   0, 0,   0, 0},
     4: '{    4,   1, 2,   0, 0,   0, 0},
     5: '{   -3,  -1, 1,  -1, 0,   0, 0},
     6: '{  -14,  -7, 1,   0, 0,   0, 0},
     7: '{  -24,  -1, 4,  -1, 3,   0, 0},
     8: '{  -32,  -1, 5,   0, 0,   0, 0},
     9: '{  -32,  -1, 5,   0, 0,   0, 0},
    10: '{  -21,  -5, 0,  -1, 4,   0, 0},
    11: '{    0,   0, 0,   0, 0,   0, 0},
    12: '{   28,   7, 2,   0, 0,   0, 0},
    13: '{   56,   7, 3,   0, 0,   0, 0},
    14: '{   75,  -5, 0,   5, 4,   0, 0},
    15: '{   75,  -5, 0,   5, 4,   0, 0},
    16: '{   50,  -7, 1,   1, 6,   0, 0},
    17: '{    0,   0, 0,   0, 0,   0, 0},
    18: '{  -67,  -3, 0,  -1, 6,   0, 0},
    19: '{ -134,  -3, 1,  -1, 7,   0, 0},
    20: '{ -180,   3, 2,  -3, 6,   0, 0},
    21: '{ -184,  -7, 3,  -1, 7,   0, 0},
    22: '{ -128,  -1, 7,   0, 0,   0, 0},
    23: '{   -4,  -1, 2,   0, 0,   0, 0},
    24: '{  171,  -5, 0,  -5, 4,   1, 8},
    25: '{  402,  -7, 1,  -3, 5,   1, 9},
    26: '{  632,  -1, 3,   5, 7,   0, 0},
    27: '{  833,   1, 0,   1, 6,   3, 8},
    28: '{  969,  -7, 0,  -3, 4,   1,10},
    29: '{ 1018,  -3, 1,   1,10,   0, 0},
    default: 0
  };

  localparam int A1_FUND [MAX_FUND][5] = '{
    0: '{  1,   0, 0,   0, 0},
    1: '{  7,   1, 3,  -1, 0},
    2: '{  5,   1, 2,   1, 0},
    3: '{  3,   1, 1,   1, 0},
    default: 0
  };

  // L2: 63 taps, 32 distinct coefficients h(0)..h(31)
  localparam int L2_REC [MAX_UNIQUE][7] = '{
     0: '{    4,   1, 2,   0, 0,   0, 0},
     1: '{    8,   1, 3,   0, 0,   0, 0},
     2: '{   12,   3, 2,   0, 0,   0, 0},
     3: '{   13,  15, 0,  -1, 1,   0, 0},
     4: '{    9,   1, 3,   1, 0,   0, 0},
     5: '{    0,   0, 0,   0, 0,   0, 0},
     6: '{  -10,  -5, 1,   0, 0,   0, 0},
     7: '{  -16,  -1, 4,   0, 0,   0, 0},
     8: '{  -13, -15, 0,   1, 1,   0, 0},
     9: '{    0,   0, 0,   0, 0,   0, 0},
    10: '{   19, -13, 0,   1, 5,   0, 0},
    11: '{   35,   3, 0,   1, 5,   0, 0},
    12: '{   36,   9, 2,   0, 0,   0, 0},
    13: '{   18,   9, 1,   0, 0,   0, 0},
    14: '{  -15,  -1, 4,   1, 0,   0, 0},
    15: '{  -49,  15, 0,  -1, 6,   0, 0},
    16: '{  -64,  -1, 6,   0, 0,   0, 0},
    17: '{  -48,  -3, 4,   0, 0,   0, 0},
    18: '{    0,   0, 0,   0, 0,   0, 0},
    19: '{   60,   1, 6,  -1, 2,   0, 0},
    20: '{  102, -13, 1,   1, 7,   0, 0},
    21: '{   96,   3, 5,   0, 0,   0, 0},
    22: '{   32,   1, 5,   0, 0,   0, 0},
    23: '{  -72,  -9, 3,   0, 0,   0, 0},
    24: '{ -170,  11, 1,  -3, 6,   0, 0},
    25: '{ -203, -11, 0,  -3, 6,   0, 0},
    26: '{ -124,   1, 2,  -1, 7,   0, 0},
    27: '{   79,  15, 0,   1, 6,   0, 0},
    28: '{  371, -13, 0,   3, 7,   0, 0},
    29: '{  678, -13, 1,  11, 6,   0, 0},
    30: '{  911,  15, 0,  -1, 7,   1,10},
    31: '{  996,   1,10,  -1, 5,   1, 2},
    default: 0
  };

  localparam int L2_FUND [MAX_FUND][5] = '{
    0: '{  1,   0, 0,   0, 0},
    1: '{  3,   1, 1,   1, 0},
    2: '{  5,   1, 2,   1, 0},
    3: '{  9,   1, 3,   1, 0},
    4: '{ 11,   9, 0,   1, 1},
    5: '{ 15,   1, 4,  -1, 0},
    6: '{ 13,  15, 0,  -1, 1},
    default: 0
  };

  // Number of taps L of each filter.
  function automatic int filt_taps(filt_e f);
    case (f)
      FILT_G1: return 16;
      FILT_Y1: return 30;
      FILT_Y2: return 34;
      FILT_A1: return 59;
      FILT_L2: return 63;
      default: return 1;
    endcase
  endfunction

  // Number of distinct coefficients, ceil(L/2).
  function automatic int filt_unique(filt_e f);
    return (filt_taps(f) + 1) / 2;
  endfunction

  function automatic int rec_field(filt_e f, int u, int k);
    if (u < 0 || u >= MAX_UNIQUE || k < 0 || k > 6) return 0;
    case (f)
      FILT_G1: return G1_REC[u][k];
      FILT_Y1: return Y1_REC[u][k];
      FILT_Y2: return Y2_REC[u][k];
      FILT_A1: return A1_REC[u][k];
      FILT_L2: return L2_REC[u][k];
      default: return 0;
    endcase
  endfunction

  function automatic int fund_field(filt_e f, int i, int k);
    if (i < 0 || i >= MAX_FUND || k < 0 || k > 4) return 0;
    case (f)
      FILT_G1: return G1_FUND[i][k];
      FILT_Y1: return Y1_FUND[i][k];
      FILT_Y2: return Y2_FUND[i][k];
      FILT_A1: return A1_FUND[i][k];
      FILT_L2: return L2_FUND[i][k];
      default: return 0;
    endcase
  endfunction

  // Distinct coefficient u and the signed multiplier / shift of its term t.
  function automatic int coef_unique(filt_e f, int u);
    return rec_field(f, u, 0);
  endfunction

  function automatic int term_mult(filt_e f, int u, int t);
    return rec_field(f, u, 1 + 2 * t);
  endfunction

  function automatic int term_shift(filt_e f, int u, int t);
    return rec_field(f, u, 2 + 2 * t);
  endfunction

  // Coefficient of tap k (0 <= k < L), using the symmetry h(L-1-k) = h(k).
  function automatic int coef_tap(filt_e f, int k);
    int u;
    u = (k < filt_unique(f)) ? k : filt_taps(f) - 1 - k;
    return coef_unique(f, u);
  endfunction

  // Number of fundamentals, the input included.
  function automatic int filt_nfund(filt_e f);
    int n;
    n = 0;
    for (int i = 0; i < MAX_FUND; i++)
      if (fund_field(f, i, 0) != 0) n = i + 1;
    return n;
  endfunction

  // Position of fundamental value m in the list, -1 if absent.
  function automatic int fund_index(filt_e f, int m);
    for (int i = 0; i < MAX_FUND; i++)
      if (fund_field(f, i, 0) == m && m != 0) return i;
    return -1;
  endfunction

  function automatic int abs_int(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Sum of |h(k)| over all taps: bounds |y| / max|x|.
  function automatic int sum_abs_coef(filt_e f);
    int s;
    s = 0;
    for (int k = 0; k < filt_taps(f); k++) s += abs_int(coef_tap(f, k));
    return s;
  endfunction

  // Width of a signed fundamental m*x for the largest m of the filter.
  function automatic int fund_width(filt_e f, int xw);
    int mx;
    mx = 1;
    for (int i = 0; i < MAX_FUND; i++)
      if (fund_field(f, i, 0) > mx) mx = fund_field(f, i, 0);
    return xw + $clog2(mx + 1);
  endfunction

  // Output width that can never overflow: xw + ceil(log2(sum|h|)) + 1.
  function automatic int y_width(filt_e f, int xw);
    return xw + $clog2(sum_abs_coef(f)) + 1;
  endfunction

  // Adders in series from x to fundamental i (0 for x itself).
  function automatic int fund_depth(filt_e f, int i);
    int da, db;
    if (i <= 0) return 0;
    da = fund_depth(f, fund_index(f, fund_field(f, i, 1)));
    db = fund_depth(f, fund_index(f, abs_int(fund_field(f, i, 3))));
    return 1 + ((da > db) ? da : db);
  endfunction

  // Adders in series from x to the product h(u)*x, terms summed as
  // (t0 + t1) + t2: the multiplier-block depth plus the product adders.
  function automatic int product_depth(filt_e f, int u);
    int d;
    d = -1;
    for (int t = 0; t < MAX_TERMS; t++) begin
      if (term_mult(f, u, t) != 0) begin
        int dt;
        dt = fund_depth(f, fund_index(f, abs_int(term_mult(f, u, t))));
        if (d < 0) d = dt;
        else d = 1 + ((d > dt) ? d : dt);
      end
    end
    return (d < 0) ? 0 : d;
  endfunction

  // Largest adder depth of the filter's shift-and-add logic (structural
  // adders excluded): the figure the radix was chosen to minimise.
  function automatic int filt_adder_depth(filt_e f);
    int d;
    d = 0;
    for (int u = 0; u < filt_unique(f); u++)
      if (product_depth(f, u) > d) d = product_depth(f, u);
    return d;
  endfunction

endpackage
