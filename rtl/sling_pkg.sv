// sling_pkg -- types and constants shared by the SLING generator modules.
//
// A SLING generator keeps a k-bit state split into n = 8 blocks W0..W7 of
// m bits each (k = 8m). The next state is A*X over GF(2), where A follows a
// fixed block template with 25 free m x m sub-matrices M0..M24, identity
// blocks on one sub-diagonal and zero blocks elsewhere:
//
//        W0   W1   W2   W3   W4   W5   W6   W7
//   W0' [M0   0    M1   0    M2   0    M3   M4 ]
//   W1' [M5   0    M6   0    M7   0    M8   0  ]
//   W2' [0    I    M9   M10  M11  M12  M13  0  ]
//   W3' [0    0    I    M14  M15  M16  M17  0  ]
//   W4' [0    0    0    I    M18  M19  M20  0  ]
//   W5' [0    0    0    0    I    M21  M22  0  ]
//   W6' [0    0    0    0    0    I    M23  0  ]
//   W7' [0    0    0    0    0    0    M24  0  ]
//
// Each Mi is one of eight cheap transformations T0..T7 (see sling_xform).
// If M4, M5 and M24 are full-rank (T1, T3 with t != 0, or T6) the whole
// matrix is full-rank. The template is the SLING method's; the tables below
// encode it as (block row, block column) per sub-matrix.
//
// The CFG_M* constants are complete generator configurations, one per block
// width, found offline by a random search over the template that keeps only
// configurations whose characteristic polynomial is primitive (maximal period
// 2^k - 1) and that meet an XOR-depth bound of 2, a fan-out bound of 4 (32
// bits and below) or 5 (64 and 128 bits) and an XOR-count bound (60, 162 and
// 302 at 32, 64 and 128 bits). Among those it prefers, first, the fewest
// scan-chain bits that merely repeat another bit delayed by 1..1000 clocks
// (shift-induced correlation), then the most XOR gates (the most mixing).
// The polynomial is given for each.
// These particular configurations are this design's own; the method that
// produced them is SLING's.
package sling_pkg;

  localparam int NUM_BLOCKS = 8;   // n: blocks per generator
  localparam int NUM_XFORMS = 25;  // M0..M24

  typedef enum logic [2:0] {
    T0_ZERO    = 3'd0,
    T1_IDENT   = 3'd1,
    T2_SHIFT   = 3'd2,
    T3_XSHIFT  = 3'd3,
    T4_SHL1    = 3'd4,
    T5_SHR     = 3'd5,
    T6_SHUFFLE = 3'd6,
    T7_XSHIFT2 = 3'd7
  } xform_kind_e;

  // One transformation with its (signed) shift arguments.
  typedef struct packed {
    xform_kind_e      kind;
    logic signed [7:0] t1;
    logic signed [7:0] t2;
  } xform_t;

  // The 25 free sub-matrices of one generator, index i holds Mi.
  typedef xform_t [NUM_XFORMS-1:0] stm_cfg_t;

  // Block row (destination) and block column (source) of each Mi.
  localparam int XF_ROW [NUM_XFORMS] = '{0, 0, 0, 0, 0,  1, 1, 1, 1,
                                         2, 2, 2, 2, 2,  3, 3, 3, 3,
                                         4, 4, 4,  5, 5,  6,  7};
  localparam int XF_COL [NUM_XFORMS] = '{0, 2, 4, 6, 7,  0, 2, 4, 6,
                                         2, 3, 4, 5, 6,  3, 4, 5, 6,
                                         4, 5, 6,  5, 6,  6,  6};
  // Identity blocks: block row r (2..6) receives block column r-1.
  localparam int IDENT_FIRST_ROW = 2;
  localparam int IDENT_LAST_ROW  = 6;

  // True for the transformations that are always full-rank.
  function automatic bit is_full_rank(input xform_kind_e kind, input logic signed [7:0] t1);
    return (kind == T1_IDENT) || (kind == T6_SHUFFLE) ||
           (kind == T3_XSHIFT && t1 != 0);
  endfunction

  // ---------------------------------------------------------------------
  // Design figures of a configuration, evaluated at elaboration. The state
  // transition matrix A is built column by column (the next state of each
  // unit state), then:
  //   XORs    = sum over rows of (ones in the row - 1)
  //   depth   = ceil(log2(most ones in any row))  (balanced XOR trees)
  //   fan-out = most ones in any column           (next-state bits fed by
  //             one flip-flop)
  // ---------------------------------------------------------------------
  localparam int KMAX = 128;
  typedef logic [KMAX-1:0] wide_t;

  typedef struct packed {
    int n_xor;
    int depth;
    int fanout;
  } stm_figures_t;

  function automatic wide_t shift_m(input wide_t v, input int t, input wide_t mask);
    if (t >= 0) return (v << t) & mask;
    else        return v >> (-t);
  endfunction

  // Transformation x applied to the m-bit value v (upper bits of v zero).
  function automatic wide_t xform_value(input xform_t x, input wide_t v, input int m);
    wide_t mask = (wide_t'(1) << m) - 1;
    int t1 = int'(x.t1);
    int t2 = int'(x.t2);
    case (x.kind)
      T1_IDENT:   return v;
      T2_SHIFT:   return shift_m(v, t1, mask);
      T3_XSHIFT:  return v ^ shift_m(v, t1, mask);
      T4_SHL1:    return (v << 1) & mask;
      T5_SHR:     return v >> t1;
      T6_SHUFFLE: return ((v >> t1) ^ (v << (m - t1))) & mask;
      T7_XSHIFT2: return shift_m(v, t1, mask) ^ shift_m(v, t2, mask);
      default:    return '0;
    endcase
  endfunction

  function automatic wide_t stm_step(input stm_cfg_t cfg, input int m, input wide_t s);
    wide_t mask = (wide_t'(1) << m) - 1;
    wide_t n = '0;
    for (int r = IDENT_FIRST_ROW; r <= IDENT_LAST_ROW; r++)
      n ^= ((s >> ((r - 1) * m)) & mask) << (r * m);
    for (int i = 0; i < NUM_XFORMS; i++)
      n ^= xform_value(cfg[i], (s >> (XF_COL[i] * m)) & mask, m) << (XF_ROW[i] * m);
    return n;
  endfunction

  function automatic stm_figures_t stm_figures(input stm_cfg_t cfg, input int m);
    stm_figures_t f = '{n_xor: 0, depth: 0, fanout: 0};
    int rowones [KMAX];
    int maxrow = 0;
    wide_t col;
    for (int i = 0; i < KMAX; i++) rowones[i] = 0;
    for (int j = 0; j < NUM_BLOCKS * m; j++) begin
      col = stm_step(cfg, m, wide_t'(1) << j);
      if ($countones(col) > f.fanout) f.fanout = $countones(col);
      for (int i = 0; i < NUM_BLOCKS * m; i++) rowones[i] += int'(col[i]);
    end
    for (int i = 0; i < NUM_BLOCKS * m; i++) begin
      if (rowones[i] > 1) f.n_xor += rowones[i] - 1;
      if (rowones[i] > maxrow) maxrow = rowones[i];
    end
    while ((1 << f.depth) < maxrow) f.depth++;
    return f;
  endfunction

  // Default design bounds per block width: those met by the published SLING
  // generators of 32, 64 and 128 bits (XOR count; depth 2; fan-out 4 or 5).
  function automatic int default_max_xor(input int m);
    case (m)
      4:       return 60;
      8:       return 162;
      16:      return 302;
      default: return NUM_BLOCKS * m * NUM_BLOCKS * m;
    endcase
  endfunction
  function automatic int default_max_fanout(input int m);
    return (m <= 4) ? 4 : 5;
  endfunction

  // 16-bit generator (m = 2): 21 two-input XORs, XOR depth 2, fan-out 4.
  // Characteristic polynomial (bit i = coefficient of u^i): 17'h16719
  localparam stm_cfg_t CFG_M2 = '{
    /* M24 */ '{kind: T3_XSHIFT, t1: 8'sd1, t2: 8'sd0},
    /* M23 */ '{kind: T6_SHUFFLE, t1: 8'sd1, t2: 8'sd0},
    /* M22 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M21 */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M20 */ '{kind: T7_XSHIFT2, t1: -8'sd1, t2: 8'sd1},
    /* M19 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M18 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M17 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M16 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M15 */ '{kind: T7_XSHIFT2, t1: -8'sd1, t2: 8'sd1},
    /* M14 */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M13 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M12 */ '{kind: T7_XSHIFT2, t1: -8'sd1, t2: 8'sd1},
    /* M11 */ '{kind: T6_SHUFFLE, t1: 8'sd1, t2: 8'sd0},
    /* M10 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M9  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M8  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M7  */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M6  */ '{kind: T7_XSHIFT2, t1: -8'sd1, t2: 8'sd1},
    /* M5  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M4  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M3  */ '{kind: T5_SHR, t1: 8'sd1, t2: 8'sd0},
    /* M2  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M1  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M0  */ '{kind: T3_XSHIFT, t1: -8'sd1, t2: 8'sd0}
  };
  // 32-bit generator (m = 4): 44 two-input XORs, XOR depth 2, fan-out 4.
  // Characteristic polynomial (bit i = coefficient of u^i): 33'h130d6baa5
  localparam stm_cfg_t CFG_M4 = '{
    /* M24 */ '{kind: T3_XSHIFT, t1: -8'sd1, t2: 8'sd0},
    /* M23 */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M22 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M21 */ '{kind: T6_SHUFFLE, t1: 8'sd1, t2: 8'sd0},
    /* M20 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M19 */ '{kind: T2_SHIFT, t1: 8'sd1, t2: 8'sd0},
    /* M18 */ '{kind: T7_XSHIFT2, t1: -8'sd3, t2: 8'sd2},
    /* M17 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M16 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M15 */ '{kind: T3_XSHIFT, t1: -8'sd3, t2: 8'sd0},
    /* M14 */ '{kind: T6_SHUFFLE, t1: 8'sd1, t2: 8'sd0},
    /* M13 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M12 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M11 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M10 */ '{kind: T2_SHIFT, t1: 8'sd1, t2: 8'sd0},
    /* M9  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M8  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M7  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M6  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M5  */ '{kind: T3_XSHIFT, t1: -8'sd2, t2: 8'sd0},
    /* M4  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M3  */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M2  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M1  */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M0  */ '{kind: T5_SHR, t1: 8'sd1, t2: 8'sd0}
  };
  // 64-bit generator (m = 8): 93 two-input XORs, XOR depth 2, fan-out 5.
  // Characteristic polynomial (bit i = coefficient of u^i): 65'h1157e71526927883f
  localparam stm_cfg_t CFG_M8 = '{
    /* M24 */ '{kind: T3_XSHIFT, t1: -8'sd2, t2: 8'sd0},
    /* M23 */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M22 */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M21 */ '{kind: T3_XSHIFT, t1: 8'sd2, t2: 8'sd0},
    /* M20 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M19 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M18 */ '{kind: T4_SHL1, t1: 8'sd0, t2: 8'sd0},
    /* M17 */ '{kind: T6_SHUFFLE, t1: 8'sd1, t2: 8'sd0},
    /* M16 */ '{kind: T2_SHIFT, t1: -8'sd6, t2: 8'sd0},
    /* M15 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M14 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M13 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M12 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M11 */ '{kind: T5_SHR, t1: 8'sd1, t2: 8'sd0},
    /* M10 */ '{kind: T3_XSHIFT, t1: -8'sd3, t2: 8'sd0},
    /* M9  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M8  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M7  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M6  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M5  */ '{kind: T3_XSHIFT, t1: 8'sd3, t2: 8'sd0},
    /* M4  */ '{kind: T3_XSHIFT, t1: 8'sd7, t2: 8'sd0},
    /* M3  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M2  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M1  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M0  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0}
  };
  // 128-bit generator (m = 16): 140 two-input XORs, XOR depth 2, fan-out 5.
  // Characteristic polynomial (bit i = coefficient of u^i): 129'h1007c5846145bd8e8c83677489687a1d1
  localparam stm_cfg_t CFG_M16 = '{
    /* M24 */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M23 */ '{kind: T7_XSHIFT2, t1: 8'sd5, t2: -8'sd3},
    /* M22 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M21 */ '{kind: T3_XSHIFT, t1: 8'sd2, t2: 8'sd0},
    /* M20 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M19 */ '{kind: T6_SHUFFLE, t1: 8'sd3, t2: 8'sd0},
    /* M18 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M17 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M16 */ '{kind: T2_SHIFT, t1: -8'sd5, t2: 8'sd0},
    /* M15 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M14 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M13 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M12 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M11 */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M10 */ '{kind: T6_SHUFFLE, t1: 8'sd1, t2: 8'sd0},
    /* M9  */ '{kind: T2_SHIFT, t1: 8'sd15, t2: 8'sd0},
    /* M8  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M7  */ '{kind: T5_SHR, t1: 8'sd6, t2: 8'sd0},
    /* M6  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M5  */ '{kind: T6_SHUFFLE, t1: 8'sd13, t2: 8'sd0},
    /* M4  */ '{kind: T6_SHUFFLE, t1: 8'sd7, t2: 8'sd0},
    /* M3  */ '{kind: T1_IDENT, t1: 8'sd0, t2: 8'sd0},
    /* M2  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M1  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0},
    /* M0  */ '{kind: T0_ZERO, t1: 8'sd0, t2: 8'sd0}
  };

  // Default configuration for a block width; widths without a stored
  // configuration fall back to the 64-bit one and fail its range checks.
  function automatic stm_cfg_t default_cfg(input int m);
    case (m)
      2:       return CFG_M2;
      4:       return CFG_M4;
      16:      return CFG_M16;
      default: return CFG_M8;
    endcase
  endfunction

endpackage
