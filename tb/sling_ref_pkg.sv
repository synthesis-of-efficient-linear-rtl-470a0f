// sling_ref_pkg -- reference model of a SLING generator for the testbenches.
//
// Written independently of the RTL: the block template is held as an 8x8
// table of block codes (sub-matrix index, identity or zero) and every next
// state bit is formed bit by bit from the transformation definitions. Also
// holds Berlekamp-Massey (linear complexity and connection polynomial of a
// bit sequence), which the generator tests use to confirm the characteristic
// polynomial, and helpers to measure XOR count, XOR depth and fan-out of the
// state transition matrix. States up to 128 bits.
package sling_ref_pkg;
  import sling_pkg::*;

  localparam int KMAX = 128;
  typedef logic [KMAX-1:0] st_t;

  localparam int Z = -1;  // zero block
  localparam int I = -2;  // identity block
  // TEMPLATE[r][c]: which sub-matrix sits at block row r, block column c.
  localparam int TEMPLATE [8][8] = '{
    '{ 0,  Z,  1,  Z,  2,  Z,  3,  4},
    '{ 5,  Z,  6,  Z,  7,  Z,  8,  Z},
    '{ Z,  I,  9, 10, 11, 12, 13,  Z},
    '{ Z,  Z,  I, 14, 15, 16, 17,  Z},
    '{ Z,  Z,  Z,  I, 18, 19, 20,  Z},
    '{ Z,  Z,  Z,  Z,  I, 21, 22,  Z},
    '{ Z,  Z,  Z,  Z,  Z,  I, 23,  Z},
    '{ Z,  Z,  Z,  Z,  Z,  Z, 24,  Z}
  };

  function automatic bit sh_bit(input st_t v, input int m, input int t, input int i);
    int src = i - t;
    return (src >= 0 && src < m) ? v[src] : 1'b0;
  endfunction

  // Output bit i of transformation x applied to the m-bit value v.
  function automatic bit xf_bit(input xform_t x, input st_t v, input int m, input int i);
    case (x.kind)
      T0_ZERO:    return 1'b0;
      T1_IDENT:   return v[i];
      T2_SHIFT:   return sh_bit(v, m, x.t1, i);
      T3_XSHIFT:  return v[i] ^ sh_bit(v, m, x.t1, i);
      T4_SHL1:    return sh_bit(v, m, 1, i);
      T5_SHR:     return sh_bit(v, m, -int'(x.t1), i);
      T6_SHUFFLE: return v[(i + x.t1) % m];
      T7_XSHIFT2: return sh_bit(v, m, x.t1, i) ^ sh_bit(v, m, x.t2, i);
      default:    return 1'b0;
    endcase
  endfunction

  function automatic st_t ref_step(input stm_cfg_t cfg, input int m, input st_t s);
    st_t n = '0;
    st_t blk;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        blk = (s >> (c * m)) & ((st_t'(1) << m) - 1);
        for (int i = 0; i < m; i++) begin
          if (TEMPLATE[r][c] == I)
            n[r*m + i] ^= blk[i];
          else if (TEMPLATE[r][c] >= 0)
            n[r*m + i] ^= xf_bit(cfg[TEMPLATE[r][c]], blk, m, i);
        end
      end
    return n;
  endfunction

  // Design figures of the matrix: two-input XORs (sum over rows of ones-1),
  // XOR depth (ceil log2 of the densest row) and fan-out (densest column).
  function automatic void matrix_figures(input stm_cfg_t cfg, input int m,
                                         output int n_xor, output int depth,
                                         output int fanout);
    int k = 8 * m;
    int rowones [KMAX];
    int maxrow = 0;
    st_t col;
    n_xor = 0; depth = 0; fanout = 0;
    for (int i = 0; i < k; i++) rowones[i] = 0;
    for (int j = 0; j < k; j++) begin
      col = ref_step(cfg, m, st_t'(1) << j);
      if ($countones(col) > fanout) fanout = $countones(col);
      for (int i = 0; i < k; i++) rowones[i] += int'(col[i]);
    end
    for (int i = 0; i < k; i++) begin
      if (rowones[i] > 1) n_xor += rowones[i] - 1;
      if (rowones[i] > maxrow) maxrow = rowones[i];
    end
    while ((1 << depth) < maxrow) depth++;
  endfunction

  // Berlekamp-Massey over GF(2). seq holds n bits, seq[0] first. Returns the
  // linear complexity L; poly gets the characteristic polynomial of the
  // shortest LFSR (bit j = coefficient of u^j, degree L).
  function automatic int berlekamp_massey(input logic [2*KMAX-1:0] seq, input int n,
                                          output logic [KMAX:0] poly);
    logic [2*KMAX:0] c, b, t;
    int l = 0, mm = 1;
    bit d;
    c = 1; b = 1;
    for (int i = 0; i < n; i++) begin
      d = seq[i];
      for (int j = 1; j <= l; j++) d ^= c[j] & seq[i-j];
      if (!d) begin
        mm++;
      end else if (2 * l <= i) begin
        t = c;
        c ^= b << mm;
        l = i + 1 - l;
        b = t;
        mm = 1;
      end else begin
        c ^= b << mm;
        mm++;
      end
    end
    poly = '0;
    for (int j = 0; j <= l; j++) poly[l-j] = c[j];
    return l;
  endfunction

endpackage
