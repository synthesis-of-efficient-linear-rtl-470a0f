// sling_stm -- next-state network of a SLING generator (the state
// transition matrix A in X(i+1) = A X(i) over GF(2)).
//
// The k-bit state (k = 8*M) is cut into eight M-bit blocks, W0 in the low
// bits up to W7 in the high bits. Each of the 25 sub-matrices M0..M24 of the
// block template (drawn in sling_pkg) is one sling_xform instance reading its
// source block; every next block is the XOR of the transformed blocks of its
// block row, plus, for blocks 2..6, the previous block (the identity blocks
// of the template). The template is the SLING method's; the configuration CFG
// is chosen by parameter.
//
// Interface: state in, nxt out (both K bits). xf_out brings out the output
// of every transformation, Mi in bits [i*M +: M]; these intermediate values
// are themselves linear sequences that can feed additional scan chains.
// Purely combinational. Depth and XOR count depend on CFG: the stored
// configurations keep every next-state bit within two XOR levels.
//
// The design constraints of the SLING method (a bound on the two-input XOR
// count, on the XOR depth and on the internal fan-out of the matrix) are
// evaluated at elaboration from CFG; a configuration that breaks one stops
// elaboration with an error. The figures are published as localparams N_XOR,
// DEPTH and FANOUT. Default bounds are those met by the published generators
// of the same size.
module sling_stm
  import sling_pkg::*;
#(
  parameter int       M   = 8,
  parameter stm_cfg_t CFG = default_cfg(M),
  // Design constraints checked at elaboration: XOR count, XOR depth and
  // internal fan-out of the state transition matrix.
  parameter int       MAX_XOR    = default_max_xor(M),
  parameter int       MAX_DEPTH  = 2,
  parameter int       MAX_FANOUT = default_max_fanout(M),
  localparam int      K   = NUM_BLOCKS * M
) (
  input  logic [K-1:0]            state,
  output logic [K-1:0]            nxt,
  output logic [NUM_XFORMS*M-1:0] xf_out
);

  // The three sub-matrices that make A full-rank by construction.
  if (!is_full_rank(CFG[4].kind, CFG[4].t1) || !is_full_rank(CFG[5].kind, CFG[5].t1) ||
      !is_full_rank(CFG[24].kind, CFG[24].t1)) begin : g_chk_rank
    $error("sling_stm: M4, M5 and M24 must be full-rank transformations");
  end

  // Figures of this configuration, for inspection from outside.
  localparam stm_figures_t FIG    = stm_figures(CFG, M);
  localparam int           N_XOR  = FIG.n_xor;
  localparam int           DEPTH  = FIG.depth;
  localparam int           FANOUT = FIG.fanout;

  if (K > KMAX) begin : g_chk_size
    $error("sling_stm: at most %0d state bits", KMAX);
  end
  if (N_XOR > MAX_XOR || DEPTH > MAX_DEPTH || FANOUT > MAX_FANOUT) begin : g_chk_bounds
    $error("sling_stm: configuration needs %0d XORs, depth %0d, fan-out %0d; bounds %0d, %0d, %0d",
           N_XOR, DEPTH, FANOUT, MAX_XOR, MAX_DEPTH, MAX_FANOUT);
  end

  logic [M-1:0] blk [NUM_BLOCKS];
  logic [M-1:0] xf  [NUM_XFORMS];

  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_split
    assign blk[b] = state[b*M +: M];
  end

  for (genvar i = 0; i < NUM_XFORMS; i++) begin : g_xf
    sling_xform #(.M(M), .X(CFG[i])) u_xf (
      .din  (blk[XF_COL[i]]),
      .dout (xf[i])
    );
    assign xf_out[i*M +: M] = xf[i];
  end

  always_comb begin
    nxt = '0;
    for (int r = IDENT_FIRST_ROW; r <= IDENT_LAST_ROW; r++)
      nxt[r*M +: M] = blk[r-1];
    for (int i = 0; i < NUM_XFORMS; i++)
      nxt[XF_ROW[i]*M +: M] = nxt[XF_ROW[i]*M +: M] ^ xf[i];
  end

endmodule
