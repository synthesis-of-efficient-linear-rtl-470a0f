// sling_xform -- one m-bit linear block transformation of a SLING generator.
//
// A SLING generator is assembled from cheap linear maps applied to m-bit
// slices of its state. This module is one such map, chosen at elaboration
// time by the parameter X (kind plus up to two signed shift amounts):
//
//   T0           zero: the output is 0 whatever the input
//   T1           identity
//   T2(t)        shift by |t| bits, left (towards the MSB) for t>0, right for t<0
//   T3(t)        x ^ T2(t)(x)                       (m-|t| two-input XORs)
//   T4           shift left by one bit
//   T5(t)        shift right by t bits
//   T6(t)        (x >> t) ^ (x << (m-t)); the two halves do not overlap, so
//                this is a rotation right by t and costs no XOR gate
//   T7(t1,t2)    T2(t1)(x) ^ T2(t2)(x); the sign of each argument picks its
//                shift direction
//
// The list of eight transformations and their descriptions follow the SLING
// method. Which direction a positive shift amount means is this design's own
// convention (positive = towards the MSB); only the sign is said to pick it.
// Bits shifted in are zero.
//
// Interface: din (M bits) in, dout (M bits) out. Purely combinational: one
// XOR level at most (T3, T7), no clock.
module sling_xform
  import sling_pkg::*;
#(
  parameter int      M = 8,
  parameter xform_t  X = '{kind: T3_XSHIFT, t1: 8'sd1, t2: 8'sd0}
) (
  input  logic [M-1:0] din,
  output logic [M-1:0] dout
);

  // Shift by a signed amount: positive to the left, negative to the right.
  function automatic logic [M-1:0] shift_s(input logic [M-1:0] v, input int t);
    if (t >= 0) return v << t;
    else        return v >> (-t);
  endfunction

  localparam int T1V = int'(X.t1);
  localparam int T2V = int'(X.t2);

  // Shift amounts must stay inside the block.
  if (T1V <= -M || T1V >= M || T2V <= -M || T2V >= M) begin : g_chk_range
    $error("sling_xform: shift amount out of range for M=%0d", M);
  end
  if (X.kind == T6_SHUFFLE && (T1V < 1 || T1V > M - 1)) begin : g_chk_t6
    $error("sling_xform: T6 needs 1 <= t <= M-1");
  end
  if (X.kind == T5_SHR && T1V < 0) begin : g_chk_t5
    $error("sling_xform: T5 needs t >= 0");
  end

  always_comb begin
    unique case (X.kind)
      T0_ZERO:    dout = '0;
      T1_IDENT:   dout = din;
      T2_SHIFT:   dout = shift_s(din, T1V);
      T3_XSHIFT:  dout = din ^ shift_s(din, T1V);
      T4_SHL1:    dout = din << 1;
      T5_SHR:     dout = din >> T1V;
      T6_SHUFFLE: dout = (din >> T1V) ^ (din << (M - T1V));
      T7_XSHIFT2: dout = shift_s(din, T1V) ^ shift_s(din, T2V);
      default:    dout = '0;
    endcase
  end

endmodule
