// tb_sling_stm -- self-checking test of the SLING next-state network.
//
// Drives sling_stm at block widths 2, 4, 8 and 16 (16..128-bit generators
// with their stored configurations) with walking-one and random states and
// compares the next state with the bit-level reference model of
// sling_ref_pkg, and each transformation output with the reference
// transformation of its source block. The XOR count, depth and fan-out that
// the RTL computes at elaboration are compared with the reference count.
// Prints TB_RESULT.
module tb_sling_stm;
  import sling_pkg::*;
  import sling_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0]  s2,  n2;   logic [25*2-1:0]  x2;
  logic [31:0]  s4,  n4;   logic [25*4-1:0]  x4;
  logic [63:0]  s8,  n8;   logic [25*8-1:0]  x8;
  logic [127:0] s16, n16;  logic [25*16-1:0] x16;

  sling_stm #(.M(2))  u2  (.state(s2),  .nxt(n2),  .xf_out(x2));
  sling_stm #(.M(4))  u4  (.state(s4),  .nxt(n4),  .xf_out(x4));
  sling_stm           u8  (.state(s8),  .nxt(n8),  .xf_out(x8));
  sling_stm #(.M(16)) u16 (.state(s16), .nxt(n16), .xf_out(x16));

  task automatic cmp(input int m, input st_t s, input st_t got, input logic [25*16-1:0] xgot);
    st_t e = ref_step(default_cfg(m), m, s);
    st_t blk;
    int src;
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL m=%0d state=%h next=%h expected=%h", m, s, got, e);
    end
    for (int i = 0; i < 25; i++) begin
      // Column of Mi in the reference template.
      src = -1;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          if (TEMPLATE[r][c] == i) src = c;
      blk = (s >> (src * m)) & ((st_t'(1) << m) - 1);
      for (int b = 0; b < m; b++) begin
        checks++;
        if (xgot[i*m + b] !== xf_bit(default_cfg(m)[i], blk, m, b)) begin
          failures++;
          $display("FAIL m=%0d M%0d bit %0d state=%h", m, i, b, s);
        end
      end
    end
  endtask

  task automatic apply(input st_t s);
    s2 = s[15:0]; s4 = s[31:0]; s8 = s[63:0]; s16 = s;
    #1;
    cmp(2,  st_t'(s2),  st_t'(n2),  (25*16)'(x2));
    cmp(4,  st_t'(s4),  st_t'(n4),  (25*16)'(x4));
    cmp(8,  st_t'(s8),  st_t'(n8),  (25*16)'(x8));
    cmp(16, s16,        n16,        x16);
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Design figures published by the RTL against the reference count.
  task automatic figures(input int m, input int nx, input int dep, input int fan);
    int rx, rd, rf;
    matrix_figures(default_cfg(m), m, rx, rd, rf);
    checks++;
    if (nx != rx || dep != rd || fan != rf) begin
      failures++;
      $display("FAIL m=%0d figures %0d/%0d/%0d, reference %0d/%0d/%0d", m, nx, dep, fan, rx, rd, rf);
    end
  endtask

  initial begin
    st_t s;
    figures(2,  u2.N_XOR,  u2.DEPTH,  u2.FANOUT);
    figures(4,  u4.N_XOR,  u4.DEPTH,  u4.FANOUT);
    figures(8,  u8.N_XOR,  u8.DEPTH,  u8.FANOUT);
    figures(16, u16.N_XOR, u16.DEPTH, u16.FANOUT);
    for (int j = 0; j < 128; j++) apply(st_t'(1) << j);
    for (int n = 0; n < 300; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      apply(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
