// tb_sling_xform -- self-checking test of the eight block transformations.
//
// Instantiates sling_xform for a list of (kind, t1, t2) cases at block
// widths 8 and 5, drives random and walking-one inputs, and compares every
// output with a bit-by-bit reference: output bit i of a shift by t is input
// bit i-t when that index lies inside the block, else 0; T6(t) is the
// rotation taking input bit (i+t) mod m to bit i. Prints TB_RESULT.
module tb_sling_xform;
  import sling_pkg::*;

  localparam int NC = 14;
  localparam xform_t CASES [NC] = '{
    '{kind: T0_ZERO,    t1:  8'sd0, t2:  8'sd0},
    '{kind: T1_IDENT,   t1:  8'sd0, t2:  8'sd0},
    '{kind: T2_SHIFT,   t1:  8'sd3, t2:  8'sd0},
    '{kind: T2_SHIFT,   t1: -8'sd2, t2:  8'sd0},
    '{kind: T3_XSHIFT,  t1:  8'sd1, t2:  8'sd0},
    '{kind: T3_XSHIFT,  t1: -8'sd3, t2:  8'sd0},
    '{kind: T4_SHL1,    t1:  8'sd0, t2:  8'sd0},
    '{kind: T5_SHR,     t1:  8'sd2, t2:  8'sd0},
    '{kind: T5_SHR,     t1:  8'sd0, t2:  8'sd0},
    '{kind: T6_SHUFFLE, t1:  8'sd1, t2:  8'sd0},
    '{kind: T6_SHUFFLE, t1:  8'sd4, t2:  8'sd0},
    '{kind: T7_XSHIFT2, t1:  8'sd2, t2: -8'sd1},
    '{kind: T7_XSHIFT2, t1: -8'sd4, t2: -8'sd1},
    '{kind: T7_XSHIFT2, t1:  8'sd1, t2:  8'sd3}
  };

  int checks = 0, failures = 0;

  // Reference: one output bit from first principles.
  function automatic bit sh_bit(input logic [31:0] v, input int m, input int t, input int i);
    int src = i - t;
    return (src >= 0 && src < m) ? v[src] : 1'b0;
  endfunction
  function automatic logic [31:0] ref_xf(input xform_t x, input logic [31:0] v, input int m);
    logic [31:0] r = '0;
    for (int i = 0; i < m; i++) begin
      case (x.kind)
        T0_ZERO:    r[i] = 1'b0;
        T1_IDENT:   r[i] = v[i];
        T2_SHIFT:   r[i] = sh_bit(v, m, x.t1, i);
        T3_XSHIFT:  r[i] = v[i] ^ sh_bit(v, m, x.t1, i);
        T4_SHL1:    r[i] = sh_bit(v, m, 1, i);
        T5_SHR:     r[i] = sh_bit(v, m, -int'(x.t1), i);
        T6_SHUFFLE: r[i] = v[(i + x.t1) % m];
        T7_XSHIFT2: r[i] = sh_bit(v, m, x.t1, i) ^ sh_bit(v, m, x.t2, i);
        default:    r[i] = 1'b0;
      endcase
    end
    return r;
  endfunction

  logic [7:0] din8;
  logic [4:0] din5;
  logic [7:0] dout8 [NC];
  logic [4:0] dout5 [NC];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    sling_xform #(.M(8), .X(CASES[c])) u8 (.din(din8), .dout(dout8[c]));
    sling_xform #(.M(5), .X(CASES[c])) u5 (.din(din5), .dout(dout5[c]));
  end

  task automatic check_all();
    logic [31:0] e8, e5;
    for (int c = 0; c < NC; c++) begin
      e8 = ref_xf(CASES[c], 32'(din8), 8);
      e5 = ref_xf(CASES[c], 32'(din5), 5);
      checks += 2;
      if (dout8[c] !== e8[7:0]) begin
        failures++;
        $display("FAIL m=8 case %0d kind=%0d t1=%0d t2=%0d in=%h got=%h exp=%h",
                 c, CASES[c].kind, CASES[c].t1, CASES[c].t2, din8, dout8[c], e8[7:0]);
      end
      if (dout5[c] !== e5[4:0]) begin
        failures++;
        $display("FAIL m=5 case %0d kind=%0d in=%h got=%h exp=%h",
                 c, CASES[c].kind, din5, dout5[c], e5[4:0]);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++) begin
      din8 = 8'(1 << b); din5 = 5'(1 << (b % 5));
      #1 check_all();
    end
    for (int n = 0; n < 200; n++) begin
      din8 = 8'($urandom); din5 = 5'($urandom);
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
