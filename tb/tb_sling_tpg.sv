// tb_sling_tpg -- end-to-end test of the SLING generator at its default size
// (64 bits, eight 8-bit blocks), all parameters left at their defaults.
//
// Sequence: reset (state must equal the single-one seed), free run checked
// cycle by cycle against the reference model in sling_ref_pkg, a stretch
// with en low (state must hold), loads of random seeds (with load and en
// both high, load must win), and further free runs. After a load, 128
// successive values of every scan-chain bit are run through
// Berlekamp-Massey: each chain must have linear complexity 64 and the
// characteristic polynomial computed offline for the default configuration,
// which is primitive, so every chain carries a maximal-length sequence. The
// mean Hamming distance between successive states (dispersion) must lie
// within 40..60 % of the width. Every mechanism (reset, advance, hold, load,
// load-over-enable) is counted and must occur. Prints TB_RESULT.
module tb_sling_tpg;
  import sling_pkg::*;
  import sling_ref_pkg::*;

  localparam int M = 8;
  localparam int K = 64;
  // Characteristic polynomial of CFG_M8, bit j = coefficient of u^j.
  localparam logic [K:0] EXP_POLY = 65'h1157e71526927883f;

  int checks = 0, failures = 0;
  int n_reset = 0, n_advance = 0, n_hold = 0, n_load = 0, n_load_over_en = 0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic [K-1:0] seed_in = '0;
  logic [K-1:0] chains;
  logic [25*M-1:0] xf_chains;

  sling_tpg dut (.*);

  always #5 clk = ~clk;

  logic [K-1:0] model;

  task automatic check(input string what, input logic [K-1:0] exp);
    checks++;
    if (chains !== exp) begin
      failures++;
      $display("FAIL %s: chains=%h expected=%h", what, chains, exp);
    end
  endtask

  // One clock with the given controls; the model follows the documented
  // priority (load, then en).
  task automatic tick(input logic l, input logic e, input logic [K-1:0] s);
    load = l; en = e; seed_in = s;
    @(posedge clk); #1;
    if (l) begin
      model = s; n_load++;
      if (e) n_load_over_en++;
    end else if (e) begin
      model = ref_step(CFG_M8, M, st_t'(model)); n_advance++;
    end else begin
      n_hold++;
    end
    check(l ? "load" : (e ? "advance" : "hold"), model);
  endtask

  task automatic check_xf();
    st_t blk;
    int src;
    for (int i = 0; i < 25; i++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          if (TEMPLATE[r][c] == i) src = c;
      blk = (st_t'(chains) >> (src * M)) & ((st_t'(1) << M) - 1);
      for (int b = 0; b < M; b++) begin
        checks++;
        if (xf_chains[i*M + b] !== xf_bit(CFG_M8[i], blk, M, b)) begin
          failures++;
          $display("FAIL xf_chains M%0d bit %0d", i, b);
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*KMAX-1:0] seq [K];
    logic [KMAX:0] poly;
    int l;
    longint hd;
    logic [K-1:0] prev;
    logic [K-1:0] s;

    // Reset: state must be the single-one seed.
    #12 checks++;
    if (chains !== K'(1)) begin
      failures++;
      $display("FAIL reset value %h", chains);
    end
    n_reset++;
    rst_n = 1'b1;
    model = K'(1);

    // Free run from the reset seed; dispersion over cycles 100..599.
    hd = 0;
    for (int t = 0; t < 600; t++) begin
      prev = chains;
      tick(1'b0, 1'b1, '0);
      if (t >= 100) hd += $countones(chains ^ prev);
      if (t % 50 == 0) check_xf();
    end
    $display("mean Hamming distance between states: %0d.%02d of %0d bits",
             hd / 500, (hd * 100 / 500) % 100, K);
    checks++;
    if (hd * 10 < 500 * K * 4 || hd * 10 > 500 * K * 6) begin
      failures++;
      $display("FAIL dispersion outside 40..60 %%");
    end

    // Hold.
    repeat (20) tick(1'b0, 1'b0, K'($urandom));

    // Random seeds, each followed by a run whose chains feed Berlekamp-Massey.
    for (int trial = 0; trial < 4; trial++) begin
      do s = {$urandom, $urandom}; while (s == '0);
      tick(1'b1, trial[0], s);
      for (int t = 0; t < 2 * K; t++) begin
        for (int j = 0; j < K; j++) seq[j][t] = chains[j];
        tick(1'b0, 1'b1, '0);
        if ($urandom_range(0, 7) == 0) tick(1'b0, 1'b0, '0);
      end
      for (int j = 0; j < K; j++) begin
        l = berlekamp_massey(seq[j], 2 * K, poly);
        checks++;
        if (l != K || poly[K:0] !== EXP_POLY) begin
          failures++;
          $display("FAIL chain %0d: linear complexity %0d, polynomial %h", j, l, poly[K:0]);
        end
      end
      check_xf();
    end

    // Reset in mid-run.
    repeat (10) tick(1'b0, 1'b1, '0);
    rst_n = 1'b0;
    #1 checks++;
    if (chains !== K'(1)) begin
      failures++;
      $display("FAIL asynchronous reset");
    end
    n_reset++;
    @(posedge clk); #1 rst_n = 1'b1; model = K'(1);
    repeat (50) tick(1'b0, 1'b1, '0);

    $display("mechanisms: reset=%0d advance=%0d hold=%0d load=%0d load_over_en=%0d",
             n_reset, n_advance, n_hold, n_load, n_load_over_en);
    if (n_reset == 0 || n_advance == 0 || n_hold == 0 || n_load == 0 || n_load_over_en == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
