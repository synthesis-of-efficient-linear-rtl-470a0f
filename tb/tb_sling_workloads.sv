// tb_sling_workloads -- the generator sizes and measurements of the SLING
// evaluation, run on the stored configurations.
//
// Four generators run side by side: 16 bits (m = 2), 32 bits (m = 4),
// 64 bits (m = 8, the default) and 128 bits (m = 16). For each one:
//   * design figures of the state transition matrix: two-input XOR count,
//     XOR depth and largest fan-out, checked against the bounds met by the
//     published SLING generators of that size (depth 2, fan-out 4 at 32 bits
//     and 5 at 64 and 128 bits, XOR count at most 60 / 162 / 302);
//   * dispersion: mean Hamming distance between successive states over 500
//     clocks from a skewed start (a single one), reported and required to be
//     within 40..60 % of the width over the last 400 of them;
//   * cross-correlation: every pair of scan-chain sequences (length 10000)
//     is correlated at a random time shift in 0..k and in 0..1000, averaged
//     over all pairs, and the pairs with |correlation| > 0.04 are counted.
//     The average must stay below 0.012; the counts are reported;
//   * every scan chain must have linear complexity k and the primitive
//     characteristic polynomial computed offline (Berlekamp-Massey on 2k
//     successive bits), i.e. carry a maximal-length sequence.
//   * shift-induced correlation: the chains that repeat another chain
//     delayed by 1..1000 clocks are counted and reported. The block template
//     cannot avoid all of them (a full-rank M24 copies some bits of W6 into
//     W7 unchanged), so the check only requires at most a quarter of the
//     chains to be such copies; the stored configurations were chosen to
//     keep this number low;
//   * auto-correlation of every chain at a random shift in 1..1000 (mean
//     below 0.012) and the share of ones in every chain (48..52 %).
// The 16-bit generator is small enough to check its period: it must return
// to its seed after exactly 2^16 - 1 clocks and not before. Over one more
// period the phase of every chain relative to chain 0 is found, and the
// smallest phase distance between any two chains is reported (it must not be
// zero, which would mean two identical chains).
// Prints TB_RESULT.
module tb_sling_workloads;
  import sling_pkg::*;
  import sling_ref_pkg::*;

  localparam int NG = 4;
  localparam int MS [NG] = '{2, 4, 8, 16};
  localparam int MAX_XOR [NG] = '{9999, 60, 162, 302};
  localparam int MAX_FAN [NG] = '{4, 4, 5, 5};
  // Characteristic polynomials computed offline for the stored
  // configurations (bit j = coefficient of u^j); all are primitive.
  localparam logic [128:0] EXP_POLY [NG] = '{129'h16719, 129'h130d6baa5,
                                             129'h1157e71526927883f,
                                             129'h1007c5846145bd8e8c83677489687a1d1};
  localparam int SEQ_LEN = 10000;
  localparam int MAX_SHIFT = 1000;

  int checks = 0, failures = 0;
  bit done [NG];

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NG; g++) begin : g_gen
    localparam int M = MS[g];
    localparam int K = 8 * M;

    logic rst_n = 1'b0, en = 1'b0, load = 1'b0;
    logic [K-1:0] seed_in = '0;
    logic [K-1:0] chains;
    logic [25*M-1:0] xf_chains;

    sling_tpg #(.M(M)) dut (.*);

    logic [SEQ_LEN+MAX_SHIFT-1:0] seq [K];

    // |correlation| of chains a and b at shift s, in units of 1/SEQ_LEN.
    function automatic int abs_corr(input int a, input int b, input int s);
      logic [SEQ_LEN-1:0] x;
      int dis, c;
      x = seq[a][SEQ_LEN-1:0] ^ SEQ_LEN'(seq[b] >> s);
      dis = $countones(x);
      c = SEQ_LEN - 2 * dis;
      return c < 0 ? -c : c;
    endfunction

    initial begin
      int nx, dep, fan;
      longint hd, hd_tail;
      logic [K-1:0] prev;
      longint sum_a, sum_b;
      int over_a, over_b, pairs, c;
      int l, n_bad, ones;
      logic [KMAX:0] poly;

      matrix_figures(default_cfg(M), M, nx, dep, fan);
      $display("k=%0d: %0d two-input XORs, XOR depth %0d, max fan-out %0d", K, nx, dep, fan);
      checks++;
      if (dep > 2 || fan > MAX_FAN[g] || nx > MAX_XOR[g]) begin
        failures++;
        $display("FAIL k=%0d design figures outside the bounds", K);
      end

      @(posedge clk); #1 rst_n = 1'b1; en = 1'b1;

      // Dispersion from the single-one reset seed.
      hd = 0; hd_tail = 0;
      for (int t = 0; t < 500; t++) begin
        prev = chains;
        @(posedge clk); #1;
        hd += $countones(chains ^ prev);
        if (t >= 100) hd_tail += $countones(chains ^ prev);
      end
      $display("k=%0d: mean Hamming distance over 500 clocks %0d.%02d (last 400: %0d.%02d), ideal %0d",
               K, hd / 500, (hd * 100 / 500) % 100, hd_tail / 400, (hd_tail * 100 / 400) % 100, K / 2);
      checks++;
      if (hd_tail * 10 < 400 * K * 4 || hd_tail * 10 > 400 * K * 6) begin
        failures++;
        $display("FAIL k=%0d dispersion", K);
      end

      // Collect the scan-chain sequences.
      for (int t = 0; t < SEQ_LEN + MAX_SHIFT; t++) begin
        for (int j = 0; j < K; j++) seq[j][t] = chains[j];
        @(posedge clk); #1;
      end
      // Every chain: linear complexity k and the expected polynomial.
      n_bad = 0;
      for (int j = 0; j < K; j++) begin
        l = berlekamp_massey((2*KMAX)'(seq[j][2*K-1:0]), 2 * K, poly);
        if (l != K || poly !== EXP_POLY[g]) n_bad++;
      end
      $display("k=%0d: %0d of %0d chains with linear complexity k and the expected polynomial",
               K, K - n_bad, K);
      checks++;
      if (n_bad != 0) begin
        failures++;
        $display("FAIL k=%0d: %0d chains are not maximal-length", K, n_bad);
      end

      sum_a = 0; sum_b = 0; over_a = 0; over_b = 0; pairs = 0;
      for (int a = 0; a < K; a++)
        for (int b = a + 1; b < K; b++) begin
          pairs++;
          c = abs_corr(a, b, $urandom_range(0, K));
          sum_a += c; if (c * 100 > 4 * SEQ_LEN) over_a++;
          c = abs_corr(a, b, $urandom_range(0, MAX_SHIFT));
          sum_b += c; if (c * 100 > 4 * SEQ_LEN) over_b++;
        end
      $display("k=%0d: %0d pairs; shift 0..k: mean |corr| 0.%04d, %0d pairs > 0.04; shift 0..1000: mean |corr| 0.%04d, %0d pairs > 0.04",
               K, pairs, int'(sum_a * 10000 / (longint'(pairs) * SEQ_LEN)), over_a,
               int'(sum_b * 10000 / (longint'(pairs) * SEQ_LEN)), over_b);
      checks++;
      if (sum_a * 1000 > longint'(pairs) * SEQ_LEN * 12 || sum_b * 1000 > longint'(pairs) * SEQ_LEN * 12) begin
        failures++;
        $display("FAIL k=%0d mean cross-correlation too high", K);
      end

      // Shift-induced correlation: does any chain repeat another chain (or
      // itself) delayed by 1..1000 clocks? A k-bit window fixes the position
      // within an m-sequence, so comparing k-bit windows is exact.
      begin : shift_copies
        int where [logic [KMAX-1:0]];
        int n_copy = 0, dmin = MAX_SHIFT + 1;
        for (int i = 0; i < K; i++)
          for (int dd = 1; dd <= MAX_SHIFT; dd++)
            where[KMAX'(seq[i][dd +: K])] = dd;
        for (int j = 0; j < K; j++)
          if (where.exists(KMAX'(seq[j][0 +: K]))) begin
            n_copy++;
            if (where[KMAX'(seq[j][0 +: K])] < dmin) dmin = where[KMAX'(seq[j][0 +: K])];
          end
        $display("k=%0d: %0d chains repeat a chain delayed by 1..%0d clocks%s", K, n_copy, MAX_SHIFT,
                 n_copy != 0 ? $sformatf(" (shortest delay %0d)", dmin) : "");
        checks++;
        if (n_copy * 4 > K) begin
          failures++;
          $display("FAIL k=%0d more than a quarter of the chains are delayed copies", K);
        end
      end

      // Auto-correlation at a random shift 1..1000 and balance of ones.
      sum_a = 0; over_a = 0; n_bad = 0;
      for (int j = 0; j < K; j++) begin
        c = abs_corr(j, j, $urandom_range(1, MAX_SHIFT));
        sum_a += c; if (c * 100 > 4 * SEQ_LEN) over_a++;
        ones = $countones(seq[j][SEQ_LEN-1:0]);
        if (ones * 100 < SEQ_LEN * 48 || ones * 100 > SEQ_LEN * 52) n_bad++;
      end
      $display("k=%0d: auto-correlation mean |corr| 0.%04d, %0d chains > 0.04; %0d chains with ones outside 48..52 %%",
               K, int'(sum_a * 10000 / (longint'(K) * SEQ_LEN)), over_a, n_bad);
      checks++;
      if (sum_a * 1000 > longint'(K) * SEQ_LEN * 12 || n_bad != 0) begin
        failures++;
        $display("FAIL k=%0d auto-correlation or balance", K);
      end

      // Full period of the 16-bit generator.
      if (K == 16) begin : period
        int n, d, minph;
        logic [K-1:0] w0, first [K], wj [K];
        int pos0 [logic [K-1:0]];
        int phase [K];
        en = 1'b0; load = 1'b1; seed_in = K'(1);
        @(posedge clk); #1 load = 1'b0; en = 1'b1;
        n = 0;
        do begin
          @(posedge clk); #1 n++;
        end while (chains != K'(1) && n < 70000);
        $display("k=%0d: period %0d", K, n);
        checks++;
        if (n != (1 << K) - 1) begin
          failures++;
          $display("FAIL k=%0d period %0d, expected %0d", K, n, (1 << K) - 1);
        end
        // Phase of every chain relative to chain 0. Each non-zero k-bit
        // window occurs exactly once per period of an m-sequence, so the
        // first window of chain j, looked up among the windows of chain 0,
        // gives its phase.
        for (int t = 0; t < (1 << K) - 1; t++) begin
          w0 = {chains[0], w0[K-1:1]};
          for (int j = 0; j < K; j++) wj[j] = {chains[j], wj[j][K-1:1]};
          if (t >= K - 1) pos0[w0] = t - (K - 1);
          if (t == K - 1) for (int j = 0; j < K; j++) first[j] = wj[j];
          @(posedge clk); #1;
        end
        minph = (1 << K);
        for (int j = 0; j < K; j++) phase[j] = pos0[first[j]];
        for (int a = 0; a < K; a++)
          for (int b = a + 1; b < K; b++) begin
            d = phase[a] - phase[b];
            if (d < 0) d = -d;
            if ((1 << K) - 1 - d < d) d = (1 << K) - 1 - d;
            if (d < minph) minph = d;
          end
        $display("k=%0d: smallest phase shift between two chains %0d (period %0d)",
                 K, minph, (1 << K) - 1);
        checks++;
        if (minph == 0) begin
          failures++;
          $display("FAIL k=%0d two chains carry the same phase", K);
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
