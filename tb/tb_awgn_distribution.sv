// tb_awgn_distribution: distribution of the generated noise against the
// exact distribution of the quantised tables.
//
// Three channel instances run side by side for 4 million clocks: the default
// configuration (N = 4, b = 6) and the accuracy-sweep points N = 2, b = 6 and
// N = 4, b = 8. For each, the testbench computes the exact probability of
// every noise value from the table formulas: one Box-Muller sample takes the
// value n+ with probability sum of 2^-(r*q + q') over the (s, r, s') that give
// it, the sign mirrors it, and N-fold convolution gives the noise. The
// hardware's histogram, grouped into bins of about sigma/16, is compared with
// this distribution by a chi-square test, and the sample mean and variance are
// compared with the exact ones. The worst relative error of the exact density
// against N(0,1) for |x| < 4 sigma (the accuracy figure of merit) is printed
// for each configuration. A fourth instance uses the one's complement sign:
// its noise mean must be -N/2 LSB and the back end must remove it from y.
// The chi-square bound is wide (df + 10*sqrt(2 df))
// because the LFSR sequences are deterministic and not fully independent of
// one another; with N = 2 the statistic comes out about 1.7 times df.
module tb_awgn_distribution;
  import tb_awgn_ref_pkg::*;

  localparam int CLOCKS = 4_000_000;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (CLOCKS + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- three configurations -------------------------------------------------
  logic               v0, v1, v2;
  logic signed [11:0] z0;
  logic signed [10:0] z1;
  logic signed [13:0] z2;

  awgn_channel_emulator dut0 (
    .clk, .rst_n, .en, .x_in('0), .sigma('0), .noise_valid(v0), .noise(z0),
    .y_valid(), .y(), .bm_rank()
  );
  awgn_channel_emulator #(.N(2)) dut1 (
    .clk, .rst_n, .en, .x_in('0), .sigma('0), .noise_valid(v1), .noise(z1),
    .y_valid(), .y(), .bm_rank()
  );
  awgn_channel_emulator #(.B(8)) dut2 (
    .clk, .rst_n, .en, .x_in('0), .sigma('0), .noise_valid(v2), .noise(z2),
    .y_valid(), .y(), .bm_rank()
  );

  // One's complement sign: noise mean -N/2 LSB, removed again in y.
  logic               v3, yv3;
  logic signed [11:0] z3;
  logic signed [15:0] y3;
  awgn_channel_emulator #(.ONES_COMPLEMENT(1'b1)) dut3 (
    .clk, .rst_n, .en, .x_in('0), .sigma(8'd64), .noise_valid(v3), .noise(z3),
    .y_valid(yv3), .y(y3), .bm_rank()
  );
  real sum_z3, sum_y3, sum_y3_exp;
  int  n_z3, n_y3;

  always @(posedge clk) begin
    if (rst_n) begin
      if (v3) begin
        sum_z3 += real'(z3);
        // With sigma = 1 and x = 0: y = floor((z + 2) / 2) exactly.
        sum_y3_exp += $floor((real'(z3) + 2.0) / 2.0);
        n_z3++;
      end
      if (yv3) begin sum_y3 += real'(y3); n_y3++; end
    end
  end

  localparam int OFF = 8192;            // histogram offset, covers every value
  int hist [3][2 * OFF];
  int count [3];

  always @(posedge clk) begin
    if (rst_n) begin
      if (v0) begin hist[0][int'(z0) + OFF]++; count[0]++; end
      if (v1) begin hist[1][int'(z1) + OFF]++; count[1]++; end
      if (v2) begin hist[2][int'(z2) + OFF]++; count[2]++; end
    end
  end

  // ---- exact distribution ----------------------------------------------------
  typedef real dist_t [];

  // Distribution of one signed Box-Muller sample, index k + max.
  function automatic dist_t bm_dist(int b, output int half);
    real hbm [];
    dist_t d;
    int mx;
    mx = (ref_f(5, 1, 4, 7, 0.467) * ref_g(0, 8, 6, 0.5)) / (2 ** (13 - b));
    hbm = new[mx + 1];
    foreach (hbm[i]) hbm[i] = 0.0;
    for (int r = 1; r <= 5; r++)
      for (int s = 1; s < 16; s++)
        for (int sg = 0; sg < 256; sg++) begin
          int np;
          np = (ref_f(r, s, 4, 7, 0.467) * ref_g(sg, 8, 6, 0.5)) / (2 ** (13 - b));
          hbm[np] += 2.0 ** (-(4 * r + 8));
        end
    hbm[0] += 2.0 ** (-20);                  // all-zero address gives 0
    d = new[2 * mx + 1];
    d[mx] = hbm[0];
    for (int k = 1; k <= mx; k++) begin
      d[mx + k] = 0.5 * hbm[k];
      d[mx - k] = 0.5 * hbm[k];
    end
    half = mx;
    return d;
  endfunction

  function automatic dist_t conv(dist_t a, dist_t b);
    dist_t c;
    c = new[a.size() + b.size() - 1];
    foreach (c[i]) c[i] = 0.0;
    for (int i = 0; i < a.size(); i++)
      if (a[i] != 0.0)
        for (int j = 0; j < b.size(); j++) c[i + j] += a[i] * b[j];
    return c;
  endfunction

  task automatic evaluate(int idx, int n, int b, string name);
    dist_t d1, dn;
    int half, hn, bw, df;
    real chi2, mean_e, var_e, mean_m, var_m, worst, cnt;
    d1 = bm_dist(b, half);
    dn = d1;
    for (int i = 1; i < n; i++) dn = conv(dn, d1);
    hn = half * n;
    cnt = real'(count[idx]);
    // Exact and measured moments, in LSB.
    mean_e = 0.0; var_e = 0.0; mean_m = 0.0; var_m = 0.0;
    for (int k = -hn; k <= hn; k++) begin
      mean_e += real'(k) * dn[k + hn];
      var_e  += real'(k) * real'(k) * dn[k + hn];
      mean_m += real'(k) * real'(hist[idx][k + OFF]);
      var_m  += real'(k) * real'(k) * real'(hist[idx][k + OFF]);
    end
    mean_m /= cnt;
    var_m = var_m / cnt - mean_m * mean_m;
    // Worst relative density error against N(0,1) within 4 sigma.
    worst = 0.0;
    for (int k = -hn; k <= hn; k++) begin
      real x, w, phi, e;
      w = (2.0 ** (-b)) / $sqrt(real'(n));
      x = real'(k) * w;
      if (x > -4.0 && x < 4.0) begin
        phi = $exp(-x * x / 2.0) / $sqrt(2.0 * 3.14159265358979);
        e = (dn[k + hn] / w - phi) / phi;
        if (e < 0.0) e = -e;
        if (e > worst) worst = e;
      end
    end
    // Chi-square over bins of about sigma/16 with at least 20 expected samples.
    bw = int'($sqrt(var_e) / 16.0);
    if (bw < 1) bw = 1;
    chi2 = 0.0;
    df = 0;
    for (int lo = -hn; lo <= hn; lo += bw) begin
      real pe, obs;
      pe = 0.0; obs = 0.0;
      for (int k = lo; k < lo + bw && k <= hn; k++) begin
        pe  += dn[k + hn];
        obs += real'(hist[idx][k + OFF]);
      end
      if (pe * cnt >= 20.0) begin
        chi2 += (obs - pe * cnt) * (obs - pe * cnt) / (pe * cnt);
        df++;
      end
    end
    $display("%s: %0d samples, mean %f (exact %f) LSB, variance %f (exact %f) LSB^2, chi2 %f over %0d bins, max |rel. error| vs N(0,1) within 4 sigma %f",
             name, count[idx], mean_m, mean_e, var_m, var_e, chi2, df, worst);
    check(count[idx] > 0, {name, ": samples produced"});
    check(mean_m - mean_e < 5.0 * $sqrt(var_e / cnt) && mean_e - mean_m < 5.0 * $sqrt(var_e / cnt),
          {name, ": mean"});
    check(var_m > var_e * 0.99 && var_m < var_e * 1.01, {name, ": variance"});
    check(chi2 < real'(df) + 10.0 * $sqrt(2.0 * real'(df)), {name, ": chi-square"});
  endtask

  initial begin
    foreach (count[i]) count[i] = 0;
    sum_z3 = 0.0; sum_y3 = 0.0; sum_y3_exp = 0.0; n_z3 = 0; n_y3 = 0;
    foreach (hist[i, j]) hist[i][j] = 0;
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    en    <= 1'b1;
    repeat (CLOCKS) @(posedge clk);
    en <= 1'b0;
    repeat (20) @(posedge clk);
    evaluate(0, 4, 6, "N=4 b=6");
    evaluate(1, 2, 6, "N=2 b=6");
    evaluate(2, 4, 8, "N=4 b=8");
    $display("one's complement: %0d samples, noise mean %f LSB (expected -2), y mean %f LSB",
             n_z3, sum_z3 / real'(n_z3), sum_y3 / real'(n_y3));
    check(n_z3 > 0 && n_y3 == n_z3, "one's complement: samples produced");
    check(sum_z3 / real'(n_z3) > -2.0 - 0.65 && sum_z3 / real'(n_z3) < -2.0 + 0.65,
          "one's complement: noise mean -N/2 LSB (5 standard errors)");
    check(sum_y3 == sum_y3_exp, "one's complement: y is the mean-corrected, halved noise");
    check(sum_y3 / real'(n_y3) > -0.25 - 0.33 && sum_y3 / real'(n_y3) < -0.25 + 0.33,
          "one's complement: y mean -1/4 LSB (floor bias only)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
