// tb_accuracy_sweep: the accuracy sweep over the number of fraction bits b
// and the number of accumulated samples N, run on the hardware.
//
// The published accuracy table covers b = 1..8 and N = 2..5, with the
// f-segment position delta tuned per b (0.44, 0.453, 0.445, then 0.467 for
// b >= 4). Ten channel instances run side by side for 3 million clocks:
// b = 1..8 at N = 4, each with its row's delta, plus N = 3 and N = 5 at b = 6.
// N = 2 at b = 6 is covered by the distribution test. For every instance the
// testbench computes the exact noise distribution from the table formulas
// (one Box-Muller sample has value n+ with probability sum of 2^-(r*q + q')
// over the (s, r, s') that give it, the sign mirrors it, and N-fold
// convolution gives the noise). It then compares the hardware histogram with
// it: mean, variance, and a chi-square test over bins of about sigma/16, with
// the same wide bound as the distribution test (df + 10*sqrt(2 df)).
//
// After the run it prints the whole grid: the worst relative density error
// of the exact distribution against N(0,1) for |x| < 4 sigma, in units of
// 1e-3, for b = 1..8 and N = 2..5. These are the values the tables of this
// design give. The grid is printed for reference, not checked against
// published figures.
module tb_accuracy_sweep;
  import tb_awgn_ref_pkg::*;

  localparam int CLOCKS = 3_000_000;
  localparam int NINST  = 10;
  localparam int OFF    = 8192;          // histogram offset, covers every value

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

  // delta per number of fraction bits, as in the published sweep.
  function automatic real delta_of(int b);
    case (b)
      1:       return 0.44;
      2:       return 0.453;
      3:       return 0.445;
      default: return 0.467;
    endcase
  endfunction

  // Instance i: b and N.
  function automatic int b_of(int i);
    return (i < 8) ? i + 1 : 6;
  endfunction
  function automatic int n_of(int i);
    return (i < 8) ? 4 : ((i == 8) ? 3 : 5);
  endfunction

  int hist [NINST][2 * OFF];
  int count [NINST];

  for (genvar i = 0; i < NINST; i++) begin : g_inst
    localparam int unsigned BI = b_of(i);
    localparam int unsigned NI = n_of(i);
    localparam int unsigned ZW = 4 + BI + $clog2(NI);
    logic               v;
    logic signed [ZW-1:0] z;
    awgn_channel_emulator #(.B(BI), .N(NI), .DELTA_F(delta_of(BI))) dut (
      .clk, .rst_n, .en, .x_in('0), .sigma('0), .noise_valid(v), .noise(z),
      .y_valid(), .y(), .bm_rank()
    );
    always @(posedge clk) begin
      if (rst_n && v) begin
        hist[i][int'(z) + OFF]++;
        count[i]++;
      end
    end
  end

  // ---- exact distribution ----------------------------------------------------
  typedef real dist_t [];

  // Distribution of one signed Box-Muller sample with b fraction bits and
  // f-segment position delta; index k + half.
  function automatic dist_t bm_dist(int b, real delta, output int half);
    real hbm [];
    dist_t d;
    int mx;
    mx = (ref_f(5, 1, 4, 7, delta) * ref_g(0, 8, 6, 0.5)) / (2 ** (13 - b));
    hbm = new[mx + 1];
    foreach (hbm[i]) hbm[i] = 0.0;
    for (int r = 1; r <= 5; r++)
      for (int s = 1; s < 16; s++)
        for (int sg = 0; sg < 256; sg++) begin
          int np;
          np = (ref_f(r, s, 4, 7, delta) * ref_g(sg, 8, 6, 0.5)) / (2 ** (13 - b));
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

  // Worst relative error of an N-fold distribution (half-width hn, b fraction
  // bits) against N(0,1) within 4 sigma.
  function automatic real worst_error(dist_t dn, int hn, int n, int b);
    real worst, w;
    worst = 0.0;
    w = (2.0 ** (-b)) / $sqrt(real'(n));
    for (int k = -hn; k <= hn; k++) begin
      real x, phi, e;
      x = real'(k) * w;
      if (x > -4.0 && x < 4.0) begin
        phi = $exp(-x * x / 2.0) / $sqrt(2.0 * 3.14159265358979);
        e = (dn[k + hn] / w - phi) / phi;
        if (e < 0.0) e = -e;
        if (e > worst) worst = e;
      end
    end
    return worst;
  endfunction

  task automatic evaluate(int idx);
    dist_t d1, dn;
    int b, n, half, hn, bw, df;
    real chi2, mean_e, var_e, mean_m, var_m, cnt;
    string name;
    b = b_of(idx);
    n = n_of(idx);
    name = $sformatf("N=%0d b=%0d delta=%0.3f", n, b, delta_of(b));
    d1 = bm_dist(b, delta_of(b), half);
    dn = d1;
    for (int i = 1; i < n; i++) dn = conv(dn, d1);
    hn = half * n;
    cnt = real'(count[idx]);
    mean_e = 0.0; var_e = 0.0; mean_m = 0.0; var_m = 0.0;
    for (int k = -hn; k <= hn; k++) begin
      mean_e += real'(k) * dn[k + hn];
      var_e  += real'(k) * real'(k) * dn[k + hn];
      mean_m += real'(k) * real'(hist[idx][k + OFF]);
      var_m  += real'(k) * real'(k) * real'(hist[idx][k + OFF]);
    end
    mean_m /= cnt;
    var_m = var_m / cnt - mean_m * mean_m;
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
    $display("%s: %0d samples, mean %f (exact %f) LSB, variance %f (exact %f) LSB^2, chi2 %f over %0d bins",
             name, count[idx], mean_m, mean_e, var_m, var_e, chi2, df);
    check(count[idx] == CLOCKS / n || count[idx] == CLOCKS / n - 1, {name, ": one sample per N clocks"});
    check(mean_m - mean_e < 5.0 * $sqrt(var_e / cnt) && mean_e - mean_m < 5.0 * $sqrt(var_e / cnt),
          {name, ": mean"});
    check(var_m > var_e * 0.99 && var_m < var_e * 1.01, {name, ": variance"});
    check(chi2 < real'(df) + 10.0 * $sqrt(2.0 * real'(df)), {name, ": chi-square"});
  endtask

  task automatic print_grid();
    $display("worst |relative error| x 1e-3 against N(0,1), |x| < 4 sigma, exact table distributions:");
    $display("  b  delta    N=2        N=3        N=4        N=5");
    for (int b = 1; b <= 8; b++) begin
      dist_t d1, dn;
      int half;
      real e [4];
      d1 = bm_dist(b, delta_of(b), half);
      dn = d1;
      for (int n = 2; n <= 5; n++) begin
        dn = conv(dn, d1);
        e[n - 2] = 1000.0 * worst_error(dn, half * n, n, b);
      end
      $display("  %0d  %0.3f  %9.1f  %9.1f  %9.1f  %9.1f", b, delta_of(b), e[0], e[1], e[2], e[3]);
    end
  endtask

  initial begin
    foreach (count[i]) count[i] = 0;
    foreach (hist[i, j]) hist[i][j] = 0;
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    en    <= 1'b1;
    repeat (CLOCKS) @(posedge clk);
    en <= 1'b0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < NINST; i++) evaluate(i);
    print_grid();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
