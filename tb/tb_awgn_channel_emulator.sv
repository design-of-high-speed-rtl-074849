// tb_awgn_channel_emulator: end-to-end test of the AWGN channel at its
// default (reference) parameters.
//
// A reference model advances its own copies of the eight LFSRs as
// polynomials (state = x^k mod p(x), checked against a direct power every
// 50000 clocks), evaluates the f_r and g tables from their formulas, forms
// each Box-Muller sample, adds groups of four and scales the result into the
// channel output. Every noise sample and every channel output y of the DUT is
// compared exactly with the model; x_in and sigma change randomly each clock.
//
// Also checked: the first noise sample appears N + 3 = 7 clocks after en
// rises and then every 4 clocks (output rate f_clk / 4); en is dropped for a
// few clocks now and then (stall), during which no sample may appear; the
// f_r rank reported with each Box-Muller sample matches the model; over the
// run the mean of the noise is close to 0 and its standard deviation matches
// the exact value 2 * sqrt(E[n^2]) computed from the tables. Mechanisms
// counted, each required at least once: every f_r rank 1..5, negative
// samples, stalls and noise outputs. The all-zero f address (probability
// 2^-20) is counted but not required: the default LFSR lengths 20 and 5
// share the period factor 31 and the seeds used never line it up.
module tb_awgn_channel_emulator;
  import tb_awgn_ref_pkg::*;

  localparam int CYCLES = 1_200_000;
  localparam int NACC = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [11:0] x_in;
  logic        [7:0]  sigma;
  logic               noise_valid;
  logic signed [11:0] noise;
  logic               y_valid;
  logic signed [15:0] y;
  logic [2:0]         bm_rank;

  awgn_channel_emulator dut (
    .clk, .rst_n, .en, .x_in, .sigma, .noise_valid, .noise, .y_valid, .y, .bm_rank
  );

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model -------------------------------------------------------
  int lens [8] = '{20, 17, 13, 7, 5, 22, 21, 15};   // f ranks 1..5, g low, g high, sign
  int nbs  [8] = '{4, 4, 4, 4, 4, 4, 4, 1};
  logic [63:0] st [8];
  logic [63:0] step_poly [8];
  longint unsigned t;                                 // enabled edges so far

  int exp_noise [$];
  int exp_rank [$];
  int grp_sum, grp_cnt;
  int rank_count [6];
  int neg_count, stall_count, out_count;
  real sum_z, sum_z2;

  function automatic int field(int i);
    return int'((st[i] >> (lens[i] - nbs[i])) & ((64'd1 << nbs[i]) - 1));
  endfunction

  // Advance the model by one enabled edge and queue what it produces.
  task automatic model_step();
    int r, sf, sg, np, n;
    t++;
    for (int i = 0; i < 8; i++) st[i] = gf_mulmod(st[i], step_poly[i], poly(lens[i]), lens[i]);
    if (t % 50000 == 0)
      for (int i = 0; i < 8; i++)
        check(st[i] == xpow_mod(t * longint'(nbs[i]), poly(lens[i]), lens[i]), "model LFSR state");
    r = 0;
    for (int i = 4; i >= 0; i--) if (field(i) != 0) r = i + 1;
    sf = (r == 0) ? 0 : field(r - 1);
    sg = field(5) | (field(6) << 4);
    np = (r == 0) ? 0 : (ref_f(r, sf, 4, 7, 0.467) * ref_g(sg, 8, 6, 0.5)) / 128;
    n  = (field(7) != 0) ? -np : np;
    exp_rank.push_back(r);
    grp_sum += n;
    grp_cnt++;
    if (grp_cnt == NACC) begin
      exp_noise.push_back(grp_sum);
      grp_sum = 0;
      grp_cnt = 0;
    end
  endtask

  // Exact E[n^2] of one Box-Muller sample, in LSB^2, from the tables.
  function automatic real bm_second_moment();
    real acc;
    acc = 0.0;
    for (int r = 1; r <= 5; r++)
      for (int s = 1; s < 16; s++)
        for (int sg = 0; sg < 256; sg++) begin
          int np;
          np = (ref_f(r, s, 4, 7, 0.467) * ref_g(sg, 8, 6, 0.5)) / 128;
          acc += real'(np) * real'(np) * (2.0 ** (-(4 * r + 8)));
        end
    return acc;
  endfunction

  // Mirror of the valid pipeline, used only to pair bm_rank with the model.
  logic lv_m, v1_m, nv_m;
  int   y_exp;
  bit   y_pending;
  int   cyc, en_rise_cyc, last_noise_cyc;
  bit   first_seen, continuous;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      lv_m <= 1'b0; v1_m <= 1'b0; nv_m <= 1'b0;
    end else begin
      lv_m <= en;
      v1_m <= lv_m;
      nv_m <= v1_m;
      if (en) model_step();
    end
  end

  // Output checks, just after each edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (nv_m) begin
        int r;
        r = exp_rank.pop_front();
        check(int'(bm_rank) == r, $sformatf("bm_rank %0d, expected %0d", bm_rank, r));
        rank_count[bm_rank]++;
      end
      check(y_valid == y_pending, "y_valid one clock after noise_valid");
      if (y_pending) check(int'(y) == y_exp, $sformatf("y %0d, expected %0d", y, y_exp));
      y_pending = 1'b0;
      if (noise_valid) begin
        int z;
        check(exp_noise.size() > 0, "noise sample expected");
        z = (exp_noise.size() > 0) ? exp_noise.pop_front() : 0;
        check(int'(noise) == z, $sformatf("noise %0d, expected %0d", noise, z));
        if (!first_seen) begin
          check(cyc - en_rise_cyc == NACC + 3, $sformatf("first noise after %0d clocks", cyc - en_rise_cyc));
          first_seen = 1'b1;
        end else if (continuous) begin
          check(cyc - last_noise_cyc == NACC, "noise every N clocks");
        end
        last_noise_cyc = cyc;
        out_count++;
        if (noise < 0) neg_count++;
        sum_z  += real'(noise);
        sum_z2 += real'(noise) * real'(noise);
        // y = x + floor(sigma * z / 2) at 6 fraction bits (1/sqrt(4) = 1/2).
        y_exp = int'(x_in) + int'($floor(real'(sigma) * real'(noise) / 128.0));
        y_pending = 1'b1;
      end
    end
  end

  initial begin
    real m2, mean, sd, sd_exp;
    int stall_left;
    t = 0;
    for (int i = 0; i < 8; i++) begin
      st[i] = 64'd1;
      step_poly[i] = xpow_mod(longint'(nbs[i]), poly(lens[i]), lens[i]);
    end
    grp_sum = 0; grp_cnt = 0;
    foreach (rank_count[i]) rank_count[i] = 0;
    neg_count = 0; stall_count = 0; out_count = 0;
    sum_z = 0.0; sum_z2 = 0.0;
    y_pending = 1'b0; first_seen = 1'b0; continuous = 1'b1;
    cyc = 0; last_noise_cyc = 0;
    m2 = bm_second_moment();
    rst_n = 1'b0;
    en    = 1'b0;
    x_in  = '0;
    sigma = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    en <= 1'b1;
    en_rise_cyc = cyc + 1;
    stall_left = 0;
    for (int c = 0; c < CYCLES; c++) begin
      x_in  <= 12'($urandom);
      sigma <= 8'($urandom);
      if (stall_left > 0) begin
        stall_left--;
        if (stall_left == 0) en <= 1'b1;
      end else if (c > 1000 && $urandom_range(19999) == 0) begin
        en <= 1'b0;
        continuous = 1'b0;
        stall_left = 1 + $urandom_range(6);
        stall_count++;
      end
      @(posedge clk);
    end
    en <= 1'b1;
    repeat (20) @(posedge clk);
    mean   = sum_z / real'(out_count);
    sd     = $sqrt(sum_z2 / real'(out_count) - mean * mean);
    sd_exp = $sqrt(real'(NACC) * m2);
    $display("outputs %0d, mean %f LSB, sd %f LSB (exact %f), ranks 0..5: %0d %0d %0d %0d %0d %0d, stalls %0d",
             out_count, mean, sd, sd_exp, rank_count[0], rank_count[1], rank_count[2],
             rank_count[3], rank_count[4], rank_count[5], stall_count);
    check(mean > -2.0 && mean < 2.0, "noise mean close to 0");
    check(sd > sd_exp * 0.99 && sd < sd_exp * 1.01, "noise standard deviation");
    for (int r = 1; r <= 5; r++) check(rank_count[r] > 0, $sformatf("rank %0d exercised", r));
    check(neg_count > 0, "negative samples exercised");
    check(stall_count > 0, "stall exercised");
    check(out_count > CYCLES / NACC * 9 / 10, "noise outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
