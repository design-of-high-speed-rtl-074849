// tb_box_muller: self-checking testbench of the quantised Box-Muller stage.
//
// Two instances with the default parameters: two's complement sign (default)
// and one's complement sign. Random LFSR-like addresses are driven with
// in_valid mostly high; a reference pipeline computes, from the ROM
// formulas, n+ = floor(f_r(s) * g(s') / 2^7) and n = -n+ (two's complement)
// or -n+ - 1/64 (one's complement) and expects each result exactly two clocks
// after its input. Directed inputs cover every rank, the all-zero address
// (n must be 0, or -1/64 with the one's complement when the sign is set) and
// the largest sample, f_5(1) * g(0).
module tb_box_muller;
  import tb_awgn_ref_pkg::*;

  localparam int K = 5, QF = 4, MF = 7, QG = 8, MG = 6, B = 6;
  localparam real DF = 0.467, DG = 0.5;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                in_valid;
  logic [K-1:0][QF-1:0] s_f;
  logic [QG-1:0]       s_g;
  logic                sign;
  logic                v2, v1s;
  logic signed [9:0]   n2, n1s;
  logic [2:0]          rank2, rank1s;

  box_muller dut2 (.clk, .rst_n, .in_valid, .s_f, .s_g, .sign,
                   .n_valid(v2), .n(n2), .rank(rank2));
  box_muller #(.ONES_COMPLEMENT(1'b1)) dut1 (.clk, .rst_n, .in_valid, .s_f, .s_g, .sign,
                   .n_valid(v1s), .n(n1s), .rank(rank1s));

  typedef struct {
    bit valid;
    int n_two;
    int n_one;
    int rank;
  } exp_t;

  exp_t pipe [2];
  int rank_seen [6];
  int neg_seen;

  function automatic exp_t model(logic v, logic [K*QF-1:0] a, logic [QG-1:0] sg, logic sn);
    exp_t e;
    int r, np;
    e.valid = v;
    r = first_rank(64'(a), K, QF);
    np = (r == 0) ? 0
         : (ref_f(r, int'((a >> ((r - 1) * QF)) & 4'hf), QF, MF, DF) * ref_g(int'(sg), QG, MG, DG)) / (2 ** (MF + MG - B));
    e.n_two = sn ? -np : np;
    e.n_one = sn ? -np - 1 : np;
    e.rank  = r;
    return e;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare outputs with the expectation from two clocks earlier.
  always @(posedge clk) begin
    if (rst_n) begin
      check(v2 == pipe[1].valid && v1s == pipe[1].valid, "n_valid timing");
      if (pipe[1].valid) begin
        check(int'(n2) == pipe[1].n_two, $sformatf("two's complement n %0d, expected %0d", n2, pipe[1].n_two));
        check(int'(n1s) == pipe[1].n_one, $sformatf("one's complement n %0d, expected %0d", n1s, pipe[1].n_one));
        check(int'(rank2) == pipe[1].rank, "rank");
        rank_seen[pipe[1].rank]++;
        if (pipe[1].n_two < 0) neg_seen++;
      end
      pipe[1] <= pipe[0];
      pipe[0] <= model(in_valid, s_f, s_g, sign);
    end
  end

  task automatic drive(logic v, logic [K*QF-1:0] a, logic [QG-1:0] sg, logic sn);
    in_valid <= v;
    s_f      <= a;
    s_g      <= sg;
    sign     <= sn;
    @(posedge clk);
  endtask

  initial begin
    foreach (rank_seen[i]) rank_seen[i] = 0;
    neg_seen = 0;
    pipe[0].valid = 1'b0;
    pipe[1].valid = 1'b0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    s_f      = '0;
    s_g      = '0;
    sign     = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Directed: the largest sample, both signs, and the all-zero address.
    drive(1'b1, 20'h10000, 8'd0, 1'b0);
    drive(1'b1, 20'h10000, 8'd0, 1'b1);
    drive(1'b1, 20'h00000, 8'd17, 1'b0);
    drive(1'b1, 20'h00000, 8'd17, 1'b1);
    for (int r = 0; r < K; r++)
      for (int sn = 0; sn < 2; sn++)
        drive(1'b1, (K*QF)'(64'(1 + $urandom_range(14)) << (r * QF)), 8'($urandom), 1'(sn));
    // Random stream with gaps.
    for (int i = 0; i < 20000; i++)
      drive(($urandom_range(9) != 0), (K*QF)'($urandom), 8'($urandom), 1'($urandom));
    drive(1'b0, '0, '0, 1'b0);
    repeat (3) @(posedge clk);
    for (int r = 0; r <= K; r++)
      check(rank_seen[r] > 0, $sformatf("rank %0d exercised", r));
    check(neg_seen > 0, "negative samples exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
