// tb_f_rom: self-checking testbench of the recursive f_r ROM.
//
// The reference evaluates floor(2^7 * sqrt(-ln((s + 0.467) / 2^(4r)))) for
// the first non-zero rank r of the address word, and 0 when all five
// addresses are zero. Checked: a few hand-worked entries, every (rank, value)
// pair with random lower-priority addresses, the all-zero word and random
// words.
module tb_f_rom;
  import tb_awgn_ref_pkg::*;

  localparam int K = 5;
  localparam int Q = 4;
  localparam int M = 7;
  localparam real D = 0.467;

  int checks = 0;
  int failures = 0;

  logic [K-1:0][Q-1:0] s;
  logic [M+2:0]        f;
  logic [2:0]          rank;

  f_rom dut (.s, .f, .rank);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic apply_and_check(logic [K*Q-1:0] a);
    int r;
    s = a;
    #1;
    r = first_rank(64'(a), K, Q);
    check(int'(rank) == r, $sformatf("rank of %h: %0d, expected %0d", a, rank, r));
    if (r == 0)
      check(f == 0, "all-zero address gives 0");
    else
      check(int'(f) == ref_f(r, int'((a >> ((r - 1) * Q)) & 4'hf), Q, M, D),
            $sformatf("value of %h: %0d", a, f));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand-worked entries: f_1(1), f_1(15), f_2(1), f_3(7), f_5(1), f_5(15).
    s = '0; s[0] = 4'd1;  #1; check(f == 197 && rank == 1, "f_1(1) = 197");
    s = '0; s[0] = 4'd15; #1; check(f == 23  && rank == 1, "f_1(15) = 23");
    s = '0; s[1] = 4'd1;  #1; check(f == 290 && rank == 2, "f_2(1) = 290");
    s = '0; s[2] = 4'd7;  #1; check(f == 321 && rank == 3, "f_3(7) = 321");
    s = '0; s[4] = 4'd1;  #1; check(f == 469 && rank == 5, "f_5(1) = 469");
    s = '0; s[4] = 4'd15; #1; check(f == 426 && rank == 5, "f_5(15) = 426");
    apply_and_check('0);
    for (int r = 1; r <= K; r++)
      for (int v = 1; v < 16; v++) begin
        logic [K*Q-1:0] a;
        a = (K*Q)'($urandom);
        a = a & ~((K*Q)'((64'd1 << (r * Q)) - 1));         // clear ranks 1..r
        a = a | (K*Q)'(64'(v) << ((r - 1) * Q));          // rank r = v
        apply_and_check(a);
      end
    for (int i = 0; i < 3000; i++) apply_and_check((K*Q)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
