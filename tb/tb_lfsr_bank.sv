// tb_lfsr_bank: self-checking testbench of the LFSR bank.
//
// Every output field is compared, clock by clock, with the polynomial model
// of its LFSR (x^k mod p(x)): the five f_r address fields (lengths 20, 17,
// 13, 7, 5, four steps per clock), the two halves of the g address (22 and
// 21 bits, four steps per clock) and the sign (15 bits, one step per clock).
// en is dropped now and then; the outputs must then hold. A final check
// counts the values of the rank-1 address over the run: each of the 16 must
// appear close to 1/16 of the time.
module tb_lfsr_bank;
  import tb_awgn_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [4:0][3:0] s_f;
  logic [7:0]      s_g;
  logic            sign;

  lfsr_bank dut (.clk, .rst_n, .en, .s_f, .s_g, .sign);

  int lens [5] = '{20, 17, 13, 7, 5};
  int hist [16];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int CLOCKS = 16000;

  initial begin
    longint unsigned t;
    rst_n = 1'b0;
    en    = 1'b0;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    en    <= 1'b1;
    t = 0;
    for (int c = 0; c < CLOCKS; c++) begin
      #1;
      for (int r = 0; r < 5; r++)
        check(s_f[r] == 4'(lfsr_out(lens[r], 4, t)), $sformatf("f address rank %0d", r + 1));
      check(s_g[3:0] == 4'(lfsr_out(22, 4, t)), "g address low half");
      check(s_g[7:4] == 4'(lfsr_out(21, 4, t)), "g address high half");
      check(sign == 1'(lfsr_out(15, 1, t)),     "sign");
      hist[s_f[0]]++;
      if (c % 1000 == 500) begin
        en <= 1'b0;
        @(posedge clk);
        @(posedge clk); #1;
        check(s_g[3:0] == 4'(lfsr_out(22, 4, t)) && s_f[4] == 4'(lfsr_out(5, 4, t)),
              "hold with en low");
        en <= 1'b1;
      end
      @(posedge clk);
      t++;
    end
    for (int v = 0; v < 16; v++)
      check(hist[v] > CLOCKS / 16 * 8 / 10 && hist[v] < CLOCKS / 16 * 12 / 10,
            $sformatf("rank-1 address %0d appears %0d times", v, hist[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
