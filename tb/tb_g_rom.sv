// tb_g_rom: self-checking testbench of the quarter-cosine g ROM.
//
// All 256 words are compared with floor(2^6 * sqrt(2) * cos(pi/2 *
// (s' + 0.5) / 256)), plus three hand-worked entries, and the table must be
// non-increasing over the quarter period.
module tb_g_rom;
  import tb_awgn_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] addr;
  logic [6:0] g;
  logic [6:0] prev;

  g_rom dut (.addr, .g);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 8'd0;   #1; check(g == 90, "g(0) = 90");
    addr = 8'd128; #1; check(g == 63, "g(128) = 63");
    addr = 8'd255; #1; check(g == 0,  "g(255) = 0");
    prev = 7'h7f;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      check(int'(g) == ref_g(a, 8, 6, 0.5), $sformatf("g(%0d) = %0d", a, g));
      check(g <= prev, $sformatf("g non-increasing at %0d", a));
      prev = g;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
