// tb_clt_accumulator: self-checking testbench of the central-limit adder.
//
// Instances with N = 4 (default) and N = 3 see the same random stream of
// (4.6) samples, including the extreme values, with in_valid sometimes low.
// A reference sums every group of N valid inputs and expects out_valid one
// clock after the group's last input, with out equal to the exact sum. With
// in_valid held high the N = 4 output must come exactly every 4 clocks (the
// output rate f_clk / N).
module tb_clt_accumulator;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic              in_valid;
  logic signed [9:0] in;
  logic              ov4, ov3;
  logic signed [11:0] out4;
  logic signed [11:0] out3;

  clt_accumulator dut4 (.clk, .rst_n, .in_valid, .in, .out_valid(ov4), .out(out4));
  clt_accumulator #(.N(3)) dut3 (.clk, .rst_n, .in_valid, .in, .out_valid(ov3), .out(out3));

  int sum4, cnt4, sum3, cnt3;
  bit exp_v4, exp_v3;
  int exp4, exp3;
  int outs4;
  int last_out4;
  bit continuous;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      check(ov4 == exp_v4, "N=4 out_valid timing");
      check(ov3 == exp_v3, "N=3 out_valid timing");
      if (exp_v4) check(int'(out4) == exp4, $sformatf("N=4 sum %0d, expected %0d", out4, exp4));
      if (exp_v3) check(int'(out3) == exp3, $sformatf("N=3 sum %0d, expected %0d", out3, exp3));
      if (ov4) begin
        if (continuous && outs4 > 0) check(cyc - last_out4 == 4, "N=4 output every 4 clocks");
        last_out4 <= cyc;
        outs4 <= outs4 + 1;
      end
      exp_v4 <= 1'b0;
      exp_v3 <= 1'b0;
      if (in_valid) begin
        if (cnt4 == 3) begin exp_v4 <= 1'b1; exp4 <= sum4 + int'(in); sum4 <= 0; cnt4 <= 0; end
        else begin sum4 <= sum4 + int'(in); cnt4 <= cnt4 + 1; end
        if (cnt3 == 2) begin exp_v3 <= 1'b1; exp3 <= sum3 + int'(in); sum3 <= 0; cnt3 <= 0; end
        else begin sum3 <= sum3 + int'(in); cnt3 <= cnt3 + 1; end
      end
    end
  end

  initial begin
    cyc = 0;
    sum4 = 0; cnt4 = 0; sum3 = 0; cnt3 = 0;
    exp_v4 = 0; exp_v3 = 0; exp4 = 0; exp3 = 0;
    outs4 = 0; last_out4 = 0; continuous = 1'b0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Extremes first.
    repeat (4) begin in_valid <= 1'b1; in <= 10'sd511; @(posedge clk); end
    repeat (4) begin in_valid <= 1'b1; in <= -10'sd512; @(posedge clk); end
    // Random with gaps.
    for (int i = 0; i < 15000; i++) begin
      in_valid <= ($urandom_range(3) != 0);
      in       <= 10'($signed($urandom_range(660)) - 330);
      @(posedge clk);
    end
    // Continuous stream (aligned to a group start of the N = 4 instance).
    in_valid <= 1'b0;
    @(posedge clk);
    while (cnt4 != 0) begin in_valid <= 1'b1; in <= 10'sd1; @(posedge clk); in_valid <= 1'b0; @(posedge clk); end
    repeat (2) @(posedge clk);
    outs4 <= 0;
    continuous <= 1'b1;
    for (int i = 0; i < 4000; i++) begin
      in_valid <= 1'b1;
      in       <= 10'($signed($urandom_range(660)) - 330);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(outs4 == 1000, $sformatf("1000 outputs from 4000 continuous inputs (got %0d)", outs4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
