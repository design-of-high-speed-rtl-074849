// tb_awgn_backend: self-checking testbench of the back end (scale and add).
//
// Two instances with N = 4: two's complement noise (no mean correction) and
// one's complement noise (mean correction of N * 2^-7 = 1/32). Random noise
// samples, signals and sigmas, including the extremes, are applied; the
// reference computes y = x + floor(sigma * (z + c) / 2) exactly with real
// arithmetic on the (.6) fixed-point values, where c is 0 or 4 * 2^-7, the
// division by 2 being 1/sqrt(4). y_valid must follow noise_valid by one
// clock, and y must hold while noise_valid is low.
module tb_awgn_backend;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               noise_valid;
  logic signed [11:0] noise;
  logic signed [11:0] x;
  logic        [7:0]  sigma;
  logic               yv2, yv1;
  logic signed [15:0] y2, y1;

  awgn_backend dut2 (.clk, .rst_n, .noise_valid, .noise, .x, .sigma, .y_valid(yv2), .y(y2));
  awgn_backend #(.ONES_COMPLEMENT(1'b1)) dut1 (.clk, .rst_n, .noise_valid, .noise, .x, .sigma,
                                              .y_valid(yv1), .y(y1));

  // Expected y in units of 2^-6.
  function automatic int expect_y(int z, int xx, int sg, bit ones);
    real zr, sr, n;
    zr = real'(z) / 64.0 + (ones ? 4.0 / 128.0 : 0.0);
    sr = real'(sg) / 64.0;
    n  = sr * zr / 2.0;
    return xx + int'($floor(n * 64.0));
  endfunction

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

  task automatic apply(int z, int xx, int sg);
    int e2, e1;
    logic signed [15:0] hold2;
    noise_valid <= 1'b1;
    noise <= 12'(z);
    x     <= 12'(xx);
    sigma <= 8'(sg);
    e2 = expect_y(z, xx, sg, 1'b0);
    e1 = expect_y(z, xx, sg, 1'b1);
    #1;
    check(yv2 == 1'b0 && yv1 == 1'b0, "y_valid not early");
    @(posedge clk);
    noise_valid <= 1'b0;
    x <= 12'($urandom);
    #1;
    check(yv2 && yv1, "y_valid one clock after noise_valid");
    check(int'(y2) == e2, $sformatf("two's: z=%0d x=%0d s=%0d y=%0d exp=%0d", z, xx, sg, y2, e2));
    check(int'(y1) == e1, $sformatf("one's: z=%0d x=%0d s=%0d y=%0d exp=%0d", z, xx, sg, y1, e1));
    hold2 = y2;
    @(posedge clk); #1;
    check(!yv2 && y2 == hold2, "y holds without noise_valid");
  endtask

  initial begin
    rst_n = 1'b0;
    noise_valid = 1'b0;
    noise = '0; x = '0; sigma = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    apply(0, 0, 64);
    apply(-1, 0, 64);
    apply(2047, 2047, 255);
    apply(-2048, -2048, 255);
    apply(-2048, 2047, 0);
    apply(100, -37, 64);
    for (int i = 0; i < 6000; i++)
      apply($signed($urandom_range(4095)) - 2048, $signed($urandom_range(4095)) - 2048,
            $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
