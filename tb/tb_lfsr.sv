// tb_lfsr: self-checking testbench of the multi-step one-to-many LFSR.
//
// Three instances: x^5 + x^2 + 1 with one and with four steps per clock, and
// the 22-bit g LFSR (x^22 + x + 1) with four steps per clock. The 5-bit ones
// are compared with the published 13-row sequence table (seed 00001, columns
// x..x^5 = register bits 0..4). All three are also compared, for many clocks,
// with an independent model: a one-to-many LFSR seeded with 1 holds, after k
// steps, the coefficients of x^k mod p(x), computed here by polynomial
// arithmetic over GF(2). The output bits must be the top NB_ITER state bits,
// and en = 0 must hold the state. The 5-bit register must return to its seed
// after 31 clocks (period 2^5 - 1).
module tb_lfsr;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [0:0]  b5_1;
  logic [3:0]  b5_4;
  logic [3:0]  b22_4;
  logic [4:0]  st5_1, st5_4;
  logic [21:0] st22_4;

  lfsr #(.LEN(5),  .NB_ITER(1)) u5_1  (.clk, .rst_n, .en, .bits(b5_1),  .state(st5_1));
  lfsr #(.LEN(5),  .NB_ITER(4)) u5_4  (.clk, .rst_n, .en, .bits(b5_4),  .state(st5_4));
  lfsr #(.LEN(22), .NB_ITER(4)) u22_4 (.clk, .rst_n, .en, .bits(b22_4), .state(st22_4));

  // Published sequence table, each string lists x, x^2, x^3, x^4, x^5.
  string tab1 [13] = '{"10000","01000","00100","00010","00001","10100","01010",
                       "00101","10110","01011","10001","11100","01110"};
  string tab4 [13] = '{"10000","00001","10110","01110","11011","00110","01111",
                       "01101","01000","10100","01011","00111","11001"};

  function automatic logic [4:0] from_row(string s);
    logic [4:0] v;
    for (int i = 0; i < 5; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  // x^k mod p over GF(2); p given with its leading term.
  function automatic logic [63:0] xpow_mod(longint unsigned k, logic [63:0] p, int len);
    logic [63:0] r, a;
    r = 64'd1;
    a = 64'd2;
    while (k != 0) begin
      if (k[0]) r = gf_mulmod(r, a, p, len);
      a = gf_mulmod(a, a, p, len);
      k = k >> 1;
    end
    return r;
  endfunction

  function automatic logic [63:0] gf_mulmod(logic [63:0] x, logic [63:0] y, logic [63:0] p, int len);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < len; i++) begin
      if (y[i]) r ^= x;
      x = x << 1;
      if (x[len]) x ^= p;
    end
    return r;
  endfunction

  localparam logic [63:0] P5  = (64'd1 << 5)  | 64'b101;   // x^5 + x^2 + 1
  localparam logic [63:0] P22 = (64'd1 << 22) | 64'b11;    // x^22 + x + 1

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned t;
    logic [63:0] e5_1, e5_4, e22;
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    en    <= 1'b1;
    t = 0;
    // Clock t: state after t enabled edges.
    for (int c = 0; c < 3000; c++) begin
      #1;
      if (c < 13) begin
        check(st5_1 == from_row(tab1[c]), $sformatf("table row %0d, one step", c));
        check(st5_4 == from_row(tab4[c]), $sformatf("table row %0d, four steps", c));
      end
      e5_1 = xpow_mod(t,     P5,  5);
      e5_4 = xpow_mod(4 * t, P5,  5);
      e22  = xpow_mod(4 * t, P22, 22);
      check(st5_1  == e5_1[4:0],  "5-bit one-step state");
      check(st5_4  == e5_4[4:0],  "5-bit four-step state");
      check(st22_4 == e22[21:0],  "22-bit four-step state");
      check(b5_1  == e5_1[4],    "5-bit one-step output bit");
      check(b5_4  == e5_4[4:1],  "5-bit four-step output bits");
      check(b22_4 == e22[21:18], "22-bit four-step output bits");
      if (c == 31 || c == 62) begin
        check(st5_1 == 5'b00001, "period 31, one step");
        check(st5_4 == 5'b00001, "period 31, four steps");
      end
      // Hold for two clocks now and then.
      if (c % 500 == 250) begin
        en <= 1'b0;
        @(posedge clk); #1;
        check(st22_4 == e22[21:0], "hold with en low");
        @(posedge clk);
        en <= 1'b1;
      end
      @(posedge clk);
      t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
