// tb_awgn_ref_pkg: reference models shared by the noise generator testbenches.
//
// Everything here is written from the defining formulas, not from the RTL:
//   - LFSR states via polynomial arithmetic: a one-to-many LFSR seeded with 1
//     holds x^k mod p(x) after k single steps;
//   - f_r(s) = floor(2^m * sqrt(-ln((s + delta) / 2^(r*q)))), 0 for s = 0;
//   - g(s')  = floor(2^m' * sqrt(2) * cos(pi/2 * (s' + delta') / 2^q')).
package tb_awgn_ref_pkg;

  function automatic logic [63:0] gf_mulmod(logic [63:0] x, logic [63:0] y,
                                            logic [63:0] p, int len);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < len; i++) begin
      if (y[i]) r ^= x;
      x = x << 1;
      if (x[len]) x ^= p;
    end
    return r;
  endfunction

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

  // Full characteristic polynomial (leading term included) for each length
  // used by the generator.
  function automatic logic [63:0] poly(int len);
    case (len)
      5:  return (64'd1 << 5)  | 64'h5;       // x^5 + x^2 + 1
      7:  return (64'd1 << 7)  | 64'h3;       // x^7 + x + 1
      13: return (64'd1 << 13) | 64'h1b;      // x^13 + x^4 + x^3 + x + 1
      15: return (64'd1 << 15) | 64'h3;       // x^15 + x + 1
      17: return (64'd1 << 17) | 64'h9;       // x^17 + x^3 + 1
      20: return (64'd1 << 20) | 64'h9;       // x^20 + x^3 + 1
      21: return (64'd1 << 21) | 64'h5;       // x^21 + x^2 + 1
      22: return (64'd1 << 22) | 64'h3;       // x^22 + x + 1
      default: return '0;
    endcase
  endfunction

  // Top nb bits of an LFSR of length len, seeded with 1, after clk clocks of
  // nb steps each.
  function automatic int unsigned lfsr_out(int len, int nb, longint unsigned clk);
    logic [63:0] st;
    st = xpow_mod(clk * longint'(nb), poly(len), len);
    return int'((st >> (len - nb)) & ((64'd1 << nb) - 1));
  endfunction

  function automatic int unsigned ref_f(int r, int s, int q, int m, real delta);
    if (s == 0) return 0;
    return int'($floor((2.0 ** m) * $sqrt(-$ln((real'(s) + delta) / (2.0 ** (r * q))))));
  endfunction

  function automatic int unsigned ref_g(int s, int q, int m, real delta);
    return int'($floor((2.0 ** m) * $sqrt(2.0) *
                       $cos(1.5707963267948966 * (real'(s) + delta) / (2.0 ** q))));
  endfunction

  // First rank (1..k) whose q-bit field of a packed address word is non-zero.
  function automatic int first_rank(logic [63:0] addr, int k, int q);
    for (int r = 0; r < k; r++)
      if (((addr >> (r * q)) & ((64'd1 << q) - 1)) != 0) return r + 1;
    return 0;
  endfunction

endpackage
