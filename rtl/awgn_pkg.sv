// awgn_pkg: shared constants and table generators of the white Gaussian noise
// generator (WGNG).
//
// The generator draws a quantised Box-Muller sample n = +/- f_r(s) * g(s')
// every clock and adds N of them (central limit theorem) into one noise sample.
// This package holds the default quantisation parameters of that generator,
// the LFSR lengths and feedback polynomials, and the constant functions that
// compute the two ROM tables at elaboration time:
//
//   f_r(s) = floor(2^m  * sqrt(-ln((s + delta ) * 2^(-r*q))))          (rank r, s != 0)
//   g(s')  = floor(2^m' * sqrt(2) * cos(pi * (s' + delta') * 2^(-q'-1)))
//
// The parameter values (b=6, q=4, K=5, m=7, delta=0.467, q'=8, m'=6,
// delta'=0.5, N=4) and the LFSR lengths 22,21 (g), 20,17,13,7,5 (f_r) and
// 15 (sign) are those of the published reference configuration. The feedback
// polynomials follow the published LFSR generator for the lengths it lists;
// the polynomial of the 15-bit sign LFSR (x^15 + x + 1) is this design's own
// choice. All polynomials returned here are primitive.
package awgn_pkg;

  // ---- quantised Box-Muller parameters --------------------------------------
  localparam int unsigned B_FRAC   = 6;      // b  : fractional bits of a sample
  localparam int unsigned Q_F      = 4;      // q  : address bits per f_r rank
  localparam int unsigned K_RANKS  = 5;      // K  : number of recursion ranks
  localparam int unsigned M_F      = 7;      // m  : fractional bits of f_r
  localparam real         DELTA_F  = 0.467;  // delta : sample position in an f segment
  localparam int unsigned Q_G      = 8;      // q' : address bits of the g ROM
  localparam int unsigned M_G      = 6;      // m' : fractional bits of g
  localparam real         DELTA_G  = 0.5;    // delta' : sample position in a g segment
  localparam int unsigned N_ACC    = 4;      // N  : Box-Muller samples added per output

  // ---- LFSR lengths --------------------------------------------------------
  localparam int unsigned LEN_G0   = 22;
  localparam int unsigned LEN_G1   = 21;
  localparam int unsigned LEN_SIGN = 15;
  localparam int unsigned LFSR_MAX_LEN = 32;

  typedef int unsigned len_arr_t [K_RANKS];
  localparam len_arr_t LEN_F = '{20, 17, 13, 7, 5};

  // Lower terms of a primitive polynomial x^len + ... + 1, as the XOR mask of
  // a one-to-many LFSR (bit i set = term x^i). Returns 0 for an unsupported
  // length, which the LFSR rejects at elaboration.
  function automatic logic [LFSR_MAX_LEN-1:0] lfsr_taps(int unsigned len);
    case (len)
      2:       return 32'b11;          // x^2  + x + 1
      3:       return 32'b011;         // x^3  + x + 1
      4:       return 32'b0011;        // x^4  + x + 1
      5:       return 32'b00101;       // x^5  + x^2 + 1
      7:       return 32'b0000011;     // x^7  + x + 1
      13:      return 32'b11011;       // x^13 + x^4 + x^3 + x + 1
      15:      return 32'b11;          // x^15 + x + 1
      17:      return 32'b1001;        // x^17 + x^3 + 1
      20:      return 32'b1001;        // x^20 + x^3 + 1
      21:      return 32'b101;         // x^21 + x^2 + 1
      22:      return 32'b11;          // x^22 + x + 1
      default: return '0;
    endcase
  endfunction

  // f_r(s) in units of 2^-m; s = 0 has no value of its own and reads 0.
  function automatic int unsigned f_rom_value(int unsigned r, int unsigned s,
                                              int unsigned q, int unsigned m,
                                              real delta);
    real arg;
    if (s == 0) return 0;
    // -ln((s + delta) * 2^(-r*q)) = r*q*ln 2 - ln(s + delta)
    arg = real'(r * q) * $ln(2.0) - $ln(real'(s) + delta);
    if (arg < 0.0) arg = 0.0;
    return int'($floor($sqrt(arg) * (2.0 ** m)));
  endfunction

  // g(s') in units of 2^-m'.
  function automatic int unsigned g_rom_value(int unsigned s, int unsigned q,
                                              int unsigned m, real delta);
    real pi = 3.14159265358979323846;
    real v;
    v = $sqrt(2.0) * $cos(pi * (real'(s) + delta) * (2.0 ** (-(real'(q) + 1.0))));
    if (v < 0.0) v = 0.0;
    return int'($floor(v * (2.0 ** m)));
  endfunction

  // Largest n+ = floor(f * g / 2^(m+m'-b)) the tables can produce, in units of 2^-b.
  function automatic int unsigned n_plus_max(int unsigned k, int unsigned qf,
                                             int unsigned mf, real df,
                                             int unsigned qg, int unsigned mg,
                                             real dg, int unsigned b);
    longint unsigned p;
    p = longint'(f_rom_value(k, 1, qf, mf, df)) * longint'(g_rom_value(0, qg, mg, dg));
    return int'(p >> (mf + mg - b));
  endfunction

  // Shift that divides a sum of N unit-variance samples by sqrt(N) when N is a
  // power of 4; 0 otherwise (the caller's scale factor then has to hold 1/sqrt(N)).
  function automatic int unsigned norm_shift(int unsigned n);
    for (int unsigned k = 0; k < 16; k++)
      if (n == (1 << (2 * k))) return k;
    return 0;
  endfunction

endpackage
