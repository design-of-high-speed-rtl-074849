// f_rom: non-uniformly quantised f(x1) = sqrt(-ln x1) for the Box-Muller sample.
//
// The uniform variable x1 in [0,1) is built recursively from K q-bit random
// addresses s_1..s_K. Rank 1 splits [0,1) into 2^q segments of width 2^-q;
// if s_1 is 0 the first segment is split again with s_2 into segments of
// width 2^-2q, and so on down to rank K. The first non-zero address s_r thus
// selects the segment [s_r, s_r+1) * 2^(-r*q), which occurs with exactly the
// probability of its width. Each rank has its own 2^q-word ROM holding
//
//   f_r(s) = floor(2^M * sqrt(-ln((s + DELTA) * 2^(-r*Q))))   for s != 0
//
// in unsigned (3.M) format. When every address is zero the output is 0, the
// value the reference model stores for s = 0.
//
// The ROM contents are computed at elaboration by awgn_pkg::f_rom_value.
// The block is combinational: f and rank follow s after the lookup and
// priority-select delay. rank is the selected rank 1..K, or 0 when all
// addresses are zero. The quantisation, formula and ROM organisation follow
// the published design; the rank output is this design's own addition.
module f_rom #(
  parameter int unsigned K     = awgn_pkg::K_RANKS,
  parameter int unsigned Q     = awgn_pkg::Q_F,
  parameter int unsigned M     = awgn_pkg::M_F,
  parameter real         DELTA = awgn_pkg::DELTA_F
) (
  input  logic [K-1:0][Q-1:0]     s,     // s[r-1] is the rank-r address
  output logic [M+2:0]            f,     // (3.M) unsigned
  output logic [$clog2(K+1)-1:0]  rank
);

  typedef logic [M+2:0] word_t;
  typedef word_t rank_rom_t [2**Q];

  // Contents of the ROM of rank r (1..K).
  function automatic rank_rom_t build(int unsigned r);
    rank_rom_t t;
    for (int unsigned a = 0; a < 2**Q; a++)
      t[a] = word_t'(awgn_pkg::f_rom_value(r, a, Q, M, DELTA));
    return t;
  endfunction

  if (awgn_pkg::f_rom_value(K, 1, Q, M, DELTA) >= 2**(M+3)) begin : g_overflow
    $error("f_rom: largest f_r value does not fit in 3+M bits");
  end

  // One 2^Q-word ROM per rank, all read in parallel; a priority selector
  // keeps the first rank whose address is non-zero.
  word_t rom_out [K];

  for (genvar r = 0; r < K; r++) begin : g_rank
    localparam rank_rom_t ROM = build(r + 1);
    assign rom_out[r] = ROM[s[r]];
  end

  always_comb begin
    f    = '0;
    rank = '0;
    for (int r = K - 1; r >= 0; r--) begin
      if (s[r] != '0) begin
        f    = rom_out[r];
        rank = ($clog2(K+1))'(r + 1);
      end
    end
  end

endmodule
