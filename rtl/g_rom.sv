// g_rom: quantised g(x2) = sqrt(2) * cos(2*pi*x2) over the first quadrant.
//
// Only x2 in [0, 1/4) is tabulated; the sign of the full cosine is supplied
// later by the separate random sign bit, which makes the product symmetric.
// The q'-bit address s' picks a segment of width 2^-q' of that quarter and
// the ROM returns
//
//   g(s') = floor(2^M * sqrt(2) * cos(pi * (s' + DELTA) * 2^(-Q-1)))
//
// in unsigned (1.M) format. With the default Q = 8 the ROM has 256 words
// and maps onto one small on-chip RAM block of an FPGA. The contents are
// computed at elaboration by awgn_pkg::g_rom_value.
//
// The block is combinational (an asynchronous-read ROM); the Box-Muller
// stage registers its output. Formula, format and size follow the published
// design.
module g_rom #(
  parameter int unsigned Q     = awgn_pkg::Q_G,
  parameter int unsigned M     = awgn_pkg::M_G,
  parameter real         DELTA = awgn_pkg::DELTA_G
) (
  input  logic [Q-1:0] addr,
  output logic [M:0]   g      // (1.M) unsigned
);

  typedef logic [M:0] word_t;
  typedef word_t table_t [2**Q];

  function automatic table_t build();
    table_t t;
    for (int unsigned a = 0; a < 2**Q; a++)
      t[a] = word_t'(awgn_pkg::g_rom_value(a, Q, M, DELTA));
    return t;
  endfunction

  localparam table_t TABLE = build();

  if (awgn_pkg::g_rom_value(0, Q, M, DELTA) >= 2**(M+1)) begin : g_overflow
    $error("g_rom: largest g value does not fit in 1+M bits");
  end

  assign g = TABLE[addr];

endmodule
