// lfsr_bank: the uniform random bits consumed by one Box-Muller sample.
//
// One sample needs K*q + q' + 1 independent uniform bits per clock (29 with
// the default parameters): q bits for each of the K f_r rank ROMs, q' bits
// for the g ROM and one sign bit. The bits come from K + 3 LFSRs, each of
// which advances as many sequence positions per clock as it delivers bits:
//
//   - one LFSR per f_r rank, lengths LEN_F (20, 17, 13, 7, 5), q bits each;
//   - two LFSRs for the g address, lengths 22 and 21, q'/2 bits each
//     (s_g[q'/2-1:0] from the 22-bit one, the upper half from the 21-bit one);
//   - one 15-bit LFSR for the sign, one bit.
//
// The lengths are the published ones. Their combined period, the least
// common multiple of the 2^len - 1, is about 2^98.6 clocks. Which LFSR feeds
// which half of the g address, the one-step sign LFSR and the seeds are this
// design's own choices.
//
// Timing: all outputs are flip-flop outputs; with en high they take a new
// value every clock. s_f[r-1] is the address of rank r (s_r in the
// quantisation of [0,1]).
module lfsr_bank #(
  parameter int unsigned K        = awgn_pkg::K_RANKS,
  parameter int unsigned Q_F      = awgn_pkg::Q_F,
  parameter int unsigned Q_G      = awgn_pkg::Q_G,
  parameter int unsigned LEN_G0   = awgn_pkg::LEN_G0,
  parameter int unsigned LEN_G1   = awgn_pkg::LEN_G1,
  parameter int unsigned LEN_SIGN = awgn_pkg::LEN_SIGN,
  parameter int unsigned LEN_F [K] = awgn_pkg::LEN_F
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  output logic [K-1:0][Q_F-1:0]  s_f,
  output logic [Q_G-1:0]         s_g,
  output logic                   sign
);

  localparam int unsigned QG_HALF = Q_G / 2;

  if (Q_G % 2 != 0) begin : g_bad_qg
    $error("lfsr_bank: Q_G must be even (two LFSRs share the g address)");
  end

  for (genvar r = 0; r < K; r++) begin : g_f
    lfsr #(.LEN(LEN_F[r]), .NB_ITER(Q_F), .SEED(LEN_F[r]'(1))) u_lfsr (
      .clk, .rst_n, .en, .bits(s_f[r]), .state()
    );
  end

  lfsr #(.LEN(LEN_G0), .NB_ITER(QG_HALF), .SEED(LEN_G0'(1))) u_g0 (
    .clk, .rst_n, .en, .bits(s_g[QG_HALF-1:0]), .state()
  );

  lfsr #(.LEN(LEN_G1), .NB_ITER(QG_HALF), .SEED(LEN_G1'(1))) u_g1 (
    .clk, .rst_n, .en, .bits(s_g[Q_G-1:QG_HALF]), .state()
  );

  lfsr #(.LEN(LEN_SIGN), .NB_ITER(1), .SEED(LEN_SIGN'(1))) u_sign (
    .clk, .rst_n, .en, .bits(sign), .state()
  );

endmodule
