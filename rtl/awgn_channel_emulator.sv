// awgn_channel_emulator: additive white Gaussian noise channel for hardware
// emulation of a communication link.
//
// Gaussian noise is made in two steps. A quantised Box-Muller generator draws
// one sample per clock as the product of two table lookups,
// +/- sqrt(-ln x1) * sqrt(2) cos(2 pi x2): the first table is quantised
// non-uniformly (K recursive ranks, finer towards x1 = 0) so that the tail
// out to beyond 4 sigma is reachable from short random addresses, the second
// covers a quarter of the cosine and a random sign bit restores symmetry.
// N of these samples are then added (central limit theorem), which smooths
// the ripple that the coarse quantisation leaves in the density. All random
// bits come from a bank of LFSRs that each advance several positions per
// clock. The back end scales the noise by sigma/sqrt(N) and adds it to the
// transmitted sample.
//
//   lfsr_bank -> f_rom, g_rom -> multiply, truncate, sign -> clt_accumulator
//   (box_muller, 2 clocks)                                 (1 output / N clocks)
//             -> awgn_backend -> y
//
// Interface: while en is high the generator runs one Box-Muller sample per
// clock. Every N enabled clocks noise_valid pulses with a new noise sample
// (signed, B fractional bits, standard deviation sqrt(N)); in that same
// clock x_in and sigma are taken, and one clock later y_valid pulses with
// y = x_in + sigma * noise / sqrt(N). x_in and y are signed with B fractional
// bits, sigma is unsigned with SIG_F fractional bits. Latency from the first
// enabled clock after reset: the first Box-Muller sample is ready after 3
// clocks (LFSR register, ROM register, product register), noise_valid after
// N + 3 clocks, y_valid one clock later. Reset is synchronous, active low.
// bm_rank shows which f_r rank (1..K, 0 when all addresses were zero)
// produced the Box-Muller sample currently leaving the generator.
//
// The structure, the quantisation parameters and the LFSR lengths are the
// published reference configuration (b = 6, q = 4, K = 5, m = 7, q' = 8,
// m' = 6, N = 4). The pipeline registers, the en/valid handshake and the
// back-end formats are this design's own.
module awgn_channel_emulator #(
  parameter int unsigned K       = awgn_pkg::K_RANKS,
  parameter int unsigned Q_F     = awgn_pkg::Q_F,
  parameter int unsigned M_F     = awgn_pkg::M_F,
  parameter real         DELTA_F = awgn_pkg::DELTA_F,
  parameter int unsigned Q_G     = awgn_pkg::Q_G,
  parameter int unsigned M_G     = awgn_pkg::M_G,
  parameter real         DELTA_G = awgn_pkg::DELTA_G,
  parameter int unsigned B       = awgn_pkg::B_FRAC,
  parameter int unsigned N       = awgn_pkg::N_ACC,
  parameter bit          ONES_COMPLEMENT = 1'b0,
  parameter int unsigned X_W     = 12,
  parameter int unsigned SIG_W   = 8,
  parameter int unsigned SIG_F   = 6,
  localparam int unsigned N_W    = 4 + B,
  localparam int unsigned Z_W    = N_W + ((N > 1) ? $clog2(N) : 0),
  localparam int unsigned Y_W    = ((X_W > Z_W + SIG_W - SIG_F) ? X_W : Z_W + SIG_W - SIG_F) + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [X_W-1:0]    x_in,
  input  logic        [SIG_W-1:0]  sigma,
  output logic                     noise_valid,
  output logic signed [Z_W-1:0]    noise,
  output logic                     y_valid,
  output logic signed [Y_W-1:0]    y,
  output logic [$clog2(K+1)-1:0]   bm_rank   // f_r rank of the latest Box-Muller sample (monitor)
);

  // ---- uniform random bits ---------------------------------------------------
  logic [K-1:0][Q_F-1:0] s_f;
  logic [Q_G-1:0]        s_g;
  logic                  sign;
  logic                  lfsr_valid;

  lfsr_bank #(.K(K), .Q_F(Q_F), .Q_G(Q_G)) u_lfsr_bank (
    .clk, .rst_n, .en, .s_f, .s_g, .sign
  );

  // The LFSR outputs are fresh one clock after each enabled edge.
  always_ff @(posedge clk) begin
    if (!rst_n) lfsr_valid <= 1'b0;
    else        lfsr_valid <= en;
  end

  // ---- quantised Box-Muller sample -------------------------------------------
  logic                   bm_valid;
  logic signed [N_W-1:0]  bm_n;

  box_muller #(
    .K(K), .Q_F(Q_F), .M_F(M_F), .DELTA_F(DELTA_F),
    .Q_G(Q_G), .M_G(M_G), .DELTA_G(DELTA_G), .B(B),
    .ONES_COMPLEMENT(ONES_COMPLEMENT)
  ) u_box_muller (
    .clk, .rst_n, .in_valid(lfsr_valid), .s_f, .s_g, .sign,
    .n_valid(bm_valid), .n(bm_n), .rank(bm_rank)
  );

  // ---- central limit accumulation --------------------------------------------
  clt_accumulator #(.N(N), .IN_W(N_W)) u_clt (
    .clk, .rst_n, .in_valid(bm_valid), .in(bm_n),
    .out_valid(noise_valid), .out(noise)
  );

  // ---- back end: scale and add to the signal ---------------------------------
  awgn_backend #(
    .N(N), .B(B), .Z_W(Z_W), .ONES_COMPLEMENT(ONES_COMPLEMENT),
    .X_W(X_W), .SIG_W(SIG_W), .SIG_F(SIG_F)
  ) u_backend (
    .clk, .rst_n, .noise_valid, .noise, .x(x_in), .sigma,
    .y_valid, .y
  );

endmodule
