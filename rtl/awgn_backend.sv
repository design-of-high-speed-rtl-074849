// awgn_backend: adds the scaled Gaussian noise to the transmitted signal.
//
// The accumulated noise sample z is a sum of N Box-Muller samples with
// standard deviation sqrt(N) and mean 0 (two's complement sign) or
// -N * 2^(-B-1) (one's complement sign, ONES_COMPLEMENT = 1). This stage turns
// it into the channel output
//
//   y = x + sigma * (z + mean_correction) / sqrt(N)
//
// The mean correction of N * 2^(-B-1) is applied exactly by working at one
// extra fractional bit: z2 = 2*z + N in units of 2^(-B-1). Division by sqrt(N)
// is a right shift by log2(N)/2 when N is a power of 4 (one bit for the
// default N = 4); for any other N no shift is made and sigma must already
// include the factor 1/sqrt(N). The scaled noise is truncated (floor) to
// B fractional bits before the addition.
//
// Formats: x is signed with B fractional bits (X_W bits in all), sigma is
// unsigned with SIG_F fractional bits (SIG_W bits), y is signed with B
// fractional bits and Y_W bits, wide enough that no sum can overflow.
// Timing: x and sigma are sampled in the clock where noise_valid is high;
// y and y_valid follow one clock later. The operation (noise scaled to the
// wanted power and added to the signal, mean and sqrt(N) corrected) is the
// published back end; all formats and the exact correction are this design's
// own.
module awgn_backend #(
  parameter int unsigned N       = awgn_pkg::N_ACC,
  parameter int unsigned B       = awgn_pkg::B_FRAC,
  parameter int unsigned Z_W     = 4 + B + ((N > 1) ? $clog2(N) : 0),
  parameter bit          ONES_COMPLEMENT = 1'b0,
  parameter int unsigned X_W     = 12,
  parameter int unsigned SIG_W   = 8,
  parameter int unsigned SIG_F   = 6,
  localparam int unsigned Y_W    = ((X_W > Z_W + SIG_W - SIG_F) ? X_W : Z_W + SIG_W - SIG_F) + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     noise_valid,
  input  logic signed [Z_W-1:0]    noise,
  input  logic signed [X_W-1:0]    x,
  input  logic        [SIG_W-1:0]  sigma,
  output logic                     y_valid,
  output logic signed [Y_W-1:0]    y
);

  localparam int unsigned SHIFT  = 1 + SIG_F + awgn_pkg::norm_shift(N);
  localparam int unsigned Z2_W   = Z_W + 2;
  localparam int unsigned P_W    = Z2_W + SIG_W + 1;
  localparam int          MEAN_C = ONES_COMPLEMENT ? int'(N) : 0;

  logic signed [Z2_W-1:0] z2;
  logic signed [P_W-1:0]  prod;
  logic signed [P_W-SHIFT-1:0] scaled;
  logic signed [Y_W-1:0]  y_comb;

  always_comb begin
    z2     = (Z2_W'(noise) <<< 1) + Z2_W'(MEAN_C);
    prod   = P_W'(z2) * signed'({1'b0, sigma});
    scaled = (P_W-SHIFT)'(prod >>> SHIFT);
    y_comb = Y_W'(x) + Y_W'(scaled);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= noise_valid;
      if (noise_valid) y <= y_comb;
    end
  end

endmodule
