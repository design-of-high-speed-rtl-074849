// box_muller: one quantised Box-Muller sample per clock.
//
// From the random addresses of the LFSR bank it forms
//
//   n+ = floor(f_r(s) * g(s') / 2^(M_F + M_G - B))     (unsigned, B fraction bits)
//   n  = sign ? -n+ : n+                                (two's complement)
//
// f_r(s) comes from the K rank ROMs (f_rom), g(s') from the quarter-cosine
// ROM (g_rom). The product has format (4.(M_F+M_G)) and is truncated, not
// rounded, to (4.B). With ONES_COMPLEMENT = 1 the negation is a plain bit
// inversion (-n+ - 2^-B): cheaper, but the mean of n becomes -2^(-B-1), which
// the back end removes. The default two's complement keeps the mean at 0 and
// gives the value 0 both signs' probability.
//
// Pipeline (2 clocks, one sample per clock):
//   stage 1 registers the two ROM outputs, the sign and the selected rank;
//   stage 2 registers n. n_valid follows in_valid two clocks later.
// The output n is (4.B) two's complement, N_W = 4 + B bits; an elaboration
// check makes sure the largest n+ the tables can give fits in it. The
// arithmetic follows the published architecture; the pipeline registers are
// this design's own placement.
module box_muller #(
  parameter int unsigned K       = awgn_pkg::K_RANKS,
  parameter int unsigned Q_F     = awgn_pkg::Q_F,
  parameter int unsigned M_F     = awgn_pkg::M_F,
  parameter real         DELTA_F = awgn_pkg::DELTA_F,
  parameter int unsigned Q_G     = awgn_pkg::Q_G,
  parameter int unsigned M_G     = awgn_pkg::M_G,
  parameter real         DELTA_G = awgn_pkg::DELTA_G,
  parameter int unsigned B       = awgn_pkg::B_FRAC,
  parameter bit          ONES_COMPLEMENT = 1'b0,
  localparam int unsigned N_W    = 4 + B,
  localparam int unsigned RANK_W = $clog2(K + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [K-1:0][Q_F-1:0]       s_f,
  input  logic [Q_G-1:0]              s_g,
  input  logic                        sign,
  output logic                        n_valid,
  output logic signed [N_W-1:0]       n,
  output logic [RANK_W-1:0]           rank    // rank that produced n (0: all addresses zero)
);

  localparam int unsigned F_W    = M_F + 3;
  localparam int unsigned G_W    = M_G + 1;
  localparam int unsigned P_W    = F_W + G_W;          // (4.(M_F+M_G))
  localparam int unsigned SHIFT  = M_F + M_G - B;

  if (M_F + M_G < B) begin : g_bad_b
    $error("box_muller: B must not exceed M_F + M_G");
  end
  if (awgn_pkg::n_plus_max(K, Q_F, M_F, DELTA_F, Q_G, M_G, DELTA_G, B) >= 2**(N_W-1)) begin : g_overflow
    $error("box_muller: largest n+ does not fit the (4.B) signed output");
  end

  logic [F_W-1:0]    f_comb;
  logic [G_W-1:0]    g_comb;
  logic [RANK_W-1:0] rank_comb;

  f_rom #(.K(K), .Q(Q_F), .M(M_F), .DELTA(DELTA_F)) u_f_rom (
    .s(s_f), .f(f_comb), .rank(rank_comb)
  );

  g_rom #(.Q(Q_G), .M(M_G), .DELTA(DELTA_G)) u_g_rom (
    .addr(s_g), .g(g_comb)
  );

  // ---- stage 1: ROM outputs ------------------------------------------------
  logic [F_W-1:0]    f_q;
  logic [G_W-1:0]    g_q;
  logic              sign_q;
  logic [RANK_W-1:0] rank_q;
  logic              v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      f_q    <= '0;
      g_q    <= '0;
      sign_q <= 1'b0;
      rank_q <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        f_q    <= f_comb;
        g_q    <= g_comb;
        sign_q <= sign;
        rank_q <= rank_comb;
      end
    end
  end

  // ---- stage 2: multiply, truncate, apply the sign -------------------------
  logic [P_W-1:0]          prod;
  logic [N_W-1:0]          n_plus;
  logic signed [N_W-1:0]   n_comb;

  always_comb begin
    prod   = P_W'(f_q) * P_W'(g_q);
    n_plus = N_W'(prod >> SHIFT);
    if (!sign_q)              n_comb = signed'(n_plus);
    else if (ONES_COMPLEMENT) n_comb = signed'(~n_plus);
    else                      n_comb = -signed'(n_plus);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_valid <= 1'b0;
      n       <= '0;
      rank    <= '0;
    end else begin
      n_valid <= v1;
      if (v1) begin
        n    <= n_comb;
        rank <= rank_q;
      end
    end
  end

endmodule
