// lfsr: one-to-many (Galois) linear feedback shift register that performs
// NB_ITER shift steps per clock.
//
// Register bit i holds the term x^(i+1) of the polynomial picture: on one step
// every bit moves one place up, the bit leaving the top (x^LEN) is fed back
// into bit 0 and XORed into every bit whose polynomial term is present. With
// LEN = 5 and the polynomial x^5 + x^2 + 1 this is the textbook five-flip-flop
// circuit with a single XOR between x^2 and x^3. NB_ITER such steps are
// unrolled into one combinational function of the state, so the register
// advances NB_ITER positions of the sequence per clock at the cost of a few
// XOR gates and no extra flip-flops.
//
// Output: bits[j] = state[LEN-NB_ITER+j], the NB_ITER top register bits
// (x^2..x^5 for LEN = 5, NB_ITER = 4). They are read straight from flip-flops
// and change one clock after each enabled edge. Reset (active low,
// synchronous) loads SEED; a zero seed is rejected because the all-zero state
// never leaves itself. The polynomial comes from awgn_pkg::lfsr_taps; an
// unsupported LEN is rejected at elaboration. The unrolled multi-step update
// and the choice of output bits follow the published design; reset, enable
// and seed handling are this design's own.
module lfsr #(
  parameter int unsigned LEN     = 5,
  parameter int unsigned NB_ITER = 4,
  parameter logic [LEN-1:0] SEED = LEN'(1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic [NB_ITER-1:0] bits,
  output logic [LEN-1:0]     state   // full register, bit i = term x^(i+1)
);

  localparam logic [awgn_pkg::LFSR_MAX_LEN-1:0] TAPS_FULL = awgn_pkg::lfsr_taps(LEN);
  localparam logic [LEN-1:0] TAPS = TAPS_FULL[LEN-1:0];

  if (TAPS_FULL == '0) begin : g_bad_len
    $error("lfsr: no feedback polynomial for this length");
  end
  if (NB_ITER < 1 || NB_ITER > LEN) begin : g_bad_iter
    $error("lfsr: NB_ITER must lie in 1..LEN");
  end
  if (SEED == '0) begin : g_bad_seed
    $error("lfsr: SEED must be non-zero");
  end

  logic [LEN-1:0] next_state;

  always_comb begin
    logic [LEN-1:0] s;
    s = state;
    for (int unsigned i = 0; i < NB_ITER; i++) begin
      s = s[LEN-1] ? ({s[LEN-2:0], 1'b0} ^ TAPS) : {s[LEN-2:0], 1'b0};
    end
    next_state = s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= next_state;
  end

  assign bits = state[LEN-1 -: NB_ITER];

endmodule
