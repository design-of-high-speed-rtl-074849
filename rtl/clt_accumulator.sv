// clt_accumulator: central-limit accumulation of N Box-Muller samples.
//
// A single quantised Box-Muller sample has a visibly rippled density. Adding
// N independent ones convolves that density with itself N-1 times, which
// smooths the ripple; N = 4 is the reference setting. The block is one adder
// with a feedback register: the first valid input of a group loads the
// register, the next N-1 are added to it, and on the N-th the completed sum
// is written to the output register.
//
// Interface: in/in_valid carry one (4.B) two's complement sample per clock.
// out is (4 + log2(N) . B) two's complement, OUT_W = IN_W + clog2(N) bits,
// and out_valid pulses for one clock, one clock after the N-th input of the
// group. With in_valid high every clock the output rate is f_clk / N. The
// sum has mean 0 and standard deviation sqrt(N) when the inputs are unit
// variance samples; scaling it is left to the back end. The adder loop and
// the output width follow the published architecture; the group counter and
// the load-on-first-sample scheme are this design's own.
module clt_accumulator #(
  parameter int unsigned N    = awgn_pkg::N_ACC,
  parameter int unsigned IN_W = 4 + awgn_pkg::B_FRAC,
  localparam int unsigned CNT_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned OUT_W = IN_W + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out
);

  if (N < 1) begin : g_bad_n
    $error("clt_accumulator: N must be at least 1");
  end

  logic [CNT_W-1:0]        cnt;
  logic signed [OUT_W-1:0] acc;
  logic signed [OUT_W-1:0] sum;

  // Running sum including the current input; the first sample of a group
  // starts from zero instead of the register.
  assign sum = ((cnt == '0) ? OUT_W'(0) : acc) + OUT_W'(in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CNT_W'(N - 1)) begin
          out       <= sum;
          out_valid <= 1'b1;
          cnt       <= '0;
        end else begin
          acc <= sum;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
