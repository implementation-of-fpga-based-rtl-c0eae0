// One parallel correlator lane (real or imaginary part of the correlation).
//
// Samples enter a TAPS-deep shift register: tap 0 holds the newest sample
// x[n], tap l holds x[n-l], and the oldest sample falls out at the end. Each
// tap is multiplied by its PN coefficient p[l], which for a binary real
// sequence is only a choice between the sample (coefficient 1, meaning +1)
// and its two's complement (coefficient 0, meaning -1). Taps at or beyond the
// sequence length are masked to zero. A pipelined binary adder tree sums all
// taps, giving y[n] = sum over l of p[l] * x[n-l] for every input sample.
//
// Interface: `shift` pushes `x` into the shift register (only when `en` is
// high); `en` advances the adder tree; `clr` empties the shift register.
// `coef` and `mask` are the per-tap coefficient and enable bits.
//
// Timing: the sum for the sample shifted in with one enabled cycle appears on
// `y` 1 + log2(TAPS) enabled cycles later (one cycle for the shift register,
// one per tree level). Full throughput: one sample per cycle.
module corr_lane #(
  parameter int unsigned TAPS = 512,
  parameter int unsigned W    = 16,
  localparam int unsigned YW  = W + 1 + $clog2(TAPS)
) (
  input  logic                clk,
  input  logic                en,
  input  logic                shift,
  input  logic                clr,
  input  logic signed [W-1:0] x,
  input  logic [TAPS-1:0]     coef,
  input  logic [TAPS-1:0]     mask,
  output logic signed [YW-1:0] y
);

  logic signed [W-1:0] sr   [TAPS];
  logic signed [W:0]   prod [TAPS];

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int l = 0; l < int'(TAPS); l++) sr[l] <= '0;
    end else if (en && shift) begin
      sr[0] <= x;
      for (int l = 1; l < int'(TAPS); l++) sr[l] <= sr[l-1];
    end
  end

  always_comb
    for (int l = 0; l < int'(TAPS); l++)
      prod[l] = !mask[l] ? '0 : (coef[l] ? (W+1)'(sr[l]) : -(W+1)'(sr[l]));

  adder_tree #(.N(TAPS), .IW(W + 1)) u_tree (
    .clk (clk),
    .en  (en),
    .in  (prod),
    .sum (y)
  );

endmodule
