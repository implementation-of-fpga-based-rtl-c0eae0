// Pipelined binary adder tree.
//
// Sums N signed inputs of IW bits (N a power of two, at least 2) in
// log2(N) register levels: level k holds N / 2^k partial sums, each the sum
// of two sums of the level below. Every level is registered and advances
// only when `en` is high, so the whole tree can be frozen by back-pressure.
// Sums are carried at the full output width IW + log2(N), so no overflow can
// occur.
//
// Timing: `sum` is the total of the `in` values presented log2(N) enabled
// cycles earlier.
module adder_tree #(
  parameter int unsigned N  = 512,
  parameter int unsigned IW = 17,
  localparam int unsigned LV = $clog2(N),
  localparam int unsigned OW = IW + LV
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic signed [IW-1:0] in [N],
  output logic signed [OW-1:0] sum
);

  for (genvar k = 0; k < LV; k++) begin : g_lvl
    localparam int unsigned M = N >> (k + 1);
    logic signed [OW-1:0] q [M];
    if (k == 0) begin : g_first
      always_ff @(posedge clk)
        if (en)
          for (int i = 0; i < int'(M); i++)
            q[i] <= OW'(in[2*i]) + OW'(in[2*i+1]);
    end else begin : g_next
      always_ff @(posedge clk)
        if (en)
          for (int i = 0; i < int'(M); i++)
            q[i] <= g_lvl[k-1].q[2*i] + g_lvl[k-1].q[2*i+1];
    end
  end

  assign sum = g_lvl[LV-1].q[0];

endmodule
