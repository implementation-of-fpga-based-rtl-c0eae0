// Self-checking testbench for adder_tree.
//
// Sixteen 17-bit inputs, random and at the extremes of their range, with the
// enable toggled at random. After the k-th enabled clock edge the output must
// equal the sum of the inputs presented at enabled edge k - log2(16) + 1,
// computed here with plain integer arithmetic.
module tb_adder_tree;
  localparam int N = 16, IW = 17, LV = 4;
  logic clk = 1'b0;
  logic en;
  logic signed [IW-1:0] in [N];
  logic signed [IW+LV-1:0] sum;
  int checks = 0, failures = 0;
  longint hist [$];

  always #5 clk = ~clk;

  adder_tree #(.N(N), .IW(IW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    foreach (in[i]) in[i] = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (hist.size() >= LV) begin
        checks++;
        if (longint'(sum) != hist[hist.size() - LV]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d got %0d want %0d", t, sum, hist[hist.size() - LV]);
        end
      end
      en = ($urandom_range(99) < 70);
      foreach (in[i]) begin
        case ($urandom_range(3))
          0: in[i] = 17'sh10000;
          1: in[i] = 17'sh0ffff;
          default: in[i] = 17'($urandom);
        endcase
      end
      if (en) begin
        longint s;
        s = 0;
        foreach (in[i]) s += longint'(in[i]);
        hist.push_back(s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
