// Self-checking testbench for corr_lane.
//
// A 32-tap lane with random coefficients and a random tap mask. Samples are
// shifted in and the pipeline enabled at random. The reference keeps its own
// copy of the sample history and computes y = sum of (+/-) x[n-l] over the
// enabled taps for the state before every enabled edge; the lane output must
// match it log2(32) enabled edges later. Also checks that `clr` empties the
// history, and the latency with the enable held high: a single impulse shows
// up at the output exactly 1 + log2(32) cycles after it was shifted in.
module tb_corr_lane;
  localparam int TAPS = 32, W = 16, LV = 5, YW = W + 1 + LV;
  logic clk = 1'b0;
  logic en, shift, clr;
  logic signed [W-1:0] x;
  logic [TAPS-1:0] coef, mask;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0;
  longint hist [$];
  int model [TAPS];

  always #5 clk = ~clk;

  corr_lane #(.TAPS(TAPS), .W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y();
    longint s = 0;
    for (int l = 0; l < TAPS; l++)
      if (mask[l]) s += coef[l] ? longint'(model[l]) : -longint'(model[l]);
    return s;
  endfunction

  initial begin
    en = 1'b0; shift = 1'b0; clr = 1'b1; x = '0;
    coef = TAPS'($urandom); mask = '1;
    foreach (model[l]) model[l] = 0;
    @(negedge clk);
    clr = 1'b0;
    for (int pass = 0; pass < 3; pass++) begin
      coef = TAPS'($urandom);
      mask = (pass == 1) ? TAPS'((64'd1 << 13) - 1) : '1;
      for (int t = 0; t < 1500; t++) begin
        @(negedge clk);
        // check the value registered at the last edge
        if (hist.size() >= LV + 2) begin
          checks++;
          if (longint'(y) != hist[hist.size() - LV]) begin
            failures++;
            if (failures < 10) $display("FAIL: pass %0d t=%0d got %0d want %0d", pass, t, y, hist[hist.size() - LV]);
          end
        end
        en    = ($urandom_range(99) < 75);
        shift = ($urandom_range(99) < 80);
        x     = ($urandom_range(9) == 0) ? 16'sh8000 : 16'($urandom);
        #1;
        if (en) begin
          hist.push_back(ref_y());
          if (shift) begin
            for (int l = TAPS - 1; l > 0; l--) model[l] = model[l-1];
            model[0] = int'(x);
          end
        end
      end
      hist.delete();
    end
    // clear, then one impulse with the pipeline always enabled
    @(negedge clk);
    clr = 1'b1; en = 1'b1; shift = 1'b0; coef = '1; mask = '1;
    @(negedge clk);
    clr = 1'b0;
    repeat (LV + 2) @(negedge clk);
    check_clear: begin
      checks++;
      if (y != 0) begin failures++; $display("FAIL: not cleared, y=%0d", y); end
    end
    shift = 1'b1; x = 16'sd1234;
    @(negedge clk);
    shift = 1'b0;
    for (int c = 1; c <= LV + 2; c++) begin
      checks++;
      if ((c < LV + 1 && y != 0) || (c >= LV + 1 && y != 1234)) begin
        failures++;
        $display("FAIL: impulse latency, cycle %0d y=%0d", c, y);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
