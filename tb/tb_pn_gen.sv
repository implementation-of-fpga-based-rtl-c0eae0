// Self-checking testbench for pn_gen.
//
// Programs three maximal-length generator polynomials (orders 6, 9 and 10)
// and compares every chip with a reference LFSR written from the tap list of
// the polynomial. Independently of the reference it checks the m-sequence
// properties: the period is 2^N - 1 and one period holds 2^(N-1) ones. It
// also checks that the chip holds while `adv` is low and that `load`
// restarts the sequence from the seed.
module tb_pn_gen;
  logic       clk = 1'b0;
  logic       rst, load, adv, chip;
  logic [9:0] poly, seed;
  logic [3:0] order;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pn_gen #(.MAX_ORDER(10)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Reference: stage k at ref_s[k]; feedback is the XOR of the listed taps.
  task automatic run_poly(input int n, input int taps[$], input logic [9:0] sd);
    bit ref_s [1:10];
    bit seq [$];
    int ones, period;
    poly = '0;
    foreach (taps[t]) poly[taps[t]-1] = 1'b1;
    seed  = sd;
    order = 4'(n);
    for (int k = 1; k <= 10; k++) ref_s[k] = sd[k-1];
    @(negedge clk); load = 1'b1; adv = 1'b0;
    @(negedge clk); load = 1'b0; adv = 1'b1;
    period = (1 << n) - 1;
    for (int i = 0; i < 2 * period; i++) begin
      bit fb;
      check(chip == ref_s[n], $sformatf("order %0d chip %0d", n, i));
      seq.push_back(chip);
      fb = 1'b0;
      foreach (taps[t]) fb ^= ref_s[taps[t]];
      for (int k = 10; k > 1; k--) ref_s[k] = ref_s[k-1];
      ref_s[1] = fb;
      @(negedge clk);
    end
    adv = 1'b0;
    ones = 0;
    for (int i = 0; i < period; i++) begin
      ones += int'(seq[i]);
      if (seq[i] != seq[i + period]) begin
        failures++;
        $display("FAIL: order %0d not periodic at %0d", n, i);
      end
    end
    checks++;
    check(ones == (1 << (n - 1)), $sformatf("order %0d balance %0d", n, ones));
  endtask

  initial begin
    bit first [$];
    rst = 1'b1; load = 1'b0; adv = 1'b0;
    poly = '0; seed = '0; order = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_poly(6,  '{6, 5}, 10'h020);
    run_poly(9,  '{9, 5}, 10'h0a5);
    run_poly(10, '{10, 7}, 10'h001);

    // hold and reload
    poly = 10'h030; seed = 10'h020; order = 4'd6;
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0; adv = 1'b1;
    for (int i = 0; i < 10; i++) begin first.push_back(chip); @(negedge clk); end
    adv = 1'b0;
    begin
      logic h;
      h = chip;
      repeat (5) @(negedge clk);
      check(chip == h, "chip held while adv low");
    end
    load = 1'b1; @(negedge clk); load = 1'b0; adv = 1'b1;
    for (int i = 0; i < 10; i++) begin
      check(chip == first[i], $sformatf("reload chip %0d", i));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
