// Self-checking testbench for spreader_ce.
//
// Checks the reset contents and readback of the settings registers, then
// programs the order-9 polynomial x^9 + x^5 + 1 with a seed of all ones and
// L = 511 over the settings bus and compares every spread sample with a
// reference LFSR. Then it holds the block reset in the middle of a symbol
// (no output may appear) and checks that after its release the next symbol
// starts again from the first chip.
module tb_spreader_ce;
  import cs_pkg::*;
  logic clk = 1'b0;
  logic rst;
  set_bus_t set_bus;
  logic [63:0] rb_data;
  sc16_t s_tdata, m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tlast, m_tready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spreader_ce dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    set_bus = '{1'b1, a, d};
    @(negedge clk);
    set_bus = '0;
  endtask

  task automatic rb(input logic [7:0] a, input logic [63:0] want);
    wr(SR_RB_ADDR, 32'(a));
    #1;
    check(rb_data == want, $sformatf("readback %0d = %h, want %h", a, rb_data, want));
  endtask

  bit chips [$];
  task automatic make_chips(input int len);
    bit s [1:9];
    chips.delete();
    for (int k = 1; k <= 9; k++) s[k] = 1'b1;
    for (int i = 0; i < len; i++) begin
      bit fb;
      chips.push_back(s[9]);
      fb = s[9] ^ s[5];
      for (int k = 9; k > 1; k--) s[k] = s[k-1];
      s[1] = fb;
    end
  endtask

  task automatic spread_check(input sc16_t sym, input int len, input int upto);
    s_tdata = sym;
    s_tvalid = 1'b1;
    #1;
    while (!s_tready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_tvalid = 1'b0;
    for (int k = 0; k < upto; k++) begin
      #1;
      while (!m_tvalid) begin @(negedge clk); #1; end
      checks++;
      if (m_tdata.i != (chips[k] ? sym.i : -sym.i) || m_tdata.q != (chips[k] ? sym.q : -sym.q) ||
          m_tlast != (k == len - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL: chip %0d got %0d", k, int'(m_tdata.i));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1; set_bus = '0; s_tvalid = 1'b0; s_tdata = '0; m_tready = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    rb(0, 64'h0);
    rb(1, 64'h0030_0020);
    rb(2, 64'h003f_0006);
    rb(7, 64'h0);
    wr(SPR_SR_POLYSEED, 32'h0110_01ff);
    wr(SPR_SR_LENS, {16'd511, 16'd9});
    rb(1, 64'h0110_01ff);
    rb(2, 64'h01ff_0009);
    make_chips(511);
    spread_check('{16'sd1000, -16'sd77}, 511, 511);
    spread_check('{-16'sd5, 16'sd32767}, 511, 511);
    // block reset in the middle of a symbol
    spread_check('{16'sd9, 16'sd9}, 511, 100);
    wr(SPR_SR_RESET, 32'd1);
    rb(0, 64'h1);
    begin
      int seen = 0;
      repeat (20) begin @(negedge clk); if (m_tvalid) seen++; end
      check(seen == 0, "output during block reset");
    end
    wr(SPR_SR_RESET, 32'd0);
    spread_check('{16'sd321, 16'sd123}, 511, 511);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
