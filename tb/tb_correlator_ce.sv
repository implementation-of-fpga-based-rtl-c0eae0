// Self-checking testbench for correlator_ce (128 taps).
//
// Checks the reset contents and readback of the settings registers, programs
// the order-7 polynomial x^7 + x^6 + 1 with L = 127, starts the correlator by
// writing 1 to the start register and compares every power output with
// Equation-1 correlation computed here (samples before the start taken as
// zero). The start register is edge-detected: writing 1 again must not
// restart (no coefficient-load stall), while writing 0 and then 1 must. The
// block reset must return the engine to dropping its input.
module tb_correlator_ce;
  import cs_pkg::*;
  localparam int TAPS = 128, SH = 18;
  logic clk = 1'b0;
  logic rst;
  set_bus_t set_bus;
  logic [63:0] rb_data;
  sc16_t s_tdata;
  logic s_tvalid, s_tready;
  logic [31:0] m_tdata;
  logic m_tvalid, m_tready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  correlator_ce #(.TAPS(TAPS)) dut (.*);

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
  int xi [$], xq [$];

  function automatic longint unsigned ref_pwr(input int n, input int len);
    longint re = 0, im = 0;
    longint unsigned p;
    for (int l = 0; l < len; l++)
      if (n - l >= 0) begin
        re += chips[len-1-l] ? longint'(xi[n-l]) : -longint'(xi[n-l]);
        im += chips[len-1-l] ? longint'(xq[n-l]) : -longint'(xq[n-l]);
      end
    p = longint'(re * re + im * im) >> SH;
    return (p > 64'hffff_ffff) ? 64'hffff_ffff : p;
  endfunction

  // cycles until the input is accepted again
  task automatic stall_len(output int n);
    n = 0;
    s_tvalid = 1'b0;
    #1;
    while (!s_tready) begin n++; @(negedge clk); #1; end
  endtask

  task automatic stream(input int n);
    xi.delete(); xq.delete();
    fork
      for (int j = 0; j < n; j++) begin
        xi.push_back((chips[j % 127] ? 1000 : -1000) + int'($urandom_range(200)) - 100);
        xq.push_back((chips[j % 127] ? -500 : 500) + int'($urandom_range(200)) - 100);
        s_tdata = '{16'(xi[j]), 16'(xq[j])};
        s_tvalid = 1'b1;
        #1;
        while (!s_tready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      for (int got = 0; got < n; got++) begin
        #1;
        while (!m_tvalid) begin @(negedge clk); #1; end
        checks++;
        if (64'(m_tdata) != ref_pwr(got, 127)) begin
          failures++;
          if (failures < 10) $display("FAIL: out %0d got %0d want %0d", got, m_tdata, ref_pwr(got, 127));
        end
        @(negedge clk);
      end
    join
    s_tvalid = 1'b0;
  endtask

  initial begin
    int n;
    bit s [1:7];
    rst = 1'b1; set_bus = '0; s_tvalid = 1'b0; s_tdata = '0; m_tready = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    rb(0, 64'h0);
    rb(1, 64'h0);
    rb(2, 64'h0030_0020);
    rb(3, 64'h003f_0006);
    wr(COR_SR_POLYSEED, 32'h0060_0001);
    wr(COR_SR_LENS, {16'd127, 16'd7});
    rb(2, 64'h0060_0001);
    rb(3, 64'h007f_0007);
    s = '{1, 0, 0, 0, 0, 0, 0};
    for (int i = 0; i < 127; i++) begin
      bit fb;
      chips.push_back(s[7]);
      fb = s[7] ^ s[6];
      for (int k = 7; k > 1; k--) s[k] = s[k-1];
      s[1] = fb;
    end
    wr(COR_SR_START, 32'd1);
    rb(1, 64'h1);
    stall_len(n);
    check(n > 100, $sformatf("start did not load coefficients (%0d)", n));
    wr(COR_SR_START, 32'd1);
    @(negedge clk);
    wr(COR_SR_START, 32'd0);
    wr(COR_SR_START, 32'd1);
    @(negedge clk);
    stall_len(n);
    check(n >= 120 && n <= 127, $sformatf("restart stall %0d", n));
    stream(3 * 127 + 20);
    // same value written again: no restart, the stream goes on
    wr(COR_SR_START, 32'd1);
    #1;
    check(s_tready, "rewriting 1 restarted the correlator");
    // block reset: back to idle, input taken and dropped, no output
    wr(COR_SR_RESET, 32'd1);
    wr(COR_SR_RESET, 32'd0);
    s_tvalid = 1'b1;
    begin
      int seen = 0;
      repeat (30) begin @(negedge clk); #1; if (m_tvalid || !s_tready) seen++; end
      check(seen == 0, "engine not idle after block reset");
    end
    s_tvalid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
