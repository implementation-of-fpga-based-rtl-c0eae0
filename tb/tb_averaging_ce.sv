// Self-checking testbench for averaging_ce.
//
// Checks the reset contents and readback of the settings registers, programs
// K = 4 and a packet length of 10 over the settings bus and compares the
// averaged packets with sums computed here. A block reset in the middle of a
// group must discard the partial sums: the first group after the reset is the
// mean of the packets sent after it.
module tb_averaging_ce;
  import cs_pkg::*;
  logic clk = 1'b0;
  logic rst;
  set_bus_t set_bus;
  logic [63:0] rb_data;
  logic [31:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tlast, m_tready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  averaging_ce #(.MAX_LEN(64)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  // send n values; check every output against the group means of vals
  logic [31:0] vals [$];
  task automatic run(input int n, input int len, input int lg, input bit expect_out);
    int outs;
    outs = 0;
    vals.delete();
    for (int j = 0; j < n; j++) vals.push_back($urandom);
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      s_tdata = vals[j];
      s_tvalid = 1'b1;
      #1;
      if (m_tvalid) begin
        int g, i;
        longint unsigned sum;
        g = outs / len; i = outs % len;
        sum = 0;
        for (int k = 0; k < (1 << lg); k++) sum += vals[(g * (1 << lg) + k) * len + i];
        check(64'(m_tdata) == (sum >> lg) && m_tlast == (i == len - 1),
              $sformatf("output %0d got %0d want %0d", outs, m_tdata, sum >> lg));
        outs++;
      end
    end
    @(negedge clk);
    s_tvalid = 1'b0;
    #1;
    if (m_tvalid) outs++;
    if (expect_out) check(outs == n >> lg, $sformatf("%0d outputs for %0d inputs", outs, n));
  endtask

  initial begin
    rst = 1'b1; set_bus = '0; s_tvalid = 1'b0; s_tdata = '0; m_tready = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    rb(0, 64'h0);
    rb(1, 64'h0000_003f);
    wr(AVG_SR_CFG, {16'd2, 16'd10});
    rb(1, 64'h0002_000a);
    run(80, 10, 2, 1);
    // partial group, then block reset
    run(25, 10, 2, 0);
    wr(AVG_SR_RESET, 32'd1);
    rb(0, 64'h1);
    wr(AVG_SR_RESET, 32'd0);
    run(40, 10, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
