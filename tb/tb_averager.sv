// Self-checking testbench for averager.
//
// Streams random 32-bit values with random gaps and back-pressure and checks
// each averaged packet against floor(sum of the K values at that position /
// K), computed here with 64-bit integers, and `m_tlast` on the last value of
// every packet. Covers K = 1 up to 128, packet lengths 1 and 2 (where the
// memory is read right after it is written), a length above the memory size
// (clamped), a factor above 128 (clamped), and the output rate: exactly one
// output per K inputs.
module tb_averager;
  localparam int MAX_LEN = 64, MAX_LOG = 7;
  logic clk = 1'b0;
  logic rst;
  logic [15:0] seq_len, log_avg;
  logic [31:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tlast, m_tready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  averager #(.MAX_LEN(MAX_LEN), .MAX_LOG(MAX_LOG)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] vals [$];
  int bp_pct = 30;

  task automatic send(input int n);
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      if ($urandom_range(99) < 15) begin s_tvalid = 1'b0; @(negedge clk); end
      s_tdata = vals[j];
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    s_tvalid = 1'b0;
  endtask

  task automatic recv(input int groups, input int len, input int lg);
    for (int g = 0; g < groups; g++)
      for (int i = 0; i < len; i++) begin
        longint unsigned s;
        s = 0;
        for (int k = 0; k < (1 << lg); k++) s += vals[(g * (1 << lg) + k) * len + i];
        s = s >> lg;
        do begin
          @(negedge clk);
          m_tready = ($urandom_range(99) >= bp_pct);
          #1;
        end while (!(m_tvalid && m_tready));
        checks++;
        if (64'(m_tdata) != s || m_tlast != (i == len - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL: len %0d K %0d group %0d pos %0d got %0d/%0b want %0d",
                                      len, 1 << lg, g, i, m_tdata, m_tlast, s);
        end
      end
  endtask

  task automatic run(input int len, input int lg_set, input int groups);
    int lg, l;
    lg = (lg_set > MAX_LOG) ? MAX_LOG : lg_set;
    l  = (len > MAX_LEN) ? MAX_LEN : len;
    @(negedge clk);
    rst = 1'b1;
    seq_len = 16'(len);
    log_avg = 16'(lg_set);
    @(negedge clk);
    rst = 1'b0;
    vals.delete();
    for (int j = 0; j < groups * (1 << lg) * l; j++) vals.push_back($urandom);
    fork
      send(vals.size());
      recv(groups, l, lg);
    join
    // nothing more may come out
    m_tready = 1'b1;
    repeat (4) @(negedge clk);
    checks++;
    if (m_tvalid) begin failures++; $display("FAIL: extra output"); end
  endtask

  initial begin
    rst = 1'b1; s_tvalid = 1'b0; m_tready = 1'b0; s_tdata = '0;
    seq_len = 16'd16; log_avg = 16'd2;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(16, 2, 3);
    run(1, 3, 4);
    run(2, 1, 6);
    run(5, 0, 4);
    run(100, 1, 2);
    run(3, 7, 2);
    run(4, 9, 1);
    bp_pct = 0;
    run(8, 3, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
