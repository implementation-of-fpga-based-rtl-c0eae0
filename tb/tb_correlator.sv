// Self-checking testbench for correlator (with a pn_gen beside it).
//
// A 64-tap correlator and the order-6 sequence x^6 + x^5 + 1. Before the
// first start pulse inputs must be taken and dropped. After a start the input
// must stall while the coefficients load (L cycles), then every input sample
// must give one output equal to ((sum p_l re x[n-l])^2 + (sum p_l im x[n-l])^2)
// >> PWR_SHIFT, saturated to 32 bits, with p_l = +/-1 from chip L-1-l of a
// reference LFSR and samples before the start taken as zero. The stream is a
// repeated spread sequence plus noise, under random back-pressure. Runs with
// L = 63, L = 20 and L = 100 (clamped to the 64 taps), one run at full scale
// to reach saturation, and a latency run: with no back-pressure an output
// follows its input by exactly 2 + log2(64) cycles, one per cycle.
module tb_correlator;
  import cs_pkg::*;
  localparam int TAPS = 64, LV = 6, SH = 4;
  logic clk = 1'b0;
  logic rst, start;
  logic [15:0] seq_len;
  sc16_t s_tdata;
  logic s_tvalid, s_tready;
  logic [31:0] m_tdata;
  logic m_tvalid, m_tready;
  logic pn_chip, pn_adv, pn_load;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  correlator #(.TAPS(TAPS), .PWR_SHIFT(SH)) dut (.*);
  pn_gen #(.MAX_ORDER(10)) u_pn (.clk, .rst, .load(pn_load), .adv(pn_adv),
    .poly(10'h030), .seed(10'h020), .order(4'd6), .chip(pn_chip));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit chips [$];
  int xi [$], xq [$];
  int bp_pct;

  task automatic make_chips(input int len);
    bit s [1:6];
    chips.delete();
    s = '{0, 0, 0, 0, 0, 1};
    for (int i = 0; i < len; i++) begin
      bit fb;
      chips.push_back(s[6]);
      fb = s[6] ^ s[5];
      for (int k = 6; k > 1; k--) s[k] = s[k-1];
      s[1] = fb;
    end
  endtask

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

  task automatic pulse_start(input int len);
    int stall;
    @(negedge clk);
    seq_len = 16'(len);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    stall = 0;
    #1;
    while (!s_tready) begin stall++; @(negedge clk); #1; end
    checks++;
    if (stall != ((len > TAPS) ? TAPS : len)) begin
      failures++;
      $display("FAIL: load took %0d cycles for L=%0d", stall, len);
    end
  endtask

  task automatic send(input int n, input int len, input int amp, input int noise);
    for (int j = 0; j < n; j++) begin
      int c, a;
      c = j % 63;
      a = chips.size() > 0 ? 1 : 1;
      xi.push_back(( (c < 63 && sig_chip(c)) ? amp : -amp) + $signed($urandom_range(2*noise)) - noise);
      xq.push_back(((c < 63 && sig_chip(c)) ? -amp / 2 : amp / 2) + $signed($urandom_range(2*noise)) - noise);
      if (xi[$] > 32767) xi[$] = 32767;
      if (xi[$] < -32768) xi[$] = -32768;
      if (xq[$] > 32767) xq[$] = 32767;
      if (xq[$] < -32768) xq[$] = -32768;
      s_tdata.i = 16'(xi[$]);
      s_tdata.q = 16'(xq[$]);
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      if ($urandom_range(99) < 10) begin s_tvalid = 1'b0; @(negedge clk); end
    end
    s_tvalid = 1'b0;
  endtask

  bit full_seq [$];
  function automatic bit sig_chip(input int c);
    return full_seq[c];
  endfunction

  task automatic recv(input int n, input int len);
    for (int j = 0; j < n; j++) begin
      do begin
        @(negedge clk);
        m_tready = ($urandom_range(99) >= bp_pct);
        #1;
      end while (!(m_tvalid && m_tready));
      checks++;
      if (64'(m_tdata) != ref_pwr(j, (len > TAPS) ? TAPS : len)) begin
        failures++;
        if (failures < 10) $display("FAIL: L=%0d out %0d got %0d want %0d", len, j, m_tdata,
                                    ref_pwr(j, (len > TAPS) ? TAPS : len));
      end
    end
    @(negedge clk);
    m_tready = 1'b0;
  endtask

  task automatic run(input int len, input int n, input int amp, input int noise);
    make_chips((len > TAPS) ? TAPS : len);
    xi.delete(); xq.delete();
    pulse_start(len);
    fork
      send(n, len, amp, noise);
      recv(n, len);
    join
  endtask

  initial begin
    bit s [1:6];
    s = '{0, 0, 0, 0, 0, 1};
    for (int i = 0; i < 63; i++) begin
      bit fb;
      full_seq.push_back(s[6]);
      fb = s[6] ^ s[5];
      for (int k = 6; k > 1; k--) s[k] = s[k-1];
      s[1] = fb;
    end
    rst = 1'b1; start = 1'b0; seq_len = 16'd63;
    s_tvalid = 1'b0; s_tdata = '0; m_tready = 1'b1; bp_pct = 30;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // idle: input dropped, nothing out
    s_tvalid = 1'b1; s_tdata = '{16'sd100, 16'sd100};
    begin
      int outs = 0;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        if (!s_tready) outs++;
        if (m_tvalid) outs++;
      end
      checks++;
      if (outs != 0) begin failures++; $display("FAIL: idle correlator not dropping input"); end
    end
    s_tvalid = 1'b0;
    run(63, 300, 200, 300);
    run(20, 200, 500, 100);
    run(100, 200, 300, 50);
    run(63, 150, 32000, 0);
    // latency and rate with no back-pressure
    begin
      int t_in [$], t_out [$];
      bp_pct = 0;
      make_chips(63);
      pulse_start(63);
      m_tready = 1'b1;
      fork
        for (int j = 0; j < 50; j++) begin
          s_tdata = '{16'(j), 16'(-j)};
          s_tvalid = 1'b1;
          #1;
          if (s_tready) t_in.push_back(cycle);
          @(negedge clk);
        end
        while (t_out.size() < 50) begin
          @(negedge clk);
          #1;
          if (m_tvalid) t_out.push_back(cycle);
        end
      join
      s_tvalid = 1'b0;
      for (int j = 0; j < 50; j++) begin
        checks++;
        if (t_out[j] - t_in[j] != 2 + LV || (j > 0 && t_out[j] - t_out[j-1] != 1)) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d at %0d", t_out[j] - t_in[j], j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
