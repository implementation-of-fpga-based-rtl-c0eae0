// Self-checking testbench for spreader (with a pn_gen beside it).
//
// Sends random SC16 symbols, including full-scale negative values, and takes
// the spread samples with random back-pressure. Every output is compared
// with symbol * (+1/-1) for the chip of a reference LFSR, chip 1 meaning +1,
// with -32768 negated to +32767; `m_tlast` must mark the last chip of each
// symbol. Runs once with L equal to the period of the order-6 sequence and
// once with a shorter L, where every symbol must restart the sequence.
// Finally it checks the rate: with no back-pressure, S symbols of L chips
// come out in exactly S * L consecutive cycles.
module tb_spreader;
  import cs_pkg::*;
  logic clk = 1'b0;
  logic rst;
  logic [10:0] seq_len;
  sc16_t s_tdata, m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tlast, m_tready;
  logic pn_chip, pn_adv, pn_load;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  spreader #(.MAX_LEN(1023)) dut (.*);
  pn_gen #(.MAX_ORDER(10)) u_pn (.clk, .rst, .load(pn_load), .adv(pn_adv),
    .poly(10'h030), .seed(10'h020), .order(4'd6), .chip(pn_chip));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit chips [$];
  sc16_t syms [$];
  int bp_pct = 30;

  function automatic logic signed [15:0] times(input logic signed [15:0] x, input bit c);
    int v;
    v = c ? int'(x) : -int'(x);
    if (v > 32767) v = 32767;
    return 16'(v);
  endfunction

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

  // Stimulus changes at the falling edge; a transfer is seen one delta later
  // and takes place at the following rising edge.
  task automatic send(input int n);
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      if ($urandom_range(99) < 20) begin s_tvalid = 1'b0; @(negedge clk); end
      s_tdata  = syms[j];
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    s_tvalid = 1'b0;
  endtask

  task automatic recv(input int n, input int len);
    for (int j = 0; j < n; j++)
      for (int k = 0; k < len; k++) begin
        do begin
          @(negedge clk);
          m_tready = ($urandom_range(99) >= bp_pct);
          #1;
        end while (!(m_tvalid && m_tready));
        checks++;
        if (m_tdata.i != times(syms[j].i, chips[k]) || m_tdata.q != times(syms[j].q, chips[k]) ||
            m_tlast != (k == len - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: sym %0d chip %0d got %0d,%0d last %0b", j, k,
                     int'(m_tdata.i), int'(m_tdata.q), m_tlast);
        end
      end
    @(negedge clk);
    m_tready = 1'b0;
  endtask

  task automatic run(input int len, input int n);
    seq_len = 11'(len);
    make_chips(len);
    syms.delete();
    for (int j = 0; j < n; j++) begin
      sc16_t v;
      v.i = 16'($urandom);
      v.q = 16'($urandom);
      if (j == 1) v = '{16'sh8000, 16'sh7fff};
      syms.push_back(v);
    end
    fork
      send(n);
      recv(n, len);
    join
  endtask

  initial begin
    rst = 1'b1; s_tvalid = 1'b0; m_tready = 1'b0; s_tdata = '0; seq_len = 11'd63;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(63, 8);
    run(5, 20);
    // rate: no back-pressure, symbols always available
    begin
      int first_c, last_c, cnt;
      bp_pct = 0;
      seq_len = 11'd63;
      syms.delete();
      for (int j = 0; j < 4; j++) syms.push_back('{16'(j + 1), 16'(-j)});
      make_chips(63);
      @(negedge clk);
      s_tvalid = 1'b1; s_tdata = syms[0];
      m_tready = 1'b1;
      cnt = 0;
      first_c = -1;
      while (cnt < 4 * 63) begin
        #1;
        if (m_tvalid) begin
          if (first_c < 0) first_c = cycle;
          last_c = cycle;
          cnt++;
        end
        if (s_tready) begin
          @(negedge clk);
          s_tdata = syms[(cnt / 63 + 1) % 4];
        end else @(negedge clk);
      end
      s_tvalid = 1'b0;
      check_rate: begin
        checks++;
        if (last_c - first_c != 4 * 63 - 1) begin
          failures++;
          $display("FAIL: rate, %0d cycles for %0d outputs", last_c - first_c + 1, 4 * 63);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
