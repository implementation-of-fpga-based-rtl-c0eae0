// Body shared by the end-to-end channel sounder testbenches. The including
// module defines NUM_RX, TAPS, ORDER, POLY, L and LG and instantiates the
// design as `dut`.
//
// The host sends constant data symbols (A, 0) to the spreader, so the
// transmitter sends the PN sequence over and over. A model multipath channel
// per receive chain (three complex taps at different delays) turns the
// transmitted chips into the samples each correlator receives. The host takes
// the averaged profiles with random back-pressure. Every averaged value is
// compared with a reference that applies Equation 1 to the received samples,
// squares, shifts by PWR_SHIFT and averages K profiles; in the last profile
// the strongest delay must be where the strongest channel tap is.

  localparam int SH = 18;
  localparam int K = 1 << LG;
  localparam int GROUPS = 2;
  localparam int NCHIP = GROUPS * K * L + 2 * L;
  localparam int AMP = 4000;

  logic clk = 1'b0;
  logic rst;
  logic set_stb;
  logic [3:0] set_ce, rb_ce;
  logic [7:0] set_addr;
  logic [31:0] set_data;
  logic [63:0] rb_data;
  cs_pkg::sc16_t tx_in_tdata, tx_out_tdata;
  logic tx_in_tvalid, tx_in_tready, tx_out_tvalid, tx_out_tlast, tx_out_tready;
  cs_pkg::sc16_t rx_in_tdata [NUM_RX];
  logic rx_in_tvalid [NUM_RX], rx_in_tready [NUM_RX];
  logic [31:0] rx_out_tdata [NUM_RX];
  logic rx_out_tvalid [NUM_RX], rx_out_tlast [NUM_RX], rx_out_tready [NUM_RX];

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_host_stall = 0, n_profiles = 0, n_reset_idle = 0, n_readback = 0;

  always #5 clk = ~clk;

  // handshake rules on the streams the design drives
  int tx_err;
  int rx_err [NUM_RX];
  axis_check #(.W(32), .NAME("tx_out")) u_chk_tx (.clk, .rst, .valid(tx_out_tvalid),
    .ready(tx_out_tready), .last(tx_out_tlast), .data(tx_out_tdata), .errors(tx_err));
  for (genvar r = 0; r < NUM_RX; r++) begin : g_chk
    axis_check #(.W(32), .NAME("rx_out")) u_chk_rx (.clk, .rst, .valid(rx_out_tvalid[r]),
      .ready(rx_out_tready[r]), .last(rx_out_tlast[r]), .data(rx_out_tdata[r]), .errors(rx_err[r]));
  end

  initial begin
    repeat (40 * NCHIP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int ce, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    set_stb = 1'b1; set_ce = 4'(ce); set_addr = a; set_data = d;
    @(negedge clk);
    set_stb = 1'b0;
  endtask

  task automatic rb(input int ce, input logic [7:0] a, input logic [63:0] want);
    wr(ce, cs_pkg::SR_RB_ADDR, 32'(a));
    rb_ce = 4'(ce);
    #1;
    n_readback++;
    check(rb_data == want, $sformatf("CE %0d readback %0d = %h want %h", ce, a, rb_data, want));
  endtask

  // reference PN chips of one period
  bit chips [$];
  task automatic make_chips();
    bit s [1:10];
    s = '{default: 1'b1};
    for (int i = 0; i < L; i++) begin
      bit fb;
      chips.push_back(s[ORDER]);
      fb = 1'b0;
      for (int k = 1; k <= ORDER; k++) if (POLY[k-1]) fb ^= s[k];
      for (int k = 10; k > 1; k--) s[k] = s[k-1];
      s[1] = fb;
    end
  endtask

  // channel model: three taps per chain
  int dly [NUM_RX][3], gi [NUM_RX][3], gq [NUM_RX][3];
  int txh [$];                         // real chip values sent
  int rxi [NUM_RX][$], rxq [NUM_RX][$];

  function automatic longint unsigned ref_pwr(input int r, input int n);
    longint re = 0, im = 0;
    for (int l = 0; l < L && l <= n; l++) begin
      re += chips[L-1-l] ? longint'(rxi[r][n-l]) : -longint'(rxi[r][n-l]);
      im += chips[L-1-l] ? longint'(rxq[r][n-l]) : -longint'(rxq[r][n-l]);
    end
    return 64'((re * re + im * im) >> SH) > 64'hffff_ffff ? 64'hffff_ffff
                                                          : 64'((re * re + im * im) >> SH);
  endfunction

  // host side: one process per chain takes and checks the profiles
  task automatic host_rx(input int r);
    longint unsigned best;
    int best_i;
    for (int g = 0; g < GROUPS; g++) begin
      best = 0; best_i = -1;
      for (int i = 0; i < L; i++) begin
        longint unsigned s;
        s = 0;
        do begin
          @(negedge clk);
          rx_out_tready[r] = ($urandom_range(99) >= 20);
          #1;
          if (rx_out_tvalid[r] && !rx_out_tready[r]) n_host_stall++;
        end while (!(rx_out_tvalid[r] && rx_out_tready[r]));
        for (int k = 0; k < K; k++) s += ref_pwr(r, (g * K + k) * L + i);
        s = s >> LG;
        check(64'(rx_out_tdata[r]) == s && rx_out_tlast[r] == (i == L - 1),
              $sformatf("chain %0d group %0d delay %0d got %0d want %0d", r, g, i, rx_out_tdata[r], s));
        if (64'(rx_out_tdata[r]) > best) begin best = 64'(rx_out_tdata[r]); best_i = i; end
      end
      n_profiles++;
      // steady state: the peak sits at delay (L - 1 + d_strongest) mod L
      if (g == GROUPS - 1)
        check(best_i == (L - 1 + dly[r][0]) % L,
              $sformatf("chain %0d peak at %0d, want %0d", r, best_i, (L - 1 + dly[r][0]) % L));
    end
    @(negedge clk);
    rx_out_tready[r] = 1'b0;
  endtask

  // transmitter, channel and receivers, one chip per transfer
  task automatic air();
    int sent = 0;
    while (sent < NCHIP) begin
      bit all_ready;
      @(negedge clk);
      for (int r = 0; r < NUM_RX; r++) rx_in_tvalid[r] = 1'b0;
      tx_out_tready = 1'b0;
      #1;
      all_ready = 1'b1;
      for (int r = 0; r < NUM_RX; r++) all_ready &= rx_in_tready[r];
      if (!all_ready) n_in_stall++;
      if (tx_out_tvalid && all_ready) begin
        txh.push_back(int'(tx_out_tdata.i));
        check(tx_out_tdata.q == 0 && int'(tx_out_tdata.i) == (chips[sent % L] ? AMP : -AMP),
              $sformatf("tx chip %0d = %0d", sent, int'(tx_out_tdata.i)));
        for (int r = 0; r < NUM_RX; r++) begin
          int si = 0, sq = 0;
          for (int t = 0; t < 3; t++)
            if (sent - dly[r][t] >= 0) begin
              si += gi[r][t] * txh[sent - dly[r][t]];
              sq += gq[r][t] * txh[sent - dly[r][t]];
            end
          si = si / 4 + int'($urandom_range(40)) - 20;
          sq = sq / 4 + int'($urandom_range(40)) - 20;
          rxi[r].push_back(si);
          rxq[r].push_back(sq);
          rx_in_tdata[r] = '{16'(si), 16'(sq)};
          rx_in_tvalid[r] = 1'b1;
        end
        tx_out_tready = 1'b1;
        sent++;
      end
    end
    @(negedge clk);
    tx_out_tready = 1'b0;
    for (int r = 0; r < NUM_RX; r++) rx_in_tvalid[r] = 1'b0;
  endtask

  initial begin
    rst = 1'b1; set_stb = 1'b0; set_ce = '0; set_addr = '0; set_data = '0; rb_ce = '0;
    tx_in_tdata = '{16'(AMP), 16'sd0}; tx_in_tvalid = 1'b0; tx_out_tready = 1'b0;
    for (int r = 0; r < NUM_RX; r++) begin
      rx_in_tdata[r] = '0; rx_in_tvalid[r] = 1'b0; rx_out_tready[r] = 1'b0;
      dly[r] = '{3 + 2 * r, 9 + r, 17 + 3 * r};
      gi[r]  = '{4, -2, 1};
      gq[r]  = '{0, 1, -1};
    end
    make_chips();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // transmitter and receivers programmed with the same sequence
    wr(0, cs_pkg::SPR_SR_POLYSEED, {6'd0, POLY, 6'd0, 10'h3ff});
    wr(0, cs_pkg::SPR_SR_LENS, {16'(L), 16'(ORDER)});
    rb(0, 1, {32'd0, 6'd0, POLY, 6'd0, 10'h3ff});
    for (int r = 0; r < NUM_RX; r++) begin
      wr(1 + 2 * r, cs_pkg::COR_SR_POLYSEED, {6'd0, POLY, 6'd0, 10'h3ff});
      wr(1 + 2 * r, cs_pkg::COR_SR_LENS, {16'(L), 16'(ORDER)});
      wr(2 + 2 * r, cs_pkg::AVG_SR_CFG, {16'(LG), 16'(L)});
      rb(1 + 2 * r, 3, {32'd0, 16'(L), 16'(ORDER)});
      rb(2 + 2 * r, 1, {32'd0, 16'(LG), 16'(L)});
      wr(1 + 2 * r, cs_pkg::COR_SR_START, 32'd1);
    end
    tx_in_tvalid = 1'b1;
    fork
      air();
      begin
        fork
          for (int r = 0; r < NUM_RX; r++) begin
            automatic int rr = r;
            fork host_rx(rr); join_none
          end
        join
        wait fork;
      end
    join
    tx_in_tvalid = 1'b0;
    // block reset of the first correlator: it goes back to dropping input
    wr(1, cs_pkg::COR_SR_RESET, 32'd1);
    wr(1, cs_pkg::COR_SR_RESET, 32'd0);
    rb(1, 0, 64'd0);
    rx_in_tvalid[0] = 1'b1;
    rx_out_tready[0] = 1'b1;
    repeat (3 * L) begin
      @(negedge clk);
      #1;
      if (rx_in_tready[0] && !rx_out_tvalid[0]) n_reset_idle++;
    end
    rx_in_tvalid[0] = 1'b0;
    check(n_reset_idle == 3 * L, "correlator not idle after block reset");
    $display("mechanisms: receiver input stalls (coefficient load or back-pressure) %0d, host back-pressure stalls %0d, averaged profiles %0d, readbacks %0d, idle cycles after reset %0d",
             n_in_stall, n_host_stall, n_profiles, n_readback, n_reset_idle);
    check(n_in_stall > 0, "receiver input never stalled");
    check(n_host_stall > 0, "host back-pressure never happened");
    check(n_profiles == GROUPS * NUM_RX, "not every chain delivered its profiles");
    check(n_readback > 0, "no readback");
    check(tx_err == 0, "handshake rule broken on tx_out");
    for (int r = 0; r < NUM_RX; r++) check(rx_err[r] == 0, "handshake rule broken on rx_out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
