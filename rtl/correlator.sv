// Correlator datapath: PN matched filter and correlation power.
//
// On a `start` pulse the core reloads the PN generator with its seed and
// clocks L = min(seq_len, TAPS) chips out of it into a coefficient shift
// register, so that the first chip ends at tap L-1 and the last at tap 0 and
// the filter is matched to the transmitted sequence. Taps at L and above are
// masked off. It then empties the sample shift registers and starts
// processing: two parallel correlator lanes filter the in-phase and the
// quadrature parts of every SC16 input sample, and the squared magnitude
// re^2 + im^2 of the complex correlation, shifted right by PWR_SHIFT and
// saturated, is given out as a 32-bit unsigned power.
//
// Interface: AXI-stream SC16 in, AXI-stream 32-bit power out, one output per
// input. Before the first `start` inputs are taken and dropped; while the
// coefficients load (L cycles) the input is stalled. The PN generator sits
// beside this module (`pn_chip`, `pn_adv`, `pn_load`).
//
// Timing: full rate, one sample per cycle. An output appears 2 + log2(TAPS)
// enabled cycles after its input was taken; back-pressure on `m_tready`
// freezes the whole pipeline. The coefficient loading and power scaling are
// this design's own choices.
module correlator #(
  parameter int unsigned TAPS      = 512,
  parameter int unsigned PWR_SHIFT = 18,
  localparam int unsigned W  = 16,
  localparam int unsigned YW = W + 1 + $clog2(TAPS),
  localparam int unsigned PW = 2 * YW + 1,
  localparam int unsigned LAT = 2 + $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [15:0]   seq_len,
  // samples
  input  cs_pkg::sc16_t s_tdata,
  input  logic          s_tvalid,
  output logic          s_tready,
  // correlation power
  output logic [31:0]   m_tdata,
  output logic          m_tvalid,
  input  logic          m_tready,
  // PN generator
  input  logic          pn_chip,
  output logic          pn_adv,
  output logic          pn_load
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;

  state_t              state;
  logic [15:0]         ntaps, ld_cnt;
  logic [TAPS-1:0]     coef, mask;
  logic                en, accept;
  logic [LAT-2:0]      v;
  logic signed [YW-1:0] y_re, y_im;
  logic [PW-1:0]       pwr;
  logic [31:0]         pwr_q;
  logic                pwr_v;

  assign ntaps = (seq_len == 16'd0) ? 16'd1 :
                 (seq_len > 16'(TAPS)) ? 16'(TAPS) : seq_len;

  assign en       = !m_tvalid || m_tready;
  assign s_tready = (state == S_IDLE) || (state == S_RUN && en);
  assign accept   = (state == S_RUN) && s_tvalid && en;
  assign pn_load  = start;
  assign pn_adv   = (state == S_LOAD) && !start;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      ld_cnt <= '0;
      mask   <= '0;
      coef   <= '0;
    end else if (start) begin
      state  <= S_LOAD;
      ld_cnt <= '0;
      mask   <= '0;
    end else if (state == S_LOAD) begin
      coef   <= {coef[TAPS-2:0], pn_chip};
      mask   <= {mask[TAPS-2:0], 1'b1};
      ld_cnt <= ld_cnt + 1'b1;
      if (ld_cnt + 1'b1 == ntaps) state <= S_RUN;
    end
  end

  corr_lane #(.TAPS(TAPS), .W(W)) u_re (
    .clk (clk), .en (en), .shift (accept), .clr (rst || start),
    .x (s_tdata.i), .coef (coef), .mask (mask), .y (y_re)
  );

  corr_lane #(.TAPS(TAPS), .W(W)) u_im (
    .clk (clk), .en (en), .shift (accept), .clr (rst || start),
    .x (s_tdata.q), .coef (coef), .mask (mask), .y (y_im)
  );

  // Valid bits travel beside the lane pipelines (shift register + tree).
  always_ff @(posedge clk) begin
    if (rst || start) v <= '0;
    else if (en)      v <= {v[LAT-3:0], accept};
  end

  logic signed [PW-1:0] re_w, im_w;
  assign re_w = PW'(y_re);
  assign im_w = PW'(y_im);
  assign pwr  = PW'(re_w * re_w + im_w * im_w);

  always_ff @(posedge clk) begin
    if (rst || start) begin
      pwr_v <= 1'b0;
      pwr_q <= '0;
    end else if (en) begin
      pwr_v <= v[LAT-2];
      pwr_q <= ((pwr >> PWR_SHIFT) > PW'(32'hffff_ffff)) ? 32'hffff_ffff
                                                        : 32'(pwr >> PWR_SHIFT);
    end
  end

  assign m_tvalid = pwr_v;
  assign m_tdata  = pwr_q;

endmodule
