// Correlator computation engine.
//
// Settings registers configure a PN sequence generator and the correlator
// datapath beside it:
//   SR 131  block reset: bit 0 held high keeps the engine in reset
//   SR 132  block start: a 0-to-1 change of bit 0 starts the correlator
//   SR 133  polynomial [25:16], seed [9:0] (bit k-1 is LFSR stage k)
//   SR 134  sequence length [31:16], polynomial order [3:0]
//   SR 255  readback address
// Readback RB 0 block reset, RB 1 block start, RB 2 polynomial/seed, RB 3
// lengths, in the low 32 bits of the 64-bit word. An edge detector turns
// the start register into the one-cycle start pulse of the correlator, which
// then loads its coefficients and processes every following sample. Register
// numbers and the edge detector follow the document; the bit packing and
// the reset contents are this design's own.
//
// Data: SC16 samples in, one 32-bit correlation power out per sample.
module correlator_ce #(
  parameter int unsigned TAPS      = 512,
  parameter int unsigned PWR_SHIFT = 18,
  parameter int unsigned MAX_ORDER = 10,
  localparam int unsigned OW = $clog2(MAX_ORDER + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  cs_pkg::set_bus_t set_bus,
  output logic [63:0]      rb_data,
  input  cs_pkg::sc16_t    s_tdata,
  input  logic             s_tvalid,
  output logic             s_tready,
  output logic [31:0]      m_tdata,
  output logic             m_tvalid,
  input  logic             m_tready
);
  import cs_pkg::*;

  logic        blk_rst, blk_start, start_d, start_pulse;
  logic [31:0] r_polyseed, r_lens;
  logic [7:0]  rb_addr;
  logic        core_rst;
  logic        pn_chip, pn_adv, pn_load;

  always_ff @(posedge clk) begin
    if (rst) begin
      blk_rst    <= 1'b0;
      blk_start  <= 1'b0;
      r_polyseed <= {6'd0, 10'(PN_DEFAULT_POLY), 6'd0, 10'(PN_DEFAULT_SEED)};
      r_lens     <= {16'(PN_DEFAULT_LEN), 16'(PN_DEFAULT_ORDER)};
      rb_addr    <= '0;
    end else if (set_bus.stb) begin
      unique case (set_bus.addr)
        COR_SR_RESET:    blk_rst    <= set_bus.data[0];
        COR_SR_START:    blk_start  <= set_bus.data[0];
        COR_SR_POLYSEED: r_polyseed <= set_bus.data;
        COR_SR_LENS:     r_lens     <= set_bus.data;
        SR_RB_ADDR:      rb_addr    <= set_bus.data[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rb_addr)
      8'd0:    rb_data = {32'd0, 31'd0, blk_rst};
      8'd1:    rb_data = {32'd0, 31'd0, blk_start};
      8'd2:    rb_data = {32'd0, r_polyseed};
      8'd3:    rb_data = {32'd0, r_lens};
      default: rb_data = '0;
    endcase
  end

  assign core_rst = rst || blk_rst;

  // Rising-edge detector on the start register. It keeps following the
  // register through a block reset, so leaving reset is not a start.
  always_ff @(posedge clk) begin
    if (rst) start_d <= 1'b0;
    else          start_d <= blk_start;
  end
  assign start_pulse = blk_start && !start_d && !core_rst;

  pn_gen #(.MAX_ORDER(MAX_ORDER)) u_pn (
    .clk   (clk),
    .rst   (core_rst),
    .load  (pn_load),
    .adv   (pn_adv),
    .poly  (r_polyseed[16 +: MAX_ORDER]),
    .seed  (r_polyseed[0 +: MAX_ORDER]),
    .order (r_lens[0 +: OW]),
    .chip  (pn_chip)
  );

  correlator #(.TAPS(TAPS), .PWR_SHIFT(PWR_SHIFT)) u_corr (
    .clk      (clk),
    .rst      (core_rst),
    .start    (start_pulse),
    .seq_len  (r_lens[31:16]),
    .s_tdata  (s_tdata),
    .s_tvalid (s_tvalid),
    .s_tready (s_tready),
    .m_tdata  (m_tdata),
    .m_tvalid (m_tvalid),
    .m_tready (m_tready),
    .pn_chip  (pn_chip),
    .pn_adv   (pn_adv),
    .pn_load  (pn_load)
  );

endmodule
