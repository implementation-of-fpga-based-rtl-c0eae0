// Spectrum spreader computation engine.
//
// Settings registers programmed over the settings bus configure a PN
// sequence generator and the spreader datapath beside it:
//   SR 131  block reset: bit 0 held high keeps the engine in reset
//   SR 132  polynomial [25:16], seed [9:0] (bit k-1 is LFSR stage k)
//   SR 133  sequence length [31:16], polynomial order [3:0]
//   SR 255  readback address
// The 64-bit readback word shows RB 0 block reset, RB 1 polynomial/seed,
// RB 2 lengths, in the same packing, in its low 32 bits. Writing SR 132 or
// SR 133 reloads the generator with the seed. The register numbers follow the
// document; the bit packing inside each word and the reset contents
// (x^6 + x^5 + 1, seed stage 6, L = 63) are this design's own.
//
// Data: SC16 symbols in, L spread SC16 samples per symbol out (AXI-stream),
// one sample per clock.
module spreader_ce #(
  parameter int unsigned MAX_ORDER = 10,
  localparam int unsigned MAX_LEN = (1 << MAX_ORDER) - 1,
  localparam int unsigned LW = $clog2(MAX_LEN + 1),
  localparam int unsigned OW = $clog2(MAX_ORDER + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  cs_pkg::set_bus_t set_bus,
  output logic [63:0]      rb_data,
  input  cs_pkg::sc16_t    s_tdata,
  input  logic             s_tvalid,
  output logic             s_tready,
  output cs_pkg::sc16_t    m_tdata,
  output logic             m_tvalid,
  output logic             m_tlast,
  input  logic             m_tready
);
  import cs_pkg::*;

  logic        blk_rst;
  logic [31:0] r_polyseed, r_lens;
  logic [7:0]  rb_addr;
  logic        cfg_wr;
  logic        core_rst;
  logic        pn_chip, pn_adv, pn_load;

  always_ff @(posedge clk) begin
    if (rst) begin
      blk_rst    <= 1'b0;
      r_polyseed <= {6'd0, 10'(PN_DEFAULT_POLY), 6'd0, 10'(PN_DEFAULT_SEED)};
      r_lens     <= {16'(PN_DEFAULT_LEN), 16'(PN_DEFAULT_ORDER)};
      rb_addr    <= '0;
      cfg_wr     <= 1'b0;
    end else begin
      cfg_wr <= 1'b0;
      if (set_bus.stb) begin
        unique case (set_bus.addr)
          SPR_SR_RESET:    blk_rst <= set_bus.data[0];
          SPR_SR_POLYSEED: begin r_polyseed <= set_bus.data; cfg_wr <= 1'b1; end
          SPR_SR_LENS:     begin r_lens     <= set_bus.data; cfg_wr <= 1'b1; end
          SR_RB_ADDR:      rb_addr <= set_bus.data[7:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rb_addr)
      8'd0:    rb_data = {32'd0, 31'd0, blk_rst};
      8'd1:    rb_data = {32'd0, r_polyseed};
      8'd2:    rb_data = {32'd0, r_lens};
      default: rb_data = '0;
    endcase
  end

  assign core_rst = rst || blk_rst;

  pn_gen #(.MAX_ORDER(MAX_ORDER)) u_pn (
    .clk   (clk),
    .rst   (core_rst),
    .load  (pn_load || cfg_wr),
    .adv   (pn_adv),
    .poly  (r_polyseed[16 +: MAX_ORDER]),
    .seed  (r_polyseed[0 +: MAX_ORDER]),
    .order (r_lens[0 +: OW]),
    .chip  (pn_chip)
  );

  spreader #(.MAX_LEN(MAX_LEN)) u_spread (
    .clk      (clk),
    .rst      (core_rst),
    .seq_len  (r_lens[16 +: LW]),
    .s_tdata  (s_tdata),
    .s_tvalid (s_tvalid),
    .s_tready (s_tready),
    .m_tdata  (m_tdata),
    .m_tvalid (m_tvalid),
    .m_tlast  (m_tlast),
    .m_tready (m_tready),
    .pn_chip  (pn_chip),
    .pn_adv   (pn_adv),
    .pn_load  (pn_load)
  );

endmodule
