// Averaging computation engine.
//
// Settings registers configure the averaging datapath:
//   SR 131  block reset: bit 0 held high keeps the engine in reset
//   SR 132  log2 of the averaging factor [31:16], packet length [15:0]
//   SR 255  readback address
// Readback RB 0 block reset and RB 1 the SR 132 word, in the low 32 bits of
// the 64-bit word. The averaging factor is K = 2^log2, at most 128. Register
// numbers follow the document; the bit packing and the reset contents
// (K = 1, packet length 63) are this design's own.
//
// Data: 32-bit power values in, one averaged packet out per K packets in.
module averaging_ce #(
  parameter int unsigned MAX_LEN = 1024,
  parameter int unsigned MAX_LOG = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  cs_pkg::set_bus_t set_bus,
  output logic [63:0]      rb_data,
  input  logic [31:0]      s_tdata,
  input  logic             s_tvalid,
  output logic             s_tready,
  output logic [31:0]      m_tdata,
  output logic             m_tvalid,
  output logic             m_tlast,
  input  logic             m_tready
);
  import cs_pkg::*;

  logic        blk_rst;
  logic [31:0] r_cfg;
  logic [7:0]  rb_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      blk_rst <= 1'b0;
      r_cfg   <= {16'd0, 16'(PN_DEFAULT_LEN)};
      rb_addr <= '0;
    end else if (set_bus.stb) begin
      unique case (set_bus.addr)
        AVG_SR_RESET: blk_rst <= set_bus.data[0];
        AVG_SR_CFG:   r_cfg   <= set_bus.data;
        SR_RB_ADDR:   rb_addr <= set_bus.data[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rb_addr)
      8'd0:    rb_data = {32'd0, 31'd0, blk_rst};
      8'd1:    rb_data = {32'd0, r_cfg};
      default: rb_data = '0;
    endcase
  end

  averager #(.MAX_LEN(MAX_LEN), .MAX_LOG(MAX_LOG)) u_avg (
    .clk      (clk),
    .rst      (rst || blk_rst),
    .seq_len  (r_cfg[15:0]),
    .log_avg  (r_cfg[31:16]),
    .s_tdata  (s_tdata),
    .s_tvalid (s_tvalid),
    .s_tready (s_tready),
    .m_tdata  (m_tdata),
    .m_tvalid (m_tvalid),
    .m_tlast  (m_tlast),
    .m_tready (m_tready)
  );

endmodule
