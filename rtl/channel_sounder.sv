// Channel sounder signal processing: one DSSS transmit chain and NUM_RX
// receive chains.
//
// Transmit: data symbols from the host are spread by the spectrum spreader
// CE into L chips each at the sounding rate R_s; the chips go out to the
// up-converter and radio. Receive: each chain takes down-converted samples at
// R_s, correlates them with the same PN sequence in a correlator CE (one
// 32-bit power per sample, so a power delay profile every L samples) and
// averages K profiles in an averaging CE, which sends one profile per K to
// the host. In the single-receiver image the correlator has 512 taps; the
// dual-receiver image uses NUM_RX = 2 and CORR_TAPS = 256.
//
// The framework that surrounds the engines (packet router, shells, host
// link, converters, radios) is outside this module: its streams are the
// ports. The flow graph of the router is fixed here as direct connections,
// correlator to averager inside each receive chain.
//
// Settings: one bus shared by all CEs, with `set_ce` choosing the engine:
// 0 is the spreader, 1 + 2r the correlator of receive chain r, 2 + 2r its
// averager. `rb_ce` chooses in the same way whose readback word is on
// `rb_data`. This addressing is this design's own.
module channel_sounder #(
  parameter int unsigned NUM_RX    = 1,
  parameter int unsigned CORR_TAPS = 512,
  parameter int unsigned PWR_SHIFT = 18,
  parameter int unsigned AVG_DEPTH = 1024
) (
  input  logic          clk,
  input  logic          rst,
  // settings bus and readback
  input  logic          set_stb,
  input  logic [3:0]    set_ce,
  input  logic [7:0]    set_addr,
  input  logic [31:0]   set_data,
  input  logic [3:0]    rb_ce,
  output logic [63:0]   rb_data,
  // transmit: symbols from host, chips to the up-converter
  input  cs_pkg::sc16_t tx_in_tdata,
  input  logic          tx_in_tvalid,
  output logic          tx_in_tready,
  output cs_pkg::sc16_t tx_out_tdata,
  output logic          tx_out_tvalid,
  output logic          tx_out_tlast,
  input  logic          tx_out_tready,
  // receive: samples from the down-converters, profiles to host
  input  cs_pkg::sc16_t rx_in_tdata   [NUM_RX],
  input  logic          rx_in_tvalid  [NUM_RX],
  output logic          rx_in_tready  [NUM_RX],
  output logic [31:0]   rx_out_tdata  [NUM_RX],
  output logic          rx_out_tvalid [NUM_RX],
  output logic          rx_out_tlast  [NUM_RX],
  input  logic          rx_out_tready [NUM_RX]
);
  import cs_pkg::*;

  localparam int unsigned NCE = 1 + 2 * NUM_RX;

  set_bus_t    bus [NCE];
  logic [63:0] rb  [NCE];

  for (genvar c = 0; c < int'(NCE); c++) begin : g_bus
    assign bus[c].stb  = set_stb && (set_ce == 4'(c));
    assign bus[c].addr = set_addr;
    assign bus[c].data = set_data;
  end

  always_comb begin
    rb_data = '0;
    for (int c = 0; c < int'(NCE); c++)
      if (rb_ce == 4'(c)) rb_data = rb[c];
  end

  spreader_ce u_tx (
    .clk      (clk),
    .rst      (rst),
    .set_bus  (bus[0]),
    .rb_data  (rb[0]),
    .s_tdata  (tx_in_tdata),
    .s_tvalid (tx_in_tvalid),
    .s_tready (tx_in_tready),
    .m_tdata  (tx_out_tdata),
    .m_tvalid (tx_out_tvalid),
    .m_tlast  (tx_out_tlast),
    .m_tready (tx_out_tready)
  );

  for (genvar r = 0; r < int'(NUM_RX); r++) begin : g_rx
    logic [31:0] pwr_tdata;
    logic        pwr_tvalid, pwr_tready;

    correlator_ce #(.TAPS(CORR_TAPS), .PWR_SHIFT(PWR_SHIFT)) u_corr (
      .clk      (clk),
      .rst      (rst),
      .set_bus  (bus[1 + 2*r]),
      .rb_data  (rb[1 + 2*r]),
      .s_tdata  (rx_in_tdata[r]),
      .s_tvalid (rx_in_tvalid[r]),
      .s_tready (rx_in_tready[r]),
      .m_tdata  (pwr_tdata),
      .m_tvalid (pwr_tvalid),
      .m_tready (pwr_tready)
    );

    averaging_ce #(.MAX_LEN(AVG_DEPTH)) u_avg (
      .clk      (clk),
      .rst      (rst),
      .set_bus  (bus[2 + 2*r]),
      .rb_data  (rb[2 + 2*r]),
      .s_tdata  (pwr_tdata),
      .s_tvalid (pwr_tvalid),
      .s_tready (pwr_tready),
      .m_tdata  (rx_out_tdata[r]),
      .m_tvalid (rx_out_tvalid[r]),
      .m_tlast  (rx_out_tlast[r]),
      .m_tready (rx_out_tready[r])
    );
  end

endmodule
