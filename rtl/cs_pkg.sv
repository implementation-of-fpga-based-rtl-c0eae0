// Shared types and constants of the channel sounder.
//
// SC16 is the sample format of every stream: a signed 16-bit in-phase part
// in the upper half of a 32-bit word and a signed 16-bit quadrature part in
// the lower half. The settings-register numbers below are those of the three
// computation engines (CEs); the field packing inside each 32-bit register
// word (upper half / lower half) is this design's own choice.
package cs_pkg;

  typedef struct packed {
    logic signed [15:0] i;
    logic signed [15:0] q;
  } sc16_t;

  // Settings bus shared by all CEs: one 32-bit write per strobe.
  typedef struct packed {
    logic        stb;
    logic [7:0]  addr;
    logic [31:0] data;
  } set_bus_t;

  // Register used by every CE to select what the readback word shows.
  localparam logic [7:0] SR_RB_ADDR = 8'd255;

  // Spectrum spreader CE.
  localparam logic [7:0] SPR_SR_RESET    = 8'd131;
  localparam logic [7:0] SPR_SR_POLYSEED = 8'd132;
  localparam logic [7:0] SPR_SR_LENS     = 8'd133;

  // Correlator CE.
  localparam logic [7:0] COR_SR_RESET    = 8'd131;
  localparam logic [7:0] COR_SR_START    = 8'd132;
  localparam logic [7:0] COR_SR_POLYSEED = 8'd133;
  localparam logic [7:0] COR_SR_LENS     = 8'd134;

  // Averaging CE.
  localparam logic [7:0] AVG_SR_RESET    = 8'd131;
  localparam logic [7:0] AVG_SR_CFG      = 8'd132;

  // Reset contents of the PN registers: the order-6 generator x^6 + x^5 + 1
  // with a seed whose only set bit is stage 6. Bit k-1 of a word is stage k.
  localparam logic [9:0]              PN_DEFAULT_POLY  = 10'h030;
  localparam logic [9:0]              PN_DEFAULT_SEED  = 10'h020;
  localparam int unsigned             PN_DEFAULT_ORDER = 6;
  localparam int unsigned             PN_DEFAULT_LEN   = 63;

  // Two's complement negation that saturates -32768 to +32767, used when a
  // PN chip of -1 multiplies a 16-bit sample.
  function automatic logic signed [15:0] neg_sat16(input logic signed [15:0] x);
    return (x == 16'sh8000) ? 16'sh7fff : -x;
  endfunction

endpackage
