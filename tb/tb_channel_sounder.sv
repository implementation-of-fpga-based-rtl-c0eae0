// End-to-end testbench of the dual-receiver channel sounder: two receive
// chains with 256-tap correlators, an order-8 sequence (L = 255) and K = 4.
// Transmitter, a model multipath channel per chain and the host are in the
// shared body; see its header for what is checked.
module tb_channel_sounder;
  localparam int NUM_RX = 2, TAPS = 256, ORDER = 8, L = 255, LG = 2;
  localparam logic [9:0] POLY = 10'h0b8;   // x^8 + x^6 + x^5 + x^4 + 1

  `include "cs_e2e_body.svh"

  channel_sounder #(.NUM_RX(NUM_RX), .CORR_TAPS(TAPS)) dut (.*);
endmodule
