// End-to-end testbench of the channel sounder at its default size: one
// receive chain with the 512-tap correlator, the order-9 sequence
// x^9 + x^5 + 1 (L = 511) and K = 4. See the shared body for what is checked.
module tb_channel_sounder_full;
  localparam int NUM_RX = 1, TAPS = 512, ORDER = 9, L = 511, LG = 2;
  localparam logic [9:0] POLY = 10'h110;   // x^9 + x^5 + 1

  `include "cs_e2e_body.svh"

  channel_sounder dut (.*);
endmodule
