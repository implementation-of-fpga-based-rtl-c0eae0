// Spectrum spreader datapath.
//
// Takes one SC16 data symbol and gives out `seq_len` SC16 samples for it:
// the symbol multiplied by each chip of the real PN sequence in turn. A chip
// of 1 passes the symbol unchanged and a chip of 0 stands for -1 and passes
// its two's complement (with -32768 saturated to +32767). After the last chip
// of a symbol the PN generator is reloaded with its seed, so every symbol is
// spread by the same L chips from the start of the sequence.
//
// Interface: AXI-stream in (`s_*`, one symbol per transfer) and out (`m_*`,
// one chip-sample per transfer, `m_tlast` on the last chip of a symbol). The
// PN generator sits beside this module: `pn_chip` is its current chip,
// `pn_adv` steps it and `pn_load` reloads its seed.
//
// Timing: one output per cycle while `m_tready` is high; a new symbol is
// accepted in the cycle the last chip of the previous one is taken, so the
// output runs without gaps at rate R_s and the input at R_s / L. Sequence
// lengths below 1 behave as 1.
module spreader #(
  parameter int unsigned MAX_LEN = 1023,
  localparam int unsigned LW = $clog2(MAX_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LW-1:0] seq_len,
  // data symbols
  input  cs_pkg::sc16_t s_tdata,
  input  logic          s_tvalid,
  output logic          s_tready,
  // spread samples
  output cs_pkg::sc16_t m_tdata,
  output logic          m_tvalid,
  output logic          m_tlast,
  input  logic          m_tready,
  // PN generator
  input  logic          pn_chip,
  output logic          pn_adv,
  output logic          pn_load
);
  import cs_pkg::*;

  sc16_t         sym;
  logic          have;
  logic [LW-1:0] cnt;
  logic          last_chip;
  logic          take;

  assign last_chip = (LW'(cnt + 1'b1) >= seq_len) || (cnt == LW'(MAX_LEN - 1));
  assign take      = m_tvalid && m_tready;

  assign m_tvalid  = have;
  assign m_tlast   = last_chip;
  assign m_tdata.i = pn_chip ? sym.i : neg_sat16(sym.i);
  assign m_tdata.q = pn_chip ? sym.q : neg_sat16(sym.q);

  assign s_tready  = !have || (take && last_chip);
  assign pn_adv    = take && !last_chip;
  assign pn_load   = take && last_chip;

  always_ff @(posedge clk) begin
    if (rst) begin
      have <= 1'b0;
      cnt  <= '0;
      sym  <= '0;
    end else begin
      if (take) cnt <= last_chip ? '0 : LW'(cnt + 1'b1);
      if (s_tvalid && s_tready) begin
        sym  <= s_tdata;
        have <= 1'b1;
      end else if (take && last_chip) begin
        have <= 1'b0;
      end
    end
  end

endmodule
