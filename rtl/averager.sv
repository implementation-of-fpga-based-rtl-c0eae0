// Averaging datapath: element-wise mean of K packets.
//
// The power stream is cut into packets of `seq_len` values (one power delay
// profile each). An accumulator memory of MAX_LEN words keeps a running sum
// per position: the first packet of a group is written into it, the next
// ones are added to it, and during the K-th packet the sum for each position
// is divided by K = 2^log_avg with a right shift and given out instead of
// being written back. Only K that are powers of two up to 2^MAX_LOG are
// possible; larger `log_avg` values are taken as MAX_LOG.
//
// The memory is read one cycle before it is written (a read-modify-write
// pipeline of two stages), as a block RAM with a registered read port would
// be. When the packet is a single value long, the value written in one cycle
// is forwarded to the read of the next.
//
// Interface: AXI-stream 32-bit power in; AXI-stream 32-bit averages out, with
// `m_tlast` on the last value of each averaged packet. Output rate is the
// input rate divided by K.
//
// Timing: the average for a position appears one cycle after the K-th value
// for that position is taken. Back-pressure on `m_tready` stalls the input.
module averager #(
  parameter int unsigned MAX_LEN = 1024,
  parameter int unsigned MAX_LOG = 7,
  localparam int unsigned DW = 32,
  localparam int unsigned AW = DW + MAX_LOG,
  localparam int unsigned IW = $clog2(MAX_LEN),
  localparam int unsigned GW = $clog2(MAX_LOG + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [15:0]   seq_len,
  input  logic [15:0]   log_avg,
  input  logic [DW-1:0] s_tdata,
  input  logic          s_tvalid,
  output logic          s_tready,
  output logic [DW-1:0] m_tdata,
  output logic          m_tvalid,
  output logic          m_tlast,
  input  logic          m_tready
);

  logic [AW-1:0] mem [MAX_LEN];

  logic [GW-1:0]  lg;
  logic [15:0]    len;
  logic [IW-1:0]  idx;
  logic [MAX_LOG-1:0] pkt;
  logic           en, accept, idx_last, pkt_last;

  // stage B registers
  logic           b_v, b_first, b_last, b_tlast;
  logic [IW-1:0]  b_idx;
  logic [DW-1:0]  b_x;
  logic [AW-1:0]  rd_q, fwd_d, acc;
  logic           fwd_q;
  logic           wr_en;

  assign lg  = (log_avg > 16'(MAX_LOG)) ? GW'(MAX_LOG) : GW'(log_avg);
  assign len = (seq_len == 16'd0) ? 16'd1 :
               (seq_len > 16'(MAX_LEN)) ? 16'(MAX_LEN) : seq_len;

  assign idx_last = (16'(idx) + 16'd1 == len);
  assign pkt_last = (MAX_LOG'(pkt) == MAX_LOG'((1 << lg) - 1));

  assign m_tvalid = b_v && b_last;
  assign en       = !m_tvalid || m_tready;
  assign s_tready = en;
  assign accept   = s_tvalid && en;

  assign acc   = (b_first ? '0 : (fwd_q ? fwd_d : rd_q)) + AW'(b_x);
  assign wr_en = en && b_v && !b_last;

  assign m_tdata = DW'(acc >> lg);
  assign m_tlast = b_tlast;

  // position and packet counters
  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0;
      pkt <= '0;
    end else if (accept) begin
      idx <= idx_last ? '0 : idx + 1'b1;
      if (idx_last) pkt <= pkt_last ? '0 : pkt + 1'b1;
    end
  end

  // accumulator memory: registered read, write from stage B
  always_ff @(posedge clk) begin
    if (wr_en) mem[b_idx] <= acc;
    if (en) rd_q <= mem[idx];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      b_v     <= 1'b0;
      b_first <= 1'b0;
      b_last  <= 1'b0;
      b_tlast <= 1'b0;
      b_idx   <= '0;
      b_x     <= '0;
      fwd_q   <= 1'b0;
      fwd_d   <= '0;
    end else if (en) begin
      b_v     <= accept;
      b_first <= (pkt == '0);
      b_last  <= pkt_last;
      b_tlast <= idx_last;
      b_idx   <= idx;
      b_x     <= s_tdata;
      fwd_q   <= wr_en && (b_idx == idx);
      fwd_d   <= acc;
    end
  end

endmodule
