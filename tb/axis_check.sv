// AXI-stream handshake checker for testbenches. Once `valid` is high it must
// stay high, with `data` and `last` unchanged, until `ready` takes the
// transfer. Violations are counted on `errors` and reported.
module axis_check #(
  parameter int unsigned W = 32,
  parameter string       NAME = "stream"
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid,
  input  logic         ready,
  input  logic         last,
  input  logic [W-1:0] data,
  output int           errors
);
  initial errors = 0;

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           valid && !ready |=> valid && $stable(data) && $stable(last))
    else begin
      errors++;
      $display("AXIS %s: valid dropped or data changed before ready", NAME);
    end
endmodule
