// Programmable PN sequence generator.
//
// A Fibonacci linear feedback shift register of MAX_ORDER stages. Stage 1
// receives the feedback bit, which is the XOR of every stage ANDed with the
// matching bit of the generator polynomial register; every other stage takes
// the value of the stage before it. For a polynomial of order N the chip
// output is stage N, so polynomials of any order up to MAX_ORDER (sequences
// up to 2^MAX_ORDER - 1 chips) can be programmed at run time.
//
// Interface: bit k-1 of `poly` and `seed` is stage k. `load` copies the seed
// into the register; otherwise `adv` steps it by one chip. `chip` is the
// current value of stage `order` and is valid in the same cycle (combinational
// from the register), so a consumer reads `chip` and pulses `adv` to move on.
// `load` wins over `adv`. Orders of 0 select stage 1.
//
// The stage structure, AND/XOR feedback and output tap follow the document's
// generator; the load/advance handshake is this design's own.
module pn_gen #(
  parameter int unsigned MAX_ORDER = 10,
  localparam int unsigned OW = $clog2(MAX_ORDER + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic                 adv,
  input  logic [MAX_ORDER-1:0] poly,
  input  logic [MAX_ORDER-1:0] seed,
  input  logic [OW-1:0]        order,
  output logic                 chip
);

  logic [MAX_ORDER-1:0] sr;
  logic                 fb;

  assign fb = ^(sr & poly);

  always_ff @(posedge clk) begin
    if (rst || load) sr <= seed;
    else if (adv)    sr <= {sr[MAX_ORDER-2:0], fb};
  end

  always_comb begin
    chip = sr[0];
    for (int k = 1; k <= MAX_ORDER; k++)
      if (OW'(k) == order) chip = sr[k-1];
  end

endmodule
