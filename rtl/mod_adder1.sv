// mod_adder1: adder-based modulo-m operator (Mod_adder1).
//
// For x, y in [0, m-1], (x + y) mod m is x + y when x + y < m and x + y - m
// otherwise. Two carry-propagate adders work in cascade: the first forms
// s1 = x + y with its carry (W+1 bits), the second forms s2 = s1 - m as a
// two's-complement sum with two extra bits. The sign bit of s2 drives a 2:1
// multiplexer that keeps s1 while it is below m and s2 otherwise. This is the
// structure the paper gives for Mod_adder1; the cascade (rather than a three-operand
// adder for x + y - m) is this design's choice.
//
// Interface: x, y are W-bit operands that must lie in [0, M-1]; z is the
// W-bit residue. Purely combinational. M may be any value from 2 to 2^W; with
// M = 2^W (the default) the operator is the plain modulo 2^b addition of SEA.
module mod_adder1 #(
  parameter int unsigned     W = 8,
  parameter longint unsigned M = 64'd1 << W
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);

  // -m in W+2 bits, added by the second carry-propagate adder
  localparam logic [W+1:0] NEG_M = ~(W + 2)'(M) + (W + 2)'(1);

  logic [W:0]   s1;  // x + y
  logic [W+1:0] s2;  // x + y - m, two's complement

  always_comb begin
    s1 = {1'b0, x} + {1'b0, y};
    s2 = {1'b0, s1} + NEG_M;
    z  = s2[W+1] ? s1[W-1:0] : s2[W-1:0];
  end

endmodule
