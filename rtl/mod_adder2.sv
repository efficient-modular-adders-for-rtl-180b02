// mod_adder2: modulo 2^W-1 (one's-complement) adder with a select multiplexer
// (Mod_adder2).
//
// Two carry-propagate adders run in parallel: s0 = x + y and s1 = x + y + 1.
// The carry-out of s0 tells whether x + y reached 2^W; if it did, the result is
// (x + y + 1) mod 2^W, otherwise x + y. Zero keeps both of its one's-complement
// encodings: all-zeros, and all-ones when x + y = 2^W - 1 exactly, which is
// never incremented. Operands may themselves be either encoding of zero.
//
// Interface: W-bit x, y in, W-bit z out; purely combinational.
module mod_adder2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);

  logic [W:0] s0;  // x + y, with carry-out
  logic [W-1:0] s1;  // (x + y + 1) mod 2^W

  always_comb begin
    s0 = {1'b0, x} + {1'b0, y};
    s1 = x + y + W'(1);
    z  = s0[W] ? s1 : s0[W-1:0];
  end

endmodule
