// mod_adder3: modulo 2^W-1 adder with end-around carry (Mod_adder3).
//
// The sum s = x + y is formed with its carry-out, and the carry-out is then
// added back to the low W bits: z = s[W-1:0] + s[W]. Because x + y <= 2^(W+1)-2,
// the second addition can never carry out again. There is no multiplexer,
// which makes this the most compact of the three adders. The function is the
// same as mod_adder2: all-ones is kept as the second encoding of zero when
// x + y = 2^W - 1.
//
// Interface: W-bit x, y in, W-bit z out; purely combinational.
module mod_adder3 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);

  logic [W:0] s;  // x + y, with carry-out

  always_comb begin
    s = {1'b0, x} + {1'b0, y};
    z = s[W-1:0] + W'(s[W]);
  end

endmodule
