// sea_sbox: the SEA substitution layer S on one n/2-bit half.
//
// The half is n_b words of B bits (word i in bits [B*i +: B]). The 3-bit S-box
// is applied in bitsliced form to each group of three consecutive words
// (a, b, c) = (x_3i, x_3i+1, x_3i+2), so one evaluation substitutes B 3-bit
// values at once, bit j of a, b and c forming one value:
//   a1 = (c  & b ) ^ a
//   b1 = (c  & a1) ^ b
//   c1 = (a1 | b1) ^ c
//   a2 = (c1 & b1) ^ a1        output (a2, b1, c1)
// The paper names the S-box but does not define it; these equations are
// those of the original SEA specification. NB must be a multiple of 3.
// Purely combinational: three AND/OR levels and XORs per bit.
module sea_sbox #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  if (NB % 3 != 0) begin : g_bad_nb
    $error("sea_sbox: NB must be a multiple of 3");
  end

  for (genvar g = 0; g < NB / 3; g++) begin : g_grp
    logic [B-1:0] a, b, c, a1, b1, c1, a2;
    always_comb begin
      a  = x[B*(3*g)   +: B];
      b  = x[B*(3*g+1) +: B];
      c  = x[B*(3*g+2) +: B];
      a1 = (c & b) ^ a;
      b1 = (c & a1) ^ b;
      c1 = (a1 | b1) ^ c;
      a2 = (c1 & b1) ^ a1;
    end
    assign y[B*(3*g)   +: B] = a2;
    assign y[B*(3*g+1) +: B] = b1;
    assign y[B*(3*g+2) +: B] = c1;
  end

endmodule
